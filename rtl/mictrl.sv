// mictrl: master of the HFA3861B serial control port (SCLK, SD, R/W, CS).
// A one-cycle WrMmiReq or RdMmiReq starts a 16-bit transfer: CS (active low, miCs)
// falls, then eight address bits and eight data bits go out most significant bit
// first, each placed on SD while SCLK is low and taken by the BBP at the SCLK rising
// edge. A write keeps R/W (miRw) low throughout. A read drives R/W low for the address,
// raises it for the data half, releases SD (miSdEn low) and samples IoSdIn at each SCLK
// rising edge into MmiRData. After the sixteenth bit CS rises and MmiGnt pulses.
// SCLK has a period of 2*SCLK_DIV MacClk cycles.
// The signals, bit order and R/W use follow the document's control-port timing; the
// 8-bit address of reads, the SCLK rate and the single-cycle grant are this design's own.
module mictrl #(
  parameter int unsigned SCLK_DIV = 4
) (
  input  logic       MacClk,
  input  logic       Reset,
  input  logic       WrMmiReq,
  input  logic       RdMmiReq,
  input  logic [7:0] MmiAddr,
  input  logic [7:0] MmiWData,
  output logic [7:0] MmiRData,
  output logic       MmiGnt,
  output logic       MmiBusy,
  output logic       miSclk,
  output logic       miRw,
  output logic       miCs,
  output logic       miSdOut,
  output logic       miSdEn,
  input  logic       IoSdIn
);
  logic [15:0] sh;
  logic [4:0]  nbit;
  logic [7:0]  div;
  logic        rd, act;

  assign MmiBusy = act;
  always_ff @(posedge MacClk) begin
    if (Reset) begin
      sh <= '0; nbit <= '0; div <= '0; rd <= 1'b0; act <= 1'b0; MmiRData <= '0; MmiGnt <= 1'b0;
      miSclk <= 1'b0; miRw <= 1'b0; miCs <= 1'b1; miSdOut <= 1'b0; miSdEn <= 1'b0;
    end else begin
      MmiGnt <= 1'b0;
      if (!act) begin
        if (WrMmiReq || RdMmiReq) begin
          act <= 1'b1; rd <= RdMmiReq && !WrMmiReq; sh <= {MmiAddr, MmiWData}; nbit <= '0;
          div <= '0; miCs <= 1'b0; miRw <= 1'b0; miSdEn <= 1'b1; miSdOut <= MmiAddr[7];
          miSclk <= 1'b0;
        end
      end else if (div == 8'(SCLK_DIV - 1)) begin
        div <= '0;
        if (!miSclk) begin
          miSclk <= 1'b1;                                  // rising edge: bit taken
          if (rd && nbit >= 5'd8) MmiRData <= {MmiRData[6:0], IoSdIn};
        end else begin
          miSclk <= 1'b0;
          nbit   <= nbit + 5'd1;
          sh     <= {sh[14:0], 1'b0};
          if (nbit == 5'd15) begin
            act <= 1'b0; miCs <= 1'b1; miRw <= 1'b0; miSdEn <= 1'b0; MmiGnt <= 1'b1;
          end else begin
            miSdOut <= sh[14];
            if (rd && nbit == 5'd7) begin miRw <= 1'b1; miSdEn <= 1'b0; end
          end
        end
      end else div <= div + 8'd1;
    end
  end
endmodule
