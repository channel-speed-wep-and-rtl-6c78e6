// rx1: receive deserialiser for the HFA3861B serial RX port.
// The baseband processor drives RXCLK and serial data RXD and raises MD_RDY once the
// PLCP header is processed; data arrives least significant bit first and is valid at
// RXCLK rising edges. RXCLK, RXD and MDRDY are asynchronous to MacClk, so they pass a
// two-flop synchroniser; a rising RXCLK edge found in the MacClk domain samples RXD.
// Every eight bits ByteStb pulses for one cycle with ByteData. PktStart pulses when MDRDY
// rises and PktEnd when it falls (after the last byte). ByteCnt counts bytes of the
// current packet. MacClk must be at least four times RXCLK. Bit order and MD_RDY
// framing follow the document's RX port timing; the synchroniser is this design's own.
module rx1 (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        RX_PE,
  input  logic        RXC,
  input  logic        RXD,
  input  logic        MDRDY,
  output logic        PktStart,
  output logic        PktEnd,
  output logic        ByteStb,
  output logic [7:0]  ByteData,
  output logic [11:0] ByteCnt
);
  logic [2:0] rxc_s;
  logic [1:0] rxd_s;
  logic [2:0] rdy_s;
  logic [7:0] shift;
  logic [2:0] bitn;
  logic       active;

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      rxc_s <= '0; rxd_s <= '0; rdy_s <= '0;
    end else begin
      rxc_s <= {rxc_s[1:0], RXC};
      rxd_s <= {rxd_s[0], RXD};
      rdy_s <= {rdy_s[1:0], MDRDY & RX_PE};
    end
  end

  wire rxc_rise = rxc_s[1] & ~rxc_s[2];
  assign PktStart = rdy_s[1] & ~rdy_s[2];
  assign PktEnd   = ~rdy_s[1] & rdy_s[2];

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      shift <= '0; bitn <= '0; active <= 1'b0; ByteStb <= 1'b0; ByteData <= '0; ByteCnt <= '0;
    end else begin
      ByteStb <= 1'b0;
      if (PktStart) begin
        active <= 1'b1; bitn <= '0; ByteCnt <= '0;
      end else if (PktEnd) begin
        active <= 1'b0;
      end else if (active && rxc_rise) begin
        shift <= {rxd_s[1], shift[7:1]};
        bitn  <= bitn + 3'd1;
        if (bitn == 3'd7) begin
          ByteStb  <= 1'b1;
          ByteData <= {rxd_s[1], shift[7:1]};
          ByteCnt  <= ByteCnt + 12'd1;
        end
      end
    end
  end
endmodule
