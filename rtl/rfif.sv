// rfif: control of the HFA3683 RF/IF converter and synthesizer. Two state machines.
// RFIFSM0 sequences the RF power enables around each transmitted frame:
//  IDLE    receive set-up: RFRXPE high, the transmit enables low.
//  IDLE -> RXPELOW when a frame starts (TPStart) with the receiver on, the channel not
//          busy and manual mode off; IDLE -> WAITEND directly if the receiver was off.
//  RXPELOW RFRXPE is dropped; RFPE2, RFTXPE, RFPAPE and RFTRSW rise cfRxPe2Pe2,
//          cfRxPe2TxPe, cfRxPe2PaPe and cfRxPe2TrSw MacClk cycles after it. When all
//          have risen (Pe2TxPeTimeOut) -> WAITEND.
//  WAITEND transmitting, until the last data bit (TPLastBit) -> TXPEHI.
//  TXPEHI  RFPE2, RFTXPE, RFPAPE, RFTRSW fall cfLdb2Pe2, cfLdb2TxPe, cfLdb2PaPe,
//          cfLdb2TrSw cycles after the last bit and RFRXPE rises after cfLdb2RxPe; when
//          all are done (Ldb2TxPeTimeOut) -> IDLE.
// With cfManual set the enables follow cfTxPe, cfRxPe, cfPaPe, cfPe2, cfPe1, cfTrSw
// directly. cfTxPeInv, cfPaPeInv, cfPe2Inv, cfPe1Inv invert the pins for active-low
// parts. RFPE1 is held high in automatic mode.
// RFIFSM1 writes a synthesizer register: on cfSynWrReq it shifts cfNumBit+1 bits of
// cfSynWrData out on RFSYNDATA, most significant first, each taken at an RFSYNCLK rising
// edge (period 2*SYN_DIV cycles), with RFLE low; RFLE then pulses high to latch the word
// and RFWrGnt pulses when it is done.
// The two machines, their states and transitions, the enable names and the register
// write waveform are the document's; that the delays are counted in MacClk cycles
// from the start of each phase and the inversion of the pins are this design's reading of
// the configuration names.
module rfif #(
  parameter int unsigned SYN_DIV = 4
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        TPStart,
  input  logic        TPLastBit,
  input  logic        BUSY,
  input  logic        cfManual,
  input  logic        cfTxPe,
  input  logic        cfRxPe,
  input  logic        cfPaPe,
  input  logic        cfPe2,
  input  logic        cfPe1,
  input  logic        cfTrSw,
  input  logic [7:0]  cfRxPe2Pe2,
  input  logic [7:0]  cfRxPe2TxPe,
  input  logic [7:0]  cfRxPe2PaPe,
  input  logic [7:0]  cfRxPe2TrSw,
  input  logic [7:0]  cfLdb2Pe2,
  input  logic [7:0]  cfLdb2TxPe,
  input  logic [7:0]  cfLdb2PaPe,
  input  logic [7:0]  cfLdb2TrSw,
  input  logic [7:0]  cfLdb2RxPe,
  input  logic        cfTxPeInv,
  input  logic        cfPaPeInv,
  input  logic        cfPe2Inv,
  input  logic        cfPe1Inv,
  input  logic [4:0]  cfNumBit,
  input  logic [31:0] cfSynWrData,
  input  logic        cfSynWrReq,
  output logic        RFTXPE,
  output logic        RFRXPE,
  output logic        RFPAPE,
  output logic        RFPE2,
  output logic        RFPE1,
  output logic        RFTRSW,
  output logic        RFSYNCLK,
  output logic        RFSYNDATA,
  output logic        RFLE,
  output logic        RFWrGnt,
  output logic [1:0]  RfState
);
  // ---------------- RFIFSM0 ----------------
  typedef enum logic [1:0] {IDLE, RXPELOW, WAITEND, TXPEHI} rf0_e;
  rf0_e       st;
  logic [7:0] t;
  logic       a_tx, a_rx, a_pa, a_pe2, a_trsw;
  logic [7:0] mx_on, mx_off;

  always_comb begin
    mx_on = cfRxPe2Pe2;
    if (cfRxPe2TxPe > mx_on) mx_on = cfRxPe2TxPe;
    if (cfRxPe2PaPe > mx_on) mx_on = cfRxPe2PaPe;
    if (cfRxPe2TrSw > mx_on) mx_on = cfRxPe2TrSw;
    mx_off = cfLdb2Pe2;
    if (cfLdb2TxPe > mx_off) mx_off = cfLdb2TxPe;
    if (cfLdb2PaPe > mx_off) mx_off = cfLdb2PaPe;
    if (cfLdb2TrSw > mx_off) mx_off = cfLdb2TrSw;
    if (cfLdb2RxPe > mx_off) mx_off = cfLdb2RxPe;
  end

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      st <= IDLE; t <= '0;
      a_tx <= 1'b0; a_rx <= 1'b1; a_pa <= 1'b0; a_pe2 <= 1'b0; a_trsw <= 1'b0;
    end else begin
      unique case (st)
        IDLE: begin
          t <= '0;
          if (TPStart && !BUSY && !cfManual) begin
            if (a_rx) begin st <= RXPELOW; a_rx <= 1'b0; end
            else begin st <= WAITEND; a_tx <= 1'b1; a_pa <= 1'b1; a_pe2 <= 1'b1; a_trsw <= 1'b1; end
          end
        end
        RXPELOW: begin
          t <= t + 8'd1;
          if (t + 8'd1 >= cfRxPe2Pe2)  a_pe2  <= 1'b1;
          if (t + 8'd1 >= cfRxPe2TxPe) a_tx   <= 1'b1;
          if (t + 8'd1 >= cfRxPe2PaPe) a_pa   <= 1'b1;
          if (t + 8'd1 >= cfRxPe2TrSw) a_trsw <= 1'b1;
          if (t + 8'd1 >= mx_on) st <= WAITEND;
        end
        WAITEND: begin
          t <= '0;
          a_tx <= 1'b1; a_pa <= 1'b1; a_pe2 <= 1'b1; a_trsw <= 1'b1;
          if (TPLastBit) st <= TXPEHI;
        end
        TXPEHI: begin
          t <= t + 8'd1;
          if (t + 8'd1 >= cfLdb2Pe2)  a_pe2  <= 1'b0;
          if (t + 8'd1 >= cfLdb2TxPe) a_tx   <= 1'b0;
          if (t + 8'd1 >= cfLdb2PaPe) a_pa   <= 1'b0;
          if (t + 8'd1 >= cfLdb2TrSw) a_trsw <= 1'b0;
          if (t + 8'd1 >= cfLdb2RxPe) a_rx   <= 1'b1;
          if (t + 8'd1 >= mx_off) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
  assign RfState = st;

  assign RFTXPE = (cfManual ? cfTxPe : a_tx)  ^ cfTxPeInv;
  assign RFRXPE =  cfManual ? cfRxPe : a_rx;
  assign RFPAPE = (cfManual ? cfPaPe : a_pa)  ^ cfPaPeInv;
  assign RFPE2  = (cfManual ? cfPe2  : a_pe2) ^ cfPe2Inv;
  assign RFPE1  = (cfManual ? cfPe1  : 1'b1)  ^ cfPe1Inv;
  assign RFTRSW =  cfManual ? cfTrSw : a_trsw;

  // ---------------- RFIFSM1 ----------------
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_LE} rf1_e;
  rf1_e        ss;
  logic [31:0] sh;
  logic [4:0]  left;
  logic [7:0]  div;

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      ss <= S_IDLE; sh <= '0; left <= '0; div <= '0;
      RFSYNCLK <= 1'b0; RFSYNDATA <= 1'b0; RFLE <= 1'b0; RFWrGnt <= 1'b0;
    end else begin
      RFWrGnt <= 1'b0;
      unique case (ss)
        S_IDLE: if (cfSynWrReq) begin
          ss <= S_SHIFT; sh <= cfSynWrData << (5'd31 - cfNumBit); left <= cfNumBit; div <= '0;
          RFSYNDATA <= cfSynWrData[cfNumBit]; RFSYNCLK <= 1'b0; RFLE <= 1'b0;
        end
        S_SHIFT: begin
          if (div == 8'(SYN_DIV - 1)) begin
            div <= '0;
            if (!RFSYNCLK) RFSYNCLK <= 1'b1;
            else begin
              RFSYNCLK <= 1'b0;
              if (left == 5'd0) ss <= S_LE;
              else begin
                left <= left - 5'd1; sh <= sh << 1; RFSYNDATA <= sh[30];
              end
            end
          end else div <= div + 8'd1;
        end
        S_LE: begin
          if (div == 8'(SYN_DIV - 1)) begin
            div <= '0;
            if (!RFLE) RFLE <= 1'b1;
            else begin RFLE <= 1'b0; RFWrGnt <= 1'b1; ss <= S_IDLE; RFSYNDATA <= 1'b0; end
          end else div <= div + 8'd1;
        end
        default: ss <= S_IDLE;
      endcase
    end
  end
endmodule
