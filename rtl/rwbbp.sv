// rwbbp: programs the HFA3861B registers for each transmitted frame and arbitrates the
// control port between that, RSSI reads and host register accesses.
// On TPWrReq (from tx_pump, held until TPWrGnt) it converts the frame size TxLen in
// octets into the PLCP LENGTH field in microseconds at the frame's rate:
//   LENGTH = ceil(8 * (octets + P) / R), R in Mbit/s, P = 1 for PBCC, 0 for CCK;
// at 11 Mbit/s the length-extension bit is set when LENGTH * 11 - 8 * (octets + P) >= 8,
// so that the receiver's floor(LENGTH * R / 8) - P - ext recovers the octet count.
// It then writes four registers through mictrl: SIGNAL (rate in 100 kbit/s), SERVICE
// (bit 7 length extension, bit 3 PBCC, bit 2 locked clocks), LENGTH high and low
// octets, and pulses TPWrGnt. On RssiReq it reads the RSSI register into miRSSI. A host
// access (cfWrMmiReq / cfRdMmiReq at cfMMIREGAD with cfMMIWDATA) is served when the
// port is free and answered with mmiWrGnt / mmiRdGnt, read data on miRdData.
// The LENGTH arithmetic (the document's formula and its CCK and PBCC examples), the
// registers written and the RSSI read are the document's; the register addresses
// (parameters) and the arbitration order are this design's own.
module rwbbp #(
  parameter logic [7:0] ADDR_SIGNAL  = 8'h0A,
  parameter logic [7:0] ADDR_SERVICE = 8'h0B,
  parameter logic [7:0] ADDR_LENHI   = 8'h0C,
  parameter logic [7:0] ADDR_LENLO   = 8'h0D,
  parameter logic [7:0] ADDR_RSSI    = 8'h3E
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        TPWrReq,
  input  logic [11:0] TxLen,
  input  logic [1:0]  TxRate,
  input  logic        cfPbcc,
  output logic        TPWrGnt,
  input  logic        RssiReq,
  output logic [7:0]  miRSSI,
  input  logic        cfWrMmiReq,
  input  logic        cfRdMmiReq,
  input  logic [7:0]  cfMMIREGAD,
  input  logic [7:0]  cfMMIWDATA,
  output logic        mmiWrGnt,
  output logic        mmiRdGnt,
  output logic [7:0]  miRdData,
  output logic        WrMmiReq,
  output logic        RdMmiReq,
  output logic [7:0]  MmiAddr,
  output logic [7:0]  MmiWData,
  input  logic [7:0]  MmiRData,
  input  logic        MmiGnt
);
  typedef enum logic [2:0] {R_IDLE, R_TXREG, R_TXWAIT, R_RSSI, R_HOSTW, R_HOSTR} rw_e;
  rw_e         st;
  logic [1:0]  ridx;
  logic        issued, rssi_pend, txdone;
  logic [15:0] length;
  logic        lext;
  logic [7:0]  signal, service;

  // PLCP LENGTH in microseconds and the length-extension bit
  always_comb begin
    logic [15:0] bits;
    logic [19:0] prod;
    bits = 16'({TxLen + (cfPbcc ? 12'd1 : 12'd0), 3'b000});
    unique case (TxRate)
      2'd0:    begin length = bits;                             signal = 8'h0A; end
      2'd1:    begin length = (bits + 16'd1) >> 1;              signal = 8'h14; end
      2'd2:    begin length = 16'((20'(bits) * 20'd2 + 20'd10) / 20'd11); signal = 8'h37; end
      default: begin length = 16'((20'(bits) + 20'd10) / 20'd11);     signal = 8'h6E; end
    endcase
    prod    = 20'(length) * 20'd11;
    lext    = (TxRate == 2'd3) && (prod - 20'(bits) >= 20'd8);
    service = {lext, 3'b000, cfPbcc, 1'b1, 2'b00};
  end

  always_comb begin
    WrMmiReq = 1'b0; RdMmiReq = 1'b0; MmiAddr = '0; MmiWData = '0;
    unique case (st)
      R_TXREG: begin
        WrMmiReq = !issued;
        unique case (ridx)
          2'd0: begin MmiAddr = ADDR_SIGNAL;  MmiWData = signal;       end
          2'd1: begin MmiAddr = ADDR_SERVICE; MmiWData = service;      end
          2'd2: begin MmiAddr = ADDR_LENHI;   MmiWData = length[15:8]; end
          default: begin MmiAddr = ADDR_LENLO; MmiWData = length[7:0]; end
        endcase
      end
      R_RSSI:  begin RdMmiReq = !issued; MmiAddr = ADDR_RSSI; end
      R_HOSTW: begin WrMmiReq = !issued; MmiAddr = cfMMIREGAD; MmiWData = cfMMIWDATA; end
      R_HOSTR: begin RdMmiReq = !issued; MmiAddr = cfMMIREGAD; end
      default: ;
    endcase
  end

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      st <= R_IDLE; ridx <= '0; issued <= 1'b0; rssi_pend <= 1'b0; txdone <= 1'b0;
      TPWrGnt <= 1'b0; miRSSI <= '0; mmiWrGnt <= 1'b0; mmiRdGnt <= 1'b0; miRdData <= '0;
    end else begin
      TPWrGnt <= 1'b0; mmiWrGnt <= 1'b0; mmiRdGnt <= 1'b0;
      if (RssiReq) rssi_pend <= 1'b1;
      if (!TPWrReq) txdone <= 1'b0;
      unique case (st)
        R_IDLE: begin
          issued <= 1'b0; ridx <= '0;
          if (TPWrReq && !txdone) st <= R_TXREG;
          else if (rssi_pend)     begin st <= R_RSSI; rssi_pend <= 1'b0; end
          else if (cfWrMmiReq)    st <= R_HOSTW;
          else if (cfRdMmiReq)    st <= R_HOSTR;
        end
        R_TXREG: begin
          issued <= 1'b1;
          if (MmiGnt) begin
            issued <= 1'b0; ridx <= ridx + 2'd1;
            if (ridx == 2'd3) begin st <= R_IDLE; TPWrGnt <= 1'b1; txdone <= 1'b1; end
          end
        end
        R_RSSI:  begin issued <= 1'b1; if (MmiGnt) begin miRSSI <= MmiRData; st <= R_IDLE; end end
        R_HOSTW: begin issued <= 1'b1; if (MmiGnt) begin mmiWrGnt <= 1'b1; st <= R_IDLE; end end
        R_HOSTR: begin
          issued <= 1'b1;
          if (MmiGnt) begin mmiRdGnt <= 1'b1; miRdData <= MmiRData; st <= R_IDLE; end
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
