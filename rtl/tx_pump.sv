// tx_pump: moves one frame to the HFA3861B serial TX port and appends the FCS.
// Requests, highest priority first: TX_ACK_REQ, TX_CTS_REQ (rx_co), txBeaconReq,
// txRtsReq, txMpduReq (tx_co). The selected source presents its current octet and
// a ready flag; tx_pump takes it and pulses that source's TPDP. ACK/CTS/RTS come from
// ackpkt/ctspkt/rtspkt, the beacon from bcnctrl, the MPDU from the buffer manager
// (through the WEP engine). Sequence:
//  1. ask mitop to program the BBP LENGTH/RATE/SERVICE registers (TPWrReq with TxLen,
//     the octet count including the 4-octet FCS, until TPWrGnt). An ACK or CTS is
//     requested by rx_co as soon as its SIFS starts, so this programming overlaps the
//     SIFS; the pump then holds (S_HOLD) until RespGo says the SIFS is over, and drops
//     the response if the request is withdrawn;
//  2. raise TX_PE (TPStart pulses); the BBP sends preamble and PLCP header. Octets are
//     fetched from the source only from the cycle after TPStart, so that the WEP engine,
//     started by TPStart, sees the frame from its first octet;
//  3. when TXRDY rises, shift the frame out on TXD, least significant bit first, one bit
//     per TXC rising edge (the BBP samples on that edge; the next bit follows it);
//  4. after the last FCS bit drop TX_PE, pulse TPLastBit and TxDone, TxKind naming the
//     frame sent.
// A one-octet prefetch buffer keeps the shift register fed; the CRC (framecrc8) runs
// over the octets as they are fetched, and the four FCS octets follow the last source
// octet. TXC and TXRDY are synchronised to MacClk, which must run at least four times
// TXC; the BBP should give at least four MacClk cycles between TXRDY and the first TXC
// rising edge. The handshake follows the document's TX port description; priorities,
// the prefetch and the source ready flags are this design's own.
module tx_pump (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        TX_ACK_REQ,
  input  logic        TX_CTS_REQ,
  input  logic        txBeaconReq,
  input  logic        txRtsReq,
  input  logic        txMpduReq,
  input  logic        RespGo,
  input  logic [7:0]  ACKDATA,
  input  logic [3:0]  ACKLEN,
  input  logic [7:0]  CTSDATA,
  input  logic [3:0]  CTSLEN,
  input  logic [7:0]  RTSDATA,
  input  logic [3:0]  RTSLEN,
  input  logic [7:0]  BCNDATA,
  input  logic [11:0] BcnLen,
  input  logic [7:0]  TPD,
  input  logic [11:0] MpduLen,
  input  logic        MpduRdy,
  output logic        ACKTPDP,
  output logic        CTSTPDP,
  output logic        RTSTPDP,
  output logic        BCNTPDP,
  output logic        macTPDP,
  output logic        TPWrReq,
  output logic [11:0] TxLen,
  input  logic        TPWrGnt,
  output logic        TX_PE,
  output logic        TXD,
  input  logic        TXRDY,
  input  logic        TXC,
  output logic        TPStart,
  output logic        TPLastBit,
  output logic        TxDone,
  output logic [2:0]  TxKind
);
  localparam logic [2:0] K_ACK = 3'd0, K_CTS = 3'd1, K_BCN = 3'd2, K_RTS = 3'd3, K_MPDU = 3'd4;
  typedef enum logic [2:0] {S_IDLE, S_MMI, S_HOLD, S_PE, S_DATA, S_DONE} tp_e;
  tp_e         st;
  logic [2:0]  txc_s, rdy_s;
  logic [11:0] fetched, sent, src_len;
  logic [7:0]  shreg, nxt;
  logic        nxt_v;
  logic [2:0]  bitn;
  logic [7:0]  src_data;
  logic        src_rdy, take, crc_init;
  logic [31:0] crc, fcs;
  logic        fcs_ok;

  always_ff @(posedge MacClk) begin
    if (Reset) begin txc_s <= '0; rdy_s <= '0; end
    else begin txc_s <= {txc_s[1:0], TXC}; rdy_s <= {rdy_s[1:0], TXRDY}; end
  end
  wire txc_rise = txc_s[1] & ~txc_s[2];
  wire rdy_rise = rdy_s[1] & ~rdy_s[2];

  always_comb begin
    unique case (TxKind)
      K_ACK:  begin src_data = ACKDATA; src_rdy = 1'b1; end
      K_CTS:  begin src_data = CTSDATA; src_rdy = 1'b1; end
      K_BCN:  begin src_data = BCNDATA; src_rdy = 1'b1; end
      K_RTS:  begin src_data = RTSDATA; src_rdy = 1'b1; end
      default: begin src_data = TPD;    src_rdy = MpduRdy; end
    endcase
  end

  // fetch the next octet into the prefetch buffer: source octets, then the FCS
  wire fetch_ok = ((st == S_PE && !TPStart) || st == S_DATA) && !nxt_v && fetched != TxLen;
  assign take   = fetch_ok && (fetched < src_len) && src_rdy;
  assign ACKTPDP = take && TxKind == K_ACK;
  assign CTSTPDP = take && TxKind == K_CTS;
  assign BCNTPDP = take && TxKind == K_BCN;
  assign RTSTPDP = take && TxKind == K_RTS;
  assign macTPDP = take && TxKind == K_MPDU;

  crc32_8 u_framecrc8 (.Clk(MacClk), .Reset(Reset), .Init(crc_init), .En(take), .Data(src_data),
                       .Crc(crc), .Fcs(fcs), .FcsOk(fcs_ok));

  assign TxLen    = src_len + 12'd4;
  assign TPWrReq  = (st == S_MMI);
  assign crc_init = (st == S_IDLE);

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      st <= S_IDLE; TxKind <= K_MPDU; src_len <= '0; fetched <= '0; sent <= '0; shreg <= '0;
      nxt <= '0; nxt_v <= 1'b0; bitn <= '0; TX_PE <= 1'b0; TXD <= 1'b0; TPStart <= 1'b0;
      TPLastBit <= 1'b0; TxDone <= 1'b0;
    end else begin
      TPStart <= 1'b0; TPLastBit <= 1'b0; TxDone <= 1'b0;
      if (take) begin
        nxt <= src_data; nxt_v <= 1'b1; fetched <= fetched + 12'd1;
      end else if (fetch_ok && fetched >= src_len) begin
        nxt <= fcs[8*(fetched - src_len) +: 8]; nxt_v <= 1'b1; fetched <= fetched + 12'd1;
      end
      unique case (st)
        S_IDLE: begin
          fetched <= '0; sent <= '0; nxt_v <= 1'b0; bitn <= '0;
          if (TX_ACK_REQ)       begin st <= S_MMI; TxKind <= K_ACK; src_len <= 12'(ACKLEN) + 12'd1; end
          else if (TX_CTS_REQ)  begin st <= S_MMI; TxKind <= K_CTS; src_len <= 12'(CTSLEN) + 12'd1; end
          else if (txBeaconReq) begin st <= S_MMI; TxKind <= K_BCN; src_len <= BcnLen; end
          else if (txRtsReq)    begin st <= S_MMI; TxKind <= K_RTS; src_len <= 12'(RTSLEN) + 12'd1; end
          else if (txMpduReq)   begin st <= S_MMI; TxKind <= K_MPDU; src_len <= MpduLen; end
        end
        S_MMI: if (TPWrGnt) begin
          if (TxKind == K_ACK || TxKind == K_CTS) st <= S_HOLD;
          else begin st <= S_PE; TX_PE <= 1'b1; TPStart <= 1'b1; end
        end
        S_HOLD: if (RespGo) begin st <= S_PE; TX_PE <= 1'b1; TPStart <= 1'b1; end
          else if (!(TxKind == K_ACK ? TX_ACK_REQ : TX_CTS_REQ)) st <= S_IDLE;
        S_PE: if (rdy_rise && nxt_v) begin
          st <= S_DATA; shreg <= nxt; TXD <= nxt[0]; nxt_v <= 1'b0; bitn <= '0; sent <= 12'd1;
        end
        S_DATA: if (txc_rise) begin
          if (bitn == 3'd7) begin
            if (sent == TxLen) begin
              st <= S_DONE; TX_PE <= 1'b0; TPLastBit <= 1'b1; TxDone <= 1'b1; TXD <= 1'b0;
            end else if (nxt_v) begin
              shreg <= nxt; TXD <= nxt[0]; nxt_v <= 1'b0; sent <= sent + 12'd1; bitn <= '0;
            end
          end else begin
            TXD <= shreg[bitn + 3'd1]; bitn <= bitn + 3'd1;
          end
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  wire unused_ok = ^{crc, fcs_ok};
endmodule
