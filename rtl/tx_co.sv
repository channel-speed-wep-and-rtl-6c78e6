// tx_co: transmit coordinator, the initiator side of DCF.
// States (one-hot in StateQ): IDLE, BKOFFREQ, RTSREQ, WAITCTS, CTSSIFS, MPDUREQ,
// WAITACK, BEACONREQ.
//  IDLE      a pending beacon (TBTTDone seen, beacon enabled, beacon RAM owned by the
//            MAC) or a frame from the buffer manager (TPSF, transmit enabled) starts
//            a back-off. RTS is used when cfNeedRts is set or TPLEN exceeds cfRtsThr.
//            TPSF is ignored in the cycle macTPDN/macTPAB is high, so that the buffer
//            manager has one cycle to withdraw the finished frame.
//  BKOFFREQ  holds BackOffReq to backoff until BkDone; in IBSS mode a beacon received
//            meanwhile cancels a pending beacon.
//  RTSREQ/MPDUREQ/BEACONREQ raise txRtsReq/txMpduReq/txBeaconReq to tx_pump until TxDone.
//  WAITCTS/WAITACK wait for a CTS/ACK to this station, with a microsecond timeout
//            (cfCtsTimeOut/cfAckTimeOut) that pauses while a frame is being received.
//  CTSSIFS   waits one SIFS after the CTS before the data frame.
// A group-addressed frame or a beacon needs no ACK; a group frame pulses macTPDN once sent, as
// after a received ACK. On a missing CTS/ACK the retry counter (ShortRetryCnt, or
// LongRetryCnt for a data frame sent after RTS/CTS) is compared with cfRtyLimit: below
// it, macTPRT pulses (the buffer manager rewinds the frame), the count rises, the
// contention window doubles to at most cfCWMax, and a new back-off starts; at the
// limit, macTPAB pulses, the frame is dropped, counts and window reset.
// States, request and retry/abort signals follow the document's description and
// waveforms; the timeout pause, the CTSSIFS state and the cfRtsThr input are this
// design's own.
module tx_co #(
  parameter int unsigned SIFS_US = 10
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        Clk1UsStb,
  input  logic        cfXMTEN,
  input  logic        cfBEACONEN,
  input  logic [1:0]  cfOPMODE,
  input  logic        cfNeedRts,
  input  logic [11:0] cfRtsThr,
  input  logic [3:0]  cfRtyLimit,
  input  logic [9:0]  cfCtsTimeOut,
  input  logic [9:0]  cfAckTimeOut,
  input  logic [9:0]  cfCWMin,
  input  logic [9:0]  cfCWMax,
  input  logic        TPSF,
  input  logic [11:0] TPLEN,
  input  logic        MultiAddr,
  input  logic        TBTTDone,
  input  logic        BcnOwn,
  input  logic        BeaconRx,
  input  logic        BkDone,
  input  logic        RxActive,
  input  logic        CTSOk,
  input  logic        ACKOk,
  input  logic        TxDone,
  output logic        BackOffReq,
  output logic        BkCancel,
  output logic [9:0]  cw,
  output logic        txRtsReq,
  output logic        txMpduReq,
  output logic        txBeaconReq,
  output logic        macTPRT,
  output logic        macTPAB,
  output logic        macTPDN,
  output logic [3:0]  ShortRetryCnt,
  output logic [3:0]  LongRetryCnt,
  output logic [7:0]  StateQ
);
  import wmac_pkg::MODE_IBSS;
  typedef enum logic [7:0] {
    IDLE = 8'h01, BKOFFREQ = 8'h02, RTSREQ = 8'h04, WAITCTS = 8'h08,
    CTSSIFS = 8'h10, MPDUREQ = 8'h20, WAITACK = 8'h40, BEACONREQ = 8'h80
  } txco_e;
  txco_e       st;
  logic        bcn_pend, is_bcn, use_rts, multi;
  logic [9:0]  tmo;

  assign StateQ      = st;
  assign BackOffReq  = (st == BKOFFREQ);
  assign txRtsReq    = (st == RTSREQ);
  assign txMpduReq   = (st == MPDUREQ);
  assign txBeaconReq = (st == BEACONREQ);

  function automatic logic [9:0] grow(input logic [9:0] c, input logic [9:0] mx);
    logic [10:0] n;
    n = {c, 1'b1};
    return (n > {1'b0, mx}) ? mx : n[9:0];
  endfunction

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      st <= IDLE; bcn_pend <= 1'b0; is_bcn <= 1'b0; use_rts <= 1'b0; multi <= 1'b0; tmo <= '0;
      cw <= '0; macTPRT <= 1'b0; macTPAB <= 1'b0; macTPDN <= 1'b0; BkCancel <= 1'b0;
      ShortRetryCnt <= '0; LongRetryCnt <= '0;
    end else begin
      macTPRT <= 1'b0; macTPAB <= 1'b0; macTPDN <= 1'b0; BkCancel <= 1'b0;
      if (TBTTDone) bcn_pend <= 1'b1;
      unique case (st)
        IDLE: begin
          cw <= cfCWMin;
          if (bcn_pend && cfBEACONEN && BcnOwn) begin
            st <= BKOFFREQ; is_bcn <= 1'b1;
          end else if (TPSF && cfXMTEN && !macTPDN && !macTPAB) begin
            st <= BKOFFREQ; is_bcn <= 1'b0; multi <= MultiAddr;
            use_rts <= !MultiAddr && (cfNeedRts || TPLEN > cfRtsThr);
          end
        end
        BKOFFREQ: begin
          if (is_bcn && BeaconRx && cfOPMODE == MODE_IBSS) begin
            st <= IDLE; bcn_pend <= 1'b0; BkCancel <= 1'b1;
          end else if (BkDone) begin
            if (is_bcn)       begin st <= BEACONREQ; bcn_pend <= 1'b0; end
            else if (use_rts) st <= RTSREQ;
            else              st <= MPDUREQ;
          end
        end
        RTSREQ: if (TxDone) begin st <= WAITCTS; tmo <= cfCtsTimeOut; end
        WAITCTS: begin
          if (CTSOk) begin st <= CTSSIFS; tmo <= 10'(SIFS_US); end
          else if (tmo == 10'd0 && !RxActive) begin
            if (ShortRetryCnt >= cfRtyLimit) begin
              st <= IDLE; macTPAB <= 1'b1; ShortRetryCnt <= '0; LongRetryCnt <= '0;
            end else begin
              st <= BKOFFREQ; macTPRT <= 1'b1; ShortRetryCnt <= ShortRetryCnt + 4'd1;
              cw <= grow(cw, cfCWMax);
            end
          end else if (Clk1UsStb && !RxActive) tmo <= tmo - 10'd1;
        end
        CTSSIFS: if (tmo == 10'd0) st <= MPDUREQ;
                 else if (Clk1UsStb) tmo <= tmo - 10'd1;
        MPDUREQ: if (TxDone) begin
          if (multi) begin
            st <= IDLE; macTPDN <= 1'b1; ShortRetryCnt <= '0; LongRetryCnt <= '0;
          end else begin
            st <= WAITACK; tmo <= cfAckTimeOut;
          end
        end
        WAITACK: begin
          if (ACKOk) begin
            st <= IDLE; macTPDN <= 1'b1; ShortRetryCnt <= '0; LongRetryCnt <= '0;
          end else if (tmo == 10'd0 && !RxActive) begin
            if ((use_rts ? LongRetryCnt : ShortRetryCnt) >= cfRtyLimit) begin
              st <= IDLE; macTPAB <= 1'b1; ShortRetryCnt <= '0; LongRetryCnt <= '0;
            end else begin
              st <= BKOFFREQ; macTPRT <= 1'b1; cw <= grow(cw, cfCWMax);
              if (use_rts) LongRetryCnt  <= LongRetryCnt + 4'd1;
              else         ShortRetryCnt <= ShortRetryCnt + 4'd1;
            end
          end else if (Clk1UsStb && !RxActive) tmo <= tmo - 10'd1;
        end
        BEACONREQ: if (TxDone) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
