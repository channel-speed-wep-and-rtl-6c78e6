// wmac: IEEE 802.11(b) MAC with the DCF access machine and a channel-speed WEP engine,
// for an Intersil HFA3861B baseband processor and HFA3683 RF/synthesizer chip.
// Receive path: rx1 (serial RX to octets) -> chkpkt (parse, FCS, address filter)
//   -> valmpdu (DIFS/EIFS choice, RTS NAV timeout) -> chstate (NAV, BUSY, SLOT)
//   -> rx_co (SIFS, then ACK or CTS request). Received octets reach the buffer manager
//   through wep (FIFO + RC4 decryption) on macRPD/macRPDV.
// Transmit path: tx_co (back-off, RTS/CTS, ACK wait, retry/abort, beacon) with backoff,
//   and ackpkt/ctspkt/rtspkt/bcnctrl/buffer-manager octets -> tx_pump (FCS, serial TX),
//   the buffer-manager octets passing through wep for encryption.
// Around them: tsf (64-bit TSF, TBTT), bcnctrl (beacon RAM), mitop (BBP registers:
// LENGTH/RATE/SERVICE per frame, RSSI, host access) and rfif (RF enables, synthesizer).
// One clock, MacClk (44 MHz by default, CLK_MHZ), Reset active high and synchronous.
// A 1 MHz time base (Clk1Us) is divided from MacClk here. The buffer manager, host
// registers, BBP and RF chip are outside: their signals are the ports below, named after
// the chip's boundary signals where it lists them (cf* configuration, TP* buffer-manager
// transmit, mac* to the buffer manager). Ports added by this design: TPWep/TPIV (per-frame
// WEP request and IV), cfRtsThr, cfWepKey, cfKey128, the macIcvOk/macRxDone status and
// the Busy/Nav/TxState/RfState observation outputs.
module wmac #(
  parameter int unsigned CLK_MHZ    = 44,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned BCN_DEPTH  = 64
) (
  input  logic        MacClk,
  input  logic        Reset,
  // ---- baseband processor (HFA3861B) ----
  output logic        TX_PE,
  output logic        TXD,
  input  logic        TXRDY,
  input  logic        TXC,
  output logic        RX_PE,
  input  logic        RXC,
  input  logic        RXD,
  input  logic        MDRDY,
  input  logic        CCA,
  output logic        miSclk,
  output logic        miRw,
  output logic        miCs,
  output logic        miSdOut,
  output logic        miSdEn,
  input  logic        IoSdIn,
  // ---- RF chip (HFA3683) ----
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
  // ---- buffer manager, transmit ----
  input  logic [7:0]  TPD,
  input  logic        TPSF,
  input  logic        TPEF,
  input  logic [11:0] TPLEN,
  input  logic [1:0]  TPRATE,
  input  logic        MultiAddr,
  input  logic        TPWep,
  input  logic [23:0] TPIV,
  output logic        macTPDP,
  output logic        macTPRT,
  output logic        macTPAB,
  output logic        macTPDN,
  output logic        ENCRYPPhase,
  // ---- buffer manager, receive ----
  output logic [7:0]  macRPD,
  output logic        macRPDV,
  output logic        macRxDone,
  output logic        macRPGOOD,
  output logic        macIcvOk,
  output logic        macRxWep,
  output logic [47:0] macRxSa,
  output logic [23:0] macWepIv,
  output logic [1:0]  macKeyID,
  output logic        macFrameStr,
  output logic        macFrameEnd,
  // ---- registers ----
  input  logic [47:0] cfMacAddr0,
  input  logic [47:0] cfMacAddr1,
  input  logic [47:0] cfMacAddr2,
  input  logic [47:0] cfMacAddr3,
  input  logic [47:0] cfBSSID,
  input  logic [63:0] cfHashTab,
  input  logic        cfPROM,
  input  logic [11:0] cfMaxPktLen,
  input  logic        cfPassBad,
  input  logic [15:0] cfDIFS,
  input  logic [15:0] cfEIFS,
  input  logic        cfXMTEN,
  input  logic        cfRCVEN,
  input  logic        cfBEACONEN,
  input  logic [1:0]  cfOPMODE,
  input  logic [7:0]  cfTOFSR,
  input  logic [15:0] cfBP,
  input  logic        cfPreamble,
  input  logic        cfPbcc,
  input  logic [1:0]  cfBSCRATE,
  input  logic        cfNeedRts,
  input  logic [11:0] cfRtsThr,
  input  logic [9:0]  cfCtsTimeOut,
  input  logic [9:0]  cfAckTimeOut,
  input  logic [3:0]  cfRtyLimit,
  input  logic [9:0]  cfCWMax,
  input  logic [9:0]  cfCWMin,
  input  logic [47:0] RTSSADDR,
  input  logic [47:0] RTSDADDR,
  input  logic [15:0] RTSDuration,
  input  logic [103:0] cfWepKey,
  input  logic        cfKey128,
  input  logic        cfWrMmiReq,
  input  logic        cfRdMmiReq,
  input  logic [7:0]  cfMMIREGAD,
  input  logic [7:0]  cfMMIWDATA,
  output logic        mmiWrGnt,
  output logic        mmiRdGnt,
  output logic [7:0]  miRdData,
  output logic [7:0]  miRSSI,
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
  input  logic        cfbecOwn,
  input  logic [11:0] cfbecCnt,
  input  logic [$clog2(BCN_DEPTH)-1:0] cfTableAddr,
  input  logic        cfTabAddrWrN,
  input  logic        cfTabDataWrN,
  input  logic        cfTabDataRdN,
  input  logic [15:0] cfBcnData,
  output logic        bcnClrOwn,
  output logic [15:0] bcRamData,
  output logic [63:0] macTSFT,
  output logic [15:0] macLSI,
  output logic [3:0]  ShortRetryCnt,
  output logic [3:0]  LongRetryCnt,
  output logic        Busy,
  output logic [15:0] Nav,
  output logic [7:0]  TxState,
  output logic [1:0]  RfState
);
  // ---------------- 1 MHz time base ----------------
  logic [7:0] us_div;
  logic       clk1us;
  always_ff @(posedge MacClk) begin
    if (Reset) begin us_div <= '0; clk1us <= 1'b0; end
    else if (us_div == 8'(CLK_MHZ / 2 - 1)) begin us_div <= '0; clk1us <= ~clk1us; end
    else us_div <= us_div + 8'd1;
  end

  // ---------------- receive ----------------
  logic        pkt_start, pkt_end, byte_stb;
  logic [7:0]  byte_data;
  logic [11:0] byte_cnt;
  rx1 u_rx1 (.MacClk, .Reset, .RX_PE, .RXC, .RXD, .MDRDY, .PktStart(pkt_start), .PktEnd(pkt_end),
             .ByteStb(byte_stb), .ByteData(byte_data), .ByteCnt(byte_cnt));

  logic        c_done, c_good, c_bad, c_rts, c_cts, c_ack, c_bcn, c_data, c_pspoll, c_cfend,
               c_wep, c_needack, c_tome, c_addrok, c_bss, c_chnav;
  logic [15:0] c_fc, c_dur, c_bint, c_lint;
  logic [47:0] c_da, c_sa, c_bssid;
  logic [63:0] c_ts;
  logic [23:0] c_iv;
  logic [1:0]  c_kid;
  logic [11:0] c_len;
  chkpkt u_chkpkt (.MacClk, .Reset, .PktStart(pkt_start), .PktEnd(pkt_end), .ByteStb(byte_stb),
    .ByteData(byte_data), .cfMacAddr0, .cfMacAddr1, .cfMacAddr2, .cfMacAddr3, .cfBSSID,
    .cfHashTab, .cfPROM, .Done(c_done), .Good(c_good), .BadPkt(c_bad), .RTSPkt(c_rts),
    .CTSPkt(c_cts), .ACKPkt(c_ack), .BeaconPkt(c_bcn), .DataPkt(c_data), .PsPollPkt(c_pspoll),
    .CFEndPkt(c_cfend), .WepPkt(c_wep), .NeedAck(c_needack), .ToMe(c_tome), .AddrOk(c_addrok),
    .BssMatch(c_bss), .ChangeNav(c_chnav), .FrameCtl(c_fc), .Duration(c_dur), .Daddr(c_da),
    .Saddr(c_sa), .Bssid(c_bssid), .Timestamp(c_ts), .BeaconInt(c_bint), .ListenInt(c_lint),
    .WepIv(c_iv), .KeyId(c_kid), .Length(c_len));

  logic rts_to, use_eifs, use_difs, slot, clk1us_stb;
  valmpdu u_valmpdu (.MacClk, .Reset, .Clk1UsStb(clk1us_stb), .ByteCnt(c_len), .cfMaxPktLen,
    .RTSPkt(c_rts && !c_tome), .BadPkt(c_bad), .macFrameStr(pkt_start), .PktEnd(c_done),
    .cfPassBad, .RtsTimeOut(rts_to), .UseEifs(use_eifs), .UseDifs(use_difs));

  chstate u_chstate (.MacClk, .Reset, .Clk1Us(clk1us), .PhyCca(CCA || TX_PE), .PktEnd(c_done),
    .ChangeNav(c_chnav), .RTSPkt(c_rts), .Duration(c_dur), .RtsTimeOut(rts_to),
    .CFEndPkt(c_cfend), .UseDifs(use_difs), .UseEifs(use_eifs), .cfDIFS, .cfEIFS, .BUSY(Busy),
    .SLOT(slot), .Clk1UsStb(clk1us_stb), .Nav);

  logic        tx_done, ack_req, cts_req;
  logic [2:0]  tx_kind;
  logic [15:0] rx_dur;
  logic        resp_go;
  rx_co u_rx_co (.MacClk, .Reset, .Clk1UsStb(clk1us_stb), .cfRCVEN, .TX_PE, .NavBusy(Nav != 16'd0),
    .NeedAck(c_needack), .RTSPkt(c_rts && c_tome), .TxDone(tx_done && tx_kind <= 3'd1),
    .PktStart(pkt_start), .PktEnd(c_done), .Duration(c_dur), .RxDuration(rx_dur),
    .TX_ACK_REQ(ack_req), .TX_CTS_REQ(cts_req), .RespGo(resp_go), .RX_PE);

  // ---------------- control-frame builders, beacon RAM ----------------
  logic [7:0] ack_d, cts_d, rts_d, bcn_d;
  logic [3:0] ack_l, cts_l, rts_l;
  logic       ack_p, cts_p, rts_p, bcn_p, ack_sf, ack_ef, cts_sf, cts_ef, rts_sf, rts_ef;
  ackpkt u_ackpkt (.MacClk, .Reset, .RXADDR(c_sa), .Duration(rx_dur), .MoreFrag(c_fc[10]),
    .cfBSCRATE, .cfPreamble, .TPDP(ack_p), .ACKDATA(ack_d), .ACKLEN(ack_l), .ACKSF(ack_sf),
    .ACKEF(ack_ef));
  ctspkt u_ctspkt (.MacClk, .Reset, .RXADDR(c_sa), .Duration(rx_dur), .cfBSCRATE, .cfPreamble,
    .TPDP(cts_p), .CTSDATA(cts_d), .CTSLEN(cts_l), .CTSSF(cts_sf), .CTSEF(cts_ef));
  rtspkt u_rtspkt (.MacClk, .Reset, .DADDR(RTSDADDR), .SADDR(RTSSADDR), .Duration(RTSDuration),
    .TPDP(rts_p), .RTSDATA(rts_d), .RTSLEN(rts_l), .RTSSF(rts_sf), .RTSEF(rts_ef));

  logic        bcn_own;
  logic [11:0] bcn_len;
  bcnctrl #(.DEPTH(BCN_DEPTH)) u_bcnctrl (.MacClk, .Reset, .cfTableAddr, .cfTabAddrWrN,
    .cfTabDataWrN, .cfTabDataRdN, .cfBcnData, .cfbecOwn, .cfbecCnt, .bcRamData, .BcnOwn(bcn_own),
    .bcnClrOwn, .BcnLen(bcn_len), .BCNTPDP(bcn_p), .BCNDATA(bcn_d));

  // ---------------- TSF ----------------
  logic tbtt;
  wire  bcn_rx = c_done && c_bcn && c_bss;
  tsf u_tsf (.MacClk, .Reset, .Clk1UsStb(clk1us_stb), .cfOPMODE, .BeaconRx(bcn_rx),
    .RxTimestamp(c_ts), .BeaconInt(c_bint), .cfBP, .cfTOFSR, .macTSFT, .TBTTDone(tbtt));

  // ---------------- transmit coordination ----------------
  logic       rx_active, bk_req, bk_cancel, bk_done, rts_req, mpdu_req, bcn_req;
  logic [9:0] cw, slot_cnt;
  always_ff @(posedge MacClk) begin
    if (Reset)          rx_active <= 1'b0;
    else if (pkt_start) rx_active <= 1'b1;
    else if (c_done)    rx_active <= 1'b0;
  end

  backoff u_backoff (.MacClk, .Reset, .cw, .SlotTime(slot), .BUSY(Busy), .Cancel(bk_cancel),
    .BackOffReq(bk_req), .BkDone(bk_done), .SlotCnt(slot_cnt));

  tx_co u_tx_co (.MacClk, .Reset, .Clk1UsStb(clk1us_stb), .cfXMTEN, .cfBEACONEN, .cfOPMODE,
    .cfNeedRts, .cfRtsThr, .cfRtyLimit, .cfCtsTimeOut, .cfAckTimeOut, .cfCWMin, .cfCWMax, .TPSF,
    .TPLEN, .MultiAddr, .TBTTDone(tbtt), .BcnOwn(bcn_own), .BeaconRx(bcn_rx), .BkDone(bk_done),
    .RxActive(rx_active), .CTSOk(c_done && c_cts && c_tome), .ACKOk(c_done && c_ack && c_tome),
    .TxDone(tx_done && tx_kind >= 3'd2), .BackOffReq(bk_req), .BkCancel(bk_cancel), .cw,
    .txRtsReq(rts_req), .txMpduReq(mpdu_req), .txBeaconReq(bcn_req), .macTPRT, .macTPAB,
    .macTPDN, .ShortRetryCnt, .LongRetryCnt, .StateQ(TxState));

  // ---------------- WEP ----------------
  logic [7:0] w_txd;
  logic       w_rdy, pump_mpdu_p, tp_start, tp_last, wr_req, wr_gnt;
  logic [11:0] tx_len;
  logic [8:0]  fifo_max;
  wep #(.FIFO_DEPTH(FIFO_DEPTH)) u_wep (.MacClk, .Reset, .MasterKey(cfWepKey), .cfKey128,
    .TxGo(tp_start && tx_kind == 3'd4), .TxWep(TPWep), .TxIV(TPIV), .TPD, .TPEF, .bmTPDP(macTPDP),
    .TxOut(w_txd), .TxRdy(w_rdy), .TxTPDP(pump_mpdu_p), .ENCRYPPhase, .RxStart(pkt_start),
    .RxByteStb(byte_stb), .RxByte(byte_data), .RxEnd(pkt_end), .RxOut(macRPD), .RxOutStb(macRPDV),
    .RxDone(macRxDone), .IcvOk(macIcvOk), .RxWep(macRxWep), .FifoMax(fifo_max));

  // ---------------- serial transmit ----------------
  tx_pump u_tx_pump (.MacClk, .Reset, .TX_ACK_REQ(ack_req), .TX_CTS_REQ(cts_req),
    .txBeaconReq(bcn_req), .txRtsReq(rts_req), .txMpduReq(mpdu_req), .RespGo(resp_go), .ACKDATA(ack_d),
    .ACKLEN(ack_l), .CTSDATA(cts_d), .CTSLEN(cts_l), .RTSDATA(rts_d), .RTSLEN(rts_l),
    .BCNDATA(bcn_d), .BcnLen(bcn_len), .TPD(w_txd), .MpduLen(TPLEN + (TPWep ? 12'd4 : 12'd0)),
    .MpduRdy(w_rdy), .ACKTPDP(ack_p), .CTSTPDP(cts_p), .RTSTPDP(rts_p), .BCNTPDP(bcn_p),
    .macTPDP(pump_mpdu_p), .TPWrReq(wr_req), .TxLen(tx_len), .TPWrGnt(wr_gnt), .TX_PE, .TXD,
    .TXRDY, .TXC, .TPStart(tp_start), .TPLastBit(tp_last), .TxDone(tx_done), .TxKind(tx_kind));

  // ---------------- BBP and RF control ----------------
  mitop u_mitop (.MacClk, .Reset, .TPWrReq(wr_req), .TxLen(tx_len),
    .TxRate(tx_kind == 3'd4 ? TPRATE : cfBSCRATE), .cfPbcc, .TPWrGnt(wr_gnt), .RssiReq(pkt_start),
    .miRSSI, .cfWrMmiReq, .cfRdMmiReq, .cfMMIREGAD, .cfMMIWDATA, .mmiWrGnt, .mmiRdGnt, .miRdData,
    .miSclk, .miRw, .miCs, .miSdOut, .miSdEn, .IoSdIn);

  rfif u_rfif (.MacClk, .Reset, .TPStart(tp_start), .TPLastBit(tp_last), .BUSY(CCA), .cfManual,
    .cfTxPe, .cfRxPe, .cfPaPe, .cfPe2, .cfPe1, .cfTrSw, .cfRxPe2Pe2, .cfRxPe2TxPe, .cfRxPe2PaPe,
    .cfRxPe2TrSw, .cfLdb2Pe2, .cfLdb2TxPe, .cfLdb2PaPe, .cfLdb2TrSw, .cfLdb2RxPe, .cfTxPeInv,
    .cfPaPeInv, .cfPe2Inv, .cfPe1Inv, .cfNumBit, .cfSynWrData, .cfSynWrReq, .RFTXPE, .RFRXPE,
    .RFPAPE, .RFPE2, .RFPE1, .RFTRSW, .RFSYNCLK, .RFSYNDATA, .RFLE, .RFWrGnt, .RfState);

  // ---------------- to the buffer manager ----------------
  assign macRPGOOD   = c_done && c_good && c_addrok;
  assign macRxSa     = c_sa;
  assign macWepIv    = c_iv;
  assign macKeyID    = c_kid;
  assign macFrameStr = pkt_start;
  assign macFrameEnd = c_done;
  assign macLSI      = c_lint;

  wire unused_ok = ^{byte_cnt, c_data, c_pspoll, c_wep, c_bint, c_da, c_bssid, ack_sf, ack_ef,
                     cts_sf, cts_ef, rts_sf, rts_ef, slot_cnt,
                     fifo_max, c_fc[15:11], c_fc[9:0]};
endmodule
