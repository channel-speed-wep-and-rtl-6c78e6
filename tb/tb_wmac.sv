// tb_wmac: end-to-end test of the whole MAC at its default parameters (44 MHz MacClk,
// 256-octet WEP FIFO, 64-word beacon RAM). Around the MAC sit behavioural models of
// the baseband processor (serial TX/RX ports with a short-preamble delay, CCA, and its
// serial register port), the buffer manager (a frame buffer stepped by macTPDP,
// rewound by macTPRT) and a peer station that answers RTS with CTS and data with ACK
// after a SIFS. The test walks through: host register and synthesizer writes; an
// acknowledged data frame; a data frame received for this station (ACK reply after a
// SIFS); an RTS received (CTS reply); NAV set by a frame for another station, with the
// MAC deferring; a frame with a bad FCS (EIFS); an address-filtered frame; an RTS/CTS
// protected long frame; an unacknowledged frame (retry, then abort); a group frame;
// WEP-encrypted transmit (checked by decrypting it here) and receive (decrypted on
// macRPD, ICV good); a beacon sent at TBTT as access point; a beacon received as a
// station (TSF adopted). Each mechanism is counted; one that never happened is a failure.
module tb_wmac;
  localparam int PRE = 96 * 44;                    // short PLCP preamble+header, MacClk cycles
  localparam int SIFS_CYC = 10 * 44;
  localparam logic [47:0] ME = 48'h010000000002, PEER = 48'h0A0000000002, OTHER = 48'h0B0000000004;
  localparam logic [47:0] BSS_AP = ME, BSS_STA = 48'h0C0000000006;

  logic clk = 0, rst = 1;
  always #11 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int checks = 0, failures = 0;
  int mech[string];
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic count(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endtask

  // ---------------- DUT ----------------
  logic TX_PE, TXD, TXRDY = 0, TXC = 0, RX_PE, RXC = 0, RXD = 0, MDRDY = 0, CCA = 0;
  logic miSclk, miRw, miCs, miSdOut, miSdEn, IoSdIn;
  logic RFTXPE, RFRXPE, RFPAPE, RFPE2, RFPE1, RFTRSW, RFSYNCLK, RFSYNDATA, RFLE, RFWrGnt;
  logic [7:0] TPD; logic TPSF = 0, TPEF; logic [11:0] TPLEN = 0; logic [1:0] TPRATE = 3;
  logic MultiAddr = 0, TPWep = 0; logic [23:0] TPIV = 0;
  logic macTPDP, macTPRT, macTPAB, macTPDN, ENCRYPPhase;
  logic [7:0] macRPD; logic macRPDV, macRxDone, macRPGOOD, macIcvOk, macRxWep, macFrameStr, macFrameEnd;
  logic [47:0] macRxSa; logic [23:0] macWepIv; logic [1:0] macKeyID;
  logic [1:0] cfOPMODE = 2'd1; logic cfBEACONEN = 0; logic [3:0] cfRtyLimit = 4'd2;
  logic [47:0] cfBSSID = BSS_AP;
  logic cfWrMmiReq = 0, cfRdMmiReq = 0; logic [7:0] cfMMIREGAD = 0, cfMMIWDATA = 0;
  logic mmiWrGnt, mmiRdGnt; logic [7:0] miRdData, miRSSI;
  logic cfSynWrReq = 0; logic [31:0] cfSynWrData = 0;
  logic cfbecOwn = 0; logic [11:0] cfbecCnt = 0; logic [5:0] cfTableAddr = 0;
  logic cfTabAddrWrN = 1, cfTabDataWrN = 1, cfTabDataRdN = 1; logic [15:0] cfBcnData = 0;
  logic bcnClrOwn; logic [15:0] bcRamData; logic [63:0] macTSFT; logic [15:0] macLSI;
  logic [3:0] src, lrc; logic Busy; logic [15:0] Nav; logic [7:0] TxState; logic [1:0] RfState;
  logic [103:0] key = 104'h0000000000000000_C3B2A19988;

  wmac dut (.MacClk(clk), .Reset(rst),
    .TX_PE, .TXD, .TXRDY, .TXC, .RX_PE, .RXC, .RXD, .MDRDY, .CCA,
    .miSclk, .miRw, .miCs, .miSdOut, .miSdEn, .IoSdIn,
    .RFTXPE, .RFRXPE, .RFPAPE, .RFPE2, .RFPE1, .RFTRSW, .RFSYNCLK, .RFSYNDATA, .RFLE, .RFWrGnt,
    .TPD, .TPSF, .TPEF, .TPLEN, .TPRATE, .MultiAddr, .TPWep, .TPIV,
    .macTPDP, .macTPRT, .macTPAB, .macTPDN, .ENCRYPPhase,
    .macRPD, .macRPDV, .macRxDone, .macRPGOOD, .macIcvOk, .macRxWep, .macRxSa, .macWepIv, .macKeyID,
    .macFrameStr, .macFrameEnd,
    .cfMacAddr0(ME), .cfMacAddr1(48'h0), .cfMacAddr2(48'h0), .cfMacAddr3(48'h0), .cfBSSID,
    .cfHashTab(64'h0), .cfPROM(1'b0), .cfMaxPktLen(12'd2346), .cfPassBad(1'b0),
    .cfDIFS(16'd50), .cfEIFS(16'd364), .cfXMTEN(1'b1), .cfRCVEN(1'b1), .cfBEACONEN, .cfOPMODE,
    .cfTOFSR(8'd2), .cfBP(16'd4), .cfPreamble(1'b1), .cfPbcc(1'b0), .cfBSCRATE(2'd1),
    .cfNeedRts(1'b0), .cfRtsThr(12'd400), .cfCtsTimeOut(10'd300), .cfAckTimeOut(10'd300),
    .cfRtyLimit, .cfCWMax(10'd1023), .cfCWMin(10'd7),
    .RTSSADDR(ME), .RTSDADDR(PEER), .RTSDuration(16'd1500), .cfWepKey(key), .cfKey128(1'b0),
    .cfWrMmiReq, .cfRdMmiReq, .cfMMIREGAD, .cfMMIWDATA, .mmiWrGnt, .mmiRdGnt, .miRdData, .miRSSI,
    .cfManual(1'b0), .cfTxPe(1'b0), .cfRxPe(1'b0), .cfPaPe(1'b0), .cfPe2(1'b0), .cfPe1(1'b0), .cfTrSw(1'b0),
    .cfRxPe2Pe2(8'd8), .cfRxPe2TxPe(8'd16), .cfRxPe2PaPe(8'd24), .cfRxPe2TrSw(8'd4),
    .cfLdb2Pe2(8'd20), .cfLdb2TxPe(8'd8), .cfLdb2PaPe(8'd4), .cfLdb2TrSw(8'd16), .cfLdb2RxPe(8'd24),
    .cfTxPeInv(1'b0), .cfPaPeInv(1'b0), .cfPe2Inv(1'b0), .cfPe1Inv(1'b0),
    .cfNumBit(5'd17), .cfSynWrData, .cfSynWrReq,
    .cfbecOwn, .cfbecCnt, .cfTableAddr, .cfTabAddrWrN, .cfTabDataWrN, .cfTabDataRdN, .cfBcnData,
    .bcnClrOwn, .bcRamData, .macTSFT, .macLSI, .ShortRetryCnt(src), .LongRetryCnt(lrc), .Busy, .Nav,
    .TxState, .RfState);

  // ---------------- CRC-32 and RC4 reference ----------------
  function automatic logic [31:0] crc(input logic [7:0] f[$], input int from, input int to);
    logic [31:0] c = '1;
    for (int k = from; k < to; k++) for (int b = 0; b < 8; b++) c = (c[0] ^ f[k][b]) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return ~c;
  endfunction
  function automatic void add_fcs(ref logic [7:0] f[$]);
    logic [31:0] c = crc(f, 0, f.size());
    for (int k = 0; k < 4; k++) f.push_back(c[8*k +: 8]);
  endfunction
  function automatic void rc4_ks(input logic [23:0] iv, input int n, ref logic [7:0] ks[$]);
    logic [7:0] s[256], kb[8], t; int i = 0, j = 0;
    for (int k = 0; k < 3; k++) kb[k] = iv[8*k +: 8];
    for (int k = 0; k < 5; k++) kb[3 + k] = key[8*k +: 8];
    for (int k = 0; k < 256; k++) s[k] = 8'(k);
    for (int k = 0; k < 256; k++) begin j = (j + s[k] + kb[k % 8]) % 256; t = s[k]; s[k] = s[j]; s[j] = t; end
    j = 0; ks.delete();
    for (int k = 0; k < n; k++) begin
      i = (i + 1) % 256; j = (j + s[i]) % 256; t = s[i]; s[i] = s[j]; s[j] = t; ks.push_back(s[(s[i] + s[j]) % 256]);
    end
  endfunction
  function automatic void put48(ref logic [7:0] f[$], input logic [47:0] a);
    for (int k = 0; k < 6; k++) f.push_back(a[8*k +: 8]);
  endfunction
  function automatic logic [47:0] get48(input logic [7:0] f[$], input int at);
    logic [47:0] a;
    for (int k = 0; k < 6; k++) a[8*k +: 8] = f[at + k];
    return a;
  endfunction

  // ---------------- baseband TX port model ----------------
  typedef logic [7:0] bytes_t[$];
  bytes_t txq[$]; int tx_start_cyc[$], tx_end_cyc = 0;
  logic [7:0] cur[$]; logic [7:0] sh = 0; int bc = 0, nbit = 0; bit in_tx = 0;
  always @(posedge clk) if (!rst) begin
    if (!TX_PE) begin
      if (in_tx) begin txq.push_back(cur); tx_end_cyc = cyc; in_tx = 0; end
      bc <= 0; TXRDY <= 0; TXC <= 0;
    end else begin
      if (!in_tx) begin in_tx = 1; cur.delete(); nbit = 0; tx_start_cyc.push_back(cyc); end
      bc <= bc + 1;
      if (bc == PRE) TXRDY <= 1;
      if (bc >= PRE + 6) begin
        TXC <= ((bc - PRE - 6) % 4) < 2;
        if ((bc - PRE - 6) % 4 == 0) begin sh = {TXD, sh[7:1]}; nbit++; if (nbit % 8 == 0) cur.push_back(sh); end
      end
    end
  end

  // ---------------- baseband RX port model ----------------
  bit rx_lock = 0; int rx_end_cyc = 0;
  task automatic rx_frame(input logic [7:0] f[$]);
    wait (!rx_lock); rx_lock = 1;
    while (TX_PE) @(posedge clk);
    @(posedge clk) CCA <= 1;
    repeat (PRE) @(posedge clk);
    MDRDY <= 1; repeat (4) @(posedge clk);
    foreach (f[k]) for (int b = 0; b < 8; b++) begin
      RXD <= f[k][b]; RXC <= 0; repeat (2) @(posedge clk); RXC <= 1; repeat (2) @(posedge clk);
    end
    RXC <= 0; repeat (4) @(posedge clk); MDRDY <= 0; rx_end_cyc = cyc;
    repeat (4) @(posedge clk); CCA <= 0;
    rx_lock = 0;
  endtask

  // ---------------- baseband register port model ----------------
  logic [7:0] regs[256]; int rbc = 0; logic [7:0] ra = 0, rd = 0; bit rrd = 0;
  assign IoSdIn = (rbc >= 8) ? regs[ra][15 - rbc] : 1'b0;
  always @(posedge miSclk) if (!miCs) begin
    if (rbc < 8) ra = {ra[6:0], miSdOut};
    else if (!miRw) begin rd = {rd[6:0], miSdOut}; rrd = 0; end
    else rrd = 1;
    rbc++;
  end
  always @(posedge miCs) begin
    if (rbc == 16) begin if (rrd) count("bbp_register_read"); else begin regs[ra] = rd; count("bbp_register_write"); end end
    rbc = 0;
  end

  // ---------------- buffer manager model ----------------
  logic [7:0] txbuf[$]; int tptr = 0; int n_dn = 0, n_rt = 0, n_ab = 0;
  assign TPD  = (tptr < txbuf.size()) ? txbuf[tptr] : 8'h00;
  assign TPEF = (tptr == int'(TPLEN) - 1);
  always @(posedge clk) if (!rst) begin
    if (macTPDP) tptr <= tptr + 1;
    if (macTPRT) begin tptr <= 0; n_rt++; count("retry"); end
    if (macTPDN) begin TPSF <= 0; n_dn++; end
    if (macTPAB) begin TPSF <= 0; n_ab++; count("abort"); end
  end
  task automatic host_send(input logic [7:0] f[$], input bit wep, input bit multi);
    int d0 = n_dn, a0 = n_ab;
    while (TPSF) @(posedge clk);
    @(posedge clk);
    txbuf = f; tptr = 0; TPLEN = 12'(f.size()); TPWep = wep; MultiAddr = multi;
    TPIV = 24'(f[24]) | (24'(f[25]) << 8) | (24'(f[26]) << 16);
    TPSF <= 1;
    while (n_dn == d0 && n_ab == a0) @(posedge clk);
    repeat (50) @(posedge clk);
  endtask

  // ---------------- peer station ----------------
  bit peer_ack = 1, peer_cts = 1; int seen = 0;
  initial forever begin
    bytes_t f; logic [7:0] r[$];
    wait (txq.size() > seen);
    f = txq[seen]; seen++;
    if (f.size() >= 16 && get48(f, 4) == PEER) begin
      if (f[0] == 8'hB4 && peer_cts) begin
        r = {8'hC4, 8'h00, 8'h00, 8'h00}; put48(r, ME); add_fcs(r);
        wait (cyc >= tx_end_cyc + SIFS_CYC); rx_frame(r); count("cts_received");
      end else if (f[0] == 8'h08 && peer_ack) begin
        r = {8'hD4, 8'h00, 8'h00, 8'h00}; put48(r, ME); add_fcs(r);
        wait (cyc >= tx_end_cyc + SIFS_CYC); rx_frame(r); count("ack_received");
      end
    end
  end

  // ---------------- receive capture ----------------
  logic [7:0] rxq[$]; int n_rxdone = 0, n_good = 0; bit last_icv = 0, last_wep = 0;
  always @(posedge clk) if (!rst) begin
    if (macFrameStr) rxq.delete();
    if (macRPDV) rxq.push_back(macRPD);
    if (macRPGOOD) n_good++;
    if (macRxDone) begin n_rxdone++; last_icv = macIcvOk; last_wep = macRxWep; end
    if (dut.u_valmpdu.UseEifs) count("eifs");
    if (dut.u_backoff.BackOffReq && dut.u_backoff.SlotTime && !dut.u_backoff.BUSY && dut.u_backoff.SlotCnt != 0) count("backoff_slot");
    if (dut.u_wep.tst == dut.u_wep.T_PAY && macTPDP && dut.u_wep.TxRdy == 1'b0) count("wep_stall");
  end
  int n_rftx = 0; bit rf_bad = 0;
  always @(posedge RFTXPE) begin n_rftx++; if (RFRXPE) rf_bad = 1; end
  always @(posedge clk) if (TXRDY && !(RFTXPE && RFPAPE && RFTRSW && !RFRXPE)) rf_bad = 1;

  function automatic bytes_t data_frame(input logic [47:0] da, input logic [47:0] sa, input int n, input bit wep);
    bytes_t f;
    f = {8'h08, wep ? 8'h40 : 8'h00, 8'h00, 8'h00}; put48(f, da); put48(f, sa); put48(f, BSS_AP);
    f.push_back(8'h00); f.push_back(8'h00);
    if (wep) begin f.push_back(8'h11); f.push_back(8'h22); f.push_back(8'h33); f.push_back(8'h00); end
    for (int k = 0; k < n; k++) f.push_back(8'($urandom));
    return f;
  endfunction

  initial begin repeat (3_000_000) @(posedge clk); failures++; $display("watchdog at state %h", TxState);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    bytes_t f, g, ks; int t0, ntx; logic [31:0] icv; logic [7:0] plain[$]; logic [63:0] ts0;
    foreach (regs[k]) regs[k] = 0;
    repeat (5) @(posedge clk); rst <= 0; repeat (50) @(posedge clk);

    // host access to a baseband register and a synthesizer write
    @(posedge clk) cfMMIREGAD <= 8'h21; cfMMIWDATA <= 8'h5A; cfWrMmiReq <= 1;
    while (!mmiWrGnt) @(posedge clk);
    cfWrMmiReq <= 0; chk(regs[8'h21] == 8'h5A, "host baseband register write");
    @(posedge clk) cfSynWrData <= 32'h0001_2345; cfSynWrReq <= 1; @(posedge clk) cfSynWrReq <= 0;
    while (!RFWrGnt) @(posedge clk);
    count("synth_write");

    // 1. acknowledged data frame
    f = data_frame(PEER, ME, 60, 0); ntx = txq.size();
    host_send(f, 0, 0);
    g = txq[ntx]; add_fcs(f);
    chk(g == f, "data frame on air with FCS");
    chk({regs[8'h0C], regs[8'h0D]} == 16'((8 * f.size() + 10) / 11) && regs[8'h0A] == 8'h6E,
        $sformatf("PLCP LENGTH %0d for %0d octets", {regs[8'h0C], regs[8'h0D]}, f.size()));
    if (n_dn > 0 && mech.exists("ack_received")) count("data_acked");

    // 2. data frame for this station: ACK reply after SIFS
    f = data_frame(ME, PEER, 40, 0); add_fcs(f); ntx = txq.size();
    rx_frame(f);
    wait (txq.size() > ntx);
    g = {8'hD4, 8'h00, 8'h00, 8'h00}; put48(g, PEER); add_fcs(g);
    chk(txq[ntx] == g, "ACK reply content");
    t0 = tx_start_cyc[ntx] - rx_end_cyc;
    chk(t0 >= SIFS_CYC - 60 && t0 <= SIFS_CYC + 120, $sformatf("ACK after %0d cycles (SIFS %0d)", t0, SIFS_CYC));
    if (txq[ntx] == g) count("ack_reply");
    repeat (200) @(posedge clk);
    chk(rxq.size() == f.size() && n_good >= 1, "received frame delivered");

    // 3. RTS for this station: CTS reply
    f = {8'hB4, 8'h00, 8'hDC, 8'h05}; put48(f, ME); put48(f, PEER); add_fcs(f); ntx = txq.size();
    rx_frame(f);
    wait (txq.size() > ntx);
    if (txq[ntx][0] == 8'hC4 && get48(txq[ntx], 4) == PEER) count("cts_reply");
    chk(txq[ntx][0] == 8'hC4, "CTS reply");
    repeat (2000) @(posedge clk);

    // 4. NAV from a frame for another station; a frame queued meanwhile waits for it
    f = data_frame(OTHER, PEER, 20, 0); f[2] = 8'hE8; f[3] = 8'h03; add_fcs(f);   // 1000 us
    rx_frame(f);
    repeat (20) @(posedge clk); chk(Nav > 16'd900, $sformatf("NAV set to %0d", Nav));
    if (Nav > 0) count("nav_set");
    t0 = cyc + 1000 * 44; ntx = txq.size();
    f = data_frame(PEER, ME, 30, 0);
    host_send(f, 0, 0);
    chk(tx_start_cyc[ntx] >= t0, "transmission deferred until NAV expired");
    if (tx_start_cyc[ntx] >= t0) count("nav_defer");

    // 5. bad FCS (EIFS) and a frame for another address (filtered, no ACK)
    f = data_frame(ME, PEER, 20, 0); add_fcs(f); f[f.size() - 1] ^= 8'h01; ntx = txq.size();
    t0 = n_good; rx_frame(f); repeat (3000) @(posedge clk);
    chk(txq.size() == ntx && n_good == t0, "bad FCS: no ACK, not good");
    f = data_frame(OTHER, PEER, 20, 0); add_fcs(f);
    rx_frame(f); repeat (3000) @(posedge clk);
    chk(txq.size() == ntx && n_good == t0, "frame for another station filtered");
    if (txq.size() == ntx && n_good == t0) count("addr_filter");

    // 6. long frame: RTS/CTS protected
    f = data_frame(PEER, ME, 500, 0); ntx = txq.size();
    host_send(f, 0, 0);
    chk(txq.size() >= ntx + 2 && txq[ntx][0] == 8'hB4 && txq[ntx + 1][0] == 8'h08, "RTS then data");
    if (txq.size() >= ntx + 2 && txq[ntx][0] == 8'hB4 && n_dn > 0) count("rts_cts_exchange");

    // 7. unacknowledged frame: retries then abort
    peer_ack = 0; f = data_frame(PEER, ME, 30, 0); ntx = txq.size(); t0 = n_rt;
    host_send(f, 0, 0);
    chk(txq.size() - ntx == int'(cfRtyLimit) + 1 && n_rt - t0 == int'(cfRtyLimit) && n_ab == 1,
        $sformatf("retry/abort: %0d sends", txq.size() - ntx));
    peer_ack = 1;

    // 8. group-addressed frame: sent once, no ACK wait
    f = data_frame(48'hFFFFFFFFFFFF, ME, 30, 0); ntx = txq.size(); t0 = n_dn;
    peer_ack = 0; host_send(f, 0, 1); peer_ack = 1;
    chk(txq.size() == ntx + 1 && n_dn == t0 + 1, "group frame completed without ACK");
    if (n_dn == t0 + 1) count("multicast_tx");

    // 9. WEP transmit
    f = data_frame(PEER, ME, 200, 1); ntx = txq.size();
    host_send(f, 1, 0);
    g = txq[ntx]; rc4_ks(24'h332211, 204, ks);
    plain = g[0:27];
    for (int k = 28; k < g.size() - 4; k++) plain.push_back(g[k] ^ ks[k - 28]);
    icv = crc(plain, 28, plain.size() - 4);
    chk(plain[0:plain.size() - 5] == f && {plain[plain.size()-1], plain[plain.size()-2], plain[plain.size()-3], plain[plain.size()-4]} == icv,
        "WEP frame decrypts to the buffer contents with a good ICV");
    chk(crc(g, 0, g.size() - 4) == {g[g.size()-1], g[g.size()-2], g[g.size()-3], g[g.size()-4]}, "WEP frame FCS");
    if (plain[0:plain.size() - 5] == f) count("wep_encrypt");

    // 10. WEP receive
    f = data_frame(ME, PEER, 300, 1); f[24] = 8'hA5; f[25] = 8'h5A; f[26] = 8'h0F;
    plain = f; rc4_ks(24'h0F5AA5, 304, ks);
    icv = crc(f, 28, f.size());
    for (int k = 0; k < 4; k++) f.push_back(icv[8*k +: 8]);
    for (int k = 28; k < f.size(); k++) f[k] ^= ks[k - 28];
    add_fcs(f); t0 = n_rxdone;
    rx_frame(f);
    wait (n_rxdone > t0); @(posedge clk);
    chk(last_icv && last_wep && rxq[0:plain.size() - 1] == plain, "WEP frame decrypted, ICV good");
    chk(dut.fifo_max > 9'd10 && dut.fifo_max <= 9'd256, $sformatf("WEP FIFO peak %0d", dut.fifo_max));
    if (last_icv) count("wep_decrypt");
    repeat (20000) @(posedge clk);

    // 11. beacon as access point
    g = {8'h80, 8'h00, 8'h00, 8'h00}; put48(g, 48'hFFFFFFFFFFFF); put48(g, ME); put48(g, BSS_AP);
    g.push_back(8'h00); g.push_back(8'h00);
    for (int k = 0; k < 8; k++) g.push_back(8'h00);
    g.push_back(8'h04); g.push_back(8'h00); g.push_back(8'h01); g.push_back(8'h00);
    g.push_back(8'h00); g.push_back(8'h03); g.push_back(8'h41); g.push_back(8'h42); g.push_back(8'h43);
    @(posedge clk) cfTableAddr <= 0; cfTabAddrWrN <= 0; repeat (3) @(posedge clk); cfTabAddrWrN <= 1; repeat (3) @(posedge clk);
    for (int k = 0; k < g.size(); k += 2) begin
      cfBcnData <= {(k + 1 < g.size()) ? g[k + 1] : 8'h00, g[k]};
      cfTabDataWrN <= 0; repeat (3) @(posedge clk); cfTabDataWrN <= 1; repeat (3) @(posedge clk);
    end
    cfbecCnt <= 12'(g.size()); cfbecOwn <= 1; @(posedge clk) cfbecOwn <= 0;
    ntx = txq.size(); cfBEACONEN <= 1;
    t0 = cyc; while (!bcnClrOwn && cyc - t0 < 400000) @(posedge clk);
    while (txq.size() == ntx && cyc - t0 < 400000) @(posedge clk);
    chk(macTSFT >= 64'd4096, $sformatf("first TBTT at TSF %0d us", macTSFT));
    cfBEACONEN <= 0;
    add_fcs(g);
    chk(txq.size() > ntx && txq[ntx] == g, "beacon sent from beacon RAM");
    if (txq.size() > ntx && txq[ntx][0] == 8'h80) count("beacon_tx");

    // 12. beacon received as a station: TSF adopted
    cfOPMODE <= 2'd0; cfBSSID <= BSS_STA; repeat (10) @(posedge clk);
    g = {8'h80, 8'h00, 8'h00, 8'h00}; put48(g, 48'hFFFFFFFFFFFF); put48(g, PEER); put48(g, BSS_STA);
    g.push_back(8'h00); g.push_back(8'h00);
    ts0 = 64'h0000_0012_3456_0000;
    for (int k = 0; k < 8; k++) g.push_back(ts0[8*k +: 8]);
    g.push_back(8'h64); g.push_back(8'h00); g.push_back(8'h01); g.push_back(8'h00);
    add_fcs(g); rx_frame(g); repeat (20) @(posedge clk);
    chk(macTSFT >= ts0 && macTSFT < ts0 + 64'd1000, $sformatf("TSF adopted: %h", macTSFT));
    if (macTSFT >= ts0) count("tsf_adopt");

    // mechanisms
    if (n_rftx >= txq.size() && !rf_bad) count("rf_tx_sequence");
    begin
      string need[$] = {"bbp_register_write", "bbp_register_read", "synth_write", "data_acked", "ack_reply",
        "cts_reply", "nav_set", "nav_defer", "eifs", "addr_filter", "backoff_slot", "rts_cts_exchange",
        "cts_received", "ack_received", "retry", "abort", "multicast_tx", "wep_encrypt", "wep_decrypt",
        "beacon_tx", "tsf_adopt", "rf_tx_sequence"};
      foreach (need[k]) begin
        $display("mechanism %-20s %0d", need[k], mech.exists(need[k]) ? mech[need[k]] : 0);
        chk(mech.exists(need[k]), {"mechanism never happened: ", need[k]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
