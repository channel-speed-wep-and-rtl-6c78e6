// tb_tx_co: transmit coordinator against a model of back-off, transmitter and peer.
// Cases: unicast acknowledged; unicast never acknowledged (limit 3: four sends, three
// TPRT, CW 7 -> 15 -> 31 -> 63, then TPAB); RTS/CTS exchange for a long frame; RTS never
// answered (abort); multicast (no ACK wait); beacon at TBTT (no TPDN); IBSS beacon
// cancelled by a received beacon.
module tb_tx_co;
  logic clk = 0, rst = 1, us = 0, sf = 0, multi = 0, tbtt = 0, brx = 0, ibss = 0;
  logic [11:0] len = 100; logic cts_ok = 0, ack_ok = 0;
  logic bkreq, bkcan, rtsreq, mpdureq, bcnreq, tprt, tpab, tpdn; logic [9:0] cw;
  logic [3:0] src, lrc; logic [7:0] sq;
  logic bkdone, txdone = 0;
  int checks = 0, failures = 0, cyc = 0, bkc = 0, txc = 0;
  int n_rts = 0, n_mpdu = 0, n_bcn = 0, n_rt = 0, n_ab = 0, n_dn = 0;
  bit answer_cts = 0, answer_ack = 0;
  int rsp = 0;   // response timer: CTS or ACK arrives some cycles after TxDone
  int cw_seen[$];
  tx_co dut (.MacClk(clk), .Reset(rst), .Clk1UsStb(us), .cfXMTEN(1'b1), .cfBEACONEN(1'b1),
    .cfOPMODE(ibss ? 2'd2 : 2'd0), .cfNeedRts(1'b0), .cfRtsThr(12'd500), .cfRtyLimit(4'd3),
    .cfCtsTimeOut(10'd30), .cfAckTimeOut(10'd30), .cfCWMin(10'd7), .cfCWMax(10'd1023), .TPSF(sf),
    .TPLEN(len), .MultiAddr(multi), .TBTTDone(tbtt), .BcnOwn(1'b1), .BeaconRx(brx), .BkDone(bkdone),
    .RxActive(1'b0), .CTSOk(cts_ok), .ACKOk(ack_ok), .TxDone(txdone), .BackOffReq(bkreq),
    .BkCancel(bkcan), .cw(cw), .txRtsReq(rtsreq), .txMpduReq(mpdureq), .txBeaconReq(bcnreq),
    .macTPRT(tprt), .macTPAB(tpab), .macTPDN(tpdn), .ShortRetryCnt(src), .LongRetryCnt(lrc), .StateQ(sq));
  always #5 clk = ~clk;
  assign bkdone = bkreq && bkc >= 5;
  always @(posedge clk) begin
    cyc++; us <= (cyc % 4 == 0);
    bkc <= bkreq ? bkc + 1 : 0;
    if (bkreq && bkc == 1) cw_seen.push_back(int'(cw));
    txdone <= 1'b0; cts_ok <= 1'b0; ack_ok <= 1'b0;
    if ((rtsreq || mpdureq || bcnreq) && !txdone) begin
      txc <= txc + 1;
      if (txc == 8) begin
        txdone <= 1'b1; txc <= 0;
        if (rtsreq) begin n_rts++; if (answer_cts) rsp <= 20; end
        if (mpdureq) begin n_mpdu++; if (answer_ack) rsp <= 40; end
        if (bcnreq) n_bcn++;
      end
    end
    if (rsp > 0) rsp <= rsp - 1;
    if (rsp == 11) cts_ok <= 1'b1;
    if (rsp == 31) ack_ok <= 1'b1;
    if (tprt) n_rt++;
    if (tpab) begin n_ab++; sf <= 1'b0; end
    if (tpdn) begin n_dn++; sf <= 1'b0; end
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic clear();
    n_rts = 0; n_mpdu = 0; n_bcn = 0; n_rt = 0; n_ab = 0; n_dn = 0; cw_seen.delete();
  endtask
  task automatic send(input int l, input bit m, input bit a_cts, input bit a_ack);
    clear(); len = 12'(l); multi = m; answer_cts = a_cts; answer_ack = a_ack;
    @(negedge clk) sf = 1;
    while (sf) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    send(100, 0, 0, 1);
    chk(n_mpdu == 1 && n_dn == 1 && n_rt == 0 && n_rts == 0, "unicast acknowledged");
    send(100, 0, 0, 0);
    chk(n_mpdu == 4 && n_rt == 3 && n_ab == 1 && n_dn == 0, $sformatf("retry/abort: %0d sends %0d retries", n_mpdu, n_rt));
    chk(cw_seen.size() == 4 && cw_seen[0] == 7 && cw_seen[1] == 15 && cw_seen[2] == 31 && cw_seen[3] == 63, "CW doubling");
    send(800, 0, 1, 1);
    chk(n_rts == 1 && n_mpdu == 1 && n_dn == 1, "RTS/CTS exchange");
    send(800, 0, 0, 1);
    chk(n_rts == 4 && n_mpdu == 0 && n_ab == 1, "RTS unanswered -> abort");
    send(800, 1, 0, 0);
    chk(n_rts == 0 && n_mpdu == 1 && n_dn == 1 && n_rt == 0, "multicast: no RTS, no ACK wait");
    clear(); @(negedge clk) tbtt = 1; @(negedge clk) tbtt = 0;
    repeat (60) @(negedge clk);
    chk(n_bcn == 1 && n_dn == 0 && sq == 8'h01, "beacon at TBTT");
    ibss = 1; clear(); @(negedge clk) tbtt = 1; @(negedge clk) tbtt = 0; @(negedge clk) brx = 1; @(negedge clk) brx = 0;
    repeat (60) @(negedge clk);
    chk(n_bcn == 0 && sq == 8'h01, "IBSS beacon cancelled by received beacon");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
