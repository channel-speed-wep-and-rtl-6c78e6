// tb_tx_pump: transmit pump against a serial-port model of the baseband. The model
// grants the register write, waits a preamble time after TX_PE, raises TXRDY and clocks
// TXC, sampling TXD on each rising edge (LSB first) until TX_PE falls. Checks: every frame
// kind (ACK, CTS, RTS, beacon, MPDU with a stalling source) arrives intact with a correct
// FCS appended; TxLen counts the FCS; ACK wins over a simultaneous MPDU request; TxKind,
// TPLastBit and TxDone are given once per frame.
module tb_tx_pump;
  logic clk = 0, rst = 1;
  logic ackr = 0, ctsr = 0, bcnr = 0, rtsr = 0, mpr = 0, mrdy = 1;
  logic [7:0] src[5][$];
  int ptr[5];
  logic ackp, ctsp, rtsp, bcnp, mp, wrreq, wrgnt = 0, txpe, txd, txrdy = 0, txc = 0, tps, tplb, tdone;
  logic [11:0] txlen; logic [2:0] kind;
  logic [7:0] rxbytes[$]; int nbit = 0; logic [7:0] sh = 0;
  int checks = 0, failures = 0, n_done = 0, n_last = 0;
  tx_pump dut (.MacClk(clk), .Reset(rst), .TX_ACK_REQ(ackr), .TX_CTS_REQ(ctsr), .txBeaconReq(bcnr),
    .txRtsReq(rtsr), .txMpduReq(mpr), .RespGo(1'b1), .ACKDATA(src[0][ptr[0]]), .ACKLEN(4'd9), .CTSDATA(src[1][ptr[1]]),
    .CTSLEN(4'd9), .RTSDATA(src[3][ptr[3]]), .RTSLEN(4'd15), .BCNDATA(src[2][ptr[2]]),
    .BcnLen(12'(src[2].size())), .TPD(src[4][ptr[4]]), .MpduLen(12'(src[4].size())), .MpduRdy(mrdy),
    .ACKTPDP(ackp), .CTSTPDP(ctsp), .RTSTPDP(rtsp), .BCNTPDP(bcnp), .macTPDP(mp), .TPWrReq(wrreq),
    .TxLen(txlen), .TPWrGnt(wrgnt), .TX_PE(txpe), .TXD(txd), .TXRDY(txrdy), .TXC(txc), .TPStart(tps),
    .TPLastBit(tplb), .TxDone(tdone), .TxKind(kind));
  always #5 clk = ~clk;
  // sources: pointer per source advanced by its TPDP
  always @(posedge clk) if (!rst) begin
    if (ackp) ptr[0] <= ptr[0] + 1;
    if (ctsp) ptr[1] <= ptr[1] + 1;
    if (bcnp) ptr[2] <= ptr[2] + 1;
    if (rtsp) ptr[3] <= ptr[3] + 1;
    if (mp)   ptr[4] <= ptr[4] + 1;
    mrdy <= ($urandom_range(0, 3) != 0);
    if (tdone) n_done++;
    if (tplb) n_last++;
  end
  // register-write grant
  always @(posedge clk) wrgnt <= wrreq && !wrgnt && !rst;
  // baseband TX port model: 80 MacClk "preamble", TXC period 8 MacClk
  int bc = 0;
  always @(posedge clk) if (!rst) begin
    if (!txpe) begin bc <= 0; txrdy <= 0; txc <= 0; end
    else begin
      bc <= bc + 1;
      if (bc == 80) txrdy <= 1;
      if (bc >= 86) begin
        txc <= ((bc - 86) % 8) < 4;
        if ((bc - 86) % 8 == 0) begin sh = {txd, sh[7:1]}; nbit++; if (nbit % 8 == 0) rxbytes.push_back(sh); end
      end
    end
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [31:0] crc(input logic [7:0] f[$]);
    logic [31:0] c = '1;
    foreach (f[k]) for (int b = 0; b < 8; b++) c = (c[0] ^ f[k][b]) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return ~c;
  endfunction
  task automatic expect_frame(input int s, input string name);
    logic [7:0] e[$]; logic [31:0] c; int ne = 0;
    e = src[s]; c = crc(e);
    for (int k = 0; k < 4; k++) e.push_back(c[8*k +: 8]);
    foreach (e[k]) if (k >= rxbytes.size() || rxbytes[k] != e[k]) ne++;
    chk(rxbytes.size() == e.size() && ne == 0, $sformatf("%s: %0d octets, %0d wrong", name, rxbytes.size(), ne));
  endtask
  task automatic run(ref logic req, input int s, input string name);
    int d0 = n_done;
    rxbytes.delete(); nbit = 0; ptr[s] = 0;
    @(negedge clk) req = 1;
    @(posedge clk iff wrreq); chk(txlen == 12'(src[s].size() + 4), $sformatf("%s TxLen %0d", name, txlen));
    @(posedge clk iff tdone); #1 chk(kind == 3'(s), $sformatf("%s TxKind %0d", name, kind));
    @(negedge clk) req = 0;
    repeat (20) @(negedge clk);
    chk(n_done == d0 + 1 && n_last == n_done, $sformatf("%s one TxDone/TPLastBit", name));
    expect_frame(s, name);
  endtask
  initial begin repeat (300000) @(posedge clk); failures++; $display("watchdog: st=%0d rx=%0d ptr4=%0d", dut.st, rxbytes.size(), ptr[4]); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int n;
    for (int s = 0; s < 5; s++) begin
      n = (s == 0 || s == 1) ? 10 : (s == 3) ? 16 : (s == 2) ? 57 : 300;
      for (int k = 0; k < n; k++) src[s].push_back(8'($urandom));
    end
    repeat (3) @(negedge clk); rst = 0;
    run(ackr, 0, "ACK"); run(ctsr, 1, "CTS"); run(bcnr, 2, "beacon"); run(rtsr, 3, "RTS"); run(mpr, 4, "MPDU");
    // priority: ACK and MPDU requested together, ACK goes first
    rxbytes.delete(); nbit = 0; ptr[0] = 0; ptr[4] = 0;
    @(negedge clk) mpr = 1; ackr = 1;
    @(posedge clk iff tdone); #1 chk(kind == 3'd0, "ACK has priority");
    @(negedge clk) ackr = 0; repeat (20) @(negedge clk); expect_frame(0, "ACK before MPDU");
    rxbytes.delete(); nbit = 0;
    @(posedge clk iff tdone); #1 chk(kind == 3'd4, "then MPDU");
    @(negedge clk) mpr = 0; repeat (20) @(negedge clk); expect_frame(4, "MPDU after ACK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
