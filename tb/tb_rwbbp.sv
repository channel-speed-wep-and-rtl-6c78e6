// tb_rwbbp: register programming for each transmitted frame, against a transaction
// model of the control-port master. The LENGTH field and length-extension bit are
// checked on the document's CCK and PBCC example rows (1023..1026 octets at 11 Mbit/s)
// and on 1, 2 and 5.5 Mbit/s frames; SIGNAL codes; RSSI read; host write and read.
module tb_rwbbp;
  logic clk = 0, rst = 1, tpreq = 0, pbcc = 0, rssireq = 0, hwr = 0, hrd = 0;
  logic [11:0] txlen = 0; logic [1:0] rate = 3; logic [7:0] had = 0, hwd = 0;
  logic tpgnt, wgnt, rgnt, wr, rd, mgnt = 0; logic [7:0] rssi, hrdata, ma, mwd, mrd = 0;
  logic [7:0] regs[256];
  int checks = 0, failures = 0;
  rwbbp dut (.MacClk(clk), .Reset(rst), .TPWrReq(tpreq), .TxLen(txlen), .TxRate(rate), .cfPbcc(pbcc),
    .TPWrGnt(tpgnt), .RssiReq(rssireq), .miRSSI(rssi), .cfWrMmiReq(hwr), .cfRdMmiReq(hrd),
    .cfMMIREGAD(had), .cfMMIWDATA(hwd), .mmiWrGnt(wgnt), .mmiRdGnt(rgnt), .miRdData(hrdata),
    .WrMmiReq(wr), .RdMmiReq(rd), .MmiAddr(ma), .MmiWData(mwd), .MmiRData(mrd), .MmiGnt(mgnt));
  always #5 clk = ~clk;
  // port model: a request takes 6 cycles, then a one-cycle grant
  int busy = 0; logic [7:0] la; bit lrd;
  always @(posedge clk) if (!rst) begin
    mgnt <= 0;
    if (busy == 0 && (wr || rd)) begin busy <= 6; la <= ma; lrd <= rd; if (wr) regs[ma] <= mwd; end
    else if (busy == 1) begin busy <= 0; mgnt <= 1; if (lrd) mrd <= regs[la]; end
    else if (busy > 1) busy <= busy - 1;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic frame(input int oct, input logic [1:0] r, input bit p, input int len, input bit ext,
                       input logic [7:0] sig);
    @(negedge clk) txlen = 12'(oct); rate = r; pbcc = p; tpreq = 1;
    while (!tpgnt) @(negedge clk);
    tpreq = 0;
    chk({regs[8'h0C], regs[8'h0D]} == 16'(len) && regs[8'h0B][7] == ext && regs[8'h0B][3] == p &&
        regs[8'h0A] == sig, $sformatf("%0d octets rate %0d pbcc %0d: LENGTH %0d ext %0d SIGNAL %h",
        oct, r, p, {regs[8'h0C], regs[8'h0D]}, regs[8'h0B][7], regs[8'h0A]));
  endtask
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (regs[k]) regs[k] = 0;
    repeat (3) @(negedge clk); rst = 0;
    // Table 3-1, CCK 11 Mbit/s
    frame(1023, 3, 0, 744, 0, 8'h6E); frame(1024, 3, 0, 745, 0, 8'h6E);
    frame(1025, 3, 0, 746, 0, 8'h6E); frame(1026, 3, 0, 747, 1, 8'h6E);
    // Table 3-2, PBCC 11 Mbit/s
    frame(1023, 3, 1, 745, 0, 8'h6E); frame(1024, 3, 1, 746, 0, 8'h6E);
    frame(1025, 3, 1, 747, 1, 8'h6E); frame(1026, 3, 1, 747, 0, 8'h6E);
    // other rates
    frame(14, 0, 0, 112, 0, 8'h0A); frame(14, 1, 0, 56, 0, 8'h14); frame(100, 2, 0, 146, 0, 8'h37);
    // RSSI read
    regs[8'h3E] = 8'h5C; @(negedge clk) rssireq = 1; @(negedge clk) rssireq = 0;
    repeat (20) @(negedge clk); chk(rssi == 8'h5C, "RSSI read");
    // host write then read
    @(negedge clk) had = 8'h21; hwd = 8'hA7; hwr = 1; while (!wgnt) @(negedge clk); hwr = 0;
    chk(regs[8'h21] == 8'hA7, "host write");
    regs[8'h22] = 8'h3C; @(negedge clk) had = 8'h22; hrd = 1; while (!rgnt) @(negedge clk); hrd = 0;
    @(negedge clk); chk(hrdata == 8'h3C, "host read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
