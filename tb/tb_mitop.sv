// tb_mitop: the baseband control path end to end (rwbbp + mictrl) against a model of
// the baseband's serial register port: a frame's SIGNAL/SERVICE/LENGTH registers are
// written over the serial wires, the RSSI register is read back, and host register
// writes/reads go through.
module tb_mitop;
  logic clk = 0, rst = 1, tpreq = 0, rssireq = 0, hwr = 0, hrd = 0;
  logic [11:0] txlen = 0; logic [1:0] rate = 3; logic [7:0] had = 0, hwd = 0;
  logic tpgnt, wgnt, rgnt, sclk, rw, cs, sdo, sden, sdi; logic [7:0] rssi, hrdata;
  logic [7:0] regs[256]; int bc = 0; logic [7:0] sa = 0, sd = 0; bit was_rd = 0;
  int checks = 0, failures = 0, nwr = 0;
  mitop #(.SCLK_DIV(2)) dut (.MacClk(clk), .Reset(rst), .TPWrReq(tpreq), .TxLen(txlen), .TxRate(rate),
    .cfPbcc(1'b0), .TPWrGnt(tpgnt), .RssiReq(rssireq), .miRSSI(rssi), .cfWrMmiReq(hwr), .cfRdMmiReq(hrd),
    .cfMMIREGAD(had), .cfMMIWDATA(hwd), .mmiWrGnt(wgnt), .mmiRdGnt(rgnt), .miRdData(hrdata),
    .miSclk(sclk), .miRw(rw), .miCs(cs), .miSdOut(sdo), .miSdEn(sden), .IoSdIn(sdi));
  always #5 clk = ~clk;
  assign sdi = (bc >= 8) ? regs[sa][15 - bc] : 1'b0;
  always @(posedge sclk) if (!cs) begin
    if (bc < 8) sa = {sa[6:0], sdo};
    else if (!rw) begin sd = {sd[6:0], sdo}; was_rd = 0; end
    else was_rd = 1;
    bc++;
  end
  always @(posedge cs) begin
    if (bc == 16 && !was_rd) begin regs[sa] = sd; nwr++; end
    bc = 0;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (regs[k]) regs[k] = 0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk) txlen = 1026; rate = 3; tpreq = 1; while (!tpgnt) @(negedge clk); tpreq = 0;
    chk(nwr == 4 && regs[8'h0A] == 8'h6E && {regs[8'h0C], regs[8'h0D]} == 16'd747 && regs[8'h0B][7],
        $sformatf("frame registers: %0d writes, LENGTH %0d", nwr, {regs[8'h0C], regs[8'h0D]}));
    @(negedge clk) txlen = 304; rate = 1; tpreq = 1; while (!tpgnt) @(negedge clk); tpreq = 0;
    chk(regs[8'h0A] == 8'h14 && {regs[8'h0C], regs[8'h0D]} == 16'd1216 && !regs[8'h0B][7], "2 Mbit/s frame");
    regs[8'h3E] = 8'h47; @(negedge clk) rssireq = 1; @(negedge clk) rssireq = 0;
    repeat (200) @(negedge clk); chk(rssi == 8'h47, $sformatf("RSSI %h", rssi));
    @(negedge clk) had = 8'h30; hwd = 8'h99; hwr = 1; while (!wgnt) @(negedge clk); hwr = 0;
    chk(regs[8'h30] == 8'h99, "host write");
    regs[8'h31] = 8'hC6; @(negedge clk) had = 8'h31; hrd = 1; while (!rgnt) @(negedge clk); hrd = 0;
    @(negedge clk); chk(hrdata == 8'hC6, "host read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
