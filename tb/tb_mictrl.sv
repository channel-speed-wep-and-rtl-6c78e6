// tb_mictrl: serial control-port master against a model of the baseband's register
// port (samples SD on SCLK rising edges while CS is low, 8 address bits then 8 data
// bits, MSB first; drives SD for reads when R/W is high). Random writes must land in
// the model's registers; reads must return them; CS, R/W and the grant are checked.
module tb_mictrl;
  logic clk = 0, rst = 1, wr = 0, rd = 0; logic [7:0] a = 0, wd = 0, rdat;
  logic gnt, busy, sclk, rw, cs, sdo, sden, sdi;
  logic [7:0] regs[256]; int bc = 0; logic [7:0] sa = 0, sd = 0; bit rw_ok = 1, was_rd = 0;
  int checks = 0, failures = 0;
  mictrl #(.SCLK_DIV(3)) dut (.MacClk(clk), .Reset(rst), .WrMmiReq(wr), .RdMmiReq(rd), .MmiAddr(a),
    .MmiWData(wd), .MmiRData(rdat), .MmiGnt(gnt), .MmiBusy(busy), .miSclk(sclk), .miRw(rw), .miCs(cs),
    .miSdOut(sdo), .miSdEn(sden), .IoSdIn(sdi));
  always #5 clk = ~clk;
  // register-port model
  assign sdi = (bc >= 8) ? regs[sa][15 - bc] : 1'b0;
  always @(posedge sclk) if (!cs) begin
    if (bc < 8) begin sa = {sa[6:0], sdo}; if (rw) rw_ok = 0; end
    else if (!rw) begin sd = {sd[6:0], sdo}; was_rd = 0; if (!sden) rw_ok = 0; end
    else begin was_rd = 1; if (sden) rw_ok = 0; end
    bc++;
  end
  always @(posedge cs) begin
    if (bc == 16 && !was_rd) regs[sa] = sd;
    bc = 0;
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic xfer(input bit r, input logic [7:0] ad, input logic [7:0] d);
    @(negedge clk) a = ad; wd = d; wr = !r; rd = r; @(negedge clk) wr = 0; rd = 0;
    chk(!cs && busy, "CS low during transfer");
    while (!gnt) @(negedge clk);
    chk(cs, "CS high after transfer");
  endtask
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] mirror[256]; logic [7:0] ad;
    foreach (regs[k]) begin regs[k] = 0; mirror[k] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    for (int k = 0; k < 40; k++) begin
      ad = 8'($urandom); mirror[ad] = 8'($urandom); xfer(0, ad, mirror[ad]);
      @(negedge clk); chk(regs[ad] == mirror[ad], $sformatf("write %h=%h got %h", ad, mirror[ad], regs[ad]));
    end
    for (int k = 0; k < 40; k++) begin
      ad = 8'($urandom); regs[ad] = 8'($urandom); xfer(1, ad, 8'h00);
      chk(rdat == regs[ad], $sformatf("read %h: %h vs %h", ad, rdat, regs[ad]));
    end
    chk(rw_ok, "R/W and SD direction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
