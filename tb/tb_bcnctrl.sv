// tb_bcnctrl: the host writes a beacon into the RAM through the address/data strobes,
// reads it back, hands it over with cfbecOwn, the MAC side reads the octets in order
// with BCNTPDP, ownership returns with a bcnClrOwn pulse, and host writes during MAC
// ownership are ignored.
module tb_bcnctrl;
  logic clk = 0, rst = 1, awn = 1, dwn = 1, drn = 1, own = 0, dp = 0;
  logic [5:0] addr = 0; logic [15:0] wd = 0, rd; logic [11:0] cnt = 0, blen;
  logic bown, clr; logic [7:0] bd;
  int checks = 0, failures = 0, nclr = 0;
  bcnctrl #(.DEPTH(64)) dut (.MacClk(clk), .Reset(rst), .cfTableAddr(addr), .cfTabAddrWrN(awn),
    .cfTabDataWrN(dwn), .cfTabDataRdN(drn), .cfBcnData(wd), .cfbecOwn(own), .cfbecCnt(cnt),
    .bcRamData(rd), .BcnOwn(bown), .bcnClrOwn(clr), .BcnLen(blen), .BCNTPDP(dp), .BCNDATA(bd));
  always #5 clk = ~clk;
  always @(posedge clk) if (clr && !rst) nclr++;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic strobe(ref logic s);
    @(negedge clk) s = 0; repeat (2) @(negedge clk); s = 1; repeat (2) @(negedge clk);
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] img[$];
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 41; i++) img.push_back(8'(8'h5A ^ (i * 7)));
    addr = 0; strobe(awn);
    for (int i = 0; i < 21; i++) begin
      wd = {(2*i+1 < 41) ? img[2*i+1] : 8'h00, img[2*i]}; strobe(dwn);
    end
    addr = 1; strobe(awn); chk(rd == {img[3], img[2]}, "host read back");
    cnt = 41; @(negedge clk) own = 1; @(negedge clk) own = 0; @(negedge clk);
    chk(bown && blen == 41, "MAC owns beacon");
    addr = 0; strobe(awn); wd = 16'hFFFF; strobe(dwn);    // ignored
    for (int i = 0; i < 41; i++) begin
      chk(bd == img[i], $sformatf("octet %0d %h vs %h", i, bd, img[i]));
      @(negedge clk) dp = 1; @(negedge clk) dp = 0;
    end
    @(negedge clk); chk(!bown && nclr == 1, "ownership returned");
    addr = 0; strobe(awn); chk(rd == {img[1], img[0]}, "write ignored while MAC owned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
