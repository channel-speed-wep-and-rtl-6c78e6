// tb_rtspkt: steps the rtspkt generator through its octets with TPDP pulses and compares
// each octet, the SF/EF flags on the first/last octet and the wrap back to octet 0.
module tb_rtspkt;
  logic clk = 0, rst = 1, dp = 0;
  logic [7:0] d; logic [3:0] len; logic sf, ef;
  logic [7:0] exp_q[$];
  int checks = 0, failures = 0;
    rtspkt dut (.MacClk(clk), .Reset(rst), .DADDR(48'h161514131211), .SADDR(48'h262524232221),
    .Duration(16'h0345), .TPDP(dp), .RTSDATA(d), .RTSLEN(len), .RTSSF(sf), .RTSEF(ef));
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic run_frame();
    for (int i = 0; i < exp_q.size(); i++) begin
      chk(d == exp_q[i], $sformatf("octet %0d: %h vs %h", i, d, exp_q[i]));
      chk(sf == (i == 0) && ef == (i == exp_q.size() - 1), $sformatf("flags at %0d", i));
      @(negedge clk) dp = 1; @(negedge clk) dp = 0;
    end
    chk(sf, "wrapped to first octet");
  endtask
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    exp_q = {8'hB4, 8'h00, 8'h45, 8'h03, 8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16,
             8'h21, 8'h22, 8'h23, 8'h24, 8'h25, 8'h26};
    chk(len == 4'd15, "RTS length"); run_frame(); run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
