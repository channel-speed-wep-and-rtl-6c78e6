// tb_ctspkt: steps the ctspkt generator through its octets with TPDP pulses and compares
// each octet, the SF/EF flags on the first/last octet and the wrap back to octet 0.
module tb_ctspkt;
  logic clk = 0, rst = 1, dp = 0;
  logic [7:0] d; logic [3:0] len; logic sf, ef;
  logic [7:0] exp_q[$];
  int checks = 0, failures = 0;
    ctspkt dut (.MacClk(clk), .Reset(rst), .RXADDR(48'hAABBCCDDEEF0), .Duration(16'd1000),
    .cfBSCRATE(2'd0), .cfPreamble(1'b0), .TPDP(dp), .CTSDATA(d), .CTSLEN(len), .CTSSF(sf), .CTSEF(ef));
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
    // 1000 - (192 + 112) - 10 = 686 = 0x02AE
    exp_q = {8'hC4, 8'h00, 8'hAE, 8'h02, 8'hF0, 8'hEE, 8'hDD, 8'hCC, 8'hBB, 8'hAA};
    chk(len == 4'd9, "CTS length"); run_frame(); run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
