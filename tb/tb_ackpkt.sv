// tb_ackpkt: steps the ackpkt generator through its octets with TPDP pulses and compares
// each octet, the SF/EF flags on the first/last octet and the wrap back to octet 0.
module tb_ackpkt;
  logic clk = 0, rst = 1, dp = 0;
  logic [7:0] d; logic [3:0] len; logic sf, ef;
  logic [7:0] exp_q[$];
  int checks = 0, failures = 0;
    logic [15:0] dur = 16'd500; logic mf = 0;
  ackpkt dut (.MacClk(clk), .Reset(rst), .RXADDR(48'h060504030201), .Duration(dur), .MoreFrag(mf),
    .cfBSCRATE(2'd0), .cfPreamble(1'b0), .TPDP(dp), .ACKDATA(d), .ACKLEN(len), .ACKSF(sf), .ACKEF(ef));
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
    exp_q = {8'hD4, 8'h00, 8'h00, 8'h00, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06};
    chk(len == 4'd9, "ACK length"); run_frame();
    // fragment burst: duration field carries the remaining time (500 - 304 - 10 = 186)
    mf = 1; exp_q[2] = 8'd186; exp_q[3] = 8'h00; run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
