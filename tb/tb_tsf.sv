// tb_tsf: the 64-bit timer counts microseconds; as an AP it raises TBTTDone every cfBP
// time units (TU shortened to 8 us by the TU_US parameter here); as a station it adopts
// a later received timestamp (plus cfTOFSR), ignores an earlier one and follows the
// received beacon interval.
module tb_tsf;
  logic clk = 0, rst = 1, us = 0, brx = 0; logic [1:0] mode = 2'd1;
  logic [63:0] rts = 0, tsft; logic [15:0] bi = 0; logic tbtt;
  int checks = 0, failures = 0, cyc = 0, ntb = 0, last_tb = 0, per = 0;
  tsf #(.TU_US(8)) dut (.MacClk(clk), .Reset(rst), .Clk1UsStb(us), .cfOPMODE(mode), .BeaconRx(brx),
    .RxTimestamp(rts), .BeaconInt(bi), .cfBP(16'd5), .cfTOFSR(8'd3), .macTSFT(tsft), .TBTTDone(tbtt));
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; us <= (cyc % 4 == 0); if (tbtt) begin ntb++; per = cyc - last_tb; last_tb = cyc; end end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [63:0] t0;
    repeat (3) @(negedge clk); rst = 0;
    t0 = tsft; repeat (400) @(negedge clk); chk(tsft - t0 >= 99 && tsft - t0 <= 101, "1 us per count");
    wait (ntb == 3); chk(per == 4 * 8 * 5, $sformatf("AP TBTT period %0d cycles", per));
    mode = 2'd0; rts = 64'h0000_0100_0000_0000; bi = 16'd3;
    @(negedge clk) brx = 1; @(negedge clk) brx = 0;
    chk(tsft == 64'h0000_0100_0000_0003 || tsft == 64'h0000_0100_0000_0004, "adopt later timestamp");
    rts = 64'd5; @(negedge clk) brx = 1; @(negedge clk) brx = 0;
    chk(tsft > 64'h0000_0100_0000_0000, "ignore earlier timestamp");
    wait (ntb == 6); chk(per == 4 * 8 * 3, $sformatf("STA TBTT period %0d cycles", per));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
