// tb_backoff: many back-off draws at each contention window (7 ... 1023); every draw
// must lie in 0..CW, the spread must cover most of the window, the count must drop one
// per idle slot, freeze while BUSY, give BkDone only at zero, and clear on Cancel.
module tb_backoff;
  logic clk = 0, rst = 1, slot = 0, busy = 0, cancel = 0, req = 0;
  logic [9:0] cw = 7, cnt; logic done;
  int checks = 0, failures = 0;
  backoff dut (.MacClk(clk), .Reset(rst), .cw(cw), .SlotTime(slot), .BUSY(busy), .Cancel(cancel),
    .BackOffReq(req), .BkDone(done), .SlotCnt(cnt));
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic pulse_slot();
    @(negedge clk) slot = 1; @(negedge clk) slot = 0;
  endtask
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int mx, n0, bad;
    repeat (3) @(negedge clk); rst = 0;
    for (int k = 3; k <= 10; k++) begin
      cw = 10'((1 << k) - 1); mx = 0; bad = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk) req = 1; repeat (2) @(negedge clk);
        if (cnt > cw) bad++;
        if (cnt > mx) mx = cnt;
        repeat (7 + i) @(negedge clk);      // vary LFSR phase
        cancel = 1; @(negedge clk) cancel = 0; req = 0;
      end
      chk(bad == 0, $sformatf("draws within CW=%0d", cw));
      chk(mx > cw / 2, $sformatf("spread at CW=%0d max %0d", cw, mx));
    end
    // countdown, freeze while busy, BkDone
    cw = 1023; n0 = 0;
    while (n0 < 5) begin
      @(negedge clk) req = 1; repeat (2) @(negedge clk); n0 = cnt;
      if (n0 < 5) begin cancel = 1; @(negedge clk) cancel = 0; req = 0; repeat (3) @(negedge clk); end
    end
    pulse_slot(); chk(cnt == 10'(n0 - 1), "one slot decrements");
    busy = 1; pulse_slot(); pulse_slot(); chk(cnt == 10'(n0 - 1), "frozen while busy"); busy = 0;
    chk(!done, "no BkDone before zero");
    for (int i = 1; i < n0; i++) pulse_slot();
    @(negedge clk); chk(cnt == 0 && done, "BkDone at zero");
    busy = 1; @(negedge clk); chk(!done, "no BkDone while busy"); busy = 0;
    req = 0; @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
