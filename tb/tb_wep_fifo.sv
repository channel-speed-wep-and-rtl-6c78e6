// tb_wep_fifo: random pushes and pops against a queue model, including full and empty
// edges and the Clear input; data order, Count, Full and Empty are checked every cycle.
module tb_wep_fifo;
  logic clk = 0, rst = 1, clr = 0, we = 0, re = 0; logic [7:0] wd = 0, rdd;
  logic full, empty; logic [4:0] cnt;
  logic [7:0] q[$];
  int checks = 0, failures = 0;
  wep_fifo #(.DEPTH(16)) dut (.Clk(clk), .Reset(rst), .Clear(clr), .WrEn(we), .WrData(wd), .RdEn(re),
    .RdData(rdd), .Full(full), .Empty(empty), .Count(cnt));
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(cnt == 5'(q.size()) && full == (q.size() == 16) && empty == (q.size() == 0), $sformatf("status %0d", i));
      if (q.size() > 0) chk(rdd == q[0], $sformatf("data %0d", i));
      // phase-dependent bias so the FIFO both fills and drains
      we = !full && ($urandom_range(0, 99) < ((i / 300) % 2 ? 30 : 70));
      re = !empty && ($urandom_range(0, 99) < ((i / 300) % 2 ? 70 : 30));
      clr = (i == 1500);
      wd = 8'($urandom);
      @(posedge clk);
      if (clr) q.delete();
      else begin
        if (re) void'(q.pop_front());
        if (we) q.push_back(wd);
      end
    end
    @(negedge clk) we = 0; re = 0; clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
