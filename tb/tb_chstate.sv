// tb_chstate: BUSY follows CCA and then a DIFS (or EIFS after a bad frame) of idle time;
// SLOT then pulses once per SLOT_US microseconds; a NAV set by a frame to another
// station keeps BUSY up for its Duration, counted down in microseconds, and an RTS NAV
// is released by RtsTimeOut.
module tb_chstate;
  logic clk = 0, rst = 1, c1 = 0, cca = 0, pend = 0, chnav = 0, rts = 0, rto = 0, cfe = 0, ud = 0, ue = 0;
  logic [15:0] dur = 0;
  logic busy, slot, stb; logic [15:0] nav;
  int checks = 0, failures = 0, cyc = 0, nslot = 0;
  chstate #(.SLOT_US(20)) dut (.MacClk(clk), .Reset(rst), .Clk1Us(c1), .PhyCca(cca), .PktEnd(pend),
    .ChangeNav(chnav), .RTSPkt(rts), .Duration(dur), .RtsTimeOut(rto), .CFEndPkt(cfe), .UseDifs(ud),
    .UseEifs(ue), .cfDIFS(16'd50), .cfEIFS(16'd364), .BUSY(busy), .SLOT(slot), .Clk1UsStb(stb), .Nav(nav));
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (cyc % 2 == 0) c1 <= ~c1; if (slot) nslot++; end  // 1 us = 4 cycles
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic idle_time(output int us_to_idle);
    int t0 = cyc; wait (!busy); us_to_idle = (cyc - t0) / 4;
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t;
    repeat (3) @(negedge clk); rst = 0;
    cca = 1; repeat (40) @(negedge clk); chk(busy, "busy on CCA");
    @(negedge clk) ud = 1; @(negedge clk) ud = 0;
    cca = 0; idle_time(t); chk(t >= 49 && t <= 52, $sformatf("DIFS %0d us", t));
    nslot = 0; repeat (4*100) @(negedge clk); chk(nslot >= 4 && nslot <= 5, $sformatf("slots in 100 us: %0d", nslot));
    cca = 1; repeat (8) @(negedge clk);
    @(negedge clk) ue = 1; @(negedge clk) ue = 0;
    cca = 0; idle_time(t); chk(t >= 363 && t <= 366, $sformatf("EIFS %0d us", t));
    // NAV from a frame to another station
    @(negedge clk) ud = 1; @(negedge clk) ud = 0;
    dur = 300; chnav = 1; pend = 1; @(negedge clk) pend = 0; chnav = 0;
    chk(nav == 300 && busy, "NAV loaded");
    idle_time(t); chk(t >= 349 && t <= 352, $sformatf("NAV + DIFS %0d us", t));
    // RTS NAV released by timeout
    @(negedge clk); dur = 1000; chnav = 1; rts = 1; pend = 1; @(negedge clk) pend = 0; chnav = 0; rts = 0;
    repeat (40) @(negedge clk); chk(nav > 900, "RTS NAV set");
    rto = 1; @(negedge clk) rto = 0; @(negedge clk);
    chk(nav == 0, "RTS NAV released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
