// tb_valmpdu: DIFS after a good frame, EIFS after an FCS error or an over-long frame
// (accepted when cfPassBad), and the RTS NAV timeout: it fires RTS_TIMEOUT_US
// microseconds after the RTS, and is withdrawn if a new frame starts in time.
module tb_valmpdu;
  logic clk = 0, rst = 1, us = 0, rts = 0, badp = 0, fstr = 0, pend = 0, pass = 0;
  logic [11:0] cnt = 100;
  logic to, ue, ud;
  int checks = 0, failures = 0, nto = 0, t0;
  valmpdu #(.RTS_TIMEOUT_US(30)) dut (.MacClk(clk), .Reset(rst), .Clk1UsStb(us), .ByteCnt(cnt),
    .cfMaxPktLen(12'd1600), .RTSPkt(rts), .BadPkt(badp), .macFrameStr(fstr), .PktEnd(pend),
    .cfPassBad(pass), .RtsTimeOut(to), .UseEifs(ue), .UseDifs(ud));
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin cyc++; us <= (cyc % 4 == 0); if (to && !rst) nto++; end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic endpkt(output bit e, output bit d);
    @(negedge clk) pend = 1; @(negedge clk) pend = 0; e = ue; d = ud;
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    bit e, d;
    repeat (3) @(negedge clk); rst = 0;
    endpkt(e, d); chk(d && !e, "good -> DIFS");
    badp = 1; endpkt(e, d); chk(e && !d, "bad -> EIFS"); badp = 0;
    cnt = 2000; endpkt(e, d); chk(e && !d, "long -> EIFS");
    pass = 1; endpkt(e, d); chk(d && !e, "long passed -> DIFS"); pass = 0; cnt = 20;
    rts = 1; endpkt(e, d); rts = 0; t0 = cyc;
    wait (nto == 1); chk((cyc - t0) >= 4*29 && (cyc - t0) <= 4*31 + 4, $sformatf("timeout after %0d cycles", cyc - t0));
    rts = 1; endpkt(e, d); rts = 0;
    repeat (40) @(negedge clk); fstr = 1; @(negedge clk) fstr = 0;
    repeat (200) @(negedge clk); chk(nto == 1, "timeout cancelled by new frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
