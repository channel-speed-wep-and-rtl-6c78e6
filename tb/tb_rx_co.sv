// tb_rx_co: after a data frame needing an ACK the FSM requests the ACK at once, waits a
// SIFS (10 us) with RX_PE low, then raises RespGo and holds the request until TxDone;
// an RTS to this station gives TX_CTS_REQ,
// but not while the NAV is set; a frame start during the SIFS aborts the response.
module tb_rx_co;
  logic clk = 0, rst = 1, us = 0, txpe = 0, navb = 0, na = 0, rts = 0, txd = 0, ps = 0, pe = 0;
  logic [15:0] rxdur; logic ackr, ctsr, rxpe, go;
  int checks = 0, failures = 0, cyc = 0;
  rx_co dut (.MacClk(clk), .Reset(rst), .Clk1UsStb(us), .cfRCVEN(1'b1), .TX_PE(txpe), .NavBusy(navb),
    .NeedAck(na), .RTSPkt(rts), .TxDone(txd), .PktStart(ps), .PktEnd(pe), .Duration(16'd777),
    .RxDuration(rxdur), .TX_ACK_REQ(ackr), .TX_CTS_REQ(ctsr), .RespGo(go), .RX_PE(rxpe));
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; us <= (cyc % 4 == 0); end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic endpkt(input bit a, input bit r);
    @(negedge clk) na = a; rts = r; pe = 1; @(negedge clk) pe = 0; na = 0; rts = 0;
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    chk(rxpe, "RX_PE in IDLE");
    endpkt(1, 0); t0 = cyc;
    @(negedge clk); chk(!rxpe && ackr && !go, "RX_PE low, ACK requested, no go in WAIT_SIFS");
    wait (go); chk((cyc - t0) >= 4*9 && (cyc - t0) <= 4*11 + 2, $sformatf("SIFS %0d cycles", cyc - t0));
    chk(rxdur == 16'd777 && !ctsr, "ACK request");
    repeat (5) @(negedge clk); txd = 1; @(negedge clk) txd = 0; @(negedge clk);
    chk(!ackr && rxpe, "back to IDLE");
    endpkt(0, 1); wait (go); chk(ctsr && !ackr, "CTS request");
    @(negedge clk) txd = 1; @(negedge clk) txd = 0;
    navb = 1; endpkt(0, 1); repeat (60) @(negedge clk); chk(!ctsr && !go && rxpe, "no CTS while NAV set"); navb = 0;
    endpkt(1, 0); repeat (10) @(negedge clk); ps = 1; @(negedge clk) ps = 0;
    repeat (60) @(negedge clk); chk(!ackr && !go && rxpe, "frame start aborts response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
