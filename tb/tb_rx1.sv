// tb_rx1: drives the HFA3861B RX port (RXC at 11 MHz against a 44 MHz MacClk, data LSB
// first, MD_RDY framing) and checks each octet, the byte count and the start/end pulses.
module tb_rx1;
  logic clk = 0, rst = 1, rxc = 0, rxd = 0, rdy = 0;
  logic ps, pe, bs; logic [7:0] bd; logic [11:0] bc;
  int checks = 0, failures = 0, nstart = 0, nend = 0, nb = 0;
  logic [7:0] exp_q [$];
  rx1 dut (.MacClk(clk), .Reset(rst), .RX_PE(1'b1), .RXC(rxc), .RXD(rxd), .MDRDY(rdy),
           .PktStart(ps), .PktEnd(pe), .ByteStb(bs), .ByteData(bd), .ByteCnt(bc));
  always #11 clk = ~clk;           // ~44 MHz
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (!rst) begin
    if (ps) nstart++;
    if (pe) nend++;
    if (bs) begin
      nb++;
      chk(exp_q.size() > 0 && bd == exp_q[0], $sformatf("byte %0d got %h", nb, bd));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      chk(bc == 12'(nb), "ByteCnt");
    end
  end
  task automatic send(input int n);
    logic [7:0] b;
    rdy = 1; #200;
    for (int k = 0; k < n; k++) begin
      b = 8'($urandom); exp_q.push_back(b);
      for (int i = 0; i < 8; i++) begin rxd = b[i]; #45; rxc = 1; #46; rxc = 0; end
    end
    #200; rdy = 0; #300;
  endtask
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #100 rst = 0; #100;
    send(20);
    nb = 0; send(5);
    chk(nstart == 2 && nend == 2, "start/end count");
    chk(exp_q.size() == 0, "all bytes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
