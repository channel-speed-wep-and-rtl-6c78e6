// tb_crc32_8: checks the byte-wide CRC-32 against the published check values of the
// 802.3/802.11 CRC ("123456789" -> CBF43926, the pangram -> 414FA339), then feeds the
// FCS back and expects the residue flag, and checks that a corrupted octet clears it.
module tb_crc32_8;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [7:0] d = 0;
  logic [31:0] crc, fcs;
  logic ok;
  int checks = 0, failures = 0;
  crc32_8 dut (.Clk(clk), .Reset(rst), .Init(init), .En(en), .Data(d), .Crc(crc), .Fcs(fcs), .FcsOk(ok));
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic feed(input string s);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    foreach (s[i]) begin d = s[i]; en = 1; @(negedge clk); end
    en = 0;
  endtask
  task automatic feed_fcs(input logic [31:0] f);
    for (int i = 0; i < 4; i++) begin d = f[8*i +: 8]; en = 1; @(negedge clk); end
    en = 0;
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    feed("123456789");
    chk(fcs == 32'hCBF43926, $sformatf("check value %h", fcs));
    feed_fcs(32'hCBF43926);
    chk(ok, "residue after FCS");
    feed("The quick brown fox jumps over the lazy dog");
    chk(fcs == 32'h414FA339, $sformatf("pangram %h", fcs));
    feed_fcs(32'h414FA339 ^ 32'h100);
    chk(!ok, "bad FCS not flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
