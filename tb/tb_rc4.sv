// tb_rc4: runs the RC4 engine with its S-box RAM against a software RC4 model for a
// 64-bit and a 128-bit WEP key. Checks: the KSA takes 1536 clocks; the first two
// scramble rounds of the key (23, 89, ...) give j = 23 and j = 113, the values worked
// through in the document; every key-stream byte matches the model; each byte takes
// four clocks.
module tb_rc4;
  logic clk = 0, rstn = 0, k128 = 0, ps = 0, pe = 0, stb = 0;
  logic [103:0] mk; logic [23:0] iv; logic [7:0] din = 0;
  logic [7:0] sa, sd, sq, dout; logic swn, bstb, prga, rdy;
  int checks = 0, failures = 0, cyc = 0, nwr = 0;
  int wr_addr[4];
  int nout = 0; logic [7:0] sent[$], outs[$]; int tstb[$];
  always @(posedge clk) if (bstb) begin outs.push_back(dout); tstb.push_back(cyc); nout++; end
  rc4 dut (.SysClk(clk), .ResetN(rstn), .MasterKey(mk), .KeyIV(iv), .cfKey128(k128), .PktStart(ps),
    .PktEnd(pe), .DataStb(stb), .DataIn(din), .SboxDataIn(sq), .WepSboxAddr(sa), .WepSboxData(sd),
    .WepSboxWrN(swn), .rc4DataOut(dout), .rc4ByteStb(bstb), .rc4PRGAPhase(prga), .rc4Ready(rdy));
  sbox_ram u_ram (.Clk(clk), .Addr(sa), .DataIn(sd), .WrN(swn), .DataOut(sq));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (!swn) begin if (nwr >= 256 && nwr < 260) wr_addr[nwr - 256] = sa; nwr++; end
  end
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic void ref_stream(input logic [7:0] key[$], input int n, ref logic [7:0] ks[$]);
    logic [7:0] s[256]; logic [7:0] t; int j = 0, i = 0;
    for (int k = 0; k < 256; k++) s[k] = 8'(k);
    for (int k = 0; k < 256; k++) begin
      j = (j + s[k] + key[k % key.size()]) % 256; t = s[k]; s[k] = s[j]; s[j] = t;
    end
    j = 0; ks.delete();
    for (int k = 0; k < n; k++) begin
      i = (i + 1) % 256; j = (j + s[i]) % 256; t = s[i]; s[i] = s[j]; s[j] = t;
      ks.push_back(s[(s[i] + s[j]) % 256]);
    end
  endfunction
  task automatic run(input bit wide, input int n);
    logic [7:0] key[$], ks[$]; int t0, tb, per;
    for (int k = 0; k < 3; k++) key.push_back(iv[8*k +: 8]);
    for (int k = 0; k < (wide ? 13 : 5); k++) key.push_back(mk[8*k +: 8]);
    ref_stream(key, n, ks);
    k128 = wide; nwr = 0;
    @(negedge clk) ps = 1; t0 = cyc; @(negedge clk) ps = 0;
    wait (prga); chk(cyc - t0 >= 1536 && cyc - t0 <= 1540, $sformatf("KSA %0d clocks", cyc - t0));
    chk(wr_addr[0] == 32'(8'(key[0])) && wr_addr[1] == 0 && wr_addr[2] == 32'(8'(key[0] + 8'd1 + key[1])),
        $sformatf("first KSA rounds j=%0d,%0d", wr_addr[0], wr_addr[2]));
    // stream bytes back to back: present the next one whenever the engine is ready
    nout = 0; sent.delete(); outs.delete(); tstb.delete();
    while (nout < n) begin
      @(negedge clk);
      stb = rdy && sent.size() < n;
      if (stb) begin din = 8'($urandom); sent.push_back(din); end
    end
    @(negedge clk) stb = 0;
    for (int k = 0; k < n; k++) chk(outs[k] == (sent[k] ^ ks[k]), $sformatf("byte %0d: %h vs %h", k, outs[k], sent[k] ^ ks[k]));
    per = tstb[n-1] - tstb[n-2];
    chk(tstb[n-1] - tstb[0] == 4 * (n - 1), $sformatf("PRGA %0d clocks for %0d bytes", tstb[n-1] - tstb[0], n - 1));
    @(negedge clk) pe = 1; @(negedge clk) pe = 0;
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk); rstn = 1;
    iv = {8'hA0, 8'd89, 8'd23}; mk = 104'h0D0C0B0A09_0807060504030201;
    run(0, 40);
    iv = 24'h5B6C7D; mk = 104'hFEDCBA98765432100123456789;
    run(1, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
