// tb_wep: WEP loopback. A 1500-octet payload frame is encrypted by the transmit path
// (the pump model pops octets only when TxRdy), checked against a software RC4/CRC-32
// model, then fed back into the receive path at the 54 Mbit/s octet rate (one octet per
// 6 or 7 clocks, 6.5 on average, at 44 MHz). The decrypted frame must equal the original,
// IcvOk must be set, and the FIFO must never overflow during the key schedule. A frame
// with one corrupted cipher octet must fail the ICV, and a frame without the WEP bit must
// pass unchanged.
module tb_wep;
  logic clk = 0, rst = 1;
  logic [103:0] mk = 104'h00112233445566778899AABBCC;
  logic txgo = 0, txwep = 0, tef = 0, tdp = 0; logic [23:0] txiv = 24'h030201; logic [7:0] tpd = 0;
  logic bmdp, trdy, encp; logic [7:0] tout;
  logic rs = 0, rbs = 0, re = 0; logic [7:0] rb = 0;
  logic [7:0] rout; logic rostb, rdone, icv, rwep; logic [8:0] fmax;
  int checks = 0, failures = 0;
  wep dut (.MacClk(clk), .Reset(rst), .MasterKey(mk), .cfKey128(1'b1), .TxGo(txgo), .TxWep(txwep),
    .TxIV(txiv), .TPD(tpd), .TPEF(tef), .bmTPDP(bmdp), .TxOut(tout), .TxRdy(trdy), .TxTPDP(tdp),
    .ENCRYPPhase(encp), .RxStart(rs), .RxByteStb(rbs), .RxByte(rb), .RxEnd(re), .RxOut(rout),
    .RxOutStb(rostb), .RxDone(rdone), .IcvOk(icv), .RxWep(rwep), .FifoMax(fmax));
  always #5 clk = ~clk;
  logic [7:0] rxq[$];
  always @(posedge clk) if (rostb) rxq.push_back(rout);
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
  function automatic logic [31:0] crc(input logic [7:0] f[$], input int from, input int to);
    logic [31:0] c = '1;
    for (int k = from; k < to; k++) for (int b = 0; b < 8; b++) c = (c[0] ^ f[k][b]) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return ~c;
  endfunction
  // transmit: the buffer manager holds hdr+payload; returns what the PHY would receive
  task automatic transmit(input logic [7:0] plain[$], input bit w, output logic [7:0] air[$]);
    int p = 0, n = plain.size();
    air.delete();
    @(negedge clk) txwep = w; txgo = 1; @(negedge clk) txgo = 0;
    while (air.size() < n + (w ? 4 : 0)) begin
      tpd = (p < n) ? plain[p] : 8'h00; tef = (p == n - 1);
      tdp = trdy && ($urandom_range(0, 3) != 0);
      #1; if (tdp) begin air.push_back(tout); if (p < n) p++; end
      @(negedge clk); tdp = 0;
    end
  endtask
  // receive at 54 Mbit/s: the FCS (4 octets) follows in clear
  task automatic receive(input logic [7:0] air[$]);
    rxq.delete();
    @(negedge clk) rs = 1; @(negedge clk) rs = 0;
    foreach (air[k]) begin
      rb = air[k]; rbs = 1; @(negedge clk) rbs = 0;
      repeat ((k % 2) ? 6 : 5) @(negedge clk);
    end
    re = 1; @(negedge clk) re = 0;
    while (!rdone) @(negedge clk);
  endtask
  initial begin repeat (200000) @(posedge clk); failures++; $display("stuck tst=%0d kv=%b kcnt=%0d kpend=%0d rc4st=%0d rxq=%0d fcnt=%0d ended=%b rxo=%0d rxin=%0d fmax=%0d", dut.tst, dut.kv, dut.kcnt, dut.kpend, dut.u_rc4.st, rxq.size(), dut.f_cnt, dut.ended, dut.rxo, dut.rxin, fmax); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] plain[$], air[$], ks[$], key[$], exp_air[$];
    logic [31:0] icvv; int ne;
    repeat (3) @(negedge clk); rst = 0;
    plain = {8'h08, 8'h40};
    for (int k = 2; k < 24; k++) plain.push_back(8'(k));
    plain.push_back(8'h01); plain.push_back(8'h02); plain.push_back(8'h03); plain.push_back(8'h00);
    for (int k = 0; k < 1500; k++) plain.push_back(8'($urandom));
    // reference cipher text
    key = {8'h01, 8'h02, 8'h03};
    for (int k = 0; k < 13; k++) key.push_back(mk[8*k +: 8]);
    ref_stream(key, 1504, ks);
    icvv = crc(plain, 28, plain.size());
    exp_air = plain;
    for (int k = 28; k < plain.size(); k++) exp_air[k] = plain[k] ^ ks[k - 28];
    for (int k = 0; k < 4; k++) exp_air.push_back(icvv[8*k +: 8] ^ ks[1500 + k]);
    transmit(plain, 1, air);
    ne = 0; foreach (exp_air[k]) if (air[k] !== exp_air[k]) begin if (ne < 6) $display("air %0d %h exp %h", k, air[k], exp_air[k]); ne++; end
    chk(air.size() == exp_air.size() && ne == 0, $sformatf("cipher text: %0d mismatches, size %0d", ne, air.size()));
    // receive the same frame with an FCS appended
    for (int k = 0; k < 4; k++) air.push_back(8'hF0 + 8'(k));
    receive(air);
    chk(icv && rwep, "ICV ok on receive");
    chk(fmax <= 9'd256 && fmax > 9'd200, $sformatf("FIFO peak %0d octets at 54 Mbit/s", fmax));
    ne = 0; for (int k = 0; k < plain.size(); k++) if (rxq[k] !== plain[k]) ne++;
    chk(rxq.size() == plain.size() + 8 && ne == 0, $sformatf("decrypted: %0d mismatches, size %0d", ne, rxq.size()));
    chk(rxq[rxq.size()-1] == 8'hF3, "FCS passed in clear");
    // corrupted cipher octet
    air[100] ^= 8'h10; receive(air); chk(!icv, "corrupted frame fails ICV");
    // frame without WEP bit
    plain[1] = 8'h00; plain = plain[0:99];
    transmit(plain, 0, air); chk(air == plain, "clear frame on transmit");
    receive(air); chk(!rwep && !icv && rxq == air, "clear frame on receive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
