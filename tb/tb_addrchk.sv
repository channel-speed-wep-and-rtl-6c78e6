// tb_addrchk: unicast match on each of the four addresses, broadcast, hashed multicast
// (hash index computed here as the XOR of the eight 6-bit slices), BSSID and promiscuous.
module tb_addrchk;
  logic [47:0] a1, a3, m0, m1, m2, m3, bss; logic [63:0] ht; logic prom;
  logic am, mm, bm, ok;
  int checks = 0, failures = 0;
  addrchk dut (.Addr1(a1), .Addr3(a3), .cfMacAddr0(m0), .cfMacAddr1(m1), .cfMacAddr2(m2),
    .cfMacAddr3(m3), .cfBSSID(bss), .cfHashTab(ht), .cfPROM(prom), .AddMatch(am),
    .MultiMatch(mm), .BssMatch(bm), .AddrOk(ok));
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic int hix(input logic [47:0] a);
    int h = 0; for (int i = 0; i < 8; i++) h ^= int'((a >> (6*i)) & 48'h3F); return h;
  endfunction
  initial begin
    m0 = 48'h010203040500; m1 = 48'h111111111110; m2 = 48'h222222222220; m3 = 48'h333333333330;
    bss = 48'hAABBCCDDEEF0; ht = '0; prom = 0; a3 = bss;
    a1 = m0; #1 chk(am && ok && bm, "addr0");
    a1 = m3; #1 chk(am && ok, "addr3");
    a1 = m2 ^ 48'h100; #1 chk(!am && !ok, "no match");
    a1 = '1; #1 chk(mm && ok && !am, "broadcast");
    a1 = 48'h00005E0001_01; #1 chk(!mm && !ok, "multicast off");
    ht[hix(a1)] = 1; #1 chk(mm && ok, "multicast hashed");
    a1 = 48'h123456789ABC; prom = 1; #1 chk(ok && !am, "promiscuous");
    a3 = 48'h1; #1 chk(!bm, "bssid mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
