// tb_chkpkt: feeds whole frames (RTS to this station, RTS to another, beacon, WEP data
// frame, ACK with a corrupted FCS) octet by octet and checks the type flags, the
// verdict, NeedAck/ToMe/ChangeNav and the extracted fields. The FCS of each frame is
// computed here with a bit-serial CRC-32 written for this bench.
module tb_chkpkt;
  logic clk = 0, rst = 1, ps = 0, pe = 0, bs = 0; logic [7:0] bd = 0;
  logic done, good, bad, rts, cts, ack, bcn, data, psp, cfe, wep, needack, tome, aok, bssm, chnav;
  logic [15:0] fc, dur, bint, lint; logic [47:0] da, sa, bssid; logic [63:0] ts;
  logic [23:0] iv; logic [1:0] kid; logic [11:0] len;
  localparam logic [47:0] ME = 48'h0A0B0C0D0E00, OTHER = 48'h665544332210, BSS = 48'h123456789A00;
  int checks = 0, failures = 0;
  chkpkt dut (.MacClk(clk), .Reset(rst), .PktStart(ps), .PktEnd(pe), .ByteStb(bs), .ByteData(bd),
    .cfMacAddr0(48'h1), .cfMacAddr1(ME), .cfMacAddr2(48'h2), .cfMacAddr3(48'h4), .cfBSSID(BSS),
    .cfHashTab('0), .cfPROM(1'b0), .Done(done), .Good(good), .BadPkt(bad), .RTSPkt(rts),
    .CTSPkt(cts), .ACKPkt(ack), .BeaconPkt(bcn), .DataPkt(data), .PsPollPkt(psp), .CFEndPkt(cfe),
    .WepPkt(wep), .NeedAck(needack), .ToMe(tome), .AddrOk(aok), .BssMatch(bssm), .ChangeNav(chnav),
    .FrameCtl(fc), .Duration(dur), .Daddr(da), .Saddr(sa), .Bssid(bssid), .Timestamp(ts),
    .BeaconInt(bint), .ListenInt(lint), .WepIv(iv), .KeyId(kid), .Length(len));
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [31:0] crc(input logic [7:0] f[$]);
    logic [31:0] c = '1;
    foreach (f[k]) for (int b = 0; b < 8; b++) c = (c[0] ^ f[k][b]) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return ~c;
  endfunction
  task automatic put48(ref logic [7:0] f[$], input logic [47:0] a);
    for (int i = 0; i < 6; i++) f.push_back(a[8*i +: 8]);
  endtask
  task automatic send(input logic [7:0] f0[$], input bit corrupt);
    logic [7:0] f[$]; logic [31:0] c;
    f = f0; c = crc(f);
    if (corrupt) c ^= 32'h8;
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    @(negedge clk) ps = 1; @(negedge clk) ps = 0;
    foreach (f[i]) begin bd = f[i]; bs = 1; @(negedge clk); bs = 0; repeat (3) @(negedge clk); end
    pe = 1; @(negedge clk) pe = 0;
    wait (done); @(negedge clk);
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] f[$];
    repeat (3) @(negedge clk); rst = 0;
    // RTS to this station
    f = {8'hB4, 8'h00, 8'h2C, 8'h01}; put48(f, ME); put48(f, OTHER);
    send(f, 0);
    chk(good && rts && tome && !needack && !chnav && dur == 16'h012C && sa == OTHER, "RTS to me");
    // RTS to another station: NAV update
    f = {8'hB4, 8'h00, 8'h00, 8'h02}; put48(f, OTHER); put48(f, 48'h777777777770);
    send(f, 0);
    chk(good && rts && !tome && chnav && dur == 16'h0200, "RTS to other");
    // beacon of own BSS
    f = {8'h80, 8'h00, 8'h00, 8'h00}; put48(f, '1); put48(f, OTHER); put48(f, BSS);
    f.push_back(8'h10); f.push_back(8'h00);
    for (int i = 0; i < 8; i++) f.push_back(8'(8'h11 * (i + 1)));
    f.push_back(8'h64); f.push_back(8'h00); f.push_back(8'h01); f.push_back(8'h00);
    send(f, 0);
    chk(good && bcn && bssm && aok && !needack && ts == 64'h8877665544332211 && bint == 16'd100, "beacon");
    // WEP data frame to this station
    f = {8'h08, 8'h40, 8'h00, 8'h00}; put48(f, ME); put48(f, OTHER); put48(f, BSS);
    f.push_back(8'h20); f.push_back(8'h00);
    f.push_back(8'hA1); f.push_back(8'hB2); f.push_back(8'hC3); f.push_back(8'h80);
    for (int i = 0; i < 20; i++) f.push_back(8'(i));
    send(f, 0);
    chk(good && data && wep && needack && tome && iv == 24'hC3B2A1 && kid == 2'd2 && len == 12'd52, "wep data");
    // ACK with bad FCS
    f = {8'hD4, 8'h00, 8'h00, 8'h00}; put48(f, ME);
    send(f, 1);
    chk(bad && !good && !ack && !needack, "bad FCS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
