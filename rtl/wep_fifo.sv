// wep_fifo: receive FIFO (DEPTH octets, 256 by default) that lets received frame octets
// wait while the RC4 key schedule runs. One write port (WrEn, WrData) from the receive
// deserialiser and one read port (RdEn) to the decryption side; RdData shows the oldest
// octet (first-word fall-through). Clear empties it. Full/Empty/Count report the level;
// a write when full or a read when empty is ignored.
// The 256-octet depth is the document's (KSA time 34.9 us / 148 ns per octet at
// 54 Mbit/s = 235.6 octets); the fall-through read is this design's own.
module wep_fifo #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                   Clk,
  input  logic                   Reset,
  input  logic                   Clear,
  input  logic                   WrEn,
  input  logic [7:0]             WrData,
  input  logic                   RdEn,
  output logic [7:0]             RdData,
  output logic                   Full,
  output logic                   Empty,
  output logic [$clog2(DEPTH):0] Count
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  wire do_wr = WrEn && !Full;
  wire do_rd = RdEn && !Empty;

  always_ff @(posedge Clk) begin
    if (Reset || Clear) begin
      wp <= '0; rp <= '0; Count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      Count <= Count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
  always_ff @(posedge Clk) begin
    if (do_wr) mem[wp] <= WrData;
  end
  assign RdData = mem[rp];
  assign Full   = (Count == (AW+1)'(DEPTH));
  assign Empty  = (Count == '0);
endmodule
