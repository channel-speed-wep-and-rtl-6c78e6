// sbox_ram: 256 x 8 single-port S-box RAM of the RC4 engine.
// Asynchronous read of Addr on DataOut; DataIn is written to Addr at the clock edge
// while WrN is low (a read of the same address in that cycle returns the old value).
// The S-box RAM itself is the document's; the port behaviour is this design's own.
module sbox_ram (
  input  logic       Clk,
  input  logic [7:0] Addr,
  input  logic [7:0] DataIn,
  input  logic       WrN,
  output logic [7:0] DataOut
);
  logic [7:0] mem [256];
  always_ff @(posedge Clk) begin
    if (!WrN) mem[Addr] <= DataIn;
  end
  assign DataOut = mem[Addr];
endmodule
