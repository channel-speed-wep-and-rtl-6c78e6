// crc32_8: byte-wide CRC-32 (G(x) = x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1),
// the generator the 802.11 FCS and the WEP ICV both use. One instance serves as the
// receive checker (dcrc8) and one as the transmit generator (framecrc8).
// The register is preset to all ones by Init and absorbs one octet, least significant
// bit first, on every cycle En is high. Crc is the register; Fcs is its complement, sent
// least significant byte first. FcsOk is high when the register holds the residue that a
// frame followed by its correct FCS leaves. Init and En in the same cycle start a new
// frame with that octet. The polynomial is the document's; the reflected bit order and
// the residue test are the standard 802.11 usage, not spelled out in the document.
module crc32_8 (
  input  logic        Clk,
  input  logic        Reset,
  input  logic        Init,
  input  logic        En,
  input  logic [7:0]  Data,
  output logic [31:0] Crc,
  output logic [31:0] Fcs,
  output logic        FcsOk
);
  import wmac_pkg::CRC_RESIDUE;

  function automatic logic [31:0] step(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 8; i++) begin
      if (r[0] ^ d[i]) r = (r >> 1) ^ 32'hEDB88320;
      else             r = r >> 1;
    end
    return r;
  endfunction

  always_ff @(posedge Clk) begin
    if (Reset)      Crc <= '1;
    else if (En)    Crc <= step(Init ? 32'hFFFFFFFF : Crc, Data);
    else if (Init)  Crc <= '1;
  end

  assign Fcs   = ~Crc;
  assign FcsOk = (Crc == CRC_RESIDUE);
endmodule
