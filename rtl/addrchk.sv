// addrchk: receive address filter. Combinational.
// Addr1 (the receiver address of a frame) is compared with the station's four unicast
// MAC addresses. A group address (bit 0 of the first octet set) is accepted if it is
// the broadcast address or if its bit in the 64-entry hash table is set. Promiscuous
// mode (cfPROM) accepts everything. BssMatch compares Addr3 with the BSSID.
// The four unicast addresses, the hash table and promiscuous mode are the document's
// (chip features, boundary signals cfMacAddr0..3, cfHashTab, cfPROM); the hash
// function, the low six bits of an XOR fold of the address, is this design's own.
module addrchk (
  input  logic [47:0] Addr1,
  input  logic [47:0] Addr3,
  input  logic [47:0] cfMacAddr0,
  input  logic [47:0] cfMacAddr1,
  input  logic [47:0] cfMacAddr2,
  input  logic [47:0] cfMacAddr3,
  input  logic [47:0] cfBSSID,
  input  logic [63:0] cfHashTab,
  input  logic        cfPROM,
  output logic        AddMatch,
  output logic        MultiMatch,
  output logic        BssMatch,
  output logic        AddrOk
);
  logic [5:0] hidx;
  always_comb begin
    hidx = '0;
    for (int i = 0; i < 8; i++) hidx ^= Addr1[6*i +: 6];
    AddMatch   = (Addr1 == cfMacAddr0) || (Addr1 == cfMacAddr1) ||
                 (Addr1 == cfMacAddr2) || (Addr1 == cfMacAddr3);
    MultiMatch = Addr1[0] && ((&Addr1) || cfHashTab[hidx]);
    BssMatch   = (Addr3 == cfBSSID);
    AddrOk     = AddMatch || MultiMatch || cfPROM;
  end
endmodule
