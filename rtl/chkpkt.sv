// chkpkt: received-frame parser.
// Takes the byte stream from rx1 and captures, by octet position, the header fields of
// the 802.11 frame formats: frame control (0-1), Duration (2-3, little endian),
// Address 1/2/3 (4-9, 10-15, 16-21), and in the body: beacon Timestamp (24-31) and
// Beacon Interval (32-33), association-request Listen Interval (26-27), and for a WEP
// data frame the IV (24-26) and KeyID (bits 7:6 of octet 27). An internal crc32_8
// (dcrc8) runs over every octet; addrchk filters Address 1.
// At PktEnd from rx1 the verdict is latched and Done pulses one cycle later; the type
// flags and verdict then stay valid until the next PktStart. Good means the FCS checked
// and the frame had at least the 14 octets of the shortest (ACK/CTS) frame. The
// per-type flags are qualified by Good. NeedAck is set for a good unicast data or
// management frame addressed to this station; ToMe for any good frame addressed here.
// ChangeNav marks a good frame not addressed here whose Duration bit 15 is clear, the
// case in which the receive side updates its NAV.
// The field list follows the document's description of chkpkt; octet offsets are from
// the 802.11 frame formats; the Done timing is this design's own.
module chkpkt (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        PktStart,
  input  logic        PktEnd,
  input  logic        ByteStb,
  input  logic [7:0]  ByteData,
  input  logic [47:0] cfMacAddr0,
  input  logic [47:0] cfMacAddr1,
  input  logic [47:0] cfMacAddr2,
  input  logic [47:0] cfMacAddr3,
  input  logic [47:0] cfBSSID,
  input  logic [63:0] cfHashTab,
  input  logic        cfPROM,
  output logic        Done,
  output logic        Good,
  output logic        BadPkt,
  output logic        RTSPkt,
  output logic        CTSPkt,
  output logic        ACKPkt,
  output logic        BeaconPkt,
  output logic        DataPkt,
  output logic        PsPollPkt,
  output logic        CFEndPkt,
  output logic        WepPkt,
  output logic        NeedAck,
  output logic        ToMe,
  output logic        AddrOk,
  output logic        BssMatch,
  output logic        ChangeNav,
  output logic [15:0] FrameCtl,
  output logic [15:0] Duration,
  output logic [47:0] Daddr,
  output logic [47:0] Saddr,
  output logic [47:0] Bssid,
  output logic [63:0] Timestamp,
  output logic [15:0] BeaconInt,
  output logic [15:0] ListenInt,
  output logic [23:0] WepIv,
  output logic [1:0]  KeyId,
  output logic [11:0] Length
);
  import wmac_pkg::*;

  logic [11:0] idx;
  logic        crc_ok, add_match, multi_match, bss_match, addr_ok, end_q;
  logic [31:0] crc_reg, crc_fcs;

  crc32_8 u_dcrc8 (.Clk(MacClk), .Reset(Reset), .Init(PktStart), .En(ByteStb), .Data(ByteData),
                   .Crc(crc_reg), .Fcs(crc_fcs), .FcsOk(crc_ok));

  addrchk u_addrchk (.Addr1(Daddr), .Addr3(Bssid), .cfMacAddr0, .cfMacAddr1, .cfMacAddr2,
                     .cfMacAddr3, .cfBSSID, .cfHashTab, .cfPROM, .AddMatch(add_match),
                     .MultiMatch(multi_match), .BssMatch(bss_match), .AddrOk(addr_ok));

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      idx <= '0; FrameCtl <= '0; Duration <= '0; Daddr <= '0; Saddr <= '0; Bssid <= '0;
      Timestamp <= '0; BeaconInt <= '0; ListenInt <= '0; WepIv <= '0; KeyId <= '0;
    end else if (PktStart) begin
      idx <= '0;
    end else if (ByteStb) begin
      idx <= idx + 12'd1;
      case (idx)
        12'd0, 12'd1:   FrameCtl[8*idx[0] +: 8] <= ByteData;
        12'd2, 12'd3:   Duration[8*idx[0] +: 8] <= ByteData;
        default: ;
      endcase
      if (idx >= 12'd4  && idx <= 12'd9)  Daddr[8*(idx-12'd4)  +: 8] <= ByteData;
      if (idx >= 12'd10 && idx <= 12'd15) Saddr[8*(idx-12'd10) +: 8] <= ByteData;
      if (idx >= 12'd16 && idx <= 12'd21) Bssid[8*(idx-12'd16) +: 8] <= ByteData;
      if (idx >= 12'd24 && idx <= 12'd31) Timestamp[8*(idx-12'd24) +: 8] <= ByteData;
      if (idx >= 12'd32 && idx <= 12'd33) BeaconInt[8*(idx-12'd32) +: 8] <= ByteData;
      if (idx >= 12'd26 && idx <= 12'd27) ListenInt[8*(idx-12'd26) +: 8] <= ByteData;
      if (idx >= 12'd24 && idx <= 12'd26) WepIv[8*(idx-12'd24) +: 8] <= ByteData;
      if (idx == 12'd27) KeyId <= ByteData[7:6];
    end
  end

  wire [7:0] fc0   = FrameCtl[7:0];
  wire       is_gd = crc_ok && (idx >= 12'd14);

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      end_q <= 1'b0; Done <= 1'b0; Good <= 1'b0; BadPkt <= 1'b0; RTSPkt <= 1'b0; CTSPkt <= 1'b0;
      ACKPkt <= 1'b0; BeaconPkt <= 1'b0; DataPkt <= 1'b0; PsPollPkt <= 1'b0; CFEndPkt <= 1'b0;
      WepPkt <= 1'b0; NeedAck <= 1'b0; ToMe <= 1'b0; AddrOk <= 1'b0; BssMatch <= 1'b0;
      ChangeNav <= 1'b0; Length <= '0;
    end else begin
      end_q <= PktEnd;
      Done  <= end_q;
      if (PktStart) begin
        Good <= 1'b0; BadPkt <= 1'b0; RTSPkt <= 1'b0; CTSPkt <= 1'b0; ACKPkt <= 1'b0;
        BeaconPkt <= 1'b0; DataPkt <= 1'b0; PsPollPkt <= 1'b0; CFEndPkt <= 1'b0; WepPkt <= 1'b0;
        NeedAck <= 1'b0; ToMe <= 1'b0; AddrOk <= 1'b0; BssMatch <= 1'b0; ChangeNav <= 1'b0;
      end else if (end_q) begin
        Length    <= idx;
        Good      <= is_gd;
        BadPkt    <= !is_gd;
        RTSPkt    <= is_gd && fc0 == FC_RTS;
        CTSPkt    <= is_gd && fc0 == FC_CTS;
        ACKPkt    <= is_gd && fc0 == FC_ACK;
        BeaconPkt <= is_gd && fc0 == FC_BEACON;
        DataPkt   <= is_gd && fc0[3:2] == 2'b10;
        PsPollPkt <= is_gd && fc0 == FC_PSPOLL;
        CFEndPkt  <= is_gd && (fc0 == FC_CFEND || fc0 == FC_CFENDA);
        WepPkt    <= is_gd && FrameCtl[14];
        NeedAck   <= is_gd && add_match && (fc0[3:2] == 2'b10 || fc0[3:2] == 2'b00);
        ToMe      <= is_gd && add_match;
        AddrOk    <= is_gd && addr_ok;
        BssMatch  <= is_gd && bss_match;
        ChangeNav <= is_gd && !add_match && !Duration[15];
      end
    end
  end

  // crc_fcs is the generator view of the same register; only the check is used here
  wire unused_ok = ^{crc_reg, crc_fcs, multi_match};
endmodule
