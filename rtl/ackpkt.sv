// ackpkt: ACK frame builder for tx_pump.
// Presents the 10 octets of an ACK frame before its FCS: frame control D4 00, Duration,
// and the receiver address RXADDR (Address 2 of the frame being acknowledged). ACKDATA
// is the octet at the read pointer; each TPDP pulse from tx_pump advances the pointer.
// ACKSF is high while the pointer is at the first octet (frame ready), ACKEF while it is
// at the last; the TPDP that takes the last octet rewinds to the start. ACKLEN is the
// index of the last octet (9). The Duration field is zero for an unfragmented frame;
// with MoreFrag it is the received Duration less one ACK time and one SIFS at the
// basic rate. The ports are the document's; the LEN encoding and the Duration rule
// (from 802.11) are this design's own.
module ackpkt (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic [47:0] RXADDR,
  input  logic [15:0] Duration,
  input  logic        MoreFrag,
  input  logic [1:0]  cfBSCRATE,
  input  logic        cfPreamble,
  input  logic        TPDP,
  output logic [7:0]  ACKDATA,
  output logic [3:0]  ACKLEN,
  output logic        ACKSF,
  output logic        ACKEF
);
  import wmac_pkg::*;
  logic [3:0]  ptr;
  logic [15:0] dur, sub;

  always_comb begin
    sub = airtime_us(12'd14, cfBSCRATE, cfPreamble) + 16'(SIFS_US);
    dur = (MoreFrag && Duration > sub) ? Duration - sub : 16'd0;
    case (ptr)
      4'd0: ACKDATA = FC_ACK;
      4'd1: ACKDATA = 8'h00;
      4'd2: ACKDATA = dur[7:0];
      4'd3: ACKDATA = dur[15:8];
      default: ACKDATA = RXADDR[8*(ptr-4'd4) +: 8];
    endcase
  end

  always_ff @(posedge MacClk) begin
    if (Reset)     ptr <= '0;
    else if (TPDP) ptr <= ACKEF ? 4'd0 : ptr + 4'd1;
  end
  assign ACKLEN = 4'd9;
  assign ACKSF  = (ptr == 4'd0);
  assign ACKEF  = (ptr == ACKLEN);
endmodule
