// ctspkt: CTS frame builder for tx_pump.
// Presents the 10 octets of a CTS frame before its FCS: frame control C4 00, Duration,
// and RXADDR, the transmitter address of the RTS being answered. The Duration field is
// the RTS Duration less one CTS time and one SIFS, the CTS time being that of a 14-octet
// frame at the basic rate cfBSCRATE with the preamble cfPreamble selects.
// CTSDATA is the octet at the read pointer, advanced by each TPDP pulse; CTSSF is high at
// the first octet, CTSEF at the last (CTSLEN = 9, the index of the last octet).
// The Duration rule is the document's; the LEN encoding is this design's own.
module ctspkt (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic [47:0] RXADDR,
  input  logic [15:0] Duration,
  input  logic [1:0]  cfBSCRATE,
  input  logic        cfPreamble,
  input  logic        TPDP,
  output logic [7:0]  CTSDATA,
  output logic [3:0]  CTSLEN,
  output logic        CTSSF,
  output logic        CTSEF
);
  import wmac_pkg::*;
  logic [3:0]  ptr;
  logic [15:0] dur, sub;

  always_comb begin
    sub = airtime_us(12'd14, cfBSCRATE, cfPreamble) + 16'(SIFS_US);
    dur = (Duration > sub) ? Duration - sub : 16'd0;
    case (ptr)
      4'd0: CTSDATA = FC_CTS;
      4'd1: CTSDATA = 8'h00;
      4'd2: CTSDATA = dur[7:0];
      4'd3: CTSDATA = dur[15:8];
      default: CTSDATA = RXADDR[8*(ptr-4'd4) +: 8];
    endcase
  end

  always_ff @(posedge MacClk) begin
    if (Reset)     ptr <= '0;
    else if (TPDP) ptr <= CTSEF ? 4'd0 : ptr + 4'd1;
  end
  assign CTSLEN = 4'd9;
  assign CTSSF  = (ptr == 4'd0);
  assign CTSEF  = (ptr == CTSLEN);
endmodule
