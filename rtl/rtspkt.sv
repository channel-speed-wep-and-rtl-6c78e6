// rtspkt: RTS frame builder for tx_pump.
// Presents the 16 octets of an RTS frame before its FCS: frame control B4 00, the
// Duration supplied by the host (RTSDuration: data, CTS and ACK time plus three SIFS),
// the receiver address DADDR and the transmitter address SADDR. RTSDATA is the octet at
// the read pointer, advanced by each TPDP pulse; RTSSF is high at the first octet and
// RTSEF at the last (RTSLEN = 15, the index of the last octet).
// Frame layout and ports are the document's; the LEN encoding is this design's own.
module rtspkt (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic [47:0] DADDR,
  input  logic [47:0] SADDR,
  input  logic [15:0] Duration,
  input  logic        TPDP,
  output logic [7:0]  RTSDATA,
  output logic [3:0]  RTSLEN,
  output logic        RTSSF,
  output logic        RTSEF
);
  import wmac_pkg::FC_RTS;
  logic [3:0] ptr;

  always_comb begin
    case (ptr)
      4'd0: RTSDATA = FC_RTS;
      4'd1: RTSDATA = 8'h00;
      4'd2: RTSDATA = Duration[7:0];
      4'd3: RTSDATA = Duration[15:8];
      4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9: RTSDATA = DADDR[8*(ptr-4'd4) +: 8];
      default: RTSDATA = SADDR[8*(ptr-4'd10) +: 8];
    endcase
  end

  always_ff @(posedge MacClk) begin
    if (Reset)     ptr <= '0;
    else if (TPDP) ptr <= RTSEF ? 4'd0 : ptr + 4'd1;
  end
  assign RTSLEN = 4'd15;
  assign RTSSF  = (ptr == 4'd0);
  assign RTSEF  = (ptr == RTSLEN);
endmodule
