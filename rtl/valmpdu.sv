// valmpdu: validates a received MPDU and chooses the inter-frame space that follows it.
// At the end of each received frame (PktEnd, one cycle) it pulses UseDifs for a good
// frame or UseEifs for a bad one: an FCS error, or a frame longer than cfMaxPktLen
// octets unless cfPassBad lets over-long frames through. After a good RTS that set the
// NAV (RTSPkt at PktEnd) it starts a microsecond timer; if no new frame starts
// (macFrameStr) within RTS_TIMEOUT_US it pulses RtsTimeOut so the NAV can be released.
// Clk1UsStb is a one-cycle 1 MHz strobe. The DIFS/EIFS choice and the ports are the
// document's; the length rule, the role of cfPassBad and the timeout value, built from
// the 802.11 rule 2*SIFS + CTS time + PHY RX start delay + 2*slot at 1 Mbit/s with a
// long preamble (20 + 304 + 192 + 40), are this design's own.
module valmpdu #(
  parameter int unsigned RTS_TIMEOUT_US = 556
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        Clk1UsStb,
  input  logic [11:0] ByteCnt,
  input  logic [11:0] cfMaxPktLen,
  input  logic        RTSPkt,
  input  logic        BadPkt,
  input  logic        macFrameStr,
  input  logic        PktEnd,
  input  logic        cfPassBad,
  output logic        RtsTimeOut,
  output logic        UseEifs,
  output logic        UseDifs
);
  logic        rts_wait;
  logic [15:0] rts_cnt;
  wire         too_long = (ByteCnt > cfMaxPktLen) && !cfPassBad;

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      UseEifs <= 1'b0; UseDifs <= 1'b0; RtsTimeOut <= 1'b0; rts_wait <= 1'b0; rts_cnt <= '0;
    end else begin
      UseEifs    <= PktEnd && (BadPkt || too_long);
      UseDifs    <= PktEnd && !(BadPkt || too_long);
      RtsTimeOut <= 1'b0;
      if (PktEnd && RTSPkt && !BadPkt) begin
        rts_wait <= 1'b1;
        rts_cnt  <= 16'(RTS_TIMEOUT_US);
      end else if (macFrameStr) begin
        rts_wait <= 1'b0;
      end else if (rts_wait && Clk1UsStb) begin
        if (rts_cnt <= 16'd1) begin
          rts_wait   <= 1'b0;
          RtsTimeOut <= 1'b1;
        end
        rts_cnt <= rts_cnt - 16'd1;
      end
    end
  end
endmodule
