// tsf: timing synchronization function timer.
// macTSFT is a 64-bit microsecond counter advanced by Clk1UsStb (1 MHz). In station
// (BSS) and IBSS modes a received beacon of the own BSS (BeaconRx, one cycle, with its
// RxTimestamp) replaces the local value when the timestamp plus the receive
// compensation cfTOFSR is later than the local timer; an access point keeps its own.
// TBTTDone pulses at each target beacon transmission time: every BeaconInt time units
// in station mode (the interval learnt from the received beacon) or every cfBP time
// units as AP or IBSS, a time unit being TU_US microseconds (1024 in 802.11).
// The 64-bit 1 MHz timer, the later-than rule and BeaconInt/cfBP are the document's; the
// time-unit counter and receive compensation input width are this design's own. Inserting
// the timestamp into a transmitted beacon is left to the host (beacon RAM content).
module tsf #(
  parameter int unsigned TU_US = 1024
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        Clk1UsStb,
  input  logic [1:0]  cfOPMODE,
  input  logic        BeaconRx,
  input  logic [63:0] RxTimestamp,
  input  logic [15:0] BeaconInt,
  input  logic [15:0] cfBP,
  input  logic [7:0]  cfTOFSR,
  output logic [63:0] macTSFT,
  output logic        TBTTDone
);
  import wmac_pkg::MODE_AP;
  import wmac_pkg::MODE_STA;
  logic [10:0] us_cnt;
  logic [15:0] tu_cnt, bint;
  wire  [63:0] rx_ts = RxTimestamp + 64'(cfTOFSR);

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      macTSFT <= '0; us_cnt <= '0; tu_cnt <= '0; TBTTDone <= 1'b0; bint <= '0;
    end else begin
      TBTTDone <= 1'b0;
      if (BeaconRx && cfOPMODE != MODE_AP) begin
        bint <= BeaconInt;
        if (rx_ts > macTSFT) macTSFT <= rx_ts;
      end else if (Clk1UsStb) begin
        macTSFT <= macTSFT + 64'd1;
      end
      if (Clk1UsStb) begin
        if (us_cnt == 11'(TU_US - 1)) begin
          us_cnt <= '0;
          if (tu_cnt + 16'd1 >= ((cfOPMODE == MODE_STA) ? bint : cfBP) &&
              ((cfOPMODE == MODE_STA) ? bint : cfBP) != 16'd0) begin
            tu_cnt <= '0; TBTTDone <= 1'b1;
          end else tu_cnt <= tu_cnt + 16'd1;
        end else us_cnt <= us_cnt + 11'd1;
      end
    end
  end
endmodule
