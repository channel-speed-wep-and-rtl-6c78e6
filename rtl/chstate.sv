// chstate: channel state and virtual carrier sense (NAV).
// The medium is taken as busy while the PHY reports CCA, while the NAV runs, and until
// a DIFS (after a good frame) or an EIFS (after a bad one) of idle medium has passed;
// BUSY is high for all of these. Once the deferral ends the channel is IDLE and SLOT
// pulses for one cycle at the end of every SLOT_US microseconds of idle medium, the
// time base the back-off counter counts.
// The NAV is a microsecond down-counter. At the end of a good frame not addressed to
// this station (PktEnd with ChangeNav) it loads Duration if that is larger than what
// remains. It is cleared by a CF-End frame, or by RtsTimeOut when it was set by an RTS.
// Clk1Us is a free-running 1 MHz clock; Clk1UsStb is its rising edge as a one-cycle
// strobe in the MacClk domain, passed on to the other timers. cfDIFS/cfEIFS are in us.
// What BUSY and SLOT mean, the NAV and the DIFS/EIFS choice follow the document. The
// document gives the slot as 10 us here and 20 us for the back-off; the 20 us 802.11b
// slot is used. The three-state deferral machine is this design's own.
module chstate #(
  parameter int unsigned SLOT_US = 20
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        Clk1Us,
  input  logic        PhyCca,
  input  logic        PktEnd,
  input  logic        ChangeNav,
  input  logic        RTSPkt,
  input  logic [15:0] Duration,
  input  logic        RtsTimeOut,
  input  logic        CFEndPkt,
  input  logic        UseDifs,
  input  logic        UseEifs,
  input  logic [15:0] cfDIFS,
  input  logic [15:0] cfEIFS,
  output logic        BUSY,
  output logic        SLOT,
  output logic        Clk1UsStb,
  output logic [15:0] Nav
);
  typedef enum logic [1:0] {CH_BUSY, CH_IFS, CH_IDLE} ch_e;
  ch_e         st;
  logic [1:0]  us_s;
  logic        eifs, nav_rts;
  logic [15:0] ifs_cnt;
  logic [7:0]  slot_cnt;
  wire         med_busy = PhyCca || (Nav != 16'd0);

  always_ff @(posedge MacClk) begin
    if (Reset) us_s <= '0;
    else       us_s <= {us_s[0], Clk1Us};
  end
  assign Clk1UsStb = us_s[0] & ~us_s[1];

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      Nav <= '0; nav_rts <= 1'b0;
    end else if (CFEndPkt && PktEnd) begin
      Nav <= '0; nav_rts <= 1'b0;
    end else if (RtsTimeOut && nav_rts) begin
      Nav <= '0; nav_rts <= 1'b0;
    end else if (PktEnd && ChangeNav && Duration > Nav) begin
      Nav <= Duration; nav_rts <= RTSPkt;
    end else if (Clk1UsStb && Nav != 16'd0) begin
      Nav <= Nav - 16'd1;
    end
  end

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      st <= CH_IFS; eifs <= 1'b0; ifs_cnt <= '0; slot_cnt <= '0; SLOT <= 1'b0;
    end else begin
      SLOT <= 1'b0;
      if (UseEifs) eifs <= 1'b1;
      else if (UseDifs) eifs <= 1'b0;
      unique case (st)
        CH_BUSY: if (!med_busy) begin
          st <= CH_IFS; ifs_cnt <= eifs ? cfEIFS : cfDIFS;
        end
        CH_IFS: if (med_busy) st <= CH_BUSY;
          else if (ifs_cnt == 16'd0) begin st <= CH_IDLE; slot_cnt <= '0; end
          else if (Clk1UsStb) ifs_cnt <= ifs_cnt - 16'd1;
        CH_IDLE: if (med_busy) st <= CH_BUSY;
          else if (Clk1UsStb) begin
            if (slot_cnt == 8'(SLOT_US - 1)) begin slot_cnt <= '0; SLOT <= 1'b1; end
            else slot_cnt <= slot_cnt + 8'd1;
          end
        default: st <= CH_BUSY;
      endcase
    end
  end
  assign BUSY = (st != CH_IDLE) || med_busy;
endmodule
