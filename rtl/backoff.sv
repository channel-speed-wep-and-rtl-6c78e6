// backoff: DCF random back-off counter.
// When BackOffReq is raised and no residual count remains, a random slot count
// INT(CW x Random()) is drawn as (LFSR value AND cw), cw being 2^n - 1 (7, 15, ... 1023).
// The count decreases by one on every SlotTime pulse (one per idle slot, from chstate)
// while the channel is not BUSY, and is frozen, not redrawn, while BUSY. BkDone is high
// while BackOffReq is held, the count is zero and the channel is idle. Dropping
// BackOffReq (the frame was sent) re-arms the draw; Cancel clears the count at once.
// SlotCnt shows the remaining slots. The random source is a free-running 16-bit
// maximal-length LFSR (x^16 + x^14 + x^13 + x^11 + 1), seeded by the LFSR_SEED parameter.
// The algorithm and contention-window range are the document's; the random-number
// generator is this design's own.
module backoff #(
  parameter logic [15:0] LFSR_SEED = 16'hACE1
) (
  input  logic       MacClk,
  input  logic       Reset,
  input  logic [9:0] cw,
  input  logic       SlotTime,
  input  logic       BUSY,
  input  logic       Cancel,
  input  logic       BackOffReq,
  output logic       BkDone,
  output logic [9:0] SlotCnt
);
  logic [15:0] lfsr;
  logic        armed;

  always_ff @(posedge MacClk) begin
    if (Reset) lfsr <= LFSR_SEED;
    else       lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_ff @(posedge MacClk) begin
    if (Reset || Cancel) begin
      SlotCnt <= '0; armed <= 1'b0;
    end else if (!BackOffReq) begin
      armed <= 1'b0;
    end else if (!armed) begin
      armed <= 1'b1;
      if (SlotCnt == 10'd0) SlotCnt <= lfsr[9:0] & cw;
    end else if (SlotTime && !BUSY && SlotCnt != 10'd0) begin
      SlotCnt <= SlotCnt - 10'd1;
    end
  end

  assign BkDone = BackOffReq && armed && (SlotCnt == 10'd0) && !BUSY;
endmodule
