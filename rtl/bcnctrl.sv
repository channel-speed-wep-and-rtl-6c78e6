// bcnctrl: embedded beacon RAM (DEPTH x 16 bits, 64 x 16 by default) and its control.
// Host side, strobes active low and synchronous to MacClk, acting on their falling edge:
//  cfTabAddrWrN loads the word pointer from cfTableAddr; cfTabDataWrN writes cfBcnData
//  at the pointer and advances it; cfTabDataRdN advances it after a read, the word at
//  the pointer being on bcRamData. A one-cycle cfbecOwn pulse hands the RAM to the MAC,
//  cfbecCnt giving the beacon length in octets (frame without FCS).
// MAC side: while the MAC owns the RAM, BcnOwn is high and BCNDATA presents the octet at
// the MAC's byte pointer (low octet of a word first); each BCNTPDP pulse from tx_pump
// advances it. After the last octet the pointer rewinds, ownership returns to the host
// and bcnClrOwn pulses. Host writes are ignored while the MAC owns the RAM.
// The RAM size and the five-step host/MAC ownership protocol are the document's; the
// strobe polarity/edge use and the byte order are this design's own.
module bcnctrl #(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     MacClk,
  input  logic                     Reset,
  input  logic [$clog2(DEPTH)-1:0] cfTableAddr,
  input  logic                     cfTabAddrWrN,
  input  logic                     cfTabDataWrN,
  input  logic                     cfTabDataRdN,
  input  logic [15:0]              cfBcnData,
  input  logic                     cfbecOwn,
  input  logic [11:0]              cfbecCnt,
  output logic [15:0]              bcRamData,
  output logic                     BcnOwn,
  output logic                     bcnClrOwn,
  output logic [11:0]              BcnLen,
  input  logic                     BCNTPDP,
  output logic [7:0]               BCNDATA
);
  localparam int AW = $clog2(DEPTH);
  logic [15:0]   ram [DEPTH];
  logic [AW-1:0] hptr;
  logic [AW:0]   mptr;
  logic [2:0]    nq;   // previous levels of the three strobes

  wire aw_fall = nq[0] && !cfTabAddrWrN;
  wire dw_fall = nq[1] && !cfTabDataWrN;
  wire dr_fall = nq[2] && !cfTabDataRdN;

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      nq <= 3'b111; hptr <= '0; mptr <= '0; BcnOwn <= 1'b0; bcnClrOwn <= 1'b0; BcnLen <= '0;
    end else begin
      nq <= {cfTabDataRdN, cfTabDataWrN, cfTabAddrWrN};
      bcnClrOwn <= 1'b0;
      if (!BcnOwn) begin
        if (aw_fall) hptr <= cfTableAddr;
        else if (dw_fall || dr_fall) hptr <= hptr + 1'b1;
        if (cfbecOwn) begin BcnOwn <= 1'b1; mptr <= '0; BcnLen <= cfbecCnt; end
      end else if (BCNTPDP) begin
        if (12'(mptr) + 12'd1 >= BcnLen) begin
          mptr <= '0; BcnOwn <= 1'b0; bcnClrOwn <= 1'b1;
        end else mptr <= mptr + 1'b1;
      end
    end
  end

  always_ff @(posedge MacClk) begin
    if (!BcnOwn && dw_fall) ram[hptr] <= cfBcnData;
  end

  assign bcRamData = ram[hptr];
  wire [15:0] w = ram[mptr[AW:1]];
  assign BCNDATA = mptr[0] ? w[15:8] : w[7:0];
endmodule
