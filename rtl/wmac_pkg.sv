// wmac_pkg: types and constants shared by the 802.11 DCF MAC and its WEP engine.
// Frame-control first-byte codes follow the 802.11 frame formats (frame control,
// duration, addresses, FCS); the byte layout is {subtype, type, version}.
// Timing constants are in microseconds, the MAC's 1 MHz time base: SIFS 10 us and a
// 20 us slot are the document's numbers, the control-frame airtime helper is this
// design's own (PLCP preamble+header plus the PSDU bit time at the basic rate).
package wmac_pkg;

  // First frame-control octet of the frames the MAC recognises or builds
  localparam logic [7:0] FC_DATA   = 8'h08;
  localparam logic [7:0] FC_BEACON = 8'h80;
  localparam logic [7:0] FC_PSPOLL = 8'hA4;
  localparam logic [7:0] FC_RTS    = 8'hB4;
  localparam logic [7:0] FC_CTS    = 8'hC4;
  localparam logic [7:0] FC_ACK    = 8'hD4;
  localparam logic [7:0] FC_CFEND  = 8'hE4;
  localparam logic [7:0] FC_CFENDA = 8'hF4;

  localparam int unsigned SIFS_US = 10;
  localparam int unsigned SLOT_US = 20;

  // CRC-32 residue left in the (non-inverted) register after a frame and its FCS
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB20E3;

  // Basic rate code: 0 = 1, 1 = 2, 2 = 5.5, 3 = 11 Mbit/s
  typedef enum logic [1:0] {RATE_1M = 2'd0, RATE_2M = 2'd1, RATE_5M5 = 2'd2, RATE_11M = 2'd3} rate_e;

  // Operating mode of the station
  typedef enum logic [1:0] {MODE_STA = 2'd0, MODE_AP = 2'd1, MODE_IBSS = 2'd2} opmode_e;

  // Air time in microseconds of a frame of nbytes octets (FCS included) sent at rate,
  // with a long (192 us) or short (96 us) PLCP preamble and header.
  function automatic logic [15:0] airtime_us(input logic [11:0] nbytes, input logic [1:0] rate,
                                            input logic short_pre);
    logic [15:0] bits, t;
    bits = {1'b0, nbytes, 3'b000};
    case (rate)
      2'd0:    t = bits;
      2'd1:    t = (bits + 16'd1) >> 1;
      2'd2:    t = 16'((32'(bits) * 2 + 10) / 11);
      default: t = 16'((32'(bits) + 10) / 11);
    endcase
    return t + (short_pre ? 16'd96 : 16'd192);
  endfunction

endpackage
