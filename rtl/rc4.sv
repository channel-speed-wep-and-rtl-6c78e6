// rc4: RC4 key-stream engine of the WEP unit, working on an external 256 x 8 S-box RAM.
// PktStart (one cycle) starts the key-scheduling algorithm with the per-packet key
// K = KeyIV (three octets, bits 7:0 first) followed by MasterKey (5 octets, or 13 when
// cfKey128 is set; octet 0 in bits 7:0), so the key length is 8 or 16 octets.
//  KSA_INIT    256 cycles write S[i] = i.
//  KSA_SCRAMB, KSA_SCRAMB1, KSA_SWAP, KSA_SWAP0, KSA_SWAP1: five cycles per i read S[i],
//              form j = j + S[i] + K[i mod L], read S[j], write S[j] = S[i], write
//              S[i] = S[j]; 256 x 5 cycles. KSA takes 256 + 1280 = 1536 cycles in all.
// Then rc4PRGAPhase is high and the engine waits in PRGA_WAIT. Each DataStb (accepted while
// rc4Ready, i.e. in PRGA_WAIT or in OUTBYTESTB so that bytes can follow back to back)
// runs the four PRGA cycles PRGA, PRGA_SWAP, PRGA_SWAP1, OUTBYTESTB:
// i = i + 1, j = j + S[i], swap, and k = S[S[i] + S[j]]; in the last one rc4DataOut =
// DataIn XOR k and rc4ByteStb pulses. So a byte costs 4 cycles, 90.8 ns at 44 MHz.
// PktEnd returns the engine to IDLE.
// The KSA/PRGA split, the 1536-cycle KSA, the 4-cycle PRGA and the state names are the
// document's; the cycle-by-cycle use of the single-port RAM is this design's own.
module rc4 (
  input  logic         SysClk,
  input  logic         ResetN,
  input  logic [103:0] MasterKey,
  input  logic [23:0]  KeyIV,
  input  logic         cfKey128,
  input  logic         PktStart,
  input  logic         PktEnd,
  input  logic         DataStb,
  input  logic [7:0]   DataIn,
  input  logic [7:0]   SboxDataIn,
  output logic [7:0]   WepSboxAddr,
  output logic [7:0]   WepSboxData,
  output logic         WepSboxWrN,
  output logic [7:0]   rc4DataOut,
  output logic         rc4ByteStb,
  output logic         rc4PRGAPhase,
  output logic         rc4Ready
);
  typedef enum logic [3:0] {
    IDLE, KSA_INIT, KSA_SCRAMB, KSA_SCRAMB1, KSA_SWAP, KSA_SWAP0, KSA_SWAP1,
    PRGA_WAIT, PRGA, PRGA_SWAP, PRGA_SWAP1, OUTBYTESTB
  } rc4_e;
  rc4_e       st;
  logic [7:0] i, j, si, sj, din;
  logic [7:0] kbyte;
  logic [3:0] kidx;
  logic [127:0] key;

  assign key = {MasterKey, KeyIV};
  always_comb begin
    kidx  = cfKey128 ? i[3:0] : {1'b0, i[2:0]};
    kbyte = key[8*kidx +: 8];
  end

  // RAM address/data/write for the current state
  always_comb begin
    WepSboxAddr = i; WepSboxData = '0; WepSboxWrN = 1'b1;
    unique case (st)
      KSA_INIT:    begin WepSboxAddr = i; WepSboxData = i; WepSboxWrN = 1'b0; end
      KSA_SCRAMB:  WepSboxAddr = i;
      KSA_SWAP:    WepSboxAddr = j;
      KSA_SWAP0:   begin WepSboxAddr = j; WepSboxData = si; WepSboxWrN = 1'b0; end
      KSA_SWAP1:   begin WepSboxAddr = i; WepSboxData = sj; WepSboxWrN = 1'b0; end
      PRGA:        WepSboxAddr = i + 8'd1;
      PRGA_SWAP:   begin WepSboxAddr = j; WepSboxData = si; WepSboxWrN = 1'b0; end
      PRGA_SWAP1:  begin WepSboxAddr = i; WepSboxData = sj; WepSboxWrN = 1'b0; end
      OUTBYTESTB:  WepSboxAddr = si + sj;
      default: ;
    endcase
  end

  always_ff @(posedge SysClk or negedge ResetN) begin
    if (!ResetN) begin
      st <= IDLE; i <= '0; j <= '0; si <= '0; sj <= '0; din <= '0;
      rc4DataOut <= '0; rc4ByteStb <= 1'b0;
    end else begin
      rc4ByteStb <= 1'b0;
      if (PktStart) begin
        st <= KSA_INIT; i <= '0; j <= '0;
      end else if (PktEnd) begin
        st <= IDLE;
      end else begin
        unique case (st)
          IDLE: ;
          KSA_INIT: begin i <= i + 8'd1; if (i == 8'd255) st <= KSA_SCRAMB; end
          KSA_SCRAMB:  begin si <= SboxDataIn; st <= KSA_SCRAMB1; end
          KSA_SCRAMB1: begin j <= j + si + kbyte; st <= KSA_SWAP; end
          KSA_SWAP:    begin sj <= SboxDataIn; st <= KSA_SWAP0; end
          KSA_SWAP0:   st <= KSA_SWAP1;
          KSA_SWAP1: begin
            i <= i + 8'd1;
            if (i == 8'd255) begin st <= PRGA_WAIT; j <= '0; end
            else st <= KSA_SCRAMB;
          end
          PRGA_WAIT: if (DataStb) begin st <= PRGA; din <= DataIn; end
          PRGA: begin
            i <= i + 8'd1; si <= SboxDataIn; j <= j + SboxDataIn; st <= PRGA_SWAP;
          end
          PRGA_SWAP:  begin sj <= SboxDataIn; st <= PRGA_SWAP1; end
          PRGA_SWAP1: st <= OUTBYTESTB;
          OUTBYTESTB: begin
            rc4DataOut <= din ^ SboxDataIn; rc4ByteStb <= 1'b1;
            if (DataStb) begin st <= PRGA; din <= DataIn; end
            else st <= PRGA_WAIT;
          end
          default: st <= IDLE;
        endcase
      end
    end
  end

  assign rc4PRGAPhase = (st == PRGA_WAIT) || (st == PRGA) || (st == PRGA_SWAP) ||
                        (st == PRGA_SWAP1) || (st == OUTBYTESTB);
  assign rc4Ready     = (st == PRGA_WAIT) || (st == OUTBYTESTB);
endmodule
