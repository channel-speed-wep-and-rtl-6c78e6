// wep: channel-speed WEP encryption/decryption around one rc4 engine.
// The RC4 key schedule costs 1536 cycles (34.9 us at 44 MHz) per frame. It is hidden:
//  - on transmit, behind the PLCP preamble and header the BBP sends first (96 us
//    short, 192 us long): KSA starts when the frame's TX_PE rises (TxGo);
//  - on receive, behind a 256-octet FIFO that holds received octets while KSA runs.
// Frame layout assumed: a 24-octet header, then the 4-octet IV/KeyID field, both sent
// in clear (WEP_HDR = 28 octets), then the encrypted payload and encrypted 4-octet ICV
// (CRC-32 of the plaintext payload), then the FCS in clear.
// Transmit (TxWep set for the frame): header octets pass from the buffer manager (TPD)
// to tx_pump unchanged. Payload octets leave XORed with the key stream (ENCRYPPhase
// high); when the buffer manager flags its last octet (TPEF) four ICV octets follow.
// TxRdy tells tx_pump whether the current octet is available (key stream byte ready);
// TxTPDP, tx_pump's pop, is passed to the buffer manager as bmTPDP for header/payload
// octets only. TxIV must hold the frame's IV (first octet in bits 7:0) at TxGo.
// Receive: every octet from rx1 enters the FIFO. The IV is captured from octets 24-26,
// and if the frame-control WEP bit is set KSA starts when octet 27 arrives. Octets leave
// the FIFO on RxOut/RxOutStb: header octets at once; payload octets once the key stream
// is ready and more than four octets are queued (the last four are the FCS, sent on
// in clear after RxEnd). A frame without the WEP bit passes unchanged. After the FIFO
// drains, RxDone pulses and IcvOk tells whether the decrypted ICV matched.
// The key stream is fetched ahead into a 4-octet buffer, the engine streaming at its
// 4-cycle PRGA rate, so payload octets can be decrypted faster than any PHY rate delivers
// them (54 Mbit/s is one octet per 6.5 cycles at 44 MHz).
// The FIFO depth, the two KSA-hiding methods and ENCRYPPhase are the
// document's; the 28-octet header rule, ready flags and ICV check by CRC residue are
// this design's own.
module wep #(
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned WEP_HDR    = 28
) (
  input  logic         MacClk,
  input  logic         Reset,
  input  logic [103:0] MasterKey,
  input  logic         cfKey128,
  // transmit
  input  logic         TxGo,
  input  logic         TxWep,
  input  logic [23:0]  TxIV,
  input  logic [7:0]   TPD,
  input  logic         TPEF,
  output logic         bmTPDP,
  output logic [7:0]   TxOut,
  output logic         TxRdy,
  input  logic         TxTPDP,
  output logic         ENCRYPPhase,
  // receive
  input  logic         RxStart,
  input  logic         RxByteStb,
  input  logic [7:0]   RxByte,
  input  logic         RxEnd,
  output logic [7:0]   RxOut,
  output logic         RxOutStb,
  output logic         RxDone,
  output logic         IcvOk,
  output logic         RxWep,
  output logic [8:0]   FifoMax
);
  import wmac_pkg::CRC_RESIDUE;

  // ---------------- RC4 engine and S-box ----------------
  logic [7:0]  sb_addr, sb_wdata, sb_rdata, rc4_out;
  logic        sb_wrn, rc4_stb, rc4_prga, rc4_rdy, rc4_start, rc4_req;
  logic [23:0] rx_iv;
  logic        mode_rx;
  logic [7:0]  k;
  logic        kv, kreq;

  sbox_ram u_sbox (.Clk(MacClk), .Addr(sb_addr), .DataIn(sb_wdata), .WrN(sb_wrn), .DataOut(sb_rdata));
  rc4 u_rc4 (.SysClk(MacClk), .ResetN(!Reset), .MasterKey, .KeyIV(mode_rx ? rx_iv : TxIV),
             .cfKey128, .PktStart(rc4_start), .PktEnd(RxStart), .DataStb(rc4_req), .DataIn(8'h00),
             .SboxDataIn(sb_rdata), .WepSboxAddr(sb_addr), .WepSboxData(sb_wdata),
             .WepSboxWrN(sb_wrn), .rc4DataOut(rc4_out), .rc4ByteStb(rc4_stb),
             .rc4PRGAPhase(rc4_prga), .rc4Ready(rc4_rdy));

  // ---------------- transmit side ----------------
  typedef enum logic [1:0] {T_OFF, T_HDR, T_PAY, T_ICV} tx_e;
  tx_e         tst;
  logic [11:0] txi;
  logic [1:0]  icvi;
  logic [31:0] tcrc, tfcs;
  logic        tcrc_ok, tx_pay_pop;

  assign tx_pay_pop = (tst == T_PAY) && TxTPDP;
  crc32_8 u_icv_tx (.Clk(MacClk), .Reset(Reset), .Init(TxGo), .En(tx_pay_pop), .Data(TPD),
                    .Crc(tcrc), .Fcs(tfcs), .FcsOk(tcrc_ok));

  always_comb begin
    unique case (tst)
      T_PAY:   begin TxOut = TPD ^ k;              TxRdy = kv;  end
      T_ICV:   begin TxOut = tfcs[8*icvi +: 8] ^ k; TxRdy = kv;  end
      default: begin TxOut = TPD;                  TxRdy = 1'b1; end
    endcase
  end
  assign bmTPDP      = TxTPDP && (tst != T_ICV);
  assign ENCRYPPhase = (tst == T_PAY) || (tst == T_ICV);

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      tst <= T_OFF; txi <= '0; icvi <= '0;
    end else if (TxGo) begin
      tst <= TxWep ? T_HDR : T_OFF; txi <= '0; icvi <= '0;
    end else if (TxTPDP) begin
      unique case (tst)
        T_HDR: begin txi <= txi + 12'd1; if (txi == 12'(WEP_HDR - 1)) tst <= T_PAY; end
        T_PAY: if (TPEF) tst <= T_ICV;
        T_ICV: begin icvi <= icvi + 2'd1; if (icvi == 2'd3) tst <= T_OFF; end
        default: ;
      endcase
    end
  end

  // ---------------- receive side ----------------
  logic [7:0]  f_data;
  logic        f_full, f_empty, f_rd, ended, rx_pay;
  logic [8:0]  f_cnt;
  logic [11:0] rxin, rxo;
  logic [31:0] rcrc, rfcs;
  logic        rcrc_ok;

  wep_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (.Clk(MacClk), .Reset(Reset), .Clear(RxStart),
    .WrEn(RxByteStb), .WrData(RxByte), .RdEn(f_rd), .RdData(f_data), .Full(f_full),
    .Empty(f_empty), .Count(f_cnt));

  // octet at the FIFO head is payload (to decrypt) or passes unchanged
  assign rx_pay = RxWep && (rxo >= 12'(WEP_HDR)) && !(ended && f_cnt <= 9'd4);
  always_comb begin
    f_rd = 1'b0;
    if (!f_empty) begin
      if (!rx_pay) f_rd = (rxo < 12'(WEP_HDR)) || !RxWep || ended;
      else         f_rd = kv && mode_rx && (f_cnt > 9'd4);
    end
  end

  crc32_8 u_icv_rx (.Clk(MacClk), .Reset(Reset), .Init(RxStart), .En(f_rd && rx_pay),
                    .Data(f_data ^ k), .Crc(rcrc), .Fcs(rfcs), .FcsOk(rcrc_ok));

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      rxin <= '0; rxo <= '0; RxWep <= 1'b0; rx_iv <= '0; ended <= 1'b0; RxOut <= '0;
      RxOutStb <= 1'b0; RxDone <= 1'b0; IcvOk <= 1'b0; FifoMax <= '0;
    end else begin
      RxOutStb <= 1'b0; RxDone <= 1'b0;
      if (RxStart) begin
        rxin <= '0; rxo <= '0; RxWep <= 1'b0; ended <= 1'b0; IcvOk <= 1'b0;
      end else begin
        if (RxByteStb) begin
          rxin <= rxin + 12'd1;
          if (rxin == 12'd1) RxWep <= RxByte[6];
          if (rxin >= 12'd24 && rxin <= 12'd26) rx_iv[8*(rxin-12'd24) +: 8] <= RxByte;
        end
        if (RxEnd) ended <= 1'b1;
        if (f_rd) begin
          RxOut <= rx_pay ? (f_data ^ k) : f_data; RxOutStb <= 1'b1; rxo <= rxo + 12'd1;
        end
        if (ended && f_empty && !RxDone && rxin != 12'd0 && rxo == rxin) begin
          RxDone <= 1'b1; IcvOk <= RxWep && rcrc_ok; rxin <= '0;
        end
      end
      if (f_cnt > FifoMax) FifoMax <= f_cnt;
    end
  end

  // ---------------- key stream prefetch ----------------
  // A 4-entry buffer is kept filled so that the engine can run back to back (one octet
  // per 4 cycles) and a consumer takes an octet per cycle when it needs to.
  logic [7:0] kbuf [4];
  logic [1:0] krd, kwr;
  logic [2:0] kcnt, kpend;
  assign rc4_start = TxGo && TxWep ||
                     RxByteStb && rxin == 12'd27 && RxWep;
  assign kreq      = (tx_pay_pop || (tst == T_ICV && TxTPDP)) || (f_rd && rx_pay);
  assign rc4_req   = rc4_rdy && !rc4_start && (kcnt + kpend < 3'd4);
  assign kv        = (kcnt != 3'd0);
  assign k         = kbuf[krd];
  always_ff @(posedge MacClk) begin
    if (Reset) begin
      krd <= '0; kwr <= '0; kcnt <= '0; kpend <= '0; mode_rx <= 1'b0;
    end else if (rc4_start) begin
      krd <= '0; kwr <= '0; kcnt <= '0; kpend <= '0; mode_rx <= !(TxGo && TxWep);
    end else begin
      if (rc4_stb) begin kbuf[kwr] <= rc4_out; kwr <= kwr + 2'd1; end
      if (kreq && kv) krd <= krd + 2'd1;
      kcnt  <= kcnt + 3'(rc4_stb) - 3'(kreq && kv);
      kpend <= kpend + 3'(rc4_req) - 3'(rc4_stb);
    end
  end

  wire unused_ok = ^{tcrc, tcrc_ok, rfcs, f_full, rc4_prga, rcrc};
endmodule
