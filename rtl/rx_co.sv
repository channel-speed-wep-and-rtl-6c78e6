// rx_co: receive coordinator, the responder side of the DCF handshakes.
// IDLE: when a frame ends (PktEnd) that needs an ACK (NeedAck) or is an RTS to this
// station (RTSPkt, answered only while the NAV is clear), go to WAIT_SIFS and remember
// which. WAIT_SIFS holds RX_PE low and counts SIFS_US microseconds; a new frame start
// (PktStart) returns to IDLE. TX_ACK_REQ or TX_CTS_REQ is raised already in WAIT_SIFS,
// so that the transmit side can program the baseband during the SIFS; when the SIFS is
// done, TX_ACK or TX_CTS raises RespGo, the signal to start transmitting, and holds the
// request until the transmit side reports TxDone, then IDLE.
// RX_PE, the BBP receive enable, is high in IDLE while receiving is enabled and the
// station is not transmitting. RxDuration is the Duration of the frame being answered,
// captured at PktEnd, for the CTS/ACK Duration field.
// The four states, their transitions and outputs are those of the document's state
// diagram; the NavBusy qualification of the CTS reply is this design's own reading of
// the 802.11 rule.
module rx_co #(
  parameter int unsigned SIFS_US = 10
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        Clk1UsStb,
  input  logic        cfRCVEN,
  input  logic        TX_PE,
  input  logic        NavBusy,
  input  logic        NeedAck,
  input  logic        RTSPkt,
  input  logic        TxDone,
  input  logic        PktStart,
  input  logic        PktEnd,
  input  logic [15:0] Duration,
  output logic [15:0] RxDuration,
  output logic        TX_ACK_REQ,
  output logic        TX_CTS_REQ,
  output logic        RespGo,
  output logic        RX_PE
);
  typedef enum logic [1:0] {IDLE, WAIT_SIFS, TX_ACK, TX_CTS} rxco_e;
  rxco_e      st;
  logic       ack_flag, rts_flag;
  logic [7:0] sifs_cnt;
  wire        sifs_done = (sifs_cnt == 8'(SIFS_US)) ;

  always_ff @(posedge MacClk) begin
    if (Reset) begin
      st <= IDLE; ack_flag <= 1'b0; rts_flag <= 1'b0; sifs_cnt <= '0; RxDuration <= '0;
    end else begin
      unique case (st)
        IDLE: if (PktEnd && (NeedAck || (RTSPkt && !NavBusy))) begin
          st <= WAIT_SIFS; ack_flag <= NeedAck; rts_flag <= RTSPkt && !NeedAck;
          sifs_cnt <= '0; RxDuration <= Duration;
        end
        WAIT_SIFS: begin
          if (PktStart) st <= IDLE;
          else if (sifs_done && ack_flag) st <= TX_ACK;
          else if (sifs_done && rts_flag) st <= TX_CTS;
          else if (Clk1UsStb && !sifs_done) sifs_cnt <= sifs_cnt + 8'd1;
        end
        TX_ACK: if (TxDone) st <= IDLE;
        TX_CTS: if (TxDone) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  assign TX_ACK_REQ = (st == TX_ACK) || (st == WAIT_SIFS && ack_flag);
  assign TX_CTS_REQ = (st == TX_CTS) || (st == WAIT_SIFS && rts_flag);
  assign RespGo     = (st == TX_ACK) || (st == TX_CTS);
  assign RX_PE      = (st == IDLE) && cfRCVEN && !TX_PE;
endmodule
