// SpaceWire link controller (system clock domain).
//
// The centre of the codec: it runs the link initialisation state machine,
// keeps the flow-control credit in both directions, chooses which character
// the encoder sends next and moves N-chars between the decoder/encoder and
// the host FIFOs.
//
// States (ECSS-E-ST-50-12C): ErrorReset (receiver held in reset, nothing sent,
// 6.4 us) -> ErrorWait (receiver on, 12.8 us) -> Ready (waits for link_start,
// or autostart once a NULL has arrived, and no link_dis) -> Started (sends
// NULLs until a NULL is received, at most 12.8 us) -> Connecting (sends FCTs
// and NULLs until an FCT is received, at most 12.8 us) -> Run. A parity,
// escape or disconnect error, a character that is not allowed in the state
// (FCT before Connecting, N-char before Run), a credit error or link_dis in
// Run sends the link back to ErrorReset.
//
// Credit: each FCT received allows 8 more N-chars to be sent (at most 56; an
// FCT beyond that is a credit error). An FCT is sent whenever the host RX
// FIFO has room for everything already announced plus 8 more; an N-char
// arriving without announced room is a credit error.
//
// Transmit priority each clock the encoder is ready: FCT, then N-char (in Run
// with credit), then NULL; nothing in ErrorReset, ErrorWait and Ready.
// tx_fast selects the run-mode transmit rate, otherwise the 10 Mbit/s start
// rate is used.
//
// The placement of all link logic in the system clock domain and the split
// into decoder, controller and encoder follow the bridge's codec; the
// controller's insides are written from the SpaceWire standard, and the
// timer values assume a 40 MHz system clock (parameters).
module spw_ctrl
  import spw2spi_pkg::*;
#(
  parameter int unsigned T_6U4    = 256,   // 6.4 us in clocks
  parameter int unsigned T_12U8   = 512,   // 12.8 us in clocks
  parameter int unsigned RX_DEPTH = 64     // host RX FIFO depth
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_start,
  input  logic        link_dis,
  input  logic        autostart,
  output link_state_e state,
  output logic        tx_fast,
  // decoder
  input  rx_evt_t     evt,
  output logic        rx_reset,
  // host RX FIFO write side
  output logic        rxq_valid,
  output nchar_t      rxq_data,
  input  logic [$clog2(RX_DEPTH+1)-1:0] rxq_level,
  // host TX FIFO read side
  input  logic        txq_valid,
  output logic        txq_ready,
  input  nchar_t      txq_data,
  // encoder
  output txc_e        txc,
  output nchar_t      tx_nchar,
  input  logic        enc_rdy
);
  localparam int unsigned TW = $clog2(T_12U8 + 1);

  logic [TW-1:0] timer;
  logic          got_null;
  logic [5:0]    tx_credit;   // N-chars we may send
  logic [5:0]    rx_out;      // N-chars announced by our FCTs, not yet received
  logic          fct_ok, err, push;
  link_state_e   nxt;

  assign rx_reset = (state == LS_ERROR_RESET);
  assign tx_fast  = (state == LS_RUN);

  // Room for all announced N-chars plus 8 more.
  assign fct_ok = (rx_out <= 6'd48) &&
                  (32'(rx_out) + 32'd8 + 32'(rxq_level) <= 32'(RX_DEPTH));

  // Transmit choice.
  always_comb begin
    txc = TXC_NONE;
    unique case (state)
      LS_STARTED:    txc = TXC_NULL;
      LS_CONNECTING: txc = fct_ok ? TXC_FCT : TXC_NULL;
      LS_RUN:        txc = fct_ok ? TXC_FCT :
                           (txq_valid && tx_credit != '0) ? TXC_NCHAR : TXC_NULL;
      default:       txc = TXC_NONE;
    endcase
  end
  assign tx_nchar  = txq_data;
  assign push      = enc_rdy && (txc != TXC_NONE);
  assign txq_ready = push && (txc == TXC_NCHAR);

  assign rxq_valid = (state == LS_RUN) && evt.got_nchar && (rx_out != '0);
  assign rxq_data  = evt.nchar;

  // Errors and next state.
  always_comb begin
    err = evt.err_par || evt.err_esc || evt.err_disc;
    nxt = state;
    unique case (state)
      LS_ERROR_RESET: if (timer == TW'(T_6U4)) nxt = LS_ERROR_WAIT;
      LS_ERROR_WAIT: begin
        if (err || evt.got_fct || evt.got_nchar) nxt = LS_ERROR_RESET;
        else if (timer == TW'(T_12U8))           nxt = LS_READY;
      end
      LS_READY: begin
        if (err || evt.got_fct || evt.got_nchar) nxt = LS_ERROR_RESET;
        else if (!link_dis && (link_start || (autostart && got_null))) nxt = LS_STARTED;
      end
      LS_STARTED: begin
        if (err || evt.got_fct || evt.got_nchar || timer == TW'(T_12U8)) nxt = LS_ERROR_RESET;
        else if (got_null || evt.got_null)                               nxt = LS_CONNECTING;
      end
      LS_CONNECTING: begin
        if (err || evt.got_nchar || timer == TW'(T_12U8)) nxt = LS_ERROR_RESET;
        else if (evt.got_fct)                             nxt = LS_RUN;
      end
      LS_RUN: begin
        if (err || link_dis) nxt = LS_ERROR_RESET;
        if (evt.got_fct && tx_credit > 6'd48) nxt = LS_ERROR_RESET;   // credit error
        if (evt.got_nchar && rx_out == '0)    nxt = LS_ERROR_RESET;   // credit error
      end
      default: nxt = LS_ERROR_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= LS_ERROR_RESET;
      timer     <= '0;
      got_null  <= 1'b0;
      tx_credit <= '0;
      rx_out    <= '0;
    end else begin
      state <= nxt;
      timer <= (nxt != state) ? '0 : (timer == TW'(T_12U8) ? timer : timer + 1'b1);
      if (nxt == LS_ERROR_RESET) begin
        got_null  <= 1'b0;
        tx_credit <= '0;
        rx_out    <= '0;
      end else begin
        if (evt.got_null) got_null <= 1'b1;
        tx_credit <= tx_credit + ((evt.got_fct && (state == LS_CONNECTING || state == LS_RUN)) ? 6'd8 : 6'd0)
                               - ((push && txc == TXC_NCHAR) ? 6'd1 : 6'd0);
        rx_out    <= rx_out + ((push && txc == TXC_FCT) ? 6'd8 : 6'd0)
                            - (rxq_valid ? 6'd1 : 6'd0);
      end
    end
  end
endmodule
