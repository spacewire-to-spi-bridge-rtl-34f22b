// SpaceWire codec: link interface with host FIFOs, clock recovery and DDR I/O.
//
// Receive pipeline: Data/Strobe -> clock recovery and DDR input (spw_rx_ddr)
// -> deserializer into SMP-sample vectors (spw_rx_shift, receive clock) ->
// RX CDC FIFO -> decoder (spw_rx_decoder) -> link controller -> host RX FIFO.
// Transmit pipeline: host TX FIFO -> link controller -> encoder into 7-token
// vectors (spw_tx_encoder) -> TX CDC FIFO -> serializer (spw_tx_serializer,
// transmit clock) -> strobe generator (spw_tx_strobe) -> DDR outputs.
// All protocol logic runs on the system clock; the receive and transmit
// clock regions only shift bits, and one asynchronous FIFO per direction is
// the only crossing.
//
// Host side: N-chars are 9 bits ({1, 0x00} = EOP, {1, 0x01} = EEP) with
// ready/valid handshakes on both FIFOs. The transmit clock comes from outside
// (a PLL on the FPGA); tx_fast asks it for the run-mode rate (100 Mbit/s with
// a 50 MHz DDR clock) instead of the 10 Mbit/s start rate.
//
// The partitioning (generic core plus device-specific recovery, DDR and clock
// generation), the CDC FIFOs and the host FIFOs inside the codec follow the
// bridge's codec; FIFO sizes and the default SMP are this implementation's
// choices (the CDC FIFOs are 8 deep so that the receive side keeps up with a
// line somewhat faster than 100 Mbit/s). Time-codes are not supported.
//
// Reset: the synchronised reset is used asynchronously by the flip-flops in
// the serial clock regions (receive, transmit or SPI clock), which may not be
// running while it is asserted, and synchronously in the system clock region.
// Lint tools report this mix; it is intended.
module spw_codec
  import spw2spi_pkg::*;
#(
  parameter int unsigned SMP         = 2,
  parameter int unsigned CDC_ADDR_W  = 3,
  parameter int unsigned RX_DEPTH    = 64,
  parameter int unsigned TX_DEPTH    = 16,
  parameter int unsigned T_6U4       = 256,
  parameter int unsigned T_12U8      = 512,
  parameter int unsigned DISC_CYCLES = 34
) (
  input  logic        clk,
  input  logic        rst_n,       // synchronised system reset
  // link
  input  logic        din,
  input  logic        sin,
  output logic        dout,
  output logic        sout,
  input  logic        tx_clk,
  output logic        tx_fast,
  // control and status
  input  logic        link_start,
  input  logic        link_dis,
  input  logic        autostart,
  output link_state_e link_state,
  // host RX
  output logic        rx_valid,
  input  logic        rx_ready,
  output nchar_t      rx_data,
  // host TX
  input  logic        tx_valid,
  output logic        tx_ready,
  input  nchar_t      tx_data
);
  // ---------------------------------------------------------------- receive
  logic             rx_clk, s_dr, s_df;
  logic             smp_wr, smp_rd, smp_mty, smp_full;
  logic [2*SMP-1:0] smp_wdata, smp_rdata;
  rx_evt_t          evt;
  logic             rx_reset;
  logic             rxq_valid, rxq_ready;
  nchar_t           rxq_data;
  logic [$clog2(RX_DEPTH+1)-1:0] rxq_level;

  spw_rx_ddr u_rx_ddr (.din, .sin, .rx_clk, .dr (s_dr), .df (s_df));

  spw_rx_shift #(.SMP(SMP)) u_rx_shift (
    .rx_clk, .rst_n, .dr (s_dr), .df (s_df), .wr_en (smp_wr), .wr_data (smp_wdata)
  );

  async_fifo #(.WIDTH(2*SMP), .ADDR(CDC_ADDR_W)) u_rx_cdc (
    .wr_clk (rx_clk), .wr_nrsta (rst_n), .wr_en (smp_wr), .wr_data (smp_wdata), .wr_full (smp_full),
    .rd_clk (clk),    .rd_nrsta (rst_n), .rd_en (smp_rd), .rd_data (smp_rdata), .rd_mty (smp_mty)
  );

  spw_rx_decoder #(.SMP(SMP), .DISC_CYCLES(DISC_CYCLES)) u_dec (
    .clk, .rst_n, .rx_reset, .rd_en (smp_rd), .rd_data (smp_rdata), .rd_mty (smp_mty), .evt
  );

  sync_fifo #(.WIDTH(9), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .in_valid (rxq_valid), .in_ready (rxq_ready), .in_data (rxq_data),
    .out_valid (rx_valid), .out_ready (rx_ready), .out_data (rx_data),
    .level (rxq_level)
  );

  // --------------------------------------------------------------- control
  txc_e    txc;
  nchar_t  tx_nchar;
  logic    enc_rdy;
  logic    txq_valid, txq_ready;
  nchar_t  txq_data;

  spw_ctrl #(.T_6U4(T_6U4), .T_12U8(T_12U8), .RX_DEPTH(RX_DEPTH)) u_ctrl (
    .clk, .rst_n, .link_start, .link_dis, .autostart,
    .state (link_state), .tx_fast,
    .evt, .rx_reset,
    .rxq_valid, .rxq_data, .rxq_level,
    .txq_valid, .txq_ready, .txq_data,
    .txc, .tx_nchar, .enc_rdy
  );

  logic [$clog2(TX_DEPTH+1)-1:0] tx_level;   // not needed by the link

  sync_fifo #(.WIDTH(9), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .in_valid (tx_valid), .in_ready (tx_ready), .in_data (tx_data),
    .out_valid (txq_valid), .out_ready (txq_ready), .out_data (txq_data),
    .level (tx_level)
  );

  // -------------------------------------------------------------- transmit
  logic    tok_wr, tok_rd, tok_full, tok_mty;
  tokvec_t tok_wdata, tok_rdata;
  logic    ser_en, ser_dr, ser_df;
  logic    do_dr, do_df, so_dr, so_df;

  spw_tx_encoder u_enc (
    .clk, .rst_n, .link_reset (rx_reset), .txc, .nchar (tx_nchar), .rdy (enc_rdy),
    .wr_en (tok_wr), .wr_data (tok_wdata), .wr_full (tok_full)
  );

  async_fifo #(.WIDTH($bits(tokvec_t)), .ADDR(CDC_ADDR_W)) u_tx_cdc (
    .wr_clk (clk),    .wr_nrsta (rst_n), .wr_en (tok_wr), .wr_data (tok_wdata), .wr_full (tok_full),
    .rd_clk (tx_clk), .rd_nrsta (rst_n), .rd_en (tok_rd), .rd_data (tok_rdata), .rd_mty (tok_mty)
  );

  spw_tx_serializer u_ser (
    .tx_clk, .rst_n, .rd_en (tok_rd), .rd_data (tok_rdata), .rd_mty (tok_mty),
    .en (ser_en), .dr (ser_dr), .df (ser_df)
  );

  spw_tx_strobe u_strobe (
    .tx_clk, .rst_n, .en (ser_en), .d_dr (ser_dr), .d_df (ser_df),
    .do_dr, .do_df, .so_dr, .so_df
  );

  spw_ddr_out u_ddr_d (.clk (tx_clk), .d_r (do_dr), .d_f (do_df), .q (dout));
  spw_ddr_out u_ddr_s (.clk (tx_clk), .d_r (so_dr), .d_f (so_df), .q (sout));

  // The controller only announces credit for free RX FIFO space, so the
  // FIFO never refuses a character; the decoder drains the RX CDC FIFO every
  // clock, so it only fills if the system clock is too slow for the link.
  logic unused;
  assign unused = rxq_ready ^ smp_full ^ (^tx_level);
endmodule
