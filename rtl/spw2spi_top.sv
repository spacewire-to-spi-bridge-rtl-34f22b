// SpaceWire-to-SPI bridge: top level.
//
// Lets a spacecraft on-board computer (SpaceWire RMAP initiator) and a
// microcontroller (SPI master) exchange telecommands and telemetry without
// any processor in between. Both links are slaves: each side polls its
// status register and then moves whole mails through a mailbox.
//   OBC  --SpaceWire/RMAP--> TC mailbox (32 bytes, 2 slots) --SPI--> MCU
//   MCU  --SPI--> TM mailbox (2048 bytes, 2 slots) --SpaceWire/RMAP--> OBC
// plus status registers for each side and a 24-byte feature block written by
// the MCU and read by the OBC.
//
// Blocks: reset synchroniser; SPI slave controller (SPI mode 0, up to
// 12.5 MHz); SpaceWire codec (DDR, 100 Mbit/s with a 50 MHz transmit clock);
// RMAP target; bridge controller with its register and mailbox RAM
// controllers. Everything but the serial front ends runs on the system clock
// `clk` (40 MHz assumed by the timing parameters). The SpaceWire transmit
// clock comes from an external clock generator (a PLL on the FPGA), which
// tx_fast switches between the 10 Mbit/s start rate and the run rate.
//
// link_start/link_dis/autostart control the SpaceWire link; link_state and
// the RMAP command pulses are brought out for status display.
//
// Reset: the synchronised reset is used asynchronously by the flip-flops in
// the serial clock regions (receive, transmit or SPI clock), which may not be
// running while it is asserted, and synchronously in the system clock region.
// Lint tools report this mix; it is intended.
module spw2spi_top
  import spw2spi_pkg::*;
#(
  parameter int unsigned TC_SIZE     = TC_MAX_BYTES,
  parameter int unsigned TM_SIZE     = TM_MAX_BYTES,
  parameter int unsigned SMP         = 2,
  parameter int unsigned RX_DEPTH    = 64,
  parameter int unsigned TX_DEPTH    = 16,
  parameter int unsigned T_6U4       = 256,
  parameter int unsigned T_12U8      = 512,
  parameter int unsigned DISC_CYCLES = 34
) (
  input  logic        clk,
  input  logic        rst_n,
  // SPI (slave)
  input  logic        n_cs,
  input  logic        sclk,
  input  logic        mosi,
  output logic        miso,
  // SpaceWire
  input  logic        din,
  input  logic        sin,
  output logic        dout,
  output logic        sout,
  input  logic        tx_clk,
  output logic        tx_fast,
  input  logic        link_start,
  input  logic        link_dis,
  input  logic        autostart,
  output link_state_e link_state,
  output logic        rmap_cmd_ok,
  output logic        rmap_cmd_err
);
  logic msrst_n;

  auth_req_t [1:0] auth_req;
  auth_rsp_t [1:0] auth_rsp;
  dat_req_t  [1:0] dat_req;
  dat_rsp_t  [1:0] dat_rsp;

  logic   rx_valid, rx_ready, tx_valid, tx_ready;
  nchar_t rx_data, tx_data;
  logic   tc_rdy, tc_valid, tm_rdy, tm_valid;

  reset_sync u_rst (.clk, .rst_n, .msrst_n);

  spi_slave_ctrl u_spi (
    .clk, .rst_n (msrst_n), .n_cs, .sclk, .mosi, .miso,
    .auth_req (auth_req[SIDE_SPI]), .auth_rsp (auth_rsp[SIDE_SPI]),
    .dat_req  (dat_req[SIDE_SPI]),  .dat_rsp  (dat_rsp[SIDE_SPI])
  );

  spw_codec #(
    .SMP(SMP), .RX_DEPTH(RX_DEPTH), .TX_DEPTH(TX_DEPTH),
    .T_6U4(T_6U4), .T_12U8(T_12U8), .DISC_CYCLES(DISC_CYCLES)
  ) u_spw (
    .clk, .rst_n (msrst_n), .din, .sin, .dout, .sout, .tx_clk, .tx_fast,
    .link_start, .link_dis, .autostart, .link_state,
    .rx_valid, .rx_ready, .rx_data, .tx_valid, .tx_ready, .tx_data
  );

  rmap_target u_rmap (
    .clk, .rst_n (msrst_n),
    .rx_valid, .rx_ready, .rx_data, .tx_valid, .tx_ready, .tx_data,
    .auth_req (auth_req[SIDE_SPW]), .auth_rsp (auth_rsp[SIDE_SPW]),
    .dat_req  (dat_req[SIDE_SPW]),  .dat_rsp  (dat_rsp[SIDE_SPW]),
    .cmd_ok (rmap_cmd_ok), .cmd_err (rmap_cmd_err)
  );

  bridge_ctrl #(.TC_SIZE(TC_SIZE), .TM_SIZE(TM_SIZE)) u_bridge (
    .clk, .rst_n (msrst_n), .auth_req, .auth_rsp, .dat_req, .dat_rsp,
    .tc_rdy, .tc_valid, .tm_rdy, .tm_valid
  );

  // The status flags reach the links through the registers only.
  logic unused_flags;
  assign unused_flags = tc_rdy ^ tc_valid ^ tm_rdy ^ tm_valid;
endmodule
