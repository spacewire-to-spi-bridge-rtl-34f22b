// SPI slave controller of the bridge.
//
// Three parts: the serial front end (mcucom_spi) in the SPI clock domain, two
// asynchronous FIFOs carrying bytes across to the system clock domain and
// back, and the command codec (mcucom) that talks to the bridge controller.
// SPI mode 0, MSb first, designed for a 12.5 MHz serial clock with a system
// clock about 3.2 times faster.
//
// The serial clock only runs during a transaction, so the FIFO sides in that
// domain advance only while the master clocks; this is why a read command is
// followed by two dummy bytes before the reply starts. The RX CDC FIFO is 9
// bits wide (byte plus start-of-command tag) and the TX CDC FIFO 8 bits; both
// hold 2**CDC_ADDR_W words. The split into MCUCOM_SPI, CDC FIFOs and MCUCOM
// follows the bridge's SPI controller; the host-side RX/TX FIFOs it places
// between the codec and the bridge are left out here, the codec drives the
// bridge's data port directly.
//
// Reset: rst_n clears the SPI-clock flip-flops asynchronously (that clock
// may be stopped) and the system-clock logic synchronously; lint tools report
// this mix, and it is intended.
module spi_slave_ctrl
  import spw2spi_pkg::*;
#(
  parameter int unsigned CDC_ADDR_W = 2     // CDC FIFO depth 2**CDC_ADDR_W
) (
  input  logic      clk,
  input  logic      rst_n,       // synchronised system reset
  input  logic      n_cs,
  input  logic      sclk,
  input  logic      mosi,
  output logic      miso,
  output auth_req_t auth_req,
  input  auth_rsp_t auth_rsp,
  output dat_req_t  dat_req,
  input  dat_rsp_t  dat_rsp
);
  logic       rxw_en, rxr_en, rx_full, rx_mty;
  logic [8:0] rxw_data, rxr_data;
  logic       txw_en, txr_en, tx_full, tx_mty;
  logic [7:0] txw_data, txr_data;

  mcucom_spi u_spi (
    .rst_n, .n_cs, .sclk, .mosi, .miso,
    .rx_wr_en (rxw_en), .rx_wr_data (rxw_data),
    .tx_rd_en (txr_en), .tx_rd_data (txr_data), .tx_mty (tx_mty)
  );

  async_fifo #(.WIDTH(9), .ADDR(CDC_ADDR_W)) u_cdc_rx (
    .wr_clk (sclk), .wr_nrsta (rst_n), .wr_en (rxw_en), .wr_data (rxw_data), .wr_full (rx_full),
    .rd_clk (clk),  .rd_nrsta (rst_n), .rd_en (rxr_en), .rd_data (rxr_data), .rd_mty (rx_mty)
  );

  async_fifo #(.WIDTH(8), .ADDR(CDC_ADDR_W)) u_cdc_tx (
    .wr_clk (clk),  .wr_nrsta (rst_n), .wr_en (txw_en), .wr_data (txw_data), .wr_full (tx_full),
    .rd_clk (sclk), .rd_nrsta (rst_n), .rd_en (txr_en), .rd_data (txr_data), .rd_mty (tx_mty)
  );

  mcucom u_codec (
    .clk, .rst_n,
    .rx_rd_en (rxr_en), .rx_rd_data (rxr_data), .rx_mty (rx_mty),
    .tx_wr_en (txw_en), .tx_wr_data (txw_data), .tx_full (tx_full),
    .auth_req, .auth_rsp, .dat_req, .dat_rsp
  );

  // The codec reads a byte within a few system clocks, far faster than the
  // 8 serial clocks a byte takes, so the RX CDC FIFO never fills.
  logic unused_rx_full;
  assign unused_rx_full = rx_full;
endmodule
