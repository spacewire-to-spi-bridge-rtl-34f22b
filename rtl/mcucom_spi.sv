// SPI serial front end: capture of MOSI and propagation to MISO (mode 0).
//
// Runs entirely in the serial clock domain (CPOL=0, CPHA=0, MSb first); the
// bridge's system clock is too close to the serial clock for oversampling.
// n_cs high (or the system reset) clears the bit counters asynchronously, so
// every transaction starts at a byte boundary.
//
// Capture: MOSI is shifted in on rising sclk edges. On the eighth rising edge
// of a byte the byte is formed from the seven bits already shifted plus the
// MOSI bit being sampled, and is written into the RX CDC FIFO on that same
// edge; the last bit therefore never enters the shift register. Each byte is
// tagged with `first` (bit 8) when it is the command byte of a transaction,
// so the system-clock side can find the start of a command.
//
// Propagation: on the eighth rising edge the TX shift register loads the next
// byte from the TX CDC FIFO (zero when the FIFO is empty) and otherwise
// shifts left; a single falling-edge flip-flop then drives MISO, so each bit
// is stable around the next rising edge.
//
// The capture trick for the last bit and the single falling-edge output
// flip-flop follow the bridge's capture/propagation circuits; the `first` tag
// and sending zero when no data is ready are this implementation's choices.
module mcucom_spi (
  input  logic       rst_n,      // system reset, asynchronous, active low
  input  logic       n_cs,
  input  logic       sclk,
  input  logic       mosi,
  output logic       miso,
  // RX CDC FIFO write side (sclk domain)
  output logic       rx_wr_en,
  output logic [8:0] rx_wr_data, // {first, byte}
  // TX CDC FIFO read side (sclk domain)
  output logic       tx_rd_en,
  input  logic [7:0] tx_rd_data,
  input  logic       tx_mty
);
  logic       cs_rst;
  logic [2:0] bitcnt;
  logic [6:0] rx_sh;
  logic       first;
  logic [7:0] tx_sh;

  assign cs_rst     = n_cs || !rst_n;
  assign rx_wr_en   = (bitcnt == 3'd7) && !n_cs;
  assign rx_wr_data = {first, rx_sh, mosi};
  assign tx_rd_en   = (bitcnt == 3'd7) && !n_cs && !tx_mty;

  always_ff @(posedge sclk or posedge cs_rst) begin
    if (cs_rst) begin
      bitcnt <= '0;
      rx_sh  <= '0;
      first  <= 1'b1;
      tx_sh  <= '0;
    end else begin
      bitcnt <= bitcnt + 1'b1;
      rx_sh  <= {rx_sh[5:0], mosi};
      if (bitcnt == 3'd7) begin
        first <= 1'b0;
        tx_sh <= tx_mty ? 8'h00 : tx_rd_data;
      end else begin
        tx_sh <= {tx_sh[6:0], 1'b0};
      end
    end
  end

  always_ff @(negedge sclk or posedge cs_rst) begin
    if (cs_rst) miso <= 1'b0;
    else        miso <= tx_sh[7];
  end
endmodule
