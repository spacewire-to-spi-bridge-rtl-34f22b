// Testbench for mcucom_spi (SPI mode 0 front end). An SPI master at
// 12.5 MHz sends random bytes; each must appear on the RX FIFO write port
// at its eighth clock, tagged `first` for the first byte after chip select.
// A FIFO model feeds the TX side; the byte popped at the end of byte k must
// come out on MISO, MSB first, during byte k+1 (zeros when empty).
`timescale 1ns/1ps
module tb_mcucom_spi;
  logic rst_n = 1'b1, n_cs = 1'b0, sclk = 1'b0, mosi = 1'b0, miso;
  logic rx_wr_en, tx_rd_en, tx_mty;
  logic [8:0] rx_wr_data;
  logic [7:0] tx_rd_data;
  logic [7:0] txq[$];
  logic [8:0] rxs[$];
  logic [7:0] popped[$];
  int checks = 0, failures = 0;

  function automatic void upd();
    tx_mty     = (txq.size() == 0);
    tx_rd_data = tx_mty ? 8'h00 : txq[0];
  endfunction

  mcucom_spi dut (.*);

  always @(posedge sclk) begin
    if (rx_wr_en) rxs.push_back(rx_wr_data);
    if (tx_rd_en) popped.push_back(txq.pop_front());
    else if ((dut.bitcnt == 3'd7) && !n_cs) popped.push_back(8'h00);
    #1 upd();
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // the chip-select reset needs an edge in a 2-state simulation
    #5 n_cs = 1'b1;
    #5 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      logic [7:0] tx[$], rx[$];
      int n;
      n = $urandom_range(1, 12);
      tx = {};
      rx = {};
      for (int i = 0; i < n; i++) tx.push_back(8'($urandom));
      txq = {};
      for (int i = 0; i < $urandom_range(0, n); i++) txq.push_back(8'($urandom));
      upd();
      rxs = {}; popped = {};
      #100 n_cs = 1'b0;
      #100;
      foreach (tx[i]) begin
        logic [7:0] r;
        for (int b = 7; b >= 0; b--) begin
          mosi = tx[i][b];
          #40 sclk = 1'b1;
          r[b] = miso;
          #40 sclk = 1'b0;
        end
        rx.push_back(r);
      end
      #100 n_cs = 1'b1;
      check(rxs.size() == n, $sformatf("transfer %0d: %0d bytes captured of %0d", t, rxs.size(), n));
      for (int i = 0; i < n && i < rxs.size(); i++)
        check(rxs[i] == {i == 0, tx[i]}, $sformatf("transfer %0d byte %0d captured %h", t, i, rxs[i]));
      check(rx[0] == 8'h00, "first MISO byte is zero");
      for (int i = 1; i < n; i++)
        check(rx[i] == popped[i-1], $sformatf("transfer %0d MISO byte %0d: %h expected %h", t, i, rx[i], popped[i-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
