// Testbench for mcucom (SPI command codec) together with a bridge_ctrl as
// its partner. Byte streams tagged with the `first` flag are fed as the RX
// CDC FIFO would deliver them; bytes pushed to the TX FIFO are collected.
// Checks: a read answers the size byte after the first dummy byte, then the
// data; a refused read answers size 0; a write reaches the mailbox; a new
// command in the middle of a write abandons it.
`timescale 1ns/1ps
module tb_mcucom;
  import spw2spi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;
  logic rx_rd_en, rx_mty = 1'b1, tx_wr_en, tx_full = 1'b0;
  logic [8:0] rx_rd_data = '0;
  logic [7:0] tx_wr_data;
  auth_req_t [1:0] auth_req;
  auth_rsp_t [1:0] auth_rsp;
  dat_req_t  [1:0] dat_req;
  dat_rsp_t  [1:0] dat_rsp;
  logic tc_rdy, tc_valid, tm_rdy, tm_valid;
  logic [8:0] rxq[$];
  logic [7:0] txs[$];
  int checks = 0, failures = 0;

  mcucom u_dut (
    .clk, .rst_n, .rx_rd_en, .rx_rd_data, .rx_mty, .tx_wr_en, .tx_wr_data, .tx_full,
    .auth_req (auth_req[0]), .auth_rsp (auth_rsp[0]), .dat_req (dat_req[0]), .dat_rsp (dat_rsp[0])
  );
  bridge_ctrl u_bridge (.*);
  assign auth_req[1] = '0;
  assign dat_req[1]  = '0;

  always @(posedge clk) begin
    if (rx_rd_en && !rx_mty) void'(rxq.pop_front());
    if (tx_wr_en) txs.push_back(tx_wr_data);
    #1;
    rx_mty     = (rxq.size() == 0);
    rx_rd_data = rx_mty ? '0 : rxq[0];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one SPI transfer: bytes arrive one every 640 ns (12.5 MHz)
  task automatic xfer(input logic [7:0] b[$], output logic [7:0] got[$]);
    txs = {};
    foreach (b[i]) begin
      rxq.push_back({i == 0, b[i]});
      #640;
    end
    #200;
    got = txs;
  endtask

  initial begin
    logic [7:0] g[$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    xfer('{SPI_CMD_READ_SPIST, 8'h00, 8'h00, 8'h00, 8'h00}, g);
    check(g.size() >= 2 && g[0] == 8'd1 && g[1] == 8'h02, $sformatf("spi_comstat read %p", g));
    xfer('{SPI_CMD_READ_TC, 8'h00, 8'h00, 8'h00, 8'h00}, g);
    check(g.size() >= 1 && g[0] == 8'd0, "empty TC read answers size 0");
    xfer('{SPI_CMD_WRITE_TM, 8'h00, 8'h03, 8'h11, 8'h22, 8'h33}, g);
    #200;
    check(tm_valid && u_bridge.u_tm.data_size == 3, "TM write committed");
    check(u_bridge.u_tm.u_ram.mem[0] == 8'h11 && u_bridge.u_tm.u_ram.mem[2] == 8'h33, "TM data stored");
    // a write broken off by a new command is abandoned
    xfer('{SPI_CMD_WRITE_TM, 8'h00, 8'h04, 8'hAA, 8'hBB}, g);
    xfer('{SPI_CMD_READ_SPIST, 8'h00, 8'h00, 8'h00, 8'h00}, g);
    check(g.size() >= 2 && g[1] == 8'h02, $sformatf("spi_comstat after one TM: %p", g));
    check(u_bridge.u_tm.full == 2'b01 || u_bridge.u_tm.full == 2'b10, "abandoned write not committed");
    // features write
    xfer('{8'h15, 8'h00, 8'h02, 8'h5A, 8'hA5}, g);
    #200;
    check(u_bridge.u_regs.feat[0] == 8'h5A && u_bridge.u_regs.feat[1] == 8'hA5, "features written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
