// Testbench for spi_slave_ctrl (SPI front end, CDC FIFOs and command codec)
// with a bridge_ctrl as partner, driven by an SPI mode-0 master at
// 12.5 MHz. The SpaceWire side of the bridge is driven directly to place a
// telecommand. Checks: status read, TC read with its size byte, TM write,
// features write, and a read of a register the SPI side may not read.
`timescale 1ns/1ps
module tb_spi_slave_ctrl;
  import spw2spi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #12.5 clk = ~clk;
  logic n_cs = 1'b0, sclk = 1'b0, mosi = 1'b0, miso;
  auth_req_t [1:0] auth_req;
  auth_rsp_t [1:0] auth_rsp;
  dat_req_t  [1:0] dat_req;
  dat_rsp_t  [1:0] dat_rsp;
  logic tc_rdy, tc_valid, tm_rdy, tm_valid;
  int checks = 0, failures = 0;

  spi_slave_ctrl u_dut (
    .clk, .rst_n, .n_cs, .sclk, .mosi, .miso,
    .auth_req (auth_req[0]), .auth_rsp (auth_rsp[0]), .dat_req (dat_req[0]), .dat_rsp (dat_rsp[0])
  );
  bridge_ctrl u_bridge (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic spi_xfer(input logic [7:0] tx[$], output logic [7:0] rx[$]);
    rx = {};
    n_cs = 1'b0;
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
    #1000;
  endtask

  initial begin
    logic [7:0] rx[$], tc[$];
    auth_req[1] = '0; dat_req[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b0; n_cs = 1'b1;          // edges for the asynchronous clears
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    spi_xfer('{SPI_CMD_READ_SPIST, 8'h00, 8'h00, 8'h00, 8'h00}, rx);
    check(rx[3] == 8'd1 && rx[4] == 8'h02, $sformatf("spi_comstat %h %h", rx[3], rx[4]));
    spi_xfer('{8'h00, 8'h00, 8'h00, 8'h00, 8'h00}, rx);
    check(rx[3] == 8'd0, "spw_comstat not readable from SPI (size 0)");

    // SpaceWire side places a 6-byte telecommand
    tc = '{8'h10, 8'h20, 8'h30, 8'h40, 8'h50, 8'h60};
    @(negedge clk) auth_req[1] = '{req: 1'b1, wr: 1'b1, mbx: 1'b1, addr: MBX_TC, size: 24'd6};
    do @(posedge clk); while (!auth_rsp[1].gnt && !auth_rsp[1].rej);
    check(auth_rsp[1].gnt, "TC write granted");
    @(negedge clk) auth_req[1] = '0;
    foreach (tc[i]) begin
      dat_req[1] = '0; dat_req[1].wr_en = 1'b1; dat_req[1].wr_data = tc[i];
      dat_req[1].done = (i == 5);
      @(negedge clk);
    end
    dat_req[1] = '0;
    spi_xfer('{SPI_CMD_READ_TC, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00}, rx);
    check(rx[3] == 8'd6, $sformatf("TC size byte %0d", rx[3]));
    for (int i = 0; i < 6; i++) check(rx[4+i] == tc[i], $sformatf("TC byte %0d", i));
    check(!tc_valid, "TC freed after the SPI read");

    spi_xfer('{SPI_CMD_WRITE_TM, 8'h00, 8'h02, 8'hCA, 8'hFE}, rx);
    check(tm_valid && u_bridge.u_tm.data_size == 2, "TM 0xCA 0xFE committed");
    spi_xfer('{8'h15, 8'h00, 8'h01, 8'h77}, rx);
    check(u_bridge.u_regs.feat[0] == 8'h77, "feature byte written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
