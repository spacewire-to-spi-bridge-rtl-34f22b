// End-to-end testbench of the SpaceWire-to-SPI bridge at its default sizes.
//
// The on-board computer is modelled by a second SpaceWire codec with tasks
// that build RMAP commands (CRC computed here, bit by bit on a reflected
// polynomial) and collect replies; the microcontroller by an SPI mode-0
// master at 12.5 MHz. The test follows the double-slave exchange: both sides
// poll their status registers, the OBC writes a telecommand that the MCU
// reads, the MCU writes telemetry that the OBC reads. On top it exercises:
// link start-up, both mailbox slots filling (slot switch) and a write refused
// on a full mailbox, a read refused on an empty mailbox (status 10 reply), a
// header CRC error and a data CRC error, an SPI write refused for its size,
// the feature block and a full 2048-byte telemetry mail.
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_spw2spi_top;
  import spw2spi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #12.5 clk = ~clk;           // 40 MHz

  // DUT
  logic n_cs = 1'b0, sclk = 1'b0, mosi = 1'b0, miso;
  logic d_do, d_so, o_do, o_so;
  logic d_txclk, o_txclk, d_fast, o_fast;
  link_state_e d_st, o_st;
  logic cmd_ok, cmd_err;

  txclk_gen_model u_gd (.fast (d_fast), .clk (d_txclk));
  txclk_gen_model #(.FAST_HALF_NS(9)) u_go (.fast (o_fast), .clk (o_txclk));

  spw2spi_top dut (
    .clk, .rst_n, .n_cs, .sclk, .mosi, .miso,
    .din (o_do), .sin (o_so), .dout (d_do), .sout (d_so),
    .tx_clk (d_txclk), .tx_fast (d_fast),
    .link_start (1'b0), .link_dis (1'b0), .autostart (1'b1), .link_state (d_st),
    .rmap_cmd_ok (cmd_ok), .rmap_cmd_err (cmd_err)
  );

  // OBC link
  logic   o_rxv, o_txv, o_txr;
  nchar_t o_rxd, o_txd;
  spw_codec u_obc (
    .clk, .rst_n, .din (d_do), .sin (d_so), .dout (o_do), .sout (o_so),
    .tx_clk (o_txclk), .tx_fast (o_fast),
    .link_start (1'b1), .link_dis (1'b0), .autostart (1'b0), .link_state (o_st),
    .rx_valid (o_rxv), .rx_ready (1'b1), .rx_data (o_rxd),
    .tx_valid (o_txv), .tx_ready (o_txr), .tx_data (o_txd)
  );

  int checks = 0, failures = 0;
  int n_slot_switch = 0, n_full_reject = 0, n_read_reject = 0, n_hcrc = 0, n_dcrc = 0;
  int n_spi_reject = 0, n_cmd_err = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (cmd_err) n_cmd_err++;
  always @(posedge clk) if (dut.u_bridge.u_tc.wr_commit && dut.u_bridge.u_tc.full != 2'b00) n_slot_switch++;

  // ------------------------------------------------------------- RMAP side
  function automatic logic [7:0] crc8(input logic [7:0] c, input logic [7:0] b);
    // reflected CRC-8, polynomial x^8+x^2+x+1, one bit at a time
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = c[0] ^ b[i];
      c  = c >> 1;
      if (fb) c = c ^ 8'hE0;
    end
    return c;
  endfunction

  nchar_t rxq[$];
  bit     run = 1'b0;                // set once reset has been applied
  always @(posedge clk) if (run && o_rxv) rxq.push_back(o_rxd);

  task automatic obc_send(input logic [7:0] b[$], input nchar_t eop = NCHAR_EOP);
    for (int i = 0; i <= b.size(); i++) begin
      logic acc;
      @(negedge clk);
      o_txv = 1'b1;
      o_txd = (i == b.size()) ? eop : {1'b0, b[i]};
      do begin @(posedge clk); acc = o_txr; end while (!acc);
    end
    @(negedge clk) o_txv = 1'b0;
  endtask

  // Build and send an RMAP command. len = data length; data for writes.
  task automatic rmap_cmd(input logic [7:0] instr, input logic [7:0] ext, input logic [31:0] addr,
                          input logic [23:0] len, input logic [15:0] tid,
                          input logic [7:0] data[$], input bit bad_hcrc = 0, input bit bad_dcrc = 0);
    logic [7:0] p[$];
    logic [7:0] c;
    p = '{8'h54, 8'h01, instr, 8'h88, 8'h76, tid[15:8], tid[7:0], ext,
          addr[31:24], addr[23:16], addr[15:8], addr[7:0], len[23:16], len[15:8], len[7:0]};
    c = 0;
    foreach (p[i]) c = crc8(c, p[i]);
    p.push_back(bad_hcrc ? ~c : c);
    if (instr[5]) begin
      c = 0;
      foreach (data[i]) begin p.push_back(data[i]); c = crc8(c, data[i]); end
      p.push_back(bad_dcrc ? c ^ 8'h01 : c);
    end
    obc_send(p);
  endtask

  // Wait for one reply packet and check its header; returns the data.
  task automatic rmap_reply(input logic [15:0] tid, output logic [7:0] status, output logic [7:0] data[$]);
    nchar_t pk[$];
    logic [7:0] c;
    int n;
    data = {};
    status = 8'hFF;
    for (int t = 0; t < 400000; t++) begin
      if (rxq.size() > 0 && rxq[rxq.size()-1][8]) break;
      @(posedge clk);
    end
    pk = rxq;
    rxq = {};
    check(pk.size() >= 13, $sformatf("reply received (%0d chars)", pk.size()));
    if (pk.size() < 13) return;
    check(pk[pk.size()-1] == NCHAR_EOP, "reply ends with EOP");
    check(pk[0] == 9'h076 && pk[1] == 9'h001 && pk[2] == 9'h008 && pk[4] == 9'h054, "reply header fields");
    check(pk[5][7:0] == tid[15:8] && pk[6][7:0] == tid[7:0], "reply transaction id");
    c = 0;
    for (int i = 0; i < 11; i++) c = crc8(c, pk[i][7:0]);
    check(c == pk[11][7:0], "reply header CRC");
    status = pk[3][7:0];
    n = {pk[8][7:0], pk[9][7:0], pk[10][7:0]};
    check(pk.size() == 12 + n + 2, $sformatf("reply length %0d matches %0d chars", n, pk.size()));
    c = 0;
    for (int i = 0; i < n && 12 + i < pk.size(); i++) begin
      data.push_back(pk[12+i][7:0]);
      c = crc8(c, pk[12+i][7:0]);
    end
    if (pk.size() == 12 + n + 2) check(c == pk[12+n][7:0], "reply data CRC");
  endtask

  task automatic obc_read(input logic [7:0] ext, input logic [31:0] addr, input logic [23:0] len,
                          input logic [15:0] tid, output logic [7:0] status, output logic [7:0] data[$]);
    logic [7:0] none[$];
    rmap_cmd(8'h48, ext, addr, len, tid, none);
    rmap_reply(tid, status, data);
  endtask

  // -------------------------------------------------------------- SPI side
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

  // Read: cmd, 2 dummies, then size byte + n bytes clocked.
  task automatic spi_read(input logic [7:0] cmd, input int n, output logic [7:0] size, output logic [7:0] data[$]);
    logic [7:0] tx[$], rx[$];
    tx = {cmd, 8'h00, 8'h00};
    for (int i = 0; i <= n; i++) tx.push_back(8'h00);
    spi_xfer(tx, rx);
    size = rx[3];
    data = rx[4:$];
  endtask

  task automatic spi_write(input logic [7:0] cmd, input logic [15:0] size, input logic [7:0] d[$]);
    logic [7:0] tx[$], rx[$];
    tx = {cmd, size[15:8], size[7:0]};
    foreach (d[i]) tx.push_back(d[i]);
    spi_xfer(tx, rx);
  endtask

  // ------------------------------------------------------------------ test
  logic [7:0] st, sz;
  logic [7:0] dat[$], tc1[$], tc2[$], tc3[$], tm[$], feat[$];

  initial begin
    // Asynchronous resets act on edges in a 2-state simulation: let the
    // synchronised reset settle high first, then assert reset and raise the
    // chip select so that every asynchronously cleared flop sees an edge.
    o_txv = 1'b0; o_txd = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b0;
    n_cs  = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run   = 1'b1;
    for (int i = 0; i < 4000 && !(d_st == LS_RUN && o_st == LS_RUN); i++) @(posedge clk);
    check(d_st == LS_RUN && o_st == LS_RUN, "SpaceWire link in Run");
    repeat (50) @(posedge clk);

    // 1: OBC reads spw_comstat: tc_rdy=1, tm_valid=0
    obc_read(8'h00, 0, 1, 16'h0007, st, dat);
    check(st == 0 && dat.size() == 1 && dat[0] == 8'h02, "spw_comstat = 0x02 at start");
    // 2: MCU reads spi_comstat: tm_rdy=1, tc_valid=0 -> 0x02
    spi_read(SPI_CMD_READ_SPIST, 1, sz, dat);
    check(sz == 8'h01 && dat[0] == 8'h02, $sformatf("spi_comstat size %h value %h", sz, dat[0]));
    // 3: OBC writes a 9-byte telecommand
    tc1 = '{8'h80, 8'h01, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h04};
    rmap_cmd(8'h60, 8'h01, 0, 9, 16'h0000, tc1);
    repeat (100) @(posedge clk);
    // 4: MCU sees tc_valid
    spi_read(SPI_CMD_READ_SPIST, 1, sz, dat);
    check(dat[0] == 8'h03, $sformatf("spi_comstat after TC write %h", dat[0]));
    spi_read(8'h02, 1, sz, dat);
    check(sz == 1 && dat[0] == 8'd9, "tc_size register = 9");
    // 5: MCU reads the telecommand (asks for the maximum, 32)
    spi_read(SPI_CMD_READ_TC, 32, sz, dat);
    check(sz == 8'd9, $sformatf("TC read size %0d", sz));
    for (int i = 0; i < 9; i++) check(dat[i] == tc1[i], $sformatf("TC byte %0d", i));
    spi_read(SPI_CMD_READ_SPIST, 1, sz, dat);
    check(dat[0] == 8'h02, "tc_valid cleared after read");
    // 6: OBC: no telemetry yet -> read refused with status 10
    obc_read(8'h01, 1, 2048, 16'h0010, st, dat);
    check(st == 8'd10 && dat.size() == 0, $sformatf("TM read on empty mailbox refused (status %0d)", st));
    if (st == 8'd10) n_read_reject++;
    // 7/8: MCU writes telemetry 0xCA 0xFE
    spi_write(SPI_CMD_WRITE_TM, 16'd2, '{8'hCA, 8'hFE});
    // 9: OBC sees tm_valid, tm_size = 2
    obc_read(8'h00, 0, 1, 16'h0011, st, dat);
    check(dat.size() == 1 && dat[0] == 8'h03, "spw_comstat = 0x03 with TM waiting");
    obc_read(8'h00, 3, 2, 16'h0012, st, dat);
    check(dat.size() == 2 && dat[0] == 8'h00 && dat[1] == 8'h02, "tm_size = 2");
    // 10: OBC reads the telemetry
    obc_read(8'h01, 1, 2048, 16'h0013, st, dat);
    check(st == 0 && dat.size() == 2 && dat[0] == 8'hCA && dat[1] == 8'hFE, "TM mail 0xCA 0xFE");

    // Two-slot mailbox: two TCs fill both slots, a third is refused.
    tc2 = {}; tc3 = {};
    for (int i = 0; i < 32; i++) begin tc2.push_back(8'(i * 7)); tc3.push_back(8'(200 - i)); end
    rmap_cmd(8'h60, 8'h01, 0, 32, 16'h0020, tc2);
    rmap_cmd(8'h60, 8'h01, 0, 5, 16'h0021, tc3[0:4]);
    repeat (100) @(posedge clk);
    obc_read(8'h00, 0, 1, 16'h0022, st, dat);
    check(dat.size() == 1 && dat[0][1] == 1'b0, "tc_rdy low with both slots full");
    begin
      int e0;
      e0 = n_cmd_err;
      rmap_cmd(8'h60, 8'h01, 0, 3, 16'h0023, '{8'h01, 8'h02, 8'h03});
      repeat (200) @(posedge clk);
      check(n_cmd_err == e0 + 1, "third TC refused");
      if (n_cmd_err == e0 + 1) n_full_reject++;
    end
    spi_read(SPI_CMD_READ_TC, 32, sz, dat);
    check(sz == 8'd32, "first queued TC size 32");
    for (int i = 0; i < 32; i++) check(dat[i] == tc2[i], $sformatf("TC2 byte %0d", i));
    spi_read(SPI_CMD_READ_TC, 32, sz, dat);
    check(sz == 8'd5, "second queued TC size 5");
    for (int i = 0; i < 5; i++) check(dat[i] == tc3[i], $sformatf("TC3 byte %0d", i));

    // Header CRC error: packet ignored.
    begin
      int e0;
      e0 = n_cmd_err;
      rmap_cmd(8'h60, 8'h01, 0, 3, 16'h0030, '{8'h0A, 8'h0B, 8'h0C}, 1'b1, 1'b0);
      repeat (200) @(posedge clk);
      check(n_cmd_err == e0 + 1, "header CRC error detected");
      if (n_cmd_err == e0 + 1) n_hcrc++;
      e0 = n_cmd_err;
      rmap_cmd(8'h60, 8'h01, 0, 3, 16'h0031, '{8'h0A, 8'h0B, 8'h0C}, 1'b0, 1'b1);
      repeat (200) @(posedge clk);
      check(n_cmd_err == e0 + 1, "data CRC error detected");
      if (n_cmd_err == e0 + 1) n_dcrc++;
      spi_read(SPI_CMD_READ_SPIST, 1, sz, dat);
      check(dat[0][0] == 1'b0, "no TC committed from corrupt packets");
    end

    // SPI write refused for its size (2049 > 2048): nothing committed.
    spi_write(SPI_CMD_WRITE_TM, 16'd2049, '{8'h01, 8'h02});
    obc_read(8'h00, 0, 1, 16'h0040, st, dat);
    check(dat.size() == 1 && dat[0][0] == 1'b0, "oversized TM write discarded");
    if (dat.size() == 1 && dat[0][0] == 1'b0) n_spi_reject++;

    // Feature block: MCU writes 24 bytes, OBC reads them.
    feat = {};
    for (int i = 0; i < 24; i++) feat.push_back(8'(8'h30 + i));
    spi_write(8'h15, 16'd24, feat);
    obc_read(8'h00, 5, 24, 16'h0050, st, dat);
    check(st == 0 && dat.size() == 24, "feature read length");
    for (int i = 0; i < 24 && i < dat.size(); i++) check(dat[i] == feat[i], $sformatf("feature byte %0d", i));

    // Full-size telemetry mail: 2048 bytes.
    tm = {};
    for (int i = 0; i < 2048; i++) tm.push_back(8'((i * 37) ^ (i >> 8)));
    spi_write(SPI_CMD_WRITE_TM, 16'd2048, tm);
    obc_read(8'h00, 3, 2, 16'h0060, st, dat);
    check(dat.size() == 2 && {dat[0], dat[1]} == 16'd2048, "tm_size = 2048");
    obc_read(8'h01, 1, 2048, 16'h0061, st, dat);
    check(st == 0 && dat.size() == 2048, $sformatf("TM 2048 read length %0d", dat.size()));
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 2048 && i < dat.size(); i++) if (dat[i] != tm[i]) bad++;
      check(bad == 0, $sformatf("TM 2048 content (%0d bad)", bad));
    end

    // Mechanism coverage
    $display("mechanisms: slot_switch=%0d full_reject=%0d read_reject=%0d hdr_crc=%0d data_crc=%0d spi_reject=%0d",
             n_slot_switch, n_full_reject, n_read_reject, n_hcrc, n_dcrc, n_spi_reject);
    check(n_slot_switch > 0, "two-slot switching happened");
    check(n_full_reject > 0, "full-mailbox refusal happened");
    check(n_read_reject > 0, "empty-mailbox refusal happened");
    check(n_hcrc > 0 && n_dcrc > 0, "CRC errors happened");
    check(n_spi_reject > 0, "SPI size refusal happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
