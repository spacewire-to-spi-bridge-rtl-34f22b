// Testbench for bridge_ctrl, driving the authorisation and data ports of
// both sides directly (side 0 = SPI, side 1 = SpaceWire). Checks: status
// registers follow the mailboxes; a telecommand written by the SpaceWire
// side is read back by the SPI side and a telemetry mail the other way;
// access rights (SPI may not write TC or read spw_comstat, SpaceWire may
// not write TM or the features); reads are granted min(asked, available);
// a cancelled write commits nothing; both sides work at the same time.
`timescale 1ns/1ps
module tb_bridge_ctrl;
  import spw2spi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;
  auth_req_t [1:0] auth_req;
  auth_rsp_t [1:0] auth_rsp;
  dat_req_t  [1:0] dat_req;
  dat_rsp_t  [1:0] dat_rsp;
  logic tc_rdy, tc_valid, tm_rdy, tm_valid;
  int checks = 0, failures = 0;

  bridge_ctrl #(.TC_SIZE(32), .TM_SIZE(2048)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic auth(input int s, input bit wr, input bit mbx, input logic [31:0] addr,
                      input int size, output bit gnt, output int gsize);
    @(negedge clk);
    auth_req[s] = '{req: 1'b1, wr: wr, mbx: mbx, addr: addr, size: 24'(size)};
    do @(posedge clk); while (!(auth_rsp[s].gnt || auth_rsp[s].rej));
    gnt = auth_rsp[s].gnt;
    gsize = int'(auth_rsp[s].size);
    @(negedge clk) auth_req[s].req = 1'b0;
  endtask

  task automatic write_bytes(input int s, input logic [7:0] d[$], input bit cancel = 0);
    foreach (d[i]) begin
      @(negedge clk);
      dat_req[s] = '0;
      dat_req[s].wr_en = 1'b1; dat_req[s].wr_data = d[i];
      if (i == d.size() - 1) begin
        if (cancel) dat_req[s].cancel = 1'b1; else dat_req[s].done = 1'b1;
      end
    end
    @(negedge clk) dat_req[s] = '0;
  endtask

  task automatic read_bytes(input int s, input int n, output logic [7:0] d[$]);
    d = {};
    for (int i = 0; i < n; i++) begin
      @(negedge clk) dat_req[s] = '0; dat_req[s].rd_en = 1'b1;
      @(negedge clk) dat_req[s] = '0;
      while (!dat_rsp[s].rd_valid) @(negedge clk);
      d.push_back(dat_rsp[s].rd_data);
    end
    @(negedge clk) dat_req[s] = '0; dat_req[s].done = 1'b1;
    @(negedge clk) dat_req[s] = '0;
  endtask


  task automatic read_reg(input int s, input logic [31:0] a, input int n, output logic [7:0] d[$]);
    bit g; int gs;
    auth(s, 1'b0, 1'b0, a, n, g, gs);
    check(g && gs == n, $sformatf("side %0d register %0d read granted (%0d)", s, a, gs));
    read_bytes(s, gs, d);
  endtask

  initial begin
    bit g; int gs;
    logic [7:0] d[$], tc[$], tm[$], f[$];
    auth_req = '0; dat_req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(tc_rdy && tm_rdy && !tc_valid && !tm_valid, "idle status");
    read_reg(1, REG_SPW_COMSTAT, 1, d);
    check(d[0] == 8'h02, "spw_comstat idle = 0x02");
    read_reg(0, REG_SPI_COMSTAT, 1, d);
    check(d[0] == 8'h02, "spi_comstat idle = 0x02");

    // access rights
    auth(0, 1'b1, 1'b1, MBX_TC, 4, g, gs); check(!g, "SPI may not write TC");
    auth(1, 1'b1, 1'b1, MBX_TM, 4, g, gs); check(!g, "SpW may not write TM");
    auth(0, 1'b0, 1'b0, REG_SPW_COMSTAT, 1, g, gs); check(!g, "SPI may not read spw_comstat");
    auth(1, 1'b1, 1'b0, REG_FEATURES, 4, g, gs); check(!g, "SpW may not write features");
    auth(0, 1'b0, 1'b1, MBX_TC, 32, g, gs); check(!g, "empty TC read refused");
    auth(1, 1'b1, 1'b1, MBX_TC, 33, g, gs); check(!g, "oversized TC write refused");

    // TC: SpW writes, SPI reads
    tc = {};
    repeat (20) tc.push_back(8'($urandom));
    auth(1, 1'b1, 1'b1, MBX_TC, 20, g, gs); check(g && gs == 20, "TC write granted");
    write_bytes(1, tc);
    @(posedge clk) #1;
    check(tc_valid, "tc_valid after commit");
    read_reg(0, REG_TC_SIZE, 1, d); check(d[0] == 8'd20, "tc_size = 20");
    auth(0, 1'b0, 1'b1, MBX_TC, 32, g, gs); check(g && gs == 20, $sformatf("TC read granted %0d", gs));
    read_bytes(0, gs, d);
    check(d == tc, "TC data");
    @(posedge clk) #1;
    check(!tc_valid, "TC freed");

    // cancelled TM write commits nothing; then TM written while a TC moves
    auth(0, 1'b1, 1'b1, MBX_TM, 3, g, gs); check(g, "TM write granted");
    write_bytes(0, '{8'h01, 8'h02, 8'h03}, 1'b1);
    @(posedge clk) #1;
    check(!tm_valid, "cancelled TM write not committed");
    tm = {}; repeat (300) tm.push_back(8'($urandom));
    tc = {}; repeat (7) tc.push_back(8'($urandom));
    fork
      begin
        bit g0; int s0;
        auth(0, 1'b1, 1'b1, MBX_TM, 300, g0, s0); check(g0, "TM 300 granted");
        write_bytes(0, tm);
      end
      begin
        bit g1; int s1;
        auth(1, 1'b1, 1'b1, MBX_TC, 7, g1, s1); check(g1, "TC 7 granted in parallel");
        write_bytes(1, tc);
      end
    join
    @(posedge clk) #1;
    check(tm_valid && tc_valid, "both mails committed");
    read_reg(1, REG_TM_SIZE, 2, d); check({d[0], d[1]} == 16'd300, "tm_size = 300");
    auth(1, 1'b0, 1'b1, MBX_TM, 100, g, gs); check(g && gs == 100, "partial TM read granted 100");
    auth_req[1] = '0;
    read_bytes(1, 100, d);
    check(d == tm[0:99], "partial TM data");
    // a read that ended with done frees the mail
    @(posedge clk) #1;
    check(!tm_valid, "TM freed after read");

    // features: SPI writes, SpW reads
    f = {}; repeat (24) f.push_back(8'($urandom));
    auth(0, 1'b1, 1'b0, REG_FEATURES, 24, g, gs); check(g, "features write granted");
    write_bytes(0, f);
    read_reg(1, REG_FEATURES, 24, d);
    check(d == f, "features data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
