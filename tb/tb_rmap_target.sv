// Testbench for rmap_target with a bridge_ctrl as partner; packets are fed
// as N-chars on the receive stream and replies are collected with random
// back-pressure. Checks: a register read gets a well-formed reply (header
// CRC, length, data, data CRC, EOP); a telecommand write reaches the TC
// mailbox without a reply; a read of an empty mailbox answers status 10 with
// no data; header CRC errors, data CRC errors and packets that end early
// are refused (cmd_err) and commit nothing; a non-RMAP packet is ignored.
`timescale 1ns/1ps
module tb_rmap_target;
  import spw2spi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;
  logic rx_valid = 1'b0, rx_ready, tx_valid, tx_ready = 1'b0, cmd_ok, cmd_err;
  nchar_t rx_data = '0, tx_data;
  auth_req_t [1:0] auth_req;
  auth_rsp_t [1:0] auth_rsp;
  dat_req_t  [1:0] dat_req;
  dat_rsp_t  [1:0] dat_rsp;
  logic tc_rdy, tc_valid, tm_rdy, tm_valid;
  nchar_t txs[$];
  int n_ok = 0, n_err = 0;
  int checks = 0, failures = 0;

  rmap_target u_dut (
    .clk, .rst_n, .rx_valid, .rx_ready, .rx_data, .tx_valid, .tx_ready, .tx_data,
    .auth_req (auth_req[1]), .auth_rsp (auth_rsp[1]), .dat_req (dat_req[1]), .dat_rsp (dat_rsp[1]),
    .cmd_ok, .cmd_err
  );
  bridge_ctrl u_bridge (.*);
  assign auth_req[0] = '0;
  assign dat_req[0]  = '0;

  always @(posedge clk) begin
    if (tx_valid && tx_ready) txs.push_back(tx_data);
    if (cmd_ok) n_ok++;
    if (cmd_err) n_err++;
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 3) != 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] crc8(input logic [7:0] c, input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = c[0] ^ b[i];
      c = c >> 1;
      if (fb) c = c ^ 8'hE0;
    end
    return c;
  endfunction

  task automatic send(input nchar_t p[$]);
    foreach (p[i]) begin
      @(negedge clk);
      rx_valid = 1'b1; rx_data = p[i];
      do @(posedge clk); while (!rx_ready);
    end
    @(negedge clk) rx_valid = 1'b0;
  endtask

  // instr: 8'h48 read, 8'h60 write; trunc: cut the packet after n chars
  task automatic cmd(input logic [7:0] instr, input logic [7:0] ext, input logic [31:0] addr,
                     input int len, input logic [7:0] d[$], input int bad = 0, input int trunc = 0);
    logic [7:0] h[$];
    nchar_t p[$];
    logic [7:0] c;
    h = '{8'hFE, 8'h01, instr, 8'h00, 8'h67, 8'h12, 8'h34, ext,
          addr[31:24], addr[23:16], addr[15:8], addr[7:0], 8'(len >> 16), 8'(len >> 8), 8'(len)};
    c = 0;
    foreach (h[i]) begin c = crc8(c, h[i]); p.push_back({1'b0, h[i]}); end
    p.push_back({1'b0, (bad == 1) ? ~c : c});
    if (instr[5]) begin
      c = 0;
      foreach (d[i]) begin c = crc8(c, d[i]); p.push_back({1'b0, d[i]}); end
      p.push_back({1'b0, (bad == 2) ? ~c : c});
    end
    if (trunc > 0) while (p.size() > trunc) void'(p.pop_back());
    p.push_back(NCHAR_EOP);
    send(p);
  endtask

  task automatic reply(output logic [7:0] status, output logic [7:0] d[$]);
    logic [7:0] c;
    int n;
    d = {};
    status = 8'hFF;
    for (int t = 0; t < 5000 && !(txs.size() > 0 && txs[txs.size()-1] == NCHAR_EOP); t++) @(posedge clk);
    check(txs.size() >= 14, $sformatf("reply of %0d chars", txs.size()));
    if (txs.size() < 14) begin txs = {}; return; end
    check(txs[0] == 9'h067 && txs[1] == 9'h001 && txs[2] == 9'h008 && txs[4] == 9'h0FE &&
          txs[5] == 9'h012 && txs[6] == 9'h034, "reply header");
    c = 0;
    for (int i = 0; i < 11; i++) c = crc8(c, txs[i][7:0]);
    check(c == txs[11][7:0], "reply header CRC");
    status = txs[3][7:0];
    n = {txs[8][7:0], txs[9][7:0], txs[10][7:0]};
    check(txs.size() == n + 14, "reply length field");
    c = 0;
    for (int i = 0; i < n && i + 12 < txs.size(); i++) begin d.push_back(txs[12+i][7:0]); c = crc8(c, txs[12+i][7:0]); end
    if (txs.size() == n + 14) check(c == txs[12+n][7:0] && txs[13+n] == NCHAR_EOP, "data CRC and EOP");
    txs = {};
  endtask

  initial begin
    logic [7:0] st, d[$], none[$], tc[$];
    int e0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(posedge clk);
    txs = {}; n_ok = 0; n_err = 0;

    cmd(8'h48, 8'h00, REG_SPW_COMSTAT, 1, none);
    reply(st, d);
    check(st == 0 && d.size() == 1 && d[0] == 8'h02, "spw_comstat read 0x02");

    tc = '{8'h80, 8'h01, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h04};
    cmd(8'h60, 8'h01, MBX_TC, 9, tc);
    repeat (20) @(posedge clk);
    check(tc_valid && u_bridge.u_tc.data_size == 9 && txs.size() == 0, "TC written, no reply");
    check(u_bridge.u_tc.u_ram.mem[0] == 8'h80 && u_bridge.u_tc.u_ram.mem[8] == 8'h04, "TC data stored");

    cmd(8'h48, 8'h01, MBX_TM, 2048, none);
    reply(st, d);
    check(st == 8'd10 && d.size() == 0, $sformatf("empty TM read: status %0d", st));

    e0 = n_err;
    cmd(8'h60, 8'h01, MBX_TC, 3, '{8'h1, 8'h2, 8'h3}, 1);
    cmd(8'h60, 8'h01, MBX_TC, 3, '{8'h1, 8'h2, 8'h3}, 2);
    cmd(8'h60, 8'h01, MBX_TC, 3, '{8'h1, 8'h2, 8'h3}, 0, 18);
    cmd(8'h60, 8'h01, MBX_TC, 3, '{8'h1, 8'h2, 8'h3}, 0, 9);
    repeat (20) @(posedge clk);
    check(n_err == e0 + 4, $sformatf("%0d of 4 bad packets refused", n_err - e0));
    check(u_bridge.u_tc.full != 2'b11, "no bad packet committed");
    // not an RMAP packet (protocol id 2): ignored silently
    e0 = n_err;
    send('{9'h0FE, 9'h002, 9'h011, 9'h022, NCHAR_EOP});
    repeat (20) @(posedge clk);
    check(n_err == e0 && txs.size() == 0, "foreign protocol ignored");

    // the target still works
    cmd(8'h48, 8'h00, REG_SPW_COMSTAT, 1, none);
    reply(st, d);
    check(st == 0 && d.size() == 1 && d[0] == 8'h02, "spw_comstat read 0x02 (one TC slot left)");
    check(n_ok >= 3, "commands acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
