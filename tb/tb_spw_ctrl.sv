// Testbench for spw_ctrl (link state machine and flow control), driving the
// decoder events directly. Checks: ErrorReset lasts 6.4 us and ErrorWait
// 12.8 us (256 and 512 clocks at 40 MHz); Ready waits for link_start;
// Started sends NULLs and moves on a received NULL; Connecting sends FCTs
// and moves on a received FCT; in Run N-chars go out only against credit
// (8 per FCT received) and received N-chars are passed on; a parity error
// in Run, a 12.8 us timeout in Started and link_dis each force ErrorReset.
`timescale 1ns/1ps
module tb_spw_ctrl;
  import spw2spi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = ~clk;
  logic link_start = 0, link_dis = 0, autostart = 0, tx_fast, rx_reset;
  link_state_e state;
  rx_evt_t evt = '0;
  logic rxq_valid;
  nchar_t rxq_data, tx_nchar, txq_data = '0;
  logic [6:0] rxq_level = '0;
  logic txq_valid = 0, txq_ready, enc_rdy = 1'b1;
  txc_e txc;
  int checks = 0, failures = 0, n_sent = 0, n_fct_sent = 0, n_rx = 0;

  spw_ctrl #(.T_6U4(256), .T_12U8(512), .RX_DEPTH(64)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (txc == TXC_NCHAR && enc_rdy) n_sent++;
    if (txc == TXC_FCT && enc_rdy) n_fct_sent++;
    if (rxq_valid) n_rx++;
  end

  task automatic pulse(input rx_evt_t e);
    @(negedge clk) evt = e;
    @(negedge clk) evt = '0;
  endtask

  function automatic rx_evt_t ev_null(); rx_evt_t e; e = '0; e.got_null = 1'b1; return e; endfunction
  function automatic rx_evt_t ev_fct();  rx_evt_t e; e = '0; e.got_fct  = 1'b1; return e; endfunction

  task automatic wait_state(input link_state_e s, input int max, output int cycles);
    cycles = 0;
    while (state != s && cycles < max) begin @(posedge clk); cycles++; end
  endtask

  task automatic bring_up();
    int c;
    wait_state(LS_READY, 2000, c);
    check(state == LS_READY, "reached Ready");
    @(negedge clk) link_start = 1'b1;
    wait_state(LS_STARTED, 10, c);
    check(state == LS_STARTED, "Ready -> Started on link_start");
    repeat (5) @(posedge clk);
    #1 check(txc == TXC_NULL, "Started sends NULLs");
    pulse(ev_null());
    wait_state(LS_CONNECTING, 10, c);
    check(state == LS_CONNECTING, "Started -> Connecting on NULL");
    repeat (3) @(posedge clk);
    pulse(ev_fct());
    wait_state(LS_RUN, 10, c);
    check(state == LS_RUN, "Connecting -> Run on FCT");
    check(tx_fast, "run rate selected in Run");
  endtask

  initial begin
    int c;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // ErrorReset / ErrorWait timing
    check(state == LS_ERROR_RESET && rx_reset, "starts in ErrorReset");
    wait_state(LS_ERROR_WAIT, 2000, c);
    check(c >= 254 && c <= 258, $sformatf("ErrorReset lasted %0d clocks", c));
    wait_state(LS_READY, 2000, c);
    check(c >= 510 && c <= 514, $sformatf("ErrorWait lasted %0d clocks", c));
    repeat (100) @(posedge clk);
    check(state == LS_READY, "Ready holds without link_start");
    bring_up();
    check(n_fct_sent > 0, "FCTs sent while connecting");

    // credit: 20 N-chars offered, only 8 may go before another FCT arrives
    n_sent = 0;
    @(negedge clk) txq_valid = 1'b1; txq_data = 9'h0A5;
    repeat (200) @(posedge clk);
    check(n_sent == 8, $sformatf("%0d N-chars sent on one FCT", n_sent));
    pulse(ev_fct());
    repeat (200) @(posedge clk);
    check(n_sent == 16, $sformatf("%0d N-chars sent after a second FCT", n_sent));
    @(negedge clk) txq_valid = 1'b0;

    // received N-chars are forwarded
    n_rx = 0;
    for (int i = 0; i < 5; i++) begin
      rx_evt_t e;
      e = '0; e.got_nchar = 1'b1; e.nchar = 9'(i);
      pulse(e);
    end
    repeat (5) @(posedge clk);
    check(n_rx == 5, $sformatf("%0d received N-chars forwarded", n_rx));

    // parity error in Run
    begin rx_evt_t e; e = '0; e.err_par = 1'b1; pulse(e); end
    @(posedge clk) #1;
    check(state == LS_ERROR_RESET, "parity error -> ErrorReset");
    @(negedge clk) link_start = 1'b0;

    // timeout in Started
    wait_state(LS_READY, 2000, c);
    @(negedge clk) link_start = 1'b1;
    wait_state(LS_STARTED, 10, c);
    wait_state(LS_ERROR_RESET, 1000, c);
    check(state == LS_ERROR_RESET && c >= 505 && c <= 515, $sformatf("Started timed out after %0d clocks", c));

    // link_dis in Run
    bring_up();
    @(negedge clk) link_dis = 1'b1;
    @(posedge clk) #1;
    check(state == LS_ERROR_RESET, "link_dis -> ErrorReset");
    @(negedge clk) link_dis = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
