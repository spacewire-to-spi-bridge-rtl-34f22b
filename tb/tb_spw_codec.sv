// Testbench for spw_codec: two codecs wired back to back, each with its own
// transmit clock model. Both must go through link initialisation to Run
// (start-up at 10 Mbit/s, then 100 Mbit/s), then packets of data bytes ended
// by EOP/EEP are sent in both directions and compared byte for byte. A burst
// longer than the receiver's FIFO is sent while the receiving host does not
// read, so flow control has to hold the sender back without losing data.
// Finally one link is disabled and the other must see the disconnect and
// leave Run.
`timescale 1ns/1ps
module tb_spw_codec;
  import spw2spi_pkg::*;

  localparam int RXD = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #12.5 clk = ~clk;     // 40 MHz system clock

  logic a_d, a_s, b_d, b_s;
  logic a_txclk, b_txclk, a_fast, b_fast;
  logic a_dis = 1'b0, b_dis = 1'b0;
  link_state_e a_st, b_st;
  logic a_rxv, a_rxr, a_txv, a_txr, b_rxv, b_rxr, b_txv, b_txr;
  nchar_t a_rxd, a_txd, b_rxd, b_txd;

  int checks = 0, failures = 0;

  txclk_gen_model u_ga (.fast (a_fast), .clk (a_txclk));
  txclk_gen_model #(.FAST_HALF_NS(11)) u_gb (.fast (b_fast), .clk (b_txclk));

  spw_codec #(.RX_DEPTH(RXD)) u_a (
    .clk, .rst_n, .din (b_d), .sin (b_s), .dout (a_d), .sout (a_s),
    .tx_clk (a_txclk), .tx_fast (a_fast),
    .link_start (1'b1), .link_dis (a_dis), .autostart (1'b0), .link_state (a_st),
    .rx_valid (a_rxv), .rx_ready (a_rxr), .rx_data (a_rxd),
    .tx_valid (a_txv), .tx_ready (a_txr), .tx_data (a_txd)
  );
  spw_codec #(.RX_DEPTH(RXD)) u_b (
    .clk, .rst_n, .din (a_d), .sin (a_s), .dout (b_d), .sout (b_s),
    .tx_clk (b_txclk), .tx_fast (b_fast),
    .link_start (1'b0), .link_dis (b_dis), .autostart (1'b1), .link_state (b_st),
    .rx_valid (b_rxv), .rx_ready (b_rxr), .rx_data (b_rxd),
    .tx_valid (b_txv), .tx_ready (b_txr), .tx_data (b_txd)
  );

  // Expected streams
  nchar_t exp_ab[$], exp_ba[$];
  int got_ab = 0, got_ba = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Receivers
  logic b_hold = 1'b0;
  assign b_rxr = !b_hold;
  assign a_rxr = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (b_rxv && b_rxr) begin
      check(exp_ab.size() > 0 && b_rxd == exp_ab[0], $sformatf("A->B got %h exp %h n=%0d", b_rxd, exp_ab.size() ? exp_ab[0] : 9'h1ff, exp_ab.size()));
      if (exp_ab.size() > 0) void'(exp_ab.pop_front());
      got_ab++;
    end
    if (a_rxv && a_rxr) begin
      check(exp_ba.size() > 0 && a_rxd == exp_ba[0], $sformatf("B->A got %h", a_rxd));
      if (exp_ba.size() > 0) void'(exp_ba.pop_front());
      got_ba++;
    end
  end

  task automatic send_a(input nchar_t c);
    logic acc;
    @(negedge clk);
    a_txv = 1'b1; a_txd = c;
    exp_ab.push_back(c);
    do begin @(posedge clk); acc = a_txr; end while (!acc);
    @(negedge clk);
    a_txv = 1'b0;
  endtask
  task automatic send_b(input nchar_t c);
    logic acc;
    @(negedge clk);
    b_txv = 1'b1; b_txd = c;
    exp_ba.push_back(c);
    do begin @(posedge clk); acc = b_txr; end while (!acc);
    @(negedge clk);
    b_txv = 1'b0;
  endtask

  initial begin
    a_txv = 0; b_txv = 0; a_txd = '0; b_txd = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // Initialisation: ErrorReset 6.4 us + ErrorWait 12.8 us + handshake.
    for (int i = 0; i < 8000 && !(a_st == LS_RUN && b_st == LS_RUN); i++) @(posedge clk);
    check(a_st == LS_RUN, "A in Run");
    check(b_st == LS_RUN, "B in Run");
    check(a_fast && b_fast, "run-mode tx rate selected");
    // Packet A->B and B->A
    fork
      begin
        for (int i = 0; i < 20; i++) send_a({1'b0, 8'(i * 13 + 1)});
        send_a(NCHAR_EOP);
      end
      begin
        for (int i = 0; i < 10; i++) send_b({1'b0, 8'(255 - i)});
        send_b(NCHAR_EEP);
      end
    join
    repeat (2000) @(posedge clk);
    check(got_ab == 21, $sformatf("A->B count %0d", got_ab));
    check(got_ba == 11, $sformatf("B->A count %0d", got_ba));
    // Flow control: B stops reading, A sends more than B's FIFO holds.
    @(negedge clk) b_hold = 1'b1;
    got_ab = 0;
    fork
      for (int i = 0; i < 3 * RXD; i++) send_a({1'b0, 8'(i)});
    join_none
    repeat (4000) @(posedge clk);
    check(got_ab == 0, "nothing delivered while held");
    check(u_b.rxq_level <= RXD, "B FIFO not overrun");
    check(a_st == LS_RUN && b_st == LS_RUN, "link still running under back-pressure");
    @(negedge clk) b_hold = 1'b0;
    repeat (6000) @(posedge clk);
    check(got_ab == 3 * RXD, $sformatf("burst delivered %0d", got_ab));
    check(exp_ab.size() == 0, "all expected bytes seen");
    // Disconnect: A stops, B must leave Run.
    a_dis = 1'b1;
    repeat (400) @(posedge clk);
    check(b_st != LS_RUN, "B detects disconnect");
    a_dis = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
