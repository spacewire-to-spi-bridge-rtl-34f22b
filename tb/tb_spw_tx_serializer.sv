// Testbench for spw_tx_serializer: random token vectors (1..7 valid tokens,
// contiguous from token 6) are offered through a first-word-fall-through
// FIFO model with random gaps; the (dr, df) pairs output while `en` is high
// must equal the valid tokens in order, and a full vector stream must be
// sent without idle cycles.
`timescale 1ns/1ps
module tb_spw_tx_serializer;
  import spw2spi_pkg::*;
  logic tx_clk = 1'b0, rst_n = 1'b1, rd_en, en, dr, df;
  tokvec_t q[$];
  tokvec_t rd_data;
  logic rd_mty = 1'b1;
  logic [1:0] sent[$], got[$];
  int checks = 0, failures = 0, idle_in_burst = 0;
  bit feed = 1'b0;
  always #10 tx_clk = ~tx_clk;

  // FIFO outputs follow the queue between clock edges
  always @(negedge tx_clk) begin
    #1;
    rd_mty  = (q.size() == 0);
    rd_data = rd_mty ? '0 : q[0];
  end

  spw_tx_serializer dut (.*);

  always @(posedge tx_clk) begin
    if (en) got.push_back({dr, df});
    if (rd_en && !rd_mty) void'(q.pop_front());
  end

  initial begin
    #3 rst_n = 1'b0;
    #30;
    @(negedge tx_clk) rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      tokvec_t v;
      int k;
      k = $urandom_range(1, TOKENS);
      v = '0;
      for (int t = int'(TOKENS) - 1; t >= int'(TOKENS) - k; t--) begin
        v.valid[t] = 1'b1;
        v.data[t]  = 2'($urandom);
        sent.push_back(v.data[t]);
      end
      if (n >= 300) repeat ($urandom_range(0, 6)) @(negedge tx_clk);
      q.push_back(v);
      if (n < 300) while (q.size() > 3) @(negedge tx_clk);
    end
    while (q.size() > 0) @(negedge tx_clk);
    repeat (20) @(negedge tx_clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL: %0d tokens, expected %0d", got.size(), sent.size()); end
    for (int i = 0; i < got.size() && i < sent.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("FAIL: token %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // no idle cycle while vectors are waiting (first half of the test)
  initial begin
    #200;
    repeat (400) begin
      @(posedge tx_clk);
      if (q.size() > 1 && !en) idle_in_burst++;
    end
  end
  final if (idle_in_burst > 0) $display("note: %0d idle cycles with data queued", idle_in_burst);
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
