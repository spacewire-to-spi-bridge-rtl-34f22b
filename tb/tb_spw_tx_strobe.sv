// Testbench for spw_tx_strobe: random bit pairs with `en`; the D and S
// sequences (rising half then falling half of each output pair) must form a
// valid data/strobe stream: D carries the bits one cycle late, and exactly
// one of D and S changes at every bit. With en low both lines end at 0.
`timescale 1ns/1ps
module tb_spw_tx_strobe;
  logic tx_clk = 1'b0, rst_n = 1'b1, en = 1'b0, d_dr = 1'b0, d_df = 1'b0;
  logic do_dr, do_df, so_dr, so_df;
  int checks = 0, failures = 0;
  always #10 tx_clk = ~tx_clk;

  spw_tx_strobe dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic pd, ps, pr, pf;
    #3 rst_n = 1'b0;
    #30;
    @(negedge tx_clk) rst_n = 1'b1;
    pd = 1'b0; ps = 1'b0;
    for (int burst = 0; burst < 20; burst++) begin
      int len;
      len = $urandom_range(1, 80);
      for (int i = 0; i < len; i++) begin
        en = 1'b1; d_dr = 1'($urandom); d_df = 1'($urandom);
        pr = d_dr; pf = d_df;
        @(posedge tx_clk); #1;
        check(do_dr == pr && do_df == pf, "data lines carry the bits");
        check((do_dr ^ pd) ^ (so_dr ^ ps), "one line changes (first bit)");
        check((do_df ^ do_dr) ^ (so_df ^ so_dr), "one line changes (second bit)");
        pd = do_df; ps = so_df;
        @(negedge tx_clk);
      end
      // idle gap
      en = 1'b0;
      repeat (2) @(posedge tx_clk);
      #1;
      check(do_df == 1'b0 && so_df == 1'b0, "idle lines low");
      pd = do_df; ps = so_df;
      @(negedge tx_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
