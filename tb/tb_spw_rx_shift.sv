// Testbench for spw_rx_shift (SMP = 2): random (dr, df) pairs on rx_clk;
// the written words, concatenated, must equal the pair stream, oldest bit
// in the most significant position, one word every second clock.
`timescale 1ns/1ps
module tb_spw_rx_shift;
  localparam int SMP = 2;
  logic rx_clk = 1'b0, rst_n = 1'b1, dr = 1'b0, df = 1'b0, wr_en;
  logic [2*SMP-1:0] wr_data;
  logic sent[$], got[$];
  int checks = 0, failures = 0, n_wr = 0;
  bit go = 1'b0;
  always #10 rx_clk = ~rx_clk;

  spw_rx_shift #(.SMP(SMP)) dut (.*);

  always @(posedge rx_clk) if (go) begin
    sent.push_back(dr); sent.push_back(df);
    if (wr_en) begin
      n_wr++;
      for (int i = 2*SMP-1; i >= 0; i--) got.push_back(wr_data[i]);
    end
  end

  initial begin
    #3 rst_n = 1'b0;
    #30;
    @(negedge rx_clk) rst_n = 1'b1;
    go = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      dr = 1'($urandom); df = 1'($urandom);
      @(negedge rx_clk);
    end
    go = 1'b0;
    checks++;
    if (n_wr != 500) begin failures++; $display("FAIL: %0d words for 1000 pairs", n_wr); end
    for (int i = 0; i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("FAIL: bit %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
