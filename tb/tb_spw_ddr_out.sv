// Testbench for the spw_ddr_out behavioural model: the output must show
// d_r during the high half of the clock cycle that sampled it and d_f during
// the following low half.
`timescale 1ns/1ps
module tb_spw_ddr_out;
  logic clk = 1'b0, d_r = 1'b0, d_f = 1'b0, q;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  spw_ddr_out dut (.*);

  initial begin
    logic er, ef;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      d_r = 1'($urandom); d_f = 1'($urandom);
      er = d_r; ef = d_f;
      @(posedge clk); #5;
      d_r = 1'($urandom); d_f = 1'($urandom);   // inputs may change after the edge
      checks++;
      if (q != er) begin failures++; $display("FAIL: high half %0d", i); end
      @(negedge clk); #5;
      checks++;
      if (q != ef) begin failures++; $display("FAIL: low half %0d", i); end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
