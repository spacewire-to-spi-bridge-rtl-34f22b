// Testbench for reset_sync: assertion must reach the output without a clock
// edge (asynchronous), release must take exactly two rising clock edges.
`timescale 1ns/1ps
module tb_reset_sync;
  logic clk = 1'b0, rst_n = 1'b1, msrst_n;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;

  reset_sync dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      // assert at a random point between edges
      #($urandom_range(1, 20));
      rst_n = 1'b0;
      #1;
      check(msrst_n == 1'b0, "asynchronous assertion");
      repeat ($urandom_range(1, 4)) @(posedge clk);
      @(negedge clk);
      rst_n = 1'b1;
      @(posedge clk); #1;
      check(msrst_n == 1'b0, "still low after first edge");
      @(posedge clk); #1;
      check(msrst_n == 1'b1, "released after second edge");
      repeat ($urandom_range(1, 5)) @(posedge clk);
      check(msrst_n == 1'b1, "stays released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
