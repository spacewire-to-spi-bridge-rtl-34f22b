// Testbench for sync_fifo: random push/pop traffic against a queue model;
// checks data order, the ready/valid flags and the fill level, including
// runs that fill the FIFO completely.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 9, D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D+1)-1:0] level;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int phase;
      phase = (n / 500) % 2;                 // alternate filling and draining bias
      @(negedge clk);
      in_valid  = ($urandom_range(0, 9) < (phase ? 3 : 8));
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 9) < (phase ? 8 : 3));
      check(level == q.size(), $sformatf("level %0d model %0d", level, q.size()));
      check(in_ready == (q.size() < D), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      if (out_valid && q.size() > 0) check(out_data == q[0], "out_data order");
      if (q.size() == D) n_full++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    check(n_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
