// Testbench for async_fifo: two unrelated clocks (about 33 MHz and 40 MHz,
// then swapped ratio), random write and read enables. Every word read must
// be the next word written (scoreboard queue); the full flag must stop
// writes and the empty flag must stop reads; all words must get through.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 8, A = 2;
  logic wr_clk = 1'b0, rd_clk = 1'b0, nrst = 1'b1;
  real  wr_half = 15.0, rd_half = 12.5;
  always #(wr_half) wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;
  logic wr_en = 1'b0, wr_full, rd_en = 1'b0, rd_mty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0, n_full = 0;
  bit done_wr = 1'b0;
  localparam int N = 3000;

  async_fifo #(.WIDTH(W), .ADDR(A)) dut (
    .wr_clk, .wr_nrsta (nrst), .wr_en, .wr_data, .wr_full,
    .rd_clk, .rd_nrsta (nrst), .rd_en, .rd_data, .rd_mty
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // give the asynchronous clears an edge (2-state simulation)
    #3 nrst = 1'b0;
    #100 nrst = 1'b1;
  end

  // writer
  initial begin
    #200;
    while (n_wr < N) begin
      @(negedge wr_clk);
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_data = W'($urandom);
      @(posedge wr_clk);
      if (wr_full) n_full++;
      if (wr_en && !wr_full) begin q.push_back(wr_data); n_wr++; end
      if (n_wr == N / 2) begin wr_half = 9.0; rd_half = 21.0; end
    end
    @(negedge wr_clk) wr_en = 1'b0;
    done_wr = 1'b1;
  end

  // reader
  initial begin
    #200;
    while (n_rd < N) begin
      @(negedge rd_clk);
      rd_en = ($urandom_range(0, 3) != 0);
      @(posedge rd_clk);
      if (rd_en && !rd_mty) begin
        check(q.size() > 0, "read from a FIFO the model says is empty");
        if (q.size() > 0) begin
          check(rd_data == q[0], $sformatf("word %0d: %h expected %h", n_rd, rd_data, q[0]));
          void'(q.pop_front());
        end
        n_rd++;
      end
    end
    check(n_full > 0, "full flag seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms; failures++; $display("watchdog expired (written %0d read %0d)", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
