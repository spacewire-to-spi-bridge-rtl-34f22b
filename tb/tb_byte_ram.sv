// Testbench for byte_ram: random writes and reads against a reference array;
// checks the one-cycle registered read and a read of an address written in
// the same cycle (old data returned).
`timescale 1ns/1ps
module tb_byte_ram;
  localparam int SIZE = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic       wr_en = 1'b0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic [7:0] ref_mem [SIZE];
  int checks = 0, failures = 0;

  byte_ram #(.SIZE(SIZE)) dut (.*);

  initial begin
    logic [7:0] expect_q;
    // fill every byte first so that all reads are defined
    for (int i = 0; i < SIZE; i++) begin
      @(negedge clk); wr_en = 1'b1; wr_addr = 6'(i); wr_data = 8'($urandom); ref_mem[i] = wr_data;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rd_addr = 6'($urandom);
      wr_en   = 1'($urandom);
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : 6'($urandom);
      wr_data = 8'($urandom);
      expect_q = ref_mem[rd_addr];
      @(posedge clk);
      if (wr_en) ref_mem[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expect_q) begin
        failures++; $display("FAIL: addr %0d read %h expected %h", rd_addr, rd_data, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
