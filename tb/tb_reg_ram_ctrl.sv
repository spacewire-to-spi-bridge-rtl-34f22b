// Testbench for reg_ram_ctrl: random status inputs and feature writes;
// both read ports read random addresses every cycle and are compared, one
// cycle later, with a model of the byte map (status bytes 0..4, features
// 5..28, zero elsewhere).
`timescale 1ns/1ps
module tb_reg_ram_ctrl;
  import spw2spi_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tc_rdy = 0, tm_valid = 0, tc_valid = 0, tm_rdy = 0;
  logic [5:0] tc_size = '0;
  logic [11:0] tm_size = '0;
  logic feat_wr_en = 0;
  logic [4:0] feat_wr_idx = '0;
  logic [7:0] feat_wr_data = '0;
  logic [1:0] rd_en = '0;
  logic [1:0][4:0] rd_addr = '0;
  logic [1:0][7:0] rd_data;
  logic [7:0] feat [FEATURES_BYTES];
  int checks = 0, failures = 0;

  reg_ram_ctrl dut (.*);

  function automatic logic [7:0] model(input logic [4:0] a);
    case (a)
      0: return {6'b0, tc_rdy, tm_valid};
      1: return {6'b0, tm_rdy, tc_valid};
      2: return {2'b0, tc_size};
      3: return {4'b0, tm_size[11:8]};
      4: return tm_size[7:0];
      default: return (a < 5 + FEATURES_BYTES) ? feat[a - 5] : 8'h00;
    endcase
  endfunction

  initial begin
    logic [1:0][7:0] exp;
    logic [1:0] en;
    foreach (feat[i]) feat[i] = 8'h00;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {tc_rdy, tm_valid, tc_valid, tm_rdy} = 4'($urandom);
      tc_size = 6'($urandom); tm_size = 12'($urandom);
      feat_wr_en = 1'($urandom);
      feat_wr_idx = 5'($urandom_range(0, 27));
      feat_wr_data = 8'($urandom);
      rd_en = 2'($urandom);
      rd_addr[0] = 5'($urandom); rd_addr[1] = 5'($urandom);
      for (int p = 0; p < 2; p++) exp[p] = rd_en[p] ? model(rd_addr[p]) : rd_data[p];
      en = rd_en;
      @(posedge clk);
      if (feat_wr_en && feat_wr_idx < FEATURES_BYTES) feat[feat_wr_idx] = feat_wr_data;
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rd_data[p] !== exp[p]) begin
          failures++;
          $display("FAIL: port %0d addr %0d read %h expected %h (en %b)", p, rd_addr[p], rd_data[p], exp[p], en);
        end
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
