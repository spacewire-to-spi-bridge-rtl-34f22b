// Testbench for spw_tx_encoder: random requests (NULL, FCT, data, EOP, EEP)
// with random FIFO-full back-pressure; the token vectors written are
// flattened (valid tokens only, token 6 first) and decoded by the reference
// model. Expected: every accepted request in order, an FCT request giving
// FCT followed by NULL, no parity error, and a fresh parity chain after
// link_reset.
`timescale 1ns/1ps
module tb_spw_tx_encoder;
  import spw2spi_pkg::*;
  import spw_bits_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, link_reset = 1'b0, rdy, wr_en, wr_full = 1'b0;
  txc_e txc = TXC_NONE;
  nchar_t nchar = '0;
  tokvec_t wr_data;
  bitq_t bits;
  charq_t exp_ch;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spw_tx_encoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && wr_en) begin
    bit seen_gap;
    seen_gap = 1'b0;
    for (int t = TOKENS - 1; t >= 0; t--) begin
      if (wr_data.valid[t]) begin
        if (seen_gap) begin failures++; $display("FAIL: token gap"); end
        bits.push_back(wr_data.data[t][1]); bits.push_back(wr_data.data[t][0]);
      end else seen_gap = 1'b1;
    end
  end

  task automatic compare(input string what);
    charq_t got;
    int pe;
    got = decode(bits, pe);
    check(pe == 0, $sformatf("%s: %0d parity errors", what, pe));
    check(got.size() == exp_ch.size(), $sformatf("%s: %0d chars, expected %0d", what, got.size(), exp_ch.size()));
    for (int i = 0; i < got.size() && i < exp_ch.size(); i++)
      check(got[i] == exp_ch[i], $sformatf("%s: char %0d is %0d expected %0d", what, i, got[i], exp_ch[i]));
    bits = {};
    exp_ch = {};
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      for (int n = 0; n < 400; n++) begin
        int k;
        bit acc;
        k = $urandom_range(0, 9);
        wr_full = ($urandom_range(0, 3) == 0);
        txc = (k == 0) ? TXC_NULL : (k == 1) ? TXC_FCT : TXC_NCHAR;
        nchar = (k == 2) ? NCHAR_EOP : (k == 3) ? NCHAR_EEP : {1'b0, 8'($urandom)};
        #1 acc = rdy;
        @(posedge clk);
        if (acc) begin
          case (txc)
            TXC_NULL: exp_ch.push_back(CH_NULL);
            TXC_FCT:  begin exp_ch.push_back(CH_FCT); exp_ch.push_back(CH_NULL); end
            default:  exp_ch.push_back(nchar[8] ? (nchar[0] ? CH_EEP : CH_EOP) : int'(nchar[7:0]));
          endcase
        end
        @(negedge clk);
      end
      txc = TXC_NONE;
      @(negedge clk);
      compare($sformatf("round %0d", round));
      // restart the parity chain as a new link would
      link_reset = 1'b1;
      @(negedge clk) link_reset = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
