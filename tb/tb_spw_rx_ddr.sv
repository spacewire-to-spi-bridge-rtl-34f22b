// Testbench for spw_rx_ddr: drives a random bit stream as data/strobe
// (strobe toggles whenever data does not) and checks that the recovered
// clock is D xor S and that every rising edge of it delivers the previous
// two bits as (dr, df).
`timescale 1ns/1ps
module tb_spw_rx_ddr;
  logic din = 1'b0, sin = 1'b0, rx_clk, dr, df;
  logic bits[$];
  int checks = 0, failures = 0;

  spw_rx_ddr dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic b;
      b = 1'($urandom);
      #($urandom_range(8, 12));
      if (b == din) sin = ~sin;
      din = b;
      bits.push_back(b);
      #0.1;
      check(rx_clk == (din ^ sin), "rx_clk = D xor S");
      // odd number of bits sent: rising edge of rx_clk just happened
      if (i % 2 == 0 && i >= 2)
        check(dr == bits[i-2] && df == bits[i-1],
              $sformatf("bit pair %0d: got %b%b expected %b%b", i / 2 - 1, dr, df, bits[i-2], bits[i-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
