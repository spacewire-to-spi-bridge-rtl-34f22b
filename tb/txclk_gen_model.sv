// Behavioural model of the SpaceWire transmit clock generator (a PLL on the
// FPGA). Produces a 5 MHz clock (10 Mbit/s DDR) for link start-up and a
// 50 MHz clock (100 Mbit/s DDR) when `fast` is high; the switch takes effect
// at the end of the current half period. Simulation only.
module txclk_gen_model #(
  parameter int unsigned SLOW_HALF_NS = 100,
  parameter int unsigned FAST_HALF_NS = 10
) (
  input  logic fast,
  output logic clk
);
  initial begin
    clk = 1'b0;
    forever begin
      #((fast ? FAST_HALF_NS : SLOW_HALF_NS) * 1ns);
      clk = ~clk;
    end
  end
endmodule
