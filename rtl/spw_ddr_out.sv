// Behavioural model of a DDR output register (FPGA-specific primitive).
//
// On the rising edge of clk the output takes d_r; d_f is captured at the same
// time and appears on the falling edge. The real part is a vendor DDR output
// cell; this model only reproduces its timing for simulation. It is not meant
// for synthesis: one variable is written on both clock edges. Like the
// vendor cell it has no reset; the line settles on the first clock edge.
// Synthesis tools that do not accept dual-edge processes drop the falling-edge
// branch and then warn that f_hold has no driver; that warning is expected for
// this model and disappears when the vendor cell is used in its place.
module spw_ddr_out (
  input  logic clk,
  input  logic d_r,
  input  logic d_f,
  output logic q
);
  logic f_hold;

  always @(posedge clk or negedge clk) begin
    if (clk) begin
      q      <= d_r;
      f_hold <= d_f;
    end else begin
      q <= f_hold;
    end
  end
endmodule
