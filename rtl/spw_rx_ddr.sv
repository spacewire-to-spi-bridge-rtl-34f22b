// SpaceWire receive clock recovery and DDR input register.
//
// Data-strobe encoding guarantees that exactly one of Data and Strobe changes
// per bit, so XOR of the two is a clock that toggles once per bit: it rises
// on every other bit and falls on the ones in between. The Data line is
// sampled on both edges of this recovered clock (DR on the rising edge, DF on
// the falling edge) and both samples are then re-timed by a rising-edge
// register, so on each rising edge of rx_clk the pair {dr, df} holds two
// consecutive received bits, dr being the earlier one.
//
// This is the plain XOR recovery with a first pair of capture flip-flops and
// a re-timing stage, as the bridge's codec uses it; there is no glitch filter
// and no reset (the recovered clock may not run while the link is silent, and
// the decoder hunts for the first NULL at any bit position anyway). On an FPGA
// the XOR and the capture flip-flops need placement constraints.
module spw_rx_ddr (
  input  logic din,
  input  logic sin,
  output logic rx_clk,
  output logic dr,
  output logic df
);
  logic dr_sync, df_sync;

  assign rx_clk = din ^ sin;

  always_ff @(posedge rx_clk) dr_sync <= din;
  always_ff @(negedge rx_clk) df_sync <= din;

  always_ff @(posedge rx_clk) begin
    dr <= dr_sync;
    df <= df_sync;
  end
endmodule
