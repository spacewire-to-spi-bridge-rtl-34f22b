// SpaceWire receive deserializer (receive clock domain).
//
// Shifts the 2-bit samples {dr, df} delivered on each rising edge of the
// recovered clock into a sample vector of SMP samples and writes the vector
// into the RX CDC FIFO once every SMP clocks. The vector is flattened with
// the oldest bit in its most significant position. Like the SPI capture, the
// last sample goes straight from the input into the FIFO word, so the FIFO is
// written on the same edge that completes the vector.
//
// The generic number of samples per vector follows the bridge's deserializer;
// the default of 2 samples (4 bits) is this implementation's choice: with a
// 50 MHz receive clock it writes the FIFO at 25 MHz, below a 40 MHz system
// clock, and it keeps at most one character per vector for the decoder.
module spw_rx_shift #(
  parameter int unsigned SMP = 2
) (
  input  logic             rx_clk,
  input  logic             rst_n,     // asynchronous, active low
  input  logic             dr,
  input  logic             df,
  output logic             wr_en,
  output logic [2*SMP-1:0] wr_data
);
  localparam int unsigned CW = (SMP > 1) ? $clog2(SMP) : 1;

  logic [CW-1:0] cnt;

  assign wr_en = (cnt == CW'(SMP - 1));

  generate
    if (SMP == 1) begin : g_one
      assign wr_data = {dr, df};
      assign cnt = '0;
    end else begin : g_vec
      logic [2*SMP-3:0] vec;
      assign wr_data = {vec, dr, df};
      always_ff @(posedge rx_clk or negedge rst_n) begin
        if (!rst_n) begin
          cnt <= '0;
          vec <= '0;
        end else begin
          cnt <= wr_en ? '0 : cnt + 1'b1;
          vec <= (2*SMP-2)'({vec, dr, df});
        end
      end
    end
  endgenerate
endmodule
