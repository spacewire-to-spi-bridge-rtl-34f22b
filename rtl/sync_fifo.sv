// Single-clock FIFO with ready/valid handshakes on both sides.
//
// A word is written when in_valid && in_ready and read when out_valid &&
// out_ready. out_data shows the oldest word while out_valid is high
// (first-word fall-through). `level` counts the stored words; link flow
// control uses it to know how much room is left. Reset is synchronous,
// active low.
//
// These are the host-side RX/TX FIFOs of the SPI slave controller and of the
// SpaceWire codec, which the bridge describes only as FIFOs with a ready/valid
// interface; the register-array implementation and the default size are this
// implementation's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             push, pop;

  assign in_ready  = (level != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (level != '0);
  assign out_data  = mem[rptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      level <= level + $bits(level)'(push) - $bits(level)'(pop);
    end
  end
endmodule
