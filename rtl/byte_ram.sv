// Byte-wide RAM with one write port and one registered read port.
//
// The read data is registered inside the RAM, so rd_data shows the byte at
// rd_addr one clock after rd_addr is presented. Registering the read path is
// what lets FPGA synthesis map the array onto block RAM instead of flip-flops;
// the bridge relies on it and accounts for the one-cycle read latency.
// Separate read and write addresses (simple dual port) are this
// implementation's choice so that a mailbox can be written into one slot
// while the other slot is read.
module byte_ram #(
  parameter int unsigned SIZE = 64
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [$clog2(SIZE)-1:0] wr_addr,
  input  logic [7:0]              wr_data,
  input  logic [$clog2(SIZE)-1:0] rd_addr,
  output logic [7:0]              rd_data
);
  logic [7:0] mem [SIZE];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
