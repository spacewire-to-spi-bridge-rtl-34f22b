// Reset synchroniser: asserts the module reset asynchronously and releases it
// synchronously.
//
// Two flip-flops with asynchronous active-low clear are chained; the first
// takes a constant '1'. When rst_n falls both clear at once and msrst_n goes
// low immediately. When rst_n rises, the '1' reaches msrst_n after two rising
// clock edges, so every flip-flop fed by msrst_n leaves reset in the same
// cycle. The two-stage structure and the names follow the bridge's reset
// scheme; nothing here is an own choice.
//
// Ports: clk, rst_n (asynchronous, active low), msrst_n (synchronised reset).
module reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic msrst_n
);
  logic meta_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_n  <= 1'b0;
      msrst_n <= 1'b0;
    end else begin
      meta_n  <= 1'b1;
      msrst_n <= meta_n;
    end
  end
endmodule
