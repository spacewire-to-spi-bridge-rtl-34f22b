// Asynchronous FIFO for clock domain crossing.
//
// Dual-clock FIFO in the well-known Gray-code pointer style: each side keeps a
// binary pointer (addresses the memory) and a Gray pointer (crosses the clock
// boundary through a two-flop synchroniser). Full is computed on the write
// side by comparing the next write Gray pointer with the synchronised read
// pointer with its two top bits inverted; empty on the read side by equality
// with the synchronised write pointer. Both flags are registered.
//
// The memory is written on wr_clk and read combinationally at the read
// address, so rd_data shows the oldest word whenever rd_mty is low
// (first-word fall-through); rd_en pops it. wr_en while wr_full and rd_en
// while rd_mty are ignored. Because of the synchronisers, a flag takes two
// clocks of the other side to see a change made there.
//
// The block structure (wr_arith, rd_arith, FIFO_mem, rd2wr/wr2rd pointer
// synchronisers, per-side active-low asynchronous resets) follows the
// bridge's CDC FIFO; width and depth are parameters whose defaults are this
// implementation's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned ADDR  = 2     // depth = 2**ADDR
) (
  input  logic             wr_clk,
  input  logic             wr_nrsta,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,

  input  logic             rd_clk,
  input  logic             rd_nrsta,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_mty
);
  localparam int unsigned DEPTH = 1 << ADDR;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [ADDR:0] wbin, wgray, wbin_nxt, wgray_nxt;
  logic [ADDR:0] rbin, rgray, rbin_nxt, rgray_nxt;
  logic [ADDR:0] rq1_wgray, rq2_wgray;   // write pointer seen by read side
  logic [ADDR:0] wq1_rgray, wq2_rgray;   // read pointer seen by write side

  // ---------------------------------------------------------------- memory
  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[ADDR-1:0]] <= wr_data;
  end
  assign rd_data = mem[rbin[ADDR-1:0]];

  // ------------------------------------------------------------- write side
  always_ff @(posedge wr_clk or negedge wr_nrsta) begin
    if (!wr_nrsta) {wq2_rgray, wq1_rgray} <= '0;
    else           {wq2_rgray, wq1_rgray} <= {wq1_rgray, rgray};
  end

  assign wbin_nxt  = wbin + (ADDR+1)'(wr_en && !wr_full);
  assign wgray_nxt = (wbin_nxt >> 1) ^ wbin_nxt;

  always_ff @(posedge wr_clk or negedge wr_nrsta) begin
    if (!wr_nrsta) begin
      wbin    <= '0;
      wgray   <= '0;
      wr_full <= 1'b0;
    end else begin
      wbin    <= wbin_nxt;
      wgray   <= wgray_nxt;
      wr_full <= (wgray_nxt == {~wq2_rgray[ADDR:ADDR-1], wq2_rgray[ADDR-2:0]});
    end
  end

  // -------------------------------------------------------------- read side
  always_ff @(posedge rd_clk or negedge rd_nrsta) begin
    if (!rd_nrsta) {rq2_wgray, rq1_wgray} <= '0;
    else           {rq2_wgray, rq1_wgray} <= {rq1_wgray, wgray};
  end

  assign rbin_nxt  = rbin + (ADDR+1)'(rd_en && !rd_mty);
  assign rgray_nxt = (rbin_nxt >> 1) ^ rbin_nxt;

  always_ff @(posedge rd_clk or negedge rd_nrsta) begin
    if (!rd_nrsta) begin
      rbin   <= '0;
      rgray  <= '0;
      rd_mty <= 1'b1;
    end else begin
      rbin   <= rbin_nxt;
      rgray  <= rgray_nxt;
      rd_mty <= (rgray_nxt == rq2_wgray);
    end
  end

  initial begin
    if (ADDR < 2) $error("async_fifo: ADDR must be at least 2");
  end
endmodule
