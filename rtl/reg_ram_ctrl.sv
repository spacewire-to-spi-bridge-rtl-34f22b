// Register RAM controller of the bridge.
//
// The register region is byte addressed:
//   0      spw_comstat    {6'b0, tc_rdy, tm_valid}      read from SpaceWire
//   1      spi_comstat    {6'b0, tm_rdy, tc_valid}      read from SPI
//   2      tc_size        TC mail size in bytes         read from SPI
//   3..4   tm_size        TM mail size, MSB at 3        read from SpaceWire
//   5..28  lewis_features 24 bytes                      written by SPI, read by SpaceWire
// The status registers and the sizes only reflect the mailbox controllers'
// flags; lewis_features is the only stored content. Two read ports (one per
// link) take an absolute byte address and return the byte one clock later,
// matching the mailbox RAM latency so the bridge can treat both regions
// alike. Bytes outside the map read as zero.
//
// The map, the flag positions and the reset value 0 follow the bridge's
// register tables. Byte order of tm_size (MSB first, as SPI sizes are sent)
// and the content of tc_size/tm_size (the current mail size; the tables mark
// them as reserved for future use) are this implementation's choices.
module reg_ram_ctrl
  import spw2spi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // reflected status
  input  logic        tc_rdy,
  input  logic        tm_valid,
  input  logic        tc_valid,
  input  logic        tm_rdy,
  input  logic [5:0]  tc_size,
  input  logic [11:0] tm_size,
  // lewis_features write (SPI side)
  input  logic        feat_wr_en,
  input  logic [4:0]  feat_wr_idx,
  input  logic [7:0]  feat_wr_data,
  // read ports
  input  logic [1:0]       rd_en,
  input  logic [1:0][4:0]  rd_addr,
  output logic [1:0][7:0]  rd_data
);
  logic [7:0] feat [FEATURES_BYTES];

  function automatic logic [7:0] reg_byte(input logic [4:0] a);
    unique case (a)
      5'd0:    return {6'b0, tc_rdy, tm_valid};
      5'd1:    return {6'b0, tm_rdy, tc_valid};
      5'd2:    return {2'b0, tc_size};
      5'd3:    return {4'b0, tm_size[11:8]};
      5'd4:    return tm_size[7:0];
      default: return (a >= 5'd5 && a < 5'(5 + FEATURES_BYTES)) ? feat[a - 5'd5] : 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < FEATURES_BYTES; i++) feat[i] <= 8'h00;
      rd_data <= '0;
    end else begin
      if (feat_wr_en && feat_wr_idx < 5'(FEATURES_BYTES)) feat[feat_wr_idx] <= feat_wr_data;
      for (int p = 0; p < 2; p++)
        if (rd_en[p]) rd_data[p] <= reg_byte(rd_addr[p]);
    end
  end
endmodule
