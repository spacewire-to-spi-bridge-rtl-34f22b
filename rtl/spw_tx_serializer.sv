// SpaceWire transmit serializer (transmit clock domain).
//
// Parallel-in, serial-out: takes token vectors from the TX CDC FIFO and emits
// one token, i.e. two bits for the DDR output, per transmit clock. The next
// vector is popped in the same clock as the last valid token of the current
// one, so back-to-back characters leave without a gap. When the FIFO runs dry
// `en` goes low and the strobe generator idles the line.
//
// Outputs are registered: {dr, df} is the pair to send in the next transmit
// clock period, dr in the high half. Taking characters as 7-token vectors is
// the bridge's design; the pop-ahead and the idle behaviour are this
// implementation's.
module spw_tx_serializer
  import spw2spi_pkg::*;
(
  input  logic    tx_clk,
  input  logic    rst_n,      // asynchronous, active low
  output logic    rd_en,
  input  tokvec_t rd_data,
  input  logic    rd_mty,
  output logic    en,
  output logic    dr,
  output logic    df
);
  tokvec_t cur;
  logic    last;

  // The current token is cur's token 6; it is the last when token 5 is empty.
  assign last  = cur.valid[TOKENS-1] && !cur.valid[TOKENS-2];
  assign rd_en = !rd_mty && (last || !cur.valid[TOKENS-1]);

  always_ff @(posedge tx_clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0;
      en  <= 1'b0;
      dr  <= 1'b0;
      df  <= 1'b0;
    end else begin
      en <= cur.valid[TOKENS-1];
      {dr, df} <= cur.valid[TOKENS-1] ? cur.data[TOKENS-1] : 2'b00;
      if (rd_en)                   cur <= rd_data;
      else if (cur.valid[TOKENS-1]) begin
        cur.valid <= {cur.valid[TOKENS-2:0], 1'b0};
        cur.data  <= {cur.data[TOKENS-2:0], 2'b00};
      end
    end
  end
endmodule
