// SpaceWire strobe generator (transmit clock domain).
//
// Registers the data pair {dr, df} and derives the strobe pair so that in
// every half period exactly one of Data and Strobe changes:
//   S(dr) = not (D(prev df) xor D(dr) xor S(prev df))
//   S(df) = not (S(dr) xor D(dr) xor D(df))
// i.e. Strobe toggles whenever Data keeps its value. There is no reset but an
// enable from the serializer: with en low the data pair is forced to 0 and the
// strobe is brought to 0 without an illegal double change (its first half
// keeps 1 only while both the last data and strobe bits were 1).
//
// The enable-instead-of-reset scheme and the idle equations follow the
// bridge's strobe generation algorithm; the registers are cleared by the
// asynchronous system reset as well, which is this implementation's addition
// so that simulation starts from a known line state.
module spw_tx_strobe (
  input  logic tx_clk,
  input  logic rst_n,
  input  logic en,
  input  logic d_dr,
  input  logic d_df,
  output logic do_dr,
  output logic do_df,
  output logic so_dr,
  output logic so_df
);
  logic s_dr;

  assign s_dr = ~(do_df ^ d_dr ^ so_df);

  always_ff @(posedge tx_clk or negedge rst_n) begin
    if (!rst_n) begin
      do_dr <= 1'b0;
      do_df <= 1'b0;
      so_dr <= 1'b0;
      so_df <= 1'b0;
    end else if (!en) begin
      do_dr <= 1'b0;
      do_df <= 1'b0;
      so_dr <= do_df & so_df;
      so_df <= 1'b0;
    end else begin
      do_dr <= d_dr;
      do_df <= d_df;
      so_dr <= s_dr;
      so_df <= ~(s_dr ^ d_dr ^ d_df);
    end
  end
endmodule
