// SpaceWire transmit encoder (system clock domain).
//
// Turns one character per clock into a fixed-size token vector for the TX
// CDC FIFO: seven tokens of two bits plus a valid flag, wide enough for the
// longest character, the 14-bit time-code. Valid tokens are packed from token
// 6 downwards; token 6 is sent first, and of its two bits the upper one
// (sent on the rising edge of the transmit clock) first.
//   NULL  P 1 1 1 0 1 0 0         4 tokens
//   FCT   P 1 0 0 + NULL          6 tokens (a NULL always follows an FCT)
//   EOP   P 1 0 1 / EEP P 1 1 0   2 tokens
//   data  P 0 d0 .. d7            5 tokens
// P makes the parity odd over the previous character's data/control bits and
// this character's P and flag bits; the encoder remembers the XOR of the last
// character's data/control bits for that. link_reset clears it, so the first
// NULL after a reset starts with P = 0.
//
// Handshake: a character is taken (and pushed, combinationally, into the
// FIFO) when txc is not TXC_NONE and the FIFO is not full; rdy tells the link
// controller so. Which character to send is the link controller's choice.
//
// The token vector layout, the left packing and the NULL appended to every
// FCT follow the bridge's encoder; time-codes are not supported.
module spw_tx_encoder
  import spw2spi_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    link_reset,
  input  txc_e    txc,
  input  nchar_t  nchar,
  output logic    rdy,
  // TX CDC FIFO write side
  output logic    wr_en,
  output tokvec_t wr_data,
  input  logic    wr_full
);
  logic ppar, ppar_nxt;

  assign rdy   = !wr_full;
  assign wr_en = (txc != TXC_NONE) && !wr_full;

  always_comb begin
    logic [13:0] bits;    // bit 13 sent first
    logic [3:0]  n;       // number of bits
    bits     = '0;
    n        = '0;
    ppar_nxt = ppar;
    unique case (txc)
      TXC_NULL: begin
        bits     = {~(ppar ^ 1'b1), 3'b111, 4'b0100, 6'b0};
        n        = 4'd8;
        ppar_nxt = 1'b0;
      end
      TXC_FCT: begin
        bits     = {~(ppar ^ 1'b1), 3'b100, 4'b0111, 4'b0100, 2'b0};
        n        = 4'd12;
        ppar_nxt = 1'b0;
      end
      TXC_NCHAR: begin
        if (nchar[8]) begin
          bits     = {~(ppar ^ 1'b1), 1'b1, nchar[0] ? CC_EEP : CC_EOP, 10'b0};
          n        = 4'd4;
          ppar_nxt = 1'b1;
        end else begin
          for (int i = 0; i < 8; i++) bits[11-i] = nchar[i];
          bits[13] = ~ppar;
          bits[12] = 1'b0;
          n        = 4'd10;
          ppar_nxt = ^nchar[7:0];
        end
      end
      default: ;
    endcase
    for (int t = 0; t < TOKENS; t++) begin
      wr_data.data[t]  = bits[2*t +: 2];
      wr_data.valid[t] = (4'(2 * (TOKENS - t)) <= n);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || link_reset) ppar <= 1'b0;
    else if (wr_en)           ppar <= ppar_nxt;
  end
endmodule
