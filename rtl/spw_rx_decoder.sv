// SpaceWire receive decoder (system clock domain).
//
// Pops one sample vector (2*SMP bits, oldest first) per clock from the RX CDC
// FIFO and runs the character-level state machine over every bit of it in
// the same clock: the machine's step is written once and unrolled over the
// vector. Character format (bits in transmission order): parity, flag, then
// two control bits (flag 1: FCT 00, EOP 01, EEP 10, ESC 11) or eight data
// bits least significant first (flag 0). Parity is odd over the previous
// character's data or control bits plus this character's parity and flag.
//
// After a reset the decoder hunts for the first NULL (ESC followed by FCT) at
// any bit position; from there on it tracks character boundaries. It reports,
// registered, one character per clock at most: got_null, got_fct, got_nchar
// with the N-char (data byte, EOP or EEP), and the errors parity, escape (ESC
// followed by ESC, EOP or EEP) and disconnect (no new bits for DISC_CYCLES
// clocks once a bit has been seen). ESC followed by a data byte is a
// time-code, which this codec does not support: it is dropped silently.
// rx_reset (the link controller in ErrorReset) returns it to hunting.
//
// One step per 2-bit sample, replicated across the vector, is the bridge's
// own decoder structure; its state diagram is not available, so the states
// used here (hunt, parity, flag, control, data) are this implementation's.
// With SMP up to 2 (4 bits per clock) at most one character can end per
// vector, which the single event output relies on.
module spw_rx_decoder
  import spw2spi_pkg::*;
#(
  parameter int unsigned SMP         = 2,
  parameter int unsigned DISC_CYCLES = 34   // 850 ns at 40 MHz
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_reset,
  // RX CDC FIFO read side
  output logic             rd_en,
  input  logic [2*SMP-1:0] rd_data,
  input  logic             rd_mty,
  output rx_evt_t          evt
);
  typedef enum logic [2:0] { D_HUNT, D_PAR, D_FLAG, D_CTRL, D_DATA } dmode_e;

  typedef struct packed {
    dmode_e     mode;
    logic [2:0] cnt;
    logic [7:0] sh;
    logic [6:0] hsh;    // hunt shift register
    logic       ppar;   // XOR of the previous character's data/control bits
    logic       pbit;   // parity bit of the current character
    logic       esc;    // ESC received, waiting for the next character
  } dstate_t;

  localparam int unsigned DW = $clog2(DISC_CYCLES + 1);

  // State and events carried together through the unrolled steps.
  typedef struct packed {
    dstate_t s;
    rx_evt_t e;
  } dstep_t;

  dstate_t       st, st_nxt;
  rx_evt_t       ev_nxt;
  dstep_t        x;
  logic          got_bit;
  logic [DW-1:0] idle;

  assign rd_en = !rd_mty;

  // One bit through the character state machine.
  function automatic dstep_t step(input logic b, input dstep_t xin);
    logic [1:0] cc;
    logic [7:0] byt;
    dstate_t    s;
    rx_evt_t    e;
    s = xin.s;
    e = xin.e;
    unique case (s.mode)
      D_HUNT: begin
        s.hsh = {s.hsh[5:0], b};
        if (s.hsh == 7'b1110100) begin   // 1 ESC, parity 0, 1 FCT
          e.got_null = 1'b1;
          s.mode = D_PAR;
          s.ppar = 1'b0;
          s.esc  = 1'b0;
        end
      end
      D_PAR: begin
        s.pbit = b;
        s.mode = D_FLAG;
      end
      D_FLAG: begin
        if (!(s.ppar ^ s.pbit ^ b)) begin
          e.err_par = 1'b1;
          s.mode = D_HUNT;
          s.hsh  = '0;
        end else begin
          s.mode = b ? D_CTRL : D_DATA;
          s.cnt  = '0;
        end
      end
      D_CTRL: begin
        s.sh  = {s.sh[6:0], b};
        s.cnt = s.cnt + 1'b1;
        if (s.cnt == 3'd2) begin
          cc     = s.sh[1:0];
          s.ppar = ^cc;
          s.mode = D_PAR;
          unique case (cc)
            CC_FCT: begin
              if (s.esc) e.got_null = 1'b1;
              else       e.got_fct  = 1'b1;
              s.esc = 1'b0;
            end
            CC_ESC: begin
              if (s.esc) begin e.err_esc = 1'b1; s.mode = D_HUNT; s.hsh = '0; end
              s.esc = 1'b1;
            end
            default: begin            // EOP or EEP
              if (s.esc) begin
                e.err_esc = 1'b1; s.mode = D_HUNT; s.hsh = '0;
              end else begin
                e.got_nchar = 1'b1;
                e.nchar     = (cc == CC_EOP) ? NCHAR_EOP : NCHAR_EEP;
              end
              s.esc = 1'b0;
            end
          endcase
        end
      end
      D_DATA: begin
        s.sh  = {b, s.sh[7:1]};         // least significant bit first
        s.cnt = s.cnt + 1'b1;
        if (s.cnt == 3'd0) begin        // eight bits taken
          byt    = s.sh;
          s.ppar = ^byt;
          s.mode = D_PAR;
          if (!s.esc) begin
            e.got_nchar = 1'b1;
            e.nchar     = {1'b0, byt};
          end
          s.esc = 1'b0;                 // a time-code is dropped
        end
      end
      default: s.mode = D_HUNT;
    endcase
    return '{s: s, e: e};
  endfunction

  always_comb begin
    x = '{s: st, e: '0};
    if (!rd_mty) begin
      for (int i = 2*SMP-1; i >= 0; i--) x = step(rd_data[i], x);
    end
    st_nxt = x.s;
    ev_nxt = x.e;
    if (got_bit && rd_mty && idle == DW'(DISC_CYCLES - 1)) ev_nxt.err_disc = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || rx_reset) begin
      st      <= '{mode: D_HUNT, default: '0};
      evt     <= '0;
      got_bit <= 1'b0;
      idle    <= '0;
    end else begin
      st  <= st_nxt;
      evt <= ev_nxt;
      if (!rd_mty) begin
        got_bit <= 1'b1;
        idle    <= '0;
      end else if (idle != DW'(DISC_CYCLES)) begin
        idle <= idle + 1'b1;
      end
    end
  end

  initial begin
    if (SMP > 2) $error("spw_rx_decoder: at most 2 samples per vector");
  end
endmodule
