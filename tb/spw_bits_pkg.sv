// SpaceWire character/bit reference model for the testbenches.
// Characters are given as ints: 0..255 data, CH_EOP, CH_EEP, CH_FCT,
// CH_ESC, CH_NULL (ESC then FCT). encode() appends the bits of a character
// in line order, parity odd over the previous character's data/control bits
// and this character's parity and flag. decode() walks a bit list from the
// start and returns the characters (NULL as one entry) and the number of
// parity errors.
package spw_bits_pkg;
  localparam int CH_EOP = 256, CH_EEP = 257, CH_FCT = 258, CH_ESC = 259, CH_NULL = 260;

  typedef bit bitq_t[$];
  typedef int charq_t[$];

  class spw_line;
    bit prev_ones = 1'b0;   // xor of the previous character's data bits

    function void ctrl(ref bitq_t q, input bit [1:0] code);  // code[1] first
      bit p;
      p = ~(prev_ones ^ 1'b1);
      q.push_back(p); q.push_back(1'b1); q.push_back(code[1]); q.push_back(code[0]);
      prev_ones = code[1] ^ code[0];
    endfunction

    function void encode(ref bitq_t q, input int ch);
      case (ch)
        CH_FCT:  ctrl(q, 2'b00);
        CH_EOP:  ctrl(q, 2'b01);
        CH_EEP:  ctrl(q, 2'b10);
        CH_ESC:  ctrl(q, 2'b11);
        CH_NULL: begin ctrl(q, 2'b11); ctrl(q, 2'b00); end
        default: begin
          bit [7:0] d;
          d = 8'(ch);
          q.push_back(~prev_ones); q.push_back(1'b0);
          for (int i = 0; i < 8; i++) q.push_back(d[i]);
          prev_ones = ^d;
        end
      endcase
    endfunction
  endclass

  function automatic charq_t decode(input bitq_t q, output int par_err);
    charq_t r;
    int i;
    bit prev, esc;
    prev = 1'b0; esc = 1'b0; par_err = 0; i = 0;
    while (i + 4 <= q.size()) begin
      bit p, f;
      p = q[i]; f = q[i+1];
      if ((prev ^ p ^ f) != 1'b1) par_err++;
      if (f) begin
        int code;
        code = {q[i+2], q[i+3]};
        prev = q[i+2] ^ q[i+3];
        i += 4;
        if (esc) begin
          esc = 1'b0;
          r.push_back(code == 0 ? CH_NULL : -1);
        end else if (code == 3) esc = 1'b1;
        else r.push_back(code == 0 ? CH_FCT : code == 1 ? CH_EOP : CH_EEP);
      end else begin
        bit [7:0] d;
        if (i + 10 > q.size()) break;
        for (int k = 0; k < 8; k++) d[k] = q[i+2+k];
        prev = ^d;
        i += 10;
        r.push_back(int'(d));
      end
    end
    return r;
  endfunction
endpackage
