// qam_shift_mult: complex product a * s of a data word a (an entry of R)
// and a QAM constellation point s, built from shifts, adders and a
// multiplexer instead of multipliers. Each part of s is an odd level
// (+-1, +-3, +-5, +-7) and x*level is x, x+2x, x+4x or 8x-x, chosen by the
// level, e.g. (a+jb)(1+3j) = (a-b-2b) + j(b+a+2a).
// Purely combinational. Output parts have VW bits.
module qam_shift_mult
  import hrsm_pkg::*;
(
  input  cplx_t  a,
  input  sym_t   s,
  output vcplx_t p
);
  // Multiply by an odd QAM level (+-1, +-3, +-5, +-7) with shifts and adds.
  function automatic logic signed [VW-1:0] lvl_mul(input logic signed [VW-1:0] x,
                                                   input logic signed [LVW-1:0] l);
    logic signed [VW-1:0] m;
    logic [LVW-1:0]       mag;
    mag = (l < 0) ? LVW'(-l) : LVW'(l);
    case (mag)
      LVW'(1):  m = x;
      LVW'(3):  m = x + (x <<< 1);
      LVW'(5):  m = x + (x <<< 2);
      LVW'(7):  m = (x <<< 3) - x;
      default:  m = '0;
    endcase
    return (l < 0) ? -m : m;
  endfunction

  logic signed [VW-1:0] ar, ai;
  assign ar = VW'(a.re);
  assign ai = VW'(a.im);

  // (ar + j ai)(sr + j si) = (ar*sr - ai*si) + j(ar*si + ai*sr)
  assign p.re = lvl_mul(ar, s.re) - lvl_mul(ai, s.im);
  assign p.im = lvl_mul(ar, s.im) + lvl_mul(ai, s.re);
endmodule
