// reswap_sc: last detector step. Puts the detected symbols back into
// transmit-antenna order with the permutation p (c[p(k)] = c_sorted[k]),
// takes the QAM symbol x from antenna 0 (the first SC codeword entry is
// always 1) and recovers the other SC codeword entries s_i in {1, j, -1, -j}
// by comparing signs instead of dividing: since c_i = s_i * x and square
// QAM points never lie on an axis, s_i is the quadrant of c_i minus the
// quadrant of x (modulo 4), both quadrants read from the sign bits.
// Output bits (MOD_BITS + 2*(NT-1) per vector):
//   bits[MOD_BITS-1:0]             = {level index of Re x, level index of Im x}
//   bits[MOD_BITS+2i-1 -: 2], i>=1 = rotation of s_i: 0:+1 1:+j 2:-1 3:-j
// Level index n maps to level 2n-L+1. Timing: one register, one vector per clock.
module reswap_sc
  import hrsm_pkg::*;
#(
  parameter int MOD_BITS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  det_beat_t                     in_i,
  output logic                          out_valid,
  output sym_t  [NT-1:0]                out_sym,    // per transmit antenna
  output logic  [MOD_BITS+2*(NT-1)-1:0] out_bits,
  output perm_t                         out_perm
);
  localparam int L  = 1 << (MOD_BITS / 2);
  localparam int HB = MOD_BITS / 2;

  function automatic logic [1:0] quadrant(input sym_t s);
    case ({s.re < 0, s.im < 0})
      2'b00:   return 2'd0;   // +re +im
      2'b10:   return 2'd1;   // -re +im
      2'b11:   return 2'd2;   // -re -im
      default: return 2'd3;   // +re -im
    endcase
  endfunction

  sym_t [NT-1:0] cs;
  logic [MOD_BITS+2*(NT-1)-1:0] b;
  always_comb begin
    cs = '0;
    for (int k = 0; k < NT; k++) cs[in_i.perm[k]] = in_i.c[k];
    b = '0;
    b[MOD_BITS-1:HB] = HB'((int'(cs[0].re) + L - 1) / 2);
    b[HB-1:0]        = HB'((int'(cs[0].im) + L - 1) / 2);
    for (int i = 1; i < NT; i++)
      b[MOD_BITS + 2*i - 1 -: 2] = quadrant(cs[i]) - quadrant(cs[0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sym <= '0; out_bits <= '0; out_perm <= '0;
    end else begin
      out_valid <= in_i.valid;
      out_sym   <= cs;
      out_bits  <= b;
      out_perm  <= in_i.perm;
    end
  end
endmodule
