// tc_slicer: threshold comparison (TC). Decides the QAM point c that
// minimises |v - R(k,k) c| without dividing v by R(k,k): the real and the
// imaginary part of v are each compared with the thresholds
// 0, +-2 R(k,k), +-4 R(k,k), ... (the decision boundaries between the odd
// levels, scaled by R(k,k)); the number of thresholds at or below the value
// gives the level index. Values beyond the outer thresholds are clamped to
// the outer level. Square 2^MOD_BITS-QAM, levels -L+1..L-1, L = 2^(MOD_BITS/2).
// Purely combinational.
module tc_slicer
  import hrsm_pkg::*;
#(
  parameter int MOD_BITS = 4
) (
  input  vcplx_t       v,
  input  dat_t         rkk,      // R(k,k), real and positive
  output sym_t         c,
  output logic [MOD_BITS/2-1:0] idx_re,
  output logic [MOD_BITS/2-1:0] idx_im
);
  localparam int L  = 1 << (MOD_BITS / 2);
  localparam int HB = MOD_BITS / 2;

  always_comb begin
    logic [HB:0] nre, nim;
    logic signed [VW-1:0] t;
    nre = '0;
    nim = '0;
    for (int j = 0; j < L - 1; j++) begin
      t = VW'(rkk) * VW'(2 * j - L + 2);
      if (v.re >= t) nre = nre + 1'b1;
      if (v.im >= t) nim = nim + 1'b1;
    end
    idx_re = nre[HB-1:0];
    idx_im = nim[HB-1:0];
    c.re   = LVW'(2 * int'(nre) - L + 1);
    c.im   = LVW'(2 * int'(nim) - L + 1);
  end

  initial assert (MOD_BITS inside {2, 4, 6}) else $error("tc_slicer: MOD_BITS must be 2, 4 or 6");
endmodule
