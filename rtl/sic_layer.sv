// sic_layer: one layer of successive interference cancellation (SIC) with
// threshold comparison. Layer K removes from v_K the interference of the
// symbols already detected in the later layers,
//   v'_K = v_K - sum_{j>K} R(K,j) * c_j,
// using shift-and-add products (qam_shift_mult), then slices v'_K against
// multiples of R(K,K) (tc_slicer) to get c_K. Layers run from K = 3 (the
// strongest column after sorting, detected without interference) down to 0.
// Timing: one vector per clock, one clock of latency; the rest of the beat
// (v, R, p, earlier symbols) is passed on with it.
module sic_layer
  import hrsm_pkg::*;
#(
  parameter int K        = 0,
  parameter int MOD_BITS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  det_beat_t in_i,
  output det_beat_t out_o
);
  vcplx_t prod [NT];
  for (genvar j = 0; j < NT; j++) begin : g_mul
    qam_shift_mult u_m (.a(in_i.r[K][j]), .s(in_i.c[j]), .p(prod[j]));
  end

  vcplx_t vc;
  always_comb begin
    vc = in_i.v[K];
    for (int j = K + 1; j < NT; j++) begin
      vc.re = vc.re - prod[j].re;
      vc.im = vc.im - prod[j].im;
    end
  end

  sym_t cs;
  logic [MOD_BITS/2-1:0] ir, ii;
  tc_slicer #(.MOD_BITS(MOD_BITS)) u_tc (
    .v(vc), .rkk(in_i.r[K][K].re), .c(cs), .idx_re(ir), .idx_im(ii));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_o <= '0;
    else begin
      out_o      <= in_i;
      out_o.c[K] <= cs;
    end
  end
endmodule
