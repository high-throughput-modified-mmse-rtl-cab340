// tc_slicer_tb: random values v and scales R(k,k); the expected point is the
// constellation point c minimising |v - R c| found by trying every level
// in floating point (values far outside clamp to the outer level).
// Exact ties on a threshold are skipped.
module tc_slicer_tb;
  import hrsm_pkg::*;
  localparam int MODB = 4;
  localparam int L    = 1 << (MODB / 2);

  vcplx_t v;
  dat_t   rkk;
  sym_t   c;
  logic [MODB/2-1:0] idx_re, idx_im;

  tc_slicer #(.MOD_BITS(MODB)) dut (.*);

  int checks = 0, failures = 0;

  function automatic int best(real x, real r, output bit tie);
    real bd = 1.0e30;
    int  bl = 0;
    tie = 0;
    for (int l = -L + 1; l <= L - 1; l += 2) begin
      real dd = (x - r * l) ** 2;
      if (dd == bd) tie = 1;
      if (dd < bd) begin bd = dd; bl = l; tie = 0; end
    end
    return bl;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int r, vr, vi, er, ei;
      bit t1, t2;
      r  = 1 + int'($urandom % 600);
      vr = int'($urandom % (10 * r + 1)) - 5 * r;
      vi = int'($urandom % (10 * r + 1)) - 5 * r;
      rkk = dat_t'(r);
      v.re = VW'(vr); v.im = VW'(vi);
      #1;
      er = best(real'(vr), real'(r), t1);
      ei = best(real'(vi), real'(r), t2);
      if (t1 || t2) continue;
      checks++;
      if (int'(c.re) != er || int'(c.im) != ei ||
          int'(idx_re) != (er + L - 1) / 2 || int'(idx_im) != (ei + L - 1) / 2) begin
        failures++;
        if (failures < 10) $display("v=(%0d,%0d) r=%0d -> (%0d,%0d) expected (%0d,%0d)",
                                    vr, vi, r, c.re, c.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
