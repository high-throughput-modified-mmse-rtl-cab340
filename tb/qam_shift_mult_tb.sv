// qam_shift_mult_tb: for every 64-QAM point (both parts in +-1..+-7) and
// random data words, compares the shift-and-add product with an ordinary
// complex multiplication.
module qam_shift_mult_tb;
  import hrsm_pkg::*;

  cplx_t  a;
  sym_t   s;
  vcplx_t p;

  qam_shift_mult dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 50; n++)
      for (int sr = -7; sr <= 7; sr += 2)
        for (int si = -7; si <= 7; si += 2) begin
          int ar, ai, er, ei;
          ar = (n == 0) ? -2048 : (n == 1) ? 2047 : int'($urandom % 4096) - 2048;
          ai = (n == 0) ? 2047 : (n == 1) ? -2048 : int'($urandom % 4096) - 2048;
          a.re = dat_t'(ar); a.im = dat_t'(ai);
          s.re = LVW'(sr);   s.im = LVW'(si);
          #1;
          er = ar * sr - ai * si;
          ei = ar * si + ai * sr;
          checks++;
          if (int'(p.re) != er || int'(p.im) != ei) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d)*(%0d,%0d) = (%0d,%0d), expected (%0d,%0d)",
                                        ar, ai, sr, si, p.re, p.im, er, ei);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
