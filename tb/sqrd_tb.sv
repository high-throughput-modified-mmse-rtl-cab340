// sqrd_tb: streams NM random extended matrices D = [H ; d I] through the
// sorted QR pipeline (mostly back to back) and compares with a floating
// point sorted Modified Gram-Schmidt run here on the same quantised D:
// the permutation p, every entry of R and of Q (8 rows) within TOL, and
// the latency SQRD_LAT. Values are compared only for matrices where the
// sorting choice is clear-cut and every R(k,k) >= 0.3 (12-bit words cannot
// resolve worse-conditioned ones to TOL); the rest only pass through.
// Also counts the column swaps each main stage made.
module sqrd_tb;
  import hrsm_pkg::*;
  localparam int  NM   = 60;
  localparam real TOL  = 0.04;
  localparam real TOL_LAST = 0.2;
  localparam int  DIAG = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  qbeat_t        in_i, out_o;
  side_t         side_o;
  logic [NT-1:0] swap_o;

  sqrd dut (.*);

  typedef struct {
    real qr [2*NT][NT];
    real qi [2*NT][NT];
    real rr [NT][NT];
    real ri [NT][NT];
    int  p  [NT];
    bit  clear;
  } ref_t;

  int checks = 0, failures = 0, cycle = 0;
  int swaps [NT];
  ref_t refs [$];
  int   tin  [$];
  ref_t cur;

  function automatic ref_t decompose(real dr [2*NT][NT], real di [2*NT][NT]);
    ref_t o;
    real nrm [NT];
    o.clear = 1;
    o.qr = dr; o.qi = di;
    for (int c = 0; c < NT; c++) begin
      o.p[c] = c; nrm[c] = 0;
      for (int i = 0; i < 2 * NT; i++) nrm[c] += o.qr[i][c] ** 2 + o.qi[i][c] ** 2;
      for (int r = 0; r < NT; r++) begin o.rr[r][c] = 0; o.ri[r][c] = 0; end
    end
    for (int k = 0; k < NT; k++) begin
      int m; real t; int ti;
      m = k;
      for (int c = k + 1; c < NT; c++) if (nrm[c] < nrm[m]) m = c;
      for (int c = k; c < NT; c++)
        if (c != m && (nrm[c] - nrm[m]) < 0.05 * nrm[m] + 0.01) o.clear = 0;
      for (int i = 0; i < 2 * NT; i++) begin
        t = o.qr[i][k]; o.qr[i][k] = o.qr[i][m]; o.qr[i][m] = t;
        t = o.qi[i][k]; o.qi[i][k] = o.qi[i][m]; o.qi[i][m] = t;
      end
      for (int r = 0; r < NT; r++) begin
        t = o.rr[r][k]; o.rr[r][k] = o.rr[r][m]; o.rr[r][m] = t;
        t = o.ri[r][k]; o.ri[r][k] = o.ri[r][m]; o.ri[r][m] = t;
      end
      t = nrm[k]; nrm[k] = nrm[m]; nrm[m] = t;
      ti = o.p[k]; o.p[k] = o.p[m]; o.p[m] = ti;
      o.rr[k][k] = $sqrt(nrm[k]);
      if (o.rr[k][k] < 0.3) o.clear = 0;   // too ill-conditioned for 12-bit words
      for (int i = 0; i < 2 * NT; i++) begin o.qr[i][k] /= o.rr[k][k]; o.qi[i][k] /= o.rr[k][k]; end
      for (int c = k + 1; c < NT; c++) begin
        real ar, ai;
        ar = 0; ai = 0;
        for (int i = 0; i < 2 * NT; i++) begin
          ar += o.qr[i][k] * o.qr[i][c] + o.qi[i][k] * o.qi[i][c];
          ai += o.qr[i][k] * o.qi[i][c] - o.qi[i][k] * o.qr[i][c];
        end
        o.rr[k][c] = ar; o.ri[k][c] = ai;
        for (int i = 0; i < 2 * NT; i++) begin
          real br, bi;
          br = o.qr[i][c] - (ar * o.qr[i][k] - ai * o.qi[i][k]);
          bi = o.qi[i][c] - (ar * o.qi[i][k] + ai * o.qr[i][k]);
          o.qr[i][c] = br; o.qi[i][c] = bi;
        end
        nrm[c] -= ar * ar + ai * ai;
      end
    end
    return o;
  endfunction

  function automatic bit far(dat_t h, real x, real tol = TOL);
    real d;
    d = real'(h) / 256.0 - x;
    return (d > tol || d < -tol);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) for (int k = 0; k < NT; k++) if (swap_o[k]) swaps[k]++;
    if (in_i.valid && in_i.idx == '0) tin.push_back(cycle);
    if (rst_n && out_o.valid) begin
      int bad;
      bad = 0;
      if (out_o.idx == '0) begin
        int t;
        cur = refs.pop_front();
        t = tin.pop_front();
        checks++;
        if (cycle - t != SQRD_LAT) begin failures++; $display("latency %0d", cycle - t); end
        if (cur.clear) begin
          checks++;
          for (int k = 0; k < NT; k++) if (int'(side_o.perm[k]) != cur.p[k]) bad++;
          if (bad != 0) begin failures++; $display("permutation %h", side_o.perm); end
        end
        if (cur.clear) begin
          for (int r = 0; r < NT; r++)
            for (int c = r; c < NT; c++) begin
              checks++;
              if (far(side_o.r[r][c].re, cur.rr[r][c]) || far(side_o.r[r][c].im, cur.ri[r][c])) begin
                failures++;
                if (failures < 10) $display("R(%0d,%0d) = %f,%f expected %f,%f", r, c,
                  real'(side_o.r[r][c].re) / 256.0, real'(side_o.r[r][c].im) / 256.0, cur.rr[r][c], cur.ri[r][c]);
              end
            end
        end
      end
      if (cur.clear)
        for (int c = 0; c < NT; c++) begin
          checks++;
          // the last column inherits the rounding of three norm down-dates
          if (far(out_o.q[c].re, cur.qr[out_o.idx][c], (c == NT - 1) ? TOL_LAST : TOL) ||
              far(out_o.q[c].im, cur.qi[out_o.idx][c], (c == NT - 1) ? TOL_LAST : TOL)) begin
            failures++;
            if (failures < 10) $display("Q(%0d,%0d) = %f,%f expected %f,%f", out_o.idx, c, real'(out_o.q[c].re) / 256.0, real'(out_o.q[c].im) / 256.0, cur.qr[out_o.idx][c], cur.qi[out_o.idx][c]);
          end
        end
    end
  end

  function automatic real urand(real a);
    return a * real'(int'($urandom % 20001) - 10000) / 10000.0;
  endfunction

  initial begin
    int nclear;
    in_i = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    nclear = 0;
    for (int m = 0; m < NM; m++) begin
      real dr [2*NT][NT], di [2*NT][NT];
      ref_t o;
      qbeat_t b;
      for (int i = 0; i < 2 * NT; i++)
        for (int c = 0; c < NT; c++) begin
          int xr, xi;
          if (i < NT) begin
            // odd matrices: any channel; even ones: one strong entry per row
            xr = int'(urand((m % 2 == 1) ? 0.45 : 0.15) * 256.0);
            xi = int'(urand((m % 2 == 1) ? 0.45 : 0.15) * 256.0);
            if (m % 2 == 0 && c == (i + m / 2) % NT) xr += ((m / 2) % 3 == 0) ? -100 : 100 + 10 * c;
          end else begin
            xr = (i - NT == c) ? DIAG : 0;
            xi = 0;
          end
          dr[i][c] = xr / 256.0;
          di[i][c] = xi / 256.0;
        end
      o = decompose(dr, di);
      if (o.clear) nclear++;
      refs.push_back(o);
      for (int i = 0; i < 2 * NT; i++) begin
        b.valid = 1'b1;
        b.idx = IW'(i);
        for (int c = 0; c < NT; c++) begin
          b.q[c].re = dat_t'(int'(dr[i][c] * 256.0));
          b.q[c].im = dat_t'(int'(di[i][c] * 256.0));
        end
        in_i <= b;
        @(posedge clk);
      end
      if (m % 10 == 9) begin
        in_i <= '0;
        repeat (3) @(posedge clk);
      end
    end
    in_i <= '0;
    repeat (SQRD_LAT + 10) @(posedge clk);
    checks++;
    if (refs.size() != 0) begin failures++; $display("%0d matrices never came out", refs.size()); end
    for (int k = 0; k < NT - 1; k++) begin
      checks++;
      if (swaps[k] == 0) begin failures++; $display("no swap in main stage %0d", k); end
    end
    checks++;
    if (nclear < NM / 4) begin failures++; $display("only %0d clear-cut matrices", nclear); end
    $display("clear-cut matrices %0d of %0d; swaps %0d %0d %0d", nclear, NM, swaps[0], swaps[1], swaps[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NM * 12 + SQRD_LAT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
