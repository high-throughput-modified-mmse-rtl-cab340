// hrsm_detector_tb: end-to-end test of the HR-SM detector at its default
// parameters (16-QAM). Sends NFR frames of a random 4x4 channel H plus 8
// received vectors y = H c each, c = s x with a random QAM symbol x and a
// random spatial codeword s (s_0 = 1, s_i in {1, j, -1, -j}), and compares
// the detected bits with the transmitted ones. An independent floating
// point model of the sorted-QR MMSE detector runs beside it: a vector that
// even the floating point model cannot recover (ill-conditioned channel)
// is not held against the hardware; all others must match exactly.
// Also checks the in-to-out latency, and counts the mechanisms: column
// swaps in each sorting main stage, every codeword rotation, every QAM
// level, frames sent back to back, frames after an idle gap, and frames
// whose channel matrix serves only 4 vectors instead of 8.
module hrsm_detector_tb;
  import hrsm_pkg::*;

  localparam int NFR     = 200;
  localparam int MODB    = 4;
  localparam int L       = 1 << (MODB / 2);
  localparam int LATENCY = SQRD_LAT + 4 + DET_LAT;
  localparam int DIAG    = 8;                // 1/sqrt(Es) = 8/256

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       in_valid;
  logic [IW-1:0]              in_idx;
  row_t                       h_row, y_vec;
  logic                       y_valid;
  dat_t                       mmse_diag;
  logic                       out_valid;
  logic [MODB+2*(NT-1)-1:0]   out_bits;
  sym_t [NT-1:0]              out_sym;
  perm_t                      out_perm;
  logic [NT-1:0]              sort_swap;

  hrsm_detector dut (.*);

  int checks = 0, failures = 0, skipped = 0;
  int swaps [NT];
  int rot_seen [4];
  int lvl_seen [L];
  int b2b_frames = 0, gap_frames = 0, half_frames = 0;
  int cycle = 0, first_in = -1, first_out = -1;

  // expected results, in order
  logic [MODB+2*(NT-1)-1:0] exp_q [$];
  bit                       ok_q  [$];

  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- floating point reference ----------------
  real hr [NT][NT], hi [NT][NT];        // quantised channel, real values

  function automatic int slice(real v, real rkk);
    int n = 0;
    for (int j = 0; j < L - 1; j++) if (v >= (2 * j - L + 2) * rkk) n++;
    return 2 * n - L + 1;
  endfunction

  // returns 1 when the floating point detector recovers (cr, ci)
  function automatic bit ref_detect(real yr[NT], real yi[NT], int cr[NT], int ci[NT]);
    real qr [2*NT][NT], qi [2*NT][NT];
    real rr [NT][NT], ri [NT][NT];
    real nrm [NT];
    int  p [NT];
    real vr [NT], vi [NT];
    int  sr [NT], si [NT];
    for (int i = 0; i < 2 * NT; i++)
      for (int c = 0; c < NT; c++) begin
        qr[i][c] = (i < NT) ? hr[i][c] : ((i - NT == c) ? DIAG / 256.0 : 0.0);
        qi[i][c] = (i < NT) ? hi[i][c] : 0.0;
      end
    for (int c = 0; c < NT; c++) begin
      p[c] = c; nrm[c] = 0;
      for (int i = 0; i < 2 * NT; i++) nrm[c] += qr[i][c] ** 2 + qi[i][c] ** 2;
      for (int r = 0; r < NT; r++) begin rr[r][c] = 0; ri[r][c] = 0; end
    end
    for (int k = 0; k < NT; k++) begin
      int m = k; real t; int ti;
      for (int c = k + 1; c < NT; c++) if (nrm[c] < nrm[m]) m = c;
      for (int i = 0; i < 2 * NT; i++) begin
        t = qr[i][k]; qr[i][k] = qr[i][m]; qr[i][m] = t;
        t = qi[i][k]; qi[i][k] = qi[i][m]; qi[i][m] = t;
      end
      for (int r = 0; r < NT; r++) begin
        t = rr[r][k]; rr[r][k] = rr[r][m]; rr[r][m] = t;
        t = ri[r][k]; ri[r][k] = ri[r][m]; ri[r][m] = t;
      end
      t = nrm[k]; nrm[k] = nrm[m]; nrm[m] = t;
      ti = p[k]; p[k] = p[m]; p[m] = ti;
      rr[k][k] = $sqrt(nrm[k]);
      for (int i = 0; i < 2 * NT; i++) begin qr[i][k] /= rr[k][k]; qi[i][k] /= rr[k][k]; end
      for (int c = k + 1; c < NT; c++) begin
        real ar = 0, ai = 0;
        for (int i = 0; i < 2 * NT; i++) begin
          ar += qr[i][k] * qr[i][c] + qi[i][k] * qi[i][c];
          ai += qr[i][k] * qi[i][c] - qi[i][k] * qr[i][c];
        end
        rr[k][c] = ar; ri[k][c] = ai;
        for (int i = 0; i < 2 * NT; i++) begin
          real br = qr[i][c] - (ar * qr[i][k] - ai * qi[i][k]);
          real bi = qi[i][c] - (ar * qi[i][k] + ai * qr[i][k]);
          qr[i][c] = br; qi[i][c] = bi;
        end
        nrm[c] -= ar * ar + ai * ai;
      end
    end
    for (int k = 0; k < NT; k++) begin
      vr[k] = 0; vi[k] = 0;
      for (int i = 0; i < NT; i++) begin
        vr[k] += qr[i][k] * yr[i] + qi[i][k] * yi[i];
        vi[k] += qr[i][k] * yi[i] - qi[i][k] * yr[i];
      end
    end
    for (int k = NT - 1; k >= 0; k--) begin
      real ur = vr[k], ui = vi[k];
      for (int j = k + 1; j < NT; j++) begin
        ur -= rr[k][j] * sr[j] - ri[k][j] * si[j];
        ui -= rr[k][j] * si[j] + ri[k][j] * sr[j];
      end
      sr[k] = slice(ur, rr[k][k]);
      si[k] = slice(ui, rr[k][k]);
    end
    for (int k = 0; k < NT; k++)
      if (sr[k] != cr[p[k]] || si[k] != ci[p[k]]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int q8(real x);
    real s = x * 256.0;
    int v = (s >= 0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return v;
  endfunction

  function automatic real urand(real a);   // uniform in [-a, a]
    return a * real'(int'($urandom % 20001) - 10000) / 10000.0;
  endfunction

  // ---------------- stimulus ----------------
  task automatic send_frame(bit half);
    int hq_r [NT][NT], hq_i [NT][NT];
    int order [NT];
    real scale [NT];
    // a strong entry per row in a random column, columns scaled differently
    for (int c = 0; c < NT; c++) begin order[c] = c; scale[c] = 0.6 + 0.4 * ($urandom % 100) / 100.0; end
    order.shuffle();
    for (int i = 0; i < NT; i++)
      for (int c = 0; c < NT; c++) begin
        real ar = urand(0.12), ai = urand(0.12);
        if (c == order[i]) begin
          ar += (($urandom % 2) ? 0.4 : -0.4);
          ai += urand(0.1);
        end
        hq_r[i][c] = q8(ar * scale[c]);
        hq_i[i][c] = q8(ai * scale[c]);
        hr[i][c] = hq_r[i][c] / 256.0;
        hi[i][c] = hq_i[i][c] / 256.0;
      end
    for (int n = 0; n < NROW; n++) begin
      int xr, xi, rot [NT], cr [NT], ci [NT];
      real yr [NT], yi [NT];
      logic [MODB+2*(NT-1)-1:0] bits;
      xr = $urandom % L; xi = $urandom % L;
      bits = '0;
      bits[MODB-1:MODB/2] = xr[MODB/2-1:0];
      bits[MODB/2-1:0]    = xi[MODB/2-1:0];
      cr[0] = 2 * xr - L + 1; ci[0] = 2 * xi - L + 1; rot[0] = 0;
      for (int a = 1; a < NT; a++) begin
        rot[a] = $urandom % 4;
        bits[MODB + 2*a - 1 -: 2] = rot[a][1:0];
        case (rot[a])       // multiply x by j^rot
          0: begin cr[a] =  cr[0]; ci[a] =  ci[0]; end
          1: begin cr[a] = -ci[0]; ci[a] =  cr[0]; end
          2: begin cr[a] = -cr[0]; ci[a] = -ci[0]; end
          default: begin cr[a] = ci[0]; ci[a] = -cr[0]; end
        endcase
      end
      for (int i = 0; i < NT; i++) begin
        yr[i] = 0; yi[i] = 0;
        for (int c = 0; c < NT; c++) begin
          yr[i] += hr[i][c] * cr[c] - hi[i][c] * ci[c];
          yi[i] += hr[i][c] * ci[c] + hi[i][c] * cr[c];
        end
      end
      // every third frame carries only 4 vectors (on clocks 0, 2, 4, 6)
      y_valid <= !(half && n % 2 == 1);
      if (!(half && n % 2 == 1)) begin
        exp_q.push_back(bits);
        ok_q.push_back(ref_detect(yr, yi, cr, ci));
      end
      in_valid <= 1'b1;
      in_idx   <= IW'(n);
      for (int i = 0; i < NT; i++) begin
        y_vec[i].re <= dat_t'(q8(yr[i]));
        y_vec[i].im <= dat_t'(q8(yi[i]));
        h_row[i].re <= (n < NT) ? dat_t'(hq_r[n][i]) : '0;
        h_row[i].im <= (n < NT) ? dat_t'(hq_i[n][i]) : '0;
      end
      @(posedge clk);
    end
  endtask

  // ---------------- checking ----------------
  // latency: clocks from the first input vector to the first result
  always @(posedge clk) begin
    if (in_valid && first_in < 0) first_in = cycle;
    if (rst_n) for (int k = 0; k < NT; k++) if (sort_swap[k]) swaps[k]++;
    if (rst_n && out_valid) begin
      logic [MODB+2*(NT-1)-1:0] e;
      bit ok;
      if (first_out < 0) begin
        first_out = cycle;
        checks++;
        if (first_out - first_in != LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", first_out - first_in, LATENCY);
        end
      end
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        ok = ok_q.pop_front();
        if (!ok) skipped++;
        else begin
          checks++;
          if (out_bits !== e) begin
            failures++;
            if (failures < 10) $display("bits %h expected %h (cycle %0d)", out_bits, e, cycle);
          end else begin
            for (int a = 1; a < NT; a++) rot_seen[e[MODB + 2*a - 1 -: 2]]++;
            lvl_seen[e[MODB-1:MODB/2]]++;
          end
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_idx = '0; h_row = '0; y_vec = '0; y_valid = 0; mmse_diag = dat_t'(DIAG);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NFR; f++) begin
      send_frame(f % 3 == 2);
      if (f % 3 == 2) half_frames++;
      if (f % 5 == 4) begin
        in_valid <= 1'b0;
        repeat (1 + $urandom % 12) @(posedge clk);
        gap_frames++;
      end else b2b_frames++;
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d vectors never came out", exp_q.size()); end
    for (int k = 0; k < NT - 1; k++) begin
      checks++;
      if (swaps[k] == 0) begin failures++; $display("no column swap in main stage %0d", k); end
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rot_seen[r] == 0) begin failures++; $display("codeword rotation %0d never detected", r); end
    end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (lvl_seen[l] == 0) begin failures++; $display("QAM level %0d never detected", l); end
    end
    checks += 3;
    if (b2b_frames == 0) failures++;
    if (gap_frames == 0) failures++;
    if (half_frames == 0) failures++;
    // the floating point model must recover nearly all vectors
    checks++;
    if (skipped * 10 > NFR * NROW) begin failures++; $display("too many unrecoverable vectors"); end
    $display("swaps per stage %0d %0d %0d %0d, vectors skipped %0d, frames back-to-back %0d, after gap %0d, with 4 vectors %0d",
             swaps[0], swaps[1], swaps[2], swaps[3], skipped, b2b_frames, gap_frames, half_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFR * 30 + LATENCY + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
