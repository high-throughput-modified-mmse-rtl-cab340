// sic_layer_tb: layer K = 1, 16-QAM. For random v, R and already detected
// symbols c_2, c_3 it checks that c_1 is the level pair closest to
// (v_1 - R(1,2) c_2 - R(1,3) c_3) / R(1,1), found here in floating point
// by trying every level; everything else in the beat must pass unchanged,
// one clock later. Values within a hair of a decision boundary are skipped.
module sic_layer_tb;
  import hrsm_pkg::*;
  localparam int K    = 1;
  localparam int MODB = 4;
  localparam int L    = 1 << (MODB / 2);
  localparam int N    = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  det_beat_t in_i, out_o;

  sic_layer #(.K(K), .MOD_BITS(MODB)) dut (.*);

  int checks = 0, failures = 0, skipped = 0, cycle = 0;
  det_beat_t exp_q [$];
  bit        use_q [$];

  function automatic int best(real x, output bit near);
    real bd = 1.0e30;
    int  bl = 0;
    for (int l = -L + 1; l <= L - 1; l += 2)
      if ((x - l) ** 2 < bd) begin bd = (x - l) ** 2; bl = l; end
    near = 0;
    for (int l = -L + 2; l <= L - 2; l += 2) if ((x - l) ** 2 < 1.0e-6) near = 1;
    return bl;
  endfunction

  function automatic int lvl();
    return 2 * int'($urandom % L) - L + 1;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_o.valid) begin
      det_beat_t e;
      bit u;
      e = exp_q.pop_front();
      u = use_q.pop_front();
      if (!u) skipped++;
      else begin
        checks++;
        if (out_o != e) begin
          failures++;
          if (failures < 10) $display("c1 %0d,%0d expected %0d,%0d", out_o.c[K].re, out_o.c[K].im, e.c[K].re, e.c[K].im);
        end
      end
    end
  end

  initial begin
    in_i = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      det_beat_t b, e;
      real ur, ui, rkk;
      bit n1, n2;
      b = '0;
      b.valid = 1'b1;
      for (int i = 0; i < NT; i++)
        for (int k = 0; k < NT; k++) begin
          b.r[i][k].re = dat_t'(int'($urandom % 512) - 256);
          b.r[i][k].im = dat_t'(int'($urandom % 512) - 256);
        end
      b.r[K][K].re = dat_t'(20 + $urandom % 300);
      b.r[K][K].im = '0;
      for (int k = 0; k < NT; k++) begin
        b.v[k].re = VW'(int'($urandom % 16384) - 8192);
        b.v[k].im = VW'(int'($urandom % 16384) - 8192);
        b.c[k].re = (k > K) ? LVW'(lvl()) : '0;
        b.c[k].im = (k > K) ? LVW'(lvl()) : '0;
      end
      b.perm = perm_t'($urandom);
      ur = real'(b.v[K].re);
      ui = real'(b.v[K].im);
      for (int j = K + 1; j < NT; j++) begin
        ur -= real'(b.r[K][j].re) * b.c[j].re - real'(b.r[K][j].im) * b.c[j].im;
        ui -= real'(b.r[K][j].re) * b.c[j].im + real'(b.r[K][j].im) * b.c[j].re;
      end
      rkk = real'(b.r[K][K].re);
      e = b;
      e.c[K].re = LVW'(best(ur / rkk, n1));
      e.c[K].im = LVW'(best(ui / rkk, n2));
      exp_q.push_back(e);
      use_q.push_back(!(n1 || n2));
      in_i <= b;
      @(posedge clk);
    end
    in_i <= '0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || skipped > N / 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
