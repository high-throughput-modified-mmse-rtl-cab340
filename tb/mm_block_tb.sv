// mm_block_tb: one random y and Q1 every clock; checks
// v_k = round(sum_i conj(Q1(i,k)) y_i / 2^8) (saturated to VW bits) computed
// here with integers, that R and p ride along unchanged, and the latency of
// MM_LAT clocks.
module mm_block_tb;
  import hrsm_pkg::*;
  localparam int N = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   in_valid;
  row_t                   y;
  cplx_t [NT-1:0][NT-1:0] q1, r;
  perm_t                  perm;
  det_beat_t              out_o;

  mm_block dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  det_beat_t exp_q [$];
  int        tin [$];

  function automatic longint rsv(longint x);
    longint t = (x + 128) >>> 8;
    if (t > (1 << (VW - 1)) - 1) t = (1 << (VW - 1)) - 1;
    if (t < -(1 << (VW - 1)))    t = -(1 << (VW - 1));
    return t;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid) begin
      det_beat_t e;
      e = '0;
      e.valid = 1'b1;
      e.r = r;
      e.perm = perm;
      for (int k = 0; k < NT; k++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int i = 0; i < NT; i++) begin
          sr += longint'(q1[i][k].re) * y[i].re + longint'(q1[i][k].im) * y[i].im;
          si += longint'(q1[i][k].re) * y[i].im - longint'(q1[i][k].im) * y[i].re;
        end
        e.v[k].re = VW'(rsv(sr));
        e.v[k].im = VW'(rsv(si));
      end
      exp_q.push_back(e);
      tin.push_back(cycle);
    end
    if (rst_n && out_o.valid) begin
      det_beat_t e;
      int t;
      e = exp_q.pop_front();
      t = tin.pop_front();
      checks++;
      if (out_o != e || cycle - t != MM_LAT) begin
        failures++;
        if (failures < 10) $display("v0 %0d,%0d expected %0d,%0d latency %0d",
                                    out_o.v[0].re, out_o.v[0].im, e.v[0].re, e.v[0].im, cycle - t);
      end
    end
  end

  initial begin
    in_valid = 0; y = '0; q1 = '0; r = '0; perm = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      @(posedge clk);
      in_valid <= (n % 11 != 5);
      for (int i = 0; i < NT; i++) begin
        y[i].re <= dat_t'((n < 3) ? 2047 : int'($urandom % 4096) - 2048);
        y[i].im <= dat_t'((n < 3) ? -2048 : int'($urandom % 4096) - 2048);
        for (int k = 0; k < NT; k++) begin
          q1[i][k].re <= dat_t'((n < 3) ? 2047 : int'($urandom % 512) - 256);
          q1[i][k].im <= dat_t'((n < 3) ? 2047 : int'($urandom % 512) - 256);
          r[i][k] <= cplx_t'($urandom);
        end
      end
      perm <= perm_t'($urandom);
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (MM_LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
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
