// update_stage_tb: main stage K = 1. For NM random matrices and random rows
// of R it checks, with integer arithmetic written out here, that columns
// c > K of every row become round(q_c - R(K,c) q_K) (saturated), columns
// up to K pass unchanged, norms c > K drop by |R(K,c)|^2 (not below zero),
// the rest of the side data passes unchanged, and the delay is UPD_DLY.
module update_stage_tb;
  import hrsm_pkg::*;
  localparam int NM = 60;
  localparam int K  = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  qbeat_t in_i, out_o;
  side_t  side_i, side_o;

  update_stage #(.K(K)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, clamps = 0;
  qbeat_t rows [$];
  int     tin  [$];
  side_t  sides [$];
  side_t  cur;

  function automatic longint rs(longint x, int sh);
    longint y = (x + (longint'(1) << (sh - 1))) >>> sh;
    if (y > 2047) y = 2047;
    if (y < -2048) y = -2048;
    return y;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_i.valid) tin.push_back(cycle);
    if (rst_n && out_o.valid) begin
      qbeat_t e;
      int t;
      e = rows.pop_front();
      t = tin.pop_front();
      if (out_o.idx == '0) cur = sides.pop_front();
      checks++;
      if (out_o != e || cycle - t != UPD_DLY) begin
        failures++;
        if (failures < 10) $display("row mismatch, latency %0d", cycle - t);
      end
      checks++;
      if (side_o != cur) begin
        failures++;
        if (failures < 10) $display("side mismatch %h\n          expected %h", side_o, cur);
      end
    end
  end

  initial begin
    in_i = '0; side_i = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      side_t s, e;
      s = side_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                   $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      for (int c = 0; c < NT; c++) begin
        s.r[K][c].re = dat_t'(int'($urandom % 512) - 256);
        s.r[K][c].im = dat_t'(int'($urandom % 512) - 256);
        s.norm[c]    = NW'($urandom % 200000);
      end
      e = s;
      for (int c = K + 1; c < NT; c++) begin
        longint m2;
        m2 = longint'(s.r[K][c].re) * s.r[K][c].re + longint'(s.r[K][c].im) * s.r[K][c].im;
        if (longint'(s.norm[c]) > m2) e.norm[c] = NW'(longint'(s.norm[c]) - m2);
        else begin e.norm[c] = '0; clamps++; end
      end
      sides.push_back(e);
      side_i <= s;
      for (int r = 0; r < NROW; r++) begin
        qbeat_t b, x;
        b.valid = 1'b1;
        b.idx   = IW'(r);
        for (int c = 0; c < NT; c++) begin
          b.q[c].re = dat_t'(int'($urandom % 1024) - 512);
          b.q[c].im = dat_t'(int'($urandom % 1024) - 512);
        end
        x = b;
        for (int c = K + 1; c < NT; c++) begin
          longint pr, pi;
          pr = longint'(s.r[K][c].re) * b.q[K].re - longint'(s.r[K][c].im) * b.q[K].im;
          pi = longint'(s.r[K][c].re) * b.q[K].im + longint'(s.r[K][c].im) * b.q[K].re;
          x.q[c].re = dat_t'(rs(longint'(b.q[c].re) * 256 - pr, 8));
          x.q[c].im = dat_t'(rs(longint'(b.q[c].im) * 256 - pi, 8));
        end
        in_i <= b;
        rows.push_back(x);
        @(posedge clk);
      end
      if (m % 9 == 8) begin
        in_i <= '0;
        repeat (1 + $urandom % 5) @(posedge clk);
      end
    end
    in_i <= '0;
    repeat (UPD_DLY + 5) @(posedge clk);
    checks++;
    if (rows.size() != 0 || clamps == 0) begin failures++; $display("left %0d, clamps %0d", rows.size(), clamps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NM * 16 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
