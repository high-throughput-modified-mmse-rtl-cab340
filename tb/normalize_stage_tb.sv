// normalize_stage_tb: main stage K = 0. For NM random matrices and random
// inverses it checks, with integer arithmetic written out here, that entry
// K of every row becomes round(q_K * inv / 2^12) (saturated to 12 bits),
// the other entries pass unchanged, row K of R holds
// round(sum_i conj(q'_iK) q_ic / 2^8) for c > K, the rest of the side data
// passes unchanged, and the delay is NRMZ_DLY clocks.
module normalize_stage_tb;
  import hrsm_pkg::*;
  localparam int NM = 60;
  localparam int K  = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  qbeat_t in_i, out_o;
  side_t  side_i, side_o;

  normalize_stage #(.K(K)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
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
      if (out_o != e || cycle - t != NRMZ_DLY) begin
        failures++;
        if (failures < 10) $display("row mismatch %h / %h, latency %0d", out_o.q[K], e.q[K], cycle - t);
      end
      checks++;
      if (side_o != cur) begin
        failures++;
        if (failures < 10) $display("side mismatch r %h expected %h", side_o.r[K], cur.r[K]);
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
      longint acr [NT], aci [NT];
      s = side_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                   $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      s.inv = WI'(256 + $urandom % 8000);
      e = s;
      for (int c = 0; c < NT; c++) begin acr[c] = 0; aci[c] = 0; end
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
        x.q[K].re = dat_t'(rs(longint'(b.q[K].re) * longint'(s.inv), 12));
        x.q[K].im = dat_t'(rs(longint'(b.q[K].im) * longint'(s.inv), 12));
        for (int c = K + 1; c < NT; c++) begin
          acr[c] += longint'(x.q[K].re) * x.q[c].re + longint'(x.q[K].im) * x.q[c].im;
          aci[c] += longint'(x.q[K].re) * x.q[c].im - longint'(x.q[K].im) * x.q[c].re;
        end
        in_i <= b;
        rows.push_back(x);
        @(posedge clk);
      end
      for (int c = K + 1; c < NT; c++) begin
        e.r[K][c].re = dat_t'(rs(acr[c], 8));
        e.r[K][c].im = dat_t'(rs(aci[c], 8));
      end
      sides.push_back(e);
      if (m % 9 == 8) begin
        in_i <= '0;
        repeat (1 + $urandom % 5) @(posedge clk);
      end
    end
    in_i <= '0;
    repeat (NRMZ_DLY + 5) @(posedge clk);
    checks++;
    if (rows.size() != 0) failures++;
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
