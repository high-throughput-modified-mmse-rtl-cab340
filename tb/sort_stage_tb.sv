// sort_stage_tb: main stage K = 1. For NM random matrices with random
// norms, permutation and R it checks that the column with the smallest
// remaining norm (K..3, lowest index on a tie) is swapped into column K in
// the rows, norms, p and the rows of R above K, that R(K,K) = floor(sqrt)
// of that norm (limited to 2047), that inv = floor(2^20 / R(K,K)) (limited
// to 65535), the swap flag, and the delay of SORT_DLY clocks.
module sort_stage_tb;
  import hrsm_pkg::*;
  localparam int NM = 60;
  localparam int K  = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  qbeat_t in_i, out_o;
  side_t  side_i, side_o;
  logic   swap_o;

  sort_stage #(.K(K)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, nswaps = 0, exp_swaps = 0;
  qbeat_t rows [$];
  int     tin  [$];
  side_t  sides [$];
  side_t  cur;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && swap_o) nswaps++;
    if (in_i.valid) tin.push_back(cycle);
    if (rst_n && out_o.valid) begin
      qbeat_t e;
      int t;
      e = rows.pop_front();
      t = tin.pop_front();
      if (out_o.idx == '0) cur = sides.pop_front();
      checks++;
      if (out_o != e || cycle - t != SORT_DLY) begin
        failures++;
        if (failures < 10) $display("row mismatch, latency %0d", cycle - t);
      end
      checks++;
      if (side_o != cur) begin
        failures++;
        if (failures < 10) $display("side mismatch: rkk %0d inv %0d, expected %0d %0d",
                                    side_o.r[K][K].re, side_o.inv, cur.r[K][K].re, cur.inv);
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
      int sel;
      longint nmin, rk, iv;
      s = '0;
      for (int c = 0; c < NT; c++) begin
        s.norm[c] = (m % 5 == 0) ? NW'({$urandom} >> 5) : NW'($urandom % (1 << 22));
        if (m == 3) s.norm[c] = NW'(1000);          // a tie
        if (m == 4) s.norm[c] = NW'(c == 2 ? 0 : 50); // zero norm
      end
      for (int c = 0; c < NT; c++) s.perm[c] = PW'(c);
      for (int c = 0; c < NT; c++) begin
        int o;
        logic [PW-1:0] t;
        o = int'($urandom % NT);
        t = s.perm[c]; s.perm[c] = s.perm[o]; s.perm[o] = t;
      end
      for (int r = 0; r < NT; r++)
        for (int c = 0; c < NT; c++) s.r[r][c] = cplx_t'($urandom);
      // expected
      sel = K;
      for (int c = K + 1; c < NT; c++) if (s.norm[c] < s.norm[sel]) sel = c;
      if (sel != K) exp_swaps++;
      e = s;
      e.norm[K] = s.norm[sel]; e.norm[sel] = s.norm[K];
      e.perm[K] = s.perm[sel]; e.perm[sel] = s.perm[K];
      for (int r = 0; r < K; r++) begin e.r[r][K] = s.r[r][sel]; e.r[r][sel] = s.r[r][K]; end
      nmin = longint'(s.norm[sel]);
      rk = 0;
      while ((rk + 1) * (rk + 1) <= nmin) rk++;
      if (rk > 2047) rk = 2047;
      iv = (rk == 0) ? 65535 : (longint'(1) << 20) / rk;
      if (iv > 65535) iv = 65535;
      e.r[K][K].re = dat_t'(rk);
      e.r[K][K].im = '0;
      e.inv = WI'(iv);
      sides.push_back(e);
      side_i <= s;
      for (int r = 0; r < NROW; r++) begin
        qbeat_t b, x;
        b.valid = 1'b1;
        b.idx   = IW'(r);
        b.q     = row_t'({$urandom, $urandom, $urandom});
        x = b;
        x.q[K] = b.q[sel];
        x.q[sel] = b.q[K];
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
    repeat (SORT_DLY + 5) @(posedge clk);
    checks++;
    if (rows.size() != 0 || nswaps != exp_swaps) begin
      failures++;
      $display("left %0d rows, swaps %0d expected %0d", rows.size(), nswaps, exp_swaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NM * 16 + SORT_DLY + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
