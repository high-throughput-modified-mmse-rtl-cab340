// norm_stage_tb: streams NM random 8x4 matrices (mostly back to back, some
// idle gaps) and checks that each row leaves unchanged NORM_DLY clocks
// later and that, while a matrix's rows leave, side_o holds its column
// norms sum_i |d_ik|^2, p = [0 1 2 3] and R = 0.
module norm_stage_tb;
  import hrsm_pkg::*;
  localparam int NM = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  qbeat_t in_i, out_o;
  side_t  side_o;

  norm_stage dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  qbeat_t rows [$];
  int     tin  [$];
  logic [NT-1:0][NW-1:0] norms [$];
  logic [NT-1:0][NW-1:0] cur;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_i.valid) begin rows.push_back(in_i); tin.push_back(cycle); end
    if (rst_n && out_o.valid) begin
      qbeat_t e;
      int t;
      e = rows.pop_front();
      t = tin.pop_front();
      if (out_o.idx == '0) cur = norms.pop_front();
      checks++;
      if (out_o != e || cycle - t != NORM_DLY) begin
        failures++;
        if (failures < 10) $display("row mismatch or latency %0d", cycle - t);
      end
      checks++;
      if (side_o.norm != cur || side_o.r != '0 || side_o.perm != {2'd3, 2'd2, 2'd1, 2'd0}) begin
        failures++;
        if (failures < 10) $display("side mismatch %h expected %h", side_o.norm, cur);
      end
    end
  end

  initial begin
    in_i = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      logic [NT-1:0][NW-1:0] nrm;
      nrm = '0;
      for (int r = 0; r < NROW; r++) begin
        qbeat_t b;
        b.valid = 1'b1;
        b.idx   = IW'(r);
        for (int c = 0; c < NT; c++) begin
          int xr, xi;
          xr = (m == 0) ? -2048 : int'($urandom % 4096) - 2048;
          xi = (m == 0) ? -2048 : int'($urandom % 4096) - 2048;
          b.q[c].re = dat_t'(xr);
          b.q[c].im = dat_t'(xi);
          nrm[c] += NW'(xr * xr + xi * xi);
        end
        in_i <= b;
        @(posedge clk);
      end
      norms.push_back(nrm);
      if (m % 7 == 6) begin
        in_i <= '0;
        repeat (1 + $urandom % 5) @(posedge clk);
      end
    end
    in_i <= '0;
    repeat (NORM_DLY + 5) @(posedge clk);
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
