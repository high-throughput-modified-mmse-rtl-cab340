// normalize_stage: second sub-stage of main stage K of the sorted QR
// pipeline (Algorithm 1, lines 8-10). Each row's entry of column K is
// multiplied by 1/R(K,K) (side_i.inv), which normalises Q_K without a
// divider, and R(K,k1) = Q_K^H Q_k1 is accumulated for k1 = K+1..3 over the
// 8 rows of the matrix. For K = 3 only the normalisation is done.
// Timing: rows leave DLY = 10 clocks after they enter (one register for
// the multiplication, then a delay line until the 8-row sums are complete);
// side_o (with row K of R filled in) is valid from the clock row 0 leaves.
module normalize_stage
  import hrsm_pkg::*;
#(
  parameter int K = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  qbeat_t in_i,
  input  side_t  side_i,
  output qbeat_t out_o,
  output side_t  side_o
);
  localparam int DLY = NRMZ_DLY;
  localparam int AW  = 2 * W + 4;   // accumulator of 8 products

  // ---- normalisation: q_K * inv, rounded back to F fraction bits ----
  qbeat_t row_n, row_r;
  always_comb begin
    logic signed [W+WI:0] pr, pi;
    row_n = in_i;
    pr = in_i.q[K].re * $signed({1'b0, side_i.inv});
    pi = in_i.q[K].im * $signed({1'b0, side_i.inv});
    row_n.q[K].re = rnd_sat(48'(pr), FI);
    row_n.q[K].im = rnd_sat(48'(pi), FI);
  end

  side_t side_h;   // side data of the matrix now in row_r
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_r  <= '0;
      side_h <= '0;
    end else begin
      row_r <= row_n;
      if (in_i.valid && in_i.idx == '0) side_h <= side_i;
    end
  end

  // ---- R(K,k1) = sum over rows of conj(q_K) * q_k1 ----
  logic signed [AW-1:0] acc_re [NT], acc_im [NT];
  logic signed [AW-1:0] sum_re [NT], sum_im [NT];
  always_comb begin
    for (int c = 0; c < NT; c++) begin
      logic signed [2*W:0] t_re, t_im;
      // conj(a) * b = (ar*br + ai*bi) + j(ar*bi - ai*br)
      t_re = row_r.q[K].re * row_r.q[c].re + row_r.q[K].im * row_r.q[c].im;
      t_im = row_r.q[K].re * row_r.q[c].im - row_r.q[K].im * row_r.q[c].re;
      sum_re[c] = ((row_r.idx == '0) ? '0 : acc_re[c]) + AW'(t_re);
      sum_im[c] = ((row_r.idx == '0) ? '0 : acc_im[c]) + AW'(t_im);
    end
  end

  side_t side_new;
  always_comb begin
    side_new = side_h;
    for (int c = K + 1; c < NT; c++) begin
      side_new.r[K][c].re = rnd_sat(48'(sum_re[c]), F);
      side_new.r[K][c].im = rnd_sat(48'(sum_im[c]), F);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NT; c++) begin
        acc_re[c] <= '0;
        acc_im[c] <= '0;
      end
    end else if (row_r.valid) begin
      acc_re <= sum_re;
      acc_im <= sum_im;
    end
  end

  logic push;
  assign push = row_r.valid && (row_r.idx == IW'(NROW - 1));

  // ---- delay line and side queue ----
  qbeat_t pre;
  side_t  head;
  logic   pop;
  assign pop = pre.valid && (pre.idx == '0);

  pipe_delay #(.T(qbeat_t), .N(DLY - 1)) u_dly (
    .clk, .rst_n, .din(row_r), .pre(pre), .dout(out_o));

  side_fifo #(.T(side_t), .DEPTH(3)) u_fifo (
    .clk, .rst_n, .push(push), .din(side_new), .pop(pop), .head(head));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   side_o <= '0;
    else if (pop) side_o <= head;
  end
endmodule
