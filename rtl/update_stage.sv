// update_stage: third sub-stage of main stage K of the sorted QR pipeline
// (Algorithm 1, lines 11-12). Removes the projection on the normalised
// column Q_K from every later column, Q_k1 -= R(K,k1) * Q_K, row by row,
// and down-dates the remaining norms, norm(k1) -= |R(K,k1)|^2 (clamped at
// zero), which the next main stage sorts on.
// Timing: rows leave DLY = 2 clocks after they enter; side_o is valid from
// the clock row 0 leaves.
module update_stage
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
  localparam int DLY = UPD_DLY;

  qbeat_t row_u, row_r;
  always_comb begin
    row_u = in_i;
    for (int c = K + 1; c < NT; c++) begin
      logic signed [2*W:0] p_re, p_im;
      // R(K,c) * q_K
      p_re = side_i.r[K][c].re * in_i.q[K].re - side_i.r[K][c].im * in_i.q[K].im;
      p_im = side_i.r[K][c].re * in_i.q[K].im + side_i.r[K][c].im * in_i.q[K].re;
      row_u.q[c].re = rnd_sat((48'(in_i.q[c].re) <<< F) - 48'(p_re), F);
      row_u.q[c].im = rnd_sat((48'(in_i.q[c].im) <<< F) - 48'(p_im), F);
    end
  end

  side_t side_u;
  always_comb begin
    side_u = side_i;
    for (int c = K + 1; c < NT; c++) begin
      logic [NW-1:0] m2;
      m2 = mag2(side_i.r[K][c]);
      side_u.norm[c] = (side_i.norm[c] > m2) ? side_i.norm[c] - m2 : '0;
    end
  end

  side_t head;
  qbeat_t pre;
  logic   pop;
  assign pop = pre.valid && (pre.idx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_r <= '0;
    else        row_r <= row_u;
  end

  pipe_delay #(.T(qbeat_t), .N(DLY - 1)) u_dly (
    .clk, .rst_n, .din(row_r), .pre(pre), .dout(out_o));

  side_fifo #(.T(side_t), .DEPTH(2)) u_fifo (
    .clk, .rst_n, .push(in_i.valid && in_i.idx == '0), .din(side_u),
    .pop(pop), .head(head));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   side_o <= '0;
    else if (pop) side_o <= head;
  end
endmodule
