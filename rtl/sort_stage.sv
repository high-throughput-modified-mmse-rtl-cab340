// sort_stage: first sub-stage of main stage K of the sorted QR pipeline
// (Algorithm 1, lines 5-8). Among the columns K..3 not yet processed it
// picks the one with the smallest remaining norm (lowest index on a tie),
// swaps it with column K in the row stream and in norm, p and R, and
// computes R(K,K) = sqrt(norm_min) and the inverse 1/R(K,K) that the next
// sub-stage multiplies Q_K with.
// Timing: rows leave DLY = SQRT_LAT + RECIP_LAT + 4 clocks after they
// enter (one register for the swap, then a delay line that covers the
// square root and reciprocal pipelines). Side data as in norm_stage: side_i
// must be stable while the rows of its matrix enter, side_o is valid from
// the clock row 0 of the matrix leaves. side_o.inv holds 1/R(K,K).
// R(K,K) is limited to the largest positive data word.
module sort_stage
  import hrsm_pkg::*;
#(
  parameter int K = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  qbeat_t in_i,
  input  side_t  side_i,
  output qbeat_t out_o,
  output side_t  side_o,
  output logic   swap_o     // pulses once per matrix if a swap took place
);
  localparam int DLY = SORT_DLY;

  // ---- column choice (side_i is stable during the matrix) ----
  logic [PW-1:0]  sel;
  logic [NW-1:0]  nmin;
  always_comb begin
    sel  = PW'(K);
    nmin = side_i.norm[K];
    for (int c = K + 1; c < NT; c++)
      if (side_i.norm[c] < nmin) begin
        nmin = side_i.norm[c];
        sel  = PW'(c);
      end
  end

  // ---- swapped row and side data ----
  qbeat_t row_sw;
  side_t  side_sw;
  always_comb begin
    row_sw = in_i;
    row_sw.q[K]   = in_i.q[sel];
    row_sw.q[sel] = in_i.q[K];
    side_sw = side_i;
    side_sw.norm[K]   = side_i.norm[sel];
    side_sw.norm[sel] = side_i.norm[K];
    side_sw.perm[K]   = side_i.perm[sel];
    side_sw.perm[sel] = side_i.perm[K];
    for (int r = 0; r < K; r++) begin
      side_sw.r[r][K]   = side_i.r[r][sel];
      side_sw.r[r][sel] = side_i.r[r][K];
    end
  end

  logic first_in;
  assign first_in = in_i.valid && (in_i.idx == '0);

  // ---- square root and reciprocal ----
  logic                   sq_v, rc_v;
  logic [SQRT_LAT-1:0]    sq_root;
  logic [W-2:0]           rkk, rc_d;
  logic [WI-1:0]          rc_q;

  sqrt_pipe #(.IN_W(SQRT_IN_W)) u_sqrt (
    .clk, .rst_n, .in_valid(first_in), .x(SQRT_IN_W'(nmin)),
    .out_valid(sq_v), .root(sq_root));

  // the root of a norm with 2F fraction bits has F fraction bits
  assign rkk = (sq_root > SQRT_LAT'((1 << (W - 1)) - 1)) ? (W-1)'((1 << (W - 1)) - 1)
                                                         : sq_root[W-2:0];

  recip_pipe #(.DW(W - 1), .F(F), .FI(FI), .WI(WI)) u_recip (
    .clk, .rst_n, .in_valid(sq_v), .d(rkk),
    .out_valid(rc_v), .q(rc_q), .d_out(rc_d));

  typedef struct packed {
    logic [W-2:0]  rkk;
    logic [WI-1:0] inv;
  } res_t;

  // ---- row path ----
  qbeat_t row_r, pre, dly_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_r <= '0;
    else        row_r <= row_sw;
  end

  pipe_delay #(.T(qbeat_t), .N(DLY - 1)) u_dly (
    .clk, .rst_n, .din(row_r), .pre(pre), .dout(dly_out));
  assign out_o = dly_out;

  // ---- side path ----
  side_t head_s;
  res_t  head_r;
  logic  pop;
  assign pop = pre.valid && (pre.idx == '0);

  localparam int FD = DLY / NROW + 2;

  side_fifo #(.T(side_t), .DEPTH(FD)) u_fifo_s (
    .clk, .rst_n, .push(first_in), .din(side_sw), .pop(pop), .head(head_s));
  side_fifo #(.T(res_t), .DEPTH(FD)) u_fifo_r (
    .clk, .rst_n, .push(rc_v), .din('{rkk: rc_d, inv: rc_q}), .pop(pop), .head(head_r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      side_o <= '0;
      swap_o <= 1'b0;
    end else begin
      swap_o <= first_in && (sel != PW'(K));
      if (pop) begin
        side_o            <= head_s;
        side_o.r[K][K].re <= dat_t'({1'b0, head_r.rkk});
        side_o.r[K][K].im <= '0;
        side_o.inv        <= head_r.inv;
      end
    end
  end
endmodule
