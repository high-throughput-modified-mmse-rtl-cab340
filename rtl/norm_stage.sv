// norm_stage: NORM CALCULATION stage of the sorted QR pipeline.
// Computes norm(k) = ||D_k||^2 for every column k of the 8x4 matrix D while
// its rows stream in, one row per clock, and starts the permutation vector
// at p = [0 1 2 3] and R at zero (Algorithm 1, lines 1-3).
// Timing: rows leave DLY = 9 clocks after they enter; the side data of a
// matrix (norms, p, R) is valid on side_o from the clock its row 0 leaves
// until row 0 of the next matrix leaves. The rows of one matrix must arrive
// on consecutive clocks, idx 0..7; matrices may follow back to back.
module norm_stage
  import hrsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  qbeat_t in_i,
  output qbeat_t out_o,
  output side_t  side_o
);
  localparam int DLY = NORM_DLY;

  logic [NT-1:0][NW-1:0] acc;
  side_t  side_new;
  logic   push;
  qbeat_t pre;
  side_t  head;

  always_comb begin
    side_new = '0;
    for (int c = 0; c < NT; c++) begin
      side_new.norm[c] = acc[c] + mag2(in_i.q[c]);
      side_new.perm[c] = PW'(c);
    end
  end

  assign push = in_i.valid && (in_i.idx == IW'(NROW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      side_o <= '0;
    end else begin
      if (in_i.valid) begin
        for (int c = 0; c < NT; c++)
          acc[c] <= (in_i.idx == '0) ? mag2(in_i.q[c]) : acc[c] + mag2(in_i.q[c]);
      end
      if (pre.valid && pre.idx == '0) side_o <= head;
    end
  end

  pipe_delay #(.T(qbeat_t), .N(DLY)) u_dly (
    .clk, .rst_n, .din(in_i), .pre(pre), .dout(out_o));

  side_fifo #(.T(side_t), .DEPTH(3)) u_fifo (
    .clk, .rst_n, .push(push), .din(side_new),
    .pop(pre.valid && pre.idx == '0), .head(head));
endmodule
