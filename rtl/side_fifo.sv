// side_fifo: small first-in first-out queue for per-matrix side data (norms,
// permutation, rows of R) that travels beside the row stream of a pipeline
// stage. A stage pushes one entry per matrix when its result is ready and
// pops it when row 0 of that matrix leaves the stage, so results that take
// longer than one 8-clock pipeline cycle can overlap.
// Interface: push/din write; head is the oldest entry (combinational);
// pop removes it. Overflow and underflow are assertion errors.
module side_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     head
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T               mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assign head = mem[rp];

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> cnt != 0);
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (cnt != (AW+1)'(DEPTH) || pop));
endmodule
