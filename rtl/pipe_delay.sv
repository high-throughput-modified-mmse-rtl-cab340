// pipe_delay: fixed delay of N clocks for any packed type, built as a
// circular buffer (a memory of N-1 words plus an output register) so that
// long delays cost memory rather than flip-flops. Used to hold the row
// stream of a pipeline stage, and the received vectors, while the
// per-matrix results that belong to them are computed.
// Interface: din is written every clock; dout is din from N clocks earlier;
// 'pre' is the value dout will take on the next clock, so a stage can act
// one clock ahead. Until the buffer has been filled once after reset,
// pre and dout read as zero (so a valid flag inside T reads as 0).
module pipe_delay #(
  parameter type T = logic [7:0],
  parameter int  N = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  T     din,
  output T     pre,
  output T     dout
);
  localparam int M  = (N > 1) ? N - 1 : 1;
  localparam int AW = (M > 1) ? $clog2(M) : 1;

  if (N == 1) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dout <= '0;
      else        dout <= din;
    end
    assign pre = din;
  end else begin : g_ram
    T              mem [M];
    logic [AW-1:0] ptr;
    logic          filled;

    always_ff @(posedge clk) mem[ptr] <= din;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr    <= '0;
        filled <= 1'b0;
        dout   <= '0;
      end else begin
        dout <= pre;
        if (ptr == AW'(M - 1)) begin
          ptr    <= '0;
          filled <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end

    assign pre = filled ? mem[ptr] : '0;
  end
endmodule
