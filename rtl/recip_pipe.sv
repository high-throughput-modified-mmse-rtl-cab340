// recip_pipe: fully pipelined reciprocal q = min(floor(2^(F+FI) / d), 2^WI-1).
// It stands in for the divider core of the sorted QR decomposition. Because
// R(k,k) stays the same for the whole 8-clock cycle of a matrix, the column
// Q_k is divided by multiplying with this inverse instead of dividing each
// of its entries. Restoring long division, one quotient bit per stage
// (one compare-subtract between registers). d = 0 saturates.
// Interface: in_valid/d every clock; out_valid/q (and d_out = d, for the
// caller) leave LAT = F+FI+1 clocks later.
module recip_pipe #(
  parameter int DW = 12,   // divisor width (unsigned)
  parameter int F  = 8,    // fraction bits of the divisor
  parameter int FI = 12,   // fraction bits of the result
  parameter int WI = 16    // result width (unsigned)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [DW-1:0]  d,
  output logic           out_valid,
  output logic [WI-1:0]  q,
  output logic [DW-1:0]  d_out
);
  localparam int NB  = F + FI + 1;           // bits of the numerator 2^(F+FI)
  localparam int RW  = DW + 1;

  logic [RW-1:0]  rem [NB+1];
  logic [NB-1:0]  qq  [NB+1];
  logic [DW-1:0]  dd  [NB+1];
  logic           vl  [NB+1];

  assign rem[0] = '0;
  assign qq[0]  = '0;
  assign dd[0]  = d;
  assign vl[0]  = in_valid;

  for (genvar s = 0; s < NB; s++) begin : g_stage
    // numerator bit NB-1-s: only the top bit of 2^(F+FI) is one
    localparam logic NBIT = (s == 0);
    logic [RW-1:0] r_in;
    logic          fits;
    always_comb begin
      r_in = {rem[s][RW-2:0], NBIT};
      fits = (r_in >= {1'b0, dd[s]});
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rem[s+1] <= '0; qq[s+1] <= '0; dd[s+1] <= '0; vl[s+1] <= 1'b0;
      end else begin
        rem[s+1] <= fits ? (r_in - {1'b0, dd[s]}) : r_in;
        qq[s+1]  <= {qq[s][NB-2:0], fits};
        dd[s+1]  <= dd[s];
        vl[s+1]  <= vl[s];
      end
    end
  end

  assign out_valid = vl[NB];
  assign d_out     = dd[NB];
  assign q         = (qq[NB] > NB'((1 << WI) - 1)) ? WI'((1 << WI) - 1) : qq[NB][WI-1:0];
endmodule
