// sqrd: pipelined sorted QR decomposition (sorted Modified Gram-Schmidt) of
// the 8x4 extended channel matrix D = [H ; (1/sqrt(Es)) I].
// Structure: a NORM CALCULATION stage followed by four MAIN STAGEs, one per
// column of Q. Main stages 0..2 have three sub-stages (sort_stage,
// normalize_stage, update_stage); main stage 3 has only the first two.
// D enters as a stream of 8 rows, one row (4 complex words) per clock, so
// every unit handles one row per clock and is reused for all 8 rows of a
// matrix: a new matrix can enter every 8 clocks and the decomposition
// throughput is f_clk / 8 matrices per second.
// Outputs: the rows of Q (columns in sorted order) leave as a stream,
// SQRD_LAT clocks after they entered; side_o carries R (upper triangular,
// r[row][col], sorted column order) and the permutation p, valid from the
// clock row 0 of Q leaves until row 0 of the next matrix leaves.
// swap_o[k] pulses when main stage k exchanged two columns.
module sqrd
  import hrsm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  qbeat_t       in_i,
  output qbeat_t       out_o,
  output side_t        side_o,
  output logic [NT-1:0] swap_o
);
  qbeat_t row_s [NT+1];   // row stream entering main stage k
  side_t  side_s [NT+1];

  norm_stage u_norm (
    .clk, .rst_n, .in_i(in_i), .out_o(row_s[0]), .side_o(side_s[0]));

  for (genvar k = 0; k < NT; k++) begin : g_main
    qbeat_t r_a, r_b;
    side_t  s_a, s_b;

    sort_stage #(.K(k)) u_sort (
      .clk, .rst_n, .in_i(row_s[k]), .side_i(side_s[k]),
      .out_o(r_a), .side_o(s_a), .swap_o(swap_o[k]));

    normalize_stage #(.K(k)) u_nrmz (
      .clk, .rst_n, .in_i(r_a), .side_i(s_a), .out_o(r_b), .side_o(s_b));

    if (k < NT - 1) begin : g_upd
      update_stage #(.K(k)) u_upd (
        .clk, .rst_n, .in_i(r_b), .side_i(s_b),
        .out_o(row_s[k+1]), .side_o(side_s[k+1]));
    end else begin : g_last
      assign row_s[k+1]  = r_b;
      assign side_s[k+1] = s_b;
    end
  end

  assign out_o  = row_s[NT];
  assign side_o = side_s[NT];
endmodule
