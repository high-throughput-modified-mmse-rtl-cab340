// hrsm_detector: receiver for a 4x4 high-rate spatial modulation (HR-SM)
// link. Each transmitted vector is c = s * x: a QAM symbol x times a
// spatial-constellation codeword s whose first entry is 1 and whose other
// entries are +-1 or +-j, so a vector carries 2*(NT-1) + MOD_BITS bits.
// The receiver runs the MMSE sorted-QR detector (MSQRD):
//   1. D = [H ; diag I] (8x4) is decomposed by sorted Modified
//      Gram-Schmidt, D P = Q R (sqrd), one matrix per 8 clocks;
//   2. rows 0..3 of Q, R and p of the frame are collected;
//   3. each received vector y is turned into v = Q^H y (mm_block), detected
//      layer by layer from the strongest column with interference
//      cancellation and threshold slicing (sic_layer), re-ordered with p and
//      decoded into QAM and codeword bits (reswap_sc). One vector per clock.
// Interface: a frame is 8 consecutive clocks with in_valid high and in_idx
// counting 0..7. On each of them y_vec carries one received vector; on
// clocks 0..3 h_row carries row in_idx of the channel matrix H (on 4..7 it
// is ignored: the rows of the MMSE extension are built here from
// mmse_diag, the value 1/sqrt(Es) on the diagonal). All 8 vectors of a
// frame are detected with that frame's H. Frames may follow back to back.
// With y_valid low on a clock of the frame no vector is taken there, so a
// channel matrix can also serve fewer than 8 vectors (e.g. 4).
// Timing: out_valid/out_bits/out_sym for vector n of a frame appear
// LATENCY = SQRD_LAT + 4 + DET_LAT clocks after the vector entered.
// Number formats: see hrsm_pkg (12-bit words, 8 fraction bits); y is
// expected in units in which the QAM levels are the odd integers.
module hrsm_detector
  import hrsm_pkg::*;
#(
  parameter int MOD_BITS = 4      // 16-QAM
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [IW-1:0]                 in_idx,
  input  row_t                          h_row,
  input  row_t                          y_vec,
  input  logic                          y_valid,    // y_vec holds a vector on this clock
  input  dat_t                          mmse_diag,
  output logic                          out_valid,
  output logic [MOD_BITS+2*(NT-1)-1:0]  out_bits,
  output sym_t  [NT-1:0]                out_sym,
  output perm_t                         out_perm,
  output logic  [NT-1:0]                sort_swap   // column swap in main stage k
);
  localparam int YDLY = SQRD_LAT + 4;

  // ---- extended matrix D, one row per clock ----
  qbeat_t d_beat;
  always_comb begin
    d_beat.valid = in_valid;
    d_beat.idx   = in_idx;
    d_beat.q     = '0;
    if (in_idx < IW'(NT)) d_beat.q = h_row;
    else                  d_beat.q[in_idx - IW'(NT)].re = mmse_diag;
  end

  // ---- sorted QR decomposition ----
  qbeat_t q_beat;
  side_t  q_side;
  sqrd u_sqrd (
    .clk, .rst_n, .in_i(d_beat), .out_o(q_beat), .side_o(q_side), .swap_o(sort_swap));

  // ---- collect rows 0..NT-1 of Q with R and p of the frame ----
  cplx_t [NT-2:0][NT-1:0] q_part;
  cplx_t [NT-1:0][NT-1:0] q1_act, r_act;
  perm_t                  p_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_part <= '0; q1_act <= '0; r_act <= '0; p_act <= '0;
    end else if (q_beat.valid) begin
      if (q_beat.idx < IW'(NT - 1)) q_part[q_beat.idx] <= q_beat.q;
      if (q_beat.idx == IW'(NT - 1)) begin
        q1_act <= {q_beat.q, q_part};
        r_act  <= q_side.r;
        p_act  <= q_side.perm;
      end
    end
  end

  // ---- received vectors wait for the decomposition of their frame ----
  typedef struct packed {
    logic valid;
    row_t y;
  } ybeat_t;
  ybeat_t y_in, y_pre, y_out;
  assign y_in = '{valid: in_valid && y_valid, y: y_vec};

  pipe_delay #(.T(ybeat_t), .N(YDLY)) u_ydly (
    .clk, .rst_n, .din(y_in), .pre(y_pre), .dout(y_out));

  // ---- detector: MM, SIC/TC layers, re-swap and codeword recovery ----
  det_beat_t beat [NT+1];

  mm_block u_mm (
    .clk, .rst_n, .in_valid(y_out.valid), .y(y_out.y), .q1(q1_act),
    .r(r_act), .perm(p_act), .out_o(beat[0]));

  for (genvar n = 0; n < NT; n++) begin : g_sic
    sic_layer #(.K(NT - 1 - n), .MOD_BITS(MOD_BITS)) u_sic (
      .clk, .rst_n, .in_i(beat[n]), .out_o(beat[n+1]));
  end

  reswap_sc #(.MOD_BITS(MOD_BITS)) u_out (
    .clk, .rst_n, .in_i(beat[NT]), .out_valid(out_valid),
    .out_sym(out_sym), .out_bits(out_bits), .out_perm(out_perm));

  a_frame_rows: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_idx != IW'(NROW - 1) |=> in_valid && in_idx == $past(in_idx) + 1'b1);
endmodule
