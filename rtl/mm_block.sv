// mm_block: matrix multiplication (MM) of the detector, v = Q^H y.
// Only the first NT rows of Q are used (the lower rows belong to the MMSE
// extension, where z is zero): v_k = sum_i conj(Q(i,k)) * y_i.
// All 16 complex products are formed in parallel, so one received vector
// is processed per clock. Stage 1 registers the products, stage 2 adds
// them and rounds back to F fraction bits (saturating at VW bits).
// Timing: MM_LAT = 2 clocks. R and p of the vector's matrix are carried
// with the vector (det_beat_t) for the later layers.
module mm_block
  import hrsm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  row_t                    y,        // y[i]: receive antenna i
  input  cplx_t [NT-1:0][NT-1:0]  q1,       // q1[row][col], rows 0..NT-1 of Q
  input  cplx_t [NT-1:0][NT-1:0]  r,
  input  perm_t                   perm,
  output det_beat_t               out_o
);
  localparam int PWD = 2 * W + 1;
  localparam int SW  = PWD + 2;

  typedef struct packed {
    logic signed [PWD-1:0] re;
    logic signed [PWD-1:0] im;
  } pcplx_t;

  pcplx_t [NT-1:0][NT-1:0] prod_r;   // prod_r[k][i] = conj(q1[i][k]) * y[i]
  logic                    v1;
  cplx_t [NT-1:0][NT-1:0]  r1;
  perm_t                   p1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_r <= '0; v1 <= 1'b0; r1 <= '0; p1 <= '0;
    end else begin
      v1 <= in_valid;
      r1 <= r;
      p1 <= perm;
      for (int k = 0; k < NT; k++)
        for (int i = 0; i < NT; i++) begin
          // conj(a) * b = (ar*br + ai*bi) + j(ar*bi - ai*br)
          prod_r[k][i].re <= q1[i][k].re * y[i].re + q1[i][k].im * y[i].im;
          prod_r[k][i].im <= q1[i][k].re * y[i].im - q1[i][k].im * y[i].re;
        end
    end
  end

  function automatic logic signed [VW-1:0] rnd_sat_v(input logic signed [SW-1:0] x);
    logic signed [SW-1:0] t;
    t = (x + SW'(1 << (F - 1))) >>> F;
    if (t > SW'((1 << (VW - 1)) - 1))   return VW'((1 << (VW - 1)) - 1);
    else if (t < -SW'(1 << (VW - 1)))   return VW'(-(1 << (VW - 1)));
    else                                return VW'(t);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_o <= '0;
    else begin
      out_o       <= '0;
      out_o.valid <= v1;
      out_o.r     <= r1;
      out_o.perm  <= p1;
      for (int k = 0; k < NT; k++) begin
        logic signed [SW-1:0] sr, si;
        sr = '0;
        si = '0;
        for (int i = 0; i < NT; i++) begin
          sr = sr + SW'(prod_r[k][i].re);
          si = si + SW'(prod_r[k][i].im);
        end
        out_o.v[k].re <= rnd_sat_v(sr);
        out_o.v[k].im <= rnd_sat_v(si);
      end
    end
  end
endmodule
