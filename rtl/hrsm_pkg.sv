// hrsm_pkg: shared constants, types and helper functions of the HR-SM
// sorted-QR (SQRD) + MSQRD detector.
//
// Number formats (the 12-bit word length is the design's published choice;
// the split into integer and fraction bits, and the wider internal words,
// are this implementation's own choice):
//   data  (D, Q, y, R)   : signed W=12 bits, F=8 fraction bits (range +-8)
//   norm  (|Q_k|^2)      : unsigned NW=27 bits, 2F=16 fraction bits
//   inverse 1/R(k,k)     : unsigned WI=16 bits, FI=12 fraction bits (max ~16)
//   v = Q^H y            : signed VW=18 bits, F fraction bits
// QAM symbols are carried as odd integer levels (-L+1 .. L-1, L=2^(MOD_BITS/2)).
package hrsm_pkg;

  parameter int NT    = 4;            // transmit = receive antennas
  parameter int NROW  = 2 * NT;       // rows of the extended matrix D (8)
  parameter int W     = 12;           // data word
  parameter int F     = 8;            // fraction bits of data words
  parameter int NW    = 2 * W + 3;    // norm word (sum of 8 squared magnitudes)
  parameter int WI    = 16;           // reciprocal word
  parameter int FI    = 12;           // reciprocal fraction bits
  parameter int VW    = 18;           // detector accumulation word
  parameter int LVW   = 4;            // signed QAM level word (up to +-7, 64-QAM)
  parameter int IW    = $clog2(NROW); // row index width
  parameter int PW    = $clog2(NT);   // permutation entry width

  // Latencies (clock cycles from a row entering a stage to it leaving)
  parameter int SQRT_IN_W  = NW + 1;             // even width for the root
  parameter int SQRT_LAT   = SQRT_IN_W / 2;      // one result bit per stage
  parameter int RECIP_NB   = F + FI + 1;         // numerator 2^(F+FI) has this many bits
  parameter int RECIP_LAT  = RECIP_NB;           // one quotient bit per stage
  parameter int NORM_DLY   = 9;
  parameter int SORT_DLY   = SQRT_LAT + RECIP_LAT + 4;
  parameter int NRMZ_DLY   = 10;
  parameter int UPD_DLY    = 2;
  parameter int SQRD_LAT   = NORM_DLY + NT * (SORT_DLY + NRMZ_DLY) + (NT - 1) * UPD_DLY;
  parameter int MM_LAT     = 2;
  parameter int DET_LAT    = MM_LAT + NT + 1;    // MM, one cycle per SIC layer, re-swap

  typedef logic signed [W-1:0] dat_t;
  parameter logic signed [47:0] DMAX = (48'sd1 <<< (W - 1)) - 48'sd1;
  parameter logic signed [47:0] DMIN = -(48'sd1 <<< (W - 1));

  typedef struct packed {
    dat_t re;
    dat_t im;
  } cplx_t;

  typedef cplx_t [NT-1:0] row_t;               // one row of D / Q (index = column)
  typedef logic [NT-1:0][PW-1:0] perm_t;      // perm[k] = original column of sorted column k

  // One row of the matrix stream that flows through the SQRD pipeline.
  typedef struct packed {
    logic          valid;
    logic [IW-1:0] idx;   // row number 0..NROW-1 inside the matrix
    row_t          q;
  } qbeat_t;

  // Per-matrix data that travels next to the row stream.
  typedef struct packed {
    logic [NT-1:0][NW-1:0] norm;   // remaining squared column norms
    perm_t                 perm;   // column permutation so far
    cplx_t [NT-1:0][NT-1:0] r;     // R matrix, r[row][col]
    logic [WI-1:0]         inv;    // 1/R(k,k) of the current main stage
  } side_t;

  typedef struct packed {
    logic signed [VW-1:0] re;
    logic signed [VW-1:0] im;
  } vcplx_t;

  typedef struct packed {
    logic signed [LVW-1:0] re;
    logic signed [LVW-1:0] im;
  } sym_t;

  // One received vector on its way through the detector, with the
  // decomposition results of its matrix travelling beside it.
  typedef struct packed {
    logic                   valid;
    vcplx_t [NT-1:0]        v;      // Q^H y, sorted column order
    sym_t   [NT-1:0]        c;      // detected symbols, sorted column order
    cplx_t  [NT-1:0][NT-1:0] r;     // R of the matrix
    perm_t                  perm;   // permutation of the matrix
  } det_beat_t;

  // Round a value with 'sh' extra fraction bits to nearest (ties up) and
  // saturate it to a W-bit word.
  function automatic dat_t rnd_sat(input logic signed [47:0] x, input int sh);
    logic signed [47:0] y;
    y = (sh > 0) ? ((x + (48'sd1 <<< (sh - 1))) >>> sh) : x;
    if (y > DMAX)       return dat_t'(DMAX);
    else if (y < DMIN)  return dat_t'(DMIN);
    else                return dat_t'(y);
  endfunction

  function automatic logic [NW-1:0] mag2(input cplx_t a);
    logic signed [2*W-1:0] rr, ii;
    rr = a.re * a.re;
    ii = a.im * a.im;
    return NW'($unsigned(rr)) + NW'($unsigned(ii));
  endfunction

endpackage
