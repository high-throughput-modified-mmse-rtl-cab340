# Pipelined MMSE sorted-QR detector for 4x4 high-rate spatial modulation

High-rate spatial modulation (HR-SM) sends, on all four transmit antennas at
once, the vector `c = s * x`: one QAM symbol `x` multiplied by a
*spatial-constellation codeword* `s` whose first entry is always 1 and whose
other three entries are each one of `+1, +j, -1, -j`. A vector therefore
carries `2*(4-1) + log2(M)` bits, 10 bits for 16-QAM.

This RTL is a receiver for that scheme. It uses the MMSE sorted-QR
successive-interference-cancellation detector adapted to HR-SM (MSQRD):

1. The channel `H` is extended to the 8x4 matrix `D = [H ; d*I]`, where `d`
   is `1/sqrt(Es)`. This is the MMSE regularisation.
2. `D` is decomposed as `D*P = Q*R` by sorted Modified Gram-Schmidt. The
   columns are taken weakest first, so the strongest stream ends up last in
   `R` and is detected first.
3. Every received vector `y` gives `v = Q1^H * y`, where `Q1` is the top four
   rows of `Q`.
4. The four entries of `v` are detected from the last one to the first. Each
   detection cancels the interference of the symbols already found and
   slices the result to the nearest QAM point.
5. The result is put back in antenna order with `P`. Antenna 0 gives `x`,
   and the other codeword entries come from comparing the signs of each
   antenna's symbol with those of `x`.

The design is fully pipelined. A new channel matrix enters every 8 clocks,
and a new received vector enters every clock. Each matrix serves the 8
vectors that arrive with it, or fewer.

## Frames: how data enters and leaves

The unit of work is a *frame*: 8 consecutive clocks with `in_valid` high and
`in_idx` counting 0..7.

| clock of frame | `h_row`                 | `y_vec` (if `y_valid`) |
|----------------|-------------------------|------------------------|
| 0..3           | row `in_idx` of `H`     | received vector        |
| 4..7           | ignored                 | received vector        |

The top builds rows 4..7 of `D` itself. They are `mmse_diag` on the diagonal
and zero elsewhere. Frames may follow each other with no gap. For every
vector taken, the detector produces one result: `out_valid`, `out_bits` and
`out_sym`. Results leave in input order, exactly `LATENCY = 222` clocks
after the vector entered, whatever the gaps.

`out_bits` (10 bits for 16-QAM):

| bits  | meaning                                                           |
|-------|-------------------------------------------------------------------|
| [9:8] | codeword entry `s_3` as a rotation: 0 = +1, 1 = +j, 2 = -1, 3 = -j |
| [7:6] | `s_2`                                                             |
| [5:4] | `s_1`                                                             |
| [3:2] | level index of Re `x` (index n is level 2n-3)                     |
| [1:0] | level index of Im `x`                                             |

`out_sym` gives the detected symbol of each transmit antenna as odd integer
levels. `out_perm` is the sorting permutation that was used. `sort_swap[k]`
pulses when main stage `k` exchanged two columns.

## Number formats

All data words are 12-bit signed, as in the published design. The split
between integer and fraction bits is this design's own choice: 4 integer
bits and 8 fraction bits, so the range is about ±8 in steps of 1/256. The
QAM levels are the odd integers (±1, ±3 for 16-QAM). The received vectors
must therefore be scaled to those units, and `|y|` must stay below 8. Some
internal words are wider:

| quantity          | width | fraction bits | where                          |
|-------------------|-------|---------------|--------------------------------|
| D, Q, R, y        | 12    | 8             | everywhere                     |
| column norm       | 27    | 16            | norm, sort and update stages   |
| 1/R(k,k)          | 16    | 12            | unsigned, saturates near 16    |
| `v` and cancelled `v` | 18 | 8            | detector                       |

Products are rounded to nearest and saturate to the word. The constants live
in `hrsm_pkg.sv`.

## The sorted QR pipeline (`sqrd`)

`D` flows through the pipeline as a stream of rows, one row of 4 complex
words per clock. Every arithmetic unit works on one row per clock and is
reused for all 8 rows of a matrix. A stage therefore needs one multiplier per
column, not one per matrix entry, and a matrix passes a stage every 8 clocks.

Results that belong to a whole matrix travel beside the row stream as a
*side record* (`side_t`): the remaining column norms, the permutation `p`,
the rows of `R` found so far, and `1/R(k,k)`. These are produced at a fixed
time after the matrix's first or last row enters a stage. Each stage queues
them in a small FIFO (`side_fifo`) and pops them when row 0 of that matrix
leaves. `side_o` is therefore valid, and constant, while the matrix's 8 rows
leave. Row streams are delayed in circular-buffer memories (`pipe_delay`).
Several matrices can be in flight inside one stage at once.

| stage             | does (Algorithm: sorted MGS)                                               | delay   |
|-------------------|----------------------------------------------------------------------------|---------|
| `norm_stage`      | `norm(k) = ‖D_k‖²` over the 8 rows; `p = [0 1 2 3]`                        | 9       |
| `sort_stage` K    | picks the smallest norm among columns K..3; swaps it into column K in rows, norms, `p` and `R`; `R(K,K) = sqrt(norm)`, then `1/R(K,K)` | 39 |
| `normalize_stage` K | `Q_K *= 1/R(K,K)` (a multiplier, not a divider); `R(K,k1) = Σ conj(Q_K) Q_k1` over the rows | 10 |
| `update_stage` K  | `Q_k1 -= R(K,k1) Q_K`; `norm(k1) -= |R(K,k1)|²`                           | 2       |

Main stages 0..2 use all three sub-stages. Main stage 3 uses only the first
two, because no column is left to update. The total delay is
`SQRD_LAT = 9 + 4*(39+10) + 3*2 = 211` clocks.

Two points need care:

* **Sorting on down-dated norms.** The norms are not recomputed. Each update
  stage subtracts `|R(K,k1)|²`. With 12-bit `R` this down-dating loses
  precision, and the loss is largest in the last column. Relative to a
  floating-point decomposition, the hardware's last column of Q was seen to
  be off by up to about 0.15 in well-conditioned channels. The other columns
  stay within 0.04. For the channels in the end-to-end test, this is far
  inside the decision margins.
* **Square root and reciprocal.** Both are fully pipelined restoring units
  (`sqrt_pipe`: 14 stages; `recip_pipe`: 21 stages). Each stage does one
  compare-subtract. `R(K,K)` is limited to the largest 12-bit value, and
  `1/R(K,K)` saturates at 65535/4096 ≈ 16. The decomposition therefore
  degrades when `R(K,K)` falls below about 1/16. A diagonal of at least that
  size in `mmse_diag` avoids this.

## The detector

Each received vector first waits in a 215-clock delay line. That is
`SQRD_LAT + 4` clocks: the time until its frame's `Q`, `R` and `p` have come
out of the decomposition. Rows 0..3 of `Q` are collected as they stream out,
together with `R` and `p` (registers `q1_act`, `r_act`, `p_act`). They are
held for the 8 clocks of the frame. Each vector then carries its frame's `R`
and `p` through the detector pipeline (`det_beat_t`), so consecutive frames
never mix.

* **`mm_block`** computes all 16 complex products `conj(Q(i,k)) * y_i` in
  parallel and sums them. Latency 2.
* **`sic_layer`** K (K = 3, 2, 1, 0; one clock each) forms
  `v_K - Σ_{j>K} R(K,j) * c_j`. Because `c_j` is a QAM point, each product is
  made by **`qam_shift_mult`** from shifts and adds chosen by a multiplexer:
  `x*3 = x + 2x`, `x*5 = x + 4x`, `x*7 = 8x - x`. No multipliers are used.
  **`tc_slicer`** then slices the result with no division. It compares the
  real and imaginary parts with the thresholds `0, ±2R(K,K), ±4R(K,K), …`,
  the midpoints between the levels scaled by `R(K,K)`.
* **`reswap_sc`** undoes the sort (`c[p(k)] = c_sorted[k]`) and takes `x`
  from antenna 0. A 90° rotation moves a square-QAM point into the next
  quadrant, and QAM points never lie on an axis. So `s_i` is the quadrant of
  `c_i` minus the quadrant of `x`, modulo 4, with both quadrants read from
  sign bits.

Detector latency: 2 + 4 + 1 = 7 clocks. The total is 215 + 7 = 222 clocks.

## How this differs from the published design

* **Latency.** The published in-out delay is 269 clocks; this design's is
  222. The sub-stage latencies here come from this design's own square-root
  and reciprocal units.
* **Square root and reciprocal.** The published design uses vendor
  square-root and divider cores, with an 8-clock divider. Here both are
  written out as generic pipelined units.
* **Storage of R.** `R` travels as a full 4x4 array whose lower triangle is
  zero. The published design stores only the upper triangle, 37.5% fewer
  registers.
* **Timing.** The published design keeps every register-to-register path
  within two 12-bit adders. Here that holds in the square-root and divider
  pipelines only. The complex multiply-adds in the stages and the
  cancellation and slicing in each detector layer are single, longer clock
  stages. No timing closure has been done.
* **Choices that are this design's own:** the fraction split, the
  interface, the frame format, the reset, the output bit mapping and the
  split of each main stage into sub-stages.
* **Fewer vectors per matrix.** A frame can carry fewer than 8 vectors (for
  example 4) by holding `y_valid` low on some of its clocks.
* **Modulation.** The default is 16-QAM. `MOD_BITS = 2` (QPSK) and
  `MOD_BITS = 6` (64-QAM) are accepted by the slicer, the shift-and-add
  multiplier and the bit packing. Both builds are tested end to end, with
  the same checks as the 16-QAM test: `hrsm_detector_qam64_tb` (100 frames)
  and `hrsm_detector_qpsk_tb` (100 frames).

## Verification

Every module has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each
compares the module with values worked out independently: integer formulas
for the stages, floating point for the slicer, the decomposition and the
detector. Where a delay is defined, each testbench also checks the exact
cycle count. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

`hrsm_detector_tb` runs the whole design at its default parameters. It sends
200 random frames: back to back, after idle gaps, and some with only 4
vectors. Each channel has one strong entry per row in a random column, which
makes sorting swaps frequent. The vectors are noiseless. Every detected bit
is compared with what was sent, and a floating-point model of the same
detector runs beside it. A vector that the floating-point model fails to
recover is not counted against the hardware; in practice none occurs. The
testbench also checks the 222-clock latency. It fails if any of the
following never happens: a swap in main stages 0..2, each codeword
rotation, each QAM level, a back-to-back frame, a frame after a gap, or a
half frame.

`sqrd_tb` compares `p`, `R` and all 8 rows of `Q` with a floating-point
sorted MGS decomposition. It compares only for matrices with a clear-cut
sort order and all `R(k,k) >= 0.3`. Worse-conditioned matrices only pass
through.

Not verified: noisy channels and bit-error rates, clock frequency, and
resource use.

## Simulating

With Verilator 5, from the folder above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/hrsm_pkg.sv rtl/*.sv \
    tb/hrsm_detector_tb.sv --top-module hrsm_detector_tb -o sim
./obj_dir/sim
```

Verilator may warn that the package file appears twice on that command
line. To run a block's own test, replace the testbench file and the top
module, for example `tb/sqrd_tb.sv --top-module sqrd_tb`. List
`rtl/hrsm_pkg.sv` first, because every module imports it.

To change sizes, edit `hrsm_pkg.sv`. The latencies there (`SQRT_LAT`,
`RECIP_LAT`, `SORT_DLY`, …) are derived from the word widths. The FIFO
depths follow them, and the top's delay line follows `SQRD_LAT`. The
testbenches read the same constants. `NT = 4` and `NROW = 8` are fixed by
the structure: the number of main stages and the 8-clock cycle.

## Modules

| file                 | role                                                  |
|----------------------|-------------------------------------------------------|
| `hrsm_pkg.sv`        | widths, latencies, types (`qbeat_t`, `side_t`, `det_beat_t`), rounding |
| `hrsm_detector.sv`   | top: builds D, runs the decomposition, collects Q/R/p, delays y, detects |
| `sqrd.sv`            | norm stage + 4 main stages                            |
| `norm_stage.sv`, `sort_stage.sv`, `normalize_stage.sv`, `update_stage.sv` | QR sub-stages |
| `sqrt_pipe.sv`, `recip_pipe.sv` | pipelined square root and reciprocal       |
| `mm_block.sv`, `sic_layer.sv`, `qam_shift_mult.sv`, `tc_slicer.sv`, `reswap_sc.sv` | detector |
| `pipe_delay.sv`, `side_fifo.sv` | delay line and per-matrix queue            |
