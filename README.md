# Tap-selective maximum-likelihood channel estimator

A single-carrier or OFDM block receiver has to know the channel before it can
equalise. In long-range broadband links the channel is *sparse*: among the L
taps that the cyclic prefix can hold, only a few carry energy. A plain
maximum-likelihood (least-squares) estimate keeps all L taps, so every empty tap
adds noise. The tap-selective ML (TSML) estimator keeps only the strongest
taps. It picks how many with the minimum description length (MDL) criterion,
and zeroes the rest. If the number K of real taps is found, the error of the
estimate falls by about L/K.

This RTL implements the estimator for one training block. The block is a Chu
sequence of length N = 32 behind a cyclic prefix of L = 16. The receiver's FFT
of that block goes in. Out come the estimate h_TSML(0..15) and the chosen
number of taps K_hat.

## The algorithm in six steps

With r(k) the FFT of the received training block and tau(k) the FFT of the
training sequence:

1. **Derotation.** x(k) = r(k) conj(tau(k)) / N. Because a Chu sequence has
   |tau(k)| = sqrt(N), x is a raw estimate of the channel frequency response.
2. **ML estimate.** h(n) = (1/N) sum_k x(k) e^{+j2pi nk/N} for n = 0..L-1. These
   are the first L points of the IFFT of x.
3. **Powers and sorting.** p(n) = |h(n)|^2 is sorted in descending order, and
   each power keeps its tap position n as a tag.
4. **Residual energy.** res_k = ||x||^2 - N (p_(1) + ... + p_(k)) for
   k = 1..L. This is the energy left outside the k strongest taps.
5. **Logarithm.** ln(res_k).
6. **MDL and selection.** MDL(k) = N ln(res_k) + (3/2) k ln N, and
   K_hat = arg min MDL(k). The taps at the first K_hat sorted positions are
   passed and the others are set to zero.

## Block structure

| step | module | what it is |
|---|---|---|
| 1 | `training_derotator` | complex multiply by a table of conj(tau(k))/N |
| 1 | `ifft_core` | first L outputs of the N-point inverse DFT, scaled by 1/N |
| 2 | `cordic_power` (x2) | CORDIC magnitude, gain removal, squaring; one instance for x(k), one for h(n). It also outputs the angle, which the estimator leaves unused |
| 3 | `parallel_sorter` | odd-even transposition sorter built from `sort_cmp_upper` (keys, swap flag) and `sort_cmp_lower` (tags) |
| 4 | `norm_accumulator` | adder-based accumulator, a shift by 5 (x N), then a subtract |
| 5 | `nlf_evaluator` | `range_reduction`, then `cordic_ln`, then adding m ln 2 |
| 6 | `mdl_selector` | shift by 5, penalty accumulator, and a second `parallel_sorter` in ascending order that finds the minimum |
| top | `tsml_estimator` | sequencing controller, h/power buffers, tap selection |

`tsml_pkg` holds the sizes, the fixed-point formats and the complex sample type
`cplx_t`.

## The logarithm over a wide range

This is the least obvious part of the design. The residual energies res_k
cover a wide range: res_1 is about as large as the block energy, and res_L is
only noise. A CORDIC logarithm, though, converges only for inputs in
[0.5, 1). The logarithm unit therefore works in three steps.

* **Segment index encoder.** The range [2^-5, 2^7) is cut into 12 segments,
  [0.5*2^(i-4), 2^(i-4)) for i = 0..11. Twelve comparators test
  u >= 2^(i-5) in parallel. The number of those for i = 1..11 that fire is
  the multiplexer select `sel`, and the correction index is m = sel - 4. The
  comparator for i = 0 flags inputs below the range.
* **Bit-shift multiplexer.** Twelve copies of u are formed, shifted from 4
  bits left (segment 0) to 7 bits right (segment 11). A 12-to-1 multiplexer
  picks the copy that lands in [0.5, 1). So u = u' 2^m with u' in [0.5, 1).
* **CORDIC and reconstruction.** `cordic_ln` computes
  ln(u') = 2 atanh((u'-1)/(u'+1)) with a hyperbolic CORDIC in vectoring mode.
  It uses 18 micro-rotations, with steps 4 and 13 repeated as hyperbolic CORDIC
  requires. Adding m ln 2 then gives ln(u).

Inputs below 2^-5 (zero and negative included) are read as 2^-5. Inputs at
or above 2^7 are read as just below 2^7.

In the estimator, saturation at the bottom happens only when the noise is very
low. Past that point MDL grows with k, so the first k whose residual falls
below 2^-5 is chosen. Saturation at the top happens only when ||x||^2 reaches
128. That is four times the block energy of a unit-energy channel (N x 1 = 32).

The absolute error measured for the logarithm is below 5e-5 across the covered
range.

## Sorting

The array of L powers sits in registers. Each clock applies one comparator
stage to it: alternately every pair (0,1),(2,3),... and every pair
(1,2),(3,4),... Each pair has two cells:

* A key cell (`sort_cmp_upper`) compares the two keys, puts them in order and
  raises a `swp` flag. Equal keys are not swapped.
* A tag cell (`sort_cmp_lower`) uses that flag to swap the tags, so each tag
  stays with its key. The tags are the original tap positions.

The sort ends once two consecutive stages raised no flag. For 16 entries that
takes at most 18 stages, and an already-sorted array takes 2. The MDL minimum
is found with the same sorter in ascending order, with k-1 as the tag. Signed
MDL values are fed to it in offset binary, that is with the sign bit inverted.
Ties go to the smaller k.

## Number formats

| quantity | format |
|---|---|
| r, x, h (each component) | signed 16 bit, 11 fraction bits (range ±16) |
| tap and sample power | unsigned 32 bit, 22 fraction bits |
| ‖x‖² | unsigned 40 bit, 22 fraction bits |
| residual res_k | signed 42 bit, 22 fraction bits |
| ln | signed 20 bit, 16 fraction bits |
| MDL | signed 28 bit, 16 fraction bits |

With a channel of unit energy, |r| stays below about 10, which leaves headroom
in Q4.11. Products are rounded half-up and saturated. The constant tables
are computed at elaboration from their formulas: the derotation coefficients,
the IFFT twiddles, atanh(2^-i), 1/K of the CORDIC, ln 2 and (3/2) ln N. So no
data files are needed. The derotation table uses the closed form of the Chu
sequence's DFT for even N:
tau(k) = sqrt(N) e^{j pi/4} e^{-j pi k^2/N}, where t(n) = e^{j pi n^2/N}.

## Interface and timing of the top (`tsml_estimator`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_r` | in | r(0)..r(N-1) in order; gaps allowed |
| `in_ready` | out | high while a block is being accepted |
| `out_valid`, `out_idx`, `out_h` | out | h_TSML(n) for n = 0..15, one per cycle |
| `k_hat` | out | number of taps kept, 1..16, valid with the output |
| `done` | out | pulses with the last tap |

One block is processed at a time. From the last input sample to the first
output tap takes about 610 cycles at the defaults. The transform accounts for
512 of them (N*L, because `ifft_core` uses one multiply-accumulate per cycle).
The CORDIC pipelines add 17 and 22 cycles, each of the two sorts at most 19
cycles, and the 16 MDL inputs 16 cycles. `in_ready` returns after `done`.

## Where this RTL departs from, or goes beyond, the original design

* **IFFT.** The original design uses a vendor FFT core in its pipelined
  streaming mode. `ifft_core` is a direct DFT with a single complex MAC,
  computing only the L outputs that are needed. The results are the same, but
  the block rate is lower: about 1 block per 600 cycles, with no overlap
  between blocks.
* **FFT enable.** The original design mentions an enable generator that adapts
  the FFT block's processing rate. Here the enable is the valid strobe of the
  derotated samples. No clock-enable divider exists.
* **Sorter network.** The original sorter is drawn as 15 comparator stages for
  16 data. This one iterates alternating even/odd stages with the same two
  cell types and the same stop rule (no swap flag set). It takes up to 18
  clock cycles.
* **Derotation.** The derotation step is written as a module here. In the
  original it is part of the algorithm, but whether it sits in the FPGA is not
  stated.
* **Widths, CORDIC iteration counts, saturation, reset and handshakes** are this
  design's own choices.
* **Resources and clock.** The original implementation is reported on a
  Virtex-4 XC4VSX35 at 17.3 MHz. This RTL has not been mapped to that device.

## Verification

Each module has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each
compares against values computed independently in real arithmetic, and ends
with a `TB_RESULT checks=... failures=...` line.

* `training_derotator_tb`: compares against an explicit DFT of the Chu
  sequence.
* `ifft_core_tb`: compares against an explicit inverse DFT, and checks the
  N*(n+1)-cycle output timing.
* `cordic_power_tb`: checks power and angle in all quadrants and at full
  scale, and the 17-cycle latency.
* `sort_cmp_upper_tb` and `sort_cmp_lower_tb`: exhaustive.
* `parallel_sorter_tb`: checks against a stable reference sort in both
  directions, including many equal keys, and checks the stage bound.
* `norm_accumulator_tb`: exact comparison, including negative residuals.
* `range_reduction_tb`: checks all segment bounds and their neighbours and
  saturation, and that every segment is used.
* `cordic_ln_tb` and `nlf_evaluator_tb`: compare with `$ln`, and check the
  latencies.
* `mdl_selector_tb`: checks every MDL(k) exactly, the arg min, and the time to
  `done`.

`tsml_estimator_tb` runs the whole design at its default size. It uses 24
random sparse channels with 1 to 5 taps (3 in most of them) at two noise
levels, with gaps in the input stream. It compares K_hat and every output tap
with a floating-point model of the full algorithm. It also counts the
mechanisms it exercised: sorts with swaps, taps zeroed, left-shift, unshifted
and right-shift logarithm segments, logarithm saturation, and input gaps. In
the run recorded here, K_hat matched the model in 24 of 24 blocks. In 17 of 18
low-noise blocks it also equalled the true number of taps.

`tsml_mse_tb` measures what the tap selection buys. It runs 120 blocks of a
3-tap equal-power channel with a noise variance of 0.01 on x. In the recorded
run, the ML estimate (the estimator's own h(n)) had an MSE of 0.0049, against
a theoretical L sigma^2/N = 0.005. The TSML output had an MSE of 0.0011,
against a theoretical K sigma^2/N = 0.00094. That is an improvement of 4.6,
where L/K = 5.33. The gap comes from blocks in which MDL keeps one tap too
many: K_hat was 3 in 108 of the 120 blocks.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -y tb -y rtl +libext+.sv \
    rtl/tsml_pkg.sv tb/tsml_estimator_tb.sv --top-module tsml_estimator_tb
./obj_dir/Vtsml_estimator_tb
```

Any other testbench works the same way: replace the file and top-module name.
All modules take their sizes as parameters with the values above as defaults.
N must be a power of two, because the twiddle index wraps and the
derotation table assumes an even-length Chu sequence. The segment layout of the
logarithm is fixed at 12 segments.
