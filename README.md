# Fault-tolerant parallel FFTs: the Parity-SOS-ECC scheme

A circuit that runs several FFTs side by side can protect them all together
more cheaply than it can protect each one. This design runs four 8-point FFTs
on four independent sample streams. A single soft error in any one of them is
detected, located and corrected. The extra hardware is one FFT and three
sum-of-squares checks. Triplicating each FFT would cost eight extra FFTs plus
voters.

Two properties of the DFT make this work:

* **Linearity.** The FFT of `x1 + x2 + x3` is `X1 + X2 + X3`. A check can
  therefore watch a *sum* of FFTs, and a faulty output can be rebuilt from the
  other outputs plus the FFT of the sum of all inputs.
* **Parseval's theorem.** For an N-point DFT, `sum |X[k]|^2 = N * sum |x[n]|^2`.
  Comparing the energy that goes into an FFT with the energy that comes out
  catches corrupted outputs without running a second FFT. This costs two
  multipliers and two accumulators per stream.

The sum-of-squares (SOS) checks are arranged like the parity checks of a
Hamming code, so the pattern of failing checks names the faulty FFT. A single
*parity FFT* transforms `x1 + x2 + x3 + x4`, and its output is used to rebuild
the faulty FFT's output.

```
 x1 ─┬──────────────► FFT1 ─ X1 ─┬────────────────────────────┐
 x2 ─┼─┬────────────► FFT2 ─ X2 ─┼─┬──────────────────────────┤
 x3 ─┼─┼─┬──────────► FFT3 ─ X3 ─┼─┼─┬────────────────────────┤
 x4 ─┼─┼─┼─┬────────► FFT4 ─ X4 ─┼─┼─┼─┬──────────────────────┤
     │ │ │ │                    output_combiner               │   edc
     │ │ │ │                  X5=X1+X2+X3, X6=X1+X2+X4,       │ (locate,
     │ │ │ │                  X7=X1+X3+X4                     │  rebuild)
   input_encoder                    │ │ │                     │     │
   x5=x1+x2+x3 ───────────► Parseval check 1 (x5 vs X5) ─ P1 ─┤     ├─► Y1..Y4
   x6=x1+x2+x4 ───────────► Parseval check 2 (x6 vs X6) ─ P2 ─┤     ├─► err_*
   x7=x1+x3+x4 ───────────► Parseval check 3 (x7 vs X7) ─ P3 ─┤     │
   x =x1+x2+x3+x4 ────────► parity FFT ─────────────────── X ─┘─────┘
```

## The code: which check watches which FFT

| check | input side | output side    | watches FFT |
|-------|------------|----------------|-------------|
| P1    | x5 = x1+x2+x3 | X5 = X1+X2+X3 | 1, 2, 3 |
| P2    | x6 = x1+x2+x4 | X6 = X1+X2+X4 | 1, 2, 4 |
| P3    | x7 = x1+x3+x4 | X7 = X1+X3+X4 | 1, 3, 4 |

A fault in one FFT corrupts every check that watches it. The resulting
syndrome `{P3,P2,P1}` therefore identifies it:

| syndrome | meaning | action |
|----------|---------|--------|
| 000 | no error | pass through |
| 111 | FFT1 faulty | Y1 = X − X2 − X3 − X4 |
| 011 | FFT2 faulty | Y2 = X − X1 − X3 − X4 |
| 101 | FFT3 faulty | Y3 = X − X1 − X2 − X4 |
| 110 | FFT4 faulty | Y4 = X − X1 − X2 − X3 |
| 001, 010, 100 | one check (or its combined output) is at fault, not an FFT | pass through, raise `check_alarm` |

The rebuild uses only the other FFTs and the parity FFT. It therefore repairs
any error confined to one FFT, however many bits or bins it touches, as long as
the checks see it.

An error in the parity FFT trips no check. It only matters when another FFT
fails at the same time, which the single-error assumption excludes. The
assignment of FFTs to checks is the table `CHECK_SET` in `fft_pkg`. Both
`input_encoder` and `output_combiner` read it.

## Parseval checks and the tolerance τ

Each `parseval_check` contains two magnitude-square-and-accumulate units
(`sos_accumulator`) and a magnitude comparator. One unit works on the check's
input stream (for example x5) and the other on its output stream (X5). The FFT
outputs carry `FRAC` fractional bits, so the comparison is

```
p = | N · 2^(2·FRAC) · Σ|x|² − Σ|X|² |  >  TAU        (units: output LSB²)
```

N is a power of two, so the scaling is a shift. The products are exact, so the
only mismatch in a fault-free frame comes from rounding the `cos(π/4)` twiddle
products. Here is a worst-case bound for the default sizes (10-bit check
inputs, three FFTs summed, four bins that go through a rounded twiddle):

* Each output component is off by at most 1.5 LSB.
* The energy is off by at most about 1.3·10⁵ LSB².

`TAU` defaults to 2¹⁸ = 262144. In simulations of about 1300 random
fault-free frames, the largest mismatch seen was about 2·10⁴.

τ sets the fault coverage. An error that changes a check's energy by less than
τ goes unnoticed. So does an error that happens to keep the energy almost
unchanged, such as a value `S` that becomes `−S`. `tb_fault_coverage` flips
one bit of one output bin of one FFT and sweeps the bit position. One run at
the default τ (48 errors per bit) gave:

| flipped bit of the 14-bit output | 0–5 | 6 | 7 | 8 | 9 | 10 | 11 | 12–13 |
|---|---|---|---|---|---|---|---|---|
| located and corrected | 0 | 0 | 11 | 24 | 27 | 45 | 47 | 48 |

These errors are not corrected:

* **Low bits (0–5).** The error is smaller than the rounding noise and stays
  inside the stated accuracy of a few LSB.
* **Middle bits.** Only some of the checks that watch the faulty FFT may fire.
  The result is either a one-flag syndrome (`check_alarm`) or, less often, a
  two-flag syndrome that names the wrong FFT. This is inherent to a
  threshold-based Parseval check, not a property of this implementation.

A smaller τ moves the curve down, at the risk of false alarms on large
signals.

## Streams, frames and timing

All FFTs, checks and the corrector run in lockstep on one clock.

* **Input.** While `en` is high, `x1..x4` each carry one real 8-bit sample per
  cycle. Every N = 8 samples form a frame. Frames may follow back to back, and
  `en` may drop inside a frame.
* **FFT (`fft`).** Samples are written at bit-reversed addresses into an input
  buffer. In the cycle after a frame's last sample, the complete radix-2
  decimation-in-time butterfly network (three stages, combinational) is
  evaluated and stored in an output buffer. That buffer is then streamed out in
  natural bin order, one bin per cycle. The first bin appears 2 cycles after
  the last input. Meanwhile the input buffer is already taking the next frame.
* **Checks.** The input energy of a frame is ready long before its output
  energy, and the next frame's input energy may arrive in between. A two-entry
  FIFO keeps the two apart. `p_valid` pulses 2 cycles after the last output
  bin.
* **Correction (`edc`).** The syndrome of a frame exists only after its last
  bin, so `edc` stores each frame of X1..X4 and X in one of two banks. When the
  flags arrive it reads the bank out, correcting the named FFT on the fly. The
  other bank meanwhile fills with the next frame.

Overall timing at the top:

* The first corrected bin comes N + 5 = 13 cycles after the cycle that carried
  the frame's last input sample.
* Throughput is one sample per stream per cycle.
* `err_detected`, `err_corrected`, `err_loc` (0 = FFT1) and `check_alarm` stay
  steady while a frame's N bins are output.

## Number formats

* Inputs: signed, `DATA_W` = 8 bits, real. The FFTs' imaginary inputs are
  tied to zero.
* Encoded inputs x5..x7 and x: `DATA_W + 2` bits, so they cannot overflow.
* FFT outputs: signed, `OW = DATA_W + log2(N) + 1 + FRAC` = 14 bits, with
  `FRAC` = 2 fractional bits. The outputs are not scaled, and
  `|X[k]| ≤ N·√2·max|x|` always fits. Two fractional bits keep the
  rounding error of each output component below half an integer unit.
* Twiddles: 1 and −j are exact. `cos(π/4)` is `11585 / 2^14`, and each product
  is rounded to the nearest output LSB.
* Parity FFT and combined outputs: `OW + 2` = 16 bits.
* A corrected output is computed at full width and then cut back to `OW` bits.
  It always fits when only one FFT is faulty.

## Top-level ports (`fft_ecc_psos`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| en | in | 1 | samples on x1..x4 are valid |
| x1 .. x4 | in | 8 | signed real input samples of the four streams |
| y_valid, y_last | out | 1 | corrected bin valid; last bin of the frame |
| y_idx | out | 3 | frequency bin k of the current outputs |
| y1_re/_im .. y4_re/_im | out | 14 | corrected spectra, 2 fractional bits |
| err_detected | out | 1 | syndrome was not 000 |
| err_corrected | out | 1 | an FFT was located and its output rebuilt |
| err_loc | out | 2 | the FFT that was rebuilt (0 = FFT1) |
| check_alarm | out | 1 | one-flag syndrome: a check is at fault |
| fault_en, fault_sel, fault_idx, fault_re, fault_im | in | 1, 3, 3, 16, 16 | error injection, see below |

Parameters: `N` = 8 (2, 4 or 8 are supported), `DATA_W` = 8, `FRAC` = 2,
`TAU` = 262144.

**Error injection.** While `fault_en` is high, `fault_sel` picks the target:

* 0–3: FFT1–FFT4. The XOR pattern `fault_re`/`fault_im` is applied to bin
  `fault_idx` of every frame.
* 4: the parity FFT, in the same way.
* 5–7: the result of Parseval check 1–3 is inverted.

This models the single soft error the scheme is built to survive. Tie
`fault_en` low in normal use.

## Where this design makes its own choices

The scheme, the 8-point size, the four 8-bit input streams with an `en` strobe
and the structure of the SOS check come from the published description of
Parity-SOS-ECC. The following are this implementation's own:

* **FFT internals.** Only "an FFT with sequential inputs and outputs" is
  specified. The buffered radix-2 FFT with a combinational butterfly network is
  the simplest that does the job. It is not pipelined, and the twiddle is a
  constant multiplication rather than a CORDIC rotator.
* **Outputs.** The published top shows 8-bit outputs. Here they are complex and
  14 bits wide, because an 8-point FFT of 8-bit data does not fit in 8 bits.
* **Tolerance.** The value of τ and the absolute (not relative) comparison.
* **Handshakes and buffering.** The stream strobes (`y_valid`, `y_last`,
  `y_idx`), the two-entry FIFO in each check and the two-bank frame store in
  `edc`.
* **Syndrome table and one-flag syndromes.** The syndrome table is derived from
  the check sums. The one-flag syndromes and their handling (`check_alarm`) are
  not covered by the original description.
* **Status and fault-injection ports.** These are not in the published top.

Not included:

* The two alternatives that Parity-SOS-ECC is compared with: plain ECC
  protection with three redundant FFTs, and Parity-SOS with one SOS check per
  FFT.
* Other numbers of parallel FFTs. The code is fixed at four FFTs and three
  checks.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | shared constants: twiddle, check-to-FFT table `CHECK_SET`, syndrome encoding, bit reversal |
| `rtl/fft.sv` | streaming N-point FFT with an error-injection port |
| `rtl/sos_accumulator.sv` | magnitude square and per-frame accumulator |
| `rtl/parseval_check.sv` | SOS check: two accumulators, FIFO, magnitude comparator |
| `rtl/input_encoder.sv` | x5, x6, x7 and parity input x |
| `rtl/output_combiner.sv` | X5, X6, X7 |
| `rtl/edc.sv` | syndrome decoding, frame store, correction |
| `rtl/fft_ecc_psos.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end `tb_fft_ecc_psos` and the sweep `tb_fault_coverage` |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. The testbenches compare against floating-point DFTs, or against sums
written out independently. Each has a watchdog. The end-to-end testbench runs
the top at its default parameters for 360 frames, mostly back to back. It
injects every kind of event (no error, an error in each FFT, in the parity
FFT, below the tolerance, in each check) and checks the outputs, the
diagnosis and the 13-cycle latency. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fft_pkg.sv \
    tb/tb_fft_ecc_psos.sv --top-module tb_fft_ecc_psos
./obj_dir/Vtb_fft_ecc_psos
```

Replace the testbench and top-module name for another testbench (for example
`tb/tb_fft.sv` with `--top-module tb_fft`). Each simulation runs in well under
a second. The RTL lints cleanly with `verilator --lint-only -Wall` apart from
style warnings: unused package constants, and the reset used both
asynchronously and in assertion `disable iff` clauses.
