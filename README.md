# Fault-tolerant parallel 4-point FFTs with partial summation and multiple-error correction

When several FFTs run side by side, a soft error (a particle strike that
flips a node for one computation) can corrupt the result of any one of them.
Triplicating every FFT costs too much. This design uses two properties of
the FFT instead:

* **Linearity.** The FFT of a sum is the sum of the FFTs. Three redundant
  FFTs transform sums of the original inputs. Their outputs satisfy fixed
  relations with the original outputs, and those relations can be solved
  for an FFT whose output is known to be wrong.
* **Cheap per-FFT checks.** A small checker beside each original FFT says
  *which* FFT is wrong. The redundant FFTs then only have to correct, not
  locate. Because each FFT is checked on its own, two FFTs can be wrong in
  the same transform and both can still be repaired.

The RTL protects four original FFTs (A1..A4) with three redundant ones. It
corrects any one or any two corrupted FFTs in the same cycle.

## Structure

```
 A1..A4 ──► [stage-1 regs] ──┬─► fft4_real x4 ──⊕ inj_mask ──┬─► checker x4 ─► err[3:0]
                             │                               │
                             └─► redundant_encoder ─► fft4_real x3 (B5, B6, B7)
                                                             │
                  [stage-2 regs: B1..B7, err] ─► error_corrector ─► [stage-3 regs] ─► W1..W4
```

| File | Role |
|---|---|
| `rtl/ftfft_pkg.sv` | Counts, sample width, output word order, checker-mode enum |
| `rtl/fft4_real.sv` | 4-point radix-2 FFT of real samples. Adders only. |
| `rtl/redundant_encoder.sv` | Sums A5 = A1+A2+A3, A6 = A1+A2+A4, A7 = A1+A3+A4 |
| `rtl/partial_sum_check.sv` | Adder-only per-FFT checker (the default) |
| `rtl/parseval_check.sv` | Sum-of-squares per-FFT checker (the "parallel correction" variant) |
| `rtl/error_corrector.sv` | Rebuilds up to two flagged FFTs from B5..B7 |
| `rtl/ft_parallel_fft.sv` | Top level: pipeline, fault injection, checker selection |

### The FFT and its word order

Each FFT takes four real samples x0..x3. It forms the butterfly nodes
a = x0+x2, b = x0−x2, c = x1+x3 and d = x1−x3, then outputs
X0 = a+c, X1 = b − j·d, X2 = a−c and X3 = b + j·d. For a real input, X0 and
X2 are real, so every FFT produces six words, always in this order:

`{X0, X1.re, X1.im, X2, X3.re, X3.im}`

For example, the samples 1, 2, 3, 4 give 10, −2+2j, −2 and −2−2j.

## Correction: the hardest part

Let B1..B7 be the outputs of FFTs 1..7. FFTs 5..7 are the redundant ones.
By linearity:

```
B5 = B1 + B2 + B3      B6 = B1 + B2 + B4      B7 = B1 + B3 + B4
```

Each relation leaves out a different one of FFT2, FFT3 and FFT4. That is
what makes two errors correctable. With two flagged FFTs, the first one is
rebuilt from the relation that does not contain the second. The second is
then rebuilt from another relation, using the value just recovered for the
first. The table lists every case. All pairs are handled:

| Flags | Correction (in order) |
|---|---|
| 1 | B1 = B5 − B2 − B3 |
| 2 | B2 = B5 − B1 − B3 |
| 3 | B3 = B5 − B1 − B2 |
| 4 | B4 = B6 − B1 − B2 |
| 1,2 | B1 = B7 − B3 − B4, then B2 = B5 − B1 − B3 |
| 1,3 | B1 = B6 − B2 − B4, then B3 = B5 − B1 − B2 |
| 1,4 | B1 = B5 − B2 − B3, then B4 = B6 − B1 − B2 |
| 2,3 | B3 = B7 − B1 − B4, then B2 = B5 − B1 − B3 |
| 2,4 | B4 = B7 − B1 − B3, B2 = B5 − B1 − B3 |
| 3,4 | B3 = B5 − B1 − B2, B4 = B6 − B1 − B2 |

If three or four FFTs are flagged, the words pass through unchanged and
`out_uncorrectable` is raised. Some triples could be solved in principle:
those that contain FFT1 give a determinant of ±1. The triple {2,3,4} cannot
be solved, because its determinant is −2. This design does not correct any
triple.

The redundant FFTs have no checker of their own. An error inside one of
them is neither detected nor corrected, and it spoils any correction that
uses it. The scheme relies on the adders and redundant FFTs being protected
by other means, or on errors being rare enough.

## The two checkers

### Partial summation (`CHECK = CHK_PARTIAL_SUM`, default)

The checker uses no multipliers. It recomputes the first-stage nodes a, b, c
and d from the FFT's inputs. It then tests six sums of output pairs, which
have the second-stage twiddles folded in:

```
X0+X2 = 2a    X0−X2 = 2c    X1.re+X3.re = 2b
X1.re−X3.re = 0    X1.im+X3.im = 0    X3.im−X1.im = 2d
```

The six relations are linearly independent, and the arithmetic is exact.
So any change to any set of output words breaks at least one of them. The
check flags every error that appears at the FFT outputs. It cannot see an
error in the input samples themselves, because the checker reads the same
samples as the FFT.

This particular choice of sums is this design's interpretation. The general
idea is "sum the node values of the 4-point FFT, with the twiddle factors,
on the input side and on the output side, using only adders".

### Parseval / sum of squares (`CHECK = CHK_PARSEVAL`)

This is the "parallel correction" variant. Each checker compares
Σ|Xk|² with 4·Σxn² exactly, at full width. It needs ten squarers per FFT,
and it misses any error that leaves the energy unchanged. The simplest such
error is a sign flip of one output word, and some multi-bit flips also go
unseen. When a corruption is missed, the output of that FFT is silently
wrong. Any correction that uses the missed FFT's words is then wrong too.
The Parseval testbench demonstrates this blind spot.

## Interface and timing of `ft_parallel_fft`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset that clears all registers |
| `in_valid` | in | 1 | `in_a` and `inj_mask` hold a new set |
| `in_a[4][4]` | in | W | Samples of FFTs 1..4, signed |
| `inj_mask[4][6]` | in | W+2 | XOR masks applied to the original FFTs' output words (soft-error model); zero in normal use |
| `out_valid` | out | 1 | Outputs hold a result |
| `out_w[4][6]` | out | W+2 | Corrected words W1..W4, signed, in the word order above |
| `out_err` | out | 4 | Checker flags |
| `out_corrected` | out | 4 | FFTs that were rebuilt |
| `out_uncorrectable` | out | 1 | More than two FFTs flagged; words not corrected |

* The design has three register stages and accepts one set per clock with
  no stalls. Edge 1 captures the inputs. Edge 2 captures the FFT outputs
  and flags. Edge 3 captures the corrected words.
* `out_valid` follows `in_valid` three cycles later.
* W defaults to 5-bit two's-complement samples.
* Words grow by two bits per adder tree, so nothing wraps:
  * original FFT words are W+2 = 7 bits;
  * redundant FFT inputs are W+2 bits;
  * redundant FFT outputs are W+4 bits.

  The exact arithmetic is needed for the sum-of-squares relation. It also
  makes every correction exact.
* Concurrent assertions in the top enforce two output rules. Only flagged
  FFTs are marked corrected. `out_uncorrectable` is set exactly when more
  than two flags are raised.
* The fault mask is applied between each original FFT and both its checker
  and the corrector. This is how an upset inside the FFT datapath would
  appear.

## What follows the source method and what is this design's own

Taken from the method:
* four parallel 4-point FFTs plus three redundant FFTs;
* the redundant input equations;
* the correction order for the FFT1+FFT2 case;
* the principle of an adder-only partial-sum check, and the Parseval
  alternative;
* the 5-bit sample width and the output word order of the reference
  simulation.

This design's own choices:
* the exact sums in the partial-sum checker;
* the corrections for the other pairs and for single errors;
* the refusal to correct triples;
* real-valued inputs;
* the bit growth;
* the three-stage pipeline, the valid signal and the reset;
* the XOR fault-injection port.

The reference simulation prints 5-bit output words. This RTL widens the
outputs to 7 bits so that the whole input range is exact. For the example
values, the results are the same.

Not built: the OFDM transmitter that the method is applied to. It is only
named, and its mapping and interface are not specified. Also not built: the
earlier schemes the method is compared against (Hamming-coded redundant
FFTs only, one parity FFT with a Parseval checker per FFT, and
Parseval-with-ECC).

The method reports the following for the partial-summation design on an
FPGA flow: about 6,950 gates, a 5.05 ns delay and 246 mW. For the
Parseval-based parallel correction it reports about 3,100 gates, 2.2 ns and
243 mW. The RTL here is not calibrated against those numbers.

## Verification

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values come
from `tb/ftfft_tb_pkg.sv`, which evaluates the DFT directly from its
definition, X_k = Σ x_n·(−j)^(kn mod 4), with no butterflies.

* `tb_fft4_real`: the 1,2,3,4 example, the range extremes, and 500 random
  sets.
* `tb_redundant_encoder`: extremes and random sets.
* `tb_partial_sum_check`: no false alarms on correct outputs; every
  corruption flagged. The corruptions include single-bit flips and random
  masks on random word sets.
* `tb_parseval_check`: the flag must equal the energy prediction. Sign
  flips show the undetectable cases.
* `tb_error_corrector`: all 16 flag patterns, with random consistent data.
* `tb_ft_parallel_fft`: 4,002 sets through the default top, mostly back to
  back with idle gaps. They are:
  * clean sets;
  * single errors in each FFT;
  * all six pairs, including FFT1+FFT2 on the 1,2,3,4 example;
  * triples and quadruples.

  The test checks the flags, the corrected words and the latency of 3.
  It fails if any of these cases never occurs.
* `tb_ft_parallel_fft_parseval`: the same flow with
  `CHECK = CHK_PARSEVAL`. It checks full correction when the flags are
  right, and the flags alone when a corruption is invisible to the check.

To simulate with Verilator 5, list the packages first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ftfft_pkg.sv rtl/fft4_real.sv rtl/redundant_encoder.sv \
  rtl/partial_sum_check.sv rtl/parseval_check.sv rtl/error_corrector.sv \
  rtl/ft_parallel_fft.sv tb/ftfft_tb_pkg.sv tb/tb_ft_parallel_fft.sv \
  --top-module tb_ft_parallel_fft -Mdir obj && ./obj/Vtb_ft_parallel_fft
```

Swap the last testbench file and `--top-module` to run any other test. All
of them finish in well under a second.

## Changing the design

* **Sample width.** Set `W` on the top. The widths inside follow it. The
  Parseval checker's squares are formed in 32 bits, so keep W below about 12.
* **Checker.** Set `CHECK`.
* **Different number of FFTs or points.** The redundancy relations, the
  corrector's case table and the checker sums are written out for four
  4-point FFTs. They would have to be re-derived.
