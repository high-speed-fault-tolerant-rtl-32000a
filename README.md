# Fault-tolerant parallel FFTs with partial-sum checks

When several FFTs of the same size run side by side on different data, they
can protect each other the way the data bits of a Hamming code do. Treat each
FFT's whole output frame as one "bit", and add a few extra FFTs that transform
sums of the inputs. Because the FFT is linear, those extra outputs must equal
the same sums of the data outputs. A soft error in one FFT breaks this
relation, and the broken relation shows which FFT is faulty and how to rebuild
its output. This costs far less than triplicating every FFT (TMR).

This RTL protects **four 8-point FFTs on 32-bit complex samples**. It offers
two schemes. Both replace the usual sum-of-squares (Parseval) error check with
a *partial-sum* check that needs only adders:

| | technique 1 (`ftfft_tech1`) | technique 2 (`ftfft_tech2`) |
|---|---|---|
| extra FFTs | 1 parity FFT on a1+a2+a3+a4 | 3 redundant FFTs on a1+a2+a3, a1+a2+a4, a1+a3+a4 |
| checks | 3, on the groups {1,2,3}, {1,2,4}, {1,3,4} | 4, one per data FFT |
| how the faulty FFT is located | 3-bit syndrome, Hamming style | directly, from each FFT's own check |
| correction capacity | 1 faulty FFT per frame | up to 2 faulty FFTs per frame |

`ftfft_top` holds both schemes side by side. They share a clock and reset;
each has its own inputs, outputs and test ports.

## The partial-sum check

Any N-point DFT satisfies two identities that need no multiplier:

* **output side:** Σₖ Y[k] = N · x[0]
* **input side:** Y[0] = Σₙ x[n]

`partial_sum_check` evaluates both, for the real and the imaginary part, and
raises `err` when either fails. Both identities are linear. So they hold for a
single FFT (technique 2), and they also hold for a *group*: the sum of the
inputs of FFTs 1, 2 and 3 against the sum of their outputs (technique 1).
Then no fourth FFT has to be run on the group sum just to check it.

The check misses an error that leaves both sums unchanged. An example is +e
in one bin and −e in another, neither of them bin 0. A fault in a single
output word is always caught.

## Exact fixed-point FFT

Correcting by linearity only works if the FFT really is linear. With rounding
it is not: round(c·(x+y)) ≠ round(c·x) + round(c·y), so a rebuilt output would
differ from the true one by a few LSBs, and the checks would need a tolerance.
`fft8` avoids this. It never rounds.

* It is a radix-2 decimation-in-time FFT with three butterfly stages. All
  eight points are processed in parallel, and the output is registered.
* The only non-trivial twiddles are W8¹ = (1−j)/√2 and W8³ = (−1−j)/√2. They
  are applied as the integer C = round(2^F/√2), which is 46341 for F = 16.
  Every other term is shifted left by F.
* The output is therefore the DFT scaled by 2^F, with F fractional bits. The
  output width is OW = IW + 4 + F, which is 52 bits for the defaults and
  cannot overflow.

The FFT is thus an exact integer linear map, and two things follow. First,
correction is bit-exact: a rebuilt output equals what a healthy FFT would have
produced. Second, the checks need no tolerance. The output-side identity holds
exactly even though C is only an approximation of 2^F/√2. In the last stage
each twiddle product is added into bin k and subtracted from bin k+4, so it
cancels out of the sum over all bins.

The check still has a `THRESH` parameter (default 0). It is there for anyone
who replaces `fft8` with a rounding FFT.

## Technique 1: parity FFT and group syndrome

The input adders form the group sums A5 = a1+a2+a3, A6 = a1+a2+a4 and
A7 = a1+a3+a4, plus the parity input A = a1+a2+a3+a4. The parity FFT
transforms A into X. The output adders form B5, B6 and B7 from the data FFT
outputs. Check g compares its input group sum with its output group sum.
A faulty FFT upsets exactly the checks of the groups it belongs to:

| faulty FFT | syndrome p[2]p[1]p[0] |
|---|---|
| 1 | 111 |
| 2 | 011 |
| 3 | 101 |
| 4 | 110 |

`eic_parity` matches the syndrome against this table. It rebuilds the named
FFT as wᵢ = X − Σ_{j≠i} bⱼ and passes the other outputs through.

A syndrome that names no FFT raises `uncorrectable` and leaves the data
untouched. A single flag (a fault in a check) gives such a syndrome. Two
faulty FFTs also give a nonzero syndrome, so they are *detected*, but the
syndrome may point at the wrong FFT. With two faults the outputs cannot be
trusted; the scheme is rated for one faulty FFT per frame.

The parity FFT itself is not checked. A fault there has no effect unless a
correction uses it in the same frame.

## Technique 2: erasure correction with three redundant FFTs

Every data FFT has its own check, so a faulty FFT is known, not guessed. It is
an *erasure*. The redundant outputs f0 = B1+B2+B3, f1 = B1+B2+B4 and
f2 = B1+B3+B4 give three equations. `eic_erasure` solves each erased output
from an equation in which it is the only unknown, in two rounds:

* One erased FFT: any group that contains it gives it directly.
* Two erased FFTs: for every pair, at least one group contains only one of
  them. For example, with FFTs 1 and 2 both bad, group {1,3,4} gives FFT 1,
  and then group {1,2,3} gives FFT 2.
* Three or four erased FFTs: `uncorrectable` is raised. The unsolved outputs
  pass unchanged, and a healthy FFT's output stays correct.

As in technique 1, the redundant FFTs are not checked.

## TMR on the small logic

Errors in the adders, the checks or the correctors would reach the outputs
directly, so this logic is triplicated and voted with `tmr_vote`, a bitwise
majority. The FFTs themselves are not triplicated. In each technique two
stages are triplicated:

* the input adders;
* the whole detection and correction stage: output adders, checks and
  corrector.

`tmr_mismatch` reports that the copies disagreed in either stage. It is
flagged on the frame whose detection and correction ran in that cycle. A
fault in the input adders is flagged on the frame that was entering at the
time.

## Interface and timing (both techniques)

* All four frames (`a_re/a_im[4][8]`, IW bits each) enter together with
  `in_valid`. A new set may enter every clock.
* The results leave together with `out_valid` **two clocks later**. The first
  clock is the FFT register, together with the input sums delayed to line up
  with it. The second is the register after voting.
* Outputs: `w_re/w_im[4][8]`, OW bits each, scaled by 2^F.
* Status, valid with `out_valid`:
  * technique 1: `syndrome`, `err_loc`, `err_detected`, `uncorrectable`,
    `tmr_mismatch`;
  * technique 2: `err_flags`, `n_err`, `uncorrectable`, `tmr_mismatch`.
* `rst_n` is asynchronous and active low. It clears the valid and flag
  registers only. Data registers load only when their frame is valid.
* Fault-injection test ports, to be tied to 0 in use:
  * `inj_en` selects FFTs whose output bin `inj_bin` gets its real part XORed
    with `inj_val`. The data FFTs come first, then the parity FFT (technique
    1) or the redundant FFTs (technique 2).
  * `inj_tmr[r]` inverts one bit in copy r of both triplicated stages.

Parameters: `IW` (input width, default 32), `F` (twiddle fraction bits,
default 16) and `THRESH` (check tolerance, default 0). The frame size (8), the
number of data FFTs (4) and the number of groups (3) are fixed in
`ftfft_pkg`. The FFT structure and the group table are written for those
sizes.

## What is specified and what is chosen here

Taken from the design description:

* four parallel FFTs of 8 points with 32-bit input;
* the adder equations for A5–A7, A and B5–B7;
* partial sums in place of sums of squares;
* the parity-FFT scheme (technique 1) and the three-redundant-FFT scheme
  (technique 2);
* correction of two faulty FFTs in technique 2, including the example order
  (solve from an equation that does not contain both faulty FFTs);
* TMR on the adders and on the detection and correction logic.

Chosen here:

* The exact check equations. The description says only that partial sums of
  the FFT input and output replace the sums of squares.
* The exact, rounding-free fixed-point format and the radix-2 structure.
* Complex samples with 32 bits each for the real and the imaginary part.
  "Input bit length 32" could also mean 32 bits per sample or per frame.
* Pipelining, valid and reset behaviour.
* Correction by subtraction. The description speaks of XORing the parity
  output with the healthy outputs, which fits one-bit symbols; for multi-bit
  FFT words the linear equivalent is subtraction.
* The handling of syndromes that name no FFT, and of three or more erasures.
* The `tmr_mismatch` flags and the fault-injection ports.

Not built: the earlier Parseval (sum-of-squares) scheme, which the partial-sum
schemes replace. The description gives no area, power or error-coverage
figures to compare against.

## Verification

Every module has a self-checking testbench in `tb/`. Expected FFT values come
from a direct 8-point DFT in `ftfft_ref_pkg`. It uses the same integer twiddle
constants, worked out in floating point, but no butterfly structure.

| testbench | what it checks |
|---|---|
| `fft8_tb` | 200 frames: random, full-scale extremes and impulses; bit-exact outputs; latency of 1 |
| `parity_adder_tb` | group and total sums, including full-scale values |
| `partial_sum_check_tb` | clean frames pass; single-bin and bin-0 faults are flagged by the right identity; a cancelling pair is missed, as expected; `THRESH` |
| `tmr_vote_tb` | one faulty copy is outvoted; two copies decide |
| `eic_parity_tb` | every syndrome value; exact rebuild of the named FFT |
| `eic_erasure_tb` | all 16 erasure patterns; exact rebuild for up to 2 |
| `ftfft_tech1_tb`, `ftfft_tech2_tb` | streams of several hundred frame sets at default sizes, with random scenarios (clean, 1/2/3 faulty FFTs, parity or redundant FFT faults, TMR faults); outputs against the DFT; flags; latency of 2 |
| `ftfft_top_tb` | both techniques at default parameters; counts each mechanism and fails if one never occurs (streaming, correction of one or two FFTs, uncorrectable, masked parity/redundant/TMR faults, double-fault detection) |

All of them end with a line `TB_RESULT checks=N failures=M`.

## Simulating

The package files must be read first. For example, for the whole design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ftfft_pkg.sv tb/ftfft_ref_pkg.sv rtl/*.sv tb/ftfft_top_tb.sv \
  --top-module ftfft_top_tb
./obj_dir/Vftfft_top_tb
```

For a single block, replace the testbench and the top module name, e.g.
`tb/fft8_tb.sv --top-module fft8_tb`. Verilator's `-Wall` lint reports only
unused signals: the sub-flags `err_sum`/`err_dc`, which are kept for
observability, and the valid outputs of the FFT copies that run in lockstep
with the one that is used.
