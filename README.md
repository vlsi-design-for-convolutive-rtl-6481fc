# Convolutive blind source separation with on-line Infomax learning

Two microphones each pick up a mix of two sources. What they hear is a
*convolutive* mix: every source reaches every sensor through its own short
filter (direct path, echoes). This RTL recovers the sources from the
sensor samples. It learns the separating filters while it runs, with no
training signal and no knowledge of the mixing.

The method is the Infomax (information maximisation) separation network. Each
output is a sum of FIR-filtered sensor signals:

    u1(t) = (W11 * x1)(t) + (W12 * x2)(t)
    u2(t) = (W21 * x1)(t) + (W22 * x2)(t)

Here `(W * x)(t) = sum_k w^k x(t-k)` is a causal FIR filter. After every
sample, each output goes through a logistic sigmoid `y = 1/(1+exp(-u))`.
The filter taps are then nudged in the direction that makes the outputs
statistically independent:

    w^k_ij  +=  mu * (1 - 2 y_i(t)) * x_j(t-k)          for every tap k
    w^0_ij  +=  mu * cofactor(w^0_ij) / det(W0)         extra term, tap 0 only

`W0` is the 2x2 matrix of zero-lag taps `w^0_ij`. The extra term is entry
(i,j) of the inverse transpose of `W0`. It keeps the outputs from collapsing
to zero, so the network cannot reach independence by shrinking everything.

The architecture follows the published structure of a CBSS chip, *VLSI Design
for Convolutive Blind Source Separation*:

- four adaptive Infomax filters;
- two small carry-save adders that form `u1` and `u2`;
- two scaling-factor modules that compute `1-2y` with a five-segment
  piecewise-linear sigmoid;
- a D-term unit that computes the inverse-transpose term.

That source does not give word lengths, coefficients, the step size, timing
or handshakes. Those parts are this design's own and are listed under
"Choices made here" below.

## Block structure

```
            x1 ──┬──────────────► W11 ──┐
                 │                      ├─ CSA ─► u1 ─► scaling factor ─► 1-2y1, mu(1-2y1) ─► W11, W12
            x2 ──┼──┬───────────► W12 ──┘
                 │  │
                 └──┼──────────► W21 ──┐
                    │                  ├─ CSA ─► u2 ─► scaling factor ─► 1-2y2, mu(1-2y2) ─► W21, W22
                    └──────────► W22 ──┘
      tap 0 of W11, W12, W21, W22 ─► D-term unit ─► mu*d_ij ─► tap-0 update of W_ij
```

| file | block |
|---|---|
| `rtl/cbss_pkg.sv` | number formats, pipeline depths, shared types |
| `rtl/cbss_top.sv` | the 2x2 network (top) |
| `rtl/infomax_filter.sv` | one adaptive FIR filter `W_ij` with its weight update |
| `rtl/cla_adder.sv` | carry-lookahead adder, used for the sum of each tap pair |
| `rtl/csa_tree.sv` | multi-operand carry-save adder |
| `rtl/scaling_factor.sv` | five-segment `1-2y` and `mu(1-2y)` |
| `rtl/dterm_unit.sv` | `mu*cofactor(w_ij)/det(W0)` |
| `rtl/seq_divider.sv` | restoring divider used by the D-term unit |

## The Infomax filter: two sample chains and a delayed update

`infomax_filter` is the hardest part to follow. Its timing decides what the
learning rule actually computes.

**Filtering path.** A new sample enters the *upper* register chain, which
holds `x(t) … x(t-5)` for six taps. Each tap multiplies its sample by its
weight. The products of taps (0,1), (2,3) and (4,5) are added in pairs by
carry-lookahead adders, and the three pair sums are registered. A carry-save
adder then adds the pair sums, and the result is registered as the filter
output at full precision (27 bits, 19 fraction bits). So the filter has two
register stages. The output appears 3 cycles after the sample: one cycle for
the chain, one for the pair sums, one for the CSA.

**Output adders.** In `cbss_top`, a two-operand `csa_tree` adds the two filter
outputs of a row. The sum is rounded down to Q5.11, saturated and registered:
`u_i` appears 4 cycles after the sample. The scaling factor module adds 2 more
cycles, so `mu(1-2y_i)` for a sample is ready **6 cycles** after that sample
(`SF_LAT` in the package).

**Learning path.** The update needs `x_j(t-k)` for the *same* sample `t` that
produced `y_i(t)`. The upper chain may have moved on by then, because up to
six newer samples can have arrived. So each filter carries every sample
through a 6-deep delay line into a second, *lower* register chain. The lower
chain shifts exactly when the matching scaling factor arrives, and an
assertion checks that the two always coincide. At that clock edge, every tap
computes:

    w^k  <=  sat( w^k + round(sf * xl[k] / 2^9) + (k == 0 ? mu*d_ij : 0) )

`sf` is `mu(1-2y_i)` in Q2.14, `xl[k]` is the lower-chain sample in Q1.7, and
the result is a Q4.12 weight.

**Consequence.** At one sample per clock, a sample is filtered with weights
that do not yet include the updates of the five samples before it. This is a
delayed-gradient form of the stochastic rule. At audio rates, with many
clocks per sample, every update has landed before the next sample arrives,
and the rule is the textbook per-sample rule.

**Rounding matters.** The update term is small: at `mu = 2^-8` a typical
update is a couple of weight LSBs. With a truncating shift, each update would
pull every weight down by half an LSB on average. In simulation, that bias
stopped separation at about 10 dB SIR. With rounding to nearest, SIR reached
about 25 dB. The `mu` scaling and the D-term output are rounded to nearest
for the same reason.

## Scaling factor: five line segments

`1-2y = 1 - 2/(1+exp(-n))` is odd-symmetric. It is approximated by five
segments `m = a*n + b`. The outer pair and the inner pair share their slopes,
and their biases have opposite signs. One multiplier and one adder therefore
serve all segments; only the selected `(a, b)` changes.

| segment | input range (n = u) | a | b |
|---|---|---|---|
| ls1 | n < -3.3125 | a1 = -0.00321 | +b1 = +0.9486 |
| ls2 | -3.3125 ≤ n < -1.5 | a2 = -0.1651 | +b2 = +0.4123 |
| ls3 | -1.5 ≤ n ≤ 1.5 | a3 = -0.44 | 0 |
| ls4 | 1.5 < n ≤ 3.3125 | a2 = -0.1651 | -b2 = -0.4123 |
| ls5 | n > 3.3125 | a1 = -0.00321 | -b1 = -0.9486 |

The segments meet at their connection points, so the curve is continuous.
The outer segments reach ±1 at the ends of the input range (|n| = 16). The
break points and values come from a minimax fit made for this design. The
largest error against the exact function is about 0.03, and the testbench
checks a 0.035 bound. They are module parameters (`C1, C2, A1, B1, A2, B2,
A3`), in Q5.11 for the break points and Q2.14 for the coefficients. Stage 1 selects the
segment; stage 2 multiplies, adds, saturates, and produces both `g = 1-2y` and
`sf = g * 2^-MU_SHIFT`. The segment used is also an output (`seg`), so a
testbench can see which segments are being exercised.

## D-term unit

For a 2x2 matrix, the cofactors are just the entries of `W0` rearranged:

    d11 = w22/det   d12 = -w21/det   d21 = -w12/det   d22 = w11/det
    det = w11*w22 - w12*w21

The unit computes these values in order:

1. A determinant circuit forms `det`. It uses two multipliers and a
   subtractor, and registers the result together with the four cofactors.
2. A restoring divider forms one reciprocal, `2^36/|det|`. It produces one
   quotient bit per clock, 37 cycles in all. The result saturates to Q12.12,
   and the sign is then restored.
3. Four multipliers scale the cofactors by the reciprocal. Each result is
   shifted by `2^-(12+MU_SHIFT)`, rounded and saturated to the weight
   format.

The unit runs continuously: it snapshots `W0`, produces `mu*d` **41 cycles**
later, and starts again. The filters use the latest result. At one sample per
clock, the inverse is therefore up to about 80 samples old. When samples are
at least about 85 cycles apart, it always belongs to the weights left by the
previous sample. One divider that is reused is far smaller than four
dividers. Because `W0` changes by only about `mu` per sample, a slightly old
inverse does no harm.

`valid` goes high with the first result after reset. The top only enables
learning (`learning` output) once `adapt_en` is high and `valid` is high. A
singular `W0` gives the largest reciprocal instead of an error.

## Number formats

| signal | width | format | range |
|---|---|---|---|
| sensor sample x | 8 | Q1.7 | [-1, 1) |
| tap weight w | 16 | Q4.12 | [-8, 8), saturating |
| filter output u_ij | 27 | 19 fraction bits | exact |
| network output u_i | 16 | Q5.11 | [-16, 16), saturating |
| 1-2y and mu(1-2y) | 16 | Q2.14 | [-2, 2) |
| mu*d_ij | 16 | Q4.12 | saturating |
| 1/det | 24 | Q12.12 | saturating |

The step size is `mu = 2^-MU_SHIFT`, default `2^-8`, so all `mu`
multiplications are shifts. The filters reset to the identity: tap 0 of
`W11` and `W22` is 1.0, and every other tap is 0.

## Interface and timing of `cbss_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `adapt_en` | in | 1 = learn, 0 = freeze the weights |
| `x_valid`, `x1`, `x2` | in | one sensor sample pair, at most one per clock |
| `u_valid`, `u1`, `u2` | out | separated outputs, 4 cycles after the sample |
| `g_valid`, `g1`, `g2`, `seg1`, `seg2` | out | `1-2y_i` and its segment, 6 cycles after the sample |
| `learning` | out | weight updates are being applied |
| `dterm_done` | out | pulses on each D-term refresh |
| `w[i][j][k]` | out | every tap weight (for observation or read-out) |

There is no back-pressure; every stage has a fixed latency.

Parameters: `TAPS` (default 6, must be even) and `MU_SHIFT` (default 8, at
least 1). Other word lengths are set in `cbss_pkg`. The PWL coefficients are
parameters of `scaling_factor`.

## Choices made here (not in the source description)

- All word lengths and fixed-point formats. Only the 8-bit sample width
  follows the source's simulation waveforms.
- The step size, the identity start, and rounding to nearest in the update,
  the `mu` scaling and the D-term.
- The PWL break points and coefficients, and ending the outer segments at
  ±1 at the edge of the input range.
- The exact form of the learning rule. The source says "Infomax stochastic
  learning rules" and gives the D-term formula; the per-tap rule above is the
  standard Infomax rule for a feedforward convolutive network.
- The handshake (valid strobes), all pipeline registers beyond those drawn
  in the filter (after the pair adders and after the CSA), the 6-deep delay
  line that feeds the lower chain, and the delayed-gradient behaviour that
  follows from it.
- How the D-term unit is built: a shared sequential divider, continuous
  refresh, saturation on a singular `W0`. The 4-bit group organisation of
  the carry-lookahead adder. The linear 3:2 compressor array in the
  carry-save adder.
- Learning waits for the first D-term result; `adapt_en` freezes learning.

The source reports a 90-nm ASIC at 100 MHz. This RTL has not been
synthesised to a cell library. The critical path is the tap multiplier plus
the pair adder, or the multiply-add of the weight update. Whether that meets
10 ns in a given process is not known.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb/tb_cla_adder.sv` | against `+`, corner and random operands, widths 25 and 16 |
| `tb/tb_csa_tree.sv` | 2, 3 and 5 operands against a plain sum, signed extremes |
| `tb/tb_scaling_factor.sv` | segment, `g`, `sf` against a reference, the 0.035 error bound against the exact sigmoid, continuity at the connection points, 2-cycle latency, all five segments used |
| `tb/tb_dterm_unit.sv` | `mu*d_ij` against a reference inverse transpose for identity, random, negative-determinant, singular and saturating matrices; the 41-cycle refresh; `valid` after reset |
| `tb/tb_infomax_filter.sv` | cycle-by-cycle reference model of both chains and all weights, random gaps and back-to-back samples, random scaling factors, D-terms and update enables, weight saturation; `u` and its 3-cycle latency |
| `tb/tb_cbss_top.sv` | whole network at default parameters. An algorithmic per-sample model predicts `u`, `g`, segments and all 24 weights for 5000 learning samples; then one sample per clock with frozen weights (full throughput, exact outputs); then learning at one sample per clock. Counts that learning waited for the D-term, D-term refreshes, all five segments, updates, frozen and back-to-back samples |
| `tb/tb_cbss_separation.sv` | separation quality. Two Laplacian sources, convolutive mixing with cross-paths `0.3 z^-1 + 0.1 z^-2`, 300 000 learning samples at one per clock, then frozen. The output SIR is estimated from the output/source cross-correlations over 10 lags. Requires at least 12 dB gain over the sensors; typically 25 dB against 5.4 dB |

Simulating one, for example the whole network:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cbss_pkg.sv \
          rtl/cbss_top.sv tb/tb_cbss_top.sv --top-module tb_cbss_top -Mdir obj -o sim
./obj/sim
```

`-y rtl` lets verilator find the submodules by file name. Every testbench
runs in under a few seconds.
