# Quad-level bit-stream signal processing

Oversampled sigma-delta converters deliver their signal as a fast stream of few-level
symbols. The usual way to process such a signal is to decimate it to multi-bit words at the
Nyquist rate, compute there, and interpolate back. Bit-stream signal processing (BSSP) skips
the decimator and interpolator: it filters, multiplies, divides and oscillates on the
oversampled stream itself. Each block is a small loop of an accumulator and a digital
sigma-delta modulator that turns the result back into a stream.

This RTL builds a library of such blocks for **quad-level** streams, where each sample is one
of four levels. It also builds a Type-1 digital phase-locked loop from them. Compared with
two-level (1-bit) or three-level streams, four levels carry less quantisation noise. The cost
is wider logic, mostly in the multiplier.

## Symbols and what a stream means

Every stream carries one 2-bit symbol per clock. Code `c` in 0..3 stands for the **level**
`L(c) = 2c - 3`, i.e. -3, -1, +1, +3 (`bssp_pkg::lvl`). A stream whose levels average to
`m` represents the normalised value `m/3` in [-1, +1]. Throughout this README, "the mean of a
stream" means that normalised value, averaged over many clocks. No block has a
valid/ready handshake: every block consumes and produces one symbol on every clock.
Reset (`rst_n`) is synchronous and active low.

## The modulator at the heart of every block: `bs_dsdm`

A first-order digital sigma-delta modulator converts a signed multi-bit value `x` into
symbols. It keeps an accumulator `u` and quantises it with a gain `K`:

```
y = 3 if u >= 2K,  2 if 0 <= u < 2K,  1 if -2K <= u < 0,  0 if u < -2K
u <= u + x - K*L(y)
```

The feedback `K*L(y)` is one of -3K, -K, K, 3K, the values midway between the thresholds.
Since `u` stays bounded, the mean of `L(y)` equals `x/K`. So `x` in [-3K, 3K] maps onto the
full range, and with `|x| <= 3K` the accumulator stays within [-4K, 4K-1]. The default width
`W = 11` is therefore exact for `K <= 256`. An assertion flags any accumulator overflow.
`y` comes straight from the register, so there is no combinational path from `x` to `y`.
The gain is an input port, `k_i`, because the NCO changes it on every clock.

## Stream arithmetic

| block | function | how |
|---|---|---|
| `bs_neg` | -a | code `c -> 3-c` (both bits inverted) |
| `bs_acc` | running sum, clipped to +-A | adds -3/-1/+1/+3 per symbol; `sat_o` flags clipping |
| `bs_add` | (a+b)/2 | half-sum of levels; even results rounded with a 1-bit error residual |
| `bs_mult` | a*b | exact product `L(a)*L(b)` in thirds of a level plus a residual in [-3, 2], requantised at +-6 and 0 |

The adder and multiplier are first-order error-feedback requantisers. Their output equals the
exact result plus the change in a bounded residual, so the mean is exact over long runs. The
multiplier's mean is `mean(a)*mean(b)` only if the two operands are uncorrelated. Feeding it
the same stream twice gives the mean square instead (this matters for the square root,
below). Both blocks are combinational from their inputs to their output, with one register
for the residual.

## Lowpass filter: `bs_lpf`

```
w[n] = clip( w[n-1] + a*L(x[n]) - b*L(y[n]), +-3K )      y = DSDM_K(w)
```

The mean of `y` follows `w/K`, so the filter has a DC gain of `a/b` and a pole near `1 - b/K`.
That puts the normalised cut-off near `b/(2*pi*K)`. The gains `a` and `b` are constant
multiplexers over four values. With the defaults `K = 256`, `a = b = 3` the gain is 1 and the
cut-off is 0.00187 of the sample rate. Measured responses: |H| = 0.97 at a quarter of the
cut-off, and 0.10 at ten times the cut-off (first-order roll-off).

The following settings give other cut-offs and gains. They are derived from
`cut-off = b/(2*pi*K)` and `gain = a/b`. In simulation each one reproduces its DC gain to
0.01 %, and its response at the nominal cut-off is 0.707 to 0.716 of the DC gain:

| cut-off | gain | K | a | b | W |
|---|---|---|---|---|---|
| 6.22e-4 | 2 | 256 | 2 | 1 | 11 |
| 6.22e-3 | 4 | 256 | 40 | 10 | 11 |
| 3.11e-4 | 2 | 512 | 2 | 1 | 12 |
| 3.11e-4 | 1 | 512 | 1 | 1 | 12 |

`K = 512` needs `W = 12`. The clip of `w` (`sat_o`) keeps the modulator in range when the gain
is above 1 and the input is large. At unity gain it is not reached in practice.

## Oscillator and NCO: `bs_osc`, `bs_nco`

This is the least obvious block. Two clipped accumulators and two modulators form a loop:

```
wc <= clip(wc - L(Qs), +-A)      Qc = DSDM_K(wc)
ws <= clip(ws + L(Qc), +-A)      Qs = DSDM_K(ws)
```

Since `Qc` averages `wc/K` and `Qs` averages `ws/K`, this is the difference equation of a
rotation by about `1/K` radians per clock. Both streams are therefore sigma-delta coded
sinusoids, with `Qs` a quarter period behind `Qc`, at a normalised frequency of about
`1/(2*pi*K)`.

The discrete rotation grows slowly in amplitude. The +-A clip is what holds the amplitude at
about `A/K` levels, so it is a working part of the circuit and not an overflow guard. `A` must
stay below `3K`.

Reset sets `wc = A` and `ws = 0`, so the oscillation starts at full amplitude. Measured
periods: 497.8 clocks for K = 79 (2*pi*79 = 496.4) and 378.5 for K = 60 (377.0).

`bs_nco` turns the oscillator into an NCO by driving its gain from a control stream `c`:

```
K <= K0 + DK*L(c)          (registered: one clock from c to K)
```

With the defaults `A = 75`, `K0 = 79`, `DK = 3`, the gain moves between 70 and 88. A larger
`c` gives a larger `K` and so a lower frequency. The register on `K` also breaks the
combinational loop that would otherwise run through the DPLL.

## Divider and square root: `bs_div`, `bs_sqrt`

Both are the same feedback loop:

```
divider:      acc += (x - z*y)/2     z = DSDM_K(acc)      =>  mean(z) = mean(x)/mean(y)
square root:  acc += (x - z*z')/2    z = DSDM_K(acc)      =>  mean(z) = sqrt(mean(x))
```

The loop is built from the multiplier, negation, adder, a clipped accumulator (+-A) and a
modulator. At equilibrium the accumulator input averages zero, which forces the relation
shown. The defaults are `K = 64` and `A = 190`, so the output can reach about +-0.99.

- **Divider:** the denominator mean must be positive, otherwise the loop is unstable. Measured
  results are within 0.01 of `x/y`.
- **Square root:** `z'` is `z` delayed by one clock. Squaring a symbol with itself would give
  the mean square of the stream, not the square of its mean. The delayed product still carries
  some correlation, so the result is a few hundredths high. Measured: sqrt(0.25) gives 0.54,
  sqrt(0.5) gives 0.75, sqrt(0.09) gives 0.30. The negative root is unstable, so the loop
  settles on the positive one.

## Phase-locked loop: `bs_dpll`

```
z = ( is*Qc  -  ic*Qs ) / 2          NCO control c = z  (no loop filter: Type 1)
```

The input is given as a sine stream `is` and a cosine stream `ic`. Two multipliers, a negation
and the adder form `z`, which is proportional to the sine of the phase error. `z` drives the
NCO directly.

Because a larger `c` lowers the NCO frequency, the stable lock point is with the NCO roughly
half a period away from the input phase. The mean of `z` then holds the frequency offset. The
defaults are `A = 80`, `K0 = 81`, `DK = 3`, for an input at 1/512 of the sample rate. The
free-running NCO period is about 509. With a 0.9-amplitude input the loop locks to period
511.96 within 60k clocks, with a steady phase. The NCO can be tuned over `K` = 72..90,
but the lock range is narrower: `z` can never average more than about a sixth of full scale.

## Noise performance

`tb_sndr` measures the in-band SNDR at an oversampling ratio of 128 (band edge fs/256). It
uses 65536 samples, a Hann window, and counts the peak bin +-3 as signal. Results:

| output | SNDR | published quad-level figure |
|---|---|---|
| LPF, full-scale sinusoid at 0.00189 | 63.9 dB | 65.2 dB |
| NCO, control held at code 2 (K = 82) | 46.6 dB | 49.4 dB (average) |
| NCO, control alternating 1/2 (mean K = 79) | 40.6 dB | |
| DPLL, Qc while locked to 1/512 | 39.8 dB | 56.9 dB |

The filter is close to the published figure. The NCO and the DPLL fall short. In the DPLL,
the phase-detector output retunes K by up to +-9 on every clock, which phase-modulates the
NCO. Scaling the tuning by `L(c)/3` instead gives 44.0 dB, but the loop then barely holds
lock. How the published DPLL figure was measured is not known.

## Top level: `bssp_top`

The top places these parts side by side, each with its own ports:

- the DPLL (`dpll_*`);
- a stand-alone modulator from an 11-bit signed sample to symbols, with gain
  `MOD_K = 256` (`mod_x`, `mod_y`);
- the lowpass filter (`lpf_*`);
- the divider (`div_*`);
- the square root (`sqrt_*`).

The filter, divider and square root are the parts a bit-stream QPSK demodulator is assembled
from. That demodulator is not included: its interconnection is not defined here. Yosys counts
155 flip-flops for the whole top.

## Design choices to be aware of

The structure of the modulator, filter, oscillator, divider, square root and DPLL, and the
numbers `A`, `K0`, `DK` of the NCO and DPLL, follow the published design. The following are
this implementation's own choices:

- The adder and multiplier internals. Only their function is defined. They are the simplest
  first-order requantisers, and the adder halves the sum. The published FPGA figures for the
  quad-level divider and square root (about 190 flip-flops each, against 29 and 31 here)
  point to a more elaborate multiplier there; this one is likely noisier.
- The NCO gain law `K = K0 + DK*L(c)`. It scales `DK` by the level (+-1, +-3). Scaling by
  `L(c)/3` instead, so that K moves by at most `DK`, is the other plausible reading. It locks
  the DPLL with little margin (see the noise section). It is a one-line change in `bs_nco`.
- The register between `c` and `K`.
- The filter, divider and square-root constants (`K`, `a`, `b`, `A`).
- The clip on the filter's integrator.
- The one-clock delay in the square root.
- Reset values and all register widths.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Every testbench
prints one `TB_RESULT checks=N failures=M` line and has a watchdog. `tb/tb_bssp_pkg.sv`
holds a behavioural sigma-delta source and a period meter. With Verilator 5, naming the two
packages and the testbench (the other modules are found through `-y`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/bssp_pkg.sv tb/tb_bssp_pkg.sv tb/tb_bs_dpll.sv \
  --top-module tb_bs_dpll -o sim && ./obj_dir/sim
```

What the testbenches check:

- The modulator, accumulator, adder, multiplier and filter are compared symbol by symbol
  with integer models. Then their means are checked.
- The oscillator and NCO are checked for period and quadrature phase.
- The divider and square root are checked for settled means.
- `tb_lpf_settings` runs the filter at the four settings in the filter section. It also drives
  the default filter with a full-scale sinusoid at 0.00189: the response is 0.704, against
  0.702 for an ideal first-order filter, and the modulator is not overloaded.
- The DPLL is checked for frequency and phase lock.
- `tb_sndr` measures the noise figures in the table above.
- `tb_bssp_top` runs the whole top at its default parameters for 100k clocks, in about
  2 s. It checks every part at once and counts NCO retuning, NCO clipping, lock and the use
  of all four modulator symbols.

FPGA resource counts of the published work are not reproduced.
