# Multiplierless 13/15 fractional decimator (IFIR, rounded and sharpened)

A GSM software-radio receiver that samples at a fixed 80 MHz has to convert its
sample stream by 13/3840. That factor splits into an integer part, 1/256, and a
fractional part, 13/15. This RTL implements the fractional part: an up-sampler by
L = 13 followed by a low-pass filter and a down-sampler by M = 15.

Done directly, the filter would run at 13 times the input rate and would need a
long, steep response. Four ideas make it cheap:

1. **IFIR split.** The filter becomes a cascade `H(z) = G(z^5) I(z)`. `G` is a
   short *model* filter, stretched by 5. `I` is an *interpolator* filter that
   removes the images the stretching creates. The down-sampling splits the same
   way, `M = M1 * M2 = 5 * 3`.
2. **Noble identity.** The stretched `G(z^5)` moves behind the down-by-5 and
   becomes a plain `G(z)` running at one fifth of the rate.
3. **Polyphase decimation.** Both filters are written in polyphase form, so each
   branch filter runs at that stage's output rate.
4. **Rounding and sharpening.** The basis filters are rounded to multiples of
   2^-12, which makes their coefficients integers. Sharpening with the polynomial
   `3H^2 - 2H^3` then repairs the pass-band and stop-band damage that rounding
   does. Each product by a fixed integer coefficient is built from shifts and
   adds, so the filter path has no multiplier.

```
              clk_enable (one per up-sampled sample)
                 |
filter_in --> [expander  x13] --> [Sh{I_r}, polyphase, down 5] --> [round/sat 34->16]
   16 bit        (zero insertion)        stage 1, 34-bit out                 |
                                                                             v
filter_out <---------------------------- [Sh{G_r}, polyphase, down 3] <------+
   34 bit, ce_out                                stage 2
```

The 13/15 converter can sit in two places relative to the integer decimator by 256:

- **High-rate placement (`CONFIG = SRC_HIGH_RATE`, the default).** The converter comes
  first and sees the 80 MHz stream. After up-sampling that is 1040 MHz. The
  transition bands are wide, so both filters have only 67 taps.
- **Low-rate placement (`CONFIG = SRC_LOW_RATE`).** The converter comes after the
  integer decimator and sees 312.5 kHz. The interpolator has 83 taps and the
  model filter 277.

The high-rate placement is smaller. The low-rate one does fewer operations per
second. The integer decimator itself is not part of this RTL. In the high-rate
placement it connects to `filter_out`/`ce_out`. In the low-rate placement it
drives `filter_in`/`clk_enable`.

A third set, `CONFIG = SRC_EXAMPLE_R8`, is a smaller worked example of the same
method. Its overall filter has pass edge 0.0025 and stop edge 0.07. Its basis
filters are rounded more coarsely (r = 2^-8) and sharpened as a plain cube `H^3`.

## Timing and handshake

Everything runs on one clock, `clk`. There is one asynchronous, active-high
`reset`. The stream moves on enable strobes in the style of `clk_enable`/`ce_out`:

| point | strobe | period with `clk_enable` always high |
|---|---|---|
| input sample taken | `in_taken` (combinational, in the cycle `filter_in` is sampled) | 13 cycles |
| up-sampled stream | internal `y_valid` | 1 cycle |
| stage-1 output | `stage1_ce` | 5 cycles |
| final output | `ce_out` | 15 cycles |

So 15 input samples give 13 output samples. An enabled cycle stands for one
sample at the up-sampled rate, 13 x f_in. At full speed the clock must run at
13 x f_in; a lower sample rate can be fed by pulsing `clk_enable`. The source
should present a new `filter_in` after every `in_taken`.

Latency:

- The expander registers its output: 1 cycle.
- Each decimator writes its output one cycle after the enabled cycle that closes
  its block of M samples.
- The first input sample after reset opens both chains. It produces the first
  stage-1 output and then the first final output, 3 cycles after it is taken.

## The polyphase decimator (`polyphase_decimator`)

This is the core block. Both filter stages use it.

For a filter `h` of `NTAPS` taps and a factor `M`:

- Branch `k` (0..M-1) holds the taps `h[k], h[k+M], h[k+2M], ...`, which is
  `P = ceil(NTAPS/M)` taps.
- Branch `k` has its own `P`-deep delay line.

A phase counter works as the commutator. The first sample after reset goes to
branch 0. Later samples go to branches M-1, M-2, ..., 0, and the cycle repeats.
Each delay line therefore moves once per M inputs and holds samples
`x[(m-j)M-k]`.

The sample that enters branch 0 completes block `m`. In that same cycle, all
`M*P` products are summed and the output is registered:

```
y[m] = sum_k sum_j h[jM+k] * x[(m-j)M - k] = sum_i h[i] * x[mM - i]
```

This equals a direct-form FIR whose output is kept every M-th sample. The
testbenches check it against exactly that.

Implementation details:

- Branch 0 is summed with its incoming sample already shifted in, so no extra
  cycle is needed.
- Each product is a `shift_add_const_mul`. It adds one shifted copy of the
  sample for each bit set in |coefficient|, then negates the sum if the
  coefficient is negative.
- Zero coefficients produce no hardware.
- Products are 32 bits wide (16 x 16). They are summed at the full 34 bits.

Sizes at the defaults:

| stage | taps | branches x depth | tap registers |
|---|---|---|---|
| interpolator, high rate | 67 | 5 x 14 | 70 |
| model, high rate | 67 | 3 x 23 | 69 |
| interpolator, low rate | 83 | 5 x 17 | 85 |
| model, low rate | 277 | 3 x 93 | 279 |

## Coefficients (`src_coeffs_pkg`)

Each table is the impulse response of a sharpened, rounded basis filter:

```
h_r[n]      = 2^-12 * round(h[n] / 2^-12)              (rounding, r = 2^-12)
Sh{H_r}(z)  = 3 z^-D H_r(z)^2 - 2 H_r(z)^3              (D = group delay of H_r)
c[n]        = round(2^15 * sh[n])                       (16-bit, Q1.15, DC gain 32768)
```

`h` is an equiripple (Parks-McClellan) low-pass basis filter. Band edges are
normalised to Nyquist:

| table | pass edge | stop edge | basis taps | sharpened taps |
|---|---|---|---|---|
| `I_HIGH` | 0.00019 | 0.3333 | 23 | 67 |
| `G_HIGH` | 0.00095 | 0.3333 | 23 | 67 |
| `I_LOW` | 0.0492 | 0.3333 | 29 | 85, trimmed to 83 (end taps are 0) |
| `G_LOW` | 0.2460 | 0.3333 | 93 | 277 |
| `I_EX` (r = 2^-8, `H^3`) | 0.0025 | 0.33 | 52 | 154 |
| `G_EX` (r = 2^-8, `H^3`) | 0.0125 | 0.35 | 13 | 37 |

A sharpened filter of basis length `N` has `3N-2` taps. The basis lengths were
chosen so that the results match the target sizes of 67/67 and 83/277. For the
example set, the basis orders are 51 and 12.

The band edges, rounding factor, sharpening polynomial and filter lengths follow
the source design. The coefficient values themselves are this design's own,
because the source design's values are not available. Consequences:

- **Attenuation.** The 16-bit coefficient word limits stop-band attenuation to
  about 73-78 dB for most tables and 67 dB for `G_LOW`. The source
  specification asks for 100-110 dB. Reaching that needs a wider `COEF_W`.
- **Example-set pass band.** The 13-tap basis of `G_EX` cannot hold the
  0.001 dB ripple target; it has 0.115 dB.
- **Identical high-rate tables.** Both high-rate pass bands are tiny next to the
  0.333 stop edge. As a result `I_HIGH` and `G_HIGH` came out identical. Each
  also has 10 zero taps at each end.

To use other filters, replace the tables; `polyphase_decimator` accepts any
`NTAPS`/`COEF`.

## Fixed point

- The input, the inter-stage word and the coefficients are 16 bits. The outputs
  are 34 bits at full precision.
- `sat_round` re-quantises the stage-1 output to 16 bits between the stages. It
  divides by 2^12, rounding half up, and saturates.
- Both filters have unity DC gain, and zero insertion divides the signal by 13.
  The divide-by-2^12 step (instead of 2^15) applies a gain of 8 to make up for
  most of that loss. The overall DC gain is 8/13.
- `filter_out` is in units of 2^-15 of the 16-bit input scale.
- For ordinary signals the stage-1 word peaks near 8/13 of the input amplitude.
  The worst-case gain depends on the coefficient set:
  - High-rate set: 0.9993, so this set cannot saturate.
  - Example set: 0.73, so this set cannot saturate either.
  - Low-rate set: 1.26. Full-scale input whose signs match the taps can
    saturate it; `tb_frac_src_ifir` drives such a burst on purpose and checks
    the clipped result.
- The worst-case gain is the largest sum of |c| over taps 13 apart, divided
  by 2^12.

## Sequential multipliers

The design also includes two general-purpose multipliers, each one add per clock:

- **`shift_add_multiplier`** (unsigned, W = 32, 64-bit product register). The
  product register starts as `{0, multiplier}`. In each of W steps:
  - if the LSB is 1, the multiplicand is added to the upper half, keeping the
    carry;
  - the register shifts right.
- **`booth_multiplier`** (two's complement, radix-2 Booth). The register is
  `{A, Q, q_-1}`. In each step, the bit pair `Q[0] q_-1` decides the action:
  - `10`: subtract the multiplicand from A;
  - `01`: add it;
  - `00` or `11`: do nothing.

  The register then shifts right arithmetically. A has one guard bit, so
  subtracting the most negative multiplicand is exact.

Both multipliers use a `start` / `busy` / `done` handshake. `done` pulses W + 1
cycles after `start`. They are not on the filter path, because fixed
coefficients do not need general multipliers. `src_top` places them beside the
decimator with their own ports.

## Where this departs from the source design

- **Signed data.** The source design replaced its multipliers with an unsigned
  add-and-shift scheme and reported wrong outputs whenever the input changed
  sign. Here the sign is taken from the coefficient and the sample stays in two's
  complement, so products are exact for all inputs.
- **Flattened sharpening.** The sharpened response is built as one flattened
  16-bit FIR, not as a cascade of copies of the rounded basis filter. It is
  therefore a 16-bit re-quantisation of `Sh{H_r}`, not the exact
  integer-coefficient product.
- **Zero-valued samples.** Stage 1 computes on the zero-valued samples the
  expander inserts. It does not merge the up-sampler into the polyphase branches
  to skip them, so its sum is wider than it needs to be.
- **Adder count.** There is one adder per set coefficient bit, with no
  canonical-signed-digit recoding or sharing of sub-expressions. The adder count
  is therefore higher than the 122 (high rate) and 325 (low rate) adders of the
  source design's cost estimate.
- **Own choices.** The handshake, the reset style, the branch ordering, the
  inter-stage rounding and gain, and the Booth guard bit were chosen here.
- **Not included.** The integer decimator by 256 and the analog front end / ADC
  are not part of this RTL.

## Files

| file | content |
|---|---|
| `rtl/src_top.sv` | top: decimator plus the two multipliers |
| `rtl/frac_src_ifir.sv` | the 13/15 chain: expander, two decimators, re-quantiser |
| `rtl/polyphase_decimator.sv` | generic multiplierless polyphase FIR decimator |
| `rtl/shift_add_const_mul.sv` | fixed-coefficient shift-and-add product |
| `rtl/expander.sv` | up-sampler by L |
| `rtl/sat_round.sv` | rounding, saturating word-length reduction |
| `rtl/shift_add_multiplier.sv`, `rtl/booth_multiplier.sv` | sequential multipliers |
| `rtl/src_coeffs_pkg.sv` | word widths and the four coefficient tables |
| `tb/tb_*.sv` | one self-checking testbench per module (`sat_round` is checked inside `tb_frac_src_ifir`); `tb_src_top` runs the top at its defaults |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/src_coeffs_pkg.sv tb/tb_src_top.sv --top-module tb_src_top
./obj_dir/Vtb_src_top
```

The testbenches:

- **`tb_src_top`** runs 300 input samples through the full chain at its default
  parameters. It compares all 260 outputs with a direct-form reference model and
  checks the 13/5/15-cycle spacing. It also runs 150 products through each
  multiplier. It reports how often each mechanism occurred and fails if any never
  did.
- **`tb_frac_src_ifir`** runs all three coefficient sets side by side. It ends with a
  worst-case burst that saturates the low-rate inter-stage word.
- **`tb_polyphase_decimator`** checks the 83-tap, decimate-by-5 filter under a
  random clock enable.

All testbenches finish in well under a second.
