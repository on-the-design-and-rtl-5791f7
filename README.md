# Multiplier-less I/Q decimator and sample rate changer for a software radio IF

A software radio receiver digitises a wide IF band, mixes it to baseband in
I and Q, and must then bring one user's channel down to a sample rate that
suits the baseband processor. The ratio between the two rates is rarely an
integer, so the decimator needs an integer part and a fractional (rational or
even irrational) part, and a channel filter that removes adjacent channels.

This RTL implements the decimator for that job, following the structure
published in *On the Design and Multiplier-Less Realization of Digital IF for
Software Radio Receivers*. Its ideas are:

* The integer decimators stop early, so that their output is still
  oversampled. It then goes straight into a **Farrow fractional-delay filter**
  that performs the arbitrary rate change. No interpolating ("L-band") filter
  is needed in front of the rate changer.
* The programmable channel FIR of the usual architecture is replaced by a
  **fixed low-pass filter (HBF) after the rate changer**, followed by an
  optional decimation by two.
* Every fixed filter uses **sum-of-powers-of-two (SOPOT) coefficients**. It is
  built from shifts and adds, with shared sub-expressions (a multiplier
  block). The only general multipliers in a channel are the three in the
  Farrow interpolation, which multiply by the delay parameter `d`.

```
          +-----+  +------+  +------+  +------+  +----------+  +-----+  +----+
in  --+-->| CIC |->|LPF#3 |->|LPF#2 |->|LPF#1 |->|  FDDF    |->| HBF |->| /2 |-+-> out
      |   |/Mcic|  |  /2  |  |  /2  |  |  /2  |  |  /M_I    |  +-----+  +----+ |
      |   +-----+  +------+  +------+  +------+  +----------+     |           |
      |  each of these five stages has a bypass multiplexer       +-----------+
                                                                   /2 bypass
```

The overall decimation ratio is

    M* = M_CIC * 2^m * M_I * (2 if the final /2 is used)

where `m` is the number of LPF stages in use and `M_I >= 1` is any value
representable in 8.24 fixed point.

`digital_if` (the top) holds two identical channels, one for I and one for Q,
sharing one configuration. The quadrature mixer, its local oscillator and the
ADC are outside this RTL: the top takes the mixed I and Q samples as inputs.

## The Farrow sample rate changer (`fddf`, `src_ctrl`)

This is the part that needs the most care.

**Filter.** A fractional-delay filter with delay `D + d` has impulse response
`h(n, d)`. The Farrow structure approximates every tap by a cubic in `d`:
`h(n, d) = c0[n] + c1[n] d + c2[n] d^2 + c3[n] d^3`. The filter then splits
into four fixed sub-filters `C_l(z)` with taps `c_l[n]`. Each sub-filter sees
the same input, and the output is the polynomial

    y = ((v3*d + v2)*d + v1)*d + v0,     v_l = output of C_l(z)

evaluated by Horner's rule. Here the sub-filters have 36 taps (order 35) and
`D = 17.5`. `C_0` and `C_2` are even-symmetric and `C_1` and `C_3` are
odd-symmetric. The coefficients were fitted for `d` in `[-0.5, 0.5]`.

**Which inputs, which d.** Let the input samples be numbered `n = 0, 1, 2...`.
Output `k` belongs to input time `t_k = k*M_I`. It is computed at input
`floor(t_k)`, with the fractional part `mu_k = t_k - floor(t_k)`. Between
outputs `k-1` and `k`, exactly `s_k = floor(t_k) - floor(t_(k-1))` new inputs
enter the filter, which is at least 1 because `M_I >= 1`. `src_ctrl` tracks
this without multiplying:

* a 24-bit phase register holds `mu_k`;
* a down-counter holds how many inputs remain until the next output.

When the counter is zero at an input, that input produces an output. The
control then computes `sum = mu + M_I`, keeps `frac(sum)` as the new phase and
reloads the counter with `floor(sum) - 1`. Output `k = 0` is taken at the
first input after reset.

The sub-filters have a delay of `17.5 + d`. The interpolator therefore uses
**`d = 0.5 - mu`**, which maps `mu` in `[0, 1)` onto `d` in `(-0.5, 0.5]`.
Output `k` is then the band-limited input at time `k*M_I - 18`: a fixed
latency of 18 input samples for any phase.

**Arithmetic and pipeline.** The sub-filters run on every input sample, at
full precision. Only `d` changes from output to output. Each `v_l` is rounded
to 24 bits, keeping 2 fraction bits below the 16-bit data LSB. `d` is signed
Q1.15. The three Horner steps occupy three pipeline registers, and each
product is rounded back to the `v` scale. The result is rounded and saturated
to 16 bits.

| event | clock |
|---|---|
| input sample accepted (`in_valid`) | 0 |
| sub-filter outputs `v_l` registered, `d` registered | 1 |
| `v3*d + v2` registered | 2 |
| `(..)*d + v1` registered | 3 |
| `out_valid`, `out_data` | 4 |

With `bypass` set, the input appears at the output one clock later.

## Multiplier-less filters (`sopot_mb`, `sopot_tfir`, `fir_stage`)

Every fixed filter (LPF#1 to #3, the HBF and the four Farrow sub-filters) has
the same transposed-form structure. The current input is multiplied by all
coefficients at once, and the products are summed along a chain of registers:

    z[i] <= c[i+1]*x + z[i+1],   v = c[0]*x + z[0]

All sums in the chain are kept at full precision (38 bits).

**The multiplier block.** A coefficient is a 16-bit integer `c` with weight
`2^-15`. `dif_pkg` contains functions that run during elaboration and split
`c` into canonical signed digits (`csd_pos`, `csd_neg`). `sopot_mb` first
builds a bank of two-term sub-expressions of the input,
`x + x*2^j` and `x*2^j - x`, for `j = 1 .. 16`. It then takes each
coefficient's digits two at a time, lowest first. A pair of digits becomes one
shifted and signed entry of the bank, and an unpaired last digit adds a
shifted copy of `x`. Synthesis removes any bank entries that no coefficient
uses.

All filters have linear phase, so only half of the taps need a product. The
mirrored tap reuses it, negated for the odd-symmetric sub-filters.

Adder counts for the coefficient products of this design's coefficients are
below. The source design reports 249 before and 110 after its (more
elaborate) minimum-adder multiplier block.

| filter | digits - 1 (no sharing) | with the sub-expression bank |
|---|---|---|
| HBF | 60 | 31 |
| LPF#1 | 30 | 21 |
| LPF#2 | 18 | 12 |
| LPF#3 | 15 | 12 |
| FDDF C0..C3 | 147 | 88 |
| total | 270 | 164 |

This bank is a simple common-sub-expression scheme. It does not search for
the minimum-adder graph.

**Decimating stages.** `fir_stage` wraps a filter with a downsampler by two.
The downsampler keeps the first of every two filter outputs after reset or
after leaving bypass. Each output is rounded (half up) and saturated to 16
bits. The stage has two bypass inputs:

* The LPF stages tie both together, so one multiplexer bypasses the filter
  and the downsampler.
* The HBF stage is never bypassed. Only its `/2` can be switched off.

A filtered sample leaves a stage 2 clocks after it arrived; a bypassed sample
leaves after 1 clock.

## Filter specifications and the coefficients used

The orders, band edges and the 16-bit coefficient wordlength are those of the
source design's example. Band edges are given relative to each filter's
input rate, with the Nyquist frequency at 1.

| filter | order (taps) | passband | stopband | signed digits per coefficient (max / average) |
|---|---|---|---|---|
| LPF#3 | 7 (8) | 0.05 | 0.925 | 5 / 4.75 |
| LPF#2 | 11 (12) | 0.1 | 0.85 | 5 / 4.0 |
| LPF#1 | 17 (18) | 0.2 | 0.7 | 7 / 4.33 |
| FDDF, cubic in d | 35 (36) | 0.4 | 0.7 | 6 / 3.04 |
| HBF | 47 (48) | 0.4 | 0.6 | 7 / 3.5 |

The source gives no coefficient values, so the values in `dif_pkg` are this
design's own:

* **LPFs and HBF:** Parks-McClellan equiripple designs for the edges above.
  Each coefficient is rounded to a nearby SOPOT value by greedy
  power-of-two selection, with an LSB of `2^-15` and at most 5 (LPF#2,
  LPF#3), 6 (FDDF) or 8 (LPF#1, HBF) terms. The table gives the resulting
  canonical-signed-digit counts.
* **FDDF:** for 41 delays evenly spaced over `d` in `[-0.5, 0.5]`, a
  weighted least-squares low-pass filter with delay `17.5 + d` is designed
  (passband weight 1, stopband weight 50). Then, tap by tap, a cubic
  polynomial in `d` is fitted through those filters. The polynomial
  coefficients are rounded to SOPOT values in the same way.

The design targets are 0.01 dB passband deviation and 80 dB stopband
attenuation. The complete chain without the CIC (`tb_design_example`)
measures:

| configuration | ratio | passband deviation | stopband attenuation |
|---|---|---|---|
| M_I = 1 | 16 | 0.0097 dB up to 0.048 pi | 86.5 dB from 0.075 pi |
| M_I = 2 | 32 | 0.0054 dB up to 0.024 pi | 78.4 dB from 0.0375 pi |

The stopband with `M_I = 2` falls 1.6 dB short of 80 dB. Filtered on their
own, the HBF reaches 79.4 dB and the FDDF 80.7 dB at 16-bit SOPOT
resolution. The loss comes from coefficient quantisation: before rounding,
the same 48-tap HBF design reaches about 85 dB. To use new
coefficients, replace the arrays in `dif_pkg`. The RTL derives everything
else, including tap counts, symmetry and shift-add structure, from the
arrays.

All fixed low-pass filters have even length and even symmetry, so each has
a zero at the Nyquist frequency. Cascades with a large overall ratio need this
zero to avoid build-up of aliased energy there.

One irregularity is kept on purpose: the HBF is named a half-band filter, but
its order is 47 (48 taps, even length). An even-length filter cannot have the
zero-valued alternate taps of a classic half-band filter, so all 48 taps are
non-zero.

## CIC decimator (`cic_decimator`)

The source treats the CIC as an optional, well-known first stage and gives no
parameters. It is built as a standard Hogenauer decimator:

* 4 integrators at the input rate (pipelined, one per clock);
* a counter that passes every `M_CIC`-th value (`M_CIC` from 1 to 16; 0 acts
  as 1);
* 4 combs with a differential delay of 1;
* a programmable right shift `cic_shift`, with rounding and saturation, that
  removes the gain `M_CIC^4`. The shift is exact for power-of-two `M_CIC`.

The integrators are 32 bits wide and wrap around, which is exact for
`M_CIC <= 16`. An output leaves 5 clocks after the `M_CIC`-th input.

## Interface and configuration

All stages accept at most one sample per clock and have no back-pressure. A
`valid` strobe marks each sample. The reset is synchronous and active low, and
it clears all state. The configuration `cfg` (type `dif_pkg::cfg_t`) is meant
to be static: change it only in reset or while no samples flow.

| field | meaning |
|---|---|
| `cic_bypass`, `cic_m`, `cic_shift` | CIC on/off, `M_CIC`, gain-removal shift |
| `lpf3_bypass`, `lpf2_bypass`, `lpf1_bypass` | remove an LPF stage (and its `/2`) |
| `fddf_bypass`, `mi` | rate changer on/off, `M_I` as unsigned 8.24 (`32'h0180_0000` = 1.5) |
| `dec2_bypass` | skip the `/2` after the HBF |

Top-level ports of `digital_if`: `clk`, `rst_n`, `cfg`, `in_valid`, `in_i`,
`in_q` (signed 16 bit), `out_valid`, `out_i`, `out_q`. An assertion checks
that the two channels' output strobes coincide.

Each stage band-limits the signal only for the stage that follows it. The
band edges above assume the full chain, with the LPFs used from LPF#1
upwards: with one LPF, use LPF#1; with two, LPF#2 and LPF#1. Other
combinations work mechanically but alias more.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sopot_mb` | every product of the HBF and C1 blocks against `x*c`, extreme and random `x` |
| `tb_sopot_tfir` | LPF#3 and C1 transposed filters against direct convolution, random gaps |
| `tb_lpf3`, `tb_lpf2`, `tb_lpf1`, `tb_hbf` | stage output against convolution, rounding and saturation, latency, `/2` phase, no-`/2` and bypass modes |
| `tb_cic_decimator` | `M_CIC` = 1, 2, 3, 8, 16 against the equivalent boxcar FIR, latency, saturation, bypass |
| `tb_src_ctrl` | output positions `floor(k*M_I)` and `mu_k` exact for six `M_I` values, including irrational and near-integer ones |
| `tb_fddf` | outputs against the Farrow sum in real arithmetic (2 LSB); delayed-sine accuracy (40 LSB; measured 7.6 LSB on a 20000 amplitude at 0.3 pi, a timing error below 0.0004 input samples); latency; bypass |
| `tb_prog_decimator` | three configurations: output count against `M*`, DC gain, stopband suppression |
| `tb_digital_if` | end to end at default sizes: four configurations with complex tones; output count; I/Q envelope against the expected gain (0.5 %); stopband suppression; every mechanism (each stage active and bypassed; FDDF outputs with `s_k = 1` and `s_k > 1`; HBF with and without `/2`) must occur |
| `tb_design_example` | magnitude response of the full chain without CIC, for `M_I = 1` and `2` (table above) |

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dif_pkg.sv tb/tb_ref_pkg.sv tb/tb_digital_if.sv --top-module tb_digital_if
./obj_dir/Vtb_digital_if
```

Each testbench runs in seconds.

## Limits and departures from the source design

* Coefficient values, data wordlength (16 bits between stages), rounding,
  saturation, reset, handshake, pipeline timing and the CIC's size are this
  design's choices. The source fixes only the structure, the filter orders,
  the band edges and the 16-bit coefficient wordlength.
* The multiplier block shares two-digit sub-expressions. It is not a
  minimum-adder design.
* `M_I` must be at least 1, so the rate changer only decimates. Irrational
  ratios are approximated to 24 fraction bits.
* No timing analysis has been done. At the intended ADC rates (40 to 80
  Msample/s for a 20 to 40 MHz IF band), the CIC and the first LPF would
  probably need more pipelining or a polyphase form.
* Not included: the ADC, the LO2 quadrature mixer and oscillator, and the
  baseband DSP.

## Files

`rtl/`: `dif_pkg` (constants, `cfg_t`, coefficients, CSD functions),
`sopot_mb`, `sopot_tfir`, `fir_stage`, `cic_decimator`, `src_ctrl`, `fddf`,
`prog_decimator`, `digital_if` (top).
`tb/`: one testbench per module as listed above, plus `tb_ref_pkg` (reference
rounding and random samples).
