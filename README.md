# Digital waveform generation from Walsh functions

This RTL generates periodic waveforms (a sine, a triangle and a trapezoid)
directly as digital samples. It uses no table of samples and no multiplier.
Each waveform is written as a truncated Walsh series: a sum of constant
coefficients, each multiplied by a Walsh function. Walsh functions take only
the values +1 and -1, so each product is just the coefficient or its
negative. The Walsh functions come from a binary counter and a few XOR gates.
Each channel is therefore a counter, an XOR network and one adder tree of
constants whose signs are switched. Any other periodic shape needs only a
different set of coefficients.

## The series

On the unit period `0 <= x < 1`, a function is approximated by

    f(x) ~ A_0*psi(0,x) + A_1*psi(1,x) + ... + A_(M-1)*psi(M-1,x),
    A_n  = integral over [0,1) of f(x)*psi(n,x) dx,            M = 2^N

The Walsh functions `psi(n,x)` are built from the **Rademacher functions**

    R_(k+1)(x) = Sgn(sin(2*pi*2^k*x))      (Sgn(0) = +1)

`R1` is a square wave with one period per unit interval, `R2` has two, and
so on. `psi(n,x)` is the product of the `R_(i+1)` for every bit `i` that is
set in `n`, and `psi(0,x) = 1`. This is the Paley, or dyadic, ordering. For
example, `psi(7) = R1*R2*R3` and `psi(11) = R1*R2*R4`.

The truncation has a simple meaning. With `M = 2^N` terms, the series is a
staircase with `M` equal steps per period. Its value on each step is exactly
the mean of `f` over that step. The testbenches use this fact as their
reference: they compare the RTL with means of the ideal waveform, never with
the coefficient tables.

## From ±1 arithmetic to gates

Code +1 as logic 0 and -1 as logic 1. A product of ±1 values is then the XOR
of their bits, which gives three stages:

1. **`rademacher_gen`**: an N-bit phase counter `k`, with `x = k/2^N`.
   `R_(n+1)` is -1 exactly when bit `N-1-n` of `k` is set. The counter bits
   are therefore the Rademacher functions: `R1` is the MSB and `RN` the LSB.
2. **`walsh_gen`**: `psi(n)` is the XOR of the counter bits selected by the
   binary digits of `n`. All `2^N` functions are produced. Synthesis removes
   the ones whose coefficient is zero.
3. **`walsh_series_sum`**: each term is `+A_n` when the Walsh bit is 0 and
   `-A_n` when it is 1. All terms are added in one combinational sum and
   registered. The coefficients are elaboration-time constants, so each term
   is a constant selected by a single bit.

`walsh_wave_gen` chains the three stages for one waveform. `walsh_wave_top`
places three such channels side by side.

## Coefficient tables (`walsh_pkg`)

Coefficients are `round(A_n * 2^14)` for amplitude 1, using the Paley-order
Walsh functions above. Only the first 64 are stored. A channel with fewer
Rademacher functions uses the leading `2^N` entries.

| wave | definition on [0,1) | non-zero A_n (in units of 1.0) |
|---|---|---|
| sine | `sin(2*pi*x)` | A1=0.63662, A7=-0.26370, A11=-0.12663, A13=-0.05245, A19=-0.06270, A21=-0.02597, A25=-0.01247, A31=+0.00517, A35=-0.03128, A37=-0.01295, A41=-0.00622, A47=+0.00258, A49=-0.00308, A55=+0.00128, A59=+0.00061, A61=+0.00025 |
| triangle | `4x` up to 1/4, `2-4x` up to 3/4, then `4(x-1)` | A1=0.5, A7=-0.25, A11=-0.125, A19=-0.0625, A35=-0.03125 |
| trapezoid | `4x` up to 1/4, `1` up to 3/4, then `4-4x` | A0=0.75, A3=-0.25, A5=A6=-0.125, A9=A10=-0.0625, A17=A18=-0.03125, A33=A34=-0.015625 |

The triangle and trapezoid coefficients are exact binary fractions. Each sine
coefficient is rounded to the nearest 2^-14, so the 16 non-zero sine terms add
at most 8 LSB of error.

To add a waveform, compute its `A_n` with the integral above and add a table.
Because a truncated series equals the step means, the table can also be found
as the Walsh–Hadamard transform of the step means:
`A_n = (1/M) * sum_k mean_k * psi(n, k)`. Then add the table to the `wave_e`
enum and to `wave_table()`.

## Number format and timing

- Samples are 16-bit two's complement with 14 fraction bits (Q2.14), so
  +1.0 = 16384.
- A truncated series of a function bounded by 1 is itself bounded by 1. The
  samples therefore always fit in 16 bits. An assertion in
  `walsh_series_sum` checks this in simulation.
- Each clock with `en` high advances the phase by one step. One period takes
  `2^N` enabled clocks. The output frequency is `f_clk / 2^N`; for a lower
  frequency, pulse `en`.
- `p` is registered. It shows the sample for the phase that was present one
  clock earlier. The `rad`, `walsh` and `phase` outputs show the current
  phase.
- Reset is synchronous and active low. It clears every phase and every
  sample.

## Top level: `walsh_wave_top`

| channel | parameter (default) | terms | steps/period | non-zero terms |
|---|---|---|---|---|
| sine | `SINE_RAD` = 6 | 64 | 64 | 16 |
| triangle | `TRI_RAD` = 5 | 32 | 32 | 4 |
| trapezoid | `TRAP_RAD` = 6 | 64 | 64 | 10 |

The ports are `clk`, `rst_n` and `en`, shared by all channels. Each channel
also has these outputs:

- `*_p`: the sample.
- `*_phase`: the step index.
- `*_rad`: R1..RN.
- `*_walsh`: psi(0..2^N-1).

The channels count independently, so the 32-step triangle repeats twice per
sine period. After coarse synthesis, the whole top is about 230 word-level
cells and 65 flip-flop bits, with no memories and no multipliers.

Setting `SINE_RAD = 5` gives a 32-term sine. That sine has exactly eight
non-zero terms (psi 1, 7, 11, 13, 19, 21, 25, 31), driven by five Rademacher
functions.

## Accuracy

- The staircase follows the step means of the ideal curve. For the 64-step
  sine, the step mean differs from the sine at the step's midpoint by at most
  about 0.04 % of full scale.
- Within a step, the ideal curve moves away from the held value by up to
  `pi/64`, about 0.05.
- The peak values are ±16357 for the sine (step mean next to x = 1/4 and
  3/4), ±15360 for the 32-step triangle, and 16384 and 512 for the trapezoid.

## Design choices and departures

- **Sine coefficients.** The sine coefficients are computed from the integral
  definition. Some sine coefficients in circulation for this expansion carry
  different signs (for example a positive A11 or a negative A31). Those signs
  do not reproduce the waveform: at x = 0 the series must sum to the first
  step's mean, about +0.049. The coefficients here do sum to that value.
- **Triangle length.** The triangle uses 32 terms. With this truncation the
  64-term coefficient A35 is stored but not used.
- **Amplitude.** The amplitude is fixed at 1.0. For another amplitude, scale
  the table.
- **Design additions.** The following are this design's own: the Q2.14
  format, the output register, the count enable, the synchronous reset, and
  the shared clock, reset and enable of the three channels.
- **Frequency and phase.** Frequency is set only by the clock and `en`. There
  is no phase-offset or frequency-word input.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
for the full design at its default sizes:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/walsh_pkg.sv tb/walsh_ref_pkg.sv rtl/*.sv tb/tb_walsh_wave_top.sv \
      --top-module tb_walsh_wave_top -Mdir obj && ./obj/Vtb_walsh_wave_top

The testbenches are:

- `tb_walsh_wave_top`: runs all three channels for about 400 clocks. It
  drops `en` at random and applies a reset in the middle of the run. It
  checks every sample, every Rademacher and Walsh output, and the phase
  counters. It also checks the peak values. It reports how often each event
  occurred: period wraps, hold cycles, the reset, negated terms, and
  positive and negative samples.
- `tb_walsh_wave_gen`: checks the three channels separately, including the
  one-clock latency and the period length.
- `tb_walsh_series_sum`: drives the Walsh values of each step directly into
  summers loaded with each table.
- `tb_walsh_gen`: checks all 64 Rademacher patterns exhaustively, and the
  first eight Walsh waveforms bit by bit.
- `tb_rademacher_gen`: compares the generated functions with
  `Sgn(sin(2*pi*2^n*x))`.

The testbenches share the reference functions in `tb/walsh_ref_pkg.sv`.

## Files

- `rtl/walsh_pkg.sv`: format, types, waveform enum, coefficient tables
- `rtl/rademacher_gen.sv`: phase counter and Rademacher functions
- `rtl/walsh_gen.sv`: XOR network for the Walsh functions
- `rtl/walsh_series_sum.sv`: sign-switched constant summation
- `rtl/walsh_wave_gen.sv`: one waveform channel
- `rtl/walsh_wave_top.sv`: the three channels
- `tb/`: one testbench per module, and `walsh_ref_pkg.sv` with the references
