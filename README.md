# 32-tap multiplierless FIR low-pass filter (bit-serial distributed arithmetic)

This is a 16-bit, 32-tap low-pass FIR filter that uses no multipliers. Each
product `h[k]·x[n-k]` is not computed on its own. Instead the filter uses
**distributed arithmetic (DA)**: it handles the input samples one bit position
at a time and looks up a precomputed sum of coefficients for each bit slice.

Write each Q1.15 sample as bits `x = -b15 + Σ_{i<15} b_i·2^(i-15)`. Then

    y = Σ_k h[k]·x[k] = -L(b15) + Σ_{i=0}^{14} 2^(i-15)·L(b_i)

Here `L(b)` is the sum of the coefficients whose sample has a 1 in that bit
position. `L` depends only on the 32 bits of one slice. So a table, an adder
and a shift replace 32 multipliers. A single table of 2^32 entries is
impossible, so the taps are split into **eight groups of four**. Each group
has its own 16-entry table and accumulator, and one adder sums the eight
group results at the end.

The filter is meant for 48 kHz audio. Its pass band runs to 9.6 kHz and its
stop band starts at 12 kHz. At 16 clock cycles per sample it needs a 768 kHz
clock.

## Top level: `Hd`

| port         | dir | width | meaning                                               |
|--------------|-----|-------|-------------------------------------------------------|
| `clk`        | in  | 1     | clock, 16 enabled cycles per sample                   |
| `clk_enable` | in  | 1     | clock enable; every register holds while it is low    |
| `reset`      | in  | 1     | asynchronous, active high; clears all state           |
| `filter_in`  | in  | 16    | signed Q1.15 input sample                             |
| `filter_out` | out | 16    | signed Q1.15 output sample, registered                |

The port names and the module name `Hd` follow the original filter.
Coefficients can be overridden with the `COEFFS` parameter (32 signed
Q1.15 values, tap 0 = newest sample). All sizes are in `rtl/fir_da_pkg.sv`.

## The bit-serial schedule (read this first)

A 4-bit phase counter (`da_phase_ctrl`) splits time into 16-cycle **frames**,
one per sample. It advances only on cycles with `clk_enable` high.
"Edge" below always means an enabled clock edge.

| phase of the edge | what happens                                                                 |
|-------------------|------------------------------------------------------------------------------|
| 0 (`load`)        | `filter_in` enters tap 0, and every tap passes its word to the next one. Every tap's shift register is loaded. The accumulators take bit 0 of the old frame, which completes the old frame's dot products. |
| 1 (`first`)       | The output register takes the sum of the eight finished group results. Each accumulator restarts with the **negated** LUT word for the MSB slice (bit 15 has negative weight in two's complement). |
| 2 … 15            | The shift registers move one place. Each accumulator does `acc ← 2·acc + LUT`, for bits 14 … 1. |

So the sample captured on edge *e* appears on `filter_out` after edge
*e + 17* and holds for 16 edges. The first enabled edge after reset is a
phase-0 edge. The driver must therefore hold `filter_in` steady for each
16-cycle frame, starting with the first enabled cycle after reset. The
filter has no frame strobe output. The driver keeps count, or the `load`
strobe can be brought out of `u_ctrl` if needed.

The bits are sent MSB first. As a result, the accumulator only ever shifts
left and never drops a bit. Its 34-bit result is the exact dot product of
its four taps, in units of 2^-30.

## Blocks

| module            | role |
|-------------------|------|
| `fir_da_pkg`      | Sizes (32 taps, 16-bit words, 4 taps per LUT), types, default coefficients, and the LUT-entry function. |
| `da_phase_ctrl`   | Phase counter 0..15 with the `load`, `first` and `last` strobes. |
| `da_tap`          | One tap. Its word register forms the sample delay line. Its parallel-load shift register replays the word MSB first. |
| `da_lut`          | 16-entry ROM built at elaboration: `entry[a] = Σ_j a[j]·COEF[j]`. Address bit j comes from tap j of the group. The word is 18 bits wide. |
| `da_accumulator`  | Shift-add accumulator: `acc ← first ? -d : 2·acc + d`, 34 bits, exact. |
| `da_output_adder` | Sums the eight group results. It shifts right by 15 (truncation, toward −∞), saturates to 16 bits and registers the output. |
| `Hd`              | Wires together 32 taps, 8 LUTs, 8 accumulators, the output adder and the controller. |

After synthesis the design is about 1300 flip-flops:

- 32 × 16 shift-register bits;
- 31 × 16 word-register bits (the last tap's word register drives nothing
  and is removed);
- 8 × 34 accumulator bits;
- the 4-bit phase counter and the 16-bit output register.

It also has eight 16 × 18-bit ROMs, and its adders are 34 bits wide at most.

## Coefficients and number format

All data words are signed Q1.15. The default coefficients are a 32-tap
equiripple low-pass for the band edges above, quantised to Q1.15 and scaled
so that they sum to 34484/32768 (DC gain 1.0524). Two things follow from that
gain:

- A constant input of `1234h` settles to `1328h`.
- A constant input of `F234h` settles to `F17Bh`.

These are reference values for this filter, and both are checked in the
testbench. The response comes from the default coefficients:

- pass-band gain: +0.44 … +1.57 dB
- stop-band attenuation: about 42.6 dB

The target specification asked for 1 dB ripple and 90 dB attenuation. No
32-tap filter can reach 90 dB with a 2.4 kHz transition at 48 kHz: Kaiser's
estimate needs about 115 taps. Because the DC gain is above 1, inputs near
full scale saturate the output.

To use other coefficients, pass `COEFFS` to `Hd` or edit `COEFS` in the
package. Each LUT is recomputed at elaboration. Each group's LUT word is 2
bits wider than a coefficient, so any four Q1.15 coefficients fit.

## Design choices and departures

The DA structure follows the filter as originally described:

- 32 taps and 16-bit words;
- four shift registers feeding each LUT;
- an Add/FF accumulator after each LUT;
- a final Add/FF at the output.

The following are choices made in this implementation:

- **Coefficients.** They are this design's own (see above).
- **Bit order and schedule.** MSB first, with the exact phase schedule and a
  17-edge latency.
- **Output quantisation.** The output is truncated, not rounded, and it
  saturates instead of wrapping. Truncation is needed to get `F17Bh` for
  `F234h`.
- **Reset.** Asynchronous, active high.
- **No feedback at the output adder.** The original drawing shows a feedback
  path around the final adder. Here the group accumulators already hold
  complete results, so the output adder combines them once per sample and
  keeps no state across samples.
- **Serial DA only.** This design is the serial (one bit per cycle) form. A
  parallel-DA variant, which handles several bit slices per cycle, would be
  faster. It is not built.
- **No extra pipelining.** Pipelining beyond the registered
  tap → accumulator → output path is not added.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_da_phase_ctrl`: phase count, wrap, hold when disabled, the strobes,
  and an asynchronous reset.
- `tb_da_tap`: MSB-first replay of random words with random idle cycles.
- `tb_da_lut`: every entry of the default table, and of a table built from
  extreme coefficients.
- `tb_da_accumulator`: exact 16-step dot products with extreme and random
  LUT words, and holding during stalls.
- `tb_da_output_adder`: truncation, and saturation in both directions.
- `tb_Hd`: runs the full-size filter end to end. A direct-form
  (multiplying) model checks it after every enabled edge, which also pins the
  latency to 17. The stimulus is:
  - the `1234h`, `F234h` and `0123h` constant inputs;
  - an impulse;
  - random samples;
  - full-scale inputs that saturate in both directions;
  - random `clk_enable` stalls;
  - a reset in the middle of a frame.

  The test counts each of these events and fails if any never happened.
- `tb_Hd_lowpass`: feeds 48 kHz sine tones and measures the gain by
  correlation. It requires 0 … +2 dB at 1, 4, 7 and 9.6 kHz, and at most
  −40 dB at 12, 15, 19 and 23 kHz. Measured: +1.01, +0.45, +0.57, +0.44 dB
  and −42.8, −47.4, −43.3, −44.1 dB.

Both filter-level testbenches run `Hd` at its default parameters. Every
testbench finishes in well under a second.

## Simulating

With Verilator 5 the package has to be given first. The `-y rtl` option finds
the other modules:

    verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb \
        rtl/fir_da_pkg.sv tb/tb_Hd.sv --top-module tb_Hd -Mdir obj_tb_Hd
    ./obj_tb_Hd/Vtb_Hd

Replace `tb_Hd` with any other testbench name. Lint the RTL alone with
`verilator --lint-only -Wall -y rtl rtl/fir_da_pkg.sv rtl/Hd.sv --top-module Hd`.
Lint reports a few unused-parameter and empty-pin warnings: the observation
outputs `phase` and `last` of the controller are left open in `Hd`.
