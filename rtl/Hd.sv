// Hd: 32-tap low-pass FIR filter built with bit-serial distributed arithmetic
// (DA), without multipliers.
//
// Structure (left to right):
//   * a 32-tap delay line; each tap is a word register plus a parallel-load
//     shift register (da_tap) that replays its sample one bit per cycle,
//     MSB first;
//   * the taps split into eight groups of four; each group's four serial bits
//     address a 16-entry LUT of partial coefficient sums (da_lut);
//   * each LUT feeds a shift-add accumulator (da_accumulator) that builds the
//     group's dot product over 16 cycles;
//   * a final adder sums the eight group results, truncates and saturates to
//     16 bits and registers filter_out (da_output_adder);
//   * a phase counter (da_phase_ctrl) sequences the 16 bit-cycles.
//
// Interface: clk, clk_enable, reset, filter_in[15:0], filter_out[15:0], all as
// in the filter's top-level RTL view. Samples are signed Q1.15.
// Timing: the filter computes one output per 16 enabled clock cycles, so the
// clock must run at 16 times the sample rate (768 kHz for 48 kHz audio).
// filter_in is captured on the first enabled edge after reset and then on
// every 16th enabled edge; hold it steady across each 16-cycle frame.
// filter_out for a sample is updated 17 enabled edges after the edge that
// captured it and then holds for 16 enabled cycles. With clk_enable low every
// register holds. reset is asynchronous and active high.
// The DA structure, 32 taps, 4-input LUT partition and port list follow the
// filter as described; the coefficient values, MSB-first bit order,
// truncation, saturation and exact cycle schedule are this design's choices.
module Hd
  import fir_da_pkg::*;
#(
  parameter coef_array_t COEFFS = COEFS
) (
  input  logic          clk,
  input  logic          clk_enable,
  input  logic          reset,
  input  logic [XW-1:0] filter_in,
  output logic [YW-1:0] filter_out
);
  logic load, first;
  logic shift;

  da_phase_ctrl #(.BITS(XW)) u_ctrl (
    .clk, .reset, .clk_enable,
    .phase(), .load, .first, .last()
  );

  assign shift = clk_enable && !load;

  // Tap delay line: tap 0 holds the newest sample.
  logic [XW-1:0] tap_word [NTAPS+1];
  logic [NTAPS-1:0] tap_bit;

  assign tap_word[0] = filter_in;

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    da_tap #(.W(XW)) u_tap (
      .clk, .reset, .load, .shift,
      .word_in   (tap_word[k]),
      .word_out  (tap_word[k+1]),
      .serial_out(tap_bit[k])
    );
  end

  // Tap groups: LUT and shift-add accumulator per group.
  acc_t      group_acc [NGROUPS];
  lut_word_t lut_data  [NGROUPS];

  for (genvar g = 0; g < NGROUPS; g++) begin : g_group
    localparam coef_t GCOEF [LUT_IN] = '{COEFFS[LUT_IN*g],   COEFFS[LUT_IN*g+1],
                                         COEFFS[LUT_IN*g+2], COEFFS[LUT_IN*g+3]};
    da_lut #(.COEF(GCOEF)) u_lut (
      .addr(tap_bit[LUT_IN*g +: LUT_IN]),
      .data(lut_data[g])
    );
    da_accumulator #(.IN_W(LUT_W), .BITS(XW)) u_acc (
      .clk, .reset,
      .en   (clk_enable),
      .first(first),
      .d    (lut_data[g]),
      .acc  (group_acc[g])
    );
  end

  da_output_adder #(.N(NGROUPS)) u_out (
    .clk, .reset,
    .en    (first),
    .acc_in(group_acc),
    .y     (filter_out)
  );

  initial assert (LUT_IN == 4 && NTAPS % LUT_IN == 0)
    else $error("tap grouping assumes four taps per LUT");
endmodule
