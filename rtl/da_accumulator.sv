// Shift-add accumulator of one DA tap group (the "Add" and "FF" with feedback
// that follow each LUT).
//
// The LUT words arrive once per enabled cycle, MSB slice first. On the edge
// with first high the accumulator restarts with the negated LUT word, because
// the MSB of a two's-complement sample has negative weight. On every later
// edge with en high it doubles its contents and adds the new LUT word:
//   acc <- first ? -d : 2*acc + d
// After BITS such edges acc = sum over taps of COEF * sample, exactly, in
// units of 2**-(2*FRAC). acc holds its value until the next first edge, so a
// downstream register can take it on that edge. reset (asynchronous, active
// high) clears it.
// The LUT/adder/register loop follows the DA figures; MSB-first order and the
// subtraction on the sign slice are this design's choice.
module da_accumulator
  import fir_da_pkg::*;
#(
  parameter int unsigned IN_W = LUT_W,
  parameter int unsigned BITS = XW
) (
  input  logic                         clk,
  input  logic                         reset,
  input  logic                         en,
  input  logic                         first,
  input  logic signed [IN_W-1:0]       d,
  output logic signed [IN_W+BITS-1:0]  acc
);
  localparam int unsigned AW = IN_W + BITS;

  logic signed [AW-1:0] d_ext;
  logic signed [AW-1:0] add_sub_out;

  assign d_ext       = AW'(d);
  assign add_sub_out = first ? -d_ext : (acc <<< 1) + d_ext;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)
      acc <= '0;
    else if (en)
      acc <= add_sub_out;
  end

  // A restart is only meaningful on an enabled cycle.
  a_first_needs_en: assert property (@(posedge clk) first |-> en);
endmodule
