// One tap of the DA filter's input delay line: a word register followed by a
// parallel-load shift register.
//
// On a clock edge with load high the tap takes the word from the previous tap
// (or the filter input, for tap 0) into both its word register and its shift
// register. On every other edge with shift high the shift register moves one
// place toward its MSB, so serial_out presents the stored word MSB first:
// bit W-1 in the cycle after the load, bit 0 in the cycle of the next load.
// word_out feeds the next tap, which makes the word registers the sample
// delay line. reset (asynchronous, active high) clears both registers.
// The word-register-plus-shift-register chain follows the eight-tap
// implementation figure; MSB-first order is this design's choice.
module da_tap #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] word_in,
  output logic [W-1:0] word_out,
  output logic         serial_out
);
  logic [W-1:0] sreg;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      word_out <= '0;
      sreg     <= '0;
    end else if (load) begin
      word_out <= word_in;
      sreg     <= word_in;
    end else if (shift) begin
      sreg     <= {sreg[W-2:0], 1'b0};
    end
  end

  assign serial_out = sreg[W-1];
endmodule
