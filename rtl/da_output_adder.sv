// Final adder and output register of the DA filter (the shaded "Add" and
// "FF" at the output of the tap-group figure).
//
// It adds the N group accumulators into one full-precision sum in units of
// 2**-(2*FRAC), drops the FRAC low bits (truncation toward minus infinity,
// i.e. an arithmetic shift), saturates the result to a signed YW-bit Q1.15
// word and registers it on the edge with en high. The register holds between
// updates, so y changes once per output sample. reset (asynchronous, active
// high) clears it.
// Truncation and saturation are this design's choices; with truncation the
// two settled outputs shown for constant inputs 1234h and F234h (1328h and
// F17Bh) are reproduced exactly.
module da_output_adder
  import fir_da_pkg::*;
#(
  parameter int unsigned N = NGROUPS
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          en,
  input  acc_t          acc_in [N],
  output logic [YW-1:0] y
);
  localparam int unsigned SW = ACC_W + $clog2(N);
  localparam logic signed [SW-1:0] YMAX = SW'((2 ** (YW - 1)) - 1);
  localparam logic signed [SW-1:0] YMIN = -SW'(2 ** (YW - 1));

  logic signed [SW-1:0] sum;
  logic signed [SW-1:0] scaled;
  logic signed [YW-1:0] y_next;

  always_comb begin
    sum = '0;
    for (int unsigned g = 0; g < N; g++)
      sum += SW'(acc_in[g]);
    scaled = sum >>> FRAC;
    if (scaled > YMAX)      y_next = YMAX[YW-1:0];
    else if (scaled < YMIN) y_next = YMIN[YW-1:0];
    else                    y_next = scaled[YW-1:0];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)
      y <= '0;
    else if (en)
      y <= y_next;
  end
endmodule
