// Bit-phase controller of the serial distributed-arithmetic filter.
//
// One output sample takes BITS enabled clock cycles, one per bit of the input
// word. A counter runs 0..BITS-1 on every cycle with clk_enable high and holds
// when it is low. Two strobes, both already qualified with clk_enable, tell
// the datapath what to do on the coming clock edge:
//   load  (phase == 0): capture a new input sample into the tap delay line and
//                       load every tap shift register;
//   first (phase == 1): the shift registers present their MSB; accumulators
//                       restart, and the final adder takes the previous
//                       sample's complete group results.
// last (phase == BITS-1) is brought out for observation. reset is
// asynchronous and active high and returns the counter to 0, so the first
// enabled cycle after reset takes a sample.
// The bit-serial schedule with one cycle per input bit follows the serial DA
// scheme; the phase numbering and strobe timing are this design's choice.
module da_phase_ctrl #(
  parameter int unsigned BITS = 16
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  output logic [$clog2(BITS)-1:0] phase,
  output logic                    load,
  output logic                    first,
  output logic                    last
);
  localparam int unsigned PW = $clog2(BITS);
  localparam logic [PW-1:0] PHASE_LAST = PW'(BITS - 1);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)
      phase <= '0;
    else if (clk_enable)
      phase <= (phase == PHASE_LAST) ? '0 : phase + 1'b1;
  end

  assign load  = clk_enable && (phase == '0);
  assign first = clk_enable && (phase == PW'(1));
  assign last  = clk_enable && (phase == PHASE_LAST);

  initial assert (BITS >= 2) else $error("BITS must be at least 2");
endmodule
