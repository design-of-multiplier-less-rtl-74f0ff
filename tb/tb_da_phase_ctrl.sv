// Self-checking test of da_phase_ctrl: the phase counter must count 0..15
// on enabled cycles, hold on disabled ones, wrap, and return to 0 on reset;
// load/first/last must be the enabled phase-0/1/15 strobes.
module tb_da_phase_ctrl;
  localparam int unsigned BITS = 16;
  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic [3:0] phase;
  logic load, first, last;
  int checks = 0, failures = 0;
  int unsigned model_phase = 0;

  da_phase_ctrl #(.BITS(BITS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (phase=%0d model=%0d)", what, phase, model_phase);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int i = 0; i < 300; i++) begin
      clk_enable = ($urandom_range(0, 3) != 0);
      if (i == 150) begin
        reset = 1'b1;
        #1;
        model_phase = 0;
        check(phase == 0, "asynchronous reset clears phase");
        reset = 1'b0;
      end
      #1;
      check(phase == model_phase, "phase value");
      check(load  == (clk_enable && model_phase == 0), "load strobe");
      check(first == (clk_enable && model_phase == 1), "first strobe");
      check(last  == (clk_enable && model_phase == BITS - 1), "last strobe");
      @(posedge clk);
      if (clk_enable) model_phase = (model_phase + 1) % BITS;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
