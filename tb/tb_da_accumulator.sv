// Self-checking test of da_accumulator: after a first cycle and 15 more
// enabled cycles it must hold -d[0]*2^15 + sum d[i]*2^(15-i), hold that
// value while disabled, and restart on the next first cycle.
module tb_da_accumulator;
  import fir_da_pkg::*;
  localparam int unsigned IN_W = LUT_W, BITS = XW;
  logic clk = 1'b0, reset = 1'b1, en = 1'b0, first = 1'b0;
  logic signed [IN_W-1:0] d = '0;
  logic signed [IN_W+BITS-1:0] acc;
  int checks = 0, failures = 0;

  da_accumulator #(.IN_W(IN_W), .BITS(BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    longint lim;
    lim = longint'(1) << (IN_W - 1);
    #12 reset = 1'b0;
    for (int n = 0; n < 300; n++) begin
      expv = 0;
      for (int i = 0; i < BITS; i++) begin
        // Extreme values now and then, random otherwise.
        case ($urandom_range(0, 5))
          0:       d = IN_W'(-lim);
          1:       d = IN_W'(lim - 1);
          default: d = IN_W'($urandom);
        endcase
        if (i == 0) expv = -longint'(d) * (longint'(1) << (BITS - 1));
        else        expv += longint'(d) * (longint'(1) << (BITS - 1 - i));
        first = (i == 0);
        en = 1'b1;
        @(posedge clk); #1;
        // Random stall cycles must not change the accumulator.
        while ($urandom_range(0, 3) == 0) begin
          longint held;
          held = longint'(acc);
          first = 1'b0; en = 1'b0; d = IN_W'($urandom);
          @(posedge clk); #1;
          checks++;
          if (longint'(acc) != held) begin failures++; $display("FAIL: acc changed while disabled"); end
        end
      end
      first = 1'b0; en = 1'b0;
      checks++;
      if (longint'(acc) != expv) begin
        failures++;
        $display("FAIL: frame %0d acc=%0d expected %0d", n, acc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
