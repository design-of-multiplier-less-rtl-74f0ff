// Self-checking test of da_output_adder: the registered output must be the
// sum of the eight group results shifted right by 15 (floor) and saturated
// to signed 16 bits, updated only on enabled edges.
module tb_da_output_adder;
  import fir_da_pkg::*;
  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  acc_t acc_in [NGROUPS];
  logic [YW-1:0] y;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  da_output_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, q, e, held;
    for (int g = 0; g < NGROUPS; g++) acc_in[g] = '0;
    #12 reset = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      s = 0;
      for (int g = 0; g < NGROUPS; g++) begin
        // Scale the magnitude so in-range, saturating and extreme sums occur.
        case (n % 4)
          0: acc_in[g] = acc_t'($signed(32'($urandom)) >>> 6);
          1: acc_in[g] = acc_t'($signed(32'($urandom)) >>> 3);
          2: acc_in[g] = acc_t'({$urandom, $urandom});
          default: acc_in[g] = acc_t'($signed(32'($urandom)) >>> 9);
        endcase
        s += longint'(acc_in[g]);
      end
      q = s >>> 15;
      e = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
      if (q > 32767) sat_hi++;
      if (q < -32768) sat_lo++;
      held = longint'($signed(y));
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      checks++;
      if (en ? (longint'($signed(y)) != e) : (longint'($signed(y)) != held)) begin
        failures++;
        $display("FAIL: n=%0d en=%0b y=%0d expected %0d", n, en, $signed(y), en ? e : held);
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL: saturation not exercised"); end
    $display("saturated high %0d, low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
