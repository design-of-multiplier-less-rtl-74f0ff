// Self-checking test of da_lut: every entry of the default table (taps 0-3)
// and of a table built from random coefficients must equal the sum of the
// coefficients selected by the address bits.
module tb_da_lut;
  import fir_da_pkg::*;
  localparam coef_t RC [LUT_IN] = '{-16'sd32768, 16'sd32767, -16'sd12345, -16'sd32768};
  logic [LUT_IN-1:0] addr;
  lut_word_t data_def, data_rand;
  int checks = 0, failures = 0;

  da_lut u_def (.addr, .data(data_def));
  da_lut #(.COEF(RC)) u_rand (.addr, .data(data_rand));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_def, exp_rand;
    // Default group coefficients, written out independently.
    int c0 [4] = '{272, 74, -559, -937};
    int c1 [4] = '{-32768, 32767, -12345, -32768};
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      exp_def = 0; exp_rand = 0;
      for (int j = 0; j < 4; j++) begin
        if ((a >> j) & 1) begin exp_def += c0[j]; exp_rand += c1[j]; end
      end
      checks += 2;
      if (int'(data_def) != exp_def) begin
        failures++; $display("FAIL default addr %0d: %0d != %0d", a, data_def, exp_def);
      end
      if (int'(data_rand) != exp_rand) begin
        failures++; $display("FAIL random addr %0d: %0d != %0d", a, data_rand, exp_rand);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
