// Frequency-response test of the Hd filter against its low-pass
// specification: 48 kHz sampling, pass band up to 9.6 kHz, stop band from
// 12 kHz.
//
// Sine waves of amplitude 0.4 full scale are sampled at 48 kHz and fed one
// per 16-cycle frame (clk_enable held high). Every output is compared with a
// direct-form reference. After the delay line has filled, the output's
// amplitude at the test frequency is measured by correlating 240 outputs
// (a whole number of periods for every test frequency) with a sine and a
// cosine; its ratio to the input amplitude is the gain. Limits: pass-band gain between
// 0 and +2 dB (the default coefficients ripple between +0.44 and +1.57 dB),
// stop-band gain below -40 dB (the default coefficients reach about -42.6 dB;
// 32 taps cannot reach the 90 dB of the original specification).
module tb_Hd_lowpass;
  import fir_da_pkg::*;

  logic clk = 1'b0, clk_enable = 1'b0, reset = 1'b1;
  logic [15:0] filter_in = '0, filter_out;

  Hd dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [15:0] hist [NTAPS];

  localparam real FS  = 48000.0;
  localparam real AMP = 0.4 * 32768.0;
  localparam real PI  = 3.14159265358979323846;

  function automatic logic signed [15:0] reference();
    longint acc = 0, q;
    for (int k = 0; k < NTAPS; k++) acc += longint'(COEFS[k]) * longint'(hist[k]);
    q = acc >>> 15;
    if (q > 32767)  return 16'sh7fff;
    if (q < -32768) return 16'sh8000;
    return 16'(q);
  endfunction

  // Run NS samples of a sine at freq; return the output amplitude measured
  // over WIN samples after the first SETTLE.
  task automatic tone(input real freq, output real amp);
    localparam int SETTLE = 40, WIN = 240, NS = SETTLE + WIN + 1;
    real cs = 0.0, sn = 0.0, ph;
    logic signed [15:0] y_prev = '0, y_now;
    amp = 0.0;
    for (int k = 0; k < NTAPS; k++) hist[k] = '0;
    reset = 1'b1; #1; @(posedge clk); #1; reset = 1'b0;
    clk_enable = 1'b1;
    for (int n = 0; n < NS; n++) begin
      filter_in = 16'($rtoi(AMP * $sin(2.0 * PI * freq * real'(n) / FS)));
      for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = filter_in;
      y_now = reference();
      // Edge 1 of the frame (the capture) then edge 2, after which the
      // previous sample's output is on filter_out.
      repeat (2) @(posedge clk);
      #1;
      if (n > 0) begin
        checks++;
        if ($signed(filter_out) != y_prev) begin
          failures++;
          $display("FAIL %0.0f Hz sample %0d: out=%0d expected %0d", freq, n - 1,
                   $signed(filter_out), y_prev);
        end
        if (n - 1 >= SETTLE) begin
          ph = 2.0 * PI * freq * real'(n - 1) / FS;
          cs += real'($signed(filter_out)) * $cos(ph);
          sn += real'($signed(filter_out)) * $sin(ph);
        end
      end
      y_prev = y_now;
      repeat (14) @(posedge clk);
    end
    clk_enable = 1'b0;
    amp = 2.0 / real'(WIN) * $sqrt(cs * cs + sn * sn);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pass_f [4] = '{1000.0, 4000.0, 7000.0, 9600.0};
    real stop_f [4] = '{12000.0, 15000.0, 19000.0, 23000.0};
    real peak, gain_db;
    repeat (2) @(posedge clk);
    foreach (pass_f[i]) begin
      tone(pass_f[i], peak);
      gain_db = 20.0 * $log10(peak / AMP);
      $display("pass band %6.0f Hz: gain %6.2f dB", pass_f[i], gain_db);
      checks++;
      if (gain_db < 0.0 || gain_db > 2.0) begin
        failures++; $display("FAIL: pass-band gain out of range");
      end
    end
    foreach (stop_f[i]) begin
      tone(stop_f[i], peak);
      gain_db = 20.0 * $log10(peak / AMP);
      $display("stop band %6.0f Hz: gain %6.2f dB", stop_f[i], gain_db);
      checks++;
      if (gain_db > -40.0) begin
        failures++; $display("FAIL: stop-band attenuation below 40 dB");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
