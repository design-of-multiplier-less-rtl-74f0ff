// End-to-end, full-size test of the Hd filter (all parameters at their
// defaults).
//
// A direct-form reference (32 multiplications per sample, no distributed
// arithmetic) gives the expected output of every sample. The test checks
// filter_out after each enabled clock edge, which also pins the latency to
// exactly 17 enabled edges from capture to output, and checks that nothing
// moves while clk_enable is low. Stimulus, in order: the two constant-input
// cases with known settled outputs (1234h -> 1328h; F234h -> F17Bh, then
// 0123h), an impulse, random samples, full-scale inputs that saturate the
// output in both directions, and a reset in the middle of a frame. Each
// mechanism (stall, saturation high/low, negative samples, mid-frame reset)
// is counted and must occur at least once.
module tb_Hd;
  import fir_da_pkg::*;

  logic clk = 1'b0, clk_enable = 1'b0, reset = 1'b1;
  logic [15:0] filter_in = '0, filter_out;

  Hd dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_sat_hi = 0, n_sat_lo = 0, n_negative = 0, n_reset = 0;
  int unsigned en_edges = 0;     // enabled edges since reset (1-based index)
  int stall_pct = 20;

  logic signed [15:0] hist [NTAPS];   // hist[0] = newest sample
  logic signed [15:0] y_exp [$];      // y_exp[n] = expected output of sample n

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic logic signed [15:0] reference(input logic signed [15:0] h [NTAPS]);
    longint acc = 0, q;
    for (int k = 0; k < NTAPS; k++) acc += longint'(COEFS[k]) * longint'(h[k]);
    q = acc >>> 15;
    if (q > 32767)  return 16'sh7fff;
    if (q < -32768) return 16'sh8000;
    return 16'(q);
  endfunction

  function automatic bit bool_sat(input logic signed [15:0] h [NTAPS], input bit hi);
    longint acc = 0;
    for (int k = 0; k < NTAPS; k++) acc += longint'(COEFS[k]) * longint'(h[k]);
    acc = acc >>> 15;
    return hi ? (acc > 32767) : (acc < -32768);
  endfunction

  // Expected filter_out after enabled edge number e.
  function automatic logic [15:0] expected_out(input int unsigned e);
    int n;
    if (e < 18) return '0;
    n = (e - 18) / 16;
    return y_exp[n];
  endfunction

  // Drive one sample for one 16-cycle frame; abort_after > 0 cuts the frame
  // short after that many enabled cycles (used out_prev a reset).
  task automatic run_frame(input logic [15:0] x, input int abort_after = 0);
    int done = 0;
    logic [15:0] out_prev;
    filter_in = x;
    for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    y_exp.push_back(reference(hist));
    if (bool_sat(hist, 1)) n_sat_hi++;
    if (bool_sat(hist, 0)) n_sat_lo++;
    if (x[15]) n_negative++;
    while (done < 16 && !(abort_after > 0 && done == abort_after)) begin
      clk_enable = ($urandom_range(0, 99) >= stall_pct);
      out_prev = filter_out;
      @(posedge clk); #1;
      if (clk_enable) begin
        en_edges++;
        done++;
        check(filter_out == expected_out(en_edges),
              $sformatf("edge %0d: out=%h expected %h", en_edges, filter_out, expected_out(en_edges)));
      end else begin
        n_stall++;
        check(filter_out == out_prev, "output moved during a stall");
      end
    end
  endtask

  task automatic do_reset();
    reset = 1'b1;
    #1;
    check(filter_out == 16'h0000, "asynchronous reset clears output");
    @(posedge clk); #1;
    reset = 1'b0;
    en_edges = 0;
    y_exp.delete();
    for (int k = 0; k < NTAPS; k++) hist[k] = '0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NTAPS; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    #1 do_reset();

    // Constant 1234h: settles to 1328h once the delay line is full.
    for (int i = 0; i < 40; i++) run_frame(16'h1234);
    check(filter_out == 16'h1328, $sformatf("settled output for 1234h is %h, not 1328h", filter_out));

    // Constant F234h (negative), then 0123h.
    for (int i = 0; i < 40; i++) run_frame(16'hF234);
    check(filter_out == 16'hF17B, $sformatf("settled output for F234h is %h, not F17Bh", filter_out));
    for (int i = 0; i < 40; i++) run_frame(16'h0123);
    check(filter_out == 16'h0132, $sformatf("settled output for 0123h is %h, not 0132h", filter_out));

    // Impulse of 0.5: outputs are half the coefficients.
    for (int i = 0; i < 34; i++) run_frame(16'h0000);
    run_frame(16'h4000);
    for (int i = 0; i < 34; i++) run_frame(16'h0000);

    // Random samples.
    for (int i = 0; i < 300; i++) run_frame(16'($urandom));

    // Full scale both ways: the DC gain above 1 saturates the output.
    for (int i = 0; i < 40; i++) run_frame(16'h7FFF);
    for (int i = 0; i < 40; i++) run_frame(16'h8000);
    for (int i = 0; i < 20; i++) run_frame(($urandom_range(0, 1) != 0) ? 16'h7FFF : 16'h8000);

    // Reset in the middle of a frame, then carry on.
    run_frame(16'($urandom), 7);
    do_reset();
    n_reset++;
    for (int i = 0; i < 100; i++) run_frame(16'($urandom));

    // Without stalls: back-to-back frames.
    stall_pct = 0;
    for (int i = 0; i < 50; i++) run_frame(16'($urandom));

    $display("stalls=%0d sat_hi=%0d sat_lo=%0d negative=%0d resets=%0d",
             n_stall, n_sat_hi, n_sat_lo, n_negative, n_reset);
    check(n_stall > 0, "no stall happened");
    check(n_sat_hi > 0, "no positive saturation happened");
    check(n_sat_lo > 0, "no negative saturation happened");
    check(n_negative > 0, "no negative sample");
    check(n_reset > 0, "no mid-frame reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
