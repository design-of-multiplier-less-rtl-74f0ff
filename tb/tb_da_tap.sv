// Self-checking test of da_tap: after a load the tap must replay the word
// MSB first, one bit per shift, hold on idle cycles, and pass the loaded
// word on at word_out.
module tb_da_tap;
  localparam int unsigned W = 16;
  logic clk = 1'b0, reset = 1'b1, load = 1'b0, shift = 1'b0;
  logic [W-1:0] word_in = '0, word_out;
  logic serial_out;
  int checks = 0, failures = 0;

  da_tap #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w;
    int b;
    #12 reset = 1'b0;
    check(word_out == 0 && serial_out == 0, "reset clears tap");
    for (int n = 0; n < 200; n++) begin
      w = W'($urandom);
      word_in = w; load = 1'b1; shift = 1'b0;
      @(posedge clk); #1;
      load = 1'b0;
      word_in = W'($urandom);   // must not disturb the tap
      b = W - 1;
      while (b >= 0) begin
        check(serial_out == w[b], $sformatf("serial bit %0d of %h", b, w));
        check(word_out == w, "word register holds");
        shift = ($urandom_range(0, 4) != 0);
        @(posedge clk); #1;
        if (shift) b--;
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
