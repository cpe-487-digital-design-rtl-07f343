// tb_clk_div2: checks the divide-by-two pixel-clock generator.
//
// Drives a 50 MHz clock (20 ns period) for 200 cycles and checks that the
// output changes on every input rising edge, that its period is exactly two
// input periods (40 ns, 25 MHz) and that it is high half of the time.
module tb_clk_div2;
  logic clk_in = 1'b0;
  logic clk_out;
  int   checks = 0, failures = 0;

  clk_div2 dut (.clk_in(clk_in), .clk_out(clk_out));

  always #10ns clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime last_rise = 0;
  int      rises = 0, high_samples = 0, samples = 0;
  logic    prev;

  always @(posedge clk_out) begin
    if (rises > 0) check(($realtime - last_rise) == 40ns, "clk_out period is 40 ns");
    last_rise = $realtime;
    rises++;
  end

  initial begin
    @(negedge clk_in);
    prev = clk_out;
    repeat (200) begin
      @(negedge clk_in);
      check(clk_out != prev, "clk_out toggles on every clk_in rising edge");
      prev = clk_out;
      samples++;
      if (clk_out) high_samples++;
    end
    check(high_samples == samples / 2, "50% duty cycle");
    check(rises >= 99 && rises <= 101, "100 output periods in 200 input periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
