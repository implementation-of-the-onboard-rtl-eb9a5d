// Self-checking testbench for led_display: random samples arrive with random
// `valid`, and the selector toggles at random. Each clock the LEDs are
// compared with the expected view of the last valid sample: bits 13..6, or
// bits 5..0 with the top two LEDs off, one clock after the inputs.
module tb_led_display;
  import adc_dac_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        valid = 1'b0, show_low = 1'b0;
  adc_sample_t sample = '0;
  logic [7:0]  led;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  led_display dut (.clk(clk), .rst_n(rst_n), .valid(valid), .sample(sample),
                   .show_low(show_low), .led(led));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] held;
    logic [7:0]  exp_led;
    held    = '0;
    exp_led = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check(led == exp_led, $sformatf("led %b, expected %b", led, exp_led));
      valid    = $urandom_range(1, 0);
      sample   = 14'($urandom);
      show_low = ($urandom_range(9, 0) < 5);
      @(posedge clk);
      // the LED register takes the sample held before this edge
      exp_led = show_low ? {2'b00, held[5:0]} : held[13:6];
      if (valid) held = sample;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
