// Self-checking testbench for ramp_gen: 9000 clocks with `advance` at random,
// checking the counter against a copy kept here, that it holds when
// `advance` is low, and that it wraps from 0xFFF to 0 (twice at least).
module tb_ramp_gen;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        advance = 1'b0;
  logic [11:0] value;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  ramp_gen #(.WIDTH(12), .STEP(1)) dut (.clk(clk), .rst_n(rst_n), .advance(advance), .value(value));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, wraps;
    exp_v = 0;
    wraps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 9000; t++) begin
      @(negedge clk);
      check(int'(value) == exp_v, $sformatf("value %0d, expected %0d", value, exp_v));
      advance = ($urandom_range(7, 0) != 0);
      @(posedge clk);
      if (advance) begin
        if (exp_v == 4095) wraps++;
        exp_v = (exp_v + 1) % 4096;
      end
    end
    check(wraps >= 1, "ramp wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
