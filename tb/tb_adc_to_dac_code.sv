// Exhaustive testbench for adc_to_dac_code: every 14-bit two's-complement
// input is checked against code = (sample + 8192) / 4, computed here with
// integer arithmetic, plus the three named points -8192 -> 0x000,
// 0 -> 0x800 and 8191 -> 0xFFF.
module tb_adc_to_dac_code;
  import adc_dac_pkg::*;

  adc_sample_t sample;
  dac_code_t   code;
  int          checks = 0, failures = 0;

  adc_to_dac_code dut (.sample(sample), .code(code));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -8192; v <= 8191; v++) begin
      sample = 14'(v);
      #1;
      check(int'(code) == (v + 8192) / 4, $sformatf("%0d -> %h", v, code));
    end
    sample = -14'sd8192; #1; check(code == 12'h000, "negative full scale");
    sample = 14'sd0;     #1; check(code == 12'h800, "zero to midscale");
    sample = 14'sd8191;  #1; check(code == 12'hFFF, "positive full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
