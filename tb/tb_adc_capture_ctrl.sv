// Self-checking testbench for adc_capture_ctrl against the LTC1407A-1 model.
// Applies a sequence of input voltage pairs, one per frame, and checks that
// each frame returns the codes of the previous frame's voltages (one sample
// of latency), worked out here from D = (VIN - 1.65)/1.25*8192. The first
// voltages reproduce two of the document's worked cases: 1.8 V on the ADC
// (1.5 V after a gain of -1) gives 983, and 2.65 V (1.6 V after a gain of
// -20) gives 6554, next to the document's 0x1999. Also checked: clipping at
// both ends of the range: 34 SCK rising
// edges per frame, an AD_CONV pulse of CONV_CLKS clocks, and `done`
// CONV_CLKS + 3 + 69*SCK_HALF clocks after the edge that takes `start`.
module tb_adc_capture_ctrl;
  import adc_dac_pkg::*;

  localparam int unsigned SCK_HALF  = 1;
  localparam int unsigned CONV_CLKS = 2;
  localparam int          NFRAMES   = 24;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        busy, done, valid, sdo;
  adc_sample_t ch_a, ch_b;
  spi_drv_t    spi;
  real         va = 1.65, vb = 1.65;
  logic [13:0] pa, pb;
  int          sck_count, conversions;
  int          checks = 0, failures = 0;
  int          conv_high = 0;

  always #10 clk = ~clk;

  adc_capture_ctrl #(.SCK_HALF(SCK_HALF), .CONV_CLKS(CONV_CLKS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .valid(valid), .ch_a(ch_a), .ch_b(ch_b), .spi(spi), .spi_miso(sdo));

  ltc1407a_model adc (
    .conv(spi.sel), .sck(spi.sck), .sdo(sdo), .vin_a(va), .vin_b(vb),
    .pending_a(pa), .pending_b(pb), .sck_count(sck_count), .conversions(conversions));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int expect_code(input real v);
    real x;
    x = (v - 1.65) / 1.25 * 8192.0;
    if (x > 8191.0)  x = 8191.0;
    if (x < -8192.0) x = -8192.0;
    return int'(x);
  endfunction

  always @(posedge clk) if (spi.sel) conv_high++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vas[NFRAMES], vbs[NFRAMES];
    int  cycles;
    for (int i = 0; i < NFRAMES; i++) begin
      vas[i] = 0.3 + 2.7 * real'($urandom_range(10000, 0)) / 10000.0;
      vbs[i] = 0.3 + 2.7 * real'($urandom_range(10000, 0)) / 10000.0;
    end
    vas[0] = 1.8;   vbs[0] = 2.65;
    vas[1] = 0.4;   vbs[1] = 2.9;
    vas[2] = 1.65;  vbs[2] = 1.65 - 1.25 / 8192.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NFRAMES; i++) begin
      va = vas[i];
      vb = vbs[i];
      conv_high = 0;
      @(negedge clk) start = 1'b1;
      @(posedge clk);
      cycles = 1;
      @(negedge clk) start = 1'b0;
      while (!done) begin
        @(posedge clk);
        cycles++;
        @(negedge clk);
      end
      check(valid, "valid with done");
      check(cycles == int'(CONV_CLKS + 3 + 69 * SCK_HALF) + 1,
            $sformatf("frame %0d took %0d clocks", i, cycles));
      check(sck_count == 34, $sformatf("%0d SCK edges in frame %0d", sck_count, i));
      check(conv_high == int'(CONV_CLKS), $sformatf("AD_CONV high %0d clocks", conv_high));
      if (i == 0) begin
        check(ch_a == 14'sd0 && ch_b == 14'sd0, "first frame returns the power-up result");
      end else begin
        check(int'(ch_a) == expect_code(vas[i-1]),
              $sformatf("frame %0d ch A %0d, expected %0d", i, ch_a, expect_code(vas[i-1])));
        check(int'(ch_b) == expect_code(vbs[i-1]),
              $sformatf("frame %0d ch B %0d, expected %0d", i, ch_b, expect_code(vbs[i-1])));
      end
      if (i == 1) check(ch_a == 14'sd983 && ch_b == 14'sd6554, "document worked examples");
      if (i == 2) check(ch_a == -14'sd8192 && ch_b == 14'sd8191, "clipping at both ends");
      if (i == 3) check(ch_a == 14'sd0 && ch_b == -14'sd1, "midpoint and one LSB below");
      repeat ($urandom_range(5, 0)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
