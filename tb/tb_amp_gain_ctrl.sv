// Self-checking testbench for amp_gain_ctrl against the LTC6912-1 model.
// Sends twelve random gain pairs and checks, for each: the word latched by
// the amplifier ({gain B, gain A}), the echo of the previous word, eight SCK
// rising edges inside one chip-select window, `done` (2*8+1)*SCK_HALF clocks
// after the edge that takes `start`, and the amplifier output voltage for the new
// gain, worked out here from the gain table.
module tb_amp_gain_ctrl;
  import adc_dac_pkg::*;

  localparam int unsigned SCK_HALF = 2;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  gain_code_t ga = GAIN_0, gb = GAIN_0;
  logic       busy, done, dout;
  logic [7:0] echo, latched;
  spi_drv_t   spi;
  real        vina = 1.5, vinb = 1.6, vouta, voutb;
  int         words;
  int         checks = 0, failures = 0;
  int         sck_rises = 0;

  always #10 clk = ~clk;

  amp_gain_ctrl #(.SCK_HALF(SCK_HALF)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .gain_a(ga), .gain_b(gb),
    .busy(busy), .done(done), .echo(echo), .spi(spi), .amp_dout(dout));

  ltc6912_model amp (
    .shdn(1'b0), .cs_n(!spi.sel), .din(spi.mosi), .clk(spi.sck), .dout(dout),
    .vina(vina), .vinb(vinb), .vouta(vouta), .voutb(voutb),
    .latched(latched), .words(words));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real expect_v(input real vin, input int code);
    real g[8] = '{0.0, -1.0, -2.0, -5.0, -10.0, -20.0, -50.0, -100.0};
    real v;
    v = 1.65 + g[code] * (vin - 1.65);
    if (v < 0.0) v = 0.0;
    if (v > 3.3) v = 3.3;
    return v;
  endfunction

  always @(posedge spi.sck) begin
    sck_rises++;
    if (!spi.sel) begin
      failures++;
      $display("FAIL: SCK rose with AMP_CS inactive");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    int         cycles;
    prev = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 12; i++) begin
      ga = gain_code_t'($urandom_range(7, 0));
      gb = gain_code_t'($urandom_range(7, 0));
      if (i == 0) begin ga = GAIN_M1; gb = GAIN_M20; end
      sck_rises = 0;
      @(negedge clk) start = 1'b1;
      @(posedge clk);
      cycles = 1;
      @(negedge clk) start = 1'b0;
      while (!done) begin
        @(posedge clk);
        cycles++;
        @(negedge clk);
      end
      check(cycles == (2 * 8 + 1) * SCK_HALF + 1,
            $sformatf("frame %0d took %0d clocks", i, cycles));
      @(posedge clk);
      #1;
      check(latched == {gb, ga}, $sformatf("latched %h, sent %h", latched, {gb, ga}));
      check(echo == prev, $sformatf("echo %h, previous %h", echo, prev));
      check(sck_rises == 8, $sformatf("%0d SCK edges", sck_rises));
      check(words == i + 1, "one chip-select window per word");
      check((vouta - expect_v(vina, int'(ga))) < 1e-9 && (expect_v(vina, int'(ga)) - vouta) < 1e-9,
            $sformatf("OUTA %f", vouta));
      check((voutb - expect_v(vinb, int'(gb))) < 1e-9 && (expect_v(vinb, int'(gb)) - voutb) < 1e-9,
            $sformatf("OUTB %f", voutb));
      prev = {gb, ga};
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
