// End-to-end testbench for adc_dac_top with behavioural models of the
// LTC6912-1 amplifier, the LTC1407A-1 ADC and the LTC2624 DAC on its pins.
// One copy runs at the default parameters: gain programming after reset,
// DC inputs (1.5 V at gain -1 -> 983 and 1.6 V at gain -2 -> 655, the
// document's cases), both LED views, a gain reload with its echo, a 10 kHz
// sine on channel A, a DAC ramp and a return to sample mode. Every ADC result
// is compared with the code of the amplified input at the previous AD_CONV
// edge (one sample latency), every DAC word with the converted sample it
// must carry (or the next ramp value), and the AD_CONV spacing with the
// sample period. A second copy with a 60-clock period and a 4-entry array
// must show back-to-back conversions, lost sample requests and overflow.
// Each mechanism is counted and must occur at least once.
module tb_adc_dac_top;
  import adc_dac_pkg::*;

  localparam int unsigned SAMPLE_PERIOD = 200;   // the top's default

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] gain_a = 4'd1, gain_b = 4'd2;
  logic gain_load = 1'b0, ramp_mode = 1'b0, led_sel = 1'b0;
  real  vin_a = 1.5, vin_b = 1.6;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real gain_of(input logic [3:0] code);
    real g[8] = '{0.0, -1.0, -2.0, -5.0, -10.0, -20.0, -50.0, -100.0};
    return (code < 8) ? g[code] : 0.0;
  endfunction

  // Expected ADC code for a source voltage and gain code, Eq. (1) with
  // clipping of the amplifier to its rails and of the code to 14 bits.
  function automatic int expect_code(input real v, input logic [3:0] g);
    real va, x;
    va = 1.65 + gain_of(g) * (v - 1.65);
    if (va < 0.0) va = 0.0;
    if (va > 3.3) va = 3.3;
    x = (va - 1.65) / 1.25 * 8192.0;
    if (x > 8191.0)  x = 8191.0;
    if (x < -8192.0) x = -8192.0;
    return int'(x);
  endfunction

  // ---------------- design at its default parameters ----------------
  logic        sck, mosi, miso, amp_cs_n, amp_shdn, amp_dout, ad_conv, dac_cs_n, dac_clr_n;
  logic        sf_ce0, fpga_init_b, sample_valid, overflow, sample_missed;
  logic [7:0]  led, amp_echo;
  logic [13:0] sample_a, sample_b;
  logic [15:0] drop_count;
  real         amp_out_a, amp_out_b;
  logic [7:0]  amp_latched;
  int          amp_words;
  logic [13:0] pend_a, pend_b;
  int          sck_count, conversions;
  logic [11:0] dac_code [4];
  real         dac_vout [4];
  logic [31:0] dac_word;
  int          dac_bits, dac_words;

  adc_dac_top dut (
    .clk(clk), .rst_n(rst_n), .gain_a(gain_a), .gain_b(gain_b), .gain_load(gain_load),
    .ramp_mode(ramp_mode), .led_sel(led_sel),
    .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso), .amp_cs_n(amp_cs_n), .amp_shdn(amp_shdn),
    .amp_dout(amp_dout), .ad_conv(ad_conv), .dac_cs_n(dac_cs_n), .dac_clr_n(dac_clr_n),
    .sf_ce0(sf_ce0), .fpga_init_b(fpga_init_b), .led(led), .sample_a(sample_a),
    .sample_b(sample_b), .sample_valid(sample_valid), .amp_echo(amp_echo),
    .overflow(overflow), .drop_count(drop_count), .sample_missed(sample_missed));

  ltc6912_model u_amp (
    .shdn(amp_shdn), .cs_n(amp_cs_n), .din(mosi), .clk(sck), .dout(amp_dout),
    .vina(vin_a), .vinb(vin_b), .vouta(amp_out_a), .voutb(amp_out_b),
    .latched(amp_latched), .words(amp_words));

  ltc1407a_model u_adc (
    .conv(ad_conv), .sck(sck), .sdo(miso), .vin_a(amp_out_a), .vin_b(amp_out_b),
    .pending_a(pend_a), .pending_b(pend_b), .sck_count(sck_count), .conversions(conversions));

  ltc2624_model u_dac (
    .cs_n(dac_cs_n), .sck(sck), .sdi(mosi), .clr_n(dac_clr_n), .dac_code(dac_code),
    .vout(dac_vout), .last_word(dac_word), .last_bits(dac_bits), .words(dac_words));

  // ---------------- scoreboard ----------------
  int   exp_adc_a[$], exp_adc_b[$];   // one entry per AD_CONV edge
  int   fifo[$];                      // samples waiting for the DAC
  int   prev_a = 0, prev_b = 0;       // what the ADC returns next
  int   ramp_exp = 0;
  int   n_gain = 0, n_adc = 0, n_dac_pass = 0, n_dac_ramp = 0, n_led_hi = 0, n_led_lo = 0;
  int   n_period_ok = 0, last_conv = -1, cyc = 0;
  bit   check_period = 1'b1;
  bit   dac_mode_ramp;
  logic ad_conv_q = 1'b0, dac_cs_q = 1'b1, amp_cs_q = 1'b1;
  logic [7:0] exp_gain_word = 8'h00, prev_gain_word = 8'h00;

  always @(posedge clk) begin
    cyc++;
    // one device selected at a time
    if (rst_n) check($countones({!amp_cs_n, ad_conv, !dac_cs_n}) <= 1, "one SPI device selected");
    // conversion start
    if (rst_n && ad_conv && !ad_conv_q) begin
      if (last_conv >= 0 && check_period) begin
        check(cyc - last_conv == SAMPLE_PERIOD, $sformatf("AD_CONV spacing %0d", cyc - last_conv));
        n_period_ok++;
      end
      last_conv = cyc;
    end
    ad_conv_q <= ad_conv;
    // finished ADC frame
    if (sample_valid && rst_n) begin
      int ea, eb;
      ea = exp_adc_a.pop_front();
      eb = exp_adc_b.pop_front();
      check(int'($signed(sample_a)) == ea, $sformatf("ADC A %0d, expected %0d", $signed(sample_a), ea));
      check(int'($signed(sample_b)) == eb, $sformatf("ADC B %0d, expected %0d", $signed(sample_b), eb));
      check(sck_count == 34, "34 SCK cycles per ADC frame");
      fifo.push_back(int'($signed(sample_a)));
      n_adc++;
    end
    // DAC frame start and end
    if (rst_n && !dac_cs_n && dac_cs_q) dac_mode_ramp = ramp_mode;
    if (rst_n && dac_cs_n && !dac_cs_q) begin
      int s, e;
      s = fifo.pop_front();
      e = dac_mode_ramp ? ramp_exp : (s + 8192) / 4;
      #1;
      check(dac_bits == 32, "32-bit DAC word");
      check(dac_word[23:16] == {DAC_CMD_WRITE_UPDATE, DAC_ADDR_A}, "command and address");
      check(int'(dac_code[0]) == e, $sformatf("DAC A code %h, expected %h", dac_code[0], e));
      check(dac_code[1] == 12'h800 && dac_code[2] == 12'h800 && dac_code[3] == 12'h800,
            "other DAC outputs untouched");
      if (dac_mode_ramp) begin ramp_exp = (ramp_exp + 1) % 4096; n_dac_ramp++; end
      else n_dac_pass++;
    end
    dac_cs_q <= dac_cs_n;
    // gain word latched
    if (rst_n && amp_cs_n && !amp_cs_q) begin
      #1;
      check(amp_latched == exp_gain_word, $sformatf("gain word %h, expected %h", amp_latched, exp_gain_word));
      n_gain++;
    end
    amp_cs_q <= amp_cs_n;
  end

  // At each conversion start, record what the next frame must return.
  always @(posedge ad_conv) if (rst_n) begin
    exp_adc_a.push_back(prev_a);
    exp_adc_b.push_back(prev_b);
    prev_a = expect_code(vin_a, gain_a);
    prev_b = expect_code(vin_b, gain_b);
  end

  // LED view of the last channel A sample; the display lags the sample and
  // the selector by up to two clocks.
  logic [13:0] last_sample = '0;
  int          settle = 0;
  logic        led_sel_q = 1'b0;
  always @(posedge clk) begin
    if (sample_valid && rst_n) last_sample <= sample_a;
    settle <= (sample_valid || led_sel != led_sel_q) ? 0 : settle + 1;
    led_sel_q <= led_sel;
  end
  always @(negedge clk) begin
    if (rst_n && n_adc > 0 && settle >= 2 && led_sel == led_sel_q) begin
      if (!led_sel) begin
        check(led == last_sample[13:6], $sformatf("LEDs show D13..D6: %b of %h", led, last_sample));
        n_led_hi++;
      end else begin
        check(led == {2'b00, last_sample[5:0]}, $sformatf("LEDs show D5..D0: %b of %h", led, last_sample));
        n_led_lo++;
      end
    end
  end

  // ---------------- second copy with a sample period shorter than a frame ----------------
  localparam int unsigned FAST_PERIOD = 60;
  logic        f_sck, f_mosi, f_miso, f_amp_cs_n, f_amp_shdn, f_amp_dout, f_ad_conv, f_dac_cs_n;
  logic        f_dac_clr_n, f_sf_ce0, f_init_b, f_valid, f_overflow, f_missed;
  logic [7:0]  f_led, f_echo, f_latched;
  logic [13:0] f_a, f_b, f_pa, f_pb;
  logic [15:0] f_drops;
  real         f_out_a, f_out_b;
  int          f_words, f_sck_count, f_conv;
  int          n_overflow = 0, n_missed = 0, n_backtoback = 0, f_last = -1;
  logic        f_conv_q = 1'b0;

  adc_dac_top #(.SAMPLE_PERIOD(FAST_PERIOD), .BUF_DEPTH(4)) dut_fast (
    .clk(clk), .rst_n(rst_n), .gain_a(4'd1), .gain_b(4'd1), .gain_load(1'b0),
    .ramp_mode(1'b0), .led_sel(1'b0),
    .spi_sck(f_sck), .spi_mosi(f_mosi), .spi_miso(f_miso), .amp_cs_n(f_amp_cs_n),
    .amp_shdn(f_amp_shdn), .amp_dout(f_amp_dout), .ad_conv(f_ad_conv), .dac_cs_n(f_dac_cs_n),
    .dac_clr_n(f_dac_clr_n), .sf_ce0(f_sf_ce0), .fpga_init_b(f_init_b), .led(f_led),
    .sample_a(f_a), .sample_b(f_b), .sample_valid(f_valid), .amp_echo(f_echo),
    .overflow(f_overflow), .drop_count(f_drops), .sample_missed(f_missed));

  ltc6912_model f_amp (
    .shdn(f_amp_shdn), .cs_n(f_amp_cs_n), .din(f_mosi), .clk(f_sck), .dout(f_amp_dout),
    .vina(1.4), .vinb(1.9), .vouta(f_out_a), .voutb(f_out_b), .latched(f_latched), .words(f_words));

  ltc1407a_model f_adc (
    .conv(f_ad_conv), .sck(f_sck), .sdo(f_miso), .vin_a(f_out_a), .vin_b(f_out_b),
    .pending_a(f_pa), .pending_b(f_pb), .sck_count(f_sck_count), .conversions(f_conv));

  always @(posedge clk) begin
    if (f_overflow && rst_n) n_overflow++;
    if (f_missed && rst_n) n_missed++;
    if (rst_n && f_ad_conv && !f_conv_q) begin
      // frames longer than the period: conversions run back to back
      if (f_last >= 0 && cyc - f_last < 2 * FAST_PERIOD) n_backtoback++;
      f_last = cyc;
    end
    f_conv_q <= f_ad_conv;
    if (rst_n && f_valid && f_conv > 2) begin
      check($signed(f_a) == 14'sd1638, $sformatf("fast copy A %0d", $signed(f_a)));
      check($signed(f_b) == -14'sd1638, $sformatf("fast copy B %0d", $signed(f_b)));
    end
  end


  task automatic wait_samples(input int n);
    repeat (n) @(posedge sample_valid);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_gain_word = {gain_b, gain_a};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    // 1. DC inputs: gain -1 on A with 1.5 V, gain -2 on B with 1.6 V
    wait_samples(6);
    check(dut.sample_a == 14'd983, "1.5 V at gain -1 gives 983");
    check(dut.sample_b == 14'd655, "1.6 V at gain -2 gives 655");
    @(negedge clk) led_sel = 1'b1;
    wait_samples(4);
    @(negedge clk) led_sel = 1'b0;
    // 2. reprogram the gains: A -2, B -1
    check_period = 1'b0;
    prev_gain_word = {gain_b, gain_a};
    @(negedge clk) begin
      gain_a = 4'd2;
      gain_b = 4'd1;
      exp_gain_word = {4'd1, 4'd2};
      gain_load = 1'b1;
    end
    repeat (4) @(negedge clk);
    gain_load = 1'b0;
    wait (!amp_cs_n);
    wait (amp_cs_n);
    repeat (2) @(posedge clk);
    check(amp_echo == prev_gain_word, $sformatf("echo %h of previous word %h", amp_echo, prev_gain_word));
    wait_samples(4);
    check(dut.sample_a == 14'd1966, "1.5 V at gain -2 gives 1966");
    check(dut.sample_b == 14'd328, "1.6 V at gain -1 gives 328");
    @(posedge clk) last_conv = -1;
    check_period = 1'b1;
    // 3. sine input on A, gain -2: 10 kHz, 0.3 V amplitude
    fork
      begin : sine
        forever begin
          @(negedge clk);
          vin_a = 1.65 + 0.3 * $sin(2.0 * 3.14159265358979 * 10.0e3 * real'(cyc) * 20.0e-9);
        end
      end
    join_none
    wait_samples(200);
    // 4. ramp test on the DAC
    wait (!dac_cs_n);
    wait (dac_cs_n);
    @(negedge clk) ramp_mode = 1'b1;
    wait_samples(60);
    wait (!dac_cs_n);
    wait (dac_cs_n);
    @(negedge clk) ramp_mode = 1'b0;
    wait_samples(10);
    disable sine;
    repeat (400) @(posedge clk);
    $display("fast copy: overflow=%0d missed=%0d back_to_back=%0d drops=%0d", n_overflow, n_missed, n_backtoback, f_drops);
    check(n_overflow > 0, "register array overflow seen");
    check(int'(f_drops) - n_overflow <= 1 && n_overflow - int'(f_drops) <= 1, "drop counter matches overflow pulses");
    check(n_missed > 0, "lost sample requests reported");
    check(n_backtoback > 0, "back-to-back conversions");

    $display("mechanisms: gain_frames=%0d adc_frames=%0d dac_pass=%0d dac_ramp=%0d led_high=%0d led_low=%0d period_checks=%0d",
             n_gain, n_adc, n_dac_pass, n_dac_ramp, n_led_hi, n_led_lo, n_period_ok);
    check(n_gain == 2, "gain programmed after reset and on gain_load");
    check(n_adc > 0 && n_dac_pass > 0 && n_dac_ramp > 0, "ADC frames, sample writes and ramp writes");
    check(n_led_hi > 0 && n_led_lo > 0, "both LED views");
    check(n_period_ok > 0, "sample period");
    check(drop_count == 0 && fifo.size() <= 1, "default sample rate keeps up");
    check(dac_clr_n && sf_ce0 && fpga_init_b && !amp_shdn, "static control pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
