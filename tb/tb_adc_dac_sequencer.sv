// Self-checking testbench for adc_dac_sequencer with simple stand-ins for
// the three controllers: each answers its start pulse with done after a
// fixed number of clocks and checks that it owns the bus meanwhile, and the
// register array is a counter fed by the ADC stand-in. Checked: the gain is
// programmed first after reset and again after each gain_load edge; a sample
// request arrives every SAMPLE_PERIOD clocks and each starts one ADC frame;
// a DAC write pops one entry and happens only when the array is non-empty
// and nothing else waits; only one frame runs at a time; and with frames
// longer than the period, lost requests are reported by sample_missed.
module tb_adc_dac_sequencer;
  import adc_dac_pkg::*;

  localparam int unsigned SAMPLE_PERIOD = 60;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       gain_load = 1'b0;
  logic       amp_start, adc_start, dac_start, buf_pop;
  logic       amp_done = 1'b0, adc_done = 1'b0, dac_done = 1'b0;
  logic       sample_tick, sample_missed;
  bus_owner_t owner;
  int         level = 0;
  int         checks = 0, failures = 0;
  int         n_amp = 0, n_adc = 0, n_dac = 0, n_tick = 0, n_missed = 0;
  int         adc_len = 20, dac_len = 15, amp_len = 30;
  int         running = 0;
  int         last_tick = -1, cyc = 0;

  always #10 clk = ~clk;

  adc_dac_sequencer #(.SAMPLE_PERIOD(SAMPLE_PERIOD)) dut (
    .clk(clk), .rst_n(rst_n), .gain_load(gain_load),
    .amp_start(amp_start), .amp_done(amp_done),
    .adc_start(adc_start), .adc_done(adc_done),
    .dac_start(dac_start), .dac_done(dac_done),
    .buf_empty(level == 0), .buf_pop(buf_pop), .owner(owner),
    .sample_tick(sample_tick), .sample_missed(sample_missed));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Controller stand-ins.
  task automatic serve(input bus_owner_t who, input int len);
    running++;
    check(running == 1, "only one frame at a time");
    for (int k = 0; k < len; k++) begin
      @(posedge clk);
      #1;
      check(owner == who, $sformatf("owner %0d during frame of %0d", owner, who));
    end
    @(negedge clk);
    case (who)
      OWN_AMP: amp_done = 1'b1;
      OWN_ADC: adc_done = 1'b1;
      default: dac_done = 1'b1;
    endcase
    @(posedge clk);
    if (who == OWN_ADC) level++;
    #1;
    amp_done = 1'b0;
    adc_done = 1'b0;
    dac_done = 1'b0;
    running--;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (amp_start) begin n_amp++; fork serve(OWN_AMP, amp_len); join_none end
      if (adc_start) begin n_adc++; fork serve(OWN_ADC, adc_len); join_none end
      if (dac_start) begin
        n_dac++;
        check(buf_pop, "pop with every DAC write");
        check(level > 0, "DAC write only with data");
        level--;
        fork serve(OWN_DAC, dac_len); join_none
      end
      if (buf_pop && !dac_start) check(1'b0, "pop without DAC write");
      if (sample_tick) begin
        if (last_tick >= 0) check(cyc - last_tick == SAMPLE_PERIOD, "sample period");
        last_tick = cyc;
        n_tick++;
      end
      if (sample_missed) n_missed++;
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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // First frame after reset must be the gain programming.
    wait (amp_start || adc_start || dac_start);
    check(amp_start, "gain programmed first");
    repeat (1000) @(posedge clk);
    check(n_amp == 1, "one gain frame after reset");
    check(n_adc >= n_tick - 1 && n_adc <= n_tick, $sformatf("%0d ADC frames for %0d requests", n_adc, n_tick));
    check(n_dac >= n_adc - 1 && n_dac <= n_adc, $sformatf("%0d DAC writes for %0d samples", n_dac, n_adc));
    check(n_missed == 0, "no lost requests at this load");
    // Gain reload.
    @(negedge clk) gain_load = 1'b1;
    repeat (5) @(negedge clk);
    gain_load = 1'b0;
    repeat (500) @(posedge clk);
    check(n_amp == 2, "gain reprogrammed once per gain_load edge");
    // Overload: frames longer than the period lose requests.
    adc_len = 70;
    repeat (1500) @(posedge clk);
    check(n_missed > 0, "lost requests reported under overload");
    adc_len = 20;
    repeat (300) @(posedge clk);
    $display("mechanisms: gain=%0d adc=%0d dac=%0d ticks=%0d missed=%0d", n_amp, n_adc, n_dac, n_tick, n_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
