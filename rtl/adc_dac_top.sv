// ADC -> register array -> DAC signal path for the Spartan-3E starter board.
//
// An analog input on the J7 header passes the LTC6912-1 programmable
// pre-amplifier and is sampled by the LTC1407A-1 dual 14-bit ADC. The results
// are kept in a register array and then written, reduced to 12 bits, to one
// output of the LTC2624 quad DAC on the J5 header, so that the input signal
// reappears at the output. All three converters sit on one SPI bus; the
// sequencer gives it to one controller at a time:
//
//   reset / gain_load  -> amp_gain_ctrl   : 8-bit gain word {gain_b, gain_a}
//   every SAMPLE_PERIOD -> adc_capture_ctrl: AD_CONV pulse + 34-clock read
//   array not empty    -> dac_write_ctrl  : 32-bit (or 24-bit) write-and-update word
//
// Channel A results go into the array and to the DAC; both channels are
// brought out on `sample_a` / `sample_b` with `sample_valid`, and channel A is
// shown on the LEDs (high 8 bits, or low 6 bits with `led_sel`). With
// `ramp_mode` high the DAC receives a rising ramp instead of the samples, one
// step per write, to test the DAC alone; the samples are still read and
// drained. The data seen by the DAC lag the analog input by one ADC frame
// (the ADC's own latency) plus the wait in the array.
//
// Timing with the defaults at a 50 MHz clock: SPI_SCK at 25 MHz for the ADC
// and DAC and 6.25 MHz for the amplifier, one sample every 200 clocks
// (250 kS/s). ADC and DAC frames together need about 140 clocks, so
// SAMPLE_PERIOD below about 150 lets the array fill and drop samples.
// `gain_load`, `ramp_mode` and `led_sel` are taken to be synchronous to clk.
// The device protocols and the block structure follow the board design; the
// clock rates, the sample rate, the array depth and the ramp/LED selectors
// are this design's choices.
module adc_dac_top
  import adc_dac_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 200,
  parameter int unsigned AMP_SCK_HALF  = 4,
  parameter int unsigned SPI_SCK_HALF  = 1,
  parameter int unsigned CONV_CLKS     = 2,
  parameter int unsigned BUF_DEPTH     = 16,
  parameter dac_addr_t   DAC_ADDR      = DAC_ADDR_A,
  parameter dac_cmd_t    DAC_CMD       = DAC_CMD_WRITE_UPDATE,
  parameter int unsigned DAC_WORD_BITS = DAC_FRAME_BITS   // 32, or 24
) (
  input  logic        clk,
  input  logic        rst_n,
  // user controls
  input  logic [3:0]  gain_a,
  input  logic [3:0]  gain_b,
  input  logic        gain_load,
  input  logic        ramp_mode,
  input  logic        led_sel,
  // shared SPI bus and device pins
  output logic        spi_sck,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        amp_cs_n,
  output logic        amp_shdn,
  input  logic        amp_dout,
  output logic        ad_conv,
  output logic        dac_cs_n,
  output logic        dac_clr_n,
  output logic        sf_ce0,
  output logic        fpga_init_b,
  // observation
  output logic [7:0]  led,
  output logic [13:0] sample_a,
  output logic [13:0] sample_b,
  output logic        sample_valid,
  output logic [7:0]  amp_echo,
  output logic        overflow,
  output logic [15:0] drop_count,
  output logic        sample_missed
);

  bus_owner_t  owner;
  spi_drv_t    amp_drv, adc_drv, dac_drv;
  logic        amp_start, amp_busy, amp_done;
  logic        adc_start, adc_busy, adc_done;
  logic        dac_start, dac_busy, dac_done;
  logic        buf_empty, buf_full, buf_pop;
  logic [$clog2(BUF_DEPTH+1)-1:0] buf_count;
  adc_sample_t ch_a, ch_b, buf_head;
  dac_code_t   sample_code, ramp_code, dac_code;
  logic        sample_tick;

  adc_dac_sequencer #(
    .SAMPLE_PERIOD (SAMPLE_PERIOD)
  ) u_seq (
    .clk           (clk),
    .rst_n         (rst_n),
    .gain_load     (gain_load),
    .amp_start     (amp_start),
    .amp_done      (amp_done),
    .adc_start     (adc_start),
    .adc_done      (adc_done),
    .dac_start     (dac_start),
    .dac_done      (dac_done),
    .buf_empty     (buf_empty),
    .buf_pop       (buf_pop),
    .owner         (owner),
    .sample_tick   (sample_tick),
    .sample_missed (sample_missed)
  );

  amp_gain_ctrl #(
    .SCK_HALF (AMP_SCK_HALF)
  ) u_amp (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (amp_start),
    .gain_a   (gain_code_t'(gain_a)),
    .gain_b   (gain_code_t'(gain_b)),
    .busy     (amp_busy),
    .done     (amp_done),
    .echo     (amp_echo),
    .spi      (amp_drv),
    .amp_dout (amp_dout)
  );

  adc_capture_ctrl #(
    .SCK_HALF  (SPI_SCK_HALF),
    .CONV_CLKS (CONV_CLKS)
  ) u_adc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (adc_start),
    .busy     (adc_busy),
    .done     (adc_done),
    .valid    (sample_valid),
    .ch_a     (ch_a),
    .ch_b     (ch_b),
    .spi      (adc_drv),
    .spi_miso (spi_miso)
  );

  sample_buffer #(
    .DEPTH (BUF_DEPTH),
    .WIDTH (ADC_BITS)
  ) u_buf (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (sample_valid),
    .wr_data    (ch_a),
    .rd_en      (buf_pop),
    .rd_data    (buf_head),
    .empty      (buf_empty),
    .full       (buf_full),
    .count      (buf_count),
    .overflow   (overflow),
    .drop_count (drop_count)
  );

  adc_to_dac_code u_conv (
    .sample (buf_head),
    .code   (sample_code)
  );

  ramp_gen #(
    .WIDTH (DAC_BITS),
    .STEP  (1)
  ) u_ramp (
    .clk     (clk),
    .rst_n   (rst_n),
    .advance (buf_pop && ramp_mode),
    .value   (ramp_code)
  );

  assign dac_code = ramp_mode ? ramp_code : sample_code;

  dac_write_ctrl #(
    .SCK_HALF   (SPI_SCK_HALF),
    .FRAME_BITS (DAC_WORD_BITS)
  ) u_dac (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (dac_start),
    .cmd      (DAC_CMD),
    .addr     (DAC_ADDR),
    .code     (dac_code),
    .busy     (dac_busy),
    .done     (dac_done),
    .spi      (dac_drv),
    .spi_miso (spi_miso)
  );

  led_display u_led (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (sample_valid),
    .sample   (ch_a),
    .show_low (led_sel),
    .led      (led)
  );

  spi_bus_mux u_mux (
    .owner       (owner),
    .amp         (amp_drv),
    .adc         (adc_drv),
    .dac         (dac_drv),
    .spi_sck     (spi_sck),
    .spi_mosi    (spi_mosi),
    .amp_cs_n    (amp_cs_n),
    .ad_conv     (ad_conv),
    .dac_cs_n    (dac_cs_n),
    .sf_ce0      (sf_ce0),
    .fpga_init_b (fpga_init_b)
  );

  assign sample_a  = ch_a;
  assign sample_b  = ch_b;
  assign amp_shdn  = 1'b0;
  assign dac_clr_n = rst_n;

  // Status not brought out.
  logic unused_status;
  assign unused_status = amp_busy ^ adc_busy ^ dac_busy ^ buf_full ^ (^buf_count) ^ sample_tick;

  // Only the bus owner may run a frame.
  a_amp_owns: assert property (@(posedge clk) disable iff (!rst_n) amp_busy |-> owner == OWN_AMP);
  a_adc_owns: assert property (@(posedge clk) disable iff (!rst_n) adc_busy |-> owner == OWN_ADC);
  a_dac_owns: assert property (@(posedge clk) disable iff (!rst_n) dac_busy |-> owner == OWN_DAC);

endmodule
