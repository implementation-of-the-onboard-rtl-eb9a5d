// Shows an ADC result on the board's eight LEDs.
//
// Fourteen bits do not fit on eight LEDs, so the display shows one part at a
// time: with `show_low` low, the eight most significant bits D13..D6 on
// LED7..LED0; with `show_low` high, the six low bits D5..D0 on LED5..LED0 and
// LED7..LED6 dark. The last sample seen with `valid` is held, and the LED
// register follows it and the selector one clock later.
//
// The split into eight high and six low bits follows the board design; the
// register stage and the selector input are this design's choices.
module led_display
  import adc_dac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  adc_sample_t sample,
  input  logic        show_low,
  output logic [7:0]  led
);

  adc_sample_t held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '0;
      led  <= '0;
    end else begin
      if (valid) held <= sample;
      led <= show_low ? {2'b00, held[5:0]} : held[13:6];
    end
  end

endmodule
