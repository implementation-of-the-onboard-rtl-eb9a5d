// Converts a 14-bit two's-complement ADC result to a 12-bit unsigned DAC code.
//
// The DAC has two bits fewer than the ADC, so the two least significant bits
// are dropped. The sign bit is inverted to move from two's complement to
// offset binary, so that ADC zero (input at the 1.65 V midpoint) becomes DAC
// midscale 0x800, ADC -8192 becomes 0x000 and ADC +8191 becomes 0xFFF.
// Purely combinational.
//
// Dropping the two low bits follows the board design; the offset-binary
// mapping is this design's choice.
module adc_to_dac_code
  import adc_dac_pkg::*;
(
  input  adc_sample_t sample,
  output dac_code_t   code
);

  assign code = {~sample[ADC_BITS-1], sample[ADC_BITS-2:ADC_BITS-DAC_BITS]};

  logic unused_low;
  assign unused_low = ^sample[ADC_BITS-DAC_BITS-1:0];

endmodule
