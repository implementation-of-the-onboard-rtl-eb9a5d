// Writer for the LTC2624 quad 12-bit DAC, in its 32-bit or 24-bit SPI form.
//
// On `start` it latches the command, address and 12-bit unsigned code and
// sends, MSB first with DAC_CS low: 8 don't-care bits (32-bit form only),
// the 4-bit command C3..C0, the 4-bit address A3..A0, the code D11..D0 and
// 4 don't-care bits (don't-care bits are sent as zeros). The DAC takes each bit on the rising SPI_SCK edge and acts
// on the word when DAC_CS returns high. With the write-and-update command
// the addressed output moves to code/4096 times its reference voltage.
//
// Interface: `spi.sel` is the chip select, asserted high here.
// Timing: `done` is high (2*FRAME_BITS + 1)*SCK_HALF clocks after the clock
// edge that takes `start` (65 clocks, 1.3 us at 50 MHz with the defaults).
// Both word layouts follow the board's DAC protocol; the 32-bit form as the
// default and the SPI clock divider are this design's choices.
module dac_write_ctrl
  import adc_dac_pkg::*;
#(
  parameter int unsigned SCK_HALF   = 1,
  parameter int unsigned FRAME_BITS = DAC_FRAME_BITS   // 32, or 24
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  dac_cmd_t  cmd,
  input  dac_addr_t addr,
  input  dac_code_t code,
  output logic      busy,
  output logic      done,
  output spi_drv_t  spi,
  input  logic      spi_miso
);

  logic [DAC_FRAME_BITS-1:0] full_word;
  logic [FRAME_BITS-1:0]     tx_word;
  logic [FRAME_BITS-1:0]     rx_word;

  // The 24-bit form is the 32-bit word without its leading don't-care byte.
  assign full_word = {8'h00, cmd, addr, code, 4'h0};
  assign tx_word   = full_word[FRAME_BITS-1:0];

  spi_shift_engine #(
    .WIDTH    (FRAME_BITS),
    .SCK_HALF (SCK_HALF)
  ) u_engine (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .tx_word (tx_word),
    .busy    (busy),
    .done    (done),
    .rx_word (rx_word),
    .sck     (spi.sck),
    .mosi    (spi.mosi),
    .cs      (spi.sel),
    .miso    (spi_miso)
  );

  // The DAC's serial output is not needed.
  logic unused_rx;
  assign unused_rx = ^rx_word;

  initial begin
    if (FRAME_BITS != 24 && FRAME_BITS != 32)
      $error("dac_write_ctrl: FRAME_BITS must be 24 or 32");
  end

endmodule
