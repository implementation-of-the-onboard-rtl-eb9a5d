// Gain programmer for the LTC6912-1 dual programmable pre-amplifier.
//
// On `start` it sends one 8-bit command word over SPI: the channel-B gain
// code in the upper nibble and the channel-A code in the lower nibble, MSB
// (B3) first, with AMP_CS held low for the whole word. The amplifier takes
// each bit on the rising SPI_SCK edge and applies the new gains when AMP_CS
// returns high. While the word goes out, the amplifier echoes its previous
// setting on AMP_DOUT; the controller collects it into `echo`, which is valid
// from `done` on.
//
// Interface: `spi` is the controller's drive toward the shared bus (sel =
// chip select, asserted high here; the bus multiplexer makes it active low).
// Timing: `done` is high 17*SCK_HALF clocks after the clock edge that takes
// `start` (68 clocks with the default divider).
// The word layout, bit order and capture edge follow the board's pre-amp
// protocol; the SPI clock divider is this design's choice, slow by default
// because this amplifier is the slowest device on the bus.
module amp_gain_ctrl
  import adc_dac_pkg::*;
#(
  parameter int unsigned SCK_HALF = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gain_code_t gain_a,
  input  gain_code_t gain_b,
  output logic       busy,
  output logic       done,
  output logic [7:0] echo,
  output spi_drv_t   spi,
  input  logic       amp_dout
);

  logic [AMP_FRAME_BITS-1:0] rx_word;
  logic                      eng_done;

  spi_shift_engine #(
    .WIDTH    (AMP_FRAME_BITS),
    .SCK_HALF (SCK_HALF)
  ) u_engine (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .tx_word ({gain_b, gain_a}),
    .busy    (busy),
    .done    (eng_done),
    .rx_word (rx_word),
    .sck     (spi.sck),
    .mosi    (spi.mosi),
    .cs      (spi.sel),
    .miso    (amp_dout)
  );

  assign done = eng_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        echo <= '0;
    else if (eng_done) echo <= rx_word;
  end

endmodule
