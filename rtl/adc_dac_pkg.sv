// Shared types and constants for the ADC -> register array -> DAC data path of
// the Spartan-3E starter board (LTC6912-1 pre-amplifier, LTC1407A-1 ADC,
// LTC2624 DAC, all on one shared SPI bus).
//
// Frame lengths, word layouts and the gain code table follow the board's
// documented protocols: an 8-bit pre-amplifier word made of two 4-bit gain
// fields, a 34-clock ADC read frame carrying two 14-bit two's-complement
// results, and a 32-bit DAC word (8 don't-care bits, 4-bit command, 4-bit
// address, 12-bit code, 4 don't-care bits). The DAC command code and the
// address encoding are the LTC2624's own values and are this design's choice
// of which to use (write-and-update, channel A by default).
package adc_dac_pkg;

  // Converter resolutions.
  localparam int unsigned ADC_BITS = 14;
  localparam int unsigned DAC_BITS = 12;

  // Serial frame lengths, in SPI clock cycles.
  localparam int unsigned AMP_FRAME_BITS = 8;   // {gain B, gain A}
  localparam int unsigned ADC_FRAME_BITS = 34;  // 2 Z + 14 A + 2 Z + 14 B + 2 Z
  localparam int unsigned DAC_FRAME_BITS = 32;  // 8 x + cmd + addr + code + 4 x

  // Bit positions of the two results inside the 34-bit ADC read frame,
  // counted with the first bit clocked in as bit 33.
  localparam int unsigned ADC_CHA_MSB = 31;
  localparam int unsigned ADC_CHB_MSB = 15;

  typedef logic signed [ADC_BITS-1:0] adc_sample_t;
  typedef logic        [DAC_BITS-1:0] dac_code_t;

  // LTC6912-1 gain codes (one 4-bit field per channel). The amplifier inverts.
  typedef enum logic [3:0] {
    GAIN_0    = 4'd0,
    GAIN_M1   = 4'd1,
    GAIN_M2   = 4'd2,
    GAIN_M5   = 4'd3,
    GAIN_M10  = 4'd4,
    GAIN_M20  = 4'd5,
    GAIN_M50  = 4'd6,
    GAIN_M100 = 4'd7
  } gain_code_t;

  // LTC2624 command and address fields.
  typedef enum logic [3:0] {
    DAC_CMD_WRITE        = 4'b0000,  // write input register n
    DAC_CMD_UPDATE       = 4'b0001,  // update DAC register n
    DAC_CMD_WRITE_UPDATE = 4'b0011,  // write and update DAC n
    DAC_CMD_POWER_DOWN   = 4'b0100   // power down DAC n
  } dac_cmd_t;

  typedef enum logic [3:0] {
    DAC_ADDR_A   = 4'b0000,
    DAC_ADDR_B   = 4'b0001,
    DAC_ADDR_C   = 4'b0010,
    DAC_ADDR_D   = 4'b0011,
    DAC_ADDR_ALL = 4'b1111
  } dac_addr_t;

  // Which controller currently drives the shared SPI clock and data line.
  typedef enum logic [1:0] {
    OWN_NONE = 2'd0,
    OWN_AMP  = 2'd1,
    OWN_ADC  = 2'd2,
    OWN_DAC  = 2'd3
  } bus_owner_t;

  // What one controller drives toward the shared bus. `sel` is the
  // controller's own device-select in asserted-high form: chip select for the
  // amplifier and the DAC, the AD_CONV pulse for the ADC.
  typedef struct packed {
    logic sck;
    logic mosi;
    logic sel;
  } spi_drv_t;

  localparam spi_drv_t SPI_DRV_IDLE = '{sck: 1'b0, mosi: 1'b0, sel: 1'b0};

endpackage
