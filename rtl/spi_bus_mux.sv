// Shared SPI bus multiplexer for the pre-amplifier, the ADC and the DAC.
//
// SPI_SCK and SPI_MOSI are one pair of board wires shared by every SPI
// device, so only the controller named by `owner` may drive them; the others
// are ignored. Every select line is driven to its inactive level unless its
// own controller owns the bus: AMP_CS and DAC_CS high, AD_CONV low. The two
// flash devices on the same wires (parallel StrataFlash and the platform
// flash) are kept permanently disabled, so they never contend for SPI_MISO.
// With no owner, SCK and MOSI rest low. Purely combinational; the owner
// changes only between frames, when all controller outputs are at rest.
//
// Sharing the bus and disabling the devices not in use follow the board
// design; the flash disable pins are named after the board's signals.
module spi_bus_mux
  import adc_dac_pkg::*;
(
  input  bus_owner_t owner,
  input  spi_drv_t   amp,
  input  spi_drv_t   adc,
  input  spi_drv_t   dac,
  output logic       spi_sck,
  output logic       spi_mosi,
  output logic       amp_cs_n,
  output logic       ad_conv,
  output logic       dac_cs_n,
  output logic       sf_ce0,
  output logic       fpga_init_b
);

  spi_drv_t sel;

  always_comb begin
    unique case (owner)
      OWN_AMP: sel = amp;
      OWN_ADC: sel = adc;
      OWN_DAC: sel = dac;
      default: sel = SPI_DRV_IDLE;
    endcase
  end

  assign spi_sck     = sel.sck;
  assign spi_mosi    = sel.mosi;
  assign amp_cs_n    = !(owner == OWN_AMP && amp.sel);
  assign ad_conv     =  (owner == OWN_ADC && adc.sel);
  assign dac_cs_n    = !(owner == OWN_DAC && dac.sel);
  assign sf_ce0      = 1'b1;
  assign fpga_init_b = 1'b1;

endmodule
