// Capture controller for the LTC1407A-1 dual 14-bit ADC.
//
// One `start` runs one conversion frame. AD_CONV is pulsed high for
// CONV_CLKS clocks; its rising edge makes the ADC sample both channels at
// once. After one idle clock the controller runs 34 SPI_SCK cycles and reads
// SPI_MISO on each rising edge. The ADC leaves its output in high impedance
// for two cycles, sends channel A (14 bits, MSB first), two more idle cycles,
// then channel B, and two final idle cycles, after which it releases the bus
// for the other SPI devices. The two results are two's-complement and belong
// to the conversion started by the previous AD_CONV pulse: the ADC presents a
// result only at the next conversion, so data lag the samples by one frame.
//
// Interface: `spi.sel` carries AD_CONV. `ch_a` and `ch_b` update with a
// one-clock `valid` pulse together with `done`.
// Timing: `done` is high CONV_CLKS + 3 + 69*SCK_HALF clocks after the clock
// edge that takes `start` (74 clocks, 1.48 us at 50 MHz with the defaults).
// The 34-cycle frame, the bit order and the one-sample latency follow the
// board's ADC protocol; the AD_CONV pulse width and the SPI clock divider are
// this design's choices.
module adc_capture_ctrl
  import adc_dac_pkg::*;
#(
  parameter int unsigned SCK_HALF  = 1,
  parameter int unsigned CONV_CLKS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        valid,
  output adc_sample_t ch_a,
  output adc_sample_t ch_b,
  output spi_drv_t    spi,
  input  logic        spi_miso
);

  localparam int unsigned CW = $clog2(CONV_CLKS + 1);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_GAP, S_READ} state_t;

  state_t                    state;
  logic [CW-1:0]             conv_cnt;
  logic                      ad_conv;
  logic                      eng_start;
  logic                      eng_busy;
  logic                      eng_done;
  logic [ADC_FRAME_BITS-1:0] rx_word;
  logic                      eng_cs;

  spi_shift_engine #(
    .WIDTH    (ADC_FRAME_BITS),
    .SCK_HALF (SCK_HALF)
  ) u_engine (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (eng_start),
    .tx_word ('0),
    .busy    (eng_busy),
    .done    (eng_done),
    .rx_word (rx_word),
    .sck     (spi.sck),
    .mosi    (spi.mosi),
    .cs      (eng_cs),
    .miso    (spi_miso)
  );

  assign spi.sel = ad_conv;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      conv_cnt  <= '0;
      ad_conv   <= 1'b0;
      eng_start <= 1'b0;
      done      <= 1'b0;
      valid     <= 1'b0;
      ch_a      <= '0;
      ch_b      <= '0;
    end else begin
      eng_start <= 1'b0;
      done      <= 1'b0;
      valid     <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            ad_conv  <= 1'b1;
            conv_cnt <= '0;
            state    <= S_CONV;
          end
        end
        S_CONV: begin
          if (conv_cnt == CW'(CONV_CLKS - 1)) begin
            ad_conv <= 1'b0;
            state   <= S_GAP;
          end else begin
            conv_cnt <= conv_cnt + 1'b1;
          end
        end
        S_GAP: begin
          eng_start <= 1'b1;
          state     <= S_READ;
        end
        S_READ: begin
          if (eng_done) begin
            ch_a  <= rx_word[ADC_CHA_MSB -: ADC_BITS];
            ch_b  <= rx_word[ADC_CHB_MSB -: ADC_BITS];
            valid <= 1'b1;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The engine's own select is not used: the ADC has no chip select.
  logic unused_eng;
  assign unused_eng = eng_cs ^ eng_busy;

endmodule
