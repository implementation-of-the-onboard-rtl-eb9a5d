// Top-level controller that shares the SPI bus between the three devices.
//
// After reset it first programs the pre-amplifier gains, and again after each
// rising edge of `gain_load`. A sample timer raises a request every
// SAMPLE_PERIOD clocks; each request runs one ADC frame. Whenever the bus is
// free, no gain load or sample request is waiting and the register array is
// not empty, it starts one DAC write and in the same clock pops the array's
// head and advances the ramp. Priority is gain load, then ADC, then DAC.
// A sample request that comes while the previous one still waits is lost and
// reported by a one-clock `sample_missed` pulse.
//
// `owner` selects the bus driver and changes only between frames. The
// controllers' `start` pulses are registered.
// Programming the gain before converting, and running ADC then DAC on the
// shared bus, follow the board design; the timer, the priority order and the
// missed-request report are this design's choices.
module adc_dac_sequencer
  import adc_dac_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       gain_load,
  output logic       amp_start,
  input  logic       amp_done,
  output logic       adc_start,
  input  logic       adc_done,
  output logic       dac_start,
  input  logic       dac_done,
  input  logic       buf_empty,
  output logic       buf_pop,
  output bus_owner_t owner,
  output logic       sample_tick,
  output logic       sample_missed
);

  localparam int unsigned TW = $clog2(SAMPLE_PERIOD);

  typedef enum logic [1:0] {S_IDLE, S_AMP, S_ADC, S_DAC} state_t;

  state_t        state;
  logic [TW-1:0] timer;
  logic          tick_pending;
  logic          gain_pending;
  logic          gain_load_q;
  logic          take_tick;

  // Sample timer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer       <= '0;
      sample_tick <= 1'b0;
    end else begin
      sample_tick <= (timer == TW'(SAMPLE_PERIOD - 1));
      timer       <= (timer == TW'(SAMPLE_PERIOD - 1)) ? '0 : timer + 1'b1;
    end
  end

  assign take_tick = (state == S_IDLE) && !gain_pending && tick_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      owner         <= OWN_NONE;
      tick_pending  <= 1'b0;
      gain_pending  <= 1'b1;
      gain_load_q   <= 1'b0;
      amp_start     <= 1'b0;
      adc_start     <= 1'b0;
      dac_start     <= 1'b0;
      buf_pop       <= 1'b0;
      sample_missed <= 1'b0;
    end else begin
      amp_start     <= 1'b0;
      adc_start     <= 1'b0;
      dac_start     <= 1'b0;
      buf_pop       <= 1'b0;
      sample_missed <= sample_tick && tick_pending && !take_tick;
      gain_load_q   <= gain_load;
      if (sample_tick) tick_pending <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (gain_pending) begin
            gain_pending <= 1'b0;
            owner        <= OWN_AMP;
            amp_start    <= 1'b1;
            state        <= S_AMP;
          end else if (tick_pending) begin
            tick_pending <= sample_tick;
            owner        <= OWN_ADC;
            adc_start    <= 1'b1;
            state        <= S_ADC;
          end else if (!buf_empty) begin
            owner     <= OWN_DAC;
            dac_start <= 1'b1;
            buf_pop   <= 1'b1;
            state     <= S_DAC;
          end
        end
        S_AMP: if (amp_done) begin owner <= OWN_NONE; state <= S_IDLE; end
        S_ADC: if (adc_done) begin owner <= OWN_NONE; state <= S_IDLE; end
        S_DAC: if (dac_done) begin owner <= OWN_NONE; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
      if (gain_load && !gain_load_q) gain_pending <= 1'b1;
    end
  end

  // Only one frame runs at a time, and only from the idle state.
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({amp_start, adc_start, dac_start}));
  a_owner_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |-> (owner != OWN_NONE));

endmodule
