# ADC to DAC signal path for the Spartan-3E starter board

The Spartan-3E starter board has a small analog front end. A two-channel
programmable pre-amplifier (LTC6912-1) feeds a dual 14-bit ADC (LTC1407A-1),
and a quad 12-bit DAC (LTC2624) drives the output header. This RTL connects
the three so that an analog signal goes in at the J7 header and comes back
out at DAC output A on the J5 header. The FPGA digitises the signal, keeps
the samples in a register array, and writes them back out. A processing stage
could sit between the array and the DAC; this design leaves it empty. The aim
is a path that returns the input signal nearly unchanged, on which filters or
transforms can be built later.

All three chips hang on **one shared SPI bus**: one clock line (SPI_SCK) and
one data line (SPI_MOSI), plus one select per device. Most of the logic exists
to share that bus. Before any conversion the gains must be programmed. The
ADC needs a 34-clock read frame that is not a normal chip-select transfer.
The DAC needs a 32-bit write. Only one of these may run at a time, and every
other device on the wires, the two flash chips included, must stay
deselected.

```
             gain_a/gain_b, gain_load
                     |
                     v
  J7 --> LTC6912-1 <--- amp_gain_ctrl ---+
           |                             |
           v                             |         adc_dac_sequencer
        LTC1407A-1 <--> adc_capture_ctrl -+--> spi_bus_mux --> SPI_SCK, SPI_MOSI,
                             |           |                     AMP_CS, AD_CONV, DAC_CS
                      ch_a   v           |
                       sample_buffer     |
                             | head      |
                     adc_to_dac_code     |
                             |   ramp_gen|
                             v     v     |
                            (ramp_mode)--+-- dac_write_ctrl --> LTC2624 --> J5
                             |
                        led_display --> 8 LEDs
```

## The three serial frames

Every frame uses the same SPI mode, built by the helper `spi_shift_engine`.
SCK rests low, MOSI changes while SCK is low, and the slave captures on the
rising edge. Bits go MSB first. The FPGA samples MISO in the same clock in
which it raises SCK, so it reads the value the slave set up after the
previous falling edge. Each frame keeps SCK low for one extra half period
before it releases the select.

**Pre-amplifier gain word (8 bits, `amp_gain_ctrl`).** AMP_CS goes low. Then
the word `{B3 B2 B1 B0, A3 A2 A1 A0}` is sent, B3 first: the upper nibble is
the channel-B gain and the lower nibble is the channel-A gain. The amplifier
applies both gains when AMP_CS returns high. While the new word goes in, the
amplifier shifts its previous word out on AMP_DOUT. The controller collects
that into `amp_echo`. Gain codes (`gain_code_t`):

| code | gain (V/V) | input span for the ADC's full range |
|------|-----------:|-------------------------------------|
| 0 | 0 | - |
| 1 | -1 | 0.4 V to 2.9 V |
| 2 | -2 | 1.025 V to 2.275 V |
| 3 | -5 | 1.4 V to 1.9 V |
| 4 | -10 | 1.525 V to 1.775 V |
| 5 | -20 | 1.5875 V to 1.7125 V |
| 6 | -50 | 1.625 V to 1.675 V |
| 7 | -100 | 1.6375 V to 1.6625 V |

**ADC read frame (AD_CONV pulse plus 34 clocks, `adc_capture_ctrl`).** The
ADC has no chip select. A high pulse on AD_CONV makes it sample both channels
at once. The FPGA then clocks 34 SCK cycles, and SPI_MISO carries:

| SCK cycles | 0-1 | 2-15 | 16-17 | 18-31 | 32-33 |
|---|---|---|---|---|---|
| SPI_MISO | released | channel A, D13..D0 | released | channel B, D13..D0 | released |

All 34 cycles must be clocked, or the ADC keeps driving MISO and blocks the
other devices. The results of a frame belong to the *previous* AD_CONV pulse:
the ADC presents a conversion only at the next conversion. So the data lag
the analog input by exactly one sample period. The very first frame after
power-up returns a meaningless value (the model returns 0).

**DAC write (32 or 24 bits, `dac_write_ctrl`).** DAC_CS goes low. Then
`{8 don't-care, C3..C0, A3..A0, D11..D0, 4 don't-care}` is sent; don't-care
bits go out as 0. The DAC acts on the word when DAC_CS rises. The chip also
accepts the same word without its leading don't-care byte. Set
`DAC_WORD_BITS = 24` for that form, which saves 16 clocks per write. The top uses
command `0011` (write and update) and address `0000` (output A). Both can be
changed with the `DAC_CMD` and `DAC_ADDR` parameters (`dac_cmd_t`,
`dac_addr_t`; address `1111` writes all four outputs).

## Sharing the bus: the sequencer

`adc_dac_sequencer` owns the bus schedule. It sets `owner` (`bus_owner_t`),
and `spi_bus_mux` routes only that controller's SCK/MOSI to the pins. Every
other select is held inactive: AMP_CS and DAC_CS high, AD_CONV low. The
StrataFlash (`sf_ce0`) and the platform flash (`fpga_init_b`) are held
disabled at all times. The owner changes only between frames, and an
assertion in the top checks that a controller runs only while it owns the
bus.

Whenever the bus is idle, the sequencer picks the next frame by priority:

1. **Gain programming.** Runs once after reset, before any conversion, and
   again after each rising edge of `gain_load`.
2. **ADC frame.** One per sample request. A free-running timer raises a
   request every `SAMPLE_PERIOD` clocks. The channel-A result goes into the
   register array, and both results appear on `sample_a`/`sample_b` with
   `sample_valid`.
3. **DAC write.** Runs when the array is not empty. In the same clock it pops
   the array's head, so each sample is written to the DAC once, in order.

If the frames take longer than the sample period, two things happen:

- **Lost requests.** A request that arrives while one is still waiting is
  lost and reported on `sample_missed`. Conversions then run back to back.
- **Overflow.** The DAC falls behind, the array fills, and further samples
  are dropped. Each drop gives an `overflow` pulse and increments the
  saturating `drop_count`.

With the defaults neither happens.

**Ramp mode.** With `ramp_mode` high, the DAC gets a 12-bit counter
(`ramp_gen`, +1 per write, wrapping) instead of the samples. This gives a
sawtooth at the output, which tests the DAC on its own. The ADC keeps
converting, and the array is still drained one entry per write.

## Number formats

The ADC result is 14-bit two's complement:

    D = GAIN * (VIN - 1.65 V) / 1.25 V * 8192

GAIN is the (negative) amplifier gain and 1.65 V is the mid-supply reference.
For example, 1.5 V at gain -1 gives D = 983, and 1.6 V at gain -20 gives
6554 (0x199A).

The DAC takes a 12-bit unsigned code:

    VOUT = code / 4096 * VREF    (VREF = 3.3 V for outputs A and B, 2.5 V for C and D)

`adc_to_dac_code` drops the two low bits and inverts the sign bit:

    code = (D + 8192) / 4

So D = -8192 gives 0x000, D = 0 (input at 1.65 V) gives midscale 0x800, and
D = 8191 gives 0xFFF. Two effects follow:

- **Resolution.** Two bits of resolution are lost.
- **Polarity.** Because the pre-amplifier inverts, the DAC output falls as
  the input rises. It swings around 1.65 V on outputs A/B. Undo this in the
  (empty) processing stage if the polarity matters.

**LED display.** `led_display` shows the latest channel-A result on the eight
LEDs. With `led_sel` low it shows D13..D6; with `led_sel` high it shows
D5..D0 on LED5..LED0.

## Timing

Defaults, with a 50 MHz `clk`:

| item | value |
|---|---|
| SPI_SCK, ADC and DAC frames | 25 MHz (`SPI_SCK_HALF = 1` clock per half period) |
| SPI_SCK, gain frame | 6.25 MHz (`AMP_SCK_HALF = 4`) |
| AD_CONV pulse | `CONV_CLKS = 2` clocks |
| ADC frame, start to `done` | `CONV_CLKS + 3 + 69*SPI_SCK_HALF` = 74 clocks (1.48 us) |
| DAC frame, start to `done` | `(2*DAC_WORD_BITS + 1)*SPI_SCK_HALF` = 65 clocks (1.3 us) |
| gain frame, start to `done` | `17*AMP_SCK_HALF` = 68 clocks |
| sample period | `SAMPLE_PERIOD = 200` clocks: 250 kS/s, Nyquist limit 125 kHz |
| latency, analog input to array | one sample period plus one ADC frame |

One ADC frame plus one DAC frame plus the gaps between them takes about 145
clocks. So `SAMPLE_PERIOD` can go down to about 150 before samples start to
be lost.

The ADC chip itself allows about 1.5 MS/s per channel. This path cannot reach
that, because the DAC write shares the same wires. Converting alone at these
clock settings, back to back, the ADC gives about 670 kS/s.

## Parameters of `adc_dac_top`

| parameter | default | meaning |
|---|---|---|
| `SAMPLE_PERIOD` | 200 | clocks between sample requests |
| `AMP_SCK_HALF` | 4 | clocks per SCK half period, gain frame |
| `SPI_SCK_HALF` | 1 | clocks per SCK half period, ADC and DAC frames |
| `CONV_CLKS` | 2 | AD_CONV pulse width in clocks |
| `BUF_DEPTH` | 16 | register array entries |
| `DAC_ADDR` | `DAC_ADDR_A` | DAC output written |
| `DAC_CMD` | `DAC_CMD_WRITE_UPDATE` | DAC command used |
| `DAC_WORD_BITS` | 32 | DAC word length, 32 or 24 |

## Top-level ports

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `gain_a`, `gain_b` [3:0] | in | gain codes for channels A and B |
| `gain_load` | in | rising edge reprograms the gains |
| `ramp_mode` | in | 1: DAC gets the ramp; 0: DAC gets the samples |
| `led_sel` | in | 0: LEDs show D13..D6; 1: LEDs show D5..D0 |
| `spi_sck`, `spi_mosi` | out | shared SPI clock and data |
| `spi_miso` | in | shared SPI data from the ADC |
| `amp_cs_n`, `amp_shdn`, `amp_dout` | out, out, in | pre-amplifier select, shutdown (held low), gain echo |
| `ad_conv` | out | ADC conversion start |
| `dac_cs_n`, `dac_clr_n` | out | DAC select; DAC clear (follows `rst_n`) |
| `sf_ce0`, `fpga_init_b` | out | flash disables, held high |
| `led` [7:0] | out | LED display |
| `sample_a`, `sample_b` [13:0], `sample_valid` | out | latest results |
| `amp_echo` [7:0] | out | previous gain word, read back from the amplifier |
| `overflow`, `drop_count` [15:0], `sample_missed` | out | overload reporting |

`gain_load`, `ramp_mode` and `led_sel` are sampled directly. Add a
synchronizer if they come from switches.

## Where the design follows its reference and where it chooses

**Taken from the board's documented interfaces:**

- the three frame formats above and the 34-cycle ADC frame;
- the one-sample ADC latency;
- the gain table and the conversion formulas;
- programming the gain before converting;
- keeping the samples in a register array between ADC and DAC;
- dropping two bits for the 12-bit DAC;
- DAC output A;
- the ramp test;
- the 8-bit/6-bit LED split;
- keeping all other SPI devices disabled.

**This design's own choices:**

- all clock rates and the 250 kS/s sample rate;
- the AD_CONV pulse width;
- channel A before channel B in the ADC frame;
- the array's depth, its first-in first-out order and its drop-on-full
  policy;
- the frame priority;
- the offset-binary conversion;
- the DAC command code (the LTC2624's write-and-update) and the 32-bit word
  as the default;
- the run-time ramp and LED selectors;
- the flash-disable pin names.

**Not built:**

- The converter chips and the pre-amplifier. They are bought-in analog parts
  and exist here only as simulation models.
- The on-chip logic analyser used on the board to watch the signals. Its
  signals are brought out as ports instead.
- The clock oscillator.

The DAC voltages measured on the reference board for a few DC inputs (about
1.2 V throughout) do not follow from any simple mapping of the 14-bit codes.
The conversion here is the straightforward one, not fitted to those numbers.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

The testbenches drive behavioural models of the three chips, in `tb/`
(`ltc6912_model`, `ltc1407a_model`, `ltc2624_model`). The models carry real
voltages:

- **Amplifier model.** Inverting gain around 1.65 V, clipped to the rails;
  echoes the previous word on DOUT.
- **ADC model.** Applies the conversion formula with rounding and clipping.
  Implements the 34-cycle frame and the one-sample latency.
- **DAC model.** Decodes the 24/32-bit word and the commands. Powers up at
  midscale.

| testbench | what it shows |
|---|---|
| `tb_amp_gain_ctrl` | gain word, echo of the previous word, 8 SCK edges per select, frame length, amplifier output voltage |
| `tb_adc_capture_ctrl` | codes with one-sample latency for random and edge voltages (983 for 1.5 V at gain -1), clipping, 34 SCK edges, AD_CONV width, frame length |
| `tb_dac_write_ctrl` | raw 32-bit and 24-bit words, all commands and addresses against a register copy, VOUT, frame length |
| `tb_sample_buffer` | FIFO order, flags, count, overflow and drop count against a queue |
| `tb_adc_to_dac_code` | all 16384 inputs |
| `tb_ramp_gen` | counting, hold, wrap |
| `tb_led_display` | both views, hold between samples |
| `tb_spi_bus_mux` | all owners and drive values; only the owner's select is active |
| `tb_adc_dac_sequencer` | gain first after reset and on `gain_load`, sample period, priorities, pop per DAC write, lost-request report |
| `tb_adc_dac_top` | the whole path end to end, described below |
| `tb_adc_dac_top_full` | the same sequence with the top strictly at its defaults, longer: about 5200 samples, a full 4096-step ramp |

`tb_adc_dac_top` runs the whole path with the chip models, in two copies:

- **Default copy.** Runs at the default parameters through:
  - DC inputs, including the reference cases: 1.5 V at gain -1 gives 983,
    1.5 V at gain -2 gives 1966, 1.6 V at gain -1 gives 328;
  - both LED views;
  - a gain reload with its echo;
  - a 10 kHz sine;
  - a ramp;
  - a return to sample mode.

  Every ADC result, every DAC word and every AD_CONV spacing is checked
  against values worked out in the testbench.
- **Overloaded copy.** Runs with a 60-clock period and a 4-entry array. It
  must show back-to-back conversions, lost requests and overflow.

The testbench counts each mechanism and fails if one never occurs.

Run any testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/adc_dac_pkg.sv tb/tb_adc_dac_top.sv --top-module tb_adc_dac_top
    ./obj_dir/Vtb_adc_dac_top

Each testbench finishes in a few seconds. The models use `real` ports and
event controls without delays. They are for simulation only.

## Files

`rtl/`:

| file | contents |
|---|---|
| `adc_dac_pkg.sv` | shared types and constants |
| `spi_shift_engine.sv` | SPI shift helper |
| `amp_gain_ctrl.sv` | gain frame |
| `adc_capture_ctrl.sv` | ADC frame |
| `dac_write_ctrl.sv` | DAC frame |
| `sample_buffer.sv` | register array |
| `adc_to_dac_code.sv` | 14-to-12-bit conversion |
| `ramp_gen.sv` | ramp source |
| `led_display.sv` | LED view |
| `spi_bus_mux.sv` | bus routing |
| `adc_dac_sequencer.sv` | bus schedule |
| `adc_dac_top.sv` | the whole path |

`tb/`: one `tb_<module>.sv` per module, `tb_adc_dac_top_full.sv`, and the
three chip models.
