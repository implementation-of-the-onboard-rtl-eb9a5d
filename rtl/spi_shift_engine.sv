// SPI master shift engine, mode 0, MSB first, shared by the three bus
// controllers.
//
// On `start` it latches `tx_word`, raises `cs`, and then runs WIDTH clock
// cycles on `sck`, each SCK_HALF system clocks low and SCK_HALF high. MOSI
// changes while SCK is low, so a slave captures it on the rising edge; MISO is
// sampled in the same system clock that raises SCK, i.e. the value the slave
// set up after the previous falling edge. After the last high phase SCK stays
// low for one more half period before `cs` drops and `done` pulses for one
// clock, with the received bits in `rx_word` (first bit received in the MSB).
//
// Timing: `done` is high (2*WIDTH + 1)*SCK_HALF clocks after the clock edge
// that takes `start`. The frame shape (MSB first, data captured on the
// rising SCK edge) follows the board's device protocols; the half-period
// divider and the trailing half period are this design's choices.
module spi_shift_engine #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned SCK_HALF = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] tx_word,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] rx_word,
  output logic             sck,
  output logic             mosi,
  output logic             cs,
  input  logic             miso
);

  localparam int unsigned HW = $clog2(SCK_HALF + 1);
  localparam int unsigned BW = $clog2(WIDTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_TAIL} state_t;

  state_t           state;
  logic [HW-1:0]    half_cnt;
  logic [BW-1:0]    bit_cnt;
  logic [WIDTH-1:0] shreg;
  logic             half_end;

  assign half_end = (half_cnt == HW'(SCK_HALF - 1));
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      half_cnt <= '0;
      bit_cnt  <= '0;
      shreg    <= '0;
      rx_word  <= '0;
      sck      <= 1'b0;
      mosi     <= 1'b0;
      cs       <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            shreg    <= tx_word;
            mosi     <= tx_word[WIDTH-1];
            cs       <= 1'b1;
            sck      <= 1'b0;
            half_cnt <= '0;
            bit_cnt  <= '0;
            state    <= S_LOW;
          end
        end
        S_LOW: begin
          if (half_end) begin
            sck      <= 1'b1;
            rx_word  <= {rx_word[WIDTH-2:0], miso};
            half_cnt <= '0;
            state    <= S_HIGH;
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        S_HIGH: begin
          if (half_end) begin
            sck      <= 1'b0;
            half_cnt <= '0;
            if (bit_cnt == BW'(WIDTH - 1)) begin
              mosi  <= 1'b0;
              state <= S_TAIL;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
              shreg   <= {shreg[WIDTH-2:0], 1'b0};
              mosi    <= shreg[WIDTH-2];
              state   <= S_LOW;
            end
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        S_TAIL: begin
          if (half_end) begin
            cs    <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new frame may only be requested while the engine is idle.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
