// Increasing test pattern for the DAC.
//
// A WIDTH-bit counter that starts at zero and adds STEP every clock in which
// `advance` is high, wrapping from the top of the range back to zero. Sent to
// the DAC one value per write, it produces a sawtooth ramp at the analog
// output. `value` is the code to use for the next write.
//
// The increasing pattern follows the board design's DAC test; the step size
// and the wrap-around are this design's choices.
module ramp_gen #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned STEP  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             advance,
  output logic [WIDTH-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       value <= '0;
    else if (advance) value <= value + WIDTH'(STEP);
  end

endmodule
