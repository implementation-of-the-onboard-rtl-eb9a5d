// Register array that holds ADC results until the DAC writer takes them.
//
// A circular buffer of DEPTH registers, WIDTH bits each, with one write and
// one read pointer. `wr_en` stores `wr_data` at the tail; `rd_en` drops the
// head. The head entry is always visible on `rd_data` (show-ahead), so a
// consumer reads and pops in the same clock. A write into a full buffer is
// dropped and counted: `overflow` pulses for one clock and `drop_count`
// saturates at its all-ones value. A read of an empty buffer is ignored.
// A write and a read in the same clock of a full buffer both happen.
//
// That the samples are kept in an array of registers between the ADC and the
// DAC follows the board design; the first-in first-out order, the depth and
// the overflow policy are this design's choices.
module sample_buffer #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 14
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow,
  output logic [15:0]                drop_count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      overflow   <= 1'b0;
      drop_count <= '0;
    end else begin
      overflow <= wr_en && !do_wr;
      if (wr_en && !do_wr && drop_count != '1) drop_count <= drop_count + 1'b1;
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CW'(DEPTH));

endmodule
