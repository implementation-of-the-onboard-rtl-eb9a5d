// Self-checking testbench for sample_buffer. Runs 3000 clocks of random
// writes and reads against a queue kept here, comparing the head entry, the
// count and the empty/full flags every clock, and the overflow pulse and
// drop counter whenever a write meets a full buffer. Write-heavy and
// read-heavy phases make the buffer fill, overflow and drain.
module tb_sample_buffer;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned WIDTH = 14;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic             empty, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [15:0]      drop_count;
  int               checks = 0, failures = 0;
  int               n_over = 0, n_full = 0;

  always #10 clk = ~clk;

  sample_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_data(wr_data), .rd_en(rd_en),
    .rd_data(rd_data), .empty(empty), .full(full), .count(count),
    .overflow(overflow), .drop_count(drop_count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] q[$];
    int               drops;
    bit               exp_over;
    drops = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(count == $bits(count)'(q.size()), $sformatf("count %0d, expected %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("head %h, expected %h", rd_data, q[0]));
      check(drop_count == 16'(drops), "drop count");
      if (full) n_full++;
      case ((t / 250) % 3)
        0:       begin wr_en = ($urandom_range(3, 0) != 0); rd_en = ($urandom_range(3, 0) == 0); end
        1:       begin wr_en = ($urandom_range(3, 0) == 0); rd_en = ($urandom_range(3, 0) != 0); end
        default: begin wr_en = $urandom_range(1, 0); rd_en = $urandom_range(1, 0); end
      endcase
      wr_data = WIDTH'($urandom);
      exp_over = 1'b0;
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) begin
        if (q.size() < DEPTH) q.push_back(wr_data);
        else begin drops++; exp_over = 1'b1; end
      end
      #1;
      check(overflow == exp_over, "overflow pulse");
      if (overflow) n_over++;
    end
    check(n_over > 0 && n_full > 0, "buffer filled and overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
