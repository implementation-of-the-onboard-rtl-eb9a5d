// Self-checking testbench for dac_write_ctrl against the LTC2624 model.
// Sends forty words with random command, address and code and keeps its own
// copy of the four input and DAC registers, updated by the LTC2624 command
// rules, to compare with the model after each word. Also checked: the raw
// 32-bit word seen by the DAC ({8'h00, cmd, addr, code, 4'h0}), 32 SCK
// edges per chip-select window, `done` 65*SCK_HALF clocks after the edge
// that takes `start`, and
// the analog output of channel A against VOUT = code/4096*3.3 V. A second
// writer in the 24-bit form sends the same words to a second DAC model,
// which must end in the same state after 24 SCK edges per word.
module tb_dac_write_ctrl;
  import adc_dac_pkg::*;

  localparam int unsigned SCK_HALF = 1;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  dac_cmd_t    cmd = DAC_CMD_WRITE_UPDATE;
  dac_addr_t   addr = DAC_ADDR_A;
  dac_code_t   code = '0;
  logic        busy, done;
  spi_drv_t    spi;
  logic [11:0] dac_code [4];
  real         vout [4];
  logic [31:0] last_word;
  int          last_bits, words;
  int          checks = 0, failures = 0;
  logic        busy24, done24;
  spi_drv_t    spi24;
  logic [11:0] dac_code24 [4];
  real         vout24 [4];
  logic [31:0] last_word24;
  int          last_bits24, words24;

  always #10 clk = ~clk;

  dac_write_ctrl #(.SCK_HALF(SCK_HALF)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cmd(cmd), .addr(addr), .code(code),
    .busy(busy), .done(done), .spi(spi), .spi_miso(1'b0));

  ltc2624_model dac (
    .cs_n(!spi.sel), .sck(spi.sck), .sdi(spi.mosi), .clr_n(1'b1),
    .dac_code(dac_code), .vout(vout), .last_word(last_word), .last_bits(last_bits),
    .words(words));

  dac_write_ctrl #(.SCK_HALF(SCK_HALF), .FRAME_BITS(24)) dut24 (
    .clk(clk), .rst_n(rst_n), .start(start), .cmd(cmd), .addr(addr), .code(code),
    .busy(busy24), .done(done24), .spi(spi24), .spi_miso(1'b0));

  ltc2624_model dac24 (
    .cs_n(!spi24.sel), .sck(spi24.sck), .sdi(spi24.mosi), .clr_n(1'b1),
    .dac_code(dac_code24), .vout(vout24), .last_word(last_word24), .last_bits(last_bits24),
    .words(words24));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_in [4];
    logic [11:0] exp_dac [4];
    dac_cmd_t    cmds [4] = '{DAC_CMD_WRITE, DAC_CMD_UPDATE, DAC_CMD_WRITE_UPDATE, DAC_CMD_POWER_DOWN};
    dac_addr_t   addrs [5] = '{DAC_ADDR_A, DAC_ADDR_B, DAC_ADDR_C, DAC_ADDR_D, DAC_ADDR_ALL};
    int          cycles;
    for (int n = 0; n < 4; n++) begin
      exp_in[n]  = 12'h800;
      exp_dac[n] = 12'h800;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      cmd  = (i < 8) ? DAC_CMD_WRITE_UPDATE : cmds[$urandom_range(3, 0)];
      addr = addrs[$urandom_range(4, 0)];
      code = 12'($urandom);
      if (i == 0) begin addr = DAC_ADDR_A; code = 12'hFFF; end
      if (i == 1) begin addr = DAC_ADDR_A; code = 12'h001; end
      for (int n = 0; n < 4; n++) begin
        if (addr == DAC_ADDR_ALL || int'(addr) == n) begin
          case (cmd)
            DAC_CMD_WRITE:        exp_in[n] = code;
            DAC_CMD_UPDATE:       exp_dac[n] = exp_in[n];
            DAC_CMD_WRITE_UPDATE: begin exp_in[n] = code; exp_dac[n] = code; end
            DAC_CMD_POWER_DOWN:   exp_dac[n] = 12'h000;
            default: ;
          endcase
        end
      end
      @(negedge clk) start = 1'b1;
      @(posedge clk);
      cycles = 1;
      @(negedge clk) start = 1'b0;
      while (!done) begin
        @(posedge clk);
        cycles++;
        @(negedge clk);
      end
      check(cycles == 65 * int'(SCK_HALF) + 1, $sformatf("word %0d took %0d clocks", i, cycles));
      #1;
      check(last_bits == 32, $sformatf("%0d SCK edges", last_bits));
      check(words == i + 1, "one chip-select window per word");
      check(last_word == {8'h00, cmd, addr, code, 4'h0},
            $sformatf("word %h, expected %h", last_word, {8'h00, cmd, addr, code, 4'h0}));
      check(!busy24 && last_bits24 == 24 && words24 == i + 1, "24-bit word framing");
      check(last_word24[23:0] == {cmd, addr, code, 4'h0}, "24-bit word contents");
      for (int n = 0; n < 4; n++)
        check(dac_code24[n] == exp_dac[n], $sformatf("24-bit DAC %0d code", n));
      for (int n = 0; n < 4; n++)
        check(dac_code[n] == exp_dac[n],
              $sformatf("word %0d DAC %0d code %h, expected %h", i, n, dac_code[n], exp_dac[n]));
      check((vout[0] - real'(exp_dac[0]) * 3.3 / 4096.0) < 1e-9 &&
            (real'(exp_dac[0]) * 3.3 / 4096.0 - vout[0]) < 1e-9, "VOUT A");
      repeat ($urandom_range(4, 0)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
