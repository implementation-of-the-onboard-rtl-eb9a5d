// Behavioural model of the LTC2624 quad 12-bit DAC, for simulation only
// (not synthesizable: real-valued analog outputs).
//
// While CS/LD is low, SDI is shifted into a 32-bit register on each rising
// SCK edge. The rising edge of CS/LD ends the word; after 24 or 32 bits the
// low 24 bits are decoded as command (4), address (4), code (12) and four
// don't-care bits. Commands 0000 (write input register), 0001 (update DAC
// register), 0011 (write and update) and 0100 (power down) act on the
// addressed channel (0-3) or on all four (1111). Power-on sets every channel
// to midscale 0x800; CLR low sets every channel to zero. Output:
// VOUT = code / 4096 * VREF, with VREF 3.3 V for A and B and 2.5 V for C, D.
module ltc2624_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        sdi,
  input  logic        clr_n,
  output logic [11:0] dac_code [4],
  output real         vout [4],
  output logic [31:0] last_word,
  output int          last_bits,
  output int          words
);

  logic [31:0] sr;
  logic [11:0] in_reg [4];
  int          bits;

  task automatic apply(input logic [3:0] cmd, input logic [3:0] addr, input logic [11:0] data);
    for (int n = 0; n < 4; n++) begin
      if (addr == 4'hF || addr == 4'(n)) begin
        case (cmd)
          4'b0000: in_reg[n] = data;
          4'b0001: dac_code[n] = in_reg[n];
          4'b0011: begin in_reg[n] = data; dac_code[n] = data; end
          4'b0100: dac_code[n] = 12'h000;
          default: ;
        endcase
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 4; n++) begin
      in_reg[n]   = 12'h800;
      dac_code[n] = 12'h800;
    end
    sr        = '0;
    bits      = 0;
    last_word = '0;
    last_bits = 0;
    words     = 0;
  end

  always @(negedge cs_n) bits = 0;
  always @(posedge sck) if (!cs_n) begin
    sr   = {sr[30:0], sdi};
    bits = bits + 1;
  end
  always @(posedge cs_n) begin
    last_word = sr;
    last_bits = bits;
    words     = words + 1;
    if (bits == 24 || bits == 32) apply(sr[23:20], sr[19:16], sr[15:4]);
  end
  always @(negedge clr_n) for (int n = 0; n < 4; n++) begin
    in_reg[n]   = 12'h000;
    dac_code[n] = 12'h000;
  end

  always_comb begin
    vout[0] = real'(dac_code[0]) / 4096.0 * 3.3;
    vout[1] = real'(dac_code[1]) / 4096.0 * 3.3;
    vout[2] = real'(dac_code[2]) / 4096.0 * 2.5;
    vout[3] = real'(dac_code[3]) / 4096.0 * 2.5;
  end

endmodule
