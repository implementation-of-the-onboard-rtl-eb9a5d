// Behavioural model of the LTC6912-1 dual programmable-gain amplifier, for
// simulation only (not synthesizable: real-valued analog ports).
//
// SPI side: while CS/LD is low, DATA is shifted into an 8-bit register on
// each rising CLK edge; DOUT shows the register's MSB and moves on falling
// edges, so the previous word is echoed out as the new one goes in. The
// rising edge of CS/LD latches the register: lower nibble = channel A gain
// code, upper nibble = channel B. SHDN high forces both gains to zero.
// Analog side: each channel is an inverting amplifier around the 1.65 V
// mid-supply reference, OUT = 1.65 + G*(IN - 1.65), clipped to 0..3.3 V.
// Gain codes 0..7 mean 0, -1, -2, -5, -10, -20, -50, -100 V/V; others 0.
module ltc6912_model (
  input  logic       shdn,
  input  logic       cs_n,
  input  logic       din,
  input  logic       clk,
  output logic       dout,
  input  real        vina,
  input  real        vinb,
  output real        vouta,
  output real        voutb,
  output logic [7:0] latched,
  output int         words
);

  localparam real VMID = 1.65;
  localparam real VCC  = 3.3;

  logic [7:0] sr;

  function automatic real gain_of(input logic [3:0] code);
    case (code)
      4'd1:    return -1.0;
      4'd2:    return -2.0;
      4'd3:    return -5.0;
      4'd4:    return -10.0;
      4'd5:    return -20.0;
      4'd6:    return -50.0;
      4'd7:    return -100.0;
      default: return 0.0;
    endcase
  endfunction

  function automatic real amp(input real vin, input logic [3:0] code);
    real v;
    v = VMID + gain_of(code) * (vin - VMID);
    if (v < 0.0) v = 0.0;
    if (v > VCC) v = VCC;
    return v;
  endfunction

  initial begin
    sr      = 8'h00;
    latched = 8'h00;
    dout    = 1'b0;
    words   = 0;
  end

  always @(negedge cs_n) dout = sr[7];
  always @(posedge clk) if (!cs_n) sr = {sr[6:0], din};
  always @(negedge clk) if (!cs_n) dout = sr[7];
  always @(posedge cs_n) begin
    latched = sr;
    words   = words + 1;
  end
  always @(posedge shdn) latched = 8'h00;

  always_comb begin
    vouta = amp(vina, latched[3:0]);
    voutb = amp(vinb, latched[7:4]);
  end

endmodule
