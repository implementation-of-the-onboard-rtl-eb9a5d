// Behavioural model of the LTC1407A-1 dual 14-bit ADC, for simulation only
// (not synthesizable: real-valued analog inputs).
//
// A rising edge on CONV samples both inputs at once and starts a conversion;
// the results shifted out after that edge are those of the previous
// conversion (one sample of latency). Conversion: D = round((VIN - 1.65) /
// 1.25 * 8192), clipped to the 14-bit two's-complement range, with the
// negative inputs at the 1.65 V reference. Serial output: counting the SCK
// cycles after CONV from 0, SDO is released (modelled as 1) for cycles 0-1,
// gives channel 0 MSB first in cycles 2-15, is released for 16-17, gives
// channel 1 in 18-31 and is released from cycle 32 on. SDO changes after each
// falling SCK edge. `sck_count` counts the rising edges since the last CONV.
module ltc1407a_model (
  input  logic        conv,
  input  logic        sck,
  output logic        sdo,
  input  real         vin_a,
  input  real         vin_b,
  output logic [13:0] pending_a,
  output logic [13:0] pending_b,
  output int          sck_count,
  output int          conversions
);

  localparam real VMID   = 1.65;
  localparam real VRANGE = 1.25;

  logic [13:0] out_a, out_b;
  int          cyc;

  function automatic logic [13:0] convert(input real v);
    real x;
    int  d;
    x = (v - VMID) / VRANGE * 8192.0;
    if (x > 8191.0)  x = 8191.0;
    if (x < -8192.0) x = -8192.0;
    d = int'(x);
    return d[13:0];
  endfunction

  function automatic logic bit_at(input int c);
    if (c >= 2 && c <= 15)  return out_a[15 - c];
    if (c >= 18 && c <= 31) return out_b[31 - c];
    return 1'b1;
  endfunction

  initial begin
    out_a       = '0;
    out_b       = '0;
    pending_a   = '0;
    pending_b   = '0;
    cyc         = 40;
    sdo         = 1'b1;
    sck_count   = 0;
    conversions = 0;
  end

  always @(posedge conv) begin
    out_a       = pending_a;
    out_b       = pending_b;
    pending_a   = convert(vin_a);
    pending_b   = convert(vin_b);
    cyc         = 0;
    sck_count   = 0;
    conversions = conversions + 1;
    sdo         = bit_at(0);
  end

  always @(posedge sck) sck_count = sck_count + 1;

  always @(negedge sck) begin
    if (cyc < 40) cyc = cyc + 1;
    sdo = bit_at(cyc);
  end

endmodule
