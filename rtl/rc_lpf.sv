// Behavioural model (not synthesizable) of the first-order RC low-pass
// that follows the switched-capacitor DAC.
//
// The filter H(s) = 1/(1 + s/(2 pi FC_HZ)) removes the clock and most of
// the out-of-band quantization noise; the published cutoff is 496 kHz.
// Its input is a staircase held for one clock period TS, so the output at
// the clock edges follows exactly
//   y[n+1] = y[n] + (1 - exp(-2 pi FC_HZ TS)) * (x[n] - y[n]),
// which the model evaluates at every rising clock edge. Values between
// edges are not modelled.
module rc_lpf #(
  parameter real FC_HZ = 496.0e3,
  parameter real TS    = 1.0 / 2.8224e6
) (
  input  logic clk,
  input  real  vin,
  output real  vout
);
  localparam real PI = 3.14159265358979;
  real alpha;

  initial begin
    alpha = 1.0 - $exp(-2.0 * PI * FC_HZ * TS);
    vout  = 0.0;
  end

  always @(posedge clk) vout <= vout + alpha * (vin - vout);
endmodule
