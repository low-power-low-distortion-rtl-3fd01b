// Behavioural model (not synthesizable) of the analog part of the audio
// delta-sigma DAC: the 15-level direct-charge-transfer switched-capacitor
// DAC followed by the first-order RC low-pass at 496 kHz.
//
// This is the part built as a separate chip in the reference design; its
// ports follow that chip's signal pins: 15 element inputs Vin1..Vin15
// (vin[0]..vin[14]), the system clock, the reference and the analog
// output. Bias inputs and supplies have no counterpart in the model.
// Clock high is the sampling phase, clock low the charge-transfer phase;
// v_dac is the held DAC output, vout the filtered one (updated at rising
// clock edges). CAP_ERR_PCT spreads the unit capacitors for mismatch
// studies; ideal opamp and switches.
module ds_dac_analog #(
  parameter int unsigned N           = 15,
  parameter real         CAP_ERR_PCT = 0.0,
  parameter real         FC_HZ       = 496.0e3,
  parameter real         TS          = 1.0 / 2.8224e6
) (
  input  logic         vclk,
  input  logic [N-1:0] vin,
  input  real          vref,
  output real          v_dac,
  output real          vout
);
  dct_sc_dac #(.N(N), .CAP_ERR_PCT(CAP_ERR_PCT)) u_scdac (
    .clk(vclk), .d(vin), .vref, .vout(v_dac)
  );

  rc_lpf #(.FC_HZ(FC_HZ), .TS(TS)) u_lpf (
    .clk(vclk), .vin(v_dac), .vout
  );
endmodule
