// Audio delta-sigma DAC: 18-bit PCM at 44.1 kHz in, analog voltage out.
//
// The digital part (ds_dac_digital) interpolates the PCM stream by 64,
// noise-shapes it to 15 levels in a third-order modulator and spreads
// each level over 15 unit elements by data weighted averaging. The 15
// element selections drive the analog part (ds_dac_analog): a
// direct-charge-transfer switched-capacitor DAC followed by a first-order
// RC low-pass at 496 kHz. The analog blocks are behavioural real-valued
// models, so this top simulates but only ds_dac_digital synthesizes.
// Interface: clk is the 2.8224 MHz main clock (high half = DAC sampling
// phase); pcm_in is taken when pcm_req is high (every 64 clocks); vref
// sets the DAC full scale: the element count k gives k/15 * vref, and
// level 0 (8 elements) sits at 8/15 * vref.
module ds_dac
  import dsdac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t pcm_in,
  output logic    pcm_req,
  input  real     vref,
  output level_t  level,
  output elem_t   dac_sel,
  output logic    q_sat,
  output logic [3:0] dwa_ptr,
  output logic    dwa_wrap,
  output real     v_dac,
  output real     vout
);
  ds_dac_digital u_dig (
    .clk, .rst_n, .pcm_in, .pcm_req, .level, .dac_sel, .dwa_ptr, .q_sat, .dwa_wrap
  );

  ds_dac_analog #(.N(N_ELEM), .FC_HZ(496.0e3), .TS(1.0 / 2.8224e6)) u_ana (
    .vclk(clk), .vin(dac_sel), .vref, .v_dac, .vout
  );
endmodule
