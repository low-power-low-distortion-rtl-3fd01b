// Digital part of the audio delta-sigma DAC, clocked at 2.8224 MHz.
//
// Chain: 44.1 kHz sample request -> 64x interpolation filter (2x FIR,
// 4x FIR, 8x hold) -> third-order CRFB modulator (15 levels) ->
// thermometer encoder -> DWA selector -> 15 element-select outputs.
// pcm_req pulses once every OSR = 64 clocks; pcm_in is taken in that
// cycle, so the converter is the timing master of its source. The
// modulator steps on every clock that the interpolator presents a sample
// and is idle (holding its state) before the first one. The DWA selector
// steps together with the modulator, one clock later.
// Latency from pcm_req to the first effect on level is about 140 clocks,
// dominated by the two FIR stages (group delays not included).
// The chain, rates and word lengths are the published design; the request
// strobe and the enable wiring are this implementation's.
module ds_dac_digital
  import dsdac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t pcm_in,
  output logic    pcm_req,
  output level_t  level,
  output elem_t   dac_sel,
  output logic [3:0] dwa_ptr,
  output logic    q_sat,
  output logic    dwa_wrap
);
  logic [$clog2(OSR)-1:0] div;
  logic    up_valid, mod_en;
  sample_t up_data;
  elem_t   thermo;

  // 44.1 kHz sample request from the 2.8224 MHz clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div + 1'b1;
  end
  assign pcm_req = (div == '0);

  interp_filter u_interp (
    .clk, .rst_n, .in_valid(pcm_req), .in_data(pcm_in),
    .out_valid(up_valid), .out_data(up_data)
  );

  crfb_mod u_mod (
    .clk, .rst_n, .en(up_valid), .u(up_data), .level, .sat(q_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mod_en <= 1'b0;
    else        mod_en <= up_valid;
  end

  therm_encoder u_therm (.level, .thermo);

  dwa_encoder #(.N(N_ELEM)) u_dwa (
    .clk, .rst_n, .en(mod_en), .thermo, .sel(dac_sel), .ptr(dwa_ptr), .wrap(dwa_wrap)
  );
endmodule
