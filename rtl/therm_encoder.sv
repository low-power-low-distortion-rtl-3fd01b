// Binary-to-thermometer encoder for the 15-element DAC.
//
// The modulator's 4-bit signed level (-8..+7) becomes a 15-bit word with
// level+8 ones packed from bit 0: +7 selects all 15 unit capacitors, 0
// selects 8, -7 selects one, -8 none. The mapping is the published
// encoder table. Purely combinational.
module therm_encoder
  import dsdac_pkg::*;
(
  input  level_t level,
  output elem_t  thermo
);
  logic [4:0] ones;
  always_comb begin
    ones = 5'(signed'(level) + 5'sd8);
    for (int i = 0; i < N_ELEM; i++) thermo[i] = (5'(i) < ones);
  end
endmodule
