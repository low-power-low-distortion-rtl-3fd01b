// 64x interpolation filter: 44.1 kHz -> 88.2 kHz -> 352.8 kHz -> 2.8224 MHz.
//
// Three cascaded stages: a 2-fold 48-tap polyphase FIR, a 4-fold 20-tap
// polyphase FIR and an 8-fold zero-order hold. Both FIRs cut off at half
// the input sample rate, removing the images of the baseband; the hold
// adds a sinc response whose in-band droop is left uncompensated. All
// stages run from the 2.8224 MHz clock and are timed by their input
// strobes: in_valid must come every 64 clocks; stage 1 emits a sample
// every 32 clocks, stage 2 every 8, and the hold presents a new value
// every clock (out_valid stays high once running). Word length is 18 bits
// throughout. Stage structure, ratios and tap counts are the published
// design; coefficient values and the strobe timing are this
// implementation's.
module interp_filter
  import dsdac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);
  logic    s1_valid, s2_valid;
  sample_t s1_data, s2_data;
  logic [2:0] rep;

  fir48_x2 #(.PERIOD(32)) u_x2 (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(s1_valid), .out_data(s1_data)
  );

  fir20_x4 #(.PERIOD(8)) u_x4 (
    .clk, .rst_n, .in_valid(s1_valid), .in_data(s1_data),
    .out_valid(s2_valid), .out_data(s2_data)
  );

  sinc_zoh #(.R(8)) u_zoh (
    .clk, .rst_n, .in_valid(s2_valid), .in_data(s2_data),
    .out_valid, .out_data, .rep
  );
endmodule
