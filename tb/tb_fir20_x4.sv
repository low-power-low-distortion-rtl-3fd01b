// Self-checking test of the 4-fold, 20-tap polyphase interpolation FIR
// (timing, coefficients against the windowed-sinc formula, and bit-exact
// outputs against a direct convolution); see fir_tb_body.svh.
module tb_fir20_x4;
  import dsdac_pkg::*;
  localparam int TAPS = 20, L = 4, PERIOD = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;

  fir20_x4 #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

`include "fir_tb_body.svh"
endmodule
