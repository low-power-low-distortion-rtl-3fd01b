// Sinc (zero-order-hold) interpolator, R-fold.
//
// The last stage of the 64x interpolation: each input sample is loaded
// into a hold register and repeated R times at the output rate, which is
// an R-tap boxcar (sinc response) interpolation filter with no arithmetic.
// out_valid is high for the R clocks that follow each in_valid, with rep
// counting the repeat 0..R-1; out_data keeps the last sample afterwards.
// Inputs are expected every R clocks, which keeps out_valid high in
// steady state. R = 8 and the plain hold register are the published
// design; the repeat counter and strobe are this implementation's framing.
module sinc_zoh
  import dsdac_pkg::*;
#(
  parameter int unsigned R = 8,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sample_t       in_data,
  output logic          out_valid,
  output sample_t       out_data,
  output logic [RW-1:0] rep
);
  logic [RW-1:0] left;   // repeats still to come after the current one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data <= '0; out_valid <= 1'b0; rep <= '0; left <= '0;
    end else if (in_valid) begin
      out_data  <= in_data;
      out_valid <= 1'b1;
      rep       <= '0;
      left      <= RW'(R - 1);
    end else if (out_valid) begin
      if (left == '0) begin
        out_valid <= 1'b0;
      end else begin
        left <= left - 1'b1;
        rep  <= rep + 1'b1;
      end
    end
  end
endmodule
