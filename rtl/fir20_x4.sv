// 4-fold interpolation FIR, 20 taps, 88.2 kHz to 352.8 kHz.
//
// A polyphase_fir engine (4 branches of 5 taps, one MAC) with its
// coefficient ROM. The impulse response is a Kaiser-windowed sinc,
//   h[n] = L * (2 fc) sinc(2 fc (n - (TAPS-1)/2)) * kaiser(n, beta = 4.55),
// fc = 1/(2L) of the output rate (cutoff at half the input rate), with
// h[] normalised to a DC gain of L so every branch has unity DC gain, then
// rounded to 18-bit signed with 16 fraction bits. The response is
// symmetric, so the ROM holds the first half and mirrors the address.
// The tap count, rate, cutoff and 18-bit word lengths are the published
// values; the coefficient values themselves (window and beta) are this
// implementation's, since the original set is not available.
//
// Interface and timing are those of polyphase_fir: in_valid every
// 32 clocks, 4 outputs 8 clocks apart, the first 7
// clocks after in_valid.
module fir20_x4
  import dsdac_pkg::*;
#(
  parameter int unsigned PERIOD = 8,
  localparam int unsigned TAPS   = 20,
  localparam int unsigned L      = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);
  localparam int unsigned AW = $clog2(TAPS);
  localparam int unsigned HW = $clog2(TAPS / 2);

  // first half of the symmetric response, h[0] .. h[TAPS/2-1]
  localparam logic signed [CW-1:0] HALF [10] = '{
    445, 481, -966, -4126, -6780, -4429, 6909, 26852,
    49005, 63680
  };

  logic [AW-1:0]        coef_addr;
  logic signed [CW-1:0] coef_data;

  // coefficient ROM: h[a] = h[TAPS-1-a]
  always_comb begin
    if (coef_addr < AW'(TAPS / 2)) coef_data = HALF[HW'(coef_addr)];
    else                           coef_data = HALF[HW'(AW'(TAPS - 1) - coef_addr)];
  end

  polyphase_fir #(
    .TAPS(TAPS), .L(L), .PERIOD(PERIOD), .W(W), .CW(CW), .CFRAC(CFRAC)
  ) u_fir (
    .clk, .rst_n, .in_valid, .in_data,
    .coef_addr, .coef_data,
    .out_valid, .out_data
  );

endmodule
