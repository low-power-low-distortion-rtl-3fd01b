// Third-order CRFB (cascade of resonators, feedback) digital delta-sigma
// modulator with a 15-level quantizer, running at 2.8224 MHz.
//
// Loop (u input, v quantized feedback, all multipliers are shift-adds):
//   x1[n+1] = x1[n] + b1*u[n] - v[n]              integrator 1, delaying
//   x2[n]   = x2[n-1] + a1*x1[n] - g1*x3[n] - v[n] integrator 2, no delay
//   x3[n+1] = x3[n] + a2*x2[n] - v[n]             integrator 3, delaying
//   v[n]    = Q(x3[n])
// with b1 = 1+2^-2, a1 = 2^-1+2^-4, a2 = 2^-1+2^-2, g1 = 2^-10+2^-11.
// This gives STF = a1 a2 b1 z^-2 / D(z) and
// NTF = (1-z^-1)(1-(2-g1 a2)z^-1+z^-2) / D(z), i.e. one noise zero at DC
// and a resonator pair near 15 kHz, with
// D(z) = 1+(g1 a2-2+a2)z^-1+(1-g1 a2+a1 a2-a2)z^-2. The DC signal gain is b1.
//
// Quantizer: the four most significant bits of the 18-bit integer part of
// x3 (floor, step 2^14), clipped to -7..+7. v is that level times 2^14.
// States carry FRAC fraction bits (so the shifts lose nothing) and GUARD
// extra integer bits, and saturate instead of wrapping.
// Interface: when en is high the loop steps once and level/sat are
// registered (one clock latency from u). For sine inputs the loop is
// stable up to about 0.6 of full scale (the signal path gains 1.25).
// Coefficients, order, quantizer and 18-bit word are published values;
// the loop wiring was derived from the published transfer functions, and
// FRAC, GUARD, clipping and saturation are this implementation's choices.
module crfb_mod
  import dsdac_pkg::*;
#(
  parameter int unsigned FRAC  = 12,
  parameter int unsigned GUARD = 6,
  localparam int unsigned SW   = W + GUARD + FRAC   // state width
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t u,
  output level_t  level,
  output logic    sat
);
  typedef logic signed [SW-1:0] state_t;

  state_t x1, x2, x3;
  state_t uu, v, b1u, a1x1, g1x3, a2x2, x1_n, x2_n, x3_n;
  logic signed [W+GUARD-1:0] w_int;
  logic signed [GUARD+3:0]   q_raw;    // x3 in quantizer steps
  level_t q;
  logic   q_clip;

  // saturating add of up to three terms (inputs are far below full range)
  function automatic state_t sadd(input state_t a, input state_t b, input state_t c);
    localparam logic signed [SW+1:0] SMAX = (SW+2)'(2) ** (SW - 1) - 1;
    logic signed [SW+1:0] s;
    s = (SW+2)'(a) + (SW+2)'(b) + (SW+2)'(c);
    if (s > SMAX)       return state_t'(SMAX);
    else if (s < -SMAX) return state_t'(-SMAX);
    else                return state_t'(s);
  endfunction

  always_comb begin
    // quantizer: floor(x3 / 2^(W-4+FRAC)), clipped to +-QMAX
    w_int  = (W+GUARD)'(x3 >>> FRAC);
    q_raw  = (GUARD+4)'(w_int >>> (W - 4));
    q_clip = (q_raw > (GUARD+4)'(QMAX)) || (q_raw < -(GUARD+4)'(QMAX));
    if (q_raw > (GUARD+4)'(QMAX))       q = level_t'(QMAX);
    else if (q_raw < -(GUARD+4)'(QMAX)) q = level_t'(-QMAX);
    else                    q = level_t'(q_raw);
    v    = state_t'(q) <<< (W - 4 + FRAC);
    uu   = state_t'(u) <<< FRAC;
    b1u  = uu + (uu >>> 2);
    a1x1 = (x1 >>> 1) + (x1 >>> 4);
    g1x3 = (x3 >>> 10) + (x3 >>> 11);
    x1_n = sadd(x1, b1u, -v);
    x2_n = sadd(x2, a1x1 - g1x3, -v);
    a2x2 = (x2_n >>> 1) + (x2_n >>> 2);
    x3_n = sadd(x3, a2x2, -v);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0; level <= '0; sat <= 1'b0;
    end else if (en) begin
      x1 <= x1_n; x2 <= x2_n; x3 <= x3_n;
      level <= q;
      sat   <= q_clip;
    end
  end

  a_level_range: assert property (@(posedge clk) disable iff (!rst_n)
    (level <= level_t'(QMAX)) && (level >= level_t'(-QMAX)));
endmodule
