// Workload test: 1 kHz sine inputs of several levels (18-bit PCM at
// 44.1 kHz) through the complete converter, as in an SNDR-versus-level
// measurement. For each level the modulator output (15 levels, 2.8224 MHz)
// is recorded for 20 ms after a 5 ms settle, Hann-windowed, and its
// spectrum computed bin by bin from 50 Hz to 20 kHz. SNDR is the 1 kHz
// power over all other in-band power.
// The in-band floor seen this way is near -107 dBFS (shaped quantization
// noise plus window leakage), so SNDR is about level + 107 dB: roughly
// 47, 68, 86, 101 and 103 dB for -60, -40, -20, -6 and -4.4 dBFS.
// Checks: SNDR above the bounds below, no quantizer clipping at these
// levels, and the dynamic range estimated as SNDR(-60 dBFS) + 60 at
// least 92 dB (the design's simulated target).
module tb_workload_sndr;
  import dsdac_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t pcm_in;
  logic pcm_req, q_sat, dwa_wrap;
  level_t level;
  elem_t dac_sel;
  logic [3:0] dwa_ptr;
  real vref = 1.8, v_dac, vout;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam int NS = 56448;          // 20 ms at 2.8224 MHz
  real amp_fs = 0.0;
  int n_in = 0, n_clip = 0;
  always @(posedge clk) if (rst_n && q_sat) n_clip++;
  real rec [NS];

  ds_dac dut (.clk, .rst_n, .pcm_in, .pcm_req, .vref, .level, .dac_sel, .dwa_ptr,
              .q_sat, .dwa_wrap, .v_dac, .vout);

  always #177.154 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (pcm_req) begin
      pcm_in = sample_t'($rtoi(amp_fs * 131071.0 * $sin(2.0 * PI * 1000.0 * n_in / 44100.0)));
      n_in++;
    end

  function automatic real sndr_db();
    real ps, pn, c, s, w, p;
    ps = 0.0; pn = 0.0;
    for (int k = 1; k <= 400; k++) begin    // 50 Hz bins up to 20 kHz
      c = 0.0; s = 0.0;
      for (int i = 0; i < NS; i++) begin
        w = 0.5 - 0.5 * $cos(2.0 * PI * i / NS);
        c += w * rec[i] * $cos(2.0 * PI * k * i / NS);
        s += w * rec[i] * $sin(2.0 * PI * k * i / NS);
      end
      p = c * c + s * s;
      if (k >= 19 && k <= 21) ps += p;       // 1 kHz is bin 20
      else pn += p;
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real db [5] = '{-60.0, -40.0, -20.0, -6.0, -4.4};
    real lo [5] = '{ 40.0,  60.0,  80.0, 90.0,  90.0};
    real r, r60;
    pcm_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      amp_fs = 10.0 ** (db[t] / 20.0);
      repeat (14112) @(posedge clk);
      for (int i = 0; i < NS; i++) begin
        @(posedge clk); #1;
        rec[i] = real'(level);
      end
      r = sndr_db();
      if (t == 0) r60 = r;
      $display("input %0.1f dBFS: SNDR %0.1f dB, clipped cycles %0d", db[t], r, n_clip);
      checks++;
      if (r < lo[t] || n_clip != 0) failures++;
    end
    $display("dynamic range estimate %0.1f dB", r60 + 60.0);
    checks++;
    if (r60 + 60.0 < 92.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
