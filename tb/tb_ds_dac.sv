// End-to-end test of the complete converter at its real sizes and rates:
// 18-bit PCM at 44.1 kHz in, analog voltage out of the RC low-pass model
// (vref = 1.8 V). Phases:
//  1. DC inputs: the filtered output settles to (1.25*u/2^14 + 8)/15 * vref
//     (within 2 mV), the DC transfer of modulator, encoders and DAC.
//  2. 1 kHz sine at half scale for 10 ms: the output tone is 5 levels,
//     i.e. 0.6 V (within 2 %), and 2nd/3rd harmonics are 70 dB down.
//  3. Overload: a full-scale input drives the modulator into clipping
//     (q_sat); a reset brings the converter back to a clean mid-scale
//     output.
// Each mechanism is counted: sample requests, interpolator output
// phases, DWA pointer wraps, quantizer clipping, and recovery by reset;
// one that never happened counts as a failure. Every element-select word
// is also checked to hold level+8 ones.
module tb_ds_dac;
  import dsdac_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t pcm_in;
  logic pcm_req, q_sat, dwa_wrap;
  level_t level;
  elem_t dac_sel;
  logic [3:0] dwa_ptr;
  real vref = 1.8, v_dac, vout;
  int checks = 0, failures = 0;
  int n_req = 0, n_wrap = 0, n_clip = 0, n_s1 = 0, n_s2 = 0, n_recover = 0;
  localparam real PI = 3.14159265358979;

  ds_dac dut (.clk, .rst_n, .pcm_in, .pcm_req, .vref, .level, .dac_sel, .dwa_ptr,
              .q_sat, .dwa_wrap, .v_dac, .vout);

  always #177.154 clk = ~clk;    // 2.8224 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  mode = 0;     // 0 DC, 1 sine
  real dc = 0.0;
  int  n_in = 0;
  always @(negedge clk) begin
    if (pcm_req) begin
      pcm_in = (mode == 1) ? sample_t'($rtoi(65536.0 * $sin(2.0 * PI * 1000.0 * n_in / 44100.0)))
                           : sample_t'($rtoi(dc));
      n_in++;
    end
  end

  level_t level_d;
  logic   sel_valid = 0;
  always @(posedge clk) begin
    if (pcm_req) n_req++;
    if (dwa_wrap) n_wrap++;
    if (q_sat) n_clip++;
    if (dut.u_dig.u_interp.u_x2.out_valid) n_s1++;
    if (dut.u_dig.u_interp.u_x4.out_valid) n_s2++;
    if (sel_valid && rst_n) begin
      checks++;
      if ($countones(dac_sel) != int'(level_d) + 8) failures++;
    end
    level_d   <= level;
    sel_valid <= rst_n && dut.u_dig.mod_en;
  end

  task automatic avg_out(input int n, output real m);
    real s;
    s = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      s += vout;
    end
    m = s / n;
  endtask

  task automatic tone(input real f, output real amp);
    real c, s;
    c = 0.0; s = 0.0;
    for (int i = 0; i < 28224; i++) begin
      @(posedge clk); #1;
      c += vout * $cos(2.0 * PI * f * i / 2.8224e6);
      s += vout * $sin(2.0 * PI * f * i / 2.8224e6);
    end
    amp = 2.0 * $sqrt(c * c + s * s) / 28224.0;
  endtask

  initial begin
    real m, e, a1, a2, a3;
    pcm_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 1. DC
    for (int t = 0; t < 3; t++) begin
      dc = (t == 0) ? 0.0 : (t == 1) ? 60000.0 : -30000.0;
      repeat (64 * 40) @(posedge clk);
      avg_out(64 * 256, m);
      e = (1.25 * $rtoi(dc) / 16384.0 + 8.0) / 15.0 * vref;
      $display("DC %0.0f: vout %f V, expected %f V", dc, m, e);
      checks++;
      if (m - e > 0.002 || e - m > 0.002) failures++;
    end
    // 2. sine
    mode = 1;
    repeat (64 * 100) @(posedge clk);
    tone(1000.0, a1);
    tone(2000.0, a2);
    tone(3000.0, a3);
    $display("1 kHz: %f V peak; 2nd %e V, 3rd %e V", a1, a2, a3);
    checks++;
    if (a1 < 0.98 * 0.6 || a1 > 1.02 * 0.6) failures++;
    checks++;
    if (a2 > a1 * 3.2e-4 || a3 > a1 * 3.2e-4) failures++;
    // 3. overload and recovery
    mode = 0; dc = 131071.0;
    repeat (64 * 60) @(posedge clk);
    checks++;
    if (n_clip == 0) failures++;
    dc = 0.0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (64 * 60) @(posedge clk);
    avg_out(64 * 256, m);
    e = 8.0 / 15.0 * vref;
    checks++;
    if (m - e > 0.002 || e - m > 0.002 || q_sat) failures++;
    else n_recover++;
    $display("sample requests %0d, 2x outputs %0d, 4x outputs %0d, DWA wraps %0d, clip cycles %0d, recoveries %0d",
             n_req, n_s1, n_s2, n_wrap, n_clip, n_recover);
    checks++;
    if (n_req == 0 || n_s1 == 0 || n_s2 == 0 || n_wrap == 0 || n_clip == 0 || n_recover == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
