// Self-checking test of the digital part (interpolator, modulator,
// thermometer encoder, DWA) at its real rates and sizes.
//  - pcm_req comes exactly every 64 clocks.
//  - Every element-select word has level+8 ones, one clock after level.
//  - DWA: per-element use counts never spread by more than one.
//  - DC inputs: the mean level equals 1.25*u/2^14 within 0.01.
//  - 1 kHz sine at half scale: level carries a 5.0-level tone (within 2 %)
//    and its 2nd and 3rd harmonics are at least 80 dB down.
module tb_ds_dac_digital;
  import dsdac_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t pcm_in;
  logic pcm_req, q_sat, dwa_wrap;
  level_t level;
  elem_t dac_sel;
  logic [3:0] dwa_ptr;
  int checks = 0, failures = 0;
  int n_req = 0, n_wrap = 0;
  localparam real PI = 3.14159265358979;

  ds_dac_digital dut (.clk, .rst_n, .pcm_in, .pcm_req, .level, .dac_sel, .dwa_ptr,
                      .q_sat, .dwa_wrap);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  bit  sine_mode = 0;
  real dc = 0.0;
  int  n_in = 0;
  always @(negedge clk) begin
    if (pcm_req) begin
      pcm_in = sine_mode ? sample_t'($rtoi(65536.0 * $sin(2.0 * PI * 1000.0 * n_in / 44100.0)))
                         : sample_t'($rtoi(dc));
      n_in++;
    end
  end

  // continuous monitors
  int last_req = -1, cyc = 0;
  int use_cnt [N_ELEM];
  level_t level_d;
  logic   running = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      int mx, mn;
      cyc <= cyc + 1;
      if (pcm_req) begin
        n_req++;
        if (last_req >= 0) begin
          checks++;
          if (cyc - last_req != 64) failures++;
        end
        last_req = cyc;
      end
      if (dwa_wrap) n_wrap++;
      if (running) begin
        checks++;
        if ($countones(dac_sel) != int'(level_d) + 8) begin
          failures++;
          if (failures < 10) $display("sel %b for level %0d", dac_sel, level_d);
        end
        for (int i = 0; i < N_ELEM; i++) use_cnt[i] += int'(dac_sel[i]);
        mx = use_cnt[0]; mn = use_cnt[0];
        for (int i = 1; i < N_ELEM; i++) begin
          if (use_cnt[i] > mx) mx = use_cnt[i];
          if (use_cnt[i] < mn) mn = use_cnt[i];
        end
        checks++;
        if (mx - mn > 1) failures++;
      end
      level_d <= level;
      if (dut.mod_en) running <= 1'b1;
    end
  end

  task automatic tone(input real f, output real amp);
    real c = 0.0, s = 0.0;
    for (int i = 0; i < 28224; i++) begin
      @(posedge clk); #1;
      c += real'(level) * $cos(2.0 * PI * f * i / 2.8224e6);
      s += real'(level) * $sin(2.0 * PI * f * i / 2.8224e6);
    end
    amp = 2.0 * $sqrt(c * c + s * s) / 28224.0;
  endtask

  initial begin
    real a1, a2, a3;
    pcm_in = '0;
    for (int i = 0; i < N_ELEM; i++) use_cnt[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      real sum, expm;
      sum = 0.0;
      dc = (t == 0) ? 20000.0 : (t == 1) ? -45000.0 : (t == 2) ? 700.0 : 0.0;
      repeat (64 * 50) @(posedge clk);
      for (int i = 0; i < 16384; i++) begin
        @(posedge clk); #1;
        sum += real'(level);
      end
      expm = 1.25 * $rtoi(dc) / 16384.0;
      checks++;
      if (sum / 16384.0 - expm > 0.01 || expm - sum / 16384.0 > 0.01) begin
        failures++;
        $display("DC %f: mean level %f expected %f", dc, sum / 16384.0, expm);
      end
    end
    sine_mode = 1;
    repeat (64 * 100) @(posedge clk);
    tone(1000.0, a1);
    // same 10 ms window length for the harmonics, on later periods
    tone(2000.0, a2);
    tone(3000.0, a3);
    $display("1 kHz %f levels, 2nd %f, 3rd %f", a1, a2, a3);
    checks++;
    if (a1 < 4.9 || a1 > 5.1) failures++;
    checks++;
    if (a2 > a1 * 1e-4 || a3 > a1 * 1e-4) failures++;
    $display("sample requests %0d, DWA pointer wraps %0d", n_req, n_wrap);
    checks++;
    if (n_wrap == 0 || n_req == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
