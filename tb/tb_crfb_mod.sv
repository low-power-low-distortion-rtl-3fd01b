// Self-checking test of the third-order CRFB modulator.
//  - Bit-exact comparison with a reference model of the loop written here
//    in 64-bit integer arithmetic (states scaled by 2^12, unit feedback of
//    v into each integrator, b1 = 1.25, a1 = 0.5625, a2 = 0.75,
//    g1 = 2^-10+2^-11, floor quantizer on bits 17:14 clipped to +-7).
//  - DC inputs: the mean output level must equal b1*u/2^14 (the DC signal
//    gain of the published STF) to within 0.01 level.
//  - Overload: a DC input beyond the stable range must raise sat; after a
//    reset the loop must run cleanly again (it has no overload recovery
//    of its own).
//  - en low freezes the output.
module tb_crfb_mod;
  import dsdac_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  sample_t u;
  level_t  level;
  logic    sat;
  int checks = 0, failures = 0, sat_seen = 0, sat_after;
  longint x1 = 0, x2 = 0, x3 = 0;
  localparam longint SMAX = (64'sd1 <<< 35) - 1;

  crfb_mod dut (.clk, .rst_n, .en, .u, .level, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip(input longint s);
    if (s > SMAX) return SMAX;
    if (s < -SMAX) return -SMAX;
    return s;
  endfunction

  // one reference step; returns the expected level
  function automatic int ref_step(input longint uin, output bit clipped);
    longint q, v, uu, x2n;
    q = (x3 >>> 12) >>> 14;
    clipped = (q > 7) || (q < -7);
    if (q > 7) q = 7;
    if (q < -7) q = -7;
    v   = q <<< 26;
    uu  = uin <<< 12;
    x2n = clip(x2 + ((x1 >>> 1) + (x1 >>> 4)) - ((x3 >>> 10) + (x3 >>> 11)) - v);
    x1  = clip(x1 + uu + (uu >>> 2) - v);
    x3  = clip(x3 + ((x2n >>> 1) + (x2n >>> 2)) - v);
    x2  = x2n;
    return int'(q);
  endfunction

  task automatic run(input int n, input longint uin, input bit sine, input real amp,
                     output real mean);
    real s = 0.0;
    bit  c;
    int  e;
    for (int i = 0; i < n; i++) begin
      longint ui;
      ui = sine ? longint'($rtoi(amp * 131072.0 * $sin(2.0 * 3.14159265358979 * i / 2822.4)))
                : uin;
      u = sample_t'(ui);
      en = 1'b1;
      e = ref_step(ui, c);
      @(posedge clk); #1;
      checks++;
      if (int'(level) != e || sat !== c) begin
        failures++;
        if (failures < 10) $display("step %0d: level %0d sat %b expected %0d %b", i, level, sat, e, c);
      end
      if (sat) sat_seen++;
      s += real'(level);
    end
    mean = s / n;
  endtask

  initial begin
    real m;
    level_t held;
    u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // DC inputs
    for (int t = 0; t < 6; t++) begin
      longint dc;
      real expm;
      dc = (t == 0) ? -40000 : (t == 1) ? -10000 : (t == 2) ? 0 :
           (t == 3) ? 3000 : (t == 4) ? 25000 : 52000;
      run(3000, dc, 0, 0.0, m);        // settle
      run(16384, dc, 0, 0.0, m);
      expm = 1.25 * real'(dc) / 16384.0;
      checks++;
      if (m - expm > 0.01 || expm - m > 0.01) begin
        failures++;
        $display("DC %0d: mean level %f expected %f", dc, m, expm);
      end
    end
    // sine at 1 kHz, half scale
    run(28224, 0, 1, 0.5, m);
    // freeze
    en = 1'b0; held = level; u = 18'sd90000;
    repeat (5) @(posedge clk); #1;
    checks++;
    if (level !== held) failures++;
    // overload, then recovery
    run(2000, 131071, 0, 0.0, m);
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("quantizer never clipped");
    end
    // a third-order loop driven this far stays in a clipping limit cycle;
    // reset brings it back
    en = 1'b0; rst_n = 1'b0; x1 = 0; x2 = 0; x3 = 0;
    @(posedge clk); #1; rst_n = 1'b1;
    run(3000, 0, 0, 0.0, m);
    sat_after = sat_seen;
    run(16384, 0, 0, 0.0, m);
    $display("clips while recovering: %0d, mean %f", sat_seen - sat_after, m);
    checks++;
    if (m > 0.01 || m < -0.01 || sat_seen != sat_after) begin
      failures++;
      $display("no recovery after overload: mean %f", m);
    end
    $display("quantizer clip cycles: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
