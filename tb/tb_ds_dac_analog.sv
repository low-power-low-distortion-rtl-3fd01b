// Self-checking test of the analog-part model (SC DAC + RC low-pass).
// Static element patterns must settle, through the filter, to
// vref * k / 15 for k active inputs (after 40 clocks, within 1 uV);
// v_dac must show the pattern after the next sample/transfer phase pair;
// and an all-on/all-off pattern toggling every clock must come out with
// a peak-to-peak ripple of about half the swing (the filter's gain at
// half the clock rate), checked to lie between 0.01 V and 0.6 * vref.
module tb_ds_dac_analog;
  logic vclk = 0;
  logic [14:0] vin;
  real vref = 1.8, v_dac, vout;
  int checks = 0, failures = 0;

  ds_dac_analog dut (.vclk, .vin, .vref, .v_dac, .vout);

  always #177.154 vclk = ~vclk;

  initial begin
    repeat (20000) @(posedge vclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, hi, lo;
    vin = '0;
    for (int t = 0; t < 40; t++) begin
      int k;
      vin = 15'($urandom);
      k = $countones(vin);
      @(posedge vclk);          // sampling phase
      @(negedge vclk); #1;      // after the transfer
      e = vref * k / 15.0;
      checks++;
      if (v_dac - e > 1e-9 || e - v_dac > 1e-9) failures++;
      repeat (40) @(posedge vclk);
      #1;
      checks++;
      if (vout - e > 1e-6 || e - vout > 1e-6) begin
        failures++;
        $display("pattern %b: vout %f expected %f", vin, vout, e);
      end
    end
    // all on / all off every clock: ripple well below the full swing
    hi = -1.0; lo = 10.0;
    for (int i = 0; i < 400; i++) begin
      @(posedge vclk);
      vin = (i % 2 == 0) ? 15'h7fff : 15'h0000;
      #1;
      if (i > 100) begin
        if (vout > hi) hi = vout;
        if (vout < lo) lo = vout;
      end
    end
    $display("ripple for a clock-rate square wave: %f V", hi - lo);
    checks++;
    if (hi - lo > 0.6 * vref || hi - lo < 0.01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
