// Self-checking test of the DCT switched-capacitor DAC model.
// With ideal capacitors the held output after each transfer phase must be
// vref * k / 15 for k selected elements, whichever elements they are, and
// must hold through the next sampling phase. A second instance with 1 %
// capacitor spread must give vref * sum(C_i D_i)/sum(C_i) computed here
// from the same spread formula, and differ from the ideal one.
module tb_dct_sc_dac;
  localparam int N = 15;
  logic clk = 0;
  logic [N-1:0] d;
  real vref = 1.8, vout, vout_mm;
  int checks = 0, failures = 0;

  dct_sc_dac #(.N(N)) dut (.clk, .d, .vref, .vout);
  dct_sc_dac #(.N(N), .CAP_ERR_PCT(1.0)) dut_mm (.clk, .d, .vref, .vout(vout_mm));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real capv(input int i);
    return 1.0 + 0.01 * (real'((i * 7) % N) - 7.0) / 7.0;
  endfunction

  initial begin
    int diff_seen = 0;
    d = '0;
    for (int n = 0; n < 500; n++) begin
      int k;
      real e, num, den, held;
      d = N'($urandom);
      k = $countones(d);
      #5 clk = 1;     // phase 1: sample
      #5 clk = 0;     // phase 2: transfer
      #1;
      e = vref * k / N;
      checks++;
      if (vout - e > 1e-9 || e - vout > 1e-9) begin
        failures++;
        $display("k=%0d vout %f expected %f", k, vout, e);
      end
      num = 0.0; den = 0.0;
      for (int i = 0; i < N; i++) begin
        den += capv(i);
        if (d[i]) num += capv(i);
      end
      checks++;
      if (vout_mm - vref * num / den > 1e-9 || vref * num / den - vout_mm > 1e-9) failures++;
      if (vout_mm - vout > 1e-6 || vout - vout_mm > 1e-6) diff_seen++;
      // new data during the next sampling phase must not disturb the output
      held = vout;
      d = ~d;
      #3 clk = 1;
      #1;
      checks++;
      if (vout != held) failures++;
      #1 clk = 0;
      #1;
    end
    checks++;
    if (diff_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
