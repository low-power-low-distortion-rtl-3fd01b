// Self-checking test of the RC low-pass model (496 kHz, 2.8224 MHz steps).
//  - Step response: after n clocks the output must equal
//    1 - exp(-2 pi fc n Ts), the sampled step response of the continuous
//    RC filter.
//  - The frequency response is checked at 1 kHz (gain within 0.02 %,
//    9 periods after a 1-period settle) and at the 705.6 kHz tone of a
//    4-clock square wave (the step-invariant gain there, about 0.63).
module tb_rc_lpf;
  logic clk = 0;
  real vin = 0.0, vout;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real TS = 1.0 / 2.8224e6;

  rc_lpf dut (.clk, .vin, .vout);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, c, s, amp;
    @(negedge clk);
    vin = 1.0;
    for (int n = 1; n <= 40; n++) begin
      @(posedge clk); #1;
      e = 1.0 - $exp(-2.0 * PI * 496.0e3 * n * TS);
      checks++;
      if (vout - e > 1e-9 || e - vout > 1e-9) begin
        failures++;
        $display("step n=%0d: %f expected %f", n, vout, e);
      end
    end
    // 4-clock square wave (+-1): fundamental at fclk/4
    c = 0; s = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      vin = ((n / 2) % 2 == 0) ? 1.0 : -1.0;
      @(posedge clk); #1;
      if (n >= 400) begin
        c += vout * $cos(2.0 * PI * n / 4.0);
        s += vout * $sin(2.0 * PI * n / 4.0);
      end
    end
    amp = 2.0 * $sqrt(c * c + s * s) / 3600.0;
    $display("square-wave fundamental at output: %f", amp);
    // input fundamental sqrt(2); gain |a / (1 - (1-a) e^-j pi/2)|, a = 1 - exp(-2 pi fc Ts)
    e = 1.0 - $exp(-2.0 * PI * 496.0e3 * TS);
    e = $sqrt(2.0) * e / $sqrt(1.0 + (1.0 - e) * (1.0 - e));
    checks++;
    if (amp - e > 1e-3 || e - amp > 1e-3) begin
      failures++;
      $display("expected %f", e);
    end
    // slow sine, 1 kHz
    c = 0; s = 0;
    for (int n = 0; n < 28224; n++) begin
      @(negedge clk);
      vin = $sin(2.0 * PI * 1000.0 * n * TS);
      @(posedge clk); #1;
      if (n >= 2822) begin
        c += vout * $cos(2.0 * PI * 1000.0 * n * TS);
        s += vout * $sin(2.0 * PI * 1000.0 * n * TS);
      end
    end
    amp = 2.0 * $sqrt(c * c + s * s) / 25402.0;
    $display("1 kHz gain: %f", amp);
    checks++;
    if (amp > 1.0002 || amp < 0.9998) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
