// Shared body of the FIR interpolator tests (included inside a module that
// defines TAPS, L, PERIOD, the clock, the DUT ports and the counters).
//
// 1. Impulse: an input of 2^16 at full scale gives the coefficients
//    themselves, in polyphase order. They are compared with the
//    Kaiser-windowed sinc computed here in real arithmetic (within 1 LSB).
// 2. Timing: first output K+2 clocks after in_valid, then every PERIOD.
// 3. Random and full-scale inputs: every output is compared with a
//    direct convolution of the zero-stuffed input with the impulse
//    response, rounded and saturated to 18 bits.

  localparam int K = TAPS / L;
  longint h [TAPS];
  longint xin [$];
  int first_lat = -1;

  function automatic real bessel_i0(input real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s += t;
    end
    return s;
  endfunction

  function automatic longint sat18(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  // expected output number n = L*m + p after input m
  function automatic longint ref_out(input int m, input int p);
    longint acc = 0;
    for (int k = 0; k < K; k++)
      if (m - k >= 0) acc += h[L*k + p] * xin[m - k];
    return sat18((acc + 32768) >>> 16);
  endfunction

  // send one sample and collect its L outputs, checking timing
  task automatic send(input longint x, output longint y [L]);
    int t;
    in_data  = sample_t'(x);
    in_valid = 1'b1;
    xin.push_back(x);
    @(posedge clk); #1;
    in_valid = 1'b0;
    t = 1;
    for (int p = 0; p < L; p++) begin
      while (!out_valid) begin
        @(posedge clk); #1; t++;
        if (t > L * PERIOD + 4) break;
      end
      y[p] = longint'(out_data);
      checks++;
      if (t != K + 2 + p * PERIOD) begin
        failures++;
        $display("output %0d at %0d clocks, expected %0d", p, t, K + 2 + p * PERIOD);
      end
      if (p < L - 1) begin @(posedge clk); #1; t++; end
    end
    while (t < L * PERIOD) begin @(posedge clk); #1; t++; end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hr [TAPS];
    real sum, fc, beta, c;
    longint y [L];
    int dev;
    // reference response
    fc = 0.5 / L; beta = 4.55; sum = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      real x, r, sincv;
      x = real'(n) - real'(TAPS - 1) / 2.0;
      sincv = (x == 0.0) ? 1.0 : $sin(3.14159265358979 * 2.0 * fc * x) / (3.14159265358979 * 2.0 * fc * x);
      r = 2.0 * real'(n) / real'(TAPS - 1) - 1.0;
      hr[n] = 2.0 * fc * sincv * bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
      sum += hr[n];
    end
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk); #1;
    // 1. impulse response
    send(65536, y);
    for (int m = 0; m < K; m++) begin
      for (int p = 0; p < L; p++) begin
        h[L*m + p] = y[p];
        c = hr[L*m + p] / sum * L * 65536.0;
        dev = int'(y[p]) - int'($floor(c + 0.5));
        checks++;
        if (dev > 1 || dev < -1) begin
          failures++;
          $display("h[%0d] = %0d, expected about %f", L*m + p, y[p], c);
        end
      end
      if (m < K - 1) send(0, y);
    end
    // symmetry of the measured response
    for (int n = 0; n < TAPS / 2; n++) begin
      checks++;
      if (h[n] != h[TAPS - 1 - n]) failures++;
    end
    // flush with zeros
    for (int m = 0; m < K; m++) send(0, y);
    xin.delete();
    for (int m = 0; m < K; m++) xin.push_back(0);
    // 3. random and full-scale inputs against direct convolution
    for (int m = 0; m < 300; m++) begin
      longint x;
      if (m < 100)       x = longint'($signed(18'($urandom)));
      else if (m < 200)  x = (m % 2 == 0) ? 131071 : -131072;   // drives saturation
      else               x = ((m / 10) % 2 == 0) ? 131071 : -131072;
      send(x, y);
      for (int p = 0; p < L; p++) begin
        longint e;
        e = ref_out(xin.size() - 1, p);
        checks++;
        if (y[p] != e) begin
          failures++;
          if (failures < 10) $display("input %0d branch %0d: got %0d expected %0d", m, p, y[p], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
