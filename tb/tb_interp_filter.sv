// Self-checking test of the 64x interpolation chain at its real rates
// (one input every 64 clocks of the 2.8224 MHz clock).
//  - Latency: the first output appears 34 clocks after the first input
//    (26 in the 2x stage, 7 in the 4x stage, 1 in the hold).
//  - Once running, out_valid stays high every clock.
//  - DC gain: a constant input is reproduced within 0.3 %.
//  - 1 kHz sine at half scale: the output tone keeps its amplitude within
//    1 %, the first image (44.1 kHz - 1 kHz) is at least 60 dB down and
//    the image the 4x stage must remove (88.2 kHz - 1 kHz) at least 50 dB
//    down, measured by single-bin DFTs over exactly 10 ms.
module tb_interp_filter;
  import dsdac_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_data, out_data;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real FCLK = 2.8224e6;

  interp_filter dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, n_in = 0;
  bit sine_mode = 0;
  real dc_level = 0.0;
  // source: one sample every 64 clocks
  always @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
  end
  always @(negedge clk) begin
    if (rst_n && (cyc % 64 == 0)) begin
      in_valid = 1'b1;
      in_data  = sine_mode ? sample_t'($rtoi(65536.0 * $sin(2.0 * PI * 1000.0 * n_in / 44100.0)))
                           : sample_t'($rtoi(dc_level));
      n_in++;
    end else begin
      in_valid = 1'b0;
    end
  end

  initial begin
    real c1, s1, c2, s2, c3, s3, amp1, amp2, amp3;
    in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    dc_level = 50000.0;
    // latency of the first output
    while (!out_valid) begin @(posedge clk); #1; end
    checks++;
    if (cyc != 34) begin
      failures++;
      $display("first output after %0d clocks, expected 34", cyc);
    end
    // settle, then check DC level and continuous valid
    repeat (64 * 40) @(posedge clk);
    for (int i = 0; i < 64 * 20; i++) begin
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_data > 50150 || out_data < 49850) begin
        failures++;
        if (failures < 10) $display("DC: valid %b data %0d", out_valid, out_data);
      end
    end
    // sine
    sine_mode = 1;
    repeat (64 * 60) @(posedge clk);
    c1 = 0; s1 = 0; c2 = 0; s2 = 0; c3 = 0; s3 = 0;
    for (int i = 0; i < 28224; i++) begin
      @(posedge clk); #1;
      c1 += out_data * $cos(2.0 * PI * 1000.0 * i / FCLK);
      s1 += out_data * $sin(2.0 * PI * 1000.0 * i / FCLK);
      c2 += out_data * $cos(2.0 * PI * 43100.0 * i / FCLK);
      s2 += out_data * $sin(2.0 * PI * 43100.0 * i / FCLK);
      c3 += out_data * $cos(2.0 * PI * 87200.0 * i / FCLK);
      s3 += out_data * $sin(2.0 * PI * 87200.0 * i / FCLK);
      checks++;
      if (!out_valid) failures++;
    end
    amp1 = 2.0 * $sqrt(c1 * c1 + s1 * s1) / 28224.0;
    amp2 = 2.0 * $sqrt(c2 * c2 + s2 * s2) / 28224.0;
    amp3 = 2.0 * $sqrt(c3 * c3 + s3 * s3) / 28224.0;
    $display("image at 87.2 kHz %f (%f dB)", amp3, 20.0 * $log10(amp3 / amp1));
    $display("1 kHz amplitude %f, image at 43.1 kHz %f (%f dB)", amp1, amp2,
             20.0 * $log10(amp2 / amp1));
    checks++;
    if (amp1 < 0.99 * 65536.0 || amp1 > 1.01 * 65536.0) failures++;
    checks++;
    if (amp2 > amp1 * 0.001) failures++;    // -60 dB
    checks++;
    if (amp3 > amp1 * 0.00316) failures++;  // -50 dB
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
