// Self-checking test of the 8x zero-order hold. Samples arrive every 8
// clocks; each must appear on out_data for exactly the 8 following clocks
// with out_valid high and rep counting 0..7, and out_valid must drop 8
// clocks after the last sample.
module tb_sinc_zoh;
  import dsdac_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_data, out_data;
  logic [2:0] rep;
  int checks = 0, failures = 0;

  sinc_zoh #(.R(8)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .rep);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t s;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (out_valid) failures++;
    for (int n = 0; n < 100; n++) begin
      s = sample_t'($urandom);
      in_data = s; in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (!out_valid || out_data !== s || rep !== 3'(r)) begin
          failures++;
          $display("sample %0d repeat %0d: valid %b data %h rep %0d", n, r, out_valid, out_data, rep);
        end
        if (r < 7) @(posedge clk); #1;
      end
    end
    @(posedge clk); #1;
    checks++; if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
