// Self-checking test of the DWA selector with N = 15.
// A reference pointer model predicts every selection word (c elements from
// the pointer on, wrapping), the one-clock latency is checked, and the
// per-element use counts must never differ by more than one, which is the
// averaging property the selector exists for. Includes the 7-element
// example style sequence at the start and a run of random levels.
module tb_dwa_encoder;
  import dsdac_pkg::*;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] thermo, sel;
  logic [3:0] ptr;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0;
  int ref_ptr = 0;
  int use_cnt [N];

  dwa_encoder #(.N(N)) dut (.clk, .rst_n, .en, .thermo, .sel, .ptr, .wrap);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int c);
    logic [N-1:0] exp_sel;
    int mx, mn;
    thermo = '0;
    for (int i = 0; i < c; i++) thermo[i] = 1'b1;
    en = 1'b1;
    exp_sel = '0;
    for (int j = 0; j < c; j++) exp_sel[(ref_ptr + j) % N] = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    checks++;
    if (sel !== exp_sel) begin
      failures++;
      $display("c=%0d ptr=%0d: sel %b expected %b", c, ref_ptr, sel, exp_sel);
    end
    checks++;
    if (wrap !== (ref_ptr + c >= N)) failures++;
    if (ref_ptr + c >= N) wraps++;
    ref_ptr = (ref_ptr + c) % N;
    checks++;
    if (int'(ptr) != ref_ptr) begin
      failures++;
      $display("pointer %0d expected %0d", ptr, ref_ptr);
    end
    for (int i = 0; i < N; i++) use_cnt[i] += int'(sel[i]);
    mx = use_cnt[0]; mn = use_cnt[0];
    for (int i = 1; i < N; i++) begin
      if (use_cnt[i] > mx) mx = use_cnt[i];
      if (use_cnt[i] < mn) mn = use_cnt[i];
    end
    checks++;
    if (mx - mn > 1) begin
      failures++;
      $display("element use spread %0d", mx - mn);
    end
  endtask

  initial begin
    thermo = '0;
    for (int i = 0; i < N; i++) use_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // with en low nothing moves
    thermo = 15'h00ff;
    @(posedge clk); #1;
    checks++;
    if (sel !== '0 || ptr !== 4'd0) failures++;
    step(2); step(4); step(7); step(1); step(15); step(0); step(8);
    for (int n = 0; n < 3000; n++) step(int'($urandom_range(0, N)));
    checks++;
    if (wraps < 10) failures++;
    $display("pointer wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
