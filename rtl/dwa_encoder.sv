// Data-weighted-averaging (DWA) element selector for N unit elements.
//
// Each input is a thermometer word with c ones. The selector turns on the
// c elements that follow the last one used, wrapping around the array:
// sel = thermo rotated left by ptr (modulo N), then ptr <= (ptr + c) mod N.
// Every element is therefore used at the highest possible rate and all
// elements are used equally often, which moves capacitor-mismatch errors
// out of the audio band. wrap pulses when the pointer passes element N-1.
// Timing: on en the selection is registered (one clock latency).
// The algorithm is the published one; reset to element 0 and the
// registered output are this implementation's choices.
module dwa_encoder
  import dsdac_pkg::*;
#(
  parameter int unsigned N = N_ELEM,
  localparam int unsigned PW = $clog2(N),
  localparam int unsigned CNTW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [N-1:0]  thermo,
  output logic [N-1:0]  sel,
  output logic [PW-1:0] ptr,
  output logic          wrap
);
  logic [CNTW-1:0] cnt;
  logic [PW:0]     sum;
  logic [N-1:0]    rot;

  always_comb begin
    cnt = '0;
    for (int i = 0; i < N; i++) cnt = cnt + CNTW'(thermo[i]);
    // circular rotate left by ptr
    for (int j = 0; j < N; j++)
      rot[j] = thermo[(j + N - int'(ptr)) % N];
    sum = (PW+1)'(ptr) + (PW+1)'(cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= '0; ptr <= '0; wrap <= 1'b0;
    end else if (en) begin
      sel  <= rot;
      wrap <= (sum >= (PW+1)'(N));
      ptr  <= (sum >= (PW+1)'(N)) ? PW'(sum - (PW+1)'(N)) : PW'(sum);
    end
  end

  // the input must be a thermometer code: ones packed from bit 0
  a_thermo: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> ((thermo & (thermo + 1'b1)) == '0));
endmodule
