// Polyphase interpolation FIR engine with one multiply-accumulate unit.
//
// An interpolate-by-L FIR of TAPS taps is split into L sub-filters of
// K = TAPS/L taps; sub-filter p uses coefficients h[L*k+p] on the K most
// recent input samples, and the L sub-filter results are emitted in order
// p = 0..L-1 (output n = L*m+p is sub-filter p at input time m). Input
// samples are kept in a K-word circular RAM (cleared by reset);
// coefficients come from an external ROM through coef_addr/coef_data
// (combinational read). One MAC runs the K products of a branch
// sequentially, so a branch must finish within PERIOD clocks
// (K+1 <= PERIOD).
//
// Timing: in_valid writes the sample. Branch p starts p*PERIOD+1 clocks
// after in_valid; its result appears on out_data with a one-cycle out_valid
// K+1 clocks after its start, so outputs are PERIOD clocks apart and the
// first one comes K+2 clocks after in_valid. in_valid is expected every
// L*PERIOD clocks; an early one restarts the branch sequence.
// Arithmetic: full-precision accumulation, round to nearest at CFRAC
// fraction bits, saturation to W bits.
//
// The polyphase split and the sequential MAC with sample RAM and
// coefficient ROM follow the published architecture; the exact timing,
// rounding and saturation are choices of this implementation.
module polyphase_fir #(
  parameter int unsigned TAPS   = 48,
  parameter int unsigned L      = 2,
  parameter int unsigned PERIOD = 32,
  parameter int unsigned W      = 18,
  parameter int unsigned CW     = 18,
  parameter int unsigned CFRAC  = 16,
  localparam int unsigned K     = TAPS / L,
  localparam int unsigned AW    = $clog2(TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_data,
  output logic [AW-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_data,
  output logic                 out_valid,
  output logic signed [W-1:0]  out_data
);
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned LW   = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned PW   = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  localparam int unsigned ACCW = W + CW + KW + 1;

  logic signed [W-1:0] mem [K];      // circular sample RAM
  logic [KW-1:0]  wptr, newest, rd_idx, k;
  logic           active, mac_run;
  logic [PW-1:0]  slot_cnt;
  logic [LW-1:0]  phase_cnt, cur_phase;
  logic signed [ACCW-1:0] acc, acc_next, rounded;
  logic signed [W+CW-1:0] prod;
  logic           start;

  assign start     = active && (slot_cnt == '0);
  assign coef_addr = AW'(L * k + cur_phase);
  assign prod      = coef_data * mem[rd_idx];
  assign acc_next  = acc + ACCW'(prod);
  assign rounded   = (acc_next + (ACCW'(1) <<< (CFRAC - 1))) >>> CFRAC;

  function automatic logic signed [W-1:0] sat(input logic signed [ACCW-1:0] v);
    localparam logic signed [ACCW-1:0] MAXV = ACCW'((1 << (W - 1)) - 1);
    localparam logic signed [ACCW-1:0] MINV = -ACCW'(1 << (W - 1));
    if (v > MAXV)      return W'(MAXV);
    else if (v < MINV) return W'(MINV);
    else               return W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; newest <= '0; active <= 1'b0; slot_cnt <= '0;
      phase_cnt <= '0; cur_phase <= '0; mac_run <= 1'b0; k <= '0;
      rd_idx <= '0; acc <= '0; out_valid <= 1'b0; out_data <= '0;
      for (int i = 0; i < K; i++) mem[i] <= '0;   // history starts silent
    end else begin
      out_valid <= 1'b0;
      // branch sequencer
      if (in_valid) begin
        mem[wptr] <= in_data;
        newest    <= wptr;
        wptr      <= (wptr == KW'(K - 1)) ? '0 : wptr + 1'b1;
        active    <= 1'b1;
        slot_cnt  <= '0;
        phase_cnt <= '0;
      end else if (active) begin
        if (slot_cnt == PW'(PERIOD - 1)) begin
          slot_cnt <= '0;
          if (phase_cnt == LW'(L - 1)) active <= 1'b0;
          else phase_cnt <= phase_cnt + 1'b1;
        end else begin
          slot_cnt <= slot_cnt + 1'b1;
        end
      end
      // MAC
      if (start) begin
        mac_run   <= 1'b1;
        cur_phase <= phase_cnt;
        k         <= '0;
        rd_idx    <= newest;
        acc       <= '0;
      end else if (mac_run) begin
        acc    <= acc_next;
        k      <= k + 1'b1;
        rd_idx <= (rd_idx == '0) ? KW'(K - 1) : rd_idx - 1'b1;
        if (k == KW'(K - 1)) begin
          mac_run   <= 1'b0;
          out_valid <= 1'b1;
          out_data  <= sat(rounded);
        end
      end
    end
  end

  initial begin
    assert (TAPS % L == 0) else $error("TAPS must be a multiple of L");
    assert (K + 1 <= PERIOD) else $error("one branch must fit in PERIOD clocks");
  end
  // a branch must not be started while the previous one is still running
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start |-> !mac_run);
endmodule
