// Mismatch test of the element selection: the digital part drives two SC
// DAC models whose 15 unit capacitors are spread by +-1 %. One model gets
// the DWA selections, the other the plain thermometer code of the same
// levels (always the lowest elements first). For a 1 kHz half-scale tone
// the in-band harmonics at 2, 3 and 5 kHz are measured on both outputs
// over 10 ms. Without DWA the static mismatch bends the transfer curve
// and shows up as harmonic distortion; with DWA it must be at least 20 dB
// lower. The fundamental must be the same on both (within 1 %).
module tb_dwa_mismatch;
  import dsdac_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t pcm_in;
  logic pcm_req, q_sat, dwa_wrap;
  level_t level;
  elem_t dac_sel, thermo, thermo_q;
  logic [3:0] dwa_ptr;
  real vref = 1.8, v_dwa, v_thermo;
  int checks = 0, failures = 0, n_in = 0;
  localparam real PI = 3.14159265358979;

  ds_dac_digital dig (.clk, .rst_n, .pcm_in, .pcm_req, .level, .dac_sel, .dwa_ptr,
                      .q_sat, .dwa_wrap);
  therm_encoder enc (.level, .thermo);
  // same one-clock register as the DWA path, without the rotation
  always_ff @(posedge clk) thermo_q <= thermo;

  dct_sc_dac #(.N(N_ELEM), .CAP_ERR_PCT(1.0)) dac_a (.clk, .d(dac_sel), .vref, .vout(v_dwa));
  dct_sc_dac #(.N(N_ELEM), .CAP_ERR_PCT(1.0)) dac_b (.clk, .d(thermo_q), .vref, .vout(v_thermo));

  always #177.154 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (pcm_req) begin
      pcm_in = sample_t'($rtoi(65536.0 * $sin(2.0 * PI * 1000.0 * n_in / 44100.0)));
      n_in++;
    end

  real ca [4], sa [4], cb [4], sb [4];
  const real fr [4] = '{1000.0, 2000.0, 3000.0, 5000.0};

  initial begin
    real aa [4], ab [4], ha, hb;
    pcm_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (64 * 100) @(posedge clk);
    for (int k = 0; k < 4; k++) begin ca[k] = 0; sa[k] = 0; cb[k] = 0; sb[k] = 0; end
    for (int i = 0; i < 28224; i++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin
        ca[k] += v_dwa * $cos(2.0 * PI * fr[k] * i / 2.8224e6);
        sa[k] += v_dwa * $sin(2.0 * PI * fr[k] * i / 2.8224e6);
        cb[k] += v_thermo * $cos(2.0 * PI * fr[k] * i / 2.8224e6);
        sb[k] += v_thermo * $sin(2.0 * PI * fr[k] * i / 2.8224e6);
      end
    end
    ha = 0.0; hb = 0.0;
    for (int k = 0; k < 4; k++) begin
      aa[k] = 2.0 * $sqrt(ca[k] * ca[k] + sa[k] * sa[k]) / 28224.0;
      ab[k] = 2.0 * $sqrt(cb[k] * cb[k] + sb[k] * sb[k]) / 28224.0;
      if (k > 0) begin ha += aa[k] * aa[k]; hb += ab[k] * ab[k]; end
    end
    $display("fundamental: DWA %f V, thermometer %f V", aa[0], ab[0]);
    $display("harmonic distortion (2,3,5 kHz): DWA %0.1f dB, thermometer %0.1f dB",
             10.0 * $log10(ha) - 20.0 * $log10(aa[0]), 10.0 * $log10(hb) - 20.0 * $log10(ab[0]));
    checks++;
    if (aa[0] - ab[0] > 0.01 * ab[0] || ab[0] - aa[0] > 0.01 * ab[0]) failures++;
    checks++;
    if (ha * 100.0 > hb) failures++;     // at least 20 dB less distortion power
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
