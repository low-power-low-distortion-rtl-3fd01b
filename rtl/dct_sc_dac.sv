// Behavioural model (not synthesizable) of the 15-level direct-charge-
// transfer switched-capacitor DAC.
//
// N equal unit capacitors C1..CN sample the element selections D1..DN
// during phase 1 (clk high): capacitor i charges to D_i*vref. In phase 2
// (clk low) all top plates go to the opamp's inverting input and all
// bottom plates to its output, so the capacitors sit in parallel in the
// feedback path and share their charge; the output settles to
//   vout = vref * sum(C_i * D_i) / sum(C_i)
// without the opamp supplying charge. The model updates vout at the
// falling clock edge and holds it for the rest of the period. A fixed
// mismatch pattern (+-CAP_ERR_PCT percent, spread over the elements) can
// be set to show the effect of element selection. Ideal opamp and
// switches; kT/C noise, settling and clock feedthrough are not modelled.
module dct_sc_dac #(
  parameter int unsigned N           = 15,
  parameter real         CAP_ERR_PCT = 0.0
) (
  input  logic         clk,
  input  logic [N-1:0] d,
  input  real          vref,
  output real          vout
);
  real cap [N];
  real ctot;

  initial begin
    ctot = 0.0;
    for (int i = 0; i < N; i++) begin
      // deterministic spread of the unit-capacitor errors
      cap[i] = 1.0 + CAP_ERR_PCT / 100.0 * (real'((i * 7) % N) - real'(N - 1) / 2.0)
                                        / (real'(N - 1) / 2.0);
      ctot += cap[i];
    end
    vout = 0.0;
  end

  real q_sampled;

  // phase 1: sample the selections onto the capacitors
  always @(posedge clk) begin
    real q;
    q = 0.0;
    for (int i = 0; i < N; i++) if (d[i]) q += cap[i] * vref;
    q_sampled <= q;
  end

  // phase 2: direct charge transfer, capacitors in parallel
  always @(negedge clk) vout <= q_sampled / ctot;
endmodule
