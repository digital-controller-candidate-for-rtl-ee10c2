// Error former and threshold comparator of the mode arbitration logic.
//
// Computes the regulation error e[n] = Vref[n] - Vo[n] from the two ADC-format
// words and flags when its magnitude exceeds the programmable threshold e_th.
// Both a load step (Vo falls, e > 0) and an unload step (Vo rises, e < 0) must
// wake the transient mode, so the comparison uses |e[n]|; comparing the
// magnitude rather than the signed error is this design's reading.
// Purely combinational: the mode arbiter samples e_over on its control tick.
module error_comparator
  import trimode_pkg::*;
(
  input  adc_t vref,    // reference Vref[n], ADC codes
  input  adc_t vo,      // regulated output Vo[n], ADC codes
  input  adc_t e_th,    // error threshold, ADC codes
  output err_t e,       // signed error Vref - Vo
  output logic e_over   // |e| > e_th
);

  logic [ADC_W:0] e_mag;

  always_comb begin
    e      = $signed({1'b0, vref}) - $signed({1'b0, vo});
    e_mag  = e[ADC_W] ? -e : e;
    e_over = e_mag > {1'b0, e_th};
  end

endmodule
