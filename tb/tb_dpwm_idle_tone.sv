// Idle-tone study of the sigma-delta DPWM (11-bit word, 6-bit counter).
//
// First- and second-order modulators run side by side while the duty word
// sweeps 1015 .. 1065 around mid-scale. For every word the per-period
// modulation error 32*v - d is passed through a two-pole low-pass filter with
// a 15.6 kHz corner at a 2 MHz period rate (the buck output filter's corner),
// and the mean square of the filtered error is taken as the in-band noise
// power. Checked:
//   * words that are multiples of 32 give zero in-band noise in the first-order
//     modulator (the second-order one entered from a neighbouring word can
//     keep a small residual cycle; from reset it gives a constant word, which
//     tb_sigma_delta_dpwm checks);
//   * the four noisiest words of the first-order modulator are of the form
//     I*32 +- 1 (the idle-tone sensitive set);
//   * at every I*32 +- 1 word the second-order modulator is at least four
//     times quieter than the first-order one;
//   * the noisiest word of the second-order sweep is quieter than the
//     noisiest of the first-order sweep.
module tb_dpwm_idle_tone;
  localparam int FIRST = 1015, LAST = 1065, NW = LAST - FIRST + 1;
  localparam int SETTLE = 300, MEASURE = 1500;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [10:0] d = 11'(FIRST);
  logic c1, c2, ps1, ps2;
  logic [5:0] v1, v2;
  real p1 [NW], p2 [NW];

  sigma_delta_dpwm #(.N_IN(11), .N_SD(5), .ORDER(1)) dut1 (.clk, .rst_n, .d, .c(c1), .period_start(ps1), .v(v1));
  sigma_delta_dpwm #(.N_IN(11), .N_SD(5), .ORDER(2)) dut2 (.clk, .rst_n, .d, .c(c2), .period_start(ps2), .v(v2));

  always #5 clk = ~clk;

  initial begin
    repeat (64 * (SETTLE + MEASURE + 2) * NW + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, f1a, f1b, f2a, f2b, acc1, acc2, x1, x2;
    int top [4];
    a = $exp(-2.0 * 3.14159265358979 * 15.6e3 / 2.0e6);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < NW; w++) begin
      d = 11'(FIRST + w);
      f1a = 0; f1b = 0; f2a = 0; f2b = 0; acc1 = 0; acc2 = 0;
      for (int p = 0; p < SETTLE + MEASURE; p++) begin
        @(posedge clk iff ps1);
        #1;
        x1 = 32.0 * v1 - (FIRST + w);
        x2 = 32.0 * v2 - (FIRST + w);
        f1a = a * f1a + (1.0 - a) * x1;  f1b = a * f1b + (1.0 - a) * f1a;
        f2a = a * f2a + (1.0 - a) * x2;  f2b = a * f2b + (1.0 - a) * f2a;
        if (p >= SETTLE) begin acc1 += f1b * f1b; acc2 += f2b * f2b; end
      end
      p1[w] = acc1 / MEASURE;
      p2[w] = acc2 / MEASURE;
    end
    // report
    for (int w = 0; w < NW; w++)
      if ((FIRST + w) % 32 inside {0, 1, 31})
        $display("d=%0d  first-order %8.5f  second-order %8.5f", FIRST + w, p1[w], p2[w]);
    // multiples of 32: the first-order loop settles to a constant word
    for (int w = 0; w < NW; w++)
      if ((FIRST + w) % 32 == 0) begin
        checks++;
        if (p1[w] > 1e-6) begin failures++; $display("FAIL noise at d=%0d", FIRST + w); end
      end
    // four noisiest first-order words are I*32 +- 1
    for (int k = 0; k < 4; k++) begin
      int best;
      best = -1;
      for (int w = 0; w < NW; w++) begin
        bit taken;
        taken = 0;
        for (int j = 0; j < k; j++) if (top[j] == w) taken = 1;
        if (!taken && (best < 0 || p1[w] > p1[best])) best = w;
      end
      top[k] = best;
      checks++;
      if (!((FIRST + best) % 32 inside {1, 31})) begin
        failures++; $display("FAIL first-order peak %0d at d=%0d", k, FIRST + best);
      end else
        $display("first-order noise peak %0d at d=%0d", k, FIRST + best);
    end
    // second order quieter on the sensitive words and overall
    for (int w = 0; w < NW; w++)
      if ((FIRST + w) % 32 inside {1, 31}) begin
        checks++;
        if (!(p2[w] * 4.0 < p1[w])) begin failures++; $display("FAIL second order not quieter at d=%0d", FIRST + w); end
      end
    begin
      real m1, m2;
      m1 = 0; m2 = 0;
      foreach (p1[w]) begin if (p1[w] > m1) m1 = p1[w]; if (p2[w] > m2) m2 = p2[w]; end
      checks++;
      if (!(m2 < m1)) begin failures++; $display("FAIL second-order peak %f >= first-order %f", m2, m1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
