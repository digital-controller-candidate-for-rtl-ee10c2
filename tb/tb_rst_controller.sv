// Self-checking test of rst_controller against a 64-bit integer model of
//     d[n] = t0 w[n] + t1 w[n-1] + t2 w[n-2] + t3 w[n-3]
//          - r0 y[n] - r1 y[n-1] - r2 y[n-2] - s1 d[n-1] - s2 d[n-2]
// with Q14 coefficients, 10 duty fraction bits and saturation to [0, 2048).
// Covers the enable preset, holding while disabled, reference steps (which
// exercise the T taps), saturation and random coefficient sets.
module tb_rst_controller;
  import trimode_pkg::*;

  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, presets = 0;
  logic clk = 0, rst_n = 0, en = 0, tick = 0;
  adc_t w = '0, y = '0;
  duty_t d_applied = '0, d_out;
  rst_coef_t coef;

  rst_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint md1 = 0, md2 = 0, mw1 = 0, mw2 = 0, mw3 = 0, my1 = 0, my2 = 0;
  bit marmed = 0;

  function automatic coef_t q14(real x);
    return coef_t'($rtoi(x * 16384.0));
  endfunction

  function automatic longint c(coef_t x);
    return longint'(x);
  endfunction

  task automatic step(bit do_tick);
    longint acc, dn, w0, y0;
    tick <= do_tick;
    @(posedge clk);
    tick <= 0;
    w0 = longint'(w); y0 = longint'(y);
    if (!en) marmed = 0;
    else if (do_tick) begin
      if (!marmed) begin
        md1 = longint'(d_applied) <<< 10; md2 = md1;
        mw1 = w0; mw2 = w0; mw3 = w0; my1 = y0; my2 = y0;
        presets++;
      end else begin
        acc = ((c(coef.t0) * w0 + c(coef.t1) * mw1 + c(coef.t2) * mw2 + c(coef.t3) * mw3
               - c(coef.r0) * y0 - c(coef.r1) * my1 - c(coef.r2) * my2) <<< 10)
              - c(coef.s1) * md1 - c(coef.s2) * md2;
        dn = acc >>> 14;
        if (dn < 0) begin dn = 0; sat_lo++; end
        if (dn > 2097151) begin dn = 2097151; sat_hi++; end
        md2 = md1; md1 = dn;
        mw3 = mw2; mw2 = mw1; mw1 = w0;
        my2 = my1; my1 = y0;
      end
      marmed = 1;
    end
    #1;
    checks++;
    if (longint'(d_out) != (md1 >>> 10)) begin
      failures++;
      if (failures < 5) $display("FAIL d_out=%0d model=%0d at check %0d", d_out, md1 >>> 10, checks);
    end
  endtask

  initial begin
    // tuned set: R = 97.3 - 187 z^-1 + 90 z^-2, S = 1 - z^-1, T = R(1)
    coef = '{t0: q14(0.3), t1: q14(0.0), t2: q14(0.0), t3: q14(0.0),
             r0: q14(97.3), r1: q14(-187.0), r2: q14(90.0),
             s1: q14(-1.0), s2: q14(0.0)};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 20; i++) begin y <= adc_t'($urandom_range(700, 800)); step(1); end
    en <= 1; d_applied <= 11'd1024; w <= 10'd768;
    for (int i = 0; i < 2000; i++) begin
      y <= adc_t'(768 + $urandom_range(0, 6) - 3);
      if (i == 1000) w <= 10'd700;   // reference step through the T taps
      step(i % 2 == 0);
    end
    en <= 0; step(1); step(1);
    d_applied <= 11'd500; en <= 1;
    for (int i = 0; i < 300; i++) begin y <= 10'd900; step(1); end   // drive to 0
    for (int i = 0; i < 300; i++) begin y <= 10'd600; step(1); end   // drive to full scale
    for (int r = 0; r < 20; r++) begin
      coef = '{t0: coef_t'($urandom_range(0, 400000) - 200000), t1: coef_t'($urandom_range(0, 400000) - 200000),
               t2: coef_t'($urandom_range(0, 400000) - 200000), t3: coef_t'($urandom_range(0, 400000) - 200000),
               r0: coef_t'($urandom_range(0, 400000) - 200000), r1: coef_t'($urandom_range(0, 400000) - 200000),
               r2: coef_t'($urandom_range(0, 400000) - 200000),
               s1: q14(($urandom_range(0, 4000) - 2000) / 1000.0), s2: q14(($urandom_range(0, 2000) - 1000) / 1000.0)};
      en <= 0; step(1); en <= 1; d_applied <= 11'($urandom_range(0, 2047));
      for (int i = 0; i < 100; i++) begin
        w <= adc_t'($urandom_range(0, 1023)); y <= adc_t'($urandom_range(0, 1023));
        step($urandom_range(0, 1));
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || presets < 20) begin
      failures++; $display("FAIL coverage sat_hi=%0d sat_lo=%0d presets=%0d", sat_hi, sat_lo, presets);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
