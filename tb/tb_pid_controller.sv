// Self-checking test of pid_controller against a 64-bit integer model of
//     d[n] = a1 d[n-1] + a2 d[n-2] + b0 e[n] + b1 e[n-1] + b2 e[n-2]
// with Q14 coefficients, 10 duty fraction bits and saturation to [0, 2048).
// Covers: full and quarter coefficient sets, the enable preset
// (d history = applied duty, e history = present error), holding while
// disabled, saturation at both ends and the one-clock output latency.
module tb_pid_controller;
  import trimode_pkg::*;

  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, presets = 0;
  logic clk = 0, rst_n = 0, en = 0, mod = 0, tick = 0;
  err_t e = '0;
  duty_t d_applied = '0, d_out;
  pid_coef_t coef_full, coef_quarter;

  pid_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  longint md1 = 0, md2 = 0, me1 = 0, me2 = 0;
  bit marmed = 0;

  function automatic coef_t q14(real x);
    return coef_t'($rtoi(x * 16384.0));
  endfunction

  task automatic step(bit do_tick);
    longint acc, a1, a2, b0, b1, b2, dn;
    pid_coef_t k;
    tick <= do_tick;
    @(posedge clk);
    tick <= 0;
    k = mod ? coef_quarter : coef_full;
    a1 = longint'(k.a1); a2 = longint'(k.a2);
    b0 = longint'(k.b0); b1 = longint'(k.b1); b2 = longint'(k.b2);
    // model
    if (!en) marmed = 0;
    else if (do_tick) begin
      if (!marmed) begin
        md1 = longint'(d_applied) <<< 10; md2 = md1;
        me1 = longint'(e); me2 = me1;
        presets++;
      end else begin
        acc = a1 * md1 + a2 * md2 + ((b0 * longint'(e) + b1 * me1 + b2 * me2) <<< 10);
        dn  = acc >>> 14;
        if (dn < 0) begin dn = 0; sat_lo++; end
        if (dn > 2097151) begin dn = 2097151; sat_hi++; end
        md2 = md1; md1 = dn;
        me2 = me1; me1 = longint'(e);
      end
      marmed = 1;
    end
    #1;
    checks++;
    if (longint'(d_out) != (md1 >>> 10)) begin
      failures++;
      if (failures < 4) $display("FAIL d_out=%0d model=%0d check %0d e=%0d me1=%0d me2=%0d en=%0b mod=%0b", d_out, md1 >>> 10, checks, e, me1, me2, en, mod);
    end
  endtask

  initial begin
    coef_full    = '{a1: q14(1.0), a2: q14(0.0), b0: q14(31.04), b1: q14(-61.0), b2: q14(30.0)};
    coef_quarter = '{a1: q14(1.0), a2: q14(0.0), b0: q14(8.54), b1: q14(-16.5), b2: q14(8.0)};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // disabled: ticks must change nothing
    for (int i = 0; i < 20; i++) begin e <= err_t'($urandom_range(0, 40) - 20); step(1); end
    // enabled at full rate around an operating point
    en <= 1; d_applied <= 11'd1024;
    for (int i = 0; i < 2000; i++) begin
      e <= err_t'($urandom_range(0, 10) - 5);
      step(i % 3 == 0);
    end
    // quarter coefficients
    mod <= 1;
    for (int i = 0; i < 2000; i++) begin
      e <= err_t'($urandom_range(0, 10) - 5);
      step(i % 5 == 0);
    end
    // disable, re-enable with a new applied duty (preset)
    en <= 0; step(1); step(1);
    d_applied <= 11'd700; en <= 1; mod <= 0;
    for (int i = 0; i < 500; i++) begin
      e <= err_t'($urandom_range(0, 10) - 5);
      step(i % 2 == 0);
    end
    // large errors: drive into both saturation limits
    for (int i = 0; i < 300; i++) begin e <= err_t'(300); step(1); end
    for (int i = 0; i < 300; i++) begin e <= -err_t'(300); step(1); end
    // random coefficients
    for (int r = 0; r < 20; r++) begin
      coef_full = '{a1: q14(($urandom_range(0, 4000) - 2000) / 1000.0),
                    a2: q14(($urandom_range(0, 2000) - 1000) / 1000.0),
                    b0: coef_t'($urandom_range(0, 2000000) - 1000000),
                    b1: coef_t'($urandom_range(0, 2000000) - 1000000),
                    b2: coef_t'($urandom_range(0, 2000000) - 1000000)};
      en <= 0; step(1); en <= 1; d_applied <= 11'($urandom_range(0, 2047));
      for (int i = 0; i < 100; i++) begin
        e <= err_t'($urandom_range(0, 200) - 100);
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
