// Closed-loop end-to-end test of trimode_top at its default parameters
// (T_TUNE1 = T_TUNE2 = 80 periods = 40 us at 2 MHz, OVERLAP = 8).
//
// The controller drives a behavioural buck converter (3 V in, 1.5 V out,
// 4.7 uH, 22 uF, 5 ohm) through the DPWM and the dead-time stage. Scenario:
//   1. start-up from 0 V with m = 0: the large error wakes the transient mode,
//      then the loop settles into stand-by (quarter-rate PID);
//   2. load step 0.3 A -> 0.45 A with m = 1: transient (RST) then steady state
//      (full-rate PID);
//   3. a further load step 0.45 A -> 0.6 A with m = 1: the error alone wakes
//      the transient mode from steady state;
//   4. unloading to 0.3 A with m = 0: transient then stand-by.
// Checked: the mode sequence; the output settles within +-4 ADC codes of the
// reference in every mode; the switching period is 64 clocks; the gates
// never overlap; the stand-alone DPWM, held at word 992, gives 31 high clocks
// per period. Counted, and
// required at least once each: every mode transition, an error-triggered and
// an activity-triggered wake, overlapped handovers in both directions,
// quarter-rate PID updates, dead-time clocks and idle-tone code detections.
module tb_trimode_top;
  import trimode_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, m = 0;
  adc_t vref = 10'd768, e_th = 10'd8, vo_adc;
  pid_coef_t pid_coef, qpid_coef;
  rst_coef_t rst_coef;
  logic sample, c, gate_hs, gate_ls, pid_en, rst_en, e_over, idle_tone;
  mode_e mode;
  ctrl_sel_e sel;
  duty_t duty;
  logic [5:0] sd_word;
  real vo, il, i_step = 0.0;
  duty_t sa_d = 11'd992;
  logic sa_c, sa_period_start;

  trimode_top dut (.*);

  buck_plant_model plant (.clk, .gate_hs, .sample, .i_step, .vo, .il, .vo_adc);

  always #5 clk = ~clk;

  localparam int MAX_CLOCKS = 64 * 12000;
  initial begin
    repeat (MAX_CLOCKS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Q14 coefficient sets (value * 16384):
  //   PID  : a1 = 1, b = 31.04, -61, 30       (kp 1, ki 0.04, kd 30)
  //   QPID : a1 = 1, b = 8.54, -16.5, 8        (kp 0.5, ki 0.04, kd 8 at fs/4)
  //   RST  : R = 97.3 - 187 z^-1 + 90 z^-2, S = 1 - z^-1, T = R(1) = 0.3
  initial begin
    pid_coef  = '{a1: 16384, a2: 0, b0: 508559, b1: -999424, b2: 491520};
    qpid_coef = '{a1: 16384, a2: 0, b0: 139919, b1: -270336, b2: 131072};
    rst_coef  = '{t0: 4915, t1: 0, t2: 0, t3: 0,
                  r0: 1594163, r1: -3063808, r2: 1474560, s1: -16384, s2: 0};
  end

  // ---------------- stand-alone DPWM ----------------
  // a constant word 992 = 31*32 must give 31 high clocks in every period
  int sa_highs = 0, sa_periods = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (sa_period_start) begin
        if (sa_periods > 2) begin
          checks++;
          if (sa_highs != 31) begin failures++; $display("FAIL stand-alone DPWM: %0d high clocks", sa_highs); end
        end
        sa_periods++;
        sa_highs = 0;
      end
      sa_highs += sa_c;
    end
  end

  // ---------------- monitors ----------------
  int n_I_II = 0, n_II_III = 0, n_III_II = 0, n_II_I = 0;
  int n_err_wake = 0, n_act_wake = 0, n_pre_overlap = 0, n_post_overlap = 0;
  int n_quarter_ticks = 0, n_dead = 0, n_tone = 0, periods = 0, last_start = 0, clk_n = 0;
  mode_e mode_prev = MODE_STANDBY;
  logic m_at_tick, eo_at_tick;

  always @(posedge clk) begin
    clk_n++;
    if (rst_n) begin
      if (gate_hs && gate_ls) begin
        checks++; failures++; $display("FAIL gates overlap");
      end
      if (!gate_hs && !gate_ls) n_dead++;
      if (sample) begin
        if (periods > 1) begin
          checks++;
          if (clk_n - last_start != 64) begin failures++; $display("FAIL period %0d clocks", clk_n - last_start); end
        end
        last_start = clk_n;
        periods++;
        m_at_tick  = m;
        eo_at_tick = e_over;
        if (dut.tick_pid && dut.pid_quarter && pid_en) n_quarter_ticks++;
        if (idle_tone) n_tone++;
      end
      if (mode != mode_prev) begin
        case ({mode_prev, mode})
          {MODE_STANDBY, MODE_TRANSIENT}: begin
            n_I_II++;
            if (eo_at_tick && !m_at_tick) n_err_wake++; else n_act_wake++;
          end
          {MODE_TRANSIENT, MODE_STEADY}:  n_II_III++;
          {MODE_STEADY, MODE_TRANSIENT}: begin
            n_III_II++;
            if (eo_at_tick && m_at_tick) n_err_wake++; else n_act_wake++;
          end
          {MODE_TRANSIENT, MODE_STANDBY}: n_II_I++;
          default: begin checks++; failures++; $display("FAIL illegal transition"); end
        endcase
        $display("[%0t] period %0d: mode %s -> %s (vo=%0.4f V)", $time, periods, mode_prev.name(), mode.name(), vo);
        mode_prev = mode;
      end
      // overlap: both compensators running around a handover
      if (sample && pid_en && rst_en) begin
        if (mode == MODE_TRANSIENT && sel == SEL_PID) n_pre_overlap++;
        if (mode != MODE_TRANSIENT && sel == SEL_RST) n_post_overlap++;
      end
    end
  end

  task automatic wait_periods(int n);
    repeat (n) @(posedge sample);
  endtask

  // average |vo_adc - vref| over n periods must be small, and the mode as given
  task automatic check_regulated(string what, mode_e md, int n);
    int worst = 0, dev;
    for (int i = 0; i < n; i++) begin
      @(posedge sample);
      #1;
      dev = int'(vo_adc) - int'(vref);
      if (dev < 0) dev = -dev;
      if (dev > worst) worst = dev;
    end
    checks++;
    if (worst > 4) begin failures++; $display("FAIL %s: worst deviation %0d codes", what, worst); end
    checks++;
    if (mode != md) begin failures++; $display("FAIL %s: mode %s, expected %s", what, mode.name(), md.name()); end
    $display("%s: mode %s, worst deviation %0d codes, vo=%0.4f V, duty=%0d", what, mode.name(), worst, vo, duty);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // 1. start-up with m = 0 (stand-by wanted)
    wait_periods(1500);
    check_regulated("stand-by after start-up", MODE_STANDBY, 200);
    // 2. loading: activity and a load step
    m <= 1; i_step = 0.15;
    wait_periods(400);
    check_regulated("steady state at 0.45 A", MODE_STEADY, 200);
    // 3. a further load step, no change of m
    i_step = 0.30;
    wait_periods(600);
    check_regulated("steady state at 0.6 A", MODE_STEADY, 200);
    // 4. unloading
    m <= 0; i_step = 0.0;
    wait_periods(1500);
    check_regulated("stand-by at 0.3 A", MODE_STANDBY, 200);

    $display("transitions I->II %0d, II->III %0d, III->II %0d, II->I %0d", n_I_II, n_II_III, n_III_II, n_II_I);
    $display("wakes: error %0d, activity %0d; overlap periods: pre %0d, post %0d",
             n_err_wake, n_act_wake, n_pre_overlap, n_post_overlap);
    $display("quarter-rate PID updates %0d, dead-time clocks %0d, idle-tone codes %0d",
             n_quarter_ticks, n_dead, n_tone);
    checks++; if (n_I_II == 0)          begin failures++; $display("FAIL no stand-by -> transient"); end
    checks++; if (n_II_III == 0)        begin failures++; $display("FAIL no transient -> steady"); end
    checks++; if (n_III_II == 0)        begin failures++; $display("FAIL no steady -> transient"); end
    checks++; if (n_II_I == 0)          begin failures++; $display("FAIL no transient -> stand-by"); end
    checks++; if (n_err_wake == 0)      begin failures++; $display("FAIL no error-triggered wake"); end
    checks++; if (n_act_wake == 0)      begin failures++; $display("FAIL no activity-triggered wake"); end
    checks++; if (n_pre_overlap == 0)   begin failures++; $display("FAIL no pre-operation overlap"); end
    checks++; if (n_post_overlap == 0)  begin failures++; $display("FAIL no post-operation overlap"); end
    checks++; if (n_quarter_ticks == 0) begin failures++; $display("FAIL no quarter-rate update"); end
    checks++; if (n_dead == 0)          begin failures++; $display("FAIL no dead time"); end
    checks++; if (sa_periods < 1000)     begin failures++; $display("FAIL stand-alone DPWM idle"); end
    checks++; if (n_tone == 0)          begin failures++; $display("FAIL no idle-tone code seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
