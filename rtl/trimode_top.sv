// Tri-mode digital controller for a point-of-load synchronous buck converter.
//
// The loop: the ADC code of the output voltage Vo[n] is compared with the
// reference Vref[n]; a compensator turns the error into an 11-bit duty word;
// a second-order sigma-delta DPWM turns the duty word into the switching
// signal c(t), which a dead-time stage splits into the two gate signals.
//
// Three compensators share the loop, chosen by the mode arbiter:
//   stand-by (Mode I)     PID updated every fourth switching period
//   transient (Mode II)   robust RST, updated every period
//   steady state (III)    PID updated every period
// The arbiter moves between modes on the error threshold e_th and the
// external activity signal m, keeps the RST on for at least the tuning time,
// and overlaps the old and new compensators for a few periods at each change.
// Only the enabled compensators update their registers, which is where the
// power is saved.
//
// Timing: one switching period is 2**6 = 64 system clocks (the DPWM counter).
// `sample` is high in the first clock of each period; vo_adc must hold the
// converted output from that clock on (the ADC is external). The selected
// compensator computes in that clock, its duty word is registered in the
// next, and the DPWM uses it from the following period: one period of
// control latency. `idle_tone` flags a duty word on an idle-tone sensitive
// code (see idle_tone_detector).
//
// Coefficients are inputs; the stand-by PID has its own set because it samples
// four times slower. e_th, Vref and m are inputs as in the block diagram.
//
// Like the test chip, the top also carries a stand-alone copy of the DPWM
// with its own duty input (sa_d) and outputs (sa_c, sa_period_start), so the
// modulator can be exercised apart from the loop. It shares only the clock
// and reset.
module trimode_top
  import trimode_pkg::*;
#(
  parameter int unsigned T_TUNE1 = 80,  // transient hold on loading, ticks (40 us at 2 MHz)
  parameter int unsigned T_TUNE2 = 80,  // transient hold on unloading, ticks (40 us at 2 MHz)
  parameter int unsigned OVERLAP = 8,   // compensator handover overlap, ticks
  parameter int unsigned DEADTIME = 2,  // gate dead time, system clocks
  parameter int unsigned Q_TH = 8       // idle-tone central-floor threshold
) (
  input  logic      clk,
  input  logic      rst_n,
  input  adc_t      vref,          // Vref[n], ADC codes
  input  adc_t      vo_adc,        // Vo[n] from the ADC
  input  adc_t      e_th,          // error threshold, ADC codes
  input  logic      m,             // activity signal (1 = active load)
  input  pid_coef_t pid_coef,      // steady-state PID coefficients
  input  pid_coef_t qpid_coef,     // stand-by (quarter-rate) PID coefficients
  input  rst_coef_t rst_coef,      // RST coefficients
  output logic      sample,        // ADC sampling strobe / period start
  output logic      c,             // PWM signal c(t)
  output logic      gate_hs,       // high-side gate
  output logic      gate_ls,       // low-side gate
  output mode_e     mode,          // present mode
  output ctrl_sel_e sel,           // compensator driving the DPWM
  output logic      pid_en,
  output logic      rst_en,
  output duty_t     duty,          // duty word d_c[n] at the DPWM input
  output logic [DUTY_W-SD_BITS-1:0] sd_word,  // modulated word of this period
  output logic      e_over,        // |e[n]| > e_th
  output logic      idle_tone,     // duty word on an idle-tone sensitive code
  input  duty_t     sa_d,          // stand-alone DPWM: duty word
  output logic      sa_c,          // stand-alone DPWM: PWM output
  output logic      sa_period_start // stand-alone DPWM: period start
);

  err_t  e;
  logic  tick_full, tick_pid, pid_quarter;
  duty_t d_pid, d_rst;

  error_comparator u_cmp (
    .vref, .vo(vo_adc), .e_th, .e, .e_over
  );

  control_tick_divider #(.DIV(4)) u_div (
    .clk, .rst_n,
    .period_start(sample),
    .quarter(pid_quarter),
    .tick_full, .tick_quarter(), .tick_pid
  );

  mode_arbiter #(.T_TUNE1(T_TUNE1), .T_TUNE2(T_TUNE2), .OVERLAP(OVERLAP)) u_arb (
    .clk, .rst_n,
    .tick(tick_full),
    .e_over, .m,
    .mode, .sel, .pid_en, .pid_quarter, .rst_en
  );

  pid_controller u_pid (
    .clk, .rst_n,
    .en(pid_en),
    .mod(pid_quarter),
    .tick(tick_pid),
    .e,
    .d_applied(duty),
    .coef_full(pid_coef),
    .coef_quarter(qpid_coef),
    .d_out(d_pid)
  );

  rst_controller u_rst (
    .clk, .rst_n,
    .en(rst_en),
    .tick(tick_full),
    .w(vref),
    .y(vo_adc),
    .d_applied(duty),
    .coef(rst_coef),
    .d_out(d_rst)
  );

  // controller output multiplexer
  assign duty = (sel == SEL_RST) ? d_rst : d_pid;

  sigma_delta_dpwm #(.N_IN(DUTY_W), .N_SD(SD_BITS), .ORDER(2)) u_dpwm (
    .clk, .rst_n,
    .d(duty),
    .c,
    .period_start(sample),
    .v(sd_word)
  );

  // stand-alone DPWM, independent of the loop
  sigma_delta_dpwm #(.N_IN(DUTY_W), .N_SD(SD_BITS), .ORDER(2)) u_dpwm_sa (
    .clk, .rst_n,
    .d(sa_d),
    .c(sa_c),
    .period_start(sa_period_start),
    .v()
  );

  idle_tone_detector #(.N_IN(DUTY_W), .N_SD(SD_BITS), .Q_TH(Q_TH)) u_tone (
    .d(duty),
    .sensitive_word(idle_tone)
  );

  deadtime_generator #(.DT(DEADTIME)) u_dt (
    .clk, .rst_n, .c, .gate_hs, .gate_ls
  );

endmodule
