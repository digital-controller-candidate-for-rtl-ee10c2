// Discrete PID compensator for the steady-state and stand-by modes.
//
//     d[n] = a1 d[n-1] + a2 d[n-2] + b0 e[n] + b1 e[n-1] + b2 e[n-2]
//
// One update per `tick` while `en` is high. The tick comes from the control
// clock divider: every switching period in steady state, every fourth period
// in stand-by (quarter PID, `mod` = 1). The structure is the same in both
// modes; because the sampling period differs by four, each mode has its own
// coefficient set (coef_full / coef_quarter), which is this design's choice.
//
// The whole multiply-accumulate is done in the tick clock; d_out is
// registered and valid from the clock after the tick. The duty state keeps
// D_FRAC fraction bits and is saturated to [0, 2**DUTY_W) so the integrator
// cannot wind up. While `en` is low every register holds (the compensator is
// idle). On the first tick after `en` rises the state is loaded instead of
// computed: d[n-1] = d[n-2] = d_applied (the duty the DPWM is using) and
// e[n-1] = e[n-2] = e[n], so the compensator takes over without a step. That
// preset is this design's choice; the published controller relies on running the
// compensators side by side for a few periods around a mode change, which the
// mode arbiter also does.
module pid_controller
  import trimode_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,           // compensator enabled
  input  logic      mod,          // 1: stand-by (quarter-rate) coefficients
  input  logic      tick,         // update strobe (control clock)
  input  err_t      e,            // e[n] = Vref[n] - Vo[n]
  input  duty_t     d_applied,    // duty presently driving the DPWM
  input  pid_coef_t coef_full,
  input  pid_coef_t coef_quarter,
  output duty_t     d_out         // d[n]
);

  localparam int DSW   = DUTY_W + D_FRAC + 1;           // signed duty state
  localparam int ACC_W = DSW + COEF_W + 3;
  localparam logic signed [DSW-1:0] D_MAX = DSW'((1 << (DUTY_W + D_FRAC)) - 1);

  pid_coef_t k;
  logic signed [DSW-1:0]   d1_q, d2_q, d_new;
  err_t                    e1_q, e2_q;
  logic signed [ACC_W-1:0] acc, acc_e;
  logic                    armed_q;
  logic signed [ACC_W-1:0] acc_s;

  // Full-width signed product of a coefficient and a state value.
  function automatic logic signed [ACC_W-1:0] mul(coef_t a, logic signed [DSW-1:0] b);
    logic signed [ACC_W-1:0] a_x, b_x;
    a_x = ACC_W'(a);
    b_x = ACC_W'(b);
    return a_x * b_x;
  endfunction

  always_comb begin
    k     = mod ? coef_quarter : coef_full;
    acc_e = mul(k.b0, DSW'(e)) + mul(k.b1, DSW'(e1_q)) + mul(k.b2, DSW'(e2_q));
    acc   = mul(k.a1, d1_q) + mul(k.a2, d2_q) + (acc_e <<< D_FRAC);
    acc_s = acc >>> COEF_FRAC;
    if (acc_s < 0)
      d_new = '0;
    else if (acc_s > ACC_W'(D_MAX))
      d_new = D_MAX;
    else
      d_new = DSW'(acc_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_q    <= '0;
      d2_q    <= '0;
      e1_q    <= '0;
      e2_q    <= '0;
      armed_q <= 1'b0;
    end else if (!en) begin
      armed_q <= 1'b0;
    end else if (tick) begin
      armed_q <= 1'b1;
      if (!armed_q) begin
        d1_q <= $signed({1'b0, d_applied, {D_FRAC{1'b0}}});
        d2_q <= $signed({1'b0, d_applied, {D_FRAC{1'b0}}});
        e1_q <= e;
        e2_q <= e;
      end else begin
        d1_q <= d_new;
        d2_q <= d1_q;
        e1_q <= e;
        e2_q <= e1_q;
      end
    end
  end

  assign d_out = d1_q[DUTY_W+D_FRAC-1:D_FRAC];

endmodule
