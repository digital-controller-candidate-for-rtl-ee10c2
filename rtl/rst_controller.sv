// Robust RST compensator for the transient mode.
//
//     d[n] = t0 w[n] + t1 w[n-1] + t2 w[n-2] + t3 w[n-3]
//          - r0 y[n] - r1 y[n-1] - r2 y[n-2] - s1 d[n-1] - s2 d[n-2]
//
// w is the reference Vref[n] and y the measured output Vo[n], both ADC codes.
// T(z) shapes reference tracking and R(z), S(z) set disturbance rejection, so
// the two are tuned apart (two degrees of freedom). The coefficients are
// inputs, tuned off line.
//
// One update per `tick` while `en` is high; d_out is registered and valid
// from the clock after the tick. The duty state carries D_FRAC fraction bits
// and is saturated to [0, 2**DUTY_W). While `en` is low every register
// holds. On the first tick after `en` rises the histories are loaded instead
// of computed (d history with d_applied, w and y histories with the present
// samples), so the compensator starts from the operating point; that preset
// is this design's choice.
module rst_controller
  import trimode_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,          // compensator enabled
  input  logic      tick,        // update strobe (control clock)
  input  adc_t      w,           // reference w[n]
  input  adc_t      y,           // measured output y[n]
  input  duty_t     d_applied,   // duty presently driving the DPWM
  input  rst_coef_t coef,
  output duty_t     d_out        // d[n]
);

  localparam int DSW   = DUTY_W + D_FRAC + 1;
  localparam int ACC_W = DSW + COEF_W + 4;
  localparam logic signed [DSW-1:0] D_MAX = DSW'((1 << (DUTY_W + D_FRAC)) - 1);

  logic signed [DSW-1:0]   d1_q, d2_q, d_new;
  err_t                    w0, y0, w1_q, w2_q, w3_q, y1_q, y2_q;
  logic signed [ACC_W-1:0] acc, acc_t, acc_r;
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
    w0    = $signed({1'b0, w});
    y0    = $signed({1'b0, y});
    acc_t = mul(coef.t0, DSW'(w0)) + mul(coef.t1, DSW'(w1_q))
          + mul(coef.t2, DSW'(w2_q)) + mul(coef.t3, DSW'(w3_q));
    acc_r = mul(coef.r0, DSW'(y0)) + mul(coef.r1, DSW'(y1_q)) + mul(coef.r2, DSW'(y2_q));
    acc   = ((acc_t - acc_r) <<< D_FRAC)
          - mul(coef.s1, d1_q) - mul(coef.s2, d2_q);
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
      w1_q    <= '0;
      w2_q    <= '0;
      w3_q    <= '0;
      y1_q    <= '0;
      y2_q    <= '0;
      armed_q <= 1'b0;
    end else if (!en) begin
      armed_q <= 1'b0;
    end else if (tick) begin
      armed_q <= 1'b1;
      if (!armed_q) begin
        d1_q <= $signed({1'b0, d_applied, {D_FRAC{1'b0}}});
        d2_q <= $signed({1'b0, d_applied, {D_FRAC{1'b0}}});
        w1_q <= w0;
        w2_q <= w0;
        w3_q <= w0;
        y1_q <= y0;
        y2_q <= y0;
      end else begin
        d1_q <= d_new;
        d2_q <= d1_q;
        w1_q <= w0;
        w2_q <= w1_q;
        w3_q <= w2_q;
        y1_q <= y0;
        y2_q <= y1_q;
      end
    end
  end

  assign d_out = d1_q[DUTY_W+D_FRAC-1:D_FRAC];

endmodule
