// Sigma-delta digital pulse-width modulator.
//
// An N_IN-bit duty word is reduced to an M = N_IN - N_SD bit word by an
// error-feedback sigma-delta modulator, and that word drives an M-bit
// counter-comparator PWM. Over several switching periods the average of the
// M-bit words equals the N_IN-bit input, so an M-bit counter gives N_IN-bit
// equivalent resolution (11-bit duty on a 6-bit counter: 64 system clocks per
// switching period).
//
// Modulator (one step per switching period):
//     u[n] = d[n] - sum_k h_k E[n-k]          (error feedback, filter H_e)
//     v[n] = floor(sat(u[n]) / 2**N_SD)      (range limit, then quantize)
//     E[n] = v[n]*2**N_SD - sat(u[n])        (quantization error, -2**N_SD < E <= 0)
// so V(z) = D(z) + (1 - H_e(z)) E(z). ORDER = 1 uses H_e = z^-1 (NTF 1 - z^-1),
// ORDER = 2 uses H_e = 2z^-1 - z^-2 (NTF (1 - z^-1)^2), the order chosen for
// the controller. The first-order option and the saturation range [0,
// 2**N_IN - 1] are this design's choices.
//
// PWM: the counter runs 0 .. 2**M - 1. c is high while counter < v, so the
// duty of a period is v / 2**M. In the last clock of each period the
// modulator steps with the d presented then and the new word takes effect
// from the next counter zero. period_start is high in the counter-zero clock
// and is the sampling / control tick of the rest of the controller.
module sigma_delta_dpwm
  import trimode_pkg::*;
#(
  parameter int unsigned N_IN  = DUTY_W,   // n: duty word bits (11)
  parameter int unsigned N_SD  = SD_BITS,  // n - m: bits handled by the modulator (5)
  parameter int unsigned ORDER = 2         // noise-shaping order, 1 or 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IN-1:0]   d,             // duty word d_c[n]
  output logic              c,             // PWM output c(t)
  output logic              period_start,  // first clock of a switching period
  output logic [N_IN-N_SD-1:0] v           // modulated word of this period
);

  localparam int unsigned M  = N_IN - N_SD;
  localparam int unsigned UW = N_IN + 3;   // room for d + 3*2**N_SD, signed

  logic [M-1:0]          cnt_q;
  logic [M-1:0]          v_q;
  logic signed [N_SD:0]  e1_q, e2_q;       // E[n-1], E[n-2]
  logic signed [UW-1:0]  u, u_sat;
  logic signed [N_SD:0]  e_new;
  logic [M-1:0]          v_new;
  logic                  period_end;

  initial begin
    assert (ORDER == 1 || ORDER == 2) else $error("ORDER must be 1 or 2");
    assert (N_SD >= 1 && N_SD < N_IN) else $error("bad N_SD");
  end

  always_comb begin
    if (ORDER == 1)
      u = $signed({3'b000, d}) - UW'(e1_q);
    else
      u = $signed({3'b000, d}) - (UW'(e1_q) <<< 1) + UW'(e2_q);
    if (u < 0)
      u_sat = '0;
    else if (u > $signed(UW'((1 << N_IN) - 1)))
      u_sat = UW'((1 << N_IN) - 1);
    else
      u_sat = u;
    v_new = u_sat[N_IN-1:N_SD];
    e_new = -$signed({1'b0, u_sat[N_SD-1:0]});
  end

  assign period_end = (cnt_q == {M{1'b1}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      v_q   <= '0;
      e1_q  <= '0;
      e2_q  <= '0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (period_end) begin
        v_q  <= v_new;
        e1_q <= e_new;
        e2_q <= e1_q;
      end
    end
  end

  assign c            = (cnt_q < v_q);
  assign period_start = (cnt_q == '0);
  assign v            = v_q;

endmodule
