// Control-clock frequency divider.
//
// The compensators run once per switching period. This block receives the
// DPWM's period-start pulse (one clock wide) and produces:
//   * tick_full    - the full-rate control tick (every period),
//   * tick_quarter - every DIV-th period (DIV = 4: the quarter-rate clock of
//                    the stand-by PID),
//   * tick_pid     - the tick that clocks the PID compensator, chosen by
//                    `quarter` (1 = stand-by, quarter rate).
// The published controller divides the clock itself; here the whole design
// runs on one system clock and the divided "clock" is a clock-enable pulse,
// which is this design's choice. Outputs are combinational from the period
// pulse and a registered modulo-DIV period counter; the quarter tick falls on
// the period where the counter is zero.
module control_tick_divider
  import trimode_pkg::*;
#(
  parameter int unsigned DIV = 4  // division ratio of the stand-by clock
) (
  input  logic clk,
  input  logic rst_n,
  input  logic period_start,  // one-clock pulse per switching period
  input  logic quarter,       // 1: PID is clocked at 1/DIV rate
  output logic tick_full,
  output logic tick_quarter,
  output logic tick_pid
);

  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt_q <= '0;
    else if (period_start)
      cnt_q <= (cnt_q == CW'(DIV - 1)) ? '0 : cnt_q + 1'b1;
  end

  always_comb begin
    tick_full    = period_start;
    tick_quarter = period_start && (cnt_q == '0);
    tick_pid     = quarter ? tick_quarter : tick_full;
  end

endmodule
