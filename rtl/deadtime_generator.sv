// Dead-time generator for the synchronous buck power switches.
//
// Splits the DPWM output c(t) into a high-side gate (on while c = 1) and a
// low-side gate (on while c = 0). Each gate switches off in the clock after
// its phase of c ends, but switches on only once c has held the new level
// for DT clocks, so the two switches are never on together and a dead time of
// DT clocks separates them. A phase of c lasting DT clocks or fewer leaves both
// gates off. The block is only named in the controller's block diagram; its
// inside (counter per phase, dead time in system clocks) is this design's
// own. Outputs are registered: one clock of latency behind c.
module deadtime_generator #(
  parameter int unsigned DT = 2   // dead time in system clocks (>= 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic c,        // PWM from the DPWM
  output logic gate_hs,  // high-side switch gate
  output logic gate_ls   // low-side (synchronous rectifier) gate
);

  localparam int CW = $clog2(DT + 1);

  logic          c_q;
  logic [CW-1:0] run_q;   // clocks c has held its present level, saturating

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q     <= 1'b0;
      run_q   <= '0;
      gate_hs <= 1'b0;
      gate_ls <= 1'b0;
    end else begin
      c_q <= c;
      if (c != c_q)
        run_q <= '0;
      else if (run_q != CW'(DT))
        run_q <= run_q + 1'b1;
      gate_hs <= c  && (c == c_q) && (run_q >= CW'(DT - 1));
      gate_ls <= !c && (c == c_q) && (run_q >= CW'(DT - 1));
    end
  end

  // The two gates must never be on at once.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(gate_hs && gate_ls));

endmodule
