// Mode arbitration logic of the tri-mode compensator.
//
// Three modes, stepped on the full-rate control tick:
//   Mode I   stand-by     quarter-rate PID
//   Mode II  transient    robust RST
//   Mode III steady state full-rate PID
// Transitions (e_over = |e[n]| > e_th, m = external activity signal):
//   I   -> II   when e_over or m = 1 (load arrives)
//   II  -> III  when !e_over, m = 1 and the time in Mode II exceeds T_TUNE1
//   II  -> I    when !e_over, m = 0 and the time in Mode II exceeds T_TUNE2
//   III -> II   when e_over or m = 0 (unloading)
// otherwise the mode holds. The time in Mode II is a tick counter (the tick
// that enters Mode II counts as the first), so Mode II lasts at least
// T_TUNE + 1 ticks, i.e. strictly longer than the tuning time; m selects
// which tuning time applies, as the activity signal selects between the two
// tuning-time delay chains of the block diagram. Leaving Mode II by the value
// of m (III for m = 1, I for m = 0) is this design's reading of the mode
// sequence I -> II -> III -> II -> I.
//
// Overlapped handover: at every mode change the compensator of the new mode
// is enabled at once, while the output multiplexer keeps the compensator of
// the old mode, which stays enabled, for OVERLAP more ticks: `sel` changes
// on the (OVERLAP+1)-th tick after the tick that changed the mode.
// Entering Mode II the RST runs beside the (quarter) PID before it takes over
// (pre-operation); leaving Mode II the RST keeps the output while the PID
// settles (post-operation). The RST therefore runs for the tuning time plus
// the overlaps. The length of the overlap is this design's parameter.
//
// Outputs are registered and change in the clock after a tick.
module mode_arbiter
  import trimode_pkg::*;
#(
  parameter int unsigned T_TUNE1 = 80,  // ticks: 40 us at a 2 MHz control rate
  parameter int unsigned T_TUNE2 = 80,  // ticks: 40 us at a 2 MHz control rate
  parameter int unsigned OVERLAP = 8    // handover overlap in ticks
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tick,       // full-rate control tick
  input  logic      e_over,     // |e[n]| > e_th
  input  logic      m,          // activity signal
  output mode_e     mode,       // present mode
  output ctrl_sel_e sel,        // compensator driving the DPWM
  output logic      pid_en,     // PID enabled
  output logic      pid_quarter,// PID clocked at quarter rate
  output logic      rst_en      // RST enabled
);

  localparam int TW = $clog2((T_TUNE1 > T_TUNE2 ? T_TUNE1 : T_TUNE2) + 2);
  localparam int OW = $clog2(OVERLAP + 1) + 1;

  mode_e         mode_q, mode_d;
  ctrl_sel_e     sel_q;
  logic [TW-1:0] tune_q;      // ticks spent in Mode II, saturating
  logic [OW-1:0] hand_q;      // remaining handover ticks
  logic          quarter_q;
  logic          tuned;

  initial begin
    assert (OVERLAP < T_TUNE1 && OVERLAP < T_TUNE2)
      else $error("OVERLAP must be shorter than the tuning times");
  end

  always_comb begin
    tuned  = m ? (tune_q > TW'(T_TUNE1)) : (tune_q > TW'(T_TUNE2));
    mode_d = mode_q;
    unique case (mode_q)
      MODE_STANDBY:   if (e_over || m)    mode_d = MODE_TRANSIENT;
      MODE_TRANSIENT: if (!e_over && tuned) mode_d = m ? MODE_STEADY : MODE_STANDBY;
      MODE_STEADY:    if (e_over || !m)   mode_d = MODE_TRANSIENT;
      default:                            mode_d = MODE_STANDBY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= MODE_STANDBY;
      sel_q     <= SEL_PID;
      tune_q    <= '0;
      hand_q    <= '0;
      quarter_q <= 1'b1;
    end else if (tick) begin
      mode_q <= mode_d;
      // tuning-time counter: ticks elapsed in Mode II
      if (mode_d != MODE_TRANSIENT)
        tune_q <= '0;
      else if (mode_q != MODE_TRANSIENT)
        tune_q <= TW'(1);
      else if (tune_q != {TW{1'b1}})
        tune_q <= tune_q + 1'b1;
      // handover: old compensator keeps the output for OVERLAP ticks
      if (mode_d != mode_q) begin
        hand_q <= OW'(OVERLAP);
      end else if (hand_q != '0) begin
        hand_q <= hand_q - 1'b1;
      end else begin
        sel_q <= (mode_q == MODE_TRANSIENT) ? SEL_RST : SEL_PID;
      end
      // the PID rate follows the mode it is entering at once
      if (mode_d != mode_q && mode_d == MODE_STANDBY) quarter_q <= 1'b1;
      if (mode_d != mode_q && mode_d == MODE_STEADY)  quarter_q <= 1'b0;
    end
  end

  always_comb begin
    mode        = mode_q;
    sel         = sel_q;
    pid_en      = (mode_q != MODE_TRANSIENT) || (sel_q == SEL_PID);
    rst_en      = (mode_q == MODE_TRANSIENT) || (sel_q == SEL_RST);
    pid_quarter = quarter_q;
  end

  // The compensator that drives the output is always running.
  a_sel_running: assert property (@(posedge clk) disable iff (!rst_n)
    (sel_q == SEL_PID) ? pid_en : rst_en);

endmodule
