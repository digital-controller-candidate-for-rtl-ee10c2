// Self-checking test of mode_arbiter (T_TUNE1 = 10, T_TUNE2 = 15, OVERLAP = 3).
// Part 1 walks the operating cycle stand-by -> transient -> steady ->
// transient -> stand-by and checks, tick by tick, how long the transient mode
// lasts (T_TUNE + 1 ticks when the error is small), that a large error holds
// it longer, when the output select hands over (OVERLAP + 1 ticks after the
// mode change), the PID rate and the enables.
// Part 2 drives random e_over / m and compares every output with a reference
// model written from the transition rules.
module tb_mode_arbiter;
  import trimode_pkg::*;
  localparam int T1 = 10, T2 = 15, OV = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0, e_over = 0, m = 0;
  mode_e mode;
  ctrl_sel_e sel;
  logic pid_en, pid_quarter, rst_en;

  mode_arbiter #(.T_TUNE1(T1), .T_TUNE2(T2), .OVERLAP(OV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_tick(bit eo, bit mm);
    e_over <= eo; m <= mm; tick <= 1;
    @(posedge clk);
    tick <= 0;
    @(posedge clk);     // a clock without a tick: nothing may change
    @(posedge clk);
    #1;
  endtask

  task automatic expect_state(mode_e md, ctrl_sel_e sl, bit q, string what);
    checks++;
    if (mode !== md || sel !== sl || pid_quarter !== q) begin
      failures++;
      $display("FAIL %s: mode=%s sel=%s quarter=%0b (expected %s %s %0b)",
               what, mode.name(), sel.name(), pid_quarter, md.name(), sl.name(), q);
    end
    checks++;
    if (!(sel == SEL_PID ? pid_en : rst_en)) begin failures++; $display("FAIL %s: selected compensator off", what); end
    checks++;
    if (pid_en !== (mode != MODE_TRANSIENT || sel == SEL_PID) ||
        rst_en !== (mode == MODE_TRANSIENT || sel == SEL_RST)) begin
      failures++; $display("FAIL %s: enables pid=%0b rst=%0b", what, pid_en, rst_en);
    end
  endtask

  // reference model
  mode_e rm_mode; ctrl_sel_e rm_sel; bit rm_q; int rm_t, rm_h;
  task automatic model_tick(bit eo, bit mm);
    mode_e nx;
    nx = rm_mode;
    case (rm_mode)
      MODE_STANDBY:   if (eo || mm) nx = MODE_TRANSIENT;
      MODE_TRANSIENT: if (!eo && (mm ? rm_t > T1 : rm_t > T2)) nx = mm ? MODE_STEADY : MODE_STANDBY;
      MODE_STEADY:    if (eo || !mm) nx = MODE_TRANSIENT;
      default: ;
    endcase
    if (nx != rm_mode) rm_h = OV;
    else if (rm_h > 0) rm_h--;
    else rm_sel = (rm_mode == MODE_TRANSIENT) ? SEL_RST : SEL_PID;
    rm_t = (nx == MODE_TRANSIENT) ? ((rm_mode == MODE_TRANSIENT) ? rm_t + 1 : 1) : 0;
    if (nx != rm_mode && nx == MODE_STANDBY) rm_q = 1;
    if (nx != rm_mode && nx == MODE_STEADY)  rm_q = 0;
    rm_mode = nx;
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    expect_state(MODE_STANDBY, SEL_PID, 1, "after reset");
    for (int i = 0; i < 10; i++) do_tick(0, 0);
    expect_state(MODE_STANDBY, SEL_PID, 1, "idle stand-by");

    // activity: stand-by -> transient; quarter PID keeps the output OV+1 ticks
    do_tick(0, 1);
    expect_state(MODE_TRANSIENT, SEL_PID, 1, "enter transient");
    for (int i = 0; i < OV; i++) begin
      do_tick(0, 1);
      expect_state(MODE_TRANSIENT, SEL_PID, 1, "pre-operation overlap");
    end
    do_tick(0, 1);
    expect_state(MODE_TRANSIENT, SEL_RST, 1, "RST takes over");
    n = OV + 2;
    while (mode == MODE_TRANSIENT && n < 100) begin do_tick(0, 1); n++; end
    checks++;
    if (n != T1 + 1 + 1) begin   // T1+1 ticks in Mode II, plus the tick that leaves
      failures++; $display("FAIL transient lasted %0d ticks, expected %0d", n - 1, T1 + 1);
    end
    expect_state(MODE_STEADY, SEL_RST, 0, "enter steady, post-operation");
    for (int i = 0; i < OV; i++) begin
      do_tick(0, 1);
      expect_state(MODE_STEADY, SEL_RST, 0, "post-operation overlap");
    end
    do_tick(0, 1);
    expect_state(MODE_STEADY, SEL_PID, 0, "PID takes over");
    for (int i = 0; i < 20; i++) do_tick(0, 1);
    expect_state(MODE_STEADY, SEL_PID, 0, "steady state");

    // error excursion in steady state: back to transient, held while error large
    do_tick(1, 1);
    expect_state(MODE_TRANSIENT, SEL_PID, 0, "error wakes transient");
    for (int i = 0; i < 3 * T1; i++) do_tick(1, 1);
    expect_state(MODE_TRANSIENT, SEL_RST, 0, "large error holds transient");
    do_tick(0, 1);
    expect_state(MODE_STEADY, SEL_RST, 0, "error gone, tuned");
    for (int i = 0; i < OV + 2; i++) do_tick(0, 1);

    // unloading: m = 0 -> transient -> stand-by after T2
    do_tick(0, 0);
    expect_state(MODE_TRANSIENT, SEL_PID, 0, "unloading");
    n = 1;
    while (mode == MODE_TRANSIENT && n < 100) begin do_tick(0, 0); n++; end
    checks++;
    if (n != T2 + 1 + 1) begin
      failures++; $display("FAIL unloading transient lasted %0d ticks, expected %0d", n - 1, T2 + 1);
    end
    expect_state(MODE_STANDBY, SEL_RST, 1, "back to stand-by");
    for (int i = 0; i < OV + 1; i++) do_tick(0, 0);
    expect_state(MODE_STANDBY, SEL_PID, 1, "quarter PID takes over");

    // error in stand-by with m = 0 also wakes the transient mode
    do_tick(1, 0);
    expect_state(MODE_TRANSIENT, SEL_PID, 1, "error in stand-by");

    // part 2: random stimulus against the model
    rst_n <= 0; @(posedge clk); rst_n <= 1; @(posedge clk); #1;
    rm_mode = MODE_STANDBY; rm_sel = SEL_PID; rm_q = 1; rm_t = 0; rm_h = 0;
    for (int i = 0; i < 5000; i++) begin
      bit eo, mm;
      eo = ($urandom_range(0, 9) == 0);
      mm = (i / 60) % 2 == 1;
      do_tick(eo, mm);
      model_tick(eo, mm);
      expect_state(rm_mode, rm_sel, rm_q, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
