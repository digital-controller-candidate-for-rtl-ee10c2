// Self-checking test of sigma_delta_dpwm (11-bit word, 5 shaped bits, 6-bit
// counter).
//  * Each period the number of clocks with c = 1 must equal the word v.
//  * v must match an integer model of the second-order error-feedback loop
//    u = d - 2E[n-1] + E[n-2], v = floor(u/32), E = 32v - u.
//  * Over many periods sum(32*v) - N*d must stay bounded (noise shaping keeps
//    the average equal to d).
//  * A word on a multiple of 32 (992 = 31*32) must give the constant word 31.
//  * period_start must repeat every 64 clocks.
module tb_sigma_delta_dpwm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [10:0] d = '0;
  logic c, period_start;
  logic [5:0] v;

  sigma_delta_dpwm #(.N_IN(11), .N_SD(5), .ORDER(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model and period monitor -------------------------------
  int e1 = 0, e2 = 0;        // model E[n-1], E[n-2]
  int model_v = 0;           // model word of the running period
  int highs = 0, cyc = 0;    // high clocks / clocks of the running period
  int prev_v = 0;            // DUT word of the running period
  logic [10:0] d_last = '0;  // d seen in the previous clock
  bit started = 0, expect_const = 0, track = 0;
  int const_v = 0;
  longint sum_err = 0;
  int periods = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (period_start) begin
        if (started) begin
          checks++;
          if (cyc != 64) begin failures++; $display("FAIL period length %0d", cyc); end
          checks++;
          if (highs != prev_v) begin
            failures++;
            if (failures < 10) $display("FAIL highs=%0d v=%0d", highs, prev_v);
          end
        end
        // model step with the word of the last clock of the period
        begin
          int u;
          u = int'(d_last) - 2 * e1 + e2;
          if (u < 0) u = 0;
          if (u > 2047) u = 2047;
          e2 = e1;
          e1 = 32 * (u / 32) - u;
          model_v = u / 32;
        end
        checks++;
        if (int'(v) != model_v) begin
          failures++;
          if (failures < 10) $display("FAIL v=%0d model=%0d d=%0d", v, model_v, d_last);
        end
        if (expect_const) begin
          checks++;
          if (int'(v) != const_v) begin failures++; $display("FAIL v=%0d, constant %0d expected", v, const_v); end
        end
        if (track) sum_err += 32 * longint'(v) - longint'(d_last);
        prev_v  = int'(v);
        highs   = 0;
        cyc     = 0;
        started = 1;
        periods++;
      end
      highs += c;
      cyc++;
      d_last = d;
    end
  end

  // hold word dw for n periods; with check_avg the running error
  // sum(32 v - d) must stay within a few quantization steps
  task automatic run_word(int dw, int n, bit check_avg);
    d = 11'(dw);
    repeat (3) @(posedge period_start);   // let the loop settle on the new word
    sum_err = 0;
    track = check_avg;
    repeat (n) @(posedge period_start);
    track = 0;
    if (check_avg) begin
      checks++;
      if (sum_err > 128 || sum_err < -128) begin
        failures++; $display("FAIL running error %0d at d=%0d", sum_err, dw);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_word(992, 4, 0);
    expect_const = 1; const_v = 31;
    run_word(992, 40, 1);
    expect_const = 0;
    run_word(1025, 300, 1);
    run_word(1024, 50, 1);
    run_word(1500, 300, 1);
    for (int k = 0; k < 20; k++) run_word($urandom_range(64, 1983), 60, 1);
    run_word(2047, 50, 0);
    run_word(0, 50, 0);
    checks++;
    if (periods < 1500) begin failures++; $display("FAIL only %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
