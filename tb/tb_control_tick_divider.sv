// Self-checking test of control_tick_divider: period pulses arrive every
// PERIOD clocks; the quarter tick must fall on every fourth pulse and the PID
// tick must follow the selected rate.
module tb_control_tick_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, period_start = 0, quarter = 0;
  logic tick_full, tick_quarter, tick_pid;
  int pulses = 0, nq = 0, nfull = 0, npid = 0;

  control_tick_divider #(.DIV(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 400; p++) begin
      quarter <= (p >= 200);
      repeat (4) @(posedge clk);
      period_start <= 1;
      @(negedge clk);
      // combinational outputs during the pulse
      checks++;
      if (tick_full !== 1'b1) begin failures++; $display("FAIL full tick missing at %0d", p); end
      checks++;
      if (tick_quarter !== (pulses % 4 == 0)) begin
        failures++; $display("FAIL quarter tick at pulse %0d", pulses);
      end
      checks++;
      if (tick_pid !== (quarter ? (pulses % 4 == 0) : 1'b1)) begin
        failures++; $display("FAIL pid tick at pulse %0d", pulses);
      end
      nq += tick_quarter;
      pulses++;
      @(posedge clk);
      period_start <= 0;
      @(negedge clk);
      checks++;
      if (tick_full || tick_quarter || tick_pid) begin failures++; $display("FAIL tick without pulse"); end
    end
    checks++;
    if (nq != 100) begin failures++; $display("FAIL quarter ticks %0d, expected 100", nq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
