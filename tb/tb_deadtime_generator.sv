// Self-checking test of deadtime_generator: a random PWM-like input; each
// gate must be on exactly when c has been sampled at its level on the last
// DT+1 clock edges, and the gates must never overlap.
module tb_deadtime_generator;
  localparam int DT = 3;
  int checks = 0, failures = 0, dead_cycles = 0;
  logic clk = 0, rst_n = 0, c = 0;
  logic gate_hs, gate_ls;
  logic [DT:0] hist = '0;   // c sampled at the last DT+1 edges

  deadtime_generator #(.DT(DT)) dut (.clk, .rst_n, .c, .gate_hs, .gate_ls);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hold;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    hist = {(DT+1){1'b0}};
    for (int k = 0; k < 20000; k++) begin
      if (k % 4 == 0 && $urandom_range(0, 3) == 0) c <= ~c;
      @(posedge clk);
      hist = {hist[DT-1:0], c};
      #1;
      if (k > DT + 2) begin
        checks++;
        if (gate_hs !== (&hist) || gate_ls !== (~|hist)) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d hist=%b hs=%b ls=%b", k, hist, gate_hs, gate_ls);
        end
        checks++;
        if (gate_hs && gate_ls) failures++;
        if (!gate_hs && !gate_ls) dead_cycles++;
      end
    end
    checks++;
    if (dead_cycles == 0) begin failures++; $display("FAIL no dead time seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
