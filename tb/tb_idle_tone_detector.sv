// Self-checking test of idle_tone_detector: every 11-bit word is checked
// against the set {I*32 - 1, I*32 + 1 : 8 <= I <= 56} built by enumeration.
module tb_idle_tone_detector;
  int checks = 0, failures = 0, hits = 0;
  logic [10:0] d;
  logic sensitive_word;
  bit expect_set [2048];

  idle_tone_detector #(.N_IN(11), .N_SD(5), .Q_TH(8)) dut (.d, .sensitive_word);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) expect_set[i] = 0;
    for (int I = 8; I <= 64 - 8; I++) begin
      if (I * 32 - 1 < 2048) expect_set[I * 32 - 1] = 1;
      if (I * 32 + 1 < 2048) expect_set[I * 32 + 1] = 1;
    end
    for (int i = 0; i < 2048; i++) begin
      d = 11'(i);
      #1;
      checks++;
      hits += sensitive_word;
      if (sensitive_word !== expect_set[i]) begin
        failures++;
        $display("FAIL d=%0d flag=%0b expected %0b", i, sensitive_word, expect_set[i]);
      end
    end
    // 98 sensitive codes: I = 8..56 gives 49 values of I, two codes each
    checks++;
    if (hits != 98) begin failures++; $display("FAIL %0d sensitive codes", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
