// Self-checking test of error_comparator: random and corner ADC codes; the
// expected error and threshold flag are computed with plain integers.
module tb_error_comparator;
  import trimode_pkg::*;

  int checks = 0, failures = 0;
  adc_t vref, vo, e_th;
  err_t e;
  logic e_over;

  error_comparator dut (.vref, .vo, .e_th, .e, .e_over);

  task automatic check_one(int r, int o, int th);
    int exp_e, mag;
    vref = adc_t'(r); vo = adc_t'(o); e_th = adc_t'(th);
    #1;
    exp_e = r - o;
    mag   = exp_e < 0 ? -exp_e : exp_e;
    checks++;
    if (int'(e) != exp_e || e_over != (mag > th)) begin
      failures++;
      $display("FAIL vref=%0d vo=%0d th=%0d: e=%0d over=%0b", r, o, th, e, e_over);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(768, 768, 0);
    check_one(768, 760, 8);   // exactly at threshold: not over
    check_one(768, 759, 8);   // one above
    check_one(760, 768, 8);
    check_one(759, 768, 8);   // negative side
    check_one(0, 1023, 1022);
    check_one(1023, 0, 1023);
    for (int i = 0; i < 3000; i++)
      check_one($urandom_range(0, 1023), $urandom_range(0, 1023), $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
