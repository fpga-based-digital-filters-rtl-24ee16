// tb_bsf_pkg: checks the helper functions of the shared package: the table
// width m + ceil(log2 N) for the table sizes used by the filters (11 bits for
// the 5-coefficient notch table, 10 for a 4-coefficient table, 8 for one
// coefficient), and the sum and maximum over section lists, which place each
// sub-filter's coefficients.
module tb_bsf_pkg;
  import bsf_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    sec_arr_t s;
    expect_eq(lut_width(5), 11, "lut_width(5)");
    expect_eq(lut_width(4), 10, "lut_width(4)");
    expect_eq(lut_width(3), 10, "lut_width(3)");
    expect_eq(lut_width(2), 9, "lut_width(2)");
    expect_eq(lut_width(1), 8, "lut_width(1)");
    expect_eq(lut_width(9), 12, "lut_width(9)");
    s = '{0: 4, 1: 4, 2: 4, 3: 3, default: 0};
    expect_eq(sec_sum(s, 0), 0, "sec_sum 0");
    expect_eq(sec_sum(s, 2), 8, "sec_sum 2");
    expect_eq(sec_sum(s, 4), 15, "sec_sum 4");
    expect_eq(sec_max(s, 4), 4, "sec_max 4");
    s = '{0: 1, 1: 2, 2: 7, default: 0};
    expect_eq(sec_max(s, 2), 2, "sec_max 2");
    expect_eq(sec_max(s, 3), 7, "sec_max 3");
    expect_eq(SAMPLE_W, 8, "SAMPLE_W");
    expect_eq(COEF_M, 8, "COEF_M");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
