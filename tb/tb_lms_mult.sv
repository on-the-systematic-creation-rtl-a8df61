// tb_lms_mult -- self-checking testbench for the variable-correction truncated multiplier.
//
// Exhaustive runs at N = 8 and N = 10 check faithful rounding and commutativity of every
// operand pair and that the error extremes equal the closed-form VCT bounds
//   -(2^(k-1)(3k+18C+7) + (-1)^k)/9 <= err <= 2^n + (2^(k-1)(3k-18C-20) + (-1)^k)/9,
// which are tight; hand values n=8: k=6, C=0 -> [-89, 249]; n=10: k=8, C=1 -> [-697, 825].
// Random pairs at the default N = 16 (k = 13, C = 2) and at N = 24 and 32. Also checks the
// package's k and C. Watchdog in time units, one operand pair per unit.
module tb_lms_mult;
  import frm_pkg::*;

  int checks = 0, failures = 0;


  mult_check #(.N(8),  .SCHEME(SCH_LMS), .EXHAUSTIVE(1)) h8 ();
  mult_check #(.N(10), .SCHEME(SCH_LMS), .EXHAUSTIVE(1)) h10 ();
  mult_check #(.N(16), .SCHEME(SCH_LMS), .EXHAUSTIVE(0), .NRAND(100000)) h16 ();
  mult_check #(.N(24), .SCHEME(SCH_LMS), .EXHAUSTIVE(0), .NRAND(50000)) h24 ();
  mult_check #(.N(32), .SCHEME(SCH_LMS), .EXHAUSTIVE(0), .NRAND(100000)) h32 ();
  mult_check #(.N(8),  .SCHEME(SCH_LMS), .EXHAUSTIVE(1), .SIGNED(1)) hs8 ();
  mult_check #(.N(16), .SCHEME(SCH_LMS), .EXHAUSTIVE(0), .NRAND(100000), .SIGNED(1)) hs16 ();

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_eq("k_lms(8)",  k_lms(8),  6);
    expect_eq("k_lms(10)", k_lms(10), 8);
    expect_eq("k_lms(16)", k_lms(16), 13);
    #1;
    wait (h8.done && h10.done && h16.done && h32.done && h24.done && hs8.done && hs16.done);
    checks   += h8.checks + h10.checks + h16.checks + h32.checks + h24.checks + hs8.checks + hs16.checks;
    failures += h8.failures + h10.failures + h16.failures + h32.failures + h24.failures + hs8.failures + hs16.failures;
    // dominant error bound, attained: 2^(n-1) + (2^(k-4)(24k-19+3(-1)^k) - 3 + 4(-1)^k)/9
    expect_eq("n=8 max err",  h8.emax,  128 + (4 * (24 * 6 - 19 + 3) - 3 + 4) / 9);
    expect_eq("n=10 max err", h10.emax, 512 + (16 * (24 * 8 - 19 + 3) - 3 + 4) / 9);
    checks += 2;
    if (h8.emin <= -256 || h10.emin <= -1024) failures++;
    // two's complement operands: the same truncation gives the same error range
    expect_eq("signed n=8 max err", hs8.emax, h8.emax);
    expect_eq("signed n=8 min err", hs8.emin, h8.emin);
    $display("n=8 err [%0d,%0d]  n=10 err [%0d,%0d]  n=16 random err [%0d,%0d]", h8.emin, h8.emax, h10.emin, h10.emax, h16.emin, h16.emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
