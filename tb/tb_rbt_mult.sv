// tb_rbt_mult -- self-checking testbench for the ragged truncated radix-4 Booth multiplier.
//
// Exhaustive runs at N = 8 (k=6, l=0), N = 9 (k=6, l=4) and N = 10 (k=7, l=3) check
// faithful rounding of every operand pair; random pairs at the default N = 16 (k=13, l=0),
// N = 24 (k=20, l=5) and N = 32. The array is not symmetric in a and b, and the test
// requires that at N = 16 some pair gives f(a,b) != f(b,a). Also checks the closed forms for
// k and l against hand values and against the general ragged-array optimum applied to the
// Booth column heights (m+2 in column 2m, m+1 in column 2m+1).
module tb_rbt_mult;
  import frm_pkg::*;

  int checks = 0, failures = 0;

  mult_check #(.N(8),  .SCHEME(SCH_RBT), .EXHAUSTIVE(1), .CHECK_COMM(0)) h8 ();
  mult_check #(.N(9),  .SCHEME(SCH_RBT), .EXHAUSTIVE(1), .CHECK_COMM(0)) h9 ();
  mult_check #(.N(10), .SCHEME(SCH_RBT), .EXHAUSTIVE(1), .CHECK_COMM(0)) h10 ();
  mult_check #(.N(16), .SCHEME(SCH_RBT), .EXHAUSTIVE(0), .NRAND(200000), .CHECK_COMM(0)) h16 ();
  mult_check #(.N(24), .SCHEME(SCH_RBT), .EXHAUSTIVE(0), .NRAND(100000), .CHECK_COMM(0)) h24 ();
  mult_check #(.N(32), .SCHEME(SCH_RBT), .EXHAUSTIVE(0), .NRAND(100000), .CHECK_COMM(0)) h32 ();

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
    heights_t h;
    expect_eq("k_rbt(8)",  k_rbt(8),  6);
    expect_eq("l_rbt(8)",  l_rbt(8),  0);
    expect_eq("k_rbt(10)", k_rbt(10), 7);
    expect_eq("l_rbt(10)", l_rbt(10), 3);
    expect_eq("k_rbt(16)", k_rbt(16), 13);
    expect_eq("l_rbt(16)", l_rbt(16), 0);
    expect_eq("k_rbt(24)", k_rbt(24), 20);
    expect_eq("l_rbt(24)", l_rbt(24), 5);
    for (int i = 0; i < MAX_COLS; i++) h[i] = (i % 2 == 0) ? i / 2 + 2 : i / 2 + 1;
    for (int r = 6; r <= 32; r++) begin
      expect_eq("k_ragged vs k_rbt", k_ragged(h, r), k_rbt(r));
      expect_eq("l_ragged vs l_rbt", l_ragged(h, r), l_rbt(r));
    end
    #1;
    wait (h8.done && h9.done && h10.done && h16.done && h24.done && h32.done);
    checks   += h8.checks + h9.checks + h10.checks + h16.checks + h24.checks + h32.checks;
    failures += h8.failures + h9.failures + h10.failures + h16.failures + h24.failures + h32.failures;
    checks++;
    if (h16.n_asym == 0) begin
      failures++;
      $display("FAIL Booth array never showed an asymmetric result");
    end
    $display("n=8 err [%0d,%0d]  n=9 err [%0d,%0d]  n=10 err [%0d,%0d]  asymmetric pairs at n=16: %0d",
             h8.emin, h8.emax, h9.emin, h9.emax, h10.emin, h10.emax, h16.n_asym);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
