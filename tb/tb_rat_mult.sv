// tb_rat_mult -- self-checking testbench for the ragged truncated AND-array multiplier.
//
// Exhaustive runs at N = 8 (k=5, l=3: one mirror pair OR-merged), N = 9 (k=6, l=2) and
// N = 10 (k=7, l=1: OR-merge only) check faithful rounding and commutativity of every pair;
// random pairs at N = 12 (k=8, l=8), the default N = 16 (k=12, l=4), N = 24 and N = 32.
// Also checks the closed forms for k and l against hand values (n = 12 -> k = 8, l = 8)
// and against the general ragged-array optimum applied to column heights i+1, and the
// general optimum against a hand-worked array with heights 5,5,8,7,9,9,9,9 (columns 0..7,
// n = 8), for which k = 5 and no bit of column 5 can go.
module tb_rat_mult;
  import frm_pkg::*;

  int checks = 0, failures = 0;

  mult_check #(.N(8),  .SCHEME(SCH_RAT), .EXHAUSTIVE(1)) h8 ();
  mult_check #(.N(9),  .SCHEME(SCH_RAT), .EXHAUSTIVE(1)) h9 ();
  mult_check #(.N(10), .SCHEME(SCH_RAT), .EXHAUSTIVE(1)) h10 ();
  mult_check #(.N(12), .SCHEME(SCH_RAT), .EXHAUSTIVE(0), .NRAND(50000)) h12 ();
  mult_check #(.N(16), .SCHEME(SCH_RAT), .EXHAUSTIVE(0), .NRAND(100000)) h16 ();
  mult_check #(.N(24), .SCHEME(SCH_RAT), .EXHAUSTIVE(0), .NRAND(50000)) h24 ();
  mult_check #(.N(32), .SCHEME(SCH_RAT), .EXHAUSTIVE(0), .NRAND(100000)) h32 ();
  mult_check #(.N(8),  .SCHEME(SCH_RAT), .EXHAUSTIVE(1), .SIGNED(1)) hs8 ();
  mult_check #(.N(16), .SCHEME(SCH_RAT), .EXHAUSTIVE(0), .NRAND(100000), .SIGNED(1)) hs16 ();

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
    expect_eq("k_rat(8)",  k_rat(8),  5);
    expect_eq("l_rat(8)",  l_rat(8),  3);
    expect_eq("k_rat(12)", k_rat(12), 8);
    expect_eq("l_rat(12)", l_rat(12), 8);
    expect_eq("k_rat(16)", k_rat(16), 12);
    expect_eq("l_rat(16)", l_rat(16), 4);
    for (int i = 0; i < MAX_COLS; i++) h[i] = 0;
    h[0] = 5; h[1] = 5; h[2] = 8; h[3] = 7; h[4] = 9; h[5] = 9; h[6] = 9; h[7] = 9;
    expect_eq("k_ragged(example)", k_ragged(h, 8), 5);
    expect_eq("l_ragged(example)", l_ragged(h, 8), 0);
    for (int i = 0; i < MAX_COLS; i++) h[i] = i + 1;
    for (int r = 6; r <= 32; r++) begin
      expect_eq("k_ragged vs k_rat", k_ragged(h, r), k_rat(r));
      expect_eq("l_ragged vs l_rat", l_ragged(h, r), l_rat(r));
    end
    #1;
    wait (h8.done && h9.done && h10.done && h12.done && h16.done && h24.done && h32.done && hs8.done && hs16.done);
    checks   += h8.checks + h9.checks + h10.checks + h12.checks + h16.checks + h24.checks + h32.checks + hs8.checks + hs16.checks;
    failures += h8.failures + h9.failures + h10.failures + h12.failures + h16.failures + h24.failures + h32.failures + hs8.failures + hs16.failures;
    $display("n=8 err [%0d,%0d]  n=9 err [%0d,%0d]  n=10 err [%0d,%0d]", h8.emin, h8.emax, h9.emin, h9.emax, h10.emin, h10.emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
