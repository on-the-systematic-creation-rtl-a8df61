// tb_cct_mult -- self-checking testbench for the constant-correction truncated multiplier.
//
// 1. Exhaustive runs at N = 8 and N = 10 check faithful rounding and commutativity of every
//    operand pair, and that the largest and smallest errors seen are exactly the closed-form
//    CCT bounds  -C*2^k <= err <= 2^n - (C-k+2)*2^k + 1  (the bounds are tight), with k and
//    C worked out by hand: n=8: k=5, C=4; n=10: k=7, C=6.
// 2. At the default N = 16 (k = 12, C = 12, since 2C-k+1 < 2^(n-k) the worst error is the
//    positive one) every one of the 2^(n-k) worst-case operand pairs is built from its
//    closed form -- low k bits of a and b all ones, a's top bits free, b's top bits
//    -p*(2^k + C - k + a_top*(2^k-1)) mod 2^(n-k) with p*a = 1 mod 2^(n-k) -- and the error
//    must equal the bound 57345 exactly.
// 3. Random pairs at N = 16, 24 and 32.
// Also checks the package's k and C against hand values. All combinational, so the
// watchdog counts time units (one operand pair each).
module tb_cct_mult;
  import frm_pkg::*;

  int checks = 0, failures = 0;


  mult_check #(.N(8),  .SCHEME(SCH_CCT), .EXHAUSTIVE(1)) h8 ();
  mult_check #(.N(10), .SCHEME(SCH_CCT), .EXHAUSTIVE(1)) h10 ();
  mult_check #(.N(16), .SCHEME(SCH_CCT), .EXHAUSTIVE(0), .NRAND(100000)) h16 ();
  mult_check #(.N(24), .SCHEME(SCH_CCT), .EXHAUSTIVE(0), .NRAND(50000)) h24 ();
  mult_check #(.N(32), .SCHEME(SCH_CCT), .EXHAUSTIVE(0), .NRAND(100000)) h32 ();
  mult_check #(.N(8),  .SCHEME(SCH_CCT), .EXHAUSTIVE(1), .SIGNED(1)) hs8 ();
  mult_check #(.N(16), .SCHEME(SCH_CCT), .EXHAUSTIVE(0), .NRAND(100000), .SIGNED(1)) hs16 ();

  // default-size instance for the worst-case vectors
  logic [15:0] wa, wb, wy;
  cct_mult dut (.a(wa), .b(wb), .y(wy));

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
    longint n, k, c, p, ahi, bhi, err;
    expect_eq("k_cct(8)",  k_cct(8),  5);
    expect_eq("c_cct(8)",  c_cct(8),  4);
    expect_eq("k_cct(10)", k_cct(10), 7);
    expect_eq("c_cct(10)", c_cct(10), 6);
    expect_eq("k_cct(16)", k_cct(16), 12);
    expect_eq("c_cct(16)", c_cct(16), 12);
    expect_eq("min_hamm(11,15)", min_hamm(11, 15), 12);
    expect_eq("min_hamm(2,5)",   min_hamm(2, 5), 2);
    expect_eq("min_hamm(5,7)",   min_hamm(5, 7), 5);
    // min_hamm against a brute-force search
    for (int lo = 0; lo < 40; lo++)
      for (int hi = lo; hi < 40; hi++) begin
        int best;
        best = hi;
        for (int v = hi; v >= lo; v--)
          if (popcount(v) <= popcount(best)) best = v;
        expect_eq("min_hamm brute", min_hamm(lo, hi), longint'(best));
      end

    // worst-case error vectors at n = 16
    n = 16; k = 12; c = 12;
    for (ahi = 0; ahi < 16; ahi++) begin
      longint av;
      av = (ahi << k) + (longint'(1) << k) - 1;
      p = 0;
      for (longint t = 0; t < 16; t++) if (((t * av) & 15) == 1) p = t;
      bhi = (-(p * ((longint'(1) << k) + c - k + ahi * ((longint'(1) << k) - 1)))) & 15;
      wa = 16'(av);
      wb = 16'((bhi << k) + (longint'(1) << k) - 1);
      #1;
      err = longint'(wa) * longint'(wb) - (longint'(wy) << 16);
      expect_eq("CCT worst-case vector error", err, (longint'(1) << n) - (c - k + 2) * (longint'(1) << k) + 1);
    end

    #1;
    wait (h8.done && h10.done && h16.done && h32.done && h24.done && hs8.done && hs16.done);
    checks   += h8.checks + h10.checks + h16.checks + h32.checks + h24.checks + hs8.checks + hs16.checks;
    failures += h8.failures + h10.failures + h16.failures + h32.failures + h24.failures + hs8.failures + hs16.failures;
    // tight bounds, exhaustive sizes
    expect_eq("n=8 max err",  h8.emax,  256 - (4 - 5 + 2) * 32 + 1);
    expect_eq("n=8 min err",  h8.emin,  -4 * 32);
    expect_eq("n=10 max err", h10.emax, 1024 - (6 - 7 + 2) * 128 + 1);
    expect_eq("n=10 min err", h10.emin, -6 * 128);
    // two's complement operands: the same truncation gives the same error range
    expect_eq("signed n=8 max err", hs8.emax, h8.emax);
    expect_eq("signed n=8 min err", hs8.emin, h8.emin);
    $display("n=8 err [%0d,%0d]  n=10 err [%0d,%0d]  n=16 random err [%0d,%0d]", h8.emin, h8.emax, h10.emin, h10.emax, h16.emin, h16.emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
