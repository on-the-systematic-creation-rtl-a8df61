// tb_vct_mult -- self-checking testbench for the variable-correction truncated multiplier.
//
// Exhaustive runs at N = 8 and N = 10 check faithful rounding and commutativity of every
// operand pair and that the error extremes equal the closed-form VCT bounds
//   -(2^(k-1)(3k+18C+7) + (-1)^k)/9 <= err <= 2^n + (2^(k-1)(3k-18C-20) + (-1)^k)/9,
// which are tight; hand values n=8: k=6, C=0 -> [-89, 249]; n=10: k=8, C=1 -> [-697, 825].
// Random pairs at the default N = 16 (k = 13, C = 2) and at N = 24 and 32. Also checks the
// package's k and C. At N = 16 it also applies the worst-case operand family: low bits
// a[12:0] = 0101010101011, b[12:0] = 0010101010101 (and the swap), with every value of the
// three high bits of each operand. The error must never exceed the bound 57799, and it
// must reach it for exactly one b[15:13] per a[15:13]: 2^(n-k+1) = 16 vectors in all.
// Watchdog in time units, one operand pair per unit.
module tb_vct_mult;
  import frm_pkg::*;

  int checks = 0, failures = 0;


  mult_check #(.N(8),  .SCHEME(SCH_VCT), .EXHAUSTIVE(1)) h8 ();
  mult_check #(.N(10), .SCHEME(SCH_VCT), .EXHAUSTIVE(1)) h10 ();
  mult_check #(.N(16), .SCHEME(SCH_VCT), .EXHAUSTIVE(0), .NRAND(100000)) h16 ();
  mult_check #(.N(24), .SCHEME(SCH_VCT), .EXHAUSTIVE(0), .NRAND(50000)) h24 ();
  mult_check #(.N(32), .SCHEME(SCH_VCT), .EXHAUSTIVE(0), .NRAND(100000)) h32 ();
  mult_check #(.N(8),  .SCHEME(SCH_VCT), .EXHAUSTIVE(1), .SIGNED(1)) hs8 ();
  mult_check #(.N(16), .SCHEME(SCH_VCT), .EXHAUSTIVE(0), .NRAND(100000), .SIGNED(1)) hs16 ();

  // Worst-case family at N = 16 (k = 13, C = 2).
  logic [15:0] wa, wb, wy;
  int          hits, per_a;
  longint      err, wmax;
  vct_mult #(.N(16)) uw (.a(wa), .b(wb), .y(wy));

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
    expect_eq("k_vct(8)",  k_vct(8),  6);
    expect_eq("c_vct(8)",  c_vct(8),  0);
    expect_eq("k_vct(10)", k_vct(10), 8);
    expect_eq("c_vct(10)", c_vct(10), 1);
    expect_eq("k_vct(16)", k_vct(16), 13);
    expect_eq("c_vct(16)", c_vct(16), 2);
    wa = '0;
    wb = '0;
    begin
      hits = 0;
      wmax = 0;
      for (int sw = 0; sw < 2; sw++)
        for (int ah = 0; ah < 8; ah++) begin
          per_a = 0;
          for (int bh = 0; bh < 8; bh++) begin
            wa = {3'(ah), (sw == 0) ? 13'b0101010101011 : 13'b0010101010101};
            wb = {3'(bh), (sw == 0) ? 13'b0010101010101 : 13'b0101010101011};
            #1;
            err = longint'(wa) * longint'(wb) - (longint'(wy) << 16);
            if (err > wmax) wmax = err;
            if (err == 57799) begin hits++; per_a++; end
          end
          expect_eq("worst-case vectors per high part of a", longint'(per_a), 1);
          if (sw == 1 && ah == 7) begin
            expect_eq("worst-case vectors at n=16", longint'(hits), 16);
            expect_eq("largest error in the worst-case family", wmax, 57799);
          end
        end
    end
    #1;
    wait (h8.done && h10.done && h16.done && h32.done && h24.done && hs8.done && hs16.done);
    checks   += h8.checks + h10.checks + h16.checks + h32.checks + h24.checks + hs8.checks + hs16.checks;
    failures += h8.failures + h10.failures + h16.failures + h32.failures + h24.failures + hs8.failures + hs16.failures;
    expect_eq("n=8 max err",  h8.emax,  249);
    expect_eq("n=8 min err",  h8.emin,  -89);
    expect_eq("n=10 max err", h10.emax, 825);
    expect_eq("n=10 min err", h10.emin, -697);
    // two's complement operands: the same truncation gives the same error range
    expect_eq("signed n=8 max err", hs8.emax, h8.emax);
    expect_eq("signed n=8 min err", hs8.emin, h8.emin);
    $display("n=8 err [%0d,%0d]  n=10 err [%0d,%0d]  n=16 random err [%0d,%0d]", h8.emin, h8.emax, h10.emin, h10.emax, h16.emin, h16.emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
