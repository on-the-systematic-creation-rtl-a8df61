// tb_ragged_sum -- self-checking testbench for the ragged truncation of an arbitrary array.
//
// Four arrays, each through a ragged_check harness:
//   ha  the default 18-column example array rounded at R = 8 (k = 5, l = 0, dmax = 247);
//   hb  the 8 x 8 AND array (heights 1..8..1, R = 8: k = 5, l = 3);
//   hc  a single row of 12 bits rounded at R = 6 (every low column fits: plain truncation,
//       so y must be exactly floor(F / 64));
//   hd  the low columns of a radix-4 Booth array (heights 2,1,3,2,...), R = 10, with six
//       further columns on top.
// Each harness checks the removed bit count against its own greedy optimum, the error
// range -(2^R - 2^k) <= err <= dmax over random and extreme bit patterns, and that the
// upper end is reached. The hand values for ha and hb are checked as well.
module tb_ragged_sum;
  import frm_pkg::*;

  int checks = 0, failures = 0;

  ragged_check #(.R(8), .NCOL(18),
                 .H('{0: 5, 1: 5, 2: 8, 3: 7, 4: 9, 5: 9, 6: 9, 7: 9, 8: 9, 9: 9, 10: 8,
                      11: 6, 12: 4, 13: 3, 14: 2, 15: 2, 16: 2, 17: 2, default: 0}),
                 .NVEC(100000)) ha ();
  ragged_check #(.R(8), .NCOL(15),
                 .H('{0: 1, 1: 2, 2: 3, 3: 4, 4: 5, 5: 6, 6: 7, 7: 8, 8: 7, 9: 6, 10: 5,
                      11: 4, 12: 3, 13: 2, 14: 1, default: 0}),
                 .NVEC(100000)) hb ();
  ragged_check #(.R(6), .NCOL(12), .H('{default: 1}), .NVEC(50000)) hc ();
  ragged_check #(.R(10), .NCOL(16),
                 .H('{0: 2, 1: 1, 2: 3, 3: 2, 4: 4, 5: 3, 6: 5, 7: 4, 8: 6, 9: 5, 10: 6,
                      11: 6, 12: 5, 13: 5, 14: 4, 15: 3, default: 0}),
                 .NVEC(100000)) hd ();

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
    #1;
    wait (ha.done && hb.done && hc.done && hd.done);
    expect_eq("example k", longint'(ha.ref_k), 5);
    expect_eq("example l", longint'(ha.ref_l), 0);
    expect_eq("example dmax", ha.dmax, 247);
    expect_eq("AND 8x8 k", longint'(hb.ref_k), 5);
    expect_eq("AND 8x8 l", longint'(hb.ref_l), 3);
    expect_eq("row k", longint'(hc.ref_k), 6);
    checks++;
    if (hc.emin < 0) begin
      failures++;
      $display("FAIL plain truncation rounded up");
    end
    checks   += ha.checks + hb.checks + hc.checks + hd.checks;
    failures += ha.failures + hb.failures + hc.failures + hd.failures;
    $display("err ranges: example [%0d,%0d]  AND [%0d,%0d]  row [%0d,%0d]  Booth [%0d,%0d] (k=%0d l=%0d)",
             ha.emin, ha.emax, hb.emin, hb.emax, hc.emin, hc.emax, hd.emin, hd.emax, hd.ref_k, hd.ref_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
