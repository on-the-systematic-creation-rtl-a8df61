// ragged_check -- self-checking stimulus harness for one ragged_sum instance (testbench
// use only).
//
// Works out, with its own loop, which bits an optimal ragged truncation of the array may
// remove: all of columns 0..k-1 and l bits of column k, the largest set whose value dmax
// stays below 2^R. It checks that the instance removes the same number of bits (its K and L
// by hierarchical name), then applies NVEC bit patterns, one per time unit, cycling through
// five kinds: all random; removed bits one and the rest random; all ones; all zeros; removed
// bits one and the rest zero. Bits above a column's height get random values, which the
// instance must ignore. For each pattern it forms the full sum F and checks
//     -(2^R - 2^k) <= err = F - y*2^R <= dmax,
// the error range of the truncation, which lies inside the faithful range (-2^R, 2^R). The
// last kind must reach the upper end exactly. Results are read by hierarchical name.
module ragged_check
  import frm_pkg::*;
#(
  parameter int       R    = 8,
  parameter int       NCOL = 18,
  parameter heights_t H    = '{default: 1},
  parameter int       NVEC = 10000
) ();

  localparam int HMAX = max_height(H, NCOL);
  localparam int TW   = array_width(H, NCOL, R);

  logic            done;
  int              checks;
  int              failures;
  int              n_top;      // patterns whose error reached dmax
  longint          emax;
  longint          emin;
  int              ref_k;
  int              ref_l;
  longint          dmax;

  logic [HMAX-1:0] col [NCOL];
  logic [TW-R-1:0] y;

  ragged_sum #(.R(R), .NCOL(NCOL), .H(H)) dut (.col(col), .y(y));

  initial begin
    longint s, f, err, lo;
    int     kind;
    logic   removed;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    n_top    = 0;
    emax     = -(longint'(1) << 62);
    emin     =  (longint'(1) << 62);

    // Greedy removal from the least significant column up: optimal for the bit count.
    s     = 0;
    ref_k = 0;
    while (ref_k < R && s + longint'(H[ref_k]) * (longint'(1) << ref_k) < (longint'(1) << R)) begin
      s += longint'(H[ref_k]) * (longint'(1) << ref_k);
      ref_k++;
    end
    ref_l = 0;
    if (ref_k < R)
      while (ref_l < H[ref_k] && s + (longint'(ref_l) + 1) * (longint'(1) << ref_k) < (longint'(1) << R))
        ref_l++;
    dmax = s + longint'(ref_l) * (longint'(1) << ref_k);
    lo   = (longint'(1) << ref_k) - (longint'(1) << R);

    checks++;
    if (dut.K != ref_k || dut.L != ref_l) begin
      failures++;
      $display("FAIL R=%0d: removes k=%0d l=%0d, optimum k=%0d l=%0d", R, dut.K, dut.L, ref_k, ref_l);
    end

    for (int v = 0; v < NVEC; v++) begin
      kind = v % 5;
      for (int i = 0; i < NCOL; i++)
        for (int j = 0; j < HMAX; j++) begin
          removed = (i < ref_k) || (i == ref_k && j < ref_l);
          if (j >= H[i]) col[i][j] = 1'($urandom);
          else case (kind)
            0:       col[i][j] = 1'($urandom);
            1:       col[i][j] = removed ? 1'b1 : 1'($urandom);
            2:       col[i][j] = 1'b1;
            3:       col[i][j] = 1'b0;
            default: col[i][j] = removed;
          endcase
        end
      #1;
      f = 0;
      for (int i = 0; i < NCOL; i++)
        for (int j = 0; j < H[i]; j++)
          f += longint'(col[i][j]) << i;
      err = f - (longint'(y) << R);
      checks++;
      if (err > dmax || err < lo) begin
        failures++;
        if (failures <= 5)
          $display("FAIL R=%0d NCOL=%0d pattern %0d: sum=%0d y=%0d err=%0d outside [%0d,%0d]",
                   R, NCOL, v, f, y, err, lo, dmax);
      end
      if (err == dmax) n_top++;
      if (kind == 4) begin
        checks++;
        if (err != dmax) begin
          failures++;
          if (failures <= 5)
            $display("FAIL R=%0d: removed bits alone give err=%0d, expected %0d", R, err, dmax);
        end
      end
      if (err > emax) emax = err;
      if (err < emin) emin = err;
    end
    done = 1'b1;
  end

endmodule
