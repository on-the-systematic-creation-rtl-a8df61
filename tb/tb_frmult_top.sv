// tb_frmult_top -- end-to-end testbench of the whole library at its default sizes
// (16-bit fixed-point multipliers, single-precision floating-point multiplier).
//
// Drives shared random operands (plus corners and the CCT worst-case operand pairs) into
// all five fixed-point multipliers and checks each result against the exact product
// computed here: err = a*b - y*2^16 must lie strictly between -2^16 and 2^16. The four
// AND-array schemes must also give the same result with a and b swapped. In parallel it
// drives random normal floating-point operands and checks the floating-point result as
// tb_fp_mult_fr does. It counts how often each of the design's behaviours occurs and fails
// if one never does: for every scheme a result below, above and equal to the exact
// product; the CCT error reaching its bound 57345 exactly; an asymmetric Booth result;
// a renormalised and a plain floating-point result. The arbitrary-array summer gets random
// bit patterns of the 18-column example array (heights below), some with every removable
// bit (columns 0..4) set; its error F - y*2^8 must lie in [-224, 247], and 247 must occur.
module tb_frmult_top;

  localparam int N     = 16;
  localparam int NRAND = 200000;

  int checks = 0, failures = 0;

  logic [N-1:0]  a, b;
  logic [N-1:0]  y [5];
  logic [N-1:0]  ys [5];                       // results for (b, a)
  logic [31:0]   fa, fb, fy;

  int n_down [5], n_up [5], n_exact [5];
  int n_cct_worst = 0, n_asym = 0, n_renorm = 0, n_plain = 0, n_arr_top = 0;

  // Arbitrary array: column heights, columns 0..17; columns 0..4 (value up to 247) removable.
  localparam int ARR_HT [18] = '{5, 5, 8, 7, 9, 9, 9, 9, 9, 9, 8, 6, 4, 3, 2, 2, 2, 2};
  logic [8:0]  arr [18];
  logic [11:0] y_arr;

  frmult_top dut (
    .a(a), .b(b),
    .y_cct(y[0]), .y_vct(y[1]), .y_lms(y[2]), .y_rat(y[3]), .y_rbt(y[4]),
    .fa(fa), .fb(fb), .fy(fy),
    .arr(arr), .y_arr(y_arr)
  );

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_normal();
    logic [7:0] e;
    e = 8'(64 + ($urandom % 127));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // Apply (a, b), record the results, then (b, a); check both.
  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb);
    longint p, err;
    a = tb; b = ta;
    #1;
    ys = y;
    a = ta; b = tb;
    #1;
    p = longint'(ta) * longint'(tb);
    for (int s = 0; s < 5; s++) begin
      err = p - (longint'(y[s]) << N);
      checks++;
      if (err >= (longint'(1) << N) || err <= -(longint'(1) << N)) begin
        failures++;
        if (failures <= 10) $display("FAIL scheme %0d a=%h b=%h y=%h", s, ta, tb, y[s]);
      end
      if (err > 0) n_down[s]++; else if (err < 0) n_up[s]++; else n_exact[s]++;
      if (s < 4) begin
        checks++;
        if (ys[s] != y[s]) begin
          failures++;
          if (failures <= 10) $display("FAIL scheme %0d not commutative a=%h b=%h", s, ta, tb);
        end
      end else if (ys[s] != y[s]) n_asym++;
      if (s == 0 && err == 57345) n_cct_worst++;
    end
  endtask

  task automatic apply_fp(input logic [31:0] xa, input logic [31:0] xb);
    longint p, v, ulp, d;
    int e;
    fa = xa; fb = xb;
    #1;
    p   = longint'({1'b1, xa[22:0]}) * longint'({1'b1, xb[22:0]});
    ulp = (p >= (longint'(1) << 47)) ? (longint'(1) << 24) : (longint'(1) << 23);
    e   = int'(fy[30:23]) - (int'(xa[30:23]) + int'(xb[30:23]) - 127);
    v   = longint'({1'b1, fy[22:0]}) << (23 + ((e == 1) ? 1 : 0));
    d   = v - p;
    checks++;
    if (fy[31] != (xa[31] ^ xb[31]) || (e != 0 && e != 1) || d >= ulp || d <= -ulp ||
        ((p % ulp) == 0 && d != 0) ||
        (p >= (longint'(1) << 47) && v < (longint'(1) << 47)) ||
        (p <  (longint'(1) << 47) && v > (longint'(1) << 47))) begin
      failures++;
      if (failures <= 10) $display("FAIL fp a=%h b=%h y=%h", xa, xb, fy);
    end
    if (e == 1) n_renorm++; else n_plain++;
  endtask

  // kind 0: random bits; 1: columns 0..4 all one, rest random; 2: columns 0..4 all one only.
  task automatic apply_arr(input int kind);
    longint f, err;
    for (int i = 0; i < 18; i++)
      for (int j = 0; j < 9; j++)
        if (j >= ARR_HT[i])           arr[i][j] = 1'($urandom);
        else if (i < 5 && kind != 0)  arr[i][j] = 1'b1;
        else if (kind == 2)           arr[i][j] = 1'b0;
        else                          arr[i][j] = 1'($urandom);
    #1;
    f = 0;
    for (int i = 0; i < 18; i++)
      for (int j = 0; j < ARR_HT[i]; j++)
        f += longint'(arr[i][j]) << i;
    err = f - (longint'(y_arr) << 8);
    checks++;
    if (err > 247 || err < -224) begin
      failures++;
      if (failures <= 10) $display("FAIL array sum=%0d y=%0d err=%0d", f, y_arr, err);
    end
    if (err == 247) n_arr_top++;
  endtask

  initial begin
    longint p, av, bv;
    for (int s = 0; s < 5; s++) begin n_down[s] = 0; n_up[s] = 0; n_exact[s] = 0; end
    a = '0; b = '0; fa = '0; fb = '0;
    for (int i = 0; i < 18; i++) arr[i] = '0;
    apply('0, '0);
    apply('1, '1);
    apply(16'h8000, 16'h8000);
    apply(16'hffff, 16'h0001);
    // CCT worst-case operand pairs (k = 12, C = 12)
    for (longint ahi = 0; ahi < 16; ahi++) begin
      av = (ahi << 12) + 4095;
      p = 0;
      for (longint t = 0; t < 16; t++) if (((t * av) & 15) == 1) p = t;
      bv = ((-(p * (4096 + 12 - 12 + ahi * 4095))) & 15) * 4096 + 4095;
      apply(N'(av), N'(bv));
    end
    for (int t = 0; t < NRAND; t++) begin
      apply(N'($urandom), N'($urandom));
      apply_fp(rand_normal(), rand_normal());
      apply_arr(t % 3);
    end
    checks += 10;
    for (int s = 0; s < 5; s++)
      if (n_down[s] == 0 || n_up[s] == 0 || n_exact[s] == 0) begin
        failures++;
        $display("FAIL scheme %0d: below %0d above %0d exact %0d", s, n_down[s], n_up[s], n_exact[s]);
      end
    if (n_cct_worst == 0) begin failures++; $display("FAIL CCT worst case never reached"); end
    if (n_asym == 0)      begin failures++; $display("FAIL Booth array never asymmetric"); end
    if (n_renorm == 0)    begin failures++; $display("FAIL no renormalised fp result"); end
    if (n_plain == 0)     begin failures++; $display("FAIL no plain fp result"); end
    if (n_arr_top == 0)   begin failures++; $display("FAIL array error bound never reached"); end
    for (int s = 0; s < 5; s++)
      $display("scheme %0d: below %0d above %0d exact %0d", s, n_down[s], n_up[s], n_exact[s]);
    $display("cct worst %0d  booth asymmetric %0d  fp renormalised %0d plain %0d  array at bound %0d",
             n_cct_worst, n_asym, n_renorm, n_plain, n_arr_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
