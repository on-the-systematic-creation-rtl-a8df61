// tb_fp_mult_fr -- self-checking testbench for the faithfully rounded floating-point
// multiplier.
//
// Five instances, one per fixed-point core (the default one, the ragged AND array, left at
// its default parameters), all single precision, receive the same operands: random normal
// numbers with exponents chosen so the product stays normal, plus corners (1.0 * 1.0, the
// largest significands, products that are exactly representable). For each result the
// testbench forms the exact 48-bit significand product P = (2^23+ma)*(2^23+mb) and checks:
//   sign = sa ^ sb;  exponent = ea + eb - 127 + E with E in {0,1};
//   V = (2^23 + my) * 2^(23+E) lies on the same side of 2^47 as P (or equals 2^47) and
//   |V - P| < ulp, the spacing of representable values around P (2^23 below 2^47, 2^24
//   above), so V is one of P's two representable neighbours;
//   V = P whenever P is representable.
// It counts renormalised (E = 1) and plain results, exact results and results below and
// above the exact product, and fails if any of these never occurs.
module tb_fp_mult_fr;
  import frm_pkg::*;

  localparam int NRAND = 100000;

  int checks = 0, failures = 0;
  int n_renorm = 0, n_plain = 0, n_exact = 0, n_down = 0, n_up = 0;

  logic [31:0] fa, fb;
  logic [31:0] fy [5];

  fp_mult_fr                       u_rat (.fa(fa), .fb(fb), .fy(fy[0]));
  fp_mult_fr #(.SCHEME(SCH_CCT))   u_cct (.fa(fa), .fb(fb), .fy(fy[1]));
  fp_mult_fr #(.SCHEME(SCH_VCT))   u_vct (.fa(fa), .fb(fb), .fy(fy[2]));
  fp_mult_fr #(.SCHEME(SCH_LMS))   u_lms (.fa(fa), .fb(fb), .fy(fy[3]));
  fp_mult_fr #(.SCHEME(SCH_RBT))   u_rbt (.fa(fa), .fb(fb), .fy(fy[4]));

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

  task automatic check_all();
    longint p, v, ulp, d;
    int e_exp, e;
    logic rep;
    #1;
    p = longint'({1'b1, fa[22:0]}) * longint'({1'b1, fb[22:0]});
    e_exp = int'(fa[30:23]) + int'(fb[30:23]) - 127;
    ulp = (p >= (longint'(1) << 47)) ? (longint'(1) << 24) : (longint'(1) << 23);
    rep = (p % ulp) == 0;
    for (int s = 0; s < 5; s++) begin
      e = int'(fy[s][30:23]) - e_exp;
      v = longint'({1'b1, fy[s][22:0]}) << (23 + ((e == 1) ? 1 : 0));
      d = v - p;
      checks++;
      if (fy[s][31] != (fa[31] ^ fb[31]) || (e != 0 && e != 1) ||
          (p >= (longint'(1) << 47) && v < (longint'(1) << 47)) ||
          (p <  (longint'(1) << 47) && v > (longint'(1) << 47)) ||
          d >= ulp || d <= -ulp || (rep && d != 0)) begin
        failures++;
        if (failures <= 10)
          $display("FAIL core %0d: a=%h b=%h y=%h exact significand product %h", s, fa, fb, fy[s], p);
      end
      if (s == 0) begin
        if (e == 1) n_renorm++; else n_plain++;
        if (d == 0) n_exact++; else if (d < 0) n_down++; else n_up++;
      end
    end
  endtask

  initial begin
    // corners
    fa = {1'b0, 8'd127, 23'd0};        fb = {1'b0, 8'd127, 23'd0};        check_all();  // 1 * 1
    fa = {1'b1, 8'd130, 23'h7fffff};   fb = {1'b0, 8'd100, 23'h7fffff};   check_all();  // largest significands
    fa = {1'b0, 8'd127, 23'h400000};   fb = {1'b1, 8'd127, 23'h400000};   check_all();  // 1.5 * 1.5 = 2.25
    fa = {1'b0, 8'd127, 23'h7fffff};   fb = {1'b0, 8'd127, 23'd1};        check_all();
    // exactly representable products: 11 fraction bits each
    for (int t = 0; t < 2000; t++) begin
      fa = rand_normal(); fa[11:0] = '0;
      fb = rand_normal(); fb[11:0] = '0;
      check_all();
    end
    for (int t = 0; t < NRAND; t++) begin
      fa = rand_normal();
      fb = rand_normal();
      check_all();
    end
    checks += 5;
    if (n_renorm == 0) begin failures++; $display("FAIL no renormalised result"); end
    if (n_plain  == 0) begin failures++; $display("FAIL no plain result"); end
    if (n_exact  == 0) begin failures++; $display("FAIL no exact result"); end
    if (n_down   == 0) begin failures++; $display("FAIL no result below the exact product"); end
    if (n_up     == 0) begin failures++; $display("FAIL no result above the exact product"); end
    $display("renormalised %0d plain %0d exact %0d below %0d above %0d", n_renorm, n_plain, n_exact, n_down, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
