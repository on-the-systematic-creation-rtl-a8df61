// mult_check -- self-checking stimulus harness for one faithfully rounded fixed-point
// multiplier (testbench use only).
//
// Instantiates the multiplier chosen by SCHEME (two's complement when SIGNED) twice, as
// y1 = f(a, b) and y2 = f(b, a), and drives either every operand pair (EXHAUSTIVE = 1) or NRAND random pairs plus a few
// corner values. For each pair it forms the exact product P = a*b with the testbench's own
// arithmetic (signed when SIGNED) and checks faithful rounding of the top 2N-R bits:
//     err = P - y1*2^R  must satisfy  -2^R < err < 2^R,
// which also forces y1*2^R = P whenever the low R bits of P are zero. With CHECK_COMM = 1
// it also checks y1 == y2 (commutativity). It reports the number of checks and failures,
// the largest and smallest error seen, and how often the result was below, above or equal
// to the exact product, in variables the enclosing testbench reads by hierarchical name.
// One operand pair is applied per time unit; done rises at the end.
module mult_check
  import frm_pkg::*;
#(
  parameter int      N           = 8,
  parameter int      R           = N,
  parameter scheme_e SCHEME      = SCH_CCT,
  parameter bit      EXHAUSTIVE  = 1'b1,
  parameter int      NRAND       = 1000,
  parameter bit      CHECK_COMM  = 1'b1,
  parameter bit      SIGNED      = 1'b0     // AND-array schemes only
) ();

  // Results, read by the enclosing testbench through hierarchical names.
  logic   done;
  int     checks;
  int     failures;
  longint emax;
  longint emin;
  int     n_down;
  int     n_up;
  int     n_exact;
  int     n_asym;     // pairs with f(a,b) != f(b,a)

  logic [N-1:0]     a, b;
  logic [2*N-R-1:0] y1, y2;

  generate
    case (SCHEME)
      SCH_CCT: begin : g_cct
        cct_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u1 (.a(a), .b(b), .y(y1));
        cct_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u2 (.a(b), .b(a), .y(y2));
      end
      SCH_VCT: begin : g_vct
        vct_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u1 (.a(a), .b(b), .y(y1));
        vct_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u2 (.a(b), .b(a), .y(y2));
      end
      SCH_LMS: begin : g_lms
        lms_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u1 (.a(a), .b(b), .y(y1));
        lms_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u2 (.a(b), .b(a), .y(y2));
      end
      SCH_RAT: begin : g_rat
        rat_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u1 (.a(a), .b(b), .y(y1));
        rat_mult #(.N(N), .R(R), .SIGNED(SIGNED)) u2 (.a(b), .b(a), .y(y2));
      end
      default: begin : g_rbt
        rbt_mult #(.N(N), .R(R)) u1 (.a(a), .b(b), .y(y1));
        rbt_mult #(.N(N), .R(R)) u2 (.a(b), .b(a), .y(y2));
      end
    endcase
  endgenerate

  function automatic logic [N-1:0] rand_n();
    logic [63:0] v;
    v = {$urandom, $urandom};
    return v[N-1:0];
  endfunction

  // Operand pair number idx: every pair in order, or corner values then random pairs.
  function automatic logic [2*N-1:0] pick(input longint idx);
    logic [N-1:0] ta, tb;
    if (EXHAUSTIVE) begin
      ta = N'(idx >> N);
      tb = N'(idx);
    end else begin
      case (idx)
        0:       begin ta = '0;                  tb = '0;                  end
        1:       begin ta = '1;                  tb = '1;                  end
        2:       begin ta = '1;                  tb = N'(1);               end
        3:       begin ta = N'(1) << (N - 1);    tb = N'(1) << (N - 1);    end
        4:       begin ta = '1;                  tb = N'(1) << (N - 1);    end
        default: begin ta = rand_n();            tb = rand_n();            end
      endcase
    end
    return {ta, tb};
  endfunction

  localparam longint TOTAL = EXHAUSTIVE ? (longint'(1) << (2 * N)) : longint'(NRAND) + 5;

  initial begin
    logic signed [2*N+2:0] p, q, err, lim;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    emax     = -(longint'(1) << 62);
    emin     =  (longint'(1) << 62);
    n_down   = 0;
    n_up     = 0;
    n_exact  = 0;
    n_asym   = 0;
    lim      = (2*N+3)'(1) << R;
    for (longint idx = 0; idx < TOTAL; idx++) begin
      {a, b} = pick(idx);
      #1;
      if (SIGNED) begin
        p = (2*N+3)'(signed'(a)) * (2*N+3)'(signed'(b));
        q = (2*N+3)'(signed'(y1)) << R;
      end else begin
        p = (2*N+3)'(a) * (2*N+3)'(b);
        q = (2*N+3)'(y1) << R;
      end
      err = p - q;
      checks++;
      if (err >= lim || err <= -lim) begin
        failures++;
        if (failures <= 5)
          $display("FAIL scheme=%s N=%0d a=%h b=%h y=%h exact=%h", SCHEME.name(), N, a, b, y1, p);
      end
      if (longint'(err) > emax) emax = longint'(err);
      if (longint'(err) < emin) emin = longint'(err);
      if (err > 0)      n_down++;
      else if (err < 0) n_up++;
      else              n_exact++;
      if (y1 != y2) n_asym++;
      if (CHECK_COMM) begin
        checks++;
        if (y1 != y2) begin
          failures++;
          if (failures <= 5)
            $display("FAIL not commutative scheme=%s N=%0d a=%h b=%h", SCHEME.name(), N, a, b);
        end
      end
    end
    done = 1'b1;
  end

endmodule
