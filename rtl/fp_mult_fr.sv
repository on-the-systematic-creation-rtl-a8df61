// fp_mult_fr -- faithfully rounded floating-point multiplier.
//
// Multiplies two normal IEEE-754-style numbers {sign, exponent, mantissa} (defaults: single
// precision, 8-bit exponent, 23-bit mantissa, bias 127) and returns a result whose
// significand is a faithful rounding of the exact one: the representable value just below
// or just above the exact product, or the product itself when it is representable.
//
// How: the significands with their implicit ones, a = 2^n + manta and b = 2^n + mantb
// (n = MW), are multiplied by a faithfully rounded truncated fixed-point multiplier that
// keeps only the top m = n+2 bits of the 2n+2-bit product, c = multFR(a, b), i.e. it rounds
// at column n. Since a*b lies in [1,4) in units of 2^(2n), c[n+1] says whether the result
// needs the one-bit renormalisation:
//     mant_y = c[n+1] ? c[n:1] : c[n-1:0],   exp_y = exp_a + exp_b - bias + c[n+1],
//     sign_y = sign_a ^ sign_b.
// Two extra result bits are the fewest for which this is faithfully rounded in every case.
// The fixed-point core is any of the five truncation schemes, chosen by SCHEME (default the
// ragged AND array, which for n = 23 removes columns 0..17 and 14 bits of column 18).
//
// Not handled, as in the scheme this follows: zeros, subnormals, infinities, NaNs, and
// exponent overflow or underflow (the exponent field simply wraps). Which core the default
// uses is this design's choice. Purely combinational.
module fp_mult_fr
  import frm_pkg::*;
#(
  parameter int      EW     = 8,         // exponent width
  parameter int      MW     = 23,        // mantissa (fraction) width, n
  parameter scheme_e SCHEME = SCH_RAT    // fixed-point core
) (
  input  logic [EW+MW:0] fa,             // {sign, exponent, mantissa}
  input  logic [EW+MW:0] fb,
  output logic [EW+MW:0] fy
);

  localparam int          NS   = MW + 1;                 // significand width
  localparam logic [EW-1:0] BIAS = EW'((1 << (EW - 1)) - 1);

  logic [NS-1:0]   sa, sb;
  logic [MW+1:0]   c;                                    // top n+2 product bits
  logic [EW-1:0]   ey;
  logic [MW-1:0]   my;

  assign sa = {1'b1, fa[MW-1:0]};
  assign sb = {1'b1, fb[MW-1:0]};

  generate
    case (SCHEME)
      SCH_CCT: begin : g_cct
        cct_mult #(.N(NS), .R(MW)) u_core (.a(sa), .b(sb), .y(c));
      end
      SCH_VCT: begin : g_vct
        vct_mult #(.N(NS), .R(MW)) u_core (.a(sa), .b(sb), .y(c));
      end
      SCH_LMS: begin : g_lms
        lms_mult #(.N(NS), .R(MW)) u_core (.a(sa), .b(sb), .y(c));
      end
      SCH_RBT: begin : g_rbt
        rbt_mult #(.N(NS), .R(MW)) u_core (.a(sa), .b(sb), .y(c));
      end
      default: begin : g_rat
        rat_mult #(.N(NS), .R(MW)) u_core (.a(sa), .b(sb), .y(c));
      end
    endcase
  endgenerate

  assign my = c[MW+1] ? c[MW:1] : c[MW-1:0];
  assign ey = fa[EW+MW-1:MW] + fb[EW+MW-1:MW] - BIAS + EW'(c[MW+1]);   // modulo 2^EW
  assign fy = {fa[EW+MW] ^ fb[EW+MW], ey, my};

endmodule
