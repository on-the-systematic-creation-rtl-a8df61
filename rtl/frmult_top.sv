// frmult_top -- the library of faithfully rounded multipliers side by side.
//
// Five N x N -> N unsigned fixed-point multipliers, each returning a faithful rounding of
// the top N bits of a*b, share the operands a and b:
//   y_cct  constant correction,           y_vct  variable correction (column promotion),
//   y_lms  linearised LMS correction,     y_rat  ragged truncated AND array,
//   y_rbt  ragged truncated radix-4 Booth array (b is the recoded operand).
// Next to them, a faithfully rounded single-precision floating-point multiplier (fa, fb ->
// fy) uses the ragged AND-array core with two extra result bits. Beside both, ragged_sum
// returns a faithful rounding of the sum of an arbitrary bit array (arr -> y_arr), by
// default the 18-column example array rounded at column 8.
// Everything is combinational; results are valid as soon as the inputs settle. The default
// N = 16 is the smallest of the operand widths the schemes are usually compared at (16, 24
// and 32); the grouping of the blocks in one top is this design's own.
module frmult_top
  import frm_pkg::*;
#(
  parameter int N  = 16,   // fixed-point operand width
  parameter int EW = 8,    // floating-point exponent width
  parameter int MW = 23,   // floating-point mantissa width
  parameter int       ARR_R    = 8,    // arbitrary array: result rounded at column ARR_R
  parameter int       ARR_NCOL = 18,   // arbitrary array: number of columns
  parameter heights_t ARR_H    = '{0: 5, 1: 5, 2: 8, 3: 7, 4: 9, 5: 9, 6: 9, 7: 9, 8: 9,
                                   9: 9, 10: 8, 11: 6, 12: 4, 13: 3, 14: 2, 15: 2, 16: 2,
                                   17: 2, default: 0}   // arbitrary array: column heights
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [N-1:0]     y_cct,
  output logic [N-1:0]     y_vct,
  output logic [N-1:0]     y_lms,
  output logic [N-1:0]     y_rat,
  output logic [N-1:0]     y_rbt,
  input  logic [EW+MW:0]   fa,
  input  logic [EW+MW:0]   fb,
  output logic [EW+MW:0]   fy,
  input  logic [max_height(ARR_H, ARR_NCOL)-1:0]            arr [ARR_NCOL],
  output logic [array_width(ARR_H, ARR_NCOL, ARR_R)-ARR_R-1:0] y_arr
);

  cct_mult #(.N(N)) u_cct (.a(a), .b(b), .y(y_cct));
  vct_mult #(.N(N)) u_vct (.a(a), .b(b), .y(y_vct));
  lms_mult #(.N(N)) u_lms (.a(a), .b(b), .y(y_lms));
  rat_mult #(.N(N)) u_rat (.a(a), .b(b), .y(y_rat));
  rbt_mult #(.N(N)) u_rbt (.a(a), .b(b), .y(y_rbt));

  fp_mult_fr #(.EW(EW), .MW(MW), .SCHEME(SCH_RAT)) u_fp (.fa(fa), .fb(fb), .fy(fy));

  ragged_sum #(.R(ARR_R), .NCOL(ARR_NCOL), .H(ARR_H)) u_arr (.col(arr), .y(y_arr));

endmodule
