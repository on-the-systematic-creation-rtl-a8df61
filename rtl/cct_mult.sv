// cct_mult -- faithfully rounded truncated AND-array multiplier, constant correction (CCT).
//
// Computes y, a faithful rounding of the top 2N-R bits of the unsigned product a*b:
// y*2^R is either the largest multiple of 2^R not above a*b or the smallest not below it,
// and is a*b itself when the low R bits of a*b are zero. With the default R = N this is the
// usual N x N multiplier with an N-bit result.
//
// How: the AND array's K least significant columns (every a[i]&b[j] with i+j < K) are not
// built at all, the constant C is added at column K in their place, the remaining array is
// summed and its low R bits are dropped. K and C come from the necessary and sufficient
// condition for CCT faithful rounding, 2^(R-K) > C > K-2: K is the largest column count
// for which such a C exists and C is the smallest of the lowest-Hamming-weight values
// allowed (frm_pkg::k_cct, c_cct). For R = 16 this gives K = 12, C = 12.
//
// The array is written as a plain sum of masked rows so that synthesis picks the
// compression tree and final adder. Purely combinational; no clock, no latency.
// The truncation rule and the choice of K and C follow the published CCT analysis; the
// separate R parameter (result width other than N) is this design's generalisation, used by
// the floating-point multiplier.
//
// SIGNED = 1 turns the array into the two's complement (Baugh-Wooley) array: bits that pair
// one sign bit with a non-sign bit enter inverted and 2^(2N-1) + 2^N is added. Those bits lie
// in columns N-1 and above, far from the truncated columns (K < N-1), so the same K and
// constants stay faithful, as the published analysis notes; a and b are then signed and y is
// the signed top half. The Baugh-Wooley form of that array is this design's choice.
module cct_mult
  import frm_pkg::*;
#(
  parameter int N = 16,   // operand width
  parameter int R = N,    // result is rounded at column R (R <= N)
  parameter bit SIGNED = 1'b0   // 1: two's complement operands and result
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [2*N-R-1:0] y
);

  localparam int          K = k_cct(R);
  localparam logic [63:0] C = 64'(c_cct(R));

  // Bits of row j (a & b[j]) that lie in column K or above.
  function automatic logic [N-1:0] keep_mask(input int j);
    logic [N-1:0] m;
    for (int i = 0; i < N; i++) m[i] = (i + j >= K);
    return m;
  endfunction

  // Two's complement (Baugh-Wooley) array: bits pairing a sign bit with a non-sign bit
  // enter inverted; the matching constant is added below.
  function automatic logic [N-1:0] inv_mask(input int j);
    logic [N-1:0] m;
    m = '0;
    if (SIGNED) begin
      if (j == N - 1) m = ~(N'(1) << (N - 1));
      else            m = N'(1) << (N - 1);
    end
    return m;
  endfunction

  logic [2*N-1:0] acc;
  logic [N-1:0]   row;

  always_comb begin
    acc = (2*N)'(C) << K;
    if (SIGNED) acc += ((2*N)'(1) << (2*N - 1)) + ((2*N)'(1) << N);
    for (int j = 0; j < N; j++) begin
      row = ((a & {N{b[j]}}) ^ inv_mask(j)) & keep_mask(j);
      acc += (2*N)'(row) << j;
    end
  end

  assign y = acc[2*N-1:R];

endmodule
