// vct_mult -- faithfully rounded truncated AND-array multiplier, variable correction (VCT).
//
// Computes y, a faithful rounding of the top 2N-R bits of the unsigned product a*b (see
// cct_mult for the meaning of faithful; default R = N gives an N x N -> N multiplier).
//
// How: the K least significant columns of the AND array are removed, but the bits of the
// most significant removed column, col(K-1) = { a[i]&b[K-1-i] : i = 0..K-1 }, are added
// back one column higher, at weight 2^K, together with the constant C at column K. The rest
// of the array is summed and the low R bits are dropped. K and C satisfy the necessary and
// sufficient VCT condition 3*2^(R-K+1) - K - 2 > 6C > K - 7: K is the largest value with
// 3*2^R >= K*2^K and C the smallest lowest-Hamming-weight value of
// [ceil(K/6)-1, floor((3*2^(R-K+1)-K-3)/6)] (frm_pkg::k_vct, c_vct). R = 16 gives K = 13,
// C = 2.
//
// Purely combinational. The scheme and its constants follow the published VCT analysis;
// the R parameter is this design's generalisation for use inside the floating-point
// multiplier.
//
// SIGNED = 1 turns the array into the two's complement (Baugh-Wooley) array: bits that pair
// one sign bit with a non-sign bit enter inverted and 2^(2N-1) + 2^N is added. Those bits lie
// in columns N-1 and above, far from the truncated columns (K < N-1), so the same K and
// constants stay faithful, as the published analysis notes; a and b are then signed and y is
// the signed top half. The Baugh-Wooley form of that array is this design's choice.
module vct_mult
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

  localparam int          K = k_vct(R);
  localparam logic [63:0] C = 64'(c_vct(R));

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
  logic           pp;

  always_comb begin
    acc = (2*N)'(C) << K;
    if (SIGNED) acc += ((2*N)'(1) << (2*N - 1)) + ((2*N)'(1) << N);
    for (int j = 0; j < N; j++) begin
      row = ((a & {N{b[j]}}) ^ inv_mask(j)) & keep_mask(j);
      acc += (2*N)'(row) << j;
    end
    // column K-1 promoted into column K
    for (int i = 0; i < K; i++) begin
      pp  = a[i] & b[K-1-i];
      acc += (2*N)'(pp) << K;
    end
  end

  assign y = acc[2*N-1:R];

endmodule
