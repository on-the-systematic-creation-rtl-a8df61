// lms_mult -- faithfully rounded truncated AND-array multiplier, LMS correction.
//
// Computes y, a faithful rounding of the top 2N-R bits of the unsigned product a*b (see
// cct_mult; default R = N gives an N x N -> N multiplier).
//
// How: the K least significant columns are removed except for the four extreme bits of the
// most significant removed column, a[0]b[K-1], a[1]b[K-2], a[K-2]b[1] and a[K-1]b[0], which
// stay where they are (weight 2^(K-1)). The interior of that column, a[i]b[K-1-i] for
// i = 2..K-3, is promoted to column K, and a constant one is added at column R-1. This is
// the linearised least-mean-square compensation; its faithful-rounding condition,
// 9*2^(R-K+1) > 6K + 3 + (-1)^K, fixes K as the largest value meeting it (frm_pkg::k_lms;
// K = 13 for R = 16). The scheme needs K >= 4.
//
// Purely combinational. The compensation and K follow the published LMS analysis; the R
// parameter is this design's generalisation.
//
// SIGNED = 1 turns the array into the two's complement (Baugh-Wooley) array: bits that pair
// one sign bit with a non-sign bit enter inverted and 2^(2N-1) + 2^N is added. Those bits lie
// in columns N-1 and above, far from the truncated columns (K < N-1), so the same K and
// constants stay faithful, as the published analysis notes; a and b are then signed and y is
// the signed top half. The Baugh-Wooley form of that array is this design's choice.
module lms_mult
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

  localparam int K = k_lms(R);

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
    acc = (2*N)'(1) << (R - 1);
    if (SIGNED) acc += ((2*N)'(1) << (2*N - 1)) + ((2*N)'(1) << N);
    for (int j = 0; j < N; j++) begin
      row = ((a & {N{b[j]}}) ^ inv_mask(j)) & keep_mask(j);
      acc += (2*N)'(row) << j;
    end
    for (int i = 0; i < K; i++) begin
      pp = a[i] & b[K-1-i];
      if (i < 2 || i > K - 3)
        acc += (2*N)'(pp) << (K - 1);   // extreme bits kept in column K-1
      else
        acc += (2*N)'(pp) << K;         // interior bits promoted
    end
  end

  assign y = acc[2*N-1:R];

endmodule
