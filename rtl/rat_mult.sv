// rat_mult -- ragged truncated AND-array multiplier (RAT), faithfully rounded.
//
// Computes y, a faithful rounding of the top 2N-R bits of the unsigned product a*b (see
// cct_mult; default R = N gives an N x N -> N multiplier).
//
// How: treat the array as an arbitrary bag of independent bits. Any set D of removed bits is
// safe as long as its largest possible value stays below 2^R and the constant 2^R - 1 is
// added; removing as many bits as possible then means removing the whole of columns
// 0..K-1 and L further bits of column K, where, with column heights h_i = i+1,
//     K = max{ k : (k-1)*2^k < 2^R },   L = 2^(R-K) - K.
// Because the low K columns are gone, only the part 2^R - 2^K of the constant matters: a one
// in every column from K to R-1. R = 16 gives K = 12, L = 4; R = 12 gives K = 8, L = 8.
//
// Which L bits of column K go is free. They are taken as mirror pairs a[p]b[K-p] and
// a[K-p]b[p] (p = 0, 1, ...), plus the middle bit a[K/2]b[K/2] when K is even and L odd, so
// that y(a,b) = y(b,a). When K and L are both odd an odd bit would be left over; then one
// pair is replaced by the single bit a[p]b[K-p] | a[K-p]b[p], which removes at most one
// unit of column K, the same as one removed bit, and keeps the multiplier commutative. This
// OR-merge is this design's own device; K, L and the constant follow the published ragged
// truncation. Purely combinational.
//
// SIGNED = 1 turns the array into the two's complement (Baugh-Wooley) array: bits that pair
// one sign bit with a non-sign bit enter inverted and 2^(2N-1) + 2^N is added. Those bits lie
// in columns N-1 and above, far from the truncated columns (K < N-1), so the same K and
// constants stay faithful, as the published analysis notes; a and b are then signed and y is
// the signed top half. The Baugh-Wooley form of that array is this design's choice.
module rat_mult
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

  localparam int K = k_rat(R);
  localparam int L = l_rat(R);

  typedef enum logic [1:0] {KEEP, DROP, MERGE} colk_e;

  // Fate of bit a[i]b[K-i] of column K.
  function automatic colk_e colk_mode(input int i);
    int rem, pairs, p;
    logic middle_gone, merge;
    rem         = L;
    middle_gone = 1'b0;
    if (K % 2 == 0 && rem % 2 == 1) begin
      middle_gone = 1'b1;
      rem--;
    end
    pairs = rem / 2;
    merge = (rem % 2 == 1);
    p     = (i <= K - i) ? i : K - i;       // pair index
    if (K % 2 == 0 && i == K / 2) return middle_gone ? DROP : KEEP;
    if (p < pairs) return DROP;
    if (merge && p == pairs) return (i == p) ? MERGE : DROP;
    return KEEP;
  endfunction

  function automatic logic [N-1:0] keep_mask(input int j);
    logic [N-1:0] m;
    for (int i = 0; i < N; i++) m[i] = (i + j > K);
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
    acc = ((2*N)'(1) << R) - ((2*N)'(1) << K);
    if (SIGNED) acc += ((2*N)'(1) << (2*N - 1)) + ((2*N)'(1) << N);
    for (int j = 0; j < N; j++) begin
      row = ((a & {N{b[j]}}) ^ inv_mask(j)) & keep_mask(j);
      acc += (2*N)'(row) << j;
    end
    for (int i = 0; i <= K; i++) begin
      case (colk_mode(i))
        KEEP:    pp = a[i] & b[K-i];
        MERGE:   pp = (a[i] & b[K-i]) | (a[K-i] & b[i]);
        default: pp = 1'b0;
      endcase
      acc += (2*N)'(pp) << K;
    end
  end

  assign y = acc[2*N-1:R];

endmodule
