// ragged_sum -- faithfully rounded sum of an arbitrary bit array (ragged truncation).
//
// The input is an array of independent partial-product bits: column i holds H[i] bits, each
// of weight 2^i (col[i][j] for j < H[i]; bits at j >= H[i] are ignored). The output y is a
// faithful rounding of the full sum F divided by 2^R: |F - y*2^R| < 2^R for every input,
// so y is floor(F/2^R) or that plus one, and exactly F/2^R when F is a multiple of 2^R.
// Any array whose sum is a product (AND, Booth, multiply-add, sum of products) can be fed
// in; rat_mult and rbt_mult are this construction specialised to two arrays.
//
// How: no correlation between the bits is assumed, so the worst case of a removed set D is
// all of its bits at one. D is safe as long as that value stays below 2^R and the constant
// 2^R - 1 is added. The most bits are removed by taking all of columns 0..K-1 and L bits of
// column K, with
//     K = max{ k : sum_{i<k} H[i] 2^i < 2^R },
//     L = ceil(2^(R-K) - 1 - sum_{i<K} H[i] 2^(i-K))     (frm_pkg::k_ragged, l_ragged).
// Only the part 2^R - 2^K of the constant reaches the kept columns. The removed bits of
// column K are col[K][0..L-1]: which ones go is free, so the caller orders that column.
// K, L and the constant follow the published optimum for an arbitrary array; the port
// layout and the choice of the lowest-indexed bits of column K are this design's own.
//
// Interface: R is the column the result is rounded at, NCOL the number of columns (R <=
// NCOL <= 60), H the column heights. y is wide enough for the full sum plus the constant.
// The default is the example array of 18 columns with heights 5,5,8,7,9,9,9,9 (columns
// 0..7) and 9,9,8,6,4,3,2,2,2,2 (columns 8..17), rounded at R = 8: K = 5, L = 0, so 34 of
// its 108 bits are removed. Purely combinational.
module ragged_sum
  import frm_pkg::*;
#(
  parameter int       R    = 8,    // result is rounded at column R
  parameter int       NCOL = 18,   // number of columns
  parameter heights_t H    = '{0: 5, 1: 5, 2: 8, 3: 7, 4: 9, 5: 9, 6: 9, 7: 9, 8: 9,
                               9: 9, 10: 8, 11: 6, 12: 4, 13: 3, 14: 2, 15: 2, 16: 2,
                               17: 2, default: 0},
  localparam int      HMAX = max_height(H, NCOL),
  localparam int      TW   = array_width(H, NCOL, R)
) (
  input  logic [HMAX-1:0] col [NCOL],   // col[i][j]: bit j of column i, weight 2^i
  output logic [TW-R-1:0] y
);

  localparam int K = k_ragged(H, R);
  localparam int L = l_ragged(H, R);

  logic [TW-1:0] acc;
  logic          pp;

  always_comb begin
    acc = TW'(pow2(R) - pow2(K));
    for (int i = 0; i < NCOL; i++)
      for (int j = 0; j < HMAX; j++)
        if (j < H[i] && (i > K || (i == K && j >= L))) begin
          pp  = col[i][j];
          acc += TW'(pp) << i;
        end
  end

  assign y = acc[TW-1:R];

endmodule
