// rbt_mult -- ragged truncated radix-4 Booth multiplier (RBT), faithfully rounded.
//
// Computes y, a faithful rounding of the top 2N-R bits of the unsigned product a*b (see
// cct_mult; default R = N gives an N x N -> N multiplier). Not commutative: b is the
// Booth-recoded operand.
//
// The array: b is recoded into floor(N/2)+1 radix-4 digits d_i in {-2..2} from bits
// b[2i+1], b[2i], b[2i-1] (b[-1] and bits above N-1 are 0). Row i holds the N+1 bits
// q_i = (|d_i|*a) XOR {neg_i}, starting at column 2i, plus neg_i itself at column 2i (the
// +1 of the two's complement). The sign of each row is carried by the inverted bit ~neg_i
// at column 2i+N+1 and one constant, -sum_i 2^(2i+N+1), added modulo 2^(2N). In the low N
// columns column 2m therefore holds m+2 bits and column 2m+1 holds m+1 bits, so the whole
// of columns 0..k-1 is worth at most floor((k+1)/2)*2^k.
//
// Truncation: the ragged rule removes columns 0..K-1 and L bits of column K, with
//     K = max{ k : (k+1)*2^k < 2^(R+1) },   L = 2^(R-K) - 1 - floor((K+1)/2),
// and adds 2^R - 2^K (a one in columns K..R-1). R = 24 gives K = 20, L = 5; R = 16 gives
// K = 13, L = 0. The bits removed from column K are, in order, the neg bit of that column
// (K even) and then q_0, q_1, ... of the rows reaching it; the order is this design's choice.
// Purely combinational.
module rbt_mult
  import frm_pkg::*;
#(
  parameter int N = 16,   // operand width
  parameter int R = N     // result is rounded at column R (R <= N)
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [2*N-R-1:0] y
);

  localparam int K  = k_rbt(R);
  localparam int L  = l_rbt(R);
  localparam int NR = N / 2 + 1;          // Booth rows
  localparam int W  = 2 * N + 2;          // accumulator width

  // Position of a column-K bit in the removal order (rows use i, the neg bit uses -1).
  function automatic int colk_pos(input int i);
    int base;
    base = (K % 2 == 0) ? 1 : 0;
    return (i < 0) ? 0 : base + i;
  endfunction

  // Is a bit at column c, position pos in column K's order, kept?
  function automatic logic kept(input int c, input int pos);
    return (c > K) || (c == K && pos >= L);
  endfunction

  logic [N+1:0]   b_ext;                  // {0, b, 0}: b_ext[t+1] = b[t]
  logic [N+1:0]   a_ext;                  // {0, a, 0}: a_ext[t+1] = a[t]
  logic [NR-1:0]  one, two, neg;
  logic [W-1:0]   acc;
  logic           pos_n;                  // inverted sign bit of a row

  assign b_ext = {1'b0, b, 1'b0};
  assign a_ext = {1'b0, a, 1'b0};

  always_comb begin
    for (int i = 0; i < NR; i++) begin
      logic bh, bm, bl;
      bh = (2*i + 2 <= N + 1) ? b_ext[2*i+2] : 1'b0;
      bm = (2*i + 1 <= N + 1) ? b_ext[2*i+1] : 1'b0;
      bl = b_ext[2*i];
      one[i] = bm ^ bl;
      two[i] = (bh & ~bm & ~bl) | (~bh & bm & bl);
      neg[i] = bh;
    end
  end

  always_comb begin
    acc = ((W)'(1) << R) - ((W)'(1) << K);
    for (int i = 0; i < NR; i++) begin
      // sign handling: ~neg_i at column 2i+N+1 and -2^(2i+N+1)
      pos_n = ~neg[i];
      acc += (W)'(pos_n) << (2*i + N + 1);
      acc -= (W)'(1) << (2*i + N + 1);
      // two's complement +1
      if (kept(2*i, colk_pos(-1)))
        acc += (W)'(neg[i]) << (2*i);
      // magnitude bits q_{i,j}, j = 0..N, at column 2i+j
      for (int j = 0; j <= N; j++) begin
        logic q;
        q = ((one[i] & a_ext[j+1]) | (two[i] & a_ext[j])) ^ neg[i];
        if (kept(2*i + j, colk_pos(i)))
          acc += (W)'(q) << (2*i + j);
      end
    end
  end

  assign y = acc[2*N-1:R];

endmodule
