// frm_pkg -- elaboration-time arithmetic for faithfully rounded truncated multipliers.
//
// A truncated multiplier throws away the partial-product bits of the least significant
// columns of its array and adds a compensating term instead, so that the top bits of the
// sum are still a faithful rounding of the exact product (the representable value just
// above or just below it, and the exact value when it is representable). Every scheme in
// this library is fixed by three numbers computed here from the operand width:
//   k  number of whole least-significant columns removed,
//   C  constant added at column k,
//   l  extra bits removed from column k (ragged schemes only).
// The closed forms are the necessary-and-sufficient faithful-rounding conditions of the
// CCT, VCT and LMS schemes, and the optimum of the ragged (arbitrary array) truncation;
// they are all evaluated by constant functions so that a multiplier's only parameters are
// its widths. In every function, r is the column the result is rounded to (the number of
// low product bits that are dropped); for an n x n multiplier with an n-bit result r = n.
//
// min_hamm(lo, hi) returns, among the integers of [lo, hi] with the fewest set bits, the
// smallest one. It is computed in closed form: all numbers of the interval share the bits
// above the highest bit where lo and hi differ; the answer is that common prefix plus the
// smallest power of two not below the remaining low bits of lo (nothing when those are 0).
//
// max_height and array_width size the ports of ragged_sum, the truncation of an arbitrary
// array. The Booth helpers describe the radix-4 array used by rbt_mult: in its r least
// significant columns, column 2m holds m+2 bits and column 2m+1 holds m+1 bits.
package frm_pkg;

  // Truncation schemes, for modules that select one by parameter.
  typedef enum logic [2:0] {
    SCH_CCT = 3'd0,   // constant correction
    SCH_VCT = 3'd1,   // variable correction: column k-1 promoted
    SCH_LMS = 3'd2,   // linearised minimum-mean-square correction
    SCH_RAT = 3'd3,   // ragged truncation of the AND array
    SCH_RBT = 3'd4    // ragged truncation of the radix-4 Booth array
  } scheme_e;

  // Largest column count any of the schemes is used with.
  localparam int MAX_COLS = 64;

  function automatic longint pow2(input int e);
    return longint'(1) << e;
  endfunction

  function automatic int clog2l(input longint v);
    int r;
    r = 0;
    while ((longint'(1) << r) < v) r++;
    return r;
  endfunction

  function automatic int popcount(input longint v);
    int c;
    c = 0;
    for (int i = 0; i < 63; i++) c += int'((v >> i) & 1);
    return c;
  endfunction

  // Smallest integer of [lo, hi] among those with the least Hamming weight.
  function automatic longint min_hamm(input longint lo, input longint hi);
    longint diff, prefix, low;
    int d;
    if (lo >= hi) return lo;
    diff = lo ^ hi;
    d = 62;
    while (((diff >> d) & 1) == 0) d--;
    prefix = (hi >> (d + 1)) << (d + 1);
    low    = lo - prefix;
    if (low == 0) return lo;
    return prefix + pow2(clog2l(low));
  endfunction

  // ---------------- CCT: 2^(r-k) > C > k-2 --------------------------------------------
  function automatic int k_cct(input int r);
    int k;
    k = 0;
    for (int t = 1; t < r; t++)
      if (pow2(r) > (longint'(t) - 1) * pow2(t)) k = t;
    return k;
  endfunction

  function automatic longint c_cct(input int r);
    int k;
    k = k_cct(r);
    return min_hamm(longint'(k) - 1, pow2(r - k) - 1);
  endfunction

  // ---------------- VCT: 3*2^(r-k+1) - k - 2 > 6C > k - 7 ------------------------------
  function automatic int k_vct(input int r);
    int k;
    k = 0;
    for (int t = 1; t < r; t++)
      if (3 * pow2(r) >= longint'(t) * pow2(t)) k = t;
    return k;
  endfunction

  function automatic longint c_vct(input int r);
    int k;
    longint lo, hi;
    k  = k_vct(r);
    lo = (longint'(k) + 5) / 6 - 1;   // ceil(k/6) - 1
    hi = (3 * pow2(r - k + 1) - longint'(k) - 3) / 6;   // floor, numerator positive
    return min_hamm(lo, hi);
  endfunction

  // ---------------- LMS: 9*2^(r-k+1) > 6k + 3 + (-1)^k ---------------------------------
  function automatic int k_lms(input int r);
    int k;
    k = 0;
    for (int t = 4; t < r; t++)
      if (9 * pow2(r - t + 1) > longint'(6 * t + 3 + ((t % 2 == 0) ? 1 : -1))) k = t;
    return k;
  endfunction

  // ---------------- Ragged truncation of an arbitrary array ----------------------------
  // Heights h[i] of columns 0..r-1. k is the largest column count whose full value stays
  // below 2^r; l the number of bits that may also go from column k.
  typedef int heights_t [MAX_COLS];

  function automatic int k_ragged(input heights_t h, input int r);
    longint s;
    int k;
    s = 0;
    k = 0;
    for (int t = 0; t < r; t++) begin
      s += longint'(h[t]) * pow2(t);
      if (s < pow2(r)) k = t + 1;
    end
    return k;
  endfunction

  function automatic int l_ragged(input heights_t h, input int r);
    longint s, room;
    int k;
    k = k_ragged(h, r);
    if (k >= r) return 0;
    s = 0;
    for (int t = 0; t < k; t++) s += longint'(h[t]) * pow2(t);
    // largest l with l*2^k + s < 2^r
    room = pow2(r) - s - 1;
    return int'(room >> k);
  endfunction

  // Tallest of the first ncol columns.
  function automatic int max_height(input heights_t h, input int ncol);
    int m;
    m = 1;
    for (int t = 0; t < ncol; t++) if (h[t] > m) m = h[t];
    return m;
  endfunction

  // Bits needed for the full sum of the first ncol columns, all bits set, plus 2^r - 1
  // (the largest ragged-truncation constant).
  function automatic int array_width(input heights_t h, input int ncol, input int r);
    longint s;
    s = pow2(r);
    for (int t = 0; t < ncol; t++) s += longint'(h[t]) * pow2(t);
    return clog2l(s);
  endfunction

  // ---------------- RAT: ragged AND array, h_i = i + 1 ---------------------------------
  function automatic int k_rat(input int r);
    int k;
    k = 0;
    for (int t = 1; t < r; t++)
      if (pow2(r) > (longint'(t) - 1) * pow2(t)) k = t;
    return k;
  endfunction

  function automatic int l_rat(input int r);
    return int'(pow2(r - k_rat(r))) - k_rat(r);
  endfunction

  // ---------------- RBT: ragged radix-4 Booth array ------------------------------------
  function automatic int k_rbt(input int r);
    int k;
    k = 0;
    for (int t = 1; t < r; t++)
      if (pow2(r + 1) > (longint'(t) + 1) * pow2(t)) k = t;
    return k;
  endfunction

  function automatic int l_rbt(input int r);
    int k;
    k = k_rbt(r);
    return int'(pow2(r - k)) - 1 - (k + 1) / 2;
  endfunction

  // Height of column c of the radix-4 Booth array (c below the operand width).
  function automatic int booth_height(input int c);
    return (c % 2 == 0) ? c / 2 + 2 : c / 2 + 1;
  endfunction

endpackage
