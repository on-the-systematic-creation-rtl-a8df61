# Faithfully rounded truncated multipliers

An N x N multiplier whose result is only N bits wide throws away the low half of the
product anyway. Most of the adders that build that low half can therefore be removed, if the
bits they would have carried into the top half are replaced by a cheap estimate. This library
does exactly that for five array structures and guarantees, by construction rather than by
simulation, that the result is still **faithfully rounded**: it is the representable value just
below or just above the exact product, and it is the exact product whenever that is
representable. A floating-point multiplier built on top of them is faithfully rounded too.
So is a general summer that truncates any array of bits in the same way.

Compared with a correctly rounded (round-to-nearest-even) multiplier, a faithfully rounded
one typically saves about a third of the area, because roughly half of the partial-product
array disappears. The price is an error of up to one unit in the last place instead of half
a unit.

All modules are combinational, parameterised only by widths, and derive every truncation
constant at elaboration time from closed-form conditions, so there is nothing to tune and no
lookup table to regenerate when the width changes.

## Faithful rounding of a truncated array

Write the exact product as the sum of the AND array `a[i] & b[j]` placed in column `i+j`.
A truncation scheme

1. deletes the bits of the least significant `k` columns (their value is called Δ),
2. adds a compensation term `2^k * f(a,b)` at column `k`,
3. sums what is left and drops the low `n` bits.

With `T` the value of the summed columns `k..n-1` after the addition (modulo `2^n`), the error
against the exact product is

    err = a*b - y*2^n = T + Δ - 2^k f(a,b)

and the result is faithful exactly when `|err| < 2^n`. `T` ranges over `[0, 2^n - 2^k]`; Δ
ranges between 0 and `(k-1)2^k + 1`. The schemes differ in `f`. For CCT and VCT the extremes of
`T` and Δ (or of Δ minus the promoted column) can be reached at the same time, so the bounds
below are tight. This makes the conditions on `k` and `C` necessary as well as sufficient,
which is why the smallest faithful array of each structure can be chosen without search.

| Scheme | Module | Compensation `f(a,b)` | Faithful iff | Choice of k |
|---|---|---|---|---|
| Constant correction (CCT) | `cct_mult` | constant `C` | `2^(n-k) > C > k-2` | `max k : 2^n > (k-1)2^k` |
| Variable correction (VCT) | `vct_mult` | `C + col(k-1)` (column k-1 promoted) | `3*2^(n-k+1) - k - 2 > 6C > k - 7` | `max k : 3*2^n >= k*2^k` |
| LMS | `lms_mult` | `2^(n-k-1)` + interior of col(k-1) + half of its four extreme bits | `9*2^(n-k+1) > 6k + 3 + (-1)^k` | largest k meeting it |
| Ragged AND (RAT) | `rat_mult` | constant `2^n - 2^k`, plus `l` bits of column k deleted | by construction | `max k : 2^n > (k-1)2^k`, `l = 2^(n-k) - k` |
| Ragged Booth (RBT) | `rbt_mult` | constant `2^n - 2^k`, plus `l` bits of column k deleted | by construction | `max k : 2^(n+1) > (k+1)2^k`, `l = 2^(n-k) - 1 - floor((k+1)/2)` |

For CCT and VCT, `C` is the smallest value of least Hamming weight in the allowed interval,
`[k-1, 2^(n-k)-1]` for CCT and `[ceil(k/6)-1, floor((3*2^(n-k+1)-k-3)/6)]` for VCT. Few set
bits mean few extra array inputs. The error ranges that result are:

* CCT: `-C*2^k <= err <= 2^n - (C-k+2)2^k + 1`
* VCT: `-(2^(k-1)(3k+18C+7) + (-1)^k)/9 <= err <= 2^n + (2^(k-1)(3k-18C-20) + (-1)^k)/9`
* LMS: the positive error is dominant. Its maximum is
  `2^(n-1) + (2^(k-4)(24k-19+3(-1)^k) - 3 + 4(-1)^k)/9`.

The testbenches reach each of these extremes exactly (see Verification).

Resulting constants (`frm_pkg` computes them; the table is for reference):

| n | CCT k, C | VCT k, C | LMS k | RAT k, l | RBT k, l |
|---|---|---|---|---|---|
| 16 (default) | 12, 12 | 13, 2 | 13 | 12, 4 | 13, 0 |
| 24 | 19, 18 | 21, 4 | 21 | 19, 13 | 20, 5 |
| 32 | 27, 26 | 28, 4 | 28 | 27, 5 | 28, 1 |

## Ragged truncation: any array, any width

The ragged schemes make no use of how the bits of an array are correlated. Every
partial-product bit is treated as an independent 0/1 value. If a set D of bits is deleted and
the constant `2^n - 1` is added, the error stays in `[-(2^n-1), val(D)]`. The result is
therefore faithful as long as the largest possible value of D is below `2^n`. Keeping the
fewest bits means deleting as many as possible under that budget, and the bits of low weight
are the cheapest to delete. With column heights `h_i`, the optimum is:

* delete every bit of columns `0..k-1`, where `k = max{k : sum_{i<k} h_i 2^i < 2^n}`;
* delete `l = ceil(2^(n-k) - 1 - sum_{i<k} h_i 2^(i-k))` bits of column `k`;
* delete nothing above column `k`.

Only the part `2^n - 2^k` of the constant affects the result: a one in each column from `k` to
`n-1`. `frm_pkg::k_ragged` and `l_ragged` implement this optimum for any height profile.
With those bits removed and that constant added, the error `F - y*2^n` lies in
`[-(2^n - 2^k), val(D)]`. The upper end is reached when every removed bit is one and the
kept bits below column `n` sum to a multiple of `2^n`.

The closed forms `k_rat/l_rat` (AND array, `h_i = i+1`) and `k_rbt/l_rbt` (Booth array)
follow from this optimum, and the testbenches check that both routes agree for every width from 6 to 32. Worked
example with heights 5,5,8,7,9,9,9,9 for columns 0..7 and `n = 8`: columns 0..4 sum to 247,
so `k = 5`, and no bit of column 5 may go.

**`ragged_sum`** applies this to any array. It takes the bits column by column:
`col[i][j]` is bit `j` of column `i`, and `H[i]` is that column's height. Its parameters are
the heights `H` (a `frm_pkg::heights_t`), the column count `NCOL`, and the rounding column
`R`. It removes columns `0..k-1` and the bits `col[k][0..l-1]`, adds `2^R - 2^k`, and returns
the sum above column `R`. To choose which bits of column `k` go, order that column. The
default array is the worked example above, extended with its upper columns: heights
9,9,8,6,4,3,2,2,2,2 for columns 8..17. Any array whose sum is a product can be fed in this
way: an AND array, a Booth array, a multiply-add, or a sum of products. `rat_mult` and
`rbt_mult` are the same construction, written out for their own arrays.

**Which bits of column k.** The optimum only fixes how many bits go. `rat_mult` deletes mirror
pairs `a[p]b[k-p]`, `a[k-p]b[p]`, starting from the outside. It also deletes the middle bit
when `k` is even and `l` is odd. This keeps `y(a,b) = y(b,a)`. When `k` and `l` are both odd,
one bit would be left over; this happens at n = 24 and 32. In that case the last pair is
replaced by the single bit `a[p]b[k-p] | a[k-p]b[p]`. That loses at most one unit of column
`k`, the same as deleting one bit, and the multiplier stays commutative. This OR-merge is a
choice of this implementation.

**The Booth array** (`rbt_mult`) recodes `b` into `floor(N/2)+1` radix-4 digits
`d_i = -2b[2i+1] + b[2i] + b[2i-1]`. Row `i` holds the `N+1` bits of `|d_i|*a`, each XORed
with `neg_i = b[2i+1]`, starting at column `2i`. The row also has `neg_i` itself at column
`2i`, the +1 of the two's complement. Each row's sign is carried by `~neg_i` at column
`2i+N+1`, together with one constant `-sum 2^(2i+N+1)` that wraps modulo `2^(2N)`. In the low
columns, column `2m` then holds `m+2` bits and column `2m+1` holds `m+1`. The first `k` columns
are worth at most `floor((k+1)/2)*2^k`, which is where the RBT formula comes from. Column `k`
loses its `neg` bit first (when `k` is even) and then the row bits in row order. The Booth
multiplier is not commutative.

## Floating-point multiplier (`fp_mult_fr`)

The significands with their hidden ones, `a = 2^n + manta` and `b = 2^n + mantb`, lie in
`[1,2)`. Their product lies in `[1,4)`. A faithfully rounded fixed-point core keeps only the
top `m = n+2` bits of the product: `c = multFR(a, b)`. It is one of the modules above with
`N = n+1` and the rounding column `R = n`. Then:

    mant_y = c[n+1] ? c[n:1] : c[n-1:0]
    exp_y  = exp_a + exp_b - bias + c[n+1]
    sign_y = sign_a ^ sign_b

Why two extra bits are enough: when `c[n+1] = 0`, `c[n-1:0]` is already faithful. When
`c[n+1] = 1`, the ulp doubles. Dropping `c[0]` then moves the result by less than one new ulp,
and that move is toward the exact value when `c[0] = 1`. The default is single precision
(`EW = 8`, `MW = 23`, bias 127) with the ragged AND core. For `n = 23` that core deletes columns
0..17 and 14 bits of column 18. `SCHEME` selects any of the five cores.

Only normal operands whose product is normal are handled. Zeros, subnormals, infinities,
NaNs, and exponent overflow or underflow are not detected; the exponent field simply wraps.

## Files and interfaces

| File | Contents |
|---|---|
| `rtl/frm_pkg.sv` | scheme enum `scheme_e`, constant functions `k_*`, `c_*`, `l_*`, `min_hamm`, `k_ragged`, `l_ragged` |
| `rtl/cct_mult.sv`, `vct_mult.sv`, `lms_mult.sv`, `rat_mult.sv`, `rbt_mult.sv` | fixed-point multipliers: `a[N-1:0]`, `b[N-1:0]` -> `y[2N-R-1:0]`; parameters `N`, `R`, and `SIGNED` for the first four |
| `rtl/fp_mult_fr.sv` | floating-point multiplier: `fa`, `fb`, `fy`, each `{sign, exp[EW-1:0], mant[MW-1:0]}` |
| `rtl/ragged_sum.sv` | faithfully rounded sum of an arbitrary bit array: `col[NCOL]` (each `max(H)` bits wide) -> `y` |
| `rtl/frmult_top.sv` | the five fixed-point multipliers on shared `a`, `b` (outputs `y_cct` ... `y_rbt`), the floating-point multiplier, and `ragged_sum` on the example array (`arr` -> `y_arr`) |

The fixed-point parameters are `N`, the operand width (default 16), and `R`, the column the
result is rounded at (default `N`, giving an N-bit result). `R < N` is used by the
floating-point multiplier, and the schemes' conditions depend on `R` alone. Operands are
unsigned by default.

`SIGNED = 1` switches the four AND-array modules to two's complement operands and a signed
result. The array becomes the Baugh-Wooley form: partial-product bits that pair one sign bit
with a non-sign bit are inverted, and `2^(2N-1) + 2^N` is added. All of these changes sit in
column `N-1` and above. Every scheme's `k` is below `N-1`, so the truncated columns, and with
them the faithful-rounding conditions and error ranges, are exactly those of the unsigned
array. The testbenches confirm this: exhaustively at N = 8, the signed error range equals the
unsigned one.

Timing: nothing is clocked. Each multiplier is a single partial-product sum written as masked
rows added together, so synthesis picks the compressor tree and the final adder. Results are
valid one combinational delay after the inputs change. Register or pipeline around the
modules as needed.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.

| Testbench | What it checks |
|---|---|
| `tb_cct_mult` | exhaustive at N = 8, 10: faithful, commutative, error extremes equal the CCT bounds; all 16 worst-case pairs at N = 16 (built from their closed form) give error 57345 exactly; random at 16, 24, 32; `min_hamm` against brute force |
| `tb_vct_mult` | exhaustive at N = 8, 10: faithful, commutative, extremes equal the VCT bounds ([-89, 249] and [-697, 825]); random at 16, 24, 32; at N = 16, the worst-case family (low bits `a = 0101010101011`, `b = 0010101010101` or swapped, every high part): exactly 16 = 2^(n-k+1) vectors reach the bound 57799 |
| `tb_lms_mult` | exhaustive at N = 8, 10: faithful, commutative, dominant error equals its bound (185, 825); random at 16, 24, 32 |
| `tb_rat_mult` | exhaustive at N = 8, 9, 10 (covering the OR-merge): faithful and commutative; random at 12, 16, 24, 32; ragged closed forms against the general optimum |
| `tb_rbt_mult` | exhaustive at N = 8, 9, 10: faithful; random at 16, 24, 32; asymmetry observed; closed forms against the general optimum |
| `tb_fp_mult_fr` | all five cores, single precision: sign, exponent, result one of the two representable neighbours, exact when representable; counts renormalised and plain results |
| `tb_ragged_sum` | four arrays: the example array, the 8 x 8 AND array, a single 12-bit row (where the result must be the plain floor), and the low Booth columns with more on top. For each, the removed bit count is checked against the testbench's own greedy optimum. The error must stay in `[-(2^R - 2^k), val(D)]` on random patterns and extreme patterns, and the upper end must be reached |
| `tb_frmult_top` | the whole top at its default parameters: all five schemes, the floating-point multiplier, and the array summer, on 200,000 random inputs plus corners and the CCT worst-case pairs. Every scheme must round down, round up and be exact at least once. The array error must reach its upper bound, 247 |

The four AND-array testbenches also run the two's complement array (`SIGNED = 1`):
exhaustively at N = 8 and on random operands at N = 16.

`tb/mult_check.sv` is the shared harness: it checks one multiplier exhaustively or on random
operands. `tb/ragged_check.sv` does the same for one `ragged_sum` array.

To simulate one testbench with plain Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/frm_pkg.sv tb/tb_rat_mult.sv --top-module tb_rat_mult
    ./obj_dir/Vtb_rat_mult

Each one finishes in seconds.

## Limits and departures

* The RAT and RBT bounds are not tight, so those two schemes may keep a few more bits than
  strictly needed. CCT, VCT and LMS are minimal for their structure.
* The constants assume the array bits vary independently. That holds for the structures built
  here. A different array goes through `ragged_sum`, or through `k_ragged`/`l_ragged`, with its own
  heights.
* Implementation choices where the scheme leaves freedom:
  * which bits of column `k` go in RAT and RBT, including the OR-merge;
  * the Booth sign-extension encoding;
  * which fixed-point core the floating-point multiplier uses by default;
  * the `R` generalisation of the fixed-point modules.
* Not included: the correctly rounded reference multipliers these designs are usually compared
  against, and a two's complement Booth variant. `frmult_top` instantiates the AND-array
  multipliers unsigned.
