# Approximate adders, multipliers, SOP, POS and MAC for error-tolerant multimedia

Image and video kernels (filters, transforms, dot products) can tolerate small
arithmetic errors. The expensive part of binary addition and multiplication is
the carry: it sets the critical path and causes most of the switching. These
circuits cut the carry logic instead of adding error detection or correction.
They either replace carries with constants or guess them from one or two
neighbouring bit pairs. The guesses are chosen so that the most frequent carry
pattern, all zeros, stays exact. No error detection or correction is added.

The RTL is a family of combinational units plus one clocked accumulator:

| unit | module | what it computes |
|---|---|---|
| AXHA hierarchical adder | `axha` | `a+b`: the K low bits are approximate with no carry chain, the upper bits exact |
| AXPA configurable prefix adder | `axpa` | one adder that is either an exact N/2-bit adder or an approximate N-bit adder |
| AXCA constant-carry adder | `axca` | `a^b^CARRY`, no carry logic at all |
| AXM1 4-bit multiplier | `axm1_4b` | 4x4 product with every compressor carry forced to 0 |
| AXM1 8-bit multiplier | `axm1_8b` | four 4x4 sub-products, the first `AX_L` approximate, merged by carry-save rows |
| modified recursive multiplier | `rec_mult` | the same four sub-products, merged by a shallower two-stage adder scheme |
| AXSOP | `axsop` | `a*b + c*d` |
| AXPOS | `axpos` | `(a+b)*(c+d)` |
| AXMAC | `axmac` | `acc <= acc + a*b` |
| top | `approx_arith_top` | all of the above side by side, each with its own ports |

Helpers: `prefix_adder` (exact Kogge-Stone adder), `cond_inc` (conditional +1),
`pp_csa` (exact partial-product reduction to two vectors) and `approx_pkg`
(mode enum and sub-multiplier ordering).

Error distance (ED) below means **exact minus approximate**, unless a line
says otherwise. MED is the mean of ED, signed unless it is called absolute.

## Adders

### AXHA: no carry chain in the low K bits

For `N`-bit operands with `K` approximate bits and boundary `L` (1 ≤ L ≤ K):

```
s[0]           = a0 ^ b0                              exact sum bit
s[i], 0<i<L    = (ai ^ bi) ^ (a[i-1] & b[i-1])        carry guessed from the generate of bit i-1
s[i], L<=i<K   = ai | bi                              no carry at all
carry into K   = a[K-1] & b[K-1]
s[N:K]         = a[N-1:K] + b[N-1:K] + carry          exact ripple-carry part
```

Each approximate bit depends on at most two bit pairs, so the approximate part
has constant delay whatever K is. The error can have either sign. The OR bits
lose carries, which gives negative errors (result too small). At bit K-1, when
`a[K-1] = b[K-1] = 1` the OR bit and the carry are both 1, so that bit counts
twice and the error is positive. For uniform inputs, `approximate - exact` has
mean `-(2^L - 2)/4`. The approximate part uses L carry signals, each the
generate of a single bit pair, so the all-zero carry vector (the one that
matters most) occurs with probability (3/4)^L. The default `L = K/3` gives
-3.5 and 0.316 for N = 32, K = 12. The published values for that size are
-3.2 and 0.316. With
`K = 0` the module is an exact adder, which is how the "accurate adder" variants
of SOP/POS/MAC are built.

### AXPA: one prefix tree, two modes

An N-bit prefix tree is two N/2-bit trees plus a final merging level. `axpa`
omits that level and keeps two independent N/2-bit Kogge-Stone adders:

* `mode = AXPA_HALF_EXACT`: the low halves of `a` and `b` are added exactly
  with `cin`. The upper operands are forced to zero.
* `mode = AXPA_FULL_APPROX`: the full N-bit operands are added. The low half
  gets carry-in 0. The carry into the high half is guessed as
  `a[N/2-1] | b[N/2-1]`.

The guess is never below the true carry. So the N-bit result is either exact
or too large by exactly 2^(N/2). ED is 0 or -2^(N/2), with mean
`-(2^((N-4)/2) + 1/2)` (checked exhaustively at N = 8).

### AXCA: a constant instead of a carry vector

`s[N-1:0] = a ^ b ^ CARRY[N-1:0]` and `s[N] = a[N-1] ^ b[N-1] ^ CARRY[N]`.
The default `CARRY = 0` is the all-zero carry vector, the most frequent one in
binary addition. For every N it gives MED exactly -1/2, minimum ED -2^N and
maximum ED 2^(N+1)-2 (checked exhaustively at N = 8). Other constant vectors
are a parameter away. `CARRY[0] = 1` acts as a constant carry-in.

## Multipliers

### AXM1 4-bit, constant-zero carries

The 16 partial products `P(i,j) = a[i] & b[j]` go into columns `i+j`. No
compressor emits a carry, so each output bit depends only on its own column:

```
z0 = P00          z1 = P01 ^ P10         z2 = OR(P02,P11,P20)
z3 = OR(P03,P12,P21,P30)                 z4 = OR(P13,P22,P31)
z5 = P23 ^ P32    z6 = P33               z7 = P33 & P22
```

`z7` is 1 exactly when both operands are at least 12 (product ≥ 144). The
multiplier is one gate level deep. It is exact whenever no column holds more
than one 1, e.g. when either operand is 0, 1, 2, 4 or 8. The gate at each
column was chosen to match the published error figures of the 8-bit
multiplier, listed below.

### 8-bit recursive multipliers and the approximation level AX_L

Both 8-bit multipliers split the operands into nibbles and form four
sub-products: `R1 = aL*bL`, `R2 = aL*bH`, `R3 = aH*bL` and `R4 = aH*bH`.
R1 has weight 1, R2 and R3 weight 16, R4 weight 256. `AX_L` (0..4) says how
many are approximate, counting from R1 upwards (`approx_pkg::sub_is_approx`).
An approximate sub-product (`axm1_4b`) is **one** vector. An exact one
(`pp_csa`) is **two** vectors, sum and carry, with no carry-propagate adder.
Because of this difference, AX_L changes the adder structure that follows, not
only the sub-multipliers.

* `axm1_8b` puts all vectors, shifted to their weights, through a chain of
  3:2 carry-save rows. A 16-bit prefix adder then resolves them.
* `rec_mult` (the modified recursive scheme, used in SOP/POS/MAC) adds them
  in two stages:

  ```
  stage 1   r1 = R1 vectors added            (wire if R1 is approximate)
            r2 = R2 and R3 vectors added     (4-, 3- or 2-operand, 9 bits)
            r3 = R4 vectors added            (wire if R4 is approximate)
  stage 2   p[3:0]   = r1[3:0]
            {c, p[12:4]} = {r3[4:0], r1[7:4]} + r2        one 9-bit adder
            p[15:13] = r3[7:5] + c                        conditional +1
  ```

  With AX_L = 4 all stage-1 adders except one 2-operand adder vanish. In stage
  2, r1 and r3 do not overlap, so one 9-bit adder and a 3-bit incrementer
  replace the two chained wide adders of the conventional recursive
  multiplier. The approximate sub-products never push the sum past 16 bits
  (checked over all 65536 operand pairs for every AX_L), so the incrementer's
  carry-out is unused.

Both multipliers compute the same function for the same AX_L. Exhaustive
results from `tb_rec_mult` and `tb_axm1_8b` (mean |ED| over all 65536 pairs):

| AX_L | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| mean \|ED\| | 0 | 6.94 | 115.4 | 209.4 | 1919.9 |

The published design reports about 7 for AX_L = 1 and 1919 for AX_L = 4. These
two values were the basis for choosing the column gates of `axm1_4b`.

## SOP, POS and MAC

* `axsop`: two `rec_mult` and one 16-bit `axha`. The output has 17 bits.
* `axpos`: two 8-bit `axha` give 9-bit sums `u` and `v`. `rec_mult` multiplies
  their low bytes. The sum carries are then added exactly:
  `y = u8*v8 + 256*(cu*v8 + cv*u8) + 65536*cu*cv`, 18 bits.
* `axmac`: `rec_mult` gives the 16-bit product O1. A 16-bit `axha` adds O1 to
  the low 16 bits of the accumulator. Its carry increments the `log2(MC)` guard
  bits through `cond_inc`. The adder is only 2n bits wide, but MC products
  still accumulate without overflow: for MC = 8, at most 8*255*255 = 520200
  fits the 19-bit register. Timing: one product per clock edge while `en = 1`,
  and `acc` shows it after that edge. `rst` is synchronous, active high and
  has priority over `en`. After more than MC full-scale products the guard
  bits wrap.

The variants are parameter settings. Variant 1 has `AX_L = 0` (only the adder
approximate). Variant 2 has `K = 0` (only the multiplier approximate). Variant
3 has both. The defaults are AXSOP3 with K = 8, AX_L = 2; AXPOS3 with K = 4,
AX_L = 2; and AXMAC3 with MC = 8, K = 8, AX_L = 4.

Results from the workload testbenches (unsigned random operands):

| test | result here | published figure for the same configuration |
|---|---|---|
| AXMAC3, 10^6 products in groups of 8 (`tb_wl_mac_random`) | MED 5082 (1.0 % of 520200), mean \|ED\| 9606, MRED 0.077 | MED 0.7 % of 520200; MRED 0.01-0.03 |
| AXSOP3, 10^6 samples (`tb_wl_sop_pos`) | MED 76, mean \|ED\| 231 | MED 24 |
| AXPOS3, 10^6 samples (`tb_wl_sop_pos`) | MED 47, mean \|ED\| 1255 | MED 99 |
| 5x5 Gaussian smoothing of a noisy 64x64 image on AXMAC3 (`tb_wl_gauss`) | PSNR 1.2 dB below the exact filter (27.4 vs 28.6 dB against the clean image) | 0.5-1 dB below |

The multiplier matches the published figures exactly. The combined units
are in the same range but not equal, and the image result is slightly worse
than published. Two causes are likely. The published text does not fully
specify the adder's approximate full-adder cells, so this AXHA is a
reconstruction. The MAC gap cannot come from the multiplier alone: the
multiplier's figures match, and its mean signed error of about 641 per product
already accounts for almost all of the MAC's signed MED. So the published MAC
probably combines its parts in a way that lets errors cancel, which could not
be pinned down.

## How far to trust it, and where it is this design's own

Taken from the published design: the unit structure, which signals feed each
output bit of AXM1 and AXHA, the constant-zero-carry principle, the AX_L
ordering shown for AX_L = 2 (R1, R2 approximate), the stage-2 slicing and
widths of the modified recursive multiplier, the MAC datapath and register
widths, and the default parameters.

This design's own choices:

* The gate function at each AXM1 column. It was fitted to the published MEDs,
  which it reproduces.
* The AXHA bit functions and its boundary `L`. They were fitted to the
  published mean error of -3.2 (-3.5 here) and the all-zero carry probability
  of 0.316. The selected approximate full adder is otherwise not known.
* The OR carry guess of AXPA. It was chosen because it gives the published
  mean-error formula. The published minimum and maximum error figures for AXPA
  (-2^(N/2)-2 and +2^(N/2)) do not fit a carry-guess adder; here ED is only 0
  or -2^(N/2).
* AXCA's default `CARRY = 0` and its carry-out function. They are the choice
  that yields the published MED of -1/2 and the published error range.
* How AXPOS feeds 9-bit sums into an 8-bit multiplier.
* The synchronous MAC reset.
* Unsigned operands throughout.
* The Kogge-Stone and carry-save structures of the exact helpers.

Not included:

* The AXM2 "DA1" multiplier. Its column-height-based constant carries are not
  specified.
* The best-fit constant compressors of AXM2.
* The AXM1 "Type-2" (constant-one carry) alternative.
* Signed arithmetic. The published sign-error study of the MAC and an HEVC
  integer DCT need signed operands.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. Example with plain Verilator:

```
verilator --binary --timing -y rtl -y tb rtl/approx_pkg.sv tb/approx_ref_pkg.sv \
    tb/tb_approx_arith_top.sv --top-module tb_approx_arith_top
./obj_dir/Vtb_approx_arith_top
```

Replace the testbench to run another one. The package `tb/approx_ref_pkg.sv`
holds the reference models. They are written arithmetically (column counts,
integer sums), not as copies of the netlists.

* Block tests: `tb_prefix_adder`, `tb_cond_inc`, `tb_pp_csa`, `tb_axm1_4b`,
  `tb_axm1_8b`, `tb_rec_mult`, `tb_axha`, `tb_axpa`, `tb_axca`, `tb_axsop`,
  `tb_axpos`, `tb_axmac`. The small ones are exhaustive; the rest use random
  operands. Several of them also instantiate other parameter settings, e.g.
  every AX_L, or K = 0.
* `tb_approx_arith_top` drives the whole top at its default parameters for
  20000 cycles. It counts each mechanism (AXPA mode switch and wrong carry
  guess, AXHA errors of both signs, AXCA carry-out, inexact sub-products, POS
  sum carries, MAC guard-bit increment, hold and reset) and fails if any of
  them never happened.
* Workloads: `tb_wl_mac_random`, `tb_wl_sop_pos` and `tb_wl_gauss`, as listed
  above. Each runs in a few seconds.

To change a unit, edit its parameters (`N`, `K`, `L`, `AX_L`, `MC`, `CARRY`).
`rec_mult`, `axm1_8b`, `axsop`, `axpos` and `axmac` are fixed at 8-bit operands,
because they are built from the 4-bit AXM1.
