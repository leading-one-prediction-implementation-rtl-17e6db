# Leading-one prediction for floating-point subtraction

When a floating-point adder subtracts two nearly equal significands, the
difference can start with many zeros, and the result must be shifted left
until its leading one reaches the top bit. The slow way is to finish the
subtraction, count the leading zeros, then shift. *Leading-one prediction*
(LOP) counts them instead from the two operands, at the same time as the
subtraction, so the shift amount is ready roughly when the difference is.
The prediction can be one place too large or too small. The carry that the
adder produces at the predicted position settles which.

This repository holds synthesizable SystemVerilog for:

- two leading-one predictors: a 4-way lookahead tree and a distributed,
  per-bit circuit;
- the adder beside them;
- two ways to use the predictors with sign-magnitude (IEEE) significands:
  a one's-complement front end, and a compare-and-swap front end with a
  simpler, zeros-only predictor;
- carry selection for a predictor beside an adder that forms both `a+b`
  and `a+b+1`;
- the normalising left shifter;
- a multiplier sticky-bit unit that reuses the same pattern-detection idea.

It follows the technical report *Leading One Prediction — Implementation,
Generalization, and Application* (Stanford CSL-TR-91-463, 1991). Choices of
this implementation that the report does not make are listed under
"Departures and own choices" below.

All logic is combinational. Bit 0 is the **most significant** bit of every
vector, and vectors are declared `[0:N-1]`.

## Bit pairs as symbols

Each bit position of the operands `a` and `b` is one of three symbols:

| symbol | meaning       | a,b     |
|--------|---------------|---------|
| `T`    | `a ^ b`       | 01, 10  |
| `Z`    | `~(a \| b)`   | 00      |
| `G`    | `a & b`       | 11      |

Read the symbols from the MSB. The sum `a + b` (plus any carry in) begins
with a run of equal bits for exactly as long as the string matches one of
four patterns, or a prefix of one:

| pattern   | result begins with |
|-----------|--------------------|
| `Z*`      | zeros (only when both operands begin with zeros) |
| `T* G Z*` | zeros: the G's carry ripples up through the T's and leaves zeros |
| `G*`      | ones |
| `T* Z G*` | ones |

A run of `T` alone is a prefix of both `T*GZ*` and `T*ZG*`, so it counts as
matching. The first position where the string stops matching ends the run.
One uncertainty remains: whether a carry comes up from the bits below into
the last matching position. That carry either ends the run one bit early or
lets it reach one bit further.

Here is an 8-bit example of `53 - 51`. The operands are `a = 00110101` and
`b = ~00110011 = 11001100`, added in one's complement.

```
a        0 0 1 1 0 1 0 1
b        1 1 0 0 1 1 0 0
symbol   T T T T T G Z T      longest matching prefix: TTTTTGZ (7 symbols)
sum      0 0 0 0 0 0 1 0      (with end-around carry 1): 6 leading zeros
```

The predictor says 7. The carry into bit 6 is 1, which ends the run one bit
early. So the count is corrected to 6.

## Predictor 1: the lookahead tree (`lop_tree`)

This is organised like a carry-lookahead adder, in the manner of the IBM
RS/6000. A segment of the string is summarised by five flags, defined in
`lop_pkg::bpd_t`:

- **N**: all `T`;
- **J**: `T*GZ*`;
- **F**: all `Z`;
- the mirror pair for the ones patterns: `T*ZG*` and all `G`.

`bpd_cat()` joins a more significant summary X with the less significant
summary Y that follows it:

```
N = Nx & Ny        J = Nx & Jy | Jx & Fy        F = Fx & Fy     (and mirrored)
```

Applied to four single symbols, this is the group equation
`J = GZZZ | TGZZ | TTGZ | TTTG`. Applied to four groups, it is
`J = JFFF | NJFF | NNJF | NNNJ`, and so on up the tree.

- **Upward pass.** It summarises aligned segments of 4, 16, 64 bits.
- **Downward pass.** It hands every bit the summary of everything above it,
  exactly as a lookahead adder hands each group its carry in.
- **SH array.** `sh[i] = 1` when bits `0..i` match. This is a run of ones
  followed by zeros. `sh[0]` is always 1.
- **`sh_coarse`.** The number of ones in `sh`, i.e. the length of the
  longest matching prefix.

The coarse count is never too small. If the first zero of `sh` is at
position `i`, the correction is

```
c_fine = C(i-1) ^ T(i-2) ^ A(i-1)        sh_total = sh_coarse - c_fine
```

Here `C(i-1)` is the carry into bit `i-1`, taken from the adder. To see why:

- `T(i-2) ^ A(i-1)` is 0 when the string was a zeros run. Those are the pairs
  ZZ, GZ and TG before the stop.
- It is 1 when the string was a ones run. Those are the pairs GG, TZ and ZG.
- A carry arriving into the last matching bit shortens a zeros run by one.
- The absence of such a carry shortens a ones run by one.

`lop_tree` takes the carries as the input vector `c`. The prediction itself
(`sh`, `sh_coarse`) needs only `a` and `b`.

The run kind can also be read from the tree itself. The summary of bits
`0..i-1` already says whether they form a zeros run or a ones run, so
`c_fine = C(i-1) ^ ones(i-1)`. With `FINE_GLOBAL = 1`, `lop_tree` uses
this form. The default, 0, uses the two-bit window. The testbench runs
both forms and requires the same results.

## Predictor 2: the distributed circuit (`lop_dist`, `lop_dist_cell`)

The tree keeps pattern state over whole groups. The distributed version
notices that three neighbouring symbols are enough.

If bit `i-1` is not `T`, the two bits above bit `i` already tell which kind
of run is in progress:

- ZZ, GZ or TG means a zeros run, which continues only on `Z`;
- GG, TZ or ZG means a ones run, which continues only on `G`.

A `T` at `i-1` always continues. The pairs ZT and GT would already have
stopped the run one bit higher. With `x = T(i-2) ^ A(i-1)`:

```
U(i) = T(i-1) | ~T(i-1) & (~x & Z(i) | x & G(i))          run continues through bit i
```

Each `lop_dist_cell` computes `U(i)`. A 4-way prefix-AND tree gives each
cell the signal `f`: every cell above it continued. The first cell that
stops sets its bit of the one-hot vector `l`.

The run is then taken to end at the bit above the stop, so
`sh_coarse = stop - 1`, which can be one short. Each cell also computes
`cfine = T(i) & (C(i) ^ ~x)`, where `C(i)` is the carry into bit `i`. It
outputs `e_i = l_i & ~cfine`. The correction `E` is the NOR of all `e_i`,
and `sh_total = sh_coarse + E`.

This per-bit correction comes from checking every three-symbol window by
hand. Only windows ending in `T` can need an adjustment.

When `T(i)` is 1, the carry into bit `i-1` equals `C(i)`. So the test can
also be written `cfine = ~C(i-1) ^ x`, without the AND. At a stop where
`T(i)` is 0, both forms give 0. The parameter `FINE_EQN7` (default 0)
selects this second form. The testbench runs both and requires the same
`l`, `E` and counts.

This predictor needs no multi-level state. That makes it cheaper when several
patterns must be found at once. The cost is the first-stop detection, which
here is a prefix AND of the `U` signals. It is built as a 4-way tree, so the
predictor stays logarithmic in depth.

The two predictors agree on `sh_total`. They differ in the sign of the
correction. The tree's coarse count can be one too large; the distributed
coarse count can be one too small, which lets it drive a shifter whose last
stage adds one place (`left_shifter`'s `fine` input).

## Sign-magnitude significands: one's complement (`ones_comp_adder`)

IEEE significands are sign-magnitude. A two's-complement difference that
comes out negative must be negated, and that second addition can move the
leading one. A one's-complement adder avoids this:

1. Compute `a + ~b`.
2. If there was a carry out, feed it back in at the LSB (the end-around
   carry).
3. If the result is negative, invert it.

Inversion turns preceding ones into preceding zeros without moving the
boundary. So a predictor that finds both kinds of run gives the shift for
the magnitude directly. The predictor must use the adder's carries,
including the end-around one.

The end-around carry is the whole-word generate of the lookahead tree
(`cla_adder.g_all`). It does not depend on the carry in, so feeding it back
forms no loop.

## Sign-magnitude significands: compare and swap (`mag_swap`, `lop_pos`)

The other way to serve sign-magnitude operands is to compare the
magnitudes first. `mag_swap` puts the larger one first, so the difference
`larger + ~smaller + 1` is never negative. The predictor then only has to
find runs of zeros. The only such pattern is `T*GZ*`; `Z*` cannot start the
string, because `larger >= smaller`.

`lop_pos` is the tree of `lop_tree` cut down to that one pattern family.
Every run it finds is a run of zeros, so its correction is simply the carry
into the last matching bit:

```
c_fine = C(i-1)        sh_total = sh_coarse - c_fine      (i = first zero of sh)
```

Because this form does not look two bits back, it holds at the MSB too. The
tricky case is a difference that is already normalised. Its string starts
with `G` followed by `G` or `T`, the match is one symbol long, and `C(0)`
decides between a shift of 0 and a shift of 1. The source says only that the
correction must be modified for this case. The rule above is this design's
working of it. `tb_lop_pos` checks it against integer subtraction on 20 000
random cases, many of them already normalised.

The cost moves from the predictor to the comparator, which is as wide as the
adder. Here it is written as a plain unsigned comparison.

## Adders that form both sums (`dual_sum_lop`)

Some FP adders form `x + ~y` and `x + ~y + 1` together. A rounding
increment then costs only a choice between the two. The predictor must read
the carries of the sum that is actually the result, and it must decide this
before either sum is complete.

The predictor is needed only for subtraction with exponents at most one
apart. Alignment then pushes at most one bit of the smaller operand `y` out
of the kept width: its LSB, called `y_out` here (0 when nothing is shifted
out). Compute the difference one bit wider:

```
(x:0) - (y:y_out) = (x:0) + (~y:~y_out) + 1
```

The `+1` at the bottom carries into the kept bits only when `y_out = 0`.
So:

| `y_out` | kept bits of the difference | guard bit | carries the predictor reads |
|---------|-----------------------------|-----------|-----------------------------|
| 0       | `x + ~y + 1` (`sum1`)       | 0         | those of `sum1`             |
| 1       | `x + ~y` (`sum0`)           | 1         | those of `sum0`             |

`dual_sum_lop` builds the two sums with two `cla_adder` instances, one with
carry in 0 and one with carry in 1. Their group trees are identical, so
synthesis can share them. `y_out` selects the result and the carry vector
for a `lop_tree`. The result is two's complement. When the exponents are
equal it can be negative, and then it counts a run of ones.

Only the rule "the smaller operand's LSB decides" comes from the source. The
guard-bit derivation and the two-adder structure are this design's own.
Rounding itself is not built; both sums are outputs. `tb_dual_sum_lop` also
counts the cases where the two sums have leading runs of different length.
In those cases, reading the wrong carries would give a wrong count.

## Lookahead adder (`cla_adder`)

A carry out of a group is itself a pattern: `T*G` followed by anything.
Since the tail does not matter, `P = a|b` may replace `T`. The adder uses the
4-way group generate

```
G = G3 | P3 G2 | P3 P2 G1 | P3 P2 P1 G0          (3 = most significant bit of the group)
```

It applies this recursively in the same tree shape as the predictor. It
outputs the sum, the carry into every bit (for the fine corrections), the
carry out and `g_all`.

## Sticky bit without an adder (`sticky_bpd`)

An N×N multiplier ends with a carry-save pair: a sum vector and a carry
vector. IEEE rounding needs to know whether the low N−1 bits of their sum are
all zero (the sticky bit), and what carry they pass upward. Those bits are
zero exactly when their symbol string is

- `Z^(N-1)`, with carry out 0, or
- `T^j G Z^k` (`j + k = N-2`), with carry out 1.

The carry out in general is the lookahead pattern `P* G X*`. `sticky_bpd`
builds just these three chains as 4-way reduction trees, with no adder:
`sticky = ~(allZ | TGZ)` and `cout = generate`.

## Top level (`lop_norm_top`)

`lop_norm_top` is the cancellation path of an FP adder, built three ways,
plus the sticky unit beside it.

```
 one's-complement path
   {0,ma}, ~{0,mb} ─┬─► ones_comp_adder ─► mag ──────────────┬─► left_shifter(sh_total)     ─► norm_tree
                    │        └─ carries ─┐                    └─► left_shifter(coarse, +E)   ─► norm_dist
                    ├─► lop_tree ◄───────┤ ── sh_total ──────────────┘ (to the first shifter)
                    └─► lop_dist ◄───────┘ ── coarse, E ─────────────┘ (to the second shifter)

 compare-and-swap path
   {0,ma}, {0,mb} ─► mag_swap ─► larger, ~smaller ─┬─► cla_adder (cin 1) ─► diff_swap ─► left_shifter ─► norm_swap
                                                   └─► lop_pos ◄─ carries ── shamt_swap ──────┘

 compound-adder path
   {0,ma}, {0,mb}, mb_out ─► dual_sum_lop ─► dual_diff, dual_guard, fine_dual, dual_shamt

 mul_s, mul_c ─► sticky_bpd ─► sticky, mul_cout
```

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 54      | datapath width: a zero sign position plus a 53-bit significand |
| `NM`      | 53      | multiplier width for the sticky unit (it sees `NM-1` low bits) |

Ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `ma`, `mb` | in | N-1 | aligned magnitudes; the path computes `ma - mb` |
| `raw_sum`, `eac` | out | N, 1 | one's-complement sum, end-around carry |
| `neg`, `mag` | out | 1, N | sign of `ma - mb` (set when `mb >= ma`), `\|ma - mb\|` |
| `sh`, `coarse_tree`, `fine_tree`, `shamt_tree` | out | | tree predictor: SH array, coarse count, correction, total |
| `l1hot`, `coarse_dist`, `fine_dist`, `shamt_dist` | out | | distributed predictor: stop vector, coarse count, E, total |
| `swapped`, `diff_swap`, `fine_swap`, `shamt_swap`, `norm_swap` | out | | compare-and-swap path: swap flag, `larger - smaller`, correction, shift, normalised result |
| `norm_tree`, `norm_dist` | out | N | `mag` shifted so its leading one is in bit 0 |
| `mb_out` | in | 1 | compound path: bit of `mb` shifted out by alignment (0 if none) |
| `dual_diff`, `dual_guard`, `fine_dual`, `dual_shamt` | out | | compound path: kept bits of `ma - mb - mb_out/2` (two's complement), guard bit, correction, leading run |
| `mul_s`, `mul_c` | in | NM-1 | low bits of a multiplier's sum and carry vectors |
| `sticky`, `mul_cout` | out | 1 | sticky bit, carry into the upper half |

All three paths are built so that they can be compared. A real adder would
keep one of them.

When `ma == mb` the magnitude is zero and the shift counts mean nothing. The
normalised outputs are then 0.

Two outputs are constant by construction: `l1hot[0]` is always 0 and `sh[0]`
is always 1. `dual_guard` is always equal to `mb_out`.

Exponent logic, operand alignment and rounding are not part of this design.

## Departures and own choices

- **Widths.** The source gives no widths. N = 54 and NM = 53 are chosen for
  IEEE double precision. The tree radix of 4 follows the RS/6000 design.
- **Boundaries.** The predictor equations look two bits back, so the first
  two positions and the end of the word need rules of their own. These are
  this design's:
  - a stop at bit 1 (strings beginning ZT or GT) is always a run of exactly
    one bit;
  - a string that matches over all N bits is corrected at a virtual position
    N, using the adder's carry in.
- **Known limit.** The all-`T` string (`a == ~b`), whose sum is 0 or −1, can
  be counted one off by both predictors. In `lop_norm_top` this happens only
  when `ma == mb`, where the magnitude is zero anyway. The testbenches of the
  two predictors exclude it.
- **Distributed correction.** How `E_i` is formed from the stop flag and the
  per-bit correction is this design's choice: `e_i = l_i & ~cfine`. It makes
  the NOR of all `e_i` equal 1 exactly when one more place is needed.
- **Circuit style.** The distributed predictor in the source is a precharged
  (dynamic) circuit with a chain from cell to cell. Here it is static logic,
  and the first stop is found by a 4-way prefix-AND tree.
- **Compare-and-swap correction.** `lop_pos`'s correction, including the
  already-normalised case at the MSB, is worked out here. The source asks
  for it but does not give it. For equal magnitudes `lop_pos` counts N−1;
  the difference is zero then.
- **Adder.** `cla_adder` uses the plain group-generate equations. Ling's
  pseudo-carry form, which can make lookahead adders faster, is not used.
  It does not apply to the predictors. The `T` and `Z` after the `G` in
  their patterns are not implied by the `G`, which is what Ling's
  factoring needs.
- **Not built.** The multiplier's partial-product tree is not built. The
  compound-adder path stops at the two sums: it does no rounding and no
  normalising shift.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one compares the
block against integer arithmetic and against a direct scan of the symbol
string (`tb/lop_ref_pkg.sv`), not against the block's own equations. Each
ends by printing `TB_RESULT checks=<n> failures=<m>`.

The vectors are declared in ascending order, so Verilator's `ASCRANGE` style
warning has to be turned off. With Verilator 5:

```
verilator --binary --timing --assert -Wno-ASCRANGE -y rtl -y tb \
    rtl/lop_pkg.sv tb/lop_ref_pkg.sv tb/tb_lop_norm_top.sv \
    --top-module tb_lop_norm_top --Mdir obj
./obj/Vtb_lop_norm_top
```

Replace `tb_lop_norm_top` with `tb_lop_tree`, `tb_lop_dist`, `tb_lop_pos`,
`tb_dual_sum_lop`, `tb_cla_adder`, `tb_ones_comp_adder`, `tb_mag_swap`, `tb_left_shifter` or
`tb_sticky_bpd` to test a single block. Each run takes well under a second
once built.

What the tests cover:

- **`tb_lop_tree`, `tb_lop_dist`.** 20 000 operand pairs, drawn four ways:
  - uniform random;
  - near-cancelling, so the sum is small and the runs are long;
  - strings built from each of the four patterns plus a random tail;
  - strings that start with ZT or GT.

  Each pair is checked for the SH array (or the one-hot stop vector), the
  coarse count and the exact count. The test also requires that corrections
  of 0 and 1, fully matching strings, one-bit runs, and both signs all
  occurred. A second instance of each block uses the other form of the
  correction (`FINE_GLOBAL` or `FINE_EQN7` set to 1), and its results must
  match the first instance's.
- **`tb_dual_sum_lop`.** Checks both sums, the selected difference, the
  guard bit and the count on 20 000 subtractions. Each has a random
  shifted-out bit and is compared with integer arithmetic one bit wider.
- **`tb_lop_pos`.** Checks the zeros-only predictor on differences of
  20 000 ordered pairs. It includes already-normalised results and long
  zero runs.
- **`tb_lop_norm_top`.** Runs at the default parameters. On 20 000 cases it
  checks:
  - sign and magnitude;
  - all three shift counts and all three normalised words;
  - the swap flag;
  - the compound path's difference, guard bit and count;
  - the sticky outputs.

  It fails if any mechanism never occurred: end-around carry, negative
  result, zero result, a swap, any predictor's correction with either value,
  a shift of at least half the width, both values of `mb_out`, and all
  three sticky outcomes.
- **Assertions.** `lop_tree` asserts that its SH array is a run of ones.
  `lop_dist` asserts that its stop vector is one-hot.

## Changing the design

- **Width.** `N` may be changed freely. The trees pad the word to the next
  power of four internally. Testbench references use 64-bit integers, so
  they support N up to 63.
- **Adding a pattern.** Extend `bpd_t` and `bpd_cat()` in `lop_pkg`. Both
  tree blocks pick the change up.
- **Using one predictor.** Keep the predictor you want in `lop_norm_top` and
  delete the other with its shifter.
