# Redundant binary Booth multiplier without an error-correction row

This is a combinational N x N two's complement multiplier (N = 32 by default)
that adds its partial products in **redundant binary** (RB) form. An RB digit
takes the values -1, 0 and +1, so two RB numbers can be added with no carry
travelling more than one digit. A tree of such adders therefore has a delay
that depends only on the number of tree levels, not on the word length.

The partial products come from radix-4 (modified) Booth encoding of the
multiplier. A Booth product that is negated needs a +1 correction at its LSB.
Turning two binary rows into one RB row needs a -1 correction. A conventional
RB Booth multiplier gathers these corrections into an extra
**error-correcting word (ECW)**. That word is one more RB row, which can
cost a whole extra level of the adder tree.

The main idea here is to fold every correction into digits the rows already
have. The generator delivers exactly **N/4 RB rows**, not N/4 + 1. For
N = 32 that means 8 rows and three accumulation stages, not four.

```
 x (multiplicand) ─┐
                   ├─► rbmppg2 ──(N/4 RB rows)──► rbpp_tree ──(1 RB row)──► rb2nb ──► product
 y (multiplier)  ──┘   Booth + RB rows,           log2(N/4) stages of       2N-bit subtraction
                       ECW folded in              carry-free RB addition    (prefix/carry-select)
```

## RB numbers in this design

Each RB digit is stored as two bits (p, n) and has the value p - n. An RB
vector is therefore just a pair of ordinary bit vectors: its value is
`P - N` (positive vector minus negative vector). Inputs may use (1,1) as a
second code for 0. Every adder cell outputs the canonical codes +1 = (1,0),
0 = (0,0) and -1 = (0,1). All rows are aligned in one 2N-digit frame. All
arithmetic is modulo 2^(2N), which is exactly what a 2N-bit two's complement
product needs, so sign extension beyond the frame never matters.

## Building one RB row (`rbbe2`)

The multiplier y is cut into radix-4 Booth groups `{y[2k+1], y[2k], y[2k-1]}`,
with `y[-1] = 0`. Each group is a digit d in {-2, ..., 2} (`booth_enc`). The
Booth product d*A is formed as an (N+1)-bit vector: A, 2A or 0, XORed with
`neg`. When neg = 1, the true value needs a +1 at the LSB. Group 111 is
treated as +0, so it needs no correction.

RB row r takes two neighbouring Booth products: PP0 (group 2r) and PP1
(group 2r+1, weight 4). PP0 goes into the positive bits. PP1 goes, inverted,
into the negative bits. The row is their sum, and no addition is done.
In the row's own frame:

| bits | digits | content |
|---|---|---|
| `xp` (positive) | 0 .. N+2 | `{~s0, s0, s0, p0[N-1:0]}` |
| `xn` (negative) | 2 .. N+2 | `{s1, ~p1[N-1:0]}` |
| `f` (ECW, +1) | 0 | `neg0`, the correction bit of PP0 |
| `e_n` (ECW, -1) | 2 | `~neg1`, which is PP1's correction +1 combined with the RB coding's -1 |

Here s0 and s1 are the sign bits of the two Booth products. The three top
positive bits fold PP0's sign extension and the constant left over from
inverting PP1 into plain bits. With them the row's value is exactly
`xp - 4*xn + f - 4*e_n = (d0 + 4*d1) * A`, and no separate sign-extension
constant is needed anywhere.

## Where the corrections go (`rbmppg2`)

Row r sits at digit 4r (positive bits) and 4r+2 (negative bits). Row r+1
starts four digits higher, so its low digits 4r .. 4r+3 are empty. The ECW
of row r (+1 at digit 4r, -1 at digit 4r+2) is written straight into those
empty slots of row r+1.

Only the **last row's ECW** has nowhere to go. For N = 8 (two rows) the
picture is as follows. `P`/`N` are the positive/negative bits of the two
rows, `F0`/`E0` is row 0's ECW in row 1, and `*` marks the digits that are
re-coded:

```
digit      14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
row 0  P                *  *  *  P  P  P  P  P  P  P  P
row 0  N                N  N  N  N  N  N  N  N  N
row 1  P    P  P  P  P  P  P  P  P  P  P  P          F0
row 1  N    N  N  N  N  N  N  N  *  *  *  *    E0
last ECW                            E     F    (+F at N-4, -E at N-2)
```

### Folding the last ECW (`ecw_absorb`)

The last ECW is added into a small window of digits whose contents are fully
known:

- row 0's three sign-extension bits at digits N .. N+2, which hold
  (s0, s0, ~s0);
- the last row's two lowest negative bits at N-2 and N-1;
- the last row's two still-empty negative slots at N-4 and N-3.

Counted in units of 2^(N-4), the window plus the ECW is

    T = 48*s0 + 64*~s0 - 4*y0 - 8*y1 + f - 4*e_n,   32 <= T <= 65.

T is then written back into the same places as

    T = 16*qp - (8*m3 + 4*m2 + 2*q1 + q0),  with qp = ceil(T/16) in 2..5 and m in 0..15.

`qp` replaces the three sign bits of row 0. (m3, m2) replace the last row's
two negative bits, and (q1, q0) fill the two empty slots. This is a 5-input,
7-output function with no carry chain. Its inputs are ready as soon as the
Booth products are, so it adds a few gate levels to the generator. That is
far less than the extra tree stage it saves. `tb_ecw_absorb` checks it exhaustively.

## Carry-free accumulation (`rbfa`, `rbha`, `rba`, `rbpp_tree`)

`rbfa` adds two RB digits in two steps. First, the digit sum z in -2..2 is
split as z = 2c + w. For z = +-1 the split depends on one lookahead bit from
the digit position below: h = "both digits there are non-negative".

- If h = 1, the carry coming up from below is 0 or +1, so w is chosen in {-1, 0}.
- If h = 0, the incoming carry is 0 or -1, so w is chosen in {0, +1}.

Then the final digit w + c_in always stays in {-1, 0, 1}. Each cell looks
only at its own position and the one below it.

`rbha` is the same cell with one operand fixed at 0. An accumulation block
`rba` uses full adder cells over the digit range where both rows can hold
digits, and half adder cells elsewhere. `rbpp_tree` pairs adjacent rows over
log2(N/4) stages: three for N = 32 and four for N = 64. It takes each
block's full-adder range from the row spans in `rbm_pkg`. A deferred
assertion in `rba` flags any digit that reaches a half adder cell from both
rows at once. The carry out of
the top digit is dropped, because the result is only needed modulo 2^(2N).

## RB to binary (`rb2nb`)

The final RB row is turned into binary by one 2N-bit subtraction,
`P + ~N + 1`. The adder is a hybrid of two techniques:

- **Carry select.** The word is cut into 8-bit blocks. Each block computes
  its sum for both possible carry-ins.
- **Parallel prefix.** A Kogge-Stone prefix network over the block
  generate/propagate pairs gives every block's carry-in.

This is the only carry-propagating part of the multiplier.

## Interface and timing

`redundant_binary_mul #(parameter int N = 32)` has these ports:

| port | dir | width | |
|---|---|---|---|
| `x` | in | N | multiplicand, two's complement |
| `y` | in | N | multiplier, two's complement |
| `product` | out | 2N | x * y |

The multiplier has no clock, reset or registers. The product is valid one
combinational delay after the operands change. N must be a power of two and
at least 8; elaboration stops with an error otherwise. The design has been
simulated at N = 8, 16, 32 and 64. For reference, N = 32 uses 8 RBBE-2 row
generators, a 3-stage tree and a 64-bit converter. N = 64 uses 16 rows, a
4-stage tree and a 128-bit converter.

## Departures and own choices

- **Sign-extension layout is this design's own.** The first row therefore
  has three sign bits, not two. As a result, the last-ECW fold re-codes
  three positive bits of row 0, not the two most significant bits of the
  first row. Its re-coding table (above) is derived for this layout. It is
  not the published 8-bit logic equations for the four re-coded bits, which
  assume a different encoding of those bits.
- **Cell counts per accumulation block differ from the original design.**
  The published 64-bit design quotes 64 full adder cells per block. Here,
  the first-stage blocks of N = 64 have 67 full adder cells, because the
  rows are 2 digits wider.
- **The converter's block size and prefix topology are own choices:** 8-bit
  blocks and Kogge-Stone.
- **The default width is 32 bits.** That is the configuration with three
  accumulation stages and a 64-bit converter. A 16 x 16 instance
  (`N = 16`), like the one shown in the published schematic, is obtained
  by setting the parameter.
- **Timing, area and power results are not reproduced.** There are no
  registers, and no gate-level or transmission-gate structure is modelled.

## Files

| file | contents |
|---|---|
| `rtl/rbm_pkg.sv` | Booth select and RB digit types, row-span functions for the tree |
| `rtl/booth_enc.sv` | radix-4 Booth encoder |
| `rtl/rbbe2.sv` | one RB partial product row from two Booth products |
| `rtl/ecw_absorb.sv` | re-coding that folds the last row's ECW |
| `rtl/rbmppg2.sv` | complete partial product generator, N/4 rows |
| `rtl/rbfa.sv`, `rtl/rbha.sv` | RB full / half adder cells |
| `rtl/rba.sv` | accumulation block (two rows to one) |
| `rtl/rbpp_tree.sv` | reduction tree |
| `rtl/rb2nb.sv` | RB-to-binary converter |
| `rtl/redundant_binary_mul.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/rbm_pkg.sv tb/tb_rbm_full.sv --top-module tb_rbm_full
./obj_dir/Vtb_rbm_full
```

The main testbenches are:

- **`tb_rbm_full`** runs the default 32-bit multiplier on 3 x 2, corner
  values and 20 000 random pairs.
- **`tb_redundant_binary_mul`** also runs N = 8 exhaustively (all 65 536
  pairs), N = 16 (including the 3 x 2 example) and N = 64. Every product is
  compared with the simulator's own multiplication.
- **Both** count how often each mechanism occurs and fail if one never
  does. The counted cases are: each Booth digit value in the top group,
  both signs of row 0, both values of each folded correction, and every
  re-coded value 2..5 of row 0's sign bits.

The module testbenches check the following:

| testbench | what it checks | coverage |
|---|---|---|
| `tb_booth_enc` | selected digit equals the group's digit | all 8 groups |
| `tb_rbbe2` | row value equals (d0 + 4*d1)*A | every 5-bit multiplier slice |
| `tb_ecw_absorb` | window value unchanged by the re-coding | all 32 input cases |
| `tb_rbmppg2` | sum of the 8 rows equals A*B | random and corner operands |
| `tb_rbfa`, `tb_rbha` | the digit identity and the lookahead rule | exhaustive |
| `tb_rba`, `tb_rbpp_tree` | sum values, modulo 2^(2N) | random rows |
| `tb_rb2nb` | output equals P - N | random and corner inputs |
