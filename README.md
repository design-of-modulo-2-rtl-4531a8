# Radix-8 Booth modulo 2^n-1 multiplier with partially-redundant hard multiple

This is a combinational multiplier that computes `p = |x * y| mod (2^n - 1)`. It is
meant for the 2^n-1 channel of a residue number system (RNS) built on the moduli set
{2^n-1, 2^n, 2^n+1}. Systems like that split the long multiplications of RSA and
elliptic-curve cryptography into short independent channel multiplications. The
channels are not equally fast, so each one only has to keep up with the slowest.
This multiplier has a delay knob for that purpose.

The multiplier uses radix-8 Booth recoding. This cuts the number of partial products to
`floor(n/3)+1`, but needs the "hard" multiple 3X, which takes an addition. Here that
addition is never carried across the whole word. It is split into `M = n/k` independent
`k`-bit ripple-carry adders, and their carry-outs stay as separate bits. This is called a
*partially-redundant* form. The parameter `k` sets the only carry chain in the
partial-product stage:
- a small `k` gives a fast multiplier with more redundant bits;
- a large `k` gives fewer redundant bits and a longer chain.

The defaults are `N = 8`, `K = 4`, the worked example that the design is presented with.

## Arithmetic modulo 2^n-1 used throughout

Three facts make this modulus cheap:

- **Negation is bitwise complement.** `~v = (2^n-1) - v`, so `-v ≡ ~v`.
- **Multiplying by 2^i is a left rotation by i bits.** A bit that leaves the top has
  weight 2^n ≡ 1 and comes back in at bit 0. So 2X, 4X and the shift by 2^(3i) of each
  partial product are pure wiring.
- **Carries out of bit n-1 wrap around (end-around carry).** Every carry-save level
  rotates its carry word left by one bit. The final adder feeds its carry-out back in
  as carry-in.

Zero has two codes, all zeros and all ones. The output uses either one for a product
that is congruent to zero, which is the usual convention for this modulus.

## Radix-8 Booth digits

Digit `i` is formed from the overlapping quartet `y[3i+2] y[3i+1] y[3i] y[3i-1]`:

    d_i = y[3i-1] + y[3i] + 2*y[3i+1] - 4*y[3i+2]      d_i in [-4, +4]

Bit `y[-1]` and the bits above `y[n-1]` read as 0, so there are `floor(n/3)+1` digits.
For example, with n = 8 and `y = 0110_1100` (108), the digits are
`d = (-4, -2, +2)`, and -4 - 2·8 + 2·64 = 108.

`booth_encoder` turns each quartet into a signed one-hot digit (`mod_mul_pkg::booth_digit_t`):
- a sign bit, taken directly from `y[3i+2]`;
- four magnitude lines, for |d| = 1, 2, 3 and 4.

The encoder works in two steps. For negative digits it first inverts the three low bits.
After that, `|d| = t0 + t1 + 2*t2` holds for either sign. Code `1111` is a "negative
zero": the sign bit is set and no magnitude line is high. This is harmless, as shown below.

## The biased, partially-redundant multiples (the central idea)

Every multiple that a Booth selector can choose has the same shape:

- an n-bit **sum word**;
- `M = n/k` **carry bits**. Carry bit `j` has weight `2^((k*j+1) mod n)`.

Its value is the sum word plus the carry bits at their weights, modulo 2^n-1. Every
multiple also carries the same **bias**, `B = Σ_j 2^(k*j)`. For n=8, k=4 this is
`B = 0001_0001`. So what is selected is `B + d*X`, not `d*X`.

**Hard multiple B+3X** (`hard_multiple`). First, 2X is X rotated left by one bit. RCA `j`
then adds bits `k*j .. k*j+k-1` of X and 2X. It produces sum bits `s` and a carry-out
`c[j]` of weight `2^(k*(j+1))`. The carry-out of the top adder wraps to bit 0. So `(s, c)`
already represents 3X, but its carries sit on the bias positions `k*j`.

Adding B fixes that. At each position `k*j` three bits meet: `s[k*j]`, the incoming carry
`c[j-1]` (or `c[M-1]` when j = 0), and the bias 1. Their two-bit sum is

    bs[k*j] = XNOR(s[k*j], c[j-1])          (new sum bit)
    bc[j]   = s[k*j] OR c[j-1]              (carry into position k*j+1)

That is one XNOR and one OR per adder. No other bit changes. The longest carry path
is `k` full adders, independent of `n`.

**Simple multiples B+X, B+2X, B+4X** (`simple_multiples`). Rotate X by 0, 1 or 2 bits to
get a word `w`. Adding the bias to `w` changes only the bits at `k*j`:
- sum bit `~w[k*j]`;
- carry `w[k*j]` into position `k*j+1`.

So each simple multiple costs a few inverters. B+0 is simply the sum word B with no
carries.

**Negative digits** (`booth_selector`). Complement the sum word and the carry bits of the
selected multiple. The two words add up to all ones, which is ≡ 0. Each pair of
complementary carry bits adds `2^(k*j+1)`, which makes 2B in total. The complemented
multiple is therefore `2B - (B + dX) = B - dX`. It keeps the bias B, so every partial
product carries exactly one B, whatever its sign or magnitude. The negative zero selects
the complement of B+0 (all-ones carries). That is again worth B.

Each selector output bit is an AND-OR over the five candidates, followed by an XOR with
the sign.

## Partial-product matrix and compensation constant

`pp_generator` rotates selector `i`'s sum word left by `3i`. This multiplies it by
`2^(3i)`. The carry bits move with the word: carry `j` of partial product `i` lands on
`(k*j + 1 + 3i) mod n`. For n=8, k=4 the six carry bits fall on six different positions
(1, 5, 4, 0, 7, 3), so they fill a single extra row:

    row 0   pp0 (rotated by 0)
    row 1   pp1 (rotated by 3)
    row 2   pp2 (rotated by 6)
    row 3   q20 .  q01 q10 q21 .  q00 q11     (bit 7 .. bit 0)
    row 4   CC = 0010_0010

For other sizes some carry bits can collide. For example, n=12, k=4 has five partial
products whose carries repeat with period 12. The generator then opens another row for
each depth of collision; the package functions `q_pos`, `q_row` and `num_qrows` compute
the layout.

Each partial product contributes one bias, rotated by `3i`. The last row removes them
all:

    CC = | -B * Σ_i 2^(3i) | mod 2^n-1

The function `comp_const` computes it at elaboration. For n = 8 it gives `0010_0010`.
The rows then add up to `x*y` modulo 2^n-1.

## Accumulation and final adder

`eac_csa_tree` reduces the rows to two words. Each level groups its operands in threes,
one `eac_csa` per group: a 3:2 carry-save adder whose carry word is rotated left by one
bit. The one or two operands left over pass to the next level unchanged. For the five
rows of the default size this takes three levels:
1. the three partial products;
2. then the carry row;
3. then CC.

`mod_adder` adds the two words modulo 2^n-1. It is a Sklansky parallel-prefix adder with
`ceil(log2 n)` levels. Level `l` combines the upper half of every 2^l-bit block with the
last bit of the lower half. One extra AND-OR per bit feeds the carry-out (group generate
of all n bits) back in as carry-in:

    carry into bit i = G[i-1:0] | P[i-1:0] & cout,   carry into bit 0 = cout

When `a + b` is exactly 2^n-1 or 2(2^n-1), the result is all ones, the second code of
zero. It is not corrected to 0.

## Interface, parameters, timing

`mod_mul_r8 #(N = 8, K = 4) (input [N-1:0] x, input [N-1:0] y, output [N-1:0] p)`

- `x` and `y` are unsigned N-bit residues. `p ≡ x*y (mod 2^N-1)`, with zero as 0 or
  all ones.
- `N` must be a multiple of `K`; elaboration stops otherwise. The bias placement works
  for any `K ≥ 1`.
- Everything is combinational: no clock, no reset, no registers. Add pipeline
  registers around the instance as needed.
- Structure: `pp_generator` (with `simple_multiples`, `hard_multiple` and one
  `booth_encoder` plus one `booth_selector` per digit) → `eac_csa_tree` → `mod_adder`.
  `rca` and `eac_csa` are the small adders inside them. `mod_mul_pkg` holds the digit
  type and the layout functions.

Choosing K: the partial-product stage has a carry chain of K full adders. The accumulation
tree grows by one row of carry bits (or more where they collide). The design gives no
rule for picking K at a given n. Choose it so that the multiplier's delay matches the
critical RNS channel.

The two ends of the range are:
- `K = N`: a single N-bit adder. The hard multiple is then an N-bit sum plus one
  redundant end-around-carry bit.
- `K = 1`: no carry chain at all. The hard multiple is X and 2X in carry-save form.

## What is this design's own

These points are not fixed by the published design and were chosen here:
- The gate-level decode of the Booth encoder. Only its function, a signed one-hot digit,
  is specified.
- The AND-OR/XOR form of the Booth selector.
- Plain full-adder chains inside the k-bit adders.
- The Wallace-style grouping of the CSA tree. For five rows it reproduces the three-level
  chain of the reference.
- The end-around-carry feedback layer of the Sklansky adder, and leaving zero in two
  codes.
- Extra carry rows where carry bits collide. The reference shows only the n=8, k=4 case,
  where they do not.
- The purely combinational interface. No latency or pipelining is specified.

The other channels of the RNS (modulo 2^n and 2^n+1) and the conversions to and from
binary are out of scope.

## Verification

Each block has a self-checking testbench in `tb/`. Expected values are worked out in the
testbench from the arithmetic, not from the RTL:

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | all 16 quartets against the digit formula |
| `tb_simple_multiples`, `tb_hard_multiple` | value of sum word + carry bits ≡ B + m·x (and B − 3x for the complement), exhaustive at n=8 and also at k=2, 8 and n=12, k=3 |
| `tb_booth_selector` | bit-exact selection and complement for every digit |
| `tb_pp_generator` | rows sum to x·y for all 65536 pairs at n=8; CC = 0010_0010; row count, including the collision case n=12, k=4 |
| `tb_eac_csa_tree` | random rows, 3 to 10 rows deep |
| `tb_mod_adder` | exhaustive at n=8, random at n=13 and 32, including the all-ones zero and the carry-out |
| `tb_mod_mul_r8` | default size, all 65536 pairs |
| `tb_mod_mul_r8_sizes` | n = 8, 9, 12, 16, 28, 32 with k from 1 to n, random operands plus 0, 1 and 2^n-1 |

`tb_mod_mul_r8` also counts that each mechanism happens at least once:
- every reachable digit value in every digit position, including −4 and −0;
- the hard multiple with both signs;
- the end-around carry taken and not taken;
- the all-ones zero.

Every testbench prints `TB_RESULT checks=N failures=F`.

To run one with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/mod_mul_pkg.sv tb/tb_mod_mul_r8.sv \
        --top-module tb_mod_mul_r8 -Mdir obj && ./obj/Vtb_mod_mul_r8

Replace the testbench name to run any other. To lint a module, use
`verilator --lint-only -Wall -Irtl rtl/mod_mul_pkg.sv rtl/<module>.sv`.
