# Diminished-1 modulo 2^n+1 multiplier and RNS building blocks

A residue number system (RNS) represents a large integer by its remainders
modulo a few co-prime moduli and does additions and multiplications on each
remainder independently, with no carries between them. The moduli set
{2^n-1, 2^n, 2^n+1} is popular because the first two channels are cheap. The
2^n+1 channel is the awkward one: its residues need n+1 bits, yet the value
2^n is the only one that uses bit n.

The *diminished-1* form removes that extra bit from the datapath. A residue A
is stored as d[A] = A-1 (mod 2^n+1). Every nonzero A then fits in n bits, and
zero (d[0] = 2^n) is marked by one flag bit. The centrepiece of this RTL is a
combinational multiplier that takes d[A] and a normal-form B, and returns
d[A·B]. It uses radix-4 Booth recoding, so it has only n/2 partial products.
Around it are the other channel blocks:

- a binary-to-residue (forward) converter for all three moduli;
- a modulo 2^n+1 adder for normal-form residues, whose correction is decided
  by a parallel-prefix computation;
- a modulo 2^n-1 adder whose end-around carry is computed in advance;
- a diminished-1 adder/subtractor.

Every block is purely combinational: there is no clock, reset or pipeline.
All blocks share one width parameter `N` (n). Its default is 8.

## Number forms at the ports

| signal form | width | meaning |
|---|---|---|
| diminished-1 residue | N+1 | bits N-1:0 = A-1 for A ≠ 0; bit N set (and the rest 0) means A = 0 |
| normal residue mod 2^n+1 | N+1 | 0 .. 2^n |
| normal residue mod 2^n-1 | N | 0 .. 2^n-1; all ones is a second code of zero |
| multiplier input B | N | 0 .. 2^n-1 (the value 2^n is **not** accepted) |

## The multiplier (`dim1_mult`)

### What is computed

With a = d[A], the product in diminished-1 form is

    d[A·B] = |a·B + B - 1| mod 2^n+1.

Three facts make this cheap:

1. **Booth recoding of d[A] with a folded top.** Radix-4 Booth digits
   m_i = -2a(2i+1) + a(2i) + a(2i-1), i = 0..n/2-1, are formed from d[A].
   The bit below the LSB is not 0. It is a(-1) = NOR(a(n-1), a(n)), where a(n)
   is the zero flag. Because 2^n = -1 (mod 2^n+1), this gives
   d[A] = Σ m_i·4^i - 1. The "-1" then cancels the "+B" of the formula, and
   what remains is d[A·B] = Σ m_i·4^i·B - 1.
2. **Shifts are rotations.** Multiplying by 2^k modulo 2^n+1 is a left
   rotation by k in which the k bits that wrap round are complemented
   ("iCLS"). For a normal-form B this gives iCLS(B,k) = 2^k·B + 2^k - 1.
   Negation is the one's complement. Each partial product is therefore a row
   of 2:1 selectors on B or ~B, with inverting cells where bits wrap. There
   is no adder in a row.
3. **Inverted end-around carry.** In a carry-save adder the carry out of bit
   n-1 has weight 2^n = -1. Feeding it back into bit 0 *inverted* gives
   x+y+z+2 = s+c+1 (mod 2^n+1). So a CSA tree keeps the diminished-1 meaning
   of its operands, and the last two vectors go into a diminished-1 adder
   that adds the final +1.

### Datapath

```
d[A] ──► N/2 Booth encoders ──► N/2 selector rows (B, ~B, rotations) ──► PP_0..PP_{N/2-1}
d[A] ──► correction-term logic ──────────────────────────────────────► CT
PP_0,PP_1,PP_2 ─► CSA ─► +PP_3 ─► CSA ─► ... ─► +CT ─► CSA ─► two-stage inverted adder ─► d[A·B]
```

- `booth_encoder`: gives the digit as `{neg, one, two}` (`rns_pkg::booth_sel_t`).
  `neg` = a(2i+1), so 000 is a "plus zero" and 111 a "minus zero".
- `booth_pp_row`, which has a parameter `I`: bit j of the row takes B[j-2I]
  for |m| = 1 or B[j-2I-1] for |m| = 2, both circular. Wrapped bits are
  complemented, and the row is XORed with `neg`. A zero digit sends 0
  through the same cells. The row's value modulo 2^n+1 is then
  m·4^I·B + m'·4^I - 1, with m' = m, or m' = +1 / -1 for the two zero digits.
- `dim1_ct_gen`: the CSA chain and the final adder add N/2 in total, so the
  operands must sum to Σ m_i·4^i·B - 1 - N/2. Solving for the extra operand
  gives CT = -1 - Σ m'_i·4^i. Rewritten, this is CT = ~d[A] - P + Q, where P
  (Q) sums 4^i over the plus-zero (minus-zero) digits, and 1 is added when
  A = 0. The ±1 corrections never carry out of their digit's two bits, so
  each digit needs only two gates:
  `ct[2i+1] = ~a(2i+1)` and `ct[2i] = maj(a(2i+1), ~a(2i), a(2i-1))`.
  The zero flag is ORed into `ct[0]`. CT depends only on d[A].
- `inv_eac_csa`: a full-adder row. The carry vector is rotated left by one,
  and its wrapped bit is inverted.
- The CSAs form a linear chain, as in the 8-bit arrangement this design
  follows: PP0+PP1+PP2, then PP3, then CT. For general N the chain has N/2-1
  CSAs. A Wallace tree would be faster for large N. To get one, change only
  the generate loop in `dim1_mult`, because each cell keeps the
  diminished-1 invariant on its own.
- `dim1_final_adder`: the "two-stage inverted adder". Stage 1 is x+y in N
  bits. Stage 2 adds the *inverted* carry out. The result is the value
  |x+y+1| mod 2^n+1. Its carry out is exactly the zero result 2^n and becomes
  the output's zero flag.

A = 0 needs no special path. d[0] = 2^n folds into the Booth digits through
a(-1), and the arithmetic then gives d[0] for any B. B = 0 also gives d[0].

### Size and depth

At N = 8 the multiplier synthesises to about 230 word-level cells, with no
flip-flops. There are N/2 partial products plus CT. The critical path runs
through one selector, N/2-1 CSA levels and an N-bit adder with an increment.

## Modulo 2^n+1 adder with prefix MSB (`mod2np1_prefix_adder`, `msb_unit`)

The adder computes (X+Y) mod 2^n+1 for X, Y in 0..2^n. One CSA row adds X, Y
and -1 (all ones): ps = ~(x^y), pc = x|y. `msb_unit` then finds bit n of
X+Y-1 without forming the sum. It pairs ps[i] with pc[i-1] into
generate/propagate signals, and a Kogge-Stone network gives the carry into
bit n. If that MSB is set, X+Y ≥ 2^n+1 and the answer is X+Y-1-2^n. The ripple
adder then adds ps + 2·pc with carry-in 0, and bit n of its result is
cleared. Otherwise the answer is X+Y: the same sum with carry-in 1. So the
carry-in of the final adder is the inverted MSB. This design adds one case:
X = Y = 0, where X+Y-1 is negative, is detected by the OR of `pc` and the
correction is skipped.

## Modulo 2^n-1 adder (`mod2nm1_prefix_adder`)

A prefix network computes the carry out of X+Y first. One adder then forms
X+Y+cout in N bits, with no second pass and no feedback. All ones can appear
(X+Y = 2^n-1) and means zero.

## Forward converter (`b2r_converter`, `mod2nm1_channel`, `mod2np1_channel`)

The 3n-bit input is split into n-bit slices X = {B3, B2, B1}. Then:

- **mod 2^n:** the low slice B1, with no logic.
- **mod 2^n-1:** since 2^n = 1, X = B3+B2+B1. A CSA with end-around carry
  reduces the three slices to two vectors. A ripple adder with end-around
  carry adds them, applying that carry as a second increment stage so there
  is no combinational loop. All ones is a second code of zero.
- **mod 2^n+1:** since 2^n = -1, X = B3 - B2 + B1. Two adders run in
  parallel:
  - an (n+1)-bit adder forms ~('0'&B2) + "10…010" = 2^n+1-B2, which is -B2
    (mod 2^n+1);
  - an n-bit adder forms B3+B1 with its carry out.

  The two sums can add up to almost three times the modulus. The final
  modulo addition therefore forms t, t-M and t-2M and keeps the smallest
  non-negative one. The residue is exact (0..2^n).

## Diminished-1 adder/subtractor (`dim1_addsub`)

This block adds or subtracts two diminished-1 residues. The sum is
d[A+B] = |d[A] + d[B] + 1|, and the difference uses d[-B] = ~d[B]. Both go
through the same two-stage inverted adder as the multiplier's last stage.
These rules hold only for nonzero operands. So a zero operand (its flag bit
set) bypasses the adder:

- A = 0 gives d[B], or d[-B] when subtracting;
- B = 0 gives d[A].

## Top level (`rns_top`)

`rns_top` places the converter, the two normal-form adders, the multiplier
and the diminished-1 adder/subtractor side by side, each with its own ports
(`cv_*`, `ap_*`, `am_*`, `mu_*`, `ds_*`). They are not
chained. The multiplier works in diminished-1 form and the other blocks in
normal form, and no conversion between the two forms is part of this design.

## Where this RTL departs from, or goes beyond, its source

- The published arrangement gives the block structure: encoders, selector
  rows with complementing cells, a correction operand, inverted-EAC CSAs and
  a two-stage inverted adder. The following were worked out for this RTL and
  verified exhaustively at n = 8:
  - the correction-term logic;
  - the value of a zero-digit partial product;
  - the way a(n) enters the recoding.

  The source draws the correction cells as XNOR-type gates. The gates here
  are an inverter and a majority gate per digit.
- The multiplicand B is limited to 0..2^n-1. For B = 2^n (B = -1), use
  d[A·(-1)] = ~d[A], or a zero-flag input on B, outside this block.
- The 2^n+1 adder clears bit n when it corrects, and handles X = Y = 0. The
  source describes neither.
- The final modulo addition of the 2^n+1 converter channel is a plain
  three-way selection. The source names this block without describing it.
- The prefix networks are Kogge-Stone. The source asks only for a
  parallel-prefix carry computation.
- The source reports FPGA results for 8- and 16-bit multipliers and for 8-,
  12- and 16-bit residue blocks. Those figures cannot be reproduced here. The
  16-bit multiplier has 17+16+17 = 50 port bits, the same as the reported I/O
  count.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against integer arithmetic modulo 2^n±1 and ends with a
`TB_RESULT checks=… failures=…` line.

- `tb_dim1_mult`: every A in 0..256 and every B in 0..255 at n = 8 (65,792
  products), and 40,000 random products at n = 16.
- `tb_booth_pp_row`, `tb_dim1_ct_gen`, `tb_dim1_final_adder`, `tb_msb_unit`,
  `tb_mod2np1_prefix_adder`, `tb_mod2nm1_prefix_adder`: exhaustive at n = 8.
- `tb_dim1_addsub`: exhaustive at n = 8, both modes.
- `tb_inv_eac_csa` and the converter channels: random vectors plus corners.
- `tb_b2r_converter`: n = 8 and n = 16.
- `tb_rns_top`: the whole top at its default N = 8. It counts, and requires
  at least once:
  - each Booth digit kind (+1, +2, -1, -2, +0, -0);
  - A = 0 and a zero product;
  - corrected, uncorrected and 0+0 sums in the 2^n+1 adder;
  - the end-around carry and the zero code in the 2^n-1 adder;
  - zero, one and two modulus subtractions in the 2^n+1 converter channel;
  - both modes of the adder/subtractor, a zero operand and a zero result.
- `tb_residue_sizes`: the adders, the converter and the multiplier at
  n = 12 and n = 16.

The testbenches do not check timing, since the blocks have no clock.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_dim1_mult rtl/rns_pkg.sv tb/tb_dim1_mult.sv -o sim
./obj_dir/sim
```

To change the width, set `N` on `rns_top` or on any block. N must be even
and at least 4 for the multiplier, and at least 2 for the other blocks.
Testbenches that use 64-bit integer references work up to about N = 20.
