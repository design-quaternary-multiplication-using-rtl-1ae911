# Carry-free quaternary signed-digit adder and multiplier

A binary adder is slow for wide words because a carry can ripple from the
lowest bit to the highest. This RTL avoids that by computing in radix 4 with
**signed digits**: every digit may take any value from -3 to +3. Because that
is more digit values than radix 4 strictly needs, most numbers have several
spellings (6 = 1·4 + 2 = 2·4 − 2). The adder uses this freedom to choose, at
every digit position, a spelling whose carry can always be absorbed by the next
digit up, so no carry ever travels more than one position. The delay of an
addition is therefore the same for 4 digits or 64 digits.

On top of that adder sits a quaternary signed-digit (QSD) multiplier: partial
products are formed one multiplier digit at a time, with the same
carry-absorbing trick, and summed in a tree of carry-free adders. Two
multipliers are provided: a parallel one (4x4 digits by default;
combinational, log-depth adder tree) and an iterative add-shift one that uses a single partial product
generator and one adder over several clock cycles.

## Number format

| item | encoding |
|---|---|
| QSD digit, −3..+3 | 3-bit two's complement (`101`=−3 … `011`=+3); `100` is never produced and is not a legal input |
| intermediate carry, −1..+1 | 2-bit two's complement |
| N-digit number | digits packed flat, digit *i* in bits `[3i+2:3i]`, worth Σ dᵢ·4ⁱ |

Examples, most significant digit first: `1 2 3 3` is
1·64 + 2·16 + 3·4 + 3 = 111, and 23 can be written `1 1 3` or `1 2 −1`. Negating a QSD number means negating every digit, with no borrow
chain.

Results are in redundant form. Converting a QSD result to ordinary binary
needs a normal carry-propagating addition of the positive and negative digit
weights; that conversion is not part of this RTL (the testbenches do it in
software to check results).

## Carry-free addition: the two steps

Addition of digits aᵢ and bᵢ happens in two stages, each depending on at most
two neighbouring digit positions.

**Step 1 — carry/sum generator (`qsd_csg`).** The digit sum v = aᵢ + bᵢ lies in
−6..+6. It is recoded as v = 4·cᵢ + sᵢ with the carry restricted to |cᵢ| ≤ 1
and the sum to |sᵢ| ≤ 2:

| v | −6 | −5 | −4 | −3 | −2 | −1 | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| cᵢ | −1 | −1 | −1 | −1 | 0 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 |
| sᵢ | −2 | −1 | 0 | 1 | −2 | −1 | 0 | 1 | 2 | −1 | 0 | 1 | 2 |

The key point is ±3: it is *not* kept as a sum digit, but sent up as a carry
with a ∓1 left behind. That keeps every sᵢ at magnitude 2 or less.

**Step 2 — second-step adder (`qsd_step2`).** The output digit is
sᵢ + cᵢ₋₁. With |sᵢ| ≤ 2 and |cᵢ₋₁| ≤ 1 the result is within −3..+3, a
legal digit, so this stage never produces a carry of its own. In hardware it
is simply a 3-bit add of the sign-extended carry.

**N-digit adder (`qsd_adder`).** N generators and N−1 second-step adders:
digit 0 of the result is s₀ unchanged, digit i is step2(cᵢ₋₁, sᵢ), and the top
carry c_{N−1} is output as `cout`, a 2-bit digit N. The result is N+1 digits.
No output depends on more than two input digit positions, so depth and
per-digit logic are independent of N; area grows linearly.

**Adder/subtractor (`qsd_addsub`).** When `sub` is 1 every digit of B is
negated (3-bit two's-complement negation is exact for −3..+3) before the
adder. This is borrow-free subtraction.

## Multiplication

### One digit times one digit (`qsd_digit_mult`)

A product of two digits is one of 0, ±1, ±2, ±3, ±4, ±6, ±9. It is recoded as
p = 4·c + m with both c and m in −2..+2:

| p | 1 | 2 | 3 | 4 | 6 | 9 |
|---|---|---|---|---|---|---|
| c | 0 | 0 | 1 | 1 | 1 | 2 |
| m | 1 | 2 | −1 | 0 | 2 | 1 |

(negative products mirror these; 0 gives (0, 0)).

### Partial product generator (`qsd_ppgen`)

Multiplying an N-digit A by a single digit b uses N single-digit multipliers.
Position i must then add mᵢ and cᵢ₋₁. Since a carry here can be 2 in
magnitude (from ±9), the sum can reach ±4 and a second-step adder alone is not
enough: a full two-step stage is used as the gatherer.

```
 digit 0      : m0
 digit 1      : s  of csg(m1, c0)
 digit i      : step2( carry of csg(i-1),  s of csg(m_i, c_{i-1}) )   i = 2..N-1
 digit N      : step2( carry of csg(N-1),  c_{N-1} )
```

The top digit needs no generator: |c_{N−1}| ≤ 2 plus a carry of magnitude 1
stays within ±3. The partial product is N+1 digits.

### Parallel multiplier (`qsd_mult_par`)

The default configuration is 4x4 digits: A and B are 4 digits each (12 bits)
and the product R is 9 digits (27 bits). Four generators form Pⱼ = A·Bⱼ
(5 digits, 15 bits each). The sum P₀ + 4P₁ + 16P₂ + 64P₃ is taken in a
two-level tree:

```
 P0[2:0]  ----------------------------------------------------> R[2:0]
 {000,P0[14:3]} + P1  (5-digit adder, low)   -> SA[14:0], CA
      SA[2:0] ----------------------------------------------> R[5:3]
 {000,P2[14:3]} + P3  (5-digit adder, high)  -> SB[14:0], CB

 7-digit adder
   A = { 000 000, sext(CA), SA[14:3] }          (21 bits)
   B = { sext(CB), SB[14:0], P2[2:0] }          (21 bits)
   S[20:0] ------------------------------------------------> R[26:6]
```

`sext` turns a 2-bit carry into a 3-bit digit by repeating its sign bit. The
lowest digit of each lower partial product is already final and bypasses the
adders, which is why the first-level adders are only 5 digits wide. The
7-digit adder's carry-out is always zero, because its top input digits are 0
and a value in −1..+1, which can never reach ±3. An assertion checks this,
and the carry-out is not brought out.

The module takes any power of two N ≥ 2 by repeating this pattern level by
level. At level l the two terms of a pair are 2^(l−1) digits apart. That many
low digits of the lower term bypass the adder. The rest of the lower term is
zero-extended and added to the upper term. From level 2 on the carry-out is
always zero and is dropped. Term widths grow N+1, N+3, N+5, N+9, … digits and
end at exactly 2N+1. The depth is one partial product generator plus log₂N
adders, with no carry ripple anywhere. N = 8 (three levels, 17-digit product)
is tested as well.

### Iterative multiplier (`qsd_mult_iter`)

The add-shift version uses one N-digit partial product generator and one
2N-digit carry-free adder. The multiplier register shifts down one digit per
clock, feeding its lowest digit Bⱼ to the generator; A·Bⱼ is shifted up j
digits and added to a 2N+1-digit accumulator (the adder's carry-out becomes
the top digit). Before iteration j the accumulator can only have non-zero
digits up to position N+j, since each addition extends its operands by at
most one digit; so feeding back only its low 2N digits never loses anything.
An assertion checks this.

Handshake and timing:

- `start` is sampled on a rising clock edge while idle; operands `a`, `b` are
  captured on that edge, `p` is cleared. `start` while `busy` is ignored.
- `busy` is high for the next N cycles, one iteration per cycle.
- `done` is a one-cycle pulse N cycles after the start edge, when `busy`
  falls; `p` then holds the 2N+1-digit product until the next start.
- Reset is synchronous and active low.

## Top level (`qsd_arith_top`)

The arithmetic unit places three independent units side by side, each with its
own ports; there is no shared opcode:

| ports | unit | timing |
|---|---|---|
| `add_a`, `add_b`, `add_sub` → `add_s`, `add_cout` | `qsd_addsub`, `ADD_DIGITS` digits (default 64, the width of a 128-bit binary adder) | combinational |
| `mul_a`, `mul_b` → `mul_r` | `qsd_mult_par`, `MUL_DIGITS` x `MUL_DIGITS` (default 4) | combinational |
| `it_start`, `it_a`, `it_b` → `it_busy`, `it_done`, `it_p` | `qsd_mult_iter`, N = `MUL_DIGITS` | `MUL_DIGITS` cycles per product |
| `clk`, `rst_n` | used only by the iterative multiplier | |

## Relation to the published design

Taken from the published QSD adder/multiplier design: the digit encoding, the
carry/sum recoding table, the second-step table, the N-digit adder structure,
the single-digit multiplication recoding, the partial product generator
structure, and every bit field and adder width of the 4x4 parallel multiplier.
The published design describes the N x N parallel multiplier only in general
terms: N partial products, N−1 adders and a binary reduction. Only the 4x4
case is wired out in detail. Extending that wiring to larger powers of two is
this design's own work.

Choices made here:

- The truth tables are written as `case` statements on the arithmetic
  digit sum or product instead of minimised Boolean equations. Synthesis
  produces the same functions.
- The partial product generator reuses the general carry/sum generator. The
  published design notes it could be simplified because its inputs never
  reach magnitude 3. That optimisation is left out, and the results are the
  same.
- Subtraction: negating B digit by digit under a `sub` input.
- The iterative multiplier's internal organisation (which operand shifts, the
  accumulator width, the handshake) is this design's own. The published
  design only fixes the main parts: a 2N-digit adder, a partial product
  generator, an accumulator, and N iterations.
- Everything is combinational except the iterative multiplier. The published
  timing figures were measured with registers around the adders; those
  registers are not included.
- Illegal digit `100` gives zero outputs in the generators.

Not provided:

- An up/down counter. The published unit names counting as one of its
  operations but does not describe it.
- Parallel multipliers whose size is not a power of two.
- Conversion between QSD and binary.

## Files

| file | contents |
|---|---|
| `rtl/qsd_pkg.sv` | digit and carry types, carry-to-digit sign extension |
| `rtl/qsd_csg.sv` | step-1 carry/sum generator |
| `rtl/qsd_step2.sv` | step-2 adder |
| `rtl/qsd_adder.sv` | N-digit carry-free adder |
| `rtl/qsd_addsub.sv` | N-digit adder/subtractor |
| `rtl/qsd_digit_mult.sv` | single-digit multiplier |
| `rtl/qsd_ppgen.sv` | N-digit partial product generator |
| `rtl/qsd_mult_par.sv` | parallel multiplier, binary adder tree |
| `rtl/qsd_mult_iter.sv` | iterative add-shift multiplier |
| `rtl/qsd_arith_top.sv` | top level |
| `tb/qsd_tb_pkg.sv` | reference value computation and random QSD operands |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench computes expected values with plain integer arithmetic on the
digit weights. It prints `TB_RESULT checks=N failures=M` and finishes, and a
watchdog ends the run if it hangs.

- `tb_qsd_csg`, `tb_qsd_step2`, `tb_qsd_digit_mult` test every legal input
  combination against the tables above.
- `tb_qsd_ppgen` tests all 7⁴ × 7 inputs of the 4-digit generator.
- `tb_qsd_mult_par` tests all 7⁴ × 7⁴ = 5,764,801 operand pairs at N = 4,
  plus 100,000 random and extreme pairs at N = 8. The run takes about 20 s.
- `tb_qsd_adder` and `tb_qsd_addsub` run 20,000 random and extreme 64-digit
  cases. These include all +3, all −3 and digits of magnitude 2–3 only, and
  the tests check the value and that every digit is legal.
- `tb_qsd_adder_sizes` runs the adder at 2, 4, 8, 16, 32 and 64 digits, the
  equivalents of 4- to 128-bit binary adders, with 5,000 cases per width.
- `tb_qsd_mult_iter` runs 2,000 products each at N = 4 and N = 8. It checks
  that `done` comes exactly N cycles after start and that a start while busy
  is ignored.
- `tb_qsd_arith_top` runs the top level at its default parameters. The adder
  and parallel multiplier get new operands every cycle, and the iterative
  multiplier runs back to back. The test counts each mechanism and fails if
  any never happens: adder carry-out, add and subtract, digit products of ±9,
  carry-outs of both first-level multiplier adders, and ignored starts.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert --top-module tb_qsd_arith_top \
    -y rtl -y tb +libext+.sv -Irtl \
    rtl/qsd_pkg.sv tb/qsd_tb_pkg.sv tb/tb_qsd_arith_top.sv
./obj_dir/Vtb_qsd_arith_top
```

Change the `--top-module` and the last file name for another testbench. The
adder widths can be changed through the `N` / `ADD_DIGITS` parameters. The
adder testbenches take the width from a local parameter.
