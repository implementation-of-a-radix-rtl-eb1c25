# Radix-512 divider with operand scaling

This is a synthesizable SystemVerilog model of a divider for the mantissas of
IEEE double-precision numbers. It produces nine quotient bits per iteration, so
a 53-bit quotient, rounded to nearest, needs only six iterations. The whole
division takes ten clock cycles on a single multiplier-adder.

Conventional digit-recurrence dividers choose each quotient digit by comparing
the residual with multiples of the divisor. At radix 512 that selection function
would be far too large to build. This design avoids it:

- It first scales both operands by a factor M ≈ 1/d, so that the scaled divisor
  z = M·d lies within 1 ± 0.000487.
- With a divisor that close to one, the next quotient digit is simply the
  shifted residual, rounded to an integer.

The scaling costs three extra cycles. It reuses the multiplier-adder that the
iterations need anyway, so it adds almost no hardware.

The structure follows the divider described by A. Nannarelli in *Implementation
of a Radix-512 Divider* (M.S. thesis, University of California, Irvine, 1995):
its block partitioning, bus widths, scaling table and ten-cycle schedule. Where
this RTL departs from that description, the departure is listed under
[Departures and limitations](#departures-and-limitations).

## What it computes

```
q = round_to_nearest(x / d)        0.5 <= d < 1,   x < d,   0.5 <= q < 1
```

- `d` is the divisor mantissa, 53 bits with bit *i* of weight 2^(i−53). Its
  top bit is always 1.
- `x` is the dividend, 54 bits with bit *i* of weight 2^(i−54).
  - The algorithm needs x < d. A mantissa not below d must be halved by the
    caller, with its exponent raised by one.
  - That halving shifts one bit out of 53. The 54th bit keeps it, so no
    precision is lost.
- `q` is the quotient, 53 bits with bit *i* of weight 2^(i−53), rounded to
  nearest. With these widths x/d can never fall exactly halfway between two
  53-bit values, so no tie rule is needed.
  - Bit for bit, q equals `floor((x·2^53 + d) / (2d))` when x is written in
    units of 2^−54 and d in units of 2^−53.
  - Sign, exponent and the pre-shift are left to the surrounding
    floating-point logic. They need only a comparison, an XOR and an exponent
    subtraction.

## Interface and timing

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock |
| `reset`   | in  | 1     | asynchronous, active high |
| `d`       | in  | 53    | divisor; must be valid in the cycle in which `op_ld` is high |
| `x`       | in  | 54    | dividend; must be valid in the cycle after `op_ld` |
| `q`       | out | 53    | quotient of the previous division |
| `op_ld`   | out | 1     | high in the first cycle of every division (state S0) |
| `q_valid` | out | 1     | high in S0 when `q` holds a new result |

The controller runs continuously. After reset it spends one cycle clearing
the registers, then starts a division every ten cycles whether or not new
operands are applied. A user therefore watches `op_ld`:

```
state    S9  S0  S1  S2  S3  S4  S5  S6  S7  S8  S9  S0  S1 ...
op_ld        1                                       1
d            D0                                      D1
x                X0                                      X1
q_valid                                              1  (q = D0/X0 result)
```

The result is written at the end of S9. `q_valid` marks the next cycle, which
is S0 of the following division. `q` then stays unchanged for ten cycles.
Results appear ten cycles after `d` was taken.

## The algorithm

### Scaling

The scaling factor is a linear approximation of 1/d:

```
M = γ2 − γ1 · d15
```

- `d15` is d truncated to 15 fraction bits.
- γ1 and γ2 come from a 32-entry table, indexed by fraction bits 2..6 of d.
  Bit 1 is always 1.
- With `d6 = 0.5 + index/64`, the table holds, truncated to 13 fraction bits:

  ```
  γ1 = 1 / (d6² + d6·2^-6 + 2^-15)
  γ2 = (2·d6 + 2^-6) · γ1
  ```

M has 13 fraction bits and lies between 0 and 2. The design computes

```
z    = M · d        (scaled divisor)
w[0] = M · x        (first residual)
```

and keeps both exactly, with 67 fraction bits.

### Recurrence and digit selection by rounding

```
q[j+1] = floor( estimate(512 · w[j]) + 1/2 )
w[j+1] = 512 · w[j] − q[j+1] · z          j = 0 .. 5
```

- `estimate` is 512·w[j] truncated to 2 fraction bits in each carry-save
  half: 12 integer bits and 2 fraction bits per half.
- Because z is so close to 1, the rounded estimate is always a valid digit in
  −511..511.
- The first digit is the one exception. It can reach 512, because x < d only
  guarantees w[0] < 1.0005.

The residual stays in carry-save form throughout. No carry is propagated
inside the loop.

### Final rounding

The six digits give a 54-bit quotient Q with one bit more than needed.

- If the final residual w[6] is non-negative, one unit is added in the last
  place of Q.
- If w[6] is negative, nothing is added, because the true quotient is slightly
  below Q.
- The 54th bit is then dropped.

The result is x/d rounded to nearest.

### Ten-cycle schedule

| cycle | state | multiplier-adder computes | registers loaded |
|------:|:-----:|---------------------------|------------------|
| 1  | S0 | −M = −γ2 + γ1·d15 | latch1 ← d, latch2 ← −M |
| 2  | S1 | M·d | latch1 ← x, latch3 ← M·d |
| 3  | S2 | M·x; the CPA resolves M·d into z | latch1 ← z, latch3 ← w[0] |
| 4–9 | S3–S8 | w[j+1] = 512·w[j] − q[j+1]·z | latch3 ← w[j+1]; conversion takes q[j+1] |
| 10 | S9 | — | the CPA gives the sign of w[6]; q is rounded |

In cycle 10 the multiplier-adder is idle. A variant that computes the next M
in that cycle would reach nine cycles per division. That variant is not built.

## Number formats

Every bus is a plain two's-complement bit vector. The table gives the weight
of bit *i*.

| quantity | bits | weight of bit *i* | range / note |
|----------|-----:|-------------------|--------------|
| d | 53 | 2^(i−53) | [0.5, 1) |
| x | 54 | 2^(i−54) | [0, d) |
| residual w (each carry-save half) | 70 | 2^(i−67) | 2 integer bits plus a sign bit |
| z, multiplicand to the multiplier | 68 | 2^(i−67) | z ≤ 1.0005, uses bit 67 as a value bit |
| −M (each carry-save half) | 15 | 2^(i−13) | from bits 29..15 of the multiplier-adder output |
| −γ1 table word | 15 | 2^(i−13) | −γ1 = −4 + word/8192 |
| −γ2 table word | 14 | 2^(i−13) | −γ2 = −4 + word/8192 |
| digit estimate qs, qc | 14 | 2^(i−2) | residual bits 69..56: 12 integer and 2 fraction bits of 512·w |
| recoder input | 16 | 1 (integer) | sign-extended qs/qc[13:2], ±M, or d15 |
| Q, QM, QP | 54 | 2^(i−54) | six 9-bit digits |

The two halves of w are carried with three integer bits, one more than the
value of w needs. Each half of a carry-save pair can be much larger than
their sum, and the sign of the estimate is only known after recoding. The
extra bit gives each 12-bit estimate half enough room that its sign
extension into the recoder is always correct.

## The multiplier-adder

`multadd` computes `sum = A − R·C` in carry-save form. It is built from two
parts, `mult` and `add_tree`.

- **Multiplier R.** R arrives as eight radix-4 signed digits from the
  recoder. The recoder hands over the digits of −R, so the rows add up to
  A + (−R)·C.
- **Partial products.** Each digit selects 0, C or 2C.
  - For a negative digit, the row is bit-complemented.
  - The missing +1 goes into a bit of the next row that is known to be zero,
    because that row is shifted two places further.
  - The +1 of the last negative row goes into a free low bit of the ninth row.
- **Adder tree.** The nine rows are added by a tree of 3:2 carry-save adders
  in four levels:
  - (0,1,5), (2,3,4), (6,7,9th)
  - then two more 3:2 adders
  - then one 3:2 adder
  - then a final 3:2 adder.

The same hardware serves all four operations:

| operation | R (recoded) | C | A (ninth row / rows 6,7) |
|-----------|-------------|---|--------------------------|
| −M (S0) | d15 | −γ1, sign bit forced | −γ2, in the ninth row |
| M·d, M·x (S1, S2) | −M from latch2 | d or x | 0 |
| recurrence (S3–S8) | digit estimate | z | 512·ws and 512·wc replace rows 6 and 7 (the digit is below 2^12, so six radix-4 digits are enough) |

The −M result appears in bits 29..15 of the two output halves. It is stored
there in latch2 without carry propagation.

## The recoder and its sign problems

`recoder` turns a 16-bit carry-save pair into eight radix-4 digits in −2..2. It
never propagates a carry across the word. Each 2-bit stage (`rec_stage`) works
in three steps:

1. The two 2-bit slices are added. The high bits produce a transfer `t` to the
   next stage, which leaves a sum `w` in 0..4.
2. The incoming `t` is added, giving u in 0..5. A second transfer `h` is then
   split off: h = 1 when u ≥ 2, leaving v = u − 4h in −2..1.
3. The incoming `h` is added, giving the digit v + h in −2..2.

The stage outputs the negated digit as one-hot select lines (m2, m1, p1, p2),
which directly drive the partial-product rows.

**Signs.** A carry-save pair only determines its value modulo 2^16. The
recoder must still return the right signed value, so two precautions are
needed:

- **Top stage.** It drops its outgoing transfers and wraps its own digit
  modulo 4 into −1..2. That makes the recoded value equal the true value for
  anything in [−16384, 32767].
  - All three inputs fall in this range. d15 is at most 32767. −M, counted
    in units of 2^−13, is at least −16384. The digit estimate lies within
    −512..512.
- **Sign extension of −M.** The two 15-bit halves of −M are widened to 16
  bits as follows:
  - the sum half gets `~(ms[14] & mc[14])` as its new top bit;
  - the carry half gets 0.

  Because −M lies in [−2, 0), this gives a pair that sums to −M exactly.
- **Sign extension of the digit estimate.** The halves qs and qc are
  sign-extended from their 12-bit integer parts. Here the extra residual bit
  described above keeps each half's sign correct.

**Rounding.** The +½ and the two fraction bits of each half are folded into
the two transfer inputs of stage 0. `mux2` forms them as
`e = qs[1] | qc[1]` and `f = qs[0] & qc[0] & ~(qs[1] ^ qc[1])`, so that
e + f = floor((qs[1:0] + qc[1:0] + 2) / 4). The recoder therefore recodes
floor(qs + qc + ½) directly.

## Quotient conversion (`convert`)

The digits are signed, so the quotient is assembled by on-the-fly conversion.

- **Digit.** The unit computes the digit q itself from the same estimate, by a
  3:2 row with the constant ½ and a 14-bit adder. It also forms q − 1 and
  q + 1.
- **Registers.** Three registers are kept, Q, QM = Q − ulp and QP = Q + ulp.
  Each step shifts in nine bits:

  | register | previous value taken | digit shifted in |
  |----------|----------------------|------------------|
  | Q  | Q, or QM when q < 0 | q mod 512 |
  | QM | Q when q > 0, otherwise QM | (q − 1) mod 512 |
  | QP | Q, or QM when q + 1 < 0, or QP when q + 1 = 512 | (q + 1) mod 512 |

  No carry ripples through the accumulated bits.
- **Rounding.** At the end, the output register takes QP[53:1] when the
  residual is non-negative and Q[53:1] when it is negative. That is "add one
  ulp, then drop a bit".
- **Overflow.** A first digit of 512 overflows the 54-bit frame. Arithmetic
  modulo 1 still gives the right quotient, since q < 1.
- **Assertion.** An assertion reports any digit outside −511..512.

## Carry-propagate adder (`cpa`)

`cpa` is a 70-bit carry look-ahead adder, used in two ways:

- it turns M·d into the non-redundant z;
- it gives the sign of w[6].

Structure:

- The low 64 bits are four 16-bit blocks (`cla16`), each built from 4-bit
  look-ahead groups (`cla_group`).
- A second-level group joins the four blocks.
- A separate 6-bit look-ahead adder covers bits 64..69.

## Module map

| module | role |
|--------|------|
| `div_pkg` | widths, digit bundle type `rdigits_t`, state type `state_t` |
| `radix512` | top: wiring of all blocks; the d15 and table-index split of d |
| `control` | ten-state sequencer, Moore decoding of load, clear and select lines |
| `gamma_table` | 32 × (15 + 14)-bit ROM of −γ1, −γ2 |
| `mux1` | selects d, x or z into latch1 and aligns d to the x frame |
| `latch1` | 68-bit multiplicand register |
| `mux3` | −γ1 (sign-filled) or latch1 as multiplicand |
| `latch2` | −M, carry-save, 2 × 15 bits |
| `mux2` | recoder source (d15, −M or digit estimate) and the rounding bits e, f |
| `recoder`, `rec_stage` | carry-save to radix-4 signed digits |
| `multadd`, `mult`, `add_tree`, `csa` | the multiplier-adder |
| `latch3` | residual register, 2 × 70 bits, with the estimate taps |
| `cpa`, `cla16`, `cla_group` | carry look-ahead adder, z and the residual sign |
| `convert` | digit formation, on-the-fly conversion, final rounding |

Coarse synthesis with yosys gives 737 word-level cells, 449 flip-flop bits and
928 ROM bits for the top.

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. Build and run one from the repository root,
for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/div_pkg.sv tb/tb_radix512.sv \
          --top-module tb_radix512 -o sim
./obj_dir/sim
```

`tb_random_vectors` reads `tb/random_vectors.hex` by a path relative to the
repository root, so run it from there.

- **`tb_radix512`** runs the full-size divider end to end. It issues the
  divisions back to back:
  - ten boundary cases: smallest and largest d, x close to d, exact and
    periodic quotients;
  - 40 divisions with x just below d, which force a first digit of 512;
  - 400 random divisions.

  Checks:
  - every result against the round-to-nearest reference;
  - the exactly known boundary results against their stated values;
  - the ten-cycle latency and `q_valid`.

  It counts how often the datapath meets a first digit of 512, negative and
  zero digits, q + 1 = 512 in the conversion, and final residuals of both
  signs. Any event that never occurs counts as a failure.
- **`tb_random_vectors`** runs a published set of 80 random divisions, with
  their quotients, through the same top.
- **Block testbenches.** `tb_control`, `tb_gamma_table`, `tb_mux1`,
  `tb_mux2`, `tb_mux3`, `tb_latch1/2/3`, `tb_recoder`, `tb_multadd`, `tb_cpa`
  and `tb_convert` check each block against an independent model written with
  wide integers in the testbench.
  - `tb_gamma_table` recomputes every table entry from the γ formulas.
  - `tb_multadd` checks all three modes of the multiplier-adder.
  - `tb_recoder` checks both the modular identity and exact recoding over the
    range that matters.

## Departures and limitations

- **Added handshake.** The ports `op_ld` and `q_valid` are additions, so that
  a user can find the operand and result cycles. The original controller
  exposes no such lines.
- **Synchronous clears.** The latch and conversion-register clears act on the
  clock edge. The original uses asynchronous clears. Since the clear lines are
  held for whole cycles, the sequence of values is the same.
- **Full-width rows in the multiplier-adder.** Every partial-product row and
  every 3:2 adder is 70 bits wide and fully sign-extended. The original
  trims rows and uses a sign-extension trick with a "last row not negative"
  rule; neither is needed here. The +1 for the last negative row sits in a
  free low bit of the ninth row.
- **Top recoder stage and −M extension.** These are this design's own
  equivalent rules, as described above. The original uses a special top cell
  and a bit correction of −M whose exact logic is not reproduced.
- **Rounding.** Final rounding selects QP or Q. The original appends a final
  digit q6 + (residual ≥ 0) to the registers of the previous step, which gives
  the same number. The intermediate quotient register that scheme needs is
  therefore absent.
- **Fill of −γ1.** The −γ1 multiplicand is filled with ones above its 15
  bits, so that it is negative.
- **Conversion digits.** The QM digit is formed as (q − 1) mod 512, which is
  identical to the complement form used originally.
- **Not built:**
  - the nine-cycle variant that overlaps the next M computation with the
    rounding cycle;
  - the floating-point wrapper: sign, exponent, the x ≥ d pre-shift, and
    special values.
- **Unused package constants.** Verilator's lint reports some package
  constants as unused in individual files, and a few intentionally unused
  bits: carry-out bits, and fraction bits below the digit. They carry no
  logic.
