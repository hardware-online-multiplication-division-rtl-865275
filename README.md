# Radix-2 online multiplier-divider: Q = A·B / D, digit-serial, MSB first

In online arithmetic, operands enter one digit per clock cycle, most significant
digit first, and results leave the same way. Each output digit appears a fixed
number of cycles δ (the *online delay*) after the matching input digit. This
lets a chain of operations overlap digit by digit instead of waiting for full
words.

A common way to get `A·B/D` online is an online multiplier feeding an online
divider. This costs two recurrences, two sets of registers and the sum of two
online delays (6 or 7 cycles). This RTL instead computes the product-quotient
in **one** recurrence. It has two variants:

| unit | inputs online | divisor | online delay | iterations | residue width |
|---|---|---|---|---|---|
| `omd_const` (constant divisor) | A, B | parallel, held constant | 3 | K+3 | K+4 bits |
| `omd_composite` (fully online) | A, B, D | online | 4 | K+4 | K+6 bits |

Either unit can be followed by a `correction_stage`. That stage turns the
redundant digit stream into the exact truncated quotient `floor(A·B/D)`. It
also gives a non-negative remainder, at the cost of one extra cycle. The top
`omd_top` places both units, each with its own correction stage, side by side.

## Number formats

- **Operands.** A, B and D are K-bit fractions, MSB first. D is normalised
  (`0.5 ≤ D < 1`). The result only stays in range when `A < D` and `B < D`, so
  that `A·B/D < 1`.
- **Output digits.** Each output digit is a binary signed digit in {−1, 0, +1}.
  It is carried on two wires `(p, n)`: `10` = +1, `01` = −1, `00` = 0. The
  type is `bsd_t` in `omd_pkg`, and `(1,1)` never occurs.
- **Input digits.** A, B and D arrive as plain bits (0/1) MSB first.
- **Residue.** The working remainder is always kept in carry-save form, as a
  sum word RS and a carry word RC. No carry-propagate adder sits in the
  iteration loop apart from a 5-bit estimate adder.

## Constant-divisor unit (`omd_const`)

This is an interleaved multiply-and-reduce loop, like modular multiplication
but with a quotient digit recorded at every step.

Let `A[i]` and `B[i]` be the operand prefixes after i digits. At iteration i,
the product grows by `a_i·B[i] + b_i·A[i−1]`. That sum is exactly the
difference between `A[i]·B[i]` and `A[i−1]·B[i−1]`, at the right weights.

Iteration i (i = 1 … K+3):

1. A (K+4)-bit CSA adds three things:
   - the two partial products;
   - `−8D`, `+8D` or `0`, chosen by the sign estimate ES of the previous
     residue. `−8D` is the inverted word plus a carry-in.
2. A [4:2] compressor adds that pair to `2·(RS, RC)`.
3. A 5-bit adder over the top 5 bits of the new RS and RC gives ES, in units
   of 0.5. The next digit depends on it:

   | ES | next digit | next divisor term |
   |---|---|---|
   | ≥ 0.5 | q = +1 | subtract 8D |
   | ≤ −2.5 | q = −1 | add 8D |
   | otherwise | q = 0 | none |

   The band in between is where the truncated estimate cannot decide.
4. ES is registered. `q` is driven from that register, and the same register
   steers the next iteration's CSA.

How to read the results:

- The first digit is always 0.
- `Q = Σ q_i·2^(K+3−i)` in units of `2^−K`.
- After the last iteration, `RS + RC = 8·(A·B − Q·D)` in units of `2^−2K`.
- That remainder can be negative. Exhaustive simulation shows it lies in
  `[−D, D)`.
- The design puts out the full-width RS and RC pair rather than dividing each
  word by 8. Only the sum is guaranteed to be a multiple of 8.

## Fully online unit (`omd_composite`)

Here D also arrives one digit per cycle. The recurrence is

    R(i) = 2·R(i−1) + 2^−4·(a_i·B[i] + b_i·A[i−1]) − 2^−4·d_i·Q[i−1] − q_i·D[i]

There are two differences from a division recurrence:

- The product enters 4 binary places lower. This leaves room for the online
  delay of 4.
- D grows while the quotient is being formed. The term `−d_i·Q[i−1]` charges
  the quotient already emitted with the divisor digit that has just arrived.

Hardware per iteration, on a (K+6)-bit residue with 2 integer bits:

1. A [4:2] compressor adds 2RS, 2RC and the two partial products.
2. If `d_i = 1` and `Q[i−1] ≠ 0`, a CSA adds `−Q[i−1]·2^−4`. This is the
   inverted Q register with a carry-in. Otherwise the pair passes through
   unchanged. `Q[i−1]` comes from an on-the-fly converter, so it is always a
   plain non-negative binary number.
3. A 5-bit estimate V of the pair is formed (`v_selector`). q is chosen from
   V's top 4 bits (2 integer bits, 2 fraction bits): `00.00` and `11.11` give
   0, any other non-negative value gives +1, and any other negative value
   gives −1. For i ≤ 4, q is forced to 0.
4. A second CSA subtracts `q·D[i]`. `D[i]` is the divisor register, which
   already holds `d_i`.
5. The on-the-fly converter (`otf_converter`) appends q to Q.

How to read the results:

- The digits `q_5 … q_{K+4}` carry the result.
- `RS + RC = 16·(A·B − Q·D)` in units of `2^−(2K+4)`.
- The unit also puts out the assembled divisor `d_acc` for use by the
  correction stage.

### On-the-fly conversion

The converter keeps Q and QM = Q − ulp, where ulp is one unit in the last
place. A one-hot pointer marks the digit position being written:

| digit | Q becomes | QM becomes |
|---|---|---|
| +1 | Q with the pointer bit set | old Q |
| −1 | QM with the pointer bit set | QM (unchanged) |
| 0 | Q (unchanged) | QM with the pointer bit set |

No carry ever propagates, so a signed-digit quotient becomes binary at one
register write per digit.

## Correction stage (`correction_stage`)

A redundant online quotient can be one unit too large in the last place. When
that happens the final remainder is negative. The fix has to find the sign of
a carry-save number, add D when it is negative, and lower the quotient by one
unit. It also has to do this without a slow carry-propagate addition and
without holding back the digits already sent out.

- **Sign detection (`bk_sign_detect`, `gpo_cell`).**
  - The carry into the top bit of `RS + RC` comes from the reduction half of a
    Brent–Kung prefix tree, built from generate/propagate cells:
    `G = Gh | Ph·Gl` and `P = Ph·Pl`. Its depth is ⌈log2(L−1)⌉.
  - The sign is `RS[L−1] ^ RC[L−1] ^ carry`.
  - Widths that are not a power of two are padded with neutral cells
    (G = 0, P = 1).
- **Remainder fix.** A CSA adds `dcorr` (D at the residue's scale) when the
  sign is negative. The result stays in carry-save form.
- **Digit fix (`partial_quotient`).**
  - The stage holds back one digit. It keeps a two-digit window (h, l), whose
    value is `v = 2·l + inc`, where `inc` is the incoming digit, or that digit
    minus 1 in the last iteration when correcting.
  - It emits h and keeps l:

    | v | emitted h | kept l |
    |---|---|---|
    | ≥ 2 | +1 | v − 2 |
    | ≤ −1 | −1 | v + 2 |
    | otherwise | 0 | v |

  - So a window such as (0, −1) is rewritten to (−1, +1). The subtracted unit
    then never needs to travel back through digits already emitted.
  - One flush cycle after the unit's last iteration releases the held digit.

The corrected stream is one digit longer than the raw one. Its last digit has
the weight of the raw stream's last digit. The corrected remainder lies in
`[0, D)`, with `rem_neg` telling whether a fix was applied.

## Interface and timing (`omd_top`, default `K = 64`)

Each unit has its own ports, with prefix `c_` for the constant-divisor unit and
`f_` for the fully online unit. Both share `clk` and a synchronous,
active-high `rst`.

- **Start.** A one-cycle `*_start` clears the unit and its correction stage.
  The following cycle is iteration 1.
- **Inputs.** Drive digit j of A and B (and of D for `f_`) on `*_a`, `*_b`,
  `f_d` during iteration j, for j = 1 … K. `c_d` must hold D for the whole
  operation. Inputs after iteration K are ignored.
- **Raw digits.** `*_q_raw` / `*_q_raw_valid` give the uncorrected digit
  stream. It is K+3 digits for `c_` and K+4 digits for `f_`, one per
  iteration, valid in the same cycle (combinational output).
- **Corrected digits.** `*_q` / `*_q_valid` give the corrected stream, which
  has one digit more and ends one cycle later.
- **Remainder.** `*_rem_s`, `*_rem_c`, `*_rem_neg` and `*_rem_valid` give the
  corrected carry-save remainder. It is registered after the last iteration.
  It holds 8R for `c_` (K+4 bits) and 16R for `f_` (K+6 bits).

A new operation may be started once the previous one has delivered its last
corrected digit. The units do not pipeline operations.

At K = 64 a complete operation takes:

- 1 start cycle;
- 67 iterations (constant divisor) or 68 iterations (fully online);
- 1 correction cycle.

## Files

| file | contents |
|---|---|
| `rtl/omd_pkg.sv` | `bsd_t` digit type, estimate enum, helper |
| `rtl/csa.sv`, `rtl/compressor42.sv` | 3:2 carry-save adder with carry-in; [4:2] compressor as two CSA rows |
| `rtl/sign_estimator.sv` | ES adder and three-way decision (constant-divisor unit) |
| `rtl/v_selector.sv` | V estimate and digit selection (fully online unit) |
| `rtl/otf_converter.sv` | on-the-fly converter |
| `rtl/omd_const.sv`, `rtl/omd_composite.sv` | the two units |
| `rtl/gpo_cell.sv`, `rtl/bk_sign_detect.sv` | sign of a carry-save word |
| `rtl/partial_quotient.sv`, `rtl/correction_stage.sv` | correction |
| `rtl/omd_top.sv` | top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_omd_top_full.sv` | end-to-end test at the default K = 64 |
| `tb/tb_omd_sizes.sv`, `tb/omd_sweep.sv` | exhaustive end-to-end sweeps at K = 4, 6, 8, 10 |

## Verification

Every testbench checks its outputs against values it works out itself. Each
one ends by printing `TB_RESULT checks=<n> failures=<n>`, and each has a
watchdog.

- **`tb_omd_const`, `tb_omd_composite` (K = 6).**
  - They first replay a small worked example digit by digit.
  - Then they run every A and B below D for all 32 normalised 6-bit divisors,
    about 150 000 checks each.
  - They check `A·B = Q·D + R`, the remainder bound, the digit count and the
    `last` flag.
- **`tb_omd_top` (K = 6).**
  - Both units run with correction, exhaustively for a set of divisors.
  - The corrected quotient must equal `floor(A·B/D)` and `0 ≤ R < D`, and the
    digit counts are checked.
  - It counts each mechanism: +1/−1/0 digits, the `−Q` term, the
    partial-quotient rewrite, and negative and non-negative remainders. A
    mechanism that never fires is a failure.
- **`tb_omd_sizes`.** Four copies of `omd_top` at K = 4, 6, 8 and 10,
  driven by the reusable checker `tb/omd_sweep.sv`, about 7.8 million checks
  in a minute:
  - K = 4 and K = 6: every normalised divisor and every A, B < D;
  - K = 8: 32 divisors, each with every A, B < D. Setting `ALL_D` runs all
    128 divisors in a few minutes, and that full sweep also passes;
  - K = 10: the smallest and the largest divisor.
- **`tb_omd_top_full`.** The same checks with `omd_top` at its default
  K = 64, on 2000 random operand sets plus the all-ones corner case.
- **Building blocks.** These have their own randomised or exhaustive tests.
  The converter test replays a known digit sequence.

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Wno-fatal \
        rtl/omd_pkg.sv rtl/*.sv tb/tb_omd_top.sv --top-module tb_omd_top
    ./obj_dir/Vtb_omd_top

The small-size testbenches set `K` (or `W`, `L`) through a `localparam` at the
top of the file. Change it to test other sizes. For K ≤ 8, `tb_omd_top` sweeps
operands exhaustively, and above that it draws random operands.

## Where this design departs from, or goes beyond, its source description

- **Handshake.** The original models use an asynchronous reset that doubles
  as the start signal. Here reset is synchronous, and a separate `start`
  pulse and `valid`/`last` flags frame each operation.
- **Digit selection in the fully online unit.** The published threshold text
  is not consistent. This RTL uses "q = +1 if V ≥ 1/4, −1 if V < −1/4" on the
  4 most significant bits of the estimate. That choice reproduces the
  published worked example exactly and passes all exhaustive tests.
- **Carry-in on the constant unit.** The carry-in for `−8D` is applied in the
  ES ≥ 0.5 case, where the inverted divisor is added, as the algorithm
  requires.
- **Remainder range.** The uncorrected remainder of the constant-divisor unit
  can equal −D exactly, not only lie strictly inside (−D, D). The correction
  stage handles that case.
- **Remainder scale.** Remainders are given at the residue's own scale (8R or
  16R), not divided down, as explained above.
- **Sign-detector width.** The Brent–Kung sign detector is a parameterised
  generate structure with top padding, in place of a separate generated
  netlist for each width.
- **[4:2] compressor.** It is two CSA rows, not an optimised compressor cell.
- **Not included.** The cascaded online-multiplier + online-divider
  arrangement, which is the usual approach, is only a reference point for
  comparison and is not part of this RTL. No timing or area figures are
  claimed.
