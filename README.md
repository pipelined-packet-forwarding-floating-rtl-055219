# A two-stage rounder for packet forwarding floating point

In a conventional pipelined floating point unit, an addition or multiplication
that needs the result of the previous one must wait until that result is fully
rounded and normalized. Rounding alone often accounts for half of an
operation's latency. *Packet forwarding* shortens this wait by handing the
result to the next operation in two pieces, one cycle apart:

1. the **principal part** of the significand: the leading 64 digits of the
   unrounded result, in redundant borrow-save form, together with sign and
   exponent. It is available as soon as the operation stages finish.
2. the **carry-round packet** `c`: a two-digit correction in `{-2,…,2}` that,
   added at the last position, turns the principal part into the correctly
   rounded value. It is available one cycle later.

The consuming pipeline takes the principal part at the start of its first
stage and the carry-round packet at the start of its second. So a dependent
operation can issue two cycles after its producer instead of four. The standard
IEEE 754 result (normalized binary significand) appears one cycle after the
packet and goes to the register file. It is never on the critical forwarding
path.

This repository holds the rounder that makes this work. It has two pipeline
stages, R1 and R2, and would be shared in design by an adder pipe (A1 A2 R1 R2)
and a multiplier pipe (M1 M2 R1 R2). It supports double extended precision: 64-bit
significands and a 15-bit exponent. The operation stages A1/A2 and M1/M2 are
not included. The rounder's input port is where they would connect.

```
        unrounded result (sign, exponent, 129 borrow-save digits, rounding mode)
                                 |
                          [input register]  ------------------>  principal part packet
                                 |                                (sign, exponent, 64 digits)
          +----------------------+----------------------+
          |                      |                      |
   upper signed sticky      L, G, R digits       lower signed sticky        R1
   (digits 0..63)                |               (digits 65..127)
          +----------> round logic <------------+   <- mode, sign
                                 |
                          [R1/R2 register]  ------------------>  carry-round packet (2 digits)
                                 |
            reduced borrow-save add (principal + packet)
                                 |                                           R2
                  2-1 subtracting adder (plus - minus)
                                 |
                 normalization shift, exponent + 0/1/2
                                 |
                          [output register]  ----------------->  standard significand, exponent
```

## Number format

A packet forwarding significand is `f + c·2^-63`, with value in `[1, 4]`:

* `f = 1 b0 . b1 b2 … b62` is the principal part. The leading `1` has weight 2,
  `b0 ∈ {0,1}` has weight 1, and `b1…b62` are borrow-save digits in `{-1,0,1}`.
  So `f` lies in `(1, 4)`.
* `c = c62 c63` is two borrow-save digits of weights `2^-62` and `2^-63`, so
  `c ∈ {-2,…,2}`.

Each borrow-save digit is a pair of bits (plus, minus) with value `plus - minus`.
Both `00` and `11` mean zero. In the RTL a significand is two bit vectors `xp`
and `xn`, **indexed by digit position**. The index is the power of one half, so
index `-1` has weight 2 and index `i` has weight `2^-i`. This is why the vectors
are declared with ascending ranges such as `logic [-1:62]`. Verilator's
`ASCRANGE` style warnings come from this choice.

The value of a significand is not unique. Values in `[1,2)` need the guard
position 63 to reach 64-bit precision. Values in `[2,4]` only need the digits
down to position 62, so there `c` is always even. This two-binade
("prenormalized") form lets the rounder forward a result without first
deciding which binade it is in. The standard output resolves that choice.

The rounder's input is the operation stages' unrounded result: 129 borrow-save
digits at positions -1…127. Digit -1 must be +1 and digit 0 must be 0 or 1, so
the value lies in `(1, 4)`. An assertion in `pf_rounder` checks this. The digits
that matter for rounding are:

| position | name | role |
|---|---|---|
| -1 … 62 | principal part | forwarded unchanged |
| 0 … 63 | upper sticky region | its sign says whether the value is below, at or above 2 |
| 62 | L | last digit kept when the value is in `[2,4)` |
| 63 | G (guard) | last digit kept when the value is in `(1,2)` |
| 64 | R (round) | first digit dropped |
| 65 … 127 | lower sticky region | its sign acts as a signed sticky bit |

## Signed sticky digits (`signed_sticky`)

A conventional rounder compresses the redundant result to binary and then ORs
the low bits into a sticky bit. Here the sticky information stays signed:
for a borrow-save string it is the sign `-1`, `0` or `+1` of the string's
value. This sign equals the sign of the most significant nonzero digit,
because all lower digits together weigh less than one unit of that digit. So no
carry propagation is needed.

Each digit gives a leaf `(s, m) = (minus, plus XOR minus)`: `m` says that the
digit is nonzero and `s` gives its sign. Two neighbouring groups combine as

```
m = m_hi | m_lo
s = m_hi ? s_hi : s_lo
```

This is a 2:1 multiplexer steered by the OR of the upper group's `m` bits. A
balanced tree of these cells (`log2 N` levels) gives the sticky digit of the
whole string. The result is in sign-magnitude form: `(1,1)` is -1, `(0,1)` is
+1, and `m = 0` is zero. The mux selects are ready early, so the sign bits
only pass through multiplexers. The module takes any `N` and pads the tree with
zero digits up to a power of two. The rounder uses `N = 64` for the upper region
and `N = 63` for the lower region.

## Choosing the carry-round packet (`round_logic`)

This is the core of the design. With only three digits and two sticky signs,
the first stage must produce a `c` that gives the correctly rounded value.

**Binade and rounding position.** The upper sticky `S_u`, the round digit `R`
and the lower sticky `S_l`, read in that order of significance, give the sign
of `value - 2`:

| S_u | R | S_l | value | round at |
|---|---|---|---|---|
| -1 | x | x | (1,2) | G |
| 0 | -1 | x | (1,2) | G |
| 0 | 0 | -1 | (1,2) | G |
| 0 | 0 | 0 | exactly 2 | L |
| 0 | 0 | +1 | (2,4) | L |
| 0 | +1 | x | (2,4) | L |
| +1 | x | x | (2,4) | L |

**Atomic modes.** The magnitude is what gets rounded, so the four IEEE modes
reduce, given the sign, to three: toward zero (RZ), away from zero (RI), and
to nearest even (RNe). Round-up is RI for positive results and RZ for
negative ones. Round-down is the reverse.

**Increment rule.** `incr(odd, r, s)` is the amount (-1, 0 or +1) to add at
the rounding position. Here `r` is the first dropped digit, `s` is the sign of
everything below it, and `odd` says that the kept digit is nonzero. A signed
digit is odd exactly when it is nonzero.

| r | s | RZ | RI | RNe, even | RNe, odd |
|---|---|---|---|---|---|
| -1 | -1 | -1 | 0 | -1 | -1 |
| -1 | 0 | -1 | 0 | 0 | -1 |
| -1 | +1 | -1 | 0 | 0 | 0 |
| 0 | -1 | -1 | 0 | 0 | 0 |
| 0 | 0 | 0 | 0 | 0 | 0 |
| 0 | +1 | 0 | +1 | 0 | 0 |
| +1 | -1 | 0 | +1 | 0 | 0 |
| +1 | 0 | 0 | +1 | 0 | +1 |
| +1 | +1 | 0 | +1 | +1 | +1 |

**Packet.**

* Rounding at G (value in `(1,2)`): the principal part ends just above G, so G
  itself goes into the packet: `c = G + incr(G≠0, R, S_l)`.
* Rounding at L (value in `[2,4)`): G becomes the round digit, and R merges
  with `S_l` into one sticky (R if nonzero, else `S_l`). Then
  `c = 2 · incr(L≠0, G, R:S_l)`.

Both cases give `c ∈ {-2,…,2}`. The sticky digits come out of the trees last,
so the RTL computes the packet for all nine `(S_u, S_l)` combinations in
parallel from L, G, R, sign and mode. The sticky digits only drive a final
9-to-1 selection. The packet is encoded as `c = 2·c62 + c63`: ±2 uses digit
62 and ±1 uses digit 63.

Some `(S_u, L, G)` combinations cannot occur. If `S_u = 0`, every digit from 0
to 63 is zero. The logic still gives them a defined output.

## Second stage: back to standard format (`bs_reduced_42add`, `sub_adder_2to1`, `norm_shifter`)

R2 is the only place in the pipeline that needs a carry-propagate adder.

1. **Reduced borrow-save adder.** This adds the packet to the principal part:
   two borrow-save operands in, one borrow-save result out, with two levels of
   full-adder cells (negative inputs inverted) and no carry propagation. The
   packet has only two digits, so full cells are needed only at positions 62
   and 63. Every higher position has constant-zero inputs and reduces to one
   AND and one XOR per level.
2. **2-1 adder.** This computes `plus - minus` as `plus + ~minus + 1`. It is 66
   bits wide (positions -2…63) and written as a plain addition, so synthesis
   chooses the adder architecture.
3. **Normalization shifter.** A result at or above 2 is shifted right one place
   and the exponent is raised by one. The value can also be exactly 4: a
   principal part just below 4 rounded upward carries out of the `[2,4)`
   binade. It is then shifted by two and the exponent is raised by two. The
   bits shifted out are always zero, and an assertion checks this.

## Timing and interface (`pf_rounder`)

There are three register stages, one result per clock, and no stalls. An input
sampled at clock edge *k* appears:

| output | after edge | contents |
|---|---|---|
| `pf_*` | k | sign, exponent, principal part `pf_pp/pf_pn[-1:62]` |
| `cr_*` | k+1 | packet `cr_p/cr_n[0:1]` (index 0 = c62), `cr_round_at_l` |
| `std_*` | k+2 | sign, exponent, normalized significand `std_sig[0:63]` (bit 0 = leading 1) |

The input register stands for the pipeline register at the end of the
operation stage. Each output group has a valid bit. Valid bits are reset
asynchronously by `rst_n` (active low). Data registers are not reset. The
rounding mode is `RM_RNE = 0`, `RM_RTZ = 1`, `RM_RUP = 2`, `RM_RDN = 3`
(`pf_pkg::ieee_rmode_t`). Parameters: `P` (precision, default 64; input width
`2P+1`) and `EXP_W_P` (exponent width, default 15).

Packed ports have ascending ranges, like the internal vectors. Connect them as
whole vectors; the leftmost bit is the most significant.

## What is this design's own, and what is left out

The following follow the source design: the format, the datapath split into R1
and R2, the forwarding points, the sticky tree, the binade rule, the
atomic-mode and increment tables, the two packet equations, the
parallel-then-select structure, and the add/compress/shift sequence of R2.

The following are choices made here:

* the register placement and valid/reset scheme
* the mode and packet encodings
* the full-adder cell equations of the reduced adder
* the plain 2-1 adder
* the shift-by-two case for a result of exactly 4

The nine packet regions are generated from the equations above rather than
stored as a hand-minimized table (or PLA). They are checked exhaustively.

Not included:

* The adder and multiplier operation stages (A1/A2, M1/M2), and the wired
  recoding that lets a standard operand enter as a packet forwarding operand.
  They are specified elsewhere.
* Exponent overflow and underflow, denormals, zeros, infinities and NaNs. The
  exponent simply wraps when the normalization increment overflows it.
* The variant where the adder and multiplier pipes have separate R1 stages and
  share one R2. There is also no control for skipping R2 on results that are
  only forwarded: every result passes through R2.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_pf_rounder` is end to end, at the default size. It sends 40 000 results,
  with random bubbles, through the pipeline. It rounds each one exactly with
  128-bit-plus integer arithmetic and checks:
  * the forwarded principal part, and the value of principal part + packet;
  * the rounding position, and that the packet is even when rounding at L;
  * that the packet is never +1 on a principal part of exactly 2;
  * the standard significand and exponent;
  * all three latencies.

  Digit patterns per region (zero, random, saturated, sparse, redundant
  zeros) make ties, inputs of exactly 2, results of exactly 4, every packet
  value, every mode and every sticky value occur. Each is counted, and a
  failure is recorded if one never occurs.
* `tb_round_logic` is exhaustive over all sticky and digit encodings, sign and
  mode. For each case it builds a concrete significand with those digits and
  rounds it exactly.
* `tb_signed_sticky` checks 64- and 63-digit trees against the sign of the
  exact value.
* `tb_bs_reduced_42add` checks value preservation, exhaustively at `P = 8` and
  randomly at `P = 64`.
* `tb_sub_adder_2to1` and `tb_norm_shifter` are unit checks.
* `tb_pf_rounder_sizes` runs the same end-to-end checks, through the
  parameterized `pf_rounder_harness`, on a double precision rounder (`P = 53`,
  11-bit exponent) and a single precision one (`P = 24`, 8-bit exponent). The
  defaults are for double extended precision. Other precisions only need `P`
  and `EXP_W_P` overridden.

To simulate with Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pf_rounder \
    -y rtl -y tb +libext+.sv rtl/pf_pkg.sv tb/tb_pf_rounder.sv
./obj_dir/Vtb_pf_rounder
```

Replace `tb_pf_rounder` with any other testbench name. Each testbench runs in
well under a second of simulated run time once built.
