# Carry-free modified signed-digit adder and subtracter

This is a fully parallel adder and subtracter for modified signed-digit (MSD)
numbers. Its logic depth is the same for any operand width. Each digit is 1, 0
or -1 (written 1̄), weighted by a power of two. A value therefore has several
representations, and that redundancy lets an addition finish in three fixed
steps. No carry runs along the word: result digit `Z_i` depends only on operand
digits `i`, `i-1` and `i-2`.

The architecture was conceived as an optoelectronic system. Each digit is a
group of three light positions, and every logic operation is "two lights meet on
a detector". The RTL keeps that structure: each digit is three one-hot rails,
and every step is an array of nine two-input ANDs followed by ORs that select
the truth-table cells. The optical interconnect becomes plain wiring.

## Digits on three rails

A digit is carried in *space-position-logic encoding*. There are three rails,
and exactly one is lit:

| value | X-side rail | Y-side rail | `msd_pkg::sple_t` field |
|------:|:-----------:|:-----------:|:------------------------|
|  1    | A           | a           | `pos`                   |
|  0    | B           | b           | `zero`                  |
| -1    | C           | c           | `neg`                   |

Each step combines two digits per position. The first digit uses the X side
(A/B/C) and the second uses the Y side (a/b/c). Both sides use the same struct.
The RTL assumes one-hot inputs and does not detect illegal codes. An all-dark
or multiply-lit digit just propagates through the AND/OR logic, and the
helpers `sple_legal`, `sple_encode` and `sple_value` in `msd_pkg` exist for
testbenches. Negating a digit swaps its `pos` and `neg` rails.

## The detecting array

Every truth table in the three steps is a 3×3 table indexed by two digits.
`detector_array` therefore serves all of them. It has nine elements, and
element `G(3r+c+1)` is X rail `r` AND Y rail `c`:

|       | a  | b  | c  |
|-------|----|----|----|
| **A** | G1 | G2 | G3 |
| **B** | G4 | G5 | G6 |
| **C** | G7 | G8 | G9 |

With legal inputs exactly one element is lit. Each output rail of a step is the
OR of the elements whose table cell holds that value. In the RTL each table is a
set of 9-bit masks, where bit `k-1` stands for `G_k`.

## The three steps

Take operands `X = X_{N-1}..X_0` and `Y`. Write `s` for the sum of the two
digits at a position.

**Step 1 (`ma1_step1`)** splits each digit sum as `X_i + Y_i = 2·T_{i+1} + W_i`:

| s  | -2 | -1 | 0 | 1  | 2 |
|----|----|----|---|----|---|
| T  | -1 | -1 | 0 | 1  | 1 |
| W  | 0  | 1  | 0 | -1 | 0 |

This gives the rails T: a = G1|G2|G4, b = G3|G5|G7, c = G6|G8|G9. It also gives
W: A = G6|G8, B = G1|G3|G5|G7|G9, C = G2|G4.

The weight goes out on the A/B/C side and the transfer on the a/b/c side. The
choice of `W = -1` when the sum is 1 looks odd, but it is the key to the method.
After step 1, a position that sends out a transfer of +1 never keeps a weight
of +1. The same holds for -1.

**Step 2 (`ma2_step2`)** uses the same split on `W_i + T_i`. Here the transfer
is non-zero only for a sum of ±2:

| s  | -2 | -1 | 0 | 1 | 2 |
|----|----|----|---|---|---|
| T' | -1 | 0  | 0 | 0 | 1 |
| W' | 0  | -1 | 0 | 1 | 0 |

This gives T': a = G1, b = G2..G8, c = G9. It also gives W': A = G2|G4,
B = G1|G3|G5|G7|G9, C = G6|G8.

**Step 3 (`ma3_step3`)** sets `S_i = W'_i + T'_i`, limited to one digit:
a = G1|G2|G4, b = G3|G5|G7, c = G6|G8|G9. The ±2 cells cannot occur. A
transfer `T'_i = +1` needs `W_{i-1} = T_{i-1} = 1`. But `W_{i-1} = 1` means
the digits at `i-1` summed to -1, which forces `T_i = -1`, so `W'_i ≤ 0`. The
case for -1 is symmetric. The sum therefore needs no further step.

Between steps, each transfer moves up one position. Each module does this by
indexing its outputs by destination position: position `i` carries the pair
`(W_i, T_i)` or `(W'_i, T'_i)`. Position 0 always receives a transfer of 0.

**Result width.** `N` operand digits give `N+1` result digits. The top
position enters step 2 with `W_N = 0`, so `|W_N + T_N| ≤ 1` and it never sends
a transfer out. `ma2_step2` still brings that transfer out as `t_top`, and the
top module asserts that it stays zero for legal inputs. The range is exact:
`|X ± Y| ≤ 2·(2^N − 1) < 2^(N+1)`.

## Subtraction

`X − Y` is computed as `X + (−Y)`. The operand module `ma0_operand_module`
negates every subtrahend digit when `sub = 1`. That is only a rail swap, so
addition and subtraction take the same path and the same time.

## Top level: `msd_adder_subtracter`

```
 x[N] ──┐                 w[N+1]            w2[N+1]
        ├─ Ma0 ── xo,yo ── Ma1 ──────────── Ma2 ─────────── Ma3 ── z[N+1]
 y[N] ──┤  (complement     (step 1,         (step 2,        (step 3)
 sub ───┘   Y if sub)       shift T)  t[N+1] shift T') t2[N+1]
```

| port  | dir | type            | meaning                                  |
|-------|-----|-----------------|------------------------------------------|
| `x`   | in  | `sple_t [N]`    | first operand, index 0 least significant |
| `y`   | in  | `sple_t [N]`    | second operand                           |
| `sub` | in  | `logic`         | 0: `Z = X + Y`, 1: `Z = X − Y`           |
| `z`   | out | `sple_t [N+1]`  | result                                   |

`N` defaults to 3, the size of the worked examples (3-digit operands, 4-digit
result). Any `N ≥ 1` works.

**Timing.** The design has no clock or reset and is purely combinational. Its
logic depth is three table levels (AND, then OR, per step) plus the
subtrahend mux, whatever `N` is. To pipeline it, register the pairs between
Ma1, Ma2 and Ma3; the steps are independent of one another.

**Worked examples.** The end-to-end testbench reproduces both:

- 6 + 5: `(1 1 0) + (1 0 1) = (1 1 0 1̄)`, which is 8 + 4 − 1 = 11.
- 7 − 5: `(1 1 1) − (1 0 1) = (0 1 1̄ 0)`, which is 4 − 2 = 2.

## What the RTL models and what it leaves out

- The modules Ma0–Ma3, the 3×3 detecting array and the three steps follow the
  original architecture closely.
- The optical interconnect between modules is modelled as direct connections.
  This covers the trimmed butterfly stages that bring each X-side light and
  Y-side light together on one detector. It also covers the light sources
  (LEDs or laser diodes) and the detectors' optical thresholds. Their logical
  effect is just the index mapping in `detector_array`.
- The optical design places all rails of a digit in a two-dimensional
  butterfly. That geometry is not represented.
- Three things are this design's own choices: the complement sits in Ma0
  under a `sub` input, the top transfer is brought out as `t_top`, and digits
  are stored in arrays with index 0 least significant.
- Step 1 takes the transfer as the sign of the digit sum and the weight as
  the remainder. Step 3 is written as a limited (saturating) sum, although
  its limit is never reached.

## Files

| file | contents |
|------|----------|
| `rtl/msd_pkg.sv` | `sple_t` type, constants, encode/decode/negate helpers |
| `rtl/detector_array.sv` | nine AND detecting elements for one position |
| `rtl/ma0_operand_module.sv` | operand module, subtrahend complement |
| `rtl/ma1_step1.sv` | step 1 plus transfer shift |
| `rtl/ma2_step2.sv` | step 2 plus transfer shift |
| `rtl/ma3_step3.sv` | step 3, final sum |
| `rtl/msd_adder_subtracter.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_msd_wide.sv` | random 16-digit test with a locality check |

## Verification

Every testbench checks against arithmetic, not against the truth tables. It
ends with `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

- `tb_detector_array` drives all 64 rail combinations, legal and illegal.
- `tb_ma0_operand_module` and `tb_ma1_step1` cover every pair of 3-digit MSD
  operands. Step 1 is also checked to preserve the value.
- `tb_ma2_step2` and `tb_ma3_step3` cover every digit pair at each of 4
  positions.
- `tb_msd_adder_subtracter` runs at the default size. It covers both worked
  examples digit by digit, plus all 729 operand pairs added and subtracted. It
  counts the mechanisms it exercises and fails if one never occurs: addition,
  subtraction, non-zero transfers at step 1 and at step 2, use of the top
  result digit, negative results, and a locality check.
- `tb_msd_wide` runs 20,000 random 16-digit additions and subtractions. After
  each one it changes one operand digit `j` and checks that no result digit
  outside `j..j+2` moves. This is the carry-free property, checked directly.

To run one testbench with Verilator:

```
verilator --binary --timing --assert rtl/msd_pkg.sv rtl/detector_array.sv \
  rtl/ma0_operand_module.sv rtl/ma1_step1.sv rtl/ma2_step2.sv rtl/ma3_step3.sv \
  rtl/msd_adder_subtracter.sv tb/tb_msd_adder_subtracter.sv \
  --top-module tb_msd_adder_subtracter -Mdir obj
./obj/Vtb_msd_adder_subtracter
```

To check a different width, change `N` in `tb_msd_wide`.
