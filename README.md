# Quaternary signed digit ALU

This is a small combinational arithmetic and logic unit that works on
**quaternary signed digit (QSD)** numbers. Each digit is in radix 4 but may be
negative: it takes one of the seven values −3 … +3. Because one value has several
spellings, two numbers can be added so that no carry travels more than one
digit position. The adder's delay is then the same for any operand length. The
ALU adds, subtracts, and does the three quaternary logic operations INVERT, MAX
and MIN on two 4-digit operands. A 3-bit opcode selects the operation.

## Number format

A QSD number with digits `a[i]` has the value Σ `a[i]`·4^i, with digit 0 least
significant. Each digit is held as a 3-bit two's complement code:

| digit | −3  | −2  | −1  | 0   | 1   | 2   | 3   |
|-------|-----|-----|-----|-----|-----|-----|-----|
| code  | 101 | 110 | 111 | 000 | 001 | 010 | 011 |

The code `100` (−4) is not a digit, and nothing here defines what happens if
it appears at an input. A 4-digit operand is a 12-bit vector. Its range is
−255 … +255 (`3333` = 255). Negating a QSD number means negating every digit;
no carries are involved.

Carries between digit positions take −1, 0 or +1. They are held as 2-bit two's
complement codes: `11`, `00` and `01`.

## How the carry-free adder works

Two digits add to a raw value `t` of −6 … +6. The adder works in two levels.

**Level 1 (`qsd_sum_carry_gen`).** Each position rewrites its own `t` as
`4·c + s`. The carry `c` is in −1 … +1 and the intermediate sum `s` is in
−2 … +2:

| t | −6 | −5 | −4 | −3 | −2 | −1 | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|----|----|----|----|----|----|---|---|---|---|---|---|---|
| c | −1 | −1 | −1 | −1 | 0  | 0  | 0 | 0 | 0 | 1 | 1 | 1 | 1 |
| s | −2 | −1 | 0  | 1  | −2 | −1 | 0 | 1 | 2 | −1| 0 | 1 | 2 |

For t = ±2 the split with c = 0 is taken, although (±1, ∓2) would also fit.

**Level 2 (`qsd_level2_adder`).** Each position adds the carry that comes up
from the position below to its own intermediate sum. A carry is at most 1 in
magnitude and the intermediate sum at most 2, so the result is at most 3 in
magnitude. That is a legal digit, and no new carry arises. This bound is the
whole trick, and it is why the level-1 table keeps |s| ≤ 2.

**N-digit adder (`qsd_adder`).** There are N level-1 cells and N − 1 level-2
cells:

```
 a[i],b[i] ─► gen[i] ─ s_int[i] ─► l2[i] ─► s[i]        (i = 1 .. N-1)
                   └── c_int[i] ────────────► l2[i+1]
 a[0],b[0] ─► gen[0] ─ s_int[0] ────────────► s[0]
                   └── c_int[0] ────────────► l2[1]
 c_int[N-1] ────────────────────────────────► cout      (result digit N)
```

The result has N + 1 digits, with `cout` as the top one. The delay is two digit
cells deep for any N. The result is in redundant form. For example, 3 + 0 gives
digits `1, −1` (4 − 1), not `0, 3`.

**Subtractor (`qsd_subtractor`).** This computes a − b as a + (−b). It negates
each digit of b and feeds the result to its own `qsd_adder`.

## Quaternary logic

`quaternary_logic_unit` works digit by digit on unsigned 2-bit levels 0 … 3:

* INVERT: `3 − a` (00↔11, 01↔10), which is bitwise NOT of the level
* MAX: the larger of a and b (the quaternary OR)
* MIN: the smaller of a and b (the quaternary AND)

It produces all three results at once, and the ALU selects one of them.

## The ALU (`qsd_alu`, top level)

| op  | operation | `y`                 | `cout`          |
|-----|-----------|---------------------|-----------------|
| 000 | a + b     | sum digits 0..N−1   | sum digit N     |
| 001 | a − b     | difference digits   | difference digit N |
| 010 | INVERT a  | levels as digits 0..3 | 0             |
| 011 | MAX(a, b) | levels as digits 0..3 | 0             |
| 100 | MIN(a, b) | levels as digits 0..3 | 0             |
| 101–111 | unused | 0                  | 0               |

Ports: `op[2:0]`, and `a` and `b` (each `qsd_digit_t [N-1:0]`, which is 12 bits
at N = 4). The outputs are `y` (`qsd_digit_t [N-1:0]`) and `cout`
(`qsd_carry_t`). The parameter `N` (default 4) is the number of digits.

For the logic operations, each operand digit field is read through its two low
bits. QSD digits 0 … 3 therefore act as levels 0 … 3. A negative digit code is
read as its low two bits, so −1 (`111`) reads as level 3. The results come back
as the non-negative digits 0 … 3.

There is no clock, register or reset. Every output is a combinational function
of the inputs. To use the ALU in a clocked design, register its inputs or
outputs around it.

## Files

| file | contents |
|------|----------|
| `rtl/qsd_pkg.sv` | digit, carry and level types, opcode enum, digit negation |
| `rtl/qsd_sum_carry_gen.sv` | level-1 cell |
| `rtl/qsd_level2_adder.sv` | level-2 cell |
| `rtl/qsd_adder.sv` | N-digit carry-free adder |
| `rtl/qsd_subtractor.sv` | N-digit subtractor |
| `rtl/quaternary_logic_unit.sv` | INVERT / MAX / MIN |
| `rtl/qsd_alu.sv` | top level |
| `tb/qsd_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Design choices and departures

The digit code, the level-1 recoding table, the level-2 table, the adder
structure, the logic truth tables, the opcodes and the 4-digit size all come
from the published description of this ALU. The following are choices made in
this RTL:

* The two digit cells are written as small adders with comparisons. They are
  not hand-derived sum-of-products equations, but they realise the same truth
  tables, and synthesis is free to map them either way.
* The description names the subtractor but does not show how it is built. Here
  it is a digit-wise negation in front of a second adder. The adder and the
  subtractor are separate units, as the reported per-unit resource figures
  suggest.
* INVERT acts on operand `a`.
* Logic operands are the low two bits of each 3-bit digit field. Logic results
  are returned as non-negative digits, with `cout` = 0.
* The unused opcodes return zero.
* The design is purely combinational.

For reference, the description reports on a Spartan-3E (xc3s250e-4) FPGA:

* adder and subtractor: 9.7 ns
* logic operations: 5.6 ns
* LUTs: 834 for the whole ALU

Those numbers were not reproduced here.

## Verification

Each testbench compares the outputs with a reference computed in plain
integers, ends with a line `TB_RESULT checks=<n> failures=<n>`, and has a
watchdog.

* `tb_qsd_sum_carry_gen`: all 49 digit pairs, checked against the recoding
  table.
* `tb_qsd_level2_adder`: all 15 carry/sum combinations.
* `tb_qsd_adder` and `tb_qsd_subtractor`: every 2-digit operand pair
  (7⁴ cases) and 200 000 random 4-digit pairs. Each result digit is checked
  against a digit-level model of the two-level scheme, and the value is checked
  against the integer result.
* `tb_quaternary_logic_unit`: all 4⁸ operand pairs, checked against the three
  truth tables.
* `tb_qsd_alu`: the top level at its default size. It runs every opcode,
  including the unused ones, with corner cases and 50 000 random operations.
  It counts the level-2 carry absorptions and the top digits of +1 and −1, and
  it fails if any of them never happens.

Run a testbench with verilator, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb \
  rtl/qsd_pkg.sv tb/qsd_ref_pkg.sv tb/tb_qsd_alu.sv --top-module tb_qsd_alu
./obj_dir/Vtb_qsd_alu
```

To change the operand length, override `N` on `qsd_alu`, `qsd_adder`,
`qsd_subtractor` or `quaternary_logic_unit`. The adders keep their two-cell
depth at any N.
