# Carry-free 32-bit adder in quaternary signed-digit (QSD) arithmetic

A binary ripple-carry adder is slow because a carry can travel from the least
significant bit to the most significant one. This design removes that chain
from the addition itself. The operands are written in a redundant radix-4
number system whose digits run from -3 to +3, the *quaternary signed-digit*
(QSD) system. With that much redundancy, each digit position can settle its
result from only its own digits and those of the position directly below it.
An N-digit addition then has the same logic depth as a 1-digit one.

The RTL is purely combinational SystemVerilog. It contains:

- the N-digit QSD adder (16 digits, which holds a 32-bit operand);
- converters from two's-complement binary to QSD and back;
- a top level that adds or subtracts two signed 32-bit numbers.

## Number representation

A QSD number with digits `d[i]` in -3..+3 is worth `sum(d[i] * 4**i)`. Most
values can be written in several ways. For example, 3 is the single digit `3`,
or the two digits `1, -1`, meaning 4 - 1. The addition algorithm relies on
this choice.

Each digit is a 3-bit two's-complement code. `qsd_pkg::qsd_digit_t` holds it:

| digit | -3  | -2  | -1  | 0   | 1   | 2   | 3   |
|-------|-----|-----|-----|-----|-----|-----|-----|
| code  | 101 | 110 | 111 | 000 | 001 | 010 | 011 |

The code `100` (-4) is never produced. The intermediate carry (see below)
lies in -1..+1 and uses 2 bits (`qsd_carry_t`).

## The two-step addition

This is the core of the design and the part worth understanding.

**Step 1 (`qsd_step1`, one per digit).** Add the two operand digits:
`t = a[i] + b[i]`, which lies in -6..+6. Split `t` into an intermediate carry
`c[i]` and an intermediate sum `s[i]`, so that `t = 4*c[i] + s[i]`. Two rules
constrain the split:

- `|s[i]| <= 2`;
- `|c[i]| <= 1`.

| t      | 6 | 5 | 4 | 3  | 2 | 1 | 0 | -1 | -2 | -3 | -4 | -5 | -6 |
|--------|---|---|---|----|---|---|---|----|----|----|----|----|----|
| c[i]   | 1 | 1 | 1 | 1  | 0 | 0 | 0 | 0  | 0  | -1 | -1 | -1 | -1 |
| s[i]   | 2 | 1 | 0 | -1 | 2 | 1 | 0 | -1 | -2 | 1  | 0  | -1 | -2 |

The entries for t = +3 and t = -3 are the important ones. Writing 3 as
`4 - 1` rather than as `0*4 + 3` keeps the intermediate sum within ±2.

**Step 2 (`qsd_step2`, one per digit).** The result digit is
`sum[i] = s[i] + c[i-1]`, with `c[-1] = 0`. The two rules guarantee that
`|s[i] + c[i-1]| <= 3`. That is always a valid digit, so step 2 never creates
another carry.

Each output digit therefore depends only on input digits `i` and `i-1`. The
critical path is one 3-bit add, a small table lookup and one more 3-bit add,
whatever the value of N. The carry out of the top position, `c[N-1]`, becomes
an extra most significant result digit (`carry_out`). With that digit the sum
is exact and never overflows.

`qsd_adder` builds the N-digit adder from N step-1 units and N step-2 units.

## Conversion at the edges

The carry-free property holds only while the numbers stay in QSD form. When
binary is needed, the cost of a carry chain moves to the boundary:

- **`bin2qsd`**: this converter has no arithmetic and no carry. A
  two's-complement number is already a radix-4 number. The lower bit pairs are
  digits 0..3, and the top pair, which holds the sign bit, is a signed digit
  -2..+1. The module only re-labels and sign-extends bits. This is why a
  synthesis tool reports its outputs as wired to its inputs.
- **`qsd2bin`**: the positive digits are laid side by side as a binary number
  P, and the magnitudes of the negative digits as a second binary number N. The
  result is `P - N`, so the conversion costs one full-width subtraction. This
  is the one carry chain in the design.

A datapath that chains several additions can take `sum_qsd` from the top level
and skip `qsd2bin` until the final result.

## Subtraction

The digit set is symmetric, so `-x` is obtained by negating every digit of `x`,
with no borrow between positions. `qsd_negate` does this for the subtrahend
when `sub = 1`, and the same carry-free adder then forms `a - b`.

## Top level: `qsd_adder_top`

```
a_bin ─ bin2qsd ────────────────────┐
                                    ├─ qsd_adder ─┬─ sum_qsd (17 digits)
b_bin ─ bin2qsd ─ qsd_negate(sub) ──┘             └─ qsd2bin ─ result (33 bits)
```

| port      | dir | width    | meaning                                            |
|-----------|-----|----------|----------------------------------------------------|
| `a_bin`   | in  | 32       | signed operand                                     |
| `b_bin`   | in  | 32       | signed operand                                     |
| `sub`     | in  | 1        | 0: `a+b`, 1: `a-b`                                 |
| `result`  | out | 33       | signed result, exact for every input               |
| `sum_qsd` | out | 17 x 3   | QSD result; digit 16 is the adder's carry digit   |

The only parameter is `WIDTH`, which defaults to 32 and must be even. The QSD
adder has `WIDTH/2` digits. The blocks below the top take `DIGITS`.

The design has no clock, reset or pipeline registers. Latency is zero cycles,
and a new operand pair can be applied at any time. To use it in a synchronous
system, register the inputs and outputs around it.

## What is given and what is chosen here

These parts follow the published QSD adder scheme:

- the digit set and its 3-bit code;
- the 2-bit carry;
- the two-step algorithm with its two range rules;
- the carry/sum selection table;
- the flow of conversion to QSD, addition and conversion back;
- the 32-bit size.

These parts are choices of this design:

- the binary-to-QSD mapping, which uses bit pairs with a signed top pair;
- the QSD-to-binary converter built as positive minus negative digits;
- bringing the top carry out as an extra digit rather than dropping it;
- the subtract mode built from digit negation;
- making the whole design combinational.

Not reproduced: the scheme's reported timing and power for a 32-bit FPGA
implementation (about 10.1 ns, against about 44.4 ns for a ripple-carry adder
and 15.8 ns for a carry-select adder). Those figures depend on the device and
tool flow. The ripple-carry and carry-select adders serve only as a comparison
and are not included.

## Files

| file                    | content                                         |
|-------------------------|-------------------------------------------------|
| `rtl/qsd_pkg.sv`        | digit and carry types, default width            |
| `rtl/qsd_step1.sv`      | step 1: intermediate carry and sum for one digit |
| `rtl/qsd_step2.sv`      | step 2: final digit for one position            |
| `rtl/qsd_adder.sv`      | N-digit carry-free adder                        |
| `rtl/bin2qsd.sv`        | binary to QSD                                   |
| `rtl/qsd_negate.sv`     | digit-wise negation                             |
| `rtl/qsd2bin.sv`        | QSD to binary                                   |
| `rtl/qsd_adder_top.sv`  | 32-bit adder/subtractor                         |
| `tb/tb_*.sv`            | one self-checking testbench per module          |

## Verification

Each testbench computes the expected values with plain integer arithmetic,
independently of the RTL. It ends by printing
`TB_RESULT checks=<n> failures=<m>`.

- `tb_qsd_step1`: all 49 digit pairs, checked against the table above and
  the range rules.
- `tb_qsd_step2`: all 15 combinations of intermediate sum and carry.
- `tb_qsd_adder`: 16 digits, random operands over the full digit set, and the
  extremes (all +3, all -3). It also checks the carry-free property directly:
  after one operand digit `j` changes, no result digit other than `j` and
  `j+1` may change.
- `tb_bin2qsd`, `tb_qsd_negate`, `tb_qsd2bin`: random and corner values,
  checked by value.
- `tb_qsd_adder_top`: runs the top level at its default parameters, with
  corner operands (0, ±1, the most positive and most negative 32-bit values,
  and others) and 5000 random pairs in both modes. It checks the binary result
  and the value of the QSD result. It also counts additions, subtractions,
  +1 and -1 carry digits, negative result digits and results that need the
  33rd bit, and fails if any of these never occurred.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/qsd_pkg.sv \
    tb/tb_qsd_adder_top.sv --top-module tb_qsd_adder_top -o sim
./obj_dir/sim
```

Each testbench runs in well under a second.
