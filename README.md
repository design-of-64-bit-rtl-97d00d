# 64-bit BCD adder with carry select correction

A binary-coded decimal (BCD) number stores each decimal digit in its own
4-bit field, so a 64-bit word holds 16 digits. Adding two such numbers with an
ordinary binary adder gives wrong answers whenever a digit pair sums to 10 or
more: the binary result lands in the unused codes 10..15 (or overflows the
nibble) instead of producing a decimal carry. The classic fix is to add six
(`0110`) to any digit whose sum exceeds nine, which skips the six unused codes
and pushes the carry into the next digit.

The trouble in a multi-digit adder is the decimal carry. Whether digit *i*
needs the +6 correction depends on the carry coming out of digit *i-1*, which
depends on digit *i-2*, and so on. This design keeps that dependency as short
as possible:

1. every digit first works out, on its own and in parallel with all the
   others, everything that does **not** depend on the incoming carry;
2. every digit then prepares its corrected result **both ways**, once for an
   incoming carry of 0 and once for 1 (a carry select stage);
3. the incoming carry only has to pick one of the two prepared results, so the
   carry crosses each digit through a single select.

The default configuration is 16 digits (64 bits), purely combinational.

## Hierarchy

```
bcd_adder_64bit            16 digits, carry chained digit to digit
└── bcd_adder_4bit         one decimal digit  (x16)
    ├── binary_adder_4bit  ADD1: a + b, carry in tied to 0
    │   └── full_adder     (x4)
    ├── bcd_correction_logic   decimal generate dG / propagate dP
    └── carry_select_adder     two correction banks and the select
        ├── binary_adder_4bit  bank 0 (incoming carry 0)
        └── binary_adder_4bit  bank 1 (incoming carry 1)
bcd_pkg                    digit width, default digit count, +6 constant,
                           3-input majority function maj3()
```

## Decimal generate and propagate

ADD1 adds the two digits **without** the incoming carry and gives a 5-bit
binary result `{bCout, bS[3:0]}` in the range 0..18. Two flags are derived from
it:

| signal | meaning | gate form used |
|---|---|---|
| `dG` (generate)  | `a + b >= 10`: this digit carries out whatever comes in | `M(bCout, M(bCout, bS3, 1), M(bS3, bS2, bS1))` = `bCout + bS3·(bS2 + bS1)` |
| `dP` (propagate) | `a + b >= 9`: this digit carries out if a carry comes in | `dG + bS3·bS0` |

`M(x,y,z)` is the 3-input majority (at least two inputs high), the one gate
the whole carry logic is written in. `dP` reuses `dG` and only adds the
"sum is exactly 9" case, `bS3·bS0`, which is the only value ≥ 9 not already
covered.

The decimal carry out of the digit is then

```
dCout = M(dG, dP, dCin) = dG + dP·dCin
```

Because `dG` and `dP` never look at `dCin`, all 16 digits compute them at the
same moment; only this last majority sits on the digit-to-digit carry path.

Keeping the incoming carry out of ADD1 is essential: if ADD1 also added the
carry, `dG` alone would decide the carry out, but it could not be formed until
the carry had arrived.

## The carry select correction stage

This is the heart of the design (`carry_select_adder`). The correction to
apply depends only on the decimal carry out, and the decimal carry out for
each possible incoming carry is already known (`dG` for 0, `dP` for 1). So
both corrected digits are formed ahead of time, each by its own 4-bit binary
adder:

| bank | assumes `dCin` | adds to `bS` | digit carry out |
|---|---|---|---|
| 0 | 0 | `{0,dG,dG,0}` (6 if `dG`), carry in 0 | `dG` |
| 1 | 1 | `{0,dP,dP,0}` (6 if `dP`), carry in 1 | `dP` |

The real `dCin` then selects: `sum = dCin ? bank1 : bank0`, and the carry out
is `M(dG, dP, dCin)`. The correction applied is always `{0,dCout,dCout,0}`,
exactly the single-path correction of a conventional BCD adder, just computed
twice in advance. The banks' own 4-bit carry outs are deliberately unused:
they only reflect the modulo-16 wrap of the correction, not the decimal carry.

Worked examples (one digit):

| a + b | bS, bCout | dG, dP | bank 0 | bank 1 |
|---|---|---|---|---|
| 3 + 4 = 7  | 0111, 0 | 0, 0 | 7, carry 0 | 8, carry 0 |
| 4 + 5 = 9  | 1001, 0 | 0, 1 | 9, carry 0 | 9+6+1 = 16 → 0, carry 1 |
| 7 + 5 = 12 | 1100, 0 | 1, 1 | 12+6 = 18 → 2, carry 1 | 19 → 3, carry 1 |
| 9 + 9 = 18 | 0010, 1 | 1, 1 | 2+6 = 8, carry 1 | 9, carry 1 |

## Interface and timing

`bcd_adder_64bit #(parameter int unsigned DIGITS = 16)`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in  | `4*DIGITS` | BCD operands, digit 0 in bits `[3:0]` |
| `cin`    | in  | 1 | carry into digit 0 (tie to 0 for a plain addition) |
| `sum`    | out | `4*DIGITS` | BCD sum, modulo 10^DIGITS |
| `cout`   | out | 1 | carry out of the most significant digit |

There is no clock, reset or handshake: the outputs are a combinational
function of the inputs. The critical path is ADD1 plus the generate logic of
digit 0 (four full-adder carries and three majority levels), then one
majority/select per digit up the chain, then the final 2:1 select of the top
digit. Operands must be valid BCD (every nibble 0..9); non-BCD nibbles give
an unspecified result and are not checked.

## Choices made in this implementation

The design fixes the overall structure (16 one-digit adders, a carry select
stage per digit replacing the look-ahead correction, the majority-gate
generate/propagate equations). These points are this implementation's own:

- **Binary adder type.** The 4-bit adders are ripple-carry chains of full
  adders. Carry-flow or parallel-prefix 4-bit adders are drop-in replacements
  for `binary_adder_4bit` and change only its internal delay.
- **Contents of the two banks.** The two-bank (dual-bank) select is specified
  only in outline; the banks here are the two possible correction additions,
  which makes the selected carry equal to the specified `M(dG, dP, dCin)`.
- **Carry in of the whole adder.** The `cin` port is an addition that allows
  two adders to be cascaded into a wider one.
- **Where the incoming carry is added.** It enters in the correction banks,
  not in ADD1 (see the generate/propagate section for why).
- **No pipeline registers.** The adder is a single combinational block; wrap
  it in registers if it is used in a clocked datapath.

The design is aimed at an FPGA implementation with a reported path delay of
about 4.75 ns for the 64-bit adder. That figure depends on the device and
tools and is not something the RTL simulation here can confirm. Alternative
binary adders (carry-flow, parallel-prefix) and the look-ahead-style carry
tree used by earlier majority-gate BCD adders appear only as comparisons and
are not provided.

## Verification

Each module has a self-checking testbench in `tb/` that compares against a
reference computed in the testbench itself and ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it covers |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_binary_adder_4bit` | all 512 operand/carry combinations |
| `tb_bcd_correction_logic` | all 32 values of `{bCout, bS}` against `>= 10` and `>= 9` |
| `tb_carry_select_adder` | every reachable digit-pair sum 0..18 with both carries; checks that each corrected bank is selected |
| `tb_bcd_adder_4bit` | all 10 × 10 × 2 digit/carry combinations |
| `tb_bcd_adder_64bit` | full 16-digit adder at its default size: zero, all-nines, a carry rippling through all 16 digits, and 20,000 random additions, half biased towards digit pairs summing to 9 so carries travel far |

The 64-bit reference converts the operands to integers, adds them and
converts back. The top-level testbench also counts how often each mechanism
occurred (digits corrected by +6, carry-in-1 bank selected, carries passing
through four or more propagate-only digits, a carry through all 16 digits,
carry out, carry in) and fails if any count is zero. Every testbench has a
watchdog that fails the run if it does not finish in time.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Irtl rtl/bcd_pkg.sv tb/tb_bcd_adder_64bit.sv \
          --top-module tb_bcd_adder_64bit -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run any other testbench.
The `-Irtl` option lets Verilator find the submodules by file name. Lint the
RTL alone with
`verilator --lint-only -Wall -Irtl rtl/bcd_pkg.sv rtl/bcd_adder_64bit.sv`.

## Changing it

- **Width.** Set `DIGITS` on `bcd_adder_64bit`. The top-level testbench takes
  its size from `bcd_pkg::DEFAULT_DIGITS` and uses 64-bit integers for its
  reference, so it works up to 18 digits.
- **Faster carry chain.** Because every digit exposes `dG` and `dP`, the
  ripple of majorities in `bcd_adder_64bit` can be replaced by a parallel
  prefix (look-ahead) tree over (`dG`, `dP`) pairs without touching the digit
  adders, with each digit's carry select stage then driven by the tree's
  carry.
