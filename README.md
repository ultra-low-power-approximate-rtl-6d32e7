# Approximate mirror adders: 16-bit adders that are cheap on the low bits

Image, video and audio processing can absorb small arithmetic errors. This
design uses that tolerance in the adder. The low bits of a 16-bit adder are
built from *approximate* full-adder cells. Each cell is a CMOS mirror adder
with transistors removed, so it gives a wrong sum or carry for a few of its
eight input combinations. The high bits keep the accurate mirror adder, so
the large-magnitude part of the result stays right. The cells trade area,
power and carry delay against error in different amounts, which gives three
adders:

| adder | bits 11..0 | bits 15..12 | published size (transistors) |
|-------|-----------|-------------|------------------------------|
| AA1   | 12 x AMA1 | 4 x CMA     | 304 |
| AA2   | 12 x AMA2 | 4 x CMA     | 280 |
| AA3   | 12 x AMA3 | 4 x CMA     | 244 |

For comparison, the accurate 16-bit ripple-carry adder has 448 transistors
(16 x 28). Those 28 are the 24-transistor mirror adder plus two output
inverters. The RTL models the logic function of each transistor circuit,
not the circuit itself. Transistor counts, power and delay exist only in the
transistor-level design, and this RTL does not reproduce them.

## The four full-adder cells

A mirror adder works in two stages. The first stage computes the inverted
carry, `cout_n`. The second stage computes the inverted sum, `sum_n`, and
uses `cout_n` as one of its inputs. Output inverters then restore the true
polarity. The RTL keeps these complemented internal nodes, so the four
cells can be compared side by side.

| A B Cin | exact S C | AMA1 S C | AMA2 S C | AMA3 S C |
|---------|-----------|----------|----------|----------|
| 0 0 0   | 0 0       | 0 0      | **1** 0  | 0 0      |
| 0 0 1   | 1 0       | 1 0      | 1 0      | **0** 0  |
| 0 1 0   | 1 0       | **0 1**  | **0 1**  | 1 0      |
| 0 1 1   | 0 1       | 0 1      | 0 1      | **1 0**  |
| 1 0 0   | 1 0       | **0** 0  | 1 0      | **0 1**  |
| 1 0 1   | 0 1       | 0 1      | 0 1      | 0 1      |
| 1 1 0   | 0 1       | 0 1      | 0 1      | **1** 1  |
| 1 1 1   | 1 1       | 1 1      | **0** 1  | 1 1      |

Wrong outputs are in bold.

- **CMA** (`rtl/cma.sv`) is the accurate mirror adder:
  `cout = A&B | Cin&(A|B)` and `sum = (A|B|Cin)&~cout | A&B&Cin`.
- **AMA1** (`rtl/ama1.sv`) thins out both stages. The carry becomes
  `cout = B | A&Cin` and the sum becomes `sum = Cin&~cout | A&B&Cin`.
  It is wrong in 2 of 8 rows.
- **AMA2** (`rtl/ama2.sv`) keeps the AMA1 carry stage and drops the sum
  stage. The exact sum equals the inverted exact carry in six rows, so the
  cell buffers `cout_n` and uses it as the sum. Because the carry is already
  approximate, the sum is wrong in 3 rows. The buffer keeps the sum load off
  the carry node. That is a circuit concern with no effect on the logic.
- **AMA3** (`rtl/ama3.sv`) uses the fact that the exact carry equals `A` in
  six rows. It sets `cout = A` and `sum = B`, so no logic is left. Its carry
  in is unread, and a chain of AMA3 cells has no ripple path.

AMA3 is the one to read critically. It could also be described as "carry =
A, sum computed exactly from that carry", which gives
`sum = ~A&(B|Cin) | A&B&Cin`. This RTL uses `sum = B` instead. That is the
truth table used for the error evaluation, and it reproduces the published
mean-squared-error ranking of the adders (AA1 < AA3 < AA2). The alternative
form also gives that ranking, so the ranking alone does not prove the
choice. To switch, change the one `sum` assignment in `rtl/ama3.sv` and the
`AMA3_S` table in `tb/tb_approx_ref_pkg.sv`.

## How the cells form an adder

`rtl/hybrid_adder.sv` is a ripple chain of `WIDTH` cells. The low
`APPROX_BITS` cells are of the kind selected by the `APPROX` parameter, and
the rest are CMA cells. The carry out of bit 11 feeds bit 12, so a carry
from the approximate part, right or wrong, reaches the accurate part. Two
properties follow, and the testbenches check both:

- Bits 16..12 of the result are always the exact sum of the operands' high
  nibbles plus the carry that leaves bit 11.
- If both operands have zero low bits, AA1 and AA3 add exactly. AA2 gives
  `0xFFF` in the low 12 bits, because AMA2 computes 0+0+0 = 1.

`rtl/aa1.sv`, `rtl/aa2.sv` and `rtl/aa3.sv` fix the cell kind, with 16 bits
and 12 approximate bits as defaults. `rtl/approx_adder_top.sv` feeds one
operand pair to all three adders. Each adder has its own `sum`/`cout`
outputs, so an application can choose its accuracy or compare the three.
The shared enum of cell kinds and the default sizes are in
`rtl/approx_adder_pkg.sv`.

Interface of each adder: inputs `a[15:0]` and `b[15:0]`, outputs
`sum[15:0]` and `cout`. `{cout, sum}` is the 17-bit result. Everything is
combinational, with no clock, reset or registers, and the outputs follow the
inputs after the ripple delay. In AA3 the low 12 sum bits are simply `b[11:0]`.
A synthesis tool therefore reports them as outputs wired to inputs, and that
is intended. Likewise AA1's `sum[0]` is constant 0: with no carry in, the
AMA1 sum `Cin&~cout | A&B&Cin` is always 0.

## Accuracy

`tb/tb_approx_adder_top.sv` adds one million random 16-bit operand pairs
with all three adders. Error distance is the approximate result minus the
exact 17-bit sum. PSNR takes 2^17 - 1 as the peak. With the default random
seed:

| adder | results with error | mean error distance | mean squared error | PSNR |
|-------|-------------------|---------------------|--------------------|------|
| AA1   | 92.6 %            | 551                 | 9.3e5              | 42.7 dB |
| AA2   | 99.6 %            | 1141                | 2.26e6             | 38.8 dB |
| AA3   | 99.97 %           | 1024                | 1.40e6             | 40.9 dB |

Nearly every result is inexact, but every error is smaller than 2^13. Only
the low 12 sum bits and the one carry into bit 12 can be wrong. AA1 is the choice when error matters most. AA2 and AA3 fit
applications that tolerate more. The published error figures use a
normalisation that is not stated. The testbench therefore checks only their
ranking: AA1 has the lowest mean error and mean squared error, and the mean
squared error ranks AA1 < AA3 < AA2.

## Choices this RTL makes

- The carry into bit 0 is tied to 0. The published block diagrams show only
  the A and B operands.
- The carry out of bit 15 is brought out as `cout`. The block diagrams show
  only S15..S0.
- The published diagrams join the approximate and accurate blocks with a
  line that has no printed direction. It is read as the ripple carry from
  bit 11 to bit 12.
- The accurate ripple-carry and carry-lookahead adders that served as
  baselines are not included.

## Verification

Every cell, every adder and the top have a self-checking testbench in `tb/`; `hybrid_adder` is covered through the three adders. The expected
values come from `tb/tb_approx_ref_pkg.sv`, which holds the truth tables
above row by row. Its function `ref_add` ripples a carry through those
tables bit by bit. It never looks at the RTL.

| testbench | what it does |
|-----------|--------------|
| `tb_cma`, `tb_ama1..3` | all 8 input rows. Also counts the rows where the cell differs from a+b+cin (0, 2, 3, 4). |
| `tb_aa1..3` | corner cases, 16 single-bit cases and 100,000 random pairs. Checks the full result and both properties above, and requires at least one approximation error and one carry into bit 12. |
| `tb_approx_adder_top` | one million random pairs at the default size. Per adder, it requires at least one approximation error, one carry into bit 12 and one carry out. It also checks the accuracy ranking. Runs in a few seconds. |

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Each has a
watchdog that fails the run if it hangs.

Running a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/approx_adder_pkg.sv tb/tb_approx_ref_pkg.sv tb/tb_approx_adder_top.sv \
    --top-module tb_approx_adder_top -Mdir obj -o sim
./obj/sim
```

For any other testbench, replace `tb_approx_adder_top` with its name.
Verilator finds the modules through `-Irtl`. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/approx_adder_pkg.sv rtl/<module>.sv`.

To try a different split, set `APPROX_BITS` (and `WIDTH`) on
`approx_adder_top` or on one of the adders. To add a new approximate cell,
write it with the same five ports and add an enum value and a generate
branch in `hybrid_adder`.
