# Reversible ALU built from DKG, BME, Fredkin and Feynman gates

A reversible gate has as many outputs as inputs and maps every input vector
to a distinct output vector, so no information is destroyed during a
computation. This ALU is assembled only from such gates: each bit is a
six-gate slice in which a DKG gate does the full addition, a BME gate
produces programmable logic functions, and two Fredkin gates steer one of
the candidates to the result. Feynman gates invert an operand on demand and
duplicate a signal where it has to feed two places (a reversible circuit
may not fan out a wire). The outputs nobody needs, the *garbage* outputs,
are part of the structure and are brought out of the design rather than
dropped.

The word-level ALU is a ripple cascade of these slices, 16 bits by default.
Everything is combinational: there is no clock, no register and no reset.

## The gates

| module         | inputs     | outputs                                                                  |
|----------------|------------|--------------------------------------------------------------------------|
| `feynman_gate` | A, B       | P = A, Q = A ⊕ B                                                         |
| `fredkin_gate` | A, B, C    | P = A, Q = A ? C : B, R = A ? B : C (controlled swap)                    |
| `dkg_gate`     | A, B, C, D | P = B, Q = A'C + AD', R = (A ⊕ B)(C ⊕ D) ⊕ CD, S = B ⊕ C ⊕ D             |
| `bme_gate`     | X, Y, Z, T | P = X, Q = XY ⊕ Z, R = XT ⊕ Z, S = X'Y ⊕ Z ⊕ T                           |

The DKG gate is the arithmetic heart. With its control input A at 0 it is a
full adder on B, C, D: S is the sum and R the carry (majority). With A at 1
it is a full subtractor: S is the difference and R the borrow of B − C − D.
The slice uses only the adder mode.

The Feynman and Fredkin equations are the standard definitions of those
gates. The BME gate is implemented exactly as defined above; note that as
defined it is *not* one-to-one (for X = 1, R and S are both Z ⊕ T), so of
the four gates only Feynman, Fredkin and DKG are truly reversible. Its P
output is a garbage line in this ALU, so the alternative definition P = X'
that also circulates would change no result.

## One slice (`ralu_cell`)

The signal names are those of the slice's block diagram:

```
 S0, B ─► F ─► g0, t                   t  = B ⊕ S0
 0, A, t, Cin ─► DKG ─► t2, t3, Cout, t4   t2 = A, t3 = t, Cout = carry, t4 = sum
 t2, t3, S1, S2 ─► BME ─► g1, g2, t5, t6   t5 = A·S2 ⊕ S1,  t6 = A'·t ⊕ S1 ⊕ S2
 S3, t5, t6 ─► Fr ─► g3, g4, t8            t8 = S3 ? t5 : t6
 t4, 0 ─► F ─► g7, t7                      t7 = t4 (copy of the sum)
 S4, t8, t7 ─► Fr ─► g5, g6, Result        Result = S4 ? t8 : t7
```

So S4 chooses between the arithmetic path (the DKG sum) and the logic path
(a BME output), S3 chooses which BME output, and S2, S1, S0 configure the
function. The carry-out is always the DKG's carry, even in logic mode.

The diagram shows the DKG with inputs A, t, Cin and a constant 0 without
saying which gate pin each one is. The only assignment that turns the DKG
into the adder the ALU needs is 0 on the control pin and A, t, Cin on B, C,
D, with R as the carry-out and S as the sum; that is what is built.

## Select lines and what they compute

`ralu_pkg::ralu_sel_t` packs `{s4, s3, s2, s1, s0}`. All bits of the word
share the same select lines. Written for whole words (A, B are WIDTH bits,
`~` is bitwise NOT):

| S4 | S3 | S2 S1     | S0 | Cin | Result                |
|----|----|-----------|----|-----|-----------------------|
| 0  | x  | x x       | 0  | 0   | A + B                 |
| 0  | x  | x x       | 0  | 1   | A + B + 1             |
| 0  | x  | x x       | 1  | 1   | A − B                 |
| 0  | x  | x x       | 1  | 0   | A − B − 1             |
| 1  | 1  | 0 0       | x  | x   | 0                     |
| 1  | 1  | 0 1       | x  | x   | all ones              |
| 1  | 1  | 1 0       | x  | x   | A (transfer)          |
| 1  | 1  | 1 1       | x  | x   | ~A (NOT)              |
| 1  | 0  | S1 = S2   | 0  | x   | ~A & B                |
| 1  | 0  | S1 ≠ S2   | 0  | x   | A \| ~B               |
| 1  | 0  | S1 = S2   | 1  | x   | ~(A \| B) (NOR)       |
| 1  | 0  | S1 ≠ S2   | 1  | x   | A \| B (OR)           |

`cout` is the carry out of A + (B ⊕ S0) + Cin in every row; in the
subtraction rows `cout = 0` means a borrow (A < B).

### Where this departs from the published function list

The ALU was described as offering addition, subtraction, AND, NAND, OR,
NOR and XOR, with a select table listing transfer A, addition, subtraction,
XOR, OR, AND, NOT and NAND. The gate netlist of the slice, built here as
drawn, does not produce AND, NAND or XOR on its result at any select
setting (A·B ⊕ S1, i.e. AND/NAND, exists only on the garbage line g2), and
the published select codes do not match what that netlist computes. This
RTL follows the netlist, so:

- available: add, subtract (with and without carry), transfer A, NOT, OR,
  NOR, plus ~A & B, A | ~B and the two constants;
- missing: AND, NAND, XOR;
- the select encoding is the one in the table above, not the published one.

Adding the missing functions would need wiring that was never specified, so
the slice has been left as drawn.

## The word (`ralu`, the top)

```
ralu #(.WIDTH(16)) (a, b, sel, cin, result, cout, g)
```

| port     | dir | width              | meaning                                   |
|----------|-----|--------------------|-------------------------------------------|
| `a`, `b` | in  | WIDTH              | operands                                  |
| `sel`    | in  | `ralu_sel_t` (5)   | S4..S0                                    |
| `cin`    | in  | 1                  | carry into bit 0 (1 for A − B)            |
| `result` | out | WIDTH              | result                                    |
| `cout`   | out | 1                  | carry out of the top bit                  |
| `g`      | out | WIDTH × 8          | garbage lines: `g[i][k]` is gk of bit i   |

Bit 0 takes `cin`; bit i+1 takes the carry-out of bit i. The longest path
is the WIDTH-stage carry chain from `cin` to `cout` and `result[WIDTH-1]`,
so delay grows linearly with WIDTH. The ALU was characterised at 1, 2, 4, 8,
16 and 32 bits; every one of those is a value of `WIDTH`, and 16 is the
default. In logic mode the result of each bit depends only on that bit's
operands.

## Files

| file                      | contents                                             |
|---------------------------|------------------------------------------------------|
| `rtl/ralu_pkg.sv`         | `ralu_sel_t`, `GARBAGE_PER_BIT`                      |
| `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/dkg_gate.sv`, `rtl/bme_gate.sv` | the gates |
| `rtl/ralu_cell.sv`        | one-bit slice                                        |
| `rtl/ralu.sv`             | WIDTH-bit ALU (top)                                  |
| `tb/ralu_ref_pkg.sv`      | word-level reference model used by the testbenches   |
| `tb/tb_*.sv`              | self-checking testbenches                            |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
after a watchdog time if it hangs.

- `tb_feynman_gate`, `tb_fredkin_gate`, `tb_dkg_gate`, `tb_bme_gate`:
  exhaustive truth tables. The DKG adder/subtractor modes are checked as
  integer arithmetic; Feynman, Fredkin and DKG are also checked to be
  one-to-one, and Fredkin to preserve the number of ones.
- `tb_ralu_cell`: all 256 combinations of A, B, Cin and S4..S0 against the
  reference model, plus the pass-through garbage lines.
- `tb_ralu`: the 16-bit top at its default parameters. For all 64
  select/carry settings it applies directed patterns and random operands,
  then random select sequences. It counts and requires each operation
  class, a carry rippling through all 16 bits, a carry-out, a subtraction
  borrow, and switches of S4 and S3 between consecutive operations.
- `tb_ralu_widths`: WIDTH = 1, 2, 4, 8, 16 and 32 side by side.

The reference model (`ralu_ref_pkg`) describes the table above at word
level, independently of the gates; it is a statement of what the netlist
computes, not of the published function list.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/ralu_pkg.sv tb/ralu_ref_pkg.sv rtl/feynman_gate.sv rtl/fredkin_gate.sv \
  rtl/dkg_gate.sv rtl/bme_gate.sv rtl/ralu_cell.sv rtl/ralu.sv tb/tb_ralu.sv \
  --top-module tb_ralu -o sim
./obj_dir/sim
```

Replace `tb_ralu` with any other testbench name; the gate testbenches need
only their own gate file.

## Changing it

- Width: set `WIDTH`; the reference model handles up to 64 bits.
- A different function set: the logic path is entirely in the BME outputs
  R/S and the first Fredkin. To expose AND/NAND one would route BME output
  Q (currently garbage g2) to the first Fredkin instead of R or S, which
  changes the select table; update `ralu_ref_pkg::classify` and
  `expect_out` to match.
- Timing: the design has no registers; pipeline it by adding flops between
  slices outside these modules.
