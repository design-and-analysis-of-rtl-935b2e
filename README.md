# Reconfigurable approximate carry look-ahead adder (RAP-CLA)

An adder that can trade accuracy for speed and power at run time. One mode
input chooses between two behaviours:

- **exact mode**: the result is `a + b + cin`, as from an ordinary carry
  look-ahead adder (CLA);
- **approximate mode**: every carry is computed from only the few bit
  positions just below it. A carry that would have to travel further is
  dropped, so the sum can be too small. In silicon the discarded part of each
  carry generator is switched off, which saves power and shortens the
  critical path.

No separate correction stage is needed to get exact results. Each carry
generator holds both halves of its logic, and a single 2:1 multiplexer picks
the approximate or the exact carry. The default configuration is a 4-bit
adder with one mode signal. Width, window size and a few options are
parameters.

## How a carry is split

A CLA computes every carry directly from the per-bit generate and propagate
signals, `G[x] = A[x] & B[x]` and `P[x] = A[x] ^ B[x]`:

```
C[x+1] = G[x]
       | G[x-1] & P[x]
       | G[x-2] & P[x-1] & P[x]
       | ...
       | G[0]   & P[1] & ... & P[x]
       | Ci     & P[0] & ... & P[x]
```

Each term says "a carry is generated at position y and propagated by every
position above it up to x". The RAP-CLA cuts this list at a **window size W**:

| part | terms | used in |
|---|---|---|
| approximate part | the W most significant generate terms, y = x-W+1 .. x | both modes |
| supplementary part | the remaining generate terms, y = 0 .. x-W, and the carry-in term | exact mode only |

The exact carry is `approximate | supplementary`. In approximate mode the
multiplexer outputs the approximate part alone. For carries with x < W every
generate term lies inside the window, and only the carry-in term is
supplementary.

The approximate carry into bit x+1 therefore equals the carry-out of a W-bit
addition of `a[x:x-W+1] + b[x:x-W+1]` with no carry-in. The testbenches use
this as an independent arithmetic reference model.

### What approximate mode gets wrong

The approximate result is never larger than the exact one. Exhaustive checks
of widths 1 to 6 with every window confirm this. Two kinds of carry are lost:

1. **Long carries.** A carry that is generated at position y and must
   propagate through more than W-1 positions before reaching position x+1.
   For W = 2 in a 4-bit adder, `0111 + 0001` gives `0000`, not `1000`: the
   carry from bit 0 would have to pass through bits 1 and 2 to reach bit 3.
2. **The carry-in.** `cin` is a supplementary term of every carry generator,
   so in approximate mode it cannot cause any carry. It still enters sum bit
   0 directly, so `cin` is added into bit 0 but never carried out of it.

At the default parameters (4 bits, W = 2), exhaustive simulation gives wrong
results for 184 of the 512 input combinations. The mean absolute error over
those cases is 5.6 and the largest is 18. Accuracy improves as W grows.
With W at least WIDTH, only the carry-in term is ever dropped.

### Gate style

Both sums of products are written in NAND-NAND form: one NAND per product
term, then a NAND over the active-low terms. This is the standard AND-OR to
NAND-NAND rewrite, which suits a cell library where NAND is the cheapest
gate. It is logically identical to AND-OR, and a synthesis tool may remap it.

### Power gating

In a full-custom implementation the supplementary part of each carry
generator sits behind pMOS header switches, which are off in approximate
mode. Such switches have no logic function and are not modelled here. The
multiplexer already ignores the supplementary output in approximate mode. A
physical implementation that adds the headers also needs output isolation,
so that the multiplexer never sees a floating node.

## Structure

```
 a, b ──► rap_pg_gen ──P,G──► rap_carry_gen  x = 0   ──► C[1]
                       │      rap_carry_gen  x = 1   ──► C[2]
        cin ───────────┼────► ...                        ...
        mode ──────────┼────► rap_carry_gen  x = WIDTH-1 ──► C[WIDTH] = cout
                       │                                  │
                       └──P──► rap_sum_gen ◄── C[WIDTH-1:1], C[0] = cin
                                    │
                                   sum
```

| file | role |
|---|---|
| `rtl/rap_cla_pkg.sv` | mode type `rap_mode_e` (`MODE_APPROX = 0`, `MODE_EXACT = 1`), default width and window |
| `rtl/rap_pg_gen.sv` | propagate/generate block, `P = A ^ B`, `G = A & B` |
| `rtl/rap_carry_gen.sv` | one reconfigurable carry generator, parameterized by its bit position `POS` |
| `rtl/rap_sum_gen.sv` | sum generator, `S = P ^ C` |
| `rtl/rap_cla.sv` | top: one P/G block, WIDTH carry generators and one sum block |

Every carry generator works directly from P, G and `cin`. None waits for
another carry, so the depth is that of a flat CLA. The cost is the usual
one: logic grows with the square of the width.

The design is purely combinational, with no clock, reset or registers. Inputs
to outputs take one combinational delay. A user who needs a pipelined adder
should register the ports outside it.

### Top-level ports (`rap_cla`)

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry-in |
| `mode` | in | SEGMENTS × `rap_mode_e` | working mode; bit 0 controls the least significant carries |
| `sum` | out | WIDTH | sum |
| `cout` | out | 1 | carry-out, C[WIDTH] |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 4 | operand width; 4 is the adder this design follows |
| `WINDOW` | 2 | window size W, the generate terms kept in approximate mode (own choice) |
| `EXACT_MSBS` | 0 | number of most significant carries built as plain exact generators, which ignore the mode |
| `SEGMENTS` | 1 | number of carry groups, each with its own mode bit |

`EXACT_MSBS` and `SEGMENTS` are the two refinements of the basic scheme.
Keeping the top carries exact means the most significant result bits never
lose a carry, which is aimed at the largest errors of approximate mode. Splitting the adder into
segments allows several precision levels instead of two. Carry C[x+1]
belongs to segment `x * SEGMENTS / WIDTH`, so segments are equal groups of
consecutive carries. That grouping is this design's choice. With the defaults
the adder is the plain two-mode version: every carry generator is
reconfigurable and shares one mode signal.

## Choices made in this design

These points are not fixed by the scheme itself:

- window size 2 at the default width of 4;
- mode encoding, approximate = 0;
- `cin` still drives sum bit 0 in approximate mode;
- the grouping of carries into segments;
- no registers, no power-gating model.

The carry equation is the standard look-ahead form, in which the term for
position y is multiplied by P[y+1] through P[x].

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Each has a watchdog that fails the run if it
hangs.

| testbench | what it covers |
|---|---|
| `tb/tb_rap_pg_gen.sv` | all 4-bit operand pairs, P and G of each bit against the arithmetic bit sum |
| `tb/tb_rap_sum_gen.sv` | all 4-bit P/C pairs |
| `tb/tb_rap_carry_gen.sv` | exhaustive over P, G, carry-in and mode for positions 3 (W=2), 0 (W=2), 5 (W=3) and a forced-exact generator, against the ripple recurrence `c = G | P & c` |
| `tb/tb_rap_cla.sv` | the default 4-bit adder end to end: every input combination in approximate mode, then exact mode, then approximate again. Counts mode switches, approximation errors, carries lost to the window and to the carry-in, and carry-outs in both modes, and fails if any never occurs |
| `tb/tb_rap_cla_table1.sv` | the truth table of bit 3 (A3, B3, C3 → P3, G3, S3, C4) on the full adder. In approximate mode with G2 = 0, C4 = G3 |
| `tb/tb_rap_cla_variants.sv` | `EXACT_MSBS=1`, `WINDOW=1`, a 32-bit adder with W=8, and an 8-bit adder with two segments under all mode combinations |

`tb/rap_ref_pkg.sv` holds the reference model. It computes each exact carry
as a bit of an integer sum, and each approximate carry as the carry-out of
the window's sub-addition.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rap_cla_pkg.sv tb/rap_ref_pkg.sv \
    rtl/rap_pg_gen.sv rtl/rap_carry_gen.sv rtl/rap_sum_gen.sv rtl/rap_cla.sv \
    tb/tb_rap_cla.sv --top-module tb_rap_cla
./obj_dir/Vtb_rap_cla
```

Swap in any other testbench file and top module name. All of them finish in
well under a second.

## Limits

- Delay, power and energy savings come from the transistor-level circuit:
  the removed supplementary logic, power gating and NAND-only gates. RTL
  simulation does not show them. Synthesis of this RTL with a standard-cell
  flow gives the logic, but not the header switches.
- Only the carry equations are reconfigurable. A user who wants a different
  error profile, for example error compensation, must add it outside.
