# A 4-bit magnitude comparator in reversible logic

A reversible circuit maps its input lines one-to-one onto its output lines. No
information is erased, so in principle no Landauer energy (kT ln 2 per lost bit)
has to be dissipated. The price is that every gate must be invertible. Fan-out
and feedback are not allowed. Extra *constant* input lines have to be supplied.
Every line still has to come out somewhere, so there are also *garbage* outputs
that carry nothing useful.

This RTL builds a 4-bit unsigned magnitude comparator (outputs A=B, A>B, A<B)
out of four reversible gate types: NOT, the N-bit controlled NOT, the TR gate and
the BJN gate. Beside it sits the ordinary irreversible comparator that it is
derived from. Everything is combinational: no clock, no registers and no latency
in cycles. The modules describe the Boolean function of the gates. They say
nothing about a physical quantum or low-power technology.

## The comparator equations

With `x_i = A_i B_i + A_i' B_i'` (bit i equal):

```
A=B = x3 x2 x1 x0
A>B = A3 B3' + x3 A2 B2' + x3 x2 A1 B1' + x3 x2 x1 A0 B0'
A<B = (A=B + A>B)'
```

A<B is derived from the other two outputs instead of from its own
sum of products. Both the classical and the reversible circuit do it this way.

## The gates

| module   | lines | function                                   |
|----------|-------|--------------------------------------------|
| `rev_not`| 1     | `A'`                                       |
| `rev_mct`| N+1   | controls pass; target `t xor (c1 c2 ... cN)` |
| `rev_tr` | 3     | `P=A, Q=A xor B, R=A B' xor C`             |
| `rev_bjn`| 3     | `P=A, Q=B, R=(A+B) xor C`                  |

Each of them is its own inverse or a bijection on its lines. Each testbench checks
that the full truth table is one-to-one. In the literature these gates are counted
with quantum costs of 0 (NOT), 4 (TR, using a V/V+ realisation), 5 (BJN) and n-1
(N-bit controlled NOT). The V/V+ realisations are quantum circuits with no Boolean
intermediate values, so they are not modelled.

## The reversible cascade (`rev_comparator`)

This is the part to understand before changing anything. The circuit is a
sequence of gate steps acting on a vector of `3*WIDTH+2` lines (14 for 4 bits).
Every step replaces only the lines its gate touches. Control lines leave a gate
unchanged and go on to the next step, and no wire ever feeds two gate inputs.

1. **Bit cells** (`rev_bit_cell`, one per bit): a TR gate on `(A_i, B_i, 0)`
   followed by a NOT on its Q output. Line `b_i` then holds `x_i` and line `r_i`
   holds `A_i B_i'`.
2. **Equality**: one 4-control NOT gate with controls `x3 x2 x1 x0` and a
   constant-0 target. The target line becomes A=B.
3. **Greater terms**: line `r3` already holds `A3 B3'`. Three controlled NOT gates
   target it:
   - controls `x3, r2` add `x3 A2 B2'`;
   - controls `x3, x2, r1` add `x3 x2 A1 B1'`;
   - controls `x3, x2, x1, r0` add `x3 x2 x1 A0 B0'`.

   A controlled NOT computes XOR, not OR. That is enough here because the terms
   exclude each other: a term needs all higher bits equal and its own bit
   different, so at most one is 1. `r3` ends as A>B.
4. **BJN gate** on `(A=B, A>B, 1)`: R = `(A=B + A>B) xor 1` = A<B. P and Q pass
   A=B and A>B through.

Line numbering (see `comparator_pkg`), with W = `WIDTH`:

| lines          | input        | output                          |
|----------------|--------------|---------------------------------|
| `0 .. W-1`     | A_i          | A_i (garbage)                   |
| `W .. 2W-1`    | B_i          | x_i (garbage)                   |
| `2W .. 3W-2`   | constant 0   | A_i B_i' (garbage)              |
| `3W-1`         | constant 0   | **A>B**                         |
| `3W`           | constant 0   | **A=B**                         |
| `3W+1`         | constant 1   | **A<B**                         |

For 4 bits the cascade has 14 lines, 6 constant inputs, 11 garbage outputs and
13 gates: 4 TR, 4 NOT, controlled NOTs with 4, 2, 3 and 4 controls, and 1 BJN.
With the usual costs (TR 4, NOT 0, BJN 5, one per control for a controlled NOT),
its quantum cost is 16 + 0 + 13 + 5 = 34.

### Where this departs from the published comparator

The gate types, the bit cell, the equations, the single gate that forms A=B from
all x_i, and the final BJN stage come from the published design. The controls and
targets of the A>B gates are this design's own, written directly from the A>B
equation, because the published drawing does not fix them clearly. The published
circuit is reported with 18 gates, 10 constant inputs, 15 garbage outputs and a
quantum cost of 38. This arrangement is smaller and computes the same three
outputs, but it is not a gate-for-gate copy of that circuit. The line numbering
and the `WIDTH` generalisation (any `WIDTH >= 2`, default 4) are also this
design's own.

## The classical comparator (`classical_comparator`)

This is the irreversible reference: one XNOR per bit, an AND for A=B, an AND-OR
for A>B and a NOR of those two for A<B. It is built from the same equations and
is parameterised by `WIDTH` like the reversible one.

## Top level (`comparator_top`)

The two comparators stand side by side with separate ports. The top does not
connect them.

| port          | dir | width       | meaning                                        |
|---------------|-----|-------------|------------------------------------------------|
| `rev_a`, `rev_b` | in | WIDTH     | operands of the reversible comparator          |
| `rev_res`     | out | 3           | `cmp_result_t {eq, gt, lt}`                    |
| `rev_garbage` | out | 3*WIDTH-1   | the garbage lines, low lines first             |
| `cls_a`, `cls_b` | in | WIDTH     | operands of the classical comparator           |
| `cls_res`     | out | 3           | `cmp_result_t {eq, gt, lt}`                    |

The top ties the constant lines: 1 on the BJN line and 0 on all the others.
`rev_garbage` is brought out so that the number of lines in equals the number out.
Its low `WIDTH` bits are copies of `rev_a`. This is expected, because a reversible
gate passes its control operands through.

## Files

- `rtl/comparator_pkg.sv`: `cmp_result_t` and the line-numbering functions.
- `rtl/rev_not.sv`, `rtl/rev_mct.sv`, `rtl/rev_tr.sv`, `rtl/rev_bjn.sv`: the gates.
- `rtl/rev_bit_cell.sv`, `rtl/rev_comparator.sv`: the reversible comparator.
- `rtl/classical_comparator.sv`, `rtl/comparator_top.sv`.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops with a watchdog
if it hangs. Expected values are computed in the testbench: integer comparison
for results, and the gate formulas for every line.

- Gates and bit cell: full truth tables, plus a one-to-one check over all inputs.
  The controlled NOT is tested with 1 to 4 controls, and two default gates in
  series must restore the input.
- `tb_rev_comparator`: at 4 bits, all 2^14 line vectors, with every output vector
  required to occur exactly once (the cascade is reversible whatever the constant
  lines hold). Then, at 4 and 5 bits, all operand pairs with working constants,
  checking the three results and every garbage line.
- `tb_comparator_top`: all 256 operand pairs at the default size on both
  comparators. It counts each outcome, and for A>B and A<B the bit at which the
  comparison was decided (which product term fired). Every case must occur.

Each testbench was also run against a copy of its module with one deliberate
error, and it reported failures there.

Running one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
  rtl/comparator_pkg.sv tb/tb_comparator_top.sv --top-module tb_comparator_top
./obj_dir/Vtb_comparator_top
```

## Changing it

- Width: set `WIDTH` on `comparator_top` or `rev_comparator` (at least 2). The
  cascade, line numbering and garbage width follow automatically.
- Gate arrangement: the steps are the `g_cell` generate loop, the `u_eq` gate,
  the `g_greater` generate loop and the final BJN instance in `rev_comparator`.
  Each step takes the previous line vector and replaces only the lines its gate
  touches.
  If you add a gate, chain it in the same way so that no line fans out.
