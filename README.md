# Reversible 4x4 Urdhva Tiryakbhayam multiplier

This is an unsigned 4-bit × 4-bit multiplier made only of reversible gates
(Feynman, Peres and HNG). It uses the Urdhva Tiryakbhayam ("vertically and
crosswise") method of Vedic arithmetic. The method forms every partial
product at once and then adds the columns. The hardware applies it in two
ways:

* inside a 2×2 cell, where each output bit is one "vertical" or "crosswise"
  product column;
* across the 4×4 operands, which are split into 2-bit halves. Four 2×2 cells
  multiply the halves in parallel, and a small tree of ripple-carry adders
  merges their results.

Reversible gates map inputs to outputs one to one, so no information is
lost inside a gate. Circuits built from them are compared by four figures:

* **quantum cost**: the cost in elementary quantum operations;
* **gate count**;
* **garbage outputs**: outputs that carry no wanted result;
* **constant inputs**: inputs tied to 0 or 1.

The RTL models the logic function of such a circuit gate by gate. It keeps
the gate structure visible and reports the cost figures as elaboration-time
constants. It synthesizes to ordinary CMOS logic like any other
SystemVerilog. No claim about power is made or tested.

All modules are purely combinational. There is no clock, reset or handshake.

## Gate library

| module | lines | function | quantum cost |
|---|---|---|---|
| `feynman_gate` | 2×2 | P = A, Q = A⊕B (CNOT) | 1 |
| `peres_gate` | 3×3 | P = A, Q = A⊕B, R = AB⊕C | 4 |
| `hng_gate` | 4×4 | P = A, Q = B, R = A⊕B⊕C, S = (A⊕B)C ⊕ AB ⊕ D | 6 |

Two gate uses matter in this design:

* A Peres gate with C = 0 is an AND gate on R. This is how partial-product
  bits are formed.
* An HNG gate with D = 0 is a full adder: R is the sum and S the carry. One
  HNG gate per bit is enough for a ripple-carry adder.

The Fredkin gate, a controlled swap, is often listed with these gates. This
design does not use it, and no model of it is included.

`rev_pkg` holds the per-gate quantum costs and a `rev_cost_t` struct with
four fields: gates, quantum cost, garbage and constants. Each multiplier
module adds up its own cost in a `COST` localparam.

## The 2×2 cell (`ut_mult_2x2`)

For a = a1a0 and b = b1b0, the product columns are:

```
q0 = a0·b0                       vertical, right
q1 = a1·b0 ⊕ a0·b1               crosswise
q2 = a1·b1 ⊕ a0·a1·b0·b1         vertical, left, plus the crosswise carry
q3 = a0·a1·b0·b1                 carry out of q2
```

The crosswise column can only carry when both cross terms are 1. That
happens only when all four bits are 1, so the carry is the four-input AND.

The cell uses five Peres gates and one Feynman gate:

```
P1 = Peres(a0, b0, 0)          R = a0b0
P2 = Peres(a1, b1, 0)          R = a1b1  ──┬─────────────┐
P3 = Peres(a0b0, a1b1, 0)      P = q0,  R = a0a1b0b1 ──┐ │
F  = CNOT(a0a1b0b1, a1b1)      P = q3,  Q = q2  <──────┘─┘
P4 = Peres(a1, b0, 0)          R = a1b0
P5 = Peres(a0, b1, a1b0)       R = q1
```

Cost: 6 gates, quantum cost 5·4 + 1 = 21, 9 garbage outputs, 4 constant
inputs.

The a1b1 line and the operand bits each feed two gates over plain wires.
Strictly reversible hardware would copy them with extra Feynman gates. That
overhead is left out here, as in the usual cost figures for this cell.

## HNG ripple-carry adder (`hng_rca`)

`hng_rca #(WIDTH)` chains WIDTH HNG gates. Bit i has these connections:

* inputs: A = a[i], B = b[i], C = the carry from bit i−1 (or `cin` for bit 0)
  and D = 0;
* outputs: R gives s[i], and S carries into bit i+1;
* the last carry is s[WIDTH].

The P and Q outputs of every stage are garbage. A WIDTH-bit adder costs:

* WIDTH gates;
* quantum cost 6·WIDTH;
* 2·WIDTH garbage outputs;
* WIDTH constant inputs.

The constant `cin` line is not counted as a constant input.

The carry ripples through all WIDTH gates, so the delay grows linearly with
WIDTH.

## Assembling the 4×4 product (`ut_mult_4x4`)

This is the part that needs care. Splitting a = {aH, aL} and b = {bH, bL}
gives:

```
q0 = aL·bL   (weight 1)      q1 = aH·bL   (weight 4)
q2 = aL·bH   (weight 4)      q3 = aH·bH   (weight 16)

a·b = q0 + 4·(q1 + q2) + 16·q3
```

Each qi is at most 9 (3·3). The product bits are built as follows:

```
q[1:0]  = q0[1:0]                                   no adder
adder B = hng_rca #(4):  qb = q1 + {00, q0[3:2]}    qb ≤ 12, weight 4
adder A = hng_rca #(4):  qa = q3 + {00, q2[3:2]}    qa ≤ 11, weight 16
adder F = hng_rca #(6):  q[7:2] = {qa[3:0], q2[1:0]} + {0, qb}
```

In adder A, q2 is aligned the same way q0 is aligned in adder B:

* its upper two bits enter adder A, which has weight 16;
* its lower two bits bypass adder A and enter the final adder at weight 4.

The final sum is at most 56, so adder F's carry-out is always 0. qa[4] is
also always 0. Both are left unused.

### Where this differs from the common description of this multiplier

The usual block diagram for this design adds the same q1/q0 pair in its
first 4-bit adder, as here. The difference is the second adder:

* It feeds q2 and q3 at equal weight into the second 4-bit adder.
* It then sums the two 5-bit results in a 5-bit adder to form q[7:2].

That wiring ignores the factor of four between q2 and q3. It gives wrong
products, for example 15 × 15 → 117. No wiring of two 4-bit adders and one
5-bit adder can be correct. The final addition needs a 6-bit operand,
because 4·q3 + q2 alone can reach 45. So this design keeps the cell
placement and the first adder, aligns q2 correctly, and uses 6 stages in the
final adder instead of 5.

Cost of this configuration (`ut_mult_4x4.COST`):

| | this design | published 4/4/5 arrangement |
|---|---|---|
| gates | 38 | 37 |
| quantum cost | 168 | 162 |
| garbage outputs | 66 | 62 |
| constant inputs | 30 | 29 |

The garbage count here includes the two carry lines that are always 0. The
constant count includes one D input per HNG stage but not the `cin` lines.

### Timing

The critical path has three parts:

* three gate levels in a 2×2 cell;
* up to four HNG stages in adder A;
* six HNG stages in adder F.

There are no registers. A pipelined or clocked wrapper is left to the user.

## Files

* `rtl/rev_pkg.sv`: gate costs and the cost struct.
* `rtl/feynman_gate.sv`, `rtl/peres_gate.sv`, `rtl/hng_gate.sv`: the gates.
* `rtl/hng_rca.sv`: the parameterised HNG ripple-carry adder.
* `rtl/ut_mult_2x2.sv`: the 2×2 cell.
* `rtl/ut_mult_4x4.sv`: the top.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each one
  ends by printing `TB_RESULT checks=N failures=M`.

## Verification

* **Gates:** every input pattern is checked against the gate equations. The
  test also checks that the outputs form a permutation of the inputs, which
  is the reversibility property. The Feynman gate is also checked to be its
  own inverse.
* **`tb_hng_rca`:** WIDTH = 4, 5 and 6, with every a, b and cin. It requires
  at least one carry that ripples through all stages.
* **`tb_ut_mult_2x2`:** all 16 operand pairs, checked against a·b and against
  the column equations. It also checks the cost constants (6/21/9/4).
* **`tb_ut_mult_4x4`:**
  * the worked examples 101₂ × 110₂ = 11110₂ and 14 × 12 = 168;
  * all 256 operand pairs;
  * internal checks on every 2×2 cell and every adder;
  * the cost constants;
  * coverage counters that must all be non-zero: a crosswise carry inside a
    cell, carries inside adder B, a carry rippling through three stages of
    adder F, q[7] = 1, and the maximum product 225.

  This test runs the top with its default configuration.

To run a test with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/rev_pkg.sv tb/tb_ut_mult_4x4.sv \
          --top-module tb_ut_mult_4x4 -Mdir obj
./obj/Vtb_ut_mult_4x4
```

Lint with `verilator --lint-only -Wall -Wno-fatal -y rtl rtl/rev_pkg.sv rtl/ut_mult_4x4.sv`.
The only warnings are for unused garbage outputs and for the `COST`
constants, which are informational.

## Changing it

* The operand width is fixed at 4 bits. An 8×8 version would follow the same
  pattern: four `ut_mult_4x4` instances, with the same alignment rules and
  wider `hng_rca` instances. No such module is included.
* `hng_rca` works at any WIDTH ≥ 1. Its `cin` port makes it usable as a
  general adder. The multiplier ties `cin` to 0.
* If you change the adder arrangement in `ut_mult_4x4`, update its `COST`
  expression. `tb_ut_mult_4x4` checks the exact figures.
