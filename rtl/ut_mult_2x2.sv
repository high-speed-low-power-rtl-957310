// ut_mult_2x2: reversible 2x2-bit Urdhva Tiryakbhayam multiplier cell.
//
// Urdhva Tiryakbhayam ("vertically and crosswise") forms each product column
// at once: q0 = a0.b0 (vertical), q1 = a1.b0 xor a0.b1 (crosswise), and the
// high column from a1.b1 together with the carry out of the cross column,
// which for 2-bit operands is the four-input AND a0.a1.b0.b1:
//   q2 = a0.a1.b0.b1 xor a1.b1,   q3 = a0.a1.b0.b1.
// The cell realises this with five Peres gates and one Feynman (CNOT) gate,
// wired as in the source design:
//   P1 = Peres(a0, b0, 0)         R -> a0.b0
//   P2 = Peres(a1, b1, 0)         R -> a1.b1
//   P3 = Peres(a0.b0, a1.b1, 0)   P -> q0, R -> a0.a1.b0.b1
//   F  = CNOT(a0.a1.b0.b1, a1.b1) P -> q3, Q -> q2
//   P4 = Peres(a1, b0, 0)         R -> a1.b0
//   P5 = Peres(a0, b1, a1.b0)     R -> q1
// The a1.b1 line and the operand bits fan out by wires, as in the source
// design, which does not add copy gates for fan-out. Cost: 6 gates, quantum
// cost 21, 9 garbage outputs, 4 constant inputs (localparams below).
//
// Interface: a, b (2 bits, unsigned); q = a*b (4 bits). Purely
// combinational, depth three gates (P1/P2 -> P3 -> F).
module ut_mult_2x2
  import rev_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  localparam rev_cost_t COST = '{
    gates:        6,
    quantum_cost: 5 * QC_PERES + QC_FEYNMAN,
    garbage:      9,
    constants:    4
  };

  logic a0b0, a1b1, a1b0, all4;
  // Garbage outputs, numbered as counted: 2 each from P1, P2, P4, P5 and the
  // Q output of P3.
  logic [8:0] garbage;

  peres_gate u_p1 (.a(a[0]), .b(b[0]), .c(1'b0),
                   .p(garbage[0]), .q(garbage[1]), .r(a0b0));
  peres_gate u_p2 (.a(a[1]), .b(b[1]), .c(1'b0),
                   .p(garbage[2]), .q(garbage[3]), .r(a1b1));
  peres_gate u_p3 (.a(a0b0), .b(a1b1), .c(1'b0),
                   .p(q[0]), .q(garbage[4]), .r(all4));
  feynman_gate u_f (.a(all4), .b(a1b1), .p(q[3]), .q(q[2]));
  peres_gate u_p4 (.a(a[1]), .b(b[0]), .c(1'b0),
                   .p(garbage[5]), .q(garbage[6]), .r(a1b0));
  peres_gate u_p5 (.a(a[0]), .b(b[1]), .c(a1b0),
                   .p(garbage[7]), .q(garbage[8]), .r(q[1]));

endmodule
