// ut_mult_4x4: reversible 4x4-bit Urdhva Tiryakbhayam multiplier (top).
//
// The operands are split into 2-bit halves and four ut_mult_2x2 cells form
// the partial products
//   q0 = a[1:0]*b[1:0] (weight 1),  q1 = a[3:2]*b[1:0] (weight 4),
//   q2 = a[1:0]*b[3:2] (weight 4),  q3 = a[3:2]*b[3:2] (weight 16),
// all in parallel. The product is a*b = q0 + 4*(q1 + q2) + 16*q3:
//   q[1:0] = q0[1:0] directly;
//   adder B (4-bit HNG RCA): qb = q1 + {00, q0[3:2]}        (<= 12)
//   adder A (4-bit HNG RCA): qa = q3 + {00, q2[3:2]}        (<= 11)
//   adder F (6-bit HNG RCA): q[7:2] = {qa[3:0], q2[1:0]} + {0, qb}
// Adder B is as in the source design. There, adder A adds q3 and q2 at the
// same weight and the final adder is 5 bits wide, which does not give the
// product. Here q2 is aligned as q0 is in adder B: its upper bits enter
// adder A and its lower bits bypass it. The final adder therefore needs 6
// stages. qa[4] and the final carry are always 0 for 4-bit operands and are
// left unused (two more garbage outputs). The cost of this configuration is
// in COST: 38 gates, quantum cost 168, 66 garbage outputs, 30 constant
// inputs (the source design's 4/4/5 adders would give 37, 162, 62, 29).
//
// Carry-ins are tied to 0. Operand bits fan out by wires; no copy gates are
// added.
//
// Interface: a, b (4 bits, unsigned); q = a*b (8 bits). Purely
// combinational: one 2x2 cell (3 gate levels), a 4-stage ripple, and a
// 6-stage ripple.
module ut_mult_4x4
  import rev_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);

  localparam int unsigned RCA_LO_WIDTH = 4;
  localparam int unsigned RCA_HI_WIDTH = 6;

  localparam rev_cost_t RCA_LO_COST = hng_rca_cost(RCA_LO_WIDTH);
  localparam rev_cost_t RCA_HI_COST = hng_rca_cost(RCA_HI_WIDTH);
  localparam rev_cost_t COST = '{
    gates:        4 * 6  + 2 * RCA_LO_COST.gates        + RCA_HI_COST.gates,
    quantum_cost: 4 * 21 + 2 * RCA_LO_COST.quantum_cost + RCA_HI_COST.quantum_cost,
    garbage:      4 * 9  + 2 * RCA_LO_COST.garbage      + RCA_HI_COST.garbage + 2,
    constants:    4 * 4  + 2 * RCA_LO_COST.constants    + RCA_HI_COST.constants
  };

  logic [3:0] q0, q1, q2, q3;
  logic [RCA_LO_WIDTH:0] qa, qb;
  logic [RCA_HI_WIDTH:0] qf;

  ut_mult_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(q0));
  ut_mult_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(q1));
  ut_mult_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(q2));
  ut_mult_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(q3));

  hng_rca #(.WIDTH(RCA_LO_WIDTH)) u_rca_b (
    .a   (q1),
    .b   ({2'b00, q0[3:2]}),
    .cin (1'b0),
    .s   (qb)
  );

  hng_rca #(.WIDTH(RCA_LO_WIDTH)) u_rca_a (
    .a   (q3),
    .b   ({2'b00, q2[3:2]}),
    .cin (1'b0),
    .s   (qa)
  );

  hng_rca #(.WIDTH(RCA_HI_WIDTH)) u_rca_f (
    .a   ({qa[3:0], q2[1:0]}),
    .b   ({1'b0, qb}),
    .cin (1'b0),
    .s   (qf)
  );

  assign q[1:0] = q0[1:0];
  assign q[7:2] = qf[5:0];

endmodule
