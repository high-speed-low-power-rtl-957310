// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// P passes the control input A through, Q is the target B inverted when A is
// 1 (Q = A xor B). With B = 0 it copies A, which is how reversible circuits
// make a fan-out. Quantum cost 1. The mapping is bijective: applying the gate
// twice returns the inputs.
//
// Interface: single-bit inputs a, b; outputs p, q. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
