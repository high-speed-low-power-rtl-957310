// peres_gate: 3x3 reversible Peres gate.
//
// Outputs P = A, Q = A xor B, R = (A and B) xor C. With C tied to 0 the R
// output is the AND of A and B, which is how the multiplier forms its
// partial-product bits; Q then gives A xor B at no extra cost. Quantum
// cost 4.
//
// Interface: single-bit inputs a, b, c; outputs p, q, r. Purely
// combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule
