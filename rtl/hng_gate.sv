// hng_gate: 4x4 reversible HNG gate.
//
// Outputs P = A, Q = B, R = A xor B xor C, S = ((A xor B) and C) xor (A and B)
// xor D. With D tied to 0, R is the full-adder sum of A, B, C and S is the
// full-adder carry, so one gate makes one bit of a ripple-carry adder, leaving
// P and Q as the two garbage outputs. Quantum cost 6.
//
// Interface: single-bit inputs a, b, c, d; outputs p, q, r, s. Purely
// combinational.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ (a & b) ^ d;
  end

endmodule
