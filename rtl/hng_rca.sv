// hng_rca: ripple-carry adder made of a chain of HNG gates.
//
// Bit i is one HNG gate with A = a[i], B = b[i], C = the carry from bit i-1
// (cin for bit 0) and D = 0. Its R output is sum bit i and its S output the
// carry into bit i+1; the last carry is the top bit of s. The P and Q outputs
// of every stage are garbage and are left unused, so a WIDTH-bit adder costs
// WIDTH gates, quantum cost 6*WIDTH, 2*WIDTH garbage outputs and WIDTH
// constant inputs (COST below).
//
// The stage structure and the one-gate-per-bit rule follow the source
// design. The parameter and the explicit cin port are this implementation's:
// the 4x4 multiplier uses WIDTH = 4 and WIDTH = 6 with cin tied to 0.
//
// Interface: a, b (WIDTH bits), cin; s = a + b + cin (WIDTH+1 bits).
// Purely combinational; the carry ripples through WIDTH gates.
module hng_rca
  import rev_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH:0]   s
);

  localparam rev_cost_t COST = hng_rca_cost(WIDTH);

  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] garbage_p, garbage_q;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    hng_gate u_hng (
      .a (a[i]),
      .b (b[i]),
      .c (carry[i]),
      .d (1'b0),
      .p (garbage_p[i]),
      .q (garbage_q[i]),
      .r (s[i]),
      .s (carry[i+1])
    );
  end

  assign s[WIDTH] = carry[WIDTH];

endmodule
