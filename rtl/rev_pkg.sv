// rev_pkg: cost figures of the reversible gate library.
//
// Reversible circuits are compared by quantum cost (the cost of a gate in
// elementary quantum operations), gate count, garbage outputs (outputs that
// carry no wanted result) and constant inputs. The per-gate figures below are
// the commonly used values for the Feynman (CNOT), Peres and HNG gates. The
// multiplier modules add them up in localparams so that the cost of a
// configuration is visible at elaboration time and can be checked by a test.
package rev_pkg;

  // Quantum cost of one gate.
  localparam int unsigned QC_FEYNMAN = 1;
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_HNG     = 6;

  // Cost summary of a reversible circuit.
  typedef struct packed {
    int unsigned gates;
    int unsigned quantum_cost;
    int unsigned garbage;
    int unsigned constants;
  } rev_cost_t;

  // Cost of an N-stage HNG ripple-carry adder: one HNG per bit, each with a
  // constant 0 on its D input and two garbage outputs (the pass-through A
  // and B). The carry-in line is not counted as a constant.
  function automatic rev_cost_t hng_rca_cost(int unsigned width);
    rev_cost_t c;
    c.gates        = width;
    c.quantum_cost = width * QC_HNG;
    c.garbage      = 2 * width;
    c.constants    = width;
    return c;
  endfunction

endpackage
