// tb_feynman_gate: exhaustive check of the Feynman (CNOT) gate.
// Applies all four input patterns, compares P and Q with A and A xor B, and
// checks that the gate is reversible: the four output patterns are all
// different and applying the gate twice returns the input.
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q, p2, q2;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [3:0] seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL in=%b%b out=%b%b", a, b, p, q);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL not self-inverse for in=%b%b", a, b);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'b1111) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
