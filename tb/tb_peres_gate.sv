// tb_peres_gate: exhaustive check of the Peres gate.
// Applies all eight input patterns, compares P, Q, R with A, A xor B and
// (A and B) xor C computed here, and checks that the eight output patterns
// are all different (the gate is a permutation of its inputs).
module tb_peres_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [7:0] seen = '0;
    logic ep, eq, er;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq = (a && !b) || (!a && b);
      er = (a && b) ? !c : c;
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL in=%b%b%b out=%b%b%b exp=%b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
