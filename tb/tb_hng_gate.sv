// tb_hng_gate: exhaustive check of the HNG gate.
// Applies all sixteen input patterns and compares P, Q, R, S with values
// computed here: P = A, Q = B, R = A xor B xor C, S = D xor carry(A, B, C),
// where the carry is worked out as (A + B + C) >= 2. Also checks that the
// sixteen output patterns are all different.
module tb_hng_gate;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] seen = '0;
    int unsigned total;
    logic er, es;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      er = total[0];
      es = (total >= 2) ? !d : d;
      checks++;
      if ({p, q, r, s} !== {a, b, er, es}) begin
        failures++;
        $display("FAIL in=%b%b%b%b out=%b%b%b%b exp=%b%b%b%b",
                 a, b, c, d, p, q, r, s, a, b, er, es);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
