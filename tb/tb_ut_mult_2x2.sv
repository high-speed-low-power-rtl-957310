// tb_ut_mult_2x2: exhaustive check of the reversible 2x2 UT multiplier.
// For all sixteen operand pairs the product is compared with a*b, and each
// output bit with the column equations of the Urdhva Tiryakbhayam method
// (q0 = a0b0, q1 = a1b0 xor a0b1, q2 = a0a1b0b1 xor a1b1, q3 = a0a1b0b1).
// The cell's cost localparams are compared with the published figures:
// 6 gates, quantum cost 21, 9 garbage outputs, 4 constant inputs.
module tb_ut_mult_2x2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] q;

  ut_mult_2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] eq;
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        a = 2'(x);
        b = 2'(y);
        #1;
        checks++;
        if (q !== 4'(x * y)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", x, y, q);
        end
        eq[0] = a[0] & b[0];
        eq[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
        eq[3] = a[0] & a[1] & b[0] & b[1];
        eq[2] = eq[3] ^ (a[1] & b[1]);
        checks++;
        if (q !== eq) begin
          failures++;
          $display("FAIL column equations %0d*%0d: %b exp %b", x, y, q, eq);
        end
      end
    end
    checks++;
    if (dut.COST.gates != 6 || dut.COST.quantum_cost != 21 ||
        dut.COST.garbage != 9 || dut.COST.constants != 4) begin
      failures++;
      $display("FAIL cost %0d/%0d/%0d/%0d", dut.COST.gates, dut.COST.quantum_cost,
               dut.COST.garbage, dut.COST.constants);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
