// tb_ut_mult_4x4: end-to-end test of the reversible 4x4 UT multiplier at its
// default configuration.
//
// 1. The worked examples: binary 101 x 110 = 11110 (5*6 = 30), and 14*12 =
//    168, both within the 4-bit operand range.
// 2. All 256 operand pairs, compared with a*b.
// 3. Internal checks at every pair: each 2x2 cell's product against the
//    operand halves it is wired to, and the three adders against the integer
//    sums of their operands.
// 4. Coverage of the design's mechanisms, each of which must occur at least
//    once: the crosswise carry inside a 2x2 cell (a0a1b0b1 = 1), a carry
//    between stages of adder B, a carry rippling through at least three
//    stages of the final adder, a product with q[7] = 1, and the full
//    product 225. (Adder B's own carry-out cannot occur: qb <= 12.)
// The cost localparams of the multiplier are also checked (38 gates,
// quantum cost 168, 66 garbage outputs, 30 constant inputs).
module tb_ut_mult_4x4;
  int checks = 0, failures = 0;
  int n_cross_carry = 0, n_qb_carry = 0, n_long_ripple = 0, n_top_bit = 0, n_max = 0;

  logic [3:0] a, b;
  logic [7:0] q;

  ut_mult_4x4 dut (.a(a), .b(b), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y);
    a = 4'(x);
    b = 4'(y);
    #1;
    checks++;
    if (q !== 8'(x * y)) begin
      failures++;
      $display("FAIL %0d*%0d = %0d, expected %0d", x, y, q, x * y);
    end
  endtask

  task automatic check_internals(input int x, input int y);
    int xl, xh, yl, yh;
    xl = x % 4; xh = x / 4; yl = y % 4; yh = y / 4;
    checks++;
    if (dut.q0 !== 4'(xl * yl) || dut.q1 !== 4'(xh * yl) ||
        dut.q2 !== 4'(xl * yh) || dut.q3 !== 4'(xh * yh)) begin
      failures++;
      $display("FAIL partial products at %0d*%0d: %0d %0d %0d %0d",
               x, y, dut.q0, dut.q1, dut.q2, dut.q3);
    end
    checks++;
    if (dut.qb !== 5'(int'(dut.q1) + int'(dut.q0[3:2]))) begin
      failures++;
      $display("FAIL adder B at %0d*%0d", x, y);
    end
    checks++;
    if (dut.qa !== 5'(int'(dut.q3) + int'(dut.q2[3:2]))) begin
      failures++;
      $display("FAIL adder A at %0d*%0d", x, y);
    end
    checks++;
    if (dut.qf !== 7'(4 * int'(dut.qa) + int'(dut.q2[1:0]) + int'(dut.qb))) begin
      failures++;
      $display("FAIL final adder at %0d*%0d", x, y);
    end
    if ((xl == 3 && yl == 3) || (xh == 3 && yl == 3) ||
        (xl == 3 && yh == 3) || (xh == 3 && yh == 3)) n_cross_carry++;
    if (|dut.u_rca_b.carry[4:1]) n_qb_carry++;
    if (&dut.u_rca_f.carry[3:1] || &dut.u_rca_f.carry[4:2] ||
        &dut.u_rca_f.carry[5:3]) n_long_ripple++;
    if (q[7]) n_top_bit++;
    if (q == 8'd225) n_max++;
  endtask

  initial begin
    // Worked examples.
    apply('b101, 'b110);
    checks++;
    if (q !== 8'b0001_1110) begin
      failures++;
      $display("FAIL 101 x 110 gave %b", q);
    end
    apply(14, 12);

    // Exhaustive sweep.
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        apply(x, y);
        check_internals(x, y);
      end
    end

    checks++;
    if (dut.COST.gates != 38 || dut.COST.quantum_cost != 168 ||
        dut.COST.garbage != 66 || dut.COST.constants != 30) begin
      failures++;
      $display("FAIL cost %0d/%0d/%0d/%0d", dut.COST.gates, dut.COST.quantum_cost,
               dut.COST.garbage, dut.COST.constants);
    end

    $display("crosswise carries in 2x2 cells: %0d", n_cross_carry);
    $display("adder B internal carries:       %0d", n_qb_carry);
    $display("final adder 3-stage ripples:    %0d", n_long_ripple);
    $display("products with q[7] set:         %0d", n_top_bit);
    $display("maximum products (225):         %0d", n_max);
    checks += 5;
    if (n_cross_carry == 0) begin failures++; $display("FAIL no crosswise carry"); end
    if (n_qb_carry == 0)    begin failures++; $display("FAIL no adder B carry");   end
    if (n_long_ripple == 0) begin failures++; $display("FAIL no long ripple");     end
    if (n_top_bit == 0)     begin failures++; $display("FAIL q[7] never set");     end
    if (n_max == 0)         begin failures++; $display("FAIL 225 never produced"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
