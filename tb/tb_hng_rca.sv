// tb_hng_rca: exhaustive check of the HNG ripple-carry adder.
// Three instances are checked: WIDTH = 4 (the multiplier's partial-product
// adders), WIDTH = 5 (the final-adder width of the source design) and
// WIDTH = 6 (the final adder of this multiplier). Every a, b and cin is
// applied and s is compared with the integer sum. The test also counts how
// often a carry rippled through every stage (a + b = all ones with cin = 1),
// and fails if that never happened.
module tb_hng_rca;
  int checks = 0, failures = 0;
  int full_ripples = 0;

  logic [3:0] a4, b4;
  logic [4:0] a5, b5;
  logic [5:0] a6, b6;
  logic       cin;
  logic [4:0] s4;
  logic [5:0] s5;
  logic [6:0] s6;

  hng_rca #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(cin), .s(s4));
  hng_rca #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(cin), .s(s5));
  hng_rca #(.WIDTH(6)) dut6 (.a(a6), .b(b6), .cin(cin), .s(s6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    a4 = '0; b4 = '0; a5 = '0; b5 = '0;
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        for (int c = 0; c < 2; c++) begin
          a6  = 6'(x);
          b6  = 6'(y);
          cin = 1'(c);
          if (x < 32 && y < 32) begin
            a5 = 5'(x);
            b5 = 5'(y);
          end
          if (x < 16 && y < 16) begin
            a4 = 4'(x);
            b4 = 4'(y);
          end
          #1;
          exp = x + y + c;
          checks++;
          if (s6 !== 7'(exp)) begin
            failures++;
            $display("FAIL W6 %0d+%0d+%0d = %0d", x, y, c, s6);
          end
          if (x < 32 && y < 32) begin
            checks++;
            if (s5 !== 6'(exp)) begin
              failures++;
              $display("FAIL W5 %0d+%0d+%0d = %0d", x, y, c, s5);
            end
          end
          if (x < 16 && y < 16) begin
            checks++;
            if (s4 !== 5'(exp)) begin
              failures++;
              $display("FAIL W4 %0d+%0d+%0d = %0d", x, y, c, s4);
            end
            if (c == 1 && x + y == 15) full_ripples++;
          end
        end
      end
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple exercised");
    end
    $display("full-length ripples (4-bit): %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
