// Exhaustive test of the literal a_x_b over every x and every bound pair
// (the ten legal columns with a <= b plus the empty a > b cases).
module tb_dr_literal;
  import dr_pkg::*;
  int checks = 0;
  int failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q4_t x, a, b, y;
  dr_literal dut (.x(x), .a(a), .b(b), .y(y));

  initial begin
    for (int xi = 0; xi < 4; xi++)
      for (int ai = 0; ai < 4; ai++)
        for (int bi = 0; bi < 4; bi++) begin
          x = q4_t'(xi); a = q4_t'(ai); b = q4_t'(bi); #1;
          check($sformatf("%0d_x%0d_%0d", ai, xi, bi), int'(y),
                (ai <= xi && xi <= bi) ? 3 : 0);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
