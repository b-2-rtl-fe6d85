// Exhaustive test of the MIN/AND gate: all 16 input pairs against the smaller
// value, and the AND table in the 0,3 and 1,2 mappings.
module tb_dr_min;
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

  q4_t x1, x2, y;
  dr_min dut (.x1(x1), .x2(x2), .y(y));

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        x1 = q4_t'(a); x2 = q4_t'(b); #1;
        check($sformatf("min(%0d,%0d)", a, b), int'(y), (a <= b) ? a : b);
      end
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++) begin
          int lo, hi;
          lo = (m == 0) ? 0 : 1; hi = (m == 0) ? 3 : 2;
          x1 = q4_t'(a ? hi : lo); x2 = q4_t'(b ? hi : lo); #1;
          check("and", int'(y), (a & b) ? hi : lo);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
