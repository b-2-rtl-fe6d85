// Exhaustive test of the unary inverter x^k (k when x = 0, else 0) and of the
// gated binary inverter with k = 3.
module tb_dr_unary_inv;
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

  q4_t x, k, y;
  dr_unary_inv dut (.x(x), .k(k), .y(y));

  initial begin
    for (int a = 0; a < 4; a++)
      for (int c = 0; c < 4; c++) begin
        x = q4_t'(a); k = q4_t'(c); #1;
        check($sformatf("%0d^%0d", a, c), int'(y), (a == 0) ? c : 0);
      end
    k = 3; x = 0; #1; check("binary not 0", int'(y), 3);
    k = 3; x = 3; #1; check("binary not 1", int'(y), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
