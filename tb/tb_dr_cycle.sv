// Exhaustive test of clockwise cycling (x + r) mod 4.
module tb_dr_cycle;
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

  q4_t x, r, y;
  dr_cycle dut (.x(x), .r(r), .y(y));

  initial begin
    for (int a = 0; a < 4; a++)
      for (int c = 0; c < 4; c++) begin
        x = q4_t'(a); r = q4_t'(c); #1;
        check($sformatf("%0d cyc %0d", a, c), int'(y), (a + c) % 4);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
