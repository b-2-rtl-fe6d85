// Exhaustive test of the example function against its 4 x 4 truth table.
module tb_dr_table31_fn;
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

  q4_t x1, x2, f;
  dr_table31_fn dut (.*);
  // rows x1 = 0..3, columns x2 = 0..3
  int tbl [4][4] = '{'{2, 2, 2, 3}, '{1, 2, 3, 0}, '{1, 0, 0, 0}, '{2, 1, 1, 0}};

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        x1 = q4_t'(a); x2 = q4_t'(b); #1;
        check($sformatf("f(%0d,%0d)", a, b), int'(f), tbl[a][b]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
