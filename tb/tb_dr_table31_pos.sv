// Exhaustive test of the canonical product-of-sums realization of the example
// function: all 16 P(4) input pairs against its truth table with the binary-
// select line at 0, then the four binary input pairs with it at 3, where the
// circuit must give NOR(x1, x2) in the 0,3 mapping. Also checks that the
// circuit agrees with the weighted-literal realization of the same function.
// Combinational; 1 time unit per vector.
module tb_dr_table31_pos;
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

  q4_t bs, x1, x2, f, f_lit;
  dr_table31_pos dut (.*);
  dr_table31_fn  u_lit (.x1(x1), .x2(x2), .f(f_lit));
  int tbl [4][4] = '{'{2, 2, 2, 3}, '{1, 2, 3, 0}, '{1, 0, 0, 0}, '{2, 1, 1, 0}};

  initial begin
    bs = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        x1 = q4_t'(a); x2 = q4_t'(b); #1;
        check($sformatf("f(%0d,%0d)", a, b), int'(f), tbl[a][b]);
        check($sformatf("f(%0d,%0d) vs literal form", a, b), int'(f), int'(f_lit));
      end
    bs = 3;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        x1 = a ? 3 : 0; x2 = b ? 3 : 0; #1;
        check($sformatf("binary NOR(%0d,%0d)", a, b), int'(f), (a | b) ? 0 : 3);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
