// Exhaustive test of the disjoint operator C_i(x).
module tb_dr_disjoint;
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

  q4_t bs, i_in, x, c;
  dr_disjoint dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      int ie;
      {bs, i_in, x} = 6'(v);
      #1;
      ie = (bs >= 2) ? 3 : int'(i_in);
      check("c", int'(c), (int'(x) == ie) ? 3 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
