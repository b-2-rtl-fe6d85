// Exhaustive test of the weighted current sum x1 + 2 x2 + 3 x3 (default
// weights) including the largest count, 18.
module tb_dr_linear_sum;
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

  q4_t x1, x2, x3;
  logic [4:0] sum;
  dr_linear_sum dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x1, x2, x3} = 6'(v);
      #1;
      check("sum", int'(sum), int'(x1) + 2 * int'(x2) + 3 * int'(x3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
