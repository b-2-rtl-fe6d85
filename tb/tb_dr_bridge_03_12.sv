// Exhaustive test of the 0,3 -> 1,2 bridge.
module tb_dr_bridge_03_12;
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

  q4_t x, y;
  dr_bridge_03_12 dut (.*);
  int exp_y [4] = '{1, 1, 2, 2};
  initial begin
    for (int a = 0; a < 4; a++) begin
      x = q4_t'(a); #1; check($sformatf("br(%0d)", a), int'(y), exp_y[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
