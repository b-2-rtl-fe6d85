// Exhaustive test of the complement gate against y = 3 - x, including the
// swap of the binary levels in the 0,3 and 1,2 mappings.
module tb_dr_complement;
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
  dr_complement dut (.x(x), .y(y));

  initial begin
    for (int i = 0; i < 4; i++) begin
      x = q4_t'(i); #1;
      check($sformatf("comp(%0d)", i), int'(y), 3 - i);
    end
    // binary mappings: 0<->3 and 1<->2
    x = 0; #1; check("map03 0", int'(y), 3);
    x = 2; #1; check("map12 1", int'(y), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
