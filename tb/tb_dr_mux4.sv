// Exhaustive-select test of the four-valued 4:1 multiplexer with enable.
module tb_dr_mux4;
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

  q4_t d [4];
  q4_t s, e, y;
  dr_mux4 dut (.*);
  initial begin
    process::self().srandom(32'd1981);  // fixed seed: repeatable stimulus
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 4; i++) d[i] = q4_t'($urandom);
      s = q4_t'($urandom); e = q4_t'($urandom); #1;
      check("y", int'(y), (e != 0) ? int'(d[s]) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
