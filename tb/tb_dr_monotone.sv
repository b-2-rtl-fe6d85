// Exhaustive test of the monotone operator D_i(x) and its complement, P(4)
// mode against Table-style reference, binary mode forcing i = 3.
module tb_dr_monotone;
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

  q4_t bs, i_in, x, d, d_n;
  dr_monotone dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      int ie;
      {bs, i_in, x} = 6'(v);
      #1;
      ie = (bs >= 2) ? 3 : int'(i_in);
      check("d",  int'(d),   (int'(x) >= ie) ? 3 : 0);
      check("dn", int'(d_n), (int'(x) >= ie) ? 0 : 3);
    end
    bs = 3; i_in = 1; x = 0; #1; check("bin buf 0", int'(d), 0);
    x = 3; #1; check("bin buf 1", int'(d), 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
