// Exhaustive test of the literal select control (Bs, Fs, a, b).
module tb_dr_literal_select;
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

  q4_t bs, fs, a_in, b_in, a, b;
  dr_literal_select dut (.*);

  initial begin
    for (int v = 0; v < 256; v++) begin
      {bs, fs, a_in, b_in} = 8'(v);
      #1;
      if (bs >= 2) begin
        check("a bin", int'(a), (fs >= 2) ? 3 : 0);
        check("b bin", int'(b), (fs >= 2) ? 3 : 0);
      end else begin
        check("a p4", int'(a), int'(a_in));
        check("b p4", int'(b), int'(b_in));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
