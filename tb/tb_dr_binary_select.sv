// Exhaustive test of the binary-select control: Bs = 0 passes k and the r
// lines, Bs = 3 forces k = 3 and r = 0; three r lines are served.
module tb_dr_binary_select;
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

  q4_t bs, k_in, k;
  q4_t r_in [3];
  q4_t r    [3];
  dr_binary_select #(.NR(3)) dut (.bs(bs), .k_in(k_in), .r_in(r_in), .k(k), .r(r));

  initial begin
    for (int m = 0; m < 4; m++)
      for (int kk = 0; kk < 4; kk++)
        for (int rr = 0; rr < 4; rr++) begin
          bs = q4_t'(m); k_in = q4_t'(kk);
          r_in[0] = q4_t'(rr); r_in[1] = q4_t'(3 - rr); r_in[2] = q4_t'(rr ^ 1);
          #1;
          check("k", int'(k), (m >= 2) ? 3 : kk);
          check("r0", int'(r[0]), (m >= 2) ? 0 : rr);
          check("r1", int'(r[1]), (m >= 2) ? 0 : 3 - rr);
          check("r2", int'(r[2]), (m >= 2) ? 0 : (rr ^ 1));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
