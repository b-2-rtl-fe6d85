// Test of the clockwise-cycling dual radix full adder: all 32 P(4) cases of the
// sum and carry tables (carry on levels 0/3) with Bs = 0, and all 8 binary
// cases in the 0,3 mapping with Bs = 3 against the binary full adder.
module tb_dr_full_adder;
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

  localparam bit CHECK_NONBINARY_IN_B2 = 1;
  q4_t bs, x1, x2, cin, sum, cout;
  dr_full_adder dut (.*);

  initial begin
    bs = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 2; c++) begin
          int t;
          x1 = q4_t'(a); x2 = q4_t'(b); cin = c ? 3 : 0; #1;
          t = a + b + c;
          check($sformatf("p4 sum %0d+%0d+%0d", a, b, c), int'(sum), t % 4);
          check($sformatf("p4 cout %0d+%0d+%0d", a, b, c), int'(cout), (t >= 4) ? 3 : 0);
        end
    bs = 3;
    for (int v = 0; v < 8; v++) begin
      logic p, q, r;
      {p, q, r} = 3'(v);
      x1 = p ? 3 : 0; x2 = q ? 3 : 0; cin = r ? 3 : 0; #1;
      check($sformatf("b2 sum %0d%0d%0d", p, q, r), int'(sum), (p ^ q ^ r) ? 3 : 0);
      check($sformatf("b2 cout %0d%0d%0d", p, q, r), int'(cout), ((p & q) | (p & r) | (q & r)) ? 3 : 0);
    end
    // With Bs = 3 every non-binary input combination keeps the P(4) result.
    if (CHECK_NONBINARY_IN_B2)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++)
          for (int c = 0; c < 2; c++) begin
            if ((a == 0 || a == 3) && (b == 0 || b == 3)) continue;
            x1 = q4_t'(a); x2 = q4_t'(b); cin = c ? 3 : 0; #1;
            check("b2 mode, p4 operand", int'(sum), (a + b + c) % 4);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
