// Test of the product-of-sums gate: random P(4) vectors against a reference
// model of f2 = (x1A^r1A + x2A^r2A)(x1B^r1B + x2B^r2B), f1 = [f2 . x3]^k, and all
// 32 binary input combinations with Bs = 3 against the OR-AND and inverted
// OR-AND-x3 truth tables (r and k lines deliberately left at other values).
module tb_dr_pos_gate;
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

  q4_t bs, x1a, x2a, x1b, x2b, x3, r1a, r2a, r1b, r2b, k, f1, f2;
  dr_pos_gate dut (.*);

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction
  function automatic int mn(int a, int b); return a < b ? a : b; endfunction

  initial begin
    process::self().srandom(32'd1981);  // fixed seed: repeatable stimulus
    bs = 0;
    for (int n = 0; n < 3000; n++) begin
      int e2, p;
      {x1a, x2a, x1b, x2b, x3} = 10'($urandom);
      {r1a, r2a, r1b, r2b, k}  = 10'($urandom);
      #1;
      e2 = mn(mx((x1a + r1a) % 4, (x2a + r2a) % 4), mx((x1b + r1b) % 4, (x2b + r2b) % 4));
      p  = mn(e2, int'(x3));
      check("f2 p4", int'(f2), e2);
      check("f1 p4", int'(f1), (p == 0) ? int'(k) : 0);
    end
    bs = 3;
    for (int v = 0; v < 32; v++) begin
      logic b1a, b2a, b1b, b2b, b3, e;
      {b1a, b2a, b1b, b2b, b3} = 5'(v);
      x1a = b1a ? 3 : 0; x2a = b2a ? 3 : 0; x1b = b1b ? 3 : 0; x2b = b2b ? 3 : 0;
      x3  = b3 ? 3 : 0;
      {r1a, r2a, r1b, r2b, k} = 10'($urandom);
      #1;
      e = (b1a | b2a) & (b1b | b2b);
      check("f2 b2", int'(f2), e ? 3 : 0);
      check("f1 b2", int'(f1), (e & b3) ? 0 : 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
