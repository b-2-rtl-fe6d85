// Test of the set/clear memory element: the deterministic entries of its
// next-state table from every present state, then a random sequence against a
// reference model Q+ = MAX(S, MIN(3-C, Q)), and the non-determinism flag.
module tb_dr_sc_memory;
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

  logic clk = 0, rst_n = 0;
  q4_t s, c, q, q_n;
  logic nondet;
  int model;
  dr_sc_memory dut (.*);
  always #5 clk = ~clk;

  function automatic int nxt(int sv, int cv, int qv);
    int h;
    h = (3 - cv) < qv ? (3 - cv) : qv;
    return sv > h ? sv : h;
  endfunction

  initial begin
    process::self().srandom(32'd1981);  // fixed seed: repeatable stimulus
    s = 0; c = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset", int'(q), 0);
    // table entries: bring the element to each present state, then apply S,C
    for (int p = 0; p < 4; p++)
      for (int sv = 0; sv < 4; sv++)
        for (int cv = 0; cv < 4; cv++) begin
          if (sv + cv >= 4) continue;
          @(negedge clk); s = 0; c = 3;           // clear
          @(negedge clk); s = q4_t'(p); c = 0;    // set to p
          @(negedge clk);
          check("preset", int'(q), p);
          s = q4_t'(sv); c = q4_t'(cv);
          #1 check("nondet low", int'(nondet), 0);
          @(negedge clk);
          check($sformatf("Q+ S%0d C%0d Q%0d", sv, cv, p), int'(q), nxt(sv, cv, p));
          check("q_n", int'(q_n), 3 - nxt(sv, cv, p));
        end
    // random run
    @(negedge clk); s = 0; c = 3; @(negedge clk);
    model = 0;
    for (int n = 0; n < 500; n++) begin
      s = q4_t'($urandom); c = q4_t'($urandom);
      #1 check("nondet", int'(nondet), (int'(s) + int'(c) >= 4) ? 1 : 0);
      model = nxt(s, c, model);
      @(negedge clk);
      check("rand q", int'(q), model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
