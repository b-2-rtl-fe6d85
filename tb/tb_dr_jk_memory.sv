// Test of the J-K memory element: the binary J-K behaviour (hold, set, clear,
// toggle) in both mappings as listed in its next-state table, then a random
// sequence against Q+ = J./Q + /K.Q + J./K.
module tb_dr_jk_memory;
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
  q4_t j, k, q, q_n;
  int model;
  dr_jk_memory dut (.*);
  always #5 clk = ~clk;

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction
  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  function automatic int nxt(int jv, int kv, int qv);
    return mx(mx(mn(jv, 3 - qv), mn(3 - kv, qv)), mn(jv, 3 - kv));
  endfunction

  // next-state table for the 0,3 mapping, columns (J,K) = 00,03,30,33, rows Q
  int t03 [4][4] = '{'{0, 0, 3, 3}, '{1, 0, 3, 2}, '{2, 0, 3, 1}, '{3, 0, 3, 0}};
  // and for the 1,2 mapping, columns (J,K) = 11,12,21,22
  int t12 [4][4] = '{'{1, 1, 2, 2}, '{1, 1, 2, 2}, '{2, 1, 2, 1}, '{2, 1, 2, 1}};

  task automatic load(int p);
    // reach present state p: clear with J=0,K=3, then raise with J=p, K=0
    @(negedge clk); j = 0; k = 3;
    @(negedge clk); j = q4_t'(p); k = 0;
    @(negedge clk);
  endtask

  initial begin
    process::self().srandom(32'd1981);  // fixed seed: repeatable stimulus
    j = 0; k = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset", int'(q), 0);
    for (int p = 0; p < 4; p++)
      for (int col = 0; col < 4; col++) begin
        int jv, kv;
        load(p);
        check("preset", int'(q), p);
        jv = col[1] ? 3 : 0; kv = col[0] ? 3 : 0;
        j = q4_t'(jv); k = q4_t'(kv);
        @(negedge clk);
        check($sformatf("map03 J%0d K%0d Q%0d", jv, kv, p), int'(q), t03[p][col]);
        load(p);
        jv = col[1] ? 2 : 1; kv = col[0] ? 2 : 1;
        j = q4_t'(jv); k = q4_t'(kv);
        @(negedge clk);
        check($sformatf("map12 J%0d K%0d Q%0d", jv, kv, p), int'(q), t12[p][col]);
        check("q_n", int'(q_n), 3 - t12[p][col]);
      end
    // binary toggle over several cycles
    load(0);
    j = 3; k = 3;
    for (int n = 0; n < 6; n++) begin
      @(negedge clk);
      check("toggle", int'(q), (n % 2 == 0) ? 3 : 0);
    end
    load(0); model = 0;
    for (int n = 0; n < 500; n++) begin
      j = q4_t'($urandom); k = q4_t'($urandom);
      model = nxt(j, k, model);
      @(negedge clk);
      check("rand q", int'(q), model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
