// Test of the sum-of-products gate: random P(4) vectors against a reference of
// f = lit.lit + lit.lit, then all 16 binary inputs with Bs = 3 in both function
// select settings (AND-OR and NOT-AND-OR).
module tb_dr_sop_gate;
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

  q4_t bs, fs, pa, pb, f;
  q4_t x [4];
  q4_t a [4];
  q4_t b [4];
  dr_sop_gate dut (.*);

  function automatic int lit(int xv, int av, int bv); return (av <= xv && xv <= bv) ? 3 : 0; endfunction
  function automatic int mx(int p, int q); return p > q ? p : q; endfunction
  function automatic int mn(int p, int q); return p < q ? p : q; endfunction

  initial begin
    process::self().srandom(32'd1981);  // fixed seed: repeatable stimulus
    bs = 0; fs = 0;
    for (int n = 0; n < 3000; n++) begin
      int ea, eb;
      for (int i = 0; i < 4; i++) begin
        x[i] = q4_t'($urandom); a[i] = q4_t'($urandom); b[i] = q4_t'($urandom);
      end
      fs = q4_t'($urandom);
      #1;
      ea = mn(lit(x[0], a[0], b[0]), lit(x[1], a[1], b[1]));
      eb = mn(lit(x[2], a[2], b[2]), lit(x[3], a[3], b[3]));
      check("pa", int'(pa), ea);
      check("pb", int'(pb), eb);
      check("f", int'(f), mx(ea, eb));
    end
    bs = 3;
    for (int fsel = 0; fsel < 2; fsel++)
      for (int v = 0; v < 16; v++) begin
        logic [3:0] bits;
        logic e;
        bits = 4'(v);
        fs = fsel ? 3 : 0;
        for (int i = 0; i < 4; i++) begin
          x[i] = bits[i] ? 3 : 0; a[i] = q4_t'($urandom); b[i] = q4_t'($urandom);
        end
        #1;
        if (fsel) e = (bits[0] & bits[1]) | (bits[2] & bits[3]);
        else      e = (!bits[0] & !bits[1]) | (!bits[2] & !bits[3]);
        check("f bin", int'(f), e ? 3 : 0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
