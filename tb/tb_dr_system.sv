// End-to-end test of dr_system at its default sizes.
//
// Workload: multi-digit addition in both radices. In P(4) mode (Bs = 0) pairs
// of 8-bit numbers are added four base-4 digits at a time; in binary mode
// (Bs = 3, 0,3 mapping) the same numbers are added bit by bit. For each digit
// the testbench, acting as the control unit, loads the A digit into the J-K
// register over the bus (clear, then load), puts the B digit on the bus, feeds
// the previous carry out back as carry in and collects the sum digit from both
// adders. The result word is written to the memory on the P(4) buses and read
// back. Alongside, the bus demultiplexer and bridges, the set/clear element,
// the standard gates, the example function and the threshold operators are
// exercised in both modes. Every mechanism is counted and a mechanism that
// never happened is a failure.
module tb_dr_system;
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
  q4_t  bs, fs;
  q4_t  src [4];
  q4_t  src_sel, src_en, dst_sel, dst_en, bus, bus_12, bus_03;
  q4_t  dst [4];
  q4_t  reg_k, reg_q, reg_q_n, sc_c, sc_q, sc_q_n;
  logic sc_nondet;
  q4_t  cin, sum, cout, sum_t, cout_t;
  q4_t  mem_we;
  q4_t  mem_addr [4];
  q4_t  mem_wdata [4];
  q4_t  mem_rdata [4];
  q4_t  pos_x [4];
  q4_t  pos_r [4];
  q4_t  pos_x3, pos_k, pos_f1, pos_f2;
  q4_t  sop_x [4];
  q4_t  sop_a [4];
  q4_t  sop_b [4];
  q4_t  sop_pa, sop_pb, sop_f;
  q4_t  fn_x1, fn_x2, fn_f, fn_pos_f;
  q4_t  thr_x, thr_i, mono_d, mono_dn, disj_c;
  q4_t  ls_x [3];
  logic [4:0] ls_sum;

  dr_system dut (.*);
  always #5 clk = ~clk;

  // mechanism counters
  int n_p4_add, n_b2_add, n_carry, n_b2_fix, n_mux_off, n_demux [4];
  int n_bridge, n_toggle, n_nondet, n_mem_wr, n_mem_rd, n_pos_b2, n_sop_inv, n_sop_buf;

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction
  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  // binary level of a 0/3 line as 0 or 3
  function automatic int b2lvl(q4_t v); return (v == 3) ? 3 : 0; endfunction
  // the example function's truth table, rows x1, columns x2
  function automatic int fn_ref(q4_t x1, q4_t x2);
    int t [4][4] = '{'{2, 2, 2, 3}, '{1, 2, 3, 0}, '{1, 0, 0, 0}, '{2, 1, 1, 0}};
    return t[x1][x2];
  endfunction
  function automatic int lit(int xv, int av, int bv); return (av <= xv && xv <= bv) ? 3 : 0; endfunction

  // Put one value on the bus through mux input 'sel'.
  task automatic drive_bus(int sel, int v);
    src_en = 3; src_sel = q4_t'(sel); src[sel] = q4_t'(v);
  endtask

  // Load the J-K register with v (two clocks: clear, then load).
  task automatic load_reg(int v);
    @(negedge clk); src_en = 0; reg_k = 3;
    @(negedge clk); drive_bus(0, v); reg_k = 0;
    @(negedge clk); reg_k = 0;
    check("reg load", int'(reg_q), v);
  endtask

  // One adder digit: reg = a, bus = b, cin = carry; returns sum, updates carry.
  task automatic add_digit(int a, int b, inout int carry, output int s, input bit binary);
    int t;
    load_reg(a);
    drive_bus(1, b);
    cin = carry ? 3 : 0;
    #1;
    if (binary) begin
      int ab, bb;
      ab = (a == 3); bb = (b == 3);
      check("b2 sum",   int'(sum),  (ab ^ bb ^ carry) ? 3 : 0);
      check("b2 cout",  int'(cout), ((ab & bb) | (ab & carry) | (bb & carry)) ? 3 : 0);
      if ((a == 3 && b == 3 && carry == 0) || (a == 0 && b == 0 && carry == 1)) n_b2_fix++;
      n_b2_add++;
    end else begin
      t = a + b + carry;
      check("p4 sum",  int'(sum),  t % 4);
      check("p4 cout", int'(cout), (t >= 4) ? 3 : 0);
      n_p4_add++;
    end
    check("tgate sum",  int'(sum_t),  int'(sum));
    check("tgate cout", int'(cout_t), int'(cout));
    if (cout == 3) n_carry++;
    s = int'(sum);
    carry = (cout == 3);
  endtask

  task automatic mem_write(int addr, int digits [4]);
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      mem_addr[i] = q4_t'((addr >> (2 * i)) & 3); mem_wdata[i] = q4_t'(digits[i]);
    end
    mem_we = 3;
    @(negedge clk); mem_we = 0;
    n_mem_wr++;
  endtask

  task automatic mem_read(int addr, output int word);
    for (int i = 0; i < 4; i++) mem_addr[i] = q4_t'((addr >> (2 * i)) & 3);
    #1;
    word = 0;
    for (int i = 0; i < 4; i++) word |= int'(mem_rdata[i]) << (2 * i);
    n_mem_rd++;
  endtask

  initial begin
    int a, b, carry, s, word, res;
    int digits [4];
    process::self().srandom(32'd1981);  // fixed seed: repeatable stimulus
    bs = 0; fs = 0; src_sel = 0; src_en = 0; dst_sel = 0; dst_en = 0;
    for (int i = 0; i < 4; i++) begin
      src[i] = 0; mem_addr[i] = 0; mem_wdata[i] = 0; pos_x[i] = 0; pos_r[i] = 0;
      sop_x[i] = 0; sop_a[i] = 0; sop_b[i] = 0;
    end
    reg_k = 0; sc_c = 0; cin = 0; mem_we = 0; pos_x3 = 0; pos_k = 0;
    fn_x1 = 0; fn_x2 = 0; thr_x = 0; thr_i = 0; ls_x = '{0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---- P(4) addition: 8-bit numbers as four base-4 digits ----
    bs = 0;
    for (int op = 0; op < 24; op++) begin
      a = (op == 0) ? 255 : $urandom_range(0, 255);
      b = (op == 0) ? 255 : $urandom_range(0, 255);
      carry = 0;
      for (int i = 0; i < 4; i++) begin
        add_digit((a >> (2 * i)) & 3, (b >> (2 * i)) & 3, carry, s, 0);
        digits[i] = s;
      end
      mem_write(op, digits);
      mem_read(op, word);
      res = (a + b) & 255;
      check($sformatf("p4 %0d+%0d", a, b), word, res);
      check("p4 final carry", carry, (a + b) >> 8);
    end

    // ---- binary addition in the 0,3 mapping, one bit per digit line ----
    bs = 3;
    for (int op = 0; op < 12; op++) begin
      a = (op == 0) ? 255 : $urandom_range(0, 255);
      b = (op == 0) ? 0   : $urandom_range(0, 255);
      carry = (op == 1);
      res = 0;
      for (int i = 0; i < 8; i++) begin
        add_digit(((a >> i) & 1) ? 3 : 0, ((b >> i) & 1) ? 3 : 0, carry, s, 1);
        res |= (s == 3) << i;
      end
      check($sformatf("b2 %0d+%0d", a, b), res, (a + b + (op == 1)) & 255);
    end
    bs = 0;

    // ---- bus: multiplexer enable, demultiplexer routing, bridges ----
    for (int n = 0; n < 64; n++) begin
      int v, d;
      v = $urandom_range(0, 3); d = $urandom_range(0, 3);
      src_sel = q4_t'(n % 4); src[n % 4] = q4_t'(v); src_en = q4_t'(n % 3);
      dst_sel = q4_t'(d); dst_en = 3;
      #1;
      if (n % 3 == 0) begin
        check("mux off", int'(bus), 0); n_mux_off++;
      end else check("mux on", int'(bus), v);
      for (int i = 0; i < 4; i++) check("demux", int'(dst[i]), (i == d) ? int'(bus) : 0);
      n_demux[d]++;
      check("bridge 03->12", int'(bus_12), (bus >= 2) ? 2 : 1);
      check("bridge back",   int'(bus_03), (bus >= 2) ? 3 : 0);
      if (bus == 0 || bus == 3) begin
        check("bridge round trip", int'(bus_03), int'(bus)); n_bridge++;
      end
    end

    // ---- J-K toggle in binary (J = K = 3) ----
    load_reg(0);
    drive_bus(0, 3); reg_k = 3;
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      check("toggle", int'(reg_q), (n % 2 == 0) ? 3 : 0);
      check("toggle q_n", int'(reg_q_n), (n % 2 == 0) ? 0 : 3);
      n_toggle++;
    end

    // ---- set/clear element and its non-deterministic inputs ----
    @(negedge clk); src_en = 0; sc_c = 3;
    @(negedge clk); check("sc clear", int'(sc_q), 0); check("sc q_n", int'(sc_q_n), 3);
    drive_bus(0, 2); sc_c = 0;
    @(negedge clk); check("sc set", int'(sc_q), 2);
    drive_bus(0, 1); sc_c = 1;
    @(negedge clk); check("sc hold-ish", int'(sc_q), 2);
    drive_bus(0, 2); sc_c = 2; #1;
    check("sc nondet", int'(sc_nondet), 1); n_nondet += sc_nondet;
    @(negedge clk); src_en = 0; sc_c = 0;

    // ---- standard gates in both radices ----
    for (int n = 0; n < 200; n++) begin
      int e2, p, ea, eb, ie;
      bit bin;
      bin = (n >= 100);
      bs = bin ? 3 : 0;
      fs = (n % 2) ? 3 : 0;
      for (int i = 0; i < 4; i++) begin
        pos_x[i] = bin ? ($urandom_range(0, 1) ? 3 : 0) : q4_t'($urandom);
        pos_r[i] = q4_t'($urandom);
        sop_x[i] = bin ? ($urandom_range(0, 1) ? 3 : 0) : q4_t'($urandom);
        sop_a[i] = q4_t'($urandom); sop_b[i] = q4_t'($urandom);
      end
      pos_x3 = bin ? ($urandom_range(0, 1) ? 3 : 0) : q4_t'($urandom);
      pos_k = q4_t'($urandom);
      thr_x = q4_t'($urandom); thr_i = q4_t'($urandom);
      fn_x1 = bin ? ($urandom_range(0, 1) ? 3 : 0) : q4_t'($urandom);
      fn_x2 = bin ? ($urandom_range(0, 1) ? 3 : 0) : q4_t'($urandom);
      ls_x = '{q4_t'($urandom), q4_t'($urandom), q4_t'($urandom)};
      #1;
      if (bin) begin
        e2 = ((pos_x[0] | pos_x[1]) != 0 && (pos_x[2] | pos_x[3]) != 0) ? 3 : 0;
        check("pos f2 b2", int'(pos_f2), e2);
        check("pos f1 b2", int'(pos_f1), (e2 == 3 && pos_x3 == 3) ? 0 : 3);
        n_pos_b2++;
        if (fs == 3) begin
          ea = mn(b2lvl(sop_x[0]), b2lvl(sop_x[1]));
          eb = mn(b2lvl(sop_x[2]), b2lvl(sop_x[3]));
          n_sop_buf++;
        end else begin
          ea = mn(3 - b2lvl(sop_x[0]), 3 - b2lvl(sop_x[1]));
          eb = mn(3 - b2lvl(sop_x[2]), 3 - b2lvl(sop_x[3]));
          n_sop_inv++;
        end
        check("sop b2", int'(sop_f), mx(ea, eb));
        ie = 3;
      end else begin
        e2 = mn(mx((pos_x[0] + pos_r[0]) % 4, (pos_x[1] + pos_r[1]) % 4),
                mx((pos_x[2] + pos_r[2]) % 4, (pos_x[3] + pos_r[3]) % 4));
        p = mn(e2, int'(pos_x3));
        check("pos f2", int'(pos_f2), e2);
        check("pos f1", int'(pos_f1), (p == 0) ? int'(pos_k) : 0);
        ea = mn(lit(sop_x[0], sop_a[0], sop_b[0]), lit(sop_x[1], sop_a[1], sop_b[1]));
        eb = mn(lit(sop_x[2], sop_a[2], sop_b[2]), lit(sop_x[3], sop_a[3], sop_b[3]));
        check("sop pa", int'(sop_pa), ea);
        check("sop pb", int'(sop_pb), eb);
        check("sop f", int'(sop_f), mx(ea, eb));
        ie = int'(thr_i);
      end
      check("mono", int'(mono_d), (int'(thr_x) >= ie) ? 3 : 0);
      check("mono n", int'(mono_dn), (int'(thr_x) >= ie) ? 0 : 3);
      check("disj", int'(disj_c), (int'(thr_x) == ie) ? 3 : 0);
      check("fn", int'(fn_f), fn_ref(fn_x1, fn_x2));
      if (bin) check("fn pos b2", int'(fn_pos_f), (fn_x1 | fn_x2) ? 0 : 3);
      else     check("fn pos", int'(fn_pos_f), fn_ref(fn_x1, fn_x2));
      check("lsum", int'(ls_sum), int'(ls_x[0]) + 2 * int'(ls_x[1]) + 3 * int'(ls_x[2]));
    end

    // ---- mechanism coverage ----
    check("seen P(4) additions", int'(n_p4_add > 0), 1);
    check("seen binary additions", int'(n_b2_add > 0), 1);
    check("seen carry out", int'(n_carry > 0), 1);
    check("seen binary sum corrections", int'(n_b2_fix > 0), 1);
    check("seen mux disabled", int'(n_mux_off > 0), 1);
    for (int i = 0; i < 4; i++) check($sformatf("seen demux output %0d", i), int'(n_demux[i] > 0), 1);
    check("seen bridge round trip", int'(n_bridge > 0), 1);
    check("seen J-K toggle", int'(n_toggle > 0), 1);
    check("seen set/clear non-determinism", int'(n_nondet > 0), 1);
    check("seen memory writes", int'(n_mem_wr > 0), 1);
    check("seen memory reads", int'(n_mem_rd > 0), 1);
    check("seen binary product of sums", int'(n_pos_b2 > 0), 1);
    check("seen literal as inverter", int'(n_sop_inv > 0), 1);
    check("seen literal as buffer", int'(n_sop_buf > 0), 1);
    $display("counts: p4add=%0d b2add=%0d carry=%0d b2fix=%0d muxoff=%0d bridge=%0d toggle=%0d nondet=%0d memwr=%0d memrd=%0d",
             n_p4_add, n_b2_add, n_carry, n_b2_fix, n_mux_off, n_bridge, n_toggle, n_nondet, n_mem_wr, n_mem_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
