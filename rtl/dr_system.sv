// dr_system: a B(2):P(4) dual radix building-block set around a four-valued
// bus.
//
// Every signal is a P(4) digit (dr_pkg::q4_t). One binary-select line bs puts
// all the radix-sensitive gates into P(4) mode (bs = 0) or into binary mode in
// the 0,3 mapping (bs = 3) at once; fs is the matching function-select line of
// the literal gates. The parts:
//   bus      : a 4:1 T-gate multiplexer (select src_sel, enable src_en) drives
//              the bus line; a 1:4 demultiplexer (dst_sel, dst_en) fans it out
//              to dst[]; a 0,3 -> 1,2 bridge gives bus_12 and a 1,2 -> 0,3
//              bridge brings that back as bus_03.
//   register : a J-K memory element loads from the bus (J = bus, K = reg_k) and
//              a set/clear memory element sets from the bus (S = bus,
//              C = sc_c); both step on the rising edge of clk.
//   adder    : the clockwise-cycling full adder adds the register and the bus
//              with carry cin; the T-gate full adder computes the same digit in
//              parallel so the two realizations can be compared.
//   memory   : a 256 x 8 binary memory on a 4-line P(4) address bus and a
//              4-line P(4) data bus (write on clk when mem_we is 3).
//   gates    : the product-of-sums gate, the sum-of-products gate, the example
//              function of two variables (in two realizations: weighted
//              literals, and the product-of-sums canonical form, which also
//              follows bs), the monotone and disjoint threshold
//              operators and a weighted current sum, each with its own ports.
// The bus arrangement and the pairing of register, adder and bus are this
// design's way of putting the document's parts together; the parts follow it.
module dr_system
  import dr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  q4_t  bs,
  input  q4_t  fs,
  // bus
  input  q4_t  src     [4],
  input  q4_t  src_sel,
  input  q4_t  src_en,
  input  q4_t  dst_sel,
  input  q4_t  dst_en,
  output q4_t  bus,
  output q4_t  dst     [4],
  output q4_t  bus_12,
  output q4_t  bus_03,
  // memory elements
  input  q4_t  reg_k,
  output q4_t  reg_q,
  output q4_t  reg_q_n,
  input  q4_t  sc_c,
  output q4_t  sc_q,
  output q4_t  sc_q_n,
  output logic sc_nondet,
  // adders
  input  q4_t  cin,
  output q4_t  sum,
  output q4_t  cout,
  output q4_t  sum_t,
  output q4_t  cout_t,
  // memory on P(4) buses
  input  q4_t  mem_we,
  input  q4_t  mem_addr  [4],
  input  q4_t  mem_wdata [4],
  output q4_t  mem_rdata [4],
  // product-of-sums gate
  input  q4_t  pos_x  [4],   // x1A, x2A, x1B, x2B
  input  q4_t  pos_x3,
  input  q4_t  pos_r  [4],
  input  q4_t  pos_k,
  output q4_t  pos_f1,
  output q4_t  pos_f2,
  // sum-of-products gate
  input  q4_t  sop_x [4],
  input  q4_t  sop_a [4],
  input  q4_t  sop_b [4],
  output q4_t  sop_pa,
  output q4_t  sop_pb,
  output q4_t  sop_f,
  // example function
  input  q4_t  fn_x1,
  input  q4_t  fn_x2,
  output q4_t  fn_f,
  output q4_t  fn_pos_f,     // the same function, canonical product-of-sums form
  // threshold operators
  input  q4_t  thr_x,
  input  q4_t  thr_i,
  output q4_t  mono_d,
  output q4_t  mono_dn,
  output q4_t  disj_c,
  // weighted current sum x1 + 2 x2 + 3 x3
  input  q4_t  ls_x [3],
  output logic [4:0] ls_sum
);
  // ---- bus ----
  dr_mux4   u_mux  (.d(src), .s(src_sel), .e(src_en), .y(bus));
  dr_demux4 u_dmx  (.d(bus), .s(dst_sel), .e(dst_en), .y(dst));
  dr_bridge_03_12 u_br1 (.x(bus),    .y(bus_12));
  dr_bridge_12_03 u_br2 (.x(bus_12), .y(bus_03));

  // ---- memory elements ----
  dr_jk_memory u_jk (.clk(clk), .rst_n(rst_n), .j(bus), .k(reg_k), .q(reg_q), .q_n(reg_q_n));
  dr_sc_memory u_sc (.clk(clk), .rst_n(rst_n), .s(bus), .c(sc_c), .q(sc_q), .q_n(sc_q_n),
                     .nondet(sc_nondet));

  // ---- adders ----
  dr_full_adder       u_fa  (.bs(bs), .x1(reg_q), .x2(bus), .cin(cin), .sum(sum),   .cout(cout));
  dr_full_adder_tgate u_fat (.bs(bs), .x1(reg_q), .x2(bus), .cin(cin), .sum(sum_t), .cout(cout_t));

  // ---- memory ----
  dr_mem_interface u_mem (.clk(clk), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
                          .rdata(mem_rdata));

  // ---- standard gates ----
  dr_pos_gate u_pos (
    .bs(bs), .x1a(pos_x[0]), .x2a(pos_x[1]), .x1b(pos_x[2]), .x2b(pos_x[3]), .x3(pos_x3),
    .r1a(pos_r[0]), .r2a(pos_r[1]), .r1b(pos_r[2]), .r2b(pos_r[3]), .k(pos_k),
    .f1(pos_f1), .f2(pos_f2)
  );
  dr_sop_gate u_sop (.bs(bs), .fs(fs), .x(sop_x), .a(sop_a), .b(sop_b),
                     .pa(sop_pa), .pb(sop_pb), .f(sop_f));
  dr_table31_fn  u_fn  (.x1(fn_x1), .x2(fn_x2), .f(fn_f));
  dr_table31_pos u_fnp (.bs(bs), .x1(fn_x1), .x2(fn_x2), .f(fn_pos_f));

  dr_monotone u_mono (.bs(bs), .i_in(thr_i), .x(thr_x), .d(mono_d), .d_n(mono_dn));
  dr_disjoint u_disj (.bs(bs), .i_in(thr_i), .x(thr_x), .c(disj_c));
  dr_linear_sum u_ls (.x1(ls_x[0]), .x2(ls_x[1]), .x3(ls_x[2]), .sum(ls_sum));
endmodule
