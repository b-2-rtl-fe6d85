// dr_full_adder_tgate: dual radix full adder built only from T-gates.
//
// Same behaviour as dr_full_adder (sum and carry of two P(4) digits and a
// carry on levels 0/3, plus the two binary corrections under Bs = 3), but
// realized with thirteen 4:1 four-valued multiplexers whose select inputs
// carry the variables:
//   r0..r3  = x1 + n mod 4          4 muxes, select x1, constant data
//   t1..t3  = 3 when x1 >= 4-n      3 muxes, select x1, constant data
//   s_c0    = r[x2]                 1 mux,  select x2   (sum, carry in 0)
//   s_c1    = r[x2 + 1]             1 mux,  select x2   (sum, carry in 3)
//   co_c0   = {0,t1,t2,t3}[x2]      1 mux,  select x2
//   co_c1   = {t1,t2,t3,3}[x2]      1 mux,  select x2
//   sum     = {s_c0,s_c0,s_c1,s_c1}[cin]   1 mux, select cin
//   cout    = {co_c0,co_c0,co_c1,co_c1}[cin]
// The binary-select line forces the two binary values through data inputs of
// r1 and r3: r1 at x1 = 0 gives 3 instead of 1 and r3 at x1 = 3 gives 0
// instead of 2 when Bs = 3. Those entries are reached in binary mode only for
// x1 = x2 = 0 with carry 3 and x1 = x2 = 3 with carry 0 (an x2 of 1 or 2 is not
// a binary level), which are exactly the two corrections. The mux count is the
// document's; the arrangement of the thirteen muxes is this design's.
// Purely combinational.
module dr_full_adder_tgate
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t x1,
  input  q4_t x2,
  input  q4_t cin,
  output q4_t sum,
  output q4_t cout
);
  q4_t r    [4];
  q4_t t    [1:3];
  q4_t s_c0, s_c1, co_c0, co_c1;
  q4_t r1_0, r3_3;
  q4_t d_r [4][4];
  q4_t d_t [4][4];
  q4_t d_s0 [4], d_s1 [4], d_c0 [4], d_c1 [4], d_sum [4], d_co [4];

  // B(2) forced values entering the r1 and r3 tables
  assign r1_0 = bs_binary(bs) ? Q_MAX  : Q_ONE;
  assign r3_3 = bs_binary(bs) ? Q_ZERO : Q_TWO;

  // constant tables of x1 + n mod 4 and of the carry thresholds
  always_comb begin
    for (int unsigned n = 0; n < 4; n++)
      for (int unsigned v = 0; v < 4; v++) begin
        d_r[n][v] = q4_t'(v + n);
        d_t[n][v] = (v + n >= DR_M) ? Q_MAX : Q_ZERO;
      end
    d_r[1][0] = r1_0;
    d_r[3][3] = r3_3;
  end

  for (genvar n = 0; n < 4; n++) begin : g_r
    dr_mux4 u_r (.d(d_r[n]), .s(x1), .e(Q_MAX), .y(r[n]));
  end
  for (genvar n = 1; n < 4; n++) begin : g_t
    dr_mux4 u_t (.d(d_t[n]), .s(x1), .e(Q_MAX), .y(t[n]));
  end

  always_comb begin
    d_s0 = '{r[0], r[1], r[2], r[3]};
    d_s1 = '{r[1], r[2], r[3], r[0]};
    d_c0 = '{Q_ZERO, t[1], t[2], t[3]};
    d_c1 = '{t[1], t[2], t[3], Q_MAX};
    d_sum = '{s_c0, s_c0, s_c1, s_c1};
    d_co  = '{co_c0, co_c0, co_c1, co_c1};
  end

  dr_mux4 u_s0  (.d(d_s0),  .s(x2),  .e(Q_MAX), .y(s_c0));
  dr_mux4 u_s1  (.d(d_s1),  .s(x2),  .e(Q_MAX), .y(s_c1));
  dr_mux4 u_c0  (.d(d_c0),  .s(x2),  .e(Q_MAX), .y(co_c0));
  dr_mux4 u_c1  (.d(d_c1),  .s(x2),  .e(Q_MAX), .y(co_c1));
  dr_mux4 u_sum (.d(d_sum), .s(cin), .e(Q_MAX), .y(sum));
  dr_mux4 u_co  (.d(d_co),  .s(cin), .e(Q_MAX), .y(cout));
endmodule
