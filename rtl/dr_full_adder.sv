// dr_full_adder: dual radix B(2):P(4) full adder, clockwise-cycling version.
//
// One digit position of an adder that works on P(4) digits or, with the same
// wires, on binary bits in the 0,3 mapping. Carry in and carry out are binary
// lines on the levels 0 and 3 in both radices.
//
// P(4) path (Bs = 0):
//   s0   = (x1 + x2) mod 4          universal clockwise-cycling gate, r = x2
//   sum  = (s0 + c) mod 4           second cycling gate, c = 1 when cin = 3
//   cout = 3 when x1 + x2 + c >= 4  linear current sum and a threshold
// B(2) path (Bs = 3): the P(4) sum agrees with the binary sum for all binary
// inputs except two, which a pair of literal terms correct:
//   x1 = x2 = 3, cin = 0: P(4) gives 2, binary needs 0
//   x1 = x2 = 0, cin = 3: P(4) gives 1, binary needs 3
// The carry needs no correction. The two correction terms are MINs of 3,3 or
// 0,0 literals with the carry and Bs; where either fires the output takes the
// corrected value (the document wires the two sums together; the override
// multiplexer is this design's reading of that joint).
// cin and Bs at level 2 or more count as 3. Purely combinational.
module dr_full_adder
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t x1,
  input  q4_t x2,
  input  q4_t cin,
  output q4_t sum,
  output q4_t cout
);
  localparam int unsigned SW = 4;   // width of the current count 0..7

  q4_t               cunit, s0, s_p4;
  logic [SW-1:0]     csum;
  q4_t               l1_3, l2_3, l1_0, l2_0, both3, both0;
  q4_t               cin_n, t33, t00, fix33, fix00;

  // carry in as one unit of current
  assign cunit = bs_binary(cin) ? Q_ONE : Q_ZERO;

  dr_cycle u_cyc0 (.x(x1), .r(x2),    .y(s0));
  dr_cycle u_cyc1 (.x(s0), .r(cunit), .y(s_p4));

  dr_linear_sum #(.W1(1), .W2(1), .W3(1), .OW(SW)) u_sum (
    .x1(x1), .x2(x2), .x3(cunit), .sum(csum)
  );
  assign cout = (csum >= SW'(DR_M)) ? Q_MAX : Q_ZERO;

  // B(2) correction terms
  dr_literal u_l13 (.x(x1), .a(Q_MAX),  .b(Q_MAX),  .y(l1_3));
  dr_literal u_l23 (.x(x2), .a(Q_MAX),  .b(Q_MAX),  .y(l2_3));
  dr_literal u_l10 (.x(x1), .a(Q_ZERO), .b(Q_ZERO), .y(l1_0));
  dr_literal u_l20 (.x(x2), .a(Q_ZERO), .b(Q_ZERO), .y(l2_0));
  dr_min     u_b3  (.x1(l1_3), .x2(l2_3), .y(both3));
  dr_min     u_b0  (.x1(l1_0), .x2(l2_0), .y(both0));
  dr_complement u_cn (.x(bs_binary(cin) ? Q_MAX : Q_ZERO), .y(cin_n));
  dr_min     u_t33 (.x1(both3), .x2(cin_n), .y(t33));
  dr_min     u_t00 (.x1(both0), .x2(bs_binary(cin) ? Q_MAX : Q_ZERO), .y(t00));
  dr_min     u_f33 (.x1(t33), .x2(bs_binary(bs) ? Q_MAX : Q_ZERO), .y(fix33));
  dr_min     u_f00 (.x1(t00), .x2(bs_binary(bs) ? Q_MAX : Q_ZERO), .y(fix00));

  always_comb begin
    if (fix33 != Q_ZERO)      sum = Q_ZERO;
    else if (fix00 != Q_ZERO) sum = Q_MAX;
    else                      sum = s_p4;
  end
endmodule
