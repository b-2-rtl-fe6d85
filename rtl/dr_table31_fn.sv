// dr_table31_fn: example two-variable four-valued function realized as a
// sum of weighted literal products (Allen-Givone canonical form, minimized).
//
// The function f(x1,x2) (rows x1, columns x2 = 0..3):
//   x1=0: 2 2 2 3    x1=1: 1 2 3 0    x1=2: 1 0 0 0    x1=3: 2 1 1 0
// is covered by seven prime implicants, each a MIN of a constant weight and
// one or two literals, joined by MAX gates:
//   1 . 0x2_0
//   1 . 3x1_3 . 1x2_2
//   2 . 0x1_0
//   2 . 0x1_1 . 1x2_2
//   2 . 3x1_3 . 0x2_0
//   3 . 0x1_0 . 3x2_3
//   3 . 1x1_1 . 2x2_2
// (ax_b is the literal: 3 when a <= x <= b.) The implicant list is the
// document's minimized form. Literals of the same bounds are shared.
// Purely combinational, P(4) only (the constant weights have no binary use).
module dr_table31_fn
  import dr_pkg::*;
(
  input  q4_t x1,
  input  q4_t x2,
  output q4_t f
);
  // literals of x1
  q4_t l1_00, l1_01, l1_11, l1_33;
  // literals of x2
  q4_t l2_00, l2_12, l2_22, l2_33;
  // products
  q4_t p1a, p1b, p2a, p2b, p2c, p3a, p3b;
  q4_t m_1b, m_2b, m_2c, m_3a, m_3b;
  // MAX tree
  q4_t s1, s2, s3, s4, s5, s6;

  dr_literal u_l1_00 (.x(x1), .a(q4_t'(0)), .b(q4_t'(0)), .y(l1_00));
  dr_literal u_l1_01 (.x(x1), .a(q4_t'(0)), .b(q4_t'(1)), .y(l1_01));
  dr_literal u_l1_11 (.x(x1), .a(q4_t'(1)), .b(q4_t'(1)), .y(l1_11));
  dr_literal u_l1_33 (.x(x1), .a(q4_t'(3)), .b(q4_t'(3)), .y(l1_33));
  dr_literal u_l2_00 (.x(x2), .a(q4_t'(0)), .b(q4_t'(0)), .y(l2_00));
  dr_literal u_l2_12 (.x(x2), .a(q4_t'(1)), .b(q4_t'(2)), .y(l2_12));
  dr_literal u_l2_22 (.x(x2), .a(q4_t'(2)), .b(q4_t'(2)), .y(l2_22));
  dr_literal u_l2_33 (.x(x2), .a(q4_t'(3)), .b(q4_t'(3)), .y(l2_33));

  // weight 1 terms
  dr_min u_p1a (.x1(Q_ONE), .x2(l2_00), .y(p1a));
  dr_min u_m1b (.x1(l1_33), .x2(l2_12), .y(m_1b));
  dr_min u_p1b (.x1(Q_ONE), .x2(m_1b),  .y(p1b));
  // weight 2 terms
  dr_min u_p2a (.x1(Q_TWO), .x2(l1_00), .y(p2a));
  dr_min u_m2b (.x1(l1_01), .x2(l2_12), .y(m_2b));
  dr_min u_p2b (.x1(Q_TWO), .x2(m_2b),  .y(p2b));
  dr_min u_m2c (.x1(l1_33), .x2(l2_00), .y(m_2c));
  dr_min u_p2c (.x1(Q_TWO), .x2(m_2c),  .y(p2c));
  // weight 3 terms (MIN with 3 is the identity)
  dr_min u_m3a (.x1(l1_00), .x2(l2_33), .y(m_3a));
  dr_min u_m3b (.x1(l1_11), .x2(l2_22), .y(m_3b));
  assign p3a = m_3a;
  assign p3b = m_3b;

  dr_max u_s1 (.x1(p1a), .x2(p1b), .y(s1));
  dr_max u_s2 (.x1(s1),  .x2(p2a), .y(s2));
  dr_max u_s3 (.x1(s2),  .x2(p2b), .y(s3));
  dr_max u_s4 (.x1(s3),  .x2(p2c), .y(s4));
  dr_max u_s5 (.x1(s4),  .x2(p3a), .y(s5));
  dr_max u_s6 (.x1(s5),  .x2(p3b), .y(s6));
  assign f = s6;
endmodule
