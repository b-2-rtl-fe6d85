// dr_pos_gate: standard B(2):P(4) "product of sums" gate (Vranesic algebra).
//
// Four inputs are each cycled by their own r line, paired into two MAX (OR)
// terms and the two sums are MINed (ANDed):
//   f2 = (x1A^r1A + x2A^r2A) . (x1B^r1B + x2B^r2B)
//   f1 = [ f2 . x3 ]^k              (x3 is the expansion input)
// One such gate gives any product-of-sums term of a two-variable P(4)
// function; several feed a MAX gate for the sum-of-products-of-sums canonical
// form. A single binary-select line Bs turns the gate into binary logic: at
// Bs = 3 all r lines become 0 and k becomes 3, so in the 0,3 mapping
// f2 = OR-AND and f1 = inverted OR-AND-with-x3. The primary signal path is the
// same in both radices.
// That f2 is taken after the cycling stage (the same product that feeds f1) is
// this design's reading of the gate. Purely combinational.
module dr_pos_gate
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t x1a, x2a, x1b, x2b,
  input  q4_t x3,
  input  q4_t r1a, r2a, r1b, r2b,
  input  q4_t k,
  output q4_t f1,
  output q4_t f2
);
  q4_t r_in [4];
  q4_t r_eff [4];
  q4_t k_eff;
  q4_t c1a, c2a, c1b, c2b;
  q4_t sum_a, sum_b, prod3;

  assign r_in[0] = r1a;
  assign r_in[1] = r2a;
  assign r_in[2] = r1b;
  assign r_in[3] = r2b;

  dr_binary_select #(.NR(4)) u_bsel (
    .bs(bs), .k_in(k), .r_in(r_in), .k(k_eff), .r(r_eff)
  );

  dr_cycle u_cy1a (.x(x1a), .r(r_eff[0]), .y(c1a));
  dr_cycle u_cy2a (.x(x2a), .r(r_eff[1]), .y(c2a));
  dr_cycle u_cy1b (.x(x1b), .r(r_eff[2]), .y(c1b));
  dr_cycle u_cy2b (.x(x2b), .r(r_eff[3]), .y(c2b));

  dr_max u_maxa (.x1(c1a), .x2(c2a), .y(sum_a));
  dr_max u_maxb (.x1(c1b), .x2(c2b), .y(sum_b));

  dr_min u_min2 (.x1(sum_a), .x2(sum_b), .y(f2));
  dr_min u_min3 (.x1(f2),    .x2(x3),    .y(prod3));

  dr_unary_inv u_inv (.x(prod3), .k(k_eff), .y(f1));
endmodule
