// dr_max: dual radix MAX/OR gate.
//
// y = MAX(x1, x2). MAX is closed under all six mappings of B(2) into P(4), so
// the very same gate is the OR gate for any binary mapping and needs no mode
// line. The current-mode circuit computes the complemented MAX (the output
// mirror of a three-unit source minus the larger input) and follows it with a
// complement gate; at the logic level the two complements cancel, which is
// what is written here. Purely combinational. Follows the document.
module dr_max
  import dr_pkg::*;
(
  input  q4_t x1,
  input  q4_t x2,
  output q4_t y
);
  always_comb y = (x1 > x2) ? x1 : x2;
endmodule
