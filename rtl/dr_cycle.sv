// dr_cycle: M-unary "clockwise cycling" operator (universal form).
//
// y = (x + r) mod 4. With r = 0 it is the non-inverting buffer of the 0,3
// binary mapping, with r = 1 the successor function. In the universal circuit
// r is a variable input rather than a built-in current source, which is what
// lets the full adder reuse it (x and r are the two addends). The 2-bit digit
// wraps naturally, giving the modulo. Purely combinational.
module dr_cycle
  import dr_pkg::*;
(
  input  q4_t x,
  input  q4_t r,
  output q4_t y
);
  always_comb y = q4_t'(x + r);
endmodule
