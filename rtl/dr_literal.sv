// dr_literal: literal operator of the Allen-Givone algebra.
//
// y = a_x_b = 3 when a <= x <= b, else 0. The bounds a and b are lines, so one
// gate covers all ten columns of the literal truth table. In the 0,3 binary
// mapping a,b = 0,0 makes it an inverter and a,b = 3,3 a buffer; a,b = 0,3
// ties the output to 3. With a > b (outside the definition, which requires
// a <= b) the interval is empty and the output is 0; that case is this
// design's choice. Purely combinational.
module dr_literal
  import dr_pkg::*;
(
  input  q4_t x,
  input  q4_t a,
  input  q4_t b,
  output q4_t y
);
  always_comb y = (x >= a && x <= b) ? Q_MAX : Q_ZERO;
endmodule
