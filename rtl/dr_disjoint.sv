// dr_disjoint: Post-algebra disjoint unary operator, dual radix.
//
// c = C_i(x) = 3 when x = i, else 0 (a window of width one). The level i is a
// line. Binary select Bs = 3 forces i = 3, which makes the gate a binary
// buffer in the 0,3 mapping (i = 0 would make it an inverter; the document
// says a default is needed but not which, and the buffer, matching the
// monotone operator, is this design's choice). Purely combinational.
module dr_disjoint
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t i_in,
  input  q4_t x,
  output q4_t c
);
  q4_t i_eff;
  always_comb begin
    i_eff = bs_binary(bs) ? Q_MAX : i_in;
    c     = (x == i_eff) ? Q_MAX : Q_ZERO;
  end
endmodule
