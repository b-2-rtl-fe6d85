// dr_unary_inv: M-unary "inverter" of the Vranesic algebra.
//
// y = x^k = k when x = 0, else 0. The constant k is brought in as a line: with
// k = 3 and inputs restricted to {0,3} the gate is the binary inverter of the
// 0,3 mapping (a gated inverter: k acts as the enable). The k line is the
// gate's mode control; the binary-select circuit (dr_binary_select) forces it
// to 3 in binary mode. Purely combinational. Follows the document.
module dr_unary_inv
  import dr_pkg::*;
(
  input  q4_t x,
  input  q4_t k,
  output q4_t y
);
  always_comb y = (x == Q_ZERO) ? k : Q_ZERO;
endmodule
