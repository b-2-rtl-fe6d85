// dr_monotone: Post-algebra monotone (threshold) unary operator, dual radix.
//
// d   = D_i(x)  = 3 when x >= i, else 0
// d_n = /D_i(x) = 0 when x >= i, else 3
// The threshold i is a line (a current source in the original). Binary select
// Bs = 3 forces i = 3, which makes d a binary buffer and d_n an inverter in
// the 0,3 mapping. Bs at level 2 or more is read as 3 (this design's choice).
// Purely combinational.
module dr_monotone
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t i_in,
  input  q4_t x,
  output q4_t d,
  output q4_t d_n
);
  q4_t i_eff;
  always_comb begin
    i_eff = bs_binary(bs) ? Q_MAX : i_in;
    d     = (x >= i_eff) ? Q_MAX  : Q_ZERO;
    d_n   = (x >= i_eff) ? Q_ZERO : Q_MAX;
  end
endmodule
