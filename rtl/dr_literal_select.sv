// dr_literal_select: binary-select (Bs) and function-select (Fs) control for
// the literal operator.
//
// Bs = 0 (P(4)): the a and b bound lines pass through unchanged.
// Bs = 3 (B(2)): a = b = Fs, so Fs = 0 makes the literal a binary inverter
// (a,b = 0,0) and Fs = 3 a binary buffer (a,b = 3,3) in the 0,3 mapping.
// Bs and Fs at level 2 or more are read as 3 (this design's choice for the
// unused levels). Purely combinational.
module dr_literal_select
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t fs,
  input  q4_t a_in,
  input  q4_t b_in,
  output q4_t a,
  output q4_t b
);
  q4_t fval;
  always_comb begin
    fval = bs_binary(fs) ? Q_MAX : Q_ZERO;
    if (bs_binary(bs)) begin
      a = fval;
      b = fval;
    end else begin
      a = a_in;
      b = b_in;
    end
  end
endmodule
