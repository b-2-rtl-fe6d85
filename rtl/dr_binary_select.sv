// dr_binary_select: binary-select (Bs) control for the Vranesic unary gates.
//
// Instead of changing every k and r mode line by hand, one binary-select line
// Bs switches a whole circuit between radices: Bs = 0 selects P(4) and passes
// the k and r lines through; Bs = 3 selects B(2) and forces k = 3 (unary
// inverter becomes the binary inverter) and every r = 0 (clockwise cycling
// becomes a buffer). NR is the number of r lines served. A Bs level of 2 or
// more is read as B(2) (this design's choice for the unused levels).
// Purely combinational.
module dr_binary_select
  import dr_pkg::*;
#(
  parameter int unsigned NR = 1
) (
  input  q4_t bs,
  input  q4_t k_in,
  input  q4_t r_in [NR],
  output q4_t k,
  output q4_t r    [NR]
);
  logic bin;
  always_comb begin
    bin = bs_binary(bs);
    k   = bin ? Q_MAX : k_in;
    for (int unsigned i = 0; i < NR; i++)
      r[i] = bin ? Q_ZERO : r_in[i];
  end
endmodule
