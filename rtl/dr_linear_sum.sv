// dr_linear_sum: linear summation by wired current mirrors.
//
// out = W1*x1 + W2*x2 + W3*x3 (plain arithmetic addition, no modulo). In the
// current-mode technology a weight n is n mirror collectors tied together and
// the sum is simply the joined output wires, so the result is a count of unit
// currents that can exceed 3; it is carried here as an unsigned number wide
// enough for the largest sum. The default weights 1, 2, 3 are the document's
// example x1 + 2x2 + 3x3. Feeding the count to a threshold (compare) gives the
// threshold operators used by the full adder's carry. Purely combinational.
module dr_linear_sum
  import dr_pkg::*;
#(
  parameter int unsigned W1 = 1,
  parameter int unsigned W2 = 2,
  parameter int unsigned W3 = 3,
  parameter int unsigned OW = $clog2((W1 + W2 + W3) * (DR_M - 1) + 1)
) (
  input  q4_t          x1,
  input  q4_t          x2,
  input  q4_t          x3,
  output logic [OW-1:0] sum
);
  always_comb
    sum = OW'(W1 * 32'(x1) + W2 * 32'(x2) + W3 * 32'(x3));
endmodule
