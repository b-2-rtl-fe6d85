// dr_min: dual radix MIN/AND gate.
//
// y = MIN(x1, x2), the AND gate for every mapping of B(2) into P(4). As in the
// document it is built from the MAX gate: both inputs are complemented, their
// MAX is taken and the result complemented again (De Morgan in P(4) with the
// strong negation). Purely combinational, no mode line.
module dr_min
  import dr_pkg::*;
(
  input  q4_t x1,
  input  q4_t x2,
  output q4_t y
);
  q4_t x1_n, x2_n, max_n;

  dr_complement u_c1 (.x(x1),    .y(x1_n));
  dr_complement u_c2 (.x(x2),    .y(x2_n));
  dr_max        u_mx (.x1(x1_n), .x2(x2_n), .y(max_n));
  dr_complement u_co (.x(max_n), .y(y));
endmodule
