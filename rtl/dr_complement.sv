// dr_complement: dual radix complement gate (strong negation).
//
// y = (m-1) - x, i.e. 3 - x in P(4). In the current-mode original this is a
// single current mirror: the input current is mirrored out of a three-unit
// source and what is left flows to the output. The same gate is the binary
// complement for both homomorphic mappings of B(2): it swaps 0 and 3 (0,3
// mapping) and 1 and 2 (1,2 mapping), so it needs no mode line.
// Purely combinational, no delay. The behaviour follows the document exactly.
module dr_complement
  import dr_pkg::*;
(
  input  q4_t x,
  output q4_t y
);
  always_comb y = Q_MAX - x;
endmodule
