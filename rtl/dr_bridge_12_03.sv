// dr_bridge_12_03: bus bridge from the 1,2 binary mapping to the 0,3 mapping.
//
// 1 -> 0 and 2 -> 3; driven from a full P(4) bus the output is always 0 or 3.
// The unused input levels are thresholded between 1 and 2 (this design's
// choice): levels 0,1 give 0 and levels 2,3 give 3. Purely combinational.
module dr_bridge_12_03
  import dr_pkg::*;
(
  input  q4_t x,
  output q4_t y
);
  always_comb y = (x >= Q_TWO) ? Q_MAX : Q_ZERO;
endmodule
