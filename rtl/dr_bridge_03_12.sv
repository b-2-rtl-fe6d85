// dr_bridge_03_12: bus bridge from the 0,3 binary mapping to the 1,2 mapping.
//
// Lets a binary circuit working on levels {0,3} talk to one working on {1,2}
// over a four-valued bus: 0 -> 1 and 3 -> 2. Driven from a full P(4) bus the
// output is always 1 or 2. Which side of the threshold the unused input levels
// 1 and 2 fall on is this design's choice: levels 0,1 give 1 and levels 2,3
// give 2. Purely combinational.
module dr_bridge_03_12
  import dr_pkg::*;
(
  input  q4_t x,
  output q4_t y
);
  always_comb y = (x >= Q_TWO) ? Q_TWO : Q_ONE;
endmodule
