// dr_demux4: four-valued 1:4 demultiplexer with enable.
//
// Fans one bus line out to four destinations: y[s] = d and the other three
// outputs 0, when the enable e is not 0; all outputs 0 when e = 0. The
// four-valued select s uses the same threshold detection as dr_mux4.
// Purely combinational.
module dr_demux4
  import dr_pkg::*;
(
  input  q4_t d,
  input  q4_t s,
  input  q4_t e,
  output q4_t y [4]
);
  always_comb
    for (int unsigned i = 0; i < 4; i++)
      y[i] = (e != Q_ZERO && s == q4_t'(i)) ? d : Q_ZERO;
endmodule
