// dr_mux4: four-valued 4:1 multiplexer (T-gate) with enable.
//
// y = d[s] when the enable line e is not 0, and 0 (no current) when e = 0.
// The select s is itself a four-valued line: its level picks one of four data
// inputs, which the original circuit does with threshold detectors on s. The
// enable lets several multiplexers share common select lines while driving one
// bus. A T-gate can realize any four-valued function of s when its data inputs
// are constants or other variables. Purely combinational.
module dr_mux4
  import dr_pkg::*;
(
  input  q4_t d [4],
  input  q4_t s,
  input  q4_t e,
  output q4_t y
);
  always_comb y = (e != Q_ZERO) ? d[s] : Q_ZERO;
endmodule
