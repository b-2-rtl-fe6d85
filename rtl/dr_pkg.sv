// dr_pkg: shared types and constants of the B(2):P(4) dual radix gate set.
//
// Every four-valued (P(4)) signal is carried as one 2-bit digit, q4_t, whose
// unsigned value 0..3 is the logic level (in the original current-mode circuits
// it is the number of unit currents on the wire). A binary (B(2)) signal is
// carried on the same digit using one of the two homomorphic mappings of B(2)
// into P(4): levels {0,3} (the 0,3 mapping, the one most circuits favour) or
// levels {1,2}. The radix of a gate is therefore a matter of interpretation,
// not of wiring: the same q4_t wires carry binary and quaternary values.
//
// The mode control lines Bs (binary select) and Fs (function select) are
// themselves P(4) lines that take the values 0 and 3. How an intermediate value
// (1 or 2) on a mode line is read is this design's choice: a level of 2 or
// more counts as 3 (see bs_binary below).
package dr_pkg;

  // Radix: m = 2^N with N = 2, so P(4).
  localparam int unsigned DR_N = 2;
  localparam int unsigned DR_M = 1 << DR_N;

  typedef logic [DR_N-1:0] q4_t;

  localparam q4_t Q_ZERO = q4_t'(0);
  localparam q4_t Q_ONE  = q4_t'(1);
  localparam q4_t Q_TWO  = q4_t'(2);
  localparam q4_t Q_MAX  = q4_t'(DR_M - 1);   // unit element, logic "3"

  // Level used for a binary 0 / 1 in the two homomorphic mappings.
  typedef enum logic {MAP_03 = 1'b0, MAP_12 = 1'b1} b2_mapping_e;

  // A mode line (Bs, Fs, E) counts as asserted at level 2 or above.
  function automatic logic bs_binary(q4_t v);
    return v[DR_N-1];
  endfunction

endpackage
