// dr_sc_memory: four-valued set/clear memory (cross-coupled MAX element).
//
// Next state Q+ = S + /C . Q  (MAX of S with MIN(3-C, Q)). S raises the stored
// level, C lowers it; with S = C = 0 the element holds. It is compatible with
// both binary mappings: fed with 0/3 (or 1/2) levels it stays in the same
// mapping. When the arithmetic sum S + C reaches 4 the cross-coupled circuit's
// next state is not deterministic (the analogue of S = R = 1 in a binary RS
// latch); the equation's value is still stored, and nondet flags the case.
//
// The original element is asynchronous and works in fundamental mode. Here it
// is a clocked register that takes one next-state step per rising clock edge
// (this design's choice); rst_n clears it to 0 (also this design's choice).
// q_n is the complemented output of the cross-coupled pair.
module dr_sc_memory
  import dr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  q4_t  s,
  input  q4_t  c,
  output q4_t  q,
  output q4_t  q_n,
  output logic nondet
);
  q4_t c_n, hold, q_next;

  dr_complement u_cn  (.x(c),   .y(c_n));
  dr_min        u_hld (.x1(c_n), .x2(q),    .y(hold));
  dr_max        u_set (.x1(s),   .x2(hold), .y(q_next));
  dr_complement u_qn  (.x(q),   .y(q_n));

  always_comb nondet = (32'(s) + 32'(c)) >= DR_M;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= Q_ZERO;
    else        q <= q_next;
endmodule
