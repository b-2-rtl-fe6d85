// dr_jk_memory: four-valued J-K memory element.
//
// Next state Q+ = J . /Q + /K . Q + J . /K  (MIN/MAX with strong negation).
// Feeding the stored value back into the set and clear inputs removes the
// non-deterministic states of the set/clear element. In the 0,3 mapping it is
// the binary J-K flip-flop: J=K=0 holds, J=3,K=0 sets, J=0,K=3 clears and
// J=K=3 toggles. It is also closed for the 1,2 mapping. Built from two MIN
// gates more than the set/clear element, as in the document.
//
// Clocked: one next-state step per rising clock edge, asynchronous active-low
// reset to 0. The clocking and the reset are this design's choices (the
// original is an asynchronous element used in fundamental mode).
module dr_jk_memory
  import dr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  q4_t  j,
  input  q4_t  k,
  output q4_t  q,
  output q4_t  q_n
);
  q4_t k_n, t_set, t_hold, t_jk, t_or, q_next;

  dr_complement u_kn  (.x(k),     .y(k_n));
  dr_complement u_qn  (.x(q),     .y(q_n));
  dr_min        u_ts  (.x1(j),    .x2(q_n),   .y(t_set));
  dr_min        u_th  (.x1(k_n),  .x2(q),     .y(t_hold));
  dr_min        u_tj  (.x1(j),    .x2(k_n),   .y(t_jk));
  dr_max        u_o1  (.x1(t_set), .x2(t_hold), .y(t_or));
  dr_max        u_o2  (.x1(t_or), .x2(t_jk),  .y(q_next));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= Q_ZERO;
    else        q <= q_next;
endmodule
