// dr_table31_pos: the example two-variable P(4) function realized in the
// "sum of products of sums" canonical form (Vranesic algebra), built only from
// standard product-of-sums gates and MAX gates.
//
// Function (rows x1, columns x2 = 0..3):
//   x1=0: 2 2 2 3    x1=1: 1 2 3 0    x1=2: 1 0 0 0    x1=3: 2 1 1 0
// For each output value v = 1..3 one product of sums is formed that is zero
// exactly at the points where f = v. A sum (x1^r1 + x2^r2) is zero at the
// single point x1 = (4-r1) mod 4, x2 = (4-r2) mod 4, so every point is one
// sum with constant r lines. Each gate supplies two sums; when a value has
// more points, the extra sums come in through the expansion input x3 (f2 of
// one gate into x3 of the next). f2 does not include the gate's own x3, so
// for three gates the f2 outputs of the first two are joined by a MIN gate.
// The last gate's unary inverter, with k = v, emits v where the product is
// zero. The three terms are joined by MAX:
//   v=1: points (1,0) (2,0) (3,1) (3,2)        - two gates
//   v=2: points (0,0) (0,1) (0,2) (1,1) (3,0)  - three gates and a MIN
//                                                (last sum doubled)
//   v=3: points (0,3) (1,2)                    - one gate
// The term list follows the document's canonical expression; the chaining of
// gates through x3 is the use the document gives for that input.
//
// bs is the binary-select line shared by all gates. At bs = 3 every r line is
// forced to 0 and every k to 3, so with 0/3 inputs each term becomes
// NOT(x1 OR x2) and f = NOR(x1, x2): the same signal paths carry a binary
// function, which is what the canonical P(4) circuit turns into with its mode
// lines in the binary state. The f1 or f2 output a gate does not need is left
// unconnected. Purely combinational.
module dr_table31_pos
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t x1,
  input  q4_t x2,
  output q4_t f
);
  // r line that makes a sum vanish at x = p
  function automatic q4_t rz(int p);
    return q4_t'((4 - p) % 4);
  endfunction

  q4_t e1, t1, e2a, e2b, e2, t2, t3, u12;

  // value 1
  dr_pos_gate u_v1a (.bs(bs), .x1a(x1), .x2a(x2), .x1b(x1), .x2b(x2), .x3(Q_MAX),
    .r1a(rz(1)), .r2a(rz(0)), .r1b(rz(2)), .r2b(rz(0)), .k(Q_MAX), .f1(), .f2(e1));
  dr_pos_gate u_v1b (.bs(bs), .x1a(x1), .x2a(x2), .x1b(x1), .x2b(x2), .x3(e1),
    .r1a(rz(3)), .r2a(rz(1)), .r1b(rz(3)), .r2b(rz(2)), .k(Q_ONE), .f1(t1), .f2());
  // value 2
  dr_pos_gate u_v2a (.bs(bs), .x1a(x1), .x2a(x2), .x1b(x1), .x2b(x2), .x3(Q_MAX),
    .r1a(rz(0)), .r2a(rz(0)), .r1b(rz(0)), .r2b(rz(1)), .k(Q_MAX), .f1(), .f2(e2a));
  dr_pos_gate u_v2b (.bs(bs), .x1a(x1), .x2a(x2), .x1b(x1), .x2b(x2), .x3(Q_MAX),
    .r1a(rz(0)), .r2a(rz(2)), .r1b(rz(1)), .r2b(rz(1)), .k(Q_MAX), .f1(), .f2(e2b));
  dr_min      u_v2m (.x1(e2a), .x2(e2b), .y(e2));
  dr_pos_gate u_v2c (.bs(bs), .x1a(x1), .x2a(x2), .x1b(x1), .x2b(x2), .x3(e2),
    .r1a(rz(3)), .r2a(rz(0)), .r1b(rz(3)), .r2b(rz(0)), .k(Q_TWO), .f1(t2), .f2());
  // value 3
  dr_pos_gate u_v3  (.bs(bs), .x1a(x1), .x2a(x2), .x1b(x1), .x2b(x2), .x3(Q_MAX),
    .r1a(rz(0)), .r2a(rz(3)), .r1b(rz(1)), .r2b(rz(2)), .k(Q_MAX), .f1(t3), .f2());

  dr_max u_or1 (.x1(t1),  .x2(t2), .y(u12));
  dr_max u_or2 (.x1(u12), .x2(t3), .y(f));
endmodule
