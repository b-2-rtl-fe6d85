// dr_sop_gate: standard B(2):P(4) "sum of products" gate (Allen-Givone
// algebra).
//
// Four literals, each with its own bound pair (a,b), are MINed in pairs and the
// two products are MAXed:
//   pa = lit(x1A; a1A,b1A) . lit(x2A; a2A,b2A)
//   pb = lit(x1B; a1B,b1B) . lit(x2B; a2B,b2B)
//   f  = pa + pb
// The products pa and pb are also brought out, so that constant weights and
// further MIN/MAX gates can complete the canonical form. Each literal's bounds
// pass through a literal-select stage: with Bs = 3 every literal becomes a
// buffer (Fs = 3, f = x1A.x2A + x1B.x2B, AND-OR) or an inverter (Fs = 0,
// f = /x1A./x2A + /x1B./x2B) for the 0,3 mapping. One Bs and one Fs line serve
// the whole gate. Purely combinational.
module dr_sop_gate
  import dr_pkg::*;
(
  input  q4_t bs,
  input  q4_t fs,
  input  q4_t x [4],   // x1A, x2A, x1B, x2B
  input  q4_t a [4],   // lower bounds, same order
  input  q4_t b [4],   // upper bounds, same order
  output q4_t pa,
  output q4_t pb,
  output q4_t f
);
  q4_t a_eff [4];
  q4_t b_eff [4];
  q4_t lit   [4];

  for (genvar i = 0; i < 4; i++) begin : g_lit
    dr_literal_select u_sel (
      .bs(bs), .fs(fs), .a_in(a[i]), .b_in(b[i]), .a(a_eff[i]), .b(b_eff[i])
    );
    dr_literal u_lit (.x(x[i]), .a(a_eff[i]), .b(b_eff[i]), .y(lit[i]));
  end

  dr_min u_mina (.x1(lit[0]), .x2(lit[1]), .y(pa));
  dr_min u_minb (.x1(lit[2]), .x2(lit[3]), .y(pb));
  dr_max u_max  (.x1(pa),     .x2(pb),     .y(f));
endmodule
