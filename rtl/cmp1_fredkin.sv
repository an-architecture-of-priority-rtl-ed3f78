// cmp1_fredkin: one-bit reversible comparator built from Fredkin gates, two
// Feynman fan-out gates and a BJN gate.
//
// Two Feynman gates with constant-0 targets copy A and B. Fredkin(B, 1, 0)
// swaps its constants when B is 1, so its Q output is B' and its R output B.
// Fredkin(A, B', B) then routes B when A = 1 and B' when A = 0 to Q, which is
// A xnor B (equality). Fredkin(B, A, 0) routes A to Q only when B = 0, giving
// A and B' (greater). The BJN gate (constant 1) adds A<B.
// The design description gives the gate types, the two input fan-out Feynman
// gates and the outputs of this cell, but not its wiring; the arrangement here
// is this design's own. It uses four constant 0s and two constant 1s and has
// five garbage lines (garb[4:0]), one constant 1 and one garbage line fewer
// than the description counts.
// Interface: a, b in; eq, gt, lt out; purely combinational.
module cmp1_fredkin (
  input  logic       a,
  input  logic       b,
  output logic       eq,
  output logic       gt,
  output logic       lt,
  output logic [4:0] garb
);
  logic a1, a2, b1, b2, b_n, b_f, e_int, g_int;

  feynman_gate u_fa  (.a(a), .b(1'b0), .p(a1), .q(a2));
  feynman_gate u_fb  (.a(b), .b(1'b0), .p(b1), .q(b2));
  fredkin_gate u_fr1 (.a(b1), .b(1'b1), .c(1'b0), .p(garb[0]), .q(b_n), .r(b_f));
  fredkin_gate u_fr2 (.a(a1), .b(b_n), .c(b_f), .p(garb[1]), .q(e_int), .r(garb[2]));
  fredkin_gate u_fr3 (.a(b2), .b(a2), .c(1'b0), .p(garb[3]), .q(g_int), .r(garb[4]));
  bjn_gate     u_bjn (.a(e_int), .b(g_int), .c(1'b1), .p(eq), .q(gt), .r(lt));
endmodule
