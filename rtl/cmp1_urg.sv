// cmp1_urg: one-bit reversible comparator built from a Feynman gate, two URG
// gates and a BJN gate.
//
// The Feynman gate (control tied to 1) gives B'. The first URG, fed (0, B', A),
// reduces to an xor on P: B' xor A = A xnor B (equality), and passes B' and A
// on. The second URG, fed (B', A, 0), gives A and B' (greater) on R. The BJN
// gate (constant 1) adds A<B. Constant inputs: 1, 0, 0, 1. Garbage: garb[0]
// (Feynman P), garb[1] (A or B'), garb[2] (A). Gates, constant and garbage
// counts follow the design description; the line order between the two URG
// gates is this design's reading of its diagram.
// Interface: a, b in; eq, gt, lt out; purely combinational.
module cmp1_urg (
  input  logic       a,
  input  logic       b,
  output logic       eq,
  output logic       gt,
  output logic       lt,
  output logic [2:0] garb
);
  logic b_n, e_int, g_int, b_n_u1, a_u1;

  feynman_gate u_fey  (.a(1'b1), .b(b), .p(garb[0]), .q(b_n));
  urg_gate     u_urg1 (.a(1'b0), .b(b_n), .c(a), .p(e_int), .q(b_n_u1), .r(a_u1));
  urg_gate     u_urg2 (.a(b_n_u1), .b(a_u1), .c(1'b0), .p(garb[1]), .q(garb[2]), .r(g_int));
  bjn_gate     u_bjn  (.a(e_int), .b(g_int), .c(1'b1), .p(eq), .q(gt), .r(lt));
endmodule
