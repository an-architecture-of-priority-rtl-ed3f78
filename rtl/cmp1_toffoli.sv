// cmp1_toffoli: one-bit reversible comparator built from a Feynman gate, two
// Toffoli gates and a BJN gate.
//
// The Feynman gate (control tied to 1) turns B into B' and hands the constant 1
// on. The first Toffoli, target 0, ANDs A with B' into the greater-than flag.
// The second Toffoli uses the forwarded 1 as one control, so it acts as a
// controlled-NOT of B' onto A and produces A xnor B, the equality flag. The
// BJN gate (constant 1) derives A<B as the NOR of the two flags. Constant
// inputs: 1, 0, 1. Garbage: garb[0] (the forwarded 1), garb[1] (B').
// Gates, constants and garbage count follow the design description; which
// line is control and which target is read from its diagram.
// Interface: a, b in; eq, gt, lt out; purely combinational.
module cmp1_toffoli (
  input  logic       a,
  input  logic       b,
  output logic       eq,
  output logic       gt,
  output logic       lt,
  output logic [1:0] garb
);
  logic one_f, b_n, a_t1, b_n_t1, e_int, g_int;

  feynman_gate u_fey (.a(1'b1), .b(b), .p(one_f), .q(b_n));
  toffoli_gate u_tf1 (.a(a), .b(b_n), .c(1'b0), .p(a_t1), .q(b_n_t1), .r(g_int));
  toffoli_gate u_tf2 (.a(one_f), .b(b_n_t1), .c(a_t1), .p(garb[0]), .q(garb[1]), .r(e_int));
  bjn_gate     u_bjn (.a(e_int), .b(g_int), .c(1'b1), .p(eq), .q(gt), .r(lt));
endmodule
