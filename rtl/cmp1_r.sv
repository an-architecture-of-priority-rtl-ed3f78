// cmp1_r: one-bit reversible comparator built from a Feynman gate, an R gate
// and a BJN gate.
//
// The Feynman gate (control tied to 1) gives B' and forwards the 1. Both feed
// the R gate together with A: R(A, B', 1) gives A xor B' = A xnor B (equality)
// on P, a copy of A on Q (the only garbage line) and A and B' (greater) on R,
// since the R gate inverts its third input before the xor. The BJN gate
// (constant 1) adds A<B. Constant inputs: two 1s. Gates, constants and
// garbage follow the design description; the line order is read from its
// diagram. Interface: a, b in; eq, gt, lt out; purely combinational.
module cmp1_r (
  input  logic a,
  input  logic b,
  output logic eq,
  output logic gt,
  output logic lt,
  output logic garb
);
  logic one_f, b_n, e_int, g_int;

  feynman_gate u_fey (.a(1'b1), .b(b), .p(one_f), .q(b_n));
  r_gate       u_r   (.a(a), .b(b_n), .c(one_f), .p(e_int), .q(garb), .r(g_int));
  bjn_gate     u_bjn (.a(e_int), .b(g_int), .c(1'b1), .p(eq), .q(gt), .r(lt));
endmodule
