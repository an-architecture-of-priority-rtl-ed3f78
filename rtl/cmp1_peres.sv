// cmp1_peres: one-bit reversible comparator built from Feynman, Peres and BJN
// gates.
//
// A Feynman gate with a constant 1 on its control inverts B. A Peres gate
// fed (A, B', 0) then gives A xor B' = (A xnor B) on Q, the equality flag, and
// A and B' on R, the greater-than flag. A BJN gate with a constant 1 passes both
// on and derives A<B as their NOR. Constant inputs: 1, 0, 1. Garbage outputs:
// garb[0] (Feynman P, always 1) and garb[1] (Peres P, a copy of A).
// The gate list, constants and garbage count follow the design description;
// the order of the lines into each gate is read from its diagram.
// Interface: a, b in; eq, gt, lt out; purely combinational.
module cmp1_peres (
  input  logic       a,
  input  logic       b,
  output logic       eq,
  output logic       gt,
  output logic       lt,
  output logic [1:0] garb
);
  logic b_n, e_int, g_int;

  feynman_gate u_fey (.a(1'b1), .b(b), .p(garb[0]), .q(b_n));
  peres_gate   u_per (.a(a), .b(b_n), .c(1'b0), .p(garb[1]), .q(e_int), .r(g_int));
  bjn_gate     u_bjn (.a(e_int), .b(g_int), .c(1'b1), .p(eq), .q(gt), .r(lt));
endmodule
