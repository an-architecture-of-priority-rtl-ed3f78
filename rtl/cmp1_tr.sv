// cmp1_tr: one-bit reversible comparator built from a TR gate, a Feynman gate
// and a BJN gate.
//
// TR(A, B, 0) gives A (garbage), A xor B and A and B' (greater). A Feynman
// gate with its control tied to 1 inverts A xor B into A xnor B (equality).
// The BJN gate (constant 1) adds A<B as the NOR of the two flags. Constant
// inputs: 0, 1, 1. Garbage: garb[0] (TR P), garb[1] (Feynman P, always 1).
// Gates, constants, garbage and wiring follow the design's diagram of this
// cell. Interface: a, b in; eq, gt, lt out; purely combinational.
module cmp1_tr (
  input  logic       a,
  input  logic       b,
  output logic       eq,
  output logic       gt,
  output logic       lt,
  output logic [1:0] garb
);
  logic x_int, e_int, g_int;

  tr_gate      u_tr  (.a(a), .b(b), .c(1'b0), .p(garb[0]), .q(x_int), .r(g_int));
  feynman_gate u_fey (.a(1'b1), .b(x_int), .p(garb[1]), .q(e_int));
  bjn_gate     u_bjn (.a(e_int), .b(g_int), .c(1'b1), .p(eq), .q(gt), .r(lt));
endmodule
