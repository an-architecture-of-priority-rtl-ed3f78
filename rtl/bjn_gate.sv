// bjn_gate: 3x3 reversible BJN gate, the last stage of every comparator here.
//
// P = A, Q = B, R = C xor (A or B). The comparator feeds it A = "equal",
// B = "greater" and C = 1, so R = NOR(equal, greater) = "less": the third
// relation is derived from the other two instead of being computed from the
// operands. The gate's role, its printed inputs and outputs and the NOR come
// from the design description; the exact form R = C xor (A or B) is this
// design's choice, the simplest reversible mapping that gives that NOR.
// Purely combinational.
module bjn_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = c ^ (a | b);
  end
endmodule
