// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// P = A, Q = B, R = (A and B) xor C. A and B are controls, C the target.
// Standard definition of the gate. Purely combinational.
module toffoli_gate (
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
    r = (a & b) ^ c;
  end
endmodule
