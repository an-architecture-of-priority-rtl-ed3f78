// peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A xor B, R = (A and B) xor C (a Toffoli followed by a Feynman).
// Standard definition of the gate. Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
