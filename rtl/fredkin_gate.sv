// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// P = A, Q = (not A and B) or (A and C), R = (not A and C) or (A and B):
// when A is 1, B and C swap places. Standard definition of the gate. Purely
// combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end
endmodule
