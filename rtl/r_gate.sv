// r_gate: 3x3 reversible R gate.
//
// P = A xor B, Q = A, R = (A and B) xor not C. With C = 1 the R output is the
// plain AND of A and B. This is the gate's usual definition from the
// reversible-logic literature. Purely combinational.
module r_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a ^ b;
    q = a;
    r = (a & b) ^ ~c;
  end
endmodule
