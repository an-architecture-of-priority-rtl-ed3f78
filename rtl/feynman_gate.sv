// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// P = A, Q = A xor B. A is the control, B the target. With B tied to a
// constant 0 it copies A (fan-out, which reversible circuits cannot do with a
// plain wire split); with A tied to 1 it inverts B. Purely combinational.
// The equations are the standard ones for this gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
