// tr_gate: 3x3 reversible TR gate.
//
// P = A, Q = A xor B, R = (A and not B) xor C. With C = 0 a single TR gate
// yields both the bit difference A xor B and the "A greater than B" term AB',
// which is why the comparator uses it as its per-bit stage. The P/Q/R
// equations follow the labels of the design's circuit diagram; the xor with C
// is the usual TR gate definition. Purely combinational.
module tr_gate (
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
    r = (a & ~b) ^ c;
  end
endmodule
