// urg_gate: 3x3 universal reversible gate (URG).
//
// P = (A or B) xor C, Q = B, R = (A and B) xor C. With A = 0 the P output is
// B xor C; with C = 0 it gives OR on P and AND on R. Usual definition of the
// gate. Purely combinational.
module urg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = (a | b) ^ c;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
