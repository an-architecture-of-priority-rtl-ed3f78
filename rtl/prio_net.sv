// prio_net: MSB-first priority network that turns per-bit compare flags into
// the three relations of two N-bit words, built from reversible gates.
//
// Inputs are, for every bit i, the equality flag x[i] = A[i] xnor B[i] and the
// greater flag g[i] = A[i] and not B[i]. The highest bit that differs decides:
//   A=B = x[N-1] & ... & x[0]                 (one N-control Toffoli, target 0)
//   t[N-1] = g[N-1]
//   t[i]   = x[N-1] & ... & x[i+1] & g[i]      (one Toffoli per bit, target 0)
//   A>B = t[N-1] | ... | t[0]
// The OR is formed reversibly by De Morgan: each t[i] is inverted and an
// N-control Toffoli on a constant-1 line gives 1 xor AND(~t) = OR(t). A final
// BJN gate with a constant 1 passes A=B and A>B through and adds A<B as their
// NOR. For N = 4 this is the network drawn for the 4-bit comparator; other N
// extend the same cascade (this design's generalisation). The control lines
// that each gate passes through are garbage and left unread.
// Interface: x, g in (N bits each); eq, gt, lt out. Purely combinational.
module prio_net #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] g,
  output logic         eq,
  output logic         gt,
  output logic         lt
);
  logic [N-1:0] t;        // partial greater terms, one per bit
  logic [N-1:0] t_n;      // inverted partial terms
  logic [N-1:0] eq_ctl;   // pass-through control lines (garbage)
  logic [N-1:0] or_ctl;   // pass-through control lines (garbage)
  logic         eq_int, gt_int;

  // A=B: AND of all equality flags onto a constant-0 line
  mct_gate #(.NC(N)) u_eq (.ctl_in(x), .tgt_in(1'b0), .ctl_out(eq_ctl), .tgt_out(eq_int));

  // the most significant bit needs no gate: its greater flag is its term
  assign t[N-1] = g[N-1];

  for (genvar i = 0; i < int'(N) - 1; i++) begin : g_term
    logic [N-i-1:0] ctl_o;  // pass-through control lines (garbage)
    mct_gate #(.NC(N - i)) u_t (
      .ctl_in ({x[N-1:i+1], g[i]}),
      .tgt_in (1'b0),
      .ctl_out(ctl_o),
      .tgt_out(t[i])
    );
  end

  // inverters (NOT gates) in front of the OR gate
  assign t_n = ~t;

  // A>B = NOT(AND(~t)) onto a constant-1 line
  mct_gate #(.NC(N)) u_gt (.ctl_in(t_n), .tgt_in(1'b1), .ctl_out(or_ctl), .tgt_out(gt_int));

  bjn_gate u_bjn (.a(eq_int), .b(gt_int), .c(1'b1), .p(eq), .q(gt), .r(lt));
endmodule
