// mct_gate: multiple-control Toffoli gate with NC controls.
//
// Every control line passes through unchanged; the target output is the target
// input xor the AND of all controls. On a constant-0 target it is an NC-input
// AND, on a constant-1 target a NAND. The priority network of the comparator
// draws these as a vertical line with dots on the controls and a circled plus
// on the target. Purely combinational.
module mct_gate #(
  parameter int unsigned NC = 2
) (
  input  logic [NC-1:0] ctl_in,
  input  logic          tgt_in,
  output logic [NC-1:0] ctl_out,
  output logic          tgt_out
);
  always_comb begin
    ctl_out = ctl_in;
    tgt_out = tgt_in ^ (&ctl_in);
  end
endmodule
