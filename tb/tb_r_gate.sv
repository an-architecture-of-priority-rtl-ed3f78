// tb_r_gate: exhaustive self-checking testbench for r_gate.
//
// Applies all eight input combinations {a,b,c} and compares {p,q,r} with a
// truth table written out from the gate equations (P = A xor B, Q = A, R = (A and B) xor not C).
// It also checks that the eight output patterns are all different, i.e. that
// the gate is reversible (a bijection on three bits).
module tb_r_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  localparam logic [2:0] EXP [8] = '{3'b001, 3'b000, 3'b101, 3'b100, 3'b111, 3'b110, 3'b010, 3'b011};
  logic [7:0] seen;

  r_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #10;
      checks++;
      if ({p, q, r} !== EXP[v]) begin
        failures++;
        $display("FAIL abc=%03b got pqr=%03b expected %03b", 3'(v), {p, q, r}, EXP[v]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs are not a permutation: seen=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
