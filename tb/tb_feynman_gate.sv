// tb_feynman_gate: exhaustive self-checking testbench for feynman_gate.
//
// Applies all four input pairs and compares {p,q} with the truth table of
// P = A, Q = A xor B, then checks that the four outputs are all different.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #10;
      checks++;
      if ({p, q} !== EXP[v]) begin
        failures++;
        $display("FAIL ab=%02b got pq=%02b expected %02b", 2'(v), {p, q}, EXP[v]);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL outputs are not a permutation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
