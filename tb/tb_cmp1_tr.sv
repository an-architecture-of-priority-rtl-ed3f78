// tb_cmp1_tr: exhaustive self-checking testbench for the one-bit comparator
// cmp1_tr.
//
// Applies the four input pairs (a,b) and compares {eq,gt,lt} with the
// one-bit comparator truth table: 00 -> equal, 01 -> less, 10 -> greater,
// 11 -> equal. It also compares the garbage lines with their expected values
// (garb = {1, A}) and checks that the four input pairs give four
// different output patterns: a reversible cell may not lose information.
module tb_cmp1_tr;
  logic a, b, eq, gt, lt;
  logic [1:0] garb;
  int checks = 0, failures = 0;
  // expected {eq,gt,lt} for ab = 00, 01, 10, 11
  localparam logic [2:0] EXP [4] = '{3'b100, 3'b001, 3'b010, 3'b100};
  localparam logic [1:0] EXP_G [4] = '{2'b10, 2'b10, 2'b11, 2'b11};
  logic [4:0] outs [4];

  cmp1_tr dut (.a(a), .b(b), .eq(eq), .gt(gt), .lt(lt), .garb(garb));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        #10;
        checks++;
        if ({eq, gt, lt} !== EXP[v]) begin
          failures++;
          $display("FAIL ab=%02b got eq,gt,lt=%03b expected %03b", 2'(v), {eq, gt, lt}, EXP[v]);
        end
        checks++;
        if (garb !== EXP_G[v]) begin
          failures++;
          $display("FAIL ab=%02b got garbage %b expected %b", 2'(v), garb, EXP_G[v]);
        end
        outs[v] = {eq, gt, lt, garb};
      end
    end
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++) begin
        checks++;
        if (outs[i] === outs[j]) begin
          failures++;
          $display("FAIL inputs %02b and %02b give the same outputs", 2'(i), 2'(j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
