// tb_prio_net: self-checking testbench for the priority network.
//
// For every pair of 4-bit words A, B it forms the per-bit flags the one-bit
// stages would produce (x = A xnor B, g = A and not B), drives the default
// 4-bit network with them and compares eq/gt/lt with the integer comparison of
// A and B. A second instance at N = 6 is driven with 2000 random word pairs
// to exercise the generalised cascade.
module tb_prio_net;
  logic [3:0] a4, b4;
  logic [5:0] a6, b6;
  logic eq4, gt4, lt4, eq6, gt6, lt6;
  int checks = 0, failures = 0;

  prio_net dut4 (.x(~(a4 ^ b4)), .g(a4 & ~b4), .eq(eq4), .gt(gt4), .lt(lt4));
  prio_net #(.N(6)) dut6 (.x(~(a6 ^ b6)), .g(a6 & ~b6), .eq(eq6), .gt(gt6), .lt(lt6));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a6 = '0; b6 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if ({eq4, gt4, lt4} !== {i == j, i > j, i < j}) begin
          failures++;
          $display("FAIL N=4 A=%0d B=%0d got eq,gt,lt=%b%b%b", i, j, eq4, gt4, lt4);
        end
      end
    end
    for (int k = 0; k < 2000; k++) begin
      a6 = 6'($urandom);
      b6 = (k % 8 == 0) ? a6 : 6'($urandom);
      #1;
      checks++;
      if ({eq6, gt6, lt6} !== {a6 == b6, a6 > b6, a6 < b6}) begin
        failures++;
        $display("FAIL N=6 A=%0d B=%0d got eq,gt,lt=%b%b%b", a6, b6, eq6, gt6, lt6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
