// tb_comp4_full: full-size testbench of the comparator at its default
// parameters (4 bits, TR-gate stage).
//
// First it replays, one pair every 20 ns, the operand sequence of the
// design's published simulation run:
//   A: 8 9 10 11 12 13 14 15 0 1 2 3 4 5 6
//   B: 12 13 15 14 10 11 9 8 0 1 3 2 6 7 5
// Then it applies all 256 operand pairs. Every result is compared with the
// integer comparison of the operands, and each run counts how often A=B, A>B
// and A<B occurred, failing if one of them never did.
module tb_comp4_full;
  logic [3:0] a, b;
  logic aeb, agb, alb;
  int checks = 0, failures = 0;
  int n_eq, n_gt, n_lt;

  localparam int NW = 15;
  localparam logic [3:0] WAVE_A [NW] = '{8, 9, 10, 11, 12, 13, 14, 15, 0, 1, 2, 3, 4, 5, 6};
  localparam logic [3:0] WAVE_B [NW] = '{12, 13, 15, 14, 10, 11, 9, 8, 0, 1, 3, 2, 6, 7, 5};

  comp4_rev dut (.a(a), .b(b), .aeb(aeb), .agb(agb), .alb(alb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0] x, input logic [3:0] y, input int step);
    a = x; b = y;
    repeat (step) #1;
    checks++;
    if ({aeb, agb, alb} !== {x == y, x > y, x < y}) begin
      failures++;
      $display("FAIL A=%0d B=%0d got aeb,agb,alb=%b%b%b", x, y, aeb, agb, alb);
    end
    n_eq += int'(aeb); n_gt += int'(agb); n_lt += int'(alb);
  endtask

  task automatic check_seen(input string what);
    checks++;
    if (n_eq == 0 || n_gt == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL %s: a relation never occurred (eq=%0d gt=%0d lt=%0d)", what, n_eq, n_gt, n_lt);
    end
    $display("%s: A=B %0d, A>B %0d, A<B %0d", what, n_eq, n_gt, n_lt);
  endtask

  initial begin
    n_eq = 0; n_gt = 0; n_lt = 0;
    for (int k = 0; k < NW; k++) apply(WAVE_A[k], WAVE_B[k], 20);
    check_seen("published sequence");
    n_eq = 0; n_gt = 0; n_lt = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) apply(4'(i), 4'(j), 1);
    check_seen("exhaustive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
