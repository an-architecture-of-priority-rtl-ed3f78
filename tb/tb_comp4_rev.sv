// tb_comp4_rev: end-to-end self-checking testbench for the reversible
// comparator.
//
// Instantiates the 4-bit comparator once for every one-bit stage (TR gate,
// Peres, Toffoli, R, URG, Fredkin and TR+Feynman cells), applies all 256
// operand pairs to all of them at once and compares aeb/agb/alb with the
// integer comparison of the operands. It also counts which mechanism decided
// each result: equality of all bits, or the priority decision at bit 3, 2, 1
// or 0 (the most significant differing bit), and fails if one never occurred.
// An 8-bit TR-stage instance is run on random pairs to cover a wider width.
module tb_comp4_rev;
  import rev_cmp_pkg::*;

  localparam int NV = 7;
  localparam cell_e CELLS [NV] = '{CELL_TR, CELL_PERES, CELL_TOFFOLI, CELL_R,
                                   CELL_URG, CELL_FREDKIN, CELL_TR_FEYNMAN};
  logic [3:0] a, b;
  logic [NV-1:0] aeb, agb, alb;
  logic [7:0] a8, b8;
  logic aeb8, agb8, alb8;
  int checks = 0, failures = 0;
  int decided_at [5];  // [0..3]: decided at that bit, [4]: all bits equal

  for (genvar v = 0; v < NV; v++) begin : g_var
    comp4_rev #(.N(4), .CELL(CELLS[v])) dut (
      .a(a), .b(b), .aeb(aeb[v]), .agb(agb[v]), .alb(alb[v]));
  end

  comp4_rev #(.N(8), .CELL(CELL_TR)) dut8 (.a(a8), .b(b8), .aeb(aeb8), .agb(agb8), .alb(alb8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int msb_diff(input logic [3:0] x, input logic [3:0] y);
    for (int k = 3; k >= 0; k--) if (x[k] != y[k]) return k;
    return 4;
  endfunction

  initial begin
    a8 = '0; b8 = '0;
    foreach (decided_at[k]) decided_at[k] = 0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        decided_at[msb_diff(a, b)]++;
        for (int v = 0; v < NV; v++) begin
          checks++;
          if ({aeb[v], agb[v], alb[v]} !== {i == j, i > j, i < j}) begin
            failures++;
            $display("FAIL %s A=%0d B=%0d got aeb,agb,alb=%b%b%b", CELLS[v].name(), i, j,
                     aeb[v], agb[v], alb[v]);
          end
        end
      end
    end
    for (int k = 0; k < 1000; k++) begin
      a8 = 8'($urandom);
      b8 = (k % 10 == 0) ? a8 : (k % 10 == 1) ? (a8 ^ 8'h01) : 8'($urandom);
      #1;
      checks++;
      if ({aeb8, agb8, alb8} !== {a8 == b8, a8 > b8, a8 < b8}) begin
        failures++;
        $display("FAIL N=8 A=%0d B=%0d got aeb,agb,alb=%b%b%b", a8, b8, aeb8, agb8, alb8);
      end
    end
    for (int k = 0; k < 5; k++) begin
      if (k < 4) $display("decided at bit %0d: %0d times", k, decided_at[k]);
      else       $display("all bits equal:    %0d times", decided_at[k]);
      checks++;
      if (decided_at[k] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
