// comp4_rev: N-bit (default 4-bit) priority-based reversible magnitude
// comparator.
//
// Each bit position has a one-bit stage that produces the equality flag
// A[i] xnor B[i] and the greater flag A[i] and not B[i]. The priority network
// (prio_net) lets the most significant differing bit decide, and its closing
// BJN gate derives A<B from A=B and A>B, so only two of the three relations
// are ever computed from the operands.
//
// CELL selects the one-bit stage:
//   CELL_TR (default)  TR gate fed (A, B, 0) and a NOT on its A xor B line;
//                      the configuration the design is built around
//   CELL_PERES, CELL_TOFFOLI, CELL_R, CELL_URG, CELL_FREDKIN, CELL_TR_FEYNMAN
//                      the complete one-bit reversible comparators; their A<B
//                      and garbage outputs are not needed here and stay unread
// Every choice gives the same function. The structure, the default N = 4 and
// the port names aeb/agb/alb follow the design description; the cell
// selection by parameter and widths other than 4 are this design's additions.
// Interface: a, b in (N bits, unsigned); aeb, agb, alb out, exactly one of them
// high. Purely combinational: no clock, no reset, no registers.
module comp4_rev
  import rev_cmp_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter cell_e       CELL = CELL_TR
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         aeb,
  output logic         agb,
  output logic         alb
);
  logic [N-1:0] x;  // per-bit A xnor B
  logic [N-1:0] g;  // per-bit A and not B

  for (genvar i = 0; i < int'(N); i++) begin : g_bit
    if (CELL == CELL_TR) begin : g_tr
      logic p_g, q_x;
      tr_gate u_tr (.a(a[i]), .b(b[i]), .c(1'b0), .p(p_g), .q(q_x), .r(g[i]));
      assign x[i] = ~q_x;
    end else if (CELL == CELL_PERES) begin : g_peres
      logic lt_g; logic [1:0] garb;
      cmp1_peres u_c (.a(a[i]), .b(b[i]), .eq(x[i]), .gt(g[i]), .lt(lt_g), .garb(garb));
    end else if (CELL == CELL_TOFFOLI) begin : g_toffoli
      logic lt_g; logic [1:0] garb;
      cmp1_toffoli u_c (.a(a[i]), .b(b[i]), .eq(x[i]), .gt(g[i]), .lt(lt_g), .garb(garb));
    end else if (CELL == CELL_R) begin : g_r
      logic lt_g; logic garb;
      cmp1_r u_c (.a(a[i]), .b(b[i]), .eq(x[i]), .gt(g[i]), .lt(lt_g), .garb(garb));
    end else if (CELL == CELL_URG) begin : g_urg
      logic lt_g; logic [2:0] garb;
      cmp1_urg u_c (.a(a[i]), .b(b[i]), .eq(x[i]), .gt(g[i]), .lt(lt_g), .garb(garb));
    end else if (CELL == CELL_FREDKIN) begin : g_fredkin
      logic lt_g; logic [4:0] garb;
      cmp1_fredkin u_c (.a(a[i]), .b(b[i]), .eq(x[i]), .gt(g[i]), .lt(lt_g), .garb(garb));
    end else begin : g_tr_feynman
      logic lt_g; logic [1:0] garb;
      cmp1_tr u_c (.a(a[i]), .b(b[i]), .eq(x[i]), .gt(g[i]), .lt(lt_g), .garb(garb));
    end
  end

  prio_net #(.N(N)) u_net (.x(x), .g(g), .eq(aeb), .gt(agb), .lt(alb));

`ifndef SYNTHESIS
  // exactly one relation holds
  always_comb assert ($onehot({aeb, agb, alb}) || $isunknown({a, b}))
    else $error("comp4_rev: relations not one-hot");
`endif
endmodule
