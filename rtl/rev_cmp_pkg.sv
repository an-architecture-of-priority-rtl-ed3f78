// rev_cmp_pkg: shared type of the reversible comparator.
//
// cell_e names the one-bit comparator stage that comp4_rev places at each bit
// position. CELL_TR is the bare TR gate followed by an inverter (the
// configuration the design is built around); the others are complete one-bit
// reversible comparator cells, each of which also drives an A<B output that the
// multi-bit network leaves unused.
package rev_cmp_pkg;

  typedef enum logic [2:0] {
    CELL_TR         = 3'd0,  // TR gate + NOT on its Q line
    CELL_PERES      = 3'd1,  // Feynman + Peres + BJN
    CELL_TOFFOLI    = 3'd2,  // Feynman + two Toffoli + BJN
    CELL_R          = 3'd3,  // Feynman + R + BJN
    CELL_URG        = 3'd4,  // Feynman + two URG + BJN
    CELL_FREDKIN    = 3'd5,  // two Feynman fan-outs + three Fredkin + BJN
    CELL_TR_FEYNMAN = 3'd6   // TR + Feynman + BJN
  } cell_e;

endpackage
