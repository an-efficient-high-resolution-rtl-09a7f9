`timescale 1ps / 1fs
// gro_tdc_pkg - constants and elaboration-time functions shared by the
// gated-ring-oscillator TDC.
//
// The oscillator has 47 stages whose outputs Z1..Z47 are carried here as a
// 47-bit vector z[46:0] (z[i] is Z(i+1)).  Stages switch in ring order, one
// every 6 ps, so one oscillator cycle holds 94 transitions.  The outputs are
// split into 7 measurement cells, six with 7 inputs and one with 5, so that
// inside a cell no two inputs switch at the same moment.  The stage count,
// cell sizes, 6 ps step and 11-bit output width follow the published design.
//
// Which stage goes to which cell is this design's own choice: the stages are
// visited in steps of 7 around the ring (Z1, Z8, Z15, ...), a walk that
// reaches all 47 because 47 is prime, and the walk is cut into consecutive
// runs of 7,7,7,7,7,7,5 stages.  Two inputs of one cell are then at least
// 5 stages (30 ps) apart.  The counter width is also this design's choice.
package gro_tdc_pkg;

  localparam int unsigned N_STAGES   = 47;  // GRO stages
  localparam int unsigned N_CELLS    = 7;   // measurement cells
  localparam int unsigned CELL_K_MAX = 7;   // inputs of cells 1..6
  localparam int unsigned CELL_K_MIN = 5;   // inputs of cell 7
  localparam int unsigned CELL_STRIDE = 7;  // stage step of the cell walk
  localparam int unsigned OUT_W      = 11;  // TDC output width
  localparam int unsigned CNT_W      = 5;   // phase wrap counter width
  localparam int unsigned CELL_OUT_W = 9;   // per-cell difference width

  // Number of inputs of cell c (0-based).
  function automatic int unsigned cell_size(int unsigned c);
    return (c == N_CELLS - 1) ? CELL_K_MIN : CELL_K_MAX;
  endfunction

  // Position of a stage along the stride-7 walk (0..46).
  function automatic int unsigned walk_index(int unsigned pos);
    for (int unsigned k = 0; k < N_STAGES; k++)
      if ((k * CELL_STRIDE) % N_STAGES == pos) return k;
    return 0;
  endfunction

  // Cell (0-based) that stage pos (0-based) belongs to.
  function automatic int unsigned cell_of(int unsigned pos);
    return walk_index(pos) / CELL_K_MAX;
  endfunction

  // Stage (0-based) feeding input j of cell c; inputs are numbered in ring
  // order, which is the order in which they switch.
  function automatic int unsigned cell_node(int unsigned c, int unsigned j);
    int unsigned n;
    n = 0;
    for (int unsigned pos = 0; pos < N_STAGES; pos++)
      if (cell_of(pos) == c) begin
        if (n == j) return pos;
        n++;
      end
    return 0;
  endfunction

  // Tap polarity of input j of cell c.  With these inversions every cell
  // input reads 0 at the cell's phase 0, the cell state then walks through
  // a Johnson (twisted-ring) sequence, and the last input rises exactly when
  // the cell phase wraps from 2K-1 to 0.  Taking the inverted tap is free in
  // hardware (complementary latch outputs).
  function automatic logic cell_pol(int unsigned c, int unsigned j);
    int unsigned last;
    last = cell_node(c, cell_size(c) - 1);
    return 1'b1 ^ logic'((last - cell_node(c, j)) & 1);
  endfunction

endpackage
