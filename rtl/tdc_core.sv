`timescale 1ps / 1fs
// tdc_core - digital back end of the gated-ring-oscillator TDC.
//
// The 47 oscillator outputs are partitioned into 7 cells (six of 7 inputs,
// one of 5) so that within a cell only one input switches at a time and the
// sampled cell state can be decoded reliably.  Each cell has its own state
// register (master-slave latch pair), de-glitch C-element and measurement
// cell (phase wrap counter, state-to-phase logic, differentiator); the output
// adder sums the seven per-cell counts into the 11-bit result.  Only seven
// counters are needed instead of one per transition of the oscillator.
//
// Cell c takes the stages found at walk positions 7c .. 7c+K-1 of the walk
// Z1, Z8, Z15, ... (steps of 7 stages, see gro_tdc_pkg), in ring order,
// each through a fixed tap polarity so that the cell state is a Johnson
// code.  A'1 and A'2 of the de-glitch element are the complements of the
// cell's last two inputs (the complementary latch outputs), so T rises when
// the cell phase wraps.  The cell and counter counts, the 11-bit output and
// the block structure follow the published design; the stage-to-cell map,
// the polarities and the widths are this design's own.
//
// Interface: z[46:0] = Z1..Z47, clk (sampling clock, low while the
// oscillator is enabled), clk_dly (delayed clock for the counters), rst_n.
// dout is the number of stage delays in the measurement that ended two CLK
// rising edges earlier; valid marks dout as meaningful after reset.
module tdc_core
  import gro_tdc_pkg::*;
(
  input  logic                rst_n,
  input  logic                clk,
  input  logic                clk_dly,
  input  logic [N_STAGES-1:0] z,
  output logic [OUT_W-1:0]    dout,
  output logic                valid
);

  logic [CELL_OUT_W-1:0] cell_out [N_CELLS];
  logic [N_CELLS-1:0]    cell_valid;

  for (genvar c = 0; c < N_CELLS; c++) begin : g_cell
    localparam int unsigned K = cell_size(c);

    logic [K-1:0] d, a_q, b_q;
    logic         t;

    // Partition: route stage cell_node(c, j) with its polarity to input j.
    for (genvar j = 0; j < K; j++) begin : g_tap
      assign d[j] = z[cell_node(c, j)] ^ cell_pol(c, j);
    end

    cell_state_register #(.K(K)) u_state (
      .clk(clk),
      .d  (d),
      .a_q(a_q),
      .b_q(b_q)
    );

    deglitch u_deglitch (
      .rst_n(rst_n),
      .a1   (~a_q[K-2]),
      .a2   (~a_q[K-1]),
      .t    (t)
    );

    measurement_cell #(.K(K), .CNT_W(CNT_W), .OUT_W(CELL_OUT_W)) u_cell (
      .rst_n    (rst_n),
      .clk      (clk),
      .clk_dly  (clk_dly),
      .b        (b_q),
      .t        (t),
      .cell_out (cell_out[c]),
      .out_valid(cell_valid[c])
    );
  end

  output_adder #(.N_CELLS(N_CELLS), .CELL_W(CELL_OUT_W), .OUT_W(OUT_W)) u_adder (
    .clk     (clk),
    .rst_n   (rst_n),
    .cell_out(cell_out),
    .in_valid(&cell_valid),
    .dout    (dout),
    .valid   (valid)
  );

endmodule
