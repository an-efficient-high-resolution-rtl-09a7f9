`timescale 1ps / 1fs
// measurement_cell - counts the transitions one cell of the oscillator made
// during the last measurement.
//
// The cell combines three parts of the published cell schematic: the phase
// wrap counter (counts rising edges of the de-glitched T, read with the
// delayed clock), the state-to-phase logic (fine phase from the sampled
// state B), and the phase differentiator (coarse * 2K + fine, differenced
// from one CLK edge to the next, with the counter's overflow correcting a
// wrap).  The sum over all cells is the oscillator's transition count, i.e.
// the measured time in stage delays.
//
// Interface: b[K-1:0] sampled state, t de-glitched wrap edge, clk, clk_dly,
// rst_n; cell_out / out_valid to the output adder.
// Timing: cell_out for the measurement that ended at CLK edge n appears
// after CLK edge n+1.
module measurement_cell #(
  parameter int unsigned K     = 7,
  parameter int unsigned CNT_W = 5,
  parameter int unsigned OUT_W = 9
) (
  input  logic             rst_n,
  input  logic             clk,
  input  logic             clk_dly,
  input  logic [K-1:0]     b,
  input  logic             t,
  output logic [OUT_W-1:0] cell_out,
  output logic             out_valid
);

  localparam int unsigned FW = $clog2(2 * K);

  logic [CNT_W-1:0] coarse;
  logic             overflow;
  logic [FW-1:0]    fine;

  phase_wrap_counter #(.CNT_W(CNT_W)) u_counter (
    .rst_n   (rst_n),
    .t       (t),
    .clk_dly (clk_dly),
    .coarse  (coarse),
    .overflow(overflow)
  );

  state_to_phase #(.K(K)) u_s2p (
    .b   (b),
    .fine(fine)
  );

  phase_differentiator #(.K(K), .CNT_W(CNT_W), .OUT_W(OUT_W)) u_diff (
    .clk      (clk),
    .rst_n    (rst_n),
    .coarse   (coarse),
    .fine     (fine),
    .overflow (overflow),
    .cell_out (cell_out),
    .out_valid(out_valid)
  );

endmodule
