`timescale 1ps / 1fs
// phase_differentiator - first-order difference of one cell's phase count.
//
// The cell's total phase count is coarse * 2K + fine, in units of one stage
// delay: the phase wrap counter gives whole cell cycles (2K transitions each)
// and the state-to-phase logic the position inside the cycle.  On every
// rising edge of CLK the block registers that total and outputs the total
// minus the one registered at the previous edge, i.e. the number of
// transitions this cell saw during the last measurement.  Because the
// oscillator keeps its state between measurements, the quantisation error of
// the output is q[k] - q[k-1], which is first-order noise shaped.  When the
// counter wrapped since its last read (`overflow`) the modulus
// M = 2^CNT_W * 2K is added back.  The difference and the overflow input
// follow the published design; widths and the valid flag are this design's.
//
// Timing: sampled on CLK; the inputs belong to the measurement that ended at
// the previous CLK rising edge, so the output lags that measurement by one
// CLK cycle.  The state seen at the first CLK edge after reset predates any
// measurement, so out_valid rises only at the third edge, the first whose
// difference spans two real measurements.
module phase_differentiator #(
  parameter int unsigned K      = 7,
  parameter int unsigned CNT_W  = 5,
  parameter int unsigned OUT_W  = 9,
  localparam int unsigned FW    = $clog2(2 * K),
  localparam int unsigned M     = (2 ** CNT_W) * 2 * K,
  localparam int unsigned TW    = $clog2(M) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] coarse,
  input  logic [FW-1:0]    fine,
  input  logic             overflow,
  output logic [OUT_W-1:0] cell_out,
  output logic             out_valid
);

  logic [TW-1:0] total, prev, diff;
  logic [1:0]    fill;   // totals registered since reset, saturating at 2

  // Coarse count scaled by the 2K transitions of one cell cycle, plus fine.
  assign total = TW'(coarse) * TW'(2 * K) + TW'(fine);
  assign diff  = overflow ? total + TW'(M) - prev : total - prev;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev      <= '0;
      fill      <= '0;
      cell_out  <= '0;
      out_valid <= 1'b0;
    end else begin
      prev      <= total;
      if (fill != 2'd2) fill <= fill + 1'b1;
      cell_out  <= OUT_W'(diff);
      out_valid <= (fill == 2'd2);
    end

endmodule
