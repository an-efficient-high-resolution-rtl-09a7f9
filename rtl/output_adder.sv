`timescale 1ps / 1fs
// output_adder - sums the per-cell transition counts into the TDC output.
//
// Each measurement cell reports how many transitions its inputs made during
// the last measurement; their sum is the number of oscillator stage delays
// that fitted in the measurement interval, which is the TDC output (one LSB
// = one stage delay, about 6 ps).  The sum is registered on CLK and is
// OUT_W = 11 bits wide as in the published design; a count beyond the
// 11-bit full scale wraps modulo 2^11 (this design's choice).
//
// Interface: cell_out[N_CELLS] (each CELL_W bits) and in_valid, dout, valid.
// Timing: one CLK cycle from cell outputs to dout.
module output_adder #(
  parameter int unsigned N_CELLS = 7,
  parameter int unsigned CELL_W  = 9,
  parameter int unsigned OUT_W   = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CELL_W-1:0] cell_out [N_CELLS],
  input  logic              in_valid,
  output logic [OUT_W-1:0]  dout,
  output logic              valid
);

  logic [OUT_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int unsigned c = 0; c < N_CELLS; c++)
      sum = sum + OUT_W'(cell_out[c]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      dout  <= sum;
      valid <= in_valid;
    end

endmodule
