`timescale 1ps / 1fs
// state_to_phase - turns the sampled state of one cell into its fine phase.
//
// Inside a cell only one input switches at a time and the inputs switch in
// order, so after polarity normalisation the K-bit state walks through a
// Johnson (twisted-ring) sequence of 2K codes per oscillator cycle:
// 0..0, 0..01, 0..011, ..., 1..1, 1..10, ..., 10..0, back to 0..0
// (bit 0 switches first).  The phase is the position in that sequence:
// the number of ones when bit 0 is set, otherwise 2K minus the number of
// ones.  The published design names this block; the Johnson decoding is this
// design's own, following from its tap polarities.
//
// Interface: b[K-1:0] sampled cell state, fine in 0..2K-1. Combinational.
module state_to_phase #(
  parameter int unsigned K  = 7,
  localparam int unsigned FW = $clog2(2 * K)
) (
  input  logic [K-1:0]  b,
  output logic [FW-1:0] fine
);

  logic [FW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < K; i++)
      ones = ones + FW'(b[i]);
    if (b[0])           fine = ones;
    else if (ones == 0) fine = '0;
    else                fine = FW'(2 * K) - ones;
  end

endmodule
