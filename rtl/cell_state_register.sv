`timescale 1ps / 1fs
// cell_state_register - master-slave sampling of the K oscillator outputs
// that feed one measurement cell.
//
// Two D-latches in series form a master-slave flip-flop.  The first latch
// is open while CLK is low, which is the window in which the oscillator runs,
// so its outputs A' follow the oscillator and are what the de-glitch logic
// watches.  When CLK rises at the end of a measurement the first latch closes
// and the second opens, so B carries the frozen state to the state-to-phase
// logic and holds it through the following low phase of CLK.  The latch pair
// and the tap of A' between them follow the published cell schematic.
//
// Interface: d[K-1:0] oscillator outputs (already polarity-normalised),
// a_q = A' (master outputs), b_q = B (slave outputs).
// Timing: B changes at the rising edge of CLK and equals the oscillator state
// at that edge.  The master latch is intended (its output A' must follow the
// oscillator while it runs), so the latch warning for it is expected.  The
// slave latch is written as the flip-flop it is equivalent to (see below);
// that rewriting is this design's choice.
module cell_state_register #(
  parameter int unsigned K = 7
) (
  input  logic         clk,
  input  logic [K-1:0] d,
  output logic [K-1:0] a_q,
  output logic [K-1:0] b_q
);

  // Master latch, transparent while CLK is low.
  always_latch
    if (!clk) a_q = d;

  // Slave stage.  While CLK is high the master is closed, so a slave latch
  // open during that phase only ever passes the value the master held at
  // the rising edge; it is written here as that edge-triggered equivalent,
  // which gives the downstream CLK flip-flops a clean hold time.
  always_ff @(posedge clk)
    b_q <= a_q;

endmodule
