`timescale 1ps / 1fs
// deglitch - de-glitch element in front of a cell's phase wrap counter.
//
// After the oscillator is gated off, charge sharing can leave a stage output
// near the logic threshold and make it cross that threshold more than once.
// The cell input A'2 whose rising edge marks a full cell cycle is therefore
// combined with A'1, the cell input that switches just before it, in a
// Muller C-element: T copies A'2 only when A'1 agrees with it and holds
// otherwise.  That is the published truth table:
//   A'1=1, A'2 rises -> T rises      A'1=1, A'2 falls -> T holds
//   A'1=0, A'2 falls -> T falls      A'1=0, A'2 rises -> T holds
// so a glitch 1-0-1 on A'2 while A'1 is 1 produces a single rising edge on T,
// giving the counter exactly one rising edge per oscillator cycle.
//
// Interface: a1, a2 (A'1, A'2 from the master latches), rst_n, t (T).
// The reset, which loads T from A'2, is this design's addition so that T
// starts consistent with the oscillator state.  The held state is a latch by
// design (the keeper of the C-element); the latch warning for it is expected.
module deglitch (
  input  logic rst_n,
  input  logic a1,
  input  logic a2,
  output logic t
);

  always_latch
    if (!rst_n || (a1 == a2)) t = a2;

endmodule
