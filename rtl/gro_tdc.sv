`timescale 1ps / 1fs
// gro_tdc - 11-bit, 50 MS/s noise-shaping time-to-digital converter built
// around a 47-stage multipath gated ring oscillator (top level).
//
// A measurement runs the oscillator for the Start-to-Stop interval and
// counts how many stage transitions happened.  The oscillator is frozen, not
// reset, between measurements, so the part of a stage delay left over at
// the end of one measurement is carried into the next: the output's
// quantisation error is q[k] - q[k-1], first-order shaped.  Counting is done
// by 7 measurement cells, each with one phase wrap counter and a decoder for
// the sampled oscillator state.
//
// Blocks: timing_gen (behavioural) makes EN and the sampling clocks,
// multipath_gro (behavioural) is the oscillator, tdc_core is the
// synthesizable digital back end.  The oscillator and timing generator are
// behavioural models, so this top is for simulation; tdc_core is the part
// to synthesize.
//
// GRO_MISMATCH_FS (default 0, the nominal ring) gives the oscillator model
// unequal stage delays, to study how mismatch is shaped.
//
// Interface: rst_n, start, stop; dout (stage delays counted in a
// measurement, 1 LSB = 6 ps), valid, and clk_out, the CLK that dout is
// registered on.  Timing: dout for a measurement is registered on the
// second rising edge of CLK after the end of that measurement.
module gro_tdc
  import gro_tdc_pkg::*;
#(
  parameter longint GRO_MISMATCH_FS = 0  // oscillator stage delay spread, fs
) (
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  output logic [OUT_W-1:0] dout,
  output logic             valid,
  output logic             clk_out
);

  logic                en, clk, clk_dly;
  logic [N_STAGES-1:0] z;

  timing_gen u_timing (
    .start  (start),
    .stop   (stop),
    .en     (en),
    .clk    (clk),
    .clk_dly(clk_dly)
  );

  multipath_gro #(.N(N_STAGES), .MISMATCH_FS(GRO_MISMATCH_FS)) u_gro (
    .en(en),
    .z (z)
  );

  tdc_core u_core (
    .rst_n  (rst_n),
    .clk    (clk),
    .clk_dly(clk_dly),
    .z      (z),
    .dout   (dout),
    .valid  (valid)
  );

  assign clk_out = clk;

endmodule
