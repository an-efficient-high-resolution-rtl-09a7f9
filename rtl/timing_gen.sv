`timescale 1ps / 1fs
// timing_gen - behavioural model of the timing generation block (built from
// delay elements, so not synthesizable as written).
//
// From the Start and Stop edges it makes the oscillator enable EN, high for
// exactly the Start-to-Stop interval (both edges delayed by TG), and the
// sampling clock CLK, which is low while EN is high and a guard time TG on
// either side of it: CLK falls with Start, EN rises TG later, EN falls TG
// after Stop, and CLK rises TG after that.  The guard after EN lets gating
// glitches die out before the state is sampled, which confines counter
// activity to the enable window.  CLK_DLY is CLK delayed by TD, the later
// read clock of the phase wrap counters.  The published design gives the
// Start/Stop/EN/CLK relation; TG and TD are this model's values.
//
// Interface: start, stop (rise once per measurement; start must fall no
// later than stop), en, clk, clk_dly.
module timing_gen #(
  parameter realtime TG = 100.0,  // guard time, ps
  parameter realtime TD = 300.0   // counter read delay, ps
) (
  input  logic start,
  input  logic stop,
  output logic en,
  output logic clk,
  output logic clk_dly
);

  logic start_d, stop_d, stop_d2;

  initial begin
    start_d = 1'b0; stop_d = 1'b0; stop_d2 = 1'b0; clk_dly = 1'b1;
  end

  always @(start) start_d <= #(TG) start;
  always @(stop)  stop_d  <= #(TG) stop;
  always @(stop)  stop_d2 <= #(2.0 * TG) stop;
  always @(clk)   clk_dly <= #(TD) clk;

  assign en  = start_d & ~stop_d;
  assign clk = ~(start & ~stop_d2);

endmodule
