`timescale 1ps / 1fs
// phase_wrap_counter - counts full oscillator cycles seen by one cell.
//
// A CNT_W-bit counter advances on every rising edge of the de-glitched
// signal T, one per oscillator cycle (about 1.8 GHz while the oscillator
// runs).  Because the counter ripples at oscillator speed, its value is read
// with a delayed copy of the sampling clock, clk_dly, once the last edge of T
// has settled.  At each read the previous read value is compared with the
// new one: if the new one is smaller the counter has wrapped since the last
// read, and `overflow` is raised for this read so the differentiator can
// correct its difference.  At most 2^CNT_W - 1 wraps may happen between two
// reads.  Counting edges of T and the delayed read follow the published
// design; the width and the overflow rule are this design's choice.
//
// Interface: t (count clock), clk_dly (read clock), rst_n (async reset),
// coarse (count at the last read), overflow (wrapped since the read before).
module phase_wrap_counter #(
  parameter int unsigned CNT_W = 5
) (
  input  logic             rst_n,
  input  logic             t,
  input  logic             clk_dly,
  output logic [CNT_W-1:0] coarse,
  output logic             overflow
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge t or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;

  always_ff @(posedge clk_dly or negedge rst_n)
    if (!rst_n) begin
      coarse   <= '0;
      overflow <= 1'b0;
    end else begin
      coarse   <= cnt;
      overflow <= (cnt < coarse);
    end

endmodule
