`timescale 1ps / 1fs
// tb_gro_tdc - end-to-end test of the complete TDC at its default sizes.
//
// Drives one Start/Stop pair every 20 ns (50 MS/s).  The first part uses
// random intervals from 0.1 ns up to near the 11-bit full scale, the second
// part the evaluation input: a 1.6 ns offset plus a 1.2 ps peak-to-peak sine
// at 26 kHz, for one full period of the sine (1923 samples).
// Reference: the oscillator's total enabled time T is summed here in
// femtoseconds and floor(T / 6 ps) is the number of transitions it should
// have made, so measurement k must read floor(T_k/6ps) - floor(T_{k-1}/6ps),
// two CLK edges after its end.  This also checks the first-order shaping:
// the running sum of outputs never drifts from the true elapsed count.
// Mechanisms counted (each must occur): gating glitches, a glitch on a
// cell's wrap input A'2, a counter overflow, a carried residue (output one
// above the interval's own floor), an output above half scale.  Exactly one
// output clock per 20 ns Start period is checked, and the latency of two CLK
// edges.
module tb_gro_tdc;
  import gro_tdc_pkg::*;

  localparam longint STAGE  = 6000;      // fs
  localparam longint PERIOD = 20000000;  // fs, 50 MS/s
  localparam int     N_RAND = 200;
  localparam int     N_SINE = 1923;
  localparam int     N_MEAS = N_RAND + N_SINE;

  logic             rst_n, start, stop;
  logic [OUT_W-1:0] dout;
  logic             valid, clk_out;

  gro_tdc u_dut (
    .rst_n  (rst_n),
    .start  (start),
    .stop   (stop),
    .dout   (dout),
    .valid  (valid),
    .clk_out(clk_out)
  );

  int     checks = 0, failures = 0;
  longint width_fs [N_MEAS];
  longint ncum [N_MEAS];       // floor(T_k / stage) after measurement k
  int     n_edges = 0;
  int     n_glitch = 0, n_glitch_wrap = 0, n_ovf = 0, n_carry = 0, n_big = 0;
  real    sum_pos = 0.0, sum_neg = 0.0;
  int     cnt_pos = 0, cnt_neg = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // Interval generation and the reference count.
  initial begin
    longint t;
    t = 0;
    for (int k = 0; k < N_MEAS; k++) begin
      if (k < N_RAND)
        width_fs[k] = 100000 + longint'($urandom_range(0, 12000)) * 1000
                      + longint'($urandom_range(0, 999));
      else
        width_fs[k] = 1600000 + longint'(600.0 * $sin(2.0 * 3.14159265358979
                      * 26.0e3 * real'(k - N_RAND) * 20.0e-9));
      if (k == 5)  width_fs[k] = 12200000 + 321;  // near full scale
      // Keep the end of the interval off a stage boundary (avoids a tie).
      if ((t + width_fs[k]) % STAGE == 0) width_fs[k] += 1;
      t += width_fs[k];
      ncum[k] = t / STAGE;
    end
  end

  // Start/Stop pulses.
  initial begin
    start = 1'b0; stop = 1'b0; rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #1000; rst_n = 1'b1;
    #1000;
    for (int k = 0; k < N_MEAS + 3; k++) begin
      longint w;
      w = (k < N_MEAS) ? width_fs[k] : 1000000;
      start = 1'b1;
      #(real'(w) / 1000.0);
      stop = 1'b1;
      #(real'(15000000 - w) / 1000.0);
      start = 1'b0;
      #1000;
      stop = 1'b0;
      #4000;
    end
    #2000;
    check(n_edges == N_MEAS + 3, "number of output clocks");
    check(n_glitch > 0,      "gating glitch occurred");
    check(n_glitch_wrap > 0, "glitch on a wrap input occurred");
    check(n_ovf > 0,         "counter overflow occurred");
    check(n_carry > 0,       "residue carry occurred");
    check(n_big > 0,         "output above half scale occurred");
    // The 1.2 ps sine must be visible: mean output larger on its positive
    // half than on its negative half.
    check(cnt_pos > 0 && cnt_neg > 0 && sum_pos / cnt_pos > sum_neg / cnt_neg,
          "sine input resolved");
    $display("mechanisms: glitches=%0d wrap_glitches=%0d overflows=%0d carries=%0d big=%0d",
             n_glitch, n_glitch_wrap, n_ovf, n_carry, n_big);
    $display("sine: mean(+)=%f mean(-)=%f", sum_pos / cnt_pos, sum_neg / cnt_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output check on every CLK rising edge (after reset).
  always @(posedge clk_out) if (rst_n && $realtime > 1500.0) begin
    int n;
    n = n_edges;
    n_edges++;
    #1;
    if (n < 3) begin
      check(!valid, "valid low while filling");
    end else if (n - 2 < N_MEAS) begin
      int k;
      longint exp_cnt;
      k = n - 2;
      exp_cnt = ncum[k] - ncum[k-1];
      check(valid, "valid");
      check(longint'(dout) == exp_cnt % 2048, $sformatf("dout meas %0d: got %0d exp %0d", k, dout, exp_cnt));
      if (exp_cnt > width_fs[k] / STAGE) n_carry++;
      if (dout >= 1024) n_big++;
      if (k >= N_RAND) begin
        real s;
        s = $sin(2.0 * 3.14159265358979 * 26.0e3 * real'(k - N_RAND) * 20.0e-9);
        if (s > 0.5) begin sum_pos += real'(dout); cnt_pos++; end
        if (s < -0.5) begin sum_neg += real'(dout); cnt_neg++; end
      end
    end
  end

  // Mechanism observation.
  always @(u_dut.u_gro.glitches) if (u_dut.u_gro.glitches > 0) begin
    int unsigned p, c;
    n_glitch++;
    p = u_dut.u_gro.last_pos;
    c = cell_of(p);
    if (cell_node(c, cell_size(c) - 1) == p) n_glitch_wrap++;
  end

  always @(posedge clk_out)
    if (u_dut.u_core.g_cell[0].u_cell.u_counter.overflow) n_ovf++;

  // Output rate: exactly one CLK rising edge (one output sample) per
  // 20 ns Start period, 50 MS/s.
  int edges_since_start = 0, n_start = 0;
  always @(posedge clk_out) edges_since_start++;
  always @(posedge start) begin
    if (n_start > 0) check(edges_since_start == 1, "one output per Start period");
    edges_since_start = 0;
    n_start++;
  end

  // Watchdog.
  initial begin
    #(real'(PERIOD) / 1000.0 * (N_MEAS + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
