`timescale 1ps / 1fs
// tb_gro_tdc_mismatch - the complete TDC with an oscillator whose stages have
// unequal delays (spread up to +-1.5 ps around 6 ps), running the 1.6 ns +
// 1.2 ps-pp 26 kHz evaluation input for one sine period after 100 random
// intervals.
// Checks: (1) every output equals the number of transitions the oscillator
// model actually made in that measurement; (2) mismatch is first-order
// shaped: because each measurement resumes where the last stopped, the
// stages are used in rotation and the accumulated error
// sum(dout) - T/6ps stays within the largest partial sum of stage
// deviations (plus one LSB) for the whole run instead of growing;
// (3) mismatch is really present: some outputs differ from the
// equal-delay count; (4) the 1.2 ps sine is still resolved.
module tb_gro_tdc_mismatch;
  import gro_tdc_pkg::*;

  localparam longint STAGE  = 6000;
  localparam int     N_RAND = 100;
  localparam int     N_SINE = 1923;
  localparam int     N_MEAS = N_RAND + N_SINE;

  logic             rst_n, start, stop;
  logic [OUT_W-1:0] dout;
  logic             valid, clk_out;

  gro_tdc #(.GRO_MISMATCH_FS(1500)) u_dut (
    .rst_n(rst_n), .start(start), .stop(stop), .dout(dout), .valid(valid), .clk_out(clk_out));

  int     checks = 0, failures = 0, n_edges = 0, n_differ = 0;
  longint width_fs [N_MEAS];
  longint tcum [N_MEAS];        // enabled time after measurement k, fs
  longint trans [N_MEAS];       // transitions made after measurement k
  real    bound, worst = 0.0;
  real    sum_pos = 0.0, sum_neg = 0.0;
  int     cnt_pos = 0, cnt_neg = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic real sine(int k);
    return $sin(2.0 * 3.14159265358979 * 26.0e3 * real'(k - N_RAND) * 20.0e-9);
  endfunction

  initial begin
    longint t, w, p, pmin, pmax;
    start = 1'b0; stop = 1'b0; rst_n = 1'b1;
    #1 rst_n = 1'b0;
    t = 0;
    for (int k = 0; k < N_MEAS; k++) begin
      if (k < N_RAND) width_fs[k] = 500000 + longint'($urandom_range(0, 3000000));
      else            width_fs[k] = 1600000 + longint'(600.0 * sine(k));
      t += width_fs[k];
      tcum[k] = t;
    end
    // Largest excursion of the running sum of stage deviations.
    p = 0; pmin = 0; pmax = 0;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < N_STAGES; i++) begin
        p += u_dut.u_gro.delay_fs[i] - STAGE;
        if (p < pmin) pmin = p;
        if (p > pmax) pmax = p;
      end
    bound = real'(pmax - pmin) / real'(STAGE) + 1.0;
    #1000; rst_n = 1'b1;
    #1000;
    for (int k = 0; k < N_MEAS + 3; k++) begin
      w = (k < N_MEAS) ? width_fs[k] : 1000000;
      start = 1'b1;
      #(real'(w) / 1000.0);
      stop = 1'b1;
      #150;
      if (k < N_MEAS) trans[k] = u_dut.u_gro.transitions;
      #(real'(15000000 - w - 150000) / 1000.0);
      start = 1'b0;
      #1000;
      stop = 1'b0;
      #4000;
    end
    #2000;
    check(n_differ > 0, "mismatch visible in some outputs");
    check(cnt_pos > 0 && cnt_neg > 0 && sum_pos / cnt_pos > sum_neg / cnt_neg, "sine input resolved");
    $display("bound=%f LSB worst accumulated error=%f LSB, outputs off the equal-delay count: %0d",
             bound, worst, n_differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_out) if (rst_n && $realtime > 1500.0) begin
    int n, k;
    real err;
    n = n_edges;
    n_edges++;
    #1;
    k = n - 2;
    if (n >= 3 && k < N_MEAS) begin
      check(valid, "valid");
      check(longint'(dout) == trans[k] - trans[k-1],
            $sformatf("meas %0d: dout %0d, transitions %0d", k, dout, trans[k] - trans[k-1]));
      if (longint'(dout) != tcum[k] / STAGE - tcum[k-1] / STAGE) n_differ++;
      // Accumulated error relative to the ideal time since measurement 0.
      err = real'(trans[k] - trans[0]) - real'(tcum[k] - tcum[0]) / real'(STAGE);
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      check(err <= bound, $sformatf("accumulated error %f > %f", err, bound));
      if (k >= N_RAND) begin
        if (sine(k) > 0.5)  begin sum_pos += real'(dout); cnt_pos++; end
        if (sine(k) < -0.5) begin sum_neg += real'(dout); cnt_neg++; end
      end
    end
  end

  initial begin
    #((N_MEAS + 20) * 20000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
