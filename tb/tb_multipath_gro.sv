`timescale 1ps / 1fs
// tb_multipath_gro - checks the oscillator model against a counting
// reference.  Random enable pulses (0.05 to 3 ns) are applied; after each,
// with glitches settled, every output must equal its start value toggled
// once for each time the wave of transitions passed it, where the number of
// transitions is floor(total enabled time / 6 ps).  Also checks that a
// gating glitch is visible (an output differs from its final value between
// the two glitch edges) and that the phase is held while disabled.
module tb_multipath_gro;
  localparam int     N     = 47;
  localparam longint STAGE = 6000;

  logic         en;
  logic [N-1:0] z;
  int checks = 0, failures = 0, seen_glitch = 0;

  multipath_gro #(.N(N)) u_dut (.en(en), .z(z));

  function automatic logic [N-1:0] expected(longint n);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) begin
      longint tog;
      tog = n / N + ((i < (n % N)) ? 1 : 0);
      v[i] = logic'(i & 1) ^ logic'(tog & 1);
    end
    return v;
  endfunction

  initial begin
    longint total, w, n;
    logic [N-1:0] mid;
    en = 0; total = 0;
    #100;
    for (int k = 0; k < 300; k++) begin
      w = 50000 + longint'($urandom_range(0, 2950000));
      if ((total + w) % STAGE == 0) w += 1;
      en = 1;
      #(real'(w) / 1000.0);
      en = 0;
      total += w;
      n = total / STAGE;
      #20;             // between the glitch edges (15 ps and 30 ps)
      mid = z;
      #480;
      checks++;
      if (z !== expected(n)) begin
        failures++;
        if (failures < 5) $display("FAIL pulse %0d: z=%b exp=%b", k, z, expected(n));
      end
      checks++;
      if (u_dut.transitions != n) failures++;
      if (mid != z) seen_glitch++;
      // Phase held while disabled.
      #2000;
      checks++;
      if (z !== expected(n)) failures++;
    end
    checks++;
    if (seen_glitch == 0) failures++;
    $display("glitches seen: %0d", seen_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
