`timescale 1ps / 1fs
// multipath_gro - behavioural model of the 47-stage multipath gated ring
// oscillator (not synthesizable: the real block is a transistor-level ring).
//
// In the real circuit every stage is an inverting cell driven by five
// earlier stages (for Z1: Z35, Z37, Z39, Z43 and Z47, i.e. odd distances
// back around the ring), which cuts the effective delay per stage to about
// 6 ps.  The supply of every stage is cut when EN is low, which freezes the
// ring, including the partly finished transition, until EN rises again; the
// next measurement continues from that phase.  Because 47 is odd the wave of
// transitions passes the ring twice per cycle, so one cycle has 94
// transitions (about 564 ps, 1.8 GHz).
//
// The model keeps that behaviour at the level of transitions: outputs switch
// one at a time in ring order (Z1, Z2, ..., Z47, Z1, ...), one every
// STAGE_DELAY of enabled time, and the enabled time already spent toward the
// next switch is kept across the disabled period.  It also models the
// disturbance the de-glitch logic exists for: if the last output switched
// less than GLITCH_WIN before EN fell, that output crosses the threshold
// back and forth once more (at GLITCH_T1 and GLITCH_T2 after EN fell) before
// settling at its correct value.  The glitch window and times are this
// model's choice.  MISMATCH_FS gives the stages fixed, unequal delays (zero
// by default); because every measurement continues where the last stopped,
// each stage is used in turn ("barrel shifting") and the resulting error is
// first-order shaped like the quantisation error.
//
// Interface: en (EN; EN-bar is its complement), z[N-1:0] = Z1..ZN.
// Observation counters for testbenches: transitions, glitches.
module multipath_gro #(
  parameter int unsigned N           = 47,
  parameter longint      STAGE_FS    = 6000,   // stage delay, fs
  parameter longint      GLITCH_WIN  = 2000,   // fs
  parameter longint      GLITCH_T1   = 15000,  // fs after EN falls
  parameter longint      GLITCH_T2   = 30000,  // fs after EN falls
  parameter longint      MISMATCH_FS = 0       // stage delay spread, fs
) (
  input  logic         en,
  output logic [N-1:0] z
);

  int unsigned pos;            // stage that switches next
  int unsigned last_pos;       // stage that switched last
  longint      acc;            // enabled time already spent toward next switch
  longint      t_seg, t_last, t_fall;
  longint      transitions;
  int unsigned glitches;
  longint      delay_fs [N];   // delay of each stage, fs

  // Fixed stage-to-stage delay spread of up to +-MISMATCH_FS, from a simple
  // deterministic scramble, shifted so the ring period stays N*2*STAGE_FS.
  function automatic void init_delays();
    longint sum;
    sum = 0;
    for (int unsigned i = 0; i < N; i++) begin
      delay_fs[i] = STAGE_FS
                    + (longint'((i * 7919 + 13) % 2001) - 1000) * MISMATCH_FS / 1000;
      sum += delay_fs[i] - STAGE_FS;
    end
    for (int unsigned i = 0; i < N; i++) delay_fs[i] -= sum / longint'(N);
    delay_fs[0] -= sum % longint'(N);
  endfunction

  function automatic longint now_fs();
    return longint'($realtime * 1000.0);
  endfunction

  always @(negedge en) t_fall <= now_fs();

  initial begin
    // Settled ring state: alternating outputs, the wave about to enter Z1.
    for (int unsigned i = 0; i < N; i++) z[i] = logic'(i & 1);
    pos = 0; last_pos = N - 1; acc = 0; t_last = -1000000;
    transitions = 0; glitches = 0; t_fall = 0;
    init_delays();
    forever begin
      wait (en);
      t_seg = now_fs();
      forever begin
        #(real'(delay_fs[pos] - acc) / 1000.0);
        if (en) begin
          z[pos]   = ~z[pos];
          last_pos = pos;
          pos      = (pos + 1) % N;
          acc      = 0;
          t_seg    = now_fs();
          t_last   = t_seg;
          transitions++;
        end else begin
          // EN fell during this stage; if its edge landed in this very time
          // step t_fall may not be updated yet, so fall back to now.
          acc = acc + (((t_fall >= t_seg) ? t_fall : now_fs()) - t_seg);
          if (acc >= delay_fs[pos]) acc = delay_fs[pos] - 1;
          break;
        end
      end
      // Charge redistribution after gating: the output that just switched
      // re-crosses its threshold once.
      if (t_fall - t_last < GLITCH_WIN) begin
        glitches++;
        if (now_fs() - t_fall < GLITCH_T1)
          #(real'(GLITCH_T1 - (now_fs() - t_fall)) / 1000.0);
        z[last_pos] = ~z[last_pos];
        #(real'(GLITCH_T2 - GLITCH_T1) / 1000.0);
        z[last_pos] = ~z[last_pos];
      end
    end
  end

endmodule
