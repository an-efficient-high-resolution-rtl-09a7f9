`timescale 1ps / 1fs
// tb_state_to_phase - walks the 2K-code Johnson sequence of a cell (built
// here by toggling bit (i mod K) at step i) for K = 7 and K = 5 and checks
// that the decoded phase equals the step number modulo 2K.
module tb_state_to_phase;
  logic [6:0] b7;
  logic [4:0] b5;
  logic [3:0] f7, f5;
  int checks = 0, failures = 0;

  state_to_phase #(.K(7)) u_k7 (.b(b7), .fine(f7));
  state_to_phase #(.K(5)) u_k5 (.b(b5), .fine(f5));

  initial begin
    b7 = '0; b5 = '0;
    for (int i = 0; i < 60; i++) begin
      #1;
      checks += 2;
      if (f7 != 4'(i % 14)) begin failures++; $display("FAIL K=7 step %0d b=%b f=%0d", i, b7, f7); end
      if (f5 != 4'(i % 10)) begin failures++; $display("FAIL K=5 step %0d b=%b f=%0d", i, b5, f5); end
      b7[i % 7] = ~b7[i % 7];
      b5[i % 5] = ~b5[i % 5];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
