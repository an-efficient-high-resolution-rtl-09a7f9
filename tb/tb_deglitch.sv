`timescale 1ps / 1fs
// tb_deglitch - checks the de-glitch C-element against its truth table
// (T follows A'2 when A'1 agrees, holds otherwise) for every input change,
// then replays the oscillator's gating glitch: A'2 rising and bouncing
// 1-0-1 while A'1 is 1 must give exactly one rising edge on T.
module tb_deglitch;
  logic rst_n, a1, a2, t, t_ref;
  int checks = 0, failures = 0, rises = 0;

  deglitch u_dut (.rst_n(rst_n), .a1(a1), .a2(a2), .t(t));

  always @(posedge t) rises++;

  task automatic apply(input logic n1, input logic n2);
    a1 = n1; a2 = n2;
    if (a1 == a2) t_ref = a2;
    #5;
    checks++;
    if (t !== t_ref) begin
      failures++;
      if (failures < 10) $display("FAIL a1=%b a2=%b t=%b exp=%b", a1, a2, t, t_ref);
    end
  endtask

  initial begin
    int r0;
    rst_n = 1; #1 rst_n = 0; a1 = 0; a2 = 1; t_ref = 1;
    #5;
    checks++; if (t !== 1'b1) failures++;   // reset loads A'2
    rst_n = 1;
    #5;
    // Truth table rows.
    apply(1, 1);  // A'1=1, A'2 rises  -> T rises
    apply(1, 0);  // A'1=1, A'2 falls  -> T holds
    checks++; if (t !== 1'b1) failures++;
    apply(0, 0);  // A'1=0, A'2 falls  -> T falls
    apply(0, 1);  // A'1=0, A'2 rises  -> T holds
    checks++; if (t !== 1'b0) failures++;
    // Random input changes.
    for (int k = 0; k < 500; k++) apply(logic'($urandom), logic'($urandom));
    // Glitch on the wrap input.
    apply(0, 0);
    apply(1, 0);
    r0 = rises;
    apply(1, 1); apply(1, 0); apply(1, 1);
    checks++;
    if (rises - r0 != 1) begin failures++; $display("FAIL glitch gave %0d edges", rises - r0); end
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
