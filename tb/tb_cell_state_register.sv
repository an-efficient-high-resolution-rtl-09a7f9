`timescale 1ps / 1fs
// tb_cell_state_register - checks the master-slave sampling: A' follows the
// inputs while CLK is low and holds while CLK is high; B takes the value A'
// had at the rising edge of CLK and keeps it through the next low phase.
module tb_cell_state_register;
  localparam int K = 7;
  logic         clk;
  logic [K-1:0] d, a_q, b_q, held;
  int checks = 0, failures = 0;

  cell_state_register #(.K(K)) u_dut (.clk(clk), .d(d), .a_q(a_q), .b_q(b_q));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    clk = 1; d = '0;
    #10;
    for (int k = 0; k < 200; k++) begin
      clk = 0;
      #10;
      for (int i = 0; i < 5; i++) begin
        d = K'($urandom);
        #5;
        chk(a_q == d, "A' transparent while CLK low");
        chk(k == 0 || b_q == held, "B held while CLK low");
      end
      held = d;
      clk = 1;
      #5;
      chk(b_q == held, "B takes state at CLK rise");
      for (int i = 0; i < 5; i++) begin
        d = K'($urandom);
        #5;
        chk(a_q == held, "A' held while CLK high");
        chk(b_q == held, "B stable while CLK high");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
