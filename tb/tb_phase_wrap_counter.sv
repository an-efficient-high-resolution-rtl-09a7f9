`timescale 1ps / 1fs
// tb_phase_wrap_counter - sends a random number (0..25) of T edges per
// measurement and checks, after each read on the delayed clock, that coarse
// equals the running count modulo 32 and that overflow is set exactly when
// the counter wrapped since the previous read.
module tb_phase_wrap_counter;
  localparam int CNT_W = 5;
  logic             rst_n, t, clk_dly, overflow;
  logic [CNT_W-1:0] coarse;
  int checks = 0, failures = 0, n_ovf = 0;

  phase_wrap_counter #(.CNT_W(CNT_W)) u_dut (
    .rst_n(rst_n), .t(t), .clk_dly(clk_dly), .coarse(coarse), .overflow(overflow));

  initial begin
    int total, prev, n;
    rst_n = 1; #1 rst_n = 0; t = 0; clk_dly = 0; total = 0;
    #10 rst_n = 1;
    #10;
    for (int k = 0; k < 400; k++) begin
      n = $urandom_range(0, 25);
      for (int i = 0; i < n; i++) begin
        #3 t = 1; #3 t = 0;
      end
      prev = total;
      total += n;
      #20 clk_dly = 1;
      #5;
      checks += 2;
      if (coarse != CNT_W'(total)) begin
        failures++;
        if (failures < 10) $display("FAIL coarse=%0d exp=%0d", coarse, total % 32);
      end
      if (overflow != ((total / 32) != (prev / 32))) failures++;
      if (overflow) n_ovf++;
      #20 clk_dly = 0;
    end
    checks++;
    if (n_ovf == 0) failures++;
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
