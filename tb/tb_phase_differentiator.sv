`timescale 1ps / 1fs
// tb_phase_differentiator - feeds the totals of a cell (K = 7, 5-bit
// counter) that advances by a random 0..300 transitions per measurement,
// split into coarse (mod 32), fine and the overflow flag, and checks that the
// output registered at each CLK edge is the advance just presented, and that
// out_valid rises at the third CLK edge after reset.
module tb_phase_differentiator;
  localparam int K = 7, CNT_W = 5;
  logic             clk, rst_n, overflow, out_valid;
  logic [CNT_W-1:0] coarse;
  logic [3:0]       fine;
  logic [8:0]       cell_out;
  int checks = 0, failures = 0, n_ovf = 0;

  phase_differentiator #(.K(K), .CNT_W(CNT_W), .OUT_W(9)) u_dut (
    .clk(clk), .rst_n(rst_n), .coarse(coarse), .fine(fine), .overflow(overflow),
    .cell_out(cell_out), .out_valid(out_valid));

  initial begin
    int phase, prev_cycles, adv [0:1023];
    rst_n = 1; #1 rst_n = 0; clk = 0; coarse = 0; fine = 0; overflow = 0; phase = 0; prev_cycles = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      adv[k] = $urandom_range(0, 300);
      phase += adv[k];
      coarse   = CNT_W'(phase / (2 * K));
      fine     = 4'(phase % (2 * K));
      overflow = ((phase / (2 * K)) / 32) != (prev_cycles / 32);
      if (overflow) n_ovf++;
      prev_cycles = phase / (2 * K);
      #10 clk = 1;
      #1;
      checks++;
      if (out_valid != (k >= 2)) failures++;
      if (k >= 2) begin
        checks++;
        if (cell_out != 9'(adv[k])) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d out=%0d exp=%0d", k, cell_out, adv[k-1]);
        end
      end
      #9 clk = 0;
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
