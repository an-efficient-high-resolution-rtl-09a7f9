`timescale 1ps / 1fs
// tb_output_adder - random per-cell counts; checks the registered 11-bit sum
// (modulo 2048) one CLK after the inputs and that valid follows in_valid.
module tb_output_adder;
  logic        clk, rst_n, in_valid, valid;
  logic [8:0]  cell_out [7];
  logic [10:0] dout;
  int checks = 0, failures = 0;

  output_adder #(.N_CELLS(7), .CELL_W(9), .OUT_W(11)) u_dut (
    .clk(clk), .rst_n(rst_n), .cell_out(cell_out), .in_valid(in_valid),
    .dout(dout), .valid(valid));

  initial begin
    int s;
    logic v;
    rst_n = 1; #1 rst_n = 0; clk = 0; in_valid = 0;
    for (int c = 0; c < 7; c++) cell_out[c] = '0;
    #10 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      s = 0;
      for (int c = 0; c < 7; c++) begin
        cell_out[c] = (k % 3 == 0) ? 9'($urandom_range(250, 511)) : 9'($urandom_range(0, 300));
        s += cell_out[c];
      end
      v = logic'($urandom);
      in_valid = v;
      #5 clk = 1;
      #1;
      checks += 2;
      if (dout != 11'(s)) begin failures++; if (failures < 10) $display("FAIL dout=%0d exp=%0d", dout, s % 2048); end
      if (valid != v) failures++;
      #4 clk = 0;
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
