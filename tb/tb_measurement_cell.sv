`timescale 1ps / 1fs
// tb_measurement_cell - one 7-input cell driven as the oscillator would
// drive it: in each measurement the cell phase advances by a random 0..300
// steps, each step toggling the next input of the Johnson sequence, with T
// following the cell's last input (inverted), so T rises once per 14 steps.
// The sampled state B is updated at the CLK rising edge, the counter read on
// the delayed clock.  The output after the next CLK edge must equal the
// advance of the measurement before.
module tb_measurement_cell;
  localparam int K = 7;
  logic         rst_n, clk, clk_dly, t, out_valid;
  logic [K-1:0] w, b;
  logic [8:0]   cell_out;
  int checks = 0, failures = 0;

  measurement_cell #(.K(K), .CNT_W(5), .OUT_W(9)) u_dut (
    .rst_n(rst_n), .clk(clk), .clk_dly(clk_dly), .b(b), .t(t),
    .cell_out(cell_out), .out_valid(out_valid));

  initial begin
    int adv [0:1023];
    int step;
    rst_n = 1; #1 rst_n = 0; clk = 1; clk_dly = 1; w = '0; b = '0; t = 1; step = 0;
    #10 rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      clk = 0;
      #2 clk_dly = 0;
      adv[k] = (k % 50 == 7) ? 0 : $urandom_range(0, 300);
      for (int i = 0; i < adv[k]; i++) begin
        w[step % K] = ~w[step % K];
        step++;
        #1 t = ~w[K-1];
      end
      #10 clk = 1;
      #1;
      if (k >= 2) begin
        checks += 2;
        if (!out_valid) failures++;
        if (cell_out != 9'(adv[k-1])) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d out=%0d exp=%0d", k, cell_out, adv[k-1]);
        end
      end else begin
        checks++;
        if (out_valid) failures++;
      end
      b = w;
      #10 clk_dly = 1;
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
