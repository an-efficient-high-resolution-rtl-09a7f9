`timescale 1ps / 1fs
// tb_tdc_core - the synthesizable back end driven by an ideal ring: in each
// measurement CLK goes low, the 47 outputs switch in ring order a random
// 0..2047 times (the 11-bit range), sometimes the last switched output
// bounces once more (the gating glitch), then CLK and the delayed clock
// rise.  The output two CLK edges later must equal the number of switches.
// Also counts glitches that hit a cell's wrap input and counter overflows.
module tb_tdc_core;
  import gro_tdc_pkg::*;

  logic                rst_n, clk, clk_dly, valid;
  logic [N_STAGES-1:0] z;
  logic [OUT_W-1:0]    dout;
  int checks = 0, failures = 0, n_wrap_glitch = 0, n_glitch = 0, n_ovf = 0;

  tdc_core u_dut (.rst_n(rst_n), .clk(clk), .clk_dly(clk_dly), .z(z), .dout(dout), .valid(valid));

  always @(posedge clk)
    if (u_dut.g_cell[2].u_cell.u_counter.overflow) n_ovf++;

  initial begin
    int adv [0:1023];
    int pos, last;
    rst_n = 1; #1 rst_n = 0; clk = 1; clk_dly = 1; pos = 0; last = 0;
    for (int i = 0; i < N_STAGES; i++) z[i] = logic'(i & 1);
    #10 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      clk = 0;
      #2 clk_dly = 0;
      adv[k] = (k % 37 == 5) ? 2047 : $urandom_range(0, 2047);
      for (int i = 0; i < adv[k]; i++) begin
        #2 z[pos] = ~z[pos];
        last = pos;
        pos = (pos + 1) % N_STAGES;
      end
      if (adv[k] > 0 && $urandom_range(0, 2) == 0) begin
        n_glitch++;
        if (cell_node(cell_of(last), cell_size(cell_of(last)) - 1) == last) n_wrap_glitch++;
        #3 z[last] = ~z[last];
        #3 z[last] = ~z[last];
      end
      #20 clk = 1;
      #1;
      if (k >= 3) begin
        checks += 2;
        if (!valid) failures++;
        if (dout != OUT_W'(adv[k-2])) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d dout=%0d exp=%0d", k, dout, adv[k-2]);
        end
      end else begin
        checks++;
        if (valid) failures++;
      end
      #10 clk_dly = 1;
      #10;
    end
    checks += 2;
    if (n_wrap_glitch == 0) failures++;
    if (n_ovf == 0) failures++;
    $display("glitches=%0d on wrap inputs=%0d overflows=%0d", n_glitch, n_wrap_glitch, n_ovf);
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
