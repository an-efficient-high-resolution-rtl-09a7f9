`timescale 1ps / 1fs
// tb_timing_gen - checks the enable and clock edges against Start/Stop:
// EN rises 100 ps after Start and falls 100 ps after Stop (so its width is
// the Start-to-Stop interval), CLK falls with Start and rises 100 ps after EN
// falls (never high while EN is high), CLK_DLY rises 300 ps after CLK.
module tb_timing_gen;
  logic start, stop, en, clk, clk_dly;
  int checks = 0, failures = 0;
  realtime t_start, t_stop, t_en_r, t_en_f, t_clk_f, t_clk_r, t_dly_r;

  timing_gen u_dut (.start(start), .stop(stop), .en(en), .clk(clk), .clk_dly(clk_dly));

  always @(posedge en)      t_en_r = $realtime;
  always @(negedge en)      t_en_f = $realtime;
  always @(negedge clk)     t_clk_f = $realtime;
  always @(posedge clk)     t_clk_r = $realtime;
  always @(posedge clk_dly) t_dly_r = $realtime;

  // CLK and EN must never be high together.
  always @(en or clk) if (en && clk) failures++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    realtime w;
    start = 0; stop = 0;
    #1000;
    for (int k = 0; k < 50; k++) begin
      w = 10.0 + real'($urandom_range(0, 12000000)) / 1000.0;
      start = 1; t_start = $realtime;
      #(w);
      stop = 1; t_stop = $realtime;
      #(14000.0 - w);
      start = 0;
      #1000;
      stop = 0;
      #5000;
      chk(near(t_en_r, t_start + 100.0), "EN rise");
      chk(near(t_en_f, t_stop + 100.0), "EN fall");
      chk(near(t_en_f - t_en_r, w), "EN width");
      chk(near(t_clk_f, t_start), "CLK fall");
      chk(near(t_clk_r, t_stop + 200.0), "CLK rise");
      chk(near(t_dly_r, t_clk_r + 300.0), "CLK_DLY rise");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
