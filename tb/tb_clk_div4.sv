`timescale 1ns / 1ps
// tb_clk_div4 - checks the 1/4 frequency divider.
//
// With a 6 ns input clock, 'en' is held high for 4*N clocks (N = 1..9):
// sample_clk must rise first on the clock edge that sees 'en', then every
// 24 ns, be high 12 ns each period, give exactly N rising edges, and stay low
// while 'en' is low.
module tb_clk_div4;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic en = 1'b0;
  logic sample_clk;

  always #3 clk = ~clk;

  clk_div4 dut (.clk(clk), .rst_n(rst_n), .en(en), .sample_clk(sample_clk));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_last_rise = -1.0;
  realtime t_first;
  int      n_rise = 0;
  always @(posedge sample_clk) begin
    if (n_rise == 0) t_first = $realtime;
    else check($realtime - t_last_rise > 23.99 && $realtime - t_last_rise < 24.01, "period 24 ns");
    t_last_rise = $realtime;
    n_rise++;
  end
  always @(negedge sample_clk)
    check($realtime - t_last_rise > 11.99 && $realtime - t_last_rise < 12.01, "high time 12 ns");

  initial begin
    realtime t_en;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int n = 1; n <= 9; n++) begin
      repeat (5) @(posedge clk);
      n_rise = 0;
      #0.5 en = 1'b1;
      @(posedge clk);
      t_en = $realtime;
      repeat (4 * n - 1) @(posedge clk);
      #0.5 en = 1'b0;
      repeat (4) begin
        @(posedge clk);
        #0.1 check(sample_clk == 1'b0, "low while disabled");
      end
      check(n_rise == n, $sformatf("%0d sample edges, got %0d", n, n_rise));
      check(t_first > t_en - 0.01 && t_first < t_en + 0.01, "first edge on first enabled clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
