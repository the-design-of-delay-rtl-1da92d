`timescale 1ns / 1ps
// tb_phase_clocks - checks the six phase clocks made from three PLL outputs.
//
// A PLL model gives c0..c2 (6 ns, lagging 0/1/2 ns). While 'locked' is low
// every clk_out must stay low. After lock, every rising edge of clk_out[k]
// must come exactly k ns after the last rising edge of clk_out[0], and each
// clk_out[k] must have a 6 ns period. Enabling the outputs can leave one short
// first pulse on the inverted clocks, so the first 12 ns after enable are not
// checked.
module tb_phase_clocks;
  int checks = 0, failures = 0;

  logic       clk_25m = 1'b0;
  logic [2:0] pll_clk;
  logic       pll_locked;
  logic [5:0] clk_out;
  logic       gate_en = 1'b0;

  always #20 clk_25m = ~clk_25m;

  pll_model #(.LOCK_EDGES(6)) u_pll (.inclk0(clk_25m), .c(pll_clk), .locked(pll_locked));

  phase_clocks dut (.pll_clk(pll_clk), .pll_locked(pll_locked & gate_en), .clk_out(clk_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t0 = -1.0;
  realtime t_on = 1.0e9;   // time the gate opened; the first 12 ns are skipped
  realtime t_last [6];
  int      n_edges [6];

  always @(posedge clk_out[0]) t0 = $realtime;
  for (genvar k = 0; k < 6; k++) begin : g_chk
    initial begin t_last[k] = -1.0; n_edges[k] = 0; end
    always @(posedge clk_out[k]) if ($realtime > t_on + 12.0) begin
      if (k > 0 && t0 >= 0.0) begin
        realtime dt;
        dt = $realtime - t0;
        check(dt > k - 0.01 && dt < k + 0.01, $sformatf("clk_out[%0d] lag %0.3f", k, dt));
      end
      if (t_last[k] >= 0.0) begin
        realtime p;
        p = $realtime - t_last[k];
        check(p > 5.99 && p < 6.01, $sformatf("clk_out[%0d] period %0.3f", k, p));
      end
      t_last[k] = $realtime;
      n_edges[k]++;
    end
  end

  initial begin
    // Gated off: outputs stay low while the PLL runs.
    wait (pll_locked);
    repeat (20) begin
      #0.5;
      check(clk_out == 6'b0, "outputs low while not locked");
    end
    gate_en = 1'b1;
    t_on = $realtime;
    #600;
    for (int k = 0; k < 6; k++) check(n_edges[k] >= 90, $sformatf("clk_out[%0d] toggles", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
