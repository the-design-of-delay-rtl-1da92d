`timescale 1ns / 1ps
// tb_tx_delay_counter - checks one transmit counter on every clock phase.
//
// For each phase k = 0..5 the counter is clocked by phase clock k, and a
// one-period start pulse is made on phase 0 as the SYNC capture does. For
// coarse values 0, 1, 2, 7, 42 and 300 the trigger must rise exactly
// 12 + 6*coarse + k ns after the phase-0 edge that raised 'start', stay high
// PULSE clocks, and fire once. One start during a countdown must restart
// the count from the new start.
module tb_tx_delay_counter;
  localparam int PULSE = 5;

  int checks = 0, failures = 0;

  logic        run = 1'b0;
  logic [5:0]  ph;
  logic        rst_n = 1'b1;
  logic        start = 1'b0;
  logic [2:0]  k_sel = 3'd0;
  logic [15:0] coarse = '0;
  logic        trigger;
  logic        clk;

  phase_gen_model u_ph (.run(run), .ph(ph));
  assign clk = ph[k_sel];

  tx_delay_counter #(.CW(16), .PULSE(PULSE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fine_zero(k_sel == 3'd0),
    .coarse(coarse), .trigger(trigger)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_rise, t_fall;
  int      n_rise = 0;
  always @(posedge trigger) begin t_rise = $realtime; n_rise++; end
  always @(negedge trigger) t_fall = $realtime;

  // Start pulse, one phase-0 period long, launched on a phase-0 edge.
  task automatic fire(output realtime t_cap);
    @(posedge ph[0]);
    t_cap = $realtime;
    start <= 1'b1;
    @(posedge ph[0]);
    start <= 1'b0;
  endtask

  initial begin
    int cvals [6] = '{0, 1, 2, 7, 42, 300};
    realtime t_cap, t_cap2;
    #1 rst_n = 1'b0;
    #1 run = 1'b1;
    #30 rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      k_sel = 3'(k);
      foreach (cvals[j]) begin
        coarse = 16'(cvals[j]);
        n_rise = 0;
        repeat (3) @(posedge ph[0]);
        fire(t_cap);
        repeat (cvals[j] + PULSE + 6) @(posedge ph[0]);
        check(n_rise == 1, $sformatf("k=%0d C=%0d one pulse", k, cvals[j]));
        check(t_rise - t_cap > 12 + 6 * cvals[j] + k - 0.01 &&
              t_rise - t_cap < 12 + 6 * cvals[j] + k + 0.01,
              $sformatf("k=%0d C=%0d delay %0.3f", k, cvals[j], t_rise - t_cap));
        check(t_fall - t_rise > 6 * PULSE - 0.01 && t_fall - t_rise < 6 * PULSE + 0.01,
              $sformatf("k=%0d C=%0d width %0.3f", k, cvals[j], t_fall - t_rise));
      end
    end
    // Restart: second start arrives while the first is still counting.
    k_sel = 3'd3;
    coarse = 16'd20;
    n_rise = 0;
    repeat (3) @(posedge ph[0]);
    fire(t_cap);
    repeat (8) @(posedge ph[0]);
    fire(t_cap2);
    repeat (20 + PULSE + 10) @(posedge ph[0]);
    check(n_rise == 1, "restart gives one pulse");
    check(t_rise - t_cap2 > 12 + 120 + 3 - 0.01 && t_rise - t_cap2 < 12 + 120 + 3 + 0.01,
          $sformatf("restart delay %0.3f", t_rise - t_cap2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
