`timescale 1ns / 1ps
// tb_rx_delay_counter - checks one receive counter on every clock phase.
//
// Clocked by phase k, started by a one-period pulse made on phase 0: for
// coarse values 0, 1, 5 and 42, div_en must rise exactly 12 + 6*coarse + k ns
// after the phase-0 edge that raised 'start' and stay high for
// 4*NSAMP clocks (NSAMP = 3 here), once per start.
module tb_rx_delay_counter;
  localparam int NSAMP = 3;

  int checks = 0, failures = 0;

  logic        run = 1'b0;
  logic [5:0]  ph;
  logic        rst_n = 1'b1;
  logic        start = 1'b0;
  logic [2:0]  k_sel = 3'd0;
  logic [15:0] coarse = '0;
  logic        div_en;
  logic        clk;

  phase_gen_model u_ph (.run(run), .ph(ph));
  assign clk = ph[k_sel];

  rx_delay_counter #(.CW(16), .NSAMP(NSAMP)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fine_zero(k_sel == 3'd0),
    .coarse(coarse), .div_en(div_en)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_rise, t_fall;
  int      n_rise = 0;
  always @(posedge div_en) begin t_rise = $realtime; n_rise++; end
  always @(negedge div_en) t_fall = $realtime;

  initial begin
    int cvals [4] = '{0, 1, 5, 42};
    realtime t_cap;
    #1 rst_n = 1'b0;
    #1 run = 1'b1;
    #30 rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      k_sel = 3'(k);
      foreach (cvals[j]) begin
        coarse = 16'(cvals[j]);
        n_rise = 0;
        repeat (3) @(posedge ph[0]);
        t_cap = $realtime;
        start <= 1'b1;
        @(posedge ph[0]);
        start <= 1'b0;
        repeat (cvals[j] + 4 * NSAMP + 6) @(posedge ph[0]);
        check(n_rise == 1, $sformatf("k=%0d C=%0d one enable", k, cvals[j]));
        check(t_rise - t_cap > 12 + 6 * cvals[j] + k - 0.01 &&
              t_rise - t_cap < 12 + 6 * cvals[j] + k + 0.01,
              $sformatf("k=%0d C=%0d delay %0.3f", k, cvals[j], t_rise - t_cap));
        check(t_fall - t_rise > 24 * NSAMP - 0.01 && t_fall - t_rise < 24 * NSAMP + 0.01,
              $sformatf("k=%0d C=%0d run length %0.3f", k, cvals[j], t_fall - t_rise));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
