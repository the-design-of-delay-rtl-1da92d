`timescale 1ns / 1ps
// tb_rx_sample_clocks - checks the 8 non-uniform sample clocks.
//
// Over 20 trigger shots (NSAMP = 8 samples each) every channel gets a delay
// of 0..255 ns; the first shots cover all six fine phases and both range
// ends. sample_clk[i] must first rise exactly 18 + d[i] ns after the phase-0
// edge that captured the trigger, then every 24 ns, 8 times per shot.
module tb_rx_sample_clocks;
  import delay_pkg::*;
  localparam int NCH   = N_CH;
  localparam int NSAMP = 8;

  int checks = 0, failures = 0;

  logic                run = 1'b0;
  logic [5:0]          ph;
  logic                rst_n = 1'b1;
  logic                trigger_in = 1'b0;
  logic [COARSE_W-1:0] coarse [NCH];
  logic [FINE_W-1:0]   fine   [NCH];
  logic [NCH-1:0]      sample_clk;
  int                  d [NCH];

  phase_gen_model u_ph (.run(run), .ph(ph));

  rx_sample_clocks #(.NSAMP(NSAMP)) dut (
    .clk_ph(ph), .rst_n(rst_n), .trigger_in(trigger_in),
    .coarse(coarse), .fine(fine), .sample_clk(sample_clk)
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

  realtime t_first [NCH];
  realtime t_last  [NCH];
  int      n_rise  [NCH];
  int      bad_per [NCH];
  for (genvar i = 0; i < NCH; i++) begin : g_obs
    always @(posedge sample_clk[i]) begin
      if (n_rise[i] == 0) t_first[i] = $realtime;
      else if (!($realtime - t_last[i] > 23.99 && $realtime - t_last[i] < 24.01)) bad_per[i]++;
      t_last[i] = $realtime;
      n_rise[i]++;
    end
  end

  initial begin
    realtime t_cap;
    for (int i = 0; i < NCH; i++) begin coarse[i] = '0; fine[i] = '0; n_rise[i] = 0; bad_per[i] = 0; end
    #1 rst_n = 1'b0;
    #1 run = 1'b1;
    #30 rst_n = 1'b1;
    for (int shot = 0; shot < 20; shot++) begin
      for (int i = 0; i < NCH; i++) begin
        if (shot == 0)      d[i] = i;
        else if (shot == 1) d[i] = 255 - i;
        else                d[i] = int'($urandom_range(0, 255));
        coarse[i] = coarse_of(d[i]);
        fine[i]   = fine_of(d[i]);
        n_rise[i] = 0;
        bad_per[i] = 0;
      end
      repeat (2) @(posedge ph[0]);
      #0.5 trigger_in = 1'b1;
      @(posedge ph[0]);
      t_cap = $realtime;
      repeat (3) @(posedge ph[0]);
      #0.5 trigger_in = 1'b0;
      repeat ((18 + 255 + 24 * NSAMP) / 6 + 4) @(posedge ph[0]);
      for (int i = 0; i < NCH; i++) begin
        check(n_rise[i] == NSAMP, $sformatf("shot %0d ch %0d %0d samples", shot, i, n_rise[i]));
        check(t_first[i] - t_cap > 18 + d[i] - 0.01 && t_first[i] - t_cap < 18 + d[i] + 0.01,
              $sformatf("shot %0d ch %0d delay %0.3f for d=%0d", shot, i, t_first[i] - t_cap, d[i]));
        check(bad_per[i] == 0, $sformatf("shot %0d ch %0d period", shot, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
