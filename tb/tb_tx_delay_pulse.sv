`timescale 1ns / 1ps
// tb_tx_delay_pulse - checks the 8-channel transmit delay circuit.
//
// Over 40 SYNC shots every channel is given delays 0..255 ns (first shots
// cover all six fine phases, 0 and 255 ns; the rest are random). SYNC is
// raised just after a phase-0 edge and held for several clocks; the
// capture edge is the next phase-0 edge. Each trigger_out[i] must rise
// exactly 12 + d[i] ns after it, once per shot, and last 16 clocks.
module tb_tx_delay_pulse;
  import delay_pkg::*;
  localparam int NCH = N_CH;

  int checks = 0, failures = 0;

  logic                run = 1'b0;
  logic [5:0]          ph;
  logic                rst_n = 1'b1;
  logic                trigger_in = 1'b0;
  logic [COARSE_W-1:0] coarse [NCH];
  logic [FINE_W-1:0]   fine   [NCH];
  logic [NCH-1:0]      trigger_out;
  int                  d [NCH];

  phase_gen_model u_ph (.run(run), .ph(ph));

  tx_delay_pulse dut (
    .clk_ph(ph), .rst_n(rst_n), .trigger_in(trigger_in),
    .coarse(coarse), .fine(fine), .trigger_out(trigger_out)
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

  realtime t_rise [NCH];
  realtime t_fall [NCH];
  int      n_rise [NCH];
  for (genvar i = 0; i < NCH; i++) begin : g_obs
    always @(posedge trigger_out[i]) begin t_rise[i] = $realtime; n_rise[i]++; end
    always @(negedge trigger_out[i]) t_fall[i] = $realtime;
  end

  initial begin
    realtime t_cap;
    for (int i = 0; i < NCH; i++) begin coarse[i] = '0; fine[i] = '0; n_rise[i] = 0; end
    #1 rst_n = 1'b0;
    #1 run = 1'b1;
    #30 rst_n = 1'b1;
    for (int shot = 0; shot < 40; shot++) begin
      for (int i = 0; i < NCH; i++) begin
        if (shot == 0)      d[i] = i;
        else if (shot == 1) d[i] = 255 - i;
        else                d[i] = int'($urandom_range(0, 255));
        coarse[i] = coarse_of(d[i]);
        fine[i]   = fine_of(d[i]);
        n_rise[i] = 0;
      end
      repeat (2) @(posedge ph[0]);
      #0.5 trigger_in = 1'b1;
      @(posedge ph[0]);
      t_cap = $realtime;
      repeat (3) @(posedge ph[0]);
      #0.5 trigger_in = 1'b0;
      repeat ((12 + 255) / 6 + PULSE_CYCLES + 4) @(posedge ph[0]);
      for (int i = 0; i < NCH; i++) begin
        check(n_rise[i] == 1, $sformatf("shot %0d ch %0d one pulse", shot, i));
        check(t_rise[i] - t_cap > 12 + d[i] - 0.01 && t_rise[i] - t_cap < 12 + d[i] + 0.01,
              $sformatf("shot %0d ch %0d delay %0.3f for d=%0d", shot, i, t_rise[i] - t_cap, d[i]));
        check(t_fall[i] - t_rise[i] > 6 * PULSE_CYCLES - 0.01 &&
              t_fall[i] - t_rise[i] < 6 * PULSE_CYCLES + 0.01,
              $sformatf("shot %0d ch %0d width", shot, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
