`timescale 1ns / 1ps
// tb_delay_pulse_top - end-to-end test of the delay pulse circuit at its
// default sizes (8 channels, 16-bit coarse counters, 256 samples per shot).
//
// A 25 MHz clock drives a PLL model; its outputs feed the top. Each shot sets
// transmit and receive delays for all channels, raises trigger_in right after
// a clk_out[0] edge, and checks against timing worked out here:
//  * clk_out[k] rises k ns after clk_out[0];
//  * trigger_out[i] rises 12 + d_tx[i] ns after the capturing clk_out[0]
//    edge and stays high 16 clocks (96 ns);
//  * sample_clk[i] first rises 18 + d_rx[i] ns after it, with a 24 ns
//    period, 256 rising edges per shot;
//  * every channel's A/D model sees an echo arriving d_rx[i] ns late, so a
//    correctly focused beam sum is exactly 8 times one echo sample; each of
//    the 256 beam samples is compared with the sum computed here.
// Mechanisms counted: each of the 6 fine phases in transmit and receive,
// zero delay, the 255 ns maximum, FIFO skew (a channel FIFO holding several
// samples while the latest channel is still in its delay), and re-triggering.
module tb_delay_pulse_top;
  import delay_pkg::*;

  localparam int NCH   = N_CH;
  localparam int NS    = N_SAMPLES;
  localparam int SW    = ADC_W + $clog2(N_CH);
  localparam int SHOTS = 6;

  int checks = 0, failures = 0;

  logic                    clk_25m = 1'b0;
  logic [2:0]              pll_clk;
  logic                    pll_locked;
  logic                    rst_n = 1'b1;
  logic                    trigger_in = 1'b0;
  logic [COARSE_W-1:0]     tx_coarse [NCH];
  logic [FINE_W-1:0]       tx_fine   [NCH];
  logic [COARSE_W-1:0]     rx_coarse [NCH];
  logic [FINE_W-1:0]       rx_fine   [NCH];
  logic signed [ADC_W-1:0] adc_data  [NCH];
  logic [N_PHASE-1:0]      clk_out;
  logic [NCH-1:0]          trigger_out;
  logic [NCH-1:0]          sample_clk;
  logic signed [SW-1:0]    beam_sample;
  logic                    beam_valid;
  logic [NCH-1:0]          fifo_overflow;

  int d_tx [NCH];
  int d_rx [NCH];
  int echo [NCH];

  always #20 clk_25m = ~clk_25m;

  pll_model u_pll (.inclk0(clk_25m), .c(pll_clk), .locked(pll_locked));

  for (genvar i = 0; i < NCH; i++) begin : g_adc
    adc_model #(.DW(ADC_W)) u_adc (
      .sample_clk (sample_clk[i]),
      .echo_ns    (echo[i]),
      .data       (adc_data[i])
    );
  end

  delay_pulse_top dut (
    .pll_clk, .pll_locked, .rst_n, .trigger_in,
    .tx_coarse, .tx_fine, .rx_coarse, .rx_fine, .adc_data,
    .clk_out, .trigger_out, .sample_clk, .beam_sample, .beam_valid,
    .fifo_overflow
  );

  // Same waveform as adc_model, evaluated here for the expected sums.
  function automatic logic signed [ADC_W-1:0] echo_code(longint t);
    longint unsigned h;
    h = longint'(t) * 64'd2654435761 + 64'd12345;
    h = h ^ (h >> 13);
    return ADC_W'(h);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    #(2_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- phase clock spacing ----------------
  realtime t_c0 = 0;
  int      phase_ok_cnt = 0;
  always @(posedge clk_out[0]) t_c0 = $realtime;
  for (genvar k = 1; k < N_PHASE; k++) begin : g_ph
    always @(posedge clk_out[k]) begin
      if (rst_n && t_c0 > 0 && phase_ok_cnt < 60) begin
        phase_ok_cnt++;
        check(near($realtime - t_c0, real'(k)), $sformatf("clk_out[%0d] phase", k));
      end
    end
  end

  // ---------------- capture instant ----------------
  realtime t_cap;
  logic    trig_prev = 1'b0;
  always @(posedge clk_out[0]) begin
    if (trigger_in && !trig_prev) t_cap = $realtime;
    trig_prev <= trigger_in;
  end

  // ---------------- per-channel observation ----------------
  realtime t_trig_rise [NCH];
  realtime t_trig_fall [NCH];
  realtime t_s_first   [NCH];
  realtime t_s_last    [NCH];
  int      n_srise     [NCH];
  int      n_trig      [NCH];
  int      bad_period  [NCH];

  for (genvar i = 0; i < NCH; i++) begin : g_obs
    always @(posedge trigger_out[i]) begin
      t_trig_rise[i] = $realtime;
      n_trig[i]++;
    end
    always @(negedge trigger_out[i]) t_trig_fall[i] = $realtime;
    always @(posedge sample_clk[i]) begin
      if (n_srise[i] == 0) t_s_first[i] = $realtime;
      else if (!near($realtime - t_s_last[i], 24.0)) bad_period[i]++;
      t_s_last[i] = $realtime;
      n_srise[i]++;
    end
  end

  // ---------------- beam output ----------------
  int n_beam = 0;
  int max_skew_seen = 0;
  always @(posedge clk_out[0]) begin
    if (beam_valid && rst_n) begin
      logic signed [SW-1:0] exp_sum;
      exp_sum = '0;
      for (int i = 0; i < NCH; i++)
        exp_sum += SW'(echo_code($rtoi(t_cap + 18.0 + d_rx[i] + 24.0 * n_beam + 0.5) - echo[i]));
      check(beam_sample == exp_sum,
            $sformatf("beam sample %0d: got %0d expected %0d", n_beam, beam_sample, exp_sum));
      n_beam++;
    end
  end

  // FIFO skew: samples already taken by the earliest channel while the
  // latest one has not started.
  always @(posedge clk_out[0]) begin
    int mn, mx;
    mn = n_srise[0]; mx = n_srise[0];
    for (int i = 1; i < NCH; i++) begin
      if (n_srise[i] < mn) mn = n_srise[i];
      if (n_srise[i] > mx) mx = n_srise[i];
    end
    if (mx - mn > max_skew_seen) max_skew_seen = mx - mn;
  end

  // ---------------- mechanism counters ----------------
  int used_tx_fine [N_PHASE];
  int used_rx_fine [N_PHASE];
  int n_zero_delay = 0, n_max_delay = 0, n_skew = 0, n_retrigger = 0;

  task automatic run_shot(int shot);
    for (int i = 0; i < NCH; i++) begin
      n_srise[i] = 0; n_trig[i] = 0; bad_period[i] = 0;
      tx_coarse[i] = coarse_of(d_tx[i]);
      tx_fine[i]   = fine_of(d_tx[i]);
      rx_coarse[i] = coarse_of(d_rx[i]);
      rx_fine[i]   = fine_of(d_rx[i]);
      echo[i]      = d_rx[i];
      used_tx_fine[d_tx[i] % 6]++;
      used_rx_fine[d_rx[i] % 6]++;
      if (d_tx[i] == 0 || d_rx[i] == 0) n_zero_delay++;
      if (d_tx[i] == 255 || d_rx[i] == 255) n_max_delay++;
    end
    n_beam = 0;
    max_skew_seen = 0;
    @(posedge clk_out[0]);
    #0.5 trigger_in = 1'b1;
    // SYNC held for a few clocks, then released.
    repeat (4) @(posedge clk_out[0]);
    #0.5 trigger_in = 1'b0;
    // Wait for the whole receive shot and the adder to drain.
    repeat ((300 + 24 * NS) / 6 + 40) @(posedge clk_out[0]);

    for (int i = 0; i < NCH; i++) begin
      check(n_trig[i] == 1, $sformatf("shot %0d ch %0d one trigger pulse", shot, i));
      check(near(t_trig_rise[i] - t_cap, real'(TX_LATENCY_NS + d_tx[i])),
            $sformatf("shot %0d ch %0d trigger delay %0.3f for d=%0d",
                      shot, i, t_trig_rise[i] - t_cap, d_tx[i]));
      check(near(t_trig_fall[i] - t_trig_rise[i], real'(PULSE_CYCLES * 6)),
            $sformatf("shot %0d ch %0d trigger width", shot, i));
      check(n_srise[i] == NS, $sformatf("shot %0d ch %0d sample count %0d", shot, i, n_srise[i]));
      check(near(t_s_first[i] - t_cap, real'(RX_LATENCY_NS + d_rx[i])),
            $sformatf("shot %0d ch %0d sample delay %0.3f for d=%0d",
                      shot, i, t_s_first[i] - t_cap, d_rx[i]));
      check(bad_period[i] == 0, $sformatf("shot %0d ch %0d sample period", shot, i));
    end
    check(n_beam == NS, $sformatf("shot %0d beam samples %0d", shot, n_beam));
    check(fifo_overflow == '0, "no FIFO overflow");
    if (max_skew_seen >= 2) n_skew++;
    if (shot > 0) n_retrigger++;
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) begin
      tx_coarse[i] = '0; tx_fine[i] = '0; rx_coarse[i] = '0; rx_fine[i] = '0;
      echo[i] = 0; n_srise[i] = 0; n_trig[i] = 0; bad_period[i] = 0;
    end
    for (int k = 0; k < N_PHASE; k++) begin
      used_tx_fine[k] = 0; used_rx_fine[k] = 0;
    end
    #1 rst_n = 1'b0;
    wait (pll_locked);
    repeat (5) @(posedge clk_out[0]);
    rst_n = 1'b1;
    repeat (5) @(posedge clk_out[0]);

    for (int shot = 0; shot < SHOTS; shot++) begin
      for (int i = 0; i < NCH; i++) begin
        case (shot)
          0: begin d_tx[i] = i;          d_rx[i] = 255 - 36 * i; end
          1: begin d_tx[i] = 255 - 6 * i; d_rx[i] = 6 + i;       end
          default: begin
            d_tx[i] = int'($urandom_range(0, 255));
            d_rx[i] = int'($urandom_range(0, 255));
          end
        endcase
      end
      run_shot(shot);
    end

    for (int k = 0; k < N_PHASE; k++) begin
      check(used_tx_fine[k] > 0, $sformatf("tx fine phase %0d exercised", k));
      check(used_rx_fine[k] > 0, $sformatf("rx fine phase %0d exercised", k));
    end
    check(n_zero_delay > 0, "zero delay exercised");
    check(n_max_delay > 0, "255 ns delay exercised");
    check(n_skew > 0, "FIFO skew exercised");
    check(n_retrigger > 0, "re-trigger exercised");
    check(phase_ok_cnt > 0, "phase clocks observed");
    $display("mechanisms: zero=%0d max=%0d skew=%0d retrigger=%0d",
             n_zero_delay, n_max_delay, n_skew, n_retrigger);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
