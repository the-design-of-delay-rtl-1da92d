`timescale 1ns / 1ps
// tb_rx_beamformer - checks the receive beamformer end to end with 8 A/D
// converter models.
//
// Each channel's converter model sees the same echo waveform arriving
// echo[i] ns late. The channel is programmed with receive delay d[i]; its
// n-th sample is taken at t_cap + 18 + d[i] + 24n and holds
// s(t - echo[i]). Every beam sample is compared with the sum of those eight
// values computed here. In focused shots echo[i] = d[i], so the sum is 8
// times a single echo sample; in the other shots echo and delay differ.
// Also checked: NSAMP beam samples per shot, no FIFO overflow.
module tb_rx_beamformer;
  import delay_pkg::*;
  localparam int NCH   = N_CH;
  localparam int NSAMP = 32;
  localparam int SW    = ADC_W + $clog2(N_CH);

  int checks = 0, failures = 0;

  logic                    run = 1'b0;
  logic [5:0]              ph;
  logic                    rst_n = 1'b1;
  logic                    trigger_in = 1'b0;
  logic [COARSE_W-1:0]     coarse [NCH];
  logic [FINE_W-1:0]       fine   [NCH];
  logic [NCH-1:0]          sample_clk;
  logic signed [ADC_W-1:0] adc_data [NCH];
  logic signed [SW-1:0]    beam_sample;
  logic                    beam_valid;
  logic [NCH-1:0]          fifo_overflow;
  int                      d    [NCH];
  int                      echo [NCH];

  phase_gen_model u_ph (.run(run), .ph(ph));

  for (genvar i = 0; i < NCH; i++) begin : g_adc
    adc_model #(.DW(ADC_W)) u_adc (.sample_clk(sample_clk[i]), .echo_ns(echo[i]), .data(adc_data[i]));
  end

  rx_beamformer #(.NSAMP(NSAMP)) dut (
    .clk_ph(ph), .rst_n(rst_n), .trigger_in(trigger_in), .coarse(coarse), .fine(fine),
    .sample_clk(sample_clk), .adc_data(adc_data), .beam_sample(beam_sample),
    .beam_valid(beam_valid), .fifo_overflow(fifo_overflow)
  );

  function automatic logic signed [ADC_W-1:0] echo_code(longint t);
    longint unsigned h;
    h = longint'(t) * 64'd2654435761 + 64'd12345;
    h = h ^ (h >> 13);
    return ADC_W'(h);
  endfunction

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

  realtime t_cap;
  int      n_beam = 0;
  bit      focused;
  always @(posedge ph[0]) begin
    if (beam_valid && rst_n) begin
      logic signed [SW-1:0] exp_sum;
      exp_sum = '0;
      for (int i = 0; i < NCH; i++)
        exp_sum += SW'(echo_code($rtoi(t_cap + 18.0 + d[i] + 24.0 * n_beam + 0.5) - echo[i]));
      check(beam_sample == exp_sum,
            $sformatf("beam %0d got %0d expected %0d", n_beam, beam_sample, exp_sum));
      if (focused)
        check(beam_sample == SW'(NCH) * SW'(echo_code($rtoi(t_cap + 18.0 + 24.0 * n_beam + 0.5))),
              "focused sum is 8 equal samples");
      n_beam++;
    end
  end

  initial begin
    for (int i = 0; i < NCH; i++) begin coarse[i] = '0; fine[i] = '0; echo[i] = 0; d[i] = 0; end
    #1 rst_n = 1'b0;
    #1 run = 1'b1;
    #30 rst_n = 1'b1;
    for (int shot = 0; shot < 8; shot++) begin
      focused = (shot % 2 == 0);
      for (int i = 0; i < NCH; i++) begin
        d[i] = (shot == 0) ? 36 * i + i % 6 : int'($urandom_range(0, 255));
        echo[i] = focused ? d[i] : int'($urandom_range(0, 255));
        coarse[i] = coarse_of(d[i]);
        fine[i]   = fine_of(d[i]);
      end
      n_beam = 0;
      repeat (2) @(posedge ph[0]);
      #0.5 trigger_in = 1'b1;
      @(posedge ph[0]);
      t_cap = $realtime;
      repeat (3) @(posedge ph[0]);
      #0.5 trigger_in = 1'b0;
      repeat ((18 + 255 + 24 * NSAMP) / 6 + 30) @(posedge ph[0]);
      check(n_beam == NSAMP, $sformatf("shot %0d: %0d beam samples", shot, n_beam));
      check(fifo_overflow == '0, "no FIFO overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
