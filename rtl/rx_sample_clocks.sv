`timescale 1ns / 1ps
// rx_sample_clocks - non-uniform A/D sample clocks for NCH receive channels.
//
// Each channel selects one of the six 1 ns spaced phase clocks (fine delay),
// counts the coarse delay on it, and then runs a 1/4 divider on the same
// clock, so its 24 ns sample clock is shifted by 6*coarse + fine ns. The
// synchronous trigger input is captured on clk_ph[0]. Channel i's first
// sample_clk rising edge comes RX_LATENCY_NS + 6*coarse[i] + fine[i] ns after
// the clk_ph[0] edge that first saw trigger_in high, and the channel then
// gives NSAMP sample-clock periods. The mux/counter/divider chain follows the
// original; the fixed latency and the sample count are this design's.
//
// Interface: clk_ph[5:0], rst_n, trigger_in, coarse[i], fine[i] in;
// sample_clk[NCH] out. coarse and fine are static during a shot.
module rx_sample_clocks
  import delay_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned CW    = COARSE_W,
  parameter int unsigned NSAMP = N_SAMPLES
) (
  input  logic [N_PHASE-1:0] clk_ph,
  input  logic               rst_n,
  input  logic               trigger_in,
  input  logic [CW-1:0]      coarse [NCH],
  input  logic [FINE_W-1:0]  fine   [NCH],
  output logic [NCH-1:0]     sample_clk
);
  logic start;

  sync_start u_sync (
    .clk_ref    (clk_ph[0]),
    .rst_n      (rst_n),
    .trigger_in (trigger_in),
    .start      (start)
  );

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    logic ch_clk;
    logic div_en;

    clk_mux6 u_mux (
      .clk_in  (clk_ph),
      .sel     (fine[i]),
      .clk_out (ch_clk)
    );

    rx_delay_counter #(.CW(CW), .NSAMP(NSAMP)) u_cnt (
      .clk       (ch_clk),
      .rst_n     (rst_n),
      .start     (start),
      .fine_zero (fine[i] == '0 || fine[i] >= FINE_W'(N_PHASE)),
      .coarse    (coarse[i]),
      .div_en    (div_en)
    );

    clk_div4 u_div (
      .clk        (ch_clk),
      .rst_n      (rst_n),
      .en         (div_en),
      .sample_clk (sample_clk[i])
    );
  end
endmodule
