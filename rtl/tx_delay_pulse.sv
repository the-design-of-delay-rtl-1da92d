`timescale 1ns / 1ps
// tx_delay_pulse - transmit delay circuit: NCH trigger outputs, each delayed
// from SYNC by 0..255 ns (or more) in 1 ns steps.
//
// Every channel has a 6-to-1 clock multiplexer choosing one of the six 1 ns
// spaced phase clocks (fine delay) and a coarse counter clocked by it
// (coarse delay, whole 6 ns periods). The SYNC input trigger_in is captured
// once on the reference phase clock clk_ph[0] and fanned out to all channels.
// Channel i fires trigger_out[i] for PULSE clocks, starting
// TX_LATENCY_NS + 6*coarse[i] + fine[i] ns after the clk_ph[0] edge that
// first saw trigger_in high. The fine/coarse split and per-channel structure
// follow the original; the fixed latency comes from this design's
// clock-crossing of the start pulse (see start_align).
//
// Interface: clk_ph[5:0] phase clocks, rst_n, trigger_in, coarse[i],
// fine[i] (0..5) in; trigger_out[NCH] out. coarse and fine are static
// settings: change them only while no channel is running.
module tx_delay_pulse
  import delay_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned CW    = COARSE_W,
  parameter int unsigned PULSE = PULSE_CYCLES
) (
  input  logic [N_PHASE-1:0] clk_ph,
  input  logic               rst_n,
  input  logic               trigger_in,
  input  logic [CW-1:0]      coarse [NCH],
  input  logic [FINE_W-1:0]  fine   [NCH],
  output logic [NCH-1:0]     trigger_out
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

    clk_mux6 u_mux (
      .clk_in  (clk_ph),
      .sel     (fine[i]),
      .clk_out (ch_clk)
    );

    tx_delay_counter #(.CW(CW), .PULSE(PULSE)) u_cnt (
      .clk       (ch_clk),
      .rst_n     (rst_n),
      .start     (start),
      .fine_zero (fine[i] == '0 || fine[i] >= FINE_W'(N_PHASE)),
      .coarse    (coarse[i]),
      .trigger   (trigger_out[i])
    );
  end
endmodule
