`timescale 1ns / 1ps
// delay_pulse_top - 1 ns resolution delay pulse circuit for an ultrasonic
// phased array: transmit trigger generator and receive beamformer.
//
// The FPGA's PLL (outside this RTL) turns the 25 MHz board clock into three
// 6 ns clocks at 0, 60 and 120 degrees; phase_clocks inverts them to get six
// clocks 1 ns apart. From these, tx_delay_pulse fires NCH transducer trigger
// pulses and rx_beamformer makes NCH non-uniform A/D sample clocks and sums
// the converted samples, every delay being 6*coarse + fine ns. One
// trigger_in (SYNC, synchronous to clk_out[0]) starts a transmit and a
// receive shot together; the transmit and receive delays are set apart.
// The phase clocks stay low until the PLL reports lock; rst_n (asynchronous,
// active low) resets every register, including the FIFO write sides whose
// clocks are idle between shots, so it should be pulsed low after power-up.
//
// Interface: pll_clk[2:0], pll_locked from the PLL; rst_n; trigger_in;
// tx_coarse/tx_fine and rx_coarse/rx_fine per channel; adc_data per channel.
// Out: clk_out[5:0], trigger_out[NCH] to the pulsers, sample_clk[NCH] to the
// converters, beam_sample/beam_valid (on clk_out[0]), fifo_overflow.
// Timing: trigger_out[i] rises TX_LATENCY_NS + tx delay and the first
// sample_clk[i] edge RX_LATENCY_NS + rx delay after the clk_out[0] edge that
// first sees trigger_in high.
module delay_pulse_top
  import delay_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned CW    = COARSE_W,
  parameter int unsigned PULSE = PULSE_CYCLES,
  parameter int unsigned NSAMP = N_SAMPLES,
  parameter int unsigned DW    = ADC_W,
  parameter int unsigned DEPTH = FIFO_DEPTH,
  localparam int unsigned SW   = DW + $clog2(NCH)
) (
  input  logic [2:0]           pll_clk,
  input  logic                 pll_locked,
  input  logic                 rst_n,
  input  logic                 trigger_in,
  input  logic [CW-1:0]        tx_coarse [NCH],
  input  logic [FINE_W-1:0]    tx_fine   [NCH],
  input  logic [CW-1:0]        rx_coarse [NCH],
  input  logic [FINE_W-1:0]    rx_fine   [NCH],
  input  logic signed [DW-1:0] adc_data  [NCH],
  output logic [N_PHASE-1:0]   clk_out,
  output logic [NCH-1:0]       trigger_out,
  output logic [NCH-1:0]       sample_clk,
  output logic signed [SW-1:0] beam_sample,
  output logic                 beam_valid,
  output logic [NCH-1:0]       fifo_overflow
);
  phase_clocks u_phase (
    .pll_clk    (pll_clk),
    .pll_locked (pll_locked),
    .clk_out    (clk_out)
  );

  tx_delay_pulse #(.NCH(NCH), .CW(CW), .PULSE(PULSE)) u_tx (
    .clk_ph      (clk_out),
    .rst_n       (rst_n),
    .trigger_in  (trigger_in),
    .coarse      (tx_coarse),
    .fine        (tx_fine),
    .trigger_out (trigger_out)
  );

  rx_beamformer #(.NCH(NCH), .CW(CW), .NSAMP(NSAMP), .DW(DW), .DEPTH(DEPTH)) u_rx (
    .clk_ph        (clk_out),
    .rst_n         (rst_n),
    .trigger_in    (trigger_in),
    .coarse        (rx_coarse),
    .fine          (rx_fine),
    .sample_clk    (sample_clk),
    .adc_data      (adc_data),
    .beam_sample   (beam_sample),
    .beam_valid    (beam_valid),
    .fifo_overflow (fifo_overflow)
  );
endmodule
