`timescale 1ns / 1ps
// rx_beamformer - receive beamforming by non-uniform sampling.
//
// Instead of sampling every element at the same instants and delaying the
// data afterwards, each channel's A/D converter is clocked at its own focusing
// delay (rx_sample_clocks: 1 ns fine step from the phase clocks, 6 ns coarse
// step from a counter, 24 ns sample period from a 1/4 divider). Sample n of
// every channel therefore already belongs to the same focal point. The
// converter outputs are written into one async_fifo per channel on the
// falling edge of that channel's sample clock (mid-period, when the data from
// the preceding rising edge is stable), and beam_adder sums one sample from
// each FIFO as soon as all hold one, on the reference clock clk_ph[0].
// The chain sample clock -> A/D -> FIFO -> adder follows the original; the
// falling-edge write, the read clock and the FIFO depth are this design's.
//
// Interface: clk_ph[5:0], rst_n, trigger_in, coarse[i], fine[i] in;
// sample_clk[NCH] out to the converters, adc_data[i] in from them; beam
// output beam_sample / beam_valid on clk_ph[0]; fifo_overflow[i] sticky.
module rx_beamformer
  import delay_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned CW    = COARSE_W,
  parameter int unsigned NSAMP = N_SAMPLES,
  parameter int unsigned DW    = ADC_W,
  parameter int unsigned DEPTH = FIFO_DEPTH,
  localparam int unsigned SW   = DW + $clog2(NCH)
) (
  input  logic [N_PHASE-1:0]   clk_ph,
  input  logic                 rst_n,
  input  logic                 trigger_in,
  input  logic [CW-1:0]        coarse [NCH],
  input  logic [FINE_W-1:0]    fine   [NCH],
  output logic [NCH-1:0]       sample_clk,
  input  logic signed [DW-1:0] adc_data [NCH],
  output logic signed [SW-1:0] beam_sample,
  output logic                 beam_valid,
  output logic [NCH-1:0]       fifo_overflow
);
  logic [NCH-1:0]       empty;
  logic signed [DW-1:0] rdata [NCH];
  logic                 pop;

  rx_sample_clocks #(.NCH(NCH), .CW(CW), .NSAMP(NSAMP)) u_clocks (
    .clk_ph     (clk_ph),
    .rst_n      (rst_n),
    .trigger_in (trigger_in),
    .coarse     (coarse),
    .fine       (fine),
    .sample_clk (sample_clk)
  );

  for (genvar i = 0; i < NCH; i++) begin : g_fifo
    logic wclk;
    assign wclk = ~sample_clk[i];

    async_fifo #(.DW(DW), .DEPTH(DEPTH)) u_fifo (
      .wclk     (wclk),
      .wrst_n   (rst_n),
      .winc     (1'b1),
      .wdata    (adc_data[i]),
      .wfull    (),
      .overflow (fifo_overflow[i]),
      .rclk     (clk_ph[0]),
      .rrst_n   (rst_n),
      .rinc     (pop),
      .rdata    (rdata[i]),
      .rempty   (empty[i])
    );
  end

  beam_adder #(.NCH(NCH), .DW(DW)) u_adder (
    .clk       (clk_ph[0]),
    .rst_n     (rst_n),
    .empty     (empty),
    .data      (rdata),
    .pop       (pop),
    .sum       (beam_sample),
    .sum_valid (beam_valid)
  );
endmodule
