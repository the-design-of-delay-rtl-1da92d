`timescale 1ns / 1ps
// beam_adder - delay-and-sum adder of the receive beamformer.
//
// Whenever every channel FIFO holds a sample (no 'empty' flag set), it pops
// one sample from each and registers their signed sum as the next output
// beam sample. Because each channel was sampled at its own focusing delay,
// samples with the same index belong to the same focal point, so adding them
// is the beamforming sum. The original names the adder and its output sample;
// the two's-complement samples, the full-precision sum width and the
// one-clock registered output are this design's choices.
//
// Interface: clk, rst_n, empty[NCH], data[NCH] (signed DW) in; pop (to all
// FIFOs), sum (DW + clog2(NCH) bits, signed), sum_valid out. Latency: sum is
// valid one clk after the pop.
module beam_adder #(
  parameter int unsigned NCH = 8,
  parameter int unsigned DW  = 12,
  localparam int unsigned SW = DW + $clog2(NCH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NCH-1:0]       empty,
  input  logic signed [DW-1:0] data [NCH],
  output logic                 pop,
  output logic signed [SW-1:0] sum,
  output logic                 sum_valid
);
  logic signed [SW-1:0] total;

  assign pop = ~|empty;

  always_comb begin
    total = '0;
    for (int i = 0; i < NCH; i++) total += SW'(data[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= pop;
      if (pop) sum <= total;
    end
  end
endmodule
