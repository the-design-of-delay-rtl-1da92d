`timescale 1ns / 1ps
// start_align - moves the one-period start pulse from the reference clock
// clk_out[0] into a channel running on phase clock clk_out[k].
//
// A channel clock lagging the reference by k = 1..5 ns first sees 'start' k ns
// after the reference edge; the k = 0 channel, sharing that edge, sees it one
// full period (6 ns) later. To make the channel delay exactly k ns for every
// k, the k >= 1 channels take 'start' through one more register than the
// k = 0 channel. 'go' then rises 6 + k ns after the reference edge, and lasts
// one channel period. This two-path alignment is this design's choice; the
// original only states that the phase select gives the 1 ns part of the
// delay. It relies on the 1..5 ns paths between clock phases meeting timing.
//
// Interface: clk (channel clock), rst_n, start (reference domain),
// fine_zero (phase select is 0) in; go out.
module start_align (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic fine_zero,
  output logic go
);
  logic s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= start;
      s2 <= s1;
    end
  end

  assign go = fine_zero ? s1 : s2;
endmodule
