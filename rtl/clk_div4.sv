`timescale 1ns / 1ps
// clk_div4 - 1/4 frequency divider making a channel's A/D sample clock.
//
// Divides the channel's 6 ns phase clock by four, giving a 24 ns
// (41.7 MHz) sample clock with 50 % duty, while the divider control input
// 'en' is high. The first clock edge that sees 'en' high drives sample_clk
// high, so the sample clock keeps the channel's 1 ns fine delay and its
// coarse delay. With 'en' low the divider is cleared and sample_clk is low.
// The 1/4 ratio and 24 ns period follow the original; the output is a
// register, so it carries no combinational glitch.
//
// Interface: clk, rst_n, en in; sample_clk out. Latency: one clk period
// from 'en' to the first rising edge of sample_clk.
module clk_div4 (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic sample_clk
);
  logic [1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= 2'd0;
      sample_clk <= 1'b0;
    end else if (!en) begin
      phase      <= 2'd0;
      sample_clk <= 1'b0;
    end else begin
      phase      <= phase + 2'd1;
      sample_clk <= ~phase[1];
    end
  end
endmodule
