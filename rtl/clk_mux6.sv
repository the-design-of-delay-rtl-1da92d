`timescale 1ns / 1ps
// clk_mux6 - 6-to-1 clock multiplexer giving a channel its fine delay.
//
// Selects which of the six phase clocks runs the channel's counter; choosing
// clk_out[k] shifts every counter edge by k ns. A select outside 0..5 gives
// clk_out[0]. The select is a static setting: it must only change while the
// channel is idle, because switching a plain multiplexer mid-run can leave a
// short clock pulse. That rule, and the plain (not glitch-free) multiplexer,
// are this design's choice; the original only names the multiplexer and its
// channel-select input.
//
// Interface: clk_in[5:0], sel[2:0] in; clk_out out. Combinational.
module clk_mux6
  import delay_pkg::*;
(
  input  logic [N_PHASE-1:0] clk_in,
  input  logic [FINE_W-1:0]  sel,
  output logic               clk_out
);
  always_comb begin
    if (sel < FINE_W'(N_PHASE)) clk_out = clk_in[sel];
    else                        clk_out = clk_in[0];
  end
endmodule
