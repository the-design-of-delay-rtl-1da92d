`timescale 1ns / 1ps
// sync_start - captures the SYNC (trigger_in) rising edge on the reference
// phase clock clk_out[0].
//
// trigger_in is taken to be synchronous to clk_out[0]. The first clk_out[0]
// edge that sees it high sets 'start' for exactly one reference period. All
// channel delays are measured from that edge.
//
// Interface: clk_ref, rst_n (async, active low), trigger_in in; start out. Latency: start rises on the edge that first samples trigger_in high.
module sync_start (
  input  logic clk_ref,
  input  logic rst_n,
  input  logic trigger_in,
  output logic start
);
  logic level;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      level <= 1'b0;
      start <= 1'b0;
    end else begin
      level <= trigger_in;
      start <= trigger_in & ~level;
    end
  end
endmodule
