`timescale 1ns / 1ps
// async_fifo - per-channel FIFO registers between a channel's own sample
// clock and the common adder clock.
//
// Each receive channel samples at its own delayed instants, so its data
// arrives on its own clock. This dual-clock FIFO lines the channels up: the
// adder reads all of them together once every one holds a sample. Standard
// construction: a DEPTH-entry register array, binary read/write pointers with
// one extra wrap bit, Gray-coded copies passed through two-flop synchronisers
// to the other side for the full and empty flags. Reads are first-word
// fall-through: rdata shows the oldest entry whenever rempty is low. A write
// while full is dropped and sets the sticky 'overflow' flag. The original
// only names 'FIFO registers'; everything here is this design's choice.
//
// Interface: write side wclk, wrst_n, winc, wdata, wfull, overflow;
// read side rclk, rrst_n, rinc, rdata, rempty. Resets are asynchronous,
// active low. A write shows at the read side 2 to 3 rclk edges later.
module async_fifo #(
  parameter int unsigned DW    = 12,
  parameter int unsigned DEPTH = 16
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          winc,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  output logic          overflow,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rinc,
  output logic [DW-1:0] rdata,
  output logic          rempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wbin, wgray, rbin, rgray;
  logic [AW:0]   rgray_w1, rgray_w2;   // read pointer seen by write side
  logic [AW:0]   wgray_r1, wgray_r2;   // write pointer seen by read side
  logic [AW:0]   wbin_next, rbin_next, wgray_next, rgray_next;
  logic          do_write, do_read;

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $error("async_fifo: DEPTH must be a power of two");
  end

  // ---------------- write side ----------------
  assign do_write   = winc & ~wfull;
  assign wbin_next  = wbin + (AW+1)'(do_write);
  assign wgray_next = (wbin_next >> 1) ^ wbin_next;

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      wfull    <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= wgray_next;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      wfull    <= (wgray_next == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
      if (winc & wfull) overflow <= 1'b1;
    end
  end

  // ---------------- read side ----------------
  assign do_read    = rinc & ~rempty;
  assign rbin_next  = rbin + (AW+1)'(do_read);
  assign rgray_next = (rbin_next >> 1) ^ rbin_next;
  assign rdata      = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rempty   <= 1'b1;
    end else begin
      rbin     <= rbin_next;
      rgray    <= rgray_next;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      rempty   <= (rgray_next == wgray_r2);
    end
  end
endmodule
