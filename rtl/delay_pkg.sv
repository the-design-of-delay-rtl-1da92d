`timescale 1ns / 1ps
// delay_pkg - sizes shared by the delay pulse circuit.
//
// The phase-clock delay scheme splits a delay of d ns into a coarse part
// (whole 6 ns clock periods, loaded into a counter) and a fine part (which of
// six 1 ns-spaced phase clocks runs that counter): d = 6*coarse + fine.
// Eight channels, six phases, the 6 ns period and the 16-bit coarse counter
// follow the original description. The A/D width, the trigger pulse length,
// the samples per acquisition and the FIFO depth are this design's choices.
package delay_pkg;
  localparam int unsigned N_PHASE      = 6;    // phase clocks, 1 ns apart
  localparam int unsigned PERIOD_NS    = 6;    // period of each phase clock
  localparam int unsigned N_CH         = 8;    // transducer channels
  localparam int unsigned COARSE_W     = 16;   // coarse delay counter width
  localparam int unsigned FINE_W       = 3;    // phase select 0..5
  localparam int unsigned PULSE_CYCLES = 16;   // transmit pulse length (chosen)
  localparam int unsigned ADC_W        = 12;   // A/D sample width (chosen)
  localparam int unsigned N_SAMPLES    = 256;  // samples per receive shot (chosen)
  localparam int unsigned FIFO_DEPTH   = 16;   // per-channel FIFO depth (chosen)

  // Fixed latencies from the reference clk_out[0] edge that first sees
  // trigger_in high to the channel output edge, for fine = coarse = 0.
  localparam int unsigned TX_LATENCY_NS = 12;
  localparam int unsigned RX_LATENCY_NS = 18;

  // Split a delay in ns into counter load value and phase select.
  function automatic logic [COARSE_W-1:0] coarse_of(int unsigned d_ns);
    return COARSE_W'(d_ns / PERIOD_NS);
  endfunction

  function automatic logic [FINE_W-1:0] fine_of(int unsigned d_ns);
    return FINE_W'(d_ns % PERIOD_NS);
  endfunction
endpackage
