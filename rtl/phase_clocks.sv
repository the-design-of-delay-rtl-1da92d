`timescale 1ns / 1ps
// phase_clocks - six 1 ns-spaced clocks from the three PLL outputs.
//
// The PLL gives three 6 ns clocks at 0, 60 and 120 degrees (c0, c1, c2).
// Inverting each adds 180 degrees, so clk_out[3..5] sit at 180, 240 and
// 300 degrees. Ordered by phase, clk_out[k] lags clk_out[0] by k ns, which is
// the 1 ns step of the whole circuit. The outputs are held low until the PLL
// reports lock, so no channel sees a runt edge while the PLL settles (the
// gating is this design's choice; the inverters follow the original circuit).
// When the gate opens, an inverted clock that is high at that moment starts
// with a short first pulse; hold the design in reset across that moment.
// clk_out[5] is the inverted 120 degree clock, i.e. 300 degrees.
//
// Interface: pll_clk[2:0] in, pll_locked in, clk_out[5:0] out. Purely
// combinational: clk_out[i] = pll_clk[i], clk_out[i+3] = ~pll_clk[i].
module phase_clocks
  import delay_pkg::*;
(
  input  logic [2:0]         pll_clk,
  input  logic               pll_locked,
  output logic [N_PHASE-1:0] clk_out
);
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      clk_out[i]     = pll_locked &  pll_clk[i];
      clk_out[i + 3] = pll_locked & ~pll_clk[i];
    end
  end
endmodule
