`timescale 1ns / 1ps
// pll_model - behavioural model (not synthesizable) of the FPGA PLL that
// feeds the delay pulse circuit, for simulation only.
//
// Configured as in the circuit: inclk0 = 25 MHz, outputs c0, c1, c2 at
// 25 MHz * 20/3 (6 ns period, 50 % duty) with 0, 60 and 120 degree phase
// shift, i.e. c1 and c2 lag c0 by 1 ns and 2 ns. c0 starts on the first
// rising edge of inclk0; 'locked' rises after LOCK_EDGES input edges.
// No jitter, no lock acquisition dynamics.
module pll_model #(
  parameter int unsigned LOCK_EDGES = 4
) (
  input  logic       inclk0,
  output logic [2:0] c,
  output logic       locked
);
  int unsigned edges = 0;
  logic        run   = 1'b0;

  initial begin
    locked = 1'b0;
    c      = 3'b000;
  end

  always @(posedge inclk0) begin
    edges <= edges + 1;
    run   <= 1'b1;
    if (edges + 1 >= LOCK_EDGES) locked <= 1'b1;
  end

  // Three free-running 6 ns clocks, started 0, 1 and 2 ns after the first
  // input edge.
  for (genvar k = 0; k < 3; k++) begin : g_out
    initial begin
      @(posedge run);
      #(k);
      forever begin
        c[k] = 1'b1;
        #3;
        c[k] = 1'b0;
        #3;
      end
    end
  end
endmodule
