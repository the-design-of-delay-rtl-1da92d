`timescale 1ns / 1ps
// phase_gen_model - simulation-only source of six ideal phase clocks.
//
// ph[k] is a 6 ns, 50 % duty clock lagging ph[0] by k ns, i.e. what the
// PLL plus inverters deliver. Used by block testbenches that need the
// phase clocks without the PLL model. 'run' starts all clocks together.
module phase_gen_model (
  input  logic       run,
  output logic [5:0] ph
);
  initial ph = 6'b000000;
  for (genvar k = 0; k < 6; k++) begin : g_ph
    initial begin
      @(posedge run);
      #(k);
      forever begin
        ph[k] = 1'b1;
        #3;
        ph[k] = 1'b0;
        #3;
      end
    end
  end
endmodule
