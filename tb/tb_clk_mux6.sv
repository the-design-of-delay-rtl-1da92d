`timescale 1ns / 1ps
// tb_clk_mux6 - checks the 6-to-1 clock multiplexer.
//
// For every select value 0..7 the output is sampled every 0.5 ns over 30 ns
// and compared with the chosen phase clock (select 6 and 7 fall back to
// clock 0). The first output rising edge after a select change must come
// 'sel' ns after a rising edge of phase 0, which is the fine delay.
module tb_clk_mux6;
  int checks = 0, failures = 0;

  logic       run = 1'b0;
  logic [5:0] ph;
  logic [2:0] sel = 3'd0;
  logic       clk_out;

  phase_gen_model u_ph (.run(run), .ph(ph));
  clk_mux6 dut (.clk_in(ph), .sel(sel), .clk_out(clk_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 run = 1'b1;
    #20;
    for (int s = 0; s < 8; s++) begin
      int expect_k;
      realtime t_ref;
      expect_k = (s < 6) ? s : 0;
      @(posedge ph[0]);
      #0.25 sel = 3'(s);
      repeat (60) begin
        #0.5;
        check(clk_out == ph[expect_k], $sformatf("sel %0d output", s));
      end
      @(posedge ph[0]);
      t_ref = $realtime;
      #0.25;
      @(posedge clk_out);
      if (expect_k == 0) check($realtime - t_ref > 5.99 && $realtime - t_ref < 6.01,
                                $sformatf("sel %0d edge", s));
      else check($realtime - t_ref > expect_k - 0.01 && $realtime - t_ref < expect_k + 0.01,
                 $sformatf("sel %0d edge lag %0.3f", s, $realtime - t_ref));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
