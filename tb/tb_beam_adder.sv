`timescale 1ns / 1ps
// tb_beam_adder - checks the delay-and-sum adder.
//
// Random 'empty' flags and random signed samples, including full-scale
// ones: 'pop' must be high exactly when no channel is empty, and one clock
// after each pop sum_valid must be high with sum equal to the sum of the
// eight samples, computed here with integers.
module tb_beam_adder;
  localparam int NCH = 8;
  localparam int DW  = 12;
  localparam int SW  = DW + 3;

  int checks = 0, failures = 0;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b1;
  logic [NCH-1:0]       empty = '1;
  logic signed [DW-1:0] data [NCH];
  logic                 pop;
  logic signed [SW-1:0] sum;
  logic                 sum_valid;

  always #3 clk = ~clk;

  beam_adder #(.NCH(NCH), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .empty(empty), .data(data),
    .pop(pop), .sum(sum), .sum_valid(sum_valid)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  exp_sum;
    bit  exp_valid;
    int  n_pop = 0;
    for (int i = 0; i < NCH; i++) data[i] = '0;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    exp_valid = 1'b0;
    exp_sum = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      check(sum_valid == exp_valid, "sum_valid follows pop");
      if (exp_valid) check(int'(sum) == exp_sum,
                           $sformatf("sum got %0d expected %0d", sum, exp_sum));
      empty = ($urandom_range(0, 2) == 0) ? NCH'($urandom) : '0;
      for (int i = 0; i < NCH; i++) begin
        case ($urandom_range(0, 5))
          0:       data[i] = {1'b1, {(DW-1){1'b0}}};   // most negative
          1:       data[i] = {1'b0, {(DW-1){1'b1}}};   // most positive
          default: data[i] = DW'($urandom);
        endcase
      end
      #0.1;
      check(pop == (empty == '0), "pop when every FIFO holds data");
      exp_valid = (empty == '0);
      if (exp_valid) begin
        exp_sum = 0;
        for (int i = 0; i < NCH; i++) exp_sum += int'(data[i]);
        n_pop++;
      end
    end
    check(n_pop > 100, "enough sums");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
