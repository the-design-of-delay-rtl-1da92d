`timescale 1ns / 1ps
// adc_model - behavioural model (not synthesizable) of one A/D converter
// watching an echo, for simulation only.
//
// The converter samples on the rising edge of sample_clk and shows the code
// on 'data' right after that edge. The analog input is an echo waveform
// s(t) delayed by ECHO_NS: code = echo_code(t - echo_ns), with t the sample
// instant rounded to the nearest ns. echo_code changes every nanosecond, so
// a sample clock that is off by 1 ns gives a different code.
module adc_model #(
  parameter int unsigned DW = 12
) (
  input  logic                 sample_clk,
  input  int                   echo_ns,
  output logic signed [DW-1:0] data
);
  initial data = '0;

  // Deterministic echo waveform: a hashed value per ns, full scale.
  function automatic logic signed [DW-1:0] echo_code(longint t);
    longint unsigned h;
    h = longint'(t) * 64'd2654435761 + 64'd12345;
    h = h ^ (h >> 13);
    return DW'(h);
  endfunction

  always @(posedge sample_clk) begin
    data <= echo_code(longint'($rtoi($realtime + 0.5)) - longint'(echo_ns));
  end
endmodule
