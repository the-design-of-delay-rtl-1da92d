`timescale 1ns / 1ps
// rx_delay_counter - coarse delay counter of one receive channel.
//
// Runs on the channel's selected phase clock. On the synchronous trigger's
// start pulse it loads the coarse delay, counts it down in 6 ns steps and
// then raises 'div_en', the control input of the channel's 1/4 divider, for
// 4*NSAMP clocks: exactly NSAMP sample-clock periods. A new start restarts it.
//
// Timing: with clock phase k and coarse value C, div_en rises
// 12 + 6*C + k ns after the reference edge that captured the trigger; the
// divider adds one clock, so the first sample-clock edge comes
// RX_LATENCY_NS + d ns after it (d = 6*C + k).
// The counter loaded with the coarse delay and gating the divider follows the
// original; the fixed number of samples per shot is this design's choice.
//
// Interface: clk, rst_n, start, fine_zero, coarse[COARSE_W] in; div_en out.
module rx_delay_counter
  import delay_pkg::*;
#(
  parameter int unsigned CW    = COARSE_W,
  parameter int unsigned NSAMP = N_SAMPLES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          fine_zero,
  input  logic [CW-1:0] coarse,
  output logic          div_en
);
  localparam int unsigned RUN = 4 * NSAMP;
  localparam int unsigned RW  = $clog2(RUN + 1);

  typedef enum logic [1:0] {IDLE, COUNT, RUN_ON} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic [RW-1:0] rcnt;
  logic          go;

  start_align u_align (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .fine_zero (fine_zero),
    .go        (go)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      cnt    <= '0;
      rcnt   <= '0;
      div_en <= 1'b0;
    end else if (go) begin
      if (coarse == '0) begin
        div_en <= 1'b1;
        rcnt   <= RW'(RUN - 1);
        state  <= RUN_ON;
      end else begin
        div_en <= 1'b0;
        cnt    <= coarse - 1'b1;
        state  <= COUNT;
      end
    end else begin
      unique case (state)
        IDLE: div_en <= 1'b0;
        COUNT: begin
          if (cnt == '0) begin
            div_en <= 1'b1;
            rcnt   <= RW'(RUN - 1);
            state  <= RUN_ON;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        RUN_ON: begin
          if (rcnt == '0) begin
            div_en <= 1'b0;
            state  <= IDLE;
          end else begin
            rcnt <= rcnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
