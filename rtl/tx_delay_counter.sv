`timescale 1ns / 1ps
// tx_delay_counter - coarse delay counter of one transmit channel.
//
// Runs on the channel's selected phase clock. When the SYNC start pulse
// arrives (through start_align), the 16-bit counter is loaded with the coarse
// delay and counts down once per 6 ns clock; at terminal count the trigger
// output goes high for PULSE_CYCLES clocks and the counter returns to idle.
// A new start at any time restarts the channel.
//
// Timing: with clock phase k and coarse value C, trigger rises
// TX_LATENCY_NS + 6*C + k ns after the reference edge that captured SYNC,
// i.e. a fixed latency plus the programmed delay d = 6*C + k.
// Loading the counter with the coarse delay and firing at terminal count
// follow the original; the pulse length and restart rule are this design's.
//
// Interface: clk, rst_n, start (reference domain pulse), fine_zero,
// coarse[COARSE_W] in; trigger out (registered in the channel clock).
module tx_delay_counter
  import delay_pkg::*;
#(
  parameter int unsigned CW     = COARSE_W,
  parameter int unsigned PULSE  = PULSE_CYCLES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          fine_zero,
  input  logic [CW-1:0] coarse,
  output logic          trigger
);
  localparam int unsigned PW = (PULSE > 1) ? $clog2(PULSE) : 1;

  typedef enum logic [1:0] {IDLE, COUNT, PULSE_ON} state_t;

  state_t          state;
  logic [CW-1:0]   cnt;
  logic [PW-1:0]   pcnt;
  logic            go;

  start_align u_align (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .fine_zero (fine_zero),
    .go        (go)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      pcnt    <= '0;
      trigger <= 1'b0;
    end else if (go) begin
      if (coarse == '0) begin
        trigger <= 1'b1;
        pcnt    <= PW'(PULSE - 1);
        state   <= PULSE_ON;
      end else begin
        trigger <= 1'b0;
        cnt     <= coarse - 1'b1;
        state   <= COUNT;
      end
    end else begin
      unique case (state)
        IDLE: trigger <= 1'b0;
        COUNT: begin
          if (cnt == '0) begin
            trigger <= 1'b1;
            pcnt    <= PW'(PULSE - 1);
            state   <= PULSE_ON;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        PULSE_ON: begin
          if (pcnt == '0) begin
            trigger <= 1'b0;
            state   <= IDLE;
          end else begin
            pcnt <= pcnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
