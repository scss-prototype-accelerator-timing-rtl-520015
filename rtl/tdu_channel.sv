// tdu_channel: one delayed-trigger channel of the trigger delay unit.
//
// A master-trigger strobe starts a 24-bit down-counter clocked at 238 MHz;
// when the programmed delay has elapsed the channel drives its output high
// for a programmed number of cycles, counted by a 15-bit counter. With the
// 4.2 ns clock the longest delay is (2^24 - 1) cycles, about 70.5 ms, and the
// longest pulse (2^15 - 1) cycles, about 138 us.
//
// Interface and timing (all on clk, asynchronous active-low reset):
//   trig     one-cycle strobe, sampled on a rising clock edge (edge k).
//   delay    loaded at edge k. The output is high from edge k+delay on,
//            so a delay of 0 raises it right after the triggering edge.
//   width    loaded when the pulse starts; the output stays high for
//            `width` cycles. A width of 0 produces no pulse at all.
//   inhibit  forces the output low while it is high; a pulse that is
//            inhibited is lost, the counters run on regardless.
//   busy     high while counting; strobes that arrive while busy are
//            ignored (the channel does not restart).
//
// From the source design: the 238 MHz 24-bit delay counter, the 15-bit
// width counter and output suppression by inhibit. This design's own
// choices: the exact latency convention above, ignoring a trigger that
// arrives while the channel is still busy, and gating (rather than
// cancelling) the pulse on inhibit.
module tdu_channel
  import timing_pkg::*;
#(
  parameter int unsigned DELAY_W = DELAY_BITS,
  parameter int unsigned WIDTH_W = WIDTH_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               trig,
  input  logic [DELAY_W-1:0] delay,
  input  logic [WIDTH_W-1:0] width,
  input  logic               inhibit,
  output logic               out,
  output logic               busy
);
  timeunit 1ps;
  timeprecision 1fs;

  ch_state_e          state;
  logic [DELAY_W-1:0] dcnt;
  logic [WIDTH_W-1:0] wcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CH_IDLE;
      dcnt  <= '0;
      wcnt  <= '0;
    end else begin
      unique case (state)
        CH_IDLE: begin
          if (trig && width != '0) begin
            if (delay == '0) begin
              state <= CH_PULSE;
              wcnt  <= width - 1'b1;
            end else begin
              state <= CH_DELAY;
              dcnt  <= delay - 1'b1;
            end
          end
        end
        CH_DELAY: begin
          if (dcnt == '0) begin
            state <= CH_PULSE;
            wcnt  <= width - 1'b1;
          end else begin
            dcnt <= dcnt - 1'b1;
          end
        end
        CH_PULSE: begin
          if (wcnt == '0) state <= CH_IDLE;
          else            wcnt  <= wcnt - 1'b1;
        end
        default: state <= CH_IDLE;
      endcase
    end
  end

  assign busy = (state != CH_IDLE);
  assign out  = (state == CH_PULSE) && !inhibit;
endmodule
