// sar_repeater: issues the one-cycle start pulse of the shared SAR.
//
// The first pulse follows the `kick` of a new skew compensation run. After
// that, every `stop` of the SAR re-arms it for the next channel, so one SAR
// serves all nine channels in turn. The stop of the last channel is not
// repeated: the run ends there. The pulse is registered, so `start` is high in
// the clock cycle after `kick` or `stop`.
//
// The repeater's role (reset and restart the SAR when it completes) is from
// the design; the registered pulse and the `last` input are this design's
// choices (in the original the clock gating alone prevents a restart after
// the last channel).
//
// Interface: clk/rst_n, en (gated SAR clock enable), kick, stop, last -> start.
module sar_repeater (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic kick,     // new run requested (ungated)
  input  logic stop,     // SAR finished a channel
  input  logic last,     // the channel that just finished is the last one
  output logic start
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    start <= 1'b0;
    else if (kick) start <= 1'b1;
    else if (en)   start <= stop && !last;
  end
endmodule
