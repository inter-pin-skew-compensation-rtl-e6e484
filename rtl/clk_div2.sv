// clk_div2: divide-by-two of the full-swing strobe clock, producing SAR_CLK.
//
// A toggle flip-flop on the rising edge of `clk_in`; `clk_out` therefore has
// half the frequency (200 MHz from the 400 MHz training strobe) and rises on
// every other rising edge of `clk_in`. The halving is from the design; the
// toggle implementation and the reset to low are this design's choices.
//
// Interface: clk_in, rst_n -> clk_out.
module clk_div2 (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= !clk_out;
  end
endmodule
