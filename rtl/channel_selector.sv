// channel_selector: one-hot pointer CH[N_CH:0] to the channel that the shared
// SAR is calibrating.
//
// `kick` loads CH[0] (the DQS channel). Each `stop` of the SAR shifts the one
// hot bit up by one. After the last channel the bit reaches CH[N_CH], which
// selects no channel and marks the run complete. With no run started, CH is
// all zero. CH[N_CH-1:0] drives the comparator mux and the column select of
// the register matrix.
//
// The one-hot CH[8:0] bus and the extra CH[9] completion bit are as drawn in
// the design; implementing the selector as a shift register is this design's
// choice.
//
// Interface: clk/rst_n, en (gated SAR clock enable), kick, stop -> ch.
module channel_selector #(
  parameter int unsigned N_CH = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          kick,
  input  logic          stop,
  output logic [N_CH:0] ch
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ch <= '0;
    else if (kick)          ch <= (N_CH+1)'(1);
    else if (en && stop)    ch <= {ch[N_CH-1:0], 1'b0};
  end

  a_onehot0: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ch));
endmodule
