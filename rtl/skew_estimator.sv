// skew_estimator: measures the inter-pin skew of one byte lane and stores the
// compensation codes of the nine delay lines (DQS and DQ[0..7]).
//
// A run is started by a rising edge of `skew_comp_start`. One shared 8-bit SAR
// then locks the channels one after another, in the order DQS, DQ[0], ...,
// DQ[7]:
//   * DQS channel: the comparator input is the NAND of all eight SAFF outputs.
//     A SAFF reads LOW while DQS still leads its DQ, so the NAND stays HIGH
//     ("delay DQS more") until DQS lags every DQ. The DQS thus ends up locked
//     to the most lagging DQ in a single binary search.
//   * DQ[i] channel: the comparator input is SAFF output S_DQ[i]. HIGH means
//     the DQ edge still arrives before DQS ("delay DQ more").
// The SAR's trial codes are written into the register matrix column of the
// selected channel, so the delay line is adjusted in closed loop. When the
// SAR stops, the repeater restarts it and the channel selector moves to the
// next channel. After the ninth channel, CH[9] sets `complete` and the SAR
// clock enable drops, freezing the estimator until the next run.
//
// Timing: with the default 2 clocks per bit a channel takes 18 SAR_CLK
// cycles, so `complete` rises 162 SAR_CLK cycles after the start pulse
// (324 cycles of the 400 MHz strobe). Codes are valid when `complete` is high.
//
// Structure from the design: the 8-input NAND, the 9-to-1 mux, the shared
// SAR, the repeater, the channel selector, the 8-by-9 register matrix and the
// completion flip-flop that gates SAR_CLK. This design's choices: the SAR
// clock gate is a synchronous clock enable, `skew_comp_start` is taken as a
// level synchronous to `clk`, and a new run clears all codes.
//
// Interface: clk (SAR_CLK), rst_n, skew_comp_start, s_dq[N_DQ-1:0] ->
// reg_code[N_CH] (index 0 = DQS), complete, ch, sar_busy.
module skew_estimator
  import skew_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  skew_comp_start,
  input  logic [N_DQ-1:0]       s_dq,
  output code_t [N_CH-1:0]      reg_code,
  output logic                  complete,
  output logic [N_CH:0]         ch,
  output logic                  sar_busy
);
  timeunit 1ps; timeprecision 1fs;

  logic start_q, kick, en, sar_start, sar_stop, comp;
  code_t sar_out;
  logic [N_CH-1:0] mux_in;

  // rising edge of the start request (ungated clock)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= skew_comp_start;
  end
  assign kick = skew_comp_start && !start_q;

  // completion flip-flop, set together with CH[9]; its inverted output gates
  // SAR_CLK
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     complete <= 1'b0;
    else if (kick)  complete <= 1'b0;
    else if (en && sar_stop && ch[N_CH-1]) complete <= 1'b1;
  end
  assign en = !complete;

  // 8-input NAND for the DQS step, then the 9-to-1 mux
  always_comb begin
    mux_in = {s_dq, ~&s_dq};
    comp   = |(mux_in & ch[N_CH-1:0]);
  end

  sar_repeater u_rep (
    .clk, .rst_n, .en, .kick,
    .stop (sar_stop),
    .last (ch[N_CH-1]),
    .start(sar_start)
  );

  sar8 #(.WIDTH(SAR_BITS), .BIT_CYCLES(BIT_CYCLES)) u_sar (
    .clk, .rst_n, .en,
    .start  (sar_start),
    .comp,
    .sar_out,
    .busy   (sar_busy),
    .stop   (sar_stop)
  );

  channel_selector #(.N_CH(N_CH)) u_chsel (
    .clk, .rst_n, .en, .kick,
    .stop (sar_stop),
    .ch
  );

  register_matrix #(.N_CH(N_CH), .W(SAR_BITS)) u_regs (
    .clk, .rst_n,
    .we     (en && (sar_busy || sar_stop)),
    .clr    (kick),
    .col_sel(ch[N_CH-1:0]),
    .d      (sar_out),
    .q      (reg_code)
  );

  // handshake rules: the repeater only restarts an idle SAR, and completion
  // coincides with the selector's CH[9]
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n) sar_start |-> !sar_busy);
  a_complete_at_end: assert property (@(posedge clk) disable iff (!rst_n) complete |-> ch[N_CH]);
endmodule
