// skew_comp_top: receive front end of one byte lane (8 DQ + 1 DQS) with
// inter-pin skew compensation.
//
// Every input, DQS included, passes through its own register controlled delay
// line (rcdl). The delayed DQS drives a pulse generator whose full-swing
// pulses clock the eight sense-amplifier flip-flops (saff) that sample the
// delayed DQs; in normal operation those SAFF outputs s_dq are the received
// data. A divide-by-two of the pulse clock gives SAR_CLK for the digital
// logic.
//
// Calibration, with a clock-like 400 MHz training pattern on all pins:
//   1. `cal_start` runs the coarse-cell DLL (cdc_dll_ctrl), which sets the
//      bias `cdc_ctrl` of all delay lines. Its phase decision enters on
//      `dll_pd_slow_needed` from the analog replica detector.
//   2. When the DLL locks, the skew estimator starts by itself. It first
//      delays DQS until it lags the most lagging DQ (or leaves it at zero if
//      DQS already lags every DQ), then delays each DQ until its edge meets
//      the DQS edge at the SAFF, one pin at a time with one shared SAR.
//   3. `complete` rises 162 SAR_CLK cycles (324 strobe cycles) after the
//      estimator starts; the codes then stay frozen.
// `skew_comp_start` re-runs step 2 alone.
//
// The structure follows the design's block diagram. The input buffers are
// analog and not part of this model: the ports dq_p/dq_n and dqs_p/dqs_n are
// the buffered differential signals. The delay lines, SAFFs and pulse
// generator are behavioural models, so this top simulates but only the
// digital blocks synthesize. Starting the estimator from the DLL lock is this
// design's choice.
//
// Interface: rst_n (asynchronous, active low); outputs reg_code[0] is the DQS
// code and reg_code[1+i] the DQ[i] code.
module skew_comp_top
  import skew_pkg::*;
(
  input  logic                 rst_n,
  input  logic [N_DQ-1:0]      dq_p,
  input  logic [N_DQ-1:0]      dq_n,
  input  logic                 dqs_p,
  input  logic                 dqs_n,
  input  logic                 cal_start,
  input  logic                 skew_comp_start,
  input  logic                 dll_pd_slow_needed,
  output logic [N_DQ-1:0]      s_dq,
  output logic                 sample_clk,
  output logic                 sar_clk,
  output logic                 complete,
  output logic                 dll_locked,
  output code_t                cdc_ctrl,
  output code_t [N_CH-1:0]     reg_code,
  output logic [N_CH:0]        ch,
  output logic                 sar_busy
);
  timeunit 1ps; timeprecision 1fs;

  logic            dqs_d, dqs_db;
  logic [N_DQ-1:0] dq_d, dq_db;
  logic            dll_lock_pulse;

  // strobe path: delay line, pulse generator, divider
  rcdl u_rcdl_dqs (
    .in(dqs_p), .inb(dqs_n), .cdc_ctrl, .code(reg_code[CH_DQS]),
    .out(dqs_d), .outb(dqs_db)
  );
  pulse_gen u_pgen (.in(dqs_d), .inb(dqs_db), .out(sample_clk));
  clk_div2  u_div  (.clk_in(sample_clk), .rst_n, .clk_out(sar_clk));

  // data paths: delay line and SAFF per pin
  for (genvar i = 0; i < N_DQ; i++) begin : g_dq
    rcdl u_rcdl (
      .in(dq_p[i]), .inb(dq_n[i]), .cdc_ctrl, .code(reg_code[1+i]),
      .out(dq_d[i]), .outb(dq_db[i])
    );
    saff u_saff (
      .clk(sample_clk), .d(dq_d[i]), .db(dq_db[i]), .q(s_dq[i]), .qb()
    );
  end

  cdc_dll_ctrl u_dll (
    .clk(sar_clk), .rst_n, .cal_start, .pd_slow_needed(dll_pd_slow_needed),
    .cdc_ctrl, .locked(dll_locked), .lock_pulse(dll_lock_pulse)
  );

  skew_estimator u_est (
    .clk(sar_clk), .rst_n,
    .skew_comp_start(skew_comp_start || dll_lock_pulse),
    .s_dq, .reg_code, .complete, .ch, .sar_busy
  );
endmodule
