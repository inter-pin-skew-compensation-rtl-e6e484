// cdc_dll_ctrl: digital controller of the delay-locked loop that sets the
// bias of the coarse delay cells in every delay line before skew
// compensation starts, so that the cell delay does not drift with process,
// voltage, temperature or data rate.
//
// A rising edge of `cal_start` runs one 8-bit binary search with its own SAR
// (the same SAR as the skew estimator's, 2 clocks per bit). The comparator
// input `pd_slow_needed` comes from a phase detector on a replica cell chain:
// HIGH means the cells are still too fast (bandwidth too high) and the
// control code must grow. When the search ends, `cdc_ctrl` holds the code,
// `locked` goes high and stays high until the next `cal_start`, and
// `lock_pulse` is high for one cycle, which can start skew compensation.
//
// From the design: an 8-bit SAR-controlled DLL fixes the coarse cells'
// bandwidth before skew compensation. This design's choices: a dedicated
// SAR, the comparator polarity, and the lock pulse that hands over to the
// skew estimator. The replica chain and its phase detector are analog and
// not modelled here; their decision enters on `pd_slow_needed`.
//
// Interface: clk (SAR_CLK), rst_n, cal_start, pd_slow_needed ->
// cdc_ctrl[7:0], locked, lock_pulse. The start edge is taken at the first
// clk edge that sees cal_start high; lock_pulse rises 16 clk cycles later
// and locked one cycle after that.
module cdc_dll_ctrl
  import skew_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cal_start,
  input  logic  pd_slow_needed,
  output code_t cdc_ctrl,
  output logic  locked,
  output logic  lock_pulse
);
  timeunit 1ps; timeprecision 1fs;

  logic start_q, kick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      locked  <= 1'b0;
    end else begin
      start_q <= cal_start;
      if (kick)            locked <= 1'b0;
      else if (lock_pulse) locked <= 1'b1;
    end
  end
  assign kick = cal_start && !start_q;

  sar8 #(.WIDTH(SAR_BITS), .BIT_CYCLES(BIT_CYCLES)) u_sar (
    .clk, .rst_n,
    .en     (1'b1),
    .start  (kick),
    .comp   (pd_slow_needed),
    .sar_out(cdc_ctrl),
    .busy   (),
    .stop   (lock_pulse)
  );
endmodule
