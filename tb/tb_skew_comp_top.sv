// tb_skew_comp_top: end-to-end test of the byte lane at its default
// parameters.
//
// A 400 MHz clock-like training pattern is sent on DQS and all eight DQs,
// each pin with its own input skew of 0..600 ps. A replica-detector model
// answers the coarse-cell DLL (cell delay 40 ps + 0.2 ps x code, target
// 62.5 ps). Each run checks, from the final codes and the delay-line law
// worked out here:
//   * the DLL bias code (112) and that skew compensation follows the lock;
//   * the residual skew at every SAFF: the DQS sampling edge minus the DQ
//     edge must lie within the 24 ps SAFF window plus one code step;
//   * the operation time: 162 SAR_CLK cycles and 324 sampling-clock cycles
//     from the estimator start to `complete`;
//   * nine SAR passes per run, and frozen codes after completion.
// It counts each mechanism: DLL lock, DQS delayed in step 1, DQS already the
// latest, DQ delayed in step 2, SAR restart, completion, a re-run started by
// skew_comp_start alone. A mechanism never seen is a failure.
module tb_skew_comp_top;
  import skew_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real T_HALF   = 1250.0;        // 400 MHz training pattern
  localparam real T_FIX    = 30.0;          // delay-line fixed delay (model default)
  localparam real T_PGEN   = 20.0;          // pulse generator delay (model default)
  localparam real WINDOW   = 24.0;          // SAFF uncertainty window
  localparam real DLL_TGT  = 62.5;          // coarse cell delay target

  logic rst_n = 1'b1, base = 1'b0;
  logic [N_DQ-1:0] dq_p, dq_n, s_dq;
  logic dqs_p, dqs_n;
  logic cal_start = 1'b0, skew_comp_start = 1'b0, pd;
  logic sample_clk, sar_clk, complete, dll_locked, sar_busy;
  code_t cdc_ctrl;
  code_t [N_CH-1:0] reg_code;
  logic [N_CH:0] ch;

  real skew [N_CH];         // input skew per pin, index 0 = DQS
  int checks = 0, failures = 0;
  int n_dll = 0, n_dqs_delayed = 0, n_dqs_latest = 0, n_dq_delayed = 0;
  int n_sar_pass = 0, n_complete = 0, n_rerun = 0;
  real worst_res = 0.0;

  skew_comp_top dut (
    .rst_n, .dq_p, .dq_n, .dqs_p, .dqs_n, .cal_start, .skew_comp_start,
    .dll_pd_slow_needed(pd), .s_dq, .sample_clk, .sar_clk, .complete,
    .dll_locked, .cdc_ctrl, .reg_code, .ch, .sar_busy
  );

  // pattern source and per-pin skew
  always #(T_HALF) base = !base;
  always @(base) dqs_p <= #(skew[0]) base;
  assign dqs_n = !dqs_p;
  for (genvar i = 0; i < N_DQ; i++) begin : g_pin
    always @(base) dq_p[i] <= #(skew[1+i]) base;
    assign dq_n[i] = !dq_p[i];
  end

  function automatic real t_cell(input int b);
    return 40.0 + 0.2 * real'(b);
  endfunction
  assign pd = t_cell(int'(cdc_ctrl)) < DLL_TGT;

  always @(posedge sar_busy) n_sar_pass++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // delay of one pin's line for its code, by the line's linear law
  function automatic real line(input int code);
    return T_FIX + t_cell(int'(cdc_ctrl)) * 10.0 * real'(code) / 256.0;
  endfunction

  // run 0: DQS the latest pin; runs 1 and 2: the 600 ps worst case of the
  // design's evaluation (DQS 600 ps ahead of a DQ, and DQs spread over
  // 600 ps around DQS); later runs random
  task automatic new_skews(input int r);
    for (int i = 1; i < N_CH; i++) skew[i] = real'($urandom_range(0, 5800)) / 10.0;
    skew[0] = real'($urandom_range(0, 3000)) / 10.0;
    case (r)
      0: skew[0] = 600.0;
      1: begin skew[0] = 0.0;   skew[5] = 600.0; end
      2: begin skew[0] = 300.0; skew[1] = 0.0; skew[8] = 600.0; end
      default: ;
    endcase
  endtask

  // free-running edge counters; a run's time is the difference of snapshots
  int cnt_sar = 0, cnt_pulse = 0, sar0, pulse0;
  always @(posedge sar_clk) cnt_sar++;
  always @(posedge sample_clk) cnt_pulse++;

  task automatic snap();
    sar0 = cnt_sar;
    pulse0 = cnt_pulse;
  endtask

  task automatic judge(input int sar_cycles, input int pulses);
    real t_clk, res, lo, hi, lsb, t_late;
    int passes_before;
    lsb = t_cell(int'(cdc_ctrl)) * 10.0 / 256.0;
    n_complete++;
    check(sar_cycles == 162, $sformatf("%0d SAR_CLK cycles, expected 162", sar_cycles));
    check(pulses == 324, $sformatf("%0d strobe cycles, expected 324", pulses));
    t_clk = skew[0] + line(int'(reg_code[0])) + T_PGEN;
    // step 1: the DQS edge must not be earlier than the latest DQ edge
    // (beyond the SAFF window), and must be as early as the code allows
    t_late = 0.0;
    for (int i = 1; i < N_CH; i++) if (skew[i] + T_FIX > t_late) t_late = skew[i] + T_FIX;
    if (reg_code[0] == 0) begin
      n_dqs_latest++;
      check(t_clk >= t_late - WINDOW, "DQS left undelayed although a DQ lags it");
    end else begin
      n_dqs_delayed++;
      check(t_clk - t_late > -WINDOW - lsb && t_clk - t_late < WINDOW + lsb,
            $sformatf("DQS locked %0f ps from the latest DQ", t_clk - t_late));
    end
    // step 2: each DQ edge within the window (plus one step) of the DQS edge
    lo = 1.0e9; hi = -1.0e9;
    for (int i = 1; i < N_CH; i++) begin
      if (reg_code[i] != 0) n_dq_delayed++;
      res = t_clk - (skew[i] + line(int'(reg_code[i])));
      if (res < lo) lo = res;
      if (res > hi) hi = res;
      check(res > -WINDOW && res < WINDOW + lsb,
            $sformatf("DQ[%0d] residual %0f ps (code %0d)", i - 1, res, reg_code[i]));
    end
    if (hi - lo > worst_res) worst_res = hi - lo;
    // frozen afterwards
    passes_before = n_sar_pass;
    repeat (20) @(posedge sample_clk);
    check(n_sar_pass == passes_before && complete && !sar_busy, "estimator idle after complete");
  endtask

  initial begin
    for (int i = 0; i < N_CH; i++) skew[i] = 0.0;
    new_skews(-1);
    #1000 rst_n = 1'b0;           // power-on reset pulse (asynchronous)
    #19000 rst_n = 1'b1;
    #10000;
    // run 1: DLL calibration, then skew compensation started by the lock
    @(negedge sar_clk) cal_start = 1'b1;
    @(posedge dll_locked);
    #1 snap();                    // the estimator takes its start at this edge
    n_dll++;
    check(cdc_ctrl == 8'd112, $sformatf("DLL code %0d expected 112", cdc_ctrl));
    @(posedge complete);
    judge(cnt_sar - sar0, cnt_pulse - pulse0);
    cal_start = 1'b0;
    check(n_sar_pass == 9, $sformatf("%0d SAR passes in the first run, expected 9", n_sar_pass));
    // later runs: skew compensation alone
    for (int r = 0; r < 8; r++) begin
      new_skews(r);
      #10000;
      @(negedge sar_clk) skew_comp_start = 1'b1;
      @(posedge sar_clk);
      #1 snap();                // the estimator took its start at this edge
      n_rerun++;
      @(posedge complete);
      judge(cnt_sar - sar0, cnt_pulse - pulse0);
      skew_comp_start = 1'b0;
    end
    check(n_sar_pass == 9 * 9, $sformatf("%0d SAR passes, expected 81", n_sar_pass));
    check(n_dll > 0,         "mechanism never seen: DLL lock");
    check(n_dqs_delayed > 0, "mechanism never seen: DQS delayed in step 1");
    check(n_dqs_latest > 0,  "mechanism never seen: DQS already the latest");
    check(n_dq_delayed > 0,  "mechanism never seen: DQ delayed in step 2");
    check(n_sar_pass > 9,    "mechanism never seen: SAR restart");
    check(n_complete > 0,    "mechanism never seen: completion");
    check(n_rerun > 0,       "mechanism never seen: re-run by skew_comp_start");
    $display("mechanisms: dll_lock=%0d dqs_delayed=%0d dqs_latest=%0d dq_delayed=%0d sar_passes=%0d complete=%0d reruns=%0d",
             n_dll, n_dqs_delayed, n_dqs_latest, n_dq_delayed, n_sar_pass, n_complete, n_rerun);
    $display("worst DQ-to-DQ residual skew: %0.1f ps", worst_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
