// tb_skew_estimator: self-checking test of the skew estimator.
// The analog front end is replaced by an abstract lane model in units of one
// delay-code step: pin p arrives at skew[p] + code[p]; SAFF i reads HIGH when
// DQ[i] arrives strictly before DQS. It is sampled on the falling SAR_CLK
// edge, where the real sampling pulse falls between two SAR_CLK edges.
// For each random lane the expected result is worked out independently:
//   DQS code  = clamp(max(skew_dq) - skew_dqs, 0, 255)
//   DQ[i] code = clamp(skew_dqs + dqs_code - skew_dq[i] - 1, 0, 255)
// The test also checks that complete rises exactly 162 SAR_CLK cycles after
// the start pulse, that the codes stay frozen afterwards, and counts the
// cases where DQS had to be delayed and where it was already the latest.
module tb_skew_estimator;
  import skew_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, skew_comp_start = 1'b0;
  logic [N_DQ-1:0] s_dq;
  code_t [N_CH-1:0] reg_code;
  logic complete, sar_busy;
  logic [N_CH:0] ch;
  int skew [N_CH];       // index 0 = DQS
  int checks = 0, failures = 0, dqs_delayed = 0, dqs_latest = 0, dq_delayed = 0;

  skew_estimator dut (.clk, .rst_n, .skew_comp_start, .s_dq, .reg_code, .complete, .ch, .sar_busy);

  always #2500 clk = !clk;

  always @(negedge clk)
    for (int i = 0; i < N_DQ; i++)
      s_dq[i] <= (skew[1+i] + int'(reg_code[1+i])) < (skew[0] + int'(reg_code[0]));

  function automatic int clamp(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_lane(input int dqs_skew, input int spread);
    int mx, cyc, exp_dqs, exp_dq;
    skew[0] = dqs_skew;
    for (int i = 1; i < N_CH; i++) skew[i] = $urandom_range(0, spread);
    mx = skew[1];
    for (int i = 2; i < N_CH; i++) if (skew[i] > mx) mx = skew[i];
    @(negedge clk) skew_comp_start = 1'b1;
    @(posedge clk);                       // start pulse is launched here
    cyc = 0;
    @(negedge clk) skew_comp_start = 1'b0;
    while (!complete && cyc < 1000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    check(cyc == 162, $sformatf("complete after %0d SAR_CLK cycles, expected 162", cyc));
    exp_dqs = clamp(mx - skew[0]);
    check(reg_code[0] == code_t'(exp_dqs),
          $sformatf("DQS code %0d expected %0d", reg_code[0], exp_dqs));
    if (exp_dqs > 0) dqs_delayed++; else dqs_latest++;
    for (int i = 1; i < N_CH; i++) begin
      exp_dq = clamp(skew[0] + exp_dqs - skew[i] - 1);
      if (exp_dq > 0) dq_delayed++;
      check(reg_code[i] == code_t'(exp_dq),
            $sformatf("DQ[%0d] code %0d expected %0d", i - 1, reg_code[i], exp_dq));
    end
    // frozen after completion
    skew[1] = skew[1] + 50;
    repeat (40) @(posedge clk);
    check(complete && ch == (10'b1 << N_CH) && !sar_busy, "estimator frozen after complete");
    check(reg_code[0] == code_t'(exp_dqs), "codes hold after complete");
  endtask

  initial begin
    for (int i = 0; i < N_CH; i++) skew[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!complete && reg_code == '0, "idle after reset");
    run_lane(0, 240);        // DQS leads: it must be delayed
    run_lane(250, 240);      // DQS is the latest: it stays at code 0
    for (int k = 0; k < 10; k++) run_lane($urandom_range(0, 200), $urandom_range(1, 250));
    check(dqs_delayed > 0 && dqs_latest > 0 && dq_delayed > 0, "all step cases exercised");
    $display("dqs_delayed=%0d dqs_latest=%0d dq_delayed=%0d", dqs_delayed, dqs_latest, dq_delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
