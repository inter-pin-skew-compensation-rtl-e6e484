// tb_cdc_dll_ctrl: self-checking test of the coarse-cell DLL controller.
// A replica model computes the cell delay 40 ps + 0.2 ps x code and asks for
// a larger code while it is below the target; the lock code is then the
// largest code whose delay is below the target, worked out here by a plain
// search. Checks the lock code for the 62.5 ps default target and random
// targets, the lock time (lock pulse 16 clocks after the start edge), the single-cycle
// lock pulse, and that locked stays high until the next start.
module tb_cdc_dll_ctrl;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0, pd;
  logic [7:0] cdc_ctrl;
  logic locked, lock_pulse;
  real target;
  int checks = 0, failures = 0;

  cdc_dll_ctrl dut (.clk, .rst_n, .cal_start, .pd_slow_needed(pd), .cdc_ctrl, .locked, .lock_pulse);

  always #2500 clk = !clk;
  assign pd = (40.0 + 0.2 * real'(cdc_ctrl)) < target;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic lock(input real t);
    int cyc, exp_code;
    target = t;
    exp_code = 0;
    for (int c = 0; c < 256; c++) if (40.0 + 0.2 * real'(c) < t) exp_code = c;
    @(negedge clk) cal_start = 1'b1;
    @(posedge clk);
    cyc = 0;
    @(negedge clk);
    check(!locked, "locked drops on a new start");
    while (!lock_pulse && cyc < 100) begin
      @(posedge clk);
      cyc++;
      #1;
    end
    check(cyc == 16, $sformatf("lock pulse %0d cycles after start edge, expected 16", cyc));
    @(posedge clk);
    #1;
    check(locked && !lock_pulse, "locked set, pulse is one cycle");
    check(cdc_ctrl == 8'(exp_code), $sformatf("lock code %0d expected %0d", cdc_ctrl, exp_code));
    cal_start = 1'b0;
    repeat (5) @(negedge clk);
    check(locked && cdc_ctrl == 8'(exp_code), "lock held");
  endtask

  initial begin
    target = 62.5;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!locked, "not locked after reset");
    lock(62.5);
    for (int k = 0; k < 20; k++) lock(40.5 + real'($urandom_range(0, 500)) / 10.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
