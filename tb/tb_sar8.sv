// tb_sar8: self-checking test of the 8-bit SAR.
// A comparator model answers "trial code <= target" for a random target, so
// a correct binary search must end exactly on the target. Checks per run: the
// final code, that stop is a single-cycle pulse 16 clocks (8 bits x 2 clocks)
// after the start is taken, that busy is high until then, and that a low
// clock enable freezes the search.
module tb_sar8;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0;
  logic [7:0] sar_out;
  logic busy, stop, comp;
  int unsigned target;
  int checks = 0, failures = 0;

  sar8 dut (.clk, .rst_n, .en, .start, .comp, .sar_out, .busy, .stop);

  always #2500 clk = !clk;
  assign comp = (int'(sar_out) <= int'(target));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int unsigned t, input bit stall);
    int cyc;
    target = t;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;          // start taken at the edge between
    cyc = 0;
    check(busy && sar_out == 8'h80, "first trial is 0x80");
    while (!stop && cyc < 100) begin
      if (stall && cyc == 5) begin
        en = 1'b0;
        repeat (3) @(negedge clk);
        check(busy, "frozen while en low");
        en = 1'b1;
      end
      @(negedge clk);
      cyc++;
    end
    check(cyc == 16, $sformatf("stop after %0d cycles, expected 16", cyc));
    check(sar_out == 8'(t), $sformatf("result %0d expected %0d", sar_out, t));
    check(!busy, "not busy at stop");
    @(negedge clk);
    check(!stop, "stop is one cycle");
    check(sar_out == 8'(t), "result held");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(sar_out == 0 && !busy && !stop, "reset state");
    run(0, 0);
    run(255, 0);
    run(128, 1);
    for (int k = 0; k < 40; k++) run($urandom_range(0, 255), 0);
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
