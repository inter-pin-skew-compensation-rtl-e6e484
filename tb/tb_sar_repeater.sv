// tb_sar_repeater: self-checking test of the SAR repeater.
// Random kick/stop/last/en stimulus is compared cycle by cycle against a
// reference: start follows kick, or an enabled stop that is not the last
// channel's, one clock later; a disabled clock holds start.
module tb_sar_repeater;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, kick = 1'b0, stop = 1'b0, last = 1'b0;
  logic start, exp_start;
  int checks = 0, failures = 0, restarts = 0, suppressed = 0;

  sar_repeater dut (.clk, .rst_n, .en, .kick, .stop, .last, .start);

  always #2500 clk = !clk;

  initial begin
    exp_start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      checks++;
      if (start !== exp_start) begin
        failures++;
        $display("FAIL: cycle %0d start=%0b expected %0b", k, start, exp_start);
      end
      kick = ($urandom_range(0, 9) == 0);
      stop = ($urandom_range(0, 2) == 0);
      last = ($urandom_range(0, 3) == 0);
      en   = ($urandom_range(0, 4) != 0);
      // reference for the next edge
      if (kick)     exp_start = 1'b1;
      else if (en)  exp_start = stop && !last;
      if (!kick && en && stop && !last) restarts++;
      if (!kick && en && stop && last)  suppressed++;
    end
    checks++;
    if (restarts == 0 || suppressed == 0) begin
      failures++;
      $display("FAIL: restart %0d / last-channel %0d cases not seen", restarts, suppressed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
