// tb_clk_div2: self-checking test of the divide-by-two.
// Drives a 400 MHz clock and checks that the output is low after reset,
// toggles on every input rising edge, and has a 5000 ps (200 MHz) period.
module tb_clk_div2;
  timeunit 1ps; timeprecision 1fs;

  logic clk_in = 1'b0, rst_n = 1'b0, clk_out, prev;
  realtime t_last;
  int checks = 0, failures = 0, periods = 0;

  clk_div2 dut (.clk_in, .rst_n, .clk_out);

  always #1250 clk_in = !clk_in;

  always @(posedge clk_out) begin
    if (t_last > 0) begin
      checks++; periods++;
      if ($realtime - t_last != 5000.0) begin
        failures++;
        $display("FAIL: SAR_CLK period %0t", $realtime - t_last);
      end
    end
    t_last = $realtime;
  end

  initial begin
    t_last = 0;
    #3000;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL: not low in reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk_in);
      prev = clk_out;
      @(negedge clk_in);
      checks++;
      if (clk_out !== !prev) begin failures++; $display("FAIL: no toggle"); end
    end
    checks++;
    if (periods < 40) begin failures++; $display("FAIL: too few periods"); end
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
