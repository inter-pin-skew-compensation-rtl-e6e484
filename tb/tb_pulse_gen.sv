// tb_pulse_gen: self-checking test of the pulse generator model.
// A 400 MHz differential strobe must give one full-swing pulse per rising
// edge, starting 20 ps after the edge and 300 ps wide, and nothing on the
// falling edges.
module tb_pulse_gen;
  timeunit 1ps; timeprecision 1fs;

  logic in = 1'b0, inb = 1'b1, out;
  realtime t_rise;
  int checks = 0, failures = 0, pulses = 0;

  pulse_gen dut (.in, .inb, .out);

  always #1250 begin in = !in; inb = !inb; end
  always @(posedge in) t_rise = $realtime;

  always @(posedge out) begin
    checks++; pulses++;
    if ($realtime - t_rise != 20.0) begin failures++; $display("FAIL: pulse delay %0t", $realtime - t_rise); end
  end
  always @(negedge out) if (pulses > 0) begin
    checks++;
    if ($realtime - t_rise != 320.0) begin failures++; $display("FAIL: pulse end %0t", $realtime - t_rise); end
  end

  initial begin
    #(2500 * 40 + 100);
    checks++;
    if (pulses != 40) begin failures++; $display("FAIL: %0d pulses, expected 40", pulses); end
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
