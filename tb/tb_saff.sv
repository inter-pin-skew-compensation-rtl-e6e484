// tb_saff: self-checking test of the SAFF model.
// Data edges placed outside the 24 ps uncertainty window (12 ps either side
// of the clock edge) must be resolved correctly and appear 50 ps after the
// clock; edges inside the window may resolve either way (only counted). A
// data edge more than 12 ps after the clock must not disturb the result, and
// the output must hold between clock edges.
module tb_saff;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, d = 1'b0, db = 1'b1, q, qb;
  int checks = 0, failures = 0, in_window = 0;

  saff dut (.clk, .d, .db, .q, .qb);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic sample(input logic v, input real lead_ps);
    // data settles lead_ps before the clock edge
    d = v; db = !v;
    #(lead_ps);
    clk = 1'b1;
    #60;          // 60 ps after the clock: past clock-to-output
    if (lead_ps >= 30.0) check(q == v && qb == !v, $sformatf("sampled %0b expected %0b (lead %0f)", q, v, lead_ps));
    else in_window++;
    clk = 1'b0;
    #500;
    d = !v; db = v;          // data moves, output must hold
    #100;
    if (lead_ps >= 30.0) check(q == v, "output holds between clocks");
    #400;
    // hold side: data moves lag_ps after the next clock edge
    begin
      int lag;
      lag = $urandom_range(0, 40);
      clk = 1'b1;
      #(lag);
      d = v; db = !v;
      #(60 - lag);
      if (lag > 12) check(q == !v, $sformatf("hold side: data moved %0d ps after clock", lag));
      else in_window++;
      clk = 1'b0;
      #500;
    end
  endtask

  initial begin
    #1000;
    for (int k = 0; k < 100; k++)
      sample(1'($urandom), ($urandom_range(0, 3) == 0) ? real'($urandom_range(0, 20)) : real'($urandom_range(30, 1000)));
    check(in_window > 0, "uncertainty window exercised");
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
