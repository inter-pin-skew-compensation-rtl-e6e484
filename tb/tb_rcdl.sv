// tb_rcdl: self-checking test of the delay-line model.
// For random codes and bias settings, sends a rising and a falling edge
// through the line and measures the delay, compared with the linear law
// 30 ps + (40 ps + 0.2 ps x cdc_ctrl) x 10 x code / 256 computed here.
// Also checks the complementary output and the about 624 ps range at the
// locked bias (cdc_ctrl = 112).
module tb_rcdl;
  timeunit 1ps; timeprecision 1fs;

  logic in = 1'b0, inb = 1'b1, out, outb;
  logic [7:0] cdc_ctrl = 8'd112, code = 8'd0;
  int checks = 0, failures = 0;

  rcdl dut (.in, .inb, .cdc_ctrl, .code, .out, .outb);

  function automatic real expected(input int c, input int b);
    return 30.0 + (40.0 + 0.2 * real'(b)) * 10.0 * real'(c) / 256.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int c, input int b);
    realtime t0, d;
    code = 8'(c); cdc_ctrl = 8'(b);
    #100;
    for (int e = 0; e < 2; e++) begin
      t0 = $realtime;
      in = !in; inb = !inb;
      @(out);
      d = $realtime - t0;
      check(d > expected(c, b) - 0.01 && d < expected(c, b) + 0.01,
            $sformatf("code %0d bias %0d: delay %0f ps expected %0f", c, b, d, expected(c, b)));
      check(outb == !out, "complementary output");
      #1000;
    end
  endtask

  initial begin
    #100;
    measure(0, 112);
    measure(255, 112);
    check(expected(255, 112) - expected(0, 112) > 620.0, "range covers two 312.5 ps bits");
    for (int k = 0; k < 50; k++) measure($urandom_range(0, 255), $urandom_range(0, 255));
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
