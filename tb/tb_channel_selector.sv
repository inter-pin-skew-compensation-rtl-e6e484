// tb_channel_selector: self-checking test of the one-hot channel selector.
// Checks the empty pointer after reset, the load of CH[0] on kick, one shift
// per enabled stop through all nine channels to CH[9], that a disabled clock
// or a missing stop holds the pointer, and a restart from CH[9].
module tb_channel_selector;
  timeunit 1ps; timeprecision 1fs;

  localparam int N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b1, kick = 1'b0, stop = 1'b0;
  logic [N:0] ch, exp_ch;
  int checks = 0, failures = 0;

  channel_selector #(.N_CH(N)) dut (.clk, .rst_n, .en, .kick, .stop, .ch);

  always #2500 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(ch == '0, "no channel after reset");
    for (int run = 0; run < 3; run++) begin
      kick = 1'b1;
      @(negedge clk);
      kick = 1'b0;
      check(ch == 10'b1, $sformatf("kick loads CH[0], got %b", ch));
      for (int c = 1; c <= N; c++) begin
        // a few idle or disabled cycles first
        repeat ($urandom_range(0, 3)) begin
          stop = 1'b0; en = 1'($urandom);
          @(negedge clk);
          check(ch == (10'b1 << (c - 1)), "pointer holds without stop");
        end
        en = 1'b0; stop = 1'b1;
        @(negedge clk);
        check(ch == (10'b1 << (c - 1)), "pointer holds with clock disabled");
        en = 1'b1;
        @(negedge clk);
        stop = 1'b0;
        exp_ch = 10'b1 << c;
        check(ch == exp_ch, $sformatf("after stop %0d CH=%b expected %b", c, ch, exp_ch));
      end
      check(ch[N], "CH[9] marks the end");
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
