// tb_register_matrix: self-checking test of the 8-by-9 register matrix.
// Random writes with random one-hot (and occasionally empty) column selects,
// random write enables and occasional clears are compared every cycle with a
// reference array.
module tb_register_matrix;
  timeunit 1ps; timeprecision 1fs;

  localparam int N = 9, W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, clr = 1'b0;
  logic [N-1:0] col_sel = '0;
  logic [W-1:0] d = '0;
  logic [N-1:0][W-1:0] q, ref_q;
  int checks = 0, failures = 0, writes = 0;

  register_matrix #(.N_CH(N), .W(W)) dut (.clk, .rst_n, .we, .clr, .col_sel, .d, .q);

  always #2500 clk = !clk;

  initial begin
    ref_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] !== ref_q[i]) begin
          failures++;
          $display("FAIL: cycle %0d column %0d = %0d expected %0d", k, i, q[i], ref_q[i]);
        end
      end
      we  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 60) == 0);
      col_sel = ($urandom_range(0, 9) == 0) ? '0 : N'(1) << $urandom_range(0, N - 1);
      d = W'($urandom);
      if (clr) ref_q = '0;
      else if (we) for (int i = 0; i < N; i++) if (col_sel[i]) begin ref_q[i] = d; writes++; end
    end
    checks++;
    if (writes < 100) begin failures++; $display("FAIL: too few writes"); end
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
