// saff: BEHAVIOURAL MODEL (not synthesizable) of the sense-amplifier
// flip-flop that samples one DQ.
//
// In normal operation it is the DQ receiver's sampler; during skew
// compensation it doubles as the phase detector between its DQ and the DQS
// clock. On each rising edge of `clk` it resolves the differential input
// d/db and holds the result on q/qb until the next edge, T_CQ_PS later.
// If the input changes within T_WINDOW_PS centred on the clock edge (half
// before, half after), the outcome is random: this is the uncertainty window
// that bounds the residual skew after compensation (24 ps in the design).
// Centring the window on the clock and the clock-to-output delay are this
// model's choices. Clock edges must be more than T_CQ_PS apart.
//
// Interface: clk (full-swing, from the pulse generator), d/db -> q/qb.
module saff #(
  parameter real T_CQ_PS     = 50.0,
  parameter real T_WINDOW_PS = 24.0
) (
  input  logic clk,
  input  logic d,
  input  logic db,
  output logic q,
  output logic qb
);
  timeunit 1ps; timeprecision 1fs;

  logic vdiff, pending;
  realtime t_change, t_clk;

  assign vdiff = d && !db;

  initial begin
    q = 1'b0;
    pending = 1'b0;
    t_change = -1.0e6;
    t_clk = -1.0e6;
  end

  // a data edge shortly after the clock edge (hold side of the window)
  always @(vdiff) begin
    t_change = $realtime;
    if ($realtime - t_clk < T_WINDOW_PS / 2.0) pending = 1'($urandom);
  end

  // resolve at the clock edge (setup side of the window), output later
  always @(posedge clk) begin
    t_clk = $realtime;
    if ($realtime - t_change < T_WINDOW_PS / 2.0) pending = 1'($urandom);
    else                                          pending = vdiff;
    #(T_CQ_PS) q = pending;
  end
  assign qb = !q;
endmodule
