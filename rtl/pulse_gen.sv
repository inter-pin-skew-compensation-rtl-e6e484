// pulse_gen: BEHAVIOURAL MODEL (not synthesizable) of the pulse generator
// that turns the low-swing CML output of the DQS delay line into the
// full-swing clock the SAFFs need.
//
// Every rising edge of the differential input (in high, inb low) produces a
// full-swing pulse T_PD_PS later, T_PULSE_PS wide. The pulse clocks all eight
// SAFFs and the divide-by-two that makes SAR_CLK. Its role is from the
// design; the delay and the width are this model's choices.
//
// Interface: in/inb -> out.
module pulse_gen #(
  parameter real T_PD_PS    = 20.0,
  parameter real T_PULSE_PS = 300.0
) (
  input  logic in,
  input  logic inb,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  logic vdiff;
  assign vdiff = in && !inb;

  initial out = 1'b0;
  always @(posedge vdiff) begin
    out <= #(T_PD_PS) 1'b1;
    out <= #(T_PD_PS + T_PULSE_PS) 1'b0;
  end
endmodule
