// rcdl: BEHAVIOURAL MODEL (not synthesizable) of the register controlled
// delay line that every DQ and the DQS input passes through.
//
// The real part is analog: a chain of 10 low-swing CML coarse delay cells
// whose bias ("coarse delay cell control") is set by a calibration DLL,
// followed by a multiplexer that picks two neighbouring taps and a phase
// interpolator that blends them under an 8-bit register code. This model
// reproduces that as a transport delay:
//     t_cell  = T_CELL_MIN_PS + cdc_ctrl * T_CELL_STEP_PS
//     tap     = (code * STAGES) / 256,  frac = (code * STAGES) % 256
//     delay   = T_FIXED_PS + t_cell * (tap + frac / 256)
// i.e. a delay linear in the code, spanning STAGES coarse cells.
// With the defaults a cell is 62.4 ps at cdc_ctrl = 112, so the full code
// range spans about 624 ps, two bit periods at 3.2 Gb/s, and one code step is
// about 2.4 ps. The 10 stages, the 8-bit code and the two-bit-window range
// are from the design; the cell delays, the linear bias law and the fixed
// delay are this model's choices.
//
// Interface: differential in/inb, cdc_ctrl[7:0], code[7:0] -> out/outb.
// A code change takes effect for edges entering after the change.
module rcdl #(
  parameter int unsigned STAGES         = 10,
  parameter int unsigned CODE_BITS      = 8,
  parameter real         T_FIXED_PS     = 30.0,
  parameter real         T_CELL_MIN_PS  = 40.0,
  parameter real         T_CELL_STEP_PS = 0.2
) (
  input  logic                 in,
  input  logic                 inb,
  input  logic [7:0]           cdc_ctrl,
  input  logic [CODE_BITS-1:0] code,
  output logic                 out,
  output logic                 outb
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NCODE = 1 << CODE_BITS;

  logic vdiff;       // differential input read as a logic level
  real  t_cell, dly;
  int unsigned tap, frac;

  assign vdiff = in && !inb;

  always_comb begin
    t_cell = T_CELL_MIN_PS + real'(cdc_ctrl) * T_CELL_STEP_PS;
    tap    = (int'(code) * STAGES) / NCODE;
    frac   = (int'(code) * STAGES) % NCODE;
    dly    = T_FIXED_PS + t_cell * (real'(tap) + real'(frac) / real'(NCODE));
  end

  initial out = 1'b0;
  always @(vdiff) out <= #(dly) vdiff;
  assign outb = !out;
endmodule
