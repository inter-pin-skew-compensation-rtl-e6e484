// sar8: successive approximation register that binary-searches an 8-bit delay
// code, most significant bit first.
//
// A one-cycle `start` clears the code and applies the first trial value
// (MSB set). Each bit then takes BIT_CYCLES clock cycles: the trial code is
// presented on `sar_out` while the delay line and the phase detector settle,
// and on the last cycle of the bit `comp` is sampled. comp = 1 means "the
// controlled delay is still too small": the trial bit is kept; comp = 0 clears
// it. The next lower bit is then set as the new trial. After the LSB has been
// decided, `stop` pulses high for one cycle and `sar_out` holds the result
// until the next `start`. `busy` is high from the cycle after `start` until
// the last decision.
//
// The 8-bit width and the binary search are from the design; BIT_CYCLES = 2
// (one settling cycle and one deciding cycle per bit) is this design's choice,
// made so that nine channels take 162 SAR clock cycles, i.e. 324 cycles of
// the 400 MHz strobe that the SAR clock is divided from.
//
// Interface: clk/rst_n (asynchronous active-low reset), en (clock enable,
// stands for the gated SAR clock), start, comp -> sar_out, busy, stop.
module sar8
  import skew_pkg::*;
#(
  parameter int unsigned WIDTH      = SAR_BITS,
  parameter int unsigned BIT_CYCLES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             start,
  input  logic             comp,
  output logic [WIDTH-1:0] sar_out,
  output logic             busy,
  output logic             stop
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned BW = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned CW = (BIT_CYCLES > 1) ? $clog2(BIT_CYCLES) : 1;

  logic [BW-1:0] bit_idx;     // bit under trial
  logic [CW-1:0] cyc;         // cycle within the current bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sar_out <= '0;
      bit_idx <= '0;
      cyc     <= '0;
      busy    <= 1'b0;
      stop    <= 1'b0;
    end else if (en) begin
      stop <= 1'b0;
      if (start) begin
        sar_out <= '0;
        sar_out[WIDTH-1] <= 1'b1;
        bit_idx <= BW'(WIDTH - 1);
        cyc     <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        if (cyc == CW'(BIT_CYCLES - 1)) begin
          cyc <= '0;
          if (!comp) sar_out[bit_idx] <= 1'b0;
          if (bit_idx == '0) begin
            busy <= 1'b0;
            stop <= 1'b1;
          end else begin
            sar_out[bit_idx - 1'b1] <= 1'b1;
            bit_idx <= bit_idx - 1'b1;
          end
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
    end
  end

  // stop is a single-cycle pulse and never overlaps busy
  a_stop_not_busy: assert property (@(posedge clk) disable iff (!rst_n) !(stop && busy));
endmodule
