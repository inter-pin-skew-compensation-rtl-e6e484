// skew_pkg: constants and types shared by the inter-pin skew compensation
// blocks. One byte lane has 8 DQ pins and one DQS strobe; the skew estimator
// serves 9 channels (channel 0 = DQS, channels 1..8 = DQ[0]..DQ[7]) with one
// 8-bit successive approximation register (SAR), so every delay code is 8 bits.
// The channel numbering follows the register matrix outputs (REG_DQS first,
// then REG_DQ0..REG_DQ7); putting DQS first follows from the algorithm, whose
// first step locks DQS before any DQ.
package skew_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N_DQ     = 8;          // DQ pins per strobe
  localparam int unsigned N_CH     = N_DQ + 1;   // DQS + DQs
  localparam int unsigned SAR_BITS = 8;          // resolution of every delay code
  localparam int unsigned CH_DQS   = 0;          // channel index of the strobe

  typedef logic [SAR_BITS-1:0] code_t;           // one delay-line register value
endpackage
