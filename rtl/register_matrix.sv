// register_matrix: the 8-by-9 register matrix that holds one delay code per
// channel (column 0 = DQS, columns 1..8 = DQ[0]..DQ[7]) and drives the
// delay lines directly.
//
// On each clock edge with `we` high, the column picked by the one-hot
// `col_sel` loads `d` (the SAR output). The selected delay line therefore
// follows every trial code of the binary search, one clock after the SAR
// produces it, and keeps the final code when the SAR stops. `clr` zeroes all
// codes, so a new run starts from minimum delay on every pin.
//
// The matrix size, REG_In[7:0] and column select are from the design; the
// write enable and the clear are this design's choices.
//
// Interface: clk/rst_n, we, clr, col_sel[N_CH-1:0], d[W-1:0] -> q[N_CH][W].
module register_matrix #(
  parameter int unsigned N_CH = 9,
  parameter int unsigned W    = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic                clr,
  input  logic [N_CH-1:0]     col_sel,
  input  logic [W-1:0]        d,
  output logic [N_CH-1:0][W-1:0] q
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (clr) q <= '0;
    else if (we) begin
      for (int i = 0; i < N_CH; i++)
        if (col_sel[i]) q[i] <= d;
    end
  end
endmodule
