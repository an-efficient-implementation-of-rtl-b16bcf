// tm_pe1: processing element of the first tri-matrix array (PE_1).
//
// A single registered multiplier: on a clock edge with `en` high it computes
// w = x * y, where x is one element of X and y the diagonal element of Y
// that belongs to the PE's column. One multiplication per clock period, as
// in the source design; the result is exact (2*DATA_W bits, signed).
// Timing: w is valid the cycle after `en`. Reset (active high) clears w.
module tm_pe1 #(
  parameter int unsigned DATA_W = mm_pkg::TM_DATA_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic signed [DATA_W-1:0]   x,
  input  logic signed [DATA_W-1:0]   y,
  output logic signed [2*DATA_W-1:0] w
);

  always_ff @(posedge clk)
    if (rst)     w <= '0;
    else if (en) w <= x * y;

endmodule
