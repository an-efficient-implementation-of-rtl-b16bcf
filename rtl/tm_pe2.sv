// tm_pe2: processing element of the second tri-matrix array (PE_2).
//
// A MAC unit, one multiplier and one adder: on a clock edge with `en` high
// it forms a * b and either loads it into the accumulator (`first` high) or
// adds it to the accumulator. Over N steps with a = W[i][k] and b = Z[k][j]
// the accumulator ends holding M[i][j]. The accumulator is ACC_W bits wide,
// enough for an exact sum of N products.
// Timing: acc shows the new total the cycle after each `en`. Reset (active
// high) clears it.
module tm_pe2 #(
  parameter int unsigned A_W   = 2 * mm_pkg::TM_DATA_W,
  parameter int unsigned B_W   = mm_pkg::TM_DATA_W,
  parameter int unsigned N     = mm_pkg::TM_N,
  parameter int unsigned ACC_W = mm_pkg::sum_width(A_W, B_W, N)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] prod;
  assign prod = ACC_W'(a * b);

  always_ff @(posedge clk)
    if (rst)     acc <= '0;
    else if (en) acc <= first ? prod : acc + prod;

endmodule
