// trimatrix: tri-matrix multiplier M = X * Y * Z, Y diagonal.
//
// Two arrays in a chain. The first (tm_block1, N x N multipliers) forms
// W = X*Y in one clock per matrix by scaling each column of X by the
// matching diagonal element of Y. Its output data buffer feeds the input
// data buffer of the second array (tm_block2, N x N MAC units), which forms
// M = W*Z, as a systolic array in 3N-2 clocks (SYSTOLIC = 1, default) or
// with broadcast operands in N clocks (SYSTOLIC = 0). The two arrays work on
// successive matrices at the same time, so one M is finished every 3N-2
// (or N) clocks once the pipe is full.
//
// Interface: y_load/y_diag and z_load/z_in load the coefficient matrices
// (diagonal of Y, and Z), which stay in place for any number of products;
// x_valid/x_ready/x_in accept one X matrix per transfer and
// m_valid/m_ready/m_out return one M per transfer, in order. All elements
// are signed; X, Y, Z are DATA_W bits and M is exact
// (3*DATA_W + ceil(log2 N) bits). First result: M is offered 3N + 2 cycles
// (systolic) or N + 4 cycles (broadcast) after its X is accepted into an
// idle pipe. Treating Y and Z as loaded
// coefficients and X as the streamed operand is this design's choice.
module trimatrix #(
  parameter int unsigned N      = mm_pkg::TM_N,
  parameter int unsigned DATA_W = mm_pkg::TM_DATA_W,
  parameter bit          SYSTOLIC = 1'b1,
  localparam int unsigned M_W   = mm_pkg::sum_width(2 * DATA_W, DATA_W, N)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     y_load,
  input  logic signed [DATA_W-1:0] y_diag [N],
  input  logic                     z_load,
  input  logic signed [DATA_W-1:0] z_in   [N][N],
  input  logic                     x_valid,
  output logic                     x_ready,
  input  logic signed [DATA_W-1:0] x_in   [N][N],
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic signed [M_W-1:0]    m_out  [N][N]
);

  logic                       w_valid, w_ready;
  logic signed [2*DATA_W-1:0] w [N][N];

  tm_block1 #(.N(N), .DATA_W(DATA_W)) u_blk1 (
    .clk, .rst, .y_load, .y_diag,
    .x_valid, .x_ready, .x_in,
    .w_valid, .w_ready, .w_out(w)
  );

  tm_block2 #(.N(N), .DATA_W(DATA_W), .A_W(2 * DATA_W), .SYSTOLIC(SYSTOLIC)) u_blk2 (
    .clk, .rst, .z_load, .z_in,
    .w_valid, .w_ready, .w_in(w),
    .m_valid, .m_ready, .m_out
  );

endmodule
