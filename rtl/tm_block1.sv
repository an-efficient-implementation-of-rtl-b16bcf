// tm_block1: first array of the tri-matrix multiplier, W = X * Y with Y
// diagonal.
//
// Multiplying X by a diagonal Y scales column j of X by Y[j][j], so each of
// the N x N PE_1 multipliers needs one element of X and one diagonal element
// of Y, with no sums: PE(i,j) forms W[i][j] = X[i][j] * Y[j][j], and the
// PEs of column j form column j of W. The diagonal of Y is kept in the
// array's input data buffer (loaded with y_load) and is shared along each
// column; the finished W goes to the output data buffer (tm_buffer), from
// which the second array takes it.
//
// Interface: y_load/y_diag load the diagonal of Y (y_diag[j] = Y[j][j]);
// x_valid/x_ready/x_in offer a whole X matrix at once; w_valid/w_ready/w_out
// present the product. Timing: the PEs work in the cycle after x is
// accepted and W is in the output buffer the cycle after that, so a W is
// offered two cycles after its X is accepted; one X is accepted per clock
// while the consumer keeps up. Element widths: X, Y DATA_W bits, W 2*DATA_W
// bits, all signed and exact. A Y loaded with y_load applies to every X
// accepted in a later cycle. The whole-matrix ports and the handshakes are
// this design's choice.
module tm_block1 #(
  parameter int unsigned N      = mm_pkg::TM_N,
  parameter int unsigned DATA_W = mm_pkg::TM_DATA_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       y_load,
  input  logic signed [DATA_W-1:0]   y_diag [N],
  input  logic                       x_valid,
  output logic                       x_ready,
  input  logic signed [DATA_W-1:0]   x_in   [N][N],
  output logic                       w_valid,
  input  logic                       w_ready,
  output logic signed [2*DATA_W-1:0] w_out  [N][N]
);

  typedef logic signed [2*DATA_W-1:0] w_t;

  logic signed [DATA_W-1:0] y_q [N];   // input data buffer: diagonal of Y
  w_t                       pe_w [N][N];
  logic                     pe_valid;
  logic                     ob_in_ready;
  logic                     x_fire;

  always_ff @(posedge clk)
    if (rst) begin
      for (int j = 0; j < N; j++) y_q[j] <= '0;
    end else if (y_load) begin
      y_q <= y_diag;
    end

  assign x_ready = !pe_valid || ob_in_ready;
  assign x_fire  = x_valid && x_ready;

  always_ff @(posedge clk)
    if (rst)              pe_valid <= 1'b0;
    else if (x_fire)      pe_valid <= 1'b1;
    else if (ob_in_ready) pe_valid <= 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      tm_pe1 #(.DATA_W(DATA_W)) u_pe (
        .clk, .rst, .en(x_fire), .x(x_in[i][j]), .y(y_q[j]), .w(pe_w[i][j])
      );
    end
  end

  tm_buffer #(.ROWS(N), .COLS(N), .T(w_t)) u_obuf (
    .clk, .rst,
    .in_valid(pe_valid), .in_ready(ob_in_ready), .in_data(pe_w),
    .out_valid(w_valid), .out_ready(w_ready), .out_data(w_out)
  );

endmodule
