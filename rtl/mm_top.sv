// mm_top: the two matrix multipliers side by side.
//
// The matrix-vector multiplier (matvec, G = A*C with A 1024 x 28) and the
// tri-matrix multiplier (trimatrix, M = X*Y*Z on 3 x 3 matrices, Y
// diagonal) are independent designs for different applications; they share
// only the clock and the active-high synchronous reset here. Each keeps its
// own ports, prefixed mv_ and tm_; see those modules for the protocol and
// timing of each port.
module mm_top #(
  parameter int unsigned MV_DATA_W = mm_pkg::MV_DATA_W,
  parameter int unsigned MV_ROWS   = mm_pkg::MV_ROWS,
  parameter int unsigned MV_COLS   = mm_pkg::MV_COLS,
  parameter int unsigned MV_LANES  = mm_pkg::MV_LANES,
  parameter int unsigned TM_N      = mm_pkg::TM_N,
  parameter int unsigned TM_DATA_W = mm_pkg::TM_DATA_W,
  parameter bit          TM_SYSTOLIC = 1'b1,
  localparam int unsigned MV_ACC_W  = mm_pkg::sum_width(MV_DATA_W, MV_DATA_W, MV_COLS),
  localparam int unsigned MV_ADDR_W = (MV_ROWS > 1) ? $clog2(MV_ROWS) : 1,
  localparam int unsigned TM_M_W    = mm_pkg::sum_width(2 * TM_DATA_W, TM_DATA_W, TM_N)
) (
  input  logic                        clk,
  input  logic                        rst,
  // matrix-vector multiplier
  input  logic                        mv_start,
  output logic                        mv_busy,
  output logic                        mv_done,
  input  logic                        mv_c_valid,
  output logic                        mv_c_ready,
  input  logic signed [MV_DATA_W-1:0] mv_c_data,
  input  logic                        mv_a_valid,
  output logic                        mv_a_ready,
  input  logic signed [MV_DATA_W-1:0] mv_a_data [MV_LANES],
  output logic                        mv_g_valid,
  output logic [MV_ADDR_W-1:0]        mv_g_addr,
  output logic signed [MV_ACC_W-1:0]  mv_g_data,
  input  logic [MV_ADDR_W-1:0]        mv_g_rd_addr,
  output logic signed [MV_ACC_W-1:0]  mv_g_rd_data,
  // tri-matrix multiplier
  input  logic                        tm_y_load,
  input  logic signed [TM_DATA_W-1:0] tm_y_diag [TM_N],
  input  logic                        tm_z_load,
  input  logic signed [TM_DATA_W-1:0] tm_z_in   [TM_N][TM_N],
  input  logic                        tm_x_valid,
  output logic                        tm_x_ready,
  input  logic signed [TM_DATA_W-1:0] tm_x_in   [TM_N][TM_N],
  output logic                        tm_m_valid,
  input  logic                        tm_m_ready,
  output logic signed [TM_M_W-1:0]    tm_m_out  [TM_N][TM_N]
);

  matvec #(.DATA_W(MV_DATA_W), .ROWS(MV_ROWS), .COLS(MV_COLS), .LANES(MV_LANES)) u_matvec (
    .clk, .rst,
    .start(mv_start), .busy(mv_busy), .done(mv_done),
    .c_valid(mv_c_valid), .c_ready(mv_c_ready), .c_data(mv_c_data),
    .a_valid(mv_a_valid), .a_ready(mv_a_ready), .a_data(mv_a_data),
    .g_valid(mv_g_valid), .g_addr(mv_g_addr), .g_data(mv_g_data),
    .g_rd_addr(mv_g_rd_addr), .g_rd_data(mv_g_rd_data)
  );

  trimatrix #(.N(TM_N), .DATA_W(TM_DATA_W), .SYSTOLIC(TM_SYSTOLIC)) u_trimatrix (
    .clk, .rst,
    .y_load(tm_y_load), .y_diag(tm_y_diag),
    .z_load(tm_z_load), .z_in(tm_z_in),
    .x_valid(tm_x_valid), .x_ready(tm_x_ready), .x_in(tm_x_in),
    .m_valid(tm_m_valid), .m_ready(tm_m_ready), .m_out(tm_m_out)
  );

endmodule
