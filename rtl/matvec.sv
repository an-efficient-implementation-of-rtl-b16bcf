// matvec: matrix-vector multiplier G = A*C.
//
// A is a ROWS x COLS matrix (1024 x 28 by default), C a COLS-element vector
// and G the ROWS-element result; all arithmetic is exact signed integer.
// The rows of A are broadcast one after another against the same C: each
// row is multiplied element by element with C and the products accumulated
// in a multiply-accumulate unit, and the finished element of G is written to
// an on-chip result RAM. Blocks: C buffer (mv_vector_buffer), A row buffer
// (mv_row_buffer), MAC (mv_mac), result RAM (mv_result_ram), sequencer
// (mv_controller).
//
// Interface, all synchronous to clk, reset active high:
//   start          begins a frame (accepted in IDLE); busy is high until done
//   c_valid/ready  the COLS elements of C, c[0] first
//   a_valid/ready  A in row-major order, LANES elements per beat; exactly
//                  ROWS*COLS/LANES beats are accepted per frame
//   g_valid        pulses as each G[g_addr] = g_data is written to the RAM
//   done           pulses once, the cycle after G[ROWS-1] is written
//   g_rd_addr/data read port of the result RAM, one cycle of latency
// Timing: with A and C always offered, done rises COLS + ROWS*COLS/LANES + 5
// cycles after the cycle that takes start: COLS cycles to load C, one cycle
// per beat of A, and the rest for the buffer and the two MAC stages. That
// is 28,705 cycles with the default single multiplier. LANES = COLS
// computes one element of G per clock (1024 cycles per frame), which is the
// frame time the source design reports for its FPGA build; LANES = 1 is the
// single multiplier-adder unit the source design draws.
module matvec #(
  parameter int unsigned DATA_W = mm_pkg::MV_DATA_W,
  parameter int unsigned ROWS   = mm_pkg::MV_ROWS,
  parameter int unsigned COLS   = mm_pkg::MV_COLS,
  parameter int unsigned LANES  = mm_pkg::MV_LANES,
  localparam int unsigned ACC_W  = mm_pkg::sum_width(DATA_W, DATA_W, COLS),
  localparam int unsigned ADDR_W = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned BEATS  = COLS / LANES,
  localparam int unsigned BT_W   = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  input  logic                     c_valid,
  output logic                     c_ready,
  input  logic signed [DATA_W-1:0] c_data,
  input  logic                     a_valid,
  output logic                     a_ready,
  input  logic signed [DATA_W-1:0] a_data [LANES],
  output logic                     g_valid,
  output logic [ADDR_W-1:0]        g_addr,
  output logic signed [ACC_W-1:0]  g_data,
  input  logic [ADDR_W-1:0]        g_rd_addr,
  output logic signed [ACC_W-1:0]  g_rd_data
);

  logic c_clear, c_en, c_full, c_wr_ready;
  logic a_en, a_wr_ready, a_fire;
  logic rb_valid, rb_ready, rb_last;
  logic [BT_W-1:0] rb_beat;
  logic signed [DATA_W-1:0] rb_data [LANES];
  logic signed [DATA_W-1:0] cb_data [LANES];
  logic mac_valid, mac_first, mac_last, mac_res_valid;
  logic signed [ACC_W-1:0] mac_res;
  logic ram_we;
  logic [ADDR_W-1:0] ram_addr;
  logic [ACC_W-1:0] ram_rd;

  assign c_ready = c_en && c_wr_ready;
  assign a_ready = a_en && a_wr_ready;
  assign a_fire  = a_valid && a_ready;

  mv_vector_buffer #(.DATA_W(DATA_W), .COLS(COLS), .LANES(LANES)) u_cbuf (
    .clk, .rst, .clear(c_clear),
    .wr_valid(c_valid && c_en), .wr_ready(c_wr_ready), .wr_data(c_data),
    .full(c_full), .rd_beat(rb_beat), .rd_data(cb_data)
  );

  mv_row_buffer #(.DATA_W(DATA_W), .COLS(COLS), .LANES(LANES)) u_abuf (
    .clk, .rst,
    .wr_valid(a_valid && a_en), .wr_ready(a_wr_ready), .wr_data(a_data),
    .rd_valid(rb_valid), .rd_ready(rb_ready), .rd_data(rb_data),
    .rd_beat(rb_beat), .rd_last(rb_last)
  );

  mv_mac #(.DATA_W(DATA_W), .LANES(LANES), .COLS(COLS), .ACC_W(ACC_W)) u_mac (
    .clk, .rst, .in_valid(mac_valid), .first(mac_first), .last(mac_last),
    .a(rb_data), .c(cb_data), .res_valid(mac_res_valid), .res(mac_res)
  );

  mv_result_ram #(.DEPTH(ROWS), .WIDTH(ACC_W)) u_ram (
    .clk, .rst, .wr_en(ram_we), .wr_addr(ram_addr), .wr_data(mac_res),
    .rd_addr(g_rd_addr), .rd_data(ram_rd)
  );

  mv_controller #(.ROWS(ROWS), .COLS(COLS), .LANES(LANES)) u_ctrl (
    .clk, .rst, .start, .busy, .done,
    .c_clear, .c_en, .c_full,
    .a_en, .a_fire,
    .rb_valid, .rb_ready, .rb_last, .rb_beat,
    .mac_valid, .mac_first, .mac_last, .mac_res_valid,
    .ram_we, .ram_addr
  );

  assign g_valid   = ram_we;
  assign g_addr    = ram_addr;
  assign g_data    = mac_res;
  assign g_rd_data = signed'(ram_rd);

endmodule
