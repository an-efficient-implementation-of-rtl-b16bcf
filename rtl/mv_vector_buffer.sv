// mv_vector_buffer: internal buffer for the column vector C.
//
// C arrives one element per accepted cycle (wr_valid/wr_ready) and is stored
// in order c[0] .. c[COLS-1]. Once COLS elements are in, `full` rises and the
// buffer stops accepting until `clear`. While full it is read as COLS/LANES
// beats of LANES elements: rd_data[l] = c[rd_beat*LANES + l], combinationally,
// so the same C is reused for every row of A.
//
// Reset (active high) clears the contents, as the source design clears its
// C register on reset. `clear` only rewinds the write pointer, for the next
// frame. The beat-wide read port is this design's choice.
module mv_vector_buffer #(
  parameter int unsigned DATA_W = mm_pkg::MV_DATA_W,
  parameter int unsigned COLS   = mm_pkg::MV_COLS,
  parameter int unsigned LANES  = mm_pkg::MV_LANES,
  localparam int unsigned BEATS = COLS / LANES,
  localparam int unsigned IDX_W = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned BT_W  = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic signed [DATA_W-1:0] wr_data,
  output logic                     full,
  input  logic [BT_W-1:0]          rd_beat,
  output logic signed [DATA_W-1:0] rd_data [LANES]
);

  logic signed [DATA_W-1:0] mem [COLS];
  logic [IDX_W-1:0]         wptr;
  logic                     full_q;

  assign wr_ready = !full_q;
  assign full     = full_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr   <= '0;
      full_q <= 1'b0;
      for (int i = 0; i < COLS; i++) mem[i] <= '0;
    end else if (clear) begin
      wptr   <= '0;
      full_q <= 1'b0;
    end else if (wr_valid && !full_q) begin
      mem[wptr] <= wr_data;
      if (wptr == IDX_W'(COLS - 1)) begin
        wptr   <= '0;
        full_q <= 1'b1;
      end else begin
        wptr <= wptr + 1'b1;
      end
    end
  end

  always_comb
    for (int l = 0; l < LANES; l++)
      rd_data[l] = mem[rd_beat * LANES + l];

  initial assert (COLS % LANES == 0) else $error("COLS must be a multiple of LANES");

endmodule
