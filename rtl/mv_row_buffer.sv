// mv_row_buffer: internal buffer for the row elements of matrix A.
//
// Rows of A arrive in row-major order as beats of LANES elements
// (wr_valid/wr_ready), BEATS = COLS/LANES beats per row. The buffer has two
// row banks used in turn: while the MAC reads one complete row, the next row
// is written into the other bank, so a steady stream of beats is taken one
// per cycle. The read side (rd_valid/rd_ready) presents the beats of the
// oldest complete row in order, with rd_beat its index and rd_last on the
// final beat; a bank is freed when its last beat is read.
//
// Reset (active high) clears the contents and both banks, as the source
// design clears its A register on reset. The two-bank arrangement is this
// design's choice; the source only says the row elements are buffered.
// A beat written into an empty buffer can be read once the whole row is in,
// so a row's first read is at the earliest one cycle after its last write.
module mv_row_buffer #(
  parameter int unsigned DATA_W = mm_pkg::MV_DATA_W,
  parameter int unsigned COLS   = mm_pkg::MV_COLS,
  parameter int unsigned LANES  = mm_pkg::MV_LANES,
  localparam int unsigned BEATS = COLS / LANES,
  localparam int unsigned BT_W  = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic signed [DATA_W-1:0] wr_data [LANES],
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic signed [DATA_W-1:0] rd_data [LANES],
  output logic [BT_W-1:0]          rd_beat,
  output logic                     rd_last
);

  logic signed [DATA_W-1:0] mem [2][BEATS][LANES];
  logic [1:0]               bank_full;
  logic                     wbank, rbank;
  logic [BT_W-1:0]          wbeat, rbeat;

  logic wr_fire, rd_fire;
  assign wr_ready = !bank_full[wbank];
  assign wr_fire  = wr_valid && wr_ready;
  assign rd_valid = bank_full[rbank];
  assign rd_fire  = rd_valid && rd_ready;
  assign rd_beat  = rbeat;
  assign rd_last  = (rbeat == BT_W'(BEATS - 1));
  assign rd_data  = mem[rbank][rbeat];

  always_ff @(posedge clk) begin
    if (rst) begin
      bank_full <= '0;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wbeat     <= '0;
      rbeat     <= '0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < BEATS; i++)
          for (int l = 0; l < LANES; l++)
            mem[b][i][l] <= '0;
    end else begin
      if (wr_fire) begin
        mem[wbank][wbeat] <= wr_data;
        if (wbeat == BT_W'(BEATS - 1)) begin
          wbeat            <= '0;
          wbank            <= !wbank;
          bank_full[wbank] <= 1'b1;
        end else begin
          wbeat <= wbeat + 1'b1;
        end
      end
      if (rd_fire) begin
        if (rd_last) begin
          rbeat            <= '0;
          rbank            <= !rbank;
          bank_full[rbank] <= 1'b0;
        end else begin
          rbeat <= rbeat + 1'b1;
        end
      end
    end
  end

  initial assert (COLS % LANES == 0) else $error("COLS must be a multiple of LANES");

endmodule
