// mv_controller: sequencer of the matrix-vector multiplier.
//
// A frame is started by `start` in IDLE. The controller then
//   1. rewinds the C buffer and accepts the COLS elements of C (LOAD_C),
//   2. lets the A row buffer accept exactly ROWS rows (from LOAD_C on, so
//      the first two rows can be buffered while C is still loading),
//   3. in RUN, hands every beat of a complete buffered row to the MAC, with
//      `first` on the row's first beat and `last` on its final one,
//   4. writes each finished element of G into the result RAM at the index of
//      its row and reports it on g_valid/g_addr,
//   5. pulses `done` in the cycle after G[ROWS-1] is written, and returns to
//      IDLE.
// The sequence follows the list of operations in the source design (read
// and buffer A and C, multiply, accumulate, write back); the state encoding,
// the start/done handshake and the overlap of loading with computing are
// this design's choices. Reset is synchronous and active high.
module mv_controller #(
  parameter int unsigned ROWS  = mm_pkg::MV_ROWS,
  parameter int unsigned COLS  = mm_pkg::MV_COLS,
  parameter int unsigned LANES = mm_pkg::MV_LANES,
  localparam int unsigned BEATS  = COLS / LANES,
  localparam int unsigned ADDR_W = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned RC_W   = $clog2(ROWS + 1),
  localparam int unsigned BT_W   = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // C buffer
  output logic              c_clear,
  output logic              c_en,
  input  logic              c_full,
  // A input side (counts accepted beats)
  output logic              a_en,
  input  logic              a_fire,
  // A row buffer read side
  input  logic              rb_valid,
  output logic              rb_ready,
  input  logic              rb_last,
  input  logic [BT_W-1:0]   rb_beat,
  // MAC
  output logic              mac_valid,
  output logic              mac_first,
  output logic              mac_last,
  input  logic              mac_res_valid,
  // result write-back
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr
);

  typedef enum logic [1:0] {IDLE, LOAD_C, RUN} state_t;
  state_t state;

  logic [BT_W-1:0]   a_beat;
  logic [RC_W-1:0]   a_rows;
  logic [ADDR_W-1:0] g_idx;

  assign busy      = (state != IDLE);
  assign c_clear   = (state == IDLE) && start;
  assign c_en      = (state == LOAD_C);
  assign a_en      = (state != IDLE) && (a_rows < RC_W'(ROWS));
  assign mac_valid = (state == RUN) && rb_valid;
  assign rb_ready  = mac_valid;
  assign mac_first = (rb_beat == '0);
  assign mac_last  = rb_last;
  assign ram_we    = mac_res_valid;
  assign ram_addr  = g_idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      a_beat <= '0;
      a_rows <= '0;
      g_idx  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (a_fire) begin
        if (a_beat == BT_W'(BEATS - 1)) begin
          a_beat <= '0;
          a_rows <= a_rows + 1'b1;
        end else begin
          a_beat <= a_beat + 1'b1;
        end
      end
      unique case (state)
        IDLE: if (start) begin
          state  <= LOAD_C;
          a_beat <= '0;
          a_rows <= '0;
          g_idx  <= '0;
        end
        LOAD_C: if (c_full) state <= RUN;
        RUN: if (mac_res_valid) begin
          if (g_idx == ADDR_W'(ROWS - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
            g_idx <= '0;
          end else begin
            g_idx <= g_idx + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // MAC steps are only issued for rows that are completely buffered.
  assert property (@(posedge clk) disable iff (rst) mac_valid |-> rb_valid);
  // No element of A is accepted outside a frame.
  assert property (@(posedge clk) disable iff (rst) a_fire |-> a_en);

endmodule
