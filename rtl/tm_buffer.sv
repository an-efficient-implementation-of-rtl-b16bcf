// tm_buffer: one-matrix data buffer with a valid/ready handshake.
//
// Holds one ROWS x COLS matrix of elements of type T. A matrix offered on in_valid
// is captured whole when in_ready is high; it is then presented on out_data
// with out_valid until the consumer takes it (out_ready). The buffer accepts
// a new matrix in the same cycle as the old one is taken, so a producer and
// a consumer that both run every cycle pass one matrix per clock.
// Used as the output data buffer of both arrays and as the input data buffer
// of the second array. The source design names these buffers but does not
// describe them; this single-entry register with a handshake is this
// design's choice. Reset (active high) empties it and clears the contents.
module tm_buffer #(
  parameter int unsigned ROWS = mm_pkg::TM_N,
  parameter int unsigned COLS = mm_pkg::TM_N,
  parameter type         T    = logic signed [2*mm_pkg::TM_DATA_W-1:0]
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  output logic          in_ready,
  input  T              in_data  [ROWS][COLS],
  output logic          out_valid,
  input  logic          out_ready,
  output T              out_data [ROWS][COLS]
);

  logic full;

  assign in_ready  = !full || out_ready;
  assign out_valid = full;

  always_ff @(posedge clk) begin
    if (rst) begin
      full <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          out_data[r][c] <= '0;
    end else begin
      if (in_valid && in_ready) begin
        out_data <= in_data;
        full     <= 1'b1;
      end else if (out_ready) begin
        full <= 1'b0;
      end
    end
  end

  // A matrix on offer stays on offer until it is taken (its contents only
  // change on a capture, which needs in_ready, which needs out_ready here).
  assert property (@(posedge clk) disable iff (rst)
                   out_valid && !out_ready |=> out_valid);

endmodule
