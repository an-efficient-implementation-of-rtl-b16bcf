// tb_mv_row_buffer: self-checking test of the two-bank A row buffer.
//
// Streams random rows (BEATS beats of LANES elements) into the buffer while
// a reader with a random ready pattern drains it, and checks that the beats
// come out complete and in order with the right beat index and last flag,
// that a row is only readable once all of it is in, that writing stalls
// when both banks are full, and that a steady stream with an always-ready
// reader passes one beat per cycle.
module tb_mv_row_buffer;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned COLS   = 28;
  localparam int unsigned LANES  = 2;
  localparam int unsigned BEATS  = COLS / LANES;
  localparam int unsigned ROWS   = 30;

  logic clk = 0, rst = 1;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0, rd_last;
  logic signed [DATA_W-1:0] wr_data [LANES], rd_data [LANES];
  logic [$clog2(BEATS)-1:0] rd_beat;
  int checks = 0, failures = 0;
  int stalls = 0;

  mv_row_buffer #(.DATA_W(DATA_W), .COLS(COLS), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DATA_W-1:0] elem(int r, int b, int l);
    return DATA_W'(r * 1000 + b * 10 + l + 7);
  endfunction

  int wrow = 0, wbeat = 0, rrow = 0, rbeat = 0;
  bit random_mode = 1;
  int rd_count = 0, cycles = 0;

  // writer
  always @(posedge clk) if (!rst) begin
    if (wr_valid && wr_ready) begin
      if (wbeat == BEATS - 1) begin wbeat = 0; wrow++; end else wbeat++;
    end
    if (wr_valid && !wr_ready) stalls++;
  end
  always @(negedge clk) begin
    wr_valid = !rst && (wrow < ROWS) && (!random_mode || $urandom_range(0, 3) != 0);
    for (int l = 0; l < LANES; l++) wr_data[l] = elem(wrow, wbeat, l);
    rd_ready = !rst && (!random_mode || $urandom_range(0, 2) != 0);
  end

  // reader / checker
  always @(posedge clk) if (!rst && rd_valid && rd_ready) begin
    checks++;
    if (rd_beat != rbeat[$bits(rd_beat)-1:0] || rd_last != (rbeat == BEATS - 1)) begin
      failures++; $display("row %0d beat index %0d/%0d last %0d", rrow, rd_beat, rbeat, rd_last);
    end
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (rd_data[l] != elem(rrow, rbeat, l)) begin
        failures++; $display("row %0d beat %0d lane %0d: %0d", rrow, rbeat, l, rd_data[l]);
      end
    end
    // the whole row must have been written before it is read
    checks++;
    if (wrow <= rrow) begin failures++; $display("row %0d read before complete", rrow); end
    rd_count++;
    if (rbeat == BEATS - 1) begin rbeat = 0; rrow++; end else rbeat++;
  end

  initial begin
    for (int l = 0; l < LANES; l++) wr_data[l] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait (rrow == ROWS);
    @(negedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("writer never stalled"); end
    // streaming mode: one beat per cycle
    random_mode = 0;
    rst = 1; @(negedge clk); rst = 0;
    wrow = 0; wbeat = 0; rrow = 0; rbeat = 0; rd_count = 0;
    repeat (10 * BEATS) @(posedge clk);
    @(negedge clk);
    checks++;
    // first row becomes readable after BEATS writes and one cycle
    if (rd_count < 9 * BEATS - 2) begin
      failures++; $display("streaming rate too low: %0d beats in %0d cycles", rd_count, 10 * BEATS);
    end
    $display("stalls seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
