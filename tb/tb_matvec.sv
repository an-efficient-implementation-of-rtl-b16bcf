// tb_matvec: end-to-end test of the matrix-vector multiplier G = A*C.
//
// Runs frames through matvec and checks every element of G against a
// product computed in the testbench, both on the g_valid stream and by
// reading the result RAM back. Frame 0 offers A and C every cycle and checks
// the frame time: done is sampled on the clock edge COLS + ROWS*COLS/LANES
// + 5 edges after the one that takes start;
// later frames offer data with random gaps (input stalls), use extreme
// values, and check that a frame restarts cleanly after another.
// ROWS, COLS and LANES can be set at the top; the defaults here keep the run
// short.
module tb_matvec #(
  parameter int unsigned ROWS   = 40,
  parameter int unsigned COLS   = 28,
  parameter int unsigned LANES  = 1,
  parameter int unsigned FRAMES = 3
);
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = mm_pkg::sum_width(DATA_W, DATA_W, COLS);
  localparam int unsigned AW     = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned BEATS  = COLS / LANES;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic c_valid = 0, c_ready, a_valid = 0, a_ready;
  logic signed [DATA_W-1:0] c_data = '0;
  logic signed [DATA_W-1:0] a_data [LANES];
  logic g_valid;
  logic [AW-1:0] g_addr, g_rd_addr = '0;
  logic signed [ACC_W-1:0] g_data, g_rd_data;
  int checks = 0, failures = 0;

  matvec #(.ROWS(ROWS), .COLS(COLS), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * FRAMES * (ROWS * BEATS + COLS + 100) + 10 * ROWS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic signed [DATA_W-1:0] A [ROWS][COLS];
  logic signed [DATA_W-1:0] C [COLS];
  longint G [ROWS];
  int frame, mode;        // mode 0: no gaps, 1: random gaps, 2: extremes
  int c_idx, a_row, a_beat, g_seen, stall_cycles;
  longint cyc, start_cyc, done_cyc;

  task automatic make_frame(int m);
    for (int k = 0; k < COLS; k++)
      C[k] = (m == 2) ? ((k % 2) ? 16'sh8000 : 16'sh7fff) : DATA_W'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++)
        A[r][k] = (m == 2) ? ((k % 2) ? 16'sh8000 : 16'sh8001) : DATA_W'($urandom);
    for (int r = 0; r < ROWS; r++) begin
      G[r] = 0;
      for (int k = 0; k < COLS; k++) G[r] += longint'(A[r][k]) * longint'(C[k]);
    end
  endtask

  // input drivers, updated away from the clock edge
  always @(negedge clk) begin
    bit gap;
    gap = (mode == 1) && ($urandom_range(0, 3) == 0);
    c_valid = !rst && (c_idx < COLS) && !gap;
    c_data  = C[(c_idx < COLS) ? c_idx : 0];
    gap = (mode == 1) && ($urandom_range(0, 3) == 0);
    a_valid = !rst && (a_row < ROWS) && !gap;
    for (int l = 0; l < LANES; l++)
      a_data[l] = A[(a_row < ROWS) ? a_row : 0][a_beat * LANES + l];
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (c_valid && c_ready) c_idx++;
      if (a_valid && a_ready) begin
        if (a_beat == BEATS - 1) begin a_beat = 0; a_row++; end else a_beat++;
      end
      if (a_valid && !a_ready && busy) stall_cycles++;
      if (g_valid) begin
        check(g_addr == AW'(g_seen), $sformatf("G address %0d expected %0d", g_addr, g_seen));
        check(longint'(g_data) == G[g_seen], $sformatf("frame %0d G[%0d] = %0d expected %0d",
                                                       frame, g_seen, g_data, G[g_seen]));
        g_seen++;
      end
      if (done) done_cyc = cyc;
    end
  end

  initial begin
    mode = 0; c_idx = COLS; a_row = ROWS; a_beat = 0;
    for (int l = 0; l < LANES; l++) a_data[l] = '0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (frame = 0; frame < FRAMES; frame++) begin
      mode = (frame == 0) ? 0 : (frame == 2) ? 2 : 1;
      make_frame(mode);
      g_seen = 0; done_cyc = 0;
      @(negedge clk);
      c_idx = 0; a_row = 0; a_beat = 0;
      start = 1; @(posedge clk); start_cyc = cyc; #1; start = 0;
      wait (done_cyc != 0);
      @(negedge clk);
      check(g_seen == ROWS, $sformatf("%0d elements of G seen", g_seen));
      check(!busy, "busy after done");
      if (mode == 0)
        check(done_cyc - start_cyc == COLS + ROWS * BEATS + 5,
              $sformatf("frame took %0d cycles, expected %0d", done_cyc - start_cyc,
                        COLS + ROWS * BEATS + 5));
      // read the result RAM back
      for (int r = 0; r < ROWS; r++) begin
        g_rd_addr = AW'(r);
        @(posedge clk); #1;
        check(longint'(g_rd_data) == G[r], $sformatf("RAM G[%0d] = %0d expected %0d", r, g_rd_data, G[r]));
      end
    end
    $display("frame time %0d cycles, input stall cycles %0d", done_cyc - start_cyc, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
