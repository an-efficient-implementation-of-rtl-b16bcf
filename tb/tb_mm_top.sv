// tb_mm_top: end-to-end test of both multipliers at their full default
// sizes (1024 x 28 matrix-vector product; 3 x 3 tri-matrix product).
//
// The two designs run at the same time. The matrix-vector side runs three
// frames of G = A*C: one with A and C offered every cycle (checking the
// frame time of 28 + 1024*28 + 5 cycles), one with random gaps in both
// inputs, one with extreme values; each element of G is checked on the
// output stream and again through the RAM read port. The tri-matrix side
// streams X matrices under random output back-pressure, reloading Y and Z
// between batches, and checks every M = X*diag(Y)*Z.
// Mechanisms counted, each of which must occur: A input stalled by the full
// row buffer, C loading, frame restart, RAM read-back, tri-matrix input
// stalled by back-pressure, coefficient reload.
module tb_mm_top;
  localparam int unsigned ROWS = mm_pkg::MV_ROWS, COLS = mm_pkg::MV_COLS;
  localparam int unsigned LANES = mm_pkg::MV_LANES, BEATS = COLS / LANES;
  localparam int unsigned DW = mm_pkg::MV_DATA_W;
  localparam int unsigned ACC_W = mm_pkg::sum_width(DW, DW, COLS);
  localparam int unsigned AW = $clog2(ROWS);
  localparam int unsigned N = mm_pkg::TM_N, TW = mm_pkg::TM_DATA_W;
  localparam int unsigned M_W = mm_pkg::sum_width(2 * TW, TW, N);
  typedef logic signed [TW-1:0] d_t;
  typedef logic signed [M_W-1:0] m_t;

  logic clk = 0, rst = 1;
  logic mv_start = 0, mv_busy, mv_done;
  logic mv_c_valid = 0, mv_c_ready, mv_a_valid = 0, mv_a_ready;
  logic signed [DW-1:0] mv_c_data = '0;
  logic signed [DW-1:0] mv_a_data [LANES];
  logic mv_g_valid;
  logic [AW-1:0] mv_g_addr, mv_g_rd_addr = '0;
  logic signed [ACC_W-1:0] mv_g_data, mv_g_rd_data;
  logic tm_y_load = 0, tm_z_load = 0, tm_x_valid = 0, tm_x_ready, tm_m_valid, tm_m_ready = 0;
  d_t tm_y_diag [N];
  d_t tm_z_in [N][N];
  d_t tm_x_in [N][N];
  m_t tm_m_out [N][N];

  int checks = 0, failures = 0;

  mm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * (ROWS * BEATS + COLS) + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_a_stall = 0, n_c_load = 0, n_frames = 0, n_readback = 0;
  int n_tm_stall = 0, n_coef_reload = 0, n_tm_products = 0;

  // ---------------- matrix-vector side ----------------
  logic signed [DW-1:0] A [ROWS][COLS];
  logic signed [DW-1:0] C [COLS];
  longint G [ROWS];
  int mode, c_idx, a_row, a_beat, g_seen;
  longint start_cyc, done_cyc;

  task automatic make_frame(int m);
    for (int k = 0; k < COLS; k++)
      C[k] = (m == 2) ? 16'sh8000 : DW'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++)
        A[r][k] = (m == 2) ? ((r % 2) ? 16'sh8000 : 16'sh7fff) : DW'($urandom);
    for (int r = 0; r < ROWS; r++) begin
      G[r] = 0;
      for (int k = 0; k < COLS; k++) G[r] += longint'(A[r][k]) * longint'(C[k]);
    end
  endtask

  always @(negedge clk) begin
    bit gap;
    gap = (mode == 1) && ($urandom_range(0, 3) == 0);
    mv_c_valid = !rst && (c_idx < COLS) && !gap;
    mv_c_data  = C[(c_idx < COLS) ? c_idx : 0];
    gap = (mode == 1) && ($urandom_range(0, 3) == 0);
    mv_a_valid = !rst && (a_row < ROWS) && !gap;
    for (int l = 0; l < LANES; l++)
      mv_a_data[l] = A[(a_row < ROWS) ? a_row : 0][a_beat * LANES + l];
  end

  always @(posedge clk) if (!rst) begin
    if (mv_c_valid && mv_c_ready) begin c_idx++; n_c_load++; end
    if (mv_a_valid && mv_a_ready) begin
      if (a_beat == BEATS - 1) begin a_beat = 0; a_row++; end else a_beat++;
    end
    if (mv_a_valid && !mv_a_ready && mv_busy) n_a_stall++;
    if (mv_g_valid) begin
      check(mv_g_addr == AW'(g_seen), "G address order");
      check(longint'(mv_g_data) == G[g_seen], $sformatf("G[%0d] = %0d expected %0d",
                                                        g_seen, mv_g_data, G[g_seen]));
      g_seen++;
    end
    if (mv_done) done_cyc = cyc;
  end

  bit mv_finished = 0;
  initial begin
    mode = 0; c_idx = COLS; a_row = ROWS; a_beat = 0;
    for (int l = 0; l < LANES; l++) mv_a_data[l] = '0;
    wait (!rst);
    for (int frame = 0; frame < 3; frame++) begin
      mode = frame;
      make_frame(mode);
      g_seen = 0; done_cyc = 0;
      @(negedge clk);
      c_idx = 0; a_row = 0; a_beat = 0;
      mv_start = 1; @(posedge clk); start_cyc = cyc; #1 mv_start = 0;
      wait (done_cyc != 0);
      @(negedge clk);
      n_frames++;
      check(g_seen == ROWS, "number of G elements");
      if (mode == 0)
        check(done_cyc - start_cyc == COLS + ROWS * BEATS + 5,
              $sformatf("frame took %0d cycles", done_cyc - start_cyc));
      for (int r = 0; r < ROWS; r++) begin
        mv_g_rd_addr = AW'(r);
        @(posedge clk); #1;
        check(longint'(mv_g_rd_data) == G[r], $sformatf("RAM G[%0d]", r));
        n_readback++;
      end
    end
    mv_finished = 1;
  end

  // ---------------- tri-matrix side ----------------
  longint exp_q[$];
  d_t ycur [N];
  d_t zcur [N][N];
  bit tm_drive = 0;

  task automatic new_x();
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) tm_x_in[i][j] = d_t'($urandom);
  endtask

  always @(negedge clk) begin
    tm_x_valid = tm_drive && ($urandom_range(0, 3) != 0);
    tm_m_ready = ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (!rst) begin
    if (tm_m_valid && tm_m_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        check(longint'(tm_m_out[i][j]) == exp_q[0], $sformatf("M[%0d][%0d]", i, j));
        void'(exp_q.pop_front());
      end
      n_tm_products++;
    end
    if (tm_x_valid && tm_x_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        longint s;
        s = 0;
        for (int k = 0; k < N; k++)
          s += longint'(tm_x_in[i][k]) * longint'(ycur[k]) * longint'(zcur[k][j]);
        exp_q.push_back(s);
      end
      #1 new_x();
    end
    if (tm_x_valid && !tm_x_ready) n_tm_stall++;
  end

  task automatic load_coefs();
    for (int j = 0; j < N; j++) begin tm_y_diag[j] = d_t'($urandom); ycur[j] = tm_y_diag[j]; end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      tm_z_in[i][j] = d_t'($urandom); zcur[i][j] = tm_z_in[i][j];
    end
    @(negedge clk); tm_y_load = 1; tm_z_load = 1; @(negedge clk); tm_y_load = 0; tm_z_load = 0;
    n_coef_reload++;
  endtask

  bit tm_finished = 0;
  initial begin
    for (int j = 0; j < N; j++) tm_y_diag[j] = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) tm_z_in[i][j] = '0;
    new_x();
    wait (!rst);
    for (int batch = 0; batch < 5; batch++) begin
      load_coefs();
      tm_drive = 1;
      repeat (500) @(posedge clk);
      #2 tm_drive = 0;
      wait (exp_q.size() == 0);
    end
    tm_finished = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (mv_finished && tm_finished);
    check(n_a_stall > 0, "A input never stalled");
    check(n_c_load == 3 * COLS, "C elements loaded");
    check(n_frames == 3, "frames completed");
    check(n_readback == 3 * ROWS, "RAM read-backs");
    check(n_tm_stall > 0, "tri-matrix input never stalled");
    check(n_coef_reload == 5, "coefficient reloads");
    check(n_tm_products > 100, "tri-matrix products");
    $display("mechanisms: A stalls %0d, C loads %0d, frames %0d, RAM reads %0d, tm stalls %0d, coef reloads %0d, tm products %0d",
             n_a_stall, n_c_load, n_frames, n_readback, n_tm_stall, n_coef_reload, n_tm_products);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
