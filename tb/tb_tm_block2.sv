// tb_tm_block2: self-checking test of the second tri-matrix array, M = W*Z.
//
// Loads a random Z, streams random W matrices (2*DATA_W-bit elements, with
// extremes) under a random valid/ready pattern, and checks each M against
// the product computed here. Checks that a lone W gives its M 3N cycles
// (systolic schedule) or N + 2 cycles (broadcast schedule) after it is
// accepted, that back-to-back products finish one every 3N-2 or N clocks,
// and that a reloaded Z takes effect.
module tb_tm_block2 #(
  parameter int unsigned N        = 3,
  parameter bit          SYSTOLIC = 1'b1
);
  localparam int unsigned PERIOD  = SYSTOLIC ? 3 * N - 2 : N;
  localparam int unsigned LATENCY = SYSTOLIC ? 3 * N : N + 2;
  localparam int unsigned DATA_W = 16, A_W = 32;
  localparam int unsigned M_W = mm_pkg::sum_width(A_W, DATA_W, N);
  typedef logic signed [DATA_W-1:0] d_t;
  typedef logic signed [A_W-1:0] w_t;
  typedef logic signed [M_W-1:0] m_t;

  logic clk = 0, rst = 1, z_load = 0, w_valid = 0, w_ready, m_valid, m_ready = 0;
  d_t z_in [N][N];
  w_t w_in [N][N];
  m_t m_out [N][N];
  int checks = 0, failures = 0;

  tm_block2 #(.N(N), .DATA_W(DATA_W), .A_W(A_W), .SYSTOLIC(SYSTOLIC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q[$];
  d_t zcur [N][N];
  int random_mode = 0, got = 0, stalls = 0, acc_cyc = 0, out_cyc = 0, sent = 0;
  longint cyc = 0;
  bit drive = 0;

  task automatic new_w(bit extreme);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      w_in[i][j] = extreme ? w_t'(32'sh8000_0000) : w_t'($urandom);
  endtask

  always @(negedge clk) begin
    w_valid = drive && (random_mode == 0 || $urandom_range(0, 2) != 0);
    m_ready = (random_mode == 0) || ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && m_valid && m_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(m_out[i][j]) != exp_q[0]) begin
          failures++; $display("M[%0d][%0d] = %0d expected %0d", i, j, m_out[i][j], exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      got++; out_cyc = int'(cyc);
    end
    if (!rst && w_valid && w_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        longint s;
        s = 0;
        for (int k = 0; k < N; k++) s += longint'(w_in[i][k]) * longint'(zcur[k][j]);
        exp_q.push_back(s);
      end
      acc_cyc = int'(cyc); sent++;
      #1 new_w(sent % 17 == 3);
    end
    if (!rst && w_valid && !w_ready) stalls++;
  end

  task automatic load_z(bit extreme);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      z_in[i][j] = extreme ? d_t'(16'sh8000) : d_t'($urandom);
      zcur[i][j] = z_in[i][j];
    end
    @(negedge clk); z_load = 1; @(negedge clk); z_load = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) z_in[i][j] = '0;
    new_w(0);
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    load_z(0);
    drive = 1; @(posedge clk); #2 drive = 0;
    wait (got == 1); #1;
    checks++;
    if (out_cyc - acc_cyc != LATENCY) begin
      failures++; $display("latency %0d expected %0d", out_cyc - acc_cyc, LATENCY);
    end
    got = 0; drive = 1;
    repeat (20 * PERIOD) @(posedge clk);
    #2 drive = 0;
    checks++;
    if (got < 18) begin failures++; $display("only %0d M in %0d cycles", got, 20 * PERIOD); end
    wait (exp_q.size() == 0);
    for (int phase = 0; phase < 4; phase++) begin
      random_mode = 1; drive = 1;
      repeat (100 * PERIOD) @(posedge clk);
      #2 drive = 0;
      wait (exp_q.size() == 0);
      load_z(phase == 1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("w_ready never dropped"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
