// tb_trimatrix: end-to-end test of the tri-matrix multiplier M = X*Y*Z.
//
// Loads a diagonal Y and a full Z, streams random X matrices under a random
// valid/ready pattern and checks every M against X*diag(Y)*Z computed here
// with 64-bit integers. Checks that a lone X gives its M 3N + 2 cycles
// (systolic second array) or N + 4 cycles (broadcast) after it is accepted,
// that a steady stream gives one M every 3N-2 or N clocks, that
// back-pressure from the output reaches x_ready, that the extreme values
// -2^15 everywhere are exact, and that reloaded Y and Z take effect.
module tb_trimatrix #(
  parameter int unsigned N        = 3,
  parameter bit          SYSTOLIC = 1'b1
);
  localparam int unsigned PERIOD  = SYSTOLIC ? 3 * N - 2 : N;
  localparam int unsigned LATENCY = SYSTOLIC ? 3 * N + 2 : N + 4;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned M_W = mm_pkg::sum_width(2 * DATA_W, DATA_W, N);
  typedef logic signed [DATA_W-1:0] d_t;
  typedef logic signed [M_W-1:0] m_t;

  logic clk = 0, rst = 1, y_load = 0, z_load = 0;
  logic x_valid = 0, x_ready, m_valid, m_ready = 0;
  d_t y_diag [N];
  d_t z_in [N][N];
  d_t x_in [N][N];
  m_t m_out [N][N];
  int checks = 0, failures = 0;

  trimatrix #(.N(N), .DATA_W(DATA_W), .SYSTOLIC(SYSTOLIC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q[$];
  d_t ycur [N];
  d_t zcur [N][N];
  int random_mode = 0, got = 0, stalls = 0, acc_cyc = 0, out_cyc = 0, sent = 0;
  longint cyc = 0;
  bit drive = 0, extreme = 0;

  task automatic new_x();
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      x_in[i][j] = extreme ? d_t'(16'sh8000) : d_t'($urandom);
  endtask

  always @(negedge clk) begin
    x_valid = drive && (random_mode == 0 || $urandom_range(0, 2) != 0);
    m_ready = (random_mode == 0) || ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && m_valid && m_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(m_out[i][j]) != exp_q[0]) begin
          failures++;
          if (failures < 20) $display("M[%0d][%0d] = %0d expected %0d", i, j, m_out[i][j], exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      got++; out_cyc = int'(cyc);
    end
    if (!rst && x_valid && x_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        longint s;
        s = 0;
        for (int k = 0; k < N; k++)
          s += (longint'(x_in[i][k]) * longint'(ycur[k])) * longint'(zcur[k][j]);
        exp_q.push_back(s);
      end
      acc_cyc = int'(cyc); sent++;
      #1 new_x();
    end
    if (!rst && x_valid && !x_ready) stalls++;
  end

  task automatic load_coefs();
    for (int j = 0; j < N; j++) begin
      y_diag[j] = extreme ? d_t'(16'sh8000) : d_t'($urandom); ycur[j] = y_diag[j];
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      z_in[i][j] = extreme ? d_t'(16'sh8000) : d_t'($urandom); zcur[i][j] = z_in[i][j];
    end
    @(negedge clk); y_load = 1; z_load = 1; @(negedge clk); y_load = 0; z_load = 0;
  endtask

  initial begin
    for (int j = 0; j < N; j++) y_diag[j] = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) z_in[i][j] = '0;
    new_x();
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    load_coefs();
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
    if (got < 17) begin failures++; $display("only %0d M in %0d cycles", got, 20 * PERIOD); end
    wait (exp_q.size() == 0);
    for (int phase = 0; phase < 4; phase++) begin
      extreme = (phase == 2);
      load_coefs();
      new_x();
      random_mode = 1; drive = 1;
      repeat (100 * PERIOD) @(posedge clk);
      #2 drive = 0;
      wait (exp_q.size() == 0);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("x_ready never dropped"); end
    $display("N=%0d SYSTOLIC=%0d: %0d products, stall cycles %0d", N, SYSTOLIC, sent, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
