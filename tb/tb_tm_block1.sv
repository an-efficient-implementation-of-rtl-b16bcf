// tb_tm_block1: self-checking test of the first tri-matrix array, W = X*Y.
//
// Loads a diagonal Y, streams random X matrices with a random valid/ready
// pattern (so the output buffer fills and x_ready drops), and checks each W
// against W[i][j] = X[i][j]*Y[j][j] computed here. Also checks that a lone
// X gives its W two cycles after it is accepted, that with both sides always
// ready one W leaves per clock, and that a new Y takes effect.
module tb_tm_block1;
  localparam int unsigned N = 3, DATA_W = 16;
  typedef logic signed [DATA_W-1:0] d_t;
  typedef logic signed [2*DATA_W-1:0] w_t;

  logic clk = 0, rst = 1, y_load = 0, x_valid = 0, x_ready, w_valid, w_ready = 0;
  d_t y_diag [N];
  d_t x_in [N][N];
  w_t w_out [N][N];
  int checks = 0, failures = 0;

  tm_block1 #(.N(N), .DATA_W(DATA_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected W queue, flattened
  longint exp_q[$];
  d_t ycur [N];
  int random_mode = 0, got = 0, stalls = 0, acc_cyc = 0, out_cyc = 0;
  longint cyc = 0;
  bit drive = 0;

  task automatic new_x();
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) x_in[i][j] = d_t'($urandom);
  endtask

  always @(negedge clk) begin
    x_valid = drive && (random_mode == 0 || $urandom_range(0, 3) != 0);
    w_ready = (random_mode == 0) || ($urandom_range(0, 2) == 0);
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && w_valid && w_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(w_out[i][j]) != exp_q[0]) begin
          failures++; $display("W[%0d][%0d] = %0d expected %0d", i, j, w_out[i][j], exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      got++; out_cyc = int'(cyc);
    end
    if (!rst && x_valid && x_ready) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        exp_q.push_back(longint'(x_in[i][j]) * longint'(ycur[j]));
      acc_cyc = int'(cyc);
      #1 new_x();
    end
    if (!rst && x_valid && !x_ready) stalls++;
  end

  task automatic load_y();
    for (int j = 0; j < N; j++) begin y_diag[j] = d_t'($urandom); ycur[j] = y_diag[j]; end
    if ($urandom_range(0, 1) == 1) y_diag[0] = 16'sh8000;
    ycur[0] = y_diag[0];
    @(negedge clk); y_load = 1; @(negedge clk); y_load = 0;
  endtask

  initial begin
    for (int j = 0; j < N; j++) y_diag[j] = '0;
    new_x();
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    load_y();
    // a lone matrix: latency
    drive = 1; @(posedge clk); #2 drive = 0;
    wait (got == 1); #1;
    checks++;
    if (out_cyc - acc_cyc != 2) begin failures++; $display("latency %0d expected 2", out_cyc - acc_cyc); end
    // streaming at full rate
    got = 0; drive = 1;
    repeat (50) @(posedge clk);
    #2 drive = 0;
    checks++;
    if (got < 48) begin failures++; $display("only %0d W in 50 cycles", got); end
    repeat (5) @(posedge clk);
    // random traffic, with Y reloaded when drained
    for (int phase = 0; phase < 4; phase++) begin
      random_mode = 1; drive = 1;
      repeat (300) @(posedge clk);
      #2 drive = 0;
      wait (exp_q.size() == 0);
      load_y();
    end
    checks++;
    if (stalls == 0) begin failures++; $display("x_ready never dropped"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
