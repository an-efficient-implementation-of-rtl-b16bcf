// tb_tm_buffer: self-checking test of the one-matrix handshake buffer.
//
// A producer offers numbered matrices with random valid, a consumer takes
// them with random ready. Checks that every matrix arrives once, whole and
// in order, that an offered matrix is held while it is not taken, and that
// with both sides always active one matrix passes per clock.
module tb_tm_buffer;
  localparam int unsigned R = 3, C = 3;
  typedef logic signed [31:0] t;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  t in_data [R][C], out_data [R][C];
  int checks = 0, failures = 0;

  tm_buffer #(.ROWS(R), .COLS(C), .T(t)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic t elem(int m, int r, int c);
    return t'(m * 100 + r * 10 + c - 5000);
  endfunction

  int sent = 0, got = 0, held = 0, cycles = 0;
  bit random_mode = 1;
  bit prev_hold = 0;

  always @(negedge clk) begin
    in_valid  = !rst && (!random_mode || $urandom_range(0, 2) != 0);
    out_ready = !rst && (!random_mode || $urandom_range(0, 2) != 0);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) in_data[r][c] = elem(sent, r, c);
  end

  always @(posedge clk) if (rst) prev_hold = 0; else begin
    cycles++;
    if (prev_hold) begin
      checks++;
      if (!out_valid) begin failures++; $display("offered matrix dropped"); end
    end
    prev_hold = out_valid && !out_ready;
    if (prev_hold) held++;
    if (out_valid && out_ready) begin
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        checks++;
        if (out_data[r][c] != elem(got, r, c)) begin
          failures++; $display("matrix %0d [%0d][%0d] = %0d", got, r, c, out_data[r][c]);
        end
      end
      got++;
    end
    if (in_valid && in_ready) sent++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (2000) @(posedge clk);
    @(negedge clk);
    checks++;
    if (held == 0) begin failures++; $display("back-pressure never happened"); end
    random_mode = 0;
    rst = 1; @(negedge clk); rst = 0; sent = 0; got = 0; cycles = 0;
    repeat (100) @(posedge clk);
    @(negedge clk);
    checks++;
    if (got < 99) begin failures++; $display("only %0d matrices in 100 cycles", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
