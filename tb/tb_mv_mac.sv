// tb_mv_mac: self-checking test of the multiply-accumulate unit.
//
// Feeds rows of COLS random signed steps (LANES elements each), with and
// without idle cycles between steps and rows, and checks every total
// against a sum computed in the testbench, and that res_valid comes exactly
// two cycles after the row's last step. Also checks that reset clears the
// accumulator and that a row started right after another does not carry
// the old total.
module tb_mv_mac;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned LANES  = 2;
  localparam int unsigned COLS   = 28;
  localparam int unsigned ACC_W  = mm_pkg::sum_width(DATA_W, DATA_W, COLS);
  localparam int unsigned STEPS  = COLS / LANES;

  logic clk = 0, rst = 1;
  logic in_valid = 0, first = 0, last = 0;
  logic signed [DATA_W-1:0] a [LANES], c [LANES];
  logic res_valid;
  logic signed [ACC_W-1:0] res;
  int checks = 0, failures = 0;

  mv_mac #(.DATA_W(DATA_W), .LANES(LANES), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected totals in order, with the cycle of their last step
  longint exp_q[$];
  longint cyc = 0, last_cyc_q[$];
  always @(posedge clk) cyc++;

  always @(negedge clk) if (!rst && res_valid) begin
    longint e, lc;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected result %0d", res);
    end else begin
      e = exp_q.pop_front(); lc = last_cyc_q.pop_front();
      if (longint'(res) != e) begin
        failures++; $display("total %0d expected %0d", res, e);
      end
      checks++;
      if (cyc - lc != 2) begin
        failures++; $display("latency %0d expected 2", cyc - lc);
      end
    end
  end

  task automatic run_row(input bit gaps, input int mag);
    longint sum = 0;
    for (int s = 0; s < STEPS; s++) begin
      for (int l = 0; l < LANES; l++) begin
        a[l] = DATA_W'($urandom_range(0, 2*mag) - mag);
        c[l] = DATA_W'($urandom_range(0, 2*mag) - mag);
        sum += longint'(a[l]) * longint'(c[l]);
      end
      in_valid = 1; first = (s == 0); last = (s == STEPS - 1);
      if (last) begin exp_q.push_back(sum); last_cyc_q.push_back(cyc); end
      @(posedge clk); #1;
      in_valid = 0; first = 0; last = 0;
      if (gaps && ($urandom_range(0, 3) == 0)) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) begin a[l] = '0; c[l] = '0; end
    repeat (3) @(posedge clk); #1;
    rst = 0;
    checks++;
    if (res !== '0 || res_valid) begin failures++; $display("reset state wrong"); end
    // extreme values: largest magnitude sums
    for (int r = 0; r < 3; r++) run_row(0, 32768 - 1);
    for (int r = 0; r < 40; r++) run_row(r[0], 1000 + r * 700);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    rst = 1; @(posedge clk); #1; rst = 0;
    checks++;
    if (res !== '0) begin failures++; $display("reset did not clear accumulator"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
