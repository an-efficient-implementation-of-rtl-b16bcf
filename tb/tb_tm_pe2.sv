// tb_tm_pe2: self-checking test of the PE_2 MAC unit.
//
// Runs random dot products of N terms (a of A_W bits, b of B_W bits, with
// idle cycles in between), restarting with `first`, and checks the running
// total after every step against a sum computed in the testbench, including
// the largest magnitudes the widths allow.
module tb_tm_pe2;
  localparam int unsigned A_W = 32, B_W = 16, N = 3;
  localparam int unsigned ACC_W = mm_pkg::sum_width(A_W, B_W, N);
  logic clk = 0, rst = 1, en = 0, first = 0;
  logic signed [A_W-1:0] a = '0;
  logic signed [B_W-1:0] b = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  tm_pe2 #(.A_W(A_W), .B_W(B_W), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    longint sum;
    @(posedge clk); #1;
    check(acc == 0, "reset");
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      sum = 0;
      for (int k = 0; k < N; k++) begin
        if (n < 2) begin a = {1'b1, {(A_W-1){1'b0}}}; b = (n == 0) ? 16'sh8000 : 16'sh7fff; end
        else begin a = A_W'($urandom); b = B_W'($urandom); end
        sum += longint'(a) * longint'(b);
        en = 1; first = (k == 0);
        @(posedge clk); #1; en = 0; first = 0;
        check(longint'(acc) == sum, $sformatf("step %0d total %0d expected %0d", k, acc, sum));
        if ($urandom_range(0, 2) == 0) begin
          a = A_W'($urandom); @(posedge clk); #1;
          check(longint'(acc) == sum, "total changed without en");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
