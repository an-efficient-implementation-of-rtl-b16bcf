// tb_tm_pe1: self-checking test of the PE_1 multiplier.
//
// Applies random and extreme signed operands and checks that w equals x*y
// one cycle after `en`, that w holds while `en` is low, and that reset
// clears it.
module tb_tm_pe1;
  localparam int unsigned DATA_W = 16;
  logic clk = 0, rst = 1, en = 0;
  logic signed [DATA_W-1:0] x = '0, y = '0;
  logic signed [2*DATA_W-1:0] w;
  int checks = 0, failures = 0;

  tm_pe1 #(.DATA_W(DATA_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    longint e;
    @(posedge clk); #1;
    check(w == 0, "reset");
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      case (n)
        0: begin x = 16'sh8000; y = 16'sh8000; end
        1: begin x = 16'sh8000; y = 16'sh7fff; end
        2: begin x = -1; y = 16'sh7fff; end
        default: begin x = DATA_W'($urandom); y = DATA_W'($urandom); end
      endcase
      e = longint'(x) * longint'(y);
      en = 1; @(posedge clk); #1; en = 0;
      check(longint'(w) == e, $sformatf("%0d * %0d = %0d, got %0d", x, y, e, w));
      x = DATA_W'($urandom); y = DATA_W'($urandom);
      @(posedge clk); #1;
      check(longint'(w) == e, "w changed without en");
    end
    rst = 1; @(posedge clk); #1;
    check(w == 0, "reset did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
