// tb_mv_result_ram: self-checking test of the G result RAM.
//
// Writes every word of a full-depth RAM with a value derived from its
// address, then reads all words back in random order, checking the
// one-cycle read latency, that a later write overwrites, that a write and
// a read of another address in the same cycle do not interfere, and that
// reset clears the read register.
module tb_mv_result_ram;
  localparam int unsigned DEPTH = 1024;
  localparam int unsigned WIDTH = 37;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0, rst = 1, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  mv_result_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] pattern(int a, int k);
    return {a[4:0], 32'(a * 32'h9e3779b1 + k)};
  endfunction

  initial begin
    @(posedge clk); #1;
    checks++;
    if (rd_data != 0) begin failures++; $display("reset did not clear read data"); end
    rst = 0;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = pattern(a, 0); model[a] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      int a = $urandom_range(0, DEPTH - 1);
      int w = $urandom_range(0, DEPTH - 1);
      rd_addr = AW'(a);
      wr_en = ($urandom_range(0, 1) == 1) && (w != a);
      wr_addr = AW'(w); wr_data = pattern(w, n + 1);
      @(posedge clk); #1;
      if (wr_en) model[w] = wr_data;
      wr_en = 0;
      checks++;
      if (rd_data != model[a]) begin
        failures++; $display("addr %0d read %h expected %h", a, rd_data, model[a]);
      end
    end
    rst = 1; @(posedge clk); #1;
    checks++;
    if (rd_data != 0) begin failures++; $display("reset did not clear read data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
