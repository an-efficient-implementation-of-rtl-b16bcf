// tb_mv_vector_buffer: self-checking test of the C vector buffer.
//
// Writes COLS random elements with random idle cycles, checks that `full`
// rises exactly after the last one, that further writes are refused and
// leave the contents alone, that every beat reads back the right LANES
// elements, and that `clear` lets a second vector be written while reset
// clears the contents.
module tb_mv_vector_buffer;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned COLS   = 28;
  localparam int unsigned LANES  = 4;
  localparam int unsigned BEATS  = COLS / LANES;

  logic clk = 0, rst = 1, clear = 0;
  logic wr_valid = 0, wr_ready, full;
  logic signed [DATA_W-1:0] wr_data = '0;
  logic [$clog2(BEATS)-1:0] rd_beat = '0;
  logic signed [DATA_W-1:0] rd_data [LANES];
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] ref_c [COLS];

  mv_vector_buffer #(.DATA_W(DATA_W), .COLS(COLS), .LANES(LANES)) dut (.*);

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

  task automatic load_vector();
    for (int i = 0; i < COLS; i++) begin
      check(!full && wr_ready, "buffer full too early");
      ref_c[i] = DATA_W'($urandom);
      wr_valid = 1; wr_data = ref_c[i];
      @(posedge clk); #1;
      wr_valid = 0;
      if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
    end
    check(full && !wr_ready, "buffer not full after COLS writes");
  endtask

  task automatic read_all();
    for (int b = 0; b < BEATS; b++) begin
      rd_beat = b[$bits(rd_beat)-1:0]; #1;
      for (int l = 0; l < LANES; l++)
        check(rd_data[l] == ref_c[b*LANES + l], $sformatf("beat %0d lane %0d", b, l));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int b = 0; b < BEATS; b++) begin
      rd_beat = b[$bits(rd_beat)-1:0]; #1;
      for (int l = 0; l < LANES; l++) check(rd_data[l] == 0, "reset did not clear");
    end
    load_vector();
    read_all();
    // writes while full are refused
    wr_valid = 1; wr_data = 16'h7abc;
    repeat (3) @(posedge clk); #1;
    wr_valid = 0;
    read_all();
    // a second vector after clear
    clear = 1; @(posedge clk); #1; clear = 0;
    check(!full, "clear did not empty");
    load_vector();
    read_all();
    rst = 1; @(posedge clk); #1; rst = 0;
    check(!full && rd_data[0] == 0, "reset did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
