// tb_mv_controller: self-checking test of the matrix-vector sequencer.
//
// Surrounds the controller with simple models of the C buffer (full after
// COLS enabled cycles), the row buffer (a count of complete rows; beats of
// the oldest row handed out in order) and the MAC (a result two cycles
// after each last step). Checks the state outputs, that C loading is
// enabled only after start, that exactly ROWS rows of A are admitted, that
// every MAC step has the right first/last flags, that the G write addresses
// run 0..ROWS-1, and that done pulses once, one cycle after the last write.
module tb_mv_controller;
  localparam int unsigned ROWS  = 12;
  localparam int unsigned COLS  = 6;
  localparam int unsigned LANES = 2;
  localparam int unsigned BEATS = COLS / LANES;

  logic clk = 0, rst = 1, start = 0;
  logic busy, done, c_clear, c_en, c_full;
  logic a_en, a_fire;
  logic rb_valid, rb_ready, rb_last;
  logic [$clog2(BEATS)-1:0] rb_beat;
  logic mac_valid, mac_first, mac_last, mac_res_valid;
  logic ram_we;
  logic [$clog2(ROWS)-1:0] ram_addr;
  int checks = 0, failures = 0;

  mv_controller #(.ROWS(ROWS), .COLS(COLS), .LANES(LANES)) dut (.*);

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

  // models
  int c_cnt, a_beats, rows_in, rd_row_beat, mac_pipe;
  bit a_offer;
  assign c_full   = (c_cnt == COLS);
  assign a_fire   = a_en && a_offer;
  assign rb_valid = (rows_in > 0);
  assign rb_beat  = rd_row_beat[$bits(rb_beat)-1:0];
  assign rb_last  = (rd_row_beat == BEATS - 1);
  logic [2:0] res_sr;
  assign mac_res_valid = res_sr[1];

  int exp_beat, next_addr, done_cnt, admitted;
  longint cyc, last_write_cyc;

  always @(posedge clk) begin
    cyc++;
    if (rst || c_clear) c_cnt <= 0;
    else if (c_en && c_cnt < COLS) c_cnt <= c_cnt + 1;
    res_sr <= rst ? '0 : {res_sr[1:0], mac_valid && mac_last};
    if (rst) begin
      rows_in <= 0; a_beats <= 0; rd_row_beat <= 0;
    end else begin
      automatic int r = rows_in;
      if (a_fire) begin
        admitted++;
        if (a_beats == BEATS - 1) begin a_beats <= 0; r++; end else a_beats <= a_beats + 1;
      end
      if (rb_valid && rb_ready) begin
        check(mac_valid, "row buffer read without MAC step");
        check(mac_first == (rd_row_beat == 0), "first flag");
        check(mac_last == (rd_row_beat == BEATS - 1), "last flag");
        check(c_full, "MAC step before C loaded");
        if (rd_row_beat == BEATS - 1) begin rd_row_beat <= 0; r--; end
        else rd_row_beat <= rd_row_beat + 1;
      end
      rows_in <= r;
    end
    if (!rst && ram_we) begin
      check(ram_addr == next_addr[$bits(ram_addr)-1:0], $sformatf("G address %0d expected %0d", ram_addr, next_addr));
      next_addr++;
      last_write_cyc = cyc;
    end
    if (!rst && done) begin
      done_cnt++;
      check(cyc == last_write_cyc + 1, "done not one cycle after last write");
    end
  end

  always @(negedge clk) a_offer = ($urandom_range(0, 3) != 0);

  initial begin
    repeat (3) @(posedge clk); #1;
    rst = 0;
    for (int frame = 0; frame < 2; frame++) begin
      next_addr = 0; done_cnt = 0; admitted = 0;
      repeat (4) @(posedge clk); #1;
      check(!busy && !c_en && !a_en, "idle outputs");
      start = 1; @(posedge clk); #1; start = 0;
      check(busy, "busy after start");
      wait (done_cnt == 1);
      repeat (5) @(posedge clk); #1;
      check(!busy, "busy after done");
      check(done_cnt == 1, "done pulsed more than once");
      check(next_addr == ROWS, "wrong number of G writes");
      check(admitted == ROWS * BEATS, $sformatf("%0d beats of A admitted", admitted));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
