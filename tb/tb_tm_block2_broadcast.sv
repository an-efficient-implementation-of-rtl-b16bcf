// tb_tm_block2_broadcast: the second-array test with the broadcast operand
// schedule (SYSTOLIC = 0), checking its N-clock product rate and N + 2
// cycle latency.
module tb_tm_block2_broadcast;
  tb_tm_block2 #(.N(3), .SYSTOLIC(1'b0)) u_tb ();

  // Backup watchdog in simulated time, well beyond the inner test's own
  // cycle watchdog; the inner test normally ends the run.
  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
