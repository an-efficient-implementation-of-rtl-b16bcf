// tb_trimatrix_broadcast: the end-to-end tri-matrix test with the broadcast
// schedule in the second array (SYSTOLIC = 0), checking its N-clock product
// rate and N + 4 cycle latency.
module tb_trimatrix_broadcast;
  tb_trimatrix #(.N(3), .SYSTOLIC(1'b0)) u_tb ();

  // Backup watchdog in simulated time, well beyond the inner test's own
  // cycle watchdog; the inner test normally ends the run.
  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
