// tb_trimatrix_7x7: the tri-matrix test at order 7 (49 PEs per array), the
// larger of the two sizes the multiplier was built at.
module tb_trimatrix_7x7;
  tb_trimatrix #(.N(7)) u_tb ();

  // Backup watchdog in simulated time, well beyond the inner test's own
  // cycle watchdog; the inner test normally ends the run.
  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
