// tb_matvec_lanes28: the 1024 x 28 matrix-vector product with 28 multipliers
// working in parallel, one element of G per clock. Checks every element and
// that a frame with A and C always offered completes in
// 28 + 1024 + 5 = 1057 cycles.
module tb_matvec_lanes28;
  tb_matvec #(.ROWS(1024), .COLS(28), .LANES(28), .FRAMES(3)) u_tb ();

  // Backup watchdog in simulated time, well beyond the inner test's own
  // cycle watchdog; the inner test normally ends the run.
  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
