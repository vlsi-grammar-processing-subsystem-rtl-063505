// tb_gps_scaled: end-to-end test with eight grammar processors instead of
// four (80 words in eight groups of 10), showing that the subsystem scales
// by adding grammar-processor blocks; see gps_env for what is checked.
module tb_gps_scaled;
  gps_env #(.FULL(1'b0), .NGP(8), .VOCAB(80), .WPG(10), .SUCC_DEPTH(1024),
            .FIFO_DEPTH(8), .MAXLIST(6), .NFRAMES(3), .NREC(40),
            .THR(3500)) u_env ();

  // backstop in case the environment's own watchdog is never reached
  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
