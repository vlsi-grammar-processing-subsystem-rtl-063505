// tb_gps_workload: the subsystem at its default size under the load the
// design is sized for: all 3000 words end in the frame, and each has about
// 17 successors in each of the 4 groups (about 70 in all), so every
// grammar processor updates about 50000 arcs per frame, 200000 in all.
// Pruning is switched off (threshold all ones) so every arc is processed.
// Two frames are run; the results are checked as in the other end-to-end
// tests, and the frame time is checked to stay within a few percent of one
// cycle per arc plus one per ending word on the busiest grammar processor.
// At a 5 MHz clock a 10 ms frame is 50000 cycles.
module tb_gps_workload;
  gps_env #(.FULL(1'b1), .NGP(4), .VOCAB(3000), .WPG(750), .SUCC_DEPTH(65536),
            .FIFO_DEPTH(1024), .MAXLIST(33), .NFRAMES(2), .NREC(3000),
            .WATCHDOG(1000000), .THR(65535), .EMPTY_PCT(0),
            .REQUIRE_MECH(1'b0), .RATE_CHECK(1'b1)) u_env ();

  // backstop in case the environment's own watchdog is never reached
  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
