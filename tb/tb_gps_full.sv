// tb_gps_full: end-to-end test of the grammar processing subsystem at its
// default size: 3000 words, 4 grammar processors with 65536-entry
// successor memories (about 17 successors per word and processor, 70 per
// word in all), 1024-deep FIFOs.  Three frames of 1500 ending words are run,
// enough to fill the FIFOs;
// see gps_env for what is driven and checked.
module tb_gps_full;
  gps_env #(.FULL(1'b1), .NGP(4), .VOCAB(3000), .WPG(750), .SUCC_DEPTH(65536),
            .FIFO_DEPTH(1024), .MAXLIST(34), .NFRAMES(3), .NREC(1500),
            .WATCHDOG(3000000)) u_env ();
endmodule
