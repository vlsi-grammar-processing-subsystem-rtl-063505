// tb_gps_top: end-to-end test of the grammar processing subsystem at a
// reduced size (40 words, 4 grammar processors, 8-deep FIFOs, 4 frames,
// a threshold low enough to cut many lists);
// see gps_env for what is driven and checked.
module tb_gps_top;
  gps_env #(.FULL(1'b0), .NGP(4), .VOCAB(40), .WPG(10), .SUCC_DEPTH(512),
            .FIFO_DEPTH(8), .MAXLIST(6), .NFRAMES(4), .NREC(30),
            .THR(3500)) u_env ();
endmodule
