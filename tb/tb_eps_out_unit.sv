// tb_eps_out_unit: sweeps a small vocabulary (10 words in 4 groups of 3)
// and checks every output record against eq. (7) computed in the
// testbench, the group-major word numbering, the clear-after-read writes,
// the stall behaviour of the handshake, 'done', and the three-cycle-per-
// word rate when the receiver never stalls.
module tb_eps_out_unit;
  import gps_pkg::*;
  localparam int VOCAB = 10, NGP = 4, WPG = 3;
  logic clk = 0, rst_n = 0, start = 0;
  cost_t max_cost = '0;
  bt_t max_bt = '0;
  word_t ep2_addr;
  cost_t ep2_data;
  logic [1:0] grp;
  wpm_addr_t wp_addr;
  wp_entry_t wp_data;
  logic wp_clr, out_valid, out_ready = 1, done;
  pgi_rec_t out_data;
  logic [31:0] eps_wins;

  cost_t ep2 [VOCAB];
  wp_entry_t wpm [NGP][WPG];
  int checks = 0, failures = 0;
  int n_eps = 0, n_gram = 0, stalls = 0;

  eps_out_unit #(.VOCAB(VOCAB), .NGP(NGP), .WPG(WPG)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    ep2_data <= ep2[ep2_addr];
    wp_data  <= wpm[grp][wp_addr];
    if (wp_clr) wpm[grp][wp_addr] <= WP_EMPTY;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference values of the sweep in progress
  cost_t     cur_mc;
  bt_t       cur_mb;
  wp_entry_t snap [VOCAB];
  int        oj = 0;

  task automatic run_sweep(bit stall, output int cycles);
    cost_t mc;
    bt_t mb;
    int j;
    for (int w = 0; w < VOCAB; w++) begin
      ep2[w] = cost_t'($urandom % 4000);
      wpm[w / WPG][w % WPG] = (w % 4 == 3) ? WP_EMPTY : wp_entry_t'({16'($urandom % 6000), 16'($urandom)});
      snap[w] = wpm[w / WPG][w % WPG];
    end
    mc = cost_t'($urandom % 3000);
    mb = bt_t'($urandom);
    cur_mc = mc; cur_mb = mb;
    @(negedge clk);
    max_cost = mc; max_bt = mb; start = 1;
    @(negedge clk);
    start = 0;
    max_cost = '1;   // the latched copy must be used
    j = 0; cycles = 1;
    while (!done) begin
      out_ready = stall ? ($urandom % 3 == 0) : 1'b1;
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    j = oj;
    check(j == VOCAB, $sformatf("all %0d words sent (%0d)", VOCAB, j));
    for (int w = 0; w < VOCAB; w++) check(wpm[w / WPG][w % WPG] == WP_EMPTY, "entry cleared after read");
  endtask

  // compare the output record on every accepted handshake
  always @(posedge clk) begin
    if (start) oj <= 0;
    else if (rst_n && out_valid && out_ready) begin
      cost_t e;
      e = cost_mul(cur_mc, ep2[oj]);
      if (e < snap[oj].prob) n_eps++;
      else n_gram++;
      checks++;
      if (out_data.word != word_t'(oj) ||
          out_data.pgi != ((e < snap[oj].prob) ? e : snap[oj].prob) ||
          out_data.bt  != ((e < snap[oj].prob) ? cur_mb : snap[oj].bt)) begin
        failures++;
        $display("FAIL word %0d out %h", oj, out_data);
      end
      oj <= oj + 1;
    end
    if (rst_n && out_valid && !out_ready) stalls++;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      run_sweep(s % 2 == 1, cyc);
      if (s % 2 == 0) check(cyc == 3 * VOCAB + 1, $sformatf("rate: %0d cycles for %0d words", cyc, VOCAB));
    end
    check(n_eps > 0 && n_gram > 0, "both models won somewhere");
    check(stalls > 0, "receiver stalled the sweep");
    check(eps_wins == 32'(n_eps), "eps_wins counter");
    $display("eps wins %0d grammar wins %0d stalls %0d", n_eps, n_gram, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
