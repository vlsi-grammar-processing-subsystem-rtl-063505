// gps_env: end-to-end test environment for gps_top, shared by the reduced
// test (tb_gps_top) and the full-size test (tb_gps_full).
//
// It builds a random bigram model (per-group successor lists sorted by
// cost, Ep1 and Ep2 tables), loads it through the host ports, and runs
// NFRAMES frames.  In every frame NREC ending words are pushed, pgo_done
// is given and the frame is run until frame_done.  A reference model in
// the testbench computes, from the records of frame f, the grammar
// processors' result (eq. (5) with the threshold cut, strictly better
// replaces) and the epsilon maximum; the words returned during frame f+1
// are checked against eq. (7) of those.  The receiver stalls at random.
//
// Each mechanism of the design is counted and must occur at least once:
// the threshold cut, a word with no successors in a group, an epsilon-model
// win, a grammar-model win, a bank swap, FIFO back-pressure on the
// ending-word input, and a stall of the output.  A FIFO overflow, a wrong
// word or a wrong arc count is a failure.  With FULL set the top is
// instantiated without a parameter list, at the design's default size.
module gps_env
  import gps_pkg::*;
#(
  parameter bit          FULL       = 1'b0,
  parameter int unsigned NGP        = 4,
  parameter int unsigned VOCAB      = 40,
  parameter int unsigned WPG        = 10,
  parameter int unsigned SUCC_DEPTH = 512,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned MAXLIST    = 6,     // longest list per word and group
  parameter int unsigned NFRAMES    = 4,
  parameter int unsigned NREC       = 30,    // ending words per frame
  parameter int unsigned WATCHDOG   = 2000000,
  parameter int unsigned THR        = 5000,  // pruning threshold (cost)
  parameter int unsigned EMPTY_PCT  = 20,    // share of empty lists, percent
  parameter bit          REQUIRE_MECH = 1'b1,
  parameter bit          RATE_CHECK   = 1'b0
) ();
  localparam int unsigned GW = (NGP > 1) ? $clog2(NGP) : 1;

  logic clk = 0, rst_n = 0;
  logic pgo_valid = 0, pgo_ready, pgo_done = 0;
  pgo_rec_t pgo_data = '0;
  logic frame_start = 0, frame_active, frame_done, init_busy;
  logic pgi_valid, pgi_ready = 1;
  pgi_rec_t pgi_data;
  logic host_sm_wr = 0;
  logic [GW-1:0] host_sm_sel = '0;
  succ_addr_t host_sm_addr = '0;
  succ_entry_t host_sm_data = '0;
  logic host_ep1_wr = 0, host_ep2_wr = 0;
  word_t host_ep_addr = '0;
  cost_t host_ep_data = '0;
  logic host_thr_load = 0;
  cost_t host_thr = '0;
  logic bank_sel, fifo_overflow;
  logic [31:0] gp_arc_count [NGP];
  logic [31:0] gp_cut_count [NGP];
  logic [31:0] gp_fwd_count [NGP];
  logic [31:0] eps_wins;

  if (FULL) begin : g_full
    gps_top u_dut (.*);
  end else begin : g_small
    gps_top #(.NGP(NGP), .VOCAB(VOCAB), .WPG(WPG), .SUCC_DEPTH(SUCC_DEPTH),
              .FIFO_DEPTH(FIFO_DEPTH)) u_dut (.*);
  end

  always #5 clk = ~clk;

  // ---- the model ---------------------------------------------------------------
  int    list_len  [VOCAB][NGP];
  int    list_ptr  [VOCAB][NGP];
  succ_entry_t sm  [NGP][SUCC_DEPTH];
  cost_t ep1 [VOCAB], ep2 [VOCAB];
  cost_t thr;
  wp_entry_t nxt [VOCAB];     // PGI^P being accumulated (next bank)
  wp_entry_t cur [VOCAB];     // PGI^P being output (current bank)
  cost_t run_max, out_max;
  bt_t   run_bt,  out_bt;
  int    exp_arcs [NGP];

  int checks = 0, failures = 0;
  int n_cut = 0, n_empty_list = 0, n_eps_win = 0, n_gram_win = 0;
  int n_swap = 0, n_backpressure = 0, n_out_stall = 0;
  int oj = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic finish_run();
    $display("mechanisms: cut=%0d empty_list=%0d eps_win=%0d gram_win=%0d swap=%0d backpressure=%0d out_stall=%0d",
             n_cut, n_empty_list, n_eps_win, n_gram_win, n_swap, n_backpressure, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_run();
  end

  // ---- output checker: eq. (7) ---------------------------------------------------
  always @(posedge clk) begin
    if (rst_n && pgi_valid && pgi_ready) begin
      cost_t e;
      bit ew;
      e  = cost_mul(out_max, ep2[oj]);
      ew = e < cur[oj].prob;
      if (ew) n_eps_win++;
      else    n_gram_win++;
      checks++;
      if (pgi_data.word != word_t'(oj) ||
          pgi_data.pgi  != (ew ? e : cur[oj].prob) ||
          pgi_data.bt   != (ew ? out_bt : cur[oj].bt)) begin
        failures++;
        if (failures < 20)
          $display("FAIL word %0d: got %h expected pgi %h", oj, pgi_data, ew ? e : cur[oj].prob);
      end
      oj <= oj + 1;
    end
    if (rst_n && pgi_valid && !pgi_ready) n_out_stall++;
    if (pgo_valid && !pgo_ready && frame_active) n_backpressure++;
    pgi_ready <= ($urandom % 4) != 0;
  end

  // ---- model updates ---------------------------------------------------------------
  task automatic model_record(pgo_rec_t rec);
    cost_t c;
    for (int g = 0; g < int'(NGP); g++) begin
      if (list_len[rec.word][g] == 0) n_empty_list++;
      for (int k = 0; k < list_len[rec.word][g]; k++) begin
        succ_entry_t e;
        int j;
        e = sm[g][list_ptr[rec.word][g] + k];
        c = cost_mul(rec.pgo, e.cost);
        if (c > thr) begin n_cut++; break; end
        exp_arcs[g]++;
        j = g * int'(WPG) + int'(e.addr);
        if (c < nxt[j].prob) nxt[j] = '{prob: c, bt: rec.bt};
      end
    end
    c = cost_mul(rec.pgo, ep1[rec.word]);
    if (c < run_max) begin run_max = c; run_bt = rec.bt; end
  endtask

  task automatic host_sm(int g, int a, succ_entry_t d);
    @(negedge clk);
    host_sm_wr = 1; host_sm_sel = GW'(g); host_sm_addr = succ_addr_t'(a); host_sm_data = d;
  endtask

  initial begin
    int ptr;
    for (int g = 0; g < int'(NGP); g++) exp_arcs[g] = 0;
    // ---- build and load the model ----
    for (int g = 0; g < int'(NGP); g++) begin
      ptr = VOCAB;
      for (int w = 0; w < int'(VOCAB); w++) begin
        int len, a0, c;
        succ_entry_t d;
        len = (($urandom % 100) < EMPTY_PCT) ? 0 : 1 + $urandom % MAXLIST;
        if (len > int'(WPG)) len = WPG;
        if (ptr + len > int'(SUCC_DEPTH)) len = 0;
        list_len[w][g] = len;
        list_ptr[w][g] = ptr;
        d = '0;
        if (len == 0) d.last = 1'b1;
        else {d.cost, d.addr} = (PROB_W + WPM_AW)'(ptr);
        sm[g][w] = d;
        host_sm(g, w, d);
        a0 = $urandom % WPG;
        c  = $urandom % 1000;
        for (int k = 0; k < len; k++) begin
          c += $urandom % 400;
          d.last = (k == len - 1);
          d.cost = cost_t'(c);
          d.addr = wpm_addr_t'((a0 + k) % WPG);
          sm[g][ptr] = d;
          host_sm(g, ptr, d);
          ptr++;
        end
      end
    end
    for (int w = 0; w < int'(VOCAB); w++) begin
      ep1[w] = cost_t'($urandom % 4000);
      ep2[w] = cost_t'($urandom % 4000);
      @(negedge clk);
      host_sm_wr = 0;
      host_ep1_wr = 1; host_ep2_wr = 1; host_ep_addr = word_t'(w); host_ep_data = ep1[w];
      @(negedge clk);
      host_ep1_wr = 0; host_ep_data = ep2[w];
      @(negedge clk);
      host_ep2_wr = 0;
      host_ep1_wr = 0;
    end
    // host writes do not need the design out of reset
    rst_n = 1;
    thr = cost_t'(THR);
    @(negedge clk);
    host_thr_load = 1; host_thr = thr;
    @(negedge clk);
    host_thr_load = 0;
    while (init_busy) @(negedge clk);

    for (int w = 0; w < int'(VOCAB); w++) begin nxt[w] = WP_EMPTY; cur[w] = WP_EMPTY; end
    run_max = COST_NONE; run_bt = '0;

    // ---- frames ----
    for (int f = 0; f < int'(NFRAMES); f++) begin
      logic sel0;
      int sent, cyc, busiest;
      int arcs0 [NGP];
      time t0;
      for (int g = 0; g < int'(NGP); g++) arcs0[g] = exp_arcs[g];
      // hand over: what was accumulated is output now
      cur = nxt;
      for (int w = 0; w < int'(VOCAB); w++) nxt[w] = WP_EMPTY;
      out_max = run_max; out_bt = run_bt;
      run_max = COST_NONE; run_bt = '0;
      sel0 = bank_sel;
      @(negedge clk);
      t0 = $time;
      frame_start = 1;
      oj = 0;
      @(negedge clk);
      frame_start = 0;
      check(bank_sel != sel0, "bank swap at frame start");
      if (f > 0 && bank_sel != sel0) n_swap++;
      // push this frame's ending words
      sent = 0;
      while (sent < int'(NREC)) begin
        pgo_rec_t rec;
        rec.word = word_t'($urandom % VOCAB);
        rec.pgo  = cost_t'($urandom % 3000);
        rec.bt   = bt_t'(f * 1000 + sent);
        pgo_valid = ($urandom % 8) != 0;
        pgo_data  = rec;
        @(posedge clk);
        if (pgo_valid && pgo_ready) begin
          model_record(rec);
          sent++;
        end
        @(negedge clk);
        pgo_valid = 0;
      end
      pgo_done = 1;
      @(negedge clk);
      pgo_done = 0;
      while (!frame_done) @(negedge clk);
      check(oj == int'(VOCAB), $sformatf("frame %0d: %0d words returned", f, oj));
      for (int g = 0; g < int'(NGP); g++)
        check(gp_arc_count[g] == 32'(exp_arcs[g]),
              $sformatf("grammar processor %0d arcs %0d expected %0d", g, gp_arc_count[g], exp_arcs[g]));
      check(!fifo_overflow, "no FIFO overflow");
      cyc = int'(($time - t0) / 10);
      busiest = 0;
      for (int g = 0; g < int'(NGP); g++)
        if (exp_arcs[g] - arcs0[g] > busiest) busiest = exp_arcs[g] - arcs0[g];
      $display("frame %0d: %0d cycles, %0d ending words, arcs per grammar processor up to %0d",
               f, cyc, NREC, busiest);
      // a grammar processor needs one cycle per arc plus one per ending word;
      // the frame may not take much longer than the busiest one
      if (RATE_CHECK)
        check(cyc <= busiest + int'(NREC) + (busiest + int'(NREC)) / 50 + 100,
              $sformatf("frame %0d took %0d cycles for %0d arcs", f, cyc, busiest));
    end
    if (REQUIRE_MECH) begin
      check(n_cut > 0, "threshold cut happened");
      check(n_empty_list > 0, "empty successor list happened");
      check(n_eps_win > 0, "epsilon-model value won");
      check(n_gram_win > 0, "grammar-model value won");
      check(n_swap > 0, "banks swapped between frames");
      check(n_backpressure > 0, "ending-word input was back-pressured");
      check(n_out_stall > 0, "output was stalled");
    end
    finish_run();
  end
endmodule
