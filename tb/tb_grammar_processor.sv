// tb_grammar_processor: runs one grammar processor against a random
// successor-list model.
//
// The testbench builds a directory and sorted successor lists in a real
// successor_memory, feeds ending-word records through a queue that behaves
// like a first-word-fall-through FIFO, and models the next word
// probability bank itself (one synchronous read, one write per cycle).  An
// independent reference walks the same lists in the same order, applies
// the threshold cut and keeps the strictly better candidate per word.
// Checked: every entry of the bank, the arc and cut counts, that the
// read-after-write forwarding case occurred (lists with a successor
// repeated in consecutive entries), the one-arc-per-cycle rate
// (a word with n examined entries costs n+1 cycles) and 'idle'.
module tb_grammar_processor;
  import gps_pkg::*;
  localparam int NWORDS = 24;   // words in the directory
  localparam int WPG    = 10;   // words in this group
  localparam int SDEPTH = 512;

  logic clk = 0, rst_n = 0;
  logic fifo_empty = 1'b1, fifo_rd;
  pgo_rec_t fifo_data = '0;
  succ_addr_t sm_addr;
  succ_entry_t sm_data;
  logic thr_load = 0;
  cost_t thr_in = '0;
  wpm_addr_t wp_rd_addr, wp_wr_addr;
  wp_entry_t wp_rd_data, wp_wr_data;
  logic wp_wr_en, idle;
  logic [31:0] arc_count, cut_count, fwd_count;

  // host side of the successor memory
  logic sm_wr = 0;
  succ_addr_t sm_wa = '0;
  succ_entry_t sm_wd = '0;

  int checks = 0, failures = 0;

  grammar_processor dut (.*);
  successor_memory #(.DEPTH(SDEPTH)) u_sm (
    .clk(clk), .rd_addr(sm_addr), .rd_data(sm_data),
    .wr_en(sm_wr), .wr_addr(sm_wa), .wr_data(sm_wd));

  always #5 clk = ~clk;

  // FIFO model
  pgo_rec_t q[$];
  always @(posedge clk) begin
    if (fifo_rd && q.size() > 0) void'(q.pop_front());
    fifo_empty <= (q.size() == 0);
    fifo_data  <= (q.size() == 0) ? '0 : q[0];
  end

  // next-bank model
  wp_entry_t bank [WPG];
  always @(posedge clk) begin
    wp_rd_data <= (32'(wp_rd_addr) < WPG) ? bank[wp_rd_addr] : WP_EMPTY;
    if (wp_wr_en) bank[wp_wr_addr] <= wp_wr_data;
  end

  // successor lists: per word, list of (addr, cost) sorted by cost
  int   lst_len [NWORDS];
  int   lst_addr[NWORDS][8];
  int   lst_cost[NWORDS][8];
  wp_entry_t ref_bank [WPG];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic sm_write(int a, succ_entry_t d);
    @(negedge clk);
    sm_wr = 1; sm_wa = succ_addr_t'(a); sm_wd = d;
    @(negedge clk);
    sm_wr = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_arcs, exp_cuts, exp_cycles, cycles;
  bit last_applied;   // the final examined entry was written back
  cost_t thr;

  initial begin
    int ptr;
    // build lists
    ptr = NWORDS;
    for (int w = 0; w < NWORDS; w++) begin
      int c;
      lst_len[w] = (w % 6 == 5) ? 0 : 1 + ($urandom % 6);
      c = $urandom % 200;
      for (int k = 0; k < lst_len[w]; k++) begin
        bit dup;
        // distinct successors inside a list, sorted by cost
        do begin
          dup = 0;
          lst_addr[w][k] = $urandom % WPG;
          for (int m = 0; m < k; m++) if (lst_addr[w][m] == lst_addr[w][k]) dup = 1;
        end while (dup);
        c = c + ($urandom % 300);
        lst_cost[w][k] = c;
      end
    end
    // some lists name the same successor in two consecutive entries, the
    // one case where an arc reads a word written in the previous cycle
    for (int w = 1; w < NWORDS; w += 4)
      if (lst_len[w] >= 2) lst_addr[w][1] = lst_addr[w][0];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < WPG; a++) bank[a] = WP_EMPTY;
    for (int w = 0; w < NWORDS; w++) begin
      succ_entry_t d;
      d = '0;
      if (lst_len[w] == 0) d.last = 1'b1;
      else {d.cost, d.addr} = (PROB_W + WPM_AW)'(ptr);
      sm_write(w, d);
      for (int k = 0; k < lst_len[w]; k++) begin
        d.last = (k == lst_len[w] - 1);
        d.cost = cost_t'(lst_cost[w][k]);
        d.addr = wpm_addr_t'(lst_addr[w][k]);
        sm_write(ptr, d);
        ptr++;
      end
    end
    // threshold
    thr = 16'd1400;
    @(negedge clk); thr_load = 1; thr_in = thr;
    @(negedge clk); thr_load = 0;
    check(idle, "idle before work");

    // reference: words in FIFO order
    for (int a = 0; a < WPG; a++) ref_bank[a] = WP_EMPTY;
    exp_arcs = 0; exp_cuts = 0; exp_cycles = 0;
    for (int r = 0; r < 60; r++) begin
      pgo_rec_t rec;
      int w;
      w = (r < NWORDS) ? r : $urandom % NWORDS;
      rec.word = word_t'(w);
      rec.pgo  = cost_t'($urandom % 1000);
      rec.bt   = bt_t'(1000 + r);
      q.push_back(rec);
      fifo_empty = 1'b0; fifo_data = q[0];
      exp_cycles += 1;
      last_applied = 0;
      for (int k = 0; k < lst_len[w]; k++) begin
        cost_t cand;
        cand = cost_mul(rec.pgo, cost_t'(lst_cost[w][k]));
        exp_cycles += 1;
        if (cand > thr) begin exp_cuts++; last_applied = 0; break; end
        exp_arcs++;
        last_applied = 1;
        if (cand < ref_bank[lst_addr[w][k]].prob)
          ref_bank[lst_addr[w][k]] = '{prob: cand, bt: rec.bt};
      end
    end
    // run
    // count clock edges from the first pop until idle is seen between edges:
    // one per word, one per examined entry, one to return to idle and one
    // more if the last entry still had to be written back
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end while (!idle);
    check(cycles == exp_cycles + 1 + int'(last_applied),
          $sformatf("cycles %0d expected %0d", cycles, exp_cycles + 1 + int'(last_applied)));
    for (int a = 0; a < WPG; a++)
      check(bank[a] == ref_bank[a], $sformatf("PGI(t+1) of word %0d: %h vs %h", a, bank[a], ref_bank[a]));
    check(arc_count == 32'(exp_arcs), $sformatf("arcs %0d vs %0d", arc_count, exp_arcs));
    check(cut_count == 32'(exp_cuts), $sformatf("threshold cuts %0d vs %0d", cut_count, exp_cuts));
    check(exp_cuts > 0, "threshold cut happened");
    check(fwd_count > 0, "read-after-write forwarding happened");
    $display("arcs=%0d cuts=%0d forwards=%0d cycles=%0d", arc_count, cut_count, fwd_count, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
