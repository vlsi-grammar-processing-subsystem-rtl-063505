// tb_epsilon_processor: frame-level test of the epsilon processor with a
// small vocabulary (8 words, 2 groups of 4).
//
// Three frames are run.  In each, ending-word records are pushed into the
// FIFO model, pgo_done is given, and the grammar processors' idle lines are
// held low for a while.  Checked: bank_sel toggles once per accepted
// frame_start and not for one given during a frame, pgo_open closes after
// pgo_done, frame_done waits for the grammar processors, and every word
// sent equals eq. (7) computed from the previous frame's epsilon maximum.
module tb_epsilon_processor;
  import gps_pkg::*;
  localparam int VOCAB = 8, NGP = 2, WPG = 4;
  logic clk = 0, rst_n = 0;
  logic frame_start = 0, pgo_done = 0;
  logic [NGP-1:0] gp_idle = '1;
  logic bank_sel, frame_active, pgo_open, frame_done;
  logic fifo_empty = 1'b1, fifo_rd;
  pgo_rec_t fifo_data = '0;
  word_t ep1_addr, ep2_addr;
  cost_t ep1_data, ep2_data;
  logic [0:0] wp_grp;
  wpm_addr_t wp_addr;
  wp_entry_t wp_data;
  logic wp_clr, pgi_valid, pgi_ready = 1;
  pgi_rec_t pgi_data;
  logic [31:0] eps_wins;

  cost_t ep1 [VOCAB], ep2 [VOCAB];
  wp_entry_t wpm [NGP][WPG];
  pgo_rec_t q[$];
  int checks = 0, failures = 0;

  epsilon_processor #(.VOCAB(VOCAB), .NGP(NGP), .WPG(WPG)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (fifo_rd && q.size() > 0) void'(q.pop_front());
    fifo_empty <= (q.size() == 0);
    fifo_data  <= (q.size() == 0) ? '0 : q[0];
    ep1_data <= ep1[ep1_addr];
    ep2_data <= ep2[ep2_addr];
    wp_data  <= wpm[wp_grp][wp_addr];
    if (wp_clr) wpm[wp_grp][wp_addr] <= WP_EMPTY;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected output of the running frame
  wp_entry_t snap [VOCAB];
  cost_t exp_max;
  bt_t   exp_bt;
  int    oj = 0;
  always @(posedge clk) begin
    if (rst_n && pgi_valid && pgi_ready) begin
      cost_t e;
      e = cost_mul(exp_max, ep2[oj]);
      checks++;
      if (pgi_data.word != word_t'(oj) ||
          pgi_data.pgi != ((e < snap[oj].prob) ? e : snap[oj].prob) ||
          pgi_data.bt  != ((e < snap[oj].prob) ? exp_bt : snap[oj].bt)) begin
        failures++;
        $display("FAIL word %0d: %h", oj, pgi_data);
      end
      oj <= oj + 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cost_t run_max;
    bt_t   run_bt;
    logic  sel_before;
    for (int w = 0; w < VOCAB; w++) begin
      ep1[w] = cost_t'($urandom % 3000);
      ep2[w] = cost_t'($urandom % 3000);
    end
    for (int g = 0; g < NGP; g++) for (int a = 0; a < WPG; a++) wpm[g][a] = WP_EMPTY;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!bank_sel && !frame_active && !frame_done, "reset state");
    run_max = COST_NONE; run_bt = '0;
    for (int f = 0; f < 3; f++) begin
      // the grammar processors' results for this frame
      for (int w = 0; w < VOCAB; w++) begin
        wpm[w / WPG][w % WPG] = (w % 3 == 0) ? WP_EMPTY : wp_entry_t'({16'($urandom % 5000), 16'($urandom)});
        snap[w] = wpm[w / WPG][w % WPG];
      end
      exp_max = run_max; exp_bt = run_bt;
      sel_before = bank_sel;
      @(negedge clk);
      frame_start = 1;
      oj = 0;
      @(negedge clk);
      frame_start = 0;
      check(bank_sel == !sel_before, "bank swap on frame_start");
      check(frame_active && pgo_open, "frame open");
      // a second start during the frame is ignored
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      check(bank_sel == !sel_before, "start during a frame ignored");
      gp_idle = '0;
      run_max = COST_NONE; run_bt = '0;
      for (int r = 0; r < 6; r++) begin
        pgo_rec_t rec;
        cost_t c;
        rec.word = word_t'($urandom % VOCAB);
        rec.pgo  = cost_t'($urandom % 4000);
        rec.bt   = bt_t'($urandom);
        c = cost_mul(rec.pgo, ep1[rec.word]);
        if (c < run_max) begin run_max = c; run_bt = rec.bt; end
        q.push_back(rec);
      fifo_empty = 1'b0; fifo_data = q[0];
        @(negedge clk);
      end
      pgo_done = 1;
      @(negedge clk);
      pgo_done = 0;
      check(!pgo_open, "pgo_open closed after pgo_done");
      repeat (60) @(negedge clk);
      check(!frame_done && frame_active, "frame_done waits for the grammar processors");
      gp_idle = '1;
      repeat (2) @(negedge clk);
      check(frame_done && !frame_active, "frame_done once all is finished");
      check(oj == VOCAB, "every word sent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
