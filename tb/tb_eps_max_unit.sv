// tb_eps_max_unit: feeds frames of random ending-word records through a
// FIFO model and checks MAX (as the smallest cost of PGO_i + eps_i) and the
// backtrace pointer of its record against a reference, the one-record-
// per-cycle rate, and that 'clear' starts a new maximum.
module tb_eps_max_unit;
  import gps_pkg::*;
  localparam int V = 50;
  logic clk = 0, rst_n = 0, clear = 0;
  logic fifo_empty = 1'b1, fifo_rd, busy;
  pgo_rec_t fifo_data = '0;
  word_t ep1_addr;
  cost_t ep1_data, max_cost;
  bt_t max_bt;
  cost_t ep1 [V];
  int checks = 0, failures = 0;

  eps_max_unit dut (.*);
  always #5 clk = ~clk;

  pgo_rec_t q[$];
  always @(posedge clk) begin
    if (fifo_rd && q.size() > 0) void'(q.pop_front());
    fifo_empty <= (q.size() == 0);
    fifo_data  <= (q.size() == 0) ? '0 : q[0];
    ep1_data <= ep1[ep1_addr];
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

  initial begin
    for (int i = 0; i < V; i++) ep1[i] = cost_t'($urandom % 5000);
    ep1[7] = 16'hF000;   // sums with it saturate
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(max_cost == COST_NONE, "MAX empty after reset");
    for (int f = 0; f < 6; f++) begin
      cost_t ref_cost;
      bt_t   ref_bt;
      int n, cyc;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(max_cost == COST_NONE, "clear empties MAX");
      ref_cost = COST_NONE; ref_bt = '0;
      n = 5 + $urandom % 40;
      for (int r = 0; r < n; r++) begin
        pgo_rec_t rec;
        cost_t c;
        rec.word = word_t'((r == 0) ? 7 : $urandom % V);
        rec.pgo  = cost_t'((r == 0) ? 16'h2000 : $urandom % 30000);
        rec.bt   = bt_t'($urandom);
        c = cost_mul(rec.pgo, ep1[rec.word]);
        if (c < ref_cost) begin ref_cost = c; ref_bt = rec.bt; end
        q.push_back(rec);
      fifo_empty = 1'b0; fifo_data = q[0];
      end
      cyc = 0;
      @(posedge clk);
      while (busy) begin @(posedge clk); cyc++; end
      // one record per cycle plus one cycle for the Ep1 read
      check(cyc == n + 1, $sformatf("one record per cycle: %0d for %0d", cyc, n));
      @(negedge clk);
      check(max_cost == ref_cost && max_bt == ref_bt,
            $sformatf("frame %0d MAX %h/%h vs %h/%h", f, max_cost, max_bt, ref_cost, ref_bt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
