// tb_word_fifo: self-checking test of the receiving FIFO.
// Random pushes and pops against a queue model at depth 8; checks data
// order, the full/empty flags, a push while full being dropped with the
// overflow flag set (also when a pop happens in the same cycle).
module tb_word_fifo;
  import gps_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  pgo_rec_t wr_data = '0, rd_data;
  logic full, empty, overflow;
  int checks = 0, failures = 0;
  pgo_rec_t q[$];
  int saw_full = 0, saw_ovf = 0;

  word_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // compare head and flags with the model
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      if (full) saw_full++;
      // choose an action; phases bias toward filling and draining
      wr_en   = ($urandom % 100) < (((n / 500) % 2) != 0 ? 30 : 75);
      rd_en   = (q.size() > 0) && (($urandom % 100) < (((n / 500) % 2) != 0 ? 75 : 30));
      wr_data = pgo_rec_t'({$urandom, $urandom});
      @(posedge clk);
      #1;
      begin
        bit was_full;
        was_full = (q.size() == DEPTH);
        if (rd_en) void'(q.pop_front());
        if (wr_en) begin
          if (!was_full) q.push_back(wr_data);
          else saw_ovf++;
        end
      end
    end
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    check(overflow == (saw_ovf > 0), "overflow flag");
    check(saw_full > 0, "FIFO was full at least once");
    check(saw_ovf > 0, "a push while full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
