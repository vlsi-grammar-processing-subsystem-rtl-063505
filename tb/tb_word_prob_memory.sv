// tb_word_prob_memory: checks the clearing sweep after reset, that the
// next-bank and current-bank ports reach different banks, that swapping
// bank_sel exchanges them, one read and one write per port per cycle, and
// that a read of the address written in the same cycle returns the old
// value.  Both banks are modelled in the testbench.
module tb_word_prob_memory;
  import gps_pkg::*;
  localparam int WPG = 12;
  logic clk = 0, rst_n = 0, bank_sel = 0, init_busy;
  wpm_addr_t n_rd_addr = '0, n_wr_addr = '0, c_rd_addr = '0, c_wr_addr = '0;
  wp_entry_t n_rd_data, c_rd_data, n_wr_data = '0, c_wr_data = '0;
  logic n_wr_en = 0, c_wr_en = 0;
  wp_entry_t model [2][WPG];
  int checks = 0, failures = 0, init_cycles = 0, swaps = 0;

  word_prob_memory #(.WPG(WPG)) dut (.*);
  always #5 clk = ~clk;

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
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (init_busy) begin @(negedge clk); init_cycles++; end
    check(init_cycles == WPG, $sformatf("clearing takes WPG cycles (%0d)", init_cycles));
    for (int b = 0; b < 2; b++) for (int a = 0; a < WPG; a++) model[b][a] = WP_EMPTY;
    // read every entry of both banks: all empty
    for (int a = 0; a < WPG; a++) begin
      n_rd_addr = wpm_addr_t'(a); c_rd_addr = wpm_addr_t'(a);
      @(posedge clk); #1;
      check(n_rd_data == WP_EMPTY && c_rd_data == WP_EMPTY, "cleared after reset");
      @(negedge clk);
    end
    for (int n = 0; n < 3000; n++) begin
      int nb, cb;
      wp_entry_t exp_n, exp_c;
      @(negedge clk);
      if ((n % 300) == 299) begin bank_sel = !bank_sel; swaps++; end
      n_rd_addr = wpm_addr_t'($urandom % WPG);
      c_rd_addr = wpm_addr_t'($urandom % WPG);
      n_wr_en   = $urandom % 2;
      c_wr_en   = $urandom % 2;
      n_wr_addr = ((n % 7) == 0) ? n_rd_addr : wpm_addr_t'($urandom % WPG);
      c_wr_addr = ((n % 5) == 0) ? c_rd_addr : wpm_addr_t'($urandom % WPG);
      n_wr_data = wp_entry_t'($urandom);
      c_wr_data = wp_entry_t'($urandom);
      cb = bank_sel ? 1 : 0;
      nb = 1 - cb;
      exp_n = model[nb][n_rd_addr];
      exp_c = model[cb][c_rd_addr];
      @(posedge clk); #1;
      if (n_wr_en) model[nb][n_wr_addr] = n_wr_data;
      if (c_wr_en) model[cb][c_wr_addr] = c_wr_data;
      check(n_rd_data == exp_n, "next-bank read");
      check(c_rd_data == exp_c, "current-bank read");
    end
    check(swaps >= 2, "banks swapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
