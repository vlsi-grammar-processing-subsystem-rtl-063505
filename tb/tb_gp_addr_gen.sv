// tb_gp_addr_gen: drives random source selections and checks the address
// against a model: directory slot, list head, previous address + 1, hold.
module tb_gp_addr_gen;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0;
  ag_sel_t sel = AG_HOLD;
  word_t word_idx = '0;
  succ_addr_t head_ptr = '0, addr;
  succ_addr_t prev;
  int checks = 0, failures = 0;

  gp_addr_gen dut (.*);
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
    prev = '0;
    for (int n = 0; n < 2000; n++) begin
      succ_addr_t exp;
      @(negedge clk);
      sel      = ag_sel_t'($urandom % 4);
      word_idx = word_t'($urandom);
      head_ptr = (n % 50 == 0) ? '1 : succ_addr_t'($urandom);
      #1;
      case (sel)
        AG_DIR:  exp = succ_addr_t'(word_idx);
        AG_HEAD: exp = head_ptr;
        AG_INC:  exp = prev + 1'b1;
        default: exp = prev;
      endcase
      check(addr == exp, $sformatf("sel %s", sel.name()));
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
