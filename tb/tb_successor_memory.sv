// tb_successor_memory: writes random entries through the host port and
// reads them back, checking the one-cycle read latency and that reads
// outside DEPTH return zero.
module tb_successor_memory;
  import gps_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0;
  succ_addr_t rd_addr = '0, wr_addr = '0;
  succ_entry_t rd_data, wr_data = '0;
  logic wr_en = 0;
  succ_entry_t model [DEPTH];
  int checks = 0, failures = 0;

  successor_memory #(.DEPTH(DEPTH)) dut (.*);
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
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = succ_addr_t'(a);
      wr_data = succ_entry_t'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom % (DEPTH + 8);
      @(negedge clk);
      rd_addr = succ_addr_t'(a);
      // random concurrent host write elsewhere
      wr_en = $urandom % 2;
      wr_addr = succ_addr_t'($urandom % DEPTH);
      if (wr_addr == rd_addr) wr_en = 0;
      wr_data = succ_entry_t'($urandom);
      @(posedge clk); #1;
      if (wr_en) model[wr_addr] = wr_data;
      check(rd_data == ((a < DEPTH) ? model[a] : '0), $sformatf("read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
