// tb_eps_memory: loads an Ep table through the host port and reads it
// back with one cycle of latency; reads past DEPTH return the all-ones
// cost (probability zero).
module tb_eps_memory;
  import gps_pkg::*;
  localparam int DEPTH = 40;
  logic clk = 0;
  word_t rd_addr = '0, wr_addr = '0;
  cost_t rd_data, wr_data = '0;
  logic wr_en = 0;
  cost_t model [DEPTH];
  int checks = 0, failures = 0;

  eps_memory #(.DEPTH(DEPTH)) dut (.*);
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
      wr_en = 1; wr_addr = word_t'(a); wr_data = cost_t'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 400; n++) begin
      int a;
      a = $urandom % (DEPTH + 5);
      @(negedge clk);
      rd_addr = word_t'(a);
      @(posedge clk); #1;
      check(rd_data == ((a < DEPTH) ? model[a] : COST_NONE), $sformatf("read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
