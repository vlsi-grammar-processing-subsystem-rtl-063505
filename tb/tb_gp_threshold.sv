// tb_gp_threshold: after reset nothing is pruned; after a load a candidate
// whose cost exceeds the threshold (probability below it) is flagged,
// including the boundary cases equal and one above.
module tb_gp_threshold;
  import gps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic thr_load = 0;
  cost_t thr_in = '0, cand = '0;
  logic below;
  cost_t thr_model;
  int checks = 0, failures = 0;

  gp_threshold dut (.*);
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
    cand = COST_NONE; #1;
    check(!below, "reset threshold prunes nothing");
    thr_model = COST_NONE;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      thr_load = ($urandom % 8) == 0;
      thr_in   = cost_t'($urandom);
      @(posedge clk); #1;
      if (thr_load) thr_model = thr_in;
      thr_load = 0;
      case (n % 4)
        0: cand = thr_model;
        1: cand = thr_model + 1'b1;
        default: cand = cost_t'($urandom);
      endcase
      #1;
      check(below == (cand > thr_model), "below flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
