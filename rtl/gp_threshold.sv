// gp_threshold: dynamic threshold calculation of the grammar processor.
//
// Holds the programmable threshold and tells the controller when the
// candidate PGO_i * c_ij of the successor being processed has fallen below
// it.  Because each successor list is stored in decreasing order of c_ij,
// every later successor of the same word would fall below it too, so the
// controller ends the list there.  That use follows the document.  How the
// threshold is updated is not given there; here it is a register that the
// host reloads whenever it wants (for example once per frame).  It resets to
// the all-ones cost, which prunes nothing.
//
// In the cost domain "probability below the threshold" is "cost above it".
// Interface: thr_load/thr_in write the register; 'below' is combinational
// in 'cand'.
module gp_threshold
  import gps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  thr_load,
  input  cost_t thr_in,
  input  cost_t cand,
  output logic  below
);
  cost_t thr;

  always_ff @(posedge clk) begin
    if (!rst_n)        thr <= COST_NONE;
    else if (thr_load) thr <= thr_in;
  end

  assign below = (cand > thr);
endmodule
