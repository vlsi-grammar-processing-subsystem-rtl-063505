// eps_max_unit: first section of the epsilon processor.
//
// Computes the running maximum, over the words i that end in the frame, of
// PGO_i(t) * eps_i, the inner term of the low-probability (epsilon) model,
// equation (6).  Each record popped from the section's receiving FIFO
// addresses the Ep1 memory with its word index; a cycle later eps_i is
// added to PGO_i (log domain), compared with the MAX register and, if
// better, replaces it.  The backtrace pointer of the record that set the
// maximum is kept beside it, since the epsilon-model result needs a
// predecessor pointer too (that register is this design's addition to the
// datapath the document draws).
//
// Interface: one FIFO record per cycle; 'clear' resets MAX to probability
// zero at the start of a frame (a record arriving in the same cycle is
// folded into the new maximum).  'busy' is high while records remain.
module eps_max_unit
  import gps_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     fifo_empty,
  output logic     fifo_rd,
  input  pgo_rec_t fifo_data,
  output word_t    ep1_addr,
  input  cost_t    ep1_data,
  output cost_t    max_cost,
  output bt_t      max_bt,
  output logic     busy
);
  logic  p_valid;
  cost_t p_pgo;
  bt_t   p_bt;
  cost_t cand, base_cost;
  bt_t   base_bt;

  assign fifo_rd  = !fifo_empty;
  assign ep1_addr = fifo_data.word;
  assign cand     = cost_mul(p_pgo, ep1_data);
  assign base_cost = clear ? COST_NONE : max_cost;
  assign base_bt   = clear ? '0 : max_bt;
  assign busy     = !fifo_empty || p_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_valid  <= 1'b0;
      p_pgo    <= COST_NONE;
      p_bt     <= '0;
      max_cost <= COST_NONE;
      max_bt   <= '0;
    end else begin
      p_valid <= fifo_rd;
      p_pgo   <= fifo_data.pgo;
      p_bt    <= fifo_data.bt;
      if (p_valid && (cand < base_cost)) begin
        max_cost <= cand;
        max_bt   <= p_bt;
      end else begin
        max_cost <= base_cost;
        max_bt   <= base_bt;
      end
    end
  end
endmodule
