// epsilon_processor: the control/epsilon processor of the grammar subsystem.
//
// Two independent sections, as in the document: eps_max_unit forms the
// running maximum of PGO_i * eps_i over the words ending in the frame, and
// eps_out_unit sweeps all words j, combining MAX * eps_j with the grammar
// processors' PGI_j and sending the larger to the word processing subsystem
// (equations (6) and (7)).  Around them sits the frame control:
//
//   frame_start  toggles bank_sel (the "current" and "next" word probability
//                banks swap), hands the finished MAX to the output section,
//                clears the running maximum and starts the sweep.  It is
//                accepted only when no frame is active.
//   pgo_done     the word processing subsystem has sent the frame's last
//                ending word (this strobe is this design's choice).
//   frame_done   rises when the sweep has sent every word, the frame's list
//                has ended, this processor's FIFO is drained and every
//                grammar processor is idle -- the completion signal the
//                document describes.  It stays high until the next start.
//
// Because MAX and the banks are both handed over at frame_start, the words
// sent during frame t combine the grammar processors' results and the
// epsilon maximum of frame t-1, consistently.  bank_sel resets to 0.
module epsilon_processor
  import gps_pkg::*;
#(
  parameter int unsigned VOCAB = VOCAB_DEFAULT,
  parameter int unsigned NGP   = NGP_DEFAULT,
  parameter int unsigned WPG   = VOCAB_DEFAULT / NGP_DEFAULT,
  localparam int unsigned GW   = (NGP > 1) ? $clog2(NGP) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // frame control
  input  logic           frame_start,
  input  logic           pgo_done,
  input  logic [NGP-1:0] gp_idle,
  output logic           bank_sel,
  output logic           frame_active,
  output logic           pgo_open,     // the frame still accepts ending words
  output logic           frame_done,
  // receiving FIFO
  input  logic           fifo_empty,
  output logic           fifo_rd,
  input  pgo_rec_t       fifo_data,
  // Ep1 / Ep2 memories
  output word_t          ep1_addr,
  input  cost_t          ep1_data,
  output word_t          ep2_addr,
  input  cost_t          ep2_data,
  // current word probability bank
  output logic [GW-1:0]  wp_grp,
  output wpm_addr_t      wp_addr,
  input  wp_entry_t      wp_data,
  output logic           wp_clr,
  // to the word processing subsystem
  output logic           pgi_valid,
  input  logic           pgi_ready,
  output pgi_rec_t       pgi_data,
  output logic [31:0]    eps_wins
);
  logic  start;
  logic  max_busy, out_done;
  logic  pgo_seen;
  cost_t max_cost;
  bt_t   max_bt;

  assign start    = frame_start && !frame_active;
  assign pgo_open = frame_active && !pgo_seen;

  eps_max_unit u_max (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (start),
    .fifo_empty (fifo_empty),
    .fifo_rd    (fifo_rd),
    .fifo_data  (fifo_data),
    .ep1_addr   (ep1_addr),
    .ep1_data   (ep1_data),
    .max_cost   (max_cost),
    .max_bt     (max_bt),
    .busy       (max_busy)
  );

  eps_out_unit #(.VOCAB(VOCAB), .NGP(NGP), .WPG(WPG)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .max_cost  (max_cost),
    .max_bt    (max_bt),
    .ep2_addr  (ep2_addr),
    .ep2_data  (ep2_data),
    .grp       (wp_grp),
    .wp_addr   (wp_addr),
    .wp_data   (wp_data),
    .wp_clr    (wp_clr),
    .out_valid (pgi_valid),
    .out_ready (pgi_ready),
    .out_data  (pgi_data),
    .done      (out_done),
    .eps_wins  (eps_wins)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank_sel     <= 1'b0;
      frame_active <= 1'b0;
      pgo_seen     <= 1'b0;
      frame_done   <= 1'b0;
    end else if (start) begin
      bank_sel     <= !bank_sel;
      frame_active <= 1'b1;
      pgo_seen     <= 1'b0;
      frame_done   <= 1'b0;
    end else if (frame_active) begin
      if (pgo_done) pgo_seen <= 1'b1;
      if (pgo_seen && out_done && !max_busy && (&gp_idle)) begin
        frame_active <= 1'b0;
        frame_done   <= 1'b1;
      end
    end
  end
endmodule
