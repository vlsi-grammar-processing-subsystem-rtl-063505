// gps_top: grammar processing subsystem of an HMM continuous speech
// recognizer.
//
// Every 10 ms frame the word processing subsystem reports the words that may
// end (word i, PGO_i, backtrace pointer).  This subsystem turns them into
// the probability that each word j starts in the next frame, combining two
// models: explicit high-probability word arcs i->j with transition
// probability c_ij (grammar processors, eq. (5)) and a factored
// low-probability model eps_i * eps_j (epsilon processor, eq. (6)); the
// larger of the two is returned with a pointer to the best predecessor
// (eq. (7)).
//
// Structure (the document's): the ending-word stream is written into five
// receiving FIFOs, one for the epsilon processor and one per grammar
// processor.  Grammar processor g owns successor memory g and group g of
// the "next" word probability bank, so the four never contend.  The
// epsilon processor owns Ep1, Ep2 and the "current" bank, and runs the
// frame: frame_start swaps the banks and starts the output sweep,
// frame_done reports that every word has been sent and all grammar
// processors are idle.
//
// Handshakes (this design's): pgo_valid/pgo_ready pushes one ending word
// per cycle into all five FIFOs at once; pgo_ready is low outside a frame,
// after pgo_done and while any FIFO is full.  pgi_valid/pgi_ready returns
// one starting word per handshake, in word order.  The host loads the
// successor memories, Ep1, Ep2 and the pruning threshold through plain
// write ports; after reset init_busy is high while the word probability
// memories clear themselves, and frame_start must wait for it to fall.
module gps_top
  import gps_pkg::*;
#(
  parameter int unsigned NGP        = NGP_DEFAULT,
  parameter int unsigned VOCAB      = VOCAB_DEFAULT,
  parameter int unsigned WPG        = VOCAB_DEFAULT / NGP_DEFAULT,
  parameter int unsigned SUCC_DEPTH = 65536,
  parameter int unsigned FIFO_DEPTH = 1024,
  localparam int unsigned GW        = (NGP > 1) ? $clog2(NGP) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // from the word processing subsystem
  input  logic           pgo_valid,
  input  pgo_rec_t       pgo_data,
  output logic           pgo_ready,
  input  logic           pgo_done,
  // frame control
  input  logic           frame_start,
  output logic           frame_active,
  output logic           frame_done,
  output logic           init_busy,
  // to the word processing subsystem
  output logic           pgi_valid,
  output pgi_rec_t       pgi_data,
  input  logic           pgi_ready,
  // host load ports
  input  logic           host_sm_wr,
  input  logic [GW-1:0]  host_sm_sel,
  input  succ_addr_t     host_sm_addr,
  input  succ_entry_t    host_sm_data,
  input  logic           host_ep1_wr,
  input  logic           host_ep2_wr,
  input  word_t          host_ep_addr,
  input  cost_t          host_ep_data,
  input  logic           host_thr_load,
  input  cost_t          host_thr,
  // status
  output logic           bank_sel,
  output logic           fifo_overflow,
  output logic [31:0]    gp_arc_count [NGP],
  output logic [31:0]    gp_cut_count [NGP],
  output logic [31:0]    gp_fwd_count [NGP],
  output logic [31:0]    eps_wins
);
  // ---- receiving FIFOs: index NGP is the epsilon processor's ---------------
  logic     f_full  [NGP+1];
  logic     f_empty [NGP+1];
  logic     f_rd    [NGP+1];
  logic     f_ovf   [NGP+1];
  pgo_rec_t f_data  [NGP+1];
  logic     any_full, any_ovf;
  logic     pgo_open;
  logic     push;

  always_comb begin
    any_full = 1'b0;
    any_ovf  = 1'b0;
    for (int k = 0; k <= NGP; k++) begin
      any_full = any_full | f_full[k];
      any_ovf  = any_ovf  | f_ovf[k];
    end
  end

  assign pgo_ready     = pgo_open && !any_full;
  assign push          = pgo_valid && pgo_ready;
  assign fifo_overflow = any_ovf;

  for (genvar k = 0; k <= NGP; k++) begin : g_fifo
    word_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_en    (push),
      .wr_data  (pgo_data),
      .full     (f_full[k]),
      .rd_en    (f_rd[k]),
      .rd_data  (f_data[k]),
      .empty    (f_empty[k]),
      .overflow (f_ovf[k])
    );
  end

  // ---- epsilon processor side ----------------------------------------------
  word_t         ep1_addr, ep2_addr;
  cost_t         ep1_data, ep2_data;
  logic [GW-1:0] c_grp;
  wpm_addr_t     c_addr;
  logic          c_clr;
  wp_entry_t     c_rd_data [NGP];
  logic [NGP-1:0] gp_idle;
  logic [NGP-1:0] wp_init;

  eps_memory #(.DEPTH(VOCAB)) u_ep1 (
    .clk     (clk),
    .rd_addr (ep1_addr),
    .rd_data (ep1_data),
    .wr_en   (host_ep1_wr),
    .wr_addr (host_ep_addr),
    .wr_data (host_ep_data)
  );

  eps_memory #(.DEPTH(VOCAB)) u_ep2 (
    .clk     (clk),
    .rd_addr (ep2_addr),
    .rd_data (ep2_data),
    .wr_en   (host_ep2_wr),
    .wr_addr (host_ep_addr),
    .wr_data (host_ep_data)
  );

  epsilon_processor #(.VOCAB(VOCAB), .NGP(NGP), .WPG(WPG)) u_eps (
    .clk          (clk),
    .rst_n        (rst_n),
    .frame_start  (frame_start && !init_busy),
    .pgo_done     (pgo_done),
    .gp_idle      (gp_idle),
    .bank_sel     (bank_sel),
    .frame_active (frame_active),
    .pgo_open     (pgo_open),
    .frame_done   (frame_done),
    .fifo_empty   (f_empty[NGP]),
    .fifo_rd      (f_rd[NGP]),
    .fifo_data    (f_data[NGP]),
    .ep1_addr     (ep1_addr),
    .ep1_data     (ep1_data),
    .ep2_addr     (ep2_addr),
    .ep2_data     (ep2_data),
    .wp_grp       (c_grp),
    .wp_addr      (c_addr),
    .wp_data      (c_rd_data[c_grp]),
    .wp_clr       (c_clr),
    .pgi_valid    (pgi_valid),
    .pgi_ready    (pgi_ready),
    .pgi_data     (pgi_data),
    .eps_wins     (eps_wins)
  );

  assign init_busy = |wp_init;

  // ---- grammar processor blocks --------------------------------------------
  for (genvar g = 0; g < NGP; g++) begin : g_gp
    succ_addr_t  sm_addr;
    succ_entry_t sm_data;
    wpm_addr_t   n_rd_addr, n_wr_addr;
    wp_entry_t   n_rd_data, n_wr_data;
    logic        n_wr_en;

    successor_memory #(.DEPTH(SUCC_DEPTH)) u_sm (
      .clk     (clk),
      .rd_addr (sm_addr),
      .rd_data (sm_data),
      .wr_en   (host_sm_wr && (host_sm_sel == GW'(g))),
      .wr_addr (host_sm_addr),
      .wr_data (host_sm_data)
    );

    grammar_processor u_gp (
      .clk        (clk),
      .rst_n      (rst_n),
      .fifo_empty (f_empty[g]),
      .fifo_rd    (f_rd[g]),
      .fifo_data  (f_data[g]),
      .sm_addr    (sm_addr),
      .sm_data    (sm_data),
      .thr_load   (host_thr_load),
      .thr_in     (host_thr),
      .wp_rd_addr (n_rd_addr),
      .wp_rd_data (n_rd_data),
      .wp_wr_en   (n_wr_en),
      .wp_wr_addr (n_wr_addr),
      .wp_wr_data (n_wr_data),
      .idle       (gp_idle[g]),
      .arc_count  (gp_arc_count[g]),
      .cut_count  (gp_cut_count[g]),
      .fwd_count  (gp_fwd_count[g])
    );

    word_prob_memory #(.WPG(WPG)) u_wpm (
      .clk       (clk),
      .rst_n     (rst_n),
      .bank_sel  (bank_sel),
      .init_busy (wp_init[g]),
      .n_rd_addr (n_rd_addr),
      .n_rd_data (n_rd_data),
      .n_wr_en   (n_wr_en),
      .n_wr_addr (n_wr_addr),
      .n_wr_data (n_wr_data),
      .c_rd_addr (c_addr),
      .c_rd_data (c_rd_data[g]),
      .c_wr_en   (c_clr && (c_grp == GW'(g))),
      .c_wr_addr (c_addr),
      .c_wr_data (WP_EMPTY)
    );
  end
endmodule
