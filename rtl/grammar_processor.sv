// grammar_processor: updates starting-word probabilities under the
// high-probability (statistical grammar) model, equation (5):
//
//     PGI_j(t+1) = max over ending words i of  PGO_i(t) * c_ij
//
// For each ending word i taken from its receiving FIFO the processor finds
// word i's successor list in its successor memory, and for every successor
// j on it forms PGO_i * c_ij (a saturating add of log-domain costs), reads
// PGI_j(t+1) from its group of the "next" word probability bank, and writes
// back the better of the two together with the backtrace pointer of word i.
// The list is left as soon as a candidate falls below the threshold (the
// list is sorted, so all later ones would too) or its end flag is reached.
// This is the document's algorithm; the schedule below is this design's.
//
// Schedule (one successor arc per clock once a list is running):
//   cycle 0  pop the FIFO, read directory slot i of the successor memory
//   cycle 1  directory entry returns; read the list start
//   cycle 2+ list entry returns: add, threshold test, read PGI_j    (stage A)
//            and read the next list entry in the same cycle
//   next     compare with PGI_j, write back the better value      (stage B)
// The pop of the next word overlaps the last entry of the current list, so
// a word with n successors costs n+1 cycles.  A word whose directory entry
// has its end flag set has no successors here and costs one cycle.
//
// Read-after-write: PGI_j is read one cycle before the previous arc's write
// lands.  Successive words are already separated by the directory cycle,
// and a well-formed list names each successor once, but a list that repeats
// a successor in consecutive entries would read a stale value; for that
// case the value written in the previous cycle is forwarded.  Ties keep the
// stored value.
//
// Interface: FIFO (first-word fall-through), successor memory read port,
// next-bank read/write port, threshold load, 'idle' (FIFO empty and nothing
// in flight) and statistics counters.
module grammar_processor
  import gps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // receiving FIFO
  input  logic        fifo_empty,
  output logic        fifo_rd,
  input  pgo_rec_t    fifo_data,
  // successor memory
  output succ_addr_t  sm_addr,
  input  succ_entry_t sm_data,
  // threshold
  input  logic        thr_load,
  input  cost_t       thr_in,
  // word probability memory, next bank (MEM t+1)
  output wpm_addr_t   wp_rd_addr,
  input  wp_entry_t   wp_rd_data,
  output logic        wp_wr_en,
  output wpm_addr_t   wp_wr_addr,
  output wp_entry_t   wp_wr_data,
  // status
  output logic        idle,
  output logic [31:0] arc_count,
  output logic [31:0] cut_count,
  output logic [31:0] fwd_count
);
  // ---- controller ----------------------------------------------------------
  resp_kind_t resp_q, resp_d;   // what the successor memory returns this cycle
  ag_sel_t    ag_sel;
  cost_t      cur_pgo;          // PGO_i of the word being expanded
  bt_t        cur_bt;           // its backtrace pointer

  // ---- stage A: list entry returned ----------------------------------------
  cost_t cand;
  logic  below;
  logic  arc_go;                // apply this successor
  logic  word_end;              // current word finished this cycle

  // ---- stage B: compare and write back ---------------------------------------
  logic      b_valid;
  wpm_addr_t b_addr;
  cost_t     b_cand;
  bt_t       b_bt;
  logic      w_valid;           // a write landed at the last clock edge
  wpm_addr_t w_addr;
  wp_entry_t w_data;
  logic      fwd;
  wp_entry_t old_entry;

  gp_addr_gen u_agu (
    .clk      (clk),
    .rst_n    (rst_n),
    .sel      (ag_sel),
    .word_idx (fifo_data.word),
    .head_ptr (dir_ptr(sm_data)),
    .addr     (sm_addr)
  );

  gp_threshold u_thr (
    .clk      (clk),
    .rst_n    (rst_n),
    .thr_load (thr_load),
    .thr_in   (thr_in),
    .cand     (cand),
    .below    (below)
  );

  assign cand   = cost_mul(cur_pgo, sm_data.cost);
  assign arc_go = (resp_q == RK_ARC) && !below;

  always_comb begin
    word_end = 1'b0;
    ag_sel   = AG_HOLD;
    resp_d   = RK_NONE;
    fifo_rd  = 1'b0;
    unique case (resp_q)
      RK_DIR: begin
        if (sm_data.last) word_end = 1'b1;   // no successors in this group
        else begin
          ag_sel = AG_HEAD;
          resp_d = RK_ARC;
        end
      end
      RK_ARC: begin
        if (below || sm_data.last) word_end = 1'b1;
        else begin
          ag_sel = AG_INC;
          resp_d = RK_ARC;
        end
      end
      default: word_end = 1'b1;              // idle
    endcase
    if (word_end && !fifo_empty) begin
      fifo_rd = 1'b1;
      ag_sel  = AG_DIR;
      resp_d  = RK_DIR;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resp_q  <= RK_NONE;
      cur_pgo <= COST_NONE;
      cur_bt  <= '0;
    end else begin
      resp_q <= resp_d;
      if (fifo_rd) begin
        cur_pgo <= fifo_data.pgo;
        cur_bt  <= fifo_data.bt;
      end
    end
  end

  // stage A issues the read of PGI_j(t+1)
  assign wp_rd_addr = sm_data.addr;

  // ---- stage B ---------------------------------------------------------------
  assign fwd       = b_valid && w_valid && (w_addr == b_addr);
  assign old_entry = fwd ? w_data : wp_rd_data;

  always_comb begin
    wp_wr_en   = b_valid && (b_cand < old_entry.prob);
    wp_wr_addr = b_addr;
    wp_wr_data = '{prob: b_cand, bt: b_bt};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid   <= 1'b0;
      b_addr    <= '0;
      b_cand    <= COST_NONE;
      b_bt      <= '0;
      w_valid   <= 1'b0;
      w_addr    <= '0;
      w_data    <= WP_EMPTY;
      arc_count <= '0;
      cut_count <= '0;
      fwd_count <= '0;
    end else begin
      b_valid <= arc_go;
      b_addr  <= sm_data.addr;
      b_cand  <= cand;
      b_bt    <= cur_bt;
      w_valid <= wp_wr_en;
      w_addr  <= wp_wr_addr;
      w_data  <= wp_wr_data;
      if (arc_go) arc_count <= arc_count + 1;
      if ((resp_q == RK_ARC) && below) cut_count <= cut_count + 1;
      if (fwd) fwd_count <= fwd_count + 1;
    end
  end

  assign idle = fifo_empty && (resp_q == RK_NONE) && !b_valid;

`ifndef SYNTHESIS
  a_pop_only_when_data: assert property (@(posedge clk) disable iff (!rst_n) fifo_rd |-> !fifo_empty)
    else $error("grammar_processor: pop while FIFO empty");
`endif
endmodule
