// gps_pkg: types and constants shared by the grammar processing subsystem.
//
// All probabilities are carried in the log domain as non-negative costs
// (cost = -log p, fixed point), so the product of two probabilities is a
// saturating add of their costs and "the larger probability" is "the smaller
// cost".  The all-ones cost COST_NONE stands for probability zero; it is also
// the value an add saturates to and the content of an empty memory entry.
// Working in the log domain so that adders replace multipliers follows the
// document; the cost orientation, the 16-bit widths and the saturation rule
// are this design's choices.  The 13-bit word-probability address and the
// 32-bit word-probability data word are the widths printed in the grammar
// processor's block diagram.
package gps_pkg;

  localparam int unsigned PROB_W  = 16;  // log-domain cost
  localparam int unsigned BT_W    = 16;  // backtrace pointer
  localparam int unsigned WORD_W  = 13;  // word index
  localparam int unsigned WPM_AW  = 13;  // word probability memory address
  localparam int unsigned SUCC_AW = 16;  // successor memory address

  localparam int unsigned VOCAB_DEFAULT = 3000;  // words in the vocabulary
  localparam int unsigned NGP_DEFAULT   = 4;     // grammar processors

  typedef logic [PROB_W-1:0]  cost_t;
  typedef logic [BT_W-1:0]    bt_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [WPM_AW-1:0]  wpm_addr_t;
  typedef logic [SUCC_AW-1:0] succ_addr_t;

  localparam cost_t COST_NONE = '1;  // probability zero / saturation value

  // Ending-word record sent by the word processing subsystem (PGO_i).
  typedef struct packed {
    word_t word;  // index i of the word that ends
    cost_t pgo;   // PGO_i(t)
    bt_t   bt;    // backtrace pointer of that path
  } pgo_rec_t;

  // Successor memory entry.  In the directory part (address < VOCAB) the low
  // SUCC_AW bits of {cost, addr} hold the list start and 'last' marks an
  // empty list.
  typedef struct packed {
    logic      last;  // end of the current successor list
    cost_t     cost;  // transition cost c_ij
    wpm_addr_t addr;  // successor's address in its word probability group
  } succ_entry_t;

  // Word probability memory entry (PGI_j and the pointer to its predecessor).
  typedef struct packed {
    cost_t prob;
    bt_t   bt;
  } wp_entry_t;

  localparam wp_entry_t WP_EMPTY = '{prob: COST_NONE, bt: '0};

  // Starting-word record returned to the word processing subsystem (PGI_j).
  typedef struct packed {
    word_t word;
    cost_t pgi;
    bt_t   bt;
  } pgi_rec_t;

  // Successor address source chosen by the grammar processor's controller.
  typedef enum logic [1:0] {
    AG_HOLD = 2'd0,  // keep the last address
    AG_DIR  = 2'd1,  // directory slot of the incoming word
    AG_HEAD = 2'd2,  // list start read from the directory
    AG_INC  = 2'd3   // next entry of the list
  } ag_sel_t;

  // What the successor memory returns this cycle (grammar processor state).
  typedef enum logic [1:0] {
    RK_NONE = 2'd0,  // nothing was read: idle
    RK_DIR  = 2'd1,  // a directory entry
    RK_ARC  = 2'd2   // a successor-list entry
  } resp_kind_t;

  // Product of two probabilities: saturating add of their costs.
  function automatic cost_t cost_mul(cost_t a, cost_t b);
    logic [PROB_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[PROB_W] ? COST_NONE : s[PROB_W-1:0];
  endfunction

  // Start of word i's successor list, read from a directory entry.
  function automatic succ_addr_t dir_ptr(succ_entry_t e);
    logic [PROB_W+WPM_AW-1:0] payload;
    payload = {e.cost, e.addr};
    return payload[SUCC_AW-1:0];
  endfunction

endpackage
