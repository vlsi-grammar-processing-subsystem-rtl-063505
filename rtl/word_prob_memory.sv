// word_prob_memory: one group of the word probability memory, both banks.
//
// The word probability memory keeps the starting-word probability PGI_j and
// the pointer to its best predecessor for every word.  It has two banks, one
// for the frame being output ("current", PGI(t)) and one being accumulated
// ("next", PGI(t+1)); their roles swap every frame.  Each bank is split into
// groups, one per grammar processor; this module is one group.
//
// bank_sel names the bank that is "current".  The n_* port (grammar
// processor) works on the other bank, the c_* port (epsilon processor) on
// the current one, so the two never contend.  Each port has one synchronous
// read (data one cycle after the address) and one write per cycle; a read of
// the address being written in the same cycle returns the old value.
//
// After reset the module writes the empty entry (cost all ones, pointer 0)
// into every word of both banks, one word per cycle, and holds init_busy
// high meanwhile; accesses during that sweep are ignored.  The banking and
// grouping follow the document; the clearing sweep is this design's.
module word_prob_memory
  import gps_pkg::*;
#(
  parameter int unsigned WPG = VOCAB_DEFAULT / NGP_DEFAULT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bank_sel,
  output logic      init_busy,
  // next bank (grammar processor)
  input  wpm_addr_t n_rd_addr,
  output wp_entry_t n_rd_data,
  input  logic      n_wr_en,
  input  wpm_addr_t n_wr_addr,
  input  wp_entry_t n_wr_data,
  // current bank (epsilon processor)
  input  wpm_addr_t c_rd_addr,
  output wp_entry_t c_rd_data,
  input  logic      c_wr_en,
  input  wpm_addr_t c_wr_addr,
  input  wp_entry_t c_wr_data
);
  localparam int unsigned IW = (WPG > 1) ? $clog2(WPG) : 1;

  wp_entry_t bank0 [WPG];
  wp_entry_t bank1 [WPG];
  wp_entry_t rd0, rd1;
  wpm_addr_t init_addr;

  // per-bank port selection
  wpm_addr_t ra0, ra1, wa0, wa1;
  wp_entry_t wd0, wd1;
  logic      we0, we1;
  logic      sel_q;  // bank_sel of the cycle a read was issued

  always_comb begin
    if (bank_sel) begin  // bank1 current, bank0 next
      ra0 = n_rd_addr; wa0 = n_wr_addr; wd0 = n_wr_data; we0 = n_wr_en;
      ra1 = c_rd_addr; wa1 = c_wr_addr; wd1 = c_wr_data; we1 = c_wr_en;
    end else begin
      ra0 = c_rd_addr; wa0 = c_wr_addr; wd0 = c_wr_data; we0 = c_wr_en;
      ra1 = n_rd_addr; wa1 = n_wr_addr; wd1 = n_wr_data; we1 = n_wr_en;
    end
    if (init_busy) begin
      wa0 = init_addr; wd0 = WP_EMPTY; we0 = 1'b1;
      wa1 = init_addr; wd1 = WP_EMPTY; we1 = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we0 && (32'(wa0) < WPG)) bank0[IW'(wa0)] <= wd0;
    if (we1 && (32'(wa1) < WPG)) bank1[IW'(wa1)] <= wd1;
    rd0 <= (32'(ra0) < WPG) ? bank0[IW'(ra0)] : WP_EMPTY;
    rd1 <= (32'(ra1) < WPG) ? bank1[IW'(ra1)] : WP_EMPTY;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_addr <= '0;
      sel_q     <= 1'b0;
    end else begin
      sel_q <= bank_sel;
      if (init_busy) begin
        if (32'(init_addr) == WPG - 1) init_busy <= 1'b0;
        init_addr <= init_addr + 1'b1;
      end
    end
  end

  assign n_rd_data = sel_q ? rd0 : rd1;
  assign c_rd_data = sel_q ? rd1 : rd0;
endmodule
