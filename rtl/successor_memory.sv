// successor_memory: the successor-list store of one grammar processor.
//
// Every entry holds the three fields the document lists: the successor's
// address in the word probability memory, the transition cost c_ij, and a
// flag that ends the current list.  Lists are stored in decreasing order of
// probability so that the threshold test can end a list early.  The layout
// is this design's: locations 0..VOCAB-1 form a directory, entry i holding
// the start address of word i's list (flag set = word i has no successor in
// this processor's group), and the lists follow it.
//
// Interface: a synchronous read port for the grammar processor (data one
// cycle after the address) and a write port through which the host loads
// the model.  Timing: one read per cycle.
module successor_memory
  import gps_pkg::*;
#(
  parameter int unsigned DEPTH = 65536
) (
  input  logic        clk,
  input  succ_addr_t  rd_addr,
  output succ_entry_t rd_data,
  input  logic        wr_en,
  input  succ_addr_t  wr_addr,
  input  succ_entry_t wr_data
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  succ_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[IW'(wr_addr)] <= wr_data;
    rd_data <= (32'(rd_addr) < DEPTH) ? mem[IW'(rd_addr)] : '0;
  end
endmodule
