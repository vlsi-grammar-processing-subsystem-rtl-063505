// eps_memory: the Ep1 or Ep2 memory of the epsilon processor.
//
// Ep1 holds eps_i, the cost of leaving word i through a low-probability arc;
// Ep2 holds eps_j, the cost of entering word j.  The low-probability arc
// i->j is approximated by eps_i * eps_j, which needs 2N words of storage
// instead of N*N.  Both are word-indexed tables read one word per cycle.
//
// Interface: synchronous read (data one cycle after rd_addr), host write
// port for loading.  DEPTH is the vocabulary size of the document (3000).
module eps_memory
  import gps_pkg::*;
#(
  parameter int unsigned DEPTH = VOCAB_DEFAULT
) (
  input  logic  clk,
  input  word_t rd_addr,
  output cost_t rd_data,
  input  logic  wr_en,
  input  word_t wr_addr,
  input  cost_t wr_data
);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  cost_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[IW'(wr_addr)] <= wr_data;
    rd_data <= (32'(rd_addr) < DEPTH) ? mem[IW'(rd_addr)] : COST_NONE;
  end
endmodule
