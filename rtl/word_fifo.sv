// word_fifo: receiving FIFO between the word processing subsystem and one
// processor of the grammar subsystem.
//
// Each processor (the epsilon processor and every grammar processor) has its
// own FIFO, so all of them consume the same stream of ending-word records
// (word index, PGO, backtrace pointer) independently and at their own pace,
// as the document describes.  Depth, the first-word-fall-through read and
// the sticky overflow flag are this design's choices.
//
// Interface: push with wr_en when !full; the head record is on rd_data while
// !empty and is removed by rd_en.  A push and a pop may happen in the same
// cycle.  A push while full is dropped and sets 'overflow' until reset.
// Timing: a pushed record is visible on rd_data the next cycle.
module word_fifo
  import gps_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wr_en,
  input  pgo_rec_t wr_data,
  output logic     full,
  input  logic     rd_en,
  output pgo_rec_t rd_data,
  output logic     empty,
  output logic     overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pgo_rec_t        mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     count;
  logic            do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= incr(wp);
      if (do_rd) rp <= incr(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end

`ifndef SYNTHESIS
  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("word_fifo: pop while empty");
`endif
endmodule
