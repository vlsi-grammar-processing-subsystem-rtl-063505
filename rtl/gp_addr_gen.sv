// gp_addr_gen: address generation unit of the grammar processor.
//
// Produces the successor memory address for the current cycle from one of
// three sources: the directory slot of the word just taken from the FIFO,
// the list start returned by that directory slot, or the previous address
// plus one while a list is walked.  The address is also registered so that
// the next increment or hold starts from it.  The document shows this unit
// as muxes, registers and an adder with the successor memory data fed back;
// the four-way select is this design's reading of it.
//
// Interface: 'sel' (ag_sel_t) picks the source; 'addr' is combinational and
// goes straight to the successor memory, whose data returns a cycle later.
module gp_addr_gen
  import gps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ag_sel_t    sel,
  input  word_t      word_idx,
  input  succ_addr_t head_ptr,
  output succ_addr_t addr
);
  succ_addr_t addr_q;

  always_comb begin
    unique case (sel)
      AG_DIR:  addr = succ_addr_t'(word_idx);
      AG_HEAD: addr = head_ptr;
      AG_INC:  addr = addr_q + 1'b1;
      default: addr = addr_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) addr_q <= '0;
    else        addr_q <= addr;
  end
endmodule
