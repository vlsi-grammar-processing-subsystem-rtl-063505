// eps_out_unit: second section of the epsilon processor.
//
// Sweeps every word j of the vocabulary once per frame and sends the
// starting-word probability of equation (7) to the word processing
// subsystem:
//
//     PGI_j = max( PGI_j from the current word probability bank,
//                  MAX * eps_j )                                   (6), (7)
//
// MAX is the epsilon-model maximum handed over from the first section; it
// is copied into this section's own MAX register when a sweep starts.  For
// every word the address generation steps the word index (Ep2 address) and
// the word probability group and address together; words are numbered
// group-major, word j living in group j / WPG at address j mod WPG.  After
// an entry has been read, the empty entry is written back so the bank is
// clean when it becomes the "next" bank again.  The comparison follows the
// document; the read-and-clear, the numbering and the handshake are this
// design's.  Ties go to the grammar (table) value.
//
// Timing: three cycles per word when out_ready is high -- address, data
// (compare, clear), output.  out_valid/out_ready is a valid/ready handshake
// that may stall the sweep.  'done' rises after the last word is accepted
// and stays high until the next 'start'.
module eps_out_unit
  import gps_pkg::*;
#(
  parameter int unsigned VOCAB = VOCAB_DEFAULT,
  parameter int unsigned NGP   = NGP_DEFAULT,
  parameter int unsigned WPG   = VOCAB_DEFAULT / NGP_DEFAULT,
  localparam int unsigned GW   = (NGP > 1) ? $clog2(NGP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  cost_t         max_cost,
  input  bt_t           max_bt,
  output word_t         ep2_addr,
  input  cost_t         ep2_data,
  output logic [GW-1:0] grp,
  output wpm_addr_t     wp_addr,
  input  wp_entry_t     wp_data,
  output logic          wp_clr,
  output logic          out_valid,
  input  logic          out_ready,
  output pgi_rec_t      out_data,
  output logic          done,
  output logic [31:0]   eps_wins
);
  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA, S_OUT} state_t;
  state_t state;

  word_t j;
  cost_t max2_cost;   // MAX handed over at the start of the sweep
  bt_t   max2_bt;
  cost_t eps_val;
  logic  eps_win;

  assign ep2_addr  = j;
  assign eps_val   = cost_mul(max2_cost, ep2_data);
  assign eps_win   = eps_val < wp_data.prob;
  assign wp_clr    = (state == S_DATA);
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      j         <= '0;
      grp       <= '0;
      wp_addr   <= '0;
      max2_cost <= COST_NONE;
      max2_bt   <= '0;
      out_data  <= '0;
      done      <= 1'b0;
      eps_wins  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state     <= S_ADDR;
            j         <= '0;
            grp       <= '0;
            wp_addr   <= '0;
            max2_cost <= max_cost;
            max2_bt   <= max_bt;
            done      <= 1'b0;
          end
        end
        S_ADDR: state <= S_DATA;
        S_DATA: begin
          out_data.word <= j;
          if (eps_win) begin
            out_data.pgi <= eps_val;
            out_data.bt  <= max2_bt;
            eps_wins     <= eps_wins + 1;
          end else begin
            out_data.pgi <= wp_data.prob;
            out_data.bt  <= wp_data.bt;
          end
          state <= S_OUT;
        end
        S_OUT: begin
          if (out_ready) begin
            if (32'(j) == VOCAB - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ADDR;
              j     <= j + 1'b1;
              if (32'(wp_addr) == WPG - 1) begin
                wp_addr <= '0;
                grp     <= grp + 1'b1;
              end else begin
                wp_addr <= wp_addr + 1'b1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_valid_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)))
    else $error("eps_out_unit: output changed while stalled");
`endif
endmodule
