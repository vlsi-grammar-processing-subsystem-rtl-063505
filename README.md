# Grammar processing subsystem for real-time HMM speech recognition

A hidden-Markov-model recognizer for continuous speech decides, every 10 ms
frame, which words might have just ended and how likely each is. Before the
next frame it must know how likely each vocabulary word is to *start*. That
takes a language model: the probability that word j follows word i. With a
3000-word vocabulary a full table of word pairs has 9 million entries, and
all of them would have to be evaluated 100 times a second.

This RTL splits the language model in two and gives each part its own
hardware:

* **High-probability arcs** (the explicit bigram table). For each word i,
  a list holds the likely successors j and their transition probabilities
  c_ij. Four *grammar processors* run these lists in parallel, about 50000
  arcs each per frame:

      PGI_P(j) = max over ending words i of  PGO(i) * c_ij

* **Low-probability arcs** (the *epsilon model*). Every other pair is
  approximated by a product of two per-word factors,
  eps_out(i) * eps_in(j). That needs 2N numbers instead of N², and
  the maximum over i no longer depends on j:

      PGI_E(j) = [ max over ending words i of PGO(i) * eps_out(i) ] * eps_in(j)

  The *epsilon processor* forms that bracket once per frame. It then sweeps
  all words j and returns `max(PGI_P(j), PGI_E(j))` to the recognizer, with a
  pointer to the best predecessor.

Everything is done in the log domain, so every multiplication above is an
addition and every maximum is a comparison. The datapaths hold only adders,
comparators and multiplexers.

## Number format

All probabilities are **costs**: non-negative fixed-point `-log p`, 16 bits
wide (`gps_pkg::cost_t`). So:

* a product of probabilities is a **saturating add** of costs
  (`gps_pkg::cost_mul`);
* "more probable" means **smaller cost**. Every `max` above is a `min` in the
  RTL;
* the all-ones cost `COST_NONE` means probability zero. An add that
  overflows saturates to it, and an empty memory entry holds it.

Backtrace pointers are 16 bits and word indices 13 bits. A word-probability
entry is `{cost, pointer}` = 32 bits. On ties the value already stored (or,
at the output, the bigram value) is kept.

## Structure

```
 ending words (word, PGO, bt) ──┬─► FIFO ─► epsilon processor ◄── Ep1, Ep2
                                │            │  (current bank, all groups)
                                │            └─► starting words (word, PGI, bt)
                                ├─► FIFO ─► grammar processor 0 ◄─► successor memory 0
                                │                 └─► word prob. group 0 (next bank)
                                ├─► FIFO ─► grammar processor 1 ...
                                ...
```

| module | role |
|---|---|
| `gps_top` | the subsystem; five FIFOs, four grammar-processor blocks, Ep1/Ep2, epsilon processor |
| `word_fifo` | receiving FIFO; every processor has its own copy of the ending-word stream |
| `grammar_processor` | bigram update of one group (controller and datapath) |
| `gp_addr_gen` | successor-memory address: directory slot, list head, or +1 |
| `gp_threshold` | programmable pruning threshold |
| `successor_memory` | directory + sorted successor lists of one grammar processor |
| `word_prob_memory` | one group of the word probability memory, both banks |
| `epsilon_processor` | frame control plus the two sections below |
| `eps_max_unit` | running max of PGO(i)·eps_out(i) over the ending words |
| `eps_out_unit` | sweep over all words: max(PGI_P(j), MAX·eps_in(j)), then clear |
| `eps_memory` | Ep1 (eps_out) or Ep2 (eps_in) table |
| `gps_pkg` | widths, record types, `cost_mul` |

The words are split into four groups, one per grammar processor. Group g
holds words `g*WPG .. g*WPG+WPG-1`, with WPG = 750. Grammar processor g holds,
for every word i, only the successors that fall in group g, and it writes
only group g of the word probability memory. The four processors therefore
never contend for a memory, and nothing is duplicated. All four (and the
epsilon processor) see every ending word.

## Frames, banks and the one-frame hand-over

This is the part that takes most care.

The word probability memory has two banks. In any frame one is *next*: the
grammar processors accumulate `PGI_P` into it. The other is *current*: the
epsilon processor reads it out. `frame_start` swaps them (`bank_sel`
toggles).

The epsilon maximum has the same structure. `eps_max_unit` builds the
running maximum for the ending words of this frame. `eps_out_unit` keeps its
own copy of MAX, captured at `frame_start`. So during frame t:

* the grammar processors and `eps_max_unit` consume the ending words of
  frame t;
* `eps_out_unit` returns the starting probabilities computed from the ending
  words of frame t-1: the bank filled then, and the MAX captured from then.

As it reads each entry of the current bank, `eps_out_unit` writes the empty
entry back. At the next swap that bank becomes "next" and starts out clean.
After reset, `word_prob_memory` clears both banks itself (750 cycles,
`init_busy`).

A frame, seen from the ports of `gps_top`:

1. Wait for `init_busy` low (after reset only), then pulse `frame_start`. It
   is ignored while a frame is active.
2. Push ending words with `pgo_valid/pgo_ready`. `pgo_ready` is low outside a
   frame, after `pgo_done`, and while any FIFO is full.
3. Pulse `pgo_done` after the last ending word of the frame.
4. Accept the 3000 starting words, in word order, on
   `pgi_valid/pgi_ready`.
5. `frame_done` rises once every word has been returned, `pgo_done` has been
   seen, the epsilon FIFO is drained and all grammar processors are idle. It
   stays high until the next `frame_start`.

The words returned in the first frame after reset are all `COST_NONE`.

## Grammar processor

### Successor memory layout

Each entry is `{last, cost c_ij, successor address}` (30 bits). Locations
`0..VOCAB-1` form a directory. Entry i holds the start address of word i's
list in its low 16 bits; if `last` is set there, word i has no successor in
this group. The lists follow the directory. Each list is sorted by
increasing cost (decreasing probability), and the final entry of a list has
`last` set. Successor addresses are local to the group (0..WPG-1). A list
should name each successor once.

### Schedule

| cycle | successor memory returns | action |
|---|---|---|
| 0 | – | pop the FIFO, read directory slot i |
| 1 | directory entry | read list start (or finish now if the list is empty) |
| 2.. | list entry | add PGO + c_ij, test threshold, read PGI_P(j), read next entry |
| +1 | – | compare with PGI_P(j), write the better value with word i's pointer |

Once a list runs, one arc is processed per clock. The pop of the next word
overlaps the last entry of the current list. A word with n examined entries
therefore costs n+1 cycles: one for the directory, one per entry. The list
is left at its `last` entry, or at the first candidate whose cost exceeds
the threshold. Because lists are sorted, every later candidate would exceed
it too.

### Memory timing

The next bank is read in the same cycle that the previous arc is written.
The directory cycle between words keeps successive lists apart. If a list
repeats a successor in consecutive entries, though, the second read would
see stale data, so the value written in the previous cycle is forwarded
(`fwd_count` counts how often).

### Threshold

`gp_threshold` is a register the host loads (`host_thr_load`, one value for
all four processors). It resets to all ones, which prunes nothing.

## Epsilon processor

* `eps_max_unit` takes one ending word per cycle from its FIFO. It reads
  eps_out(i) from Ep1, adds PGO, and keeps the smallest sum with that
  word's backtrace pointer.
* `eps_out_unit` takes three cycles per word: address, then data (compare
  and clear the entry), then output. It stalls while `pgi_ready` is low.
  The word index, group and group address advance together. For 3000 words
  that is 9000 cycles, well inside a 50000-cycle frame.

## Sizes and throughput

| parameter | default | origin |
|---|---|---|
| `VOCAB` | 3000 | vocabulary of the original system |
| `NGP` | 4 | grammar processors in the original system |
| `WPG` | 750 | VOCAB / NGP |
| word-probability address | 13 bits | original grammar processor |
| word-probability data | 32 bits | original; the 16 + 16 split is this design's |
| `SUCC_DEPTH` | 65536 | chosen: 3000 directory + ~50000 arcs |
| `FIFO_DEPTH` | 1024 | chosen |

At the original 5 MHz clock a frame is 50000 cycles. A grammar processor
needs one cycle per arc plus one per ending word. The original design
quotes about 50000 arcs per processor per frame. Here, 50000 arcs spread
over 3000 ending words need 53000 cycles, about 6% more than a frame. The
full load test (`tb_gps_workload`: every word ends, about 52000 arcs per
processor, no pruning) takes about 55000 cycles per frame. Loads with
fewer ending words or more pruning fit.

## Departures from the original and open points

* **Clocking and storage.** The original uses a two-phase clock with
  dynamic latches and a bidirectional pad bus to external SRAM. Here:
  single-edge flip-flops, and memories as synchronous arrays with separate
  read and write data.
* **Grammar-processor datapath.** The original datapath has a second
  adder/comparator path feeding its controller, and that path's function
  is not known. It is not reproduced. The controller here is a three-state
  machine.
* **Pipeline depth.** The original pipeline is five levels deep. Here, four
  cycles pass from popping a word to its first write-back.
* **Own choices.** These are this design's, not the original's:
  * the directory layout of the successor memory;
  * the one directory cycle per ending word;
  * a threshold that is a host-loaded register;
  * the cost format and widths;
  * the clear-after-read of the current bank and the reset sweep;
  * the `pgo_done` strobe;
  * the valid/ready handshakes;
  * the group-major word numbering.
* **Not included.** The word processing subsystem (Viterbi search,
  backtrace memory) and the host board are outside this RTL. They appear
  only as the ports of `gps_top`.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gps_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/gps_pkg.sv tb/tb_gps_top.sv
./obj_dir/Vtb_gps_top
```

| testbench | what it runs |
|---|---|
| `tb_gps_top` | whole subsystem, 40 words, 8-deep FIFOs, 4 frames |
| `tb_gps_full` | whole subsystem at default size, 3 frames of 1500 ending words |
| `tb_gps_workload` | default size, every word ending, ~200000 arcs per frame, frame-time check |
| `tb_gps_scaled` | eight grammar processors instead of four, 80 words |
| `tb_<module>` | each module on its own |

The four end-to-end tests share `gps_env`. It builds a random model, loads
it through the host ports, and checks every returned word against a
reference of the equations above. It also checks the arc counts of each
grammar processor, and it counts the threshold cut, empty lists,
epsilon-model and bigram wins, bank swaps, input back-pressure and output
stalls.

Lint: `verilator --lint-only -Wall -Irtl rtl/gps_pkg.sv rtl/<module>.sv`.
The remaining warnings are about unused package constants and unused bits.
