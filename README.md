# RICH L0 trigger gateware: hit clustering for a Cherenkov detector

The RICH detector of a fixed-target kaon experiment sees about 10 MHz of
events, and each particle lights up a ring of photomultipliers. The level-0
trigger needs from it one thing: a precise time for each event. This
gateware runs on a TEL62 read-out board. It groups the photomultiplier hits
that belong together in time into *clusters*. Each cluster carries a hit count
and an averaged time with 100 ps resolution, and these clusters are sent to
the L0 trigger processor as *primitives*.

The board has four pre-processing (PP) FPGAs and one sync-link (SL) FPGA.
Each PP converts the hits of one TDC board, clusters them and averages each
cluster's time. The SL merges the four PP streams, plus the stream of an
upstream board when boards are daisy-chained over InterTEL, and clusters and
averages again. The same clustering module is used in both places.

```
 TDC0 ─ pp_chain ─┐
 TDC1 ─ pp_chain ─┴ merger ─┐
 TDC2 ─ pp_chain ─┐         ├ merger ─ merger ─ clustering ─ average ─┬─ primitives (last board)
 TDC3 ─ pp_chain ─┴ merger ─┘          ▲                              └─ InterTEL out (other boards)
                          InterTEL in ─┘ (intertel_en)
 pp_chain = data_converter → clustering_module → average_calculator
```

Everything is synchronous to one 160 MHz clock with an active-low
asynchronous reset. Streams between blocks use a valid/ready handshake with
one 32-bit word per cycle.

## The RICH word stream

Every block reads and writes the same format. A word is two 16-bit halves,
and each half starts with a 2-bit tag, so a half can be recognised on its own.
This is what lets the words cross the 16-bit InterTEL bus.

| word      | high half (tag, payload)        | low half (tag, payload)             |
|-----------|---------------------------------|-------------------------------------|
| timestamp | `10`, timestamp[27:14]          | `11`, timestamp[13:0]               |
| data      | `00`, N[7:2], CTS[7:0] (signed) | `01`, N[1:0], fine time[11:0]       |

- A **timestamp** counts 400 ns periods (28 bits).
- The **fine time** is the position inside the period, in 100 ps units (0..4095).
- **N** is the number of hits in the cluster.
- **CTS** (cluster time sum) is the signed sum of each hit's offset from the cluster's seed time. The average calculator uses it and then clears it.

Stream rules:

- Every 400 ns timestamp appears in the stream, in order.
- Every timestamp word is followed by at least one data word.
- A timestamp with no cluster carries one **speed-data** word (N = 0, CTS = 0).

Speed data keeps every consumer moving. A merger cannot emit anything until
both of its inputs have shown where their time is, so a quiet source would
otherwise stall the whole board.

`rich_formatter` is the single place that produces this format. It takes a
time-ordered stream of items, each either "cluster at time t" or "time has
reached timestamp t". It writes:

- the timestamp words;
- the data words;
- speed data for empty timestamps;
- timestamp plus speed-data pairs for any gap.

It writes one word per cycle. The data converter, the clustering module's
collector and the data merger all end in a formatter.

## 25 ns frames and the overflow bit

The TDCs read out in 25 ns order, and clustering works frame by frame. A frame
number is the 32-bit value {timestamp, fine[11:8]}, so one timestamp holds 16
frames. Inside a frame a hit has an 8-bit time f. The matching window (`window`,
in 100 ps units) must also join hits that sit on either side of a frame
boundary. Such hits are handled this way:

- A hit with f < window is sent to the row of the *previous* frame, if that row is still open.
- There it is given time 256 + f, i.e. the 9th bit of the in-frame time is set.
- The hit is therefore compared with clusters near the end of that frame, and the resulting cluster can spill past the frame's end.

The conversion back to an absolute time uses frame·256 + t, so the 9th bit
simply carries into the next frame or timestamp.

## Clustering module

The clustering module has three parts: a **data distributor**, 16 **rows**
of 4 **cells**, and a **data collector**.

**Distributor** (`data_distributor`). It tracks the latest frame seen and
gives each new frame the next free row in a ring. Each data word goes to one
of these places:

- the row of its frame;
- the previous row, for the overflow case above;
- a newly allocated row.

Other cases:

- A word whose row has already been closed is dropped and counted.
- Speed data allocates an empty row, so its timestamp still reaches the output.
- A row is closed (*flushed*) once the input shows time two frames past it. Two rows are therefore filling at any moment.
- If the next row in the ring is still emptying, the input stalls. This is the back-pressure path of the module.

**Cells** (`clustering_cell`, chained in `clustering_row`). A cluster enters
the first cell of its row and moves right one cell per cycle:

- An empty cell stores it as a new seed.
- An occupied cell whose seed time T0 is within the window of the cluster's time T1 merges it:
  N0 += N1 and CTS0 += N1·(T1 − T0) + CTS1.
- Otherwise the cluster passes on.

A cluster that leaves the last cell finds the row full. It is discarded and
counted (`cell_overflows`).

The multiplier has a latency of 3 cycles. N and the match decision are
updated at once. The CTS increment follows through a short delay line, so a
cell can accept a new input every cycle.

**Time order inside a row.** Clusters are not stored in time order: a seed
takes the first free cell. Each cell therefore keeps a *position*, which is
the rank of its seed time among the seeds of the row. The positions are kept
up to date like this:

- A cluster passing a seed that is *earlier* than itself carries `pos + 1`.
- When a new seed is stored, its time is broadcast to the whole row. Every stored seed that is later than the new one increments its position.

The broadcast is this design's own rule. A simpler rule, where a stored
position is incremented whenever a smaller cluster passes, over-counts when
that cluster is later merged further down the row. The positions would then
reach 4 and the cluster would be lost.

**Flush.** A flushed row waits until nothing has entered it for
N_CELLS + MUL_LAT cycles, so that all merges are finished. It then shifts its
four cells, empty ones included, into its output FIFO. Each entry carries the
frame, the position and the cluster. From the last input to the last FIFO
write takes at most 4 + 3 + 1 + 4 cycles. That is within the row latency of
2·4 + 3 + 3 = 14 cycles that the sizing of this architecture calls for, and
the testbench checks it.

**Collector** (`data_collector`). Its parts:

- The **retriever** reads the row FIFOs in ring order, four entries per row.
- The **sorter** writes each entry into one of 8 RAMs of 4 slots, at the address given by its position. A RAM read in slot order is then in time order.
- The **multiplicity filter** keeps clusters with `mult_min ≤ N ≤ mult_max`. A cluster it removes still tells the formatter that time has advanced.
- The **formatter** writes the RICH stream.

CTS is saturated to the 8-bit field of the word. An entry with a position of
4 or more cannot be placed and is dropped and counted. With the broadcast rule
this happens only for a row that overflowed.

**Throughput.** The module takes one word per cycle. Four cells per 25 ns
frame at 160 MHz are a cluster rate of 160 MHz. The module testbench measures
528 words accepted in 529 cycles.

## Average calculator

`average_calculator` replaces each cluster's fine time with
fine + CTS/N and clears CTS, with one cycle of latency. Division truncates
toward zero. The result is clamped to 0..4095, so a cluster never moves out of
its 400 ns timestamp and no timestamp word needs rewriting. Timestamp words
and speed data pass unchanged.

It is the last stage of each PP, which keeps the SL's CTS small, and the last
stage of the SL, where it gives the primitive's reference time.

Clusters leave the collector ordered by seed time. Averaging moves each one
by less than the window. Two separate clusters whose seeds are less than two
windows apart could therefore swap order, but this is rare. In the full-board
test, none of about 1000 primitives were out of order.

## Data merger

`data_merger` has an input FIFO for each of its two sources. Timestamp words
only update that source's current timestamp. A data word is chosen only when
**both** FIFO heads are data words. The one with the earlier 25 ns frame goes
first, and source A wins a tie. The output is thus sorted in frames, as
clustering needs.

Speed data from the sources only advance time. The output formatter writes
speed data only for timestamps where neither source had a cluster.

The cost of this scheme is that one silent source stops the merger. This is
why every stream carries every timestamp.

The SL uses a tree of three mergers for the four PPs. A fourth merger adds the
InterTEL stream. When `intertel_en` is low, that fourth merger is bypassed and
the tree output goes straight to clustering, so nothing waits on an absent
upstream board.

## InterTEL link and daisy chain

`intertel_tx` sends each word as its high half and then its low half on a
16-bit bus with a valid strobe. `intertel_rx` rebuilds the word from the half
tags. A low half without its high half is counted in `tag_errors` and
dropped.

The bus has a ready line back to the sender:

- The receiver holds an 8-word FIFO.
- It keeps ready high while fewer than 4 words are stored.
- A word already in flight when ready falls still fits.

The top input `last_board` chooses the destination of the SL output. The last
board of the chain sends it to the trigger processor on `prim_*`. Every other
board sends it to the next board over InterTEL, and that board must have
`intertel_en` set.

## Where this design goes beyond or departs from the source design

- **Position rule:** uses the store-time broadcast described above.
- **Tag values:** 00, 01, 10 and 11 are this design's choice. So is the reading that the timestamp low half holds bits 13:0.
- **Flush and stall:** the flush rule "time two frames past the row" and the stall when the next row is still emptying are this design's choices.
- **CTS width:** CTS inside the cells is 24 bits. At the output it saturates to 8 bits, and N saturates at 255.
- **Averaging:** truncates toward zero and clamps to the timestamp.
- **Mergers:** the tree shape and the way InterTEL is bypassed are this design's choices.
  The selection is combinational, as in the source design, but the chosen word
  passes through the formatter's output register, so a merger adds one cycle.
- **Retriever:** it looks at the FIFO of one row at a time and moves to the next
  row in the same cycle as it takes that row's last entry. It still reads one
  entry per cycle without watching two rows at once, as the source design does.
- **Row capacity:** the limit of four clusters applies per 25 ns row. The source
  design words it as four clusters "in a timestamp".
- **InterTEL:** the bus protocol, the ready back-channel and the receive FIFO are this design's own.
- **Not built:**
  - the TDC boards;
  - the L0 trigger processor;
  - the final primitive encoding (timestamp plus primitive ID), whose format is not defined here, so the top outputs RICH-format clusters;
  - the read-out data buffer and the Gigabit Ethernet links;
  - the board's control PC.

  The run settings `window`, `mult_min`, `mult_max`, `intertel_en` and `last_board` are top-level inputs.

## Files

| file | contents |
|------|----------|
| `rtl/rich_pkg.sv` | widths, word tags, item / cluster / row-entry types, pack/unpack functions |
| `rtl/sync_fifo.sv` | fall-through FIFO used by rows, mergers and the InterTEL receiver |
| `rtl/rich_formatter.sv` | item stream to RICH words |
| `rtl/data_converter.sv` | TDC hits and time markers to one-hit clusters |
| `rtl/clustering_cell.sv`, `clustering_row.sv` | cell and row of 4 cells with output FIFO |
| `rtl/data_distributor.sv`, `data_collector.sv` | the two ends of the clustering module |
| `rtl/clustering_module.sv` | distributor + 16 rows + collector |
| `rtl/average_calculator.sv`, `data_merger.sv` | as above |
| `rtl/intertel_tx.sv`, `intertel_rx.sv` | InterTEL bus halves |
| `rtl/pp_chain.sv`, `sl_chain.sv` | the PP and SL trigger paths |
| `rtl/rich_l0_top.sv` | one board: 4 PP chains, SL chain, InterTEL in and out |

Defaults: 4 PPs, 16 rows, 4 cells per row, multiplier latency 3, 8 sorter
RAMs. The top's status outputs count, per PP and for the SL:

- row overflows;
- overflow hits;
- dropped clusters;
- multiplicity discards;
- InterTEL tag errors.

## Testbenches and simulation

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

The reference model is in `tb/tb_rich_pkg.sv`. It models the stream parser,
clustering with the same position semantics, averaging and merging. It also
holds a random hit generator that makes:

- groups closer than the window;
- hits on frame boundaries;
- frames with more than four clusters;
- large groups;
- empty timestamps.

`tb_rich_l0_top` runs one board with all default parameters as the last board
of a chain. The upstream board is a stream built by the model and sent through
an `intertel_tx`, and the trigger processor applies random back-pressure with
one long stop. The testbench checks each stage against the model:

- each PP output;
- every merger;
- the primitives;
- the InterTEL words.

It also requires these mechanisms to happen at least once:

- overflow hits (PP and SL);
- full rows;
- multiplicity discards;
- merger waits;
- distributor stalls;
- speed data at the output;
- InterTEL transfer;
- back-pressure.

It also measures the production delay, from the last input word of a timestamp
to the primitive stream closing that timestamp. It is at most about 400 cycles
(2.5 us at 160 MHz), against a requirement of 5 time frames of 6.4 us.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rich_pkg.sv tb/tb_rich_pkg.sv tb/tb_rich_l0_top.sv --top-module tb_rich_l0_top
./obj_dir/Vtb_rich_l0_top
```

The tests compare clusters up to the end of the stimulus. The last one or two
timestamps of a stream stay in the rows until later data closes them, as they
would in a running system.
