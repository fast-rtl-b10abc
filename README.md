# FAST-1: an ATM switch simulated in hardware, one cell-time at a time

Software simulators of ATM switches spend most of their time scheduling events, and get
slower as more virtual channels (VCs) are added. This design runs the switch model
itself in logic. A board of twelve FPGA modules is set up as a **4x4 output-buffered
ATM switch with weighted round-robin (WRR) scheduling**:

- four **traffic generators** produce the offered load;
- four **input modules** route each cell to an output port by its VCI;
- four **output modules** queue the cells per VC and choose one to send per cell-time,
  using credits, frames and a token ring.

A global controller steps all twelve modules through the simulation one *cell-time* at a
time. The number of VCs does not change how long a cell-time takes. The longest
cell-time in the full-size test is 22 clocks, so a million cell-times take about 1.6 s
at 14 MHz.

A cell is only 9 bits: a valid flag and an 8-bit VCI. The model is functional, so the
48-byte payload is never carried.

```
  TG0 ──► IM0 ─┬─► OM0 ──► tx port 0 ──► cascade link 0
  TG1 ──► IM1 ─┼─► OM1 ──► tx port 1 ──► cascade link 1
  TG2 ──► IM2 ─┼─► OM2 ──► ...
  TG3 ──► IM3 ─┴─► OM3
          (16 dedicated IM→OM paths, 18 data + 2 control lines each)
  cell_clock_ctrl: cell_start to all 12 modules, waits for 12 done pulses
  host_access:    one 20-bit host address space into every module's memories
```

All RTL is in `rtl/`, with one module per file. Shared types (`cell_t`, `path_t`) and
sizes are in `rtl/fast_pkg.sv`. Every block has a self-checking testbench in `tb/`.

## The cell-time pipeline

Everything is organised around the cell-time:

1. `cell_clock_ctrl` pulses `cell_start` to all twelve modules.
2. It collects one `done` pulse from each module. On a master board it also waits for
   `ext_done` from any slave boards.
3. Only then does it advance the cell-time counter `now` and start the next cell-time.

A cell-time therefore lasts as long as its slowest module needs. That is the output
module, at up to 22 clocks.

The stages are pipelined across cell-times rather than within one. Each stage reads what
the previous stage produced in the *previous* cell-time:

| cell-time | traffic generator        | input module               | output module                    |
|-----------|--------------------------|----------------------------|----------------------------------|
| t         | draws cell c (6 clocks)  |                            |                                  |
| t+1       | draws next cell          | routes c (2 clocks)        |                                  |
| t+2       |                          |                            | queues c; selector runs          |
| t+3 or later |                       |                            | c can be sent                    |

A cell therefore waits at least one cell-time in its output queue. The queueing delay
the output module reports counts from the cell-time in which the cell was queued.

Boards can be chained for larger models:

- A master board starts cell-times on its own and passes each start to the slaves on
  `sync_start`.
- A slave board starts a cell-time on `ext_start` and raises `board_done` when its
  modules are finished.
- Controller register 0 sets the role (bit 1 = master) and the run bit (bit 0).
- Registers 1 and 2 set an optional cell-time limit (0 means no limit). The run stops
  when `now` reaches it.

## Output module: queues, credits and frames

This is the core of the model (`output_module.sv`). Up to four cells per cell-time can
arrive from the input modules, all for the same port in the worst case.

**Queues.**
- A host-written table maps each VCI to one of 32 GBR (guaranteed bit rate) queues or to
  the ABR (available bit rate) queue.
- Every queue is a linked list in one shared cell memory of 32768 buffers. Each buffer
  holds the cell and its arrival timestamp.
- A separate next-pointer memory links buffers into queues, and links free buffers into
  a free list.
- Head and tail pointers sit in a small control memory.
- Free buffers come from two places: buffers never used yet come from a fill pointer;
  returned buffers are pushed onto the free list. This way the free list needs no
  initialisation pass after reset.
- A cell that finds no free buffer is dropped and counted. The buffer is fully shared,
  so one hot VC can fill all of it.

**Credits and frames.**
- Time is split into frames of `frame_len` cell-times, counted down by `TIMER`.
- GBR queue *i* may send up to *n_i* cells per frame with priority (its credit, written
  by the host). Over a frame each VC then gets at least min(arrivals, n_i) sends.
- Three 32-bit registers drive the selection:
  - `EMPTY`: the queue holds no cell.
  - `ZERO`: the queue has used up its credit.
  - `RESTART`: the queue has not sent yet in this frame.
- At a frame start `ZERO` is cleared (except for queues with *n_i* = 0) and all of
  `RESTART` is set. No credit counter is touched at that point.
- A queue's counter is reloaded from *n_i* only at its first send in the new frame,
  when `RESTART` is still set. So the 32 counters can live in memory rather than
  registers.

**Schedule of one cell-time** (clock by clock):

```
edge 0    capture the four input paths; TIMER / ZERO / RESTART update at a frame start
clk 1..4  receiver: one input per clock: take a buffer, timestamp, link it to its queue
          (the selector is started in clock 1 and runs in parallel)
wait      until the selector is done (1..16 clocks)
send      unlink the head of the chosen queue, free its buffer, update the credit,
          ZERO, EMPTY and statistics; drive tx_cell / tx_queue / tx_round2 / tx_delay
```

The sent cell is also passed to `cascade_tx`, which forwards it to another board over
the port's 20-line connector (see below).

**Statistics** (`wrr_stats.sv`) run alongside the sender. They keep:
- cells sent, and the sum and maximum of their queueing delays;
- a 17-bin power-of-two delay histogram (bin 0 = delay 0, bin *b* = 2^(b-1) to 2^b - 1);
- cells sent per queue.

## The WRR selector: a token ring evaluated four elements per clock

`wrr_selector.sv` decides which queue sends next. Picture 32 control elements, one per
GBR queue, in a ring joined by a carry (token) line:

1. The element that sent last injects the token into the next one.
2. An element blocks the token (and is selected) if its queue is non-empty and, in the
   first round, has credit left. Otherwise it passes the token on, like the carry of a
   ripple adder.
3. If the token comes back to where it started, no queue with credit has a cell. The
   starting queue is still a candidate, as the last element of the round.
4. If the first round finds nothing, the ABR queue is taken if it holds a cell.
5. Otherwise a **second round** runs, in which any non-empty GBR queue may block the
   token whatever its credit. This keeps the link busy whenever any cell is queued
   (work conserving). `tx_round2` marks such sends.

A 32-element ripple is too long for one clock, so the ring is evaluated in groups of
four elements per clock. The carry is held in a flip-flop between groups, as in a carry
look-ahead adder. One round takes 8 clocks, and the whole decision at most 16. The
selector stops as soon as a group finds a queue.

How it is built: at `start` the selector captures `EMPTY` and `ZERO` rotated, so the
element after the initiator is at position 0. Group *k* is then just positions 4k to
4k+3. The chosen position is rotated back into a queue number.

The initiator is the last GBR queue chosen. It starts at queue 31, so the first token
goes to queue 0. An ABR choice leaves the initiator unchanged.

## Traffic generators

Each generator (`traffic_generator.sv`) produces one cell per cell-time in six clocks,
in one of four modes.

**Table mode (default).**
- `tausworthe_rng.sv` is a Tausworthe generator on the trinomial x^127 + x + 1. It
  applies 16 shift steps per clock, unrolled, so each clock yields 16 fresh bits. The
  period is 2^127 - 1.
- Two successive 16-bit numbers give a fraction *U* and an index *I*.
- `alias_sampler.sv` applies Walker's alias method with two 512-entry tables, a cutoff
  *F* and an alias *L*. The result is *I* if *U* <= *F[I]*, else *L[I]*.
- The table range is the 9-bit cell code {valid, VCI}. So a single draw decides both
  whether a cell is sent and on which VC. The host sets the load and the VC mix just by
  loading tables.
- Example: for load *p* < 50 % with uniform VCIs, give entries 256..511 the cutoff
  2p·65536 and alias *i*-256, and give entries 0..255 cutoff 0xFFFF.

**ON-OFF mode.**
- `onoff_source.sv` alternates ON and OFF periods whose lengths come from two further
  alias tables (load discretised exponentials for exponential ON/OFF times).
- At the start of each ON period it draws a burst size from a third table (geometric,
  typically).
- It then sends one cell per cell-time on its configured VCI, until the burst is sent
  or the ON period ends.
- It uses two generators of its own, so the period length and the burst size are
  independent.

**Markov mode.**
- `markov_source.sv` models a video-like source as a 16-state Markov chain.
- Each state has a cell rate, written as a 16-bit probability. In every cell-time a
  fresh random number below the current state's rate sends one cell.
- Every `hold` cell-times the chain moves. The next state is drawn from the current
  state's transition vector, an alias table of 16 entries. All 16 tables share one
  sampler indexed by {state, I}.
- The initial state is drawn uniformly in the first cell-time after reset.

**External mode.**
- Cells arrive as 16-bit words over a four-phase REQ/ACK link (`cascade_rx.sv`, with
  two-flop synchronisers).
- They wait in a 1024-word FIFO and are forwarded one per cell-time. The cell is the
  low 9 bits of the word.
- A sending output port's `cascade_tx` drives such a link, so boards can be chained or
  fed from an external source.

If more than one mode bit is set, external mode wins, then ON-OFF, then Markov.

**Link delay.** After the generator, a `cell_delay_line.sv` adds a constant link delay
of 0 to 1023 cell-times. It is a circular buffer read a fixed distance behind the write
pointer; a delay of 0 bypasses it.

## Input modules

`input_module.sv` captures the generator's cell and looks up its VCI in a 256-entry
table {enable, port[1:0]}. It then drives the cell onto the one path that leads to that
output module; the other three paths carry no cell. An unmapped VCI (enable = 0) is
dropped and counted. There are counters for cells received, dropped, and forwarded per
port.

## Host access and address map

The host writes tables and reads counters through `host_access.sv`.

- Bits [19:16] of the 20-bit address select the module. Bits [15:0] address inside it.
- Read data is registered, so it arrives one clock after the address.
- Writes to the modules are refused while a run is in progress: `host_err` pulses and
  the refusal is counted. Only the controller can be written during a run.

| [19:16] | module | [15:12] region: contents |
|---------|--------|--------------------------|
| 0-3 | traffic generator | 0: alias tables (bit 9 selects L); 1: reg 0 link delay, reg 1 mode {markov, onoff, ext, enable} (read adds ON flag in bit 4 and Markov state in bits 8:5), reg 2 VCI of the ON-OFF / Markov source; 2 (read): 0 cells sent, 1 external FIFO level, 2 external cells lost; 3: ON-OFF tables ([11:10] = 0 ON, 1 OFF, 2 burst; bit 9 selects L); 4: Markov source ([11:10] = 0 transition tables, [8] selects L, [7:0] = {state, entry}; 1 rates 0x00-0x0F and hold 0x10; 2 read state) |
| 4-7 | input module | 0: VC table [7:0]; 2 (read): 0 received, 1 dropped, 2-5 forwarded to port 0-3 |
| 8-11 | output module | 0: VCI map {abr, queue[4:0]}; 1: credit *n_i* of queue [4:0]; 2: reg 0 frame length (restarts TIMER), reg 1 clear statistics; 3 (read): statistics ([7:0]: 0x00 sent, 0x01/0x02 delay sum, 0x03 max delay, 0x10+b histogram, 0x40+q per queue); 4 (read): 0 received, 1 dropped, 2 frames, 3 buffers in use |
| 12 | controller | 0: {master, run}; 1/2: cell-time limit low/high; read 0 {master, running}, read 1 `now` |

A typical session:

1. Load the alias tables, VC tables, VCI maps, credits and frame length.
2. Write `{master=1, run=1}` to the controller.
3. Wait until `running` falls (if a limit is set).
4. Read the counters.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a
watchdog. With verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/fast_pkg.sv tb/fast_top_tb.sv \
          --top-module fast_top_tb -o sim && ./obj_dir/sim
```

Replace `fast_top_tb` with any other `tb/*_tb.sv` to test one block.

`fast_top_tb` runs the board at full size: 32K-cell buffers and 32 GBR queues per port,
no parameter overrides. It runs about 14,000 cell-times in these phases:
- light load;
- a link delay on one generator, plus a host write during the run that must be refused;
- a hot spot that sends everything to port 0 until its buffer overflows;
- a master run that waits for a slave board;
- a run in which the generators take the cells the output ports send, looped back
  over the cascade links;
- a run with ON-OFF sources;
- a run with Markov sources;
- a run in slave mode.

Monitors check every path and every transmitted cell against a cell-level WRR model.
They count each mechanism (first-round, ABR and second-round sends, frames, overflow,
unmapped drops, delayed cells, refused writes, slave waits, looped-back, ON-OFF and
Markov cells) and fail if one never happened. The test also checks that no cell-time exceeds
42 clocks. It takes a few seconds.

`wrr_workload_tb` runs the benchmark this board was built for. It simulates the 4x4
switch for one million cell-times with 4, 8, 16 and 32 VCs per output port, at full size.
- Every generator sends a cell in every cell-time, so each port is loaded at one cell
  per cell-time on average.
- At every port and cell-time it checks work conservation: the port never idles while a
  cell was queued.
- In every whole frame in which a GBR queue stayed backlogged, it checks that the queue
  got at least its credit in first-round sends.
- At the end it balances the host counters of every module.
- It takes a little under two minutes.

The cell-time does not grow with the number of VCs. The mean is 17.4, 15.0, 13.2 and
12.1 clocks for 4, 8, 16 and 32 VCs, and the longest is 22. The mean falls because,
with more queues, the token finds a backlogged queue sooner.

To change the design:
- `NCELLS`, `NQ` (a multiple of 4) and `DELAY_DEPTH` are parameters of `fast_top`.
- Widths and the port count are in `fast_pkg`.

## Departures from the original board and choices made here

- **Memories are arrays inside the modules.** The original keeps cell buffers, VC tables
  and alias tables in external SRAM next to each FPGA. Here they are synthesizable
  arrays, so the design maps to any FPGA with enough block RAM. The external SRAM
  chips, the host bus interface card, the clock generator, the FPGA programming path
  and the programmable interconnect chip are not modelled. The host side is a plain
  synchronous port.
- **Timing is this design's own.** The original output module was pipelined to about
  3 µs per cell at 14 MHz. The clock-by-clock schedule here (22 clocks worst case) is
  this design's own, and so is the generator's six-clock split (draw U, draw I, read, compare,
  output).
- **No interpolation.** Non-uniform distributions come from alias tables alone, with
  no table interpolation.
- **ON-OFF details are choices.** The burst-within-ON rule and the treatment of a drawn
  length of 0 as 1 are not given by the original.
- **Markov source details are choices.** The 16 states, the rate as a per-cell-time
  probability and the fixed `hold` time between moves are not given by the original.
- **Register choices.** The register maps, the VCI-to-queue table, the counters,
  dropping cells on buffer overflow and refusing writes during a run are all this
  design's own.
- **Link protocol.** The cascade link uses 16 data lines plus 4 control lines. The
  four-phase handshake on them is this design's choice.
- **Statistics.** What the statistics block counts, and its log2 bins, are this
  design's choice.

Lint warnings that remain are unused bits (for example, the upper bits of the 16-bit
alias words). The SYNCASYNCNET warning appears because the simulation-only assertions
use the asynchronous reset in `disable iff`.
