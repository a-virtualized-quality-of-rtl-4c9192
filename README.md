# ShareStreams-V: a virtualized DWCS packet scheduler core

This is a hardware packet scheduler that several host processes can share as
if each had its own. Every process gets a *virtual scheduler*: a set of
packet streams tagged with a virtual process identifier (VPID). The
scheduler picks, for every virtual scheduler at once, the next packet to
send. Streams of one VPID never change the outcome for another VPID.

The scheduling discipline is DWCS (Dynamic Window-Constrained Scheduling).
Each stream has a window constraint X/Y: of any Y consecutive packets, at
most X may miss their deadline. Each packet has a deadline, spaced by the
stream's request period. The core finds winners with a recirculating
shuffle-exchange network of pair-wise decision blocks, as in the earlier
non-virtualized ShareStreams design. It adds two things to make the
hardware shareable:

* a VPID register in every stream's register base block (RBB), and
* a VPID comparison as the *first* rule of every decision block.

With the host placing streams in the right slots, these two additions split
the one physical network into independent sub-networks, one per VPID. The
split is set only by how the host loaded the RBBs, so the partition changes
whenever the host reloads them ("dynamic spatial partitioning").

## A scheduling round

The scheduler works in rounds. With `N = N_STREAMS` and `V = N_VPID`, one
round is:

| cycles | phase | what happens |
|---|---|---|
| log2(N) | shuffle-exchange | The first cycle reads all RBBs into the network. Every cycle routes the N lines through a perfect shuffle, compares pairs in N/2 decision blocks and latches winner/loser. |
| V | priority update | Cycle j selects the winner of VPID j, broadcasts it to all RBBs, and pushes its 32-bit packet identifier into VPID j's winner queue. |

A round takes `log2(N) + V` cycles and gives up to V decisions, one per
virtual scheduler that has a packet. Rounds run back to back while the
scheduler runs. At the default size (64 streams, 32 VPIDs) that is 38
cycles for up to 32 decisions, or 0.84 decisions per cycle when every VPID
is busy. One virtual scheduler sees one decision every 38 cycles. More VPIDs
give more total throughput, but each decision takes longer.

The current time (`now`) counts rounds. It goes up by one at the end of
each round. Deadlines are in the same unit.

## How the network is partitioned (host rules)

This is the part that must be right for the virtual schedulers to stay
isolated. The host must follow three rules when it places streams:

1. Give each virtual scheduler a power-of-two number of RBBs, at least 2.
2. Align each group to its size: a group of 2^s RBBs starts at a multiple
   of 2^s. A buddy allocator does this naturally.
3. Number the VPIDs so that they rise with the RBB index: the group at the
   lowest addresses has the lowest VPID. Every RBB needs such a VPID, even
   one that holds no stream.

Why this works. One shuffle-exchange cycle is one stage of an omega
network. Line p moves to line rotl(p) (its index rotated left by one bit).
Then decision block i compares lines 2i and 2i+1 and puts the winner on 2i.

* In the early stages, packets of different VPIDs meet. "Lowest VPID first"
  then always sends the lower VPID to the upper output. That output is
  exactly where the omega routing would send it anyway, so the groups pass
  through each other untouched.
* In the last s stages, a group of 2^s streams only meets itself. There it
  plays a normal knock-out tournament.

After log2(N) cycles, every group's winner sits on the group's lowest line,
which is the upper output of a decision block. Every line still carries its
group's VPID. The winner multiplexer (`winner_mux`) therefore only looks at
the N/2 upper outputs. For VPID j it picks the lowest one tagged j.

Example with 8 streams: A A A A B B C C (VPIDs A < B < C).

* Cycle 1 compares A with B and A with C. All pass straight through.
* Cycle 2 compares A with A (twice) and B with C (twice).
* Cycle 3 compares A with A, A with A, B with B and C with C.

The A winner ends on line 0, B on line 4 and C on line 6.
`tb_shuffle_exchange_net` checks this example and 400 random buddy
partitions.

If the host breaks these rules, the winners are still valid packets, but a
virtual scheduler may lose its best packet to routing. Nothing in the
hardware checks the rules.

## Decision block priority rules

`decision_block` compares two packets and applies the first rule that tells
them apart:

1. lower VPID
2. a valid packet beats an empty stream
3. earlier deadline
4. equal deadlines: lower X/Y (computed as Xa·Yb < Xb·Ya, so no divider)
5. equal deadlines, both X = 0: higher Y
6. equal deadlines, equal non-zero X/Y: lower X
7. earlier arrival time (first come, first served)

Deadlines and arrival times are 16-bit values and are compared modulo
2^16. If all rules tie, input `a` wins.

## Stream state and the update rules (`rbb`)

Each RBB holds the packet at the head of its stream, plus an input FIFO of
the arrival times of the packets queued behind it:

| field | bits | field | bits |
|---|---|---|---|
| valid | 1 | X (current) | 8 |
| arrival time | 16 | Y (current) | 8 |
| stream ID | 10 | deadline | 16 |
| VPID | 5 | request period | 16 |

Two more 8-bit registers keep the X and Y the host loaded. They are used to
restore the window.

In the update cycle of its VPID, an RBB that holds a valid packet does one
of two things:

* **Winner.** It lowers the window: Y−1 if Y > X, otherwise X−1 and Y−1.
  The deadline moves on by the request period, and the next arrival time is
  taken from the FIFO.
* **Deadline miss.** This applies to a non-winner whose deadline is earlier
  than `now`. The packet is dropped. If X > 0, X and Y go down by one. The
  deadline moves on by the period, and the next packet is taken.

When Y reaches 0, the window is restored to the loaded X/Y. A miss with
X = 0 (a violated constraint) also restores the window. This is a
simplification of full DWCS, which would adjust the constraint instead. A
stream whose FIFO is empty becomes invalid. It becomes valid again with the
next arrival the host pushes.

## Host interface

The core sits behind a 32-bit command bus (`ssv_top` ports `cmd_*`,
`resp_*`). A command is taken in a cycle where `cmd_valid && cmd_ready`.
UNLOAD and READ_WIN answer on `resp_valid/resp_data` in the next cycle.

| `cmd_op` | `cmd_addr` | `cmd_data` | effect |
|---|---|---|---|
| RESET (1) | – | – | clear all RBBs, queues, time; stop |
| START (2) | – | – | run rounds back to back |
| PAUSE (3) | – | – | stop at the end of the current round |
| LOAD_W0 (4) | RBB | {valid, vpid[4:0], sid[9:0], arrival[15:0]} | head packet |
| LOAD_W1 (5) | RBB | {X[7:0], Y[7:0], deadline[15:0]} | window and deadline; X, Y also become the restore values |
| LOAD_W2 (6) | RBB | {16'b0, period[15:0]} | request period |
| CLEAR_RBB (7) | RBB | – | delete the stream: valid cleared, FIFO emptied |
| UNLOAD (8) | RBB | word number 0–2 | read back a word in the layout above |
| PUSH_ARR (9) | RBB | arrival[15:0] | queue an arrival time |
| READ_WIN (10) | VPID | – | pop that VPID's winner queue |

A winner is returned as the 32-bit identifier {valid, vpid, sid, arrival}.
If valid = 0, the queue was empty. The host can poll `winner_avail`
instead.

Flow control:

* LOAD, CLEAR and UNLOAD are held off (`cmd_ready` low) until the scheduler
  is paused. The host pauses, edits the RBBs, then starts again.
* PUSH_ARR is held off while the target FIFO is full.
* A round does not start while a winner queue could overflow. Such cycles
  show up on `ev_stall`, so no decision is ever lost. Other VPIDs wait too.

A typical session:

1. RESET.
2. Load the three words of every RBB, VPIDs ordered as above.
3. Push the arrival times.
4. START.
5. Loop: push new arrivals and read winners.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_STREAMS` | 64 | RBBs / streams, a power of two (configurations of 16 to 128 streams have been built) |
| `N_VPID` | 32 | virtual schedulers = update cycles per round, at most N_STREAMS/2 and at most 32 (5-bit VPID) |
| `IN_FIFO_DEPTH` | 4 | arrival times queued per stream |
| `WQ_DEPTH` | 4 | winners queued per VPID |

A combination outside these limits stops elaboration with an error.

Smaller `N_VPID` (4, say) gives shorter rounds (log2(N)+4 cycles) and a
narrower winner multiplexer. That multiplexer is the expected critical path
in wide configurations.

## Files

| file | content |
|---|---|
| `rtl/ssv_pkg.sv` | widths, packet identifier and network entry structs, command opcodes |
| `rtl/ssv_top.sv` | the core: RBB array, network, winner multiplexer, winner queues, control |
| `rtl/ssv_control.sv` | command decode, round sequencer, current time, stall |
| `rtl/rbb.sv` | register base block with input FIFO and update logic |
| `rtl/shuffle_exchange_net.sv` | input multiplexers, N/2 decision blocks, latches, shuffle feedback |
| `rtl/decision_block.sv` | pair-wise priority comparison |
| `rtl/winner_mux.sv` | picks one VPID's winner from the network |
| `rtl/sync_fifo.sv` | FIFO used for arrival times and winner queues |
| `tb/*.sv` | one self-checking testbench per module, plus end-to-end tests |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the end-to-end test at the default size:

```
verilator --binary --timing --assert --top-module tb_ssv_top_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ssv_pkg.sv tb/ssv_tb_pkg.sv tb/tb_ssv_top_full.sv -o sim
./obj_dir/sim
```

Swap the top module name to run any other testbench. The unit testbenches
need only `rtl/ssv_pkg.sv`, `tb/ssv_tb_pkg.sv` and their own file.

The end-to-end tests are in `tb/ssv_e2e_body.svh`. They are used by
`tb_ssv_top` (16 streams, 4 VPIDs) and `tb_ssv_top_full` (defaults). Each
test plays the host and runs a reference model of DWCS alongside the core.
The model picks winners with an independent comparison function (real-valued
X/Y), and every winner the core produces must match it. The test goes
through:

* random buddy partitions;
* single rounds and free running;
* deadline misses and window restores;
* streams running empty and refilling;
* a stream delete;
* a stall on full winner queues;
* a load refused while running.

It checks a round period of log2(N)+V cycles and counts each of these
events. The 64-stream run needs well under a minute.

`tb_ssv_workloads` runs the same test on three more sizes at once: 32 and
64 streams with 4 VPIDs, and 128 streams with 32 VPIDs. Building it takes a
couple of minutes, mostly for the 128-stream core.

## How far to trust it, and what is this design's own

Taken from the ShareStreams-V architecture:

* the block structure (RBBs, a recirculating shuffle-exchange network of
  N/2 decision blocks with latches, a winner multiplexer, one winner queue
  per VPID, the control unit);
* the priority rules and their order;
* the stream state fields and their widths;
* the 32-bit packet identifier;
* the round of log2(N) shuffle-exchange cycles plus V priority-update
  cycles;
* the host-side partitioning rules;
* the list of host control functions.

Choices made here, where the architecture leaves things open:

* **DWCS update equations.** The architecture defers to the published DWCS
  rules. The version here is simplified: a violated window is restored
  rather than adjusted, and a missed packet is always dropped.
* **Restore copy of X/Y.** Two registers per RBB that the published state
  list does not have.
* **Time base.** `now` counts rounds. Time stamps are compared modulo
  2^16.
* **Input FIFO.** It sits inside each RBB. Its depth, and that of the
  winner queues, are assumptions.
* **Bus protocol.** The command encoding, the word layouts, the handshake
  and the stall on a full winner queue.
* **First network stage.** The shuffle is applied in *every* stage,
  including the first. An alternative reading would feed the RBBs straight
  into the first decision blocks. The full-shuffle version is the one whose
  partition winners land on the decision blocks' upper outputs, which is
  what a winner multiplexer with one input per possible VPID needs.
* **Winner multiplexer select.** The lowest upper output carrying the VPID.
* **Update cycles.** All V update cycles run every round, even for unused
  VPIDs. Skipping idle VPIDs would shorten rounds but is not built.

Not included:

* the host software (VPID management, buddy allocation, the process API);
* the PCI Express board link.

The bus is brought out as plain ports instead. The tests cover the logic
function only. Nothing here has been timed on an FPGA.
