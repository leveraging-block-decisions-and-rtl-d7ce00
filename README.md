# ShareStreams scheduler: block decisions over a recirculating shuffle-exchange network

A link shared by many packet streams needs a scheduler that picks, every packet-time, the
stream to serve next. This scheduler keeps the service state of up to 32 streams in
registers called *stream-slots*. One single-cycle comparator, the *Decision block*, orders
two streams by their deadlines, loss tolerances and arrival times. A bank of N/2 of these
comparators, fed back through a perfect-shuffle wiring, orders all N slots in log2 N clock
cycles. The result is a *block*: the stream IDs from highest to lowest priority.

The winner (or, in min-first mode, the last stream of the block) is then broadcast to every
slot. Each slot updates its own priority in one cycle: the winner's priority drops and a
loser that missed its deadline rises. This implements Dynamic Window-Constrained Scheduling
(DWCS). DWCS also covers EDF, static priority and fair-share bandwidth as special cases.

For disciplines whose tags never change once assigned, such as fair queuing by finish tag or
priority classes, the update cycle is bypassed. The hardware then just sorts the loaded tags.

A streaming engine and a set of circular buffers feed the scheduler. The engine takes packet
arrival times from the host and delivers `{time, stream ID}` records of the winners, so
queuing, scheduling and transmission all run concurrently.

```
          host pushes / DMA pulls                        winner records
               |                                              ^
   +-----------v-----------+        +---------------------+   |
   |  streaming_engine     |------->|  memory_interface   |---+  (win_rd_*)
   |  push / pull (DMA)    |        |  N arrival queues   |
   +-----------+-----------+        |  1 winner queue     |
               | sram_*             +----^-----------+----+
        (external card SRAM)     next arrival|       |winner push
                                             |       |
   load_* --> +------------------------------+-------+-----+
              |  control_steering  LOAD / SCHEDULE / UPDATE |
              +--+-----------------+----------------------^-+
       load_en|   winner_id, now,  |  mux ctrl,          |  block[0] / block[N-1]
              |   update_en        |  advance            |
        +-----v--------------------v--+   +--------------+-------------+
        | N x register_base_block     |-->| shuffle_exchange_network   |--> block_ids[N]
        |   (stream-slots)            |   |  N/2 x decision_block      |
        +-----------------------------+   +----------------------------+
```

## Stream state and the attribute bus

Every stream-slot drives a 53-bit attribute bus (`ss_pkg::stream_attr_t`):

| field      | bits | meaning |
|------------|------|---------|
| `deadline` | 16   | deadline of the stream's head packet |
| `loss_num` | 8    | current window-constraint numerator x': packets that may still be late or lost in the current window |
| `loss_den` | 8    | current window-constraint denominator y': length of the current window |
| `arrival`  | 16   | arrival time of the head packet |
| `id`       | 5    | stream-slot number (so 32 slots at most) |

A slot also keeps some state that is not on the bus:

- the request period T, added to the deadline each time the stream is served;
- the original x/y, used to restart the window;
- a violation tag;
- a saturating 16-bit missed-deadline counter.

A slot is written in the LOAD state from a 64-bit word (`stream_cfg_t`: deadline, period,
x, y, arrival) and a 5-bit slot address. Many low-priority *streamlets* can share one slot:
the host serves them round-robin, and the hardware sees one aggregate stream.

All times are 16-bit and wrap. Two times are compared by the sign of their 16-bit
difference (`ss_pkg::time_before`). This is a consistent order only while all live deadlines
lie within 32768 time units of each other, and likewise all live arrival times. The host must
keep stamps inside that window, for example by sending offsets from a recent reference time.

## The pairwise decision (`decision_block`)

A purely combinational block compares streams A and B. It evaluates every rule in parallel,
and the first rule whose condition holds decides:

1. **Earlier deadline wins.**
2. Equal deadlines: **lower window-constraint W = x'/y' wins.** W is compared without
   division, as `x'_A * y'_B` against `x'_B * y'_A`, using two 8x8 multipliers.
3. Equal deadlines and both W zero (x' = 0): **larger denominator y' wins.**
4. Equal deadlines and equal non-zero W: **smaller numerator x' wins.**
5. Otherwise: **earlier arrival wins** (first come, first served).
6. A complete tie goes to the lower slot ID, so the order is always total.

Two equal cases fall through to rule 5: equal denominators in rule 3 and equal numerators in
rule 4. The block outputs the winner bus, the loser bus
and `a_wins`.

## Ordering N slots in log2 N cycles (`shuffle_exchange_network`)

The network holds N registered attribute buses, called positions 0 to N-1. In each cycle with
`advance` high, two things happen:

- **Shuffle:** the bus at position p moves to position rotate-left(p) of its log2 N-bit index
  (a perfect shuffle).
- **Exchange:** Decision block k compares positions 2k and 2k+1, then writes the winner back
  to 2k and the loser to 2k+1.

In the first cycle of a decision the input muxes take the slots' buses (`sel_regs`); later
cycles recirculate the registered outputs. The same N/2 Decision blocks therefore serve every
level of what would otherwise be a log2 N-deep tree.

**What the block guarantees.** After log2 N steps, position 0 holds the highest-priority
stream and position N-1 the lowest. The reason is that each exchange clears one bit of the
winner's position, and the shuffle rotates the next bit into place. The winner thus moves
down a binary tournament tree, and the overall loser moves up a mirror-image tree.

The positions in between are only partly ordered: every stream appears exactly once, and
each stream sits ahead of the stream it beat last. A single pass of log2 N shuffle-exchange
steps is not a full sorting network. A full sort would take about log2 N * (log2 N + 1) / 2
steps. The controller only ever uses the two ends. Code that sends the whole block should
treat the middle as an approximate order.

## Decision timeline (`control_steering`)

```
LOAD --start--> SCHEDULE (log2 N cycles) --> PRIORITY_UPDATE (1 cycle) --> SCHEDULE ...
  ^                                                      |
  +-------------------------- stop ----------------------+
```

| stream-slots N           | 4 | 8 | 16 | 32 |
|--------------------------|---|---|----|----|
| SCHEDULE cycles          | 2 | 3 | 4  | 5  |
| clock cycles per decision (DWCS) | 3 | 4 | 5 | 6 |

In PRIORITY_UPDATE the controller does four things in one cycle:

- It broadcasts three signals to every slot: the circulated ID, the current time `now` and
  `update_en`. The circulated ID is `block[0]` in max-first mode or `block[N-1]` in min-first
  mode (`cfg_min_first`).
- It pops the circulated stream's next arrival time from its queue into that slot.
- It pushes the record `{now, ID}` to the winner queue.
- It advances `now` by one; one decision equals one packet-time.

If the winner queue is full, PRIORITY_UPDATE waits, counts `stall_cycles`, and drops
nothing.

Configuration inputs:

- **`cfg_update_en = 0` (bypass):** the controller goes from SCHEDULE back to LOAD, records
  the winner on the cycle the block is ready, and leaves the tags unchanged. This is the mode
  for fair-queuing and priority-class tags, which are loaded into the deadline field (x = 0,
  so the deadline compare decides). The host loads new tags between decisions.
- **`cfg_block_serve = 1` (block service):** the whole block is sent in one transaction per
  decision. Every slot is updated as served, so no slot counts a miss. Only the circulated
  winner takes a new arrival time. With four EDF streams requested every packet-time, this
  carries 64000 frames in 16000 decisions with no missed deadline. In max-finding use, where
  only the winner is sent, each stream misses about three deadlines out of four.

`block_valid` pulses for one cycle when `block_ids` holds a finished block. `decisions`
counts completed decisions.

## The per-decision update (`register_base_block`)

When `update_en` is high, each slot classifies itself and updates in the same clock edge.

**The served slot** (the winner, or every slot under block service):

- The window advances. If y' > x', then y' is decremented. Otherwise, if y' = x' > 0, both
  are decremented.
- The window restarts at the original x/y when both reach 0, or when the slot was tagged.
- The deadline advances by T.
- The winner also takes the next arrival time, if its queue has one.

**A loser whose deadline is not later than `now` (a miss):**

- The missed counter is incremented.
- If x' > 0, both x' and y' are decremented, and the window restarts at x/y when both reach 0.
- If x' = 0, y' is incremented (saturating) and the slot is tagged as in violation.
- The deadline advances by T.

**Any other loser** is unchanged.

With x = 0 and y = 1 on every stream, the rules reduce to pure EDF. Periods 8, 8, 4 and 2
give a 1:1:2:4 share of the link.

## Feeding the scheduler

**`circ_queue`** is a circular buffer with separate read and write pointers, one pointer bit
wider than the address. Its features:

- The read port is fall-through: the head is always visible on `rd_data`.
- A write into a full queue is dropped and pulses `overflow`, unless a read in the same cycle
  frees a place.
- Producer and consumer never wait for each other.

**`memory_interface`** holds one 16-entry arrival queue per slot (16-bit arrival times) and
one 64-entry winner queue of 21-bit `{time, ID}` records. The producer, the scheduler and the
consumer each have their own port. All three can act in the same cycle.

**`streaming_engine`** fills the arrival queues in two ways:

- **Push:** a single arrival time on `arr_wr_*` goes straight to the queue's write port in
  the same cycle.
- **Pull:** the host first writes a batch into the card SRAM, sets `dma_src_addr`,
  `dma_count` and `dma_slot`, and pulses `pull_start`. The engine then does the following:
  - It raises `sram_own` while it owns the SRAM bank.
  - It reads one word per request; the data must arrive one cycle after `sram_rd_en`.
  - It appends each word to the queue, waiting while the queue is full, so pulled data is
    never lost.
  - It pulses `pull_done` after the last word.

Pushes take priority: a pulled word that collides with a push waits in a holding register.

The SRAM itself is an external part, so only its FPGA-side read port leaves the top.

## Top-level interface (`sharestreams_top`)

| group | ports | notes |
|-------|-------|-------|
| command | `start`, `stop`, `cfg_update_en`, `cfg_min_first`, `cfg_block_serve` | `start` leaves LOAD; `stop` returns to LOAD after the current decision |
| load | `load_valid`, `load_slot[4:0]`, `load_cfg` (64 b) | acted on only in LOAD, one slot per cycle |
| arrivals | `arr_wr_en`, `arr_wr_slot`, `arr_wr_time[15:0]`, `arr_overflow`, `arr_empty[N]` | push transfers |
| bulk | `pull_start`, `dma_src_addr[21:0]`, `dma_count[15:0]`, `dma_slot`, `pull_busy`, `pull_done` | DMA registers |
| card SRAM | `sram_own`, `sram_rd_en`, `sram_addr[21:0]`, `sram_rdata[15:0]` | one-cycle read latency |
| winners | `win_rd_en`, `win_empty`, `win_rd_stamp[15:0]`, `win_rd_id[4:0]`, `win_count`, `win_overflow` | fall-through read |
| block and status | `block_valid`, `block_ids[N]`, `missed_count[N]`, `state`, `now`, `decisions`, `stall_cycles` | |

The top has the following parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 32 | stream-slots; a power of two from 4 to 32 |
| `AQ_DEPTH` | 16 | entries per arrival queue |
| `WQ_DEPTH` | 64 | entries in the winner queue |
| `CNT_W` | 16 | width of the missed-deadline counters |
| `ADDR_W` | 22 | SRAM word address: 8 MB as 4M 16-bit words |

All registers use a synchronous, active-low reset `rst_n`, and there is a single clock.

A generic gate-level synthesis of the 32-slot top gives:

- about 4,700 cells;
- 5,300 flip-flop bits;
- 9,536 bits of queue memory.

The network alone accounts for 1,696 flip-flop bits (32 x 53).

## Where this design follows the architecture and where it chooses

**Follows the architecture:**

- the Decision-block rules and the cross-multiplied W compare;
- the attribute field widths;
- N Register Base blocks and N/2 Decision blocks in a single recirculating shuffle-exchange
  stage;
- log2 N SCHEDULE cycles plus one PRIORITY_UPDATE cycle (3 cycles at N = 4);
- the LOAD / SCHEDULE / PRIORITY_UPDATE sequence and the bypass of PRIORITY_UPDATE for fixed
  tags;
- max-first and min-first circulation;
- per-slot missed-deadline counters;
- per-stream circular buffers with independent pointers;
- a separate winner-ID partition;
- push and pull transfers with DMA registers, a pull-start signal and bank ownership.

**This design's own choices:**

- the exact DWCS update arithmetic (the standard DWCS adjustment);
- the miss test (deadline not later than `now`);
- block service updating every slot;
- one time unit per decision;
- the 64-bit load word and its layout;
- the queue depths and the drop-on-full policy;
- the stall on a full winner queue;
- the start/stop handshake;
- the tie-break by slot ID;
- the shuffle wiring (rotate-left, winner to the even position);
- the DMA register layout and the SRAM read timing;
- wrap-around time comparison.

**Known limits:**

- **The block is exact only at its ends.** See the network section. A winner-only variant,
  in which the Decision blocks forward only winners, is a lighter alternative for
  max-finding. It is not built: `block_ids[0]` gives the same winner.
- **Time window.** Live deadlines, and likewise live arrival times, must stay within 32768
  units of each other.
- **Missed-deadline totals.** For four EDF streams the following are reproduced:
  - zero misses under block service;
  - steady misses in max-finding use;
  - exact 1:1:2:4 shares.

  The exact miss totals that other DWCS implementations report for max-finding and min-first
  use depend on how misses are counted, and are not matched.
- **Not part of the RTL.** The card SRAM, the PCI interface, the host-side queue manager and
  streamlet round-robin, and the network transmitter are not included. Testbenches use a
  small behavioural SRAM model (`tb/card_sram_model.sv`).

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `decision_block_tb` | 40,000 random and directed pairs against an independent model of the rules, including wrap-around and every rule |
| `register_base_block_tb` | random loads and updates (win, met, missed with x' > 0, tagged, window restart, block service) against a reference model |
| `shuffle_exchange_network_tb` | N = 32 and N = 4: every step against a model of the network; the ends against a linear scan; the block is a permutation |
| `circ_queue_tb` | random traffic against a queue model, including full, overflow and a simultaneous read and write when full |
| `memory_interface_tb` | all three ports at once against per-partition models |
| `control_steering_tb` | directed: state sequence, cycle counts, mux control, max-first and min-first, bypass, stall, load gating; then 6000 cycles of random commands compared every cycle with a behavioural model |
| `streaming_engine_tb` | push pass-through, pulls in order to the right queue, waits on a full queue, collisions with pushes, bank ownership |
| `sharestreams_top_tb` | end to end at the default 32 slots against a full reference model. Each of these must occur at least once: loads, DWCS, min-first, block-service and bypass decisions, stalls, arrival overflow, missed deadlines, window restarts, tags, pulls and a winner with an empty queue |
| `workload_4slot_tb` | four slots: EDF with T = 1 in max-finding, block and min-first use (16000 decisions each, 3 cycles per decision, 64000 frames in block use), and 1:1:2:4 shares over 8000 decisions |

To simulate with Verilator 5, put the packages first. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module sharestreams_top_tb \
    rtl/ss_pkg.sv tb/ss_ref_pkg.sv rtl/*.sv tb/card_sram_model.sv tb/sharestreams_top_tb.sv
./obj_dir/Vsharestreams_top_tb
```

`-Wno-fatal` keeps Verilator's width and duplicate-package warnings from stopping the build;
they come from the testbench models and from `rtl/*.sv` repeating `ss_pkg.sv`, and are harmless. The other
testbenches build the same way with their own top module. `tb/ss_ref_pkg.sv` holds the
reference models of the decision rules and the slot update that the testbenches share.
