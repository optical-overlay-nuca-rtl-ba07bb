# Optical overlay NUCA: a shared L2 on an optical network

A 32-core chip shares one 4 MB L2 cache split into 32 banks of 128 KB. On a
mesh or torus, a line's distance from the core that uses it matters. Dynamic
NUCA schemes therefore search and migrate lines through neighbouring banks.
On an optical network every bank is reachable in about the same few cycles,
so "near" has no meaning. What matters is how many banks a miss must search,
and how evenly the hot banks' overflow is spread.

This design groups the banks into **overlays** by how often they are
accessed:

- The heavily used banks ("base" banks) borrow capacity from rarely used
  banks ("overflow" banks).
- A line evicted from its home bank is not dropped. It moves down its
  overlay's chain of overflow banks, and only the last bank writes it to
  memory.
- A miss in the home bank is searched in the four overflow banks of that
  bank's overlay. This is the OP_BCAST protocol.
- A line found there moves one step back towards home.

The overlays are rebuilt at run time from per-bank access counts. Lines that
no longer belong where they sit are then swept out by a small scanning
circuit in every bank.

The RTL is the L2 side of that system, written in synthesizable
SystemVerilog:

- the 32 bank controllers;
- the optical network between 16 tiles;
- the cores' request ports;
- the overlay builder;
- the reconfiguration hardware;
- the victim banks beside the memory controllers.

Cores, L1 caches, the coherence directory and main memory are outside it.
They appear as ports, and the testbenches have a behavioural memory.

## System map

```
 core c ──l1_miss──► l2_requester ─┐                     ┌─► home_bank_controller (bank b) ─► mem_arbiter (1 per 8 banks) ─► victim_bank ─► memory port
        ◄─l2_resp───               ├─ optical_noc ───────┤        │  cache_bank, message_queue, victim_buffer, rcb,
                                   │  16 optical_station │        │  search/fill/eviction logic, kill/nack controllers,
 victim_bank / memory response ────┘                     └────────┘  overlay_info_store, reconf_controller
                      overlay_builder ──► reconf_sequencer ──► every bank (mode, predicate, new overlay)
```

Each tile (station `s`) holds cores `2s` and `2s+1` and banks `2s` and
`2s+1`. Node ids are 6 bits: cores 0..31 and banks 32..63. A line's home bank
is address bits [18:14], just above the 8 set-index bits (`onuca_pkg`).

## Overlays and the OSV

An overlay is 8 banks: 4 base banks (slots 0..3) and 4 overflow banks
(slots 4..7, in eviction order). There are six overlays:

- four **hybrid-o** overlays (0..3) for the hot banks;
- two **infreq-o** overlays (4, 5) for the next tier.

Banks are ranked by access count (rank 0 = most accessed):

| overlay        | base ranks | overflow ranks |
|----------------|-----------:|---------------:|
| hybrid-o 0     | 0-3        | 28-31          |
| hybrid-o 1     | 12-15      | 16-19          |
| hybrid-o 2     | 4-7        | 24-27          |
| hybrid-o 3     | 8-11       | 20-23          |
| infreq-o 4     | 16-19      | 28-31          |
| infreq-o 5     | 20-23      | 24-27          |

Some consequences of this table:

- The hottest 4 banks spill into the 4 coldest.
- A bank can be an overflow bank of two overlays (e.g. ranks 28-31).
- Ranks 24-31 are base banks of no overlay. A miss there goes straight to
  memory.

The table is held as the **OSV**, 6 × 8 five-bit bank ids (240 bits). The
**OBV** has one bit per bank, set when the bank's overlay is infreq-o. Every
bank keeps a copy of both in its `overlay_info_store`. The mapping is in
`overlay_builder.sv` and repeated in the testbench package as an
independent reference.

## The search protocol (OP_BCAST)

All traffic is messages with a 100-bit header:

| field       | bits |
|-------------|-----:|
| message id  | 32   |
| core        | 5    |
| source      | 6    |
| destination | 6    |
| type        | 3    |
| home        | 6    |
| address     | 42   |

The message types are:

- REQ, RESP, FILL and MEMFILL carry or request a line.
- NACK, KILL, HIT and MISS are control messages.

Control messages bypass the bank's message queue (MQ). Everything else is
queued, or refused with a NACK when the 16-entry MQ is full.

A miss from core `c` for line `A`, home bank `H`:

1. **Home bank.** `H` looks up its bank and its victim buffer.
   - On a hit, it sends RESP to `c`.
   - On a miss, and if `H` is a base bank:
     - it allocates an RCB entry (response-collection buffer);
     - it sends REQ with a fresh id (`{H, sequence}`) to the 4 overflow banks.
   - If `H` is in no base set, it reads memory directly.
2. **Overflow bank, hit.**
   - It sends RESP to `c` and HIT to `H`, which frees the RCB entry.
   - It sends KILL to the three other overflow banks. A KILL removes the
     still-queued copy of the search; these removals are the "effective
     kills" counted as events.
   - It migrates the line one step towards home through its victim buffer:
     overflow slot `i` sends it to slot `i-1`, and slot 0 sends it to `H`.
3. **Overflow bank, miss.** It sends MISS to `H`. The RCB sets the
   sender's bit in a 4-bit vector. When all four bits are set, it issues the
   memory read and frees the entry.
4. **Memory fill.** The data returns to `H` as MEMFILL. `H` stores the line
   and answers the core.
5. **Eviction.** Any fill that displaces a line passes the victim on:
   home → overflow 0 → 1 → 2 → 3 → memory. The victim travels as a FILL via
   the victim buffer.

The **victim buffer** (20 entries) keeps every line in transit searchable.
It does so until 19 cycles after its FILL left (MQ depth + worst network
delay), or until the line is resent after a NACK. A search that overtakes
the moving line still finds it, so no request can miss a line that is in
flight.

Each line also carries 3 state bits: a foreign bit, and its home's 2-bit
position in the base map. These are recorded when the line is filled. They
make the reconfiguration sweep possible.

## Reconfiguration

### Building the overlay

The `overlay_builder` counts accesses per bank in 100-bit counters (the
Bank Access Vector). It starts a build on `change_overlay`, or when an epoch
of `threshold` cycles ends (0 disables the epoch). A build:

- sorts the 32 counts with 32 odd-even transposition passes;
- writes the new OSV and OBV;
- pulses `done` 34 cycles after the start.

### The reconfiguration sequence

The `reconf_sequencer` then runs these steps:

1. **drain.** New misses are held (`reconfiguring` is high). The sequencer
   waits until every bank, the network and every requester is idle.
2. **scan.** All 32 `reconf_controller`s start together, each with a
   predicate of lines to give up:
   - **case 2.** A bank that leaves an overflow set gives up all its foreign
     lines.
   - **case 1.** A bank that stays an overflow bank gives up the foreign
     lines whose home sits in a base slot that now holds a different bank.
     The 4-bit `pos_mask` selects those slots.
3. **load.** The new OSV/OBV is written into every bank and misses resume.

Evicted lines are written to memory.

### Inside `reconf_controller`

`reconf_controller` keeps the 3 state bits of all 2048 lines in a 32 × 192
SRAM. It scans one row (64 lines) per round:

1. **ISSUE.** The trigger circuit issues the row read.
2. **READ.** The logic circuit evaluates the predicate for each line.
3. **LOAD.** 16 `bit_pos` circuits each take 4 result bits.
4. **SCAN.** The `select_circuit` reports one line to evict per cycle.

A round costs 4 cycles plus one per reported line, so an empty bank takes
exactly 128 cycles. The testbenches check this count. The bank invalidates
each reported line and sends it to memory.

## Optical network

`optical_station` is one tile's station in a single-writer,
multiple-reader arrangement. Each station owns a data waveguide, modelled as
a 128-bit flit bus that every other station reads.

To send, it first broadcasts a 16-bit reservation word:

- bit 15 is the message-type bit: 1 = control, 1 flit; 0 = data, 5 flits;
- bits 14..0 name the receiving station, counting the other stations in
  order with the sender skipped;
- an all-zero word means the sender's own tile.

The receiver for that writer then takes 1 or 5 flits. The header comes
first, then the 64-byte line in four 128-bit flits.

Unloaded latency is 2 cycles for a control message and 6 cycles for a data
message, measured from the sender's valid signal to the receiver.

Flow control is this design's own. Each station has one landing slot per
(writer, local core/bank). A writer waits until its slot at the destination
is free. Because slots are per receiver, a bank that has stopped taking
messages never blocks traffic to the cores on its tile. A single shared slot
per writer does deadlock (a memory fill waiting for a full bank blocks that
bank's own response).

Memory responses enter at stations 0, 4, 8 and 12. The optical devices
(laser, ring modulators, photodetectors) exist only as these wires.

## Where this RTL departs from the design it implements

- **Bank controller.** It serves one message at a time: about 10 cycles per
  lookup plus one cycle per message it sends. A pipelined bank would take
  two requests every 2 cycles. The 8-cycle bank latency is kept.
- **Multicast.** Forwarded searches and Kills are sent as separate unicast
  messages (3 extra cycles), not as one optical multicast.
- **Back-pressure and retries.**
  - Memory fills are back-pressured at the network rather than NACKed.
  - A NACKed forwarded search or FILL is resent without backoff.
  - Cores back off 2, 4, 8, … cycles, capped at 64.
- **Write-backs.** Dirty state is not tracked: every line that leaves the L2
  is written back.
- **Victim banks.** Each is 64 sets × 8 ways. Only reconfiguration
  write-backs are stored; a write to a full set goes straight to memory.
  A stored line drains in any cycle with no bank request waiting, lowest
  set first. A read that hits takes the line out of the victim bank.
- **Replacement.** The first invalid way is used, else a per-set round-robin
  pointer.
- **Overlay installation.** The new overlay reaches the banks over direct
  wires during the drained phase, not as messages.
- **Shared reservation waveguides.** Several stations sharing one
  reservation bundle is not modelled; each station has its own reservation
  slot.
- **Builder timing.** The sorting network and the builder's timing are this
  design's own. So is reading "threshold" as an epoch length in cycles.

## Files

`rtl/` holds one module or package per file. `onuca_pkg` holds the message
types, OSV/OBV types and address helpers, and `onuca_top` is the top.

| group | modules |
|-------|---------|
| bank controller | `home_bank_controller`, `cache_bank`, `message_queue`, `nack_controller`, `kill_controller`, `search_logic`, `fill_logic`, `eviction_logic`, `overlay_info_store`, `victim_buffer`, `rcb` |
| reconfiguration | `overlay_builder`, `reconf_sequencer`, `reconf_controller`, `reconf_sram`, `trigger_circuit`, `logic_circuit`, `bit_pos`, `select_circuit`, `reconf_control_unit` |
| network and ports | `optical_station`, `optical_noc`, `l2_requester`, `mem_arbiter`, `victim_bank` |

Each file opens with a comment giving the module's behaviour, interface and
timing.

Parameter defaults are the target system's values:

| parameter | default |
|-----------|--------:|
| MQ        | 16      |
| RCB       | 128     |
| VB        | 20      |
| bank latency | 8    |
| lines per bank | 2048 (256 sets × 8 ways) |
| memory controllers | 4 |
| victim bank | 32 KB per controller |
| stations  | 16      |

Some signals are deliberately not reset:

- the cache tag/data arrays;
- the state-bit SRAM;
- the contents of queue and landing-slot entries.

They behave like SRAM, and every valid bit guarding them is reset. This is
why lint notes that `rst_n` is used both synchronously and asynchronously.

## Simulation

`tb/` has a self-checking testbench per module, named `tb_<module>`. Each
ends by printing `TB_RESULT checks=N failures=M` and stops itself through a
watchdog. The helper code and models are:

- `tb_util_pkg`: check counters, the reference overlay mapping, address
  builder and memory contents function;
- `main_memory_model`: behavioural memory with 4 ports, one shared store
  and a 250-cycle latency.

`tb_onuca_top` runs the whole L2 at its default parameters. Its phases are:

1. static operation;
2. a first overlay build;
3. a set overflowing through the overflow chain into memory;
4. a burst of all 32 cores at one bank;
5. a second, different overlay with a reconfiguration sweep.

It checks that every miss is answered with the right line and the right
data. It counts each mechanism and fails if one never happens:

- home hit and forwarding;
- overflow hit and overflow miss;
- migration;
- eviction to a bank and to memory;
- memory read;
- NACK;
- effective kill;
- reconfiguration and reconfiguration eviction;
- write-backs stored in the victim banks.

It also waits until the victim banks have written everything back.

It runs in a few seconds.

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_onuca_top -y rtl -y tb \
    rtl/onuca_pkg.sv tb/tb_util_pkg.sv tb/tb_onuca_top.sv
./obj_dir/Vtb_onuca_top
```

Any other testbench builds the same way with its own name. Add `-Wno-fatal`
if your Verilator version turns style warnings into errors.
