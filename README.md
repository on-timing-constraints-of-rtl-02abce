# Relaxed snooping for a bus-based COMA multiprocessor

In a cache-only memory architecture (COMA) every node's main memory is an
*attraction memory* (AM): a large set-associative cache of the global address
space with no home memory behind it. Blocks migrate and replicate to where
they are used, and a four-state ownership protocol keeps the copies coherent.
On a shared bus this works well, except for one thing: every node must snoop
every bus transaction against the state and tag memory (STM) of its AM, and
that memory is huge. With 256 MB of 4-way AM per node, 128-byte blocks and
40-bit addresses, the STM holds 2^19 sets x 4 ways x (14-bit tag + 2-bit
state) = 32 Mbit per node. Making it fast enough to answer inside a modern
bus's snoop window (about 30-35 ns on a 47.6 MHz five-phase bus) is
expensive.

This RTL implements the way out: **the bus no longer waits for the STM.**
Each node puts every snooped request into a small, fast *Request FIFO Queue*
(RFQ) and answers ACK at once, or NAK if the queue is full, in which case the
issuer retries. The node's controller works through the queue later, at the
STM's own pace. This is safe because of two properties of the protocol:

* **A read miss always ends in the shared non-owner state (SHN).** There is no
  main memory that could own a block, so after a read miss at least two copies
  exist. The requester does not need to collect "shared" information from the
  other nodes during the transaction, which is what forces synchronous snooping
  on a conventional bus.
* **Every block has exactly one owner** (state EXL or SHO). Only the owner
  supplies data, so no arbitration between candidate suppliers (an "inhibit"
  line) is needed.

All nodes see coherence requests in the same order: the bus serialises them
and each RFQ is first-in first-out. A program that synchronises as a relaxed
memory consistency model requires therefore runs correctly even though nodes
apply the requests at different times.

## Where things are

| File | What it is |
|---|---|
| `rtl/coma_pkg.sv` | States, request types, protocol events, bus phases, look-up result |
| `rtl/coma_system.sv` | Top: `N_NODES` nodes on one global bus |
| `rtl/global_bus.sv` | Five-phase bus sequencer, arbiter, NAK/retry, data-response channel |
| `rtl/pending_read_buffer.sv` | Blocks with an outstanding data request (holds back repeat requests) |
| `rtl/snoop_node.sv` | One node's snooping side: the five blocks below |
| `rtl/snooper.sv` | Latches the request, decides ok/error, writes the RFQ |
| `rtl/rfq.sv` | Request FIFO Queue |
| `rtl/bus_driver.sv` | ACK/NAK lines, data-supply buffer |
| `rtl/am_controller.sv` | Request handler working through the RFQ, local-event port |
| `rtl/state_tag_storage.sv` | Slow set-associative state and tag memory |
| `rtl/coherence_fsm.sv` | Next-state function of the protocol |
| `tb/tb_<module>.sv` | Self-checking testbench of each module |
| `tb/coma_system_driver.sv` | Processor-side stimulus and coherence checker for the system tests |
| `tb/tb_coma_system_full.sv` | System test at the default (full) size |

## The coherence protocol

Four states per AM block: INV (invalid), SHN (shared, not owner), SHO (shared,
owner; other copies may or may not exist) and EXL (exclusive: the only copy,
and its owner). There is no "modified" state: an EXL block is the only copy,
so it can never be stale with respect to anything else. `coherence_fsm`
implements:

| state \ event | PR | PW | NR | NW | NI | NTO | NNOC |
|---|---|---|---|---|---|---|---|
| INV | SHN | EXL | INV | INV | INV | INV | EXL |
| SHN | SHN | EXL | SHN | INV | INV | SHO | EXL |
| SHO | SHO | EXL | SHO | INV | INV | SHO | EXL |
| EXL | EXL | EXL | SHO | INV | INV | EXL | EXL |

PR/PW are the node's own processor read and write, NR/NW/NI a read, write or
invalidation seen on the bus, NTO a transfer of ownership to this shared copy
when the owner replaces its block, NNOC the arrival of a relocated last copy.
The cells for NR on non-owners, NI on EXL, NTO outside SHN and bus events on
INV are not part of the protocol's diagram; the table fills them in the
obvious way (no change, or INV for an invalidation).

## One bus transaction, and where the snoop fits

`global_bus` runs each address transaction through five one-cycle phases:

```
 cycle:   1     2     3      4     5
        ARB   RES   ADDR   DEC   ACK
                      |            |
                      Ta           Tb    snooper latches at end of ADDR,
                                         bus driver answers during ACK
```

* **ARB** samples which requesters are eligible, **RES** picks one
  round-robin, **ADDR** drives type, address and issuer.
* At the end of ADDR each `snooper` latches the request. Its only decision is
  whether the RFQ has room (`ok`) or not (`error`). Its own transactions are
  ignored; a RELOCATE request is not queued but handed to the node's
  relocation handler.
* In **ACK** each `bus_driver` drives ACK or NAK. The bus ORs the NAKs. If any
  node said NAK the transaction is void: the issuer gets `breq_retry` and
  competes again; otherwise it gets `breq_done`.
* **Commit rule.** A snooper writes its latched request into the RFQ only at
  the end of ACK, and only if *no* node NAKed. Otherwise a retried request
  would be queued twice at the nodes that had room. Between ADDR and ACK the
  RFQ can only drain (one address transaction is in flight at a time), so the
  room seen at ADDR is still there.

The snoop turn-around is therefore two cycles whatever `ST_ACCESS_CYCLES` is.
With load the bus starts the next ARB right after ACK: one transaction every
five cycles.

## What the controller does later

`am_controller` takes the RFQ head when the STM is free:

| request | work |
|---|---|
| READ | look up; absent or SHN: drop it (no further STM access). EXL/SHO (owner): supply the data, then EXL becomes SHO (a write only if the state changed). |
| WRITE | look up; absent: drop. Owner: supply the data. Then write INV. |
| INV | write INV (no separate look-up; the STM write finds the block). |

Ownership is a filter: on a read, all nodes but one drop the request after a
single look-up. "Supply the data" means a Provide_Data request to the
`bus_driver`, which holds it in a one-entry buffer and offers it on the bus's
data-response channel. The block's bytes live in the AM data array, which is
not part of this RTL, so a response carries the block address, the supplying
node and the requester (`data_*` of `coma_system`).

The same STM copy has to follow what the node itself does, so the controller
also accepts **local events** (`loc_*`: PR, PW, NTO, NNOC). For these it looks
the block up, computes the next state, and writes it if it changed, installing
an absent block in the lowest free way. `loc_ok` is low if the set had no free
way; replacing a valid block is outside this design. Local events and RFQ
requests take turns when both wait.

## Pending read buffer

A READ or WRITE that the bus accepted waits for the owner's data. Until the
data response has passed, `pending_read_buffer` keeps every further
READ/WRITE for that block off the bus; such a requester is simply not
eligible in ARB. This guarantees that an owner's RFQ never holds two requests
for one block it owns. While the buffer is full no READ/WRITE is issued at
all. An entry is freed when a data response for its block is granted. A
request for a block that no node owns would therefore wait for ever. The
protocol rules this out: there is always an owning node, as long as blocks
enter the system as relocated last copies (NNOC) and no page faults occur.

## State and tag memory

`state_tag_storage` holds the snoop copy of the STM as one array of
`SETS x WAYS` entries of `{tag, state}`. Every operation reads the set in the
cycle it is accepted and responds `ACCESS_CYCLES` cycles later, when a state
write also takes effect. It accepts one operation at a time. After reset it
sweeps every set to INV at one set per cycle (2^19 cycles at the default size)
and holds `init_done` low until then; `coma_system.init_done` is the AND over
all nodes.

## What is outside, and the ports that stand in for it

The processors, their two cache levels and the AM data arrays are not in this
RTL. The same goes for the processor-side copy of the STM and its controller:
the STM is duplicated so that local accesses and snooping do not collide. So
is the relocation handler, which takes in a replaced last copy. `coma_system`
exposes, per node:

* `breq_*`: the bus request a processor-side controller would issue: READ on a
  read miss, WRITE on a write miss, INV to upgrade a shared copy, RELOCATE to
  move a replaced last copy. Hold `breq_valid` until `breq_done`.
* `loc_*`: the node's own protocol events, applied to the snoop copy.
* `rel_*`: relocation requests for the relocation handler.
* `data_*`: data responses, one per cycle.

A processor-side controller must follow the order: bus request, `breq_done`,
(for READ/WRITE) the matching data response, then the local event. This is
what `tb/coma_system_driver.sv` does.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `N_NODES` | 16 | example machine of the design |
| `ADDR_W` | 40 | example machine |
| `BLOCK_BYTES` | 128 | example machine |
| `WAYS` | 4 | example machine (at most 4 here) |
| `AM_BYTES` | 256 MB | example machine; gives 2^19 sets, 14-bit tags |
| `ST_ACCESS_CYCLES` | 4 | this design's choice (a slow memory: about 84 ns at 47.6 MHz) |
| `RFQ_DEPTH` | 4 | this design's choice ("small and fast") |
| `PRB_DEPTH` | 8 | this design's choice |

## Departures and choices

* The request handler's own description leaves a request for an absent block
  in the queue, which would block it for good. Here such a request is removed.
* The commit-only-without-NAK rule, ignoring one's own transactions, the
  single transaction in flight, round-robin arbitration, the data-response
  channel (lowest node first) and its handshake are this design's choices. So
  are the local-event port, the post-reset sweep and the state and request
  encodings (`coma_pkg`).
* Replacement (ownership transfer on eviction, relocation of last copies) is
  only represented by its events (NTO, NNOC, RELOCATE); how a node picks a
  victim and moves it is not specified and not built.
* No performance numbers are claimed: the design's source itself evaluates
  none.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/coma_pkg.sv tb/tb_coma_system.sv --top-module tb_coma_system
./obj_dir/Vtb_coma_system
```

Replace the testbench name for the others. The testbenches:

* `tb_coherence_fsm`: all 28 state/event pairs against a written-out table.
* `tb_rfq`: random traffic against a queue model.
* `tb_state_tag_storage`: random look-ups and writes on 64 sets against a
  directory model. It also checks the latency, the sweep time and the set-full
  case.
* `tb_snooper`: random transactions. Checks the verdict timing, the NAK
  condition, the commit rule and the relocation hand-over.
* `tb_bus_driver`: ACK/NAK only in the ACK phase, the NAK counter, data
  buffering under random grants.
* `tb_am_controller`: the handler against a behavioural STM. Per request it
  checks data supply, the resulting state and the number of STM accesses
  (filtering, no write without a change).
* `tb_pending_read_buffer`, `tb_global_bus`: the hold rule, phase order, done
  and retry strobes, grants, counters, no starvation.
* `tb_snoop_node`: one node with a 6-cycle STM and a 2-entry RFQ under
  back-to-back bus traffic. Checks that the answer always comes in ACK, that
  NAK comes exactly when the RFQ is full, data responses in bus order, and
  final states.
* `tb_coma_system`: 4 nodes end to end. It gives every block an owner, runs
  random read misses, write misses, upgrades and relocations, then concurrent
  read bursts. Every data response must come from the single owner and answer
  an outstanding request, and every valid copy is read back. It also requires
  that NAK/retry, pending-read holds, data supply, EXL to SHO, filtering,
  invalidation and relocation each happened.
* `tb_coma_system_full`: the same driver on the default 16-node, 256 MB-per-node
  configuration (about 0.53 M cycles, most of it the STM sweep; seconds with
  Verilator).

Assertions in the RTL check the queue (no push when full, no pop when empty),
the bus (requests held until done, every transaction answered) and the
pending read buffer (no insert when full). Run with `--assert`.
