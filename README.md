# Full-map directory cache coherence, without extra handshakes

This is a small shared-memory multiprocessor in SystemVerilog. Each processor has a
private write-back cache. A directory in main memory keeps the caches coherent: for each
memory block it stores one *presence bit* per cache and a *dirty bit*. Because the
directory knows which caches hold a block, it sends invalidations only to those caches,
point to point, and needs no broadcast bus.

The protocol is deliberately lean. Caches acknowledge only what the memory must know:
an invalidation is answered by an acknowledgement or a write-back, and nothing more.
Messages travel through channels that may deliver them **in any order**. The point of the
design is to show what such a lean protocol does under real races. It is coherent when
accesses do not overlap. Under some message interleavings it breaks: it can leave a
stale copy, receive messages it has no rule for, or lock a block for good. The RTL
implements the protocol as specified, with those flaws intact. It detects and reports the
unhandled cases and does not paper over them. The testbenches reproduce each flaw on
purpose. Read the section *Races the protocol does not survive* before using this as a
coherence engine.

The protocol is the write-invalidate full-map scheme of Censier and Feautrier, refined
down to the message level in the paper *Correctness of a Directory-Based Cache Coherence
Protocol: Early Experience*. The cache and memory rules below follow that specification.
Sizes, encodings, timing and the hardware structure of the channels are this design's
own choices, listed at the end.

## Structure

```
   P0            P1            P2              processors (outside; ports of coh_system)
   |             |             |
 coh_cache     coh_cache     coh_cache         cache + coherence controller
  |     ^       |     ^       |     ^
  v     |       v     |       v     |
 CH-   CH+     CH-   CH+     CH-   CH+         coh_channel: unordered message pools
  |     ^       |     ^       |     ^
  v     |       v     |       v     |
 +-----------------------------------------+
 |  coh_directory: memory + full-map dir   |   presence bits, dirty bit, lock state
 +-----------------------------------------+
```

A *base machine* is a cache together with its sending channel CH- and receiving channel
CH+. `coh_system` instantiates `NCACHE` base machines around one `coh_directory`.

| file | contents |
|---|---|
| `rtl/coh_pkg.sv` | command and state enums, default sizes |
| `rtl/coh_channel.sv` | unordered channel (used for CH- and CH+) |
| `rtl/coh_cache.sv` | cache array and coherence controller, with replacement |
| `rtl/coh_directory.sv` | main memory, directory, request arbitration |
| `rtl/coh_system.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus `tb_coh_races` |

## Messages and states

Memory to cache:

| command | meaning |
|---|---|
| `Inv` | invalidate your copy |
| `UpdM` | you are the owner: write the block back and keep a Shared copy |
| `Ownership` | ownership granted; your Shared copy becomes the Owner copy |
| `Data` | a data copy, Shared or with ownership, depending on what was asked |
| `Reject` | the directory entry is locked; send your request again |

Cache to memory:

| command | meaning |
|---|---|
| `ReqSC` | request a Shared copy (read miss) |
| `ReqO` | request ownership of a Shared copy I hold (write hit on Shared) |
| `ReqOC` | request ownership and data (write miss) |
| `DxM` | owner's write-back in answer to `UpdM`; the owner stays Shared |
| `DOxM` | owner's write-back when invalidated or evicted; the owner becomes Invalid |
| `Repl` | a Shared copy was evicted |
| `IAck` | a Shared copy was invalidated |

A cache line is Invalid (I), Shared (S) or Owner (O). It can also be in one of three
*pending* states while the processor waits: RMP (read miss), WMP (write miss) and WHP
(write hit on a Shared line, waiting for ownership).

A directory entry is `free`, or locked in one of three states:
- `XData`: a ReqSC waits for the owner's write-back.
- `XOwn`: a ReqO waits for invalidations.
- `XOwnC`: a ReqOC waits for invalidations.

`reqc` records which cache's request is in progress.

## The cache controller (`coh_cache`)

The processor issues one access and stalls until `resp_valid`. The controller does one
thing per clock cycle. A message waiting in CH+ takes priority over the pending processor
access, and nothing happens while CH- is full.

| event | line state | action |
|---|---|---|
| load | S or O | answer from the cache |
| store | O | write the cache |
| store | S | go to WHP, send `ReqO` |
| load / store | I | go to RMP / WMP, send `ReqSC` / `ReqOC` |
| load / store | line holds another block in S / O | evict it: send `Repl` / `DOxM`+data, line to I; then as above |
| `Inv` | S / O | go to I, send `IAck` / `DOxM`+data |
| `UpdM` | O | go to S, send `DxM`+data |
| `Ownership` | WHP | go to O, do the pending store |
| `Data` | RMP / WMP | go to S / O, answer the load or merge the store |
| `Reject` | RMP / WMP / WHP | send `ReqSC` / `ReqOC` / `ReqO` again |
| any other message | any | **unspecified reception**: drop it, pulse `unspec_rx` |

The cache is direct-mapped with `CACHE_LINES` lines. The victim of a miss is the line
that the missing block maps to. A message for a block that its line does not hold meets
state I.

## The directory (`coh_directory`)

Each cycle the directory takes one message from the sending channels, round-robin. It
only takes one when every receiving channel has room, because one step may send `Inv` to
several caches at once. With `i` the sender, the directory does the following.

**When the entry is free:**
- `ReqSC`, block clean: set `presence[i]`, send `Data`. There is no locking: readers are
  served at once.
- `ReqSC`, block dirty: lock in `XData`, set `reqc=i`, send `UpdM` to the owner. The
  owner is the cache whose presence bit is set.
- `ReqO`/`ReqOC` when no other cache has its bit set: set dirty. For `ReqO` send
  `Ownership`. For `ReqOC` set `presence[i]` and send `Data`.
- `ReqO`/`ReqOC` otherwise: lock in `XOwn`/`XOwnC`, set `reqc=i`, send `Inv` to every
  other cache with its bit set.
- `Repl`: clear `presence[i]`.
- `DOxM`: clear `presence[i]` and dirty, write the data to memory.

**When the entry is locked:**
- `ReqSC`/`ReqO`/`ReqOC`: send `Reject`.
- `DxM`: clear dirty, write memory. In `XData`, also send `Data` to `reqc`, set its bit
  and unlock.
- `DOxM`: clear dirty, write memory, clear `presence[i]`, set `presence[reqc]`. In
  `XData` send `Data` to `reqc`. In `XOwnC` send `Data` to `reqc` and set dirty. Unlock.
- `Repl`: clear `presence[i]`. Nothing else happens.
- `IAck`: clear `presence[i]`. If `reqc` now has no other sharer, set dirty and unlock:
  in `XOwn` send `Ownership` to `reqc`; in `XOwnC` set `presence[reqc]` and send `Data`.
  In `XData` nothing more happens.

`DxM` or `IAck` on a free entry has no rule. The directory drops it and pulses
`unspec_rx`.

No message is needed to unlock an entry beyond the write-back or the last
acknowledgement. This leanness is what the design is about, and it is also the source of
the trouble below.

## Races the protocol does not survive

Accesses that do not overlap are handled correctly. `tb_coh_system` checks 400 random
serialised accesses against a reference memory. Overlapping accesses, combined with
reordered messages, can break the protocol in the ways below. Each is reproduced
cycle-exactly by a testbench, using the channels' `hold` and `sel` controls to force the
interleaving.

1. **Stale copy after an overtaken `Repl`** (`tb_coh_system` phase 2b, `tb_coh_directory`).
   - A cache evicts a Shared block and later misses on it again.
   - Its new `ReqSC` overtakes its old `Repl` in the sending channel.
   - The directory grants the ReqSC, then processes the `Repl` and clears the presence
     bit, while the cache holds a valid Shared copy.
   - A store by another cache then sends it no `Inv`, so it keeps reading the old value.
   - The cause: the directory never checks presence bits against incoming requests.
2. **Unspecified receptions** (`tb_coh_cache`, `tb_coh_system` phase 2c, `tb_coh_races`).
   - Examples: an `Inv` reaching a line that is Invalid or pending, or an `UpdM` reaching
     a pending line.
   - The controller drops such messages and flags them on `unspec_rx`. That matches the
     obvious fix of "ignore it", and the next two items show what that fix costs.
3. **Livelock on the last `Repl`** (`tb_coh_system` phase 2c).
   - Three caches share a block. One of them evicts it, and its `Repl` is delayed.
   - Another sharer asks for ownership, and the directory sends `Inv` to the evicting
     cache. That cache drops the `Inv` (item 2).
   - When the `Repl` finally arrives it only clears the bit and completes nothing. The
     entry stays locked forever.
   - The store never completes, and every later request to the block is rejected and
     retried without end.
4. **Two concurrent upgrades** (`tb_coh_races` a).
   - Two sharers send `ReqO` at once. The directory locks for the first and invalidates
     the second, which is waiting in WHP.
   - The `Inv` is unspecified there and is dropped, so no `IAck` comes. Both stores hang.
5. **Eviction racing an invalidation** (`tb_coh_races` b).
   - An owner evicts its block (`DOxM`) while an `Inv` for that block is in flight.
   - The directory treats the write-back as the answer to the `Inv` and correctly hands
     the data to the writer.
   - The late `Inv` then reaches a line that no longer holds the block, an unspecified
     reception that happens to be harmless here.
6. **Owner data and `UpdM` passing each other** (`tb_coh_races` c).
   - A write miss is granted, and its `Data` is still in transit when another cache's
     read sends `UpdM` to the new owner.
   - If the `UpdM` arrives first, it finds the line in WMP and is dropped. The entry
     stays in XData, and every reader is rejected or waits.
   - Only a later eviction by the owner (`DOxM`) unlocks the entry. The waiting reader
     then gets the owner's store. If the owner never evicts, the readers wait forever.
7. **`UpdM` arriving after the owner left** (`tb_coh_races` d).
   - Here the `Data` comes first, the owner evicts, and its `DOxM` completes the XData
     entry.
   - The delayed `UpdM` then reaches a cache that no longer holds the block. This
     unspecified reception is dropped, which is harmless.

Making the protocol correct needs more than this specification gives. Such a fix would
need presence-bit checks on requests, replies to `Inv` in every state, and a way to tell
a `DOxM` written back on eviction from one sent in answer to an `Inv`. None of these is
built. Run the system only where messages of one block cannot overtake each other, or use
it to study these races. The `cache_unspec` and `dir_unspec` outputs pulse on every
reception the protocol does not cover. With each pulse, `cache_unspec_cmd` and
`cache_unspec_state` name the dropped command and the state of the line it hit (`I` when
the line holds another block). `dir_unspec_cmd` and `dir_unspec_src` name the command the
memory dropped and the cache that sent it.

## Channels (`coh_channel`)

A channel is a pool of `CH_DEPTH` slots, not a FIFO:
- A message sent in takes the lowest free slot.
- The message offered for delivery is the first occupied slot at or after `sel`, with
  wrap-around.
- `hold` keeps every message in transit.

`coh_system` brings `sch_hold`, `rch_hold`, `sch_sel` and `rch_sel` out as ports, so the
environment decides the network's delay and order. Tie the holds low for normal use.
`sel` may be a constant or any changing value. Note that the slot search does not keep
sending order. When two messages about one block wait in the same channel, the second
can leave first, which exposes the races above.

Both ends use valid/ready. `in_ready` is low only when all slots are full. The cache and
the directory stop while the channel they send into is full. Each cache has at most one
request outstanding, and in the system tests no channel held more than 3 of its 8 slots.

## Timing

All logic is single-clock with synchronous active-low reset `rst_n`. Reset sets every
cache line Invalid, every directory entry free and clean, and memory to zero.

- A processor request is accepted on a clock edge and acted on at the next edge.
- A hit raises `resp_valid` for one cycle after that edge.
- A miss puts its request into CH- on that edge, or one edge later if an eviction comes
  first.
- A message is offered by a channel in the cycle after it is written. The directory
  consumes it in that cycle if it wins arbitration, and writes its replies into the
  receiving channels on the same edge.
- An uncontended read miss therefore completes five edges after acceptance:
  1. request into CH-;
  2. directory step;
  3. cache consumes `Data`;
  4. `resp_valid` is seen.

## Parameters

| parameter | default | where |
|---|---|---|
| `NCACHE` | 3 | `coh_system`, `coh_directory` |
| `MEM_BLOCKS` | 16 | all |
| `WORDS` (per block) | 4 | all |
| `DATA_W` | 32 | all |
| `CACHE_LINES` | 4 (direct-mapped) | `coh_system`, `coh_cache` |
| `CH_DEPTH` | 8 | `coh_system` (`DEPTH` in `coh_channel`) |

Word addresses are `{block, word}`, `$clog2(MEM_BLOCKS) + $clog2(WORDS)` bits wide.
`MEM_BLOCKS` must exceed `CACHE_LINES`, and `CACHE_LINES`, `WORDS` and `CH_DEPTH` must be
powers of two. The protocol works for any `NCACHE`. Three is the smallest system that
shows every race above.

## What is specified and what is chosen here

These follow the protocol specification:
- the message set;
- the cache states and every transition in the two tables above;
- the directory entry contents and lock states;
- Reject-and-retry for locked entries;
- serving clean reads without locking;
- unordered delivery.

These are this design's own choices:
- All sizes, encodings and the message layout `{cmd[2:0], block, data}`.
- The direct-mapped cache with its fixed victim.
- One action per cycle in the cache and in the directory. A received message takes
  priority in the cache; the directory arbitrates round-robin.
- Dropping and flagging unspecified receptions. The specification defines no reaction.
- Three readings where the specification is unclear:
  - Setting `presence[reqc]` when the last `IAck` completes an `XOwnC` request. Without
    it the new owner cannot be found.
  - Taking the lowest-numbered cache with its bit set as the owner.
  - Treating the "no other copies" test of `ReqO`/`ReqOC` as "no cache other than the
    requester".
- The slot-pool channel with external `hold`/`sel` controls, finite depth and
  back-pressure. The specification assumes unbounded channels.
- Rejecting, not queueing, requests to locked entries. Queueing is mentioned as an
  alternative but not specified.

The processors are not part of the RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_coh_system \
    rtl/coh_pkg.sv tb/tb_coh_system.sv
./obj_dir/Vtb_coh_system
```

The same command works for `tb_coh_channel`, `tb_coh_cache`, `tb_coh_directory` and
`tb_coh_races`; `-y rtl` finds the modules by name. `tb_coh_system` and `tb_coh_races`
run the top at its default parameters. `tb_coh_system` also prints how often each
mechanism occurred: hits, each command, multi-cache `Inv`, holds, reordering,
unspecified receptions, the stale copy and the livelock. Every run takes well under a
second.

| testbench | what it covers |
|---|---|
| `tb_coh_channel` | 2000 random messages: delivered exactly once, occupancy and `in_ready` tracked, `hold` and `sel` honoured, reordering seen, one-cycle latency |
| `tb_coh_cache` | every row of the cache table with exact messages and data, hit latency, unspecified receptions, stall on a full CH- |
| `tb_coh_directory` | every directory rule with hand-computed replies, Inv fan-out, back-pressure, round-robin, the Repl races |
| `tb_coh_system` | read-miss latency, 400 serialised random accesses checked against a reference memory, then races 1 to 3 |
| `tb_coh_races` | races 4 to 7 |

Assertions in the RTL check three things:
- a channel never fills and delivers the same slot in one cycle;
- a pending request never finds its line pending for another block;
- a locked directory entry names a valid requester.
