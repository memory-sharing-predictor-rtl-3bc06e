# Speculative coherent DSM with a Vector Memory Sharing Predictor

In a distributed shared memory (DSM) machine, a read of data last written on
another node is slow. The home directory has to take the writable copy back
from the producer, then send a read-only copy to each reader. Each step costs
a network round trip. This design hides much of that latency. A predictor at
each home learns, block by block, which processors will ask for the block
next. It then has the unchanged coherence protocol do the work before they
ask: it takes the producer's copy back early and pushes read-only copies to
the predicted readers. A reader whose prediction came true finds the block in
its own node and never goes to the network.

The predictor is a two-level pattern predictor, in the style of a PAp branch
predictor. It looks only at request messages (read, write, upgrade) and never
at protocol acknowledgements. It also folds every sequence of reads into a
single reader bit-vector, so the order in which readers arrive does not
matter. This variant is called VMSP (vector memory sharing predictor).

The RTL implements the design published as *Memory Sharing Predictor: The
Key to a Speculative Coherent DSM*, in the configuration it evaluates: 16
nodes, 32-byte blocks, a full-map write-invalidate protocol, a VMSP of history
depth one, and both read triggers (first-read and speculative
write-invalidation). Where the publication says what a part does but not how,
the choice made here is stated below and in the opening comment of each file.

## Structure

```
dsm_system                     16 nodes + three switches
 ├─ msg_network  x3            request (node→home), forward (home→node), response (node→home)
 └─ dsm_node     x16
     ├─ remote_cache           node side: processor port, lines, reference bits
     ├─ protocol_fsm           home side: write-invalidate engine, executes advice
     ├─ directory              home side: Idle/Shared/Exclusive, owner, sharer vector
     ├─ home_memory            home side: block data
     └─ vmsp                   home side: predictor, FR and SWI triggers
         └─ ewi_table          last written block per processor
dsm_pkg                        sizes, message and table record types
```

Every global block number is `{home node (4 bits), block in home (8 bits)}`.
The processors, their caches, the memory bus and the network interface chips
are not part of the RTL. Each node's processor side is a simple port: one word
read or write of a global block at a time. Processor accesses to the node's
own home blocks take the same path as remote ones: they go through the
remote cache and a request to its own home engine.

## The predictor (vmsp)

This is the part that takes the most care to follow.

### Tables

For every home block, the predictor keeps:

| table | contents | bits |
|---|---|---|
| history | last request message: 2-bit type + 16-bit field (reader vector for a read sequence, processor id otherwise) + valid | 18 + 1 |
| last write | the write/upgrade that opened the current read sequence (type, id, valid) | 7 |
| SWI flag | an early invalidation of this block has just been done | 1 |
| pattern table | `PT_ENTRIES` (8) entries, fully associative within the block, + round-robin pointer | 8 × 26 + 3 |

A pattern entry holds a key message and the message predicted to follow it.
At most one of the two can be a reader vector: a read sequence is always
followed by a write or upgrade. So an entry needs only 24 bits: key type (2),
prediction type (2), one 16-bit field and one 4-bit id. Two more bits are
added: `valid`, and `swi_off`, which is set once an early invalidation after
this write proved premature.

| key type | `vec` holds | `id` holds |
|---|---|---|
| read | key reader vector | predicted writer |
| write / upgrade | prediction: reader vector, or writer id in the low bits | key writer |

### Learning

The protocol engine reports every request it has served as an event. A read
event either opens a read sequence or adds its reader to the open one.
Learning happens on a write or upgrade event, because only then is the read
sequence complete. The completed reader set is:

```
R = readers the home saw  |  pushed copies that the invalidation acknowledgements report as referenced
```

The second term matters. A reader that used a pushed copy never sends a
request, so the home learns that it read only from the reference bit that
comes back on the invalidation acknowledgement. With `W` the write that opened
the sequence and `X` the new write, learning updates:

* `W → <read, R>` (or, if any pushed copy came back unreferenced, removes the
  entry instead: a mispredicted sequence is forgotten);
* `<read, R> → X`;
* if no read happened at all, `previous write → X`.

An update overwrites the prediction of a matching entry. If none matches, it
takes a free entry, or else the round-robin victim. Before it is overwritten,
the old prediction is compared with the outcome. This drives the
`pred`/`correct` strobes: one prediction per lookup, so a reader vector counts
once.

Example: P5 upgrades block 0x1a0, then P7 and P2 read it, then P5 upgrades
again. This leaves two entries, `<Upgrade,P5> → <Read,{P2,P7}>` and
`<Read,{P2,P7}> → <Upgrade,P5>`. Had P2 read before P7, the entries would be
the same.

### Triggers

The predictor says *what* comes next, not *when*. Two triggers decide when to
act:

* **First read (FR).** The first read of a sequence looks up the entry keyed
  by the current history (the write). If that entry predicts a reader vector,
  the predictor advises the engine to push read-only copies to the other
  predicted readers.
* **Speculative write invalidation (SWI).** The early-write-invalidate table
  keeps each processor's last written block (of this home). When processor
  p writes a different block, its previous block b0 is taken to be finished.
  SWI advice is given if three things hold: b0's history is still p's write,
  b0's entry for that write predicts readers, and `swi_off` is clear. The
  advice tells the engine to take p's writable copy back and push it to the
  predicted readers. The engine reports the invalidation as done, and the
  block is marked. If p then asks for b0 again before anyone read it (a read
  before any other reader, or a write with no verified read in between), the
  invalidation was premature. The entry's `swi_off` is then set, and SWI is
  never tried again for that write.

Advice waits in a one-entry register. A newer advice replaces one that has
not been taken yet (`adv_lost` strobe). Dropping advice is safe, because it
is only a hint.

### Timing

An event is accepted when `ev_ready` is high. It occupies the predictor for
two cycles, or three if it starts an SWI check. Advice appears in the cycle
after the decision.

## Protocol engine (protocol_fsm) and directory

This is a full-map write-invalidate protocol with three directory states:
Idle (no remote copy), Shared (read-only copies, sharer vector) and
Exclusive (one writable copy, owner). Each home serves one transaction at a
time, and its request input is not ready meanwhile.

| request | directory | actions |
|---|---|---|
| read | Idle / Shared | read-only copy from memory |
| read | Exclusive (other owner) | fetch-invalidate owner, wait for writeback, read-only copy |
| write | Idle | writable copy |
| write / upgrade | Shared | invalidate every other sharer (one message per cycle, overlapped), wait for all acks, then writable copy, or a data-less grant for an upgrade whose sender is still a sharer |
| write / upgrade | Exclusive (other owner) | fetch-invalidate, writeback, writable copy |

Each acknowledgement carries two verification bits: the dropped copy had been
pushed, and it was or was not referenced. The engine gathers them into one
`spec_hit` and one `spec_miss` vector for the predictor.

Advice is served before waiting requests. It never adds a protocol state. It
only starts ordinary operations early, and it is dropped when the directory
shows it is stale:

* **spec-read.** Skipped if the block is Exclusive. Otherwise push read-only
  copies to the predicted readers that are not sharers yet, and add them to
  the sharer vector.
* **SWI.** Skipped unless the predicted owner still holds the block Exclusive.
  Otherwise fetch-invalidate the owner, store the writeback, push to the
  predicted readers (the block becomes Shared by them), and report completion.

Timing: one cycle to accept, one to decide from the directory, then one
forward message per cycle while the forward switch is ready.

## Remote cache

The remote cache has one line per global block (4096 lines), so it holds all
shared data and never replaces a line. Each line has a state (I/S/E), 32
bytes of data, and two bits:

* `spec` — the line was pushed, not requested;
* `unref` — the processor has not touched it since it was pushed.

A processor read or write clears `unref`. An invalidation answers with
`spec_hit = spec & ~unref` and `spec_miss = spec & unref`. An upgrade from a
pushed line carries `spec_hit`. A pushed copy that arrives while the line is
valid, or while a miss to the same block is outstanding, is dropped. The
outstanding request then completes normally through the protocol. This is
the only race rule the protocol needs.

Processor timing: a hit answers in the cycle after acceptance. A miss sends
one request and blocks until the reply, then answers in the next cycle.
Forward messages take priority over the processor.

## Messages and switches

| class | messages |
|---|---|
| request (node→home) | `M_READ`, `M_WRITE`, `M_UPGRADE` |
| forward (home→node) | `M_INV`, `M_FETCH_INV`, `M_DATA_SH`, `M_DATA_EX`, `M_UPG_ACK`, `M_SPEC_DATA` |
| response (node→home) | `M_INV_ACK`, `M_WRITEBACK` |

Each class has its own switch (`msg_network`). Because the classes are
separate, a home can always drain responses while it holds requests back, so
the protocol cannot deadlock in the switches. Each switch input has a
2-deep FIFO. Each output serves round-robin the inputs whose head message is
addressed to it. Messages between one pair of nodes stay in order, and the
protocol relies on that. An empty switch is crossed in one cycle.

## Parameters

| name | default | origin |
|---|---|---|
| `NODES` (dsm_pkg) | 16 | published configuration |
| `BLOCK_BYTES` (dsm_pkg) | 32 | published configuration |
| processor id / request type bits | 4 / 2 | published encoding |
| history depth | 1 | published configuration (fixed in the RTL) |
| `HOME_BLOCKS` (dsm_pkg) | 256 | own choice: 8 KB of shared data per node |
| `PT_ENTRIES` | 8 | own choice; the published VMSP needs about two entries per block on average |
| `SWI_EN` | 1 | 1 = SWI and FR; 0 = FR only |
| `NET_DEPTH` | 2 | own choice |

The package constants fix the record widths. Raising `HOME_BLOCKS` enlarges
the shared address space, and with it every remote cache (one line per
global block).

## Where this departs from, or goes beyond, the published design

* The published evaluation uses a simulated network with a constant 80-cycle
  latency and a 100 MHz bus. Neither is modelled here. The switches are
  one-cycle, and processors attach through a plain port.
* The publication takes its pattern-table allocation from earlier work
  without describing it. A fixed 8 entries per block with round-robin
  replacement is used here.
* The exact rule for a *premature* early invalidation, the staleness checks
  on advice, single-transaction homes, and routing local accesses through
  the remote cache are this design's own choices.
* Accuracy is counted per pattern lookup, not per message.
* Only the VMSP is built. The general message predictor and the scalar MSP,
  which the publication uses for comparison, are not.
* The shared space built (16 × 256 × 32 B = 128 KB) is smaller than the data
  sets of the published benchmark programs. Running them needs a larger
  `HOME_BLOCKS`.

## Verification

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles.

| testbench | what it shows |
|---|---|
| `tb_directory`, `tb_home_memory`, `tb_ewi_table` | storage and lookup against a reference model |
| `tb_msg_network` | 16 random sources: delivery, per-pair order, no loss, one-cycle crossing |
| `tb_remote_cache` | misses, upgrades, writebacks, reference-bit acknowledgements, a dropped racing push |
| `tb_protocol_fsm` | every transaction type, acknowledgement gathering, stale advice, SWI and spec-read advice |
| `tb_vmsp` | learning of reader vectors, the FR push, SWI advice, premature detection, removal of a mispredicted entry, event timing |
| `tb_dsm_node` | one node looped back on itself: data correctness, no speculation without sharing |
| `tb_sharing_patterns` | two full-size systems, with and without SWI, on the sharing patterns below |
| `tb_dsm_system` | full 16-node system at default sizes: producer/consumer with re-ordered readers, a changing consumer set, a producer that re-reads, and migratory sharing over 10 iterations |

`tb_dsm_system` checks every value read against a reference. It also
requires each mechanism to happen at least once, and prints how often each
did. A typical run shows about 250 predictions, 98% of them correct, 64 SWI
invalidations, 80 first-read triggers, about 290 pushes (about 240 of them
referenced), and about 40 pushes dropped because the line was still valid
or a miss to it was outstanding. It takes well under a
second.

## Sharing patterns of the evaluated applications

The published evaluation runs seven shared-memory programs (appbt, barnes,
em3d, moldyn, ocean, tomcatv, unstructured). Their data sets are larger than
the 128 KB built here, so the programs themselves are not run. Their sharing
patterns, as the publication describes them, are. `tb_sharing_patterns` runs
each one on two full-size systems side by side: the main configuration (SWI and first read) and one with
`SWI_EN = 0` (first read only). It measures the share of consumer reads that
find a pushed copy, over the last five of eight iterations:

| pattern | like | SWI + FR | FR only | expected |
|---|---|---|---|---|
| static producer/consumer, 4 blocks written in turn, 3 readers | em3d | 91% | 66% | SWI covers 3 of 4 blocks fully; first read serves 2 of 3 readers |
| producer reads its block back after writing the next | moldyn, tomcatv | 55% | 50% | SWI turns itself off after premature invalidations; first read serves 1 of 2 consumers |
| one producer, twelve readers | unstructured | 97% | 89% | first read serves the other 11 of 12 |
| migratory read/write of two counters by three nodes | moldyn, unstructured reductions | 50% | 0% | first read has nothing to push; SWI moves the first counter ahead |

The testbench checks these figures against the expected ranges, and checks
every value read. The ordering of the two configurations matches the
published observations: SWI adds most where a producer writes each block
once, and it gives up on producers that read back what they wrote.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl rtl/dsm_pkg.sv tb/tb_dsm_system.sv --top-module tb_dsm_system
./obj_dir/Vtb_dsm_system
```

Uninitialised state is random in Verilator. All control state is reset, and
the testbenches never check data that was not written first.
