# OCP crossbar bus

A system-on-chip bus for IP cores that speak the Open Core Protocol (OCP).
Every core keeps a plain point-to-point OCP socket; the bus supplies the
other side of each socket and moves traffic between them through a crossbar,
so an initiator talking to one target does not wait for an initiator
talking to another. Only initiators that want the *same* target contend, and
each target has its own arbiter to settle that.

On top of plain reads and writes the bus carries the OCP features that make
a crossbar pay off:

- **bursts**, both multi-request (one request per beat) and single-request
  reads (one request, many responses);
- **locks** (an exclusive read locks the target until the same initiator
  writes);
- **pipelined transactions** (several requests in flight before the first
  response);
- **out-of-order responses**: requests with different tags may complete in
  any order, so a fast target's answer need not wait behind a slow one;
- **error responses** for addresses that do not exist.

Everything is in synthesizable SystemVerilog under `rtl/`, with one
self-checking testbench per module under `tb/`.

## Structure

```
 initiator 0 ──OCP──► ocp_fsm_s ─┐                 ┌─ ocp_fsm_m ──OCP──► target 0
                    (decoder,    │   ocp_crossbar  │  (request register,
                     scheduler,  ├── one ocp_arbiter ─┤   outstanding FIFO)
                     error resp.)│   per target    │
 initiator 1 ──OCP──► ocp_fsm_s ─┘                 └─ ocp_fsm_m ──OCP──► target 1
```

| module | role |
|---|---|
| `ocp_pkg` | OCP command/response codes, request and response structs, helpers |
| `ocp_fsm_s` | one per initiator; acts as the OCP slave for it (FSM-S) |
| `ocp_decoder` | inside `ocp_fsm_s`; address to target, legality check |
| `ocp_scheduler` | inside `ocp_fsm_s`; response ordering per tag |
| `ocp_crossbar` | request/response switch, full or partial |
| `ocp_arbiter` | inside `ocp_crossbar`; one per target |
| `ocp_fsm_m` | one per target; acts as the OCP master for it (FSM-M) |
| `ocp_bus` | top level |

The bus's own sockets therefore come in two kinds: `ocp_fsm_s` plays OCP
slave to an initiator, `ocp_fsm_m` plays OCP master to a target. A core that
is both initiator and target simply uses one of each.

## The OCP signals used

A request (`ocp_req_t`) is the OCP request group: `cmd` (MCmd), `addr`,
`data`, `burst_len` (MBurstLength), `single_req` (MBurstSingleReq),
`req_last` (MReqLast) and `tag` (MTagID). It is valid while `cmd` is not
IDLE and the initiator holds it unchanged until the accept signal
(SCmdAccept) is high at a clock edge.

A response (`ocp_rsp_t`) is `resp` (SResp: NULL, DVA, FAIL, ERR), `data`,
`tag` and `resp_last`. It is valid while `resp` is not NULL and is held until
the response-accept signal (MRespAccept) is high at a clock edge.

Commands carried: RD, RDEX, WR, WRNP. Every request gets a response, writes
included (OCP with write responses enabled), so a write counts as done only
once the target has acknowledged it. RDL, WRC and BCST, and single-request
burst *writes*, are answered with ERR.

Default widths: 32-bit address and data, 2-bit tag (4 tags), 5-bit burst
length. They are package parameters in `ocp_pkg`.

## A transaction, cycle by cycle

1. The initiator shows a request. In the same cycle `ocp_fsm_s` decodes the
   address, asks the scheduler whether the tag may go to that target, and
   offers the request to the crossbar. The target's arbiter grants it if the
   target is free (or held by this initiator), and the target's `ocp_fsm_m`
   takes it if its request register and outstanding FIFO have room. If all
   of that holds, SCmdAccept is high in this same cycle.
2. On the next clock edge the request sits in `ocp_fsm_m`'s request register
   and is shown to the target. It stays there until the target accepts it.
   A new request can enter the register in the very cycle the old one is
   accepted, so a target can take one request per cycle.
3. `ocp_fsm_m` records who asked (initiator index and the number of
   responses expected) in a FIFO of `DEPTH` entries. Targets answer in
   request order, so the head of that FIFO always names the initiator of
   the response now shown.
4. The response goes combinationally through the crossbar to that
   initiator's `ocp_fsm_s`, whose scheduler picks among the responses waiting
   from all targets and shows one to the initiator.

So the bus adds one cycle on the request path and none on the response path:
a read accepted from the initiator at clock edge *k* by a target that shows
its data *L* cycles after accepting a request is returned to the initiator at
edge *k + 2 + L*. With no stalls, a target takes one request per cycle, and
up to `DEPTH` of them are in flight before the first response.
SCmdAccept and the response path are combinational through the bus; in a
larger system a register slice would be added at the ports.

## Ordering: tags and the scheduler

This is the part that needs the most care.

OCP's rule is that responses carrying the same tag come back in the order
of their requests, while responses with different tags may overtake each
other. Targets are simple, in-order OCP slaves, so *one target* never
reorders. Reordering happens only between targets: a fast target may answer
request 2 before a slow target answers request 1.

The scheduler in each `ocp_fsm_s` keeps two small tables indexed by tag:
how many responses are still owed for that tag, and which source owes them
(a target index, or the port's own error responder). It enforces a single
rule at **issue** time:

> A request with tag *t* may go to source *s* only if nothing is owed for
> *t*, or everything owed for *t* is owed by *s* as well.

Because one source answers in order, all responses of one tag then arrive
in order without any reorder buffer. Responses waiting at different sources
always carry different tags, so the scheduler can return them in any order;
it uses a round-robin pointer, and once a response is shown it stays chosen
until the initiator accepts it.

The rule also prevents a deadlock a response-side reorder scheme would have.
If initiator A sent tag 0 first to target X and then to target Y, while B
did the reverse, a scheme that held back Y's response until X's arrived could
end with each target's head-of-queue response waiting on the other. Here the
second request is simply not issued until the first one's responses are
back, so every response that reaches an initiator port can be delivered.

The cost: an initiator that reuses a tag for a different target stalls until
that tag drains. Initiators that want overlap across targets should use
different tags, which is what tags are for. A tag also stops taking requests
while `MAX_OUT` (default 32) responses are owed on it; 32 covers the longest
single-request burst (31 beats).

Multi-request bursts need nothing special: each beat is a request of its own
and gets its own response, with `resp_last` on the response to the beat
that had `req_last`.

## Arbitration, bursts and locks

Each target's `ocp_arbiter` uses fixed priority, initiator 0 highest, and
normally decides afresh for every request. That lets a high-priority
initiator cut in between the requests of a lower one, which is why two
mechanisms keep the grant with its owner:

- **Burst hold.** After a beat with `req_last` low, the target stays granted
  to that initiator until its last beat, so the beats of a burst reach the
  target back to back and in one piece.
- **Lock.** An RDEX (exclusive read) locks the target to its initiator until
  that initiator's next write (WR or WRNP, last beat) is accepted. In between
  no one else gets the target, even while the owner is idle. This is the
  read-modify-write protection a low-priority initiator needs.

A lock only affects its own target; the other targets stay available to
everyone.

## Address map and errors

Target *s* owns the region starting at `s << REGION_LSB` (default: bit 28,
i.e. target 0 at `0x0000_0000`, target 1 at `0x1000_0000`). Only the first
`2**SLAVE_SPAN` bytes of a region exist (default 64 KiB). `ocp_decoder`
rejects

- addresses in a region with no target,
- addresses beyond the populated span, including a single-request burst
  whose *last* beat would run past it,
- targets this initiator has no path to in a partial crossbar,
- commands the bus does not carry.

A rejected request is still accepted from the initiator, but it is not
forwarded: the port's own error responder answers it with ERR (one response,
or one per beat of a single-request read burst). These ERR responses obey
the same tag ordering as real ones; the error responder is simply one more
source for the scheduler.

All beats of a multi-request burst go to the target that the first beat
decoded to.

## Partial crossbar

`CONNECT[m][s]` (default all ones) says whether initiator *m* has a path to
target *s*. A zero removes that path's request and response wiring in the
crossbar and makes the initiator's decoder treat the target as nonexistent,
so the removed path answers with ERR instead of hanging.

## Parameters of `ocp_bus`

| parameter | default | meaning |
|---|---|---|
| `NUM_M` | 2 | initiator ports |
| `NUM_S` | 2 | target ports |
| `REGION_LSB` | 28 | address bit that selects the target region |
| `SLAVE_SPAN` | 16 | log2 of the populated bytes per target |
| `MAX_OUT` | 32 | responses owed per tag and initiator before the tag stalls |
| `DEPTH` | 4 | transactions outstanding per target |
| `CONNECT` | all ones | partial-crossbar path matrix, `[NUM_M][NUM_S]` |

The top's status outputs are `s_locked` (target locked), `s_held` (target
held by a burst or a lock) and `m_idle` (no response owed to an initiator).

Clocking: one clock, asynchronous active-low reset `rst_n`. All state resets
to idle.

## Simulation

Each testbench is a self-checking top that prints
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ocp_bus \
  -y rtl -y tb +libext+.sv rtl/ocp_pkg.sv tb/ocp_tb_pkg.sv tb/tb_ocp_bus.sv
./obj_dir/Vtb_ocp_bus
```

Replace the names for the others (`tb_ocp_bus_partial`,
`tb_ocp_bus_scenarios`, `tb_ocp_decoder`, `tb_ocp_arbiter`,
`tb_ocp_scheduler`, `tb_ocp_fsm_s`, `tb_ocp_fsm_m`, `tb_ocp_crossbar`).
Each finishes in well under a second.

| testbench | what it checks |
|---|---|
| `tb_ocp_bus` | the whole bus at its default size, end to end, random traffic (below) |
| `tb_ocp_bus_partial` | the same random traffic on a 3x3 partial crossbar with two paths removed |
| `tb_ocp_bus_scenarios` | one directed run of each transaction type with exact cycle counts (below) |
| `tb_ocp_decoder` | target selection and every error case against a model, 3 targets with one unconnected |
| `tb_ocp_arbiter` | priority, burst hold, lock held while the owner is idle, random traffic against a model |
| `tb_ocp_scheduler` | issue rule, response held until accepted, round robin, drain, random traffic against a model |
| `tb_ocp_fsm_s` | forwarding, burst beats kept on one target, ordering stall, local ERR responses |
| `tb_ocp_fsm_m` | one-cycle request latency, hold until accept, outstanding limit, response labelling |
| `tb_ocp_crossbar` | parallel transfers, contention, missing path, response routing, random against a model |

`tb_ocp_bus` connects two random initiators and two behavioural memory
targets (`tb/ocp_mem_model.sv`, latencies 1 and 7 cycles, random
SCmdAccept stalls) and runs 1000 transactions per initiator: single reads
and writes, multi-request read and write bursts, single-request read bursts,
RDEX/write lock pairs and illegal addresses, with random tags and random
MRespAccept. Each initiator writes only its own half of each target, so a
shadow memory predicts every read. Every response is checked (code, data,
`resp_last`) against a per-tag queue of expected responses, which also
checks the ordering rule. It counts, and requires at least once, each of:
single transfer, both burst kinds, lock, an initiator blocked by another's
lock, an initiator blocked by another's burst, two or more requests
outstanding, a response overtaking an older one, an error response, a
request stall, contention for a target, and two initiators served in the
same cycle.

`tb_ocp_bus_partial` repeats that with three initiators and three targets
(latencies 1, 7 and 3) where initiator 0 has no path to target 2 and
initiator 2 none to target 0; requests over a removed path must come back as
ERR from the initiator's own port, and everything else must work as before.

`tb_ocp_bus_scenarios` walks through the transaction types one at a time on
stall-free targets (latency 1 and 8) and checks their timing exactly: a
single write and read (answered 2 + L edges after acceptance), a 4-beat
write burst taking one beat per cycle and a 4-beat single-request read burst
returning one beat per cycle, a fast target's response overtaking a slow
one's, four pipelined reads all issued before the first response, two
initiators served in the same cycle, a lock keeping out a higher-priority
initiator until the unlocking write, and an ERR response.

The modules also carry assertions for the handshake rules (a request stays
unchanged until accepted, the target only answers requests it was given, a
response is only delivered if it was owed from that source). Run with
`--assert` to enable them.

## Choices made by this design

The architecture (OCP wrappers on both sides, crossbar or partial crossbar,
an arbiter per target, an address decoder with error responses, a scheduler
for out-of-order transactions) follows the original description of this
bus. The following are this design's own:

- port counts, widths, depths and the address map (see the tables above);
- fixed-priority arbitration, and the RDEX-to-write lock protocol;
- the per-tag issue rule of the scheduler and round-robin response return;
- one request register per target and a combinational response path;
- every write is acknowledged by the target.

Not provided:

- single-request burst writes (they need OCP's separate data handshake),
  and the RDL, WRC and BCST commands; all are answered with ERR;
- OCP threads (MThreadID), byte enables, and wrapping or streaming burst
  address sequences: bursts are incrementing, and the addresses of a
  multi-request burst are whatever the initiator sends;
- FAIL responses from the bus itself: it passes on whatever a target returns,
  but the only response it generates on its own is ERR;
- the IP cores themselves. The testbench memory target is behavioural and
  not meant for synthesis.
