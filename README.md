# Hierarchical virtual-circuit network-on-chip

A plain 2-D mesh NoC gets slow when a lot of traffic must cross the whole
chip. Every word moves one word per hop, and the long paths fill the same
channels that short local connections need. This design adds a second, coarser
mesh on top of the first. Each of its links is four words wide. A long
connection climbs to the upper mesh near its source, covers three lower-level
hops in one upper-level hop, and comes down near its destination.

Both levels use **virtual-circuit switching**. A connection is a chain of
queues, one queue per switch on its path, chosen before any data move. Each
switch keeps an *address mapping table* that says which queue in the next
switch each of its own queues feeds. Data move queue to queue with a short
request/acknowledge transaction. If the target queue has no room, the sender
keeps the data and sends them again later. Nothing is ever dropped, and there
are no packets, headers or routing decisions at run time.

## Levels and geometry

* **L1** is an `NX x NY` mesh (17 x 17 by default). Links are one 32-bit word
  wide, and each position normally holds an L1 switch and a processing element
  (PE).
* At positions with `x mod 3 == 1` and `y mod 3 == 1`, the PE is replaced by
  an **interchange switch SW_I**. Its local (L) port connects to a **SW_L2**
  switch of the upper mesh **L2**. L2 is `NX2 x NX2` (`NX2 = (NX+1)/3`, so 6 x 6
  by default). The default size therefore has 289 positions, 36 SW_I and 253
  PEs.
* A SW_I at L2 coordinates `(i, j)` keeps only two of its four L1 channels. It
  keeps the vertical pair (N, S) when `i + j` is odd and the horizontal pair
  (E, W) otherwise. The other two channels are cut, and so are the matching
  ports of the neighbouring L1 switches. This alternation lets traffic going
  up or down reach the L2 mesh from both directions across the chip.
* An L1 switch on a kept channel next to a SW_I is called **SW_1I**. Its port
  towards the SW_I is four words wide (R = 4).
* Neighbouring SW_L2 are joined by links carrying four-word flits. Each link
  has two **relay stations** (plain register stages) in each direction.

Direction names: E is +x, N is +y, and L is the local port.

## The switch (`vc_switch`)

One parameterised module serves as all four switch kinds. It has five ports
(E, S, W, N, L), and the buffers sit on the output side.

* Each output port has four **banks**, one for each of the other four input
  ports. There is no U-turn bank.
* Each bank has four **queues**, the virtual channels, in a two-port RAM
  (`vc_buffer_bank`).
* An incoming transfer names its destination output port and queue. It is
  written straight into the bank of that output that belongs to the input it
  came in on.
* Each output port has a transmitter (`link_tx`). It holds the mapping table
  for its 16 queues and a weighted round-robin scheduler (`wrr_scheduler`).
* Each input port has a receiver (`link_rx`). It decides whether the
  destination queue has room and answers on the ack line.

The per-port parameters select the switch kind:

| kind    | port width (words)   | burst (flits)     | relay stations    | queue length (words)                        |
|---------|----------------------|-------------------|-------------------|---------------------------------------------|
| L1      | 1                    | 1                 | 0                 | q = `QUNIT` = 2                             |
| SW_1I   | 4 on the SW_I side   | 1                 | 0                 | Q = qR = 8 in the banks that touch the SW_I |
| SW_I    | 4 on all ports       | 1                 | 0                 | Q = 8                                       |
| SW_L2   | 4                    | 3 between SW_L2   | 2 between SW_L2   | 3Q = 24                                     |

The bank's read and write widths do the **width conversion**:

* A 1-word-in, 4-words-out bank packs four L1 words into one L2 flit.
* A 4-in, 1-out bank unpacks a flit back into words.

A queue only requests its channel when it holds a whole transfer:

* 1 word on L1;
* 4 words on a wide port;
* 12 words (three flits) between two SW_L2.

## The link transaction (`link_tx` / `link_rx`)

A transfer is granted in cycle g. From g, the steps are:

| cycle           | L1 (1 beat, no relay) | L2 (3 beats, 2 relay stations per direction) |
|-----------------|-----------------------|-----------------------------------------------|
| grant           | g                     | g                                             |
| address beats   | g+1                   | g+1 .. g+3                                    |
| data beats      | g+2                   | g+2 .. g+4 (arrive 2 cycles later)            |
| ack seen        | g+2                   | g+6                                           |
| release / keep  | g+3                   | g+7                                           |

A single transfer therefore takes 4 cycles on L1 and 8 cycles on L2.

The ack is 1 when the receiver accepted the whole transfer. The receiver
checks the free space of the target queue when the address arrives. A burst is
accepted or refused as a whole.

The transmitter never takes words out of a queue before the ack comes. It
reads them by an offset from the head and **pops** them only on ack = 1. On
ack = 0 the words stay where they are and are sent again.

Transfers are **pipelined**: a new grant can be given before earlier ones have
their ack, so a busy L1 channel carries one word per cycle. Pipelining makes
ordering the hard part. If a transfer is refused, later transfers of the same
queue may already be on the wire. Two rules keep the words in order:

* After it refuses a queue, the receiver refuses every later transfer for that
  queue until one arrives with the **retry** bit set.
* After a refusal the transmitter waits until nothing of that queue is in
  flight. It then sends that queue's transfers one at a time with retry = 1,
  until one succeeds.

## Scheduling (`wrr_scheduler`)

This is a request-oriented weighted round robin. A queue with weight w may
hold the channel for w grants in a row. The pointer then moves on in circular
order and skips queues that are not requesting, in the same cycle.

Take weights A=1, B=2, C=2, D=1 with all four requesting. The grants come out
as A B B C C D and repeat, so A and D each get 1/6 of the channel and B and C
each get 1/3.

The weight is stored in the mapping-table entry of each queue. The weight
counts flits. On SW_L2 to SW_L2 links one grant covers a three-flit burst and
uses up 3 units of weight. A weight of 3 there gives one burst per turn, and a
weight of 6 gives two. A weight below 3 still earns one burst per turn.

## PE interface (`pe_ni`)

Each PE position has an interface that attaches to the L port of its switch:

* Four source queues that the processor writes one word at a time. They have
  their own mapping table and transmitter.
* Four sink queues that the processor pops.

The processor itself is not part of this RTL. Its side of every interface is
brought out on the top as the `pe_*` arrays, indexed `y*NX + x`.

## Setting up a connection

Every hop of a connection needs one mapping-table entry. You write the entry
through the top's `cfg_*` port, one entry per clock with `cfg_we = 1`:

* `cfg_sel` selects what is written:
  * 0: an L1 switch or SW_I, with `cfg_id = y*NX + x`;
  * 1: a PE interface, with `cfg_id = y*NX + x`;
  * 2: a SW_L2, with `cfg_id = j*NX2 + i`.
* `cfg_out` is the output port, `cfg_bank` the input port whose bank holds the
  queue, and `cfg_q` the queue number.
* `cfg_entry = {valid, dport, dq, weight}`. `dport` is the output port, and
  `dq` the queue, that the data will use in the next switch.

`tb/tb_hier_noc_small.sv` writes three complete example connections in its
`setup` task. It is the quickest reference for the format. `stat_sel`,
`stat_id` and `stat_port` read back the transfer and refusal counters of any
output port.

## Where this design departs from, or goes beyond, its source description

* **Ack polarity.** The description uses both conventions. Here ack = 1 means
  the transfer was accepted.
* **Pipelining and the retry rule** are additions. The description shows only
  isolated transfers. An isolated transfer takes the 4 and 8 cycles it gives.
* **Relay stations** are register stages in both directions, two per
  direction. That count was chosen to give the 8-cycle L2 transfer.
* **SW_L2 queues** are all 24 words. That follows the worked example in the
  description. A general statement elsewhere in it gives the SW_L2 local port
  8-word queues instead.
* **Sizes the description does not give**, chosen here:
  * mesh size: 17 x 17, the smallest that holds the 250-task graphs used in
    the evaluation;
  * word width: 32 bits;
  * weight field: 4 bits;
  * PE interface queues: 8 words;
  * where the SW_I sits inside each 3 x 3 group;
  * port naming.
* **Bank partition.** The number of queues per bank and their length are
  fixed by parameters (`NQ` in the package, the per-bank `QWORDS` in the
  switch). The description lets a designer choose the split of each bank's
  RAM per application. Here that choice is made by rebuilding with other
  parameters, not by a run-time setting.
* **Added logic:** configuration write ports and per-port transfer and
  refusal counters.
* **Not included:**
  * the task-mapping and path-assignment software that computes the tables;
  * the processors;
  * any traffic generator.

## Verification

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`:

* `tb_wrr_scheduler`: the grant sequence against a reference model, including
  the A B B C C D example and the skipping of queues that stop requesting.
* `tb_vc_buffer_bank`: random traffic against queue models for an L1 bank, a
  packing bank and an unpacking bank.
* `tb_relay_station`: the one-cycle delay in both directions.
* `tb_link`: a transmitter and receiver pair on an L1 channel and on an L2
  channel with relay stations and three-flit bursts. Checks:
  * the isolated transfer takes 4 and 8 cycles;
  * words arrive in order under random back-pressure;
  * refusals occur and are recovered.
* `tb_pe_ni`: two interfaces connected back to back.
* `tb_vc_switch`: one switch with a PE interface on each port and five
  connections, including two that share one output. Checks:
  * the grant ratio for weights 1 and 2;
  * delivery in order with slow sinks.
* `tb_hier_noc_small`: end to end on a 5 x 3 L1 mesh with a 2 x 1 L2 mesh.
  This is the smallest mesh with two SW_I of opposite orientation joined over
  L2.
  * Connections: one goes up through SW_I and east over L2, one goes west over
    L2, and one stays on L1 and shares its destination port with the first.
  * Every word is checked. The transfer counts on eleven hops are checked
    against the word counts.
  * It checks that packing, L2 bursts, unpacking, L1 refusals, L2 refusals and
    channel contention each happened at least once.

In one run, the three connections delivered all 192 words in 871 cycles,
with 447 refused L1 transfers, 216 refused L2 transfers and 45 cycles of
contention.

The **largest size simulated is 5 x 3.** At the default 17 x 17 size,
Verilator turns the design into over a thousand C++ files, and building them
takes much longer than a practical run. A 6 x 6 build was also too slow. The
full-size RTL does pass lint and elaboration.

To run a testbench:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_vc_switch.sv --top-module tb_vc_switch
./obj_dir/Vtb_vc_switch
```

Add `-j 4` for the end-to-end test. To try another mesh size, change
`NX`, `NY` and `NX2` at the top of `tb_hier_noc_small.sv`. `NX2` must be
`(NX+1)/3`. Keep `NX` and `NY` at 3k + 2 (5, 8, 11 and so on) or at 3, so
that every SW_I has the neighbours it needs. The test uses positions up to
x = 4 and y = 2.
