# Single wire multi-master bus

This is a serial bus on which any number of nodes share **one wire**, and more
than one of them may act as **master**. A master that wants the wire simply
starts sending once the wire is idle. If two masters start in the same bit
slot, they settle it bit by bit: each reads back every bit it sends, and the
one that sees a bit it did not send drops out. The frame carries the sender's
10-bit priority number early, so the highest priority always wins, and the
winning frame goes through undamaged. So that high-priority masters cannot
starve the rest, every master may win only a fixed number of frames (its
**share**) per cycle. The share depends on its priority rank.

The RTL is synthesizable SystemVerilog with no vendor primitives. A node is
a master and a slave at the same time. As a slave it takes data frames
addressed to it, and it answers read commands by filling in the frame's data
field itself.

## The wire

The wire is held low by a pull-down. A node drives its write line high to
send a 1 and releases it to send a 0. The wire level is therefore the OR of
all write lines (`swmm_bus`):

* idle is 0;
* a 1 from any node wins over a 0 (the "dominant" level);
* two nodes can never drive against each other, so there is no short circuit.

Every node sees the wire level on its own read line. The dominant 1 drives the
arbitration. A master that sends 0 but reads 1 knows that someone else is
sending.

## Frame format

Every frame is 93 bit slots long. Each field is sent most significant bit
first:

| slots  | field | bits | meaning                                      |
|--------|-------|------|----------------------------------------------|
| 0–7    | SOF   | 8    | start of frame / sync, `1010_1011`           |
| 8–17   | MPN   | 10   | master priority number of the sender         |
| 18–27  | SID   | 10   | slave ID of the addressed node               |
| 28     | R/W   | 1    | 0 = data frame, 1 = command (read request)   |
| 29–92  | DATA  | 64   | payload                                      |

There are two kinds of frame:

* In a **data frame** (R/W = 0) the master drives all 93 slots.
* In a **command frame** (R/W = 1) the master drives only slots 0–28. The
  addressed slave drives the 64 data slots with its reply.

Both kinds of frame take the same time on the wire. Every node therefore knows
where a frame ends by counting slots, without any end delimiter. The overhead
is 29 bits per 64-bit payload, a ratio of 0.45. After each frame the wire stays
idle for `IFS_BITS` = 2 slots before the next one may start.

The SOF starts with a 1, so the first slot of a frame lifts the idle wire, and
every receiver hunts for that rising level. A receiver drops a frame whose
first eight slots do not carry the SOF pattern.

## Arbitration, slot by slot

All nodes share one clock and one bit strobe (`bit_timer`, one pulse every
`BIT_CLKS` clocks). At each strobe every node does two things:

1. it samples the wire. This is the level of the slot that has just ended;
2. it loads its write line with its level for the slot that begins.

A master may start at a strobe only when these three things hold:

* its receiver is idle (no frame, no gap);
* the slot that just ended was idle;
* it has a frame ready and a share left.

Two masters that both meet these conditions start in the same slot. They send
identical SOF bits. They then send their MPNs, and at the first MPN bit where
they differ:

```
slot        8 9 10 11 12 13 ...
master A    1 0  1  1  0  1      MPN 10_1101_xxxx   (higher)
master B    1 0  1  1  0  0      MPN 10_1100_xxxx
wire        1 0  1  1  0  1      <- B sent 0, reads 1: B has lost
B drives    1 0  1  1  0  0  0 0 0 ...   (released from slot 14 on)
```

From then on the wire carries A's frame alone, and B's receiver takes it like
any other frame. If A addresses B, B still gets the frame, or answers the
command. B keeps its own frame and tries again as soon as the wire is free.
MPNs are unique, so arbitration is always over by slot 17.

Because 1 is dominant, **a larger MPN means a higher priority**. In
`swmm_top`, node *i* gets MPN 1023 − *i*, so node 0 has the highest priority.

A master never interrupts a frame that is already running. It waits for the
frame and its gap to end, and reports `deferred` for every slot it waits.

## Command frames

When a receiver has read slot 28, it holds the complete header. If R/W = 1 and
the SID is its own, it copies `resp_data` into a shift register and drives the
reply into slots 29–92. The master that sent the command drives nothing in
those slots and shifts them into `rd_data`. It then raises `rd_valid` and
`tx_done` together, in the same clock in which the slave raises `cmd_served`.

If no node has the addressed SID, the master reads 64 zeros.

A node ignores frames that carry its own MPN, so it never answers its own
command.

## Shares and cycles

Take N masters and a constant K:

* a cycle lasts N·K frame times;
* N of those frame slots are reserved, one for each master;
* the remaining R = N·(K−1) slots are shared out, with a base share of
  S = R/N = K − 1.

The master of priority rank *j* (0 = highest) gets

    share(j) = S + (N − 1 − 2j)      i.e.  S+(N−1), S+(N−3), S+(N−5), ...

This way each master gives one slot to every master above it, and the shares
add up to R. A share below 1 is raised to 1, so that every master keeps at
least one frame per cycle.

| N | K | shares by rank     |
|---|---|--------------------|
| 2 | 4 | 4, 2 (the default) |
| 3 | 3 | 4, 2, 1            |
| 4 | 2 | 4, 2, 1, 1         |

`share_manager` works as follows:

* It counts the share down by one for each won frame. For a command this
  happens as soon as its header has won.
* At zero it holds the master back. The node is then a slave only, and the
  master reports `no_share`.
* It reloads the share every N·K·(93 + 2) bit slots.

Each node times the cycle itself, starting from reset. All nodes leave reset
together, so they stay in step.

Take the default bus with both masters loaded all the time. In every cycle
the higher-priority master wins its first 4 frames, and the other master loses
each of those arbitrations. The lower master then sends its 2 frames, and the
wire stays idle until the reload.

## Structure

```
swmm_top
 ├─ bit_timer            bit strobe, one for the whole bus
 ├─ swmm_bus             wired-OR wire with pull-down
 └─ swmm_node  × N_NODES
     ├─ frame_rx         slave: sync search, frame buffer, SID match, reply
     ├─ master_tx        master: wait, send, read back, lose/win, read reply
     └─ share_manager    share formula, count-down, cycle reload
swmm_pkg                 field widths, slot numbers, SOF, frame structs
```

A node's write line is the OR of its master's and its slave's drive. Only one
of them is ever active (an assertion checks this).

## Top-level interface (`swmm_top`)

| parameter   | default | meaning                                        |
|-------------|---------|------------------------------------------------|
| `N_NODES`   | 4       | nodes on the wire                              |
| `N_MASTERS` | 2       | nodes 0..N_MASTERS−1 may be masters            |
| `K`         | 4       | share constant; with N = 2 gives shares 4 and 2 |
| `BIT_CLKS`  | 8       | clocks per bit slot                            |
| `SHARE_W`   | 12      | width of the share counters                    |

The ports are packed arrays indexed by node.

Master side:

* `tx_valid` and `tx_frame` (`{sid, rw, data}`) go in. Hold both stable until
  `tx_done`.
* One-clock pulses come out: `tx_done`, `won`, `lost`, `deferred` and
  `no_share`.
* `rd_valid` and `rd_data` carry the reply to a command.
* `share_left` and `share_reload` show the share state.

Slave side:

* `resp_data` goes in: the word the node returns to a command.
* `rx_valid` and `rx_frame` (`{mpn, sid, data}`) deliver data frames
  addressed to the node.
* `cmd_served` and `cmd_mpn` report an answered command and who sent it.
* `not_for_me` reports a discarded frame, and `sof_error` a bad sync field.

For observation, `bus` is the wire level and `bus_drivers` is the number of
nodes writing 1.

The reset `rst_n` is asynchronous and active low.

Latency: a data frame takes 93 slots, plus 2 idle slots before the next one,
so 95 · `BIT_CLKS` clocks per frame. The master's `tx_done` and the receiver's
`rx_valid` both rise in the clock after the strobe that samples slot 92.

## Where this design makes its own choices

The protocol fixes the following, and the RTL follows them:

* the field widths;
* the order SOF, MPN, SID, R/W, DATA;
* a command frame whose data field the slave fills;
* bitwise read-back arbitration that no one pre-empts;
* the share formula and the cycle of N·K frame times;
* the master and slave procedures.

The following are choices of this design:

* **The electrical convention.** The wire is pulled low and 1 is dominant,
  which makes a larger MPN the higher priority.
* **Bit timing.** The bus has a shared clock and bit strobe, with no clock
  recovery from the wire, and `BIT_CLKS` = 8.
* **The SOF value** `1010_1011`, and the rule that a bad SOF drops the frame.
* **The end of a frame.** A frame always lasts 93 slots, and the 2-slot gap
  follows it. "Bus idle" cannot be told apart from zero data bits on a
  pulled-low wire, so a frame ends on a full buffer.
* **Share reload.** The share is reloaded on a local cycle timer, and never
  falls below 1. The one reserved slot per master is not added on top of the
  share.
* **A won command frame takes a share,** like a data frame. One reading of the
  master flow would decrement the share only for data frames.
* **ID assignment in `swmm_top`.** Node *i* has SID *i* and MPN 1023 − *i*,
  and masters are the first N_MASTERS nodes.
* **Order of the slave's checks.** The slave checks the ID first. A matching
  data frame is delivered and a matching command is answered; everything else
  is discarded.

The 10-bit IDs allow up to 1024 nodes. `N_NODES` and `N_MASTERS` can be raised
that far, since MPN 1023 − *i* stays unique and non-negative. A 1024-node,
1024-master configuration passes a Verilator lint run. The four-node default
has been simulated, and so has a five-node bus with three masters (see below).

## Simulating

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and contains a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/swmm_pkg.sv tb/tb_swmm_top.sv --top-module tb_swmm_top -o sim
./obj_dir/sim
```

Run the testbenches with `+verilator+rand+reset+2` as well. This starts every
register that reset does not clear at a random value.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_swmm_bus`      | wire level and driver count against an OR and a population count |
| `tb_share_manager` | share formula for several N, K and ranks; count-down; no sending at 0; reload exactly 760 slots after reset |
| `tb_frame_rx`      | delivery one clock after slot 92; discard of other IDs and of own-MPN frames; 64-bit replies; bad SOF; busy through the gap |
| `tb_master_tx`     | uncontested frame on the wire; loss at the first differing MPN bit and release of the wire; win against a lower MPN; waiting on a busy wire; holding back without a share; command reply |
| `tb_swmm_node`     | a node answering a command while also being a master; the loser of an arbitration receiving the winner's frame; a slave-only node never sending; shares running out |
| `tb_swmm_top`      | four nodes at default parameters over six share cycles (see below) |
| `tb_swmm_top_3m`   | the same test on five nodes with three masters, N = 3, K = 3: shares 4, 2 and 1 (the last one raised from 0) |

`tb_swmm_top` has two phases, each three share cycles long:

* **Phase 1: both masters always have a frame ready.** Each cycle must show
  exactly 4 and 2 wins, and the lower master must lose at least once.
* **Phase 2: frames arrive at random.**

A scoreboard checks every delivered data frame and every command reply. The
test also requires that each of these happens at least once: an arbitration
loss, waiting on a busy wire, an exhausted share, a reload, a command reply, a
delivery and a discard.

A corrupt sync field cannot occur on the simulated wire. Only `tb_frame_rx`
exercises it.
