# mSMCB: a buffered-crossbar packet switch with shared crosspoint memory

A buffered crossbar switch puts a small buffer at every crosspoint. Each input
can then send a cell as soon as a buffer has room, and each output picks from
its own column of buffers. No central matching is needed. The cost is memory.
To keep a flow at full rate, each crosspoint must hold a round trip's worth of
cells, RTT cells. That comes to N·N·RTT cells on one chip.

This switch shares each crosspoint buffer among **M consecutive inputs**
(default M = 2). The crossbar therefore holds N·N/M shared buffers of KS cells
each. A single flow at port rate can use the whole buffer, so KS ≥ RTT is
enough for one flow, and the total memory drops by a factor of M.

Two writers per buffer would normally need memory speedup. Instead, an
**input-access scheduler** per group of M inputs matches inputs to buffers
every slot. Each buffer then sees at most one write and one read per slot.

The RTL is SystemVerilog, written for synthesis:

* a 32-port switch (N = 32, M = 2, KS = 2) with line cards, link delays and
  the crossbar;
* optional strict-priority traffic classes (P);
* a bank of sharing control units that computes the buffer partition of the
  speedup-2 variant (SMCB×2) from the same live queue occupancies.

## Parts and where they sit

```
 arrivals ─► smcb_input_port ─► delay_line(D1) ─► ┌──────────── smcb_crossbar ─────────────┐
 (per port)  N·P VOQs, sends the      uplink       │ smcb_addr_decoder (per input)          │
             granted VOQ's head cell  (cell+req)   │ smcb_ias      (per group of M inputs)  │
                                                   │ smcb_smb      (per group × output)     │
 departures ◄─ smcb_input_port ◄─ delay_line(D2) ◄─│ smcb_output_arbiter (per output)       │
                                       downlink    └────────────────────────────────────────┘
                                       (cell+grant)
 smcb_top = smcb_switch + N/2 × N smcb_scu (SMCB×2 thresholds, status outputs)
```

| File | Role |
|---|---|
| `rtl/smcb_pkg.sv` | cell, uplink and downlink structs; port, class and payload widths |
| `rtl/smcb_top.sv` | top level: the switch plus the sharing-control bank |
| `rtl/smcb_switch.sv` | line cards, link delays and the crossbar, wired per port |
| `rtl/smcb_input_port.sv` | line card: VOQs, arrival notices, sending granted cells |
| `rtl/delay_line.sv` | link delay of D1 or D2 slots |
| `rtl/smcb_crossbar.sv` | switch fabric: decoders, schedulers, shared buffers, output arbiters |
| `rtl/smcb_addr_decoder.sv` | steers an incoming cell to its buffer; extracts the request |
| `rtl/smcb_ias.sv` | input-access scheduler of one sharing group |
| `rtl/smcb_smb.sv` | one shared buffer, holding one logical queue per sharing input |
| `rtl/smcb_output_arbiter.sv` | round robin over the N logical queues of one output column |
| `rtl/rr_arbiter.sv` | combinational round-robin picker used by the schedulers |
| `rtl/smcb_scu.sv` | sharing control unit: two VOQ occupancies in, two credit thresholds out |

## One clock is one time slot: the life of a cell

Everything is clocked once per cell time. A cell that arrives at input i in
slot t and is addressed to output j goes through these steps:

| Slot | Event |
|---|---|
| t | Cell stored in VOQ(j) of line card i. An arrival notice (request) leaves on the uplink in the same slot. |
| t+D1 | The request reaches the scheduler of i's group and increments the request counter rc[i][j]. |
| t+D1+1 | The scheduler matches (one slot) and registers a grant. |
| t+D1+2+D2 | The grant reaches line card i, on the downlink of port i. The card sends the head cell of VOQ(j) on the uplink that slot. |
| t+2·D1+2+D2 | The cell is written into buffer SMB(group, j), in the logical queue of input i. |
| t+2·D1+3+D2 | Output j's arbiter picks it and frees its slot (one slot). |
| t+2·D1+4+2·D2 | The cell leaves line card j. |

The idle-switch latency is **2·D1 + 2·D2 + 4** slots. That is 8 at the
defaults D1 = D2 = 1.

A buffer credit is taken when the grant is issued and returned when the
output arbiter reads the cell. Its round trip is therefore

  **RTT = D1 + D2 + 2 slots** (4 at the defaults).

A single flow at port rate gets **min(1, KS/RTT)** of the port. At the defaults
that is ½. With KS = 4 it is the full rate. Both are checked in simulation.
Because scheduling and output arbitration take one slot each, RTT cannot be
lower than 2 here.

Grants ride on downlink words and requests on uplink words. Port p's downlink
carries output p's departing cell and input p's grant together, so no extra
wires are needed.

## The input-access scheduler (`smcb_ias`)

This is the part of the design that is hardest to follow. There is one
scheduler per group of M inputs. It owns the N buffers SMB(q, 0..N-1) of that
group.

**State:**

* Request counters `rc[i][j][p]`: cells that input i has announced for
  output j in class p, but which have not yet been granted. The counters mirror
  the VOQs, so the line card makes no decision of its own.
* Credit counters `cred[j]`: cells granted into buffer j and not yet read out
  by output j. A buffer is eligible while `cred[j] < KS`. A read in the current
  slot also counts, so a buffer freed this slot can be granted again at once.
  Credits count cells that are still in flight, which a simple "buffer full"
  flag would miss. This is what makes overflow impossible.
* Round-robin pointers: one grant pointer per buffer, `gp[j]`, over the M
  inputs, and one accept pointer per input, `ap[i]`, over the N buffers.

**Matching** is request–grant–accept with ITERS = 2 iterations:

1. Every unmatched input requests every eligible, unmatched buffer for which
   it has cells waiting.
2. Each buffer grants one requester in round-robin order from `gp[j]`.
3. Each input accepts one grant in round-robin order from `ap[i]`.

The second iteration only uses inputs and buffers left unmatched by the
first. As in iSLIP, the pointers move one place past the matched partner, and
only for first-iteration matches. That keeps the pointers desynchronised.
Grants are registered and carry the output and the class.

**Classes** (parameter P, default 1; class 0 is the highest):

* Each request is tagged with the best class that the input has waiting for
  that output.
* A buffer grants only among requests of the best class on offer. Round
  robin applies within that class.
* An input accepts only among grants of its best class.
* Shared buffers and output arbiters ignore the class. A cell that is already
  in the crossbar leaves in arrival order.

**Longest queue first** (parameter LQF, default 0). With LQF = 1, an input
accepts the granting buffer whose VOQ holds the most ungranted cells. It does
this within its best class, and the accept pointer only breaks ties. Buffers
still grant round robin. Output arbiters stay round robin too, since they
cannot see VOQ lengths.

## The shared buffer (`smcb_smb`)

One buffer of KS cell slots holds M logical queues, one per sharing input.
Each queue is a linked list. A third list links the free slots through the
same next-pointer array, so any input may use any slot and no static split is
needed.

Each slot allows one write (the matched input's cell) and one read (the output
arbiter's pick). A write into a full buffer in the same slot as a read reuses
the slot being freed. The switch never needs this, because credits already
cover cells in flight, but the buffer supports it and its testbench exercises
it.

Assertions stop simulation on overflow and on a read of an empty queue.

## Output arbitration (`smcb_output_arbiter`)

Output j sees the head cell of each of the N logical queues in its column:
N/M buffers with M queues each. It picks one per slot by round robin. The
pointer moves one place past the winner. The read pops that queue in the same
slot, and the chosen cell is registered toward the downlink of port j.

## Sharing control for the speedup-2 variant (`smcb_scu`, in `smcb_top`)

In the SMCB×2 variant there is no scheduler in front of a buffer. Instead,
the buffer is split between its two inputs, and each input runs ordinary
credit flow control against its share.

For every pair of inputs (2g, 2g+1) and every output j, a sharing control unit
takes the two VOQ occupancies Za and Zb and sets the thresholds Ca and Cb
(R = RTT, h = ⌊R/2⌋):

| Za | Zb | Ca | Cb |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| > 0 | 0 | min(Za, R) | 0 |
| 0 < Za ≤ h | 0 < Zb ≤ h | h | h |
| > h | 0 < Zb ≤ h | R − Zb | Zb |
| > h | > h | h | h |

The remaining rows mirror these with a and b swapped. The output is
registered, one slot after the occupancies it comes from, and Ca + Cb ≤ R
always holds.

In `smcb_top` these thresholds are status outputs (`scu_cmax[i][j]`). They do
**not** gate the mSMCB switch, which admits cells through its scheduler and
fixed credits. The speedup-2 switch that would act on them is not part of this
RTL. It would need a rule, which is not specified, for credits already in use
when a threshold drops.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| N | 32 | ports; must be a multiple of M (even for the SCU bank) |
| M | 2 | inputs sharing one crosspoint buffer |
| P | 1 | traffic classes (3 for differentiated service) |
| KS | 2 | cells per shared buffer |
| D1, D2 | 1, 1 | uplink and downlink delay in slots (RTT = D1 + D2 + 2) |
| VOQ_DEPTH | 8 | cells per VOQ; a full VOQ drops `arr_ready` |
| ITERS | 2 | matching iterations |
| LQF | 0 | 1: inputs accept longest queue first instead of round robin |

A cell (`cell_t`) is a class, a source port, a destination port and a 32-bit
payload word that stands for the cell body. Reset is synchronous and active
low (`rst_n`). It empties every queue, counter and pointer.

## Where this departs from the evaluated switch

* **RTT.** RTT is at least 2 slots, so the RTT = 1 configuration cannot be
  set. RTT = 3 and RTT = 7 come from D1 + D2 = 1 and D1 + D2 = 5.
* **VOQs.** VOQs are bounded (VOQ_DEPTH) and backpressure arrivals. The
  performance study treats them as unbounded.
* **Queue length for LQF.** LQF measures a queue by its ungranted cells. Cells
  already granted but still in the VOQ are not counted.
* **Odd port counts.** These are not supported. (The evaluated design gives
  the leftover port dedicated half-size buffers.)
* **Other switches from the same study, not included here:**
  * the SMCB×2 switch itself, beyond its sharing control units;
  * the multicast SMCB and output-shared SMCB (O-SMCB) switches;
  * the load-balanced CICB switches;
  * the memory-memory-memory Clos-network switches.

## Simulating

Verilator 5, from the repository root. The package must come first:

```
verilator --binary --timing --assert rtl/smcb_pkg.sv $(ls rtl/*.sv | grep -v pkg) \
    tb/tb_smcb_switch.sv tb/smcb_switch_env.sv --top-module tb_smcb_switch -o sim
./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_delay_line` | a 3-stage delay against a history of driven words; a 0-stage line is a wire |
| `tb_smcb_addr_decoder` | one-hot write select gated by cell valid; request fields |
| `tb_smcb_smb` | linked-list buffer against per-queue reference FIFOs, free-slot count, full-buffer bypass |
| `tb_smcb_ias` | scheduler against a slot-by-slot reference model of the strict-priority request–grant–accept match with credits (P = 3), round-robin and longest-queue-first accept |
| `tb_smcb_output_arbiter` | round-robin order and pointer update |
| `tb_smcb_input_port` | VOQs per output and class, notices, granted head cell, occupancies |
| `tb_smcb_crossbar` | fabric alone: lone-cell latency 4, single-flow rate, random traffic through a scoreboard |
| `tb_smcb_scu` | every threshold row against a reference |
| `tb_smcb_switch` | 4-port top level, three configurations (below) |
| `tb_smcb_switch_full` | top level at its defaults |
| `tb_smcb_workloads` | 8-port top level under the evaluation traffic models (below) |

**`tb_smcb_switch`** runs three configurations: KS = 2; KS = 4 with LQF; and
KS = 2 with P = 3. Each goes through these phases:

* idle latency;
* single-flow rate;
* two inputs sharing one buffer;
* uniform load 0.7;
* an output hotspot;
* with P = 3, a strict-priority phase, where a low-class input gets nothing
  while a high-class input is backlogged.

The scoreboard is per flow and class. The bench also checks every sharing
threshold against a reference, and counts each mechanism: VOQ stalls, full
buffers, shared buffers, second-iteration matches, output contention and
split partitions. A mechanism that never occurs counts as a failure.

**`tb_smcb_switch_full`** runs the top level with no parameter overrides:
32 ports, idle latency 8, then about 10,000 cells of uniform traffic at load
0.8, all delivered in order.

**`tb_smcb_workloads`** offers each traffic model at full load to an 8-port
switch (KS = 2, RTT = 4) and measures the delivered throughput:

| Model | Throughput |
|---|---|
| uniform | 0.95 |
| unbalanced, w = 0.5 | 0.68 |
| unbalanced, w = 1 | 0.50 |
| diagonal, d = 0.25 | 0.55 |
| diagonal, d = 0 | 0.50 |
| power-of-two | 0.66 |
| bursts of mean 10 cells, load 0.8 | 0.53 |

The bench checks only the two single-flow cases, where KS/RTT = ½ is exact.
The other numbers show the design's main limit: a flow at port rate is held
to KS/RTT, so a buffer smaller than the round trip costs throughput. Long
bursts to one output behave the same way. Raising KS to RTT (KS = 4 here)
lifts a single flow to full rate.

KS = 1 also works. It has been simulated at 4 ports with all cells delivered
and a single flow at ¼.

