# A NoC switch with tightly coupled mesochronous synchronizers

In a large chip the network-on-chip can run at one frequency everywhere
while giving up on a low-skew clock between switches: each switch (or
group of switches) gets its own clock subtree, and neighbouring switches
see the same clock with an unknown but constant phase offset. Such links
are *mesochronous*. They need a synchronizer, but not a full dual-clock
FIFO.

The usual answer puts a small synchronizer in front of the switch and
keeps the switch's own input FIFO behind it, which costs latency and a
lot of buffer area, because the FIFO must grow to cover the longer
stall/go round trip. This design instead *merges* the synchronizer into
the switch: the synchronizer's three front-end latches **are** the input
buffer. One structure synchronizes the link, buffers up to three flits
and does stall/go flow control, and the switch's arbiter and crossbar
read the latches directly. The first register after a mesochronous input
is the output buffer.

The RTL is SystemVerilog-2017, synthesizable, and uses real level-sensitive
latches where the synchronizer needs them.

## The synchronizer as an input buffer

```
            upstream sender (strobe domain)  |  switch (clk domain)
                                             |
 in_flit ──┬──► L_0 ─┐                       |
           ├──► L_1 ─┼──► 3:1 mux ───────────┼──► rx_flit ──► arbiter / crossbar
           └──► L_2 ─┘      ▲                |
             ▲ enable_0..2  │ select         |
   in_strobe ─► front-end   back-end ◄───────┼─── clk, advanced by rx_pop
             counter        counter          |
                                             |
 in_stall ◄── go reg ◄── mux ◄── CTR_0..2 ◄──┼─── written after each pop
             (strobe)   (strobe)  latches     |
```

*Front end.* The sender forwards its clock (`in_strobe`) together with the
flits. A one-hot ring counter clocked by the strobe (`ring_counter`) points
at one of three latches (`latch_bank`). When a flit is pushed, that latch
is transparent during the low half of the strobe cycle, so the flit
settles in it, and the counter moves on at the next rising strobe edge.
The latch then holds the flit for as long as the slot is not rewritten.
This long window of stable data is what makes any phase offset workable,
and it removes the need for a phase detector.

*Back end.* A second ring counter, clocked by the switch clock, selects one
latch through a 3:1 mux. The mux output is the head-of-line flit of the
input port. In the original, loosely coupled form a flip-flop sits after
the mux and an input FIFO after that. Here neither exists: the flit stays
in its latch until the switch grants it (`rx_pop`), and only then does the
back-end counter advance.

### Knowing whether a slot is full

The front and back counters no longer step in lockstep: the writer stops
when the switch stalls, and the reader stops when the writer is idle. A
plain valid bit per latch cannot tell a new flit from one already read.
So each latch also stores a **phase bit**:

- the writer keeps one phase bit per slot and flips it each time it writes
  that slot; the bit written into the latch is the new value;
- the reader keeps its own phase bit per slot and flips it each time it
  pops that slot;
- a slot holds an unread flit exactly when the latch's phase bit differs
  from the reader's.

`rx_valid` is therefore a single comparison at the mux output. No
counter values cross between clock domains, only latched bits that were
written at least half a cycle before anyone relies on them.

### Stall/go back to the sender (`meso_ctrl_sync`)

The permission to write travels the other way through a one-bit copy of
the same structure. After the switch pops slot *i*, control latch *i* is
written with the reader's new phase bit for that slot. This happens in the
low half of the next switch-clock cycle: the pop is registered first, so
a grant that settles late in a cycle can never cut a latch pulse short. On
the sender side, a ring counter that steps with every push selects, through
a mux, the control latch of the slot that will be written next. Its
content is compared with the writer's phase bit for that slot. The result
is registered on the strobe edge as `go`, and `in_stall = !go` goes back
to the sender. It is stall/go in the sender's own clock domain: a flit
moves on a strobe edge where `in_valid` is high and `in_stall` is low.

Timing budget: a flit written in strobe cycle *n* is visible to the switch
from the middle of cycle *n*. It is popped at the first switch edge after
that, at most 1.5 cycles later. Its control latch is rewritten at most
half a cycle after the pop. The sender checks that slot again at the edge
that starts cycle *n+3*. Three slots are therefore enough for one flit per
cycle at every phase offset. The tests confirm this.

### What is taken from the original proposal and what is not

Taken from it: the three-latch front end written in rotation under the
sender's strobe; the counter-driven 3:1 back-end mux in the receiver
domain; dropping the back-end flip-flop and using the latches as the
switch input buffer; a mirrored latch-based synchronizer for the backward
flow-control bit; resetting both counters from the receiver's reset;
stall/go flow control; synchronous and mesochronous ports in one switch;
the 32-bit data path.

This design's own choices:

- which strobe phase opens the latches (the low half);
- the phase-bit encoding of slot state and of the control latches;
- registering the pop and the `go` decision;
- both pointers starting at slot 0 after reset.

The original, free-running synchronizer starts its reader one slot behind
its writer. With per-slot state that offset is not needed.

Not included: the loosely coupled arrangement, which the integrated
design is measured against. There, the synchronizer keeps its output
flip-flop and feeds a separate input FIFO of at least four slots.

## The switch around it (`noc_switch`)

- **Ports.** `N_PORTS` inputs and outputs (default 4). Bit *i* of
  `MESO_PORTS` (default all ones) makes input *i* a mesochronous
  `tc_input_port`. A 0 makes it a synchronous `sync_input_buffer`: a
  2-slot flip-flop FIFO with stall/go, clocked by the switch clock, whose
  `in_strobe` is unused.
- **Flits.** `noc_pkg::flit_t` is `{head, tail, data[31:0]}`. The head
  flit's two low data bits name the output port. The switch shifts a head
  flit's data right by `ROUTE_W` bits as it forwards it, so a multi-hop
  source route can be packed into the head flit.
- **Arbitration.** One `rr_arbiter` per output. It grants round robin,
  and a packet keeps the output from its head flit to its tail flit
  (wormhole switching).
- **Crossbar.** `crossbar` is one AND-OR mux per output, driven by the
  one-hot grant rows.
- **Output buffers.** `output_buffer` is a 2-flit FIFO per output
  (`OUTBUF_DEPTH`) with stall/go (`out_stall`) from the next hop. The
  output link is launched from its registers, and `out_strobe` forwards
  the switch clock, so the next switch can use it as its strobe.

A flit taken by a mesochronous port crosses the crossbar at the first
switch edge after it settled in its latch. It is on `out_flit` right
after that edge. Every input/output pair sustains one flit per cycle.

Routing, flit framing, arbitration policy, port count and output depth
are not part of the synchronizer proposal and were chosen here.

## How far to trust it

- **Latches.** The synchronizer depends on real latches and on timing:
  a flit must have settled in its latch before the receiver's mux window
  closes. The published analysis reports that the integrated version
  keeps a safe hold margin at all offsets, but loses setup margin when
  the receiver clock leads by almost a full period. It fails near -95%
  skew, because arbitration and crossbar delay now sit between latch and
  register. A zero-delay RTL simulation cannot show this. Check the
  latch paths with static timing analysis and constraints suited to
  latches.
- **Simultaneous edges.** The testbenches step the phase offset through
  0–90% of the period in 10% steps; a lag of 90% is the same as a lead of
  10%. At 0% and 50%, strobe and switch-clock edges fall in the same
  instant. The design passes there too. Each side only ever moves a
  slot's state one way (the writer from free to busy, the reader from busy
  to free), so a race resolved either way costs at most a cycle. A zero-delay
  simulator is not evidence about metastability.
- **Reset.** The switch reset also clears the strobe-domain half of each
  port, asynchronously. Release reset while the upstream sender is idle.
- **Synthesis.** Synthesis infers `4 × (3 × 35 + 3)` latch bits for a
  default switch. These latches are intended.
- **Assertions.** Assertions check handshake rules inside the blocks:
  one-hot pointers, pop only when valid, push only with go, no output
  overflow, one-hot grants.

## Files

| file | content |
|---|---|
| `rtl/noc_pkg.sv` | flit type, slot count, route-shift function |
| `rtl/ring_counter.sv` | one-hot rotating pointer (front-end / back-end counters) |
| `rtl/latch_bank.sv` | the three latches, written in rotation |
| `rtl/meso_data_sync.sv` | data synchronizer: latches, two counters, mux, phase bits |
| `rtl/meso_ctrl_sync.sv` | backward flow-control synchronizer |
| `rtl/tc_input_port.sv` | tightly coupled input port = data + control synchronizer |
| `rtl/sync_input_buffer.sv` | 2-slot input buffer for synchronous ports |
| `rtl/rr_arbiter.sv` | round-robin wormhole arbiter |
| `rtl/crossbar.sv` | crossbar |
| `rtl/output_buffer.sv` | output FIFO |
| `rtl/noc_switch.sv` | the switch (top) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_noc_switch_mixed` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv tb/tb_noc_switch.sv \
          --top-module tb_noc_switch -o sim
./obj_dir/sim
```

- `tb_noc_switch` runs the default switch (four mesochronous inputs,
  with strobes 0, 3, 5 and 9 ns behind a 10 ns switch clock). It first
  sends a permutation of 8-flit packets without stalls, and checks that
  every output delivers one flit per cycle and that the first flit
  arrives within 3 cycles. It then sends about 1600 random packets with
  random output stalls. A scoreboard checks every flit for loss,
  duplication, order and corruption. The test also counts sender stalls,
  output stalls, contention and wormhole holds, and fails if any of them
  never happens.
- `tb_full_bandwidth` streams four parallel flows, one per output, with
  a high-toggle data pattern. It sweeps every input over all phase
  offsets and checks one flit per cycle on every output with no stall.
- `tb_switch_chain` joins two switches whose clocks are offset by 20%,
  50% and 80% of a period. The first switch's output link, with its
  forwarded clock, feeds an input of the second. Packets cross both
  switches under random stalls, and the test checks every flit and the
  two-hop route.
- `tb_noc_switch_mixed` runs the same traffic through a switch with two
  synchronous and two mesochronous inputs.
- `tb_tc_input_port` sweeps the phase offset and checks both the order of
  flits and the full rate.
- The other testbenches test each block on its own against a reference
  model.

To change the switch, override `N_PORTS`, `MESO_PORTS` or `OUTBUF_DEPTH`.
The number of latch slots (`noc_pkg::NSLOTS`, 3) is what the timing
argument above relies on. Fewer slots lose full rate. More slots are legal
but gain nothing.
