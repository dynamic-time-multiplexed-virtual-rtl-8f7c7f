# Dynamic time-multiplexed virtual channels (DTMVC) NoC router

In a classic virtual-channel (VC) router, the highest-priority VC that has traffic takes the
whole link. Lower service levels wait for as long as it keeps sending, even when the
high-priority traffic is comfortably ahead of its deadlines. DTMVC splits time into recurring
frames. A slot table states, for each part of the frame, which VC is currently first in line.
Each VC therefore gets stretches of time at the top of the order. A *performance setting*
(PS0..PS3) decides how much of the frame VC0, the most important service level, keeps for itself:

| setting | VC0 leads | behaviour |
|---|---|---|
| PS3 | 1/4 of the frame | each VC leads one equal quarter: equal latency for all four |
| PS2 | 1/2 | VC0 favoured, the others still move |
| PS1 | about 2/3 | VC0 strongly favoured |
| PS0 | the whole frame | classic VC router: VC0 always first, lower levels can starve |

When VC0 packets arrive late, the router is moved toward PS0. A central monitor can set any
setting.

This repository holds synthesizable SystemVerilog for a five-port mesh router built on this idea,
plus a parameterised mesh of these routers. The router uses XY routing and wormhole switching and
has four VCs per port.

## How a flit gets through a router

```
 link_in[p] ─► input_control ─► 4 × input_vc_channel ─► control register ─► output_port[o] ─► link_out[o]
                  │ (stop lines,       (buffer, XY route,     (best ready VC        (best priority
                  ▼  one per VC)        port request,          of this input)        among inputs)
             stop_out[p]                priority, out port,
                                        flits left)
                            conn_arbiter opens connections   dtmvc_control: frame counter,
                                                             setting, slot table → vc_prio
```

1. **Input control** (`input_control`). Each link carries `{valid, vc, flit}`. The flit is written
   into the buffer of the VC named on the link. One *feedback line* per VC runs back to the
   sender. It is high while that VC's buffer is full, and the sender must not send that VC then.
2. **Per-VC channel** (`input_vc_channel`). When a header flit reaches the head of the buffer, the
   XY route is latched into the *port request* register (one-hot E, W, N, S, L). The header's
   service level goes into the *priority* register, and the packet length into a request length.
3. **Connection set-up** (`conn_arbiter`). Each output port has one wormhole *lane* per VC. A
   request for lane (output, VC) is granted when no connection holds the lane. Inputs competing
   for the same lane take turns (round-robin). The grant loads *out port* and *flits left*
   (header plus payload) into the channel.
4. **Control register** (in `input_port`). Each cycle every input port names one active VC. Of
   the VCs that have an open connection, a buffered flit and a downstream feedback line that is
   low, it picks the one the slot table currently ranks highest.
5. **Output arbitration** (`output_port`). Several inputs may offer flits to the same output. They
   always belong to different VCs, because each lane has a single owner. The output passes the
   flit whose VC ranks highest right now and tells that input to pop it. Each flit sent decrements
   *flits left*. At zero, *out port* returns to zero and the lane is free.

Timing: a header that arrives at cycle t is in the buffer at t+1. Its port request is registered
at the end of t+1 and the grant at the end of t+2, so the header leaves at t+3 at the earliest.
Body flits then move one per cycle. A VC that sends back-to-back packets loses two link cycles
between packets, for request and grant. Another VC can use those cycles (see below).

## The time frame and the slot table

`dtmvc_control` counts a frame of `FRAME_CYCLES` = 20 clocks. The slot table (`slot_table`) has
`ENTRIES` = 8 rows, and each row gives every VC a priority from 0 (first) to 3. The row in use is
`count * 8 / 20`, so the rows last 3, 2, 3, 2, … cycles and each pair of rows fills a 5-cycle
quarter. A row *led* by VC n ranks the VCs n, n+1, n+2, n+3 (mod 4). Below, the VC that leads
each row:

| row | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| cycles of the frame | 0-2 | 3-4 | 5-7 | 8-9 | 10-12 | 13-14 | 15-17 | 18-19 |
| PS3 | 0 | 0 | 1 | 1 | 2 | 2 | 3 | 3 |
| PS2 | 0 | 0 | 0 | 0 | 1 | 1 | 2 | 3 |
| PS1 | 0 | 0 | 0 | 0 | 0 | 1 | 2 | 3 |
| PS0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |

In cycles of a 20-cycle frame, VC0 leads for 5, 10, 13 and 20 cycles at PS3, PS2, PS1 and PS0.
The PS3 and PS0 rows follow the original description of the scheme exactly. PS2 and PS1 are this
design's interpolation: VC0 gains two rows per step, except that at PS1 it gains only one so that
VC1, VC2 and VC3 each keep a row. Because rows last 3 or 2 cycles, at PS1 VC2 leads for 3 cycles
and VC1 for only 2, so VC2 sees somewhat lower latency than VC1 at that setting. The contents come
from the function `lead_vc` in `dtmvc_pkg`. All four tables are constants; when the setting
changes, the whole table register is rewritten in one clock.

**Changing the setting.** A pulse on `late_vc0` lowers the *pending* setting by one step (PS3 → PS2
→ PS1 → PS0, saturating). A write on `ps_wr`/`ps_wr_val` from a monitor replaces it. The pending
value takes effect, and the table is reloaded, at the last cycle of the frame, so every frame runs
under a single setting. Reset selects PS3. Nothing in the router raises the setting again on its
own; that is left to the monitor.

**Idle slots are not wasted.** The order in the slot table is only an order. A VC that leads a slot
but has nothing to send (or is stopped downstream) leaves the link to the next VC in the order. This
is the behaviour the scheme aims for. A strictly slotted variant would leave the link idle instead.
One visible effect: at PS0, VC1 picks up the two idle cycles VC0 leaves between its packets, while
VC2 and VC3 starve completely.

## Measured behaviour

`tb_latency_workload` reproduces the standard experiment for this scheme on three routers in a row. The
VC0..VC3 flows enter the first router from North, West, South and Local. All are addressed to the
third router, use 100-flit packets and start each new packet at once. Latency runs from the moment
a source starts offering a header to the moment the tail arrives (clock cycles, 6000-cycle runs):

| setting | VC0 | VC1 | VC2 | VC3 |
|---|---|---|---|---|
| PS0 | 115 | 5109 (1 packet) | starved | starved |
| PS1 | 171 | 972 | 718 | 1073 |
| PS2 | 217 | 435 | 720 | 1079 |
| PS3 | 426 | 435 | 421 | 428 |

VC0 gets faster as the setting goes down, the other levels get slower, and at PS3 all four are
equal. That is the intended trade-off. The absolute numbers depend on the packet length and the
two-cycle set-up per packet.

## Modules

| file | role |
|---|---|
| `dtmvc_pkg.sv` | constants (5 ports, 4 VCs, 4 settings, 32-bit flits), `port_e`, `header_t`, `link_t`, slot-table generator |
| `vc_buffer.sv` | per-VC flit FIFO, first-word fall-through, `DEPTH` = 8 |
| `xy_routing.sv` | combinational XY route, one-hot port request |
| `input_vc_channel.sv` | buffer plus port request, priority, out port and flits-left registers of one VC |
| `input_control.sv` | writes link flits into the right VC buffer; drives the feedback lines |
| `input_port.sv` | input control, four channels, control register |
| `conn_arbiter.sv` | opens connections per (output, VC) lane, round-robin among inputs |
| `output_port.sv` | per-output crossbar column; slot-table priority picks the flit |
| `slot_table.sv` | 8 × 4 priority table, reloaded for a new setting |
| `dtmvc_control.sv` | frame counter, setting register, slot table |
| `dtmvc_router.sv` | five-port router |
| `dtmvc_noc.sv` | `MESH_X` × `MESH_Y` mesh (default 3 × 3), top level |

**Header flit** (`header_t`): `[31:28]` destination x, `[27:24]` destination y, `[23:22]`
service level (the VC the packet uses), `[21:8]` free, `[7:0]` number of payload flits. Any other
flit is payload. A packet is one header plus 0..255 payload flits.

**Ports of `dtmvc_noc`.** For each router index y·MESH_X+x it has: a local link in and out
(`local_in`, `local_out`), feedback lines in both directions (`local_stop_out` to the injecting
source, `local_stop_in` from the sink), and the setting controls `ps_wr`, `ps_wr_val` and
`late_vc0`. The `ps` and `frame_start` outputs are for observation. North is +y. A source must
keep all flits of a packet on one VC, and it must not send a VC while that VC's stop line is high.
Edge ports are unused, because XY routing never points at them.

## Where this design departs from or goes beyond the original description

- **Intermediate settings.** Only the fully equal (PS3) table and the VC0-always-first (PS0) order
  were specified. The PS2 and PS1 tables above are interpolated.
- **Frame and table sizes.** The example frame is 20 cycles and the example table has 8 rows. They
  are reconciled by mapping cycles to rows as `count*8/20`.
- **Work conservation.** Lower VCs use slots that higher VCs leave idle (see above). The original
  prototype did not yet do this; it was described as the goal.
- **One control block per router.** The example places the slot table inside each input port.
  Here a single counter, setting and table per router serve all ports, because the contents
  would be identical.
- **Chosen, not specified:** the buffer depth (8), the flit width (32), the single-flit header with
  a length field, carrying the VC number on the link, stop-equals-buffer-full flow control,
  round-robin lane arbitration, the rules for changing the setting, reset to PS3, and the mesh size.
- **Not included:** the logic that decides a packet is late (deadlines and a network interface),
  and the central monitor's policy. Both sit outside the router, and their signals are top-level
  ports.

## Simulating

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`. Each also has a
watchdog. Example with plain Verilator, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_dtmvc_noc \
    rtl/dtmvc_pkg.sv rtl/*.sv tb/tb_dtmvc_noc.sv -o sim && ./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_dtmvc_noc` | full 3 × 3 mesh at default parameters: 270 random packets from all local ports, all delivered intact. Counts preemptions, feedback stops, setting changes by late packets and by the monitor, and every setting in use. |
| `tb_latency_workload` | the latency experiment above |
| `tb_dtmvc_router` | one router with four saturating flows. Checks shares per setting, that the link follows the slot leader, the stop line, that a lower VC takes a stopped VC's slot, and lane sharing. |
| `tb_input_port`, `tb_input_vc_channel`, `tb_conn_arbiter`, `tb_output_port`, `tb_dtmvc_control`, `tb_slot_table`, `tb_input_control`, `tb_xy_routing`, `tb_vc_buffer` | unit tests of each block against independent models |

Verilator warns about a few unused signals: the row index output of the control block, the
priority registers the arbiter does not need, the *flits left* values and the free header bits.
Those warnings are expected.
