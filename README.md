# Distributed shared-buffer NoC router

An output-buffered router is the ideal for a network-on-chip: a flit waits
only for its own output link, and leaves in first-come, first-served order.
Built directly it needs an internal speedup equal to the number of ports,
which no on-chip clock or area budget allows. This router gets close to that
behaviour without speedup. Flits are buffered neither at the inputs nor at
the outputs but in a set of **middle-memory banks** that sit between two
crossbars:

```
 5 inputs ──► input VC buffers ──► XB1 (5 x 10) ──► 10 middle-memory banks ──► XB2 (10 x 5) ──► 5 outputs
                    │                                   ▲          ▲
                    └── RC, timestamper, conflict ──────┘          │
                        resolution, VC allocator,          reservation table
                        credits                            (who leaves when)
```

Each flit is stamped with the cycle in which it would leave an ideal
output-buffered router (its **timestamp**), stored in a bank chosen so that no
two flits collide, and read out of that bank exactly when its timestamp comes
up. Because the network must not drop packets, a flit is only stamped when
the next router has room for it (credit flow control), and buffers are small,
so the router is organised around virtual channels (VCs) and flit-by-flit
flow control.

The router has five ports: north, south, east, west and the local
(injection/ejection) port, numbered 0 to 4 in that order. In its main
configuration each input has 8 VCs of 5 flits, and there are 10 banks of 10
flits: 300 flits of buffering. Flits are 128 bits wide; packets in the tests
are 5 flits long.

## How a flit crosses the router

Six pipeline stages, one cycle each. A head flit that is on `in_valid` in
cycle T appears on `out_valid` in cycle T+6 when nothing is in its way; the
body flits of the packet follow one per cycle.

| cycle | stage | what happens | block |
|---|---|---|---|
| T | link | flit written into the buffer of the VC it names | `vc_fifo` |
| T+1 | RC | the head flit at the front of an idle VC gets its output port (X-Y routing) | `route_compute`, `input_port` |
| T+2 | TS | each input picks one eligible VC at random; the flit gets the earliest free departure time at its output | `timestamper` |
| T+3 | CR / VA | a conflict-free bank and entry are found; a head flit also gets a downstream VC. If either fails the flit returns to TS | `conflict_resolver`, `mm_reservation_table`, `vc_allocator` |
| T+4 | XB1 / MM_WR | the flit crosses XB1 and is written into its bank | `crossbar`, `middle_memory` |
| T+5 (or later) | MM_RD / XB2 | in the cycle equal to its timestamp the flit is read and crosses XB2 | `mm_reservation_table`, `middle_memory`, `crossbar` |
| +1 | LT | output register drives the link | `dsb_router` |

Body flits skip RC: their VC stays routed until the tail flit has left it.

## Timestamps and the two conflicts

This is the part of the design that makes it behave like an output-buffered
router, and the part where most of the cycle-level choices were made.

**Departure times.** The router keeps a free-running cycle counter `now`
(`TS_W` = 8 bits, wrapping). For each output, the timestamper holds `next_ts`,
the earliest departure time not yet handed out. A flit stamped in cycle t can
leave no earlier than t+3 (it still has to pass CR/VA and be written), so
`next_ts` is never allowed to lag behind that. Times are handed out in
increasing order per output, which is first-come, first-served. When several
inputs want the same output in one cycle they are served in fixed priority
order, north first, and get consecutive times.

**Horizon.** A time more than 127 cycles ahead of `now` is refused, and the
flit tries again later. With 8-bit timestamps this keeps every stored time
unambiguous, because a stored time is always within 127 cycles after `now`.
With 100 flits of middle memory the limit is never reached in normal use; the
stress test drives a shrunk router into it on purpose.

**Arrival conflict.** A bank takes one write per cycle, so two inputs resolved
in the same cycle must go to different banks.

**Departure conflict.** A bank gives one read per cycle, so a bank must not
already hold a flit with the same timestamp. Two flits for the same output
never share a time. Two flits for different outputs may share a time, but
then they sit in different banks.

**Finding a bank.** Conflict resolution takes the inputs in the same priority
order. Each input takes the lowest-numbered bank that is not yet used this
cycle, holds no flit with its timestamp, and has a free entry. A flit can clash
with at most P-1 = 4 other arrivals and at most P-1 = 4 banks holding its
timestamp. So 2P-1 = 9 banks always leave a choice as long as banks have
space, and the default of 10 banks keeps one spare.

**Reservation table.** `mm_reservation_table` records, for each entry of each
bank, whether it is taken, its flit's timestamp and its output port. It
answers the conflict queries and lists, each cycle, the entries whose
timestamp equals `now`. Those entries are read from their banks, steered
through XB2 and released. The data itself lives in `middle_memory`.

**Failed flits.** If CR or VA fails, the flit goes back to TS and gets a new
time. The time it was given is not taken back: that output simply stays idle
in that cycle. This keeps times per output in order of assignment. That order
is what keeps the flits of one VC in order.

## Flow control, VCs and the look-ahead

**Credits.** `vc_allocator` keeps a credit counter per output and downstream
VC, starting at the VC depth (5). Committing a flit to a bank spends a credit,
and the downstream router returns it on `credit_in` when the flit leaves its
buffer. A flit is eligible for TS only if its downstream VC has a credit. A
head flit has no downstream VC yet, so it is eligible only if its output's
free list is not empty. Upstream, each input returns one credit on
`credit_out` in the cycle after one of its flits commits.

**VC allocation.** Each output has a free list (a FIFO of downstream VC
numbers, initially 0 to 7) and a reserved pool. A head flit in CR/VA takes the
next VC from the front of the free list. If several heads want one output in
the same cycle, they take consecutive entries in priority order. VCs are
atomic: a downstream VC holds one packet at a time. So a VC goes back to the
end of the free list only once its tail flit has been committed and all its
credits have returned, which means the downstream buffer is empty again. At
most one VC per output rejoins the free list per cycle.

**Look-ahead on a VC.** To move a flit per cycle out of a single VC, TS may
pick the flit *behind* the one that is in CR/VA in that cycle. If the flit
ahead then fails, the flit picked behind it is dropped from the pipeline
(`squash`) and picked again later. Without this it would overtake. The flit
behind a tail is never picked, because it belongs to the next packet and
first needs RC.

## Interface

```
dsb_router #(NUM_VC=8, VC_DEPTH=5, NUM_MM=10, MM_DEPTH=10, TS_W=8)
  clk, rst_n                         asynchronous active-low reset
  cur_x, cur_y       [3:0]           this router's mesh coordinates
  in_valid   [4:0],  in_flit[5]      one flit per input per cycle
  credit_out[5]                      credit_t {valid, vc} to each upstream router
  out_valid  [4:0],  out_flit[5]     one flit per output per cycle (registered)
  credit_in[5]                       credit_t from each downstream router
```

`flit_t` (package `dsb_pkg`) is `{head, tail, vc[3:0], data[127:0]}`. On an
input, `vc` names this router's input VC. On an output, `vc` names the VC at
the next router, chosen by this router. A head flit carries its destination
in `data[3:0]` (x) and `data[7:4]` (y). Routing is X first, then Y. x grows to
the east and y to the north, and a flit at its destination leaves through the
local port. The upstream side must never send a flit on a VC it has no credit
for. The downstream side must return one credit per flit.

After reset every VC is free, every credit is full and `now` is 0.

## Parameters

| parameter | default | origin |
|---|---|---|
| ports | 5 (N, S, E, W, local) | published design |
| `FLIT_W` | 128 | published design |
| `NUM_VC` × `VC_DEPTH` | 8 × 5 flits per input | published main configuration |
| `NUM_MM` × `MM_DEPTH` | 10 banks × 10 flits | published main configuration |
| `TS_W` | 8 bits | this design |
| `COORD_W` | 4 bits (up to 16 × 16 meshes) | this design |
| `VC_ID_W` | 4 bits (up to 16 VCs) | this design |

The smaller published configuration, 5 VCs × 5 flits per input and 5 banks ×
10 flits (175 flits in all), is reached with `NUM_VC=5, NUM_MM=5`. With fewer
than 2P-1 banks, conflict resolution can fail even when there is space. The
design handles this by retrying.

## Files

`rtl/` holds one module or package per file:

- `dsb_pkg.sv`: port enum, flit and credit types, default sizes.
- `dsb_router.sv`: the top. Pipeline registers, eligibility, squash, and the bank and XB setup.
- `input_port.sv`: VC buffers, per-VC packet state, RC, and the credit return.
- `vc_fifo.sv`: one VC buffer, showing its head and the entry behind it.
- `route_compute.sv`: X-Y routing.
- `timestamper.sv`: random VC pick and FCFS departure times per output.
- `conflict_resolver.sv`: bank choice under the arrival and departure rules.
- `mm_reservation_table.sv`: occupancy, timestamps and ports of all bank entries.
- `vc_allocator.sv`: free lists, reserved pools and credit counters.
- `crossbar.sv`: used as XB1 (5 × 10) and as XB2 (10 × 5).
- `middle_memory.sv`: one bank, with one write and one read per cycle.

Each file opens with a description of what it does, its timing, and which
parts follow the published design and which are this implementation's
choices.

## Verification

Every block has a self-checking testbench in `tb/` that compares it against an
independent model and prints `TB_RESULT checks=N failures=M`. The router-level
tests are:

- `dsb_router_tb`: the router at its default size. Random upstream and
  downstream neighbours with credit flow control. It checks that a lone packet
  takes 6 cycles, head in to head out, and leaves back to back. It checks
  X-Y routing, in-order non-interleaved packets per downstream VC, no
  downstream overflow, intact payloads and full delivery. It also requires
  that each internal mechanism fires: FCFS on a shared output, CR/VA
  failure, VA with no free VC, departure and arrival conflicts, look-ahead,
  squash, credit stall, and VC release and reuse.
- `dsb_router_stress_tb`: the same checks on a shrunk router (4 VCs, 9 banks
  of 1 flit, 5-bit timestamps). Here the middle memory fills up, conflict
  resolution finds no bank, and the timestamper refuses times beyond its
  horizon.
- `mesh_workload_tb`: 4 × 4 meshes (`dsb_mesh`, `mesh_endpoint`) of the
  300-flit and the 175-flit configurations under uniform random,
  bit-complement and tornado traffic. It checks delivery and, at low load,
  that what is offered is accepted. It also reports throughput and latency.

Running one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dsb_pkg.sv tb/dsb_router_tb.sv --top-module dsb_router_tb
./obj_dir/Vdsb_router_tb
```

Any other test builds the same way: name its file and its module. Only
`rtl/dsb_pkg.sv` has to be listed, because the rest are found through `-I`.
With `-Wall`, Verilator adds a few style warnings, such as unused parameters. The
default warnings build cleanly.

Timing of the test runs: the router tests take well under a second, and
`mesh_workload_tb` about a minute.

Measured on the 4 × 4 mesh, for 1,500 cycles after a 400-cycle warm-up. Ideal
throughputs come from X-Y channel-load bounds: uniform 0.94, complement 0.5
and tornado 1.0 flits per node per cycle.

| traffic, offered load | 300-flit router: accepted / latency | 175-flit router: accepted / latency |
|---|---|---|
| uniform, 30 % | 31 % / 29 cycles | 31 % / 29 cycles |
| uniform, 90 % | 58 % / 82 cycles | 44 % / 93 cycles |
| complement, 30 % | 31 % / 35 cycles | 29 % / 35 cycles |
| complement, 90 % | 70 % / 100 cycles | 52 % / 147 cycles |
| tornado, 90 % | 90 % / 32 cycles | 91 % / 34 cycles |

Throughput and latency are given as a percentage of ideal and in cycles.

## How far to trust it, and where it departs from the published design

- The block structure, the six stages, the two conflict rules, FCFS
  timestamps with fixed input priority, random VC choice, and free and
  reserved VC lists with credits all follow the published design. Everything
  at cycle level is this implementation's own: widths, flit format, look-ahead
  and squash, not reclaiming failed slots, the horizon, lowest-bank choice,
  atomic VC release, and the rule that a head flit only enters TS while its
  output has a free VC.
- Saturation throughput in the 4 × 4 mesh test is well below the
  94 %-of-ideal reported for the original design, notably under uniform
  traffic. Probing one router of the saturated mesh showed heads waiting for
  a free downstream VC most of the time. Only about 59 % of cycles had a VC
  ready for TS at each input. The likely cause is the atomic VC rule: a VC is
  handed out again only after the downstream buffer has fully drained. This
  was not proven by removing the rule, because releasing VCs earlier also
  needs a per-VC credit check at TS. The original evaluation's mesh size,
  traffic source and simulator details are not known, so the numbers are not
  directly comparable.
- Middle-memory banks are flip-flop arrays with one write port and one
  asynchronous read port. No SRAM macro is modelled.
- The original work targets 3 GHz in 65 nm, with stages balanced by FO4
  estimates. No timing or power analysis was done here. The
  reservation-table search (an associative match over all 100 entries for
  each input) and the chained priority logic in TS and CR are the likely
  critical paths.
- Slots given to flits that then fail CR/VA stay unused. Under heavy
  contention this costs output bandwidth.

## Changing it

Sizes are parameters of `dsb_router`. The VC count may go up to 16
(`VC_ID_W`), and `NUM_MM` may be any value, though at least 2P-1 = 9 is
advised. `TS_W` bounds how far ahead departures may be booked, at 2^(TS_W-1)-1
cycles. Keep that well above `NUM_MM × MM_DEPTH` divided by the number of busy
outputs, or the horizon will throttle the router. Port count and flit width
are package constants. Changing the port count also means changing
`route_compute` and the `port_e` enum.
