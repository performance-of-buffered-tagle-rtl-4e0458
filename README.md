# Buffered Tagle-Sharma switch

A banyan network gives each input-output pair exactly one path, so one
busy or broken switching element is enough to block a packet. The
Tagle-Sharma switch runs two banyan planes side by side. At every stage it
links each element to the element in the same position of the other plane.
A packet that cannot go on in its own plane moves across and continues
there. This RTL adds a small **shared buffer** to every switching element
(SE), so that packets wait instead of being lost when the next element is
busy. Two ways of running that buffer are built in:

* **FIFO**: every packet is stored, and only the oldest one may leave. It
  leaves when the next element has room (back-pressure). If it has waited
  longer than a **deadline** at the head of the buffer, it leaves anyway.
* **Look-ahead**: the same rules, but a packet that arrives at an empty
  buffer skips the buffer when its output terminal is free this cycle and
  the next element has room.

The default configuration is a 32 x 32 switch with 4 packet slots per
element, planes cross-linked, and a deadline chosen at run time (8 cycles is
the suggested value). It is written in synthesizable SystemVerilog and
includes a uniform random traffic source and packet counters. The RTL is
both the switch and the instrument used to measure it.

## Network structure

For an N x N switch there are n = log2 N stages. Each plane has N/2
elements per stage, so each stage has N elements over both planes.

* **Lines and routing.** Each plane is wired as a butterfly. Stage `s`
  looks at bit `n-1-s` of the destination tag, so the first stage uses the
  most significant bit. Element `k` of stage `s` owns two lines:
  * `lo` is `k` with a 0 inserted at bit position `n-1-s`;
  * `hi` is `lo | 1 << (n-1-s)`.

  Tag bit 0 sends the packet out of the upper terminal onto line `lo`. Tag
  bit 1 sends it out of the lower terminal onto line `hi`. After the last
  stage the line number equals the destination, so every path ends at the
  right port whichever plane carried the packet.
* **Links between planes.** Each terminal drives two links: one to the
  element that owns the line in the next stage of the same plane, and one to
  that element in the other plane. Hence:
  * a middle element has four inputs (two lines from each plane) and four
    outputs (4x4);
  * the first stage is 2x4, fed by the input demultiplexers;
  * the last stage is 4x2, feeding the output multiplexers.
* **Ports.** Each input port has:
  * a traffic source (`ts_source`);
  * a 1x2 demultiplexer (`ts_demux`), which places the packet into the
    first-stage element of either plane, or drops it when neither can take
    it.

  Each output port has a 2x1 multiplexer (`ts_sink_mux`). It merges the two
  planes and grants one of them per cycle.
* **Lower bound.** `CROSS = 0` removes the links between planes. Only the
  input demultiplexers then choose a plane, which gives two independent
  (parallel) banyans. This is the weaker network the buffered switch is
  compared with.

## The switching element (`ts_se`)

This is the core of the design and the part that needs the most care.

### Shared buffer

The shared buffer (`ts_shared_buffer`) holds M packets. All inputs of the
element share it, as one first-in first-out queue.

* **Writes.** Up to four packets can arrive in one cycle. They are written
  in a rotating order that starts at a random input, taken from a per-element
  LFSR. They are written until the slots run out. The slot that the head
  frees in the same cycle counts as free.
* **Overflow.** Any packet beyond that is dropped and counted as a loss of
  that stage.
* **Reads.** Only the head can leave, and at most one packet leaves the
  buffer per cycle.

### Choosing where a packet goes

In each cycle the element has at most one candidate per output terminal:

* **Buffer not empty:** the candidate is the head packet, on the terminal
  its tag bit selects. The other terminal stays idle, even if a packet
  behind the head wants it (strict FIFO order).
* **Buffer empty, look-ahead on:** for each terminal, one of the packets
  arriving for it is chosen at random as the candidate to bypass.

A candidate goes to the next element of its own plane if that element is
neither faulty nor full. Otherwise it goes to the element of the other plane
under the same condition. Otherwise it waits (a **stall**). A waiting head
whose deadline has run out is sent anyway, to the own plane unless that
element is faulty. The next element may then overflow. A bypass candidate
that cannot leave is simply stored.

### Flow control and timing

* **Back-pressure.** "Full" means that the occupancy plus the packets now
  arriving reach M. Every input of an element comes from a register, so
  this flag is a combinational function of registers.
* **Overflow is still possible.** Up to four senders look at the same flag
  in the same cycle, so several packets can land in one free slot. These
  losses are real and are counted per stage.
* **Latency.** Output links are registered. A stored packet spends at least
  two cycles in an element (store, then forward). A bypassing packet spends
  one. An unloaded switch therefore delivers in 2n+1 cycles with FIFO and in
  n+1 cycles with look-ahead (11 and 6 cycles at N = 32), counted from the
  cycle the source offers the packet.
* **The deadline.** It is counted in cycles from the moment a packet
  becomes the head. `deadline = 0` switches it off.
* **Last stage.** The deadline does not apply in the last stage. There the
  output multiplexer serves a waiting packet within two cycles.

### Output multiplexer handshake

A last-stage element raises `req` per terminal. The multiplexer answers
`grant` in the same cycle. `req` depends only on the element's state and on
arriving packets, never on `grant`, so there is no combinational loop. When
both planes ask, a token decides and then passes to the other plane.

## Interface of `ts_switch`

| Port | Meaning |
|---|---|
| `lookahead_en` | 1 = look-ahead, 0 = FIFO buffer handling (can change at any time) |
| `deadline[7:0]` | head-of-buffer deadline in cycles, 0 = none |
| `gen_en`, `load_thr[15:0]` | random traffic: each port offers a packet per cycle with probability `load_thr/65536`, destination uniform |
| `ext_valid[N]`, `ext_dest[N]` | inject a chosen packet (overrides the random one) |
| `fault[2][n][N/2]` | marks elements out of service, indexed `[plane][stage][index]`; no packet is sent to them |
| `stats_clear` | zeroes every counter |
| `out_valid[N]`, `out_pkt[N]` | packet leaving each output port |
| `offered`, `input_drops`, `delivered`, `latency_sum`, `latency_max`, `misrouted`, `out_conflicts` | global statistics |
| `st_arrived/dropped/sent/bypassed/crossed/stalled/forced[n]` | per-stage counters (`ts_stage_counter`) |

A packet (`ts_pkg::packet_t`, 32 bits) holds three fields:
* an 8-bit destination tag;
* an 8-bit source port;
* a 16-bit injection time stamp.

Latency is the output cycle minus the stamp, modulo 2^16. Parameters: `N`
(power of two, 4 to 256, default 32), `M` (power of two, default 4) and
`CROSS` (default 1).

Packets can be accounted for exactly. After the switch drains,
`offered = input_drops + delivered + sum(st_dropped)`, and what stage `s`
sends is what stage `s+1` receives.

## How it behaves

These are measured figures from the workload testbench. Throughput is
delivered packets per output port and cycle. Delay is in cycles.

* **Low and medium load.** At 8 x 8 with 8 slots, loss is zero or below
  0.2 % up to a load of 0.6. Look-ahead cuts the mean delay from about 7.3
  to 4.2 cycles.
* **Saturation.** The switch saturates near 0.75 packets per port and
  cycle. The cause is that each element forwards at most one buffered packet
  per cycle, in strict FIFO order (head-of-line blocking). Above saturation,
  the surplus is lost at the inputs and in the stages.
* **Upper vs. lower bound.** The cross-linked network loses fewer packets
  than the parallel-banyan lower bound at high load: 7 % against 14 % at a
  load of 0.8.
* **Look-ahead vs. FIFO.** Look-ahead has the lower delay at every load and
  deadline tried.
* **Buffer size.** Larger buffers raise the delay sharply and throughput
  only slightly. At 8 x 8 and load 0.8, going from 8 to 32 to 128 slots
  moves the FIFO delay from 18 to 43 to 117 cycles and the throughput from
  0.74 to 0.76 to 0.79.
* **Deadline.** With a 32 x 32 switch and 8 slots, the deadline has little
  effect on throughput or delay.
* **Per-stage loss.** Losses grow toward the last stage. There four inputs
  share one buffer drained at one packet per cycle, and the output
  multiplexer serves one plane at a time.

## Where this design makes its own choices

The network, the element sizes, the routing on tag bits with the move to the
other plane, the shared FIFO buffer, back-pressure on "next buffer not
full", the head deadline, the three look-ahead conditions, random choice
among contending packets, the input demultiplexer that drops what the first
stage cannot take, and per-stage counting all follow the switch as
originally described. The following are choices of this implementation:

* **Topology.** Butterfly wiring of each banyan plane. Any banyan with
  destination-tag routing would behave alike.
* **When to cross planes.** A packet also moves to the other plane when its
  own next element is full, not only when it is faulty.
* **Timing.** One packet per output terminal per cycle; two cycles per
  element for a stored packet and one for a bypass; time measured in clock
  cycles. The original measures delay in hops and the deadline in abstract
  time units. One unit is taken here as one cycle.
* **Output multiplexer.** It delivers one packet per cycle and makes the
  other plane wait. The original treats the sink as always able to accept.
* **Non-random arbiters.** The input demultiplexer alternates between planes
  and the output multiplexer uses a passing token. Only the switching
  elements choose at random, using 32-bit LFSRs.
* **Statistics.** Packet format, counter widths, the extra statistics
  (bypass, plane crossing, stall, forced departure, output conflicts) and
  the static fault map.

Measured throughput saturates near 75 % and loss exceeds 1 % at high load.
The original reports about 99 % throughput and under 1 % loss. Its
definition of throughput and the speed of its elements are not known in
enough detail to reproduce, so the numbers above are only those of this
RTL.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=... failures=...`.
For example:

```
verilator --binary --timing --assert -Irtl rtl/ts_pkg.sv tb/tb_ts_switch.sv \
          --top-module tb_ts_switch -o sim && obj_dir/sim
```

Add `-Itb` for `tb_ts_workloads`, which uses the helper module `tb_ts_runner`.

| Testbench | What it covers |
|---|---|
| `tb_ts_switch` | the full 32 x 32, M = 4 switch. Checks single packets (routing, 11- and 6-cycle latency), both schemes under random load, heavy load with a short deadline, two faulty elements, exact packet accounting, and that bypass, stall, plane crossing, forced departure, overflow, input loss, output conflict and mode switching all occur |
| `tb_ts_workloads` (with `tb_ts_runner`) | load vs. loss for upper and lower bound, delay and throughput vs. deadline, delay vs. buffer size, loss per stage; prints the table summarised above |
| `tb_ts_se` | one element: FIFO and bypass timing, plane fallback, stall, deadline, fault avoidance, overflow, order |
| `tb_ts_shared_buffer`, `tb_ts_demux`, `tb_ts_sink_mux`, `tb_ts_source`, `tb_ts_stage_counter` | the smaller blocks against reference models |

Building `tb_ts_switch` takes about a minute and a half with Verilator.
`tb_ts_workloads` holds five switch instances and takes about three
minutes. Both run in seconds.

To change the configuration, override `N`, `M` or `CROSS` on `ts_switch`.
Buffer handling and deadline are inputs and need no rebuild.
