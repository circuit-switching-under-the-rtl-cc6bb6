# REACToR: a hybrid circuit/packet top-of-rack switch in SystemVerilog

A top-of-rack switch faces two networks. The first is an optical circuit
switch (OCS): fast, cheap per bit and without buffers, but it takes tens of
microseconds to change which port talks to which. The second is an
electrical packet switch (EPS): it switches each packet on its own but has a
fraction of the capacity. REACToR uses both. It makes no attempt to buffer
circuit-bound traffic in the switch. Instead, each host keeps one queue per
destination, and the switch uses standard 802.1Qbb priority flow control
(PFC) frames to tell the host exactly when to drain each queue. For each
circuit configuration of a precomputed schedule, the switch does three things:

1. It reconfigures the OCS.
2. It unpauses, on every host, the queue whose destination the new circuit
   reaches, so that queue goes out at line rate onto the circuit.
3. It pauses that queue again just before the circuit is torn down.

Everything else a host sends in the meantime goes out over the EPS: the
always-open EPS class, and traffic for destinations without a circuit. The
circuits are switched "under the radar" of the hosts' transport protocols.

This repository holds the switch side of that scheme for a four-port
prototype at 10 Gb/s per port. It has the per-port classifiers, the circuit
and rack-local crossbar, the downward-port multiplexers, the PFC frame
generators, the double-buffered schedule, the controller that runs it, and a
frame timestamp recorder.

## Datapath conventions

- A stream is a `beat_t` (64 data bits, 8 byte-keep bits, `last`) with a
  valid/ready pair.
- One beat moves per clock. At 156.25 MHz (6.4 ns) that is 10 Gb/s, and one
  clock is also the timestamp tick.
- Byte 0 of a frame is `data[7:0]` of its first beat.
- FCS and preamble belong to the MACs outside this design. Frames here run
  from the destination address to the end of the payload.
- The traffic class of a frame is the priority code point (PCP) of its
  802.1Q tag.
- Classes 0..6 name circuit destinations. Class 7 (`EPS_CLASS`) is the
  class that always goes to the EPS. Untagged frames also go to the EPS.

All shared types and sizes are in `rtl/reactor_pkg.sv`: `N_PORTS` = 4,
eight classes, a 24-port OCS, 32-bit durations and 48-bit timestamps.

## One host port

```
host_rx[p] -> classifier -+- circuit path -> circuit_xbar -+-> cup_tx[k]   (into the OCS)
                          |                                +-> local port k
                          +- EPS path ------------------------> eup_tx[p]
cup_rx[p], eup_rx[p], local traffic, PFC frames -> downlink_mux -> host_tx[p]
```

**classifier**: makes one decision per frame. The frame takes the circuit
path only if the controller has the port's circuit lit (`circ_en`) and the
frame's PCP equals the class that circuit serves (`circ_cls`); every other
frame goes to the EPS uplink. The PCP is in the second beat, so the
classifier holds one beat; the added latency is one beat and the throughput
stays at line rate. The classifier also reports each frame, with its class,
path and tag flag, to the recorder.

**circuit_xbar**: sends each source's circuit frames either to a circuit
uplink, which enters the OCS, or straight to another downward port of the
same rack. The choice comes from the `port_cfg_t` of the current
configuration: `valid`, `cls`, `route` and `idx`. Forwarding is
combinational. A source latches its route at the first beat of a frame and
keeps it until the last beat, so the controller may change the
configuration at any time without splitting a frame. Circuit frames with no
route are discarded and counted on `unrouted`.

A valid schedule gives each output at most one source. If two sources do
ask for one output, the source already mid-frame keeps it, otherwise the
lower-numbered source wins. The other source is held not-ready and
`conflict` is raised.

**downlink_mux**: each host link is fed by four sources, served in this
fixed order at frame boundaries:

1. PFC frames, so that a pause never waits more than one frame.
2. Traffic from the OCS, which has no buffer and must not wait.
3. Rack-local circuit traffic.
4. EPS traffic.

The OCS, local and EPS inputs each pass through `pkt_fifo`, a
store-and-forward FIFO of whole frames: 512 beats for circuit traffic and
1024 beats for EPS traffic. A frame that does not fit is dropped whole and
reported on `tx_drop`. The multiplexer does no rate limiting. In the full
system the hosts send circuit traffic at 90–100 % of line rate, and the
EPS frames go out in the gaps this leaves.

**pfc_gen**: builds standard 60-byte 802.1Qbb frames, to which the MAC adds
the FCS. The frame carries destination 01-80-C2-00-00-01, EtherType 0x8808,
opcode 0x0101, the class-enable vector and eight pause times. A paused
class gets `PAUSE_QUANTA`; an unpaused class gets a time of 0. Requests
that arrive while a frame is waiting are merged into that frame. Per class,
the later request wins; a class named in both vectors of one request is
paused. The first beat comes two cycles after a request.

## The schedule and one configuration slot

This part needs the most care.

A schedule is a list of up to `MAX_CONFIGS` (8) entries of `sched_entry_t`,
repeated period after period. Each entry has:

- `duration`: the slot length in clocks, reconfiguration time included.
- `ocs_cfg`: the OCS permutation, 5 bits per OCS input. Bits
  `[5k+4:5k]` hold the output port for input `k`.
- One `port_cfg_t` per host port: does the port have a circuit, which
  class it serves, and where the circuit goes.

**schedule_table** has two banks. The control computer writes the next
schedule into the shadow bank (`sched_wr_en`, `sched_wr_idx`,
`sched_wr_entry`) while the active bank runs. It then commits the schedule
with its length (`sched_wr_commit`, `sched_wr_num`). At the end of the
current period the controller swaps the banks, so a change of schedule
never lands mid-period. Until a new schedule is committed, the active one
repeats. A commit of length 0, or of more than `MAX_CONFIGS`, is ignored.

**reconfig_controller** runs each slot as follows. Offsets are in clocks
from the start of the slot; all outputs are registered and appear one clock
after the offset shown.

| offset | what happens |
|---|---|
| 0 | `ocs_reconfig` pulses with the new `ocs_cfg`. Phase DARK: every circuit is off, so the classifiers send everything to the EPS. |
| `DELTA` (4688 = 30 µs) | Phase LIT: the classifiers and crossbar get this slot's configuration. Each port with a circuit sends its host a PFC unpause for the circuit's class. |
| `duration − PAUSE_LEAD` (156 = 1 µs before the end) | The same class is paused with a PFC frame. It goes out early because a NIC needs about a microsecond to act on a pause. |
| `duration − 1` | The circuits are switched off. Frames still arriving go to the EPS. |

A duration shorter than `DELTA + PAUSE_LEAD + 2` is stretched to that
length.

At the end of the last slot of a period, the controller asks the table to
swap in a pending schedule and pulses `period_start`. That pulse stands for
the period heartbeat the hosts are sent. When `run` falls, the controller
finishes the current period and goes idle.

The OCS is blind for the first `DELTA` cycles, and the hosts stop sending
only after the pause takes effect. The host's reaction time is therefore a
design limit. A frame that has started when the pause lands is always
finished, and with a 1500-byte MTU this can add about 1.2 µs beyond
`PAUSE_LEAD`. A 30 µs `DELTA` leaves room for this. If you shorten `DELTA`,
make sure the tail of the previous slot still reaches the OCS before the
OCS goes dark.

## Frame records

**pkt_recorder** stamps every frame that enters a classifier with a
free-running counter of 6.4 ns ticks. It sends the records, out of band,
to a collection host (`rec_*`). Each record is 64 bits, sent most
significant byte first:

| bits | field |
|---|---|
| [63:16] | timestamp |
| [15:12] | source port |
| [11:9] | traffic class, which stands for the destination |
| [8] | path: 1 = circuit |
| [7] | the frame carried an 802.1Q tag |
| [6:0] | zero |

Records travel in Ethernet frames: two header beats (addresses, EtherType
0x88B5, a 16-bit record count), then up to `RECS_PER_FRAME` records. If
records have been waiting for `FLUSH_CYCLES`, a shorter frame goes out.
Each port has a one-record holding register. Frames are at least 8 beats
long, so at line rate these registers never overflow; if one ever does,
`rec_lost` pulses.

## Top level

`reactor_top` connects four of each port-level block to one
`schedule_table`, `reconfig_controller` and `pkt_recorder`. Circuit uplink
`p` carries host `p`'s circuit traffic into the OCS and brings out of the
OCS the circuit traffic for host `p`. EPS uplink `p` carries host `p`'s EPS
traffic in both directions.

Parts outside the design meet it at plain ports:

- the host MACs (`host_*`);
- the OCS transceivers (`cup_*`) and the OCS control (`ocs_cfg`,
  `ocs_reconfig`);
- the EPS (`eup_*`);
- the control computer (`sched_*`);
- the collection host (`rec_*`).

The `tx_sof`, `tx_sof_src`, `tx_drop`, `xbar_*`, `ev*` and `pfc_busy`
outputs are status signals for monitoring.

Top-level parameters, with their defaults:

- `MAX_CONFIGS` = 8
- `DELTA` = 4688
- `PAUSE_LEAD` = 156
- `CIRC_FIFO_DEPTH` = 512
- `EPS_FIFO_DEPTH` = 1024

The port count, class count and widths are in the package.

## What is not here, and where this departs from the prototype

- **Not part of this RTL, and only modelled in the testbenches:**
  - the optical circuit switch;
  - the packet switch;
  - the transceivers and MACs;
  - the hosts and NICs, with their queues and rate limiters.
- **Not provided at all:**
  - the circuit scheduler that computes schedules from demand;
  - the UDP protocol that carries schedules, rate limits and heartbeats to
    the hosts;
  - the receiver for schedule packets from the control computer. The
    schedule table's write port takes its place.
- **Reconfiguration delay:** the Mordia OCS needs about 12 µs, but the
  prototype was run with a conservative 30 µs, which is the default here.
  Set `DELTA` to 1875 for 12 µs.
- **Unpause timing:** the unpause is sent when the circuit is lit. It is
  not sent early to hide the host's 1.2–1.3 µs start-up delay, so that much
  of each slot goes unused.
- **EPS rate:** the EPS uplinks run at the full beat rate. Their 1 Gb/s
  limit in the prototype comes from the packet switch and the host rate
  limits, not from this logic.
- **Traffic classes:** eight PFC classes give at most seven circuit
  destinations per schedule. Reusing classes across periods is not
  implemented.
- **Classes with no circuit:** a class with no circuit in a period
  should drain to the EPS at a limited rate. The switch never unpauses such
  a class; that is left to the host-side control software. A class paused
  at the end of its last circuit stays paused until its pause time runs
  out.
- **Slot length:** a slot's `duration` includes the reconfiguration time,
  so a schedule's period is simply the sum of its durations.
- **Pause refresh:** PFC pause frames use the maximum pause time and are
  not refreshed. A pause that lasts longer than 65535 quanta (3.4 ms at
  10 Gb/s) lapses at the host. A slot that needs a longer pause must be
  split in two.

## Workloads the defaults hold

| Workload | Fits? | Numbers |
|---|---|---|
| Seven-configuration all-to-all among 8 hosts (two switches of four ports) | Yes | 214.3 µs slots (33,484 clocks) in a 1.5 ms period. Seven circuit classes plus the EPS class; an 86 % duty cycle. |
| Group-internal and cross-talk all-to-all | Yes | 3 × 500 µs and 4 × 375 µs per 1.5 ms, with the schedule changed mid-period. |
| One circuit flow plus six flows paced at 96 Mb/s on the EPS | Yes | The EPS flows total about 0.58 Gb/s. |
| 64 hosts at 100 Gb/s, each sending to 21 neighbours | No | Needs far more ports, a faster datapath and more than seven circuit classes. |

## Simulation

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` at the end and has a watchdog. The
behavioural models used by the top-level test are:

- `tb_host`: a host that queues per destination and obeys PFC;
- `tb_stream_src`;
- the frame helpers in `tb_frames_pkg`.

| testbench | what it checks |
|---|---|
| `tb_classifier` | The verdict for each frame with random tags, classes and circuit settings. Frames must come through unchanged, with backpressure on both outputs. |
| `tb_circuit_xbar` | Random permutations changed mid-traffic. The route must be held per frame; unrouted frames are discarded; a conflict stalls the loser. |
| `tb_downlink_mux` | The priority order, whole-frame drops, PFC waiting at most one frame, and random backpressure. |
| `tb_pfc_gen` | Every byte of the frame, merging of requests, and the two-cycle latency. |
| `tb_schedule_table` | Shadow writes never touch the active bank; commit, ignored commits, and the swap. |
| `tb_reconfig_controller` | A cycle-exact reference model of every slot: the OCS pulse, dark and lit times, PFC timing, period boundaries, schedule changes and stopping. It uses `DELTA` = 20 and `PAUSE_LEAD` = 6. |
| `tb_pkt_recorder` | Record fields and timestamps against the event cycles, flushing, and loss under overrun. |
| `tb_reactor_top` | The whole switch at its default parameters, with four hosts, an OCS model and an EPS model (details below). |

`tb_reactor_top` checks the following:

- Every frame delivered is one that was sent, to the right host, unchanged.
- Every frame sent is delivered, dropped or counted as unrouted.
- No beat enters the OCS while it is dark.
- Each mechanism happens at least once: circuit, local and EPS delivery;
  pause and unpause; OCS reconfiguration; a schedule swap; PFC waiting
  behind a frame; and frames arriving after the pause and going to the EPS.

A run covers about 1600 frames and takes a few seconds.

To build and run a block test with plain Verilator, list the package, the
testbench and the modules it needs, for example:

```
verilator --binary --timing -Wno-WIDTH -Irtl -Itb --top-module tb_reactor_top \
  rtl/reactor_pkg.sv tb/tb_frames_pkg.sv tb/tb_stream_src.sv tb/tb_host.sv \
  rtl/pkt_fifo.sv rtl/classifier.sv rtl/pfc_gen.sv rtl/downlink_mux.sv \
  rtl/circuit_xbar.sv rtl/schedule_table.sv rtl/reconfig_controller.sv \
  rtl/pkt_recorder.sv rtl/reactor_top.sv tb/tb_reactor_top.sv
obj_dir/Vtb_reactor_top
```

The testbenches expect a simulator without x states. They do not rely on
initial values, because every register that is read has a reset.
