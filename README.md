# Adaptive-QoS communication fabric for a clustered NoC MPSoC

Soft real-time applications on a many-core chip share the network with
everything else. When other traffic loads the network, a pair of tasks can
miss its latency or throughput targets. This design answers that at run time
in three layers:

1. **Two-channel QoS network.** Every link has two 16-bit physical channels.
   - Channel 0 is the HIGH-priority channel. HIGH packets take any of several
     routes towards their target. The same channel can also hold a dedicated
     circuit.
   - Channel 1 is the LOW-priority channel. LOW packets follow one fixed
     route.
2. **Hybrid monitoring.**
   - A *packet monitor* in the receiving network interface measures each
     watched packet. It reports the packet's size, latency and task pair to
     the manager of its cluster.
   - On the manager tile, *throughput and latency monitors* compare the
     reports with the pair's deadlines. After three violations they raise an
     event.
3. **Flow adaptation.** A per-cluster *flow manager* reacts to latency events
   for a task pair:
   - it moves the pair from LOW to HIGH priority;
   - if HIGH is not enough, it moves the pair to a circuit;
   - when events stop for long enough, timers step the pair back down.

The chip is cut into clusters, and each cluster has one manager ("master")
tile. Processors, memories and software are not part of this RTL. Each tile
has a processor-side port where a processor model or a testbench injects and
consumes packets. The manager's decisions come out as *adaptation orders*,
which the producer's software applies by setting the priority bit in its
headers or by opening a circuit.

## Structure

```
qd_hemps_mpsoc                 MESH_W x MESH_H tiles, CLUSTER_W x CLUSTER_H clusters
 ├─ per tile: qos_router       5 ports x 2 channels, input FIFOs (flit_fifo)
 │            qos_ni           PE port <-> local router port
 │             └─ packet_monitor
 └─ per cluster master tile:
              tl_monitor       throughput / latency monitors of the cluster
              qos_flow_manager LOW -> HIGH -> CS escalation and time-outs
qos_pkg                        flit/header types, ports, Hamiltonian routing functions
```

- Tile index = `y*MESH_W + x`.
- Cluster index = `cy*(MESH_W/CLUSTER_W) + cx`.
- The master of a cluster is the tile at offset (`MASTER_DX`, `MASTER_DY`)
  inside it. The default is the bottom-right tile, with y = 0 as the bottom
  row.
- The defaults give a 4x4 mesh of four 2x2 clusters.
- The timers assume a 100 MHz clock:

| parameter | default | meaning |
|---|---|---|
| `VIOL_THRESHOLD` | 3 | violations per event |
| `DEFAULT_RESOLUTION` | 500,000 | throughput window when a pair sets none (5 ms) |
| `WINDOW` | 100,000 | period of the time-out scan (1 ms) |
| `FCT` | 1,500,000 | idle time after which HIGH returns to LOW (15 ms) |
| `CST` | 2·FCT | idle time after which a circuit is released (30 ms) |
| `MASTER_DX`, `MASTER_DY` | `CLUSTER_W-1`, 0 | master tile inside each cluster |
| `BUF_DEPTH` | 8 | flits per router input channel |
| `REPORT_DEPTH` | 2 | queued monitoring reports per NI |
| `NCTP` | 4 | monitored task pairs per cluster |

## Packets and headers

A flit is 16 bits. A packet is a header, then a size flit, then `size`
further flits. The header layout is specific to this design:

| bits | field |
|---|---|
| 15 | priority (1 = HIGH) |
| 14 | monitor bit: the receiver's packet monitor measures this packet |
| 13:12 | switching: `00` packet, `01` CS_OPEN, `10` CS_RELEASE, `11` CS_DATA |
| 11:8 | service: 0 other, 1 message request, 2 message delivery, 3 monitoring report |
| 7:4 / 3:0 | target x / target y |

A watched data packet (message delivery with the monitor bit set) has this
layout:

```
header, size, timestamp[31:16], timestamp[15:0], producer[31:16], producer[15:0],
consumer[31:16], consumer[15:0], payload...
```

- The producer writes the current value of the global `cur_time` counter into
  the timestamp.
- A monitoring report is a LOW-priority packet to the cluster master. Its size
  flit is 8, and its payload holds four 32-bit words: packet size, latency,
  producer id and consumer id.

## Routing on a Hamiltonian path

Routers are numbered along a snake: row `y` runs left to right when `y` is
even and right to left when `y` is odd. On a 4-wide mesh, row 0 holds labels
0..3 from the left and row 1 holds 4..7 from the right. A hop is legal only
if the neighbour's label lies between the current label and the target's,
with the target included. Every hop therefore strictly moves the label
towards the target, and each channel is deadlock free on its own.

- **Channel 1 (deterministic):** the router always takes the legal neighbour
  closest to the target label.
- **Channel 0 (partially adaptive):**
  - The router may take any legal neighbour. It prefers free outputs, and
    among them the one closest to the target. A neighbour is free when it is
    neither busy with a packet nor reserved by a circuit. This lets HIGH
    traffic go around congestion, possibly over a non-minimal path.
  - If no legal channel-0 output is free, a HIGH packet falls back to the
    channel-1 route and stays on channel 1 from then on.
- Channel 1 takes only packets that obey the deterministic rule, so the
  fall-back cannot create a cycle.

Each router has one round-robin header arbiter, so at most one header is
routed per cycle over all ten input channels.

- Every waiting header is routed in parallel against the current output
  state.
- The arbiter chooses only among the headers that can leave in that cycle.
- A header whose outputs are all taken therefore never blocks the others.
- A steady competitor cannot starve it either: once the output frees, the
  pointer reaches it within a few grants.

Once routed, a packet moves in wormhole fashion. Every connected input can forward one flit per cycle while
the receiver's `credit` is high. A header needs two cycles to go from the
router's input to its output: one cycle to write the FIFO and one to route.

## Circuit switching

A circuit lives on channel 0. It needs three packets from the producer, all
sent by its NI on channel 0:

1. **CS_OPEN** is routed adaptively. It uses only channel-0 outputs that are
   free. In every router it crosses, it reserves its input/output pair.
2. **CS_DATA** packets arriving on that reserved input follow the stored
   connection without being routed again. No other packet can take the
   reserved output, but LOW and other HIGH traffic keep using channel 1 and
   the remaining channel-0 outputs.
3. **CS_RELEASE** follows the same path. Each router frees the pair when the
   release header leaves it.

Other details:

- `cs_reserved` on the top shows, per router port, which channel-0 outputs
  are held. A cluster manager can use it to decide whether a new circuit
  fits.
- The flow manager does not search for a path itself. It asks through the
  `cs_path_ok` input.
- While a PE holds a circuit (`cs_out_open`), its NI sends that PE's other
  HIGH packets on channel 1.

## Network interface and packet monitor

**Sending.** The PE offers flits with `pe_tx_valid`, and `pe_send_av` says
that the NI took the flit. The header picks the channel for the whole packet:

- circuit packets and HIGH packets go to channel 0;
- LOW packets go to channel 1.

**Receiving.** The NI merges the two local-output channels into one stream
to the PE (`pe_rx_valid`/`pe_rx_ready`). It switches channel only between
packets, and uses round robin when both channels wait.

**Packet monitor.** It snoops every flit the PE accepts:

- For a watched message delivery, it latches `cur_time` when the header
  arrives.
- It takes the size, timestamp, producer and consumer from the next flits.
- It computes latency = header arrival time − timestamp. This is the header's
  time through the network, and does not depend on packet length.
- It queues the report (`REPORT_DEPTH` entries). If the queue is full, the
  report is dropped and `mon_drop_cnt` counts it.

**Sharing the outgoing port.** Between two PE packets, a waiting report takes
the outgoing port. `pe_send_av` then stays low until the report's 10 flits
have left, so PE packets and reports never interleave.

## Monitors and flow manager on the master tile

The cluster master's `tl_monitor` reads the same flit stream that the master
PE receives, and picks out the monitoring reports. Each of its `NCTP` pair
slots is configured through `cfg_*` with:

- producer id and consumer id;
- latency deadline (cycles);
- throughput deadline (bits per window);
- window length, where 0 selects `DEFAULT_RESOLUTION`.

It counts violations in two ways:

- **Latency:** a report whose latency is above the deadline is one violation.
- **Throughput:** each report adds `size×16` bits to the pair's counter. At
  the end of each window, a count below the deadline is one violation.

After `VIOL_THRESHOLD` violations of one kind it raises one event and
restarts that count. Events are queued and leave one per cycle on `ev_*`,
two cycles after the last flit of the report that caused them.

`qos_flow_manager` keeps a mode per pair (`flow_mode`: 0 LOW, 1 HIGH, 2 CS)
and an idle timer.

**On a latency event:**

- the timer restarts;
- LOW goes to HIGH;
- HIGH goes to CS if `cs_path_ok`, otherwise it stays HIGH.

**Every `WINDOW` cycles:**

- HIGH pairs idle for more than `FCT` return to LOW;
- CS pairs idle for more than `CST` return to HIGH, which also means
  releasing the circuit;
- other non-LOW pairs add `WINDOW` to their idle time.

Throughput events do not change the flow mode. They request a computation
adaptation (task migration or scheduling priority, done in software) and are
passed on at `comp_req_*`. Every mode change issues one order on
`ord_valid/ord_ctp/ord_mode`.

## Where this RTL departs from the described system

- **Monitors and flow manager in hardware.** In the described system the
  throughput/latency monitors and the QoS manager are software on the master
  processor. They are built in hardware here so that the full chain, from a
  slow packet to an adaptation order, can be simulated without a processor.
  Their behaviour follows the described algorithm.
- **Circuit path search is outside.** The search for a free circuit path
  (`cs_path_ok`) is left to the outside, and the reservation map
  (`cs_reserved`) is provided for it.
- **One timer for HIGH.** The description's time-out pseudocode names the
  HIGH-priority timer `PSt`, while its prose calls the same limit FCt. One
  parameter, `FCT`, serves both.
- **No multicast.** Multicast transmission, listed as a feature of the NoC,
  is not implemented. The router is unicast only.
- **Own choices.** The following are choices of this design:
  - the header layout and packet formats;
  - the buffer depths;
  - the master offset parameters;
  - the NI receive merge;
  - the circuit set-up by a reserving CS_OPEN packet.
- **Reset.** All storage uses a synchronous active-low reset, `rst_n`.
- **Size.** The reference FPGA packet monitor is quoted at 187 flip-flops and
  184 LUTs. This one holds a 2-deep queue of 128-bit reports, so it is larger.
- **Evaluated sizes.** The evaluated 6x6 (3x3 clusters) and 3x3 (one cluster)
  meshes are reached with parameters. x and y are 4 bits each, so meshes up
  to 16x16 are possible. The master always sits at the same offset in every
  cluster.

## Testbenches

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it exercises |
|---|---|
| `tb_qos_router` | LOW/HIGH routing on both channels, ejection, 2-cycle header latency, adaptive detour and fall-back to channel 1, circuit open/data/release and blocking of reserved outputs |
| `tb_qos_ni` | channel choice, circuit flags, receive merge, report multiplexing with `pe_send_av` held low |
| `tb_packet_monitor` | report contents and latency arithmetic, timing, unwatched packets ignored, full-queue drops |
| `tb_tl_monitor` | third violation gives one event, event timing, throughput windows, unknown pairs ignored |
| `tb_qos_flow_manager` | LOW→HIGH→CS, blocked CS, time-outs after FCT/CST with timer restart, throughput requests |
| `tb_qd_hemps_mpsoc` | 4x4 mesh with short timers and random background traffic. It counts every mechanism (LOW, HIGH, detour, fall-back, stalls, report multiplexing, reports, latency and throughput events, HIGH and CS orders, circuit data and release, both time-outs) and fails if any never happened |
| `tb_sr_flows_4x5` | the synthetic scenario: 4x5 mesh, one cluster with its master at PE3. Two monitored flows run while four producers load two hot spots. It checks that both flows escalate to HIGH and CS and both return to LOW, and that circuit latency beats LOW latency under the same load |
| `tb_qd_hemps_mpsoc_full` | the top at its default parameters: three late watched packets → three reports → one latency event → HIGH order → HIGH packet delivered |

To simulate one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/qos_pkg.sv tb/tb_qd_hemps_mpsoc.sv --top-module tb_qd_hemps_mpsoc
./obj_dir/Vtb_qd_hemps_mpsoc
```

Replace the testbench name to run any other. The same sources also elaborate
in Yosys through its slang front end.
