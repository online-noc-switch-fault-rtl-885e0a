# Online routing-fault detection for a 2-D mesh network on chip

A switch in a network on chip (NoC) has a datapath, which moves flits, and
a small control part, which decides where each packet goes. A transient or
permanent fault in the control part does not corrupt data. Instead, it
sends packets to the wrong output port. This RTL builds a 2-D mesh NoC with
XY wormhole routing whose switches check, during normal operation, that
the packets passing through them are where XY routing says they should
be. A switch that sees a misrouted packet raises an error and names the
faulty neighbour in a report packet sent to a primary output processor.

Three checks work together:

| check | where | catches | locates the fault |
|---|---|---|---|
| distraction detection | every switch | a packet that is off its XY path | yes: the neighbour it came from |
| switch count | every switch | a packet that has visited too many switches (e.g. bouncing between two switches) | no |
| trapped packet detection | every processor's receive link | a packet handed to the wrong processor | no |

## Fault model: a switch stuck at a port

Every control fault is modelled at a high level. A faulty switch sends
*every* packet to one fixed output port, whatever the packet's
destination. With five ports there are five faults:

| fault | `fault_e` | packets go to |
|---|---|---|
| none | `FAULT_NONE` | XY route |
| stuck-at East | `FAULT_SAE` | East, port 1 |
| stuck-at South | `FAULT_SAS` | South, port 2 |
| stuck-at West | `FAULT_SAW` | West, port 3 |
| stuck-at North | `FAULT_SAN` | North, port 4 |
| stuck-at Processor | `FAULT_SAP` | the local processor, port 0 |

Every switch has a `fault` input that applies one of these faults to its
router (`xy_route`). The input is used for fault injection in simulation.
In a real chip you would tie it to `FAULT_NONE`.

## Network

`noc_mesh` is a `MESH_W` x `MESH_H` mesh. The default is 3x3. Switch
(x, y) has number `y*MESH_W + x + 1`. Switch 1 is the south-west corner,
numbers rise eastwards and then northwards, East is +X and North is +Y.
For a 3x3 mesh:

```
  7  8  9      <- 9: primary output, receives diagnosis reports
  4  5  6
  1  2  3      <- 1: second primary output, also receives them
```

Each switch has five ports: Local (0), East (1), South (2), West (3) and
North (4). Each input has a 4-flit buffer. The processors are not part of
the RTL. The local links of all switches are ports of `noc_mesh`, index =
switch number - 1.

### Packets and flits

A packet is a worm of 34-bit flits (`flit_t`). Each flit is a head marker,
a tail marker and a 32-bit word. A single-flit packet sets both markers.
The head flit's word is the header (`header_t`, MSB first):

| bits | field | meaning |
|---|---|---|
| 31:30 | `ptype` | `PKT_DATA` or `PKT_DIAG` (diagnosis report) |
| 29:24 | `dst` | destination x (3 bits), y (3 bits) |
| 23:18 | `src` | source x, y |
| 17:14 | `sc` | switch count; the source sets it to 0 |
| 13:0 | `info` | free for data packets. A report puts the faulty switch's x, y in bits 5:0 |

3-bit coordinates allow meshes up to 8x8. The 4-bit switch count covers
the longest XY path of a 7x7 mesh (13 switches) without overflowing.

### Switch operation and timing

All links use valid/ready. A flit moves when both are high at a rising
edge. `ready` is "input buffer not full", so it never depends
combinationally on anything downstream, and the mesh has no combinational
loops.

1. A head flit reaches the front of an input buffer. `xy_route` picks its
   output port: X first, then Y, then Local. An injected fault overrides
   this choice.
2. The input requests that output. Each output has a round-robin arbiter
   (`rr_arbiter`) over six requesters: the five buffers and the diagnosis
   unit. The grant takes one cycle, and the winner then owns the output.
3. From the next cycle, flits flow from the buffer through the crossbar
   into the neighbour's input buffer, one per cycle when ready. When the
   tail flit leaves, the output is released. Worms never interleave.

A head flit therefore takes two cycles per switch with no contention:
allocation, then transfer. Body flits follow at one per cycle.

## Distraction detection (`distraction_detector`)

Under XY routing a packet only ever visits switches in its source's row
or in its destination's column. As each head flit leaves its input
buffer, the switch compares its own address with the packet's source and
destination. If `switch.y != src.y` and `switch.x != dst.x`, the packet
has been *distracted*. The neighbour that sent it must have a control
fault, and the check happens in the cycle the packet passes.

The check is exactly that two-term comparison. It does not test whether
the switch lies *between* source and destination. As a result, some
faults trap a packet between two switches of its own row or column and
stay invisible to this check. Two examples in the 3x3 mesh:

* Switch 3 stuck at West, packet 1 -> 9. The packet reaches 3, is sent
  back to 2, and 2 sends it east again. Both switches are in the source's
  row.
* Switch 7 stuck at East, packet 9 -> 1. The packet bounces between 7 and
  8 in the source's row.

On a detection the switch sets its sticky `dd_err`. Its diagnosis unit
(`diag_unit`) also queues a report naming the neighbour on the side the
packet came in. The report is a single-flit `PKT_DIAG` packet with
source = this switch. It goes to the primary output switch (`PO_X`,
`PO_Y`; default switch 9). With `PO2_EN` (the default), a second copy
then goes to another primary output (`PO2_X`, `PO2_Y`; default
switch 1). Reports are routed like any other packet.
Each neighbour is reported once until reset, so a permanent fault does not
flood the network. The misrouted packet itself is forwarded normally, and
no recovery is attempted. Location reports are only reliable when there
is a single fault in the network.

## Switch count (`switch_counter`)

Every switch increments the header's switch count as the head flit
passes. A packet looping between two switches overflows the 4-bit field
at its 16th switch. The switch that sees the wrap sets its sticky
`sc_err`. This catches the two examples above. It cannot say *which*
switch is faulty, so no report is sent.

## Trapped packet detection (`trapped_packet_detector`)

A switch stuck at its processor port hands every packet to its own
processor. The packet never leaves again. A small comparator on each
processor's receive link checks the destination of every arriving head
flit against that switch's address and sets `trap_err` on a mismatch.
The fault cannot be reported through the network: a report from that
processor would be handed straight back to it. So this flag is
per-processor and is not part of the switch error line.

## Error line and method selection

Each switch outputs `err_o = err_i | dd_err | sc_err`. `noc_mesh` chains
them from switch 1 to switch N into `error`. Three enable parameters give
four method combinations:

| method | `EN_DD` | `EN_SC` | `EN_TP` |
|---|---|---|---|
| 1: distraction detection | 1 | 0 | 0 |
| 2: + switch count | 1 | 1 | 0 |
| 3: + trapped packet | 1 | 0 | 1 |
| 4: all (default) | 1 | 1 | 1 |

## `noc_mesh` interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset clears everything, sticky flags included |
| `fault[N]` | in | injected fault per switch |
| `lin_valid/lin_flit/lin_ready[N]` | in/in/out | processor -> switch |
| `lout_valid/lout_flit/lout_ready[N]` | out/out/in | switch -> processor |
| `error` | out | chained switch error line |
| `dd_err`, `sc_err`, `trap_err` | out | sticky per-switch / per-processor flags |
| `dd_evt`, `sc_evt`, `trap_evt`, `diag_evt` | out | one-cycle event pulses |

Mesh edges: an output pointing off the mesh is always ready and connects
to nothing. A fault such as stuck-at-East in an east-edge switch
therefore loses packets silently, and none of the three methods sees it.
The method is usually described as finding every non-processor fault with
distraction detection plus the switch count. That holds only for faults
that keep packets inside the mesh. The edge faults are the main reason
for the coverage gap below.

## Fault coverage

`tb/tb_fault_coverage.sv` injects every stuck-at fault into every switch
of 3x3, 5x5 and 7x7 meshes. It does this one fault at a time, with random
traffic whose destinations are limited to 25, 50, 75 or 100 % of the
switches. It reports the share of faults each method flags (percent):

| mesh | addressed | method 1 | method 2 | method 3 | method 4 |
|---|---|---|---|---|---|
| 3x3 | 25 % | 20 | 26 | 40 | 46 |
| 3x3 | 50 % | 31 | 33 | 51 | 53 |
| 3x3 | 75 % | 28 | 28 | 48 | 48 |
| 3x3 | 100 % | 35 | 35 | 55 | 55 |
| 5x5 | 25 % | 33 | 39 | 53 | 59 |
| 5x5 | 50 % | 39 | 42 | 59 | 62 |
| 5x5 | 75 % | 40 | 40 | 60 | 60 |
| 5x5 | 100 % | 40 | 40 | 60 | 60 |
| 7x7 | 25 % | 41 | 44 | 61 | 64 |
| 7x7 | 50 % | 42 | 44 | 61 | 64 |
| 7x7 | 75 % | 40 | 42 | 59 | 61 |
| 7x7 | 100 % | 41 | 41 | 61 | 61 |

Per run: 3N two-flit packets (2N for 7x7) from random processors, then
200 to 300 cycles.

Observations:

* Trapped packet detection adds the most coverage, because stuck-at-processor
  faults are one fifth of all faults.
* The switch count adds only a few points over distraction detection
  alone. When several worms are caught in the same two-switch loop,
  wormhole blocking can freeze them before any count wraps. A frozen loop
  raises no flag. In a lighter-traffic run (12 packets on 3x3), the switch
  count added 5 to 9 points.
* Faults that push packets off the mesh edge are undetectable here. They
  are 12 of 45 faults in 3x3, 20 of 125 in 5x5 and 28 of 245 in 7x7. Faults
  in switches that no test packet crosses are also missed.

The traffic model (packet count, length and run time per fault) is this
testbench's own. The numbers show the relative strength of the methods,
not an absolute figure for any particular application.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | types: `flit_t`, `header_t`, `coord_t`, `port_e`, `fault_e`; widths |
| `rtl/noc_mesh.sv` | top: the mesh, error chain, trapped packet detectors |
| `rtl/noc_switch.sv` | five-port wormhole switch with online test hardware |
| `rtl/input_buffer.sv` | input FIFO |
| `rtl/xy_route.sv` | XY route computation with fault injection |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/distraction_detector.sv` | off-path comparison |
| `rtl/switch_counter.sv` | switch count increment and overflow |
| `rtl/diag_unit.sv` | diagnosis report generator |
| `rtl/trapped_packet_detector.sv` | processor-side destination check |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_noc_mesh.sv` | end-to-end test of the default 3x3 mesh |
| `tb/fault_campaign.sv`, `tb/tb_fault_coverage.sv` | fault coverage campaign |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For
example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
  --top-module tb_noc_mesh -o sim
./obj_dir/sim
```

`tb_noc_mesh` runs the default 3x3 mesh with no parameter overrides:

* 1500 random packets of 1 to 4 flits, each of which must arrive intact
  at its destination, with no false alarm.
* The stuck-at-West and stuck-at-East bouncing cases above, which must be
  caught by the switch count and not by distraction detection.
* A stuck-at-North fault in switch 2 (packet 1 -> 3). Switch 5 must flag
  it, and processors 9 and 1 must each receive a report naming switch 2.
* A stuck-at-processor fault in switch 5, which processor 5 must flag.
* Two faults at once, both of which must be detected.

The test also checks that each mechanism occurred at least once:
back-pressure, multi-flit worms, distraction, overflow, report and trapped
packet. The coverage campaign takes about two minutes of simulation.

## Design choices not fixed by the underlying method

* Flit and header format, field widths, 4-flit buffers, valid/ready flow
  control, round-robin arbitration and the one-cycle allocation step.
* Reports go to one or two primary output switches (default: the
  north-east corner, then the south-west). Each neighbour is reported
  once per reset.
* Detected packets are forwarded unchanged. Recovery is out of scope.
* Error outputs are chained in switch-number order.
* Mesh-edge outputs act as sinks.
* The `fault` inputs exist only for fault injection.

Not included: the processors themselves, and any area or speed figures.
The overhead of the test hardware depends on the base switch it is added
to.
