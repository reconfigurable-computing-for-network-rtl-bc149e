# A protocol-independent NFV switch on a network on chip

This design is a packet-processing platform in which nothing sits hard-wired
between the 10 Gb/s ports. Every network function lives in a
**partial reconfiguration region (PRR)**. The PRRs and the PHY ports all hang
off a small **network on chip (NoC)**. Which function a flow passes through is
decided by the NoC's routing tables, not by wiring. The same hardware can
therefore act as:

* a Layer 1 **circuit switch**: PHY to PHY through the NoC, at the lowest
  latency;
* a Layer 2 **Ethernet packet switch**: PHY to an Ethernet-layer function and
  back to the PHY chosen by the Ethernet destination address;
* a chain through Layer 3 (**IPv4**) or Layer 4 (**UDP**) **parsers**.

A function is changed while traffic runs, without losing a single frame. The
new function is first loaded into a spare ("backup") PRR while the old one
keeps working. Only then are the flows moved, and traffic is held in small
FIFOs just for the few cycles that a routing-table update takes. The time to
download a bit file is never on the critical path.

The RTL is SystemVerilog (IEEE 1800-2017). It is written to synthesise, and is
checked with Verilator (lint and simulation) and with the slang front end of
Yosys.

## Structure

```
            host commands                     partial bit file downloads
                 |                                       |
         +-------v-------+  AXI4-lite                    |
         |    central    |---------------+               |
         |   controller  |<-- flags --+  |               |
         +---------------+            |  v               v
   PHY0 <-> [NoC interface 0] <-> +--------------+ <-> [NoC interface 2] <-> PRR0
   PHY1 <-> [NoC interface 1] <-> |  NoC router  | <-> [NoC interface 3] <-> PRR1
                                  |  (15 ports)  |  ...
                                  +--------------+ <-> [NoC interface 14] <-> PRR12
```

The top level is `nfv_platform`. By default it has 2 PHY ports and 13 PRRs
on one 15-port router (a star NoC), all on the 156.25 MHz PHY clock. Router
port *p*, NoC interface *p* and AXI4-lite slave *p* all belong to PHY *p* for
*p* < `NUM_PHY`, and to PRR *p* − `NUM_PHY` above that. The router is AXI4-lite
slave `NUM_PHY + NUM_PRR` (15).

| Module | Role |
|---|---|
| `nfv_platform` | Top level: wires PHY ports, NoC interfaces, PRRs, router and controller |
| `noc_router` | Routing table and AXI4-stream switch; passes on the traffic buffer flag |
| `axis_switch` | N×N packet crossbar, round-robin per output, packets never interleaved |
| `routing_table` | 32 pairs of (NoC destination → output port), 8 bytes each |
| `noc_interface` | Address translation, NoC address into `tuser`, traffic FIFO, egress register |
| `eth_noc_table` | Ethernet destination address → NoC address |
| `noc_fifo` | Beat FIFO (block-RAM style, registered read) |
| `fifo_ctrl` | Holds or releases an interface's traffic; raises the traffic buffer flag |
| `central_controller` | Host command port, AXI4-lite master, switch-over sequencer |
| `prr_slot` | A PRR: which function is loaded, download time, lost-traffic counter |
| `eth_parser`, `ip_parser`, `udp_parser` | The functions a PRR can hold |
| `frame_hdr_capture` | Helper: captures the first 80 bytes of each frame |
| `axil_regs`, `axil_demux` | Helpers: AXI4-lite register front end and address decoder |
| `noc_pkg`, `vnf_pkg` | Shared types (beat, AXI4-lite, commands) and header checks |

### Links

Every NoC link is AXI4-stream with a 64-bit `tdata`, an 8-bit `tkeep` (byte
0, bits 7:0, is first on the wire), `tlast` and an 8-bit `tuser`. `tuser`
carries the packet's **NoC destination address** alongside every beat. One
beat per cycle at 156.25 MHz is exactly 10 Gb/s. The PHY-side ports of the top
carry plain Ethernet frames from the destination address onwards. There is no
preamble and no FCS on them; the MAC/PCS layers are outside this design.

## How traffic finds its way

Addresses on the NoC name *destinations*, not ports. There are two tables:

* **ETH/NoC table** in each NoC interface (`eth_noc_table`, 32 entries). When
  lookup is enabled, the Ethernet destination address in the first beat of a
  frame is looked up. A hit gives the NoC destination. A miss, or lookup
  disabled, gives the interface's **default destination** register. The
  choice is made once per packet and written into `tuser` of every beat.
* **Routing table** in the router (`routing_table`, 32 pairs). It maps a NoC
  destination to an output port. Every input has its own parallel lookup.
  A packet whose destination has no pair is consumed, dropped and counted
  (router register 0x100).

A PHY interface gives its input traffic a *flow* address through its default
destination (say `0x20` for PHY0). The router decides where that flow goes.
This is how the operating modes are set up:

| Mode | Router pairs | Interface settings |
|---|---|---|
| Circuit switch | `0x20 → port 1`, `0x21 → port 0` | PHY0 default `0x20`, PHY1 default `0x21` |
| L2 packet switch | `0x20 → PRR0`, `0x21 → PRR0`, `0 → port 0`, `1 → port 1` | PRR0 interface: lookup on, table MAC_A→0, MAC_B→1 |
| Parser chain | `0x20 → PRR1` (IP parser) | PRR1 interface: default destination 1 (PHY1) |

Moving from one mode to another only rewrites router pairs, so it is exactly
the kind of change the switch-over below makes without loss.

## The loss-free switch-over

This is the central mechanism. Replacing function A (in the active PRR) by
function B goes as follows:

1. **Download.** The host loads B into the backup PRR (`prr_cfg_start`,
   `prr_cfg_vnf`). No flow is routed there, so nothing is disturbed, and A
   keeps processing. The host also tells the controller, with `CMD_STAGE`
   commands, which router words to rewrite. The writes are stored, not yet
   applied.
2. **Hold.** The host sends `CMD_SWITCH` with a bit mask of the NoC
   interfaces whose traffic feeds the flows being moved. The controller raises
   `buffer_req` on those interfaces. Each `fifo_ctrl` lets the packet it is
   sending finish, then stops draining its FIFO. New input keeps arriving and
   collects in the FIFO, so the PHY is not stopped.
3. **Flag.** An interface that holds raises `traffic_buffered`. The router
   forwards this flag for input *i* (`flag_out[i]`) only once none of that
   input's data is left inside it: no granted packet and no beat in an output
   register. When every masked flag is up, the last beat sent before the hold
   has left the NoC.
4. **Update.** The controller applies the staged AXI4-lite writes in order,
   which moves the flow to B.
5. **Release.** `buffer_req` drops. The FIFOs drain into the new route.

The response to `CMD_SWITCH` returns the number of cycles the traffic was held.
On the 15-port star, with two staged words, this is about 70–85 cycles, or
about 0.5 µs. A 512-beat (4 KB) FIFO per interface covers that many times over.
Holding across a bit file download instead (about 2 ms) would need megabytes
per port.

What guarantees no loss:

* the hold starts on a packet boundary, so no packet is split across two
  routes;
* the flag includes the router's own pipeline, so no packet is still in
  flight towards A when the table changes;
* the FIFO's input side never stops, unless it fills, in which case it applies
  back-pressure (`phy_rx_ready` low).

Function A may still hold frames internally when the route changes. The
parsers here forward frames without buffering, so they hold none. A function
with internal buffering would need its own "empty" indication. `ctrl_phase`
shows the step in progress (2 to 5; 0 when idle).

## Host interface and register maps

Host commands (`host_cmd_t`: `op`, 24-bit `addr`, 32-bit `data`), one
response each (`host_rsp_data`, `host_rsp_err`):

| op | effect | response data |
|---|---|---|
| `CMD_WRITE` | AXI4-lite write now | 0 |
| `CMD_READ` | AXI4-lite read now | the word |
| `CMD_STAGE` | store a write for the next switch-over (64 deep; error when full) | index used |
| `CMD_SWITCH` | run steps 2–5 with `data` as the interface mask | cycles held |

The address is `{slave[7:0], offset[15:0]}`. An address with no slave behind
it is answered with DECERR.

NoC interface (slave *p*):

| offset | register |
|---|---|
| 0x000 | bit 0: Ethernet lookup enable |
| 0x004 | default NoC destination |
| 0x008 | bit 31 traffic buffered, low bits FIFO level (read only) |
| 0x00C | packets accepted from the PRR/PHY (read only) |
| 0x010 | cycles held during the last hold (read only) |
| 0x100 + 16k + 0/4/8 | ETH/NoC entry k: MAC[31:0]; MAC[47:32]; {valid[31], NoC address[7:0]} |

The MAC value has its first transmitted octet in bits 47:40.

Router (slave 15): pair *k* is at 8k (`{valid[31], destination[7:0]}`) and
8k+4 (`output port`). Dropped packets are counted at 0x100.

## Partial reconfiguration regions and functions

`prr_slot` stands in for a PRR. It contains each loadable function and a
register naming the live one. A download makes the region empty for the bit
file download time of that function: 1785 µs (Ethernet parser), 1980 µs (IP
parser) and 2115 µs (UDP parser). These are 278 906, 309 375 and 330 469
cycles at 156.25 MHz. `DL_DIV` divides them for faster simulation. A newly
loaded function starts with cleared counters. Traffic routed to an empty or
downloading region is accepted and lost, and `prr_lost_beats` counts it. A
non-zero count means a switch-over was set up wrongly.

On an FPGA the same region would hold only one function at a time. Keeping
all of them resident is this model's way of making reconfiguration
simulatable.

The parsers forward frames unchanged with no added latency, and judge each
frame from its first 80 bytes:

* `eth_parser`: destination, source, ethertype. Error if the frame is shorter
  than 14 bytes.
* `ip_parser`: ethertype 0x0800, version 4, IHL ≥ 5, the header inside the
  frame, and a valid header checksum. It reports source, destination and
  protocol.
* `udp_parser`: all of the IP checks, plus protocol 17 and a complete 8-byte
  UDP header. It reports the ports and the UDP length.

Each parser presents its result two clock edges after the edge that transfers
the frame's last beat, and counts the frame as parsed or as failed.

## Timing

* Ingress: a beat accepted from a PRR/PHY reaches the router input two cycles
  later (FIFO write, then registered read). `fifo_ctrl` adds nothing.
* Router: one cycle to grant an output to a new packet, then one output
  register stage. After the grant, one beat per cycle flows.
* Egress: one register stage.
* End to end, PHY 0 to PHY 1 on a circuit, the first beat of a frame takes 6
  cycles (38 ns at 156.25 MHz) from the PHY receive port to the PHY transmit
  port when the path is idle.
* Layer 2 packet switch, with one Ethernet parser PRR per port: the first
  beat takes 10 cycles (64 ns) from PHY to PHY. That covers two router
  passes, the PRR's egress and ingress interfaces and the ETH/NoC lookup.
  The figure holds at 1 to 9 Gb/s per port in both directions, and for
  frames of 100 to 1500 bytes at 9 Gb/s. It does not grow with load or frame
  size, because no stage stores a whole frame. A complete switch adds an
  Ethernet MAC and transceiver (about 0.5 µs), which are outside this RTL.
* One idle cycle per packet at an output for arbitration. A full-rate burst of
  1500-byte frames measured 3760 beats in 3778 cycles, or 9.95 Gb/s.
* AXI4-lite: one transaction at a time; writes take effect at the next clock
  edge.

## Where this departs from, or goes beyond, the source description

* **Only the star NoC is built.** The router is generic (destination →
  port), so routers could be chained. A mesh routing set-up, the flag
  forwarding between routers, and clock-domain converters for a 200 MHz NoC
  are not provided.
* **No Ethernet MAC, PCS/PMA or configuration port.** PHY ports carry frames.
  The Ethernet-layer function of the packet switch is the Ethernet parser
  plus its interface's ETH/NoC table. Partial reconfiguration is modelled by
  `prr_slot`.
* **The flag is one wire per interface**, not an in-band signal. The router
  qualifies each flag with "that input's data has left".
* **Choices of this design**, not given by the source: data and address
  widths; FIFO depth (512); ETH/NoC table size (32); the default destination
  and lookup enable; the drop rule for unroutable packets; round-robin
  arbitration; register maps; the host command format; staging depth (64);
  all parser checks.
* **Numbers that follow the source:** 15 router ports, 32 routing pairs of 8
  bytes per router, 2×2 PHY configuration, the PHY clock for the star NoC,
  and the download times of the parsers.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Packages are compiled first. For example,
the full platform at its default size:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  -y rtl -y tb +libext+.sv \
  rtl/noc_pkg.sv rtl/vnf_pkg.sv tb/tb_frames_pkg.sv tb/tb_nfv_platform.sv \
  --top-module tb_nfv_platform -o sim
./obj_dir/sim
```

`tb_nfv_platform` runs about a million cycles, which takes a few seconds. It
covers:

* circuit switching, with a throughput measurement;
* Ethernet and IP parser downloads under live traffic;
* a loss-free switch to the L2 packet switch, including hairpin traffic,
  contention and a router drop;
* the IP→UDP→UDP parser switch-overs of the demonstration, where the parsed
  counts must add up to the frames sent.

It also checks that every mechanism actually occurred. `tb_l2_latency` sets
up the per-port Layer 2 switch and sweeps the offered load and the frame
size. It measures the latency of every frame and checks that no PHY input is
ever held back. The unit testbenches
use smaller parameters where this saves time. `tb/tb_frames_pkg.sv` builds
the test frames, and computes IPv4 checksums independently of the RTL.
