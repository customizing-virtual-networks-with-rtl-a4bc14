# Virtual-network data plane with partially-reconfigurable hardware routers

Many virtual networks share one physical router. Each virtual network needs its own forwarding
rules, and each one's rules change over time. Software routers give the flexibility. They are
slow, though: a few hundred Mbit/s for small packets. Hardware routers in an FPGA run at line
rate, but changing one normally means reloading the whole FPGA. That stops every other virtual
network for seconds.

This design keeps each hardware virtual router in its own **partially-reconfigurable region
(PRR)** of the FPGA. One router can be replaced by loading a partial bitstream into its region.
This takes 0.6 s for a 680 KB bitstream over a 12 MHz JTAG link. Meanwhile, the shared
("static") logic and the routers in the other regions keep forwarding unchanged. Virtual
networks that do not get a hardware region are sent to software routers on the host, over the
CPU DMA queues.

The RTL describes the FPGA side of such a system: the static logic and the routers. It is
sized like the reference system:

- Four 1 Gbit/s Ethernet ports, plus four host DMA queue pairs.
- A 62.5 MHz clock.
- Two reconfigurable regions.

## Data path

```
 MAC RX 0..3 (ports 0,2,4,6) ─┐                       ┌─► region 0 (router) ──┐
 CPU RX 0..3 (ports 1,3,5,7) ─┤                       ├─► region 1 (router) ──┤
                              ▼                       │                       ▼
    8 RX queues ─► input arbiter ─► packet classifier ┼─► CPU transceiver ───► output queues ─► MAC TX / CPU TX
                                     (Design Select    │                        (8 TX queues)
                                      Table lookup)    └─► bypass (host → wire) ─┘
```

A packet moves as 64-bit beats, one per clock, with valid/ready handshakes throughout. That is
4 Gbit/s at 62.5 MHz, which is the sum of the four ports. Each beat (`pkt_beat_t`) carries:

- 8 data bytes; byte 0 of the beat is bits [63:56].
- A byte-keep mask.
- An end-of-packet flag.
- A small side-band: source port, one-hot destination port, and router id.

Even port numbers are the Ethernet MACs; odd ones are the host DMA queues. Each packet is
handled as follows:

1. **Input arbiter.** It merges the eight RX queues round-robin. Once a packet has been
   granted, it keeps the grant until its last beat, so packets are never interleaved.
2. **Packet classifier.** It stores the whole packet, then decides where it goes:
   - From a CPU RX queue (a packet the host's software router has already processed): bypass
     straight to the MAC TX port of the same number (CPU RX *i* → MAC TX *i*).
   - Otherwise it looks up the IPv4 destination address in the **Design Select Table**, a CAM
     of (virtual IP, type, id) rows:
     - A hit of type HW sends the packet to region *id*.
     - A hit of type SW sends it to the CPU transceiver with software-router id *id*.
     - Misses, non-IPv4 frames and runts are dropped and counted.
3. **Regions.** A packet for a region that is not currently running a router is dropped at
   once, not held. This is what isolates the virtual networks: a region under reconfiguration
   cannot stall the arbiter for everyone else.
4. **CPU transceiver.** It overwrites the destination MAC with the address of the software
   router's virtual interface. It then queues the packet on CPU TX queue `id mod 4`.
5. **Output queues.** They merge the region outputs, the transceiver and the bypass path. Each
   packet goes into the TX queue of its destination port. A full queue back-pressures rather
   than drops.

## Inside a region: the hardware virtual router

A region (`prr`) is entered and left only through **bus macros**. These are 8-bit synchronous
registers fixed on the region boundary, so that the static logic's routing never depends on
what is loaded. `bm_link` carries the 64-bit beat, its valid bit and its side-band through a
row of such 8-bit macros; every bit therefore arrives one cycle later, and all arrive together.

A ready signal cannot be combinational across the boundary, so the link uses credits instead.
The receiving side has a 16-beat FIFO. Its *almost full* flag travels back through a bus
macro, and the sender stops while it is set. The 4-beat slack covers the round trip.

The router (`vrouter` = `fwd_logic` + `fwd_table` + `arp_table`) performs these steps for each
packet:

- **Header check.** The frame must be at least 34 bytes. Its destination MAC must be this
  router's MAC for the arrival port. It must be IPv4 with no options (EtherType 0x0800, first
  byte 0x45).
- **Checksum check.** The one's-complement sum of the IPv4 header must be 0xFFFF.
- **TTL check.** A packet with TTL ≤ 1 is dropped.
- **Route lookup.** There are two configurations:
  - *Configuration I* (`FLOW = 0`) matches the destination prefix only.
  - *Configuration II* (`FLOW = 1`, flow routing) matches a source prefix as well.
  - The first matching entry wins, so store longer prefixes first.
  - The entry gives a next hop and an output MAC port. Next hop 0 means the destination is
    directly attached.
- **ARP lookup.** The next hop is looked up to get the new destination MAC.
- **Rewrite.** The destination MAC becomes the ARP result, and the source MAC becomes the
  router's port MAC. TTL is decremented and the header checksum updated incrementally
  (RFC 1624), so the payload is never re-read.

Packets that fail a step are dropped, with one counter per reason. The router stores each
packet whole. While the packet streams in, it captures the header fields from the first five
beats. After the last beat it makes the decision in a single cycle. The first beat leaves 3
cycles after the last beat entered. Throughput is one beat per cycle, with at most one idle
cycle between packets. A 64-byte packet therefore occupies 8 to 9 cycles; the testbenches
measure 8 on average. Line rate needs only 32 cycles per 64-byte packet, so the router has about
four times the throughput it needs.

## Reconfiguration

Partial reconfiguration is a property of the FPGA, not of logic, so the region models it at its
ports. Both router variants are instantiated in the region, and only the "loaded" one is out of
reset. Writing a configuration (0 blank, 1 Config I, 2 Config II) to the region's control
register starts three steps:

1. **Drain.** The region reports itself inactive at once, and from then on the classifier
   drops new packets for it. Packets already inside are allowed to leave. This step ends when
   the links and the router have been empty for 4 cycles, so no packet is ever cut.
2. **Load.** The router is held in reset for `RECONFIG_CYCLES` clocks, which also clears its
   tables. The default of 37,500,000 cycles is 0.6 s at 62.5 MHz.
3. **Run.** The new variant comes out of reset; its tables must be programmed again. A
   *blank* configuration leaves the region empty. In the FPGA this saves the region's dynamic
   power.

Requests made during a drain or load are ignored. The other region, the software path and the
bypass path are not touched at any point.

## Host registers

There is one 32-bit register port (`reg_req`: valid, write, 24-bit address, data). Writes take
effect on the clock edge. Reads are combinational from the address. `addr[15:12]` selects the
block:

| Block | Addresses | Contents |
|---|---|---|
| 0 | Design Select Table | entry `addr[11:4]`; field `addr[3:0]` 0 = virtual IP, 1 = {valid[31], type[9:8] (1 HW, 2 SW), id[7:0]} |
| 1 | router in region `addr[23:16]` | `addr[11:10]`: 0 forwarding table, 1 ARP table, 2 port MACs, 3 counters |
| 3 | CPU transceiver | entry `addr[11:4]`, `addr[0]` 0 = MAC[47:32], 1 = MAC[31:0] |
| 4 | reconfiguration | write region `addr[11:4]` field 0, `wdata[1:0]` = configuration; read field 0 {reconfiguring[31], cfg[1:0]}, field 1 completed reconfigurations, fields 8–12 classifier counts (HW, SW, bypass, dropped, dropped for inactive region) |

Within a router block:

- **Forwarding table.** Entry `addr[9:4]`. Fields: 0 destination prefix, 1 destination mask,
  2 source prefix, 3 source mask, 4 next hop, 5 {valid[31], port[2:0]}.
- **ARP table.** Entry `addr[9:4]`. Fields: 0 IP, 1 MAC[47:32], 2 MAC[31:0], 3 valid[31].
- **Port MACs.** Port `addr[5:4]`; `addr[0]` 0 = MAC[47:32], 1 = MAC[31:0].
- **Counters.** 0 forwarded, 1 bad header, 2 bad checksum, 3 TTL expired, 4 no route, 5 no ARP.

The region fields (`addr[23:16]` for routers, `addr[11:4]` for reconfiguration) allow up to
256 regions.

## Files

| File | Module |
|---|---|
| `rtl/netvirt_pkg.sv` | shared types (`pkt_beat_t`, `reg_req_t`, configuration enums), register block numbers, checksum helper |
| `rtl/pkt_fifo.sv` | beat FIFO with almost-full; every RX, TX and output queue |
| `rtl/input_arbiter.sv` | packet-granular round-robin merge |
| `rtl/design_select_table.sv` | virtual IP → (HW/SW, id) CAM |
| `rtl/packet_classifier.sv` | store-and-forward dispatch, drop counters |
| `rtl/bus_macro.sv`, `rtl/bm_link.sv` | 8-bit boundary register; stream through a row of them with credit back-pressure |
| `rtl/fwd_table.sv`, `rtl/arp_table.sv` | route (destination or flow prefix) and ARP lookups |
| `rtl/fwd_logic.sv` | header/checksum/TTL checks, lookups, rewrite |
| `rtl/vrouter.sv` | one router: the three above plus its registers |
| `rtl/prr.sv` | reconfigurable region: links, both router variants, drain/load sequencing |
| `rtl/cpu_transceiver.sv` | MAC rewrite and DMA queue choice for software routers |
| `rtl/output_queues.sv` | merge and per-port TX queues |
| `rtl/netvirt_top.sv` | the whole data plane |

Parameters of the top:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_PRR` | 2 | number of regions |
| `RECONFIG_CYCLES` | 37,500,000 | load time of a region |
| `DST_ENTRIES` | 32 | Design Select Table rows |
| `FT_ENTRIES` | 32 | forwarding-table entries per router |
| `ARP_ENTRIES` | 32 | ARP entries per router |
| `SW_ENTRIES` | 16 | software-router MACs in the transceiver |
| `Q_DEPTH` | 256 | beats per RX/TX queue; 2 KB, one maximum frame |

At the defaults, synthesis gives about 38 k flip-flops and 470 kbit of memory. The memory is
mostly the 256-beat packet buffers.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops, and it has a watchdog. `tb/tb_util_pkg.sv` builds
IPv4/Ethernet frames with correct checksums for them. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_netvirt_top \
    rtl/netvirt_pkg.sv rtl/*.sv tb/tb_util_pkg.sv tb/tb_netvirt_top.sv
./obj_dir/Vtb_netvirt_top
```

Pass `netvirt_pkg.sv` first. Leave any other testbench file off the command line.

- **`tb_netvirt_top`** runs the whole design with a 3000-cycle load time. Routers A and B sit
  in the two regions; C and D are software routers. The test runs in four phases:
  1. All traffic types, with random TX back-pressure.
  2. Region 1 is reconfigured from Configuration I to II. Traffic for A, C, D and from the
     host keeps flowing, and every one of those packets must arrive.
  3. B forwards by source and destination.
  4. Region 1 is blanked.

  The test counts each mechanism and fails if one never happened: hardware forwarding per
  region, the software path, the bypass, drops by reason, drops for an inactive region,
  reconfiguration and TX stalls. It also checks one packet per 8 cycles through the routers.
- **`tb_netvirt_scale`** runs twenty regions (`NUM_PRR = 20`), with smaller tables and queues.
  This is the router count of the larger FPGA generation. All twenty routers forward at once;
  together they carry one 64-byte packet per 8 cycles. Region 5 is then replaced by
  Configuration II while the other 19 lose nothing. Finally, network 7 is migrated: its
  Design Select Table entry is pointed at a software router while region 7 is reconfigured,
  then pointed back. None of its packets are lost.
- **`tb_netvirt_top_full`** is the same test at every default parameter, including the full
  37,500,000-cycle load. It takes about 3 minutes in Verilator.

## Differences from the reference system, and limits

- **Forwarding tables.** The reference keeps them in block RAM. Here they are register arrays
  searched in parallel. That gives one lookup per cycle, but it costs flip-flops and limits the
  table to tens of entries.
- **Reconfiguration.** It is modelled, not performed. Both variants exist side by side, and the
  load time is a counter. Pin-compatible bitstreams, column placement and the JTAG transfer
  belong to the FPGA tool flow and are not represented.
- **Outside the RTL:**
  - The Ethernet MACs/PHYs, the PCI interface and DMA engine, and the JTAG configuration port.
    The top brings out plain RX/TX streams and a register port in their place.
  - The host software: the driver, software bridge, software routers, control planes, and the
    policy that decides which virtual networks go to hardware.
- **Own choices.** The following are this design's own and are not taken from the reference:
  - The widths, queue depths, port numbering and register map.
  - The header checks listed above.
  - Dropping rather than stalling for inactive regions.
  - The drain step.
  - The CPU queue choice, `id mod 4`.
  - The bypass mapping, CPU RX *i* → MAC TX *i*.
- **Scaling.** On a larger FPGA the same architecture holds about 20 regions. Here that is
  `NUM_PRR = 20`, simulated with reduced tables.
  - All regions share one classifier and one 64-bit data path. Aggregate throughput therefore
    stays at 4 Gbit/s, whatever the region count.
  - Each region costs about 17.5 k flip-flops at the default table sizes, because it holds both
    router variants of about 8.6 k each. A real partially-reconfigurable device holds only the
    loaded one.
