# Frame Assembly Unit, ingress direction

In a Frame Switching network, edge nodes pack many small client packets into a few large
containers. The core switches then handle far fewer packets per second. This RTL is the
ingress half of such an edge node's **Frame Assembly Unit (FAU)**, built on Ethernet.

- Client Ethernet packets arrive with a VLAN tag. The tag's VLAN ID tells which connection
  the packet belongs to, that is, its *forwarding equivalence class* (FEC).
- Each packet is wrapped with the Generic Framing Procedure (GFP, ITU-T G.7041) and queued
  per FEC.
- The queued bytes are cut into **fixed-size 9000-byte Ethernet jumbo frames**. Each jumbo
  frame carries the core VLAN ID and priority of its connection. A FEC can also be set to
  a variable-size mode.

Because every container has the same size, the design has to do three things:

- **Segment** a packet that does not fit into the rest of a container. The packet continues
  in the next container.
- **Pad** a container when a timer forces it out before it is full.
- Keep each FEC's byte stream a **valid, continuous GFP stream** across container borders.
  A receiver can then find the packets again no matter where the containers cut them.

The design follows a published FPGA testbed for frame switching. That testbed's unit
handled seven FECs per direction at 10 Gbit/s, with a GMPLS control plane to set up
connections. The stage structure, the configuration items and the assembly rules come from
that source. The formats, widths and sizes are this design's own. They are marked as such
below and in the opening comment of each file.

## Pipeline

```
client line ─► eth_rx_fcs ─► idf_encoder ─► vlan_classifier ─► gfp_encoder ─► fec_demux
  (bytes+FCS)   FCS check     store&fwd,      VLAN ID → FEC      GFP framing,     │ write port
                & strip       IDF header      (table D)          per-FEC scrambler│ per FEC
                                                                  state (clear A)  ▼
                                                   ┌──────── assembly_component × 7 ───────┐
                                                   │ buffer + fill-level control, timer (B)│
                                                   └───────────────┬───────────────────────┘
                                                          frame_rdy│grant, chunk streams
core line ◄─ eth_tx_fcs ◄─ idf_decoder ◄─ eth_vlan_hdr_gen ◄─ concatenator ◄─ rr_scheduler
 (9000-byte    FCS          IDF header      Eth + VLAN header   one continuous   round robin,
  frames)      appended     removed         per FEC (table C)   payload          1 frame/grant

fms: address/value register port → all configuration (A–D, MAC settings), status counters
```

Every link between stages moves **one byte per clock**. A link is a `beat_t`
(`data`, `sop`, `eop`) plus `valid` and `ready`. The two line sides have no back-pressure,
like a real link. The top module `fau_ingress` connects the stages exactly as drawn. Its
ports are the client line in, the core line out, and the register port.
Each stage with a `valid`/`ready` output also carries a concurrent assertion of the
handshake rule: once a beat is offered, it stays offered and unchanged until it is taken.
Simulate with `--assert` to check it.

### Internal data format (IDF)

From the IDF encoder up to the IDF decoder, every unit in flight starts with a 4-byte
header: a packet, a chunk of a container, or a whole container payload.

| byte | content |
|------|---------|
| 0 | flags: `[7]` FEC valid, `[6]` drop, `[5:4]` kind (packet / data chunk / pad chunk / frame), `[3]` first chunk, `[2]` last chunk |
| 1 | FEC number |
| 2–3 | length of what follows, big-endian |

The IDF encoder stores each packet completely before sending it on. The length in the
header is known only at the end of the packet, and the GFP core header needs it.

## GFP per FEC: the part that needs care

A packet of FEC *f* leaves the `gfp_encoder` as a frame-mapped GFP client frame:

```
core header      PLI = len+4, cHEC = CRC16(PLI)        XOR 0xB6AB31E0
payload header   type 0x0001, tHEC = CRC16(type)       ┐ scrambled, x^43+1,
payload          the client packet (without FCS)       ┘ self-synchronous
```

The CRC-16 uses the polynomial x^16+x^12+x^5+1, preset 0. The payload scrambler is one
continuous bit stream *per FEC*, because the receiver descrambles each FEC's stream
separately. The encoder serves all FECs, so it keeps the 43-bit scrambler state of every
FEC in a small state memory:

- It loads FEC *f*'s state when a packet of FEC *f* starts.
- It writes the state back at the end of the packet.
- "Clear state" (register A) sets it to zero. This must be done before a connection opens,
  so that sender and receiver start from the same state.

**Admission.** A packet that is lost after encoding would corrupt the next 43 bits of its
FEC's descrambled stream. The encoder therefore also decides admission. If the FEC's
assembly buffer has fewer than `len+8` free bytes, the packet is not encoded: the
scrambler state is untouched, and the packet is flagged `drop`. `fec_demux` then discards
it, together with packets that have no FEC.

### Cutting the stream into containers

Each `assembly_component` owns a circular buffer (32 KiB) of its FEC's GFP bytes. It asks
for the link (`frame_rdy`) when either of these holds:

- **Threshold:** buffered bytes plus pending lead bytes (see below) ≥ `PAYLOAD`
  (8978 = 9000 − 18-byte Ethernet/VLAN header − 4-byte FCS).
- **Timeout:** all four of the following hold.
  - The timer is enabled.
  - `timeout` is not 0. A timeout of 0 means pure threshold assembly.
  - At least one complete packet is buffered.
  - The timer has counted `timeout` units of 10 ns. It counts only while the buffer holds data
    and no frame is being sent. It starts again from zero after every container and
    whenever the buffer runs empty.

On a grant, the component sends exactly `PAYLOAD` bytes (in fixed-size mode) as up to
three chunks:

| chunk | when | content |
|-------|------|---------|
| lead  | the previous container ended inside a GFP idle frame | the remaining 1–3 bytes of that idle frame |
| data  | always (unless empty) | buffered GFP bytes. A threshold frame takes `PAYLOAD − lead` bytes and may cut a packet: **segmentation**. The rest of the packet heads the next container. A timeout frame takes only bytes of complete packets. |
| pad   | timeout frames | GFP idle frames (`B6 AB 31 E0`, the scrambled all-zero core header) up to `PAYLOAD` bytes. The last idle frame may be cut at the container border. |

Padding never lands inside a packet, and a cut idle frame is always completed first in the
next container. As a result, the concatenation of all containers of one FEC is a valid GFP
stream. The testbench proves this: it delineates and descrambles that stream and recovers
every packet.

**Variable-size frames.** A FEC can be switched to variable-size frames, with bit 1 of its
assembly control register. Its timeout frames then carry no pad chunk. They hold only the
lead bytes and complete packets, so they are shorter than a full container. Threshold
frames keep the full size, and segmentation stays on. `PAYLOAD` is then the largest
frame. The source names variable-size frames as a capability but says nothing about how
they are formed. This mode is the simplest reading, and fixed size is the default.

`rr_scheduler` grants the link to one ready component for one whole container. It picks
the next requester after the one served last. `concatenator` strips the chunk headers and
sends the bodies back to back behind one frame header (FEC, length). The length reaches
it from the granted component through the scheduler (`frame_len`). `eth_vlan_hdr_gen`
puts the Ethernet header in front. The header's fields come from the FEC's table entry:

```
dst MAC (table C) | src MAC (port) | 0x8100 | PCP (3 bit, service class), DEI=0, VID (table C) | EtherType 0x88B5
```

`idf_decoder` drops the IDF header, and `eth_tx_fcs` appends the CRC-32 FCS. Each
fixed-size container is then 9000 bytes on the wire.

## Control: register map and connection order

`fms` takes one address/value request per clock. Reads answer one clock later on
`rsp_valid`/`rsp_rdata`. Word addresses:

| address | register |
|---------|----------|
| `0x0000` | `[0]` VLAN support, `[1]` jumbo support on the client receive MAC (reset: both on) |
| `0x0001`, `0x0002` | source MAC bits 47:32, 31:0 |
| `0x0010+i` | status (read only): 0 bad client frames, 1 packets dropped by the IDF encoder, 2 unclassified, 3 refused for buffer space, 4 dropped as unassigned, 5 drop-flagged, 6 frames concatenated, 7 frames sent, 8 frames sent by timeout |
| `0x0100+16f+0` | D: classifier `[12]` enable, `[11:0]` client VLAN ID |
| `+1` | A: any write clears FEC *f*'s GFP scrambler state |
| `+2` | B: `[0]` timer enable; `[1]` variable-size frames |
| `+3` | B: timeout in 10 ns units (32 bit) |
| `+4` | C: `[14:12]` VLAN priority, `[11:0]` core VLAN ID |
| `+5`, `+6` | C: destination MAC bits 47:32, 31:0 |
| `+7` | `[0]` FEC in use. The connection manager keeps its record of occupied FECs here; the datapath ignores it. |

**Opening a connection** has a required order. First clear A, set B and set C. Only then
enable D. The classifier entry is the gate: from the next packet on, traffic for that
VLAN flows.

**Closing a connection** has the reverse order. First remove D, which stops new packets.
Then enable the timer (B), which flushes what is left in the buffer as a padded container.

The register layout and the request port are this design's own. The source describes a
UMP protocol of address/value pairs carried over a separate 1 Gbit/s Ethernet port. That
protocol's frame format is not specified, so neither that MAC nor a UMP parser is included.

## Timing and throughput

- **Datapath.** One byte per clock everywhere. At the assumed 100 MHz clock this is
  0.8 Gbit/s, not the 10 Gbit/s of the original hardware. 10 Gbit/s would need a 64-bit
  datapath, where the concatenator would also have to realign bytes. That is not built.
- **Timer clock.** `CLK_PER_10NS` sets how many clocks make one timer unit.
- **Per-stage latency:**

  | stage | added latency |
  |-------|---------------|
  | client receive MAC | 4 bytes (the FCS look-ahead) |
  | IDF encoder | one whole packet (store and forward) |
  | classifier | its first 20 bytes |
  | GFP encoder | 16 clocks per packet: it reads the 4-byte IDF header, then sends 12 header bytes (IDF, GFP core, GFP payload) before the packet streams through |
  | header generator | 22 clocks per container |
  | transmit MAC | 4 FCS bytes plus 1 idle clock per container |

- **Traffic the built size can carry.** At 100 MHz, the 0.5 Gbit/s background-load case of
  the original measurements fits: the client bytes plus per-packet header handling stay
  below 0.8 Gbit/s. The 1 and 2 Gbit/s cases and full line rate need a faster clock or a
  wider datapath.
- **Measured latency.** `tb_fau_latency` runs threshold-only assembly with 9000-byte
  containers and one clock taken as 1/300 µs. Latency is measured from a packet's first
  byte to the end of the container that completes it. Mean and largest latency fall as the
  load rises, which is the expected reciprocal dependence on the fill time. All values
  stay far below 1 ms.

  | background load | container fill time | mean latency | largest |
  |-----------------|---------------------|--------------|---------|
  | 0.5 Gbit/s | 129 µs | 107 µs | 296 µs |
  | 1 Gbit/s | 78 µs | 80 µs | 162 µs |
  | 2 Gbit/s | 35 µs | 58 µs | 103 µs |

  Each mean includes the 30 µs it takes to send a container on a byte-wide link at that
  clock.
- **Large packets.** A client jumbo packet is refused, not stalled, when its FEC buffer
  lacks room. With 32 KiB per FEC, one full payload plus one maximal packet always fit.

## What is not here

- **Egress direction.** The source gives no detail beyond saying that it mirrors the
  ingress direction.
- **Other parts.** The 10G PHYs and the 1G control-plane MAC are not included, and neither
  are the Ethernet switches of the edge node and core. The GMPLS control plane and the
  SNMP-to-UMP gateway are software and are not included either.
- **Frame modes.** Variable-size frames are only the unpadded-timeout reading described
  above. Variable-size frames were not used in the testbed's measurements.
- **Transmit MAC settings.** The transmit MAC ignores VLAN and jumbo settings: its frames
  are always tagged jumbo frames.

## Simulating

All files are SystemVerilog-2017. `rtl/fau_pkg.sv` must come first. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fau_pkg.sv tb/fau_tb_pkg.sv tb/tb_fau_ingress.sv --top-module tb_fau_ingress
./obj_dir/Vtb_fau_ingress
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog counts
a failure if a test hangs. Stimulus uses `$urandom` only.

| testbench | what it covers |
|-----------|----------------|
| `tb_<stage>` | one per stage, against independent reference models in `fau_tb_pkg` (bit-serial CRC-32, CRC-16 and x^43+1 scrambler) |
| `tb_fau_ingress` | whole pipeline at 400-byte payloads and 2 KiB buffers. Three connections are set up through the register port. Mixed traffic includes bad-FCS, unassigned and untagged frames, then a timer-driven connection, then an overload that forces buffer refusals, then a teardown. It requires each of these to happen at least once: threshold frames, padded timeout frames, segmentation, an idle frame cut at a container border, round-robin alternation, FCS drop, unassigned drop, overflow refusal, a short unpadded variable-size frame. |
| `tb_fau_ingress_full` | the top with all defaults (7 FECs, 9000-byte containers). Nineteen 500-byte packets produce one full container with a segmented packet. A teardown then flushes the rest into a padded container. |
| `tb_fau_latency` | the latency measurement of the testbed: a Poisson background of 0.5, 1 or 2 Gbit/s and a constant 500-byte test flow share one FEC, with threshold-only assembly. One clock stands for 1/300 µs here, because a byte-wide path needs more than 250 MHz for 2 Gbit/s. It prints the test flow's latency histogram. It checks that the mean wait is about half the container fill time, that it grows as the load falls, and that no latency reaches 1 ms. |

`tb/fau_frame_checker.sv` is the receiver model shared by the three top-level tests. It
checks each container's length, FCS and header. It then rebuilds each FEC's GFP stream,
checks both HECs, descrambles, and compares every recovered packet with the packets sent.

## Changing it

- `fau_pkg` holds the shared types, the container size (`JUMBO_BYTES`), the EtherType and
  the GFP constants.
- `fau_ingress` parameters:

  | parameter | default | meaning |
  |-----------|---------|---------|
  | `NF` | 7 | number of FECs |
  | `PAYLOAD` | 8978 | container payload bytes |
  | `BUF_BYTES` | 32768 | per-FEC buffer, power of two, at least `PAYLOAD` plus the largest GFP packet |
  | `CLK_PER_10NS` | 1 | clocks per timer unit |

- The buffers are plain arrays with a combinational read. For block RAM on an FPGA, a
  registered read with one byte of prefetch would be needed in `idf_encoder` and
  `assembly_component`.
