# SPANIDS load balancer

A network intrusion detection system (NIDS) can only inspect traffic as fast as
its slowest sensor. SPANIDS spreads the traffic of one Gigabit Ethernet tap over
up to 64 sensor machines. It tries to keep each flow on one sensor, because a
sensor needs to see all packets of a connection. This FPGA design is the load
balancer. Every frame from the tap is parsed, and its IPv4 addresses and TCP/UDP
ports are hashed. The hash picks a sensor, and the frame's destination MAC
address is rewritten to that sensor's address. The frame then goes out to a
switch that connects the sensors.

Sensors that fall behind send *flow control* frames back. The load balancer then
moves that sensor's hottest hash buckets to the least busy sensors, or
*promotes* them. Traffic in a promoted bucket is hashed again at the next level,
so it spreads over more sensors. Promotions time out and are re-evaluated by a
periodic scan.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017). The
design is a single FPGA top, `spanids_top`, with four clock inputs:
- the tap PHY receive clock;
- the sensor/switch PHY clock, which is also the core logic clock;
- the PCI clock;
- the board reset.

## Frame formats

The PHYs use a 16-bit, 62.5 MHz interface.

**External format.** Data, valid and be. valid stays high through the 4-byte
Ethernet checksum. be is low in the last cycle when the frame has an odd number
of bytes. The even byte is on bits 15:8.

**Internal format.** All the logic between the two PHYs uses this format:
- four preamble words: 5555 5555 5555 55D5;
- then the Ethernet frame without its checksum;
- valid is already low during the last data word, and be gives that word's
  parity.

The synchronization FIFO (`afifo`) converts external to internal by running the
frame through three delay registers and combining delayed and undelayed valid/be
signals. The transmit stage (`transmit`) converts back and appends a fresh
CRC-32.

## Data path

```
tap PHY ─► afifo ─► delaypipe ─► transmit ─► switch PHY (tx)
 (tap_clk)   │  (sw_clk)  ▲
             └─► loadbalancer ──(mac_addr/mac_load)
                      ▲
switch PHY (rx) ──────┘  sensor sign-on replies and flow control frames
```

- **afifo.** A dual-clock FIFO from the tap clock to the core clock.
  - Overflow is handled per frame. At each frame start the free space is
    sampled. With fewer than 64 free entries the whole frame is skipped and
    `overrun` pulses, so frames are never cut.
  - The read side waits for 32 buffered entries. It then sends frames with a
    5-cycle gap.
- **delaypipe.** A 64-entry circular buffer that delays every frame by 49
  cycles. In that time the load balancer parses the header, hashes it, looks it
  up and returns a MAC address (`mac_load`).
  - When a frame reaches the output, its destination MAC is replaced with the
    pending address, and its source MAC with the load balancer's own.
  - A frame with no pending address is dropped. This covers non-IPv4 frames and
    sensors that are not signed on.
  - `no_routing` passes frames unchanged, and `no_frames` blocks the output.
- **init_control** (inside delaypipe). A free-running 28-bit counter paces
  start-up:
  1. The load balancer is reset for the first counter period.
  2. After the third roll-over (about 13 s) an *init-request* frame is
     broadcast.
  3. After the next roll-over `init_start` rises. By then every sensor has
     replied with its MAC and IP address, and the hash tables are filled.
  4. After one more roll-over `init_done` hands the output to traffic.

  A PCI write restarts the sequence. The request frame is held in a small table
  that PCI can rewrite.

## Load balancer

`loadbalancer` contains the routing blocks.

1. **decoder** follows the frame word by word. It skips a VLAN tag or an 802.3
   LLC/SNAP header and accepts IPv4 only, skipping any IP options. It produces a
   96-bit key {source IP, destination IP, source port, destination port}. For a
   non-IP frame it pulses `packet_ignore` instead.
2. **hashers** compute four different 12-bit XOR folds of the key. They are
   masked to the number of signed-on sensors: 256 buckets for 2–3 sensors, up
   to 4096 for 32 or more.
3. **hash_table** holds four tables of 4096 buckets. A bucket (`bucket_t`) is
   {timeout 5, promote 1, sensor 6, count 24}. Four controllers share each
   table's single port, with fixed priority in this order:
   - **Initialization** deals the used buckets to sensors 0, 1, …, n-1, 0, 1, …
     It counts the level-0 buckets per sensor (`sensor_buckets`) and reports
     those counts to the performance monitor.
   - **Routing** reads table 0 at hash 0 and writes the bucket back with its
     count incremented.
     - If the bucket is promoted, the walk continues in table 1 at hash 1, and
       so on.
     - A promoted bucket at level 3 hands the packet to a round-robin counter
       (level 4).
     - The chosen sensor goes out on `load_idx`, its packet rate is incremented
       (`sensor_packets`), and the bucket with its new count is offered to the
       sensor's hot list (`hotlist`).
   - **Periodic scan.** A pulse every *period* × 250 ms starts it. It halves
     every bucket count and decrements timeouts.
     - A promoted bucket whose timeout has run out is re-evaluated by the
       heuristic. It is either demoted or given a new random timeout.
     - At the end of the scan the hot lists are cleared and every per-sensor
       packet rate is halved.
   - **Feedback** handles a flow-control request from sensor *s*. It first
     locks the hot and cold lists. It then picks an action using the heuristic
     chosen in a register:
     - always move;
     - always promote;
     - random;
     - intensity (promote when 4·rate·buckets > threshold·total);
     - static.

     The action is applied to up to *bucket count* of *s*'s hottest buckets.
     Moving reassigns a bucket to the least busy sensor, or to the second least
     busy if the first is *s* itself.
4. **lb_policy** holds the two registered multipliers and the comparator of the
   intensity test. The operands and products can be read over PCI.
5. **fc_rcv** receives frames on the switch receive port.
   - It aligns the frame on the start delimiter, in either byte lane.
   - It checks the MAC, IP and UDP port (0x1BCD) addresses.
   - It reads the opcode:
     - A **reply** during the sign-on window adds the sender to a 64-entry MAC
       table and writes its MAC and IP into the performance record.
     - A **flow control** frame is matched against the table in two pipeline
       stages (match vector, then encoder). The sensor index is queued for the
       feedback controller.
   - The table also turns routed sensor indices into MAC addresses for the
     delay pipe.

Performance data leaves `loadbalancer` as one command stream. It is merged from
four sources:
- sign-on records;
- bucket counts;
- flow-control counts;
- per-frame byte and packet counts, where the byte count comes from `byte_cntr`.

## PCI side

- **pci_target.** A 33 MHz, 32-bit PCI target. It has configuration space and
  two 1 MB memory BARs.
  - Each access becomes a read or write strobe on a simple backside bus.
  - Each strobe is answered by an acknowledgement (`pci_ack`, three cycles
    later).
  - PCI lines that are shared on the bus appear as separate in, out and
    output-enable signals.
- **pci_regs.** The register file. Region 0, at byte offsets, holds:
  - 0x00: the magic number;
  - 0x04: initialization control and status;
  - 0x08: mode bits;
  - 0x0C: performance-monitor snapshot and clear;
  - 64-bit event counters. Write the upper word to latch a counter and read
    both words; write the lower word to clear it. Counter offsets:
    - 0x10 packets;
    - 0x18 non-IP;
    - 0x40 moved;
    - 0x48 promoted;
    - 0x50 demoted;
    - 0x58–0x78 per routing level;
    - 0xC0 overflow;
  - tuning registers 0x28–0x38: rate period, random bounds, threshold, buckets
    per feedback, heuristic;
  - last-hash and multiplier debug registers;
  - the init-request table at 0x100;
  - the last received, transmitted and flow-control frames (`framelatch`);
  - the four hash tables at 0x10000–0x1FFFC, each entry read as {intensity,
    promoted, sensor}.

  Region 1 holds the performance records.
- **perf_monitor.** Commands cross from the core clock through a dual-clock FIFO.
  - Each sensor has a 32-byte record:
    - its bucket count, MAC and IP;
    - its flow-control count, 32 bits;
    - its byte and packet counts, 64 bits each.
  - The commands are WRITE16, ADD32 and ADD64 (which adds the data and
    increments the next 64-bit word).
  - A snapshot copies all records to a second page, and clear zeroes selected
    counts. When both are requested, the snapshot is taken first.
- **LEDs.** `frameack` stretchers drive LEDs 3–5 (active low).
  - LED 3 shows initialization, then transmit activity.
  - LED 4 shows receive activity.
  - LED 5 shows reset, then PCI activity.

## Interfaces of the top

`spanids_top` has the following ports:
- `tap_clk`, `tap_rx_*`: the tap PHY receive port;
- `sw_clk`, `sw_tx_*`, `sw_rx_*`: the switch PHY, where `sw_tx_err` is tied low;
- `pci_*`: the PCI pins, split into `_i`/`_o`/`_oe` for tri-state pads;
- `led[2:0]`.

The following parts are board level and are not in the RTL:
- the PHY daughtercards;
- the clock DLL buffers;
- the other board LEDs;
- the PCI bus itself.

Parameters of the top, with their defaults:
- `CNT_W` = 28: initialization counter;
- `UNIT_CYCLES` = 15 625 000: 250 ms at 62.5 MHz;
- `ACK_CNT_W` = 20: LED stretch;
- `DELAY` = 49.

Addresses are fixed in `spanids_pkg`:
- load balancer MAC 02:53:50:4E:44:01;
- IP 192.168.1.1;
- UDP port 0x1BCD.

## Where this design departs from the specification it follows

- The MAC/IP identity of the load balancer, the PCI vendor/device IDs (0x10EE /
  0x5350), the hash functions, the random generator and most register reset
  values are choices made here. The specification gives none of them.
- The sign-on window is from the init request until `init_start`.
- The feedback controller and the periodic scan never run at the same time.
- The hot list stores the bucket's level, so that a promoted bucket can be
  found again. It can also clear one sensor's list.
- At the end of each scan the per-sensor packet counts are halved. The
  specification only says they are shifted; a right shift by one bit, like
  the bucket counts, is assumed.
- ADD32 uses 32-bit alignment inside a record, because the flow-control count
  starts at half-word 6. The command table asks for 64-bit alignment.
- The LLC/SNAP skip is three words after the length field, which is where a real
  SNAP header carries the type.
- The synchronization FIFO is a Gray-pointer FIFO written here. The original uses
  a generated 1023-entry vendor core.
- The init counter is one binary counter rather than four chained 7-bit
  counters; its timing is the same.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Each testbench compares
the block with an independent model, for example:
- CRC-32 for `transmit`;
- sorted-list models for the hot and cold lists;
- a bucket-table model for `hash_table`;
- PCI bus-master tasks for the PCI blocks.

`tb_spanids_top` runs the whole card. It uses 4096-cycle initialization periods,
4000-cycle rate units and short LED stretch.
- **Setup and sign-on.** A PCI master configures the card, and five sensor
  models sign on.
- **Routing under move.** IPv4 flows and non-IP frames are routed under the move
  heuristic. Every IP frame must reach a signed-on sensor with a valid
  checksum.
- **Promotion and demotion.** Hot flows are promoted level by level up to the
  round-robin level. The scan later demotes them.
- **Mode bits.** `no_routing` and `no_frames` are exercised.
- **Overload.** The FIFO is overloaded to cause overruns.
- **Counters and records.** All event counters are read over PCI and compared
  with the events seen inside the design. The per-sensor records, snapshot and
  clear are checked.

The testbench counts every mechanism and fails if one never happened. The
mechanisms are:
- initialization and sign-on;
- routing at each of the five levels;
- move, promote, demote;
- non-IP drop;
- flow control;
- scan;
- overrun;
- no_routing, no_frames;
- snapshot, clear;
- PCI reads and writes;
- LED activity.

There is no full-size end-to-end run. With `CNT_W` = 28, start-up alone takes
5 × 2^28 cycles, about 21 s of hardware time and far beyond what a simulator
can cover. The largest top-level configuration simulated is the one above. All
blocks are simulated at their default sizes, except:
- `init_control` and `delaypipe` (counter width 6);
- `frameack` (counter width 8);
- `pulse_gen` (7-cycle unit).

To run one testbench with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_hash_table \
    rtl/spanids_pkg.sv $(ls rtl/*.sv | grep -v spanids_pkg) tb/tb_hash_table.sv
./obj_dir/Vtb_hash_table
```

The package must come first. `-Wno-fatal` keeps width warnings in the
testbenches' arithmetic from stopping the build.

## Files

- `rtl/`: one module or package per file.
  - Helper modules: `async_fifo_core` (Gray-code dual-clock FIFO), `sync_fifo`,
    `cascade_cntr`.
  - `spanids_pkg` holds the shared types, constants, the CRC byte step and the
    default init-request frame.
- `tb/`: `tb_<block>.sv` for each block.
