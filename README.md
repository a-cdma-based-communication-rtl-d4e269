# CDMA-based on-chip network for a multiprocessor SoC

This is synthesizable SystemVerilog for an on-chip interconnect where every node sends at the same
time over one shared channel. Nodes are told apart by code division multiple access (DS-CDMA), not
by time slots or arbitration. Each node owns a 7-chip pseudo-noise (PN) codeword. To send a data
bit it puts the codeword, or its inverse, onto seven wires. The channel adds up all seven nodes'
codewords chip by chip and then cuts each sum down to **one bit**, a majority vote. So the whole
shared medium is just seven wires, whatever the number of nodes. A receiver XORs the seven wires
with a node's codeword and counts the mismatches. Four or more mismatches mean that node sent a 1.

The design follows a published architecture for a CDMA network-on-chip. It has network interfaces
(CNIs) that split sending from receiving, a forward channel for data, a reverse channel for
ACK/NACK flow control, and a synchronizer. Seven nodes form a **subnetwork**. Larger systems are
built as a two-level hierarchy: a **hubnetwork** joins seven subnetworks through **hubnetwork
interfaces**, which gives 42 resources. The top module, `cdma_noc_top`, is that 42-resource
network.

## Why a one-bit channel still works

With seven users and a majority vote per chip, the receiver does not see the linear sum that CDMA
normally relies on. Decoding survives the truncation only for a suitable code set. This design uses
the seven cyclic shifts of the length-7 m-sequence `1110100`:

| node | chips 0..6 |
|------|------------|
| 1 | 1110100 |
| 2 | 1101001 |
| 3 | 1010011 |
| ... | one more rotation per node |

Chip *j* of node *n* is element (*j* + *n* − 1) mod 7 of the sequence. `cdma_pkg::pn_code()`
computes the table, and each node's codeword register resets to its entry. All 2^7 combinations of
seven simultaneous bits have been checked through the truncated channel: every node's bit comes
back correctly (`tb_cni_demodulator`). An idle node sends its plain codeword, the same as a 0 bit.
This keeps the majority balanced: with all nodes idle, every chip sums to 4.

Because the truncated channel cannot tell "idle" from "sending zeros", node IDs run from 1 to 7 and
ID 0 is never used. A receiver that despreads a destination field of 000 sees "no packet". That is
also why one subnetwork holds at most seven nodes with 3-bit IDs.

## Blocks

```
cdma_noc_top ── 7 × subnetwork (nodes 1..6: resources, node 7: hub_interface)
             ── 1 × subnetwork used as the hubnetwork (node k ↔ HI of subnetwork k)

subnetwork ── synchronizer ── 2 × channel_sync (forward, reverse)
           │               └─ 2 × packet_sync  (forward, reverse)
           ── comm_channel (forward)   comm_channel (reverse)
           ── 7 × cni ── mni ── sync_fifo (TX buffer), cni_modulator, 7 × cni_demodulator
                      └─ sni ── 7 × (cni_demodulator + sync_fifo RX buffer), cni_modulator
```

| file | what it is |
|------|------------|
| `rtl/cdma_pkg.sv` | code length, ID width, PN table function, `sync_t` strobe bundle |
| `rtl/cni_modulator.sv` | spread codeword register + inverter + 2:1 select (TX channel) |
| `rtl/cni_demodulator.sv` | XOR, 3-bit ones counter, ≥4 bit detector (RX channel) |
| `rtl/comm_channel.sv` | per-chip summer and one-bit truncation, registered |
| `rtl/channel_sync.sv`, `rtl/packet_sync.sv`, `rtl/synchronizer.sv` | chip tick and packet-slot strobes |
| `rtl/sync_fifo.sv` | TX/RX buffers |
| `rtl/mni.sv` | master CNI: sends data packets, waits for ACK/NACK, resends |
| `rtl/sni.sv` | slave CNI: receives from all codes at once, decides ACK/NACK, sends ACK packets |
| `rtl/cni.sv` | MNI + SNI of one node |
| `rtl/subnetwork.sv` | seven CNIs, two channels, synchronizer (also the hubnetwork) |
| `rtl/hub_interface.sv` | store-and-forward bridge between a subnetwork and the hubnetwork |
| `rtl/cdma_noc_top.sv` | 42-resource two-level network |

## Packets and timing

Everything advances on the **chip tick** `chip_en` from the channel synchronizer. By default this
is every clock (`SYNC_DIV = 1`). All seven chips travel in parallel, so a packet of *L* bits takes
*L* ticks.

**Data packet** (forward channel), sent MSB first:

| dst ID | src ID | payload |
|--------|--------|---------|
| 3 bits | 3 bits | `PAYLOAD_W` bits (13 by default, so *L* = 19) |

**ACK packet** (reverse channel), 4 bits: `{ID of the waiting sender, 1 = ACK / 0 = NACK}`.

The packet synchronizer divides time into slots that all nodes share. Forward slots are *L* ticks
long and reverse slots are 4 ticks long. Because every packet starts on a slot boundary, a
receiver knows where each packet begins and needs no free-running correlator. Each channel has its
own pair of strobes in `sync_t`:

- `tx_start`: senders load a packet at the end of this tick. Bit *k* is on the wires in tick
  `s + 1 + k`.
- `rx_start`: the first bit reaches the receivers in this tick (`s + 2`, because the channel
  output is registered).

A packet that starts in slot tick *s* can be read from the destination's RX buffer at tick
`s + L + 2`. That is 21 ticks for the default 19-bit packet and 37 ticks for a 35-bit packet.

## Flow control (the hard part)

The forward and reverse channels run side by side. The reverse channel exists so that the
receiver's answer returns while the data packet is still arriving.

1. **MNI, sending.** At a forward slot start, an MNI that has nothing outstanding loads the head
   of its TX buffer. The head stays in the buffer until it is answered, and the MNI sends nothing
   else meanwhile.
2. **SNI, receiving.** Each SNI despreads all seven codes in parallel, so up to seven packets can
   arrive at one node in the same slot, one per source. Each source has its own RX buffer
   (`RX_DEPTH` = 2). After the third bit, the destination ID is complete. If it matches, the SNI
   looks at that source's RX buffer. If there is room, it marks an **ACK** and keeps the packet.
   If the buffer is full, it marks a **NACK** and drops the packet. The room cannot disappear
   before the packet completes, because each buffer takes at most one packet per slot and the
   resource only removes entries.
3. **SNI, answering.** Each marked answer waits as a pending bit, one per source. At every reverse
   slot start (every 4 ticks), the SNI sends the pending answer with the lowest source ID, using
   its own code on the reverse channel.
4. **MNI, hearing the answer.** Every MNI despreads all seven codes on the reverse channel and
   picks out the ACK packet that carries its own ID. On an ACK it pops the packet. On a NACK it
   sends the same packet again in a later slot.

With one answer per slot, the ACK arrives about 13 ticks into a 19-tick slot, so an MNI can send
back to back. If several sources hit the same SNI in one slot, the later answers can miss the
next slot start. Those senders then skip a slot, which costs throughput but never correctness.
Nothing depends on when an answer arrives: there are no timeouts and no lost packets.

Measured with uniformly random destinations across the seven nodes. Offered traffic is the average
fraction of slots in which a node injects a packet. Latency runs from the start of the slot that
carries a packet's last transmission to the moment it can be read:

| offered traffic | length 19: throughput, latency | length 35: throughput, latency |
|-----------------|--------------------------------|--------------------------------|
| 0.2 | 0.17, 21.1 ticks | 0.18, 37.1 ticks |
| 0.6 | 0.57, 21.3 ticks | 0.55, 37.3 ticks |
| 1.0 (random arrivals) | 0.86, 21.4 ticks | 0.93, 37.4 ticks |
| saturated (TX buffers always full) | 0.96 | 0.99 |

The original evaluation reports flat latency of length + 2 and throughput reaching full capacity.
The small shortfall at length 19 comes from the serialized ACK packets described above.

## Two-level network

In each subnetwork, node 7 is a hubnetwork interface (HI) instead of a resource. Hub node *k*
serves subnetwork *k*, and all levels reuse the same seven codes. A resource addresses
`{subnet, node}` with subnet 1..7 and node 1..6. The subnetwork payload then starts with a routing
header:

| dst subnet | dst node | src subnet | src node | data (`DATA_W` = 16) |
|------------|----------|------------|----------|----------------------|

Subnetwork packets are therefore 6 + 12 + 16 = 34 bits. A packet for the sender's own subnetwork
goes directly to the destination node. Any other packet goes to node 7. Its HI forwards the packet
into the hubnetwork, addressed to the destination subnet. The destination's HI then forwards it
into its own subnetwork, addressed to the destination node. Each hop has its own ACK/NACK flow
control. Between hops the packet waits in the HI's one-entry registers and in the CNI buffers.

Measured at the default size, with every resource keeping its TX buffer full:

| fraction of traffic that stays local | throughput (fraction of capacity) |
|---|---|
| 1.0 | 0.99 |
| 0.9 | 0.81 |
| 0.5 | 0.34 |
| 0.0 | 0.16 |

With no locality, all 42 resources share the hubnetwork's seven nodes, so throughput is bounded
near 7/42. The published curve has the same end points (about 0.16 and 1.0). It rises faster at
high locality (about 0.98 at 0.9).

## Choices made in this RTL

The published description gives the block structure, the modulator and demodulator in detail, the
packet fields and the ACK/NACK principle. The following are this design's own choices:

- **Codes:** the m-sequence shifts above. The source only says "7-bit PN codeword".
- **Truncation rule:** a chip is 1 when at least 4 of the 7 codewords have a 1 there.
- **Reserved ID 0** marks "no packet".
- **Slots:** the forward slot is one packet long. The reverse slot is 4 ticks.
- **Channel register:** each channel's output is registered once.
- **One outstanding packet per MNI,** resent on NACK.
- **RX buffers:** one per source. ACK if that buffer has room, NACK if it is full. Pending answers
  go out lowest source ID first. The resource reads the RX buffers through a round-robin arbiter.
- **Buffer depths:** `TX_DEPTH` = 4 and `RX_DEPTH` = 2. The source gives no sizes.
- **CNI halves:** a CNI has both an MNI and an SNI by default. `HAS_MNI`/`HAS_SNI` leave one
  out. A missing half still drives its plain codeword, exactly like an idle half, so the majority
  on the channel stays balanced.
- **Two-level network:** the HI sits at node 7, and the routing header travels in the payload.
  The source does not give a packet format for the two-level network.
- **Channel sync clock:** built as a clock enable (`SYNC_DIV`), not a separate clock.
- **Codeword registers:** each has a reload port (`code_we`/`code_in`). All instances tie it off.

What is not here: the resources themselves (processors, memories, IP). Their CNI ports are the
top's ports.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `subnetwork` | `N_NODES` | 7 | nodes (7 is the most the code set supports) |
| | `PAYLOAD_W` | 13 | payload bits; packet = 6 + `PAYLOAD_W` |
| | `TX_DEPTH`, `RX_DEPTH` | 4, 2 | buffer depths |
| | `SYNC_DIV` | 1 | clocks per chip tick |
| `cdma_noc_top` | `N_SUB` | 7 | subnetworks (at most 7) |
| | `DATA_W` | 16 | user data bits per packet |

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. Each one builds
the same way, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cdma_pkg.sv tb/tb_cdma_ref.sv \
          tb/tb_cdma_noc_top.sv --top-module tb_cdma_noc_top -Mdir obj -o sim
./obj/sim
```

- `tb/tb_cdma_ref.sv` is an independent reference model: the code table, the modulation, the
  truncated channel and the despreading.
- `tb_cni_modulator`, `tb_cni_demodulator`, `tb_comm_channel`, `tb_channel_sync`,
  `tb_packet_sync`, `tb_synchronizer`, `tb_sync_fifo` and `tb_hub_interface` test the leaf
  blocks.
- `tb_mni` and `tb_sni` run cycle-exact reference models of the flow control. They cover NACK and
  resend, late answers, foreign ACKs, full buffers and seven-way concurrent arrival.
- `tb_cni` puts a full CNI, a send-only CNI and a receive-only CNI on their own channels. It
  checks loopback, latency and NACK recovery.
- `tb_subnetwork` runs uniformly random traffic at packet lengths 19 and 35. Each run goes through
  an offered-load sweep, saturation, a stalled receiver and a drain. It uses the helper
  `tb/subnet_traffic.sv`.
- `tb_cdma_noc_top` runs the full 42-resource network at default parameters. It sweeps the
  locality of the traffic and checks delivery, ordering and latency bounds. It also requires that
  local delivery, remote delivery, NACKs in both levels and HI back-pressure all occur. Building
  it takes under a minute; running it takes seconds.
