# AER-SRT: spike distribution over a synchronous serial ring

Spiking neural network emulators that span several chips or FPGAs have to
deliver every spike to the other chips within a fixed time budget. AER-SRT
(Address Event Representation over a Synchronous Serial Ring Topology) does
this with a unidirectional ring. Each node has one serial output, to the
next node, and one serial input, from the previous node. Spikes travel as
16-bit packets that carry the spiking neuron's address. Every packet goes
once around the ring, so every node sees every spike, and the node that
produced it takes it off when it comes back.

The ring works in time slots, so spikes never collide. No node is a master.
A node joins a ring through two settings: its Chip Id and the Ring Size.

This repository holds synthesizable SystemVerilog for one ring node: the
network interface plus a traffic generator/consumer that stands in for the
neural emulator. It also holds testbenches that build rings of 1 to 60 nodes
around a behavioural model of the serial link. The design follows the
published AER-SRT architecture: its phases, packet types, block structure,
1024-word buffers and 125 MHz / 16-bit link. Where that description is
silent, the choices are this design's own; they are listed under
[Departures and own choices](#departures-and-own-choices).

## The emulation cycle

The emulator runs in cycles, one per time slot. The reference slot is 1 ms:
0.5 ms for computing and 0.5 ms for distributing spikes. Each cycle has two
phases:

1. **Execution phase (EP).** Neurons and synapses are computed. The node
   queues its new spikes in its **Input FIFO**. The ring carries only IDLE
   packets, which keep the serial links locked.
2. **Distribution phase (DP).** This phase has two steps:
   - **Ring synchronisation (RSP).** Nodes finish their EP at different
     times. A node that finishes sends one SYNC packet, then forwards the
     SYNCs of the other nodes. When a node has received Ring Size SYNCs,
     every node is ready, and it raises **AER_ON**.
   - **Event transmission (ETP).** Each node sends one burst: START (with
     its Chip Id), its spikes as data packets, then FINISH. After that it
     forwards what arrives from upstream. When a node has received Ring Size
     FINISH packets, every block has gone all the way round. The node raises
     **AER_done**, the Output Interface pulses **AER_eo_distrib**, and the
     next EP can begin.

The whole ring's traffic passes every link, so distribution takes about one
clock per spike in the whole system. The per-node latency is paid once per
node, during synchronisation. The expected DP length, in 125 MHz cycles, is

    t_DP  ≈  Σ s_n  +  42·N  +  56

Here s_n is the number of spikes of node n and N is the number of nodes. The
node capacity is the FIFO depth: at most 1024 spikes per node per cycle.

## Packet format (`aer_srt_pkg`)

| bits | data packet (bit 15 = 1) | control packet (bit 15 = 0) |
|------|--------------------------|-----------------------------|
| 15   | 1                        | 0                           |
| 14:12| address[14:12]           | type: 0 IDLE, 1 SYNC, 2 START, 3 FINISH |
| 11:7 | address[11:7]            | 0                           |
| 6:0  | address[6:0]             | Chip Id of the sending node (IDLE: any value) |

An event handed to the consumer is 22 bits: `{source Chip Id, address}`. The
source comes from the START packet that opened the block.

## Node structure

```
                     aer_srt_node
 +-------------------------------------------------------------------+
 | aer_event_gen  --events-->  aer_input_if --> Input FIFO ---+      |
 |  (emulator         <--eo_distrib--                          v      |
 |   stand-in)                                    aer_tx --> tx_* ---+--> link to next node
 |       ^                                           ^ AER_ON,       |
 |       |                                           | AER_done      |
 |  aer_output_if <-- events -- aer_rx <-- rx_* <----+---------------+--< link from previous node
 |                              |  \-> Bypass FIFO --^ (to aer_tx)   |
 |  aer_error (sent vs. returned)   aer_config (Chip Id, Ring Size)  |
 |  aer_cc_module --> do_cc (clock compensation request to link)     |
 +-------------------------------------------------------------------+
```

| module | role |
|--------|------|
| `aer_srt_node` | top: generator/consumer plus network interface. Link user streams and `do_cc` are ports. |
| `aer_srt_ni` | network interface; wires the blocks below together |
| `aer_input_if` | takes events during the EP, writes the Input FIFO, pulses AER_eo_exec |
| `aer_fifo` | first-word-fall-through FIFO; Input FIFO (15-bit addresses) and Bypass FIFO (16-bit packets), 1024 deep |
| `aer_tx` | packet framing state machine (below) |
| `aer_rx` | packet decoder: SYNC/FINISH counting, source tracking, own-packet removal, event output |
| `aer_output_if` | event stream to the consumer, AER_eo_distrib, events per DP |
| `aer_error` | compares own events sent with own events returned, at every AER_done |
| `aer_config` | Chip Id (7 bits) and Ring Size (1..128) registers |
| `aer_cc_module` | requests a clock-compensation burst every 5000 cycles (10,000 bytes on a 2-byte lane) |
| `aer_event_gen` | runs emulation cycles with a configurable spike count and EP length; counts received events |

The serial link core (8B/10B framing, transceivers, differential lines) is
vendor IP and is not part of the RTL. The node talks to it through two
16-bit user streams: `tx_tdata/tx_tvalid/tx_tready` and
`rx_tdata/rx_tvalid`. The node also drives `do_cc`; while it is high, the
core sends compensation characters and holds `tx_tready` low.

## The transmitter state machine (`aer_tx`)

The node offers a word on every cycle. The word moves when `tx_tready` is
high.

| state | sends | leaves when |
|-------|-------|-------------|
| `S_EXEC` | IDLE | an AER_eo_exec has been seen (it is latched, so it may come early) |
| `S_SYNC` | its own SYNC | the word is accepted |
| `S_RSP` | forwards SYNCs waiting in the Bypass FIFO; otherwise IDLE | AER_ON is high and no SYNC is at the Bypass FIFO head: START goes out |
| `S_DATA` | Input FIFO contents as data packets, then FINISH | FINISH is accepted |
| `S_BYPASS` | Bypass FIFO contents; IDLE when it is empty | AER_done is high and the Bypass FIFO is empty or holds only next-cycle SYNCs |

### Why packets cannot be lost or misordered

This is the subtle part of the design. Three rules keep the distributed
counting consistent without any master node:

- **A node removes only its own packets.** START, SYNC and FINISH all carry
  the sender's Chip Id. A data packet belongs to the Chip Id of the last
  START. `aer_rx` writes into the Bypass FIFO every non-IDLE packet that is
  not its own. Each node therefore receives exactly Ring Size SYNCs and Ring
  Size FINISH packets per cycle: N−1 forwarded ones plus its own returning.
- **SYNCs stay ahead of data.** SYNCs that arrive during a node's own EP wait
  in the Bypass FIFO. They go out right after the node's own SYNC. After
  AER_ON, any SYNCs still queued leave before START. `aer_rx` writes the
  Bypass FIFO in the same cycle the packet arrives, so the last SYNC is
  already visible when AER_ON is seen. As a result, every node has counted
  all its SYNCs before the first START reaches it.
- **The DP ends only when it is drained.** Bypass mode ends after AER_done,
  once the Bypass FIFO is empty or holds only a fast neighbour's SYNC for the
  next cycle. Any such SYNC is held for the next RSP.

While a node sends its own block, the upstream block piles up in its Bypass
FIFO: at most its length plus START and FINISH. That is why a node's spike
count, not the ring size, is limited by the FIFO depth.

## Error detection

Every packet returns to its source, so `aer_error` counts two things per
cycle: the Input FIFO writes, and the data packets that come back under the
node's own Chip Id. At AER_done it compares them. A difference sets
`err_mismatch`, held until the next DP, and increments `err_count`. Events
dropped because the Input FIFO was full, and any refused Bypass FIFO write,
set the sticky `err_overflow`. Errors are only detected, not corrected.

## Timing and measured performance

All of the following come from simulation with a 36-cycle link latency
(link core plus serial line), one clock at 125 MHz, and the default
parameters:

| configuration | RSP | DP | Σs + 42N + 56 |
|---------------|-----|----|----------------|
| 3 nodes × 1000 spikes | 113 (37/node) | 3120–3156 | 3182 |
| 6 nodes × 1000 spikes | 224 | 6279 | 6308 |
| 6 nodes × 500 spikes | 224 | 3273 | 3308 |
| 60 nodes × 976 spikes (58,560 events) | 2222 | 61,011 | 61,136 |

The published prototype measured 121 cycles of RSP and 3189 cycles of DP for
3 × 1000 spikes. The 60-node case fits the 0.5 ms window of 62,500 cycles.
The ring's cost grows linearly with the number of nodes, at 37 cycles per
node; of these, 36 are the link model's latency.

Node-internal latencies:
- `aer_rx` writes the Bypass FIFO combinationally.
- The FIFO head is visible the next cycle.
- `aer_output_if` adds one register stage.
- AER_eo_exec comes one cycle after the generator's end-of-EP.
- AER_eo_distrib comes two cycles after the last FINISH arrives.

Size: after a coarse generic synthesis, one node has about 340 flip-flops
and 31,744 memory bits. The memory is the two FIFOs, 1024 × 15 and
1024 × 16 bits, which map to two block RAMs. The published FPGA prototype
reported 4332 flip-flops and 2 block RAMs per node, but that figure includes
the link core and debug logic.

## Departures and own choices

- **Top level.** The ring is not a module. The link core is vendor IP, so
  `aer_srt_node` is the top, and rings are assembled in the testbenches with
  `tb/aurora_link_model.sv`. Its latency (36 cycles) and clock-compensation
  behaviour are modelled, not measured.
- **Packet fields.** The header codes, and the Chip Id field in SYNC and
  FINISH, are choices of this design. The architecture defines only a 3-bit
  header for four control types, and a Chip Id in START.
- **SYNC ordering.** Draining queued SYNCs before START, and holding
  next-cycle SYNCs after AER_done, are choices of this design. They make the
  ordering argument above hold.
- **Output Interface.** It streams events as they arrive. It does not buffer
  them until the end of the DP, and it has no back-pressure.
- **Dropped events.** When the Input FIFO is full, the Input Interface drops
  the event and flags it. It does not stall the generator.
- **Configuration port.** The write port (`cfg_we`, `cfg_addr` 0 = Chip Id /
  1 = Ring Size, `cfg_wdata`) and its reset values (Chip Id 1, Ring Size 3)
  are this design's.
- **Clock compensation.** The burst length of 6 cycles is assumed. The
  5000-cycle period follows from "every 10,000 bytes" on a 2-byte lane. The
  testbenches run every node from one clock, so actual frequency offsets are
  not simulated.
- **Event generator.** Its address pattern `{cycle[3:0], index}` and its
  controls (`gen_spikes`, up to 2047 so overflow can be tested;
  `gen_exec_cycles`) are this design's.
- **Not built.** The prototype's debug cores (virtual I/O, logic analyser)
  are not included. Neither is error *correction*, which is only outlined as
  future work.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aer_srt_ring \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/aer_srt_pkg.sv tb/tb_aer_srt_ring.sv
./obj_dir/Vtb_aer_srt_ring
```

| testbench | what it runs |
|-----------|--------------|
| `tb_aer_srt_ring` | 3 nodes at default parameters, four emulation cycles. Covers a late node in RSP, 1000 and 500 spikes per node, a packet lost on a link (error flag), and an Input FIFO overflow. Checks event counts per source, flags, timing against the t_DP formula, and that each mechanism occurred. |
| `tb_aer_srt_scaling` | rings of 1–6 nodes at 500 and 1000 spikes per node, and a 60-node ring of 58,560 events against the 62,500-cycle window (about 30 s) |
| `tb_aer_srt_random` | 4 nodes with reset released at different times (clock-compensation bursts out of phase). Runs 12 cycles of random loads (0–1000 spikes, including idle nodes) and random EP lengths, and checks every event's source and address |
| `tb_aer_srt_ni` | the network interface alone, in a one-node loop-back ring, with link loss, clock compensation and overflow |
| `tb_aer_tx`, `tb_aer_rx` | exact packet order and phase-signal timing of transmitter and receiver |
| `tb_aer_fifo`, `tb_aer_input_if`, `tb_aer_output_if`, `tb_aer_error`, `tb_aer_config`, `tb_aer_cc_module`, `tb_aer_event_gen` | unit tests |

To build a ring of another size, instantiate `aer_srt_node` N times. Connect
each node's `tx_*` through a link to the next node's `rx_*`. Write Chip Ids
1..N (any distinct 7-bit values) and Ring Size N through `cfg_*`, then raise
`gen_run`. The parameters of `aer_srt_node` are:
- `FIFO_DEPTH`: spike capacity per node.
- `CHIP_ID_RST` and `RING_SIZE_RST`: configuration values after reset.
- `CC_PERIOD` and `CC_LEN`: clock-compensation period and burst length.
