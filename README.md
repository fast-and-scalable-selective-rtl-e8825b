# FaSR transport layer: selective retransmission for RDMA in shared on-chip memory

An RDMA NIC that loses a packet can either go back N (resend everything after the loss) or
resend only what was lost. Selective retransmission is far cheaper on the wire. The cost is
state: the receiver must remember which packets after the hole have already arrived. The
classic way is a bitmap of one bandwidth-delay product (BDP) per connection. At 5,000 queue
pairs (QPs) and a BDP of 500 packets that is megabytes, too much for on-chip memory.

This design implements the FaSR scheme ("Fast and Scalable Selective Retransmission for
RDMA"). It rests on three observations:

1. **Most losses are single losses.** A QP that has lost exactly one packet needs no bitmap.
   Everything between RCV-NXT (the next expected PSN) and the highest out-of-order PSN seen
   (sack-high) has arrived. When the missing packet comes back, RCV-NXT jumps straight to
   sack-high + 1. This is the *fast path*.
2. **All QPs together can hold no more than one BDP of out-of-order packets,** because they
   share one receive port. So SR state and bitmaps can come from a small pool shared by the
   whole NIC instead of being reserved per QP.
3. **The sender needs no bitmap of its own** if the receiver says how many holes it has.
   Every SACK carries a 3-bit lost-cnt. The sender resends a gap only when lost-cnt grew;
   a gap without growth means SACKs were lost, not data.

With the default sizes (20 SR state units, 70 bitmap blocks of 10 bits) the shared recovery
memory is about 390 bytes for 5,120 QPs. A QP that is not recovering costs one 1-byte
pointer and a flag on top of its normal context.

## Block diagram

```
 rx (MAC) ─► InputQ ─► qpc_manager ─► SackQ ─► sr_engine ─┬─► ACKQ ───────────► send_queue ─► tx (MAC)
                           ▲                               │                      ▲ port 1: data
 wqe (scheduler) ──────────┘ ─► NewWQEQ ─► cc ◄── RetxQ ◄──┤                      │
                                           │               └─► dlv (to DMA / host buffer)
                                           └─► DMAQ ─► dma_req   dma_rsp ─────────┘
 rto ─► RTOQ ─► sr_engine
 cc, sr_engine, rto ─► update_queue ─► qpc_ram ─► (cc: UNACK for the window, rto: timers)
```

| Module | What it does |
|---|---|
| `fasr_transport` | Top level. Wires the modules and FIFOs and keeps a free-running time-stamp counter. |
| `qpc_manager` | Drops illegal input: unknown opcode, QPN out of range, empty work request. Maps the QPN to its context address. |
| `sr_engine` | SR module. Sends data packets to `sr_rx` and ACK/SACK/FNACK packets and timeouts to `sr_tx`. Owns both shared pools. |
| `sr_rx` | Receiver rules: fast path, slow path, FNACK, lost-cnt, bitmap acceleration, GBN fallback. |
| `sr_tx` | Sender rules: UNACK, SACK-driven resends, timeout and FNACK handling. |
| `sr_state_pool` | Level-1 pool: 20 SR state units and an availability bitmap. |
| `bitmap_pool` | Level-2 pool: 70 blocks of 10 bits, each with a 1-byte next pointer. |
| `bitmap_ctrl` | Walks one QP's list of blocks: set bits at the tail, scan for a hole from the head, free a list. |
| `cc` | Chooses the next data packet. Retransmissions go first, then a round robin over QPs inside their window. |
| `update_queue` | Arbitrates QPC writes from CC, SR and RTO onto the one write port, in that priority. |
| `qpc_ram` | Shared context fields (UNACK, SND-NXT, timer stamp). One write port, two read ports. |
| `rto` | Visits one QP per cycle. Fires when data is outstanding and the timer stamp is `RTO_CYCLES` old. |
| `send_queue` | Merges replies and data onto the wire. Replies have priority. |
| `sync_fifo` | Every queue between modules (valid/ready, first-word fall-through). |
| `fasr_pkg` | Packet, request, SR-state and event types. |

Packets are header descriptors (`pkt_t`: opcode, QPN, PSN, ACK PSN, lost-cnt, retransmit
flag). Payload never enters this logic. Outgoing data is requested from DMA on `dma_req`, and
the DMA engine returns the packet on `dma_rsp` when its payload is ready. Accepted incoming
data is announced on `dlv` for placement in host memory.

## Receiver: one packet, five cases

For a QP with no SR state (not recovering), `sr_rx` only compares the PSN with RCV-NXT:

- equal: in order, ACK(RCV-NXT + 1);
- below: duplicate, ACK(RCV-NXT);
- above: first loss. A Level-1 unit is allocated and the QP stores its index.
  - If exactly one packet is missing, the QP is on the fast path: the unit stores
    sack-high = PSN and lost-cnt = 1.
  - Otherwise the gap is recorded in a bitmap from the start (slow path).

For a recovering QP (it holds a unit):

| PSN | Meaning | Action |
|---|---|---|
| = RCV-NXT | the lost head came back | **fast:** RCV-NXT = sack-high + 1, unit released, ACK. **slow:** scan the bitmap for the next hole (see below). |
| > sack-high | new out-of-order packet | If PSN = sack-high + 1 on the fast path, only sack-high moves. Any new gap adds to lost-cnt and forces the slow path. SACK(PSN, RCV-NXT, lost-cnt). |
| < RCV-NXT, or = sack-high | duplicate | ACK(RCV-NXT) |
| between RCV-NXT and sack-high | a retransmission whose predecessor was lost again | dropped, **FNACK**(PSN, RCV-NXT) |

**lost-cnt** is 3 bits. When more holes exist than it can count, it sticks at 7 and an
overflow flag is set. Every following SACK then goes out as the opcode `OP_SACK_OVF`. The
flag clears only when the recovery ends.

**Switching fast → slow.** The run RCV-NXT+1 … sack-high has arrived but is not in any
bitmap yet. There are two cases:

- The run is shorter than one block (10 packets): it is written into the first block.
- The run is 10 to 1023 packets long: only its length goes into the 10-bit
  *compression-cnt*, and the bitmap starts after it (bitmap acceleration). A run longer than
  1023 cannot be represented; the QP then stays on the fast path in GBN mode.

**Switching slow → fast.** Each retransmitted head makes `sr_rx` decrement lost-cnt and scan
for the next hole. When lost-cnt is back to 1 (and has not overflowed), the blocks are freed,
the new RCV-NXT is stored, and the QP continues on the fast path with its unit. When the scan
passes sack-high, recovery is over and the unit is freed.

**Pool exhaustion (GBN fallback).** If no Level-1 unit or no Level-2 block is free, the
packet is dropped and only ACK(RCV-NXT) is returned. The QP then drops all further
out-of-order packets until its recovery ends. The sender's timeout eventually goes back N.
This case has one subtlety. Suppose the fast → slow switch itself cannot be recorded because
the pool runs out half way through writing the run. Then the partial list is freed and the
QP stays on the fast path (in GBN mode). This keeps the exit rule RCV-NXT = sack-high + 1
correct.

### The bitmap lists

Each SR state unit describes one linked list of blocks:

- the head and tail block indices (1 byte each);
- the block count;
- `base`, the PSN of bit 0 of the head block.

Block *i* covers `base + 10i … base + 10i + 9`. The list is only ever touched at its ends:

- out-of-order packets set bits at or beyond the tail, appending zeroed blocks as needed;
- a retransmitted head scans from the head for the first 0 at or after RCV-NXT + 1,
  releasing every block it passes completely.

Past the end of the list every bit counts as 0, so a scan of an empty or exhausted list
returns `base + offset`. Scan time grows by one cycle per block visited. Latencies from the
accepting clock edge to the response are:

- SET: 4 + (blocks appended) cycles;
- SCAN: 2 + (blocks visited) cycles;
- FREE_ALL: 3 + (blocks freed) cycles.

### Timing of the receiver

A fast-path decision is made in the cycle the packet is accepted, and the reply is
registered (valid one cycle later). A packet that changes the SR state writes it back at the
next edge. The next packet waits for that write, so fast-path out-of-order packets are taken
every other cycle; in-order packets can be taken every cycle. Slow-path packets additionally
wait for `bitmap_ctrl`. At the 200 MHz that a "two cycles = 10 ns" operation implies, this
gives 100–200 Mpps. A 200 Gb/s link with 1 KB packets needs 24.4 Mpps.

## Sender

`sr_tx` holds these per-QP fields:

- UNACK;
- the last sack-high and lost-cnt received;
- a recovery flag;
- an "overflow seen" flag;
- an "FNACK armed" flag.

| Event | Action |
|---|---|
| ACK beyond UNACK | UNACK advances and is written to the QPC RAM, which also restarts the timer. FNACK is re-armed. An ACK past sack-high ends recovery. |
| first SACK | Enter recovery and resend UNACK … SACK−1 at once. |
| later SACK with a gap | Resend the gap only if lost-cnt grew or overflow is reported. Otherwise the gap means SACKs were lost, and nothing is resent. |
| timeout, or FNACK (once per new ACK) | lost-cnt > 1 (or overflow): resend UNACK … sack-high−1. lost-cnt = 1: resend UNACK only. Not recovering: go back N from UNACK. |

Resends leave as `retx_req_t` (start PSN, count, go-back flag). `cc` serves them one packet
per cycle, ahead of new data. A go-back rewinds SND-NXT.

## Parameters (top level)

| Parameter | Default | Where it comes from |
|---|---|---|
| `NUM_QP` | 5120 | "5K QPs" in the FaSR evaluation |
| `N_UNITS` | 20 | Level-1 units for BDP 500 at 2 % loss |
| `N_BLK` | 70 | Level-2 blocks for the same case |
| `BLK_BITS` | 10 | bits per block for the same case |
| `WINDOW` | 500 | packets in flight per QP (one BDP) |
| `RTO_CYCLES` | 20000 | this design's choice (100 µs at 200 MHz) |
| `Q_DEPTH` | 16 | this design's choice |

Block indices are 1 byte wide, and 8'hFF is the null pointer, so `N_BLK` and `N_UNITS` must
stay below 255. `lost-cnt` (3 bits) and compression-cnt (10 bits) are package constants.

At the default sizes the top synthesizes (generic cells) to about 2,200 cells plus 73 k
flip-flop bits and 1.16 Mbit of arrays. Almost all of it is per-QP context for 5,120 QPs.

## Where this design departs from FaSR as published

- **One list per SR state unit.** The published 38-byte unit holds "5 pairs" of tail
  pointers, five compression counters and five lost counters. Their purpose is not
  explained, so each unit here holds one list, one compression-cnt and one lost-cnt
  (88 bits).
- **Two published sizings disagree.** The memory analysis gives 70 blocks of 10 bits. The
  FPGA prototype quotes 1600 B shared, in 16-bit blocks. The analysis sizing is the default;
  the NS3 study's 270 B pool would need `N_BLK = 216`.
- **No sender bitmap.** A slow-path timeout resends the whole range UNACK … sack-high−1
  instead of only the holes.
- **No READ path.** RDMA READ requests, their TxQ and RDreqQ queues, and the resubmission of
  timed-out READs are not modelled. Only WRITE/SEND-style data is handled.
- **Fixed window instead of DCQCN.** The published measurements also ran with DCQCN off.
- **QPC organisation.** Each module keeps its private context fields next to its logic. The
  QPC RAM holds only the shared group (UNACK, SND-NXT, timer). The QPC manager writes
  nothing, so the update queue's writers are CC, SR and RTO.
- **Bitmap requests** use a direct request/response handshake rather than request and
  response FIFOs.
- **Identity hash.** The QPN is the context address.
- **Not designed here:** DMA engine, work-request scheduler, MAC/PHY, PCIe and host. Their
  boundaries are the `dma_*`, `dlv_*`, `wqe_*`, `rx_*` and `tx_*` ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- compares results with an independent model or worked-out values;
- ends with `TB_RESULT checks=N failures=M`;
- has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_sync_fifo`, `tb_sr_state_pool`, `tb_bitmap_pool`, `tb_qpc_ram`, `tb_update_queue`, `tb_send_queue` | Random traffic against reference models: ordering, priorities, masks, full/empty. |
| `tb_bitmap_ctrl` | List growth, scans across blocks, release, pool exhaustion, cycle counts. |
| `tb_sr_rx` | Receiver against a packet-level reference model. It exercises scripted loss patterns (single loss, a burst beyond lost-cnt, a long run for compression-cnt, short runs) plus random loss. It checks every reply, every delivery, the one-cycle fast-path reply latency, and that both pools are empty at the end. |
| `tb_sr_tx`, `tb_rto`, `tb_cc`, `tb_qpc_manager` | Sender rules, timer expiry and restart, window and go-back, legality filter. |
| `tb_sr_engine` | A hand-worked sequence through both halves and both pools. |
| `tb_fasr_transport` | End to end at reduced sizes (details below). |
| `tb_fasr_transport_full` | The same at the default sizes, with no parameter overrides. |

**End-to-end testbenches.** Two transports are joined by a lossy link with random loss,
per-QP loss bursts, lost retransmissions and lost replies. DMA is a behavioural model. The
testbench checks that:

- every posted packet is delivered exactly once;
- the pools drain to empty;
- illegal inputs are counted;
- each mechanism fired at least once: fast and slow path, both switches, FNACK sent, taken
  and ignored, lost-cnt overflow, compression-cnt, pool exhaustion, all three timeout
  cases, lost-SACK detection, window stall.

The default-size run moves 20,000 packets on 40 QPs and uses all 20 units and 70 blocks.

Run one testbench with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fasr_pkg.sv tb/tb_fasr_transport_full.sv \
          --top-module tb_fasr_transport_full -Mdir obj_full
./obj_full/Vtb_fasr_transport_full
```

Other modules are found through `-Irtl`. For another testbench, substitute its name.

## Known lint messages

- Unused `qpc` bits in `cc`: only UNACK is read.
- Unused `in_pkt` bits in `sr_tx`: the QP index arrives separately.
- Empty pin connections in `fasr_transport`, `cc`, `update_queue` and `send_queue`: the FIFO
  occupancy and arbiter grant outputs are deliberately left open.

Each of these is explained in the module's opening comment.
