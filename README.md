# S-LINK to PCI: autonomous DMA of link data into host memory

S-LINK is a point-to-point data link used in particle-physics read-out. Its
destination card (LDC) delivers 32-bit words. Most are data words. Some are
*control words*, which frame the data into packets (events). The job of an
S-LINK to PCI interface is to land each packet in the host PC's memory with as
little help from the host CPU as possible.

The idea of this design:

* The host **posts buffers ahead of time**. For each buffer it writes a PCI
  address and a maximum length into a *Request FIFO*. That takes two single
  PCI writes.
* The card then **moves packets by itself**. It buffers link words, strips out
  the control words, and becomes PCI bus master. It writes the data into the
  posted buffer in bursts of at most 1 Kbyte.
* Once a whole packet is in host memory, the card **reports it**. It puts a
  message into an *Acknowledge FIFO*: the packet's begin and end control words
  and the number of bytes written. The host collects it with three single
  PCI reads.

That is five single PCI cycles per packet. Everything else is bus-master
burst traffic. The RTL covers:

| design | what it is |
|---|---|
| `s32pci64_core` | one complete channel, as on the single-link S32PCI64 card |
| `filar` | four such channels behind one PCI core (the FILAR card). It has a per-channel enable, per-channel flow control, a temperature register, and an *emulator* mode. In emulator mode one link feeds all four channels, as the FILAR emulator firmware on single-link hardware does. |
| `pci_blaster` | bus-exerciser firmware for the same board. It sources or sinks continuous DMA streams to benchmark a PC. |
| `slink_pci_top` | places `filar` and `pci_blaster` side by side. They share no signals. |

This RTL is written from a published description of these interfaces. Many
details, such as register maps, handshakes and encodings, are not given there,
and were chosen here. The sections below say which are which.

## One channel

```
 S-LINK LDC        +-----------+   +---------------+   +-----------+   +-------------+
 32-bit words ---> | 32 to 64  |-->| Input Buffer  |-->|  backend  |-->| PCI Burst   |--> DMA engine
 (data/control)    |   map     |   | 1024 x 64 (+2)|   |  control  |   | FIFO 128x64 |    (PCI core)
        <--- XOFF  +-----------+   +---------------+   +-----------+   +-------------+
                                   75% full -> XOFF     ^    |   ^
                                                        |    |   | done
                            Request FIFO (addr, len) ---+    v   |
                                        host writes      Acknowledge FIFO (ctrl words, len)
                                                                 host reads
                            control / status / interrupt registers (csr_regs)
```

These parts follow the published description:

* 32-bit words merged into 64-bit entries
* an 8 Kbyte Input Buffer, with flow control to the link card at 75% full
* a 128-word PCI Burst FIFO, so that 1 Kbyte is the longest burst and longer
  blocks are cut into several bursts
* 15 requests and 15 messages
* word counting, control words taken out of the data stream, and a message
  written once the whole block is in host memory
* link return lines driven from the control register
* six interrupt causes

### 32 to 64 map and the Input Buffer format (`map_32to64`, `input_buffer`)

Control words must stay in order with the data until the backend takes them
out. So each Input Buffer entry carries two tag bits next to its 64 data bits
(`ib_entry_t` in `slink_pkg`):

* `ctrl`: the entry is a single control word, held in bits 31:0.
* `hi_valid`: a data entry holds two words (first word in 31:0) rather than one.

Consecutive data words are paired. If a control word arrives while a lone
data word is waiting for its partner, that word is written as a half entry.
The control word is then held for one cycle and written next. The map
accepts one link word per cycle and writes at most one entry per cycle.

The Input Buffer raises `xoff` (registered) once it holds 768 of 1024
entries. The remaining 256 entries (512 words) absorb whatever the link card
still sends before it reacts. If an entry arrives while the buffer is full,
it is dropped and a sticky overflow bit is set in the status register. The
testbenches never let that happen.

### Backend control: blocks, bursts and acknowledges (`backend_ctrl`)

This is the core of the design. It has two halves that run concurrently.

**Fill side.** When the channel is idle and enabled, it takes a request,
provided the Request FIFO holds one and the Acknowledge FIFO is sure to have
room for another message. The Acknowledge FIFO's occupancy plus the messages
already owed must be below its depth. The fill side then moves one Input
Buffer entry per cycle into the PCI Burst FIFO and counts bytes:

* The first control word of a block is kept as the *begin word*. It is not
  moved.
* The next control word is the *end word*. It closes the block.
* If a data entry would make the block longer than the request's maximum
  length, the block is closed without its end word and gets flag `no_end`.
  The rest of the packet goes into the next request's buffer, whose message
  then has flag `no_begin`. (The maximum length is rounded down to a multiple
  of 8 bytes.)
* Every 1024 bytes, and when a block closes, the bytes gathered so far become
  a burst descriptor (address, byte count, last flag, message). The
  descriptor goes into a two-entry queue. So the next burst fills while the
  DMA engine empties the current one.

**DMA side.** The oldest descriptor is offered to the DMA engine. When the
engine reports the burst done, the descriptor is retired. If it was the
block's last burst, its message is pushed into the Acknowledge FIFO, so a
message never appears before its data is in host memory. A zero-byte
descriptor is retired without the engine. That happens for an empty packet,
or when a block ends exactly on a 1 Kbyte boundary.

With a fast bus, a packet streams through at one link word per cycle. The
channel testbench checks that 1002 words are taken in 1002 cycles.

### Host protocol and register window (`csr_regs`, `request_fifo`, `ack_fifo`)

Each channel has a 32-byte window. Register accesses are one-cycle strobes
from the PCI core's target side. Read data is valid the cycle after `rd`.

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | RW | [0] enable, [4:1] return lines, [5] UTDO, [6] URESET, [13:8] interrupt mask |
| 0x04 | STATUS | RO | [5:0] requests waiting, [13:8] messages waiting, [16] link down, [17] XOFF, [18] input overflow, [19] busy |
| 0x08 | REQADDR | WO | PCI byte address of the next buffer (8-byte aligned) |
| 0x0C | REQLEN | WO | maximum length in bytes, [23:0]. **Pushes the request.** |
| 0x10 | ACKBEG | RO | begin control word of the oldest message |
| 0x14 | ACKEND | RO | end control word |
| 0x18 | ACKLEN | RO | [31] no_begin, [30] no_end, [23:0] bytes. **Removes the message.** |
| 0x1C | IRQ | RW/RO | [5:0] message threshold; [21:16] pending causes (read only) |

The six interrupt causes, each with a mask bit in CTRL[13:8] and in this bit
order:

1. Request FIFO empty
2. Request FIFO not full
3. Acknowledge FIFO not empty
4. Acknowledge FIFO full
5. messages waiting ≥ threshold (0 disables this cause)
6. link down

The interrupt is a level: it stays high while an unmasked cause holds.
Reading ACKBEG or ACKEND from an empty FIFO returns 0. Reading ACKLEN from
an empty FIFO also returns 0, and removes nothing. One address write may
serve several length writes.

## Four channels on one card (`filar`)

`filar` instantiates `N_CH` = 4 channel cores. Their Request and Acknowledge
FIFOs are 32 deep, and the message threshold resets to 24. The card-wide
parts are:

* **Register space.** Addresses 0x00–0x7F select channel `reg_addr[6:5]`.
  0x80 reads the temperature sensor input. 0x84 reads the per-channel
  interrupt bits [3:0], the emulator mode [8] and the number of channels
  [19:16].
* **DMA sharing (`dma_arbiter`).** The PCI core has one DMA engine. When it
  is free, the next requesting channel after the one served last is
  registered and its burst is offered. From `dma_start` to `dma_done`, the
  engine's word pops and done pulse go to that channel. `dma_chan` names the
  channel. Choosing a channel costs one cycle per burst.
* **Interrupt.** The PCI interrupt is the OR of the channels' interrupts.
* **Flow control.** Each channel drives the XOFF of its own link. One full
  buffer therefore never stops the other links.
* **Emulator mode (`emu_fanout`, input `emu_mode`).** Link 0's words go to
  all four channels, and the four XOFF lines are ORed onto link 0's XOFF.
  This reproduces the FILAR emulator, which runs the four-channel firmware on
  single-link hardware. It also reproduces that emulator's limit: one full
  channel stops the data to all of them. With the threshold at 24, the
  interrupt rises when any channel has 24 messages waiting. That is why the
  FIFOs are 32 deep here rather than 15.

The optical transceivers, 2.5 Gbit/s serdes and HOLA link protocol sit in
front of each channel on the real card. The PCI core and the temperature
sensor are also outside this RTL. Their user-side signals are ports.

## Bus exerciser (`pci_blaster`)

The exerciser has two independent sequencers, which can run at the same time:

* **PCI write mode** writes bursts of WLEN bytes to WADDR. The data is a
  64-bit counter that starts at 0 when the mode is started.
* **PCI read mode** reads bursts of RLEN bytes from RADDR. It accepts and
  counts the data, and keeps nothing.

Each mode repeats its transfer COUNT times, or forever while its loop bit is
set. Clearing the run bit stops the mode after the current transfer. Counters
of transfers and words can be read back. The module header gives the
register map (0x00 CTRL … 0x2C RWORDS). The two DMA directions use the same
request/start/done handshake as the channels.

## Interfaces to the parts outside

* **S-LINK LDC user side, per channel** (active high):
  * inputs: `ld_valid` (a word this cycle), `ld_ctrl` (it is a control
    word), `ld_data[31:0]`, `ld_down`
  * outputs: `ld_xoff`, `ld_url[3:0]` (return lines), `ld_utdo`, `ld_ureset`

  The link card must stop within 512 words of seeing XOFF.
* **DMA engine.** `dma_req` is high while a burst (`dma_addr`, `dma_nbytes`
  1..1024) is offered. The engine accepts it with a one-cycle `dma_start`.
  It then pops ⌈nbytes/8⌉ words with `dma_rd`; `dma_rdata` shows the head
  word, first-word-fall-through. It ends with a one-cycle `dma_done`. The
  engine chooses byte enables for a final half word. Wait states and retries
  are the engine's business: `dma_rd` may pause at any time.
* **Clocks.** The whole design runs on one clock (`clk`) with an active-low
  asynchronous reset (`rst_n`). A board with separate link and PCI clocks
  needs a dual-clock Input Buffer in place of the single-clock FIFO.

## Where this departs from the published description, or fills gaps

These are this design's own choices:

* the Input Buffer tag bits, which make it 66 rather than 64 bits wide
* the control-word framing rule: first control word = begin, next = end
* the cut-and-continue behaviour at the maximum length, and the two flags
* the order of the three acknowledge reads
* the register maps and the choice of the six interrupt causes
* the DMA handshakes and the arbitration between channels
* the single clock
* the FILAR FIFO depth of 32
* the exerciser's pattern and register map
* emulator mode as an input of one design, where the original is separate
  firmware

**Not built.** The FILAR software protocol is said to need at most three PCI
transactions per packet, but it is not specified. The channels here keep the
five-transaction protocol. Replacing the single cycles by DMA is mentioned as
a possible future step and is not built either.

**Timing not reproduced.** The measured overhead and interval figures of the
original card (2–3 PCI wait states; 75–345 ns between single cycles) belong
to the commercial PCI core and the host. They are not reproduced here, and
nothing in this RTL depends on them.

## Sizes and rates

| parameter | default | where |
|---|---|---|
| Input Buffer depth | 1024 × 64 bit (8 Kbytes) | `IB_DEPTH` |
| PCI Burst FIFO | 128 × 64 bit (1 Kbyte bursts) | `BURST_DEPTH` |
| Request / Acknowledge FIFO | 15 / 15 (`s32pci64_core`), 32 / 32 (`filar`) | `REQ_DEPTH`, `ACK_DEPTH` |
| channels | 4 | `N_CH` (`filar`) |
| message threshold at reset | 1 (core), 24 (`filar`) | `THRESH_INIT` |

A channel accepts one 32-bit link word per cycle and moves one 64-bit entry
per cycle. At a 66 MHz clock that is 264 Mbytes/s per channel. An S-LINK
carries at most 160 Mbytes/s, and a 64-bit/66 MHz PCI bus at most
528 Mbytes/s. So with four channels the PCI bus, not the channels, is the
limit.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. They use three
behavioural models:

* `slidas_model`: a link source with XOFF latency
* `pci_dma_model`: a DMA engine with random wait states, which reports every
  word it writes to host memory
* testbench queues in place of neighbouring blocks

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/slink_pkg.sv tb/tb_filar.sv \
  --top-module tb_filar -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_slink_pci_top` | Whole design at full size (no parameter overrides), about 10 s. It runs the `tb_filar` scenario plus a 20-write/10-read exerciser run with its pattern checked. |
| `tb_filar` | Four links at once through a slow bus. Per-channel data and messages; 1 Kbyte bursts; arbitration; per-channel XOFF; a packet cut at its maximum length; a disabled channel; emulator mode (copies to all channels, ORed XOFF, no interrupt at 23 messages and an interrupt at 24). It counts each mechanism and fails if one never happened. |
| `tb_s32pci64_core` | The whole host protocol through the registers. Odd word counts; segmentation; the streaming rate; back-pressure without loss; 15-request limit; interrupts. |
| `tb_backend_ctrl` | Burst boundaries and addresses, empty packets, the maximum-length cut, acknowledge room. |
| `tb_workload_s32pci64` | One channel driven one block at a time (post, poll, read the message) with events of 16–4096 bytes. The rate rises from 0.7 to 3.9 bytes per clock; the link limit is 4. |
| `tb_workload_filar_emu` | Emulator mode with 1–4 channels and events of 64–4096 bytes. The aggregate rate settles near 3.9 bytes per clock with one channel. With two or more channels it settles near 7.5, just below the 8 bytes per clock of the single DMA engine. |
| `tb_map_32to64`, `tb_input_buffer`, `tb_sync_fifo`, `tb_request_fifo`, `tb_ack_fifo`, `tb_csr_regs`, `tb_emu_fanout`, `tb_pci_blaster` | Each block against an independent reference, or against the rules stated above. |

All testbenches pass. Each was also run against a copy of its module with one
deliberate bug, and caught it.
