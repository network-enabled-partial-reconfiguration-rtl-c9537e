# Network-triggered partial reconfiguration for FPGA SoCs

On a Zynq-class FPGA SoC the Ethernet controller sits in the processor system, so normally every
received frame goes through the processor's driver and network stack. If a frame asks the FPGA to
load a different accelerator (partial reconfiguration, PR), the software must first notice the
frame, decode it, look up the bitstream and only then start the reconfiguration. That costs tens
of microseconds, and the delay varies with whatever else the processor is doing.

This RTL moves frame handling into the programmable logic. The Ethernet controller's receive DMA
is pointed at a buffer in the fabric instead of DRAM ("DMA proxying"). There an Ethernet bridge
classifies every frame while it is still arriving, using a stack of match rules the processor
set up once at start-up. Each frame then goes to one of these places:

* one or more **accelerator slots**;
* the **processor**, through a ring buffer in DRAM that the fabric writes itself;
* the **PR path**, in one of two ways:
  * a *PR command* names a bitstream that is already cached in DRAM. The bridge latches the name
    and interrupts the processor. The PR driver then only has to start a DMA into the ICAP
    manager; it never touches the frame.
  * a *remote PR* sends the bitstream itself over the network. A request frame gives the size
    and the number of data frames. The payload of each following data frame goes straight into
    the configuration port, and the processor is interrupted once at the end.
* **nowhere**: the frame is dropped.

## Block structure

```
 prx_* ─► dma_proxy_rx ─► pingpong_rx_fifo ─► rx_arbiter ─┬─► slot_*    (accelerator slots, multicast)
 (receive DMA of the         │  ▲               │  ▲      ├─► ring_dma_writer ─► m_axi_* (PS DRAM ring)
  Ethernet controller)       ▼  │ meta          │  │seq_ok└─► icap_manager ◄── dma_* (cached bitstream)
                         frame_sniffer     remote_pr_tracker      │
                              ▲ rules             ▲               └─► icap_* (ICAP primitive)
 s_axil_* ─► config_stack ◄── status / interrupt causes ──► irq
 slot_tx_* ─► tx_arbiter ─► tx_* (towards the Ethernet controller's transmit path)
```

`nprc_top` wires these together. There is one clock domain and an active-low asynchronous
reset. All streams are 32 bits wide with byte enables, and byte 0 of a frame is in bits [7:0]
of its first word. The Ethernet bridge is not a module of its own: its parts (buffer, sniffer,
register stack, remote-PR tracker, ring writer) are instantiated directly in the top.

## How frames get into the fabric

The processor's Ethernet controller keeps its usual receive DMA. The processor only changes where
that DMA writes: both the receive buffers and the descriptor ring point into the AXI window of
`dma_proxy_rx` (`prx_*`), not into DRAM. The window has two regions:

* offsets from 0: `NUM_DESC` (64) two-word descriptors. Word 0 holds the buffer address, the wrap
  bit and the used bit. Word 1 holds the status, with the length in bits [12:0] and end-of-frame
  in bit 15. This is the Zynq Ethernet controller's descriptor format.
* offsets from 0x8000: the receive buffer. Every word written there with a non-zero strobe is the
  next word of the frame. The address within the region is ignored, so all descriptors may point
  at the same buffer address.

The proxy forwards each word one step behind the bus. It holds the newest word until it knows
whether that word is the last one:

* if another frame word arrives, the held word is sent on with `last` low;
* if the controller writes back a status word with end-of-frame set, the held word is sent on
  with `last` high. The length's low two bits give its byte enables.

The frame is therefore in the bridge's buffer as soon as the controller has written it, and
nothing goes to DRAM. The proxy has no frame memory of its own. When the buffer is busy, the
proxy stalls the bus by holding `wready` low.

The fabric consumes every frame at once, so descriptor word 0 always reads back with the used bit
clear. Every buffer thus goes straight back to the controller, and the processor never has to
recycle descriptors. A status word with no frame data before it, such as the processor
initialising the ring, ends nothing.

The proxy relies on the controller enabling no bytes past the end of the frame. A controller that
pads its last burst with enabled bytes would need a word counter checked against the length.

## Classifying a frame while it arrives

This is the part that decides everything else.

`frame_sniffer` sees every word as the buffer accepts it, together with the word's index in the
frame. A **rule** has:

* an enable bit;
* an **action**: drop, PS, slot, PR command, remote request or remote data;
* a slot mask;
* four **terms**. A term is a word offset, a 32-bit value and a 32-bit mask. It holds when
  `(word[offset] ^ value) & mask == 0`. A term with a zero mask always holds.

For every rule and term the sniffer keeps a flag, "seen and equal". Together the terms cover
addresses, EtherTypes, a keyword in the payload, or any byte pattern at any word offset. Several
terms in one rule are ANDed.

In the cycle of the frame's last word (the sniffer also counts that word), the lowest-numbered
enabled rule whose terms all hold decides the action and slot mask. If no rule holds, the
programmable default action applies; after reset it is "PS", so an unconfigured bridge passes
all traffic to the processor.

In the same pass the sniffer captures the fields at five configurable word offsets:

* the bitstream name: 4 words, 16 characters;
* the remote-PR bitstream size in bytes;
* the remote-PR data-frame count;
* the sequence number of a remote-PR data frame;
* the payload start (`payload_off`) of a remote-PR data frame.

The decision is stored with the frame, so classification adds no cycles after the frame has
arrived.

`pingpong_rx_fifo` has two banks of `BUF_WORDS` (512) words. One bank receives while the other
is drained, and banks alternate, so frame order is preserved. A frame longer than a bank is
still accepted to its end, but it is marked oversize and dropped.

## What the receive arbiter does with a frame

`rx_arbiter` handles one frame at a time, in arrival order.

* **Drop**, **PR command** and **remote request** frames are consumed at once:
  * PR command: the name is latched in the register stack and an interrupt is raised.
  * Remote request: the tracker records the size and the frame count, and switches the ICAP
    manager to the network source.
* **Slot** frames go to every slot in the mask at the same time. Each slot's `valid` drops as
  soon as that slot has taken the current word. The next word follows only when all selected
  slots have taken it.
* **PS** frames go to `ring_dma_writer`. It writes the frame at `entry + 4`, then writes a
  header word at `entry + 0`: bit 31 is a ready flag and bits [15:0] the length in bytes. Only
  then does the head index advance, so the processor never sees a half-written entry. A full
  ring (`head + 1 == tail`) holds new frames back.
* **Remote data** frames are checked against the tracker first.
  * If the sequence number is the expected one (0, 1, 2, …), the words from `payload_off` on go
    to the ICAP manager. The tracker then adds the frame and its bytes to its counts.
  * Otherwise the frame is dropped with a sequence-error interrupt. The tracker keeps waiting
    for the expected number, so a retransmitted frame fills the gap.
  * When the announced number of frames has arrived, the tracker raises the completion
    interrupt and reports whether the byte count matched the size.

**Time-out.** While a frame streams, a counter counts consecutive cycles in which the current
word is not taken. When it reaches `TIMEOUT` (0 disables it):

* the rest of the frame is discarded;
* the destination gets a one-cycle `abort` and stops seeing `valid`;
* the frame number and destination are stored, the drop counter increments and an interrupt
  is raised, so the processor can ask for a retransmission.

This is the only case in which a stream's `valid` is withdrawn before it is accepted. A slot
must treat `abort` as the end of a truncated frame. The ring writer leaves the entry
unpublished and reuses it.

## Reconfiguration paths

`icap_manager` writes one 32-bit word per cycle into the ICAP port. The port outputs are
registered (`icap_csib` and `icap_rdwrb` low for a write). It takes words from one of two
sources:

* **Cached bitstream.** Between remote PRs it takes the DMA stream (`dma_*`), which the PR
  driver starts after the PR-command interrupt. The transfer ends with `dma_last`.
* **Remote PR.** During a remote PR it takes the arbiter's stream instead, and ends after the
  announced number of words.

Either way a PR-done interrupt follows one cycle after the last word. Words pass through
unchanged: any bit reordering the configuration port needs must already be in the bitstream.

At 100 MHz, one word per cycle is 400 MB/s. A 799,584-byte bitstream (199,896 words) then takes
2.0 ms, about what a DMA-fed ICAP controller achieves on this class of device. The interrupt for a
PR command comes 4 clock cycles after the Ethernet controller's status write that ends the
frame.

## Register map (AXI4-Lite, 32-bit registers)

| Address | Register | Access |
|---|---|---|
| 0x000 | CTRL: [2:0] default action (0 drop, 1 PS, 2 slot, 3 PR command, 4 remote request, 5 remote data) | RW |
| 0x004 | IRQ_STATUS: [0] PR command, [1] remote PR done, [2] PR done, [3] time-out drop, [4] sequence error, [5] frame in ring | RW, write 1 to clear |
| 0x008 | IRQ_ENABLE; `irq` = OR of enabled status bits | RW |
| 0x010–0x020 | NAME_OFF, SIZE_OFF, COUNT_OFF, SEQ_OFF, PAYLOAD_OFF (word offsets) | RW |
| 0x024 | TIMEOUT (cycles, 0 = off) | RW |
| 0x028, 0x02C, 0x030, 0x034 | RING_BASE, RING_SLOTS, RING_HEAD (RO), RING_TAIL | |
| 0x040–0x04C | BS_NAME[0..3], latched by a PR command or remote request | RO |
| 0x050–0x060 | REMOTE_SIZE, REMOTE_COUNT, REMOTE_FRAMES, REMOTE_BYTES, REMOTE_STATUS ([0] active, [1] size matched) | RO |
| 0x064–0x070 | DROP_FRAME_NUM, DROP_ACTION, DROP_COUNT, ICAP_WORDS | RO |
| 0x074 | STATUS: [0] ICAP transfer in progress, [1] ring bus error | RO |
| 0x400 + 0x80·r | RULE_CTRL: [0] enable, [3:1] action, [15:8] slot mask | RW |
| 0x410 + 0x80·r + 0x10·t | term t: OFF, +4 VALUE, +8 MASK | RW |

Frame numbers count every frame that enters the buffer, starting at 0 after reset.

## Frame formats

The hardware fixes no frame format: the rules and the field offsets define it. The end-to-end
testbench uses this one:

* EtherType 0x88B5 (bytes 12–13).
* A 4-character command word at word 4: `PRCM`, `RPRQ`, `RPDT`, `DATA` or `NOPE`.
* A PR command carries the name in words 5–8.
* A remote request carries the name in words 5–8, the size in bytes in word 9 and the number of
  data frames in word 10.
* A remote data frame carries its sequence number in word 5 and bitstream words from word 6.

Each rule matches the destination address in word 0, the EtherType and the command word.

## Parameters of `nprc_top`

| Parameter | Default | Meaning |
|---|---|---|
| NUM_SLOTS | 1 | accelerator slots (the evaluated configuration has one slot; up to 8) |
| NUM_RULES | 8 | match rules |
| BUF_WORDS | 512 | words per buffer bank (2 KiB; holds a 1518-byte frame) |
| SLOT_BYTES | 2048 | bytes per DRAM ring entry |

## Outside this RTL

These parts are not in the RTL; the top exposes their signals as ports:

* the ICAP primitive (`icap_*`);
* the DMA controller that streams cached bitstreams (`dma_*`);
* the accelerators in the reconfigurable slots (`slot_*`, `slot_tx_*`);
* the processor's Ethernet controller. Its receive DMA writes into `prx_*`, and `tx_*` feeds its
  transmit path;
* the processor's AXI ports (`s_axil_*`, `m_axi_*`);
* all software (drivers, the PR manager's driver).

## Design choices beyond the architecture

The following are this implementation's own choices. The overall architecture does not fix
them:

* 32-bit streams;
* the rule and term format, and lowest-index priority;
* the register map and interrupt scheme;
* the 2 KiB banks and ring entries, and the ring-entry header;
* the descriptor ring in the proxy window, the always-clear used bit and the one-word hold in
  `dma_proxy_rx`;
* single-beat AXI writes in the ring writer: at least 3 cycles per word, enough for gigabit
  Ethernet at 100 MHz but not for line rate at higher speeds;
* sequence numbers that start at 0, and frame-count completion for remote PR;
* the time-out rule, including withdrawing `valid` on abort;
* PR-command and remote-request frames are consumed by the bridge, not forwarded;
* payload stripping for remote-PR data;
* the round-robin, per-frame TX arbitration.

The TX arbiter only merges slot outputs into one stream. Packing frames into the Ethernet
controller's transmit buffers (the transmit side of the proxy) is not built; the transmit path
outside has to do it.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_nprc_top` runs the whole design at its default parameters. It plays the processor, the
  Ethernet controller's receive DMA, the DRAM, the slot and the ICAP. It does the following:
  * sends frames to the ring, to the slot, and ones that are dropped by a rule, by time-out and
    as oversize;
  * decodes a PR command;
  * loads the full 799,584-byte bitstream through the DMA source, then again as 781 remote-PR
    data frames, with one out-of-sequence frame;
  * sends slot output through the TX arbiter.

  It checks every configuration word and the cycle counts, and counts each mechanism.
* `tb_nprc_top_multi` runs the top with three slots. It sends a random mix of unicast,
  multicast and ring frames while each slot applies its own random back-pressure, loads a small
  bitstream by remote PR, and checks that the TX arbiter grants whole frames in round-robin
  order.
* The block testbenches use random traffic with reference queues:
  `tb_dma_proxy_rx`, `tb_frame_sniffer`, `tb_pingpong_rx_fifo`, `tb_rx_arbiter`, `tb_remote_pr_tracker`,
  `tb_icap_manager`, `tb_ring_dma_writer`, `tb_tx_arbiter`, `tb_config_stack`.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/nprc_pkg.sv tb/tb_nprc_top.sv \
          --top-module tb_nprc_top -o sim --Mdir obj && ./obj/sim
```

Replace `tb_nprc_top` with any other testbench name to run that one. The full-size run takes
under a second.
