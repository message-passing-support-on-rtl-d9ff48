# A message-passing network endpoint with four send mechanisms

No single way of sending a message suits everything a parallel program does:

- A one-word synchronisation signal wants the lowest latency and the fewest processor instructions.
- A few hundred bytes of data want bandwidth.
- A cache line that is already in the interface's memory should not be copied again.

This RTL implements the core of a network endpoint card (the *NES*, Network Endpoint Subsystem) for a cluster of small shared-memory machines. It gives a processor four mechanisms side by side. Each mechanism is reached through its own memory-mapped address region:

| mechanism | how a program sends | how a program receives |
|-----------|---------------------|------------------------|
| **Basic** | writes 4..22 words into a slot of a circular queue in the card's SRAM, then stores the new producer pointer | reads the message from a circular receive queue in SRAM, then writes the consumer pointer |
| **Express** | one uncached store: the address carries queue, destination and 5 tag bits; the data is one 32-bit word | one uncached 64-bit load pops the entry |
| **Tag-On** | like Express, plus up to three 32-byte lines of SRAM data named in the address | Express-style entry; the lines land in a separate Tag-On buffer |
| **DMA** | system software programs a transfer | data appears in remote memory |

Two further ideas tie the mechanisms together.

**Logical names, checked in hardware.** A program never names a physical node or queue. Each transmit queue has a row in a *Destination Table* that maps a small logical destination number to a triple:

- the physical site,
- the physical receive queue,
- a source id that the receiver sees.

System software fills the table. Because the program can only reach the queues mapped into its address space, and can only send to destinations in its table row, protection costs nothing per message.

**A cache of queues.** A site may have 512 logical queue pairs. Only 16 of them are backed by hardware: 8 Express/Tag-On and 8 Basic. Receive-queue *cache tags* say which logical queues are resident. A packet for a resident queue that has room is delivered entirely in hardware. Every other packet goes to the *miss queue*, where a service processor (sP) handles it in software. If the miss queue is itself full, the network link is held.

## Block diagram

```
             aP bus port                               sP bus port
   (SRAM, pointers, Express/Tag-On send,      (sSRAM, miss-queue pointers,
    Express receive, OnePoll)                  configuration, DMA, sP send)
        |                                             |
  +-----v-----+  port A   +---------+         +-------v------+
  |  aSRAM    |<--------->|  bus    |         |   sSRAM      |
  | (msg_sram)|           | decode  |         |  (msg_sram)  |
  +-----+-----+           +---------+         +-------+------+
        | port B (sram_arb, 4 clients)               | port B (sram_arb)
   +----+--------+-----------+---------+             |
   |             |           |         |             |
basic_tx    express_tx   rx_buffer  rx_buffer     rx_buffer
(Basic TxQ) (Express /   (Basic     (Tag-On       (miss queue)
   |         Tag-On TxQ)  RxQs)      buffer)          ^
   |             |           ^          ^             |
   |   dest_table (16 rows)  |          |             |
   v             v           |          |             |
  tx_arb <--- dma_engine     +----- rx_dispatch ------+
   |              ^                  |   |   \
   v              |                  |   |    express_rx (8 FIFOs) <-- onepoll
 network out      +---- DMA payload -+   |
                                  rxq_tag_table         network in
```

`nes_core` wires all of this together.

## Sending

### Basic messages (`basic_tx`)

Each of the 8 Basic transmit queues is a ring of 24-word slots in the aSRAM. A queue is configured with a base address, a size in slots, and a Reclaim flag. Slot layout:

- Word 0 is a header written by the program:
  - logical destination in bits [4:0];
  - payload length in bits [12:8];
  - receiver-interrupt request in bit 15.
- Words 1..len hold the payload.

The program stores the new producer pointer. The engine then:

1. picks a queue with pending slots (round-robin);
2. if the queue uses *Reclaim*, asks the bus side to flush each of the three cache lines of the slot, so that data still in the processor's cache reaches the SRAM;
3. reads the header, translates the destination through the Destination Table, and sends the packet;
4. advances the consumer pointer, which tells the program the slot is free.

Without Reclaim, the program must flush the lines itself before storing the pointer. Lengths outside 4..22 are clamped.

### Express and Tag-On messages (`express_tx`)

One store to the Express region is one message. The address bits mean:

| bits | meaning |
|------|---------|
| [15:13] | transmit queue |
| [12:8] | logical destination |
| [7:3] | 5-bit tag |
| [2] | receiver-interrupt request |

The store data is the 32-bit word. The same store in the Tag-On region adds two fields:

| bits | meaning |
|------|---------|
| [27:26] | number of aSRAM lines to append, 0..3 |
| [25:16] | index of the first line |

Each queue is a 4-entry FIFO. The store returns at once. A store to a full queue is dropped and sets a sticky overflow flag, which the program can read. The engine serves the queues round-robin. For Tag-On it reads the appended lines from the aSRAM while sending.

### DMA (`dma_engine`)

The sP, after it has checked and translated a transfer request, writes four registers:

- destination address,
- source address,
- {site, source id},
- length in words. This write starts the transfer.

The engine reads words from processor memory through its memory master port and cuts them into packets of up to 8 words. Each packet carries the remote address of its first word. At the receiving card, the same engine writes each word to memory at its address and counts the words for the sP.

### Sending from the service processor

The sP has its own two Express/Tag-On transmit queues: a second `express_tx` instance behind the sP port. It uses the same address layout as the aP's, with the queue in bit 13. Tag-On data comes from the sSRAM. The logical destination is translated through a separate two-row Destination Table that sP firmware fills.

This is how firmware forwards messages of non-resident transmit queues, after translating their destinations itself. It is also how it answers requests, for example by shipping a cache line of data with a Tag-On message.

### Sharing the link (`tx_arb`)

sP, DMA, Express/Tag-On and Basic packets share one outgoing link. A round-robin arbiter holds its choice until the last word of the packet.

## Packets on the link

The link is a 32-bit word stream with valid/ready and a `last` flag. Every packet starts with two header words (`nes_pkg::hdr0_t`).

Word 0:

| bits | field |
|------|-------|
| [31:27] | destination site |
| [26:18] | logical receive queue |
| [17:16] | type: 0 Basic, 1 Express, 2 Tag-On, 3 DMA |
| [15] | interrupt request |
| [14:10] | tag |
| [9:5] | payload words |

Word 1 is the 15-bit source id. The payload follows:

- Basic: the message words.
- Express: the data word.
- Tag-On: the data word, then the lines.
- DMA: the address, then the data.

## Receiving

### Dispatch and the miss queue (`rx_dispatch`, `rxq_tag_table`)

For Basic, Express and Tag-On packets, the dispatcher looks up the logical receive queue in the 16 cache tags, within the class the packet needs. The packet is delivered in hardware only if both hold:

- the queue is resident;
- it has room. For Tag-On, the Tag-On buffer must have room too.

Otherwise the whole packet, both header words included, is written into the miss queue in the sSRAM, where the sP can demultiplex it in software. While the miss queue is full, the dispatcher stops taking words from the link. This backpressure is deliberate: no packet is ever dropped.

What each delivery looks like:

- **Basic** (`rx_buffer`): the slot gets a receive header in word 0, followed by the payload. The receive header holds the source id in [30:16], the interrupt flag in [15] and the length in [12:8]. The program sees the new producer pointer and frees the slot by writing the consumer pointer.

  A program could still hold an old copy of the slot in its cache. A receive queue configured with the Reclaim flag avoids this: before the first word of a new message is written, each of the slot's three lines is flushed from the processor's cache through the reclaim port. Without the flag, the program must flush the lines itself before it reads. The Basic transmit engine and the receive queues share the reclaim port.
- **Express** (`express_rx`): becomes one 64-bit FIFO entry:

  | bits | field |
  |------|-------|
  | [63] | 0 = message |
  | [62:48] | source id |
  | [47] | Tag-On |
  | [46:45] | lines |
  | [44:37] | Tag-On buffer slot |
  | [36:32] | tag |
  | [31:0] | data |

  A load from the Express receive region pops it. A load from an empty queue returns the **Empty message**. System software can program its 64-bit value, for example as a "no action" handler.
- **Tag-On**: the lines go to the next slot of the Tag-On buffer in the aSRAM. The Express entry points to that slot. The program releases the slot by writing the Tag-On buffer's consumer pointer.

A delivered message sets its queue's interrupt-pending bit in either case:

- the queue's interrupt enable is set, or
- the sender asked for an interrupt.

`irq` is the OR of the pending bits.

### OnePoll (`onepoll`)

A load from the OnePoll region carries a 16-bit queue mask in address bits [18:3]:

- bits 0..7 select Express queues;
- bits 8..15 select Basic queues.

The first non-empty selected queue wins: Express before Basic, then the lowest number. The load returns:

- **Express queue wins**: its head entry, which is popped.
- **Basic queue wins**: a notice. Bits [63:60] are `1001`, [59:56] the queue, [15:8] the producer pointer and [7:0] the consumer pointer.
- **No selected queue has a message**: the Empty message.

One load thus replaces up to 16 pointer comparisons.

## Address map and registers

The aP and sP ports are simple single-beat slaves: a request cycle, then an acknowledge one cycle later with 64-bit read data. Bits [31:28] of the byte address select the region. The full map is in the opening comment of `rtl/nes_core.sv`. In short:

| port | region | purpose |
|------|--------|---------|
| aP | 0 | aSRAM words (message slots, Tag-On data) |
| aP | 1 | pointers: Basic transmit producer / Basic receive consumer / Tag-On buffer consumer; reads return {producer, consumer} and the Express transmit counts with the overflow flag |
| aP | 2, 3 | Express and Tag-On send (store) |
| aP | 4 | Express receive (load pops) |
| aP | 5 | OnePoll (load) |
| sP | 0 | sSRAM words (miss-queue contents) |
| sP | 1 | miss-queue pointers, sP transmit queue state |
| sP | 2, 3 | Express and Tag-On send from the sP's own two transmit queues |
| sP | 6 | configuration, selected by bits [15:12] (list below) |
| sP | 7 | DMA registers and received-word count |

The configuration sub-regions are:

- Destination Table;
- receive tags;
- Basic transmit queues;
- Basic receive queues;
- Tag-On buffer;
- miss queue;
- Empty message;
- interrupt enables and clears;
- status and overflow clear;
- the sP's own two-row Destination Table.

Ports to the outside of the core:

- `net_tx_*` and `net_rx_*`: the 32-bit word link.
- `rcl_req`/`rcl_addr`/`rcl_ack`: a request to the bus side to flush one cache line: write it back if modified, then invalidate it. This is Reclaim.
- `mem_*`: the DMA master port to processor memory.
- `irq_pend` and `irq`: interrupts.

## Sizes and where they come from

These numbers are taken from the architecture:

- 8 Basic and 8 Express/Tag-On hardware queues;
- 512 logical queues (9-bit names);
- Basic payloads of 4 to 22 words;
- the 5-bit tag and 32-bit word of an Express message;
- 32-byte cache lines (8 words);
- up to three lines of Tag-On data;
- two dual-ported message SRAMs, one for the application side and one for the service side.

The rest are choices made for this implementation:

- 8 K-word SRAMs;
- 24-word slots;
- 8-bit pointers;
- 32 sites;
- a 15-bit source id;
- 32 logical destinations per transmit queue;
- 4-entry Express transmit and 8-entry Express receive FIFOs;
- 8-word DMA packets;
- every field layout and the whole address map.

The same choices are listed in the opening comment of each file.

## Where this departs from the architecture it follows

- **Buses.** The PowerPC 60X bus interface, including bursts, snooping and retries, is not modelled. The aP and sP see single-beat register ports. Reclaim is a request/acknowledge pair that the bus side must turn into a flush operation on the bus.
- **Service processor.** The sP itself, its firmware and its memory are outside the core. The core gives it its SRAM, the miss queue, two transmit queues, configuration registers and the DMA registers. Non-resident transmit queues, queue swapping and DMA setup are firmware tasks.
- **Express queue storage.** Express queues are register FIFOs rather than rings in the SRAM. Their behaviour at the bus (push on a store, pop on a load, Empty message when empty) is the same.
- **sP queue set.** The sP has only part of its own message-queue set. It has two Express/Tag-On transmit queues, whose Tag-On data comes from the sSRAM, and the miss queue for receiving. It has no Basic queues and no Express receive queues of its own.
- **Network.** The network is a plain word stream. Routing and flow control inside the network are not modelled.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/nes_pkg.sv tb/tb_nes_core.sv --top-module tb_nes_core
./obj_dir/Vtb_nes_core
```

`tb_nes_core` runs two cores at their default parameters, links their networks back to back and runs every mechanism:

- Basic with software flush and with Reclaim, on both send and receive;
- Express, including the Empty message;
- Tag-On;
- OnePoll's three kinds of answer;
- a receiver interrupt;
- delivery to a non-resident queue;
- a link stall on a full miss queue;
- an Express transmit overflow;
- Express and Tag-On sends by the service processor;
- a 64-word (256-byte) DMA transfer.

It compares every delivered word with what was sent. It counts each mechanism and fails if any of them never happened. It also measures the Express path from the send store to a receivable entry, which takes 5 core clocks with an ideal link. At a 35 MHz core clock the whole nearest-neighbour budget of 2 µs is 70 clocks.

The block testbenches compare each block with an independent model under random traffic:

- FIFO and ring pointers and wrap-around;
- arbitration fairness;
- table contents;
- Tag-On splitting;
- miss routing;
- DMA packetisation.

## Files

- `rtl/nes_pkg.sv`: sizes, packet and entry formats, and the address-map constants.
- `rtl/nes_core.sv`: the top level, with the bus decode and registers.
- Send side:
  - `rtl/basic_tx.sv`
  - `rtl/express_tx.sv`
  - `rtl/dma_engine.sv`
  - `rtl/tx_arb.sv`
  - `rtl/dest_table.sv`
- Receive side:
  - `rtl/rx_dispatch.sv`
  - `rtl/rxq_tag_table.sv`
  - `rtl/rx_buffer.sv`
  - `rtl/express_rx.sv`
  - `rtl/onepoll.sv`
- Storage:
  - `rtl/msg_sram.sv`
  - `rtl/sram_arb.sv`
- `tb/`: one testbench per block, plus `tb_nes_core` for the whole core.
