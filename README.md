# ExaDMA send unit: RDMA transmit engine for the ExaNet network

A processor that wants to copy up to 16 KiB from its own memory into the
memory of another node should not spend its time moving bytes. ExaDMA moves
them for it. The processor writes a small descriptor: source address,
destination global address, length, protection domain and output link. From
then on the unit acts alone:

- it reads the source bytes over an AXI-4 master port;
- it cuts them into ExaNet packets of at most 256 bytes of payload;
- it moves every byte to the lane it must occupy at the destination;
- it sends the packets on one of its ExaNet links.

Up to 1024 transfers can be active at once. They are served round-robin, one
packet per transfer per turn, so one large transfer cannot block the small ones
behind it.

The main idea is to make the slow and irregular part, the memory reads, fully
pipelined and out of order, and then restore order just before the link:

- every packet gets a buffer slot before its read is issued;
- reads of different protection domains may return interleaved and out of
  order;
- a barrel shifter with a separate state per AXI ID aligns each returning beat
  on the fly, straight into the slot;
- each output buffer then sends its complete packets in the order they were
  issued.

Nothing is ever copied twice, and the link sees back-to-back packets as long as
enough slots are in flight to cover the memory latency.

```
 AXI-4 slave (descriptors,         AXI-4 master (reads)
 control packets)                    AR |        ^ R
      |                                 |        |
 +----v---------+  enque  +-------------+--+   +-+-----------------+
 | pending_list |-------->|   scheduler    |-->|        vbs        |
 | 1024 x 256b  |<------->| RR FIFO, FSM   |cmd| 8 channel states  |
 | descriptors  | port B  +--+------+------+   +--------+----------+
 +--+-----------+   slot_set|      |hdr/ftr             | words
    | control packets       v      v                    v
    |                 +---------------------------------------+
    |                 | output_buffer x NUM_OUT: 8 slots each |
    |                 +------------------+--------------------+
    |                                    | oldest full slot
    |                         +----------v-----------+
    +------------------------>| exanetizer x NUM_OUT |---> ExaNet link
                              +----------------------+
```

The top level `exadma` also holds two neighbouring blocks of the network
interface, each with its own ports: the mailbox of the controlling processor
and the 16-port ExaNet crossbar (see their sections below).

## Descriptors and the register map

The unit's AXI-4 slave port (128-bit data, 17-bit address) holds four regions
of 32 KiB each:

| address bits 16:15 | region |
|---|---|
| 0 | descriptor table: transaction ID in bits 14:5, 32 bytes per ID |
| 1 .. NUM_OUT | control-packet window of output 0 .. NUM_OUT-1, same ID mapping |

A descriptor is four 64-bit words. The three fields the hardware writes back
are `bytes_sent`, `done` and `error`.

| word | bits | field |
|---|---|---|
| 0 | 63:0 | source address (byte aligned, local) |
| 1 | 63:0 | destination: 22-bit node coordinates above a 42-bit virtual address |
| 2 | 15:0 | protection domain; its 3 low bits select the AXI ID and shifter channel |
| 2 | 30:16 | length in bytes, 1 .. 16384 |
| 2 | 31 | chained: another transaction waits for this one |
| 2 | 41:32 | dependency ID: the transaction started when this one ends |
| 2 | 56:42 | bytes sent (written by the unit) |
| 2 | 57 | done (written by the unit) |
| 2 | 58 | acked (reserved) |
| 2 | 59 | send notify: a control packet will follow |
| 2 | 60 | error: a read of this transaction faulted (written by the unit) |
| 2 | 63 | DB: do not start on this write, wait for a predecessor |
| 3 | 4:0 | output (path) |
| 3 | 18:5 | sequence number (retransmission count) |

Writes may be 32, 64 or 128 bits wide. The table is a true dual-port RAM:

- port A serves the AXI port, with one write enable per 32-bit lane taken from
  WSTRB;
- port B serves the scheduler.

Writing the upper half of word 2 with DB clear starts the transaction: its ID
is pushed into the scheduler's FIFO. So word 3 must be written before word 2
when it matters. If the FIFO cannot take the ID, WREADY stays low and the
processor waits.

Reads return the addressed 128-bit half. Only single-beat accesses are
supported. The write FSM (idle, wr_cntrl for descriptors, wr_data for control
packets, wr_ack) has priority on port A. The read FSM (idle, rd_wait,
rd_ready) issues its RAM read only while no write is pending.

## Scheduling one packet

The scheduler pops an ID, reads the descriptor on port B (one cycle) and
decodes it. The remaining bytes go out as packets of

    plen = min(length - bytes_sent, 256 - dst[7:0])

bytes. So only the first packet can be short: every later one starts on a
256-byte boundary of the destination, and no packet crosses a 4 KiB page at
the receiver.

If the output buffer of the descriptor's path has no free slot, the ID goes
back to the tail of the FIFO and the next one is tried. A busy link therefore
never blocks transfers on other links.

Otherwise, in the decode cycle the scheduler:

- allocates the slot and gives it the packet's word count;
- writes the packet's header and footer into the slot;
- pushes an alignment command into the barrel shifter queue of the
  transaction's channel.

It then issues the AXI read. When the read would cross a 4 KiB boundary of the
source, it becomes two bursts. Finally it writes back `bytes_sent` (and `done`
after the last packet). The ID then returns to the FIFO tail, or on the last
packet of a chained transaction, the dependant's ID is pushed instead.

One packet costs about six cycles of scheduler time (read, decode, AR, one
more AR if split, write-back), well under the 18 link cycles of a full packet.

## Alignment in the virtualized barrel shifter

Source and destination may have any byte offsets. A packet's payload words are
laid out at the destination's byte lanes: word 0 starts at lane `dst[3:0]`.
For each read beat of a packet, the shifter forms a 32-byte window from the
previous beat and the current one of the same channel, and takes 16 bytes from
it at the offset `rot = (src[3:0] - dst[3:0]) mod 16`.

- When `src[3:0] >= dst[3:0]` (the `lead` case), the first beat only primes
  the window and the read is one word longer than the output.
- Otherwise every beat produces a word.

Bytes outside the packet are zeroed. The command carries everything this
needs:

- slot;
- rotation;
- lead flag;
- number of read beats;
- destination offset;
- byte count.

Reads with different AXI IDs may return in any order, interleaved beat by
beat. The shifter therefore keeps one command FIFO and one state (beat
counter, previous beat, fault flag) per ID, eight in all, and selects them by
RID on every beat. Within one ID the AXI protocol keeps order, so the FIFO
order is the packet order.

RREADY is always high. The data path has two register stages: the beat, then
the shifted word written into the slot, two cycles after the beat.

## Output buffers: filling out of order, sending in order

Each output has a buffer of 8 slots of 16 payload words, plus a header/footer
register pair per slot. A slot's counter is loaded with the packet's word
count and decremented by each shifter write. When it runs out, the slot is
full.

Because reads complete out of order, slots fill out of order. To send them in
the order they were issued, every slot carries a priority:

- at allocation, the number of slots in use (the newest packet has the largest
  value);
- of the full slots, the one with the smallest value is offered to the output
  stage (`comp_winner`).

When the output stage has sent a slot's last payload word, it frees the slot,
and every slot with a larger value moves up by one. The values therefore stay
dense and unique.

The output stage copies header and footer when it takes a slot. That lets the
slot be freed before the footer leaves, so a congested link holding the footer
does not hold the slot.

## ExaNet output stage

The link has one 128-bit data bus and three valid/ready pairs: header, payload
and footer. Data stay unchanged while a valid waits for its ready.

The output stage is an eight-state FSM:

- idle;
- send_hdr, send_pld, pld_wait, send_ftr;
- send_cntrl_hdr, send_cntrl_pld, send_cntrl_ftr.

The buffer's payload RAM has a registered read. The stage therefore drives the
address of the word it will need in the next cycle, and sends one word per
cycle while the link is ready. A 256-byte packet takes 18 cycles: header, 16
payload words, footer. With a 150 MHz clock that is 19.2 Gb/s of link data,
and 16/18 of it is payload.

## Control packets

A completion notice at the receiver needs a small in-band message that carries
information about the transfer. Software writes three 64-bit values to the same
address in the control window of an output, chosen by transaction ID. On the
third write, the unit:

- reads that transaction's descriptor;
- builds a header (control type, two payload words, same destination and
  protection domain) and a footer (ID, sequence number, notify, 24 bytes);
- raises `pkt_slot_ready` for that output.

Control packets bypass the output buffers. The output stage takes a waiting
control packet before the next data packet, and straight after a data footer.
While one is pending, further writes to that output's window see WREADY low.
The back-pressure of a congested link thus reaches the writing processor
instead of losing a message. The descriptor must be written before its control
packets.

## Chaining

A transaction whose DB bit is set is not started by its own write. It starts
when its predecessor (`chained` set, `dependency ID` pointing to it) has
scheduled its last packet. A sequence of transfers can so be queued in one go
and leaves in order.

The dependant's first packet is issued after the predecessor's last. On the
same link it normally also leaves after it. If a later read returns before an
earlier one, the packets can arrive in the other order, because the slot
ordering only ranks complete slots.

## Page faults

Memory behind an SMMU can answer a read with SLVERR or DECERR (RRESP 2 or 3).
The shifter still takes the whole burst but marks the packet's words as
faulty. The full slot is then never offered to the link. Instead, the output
buffer reports the slot's transaction ID (`pf_valid`/`pf_tid`), and the
scheduler sets the descriptor's error bit and acknowledges (`pf_ack`), which
frees the slot. The ID is dropped the next time it comes up, and software can
restart it after fixing the mapping.

A free caused by a fault also moves the younger slots up. The output buffer
therefore compares against the live priority of the slot being sent, not the
value the output stage latched when it took the slot.

## The processor mailbox

The processor that drives the send unit also receives messages from the
network: responses to its transfers and read requests from remote nodes, which
it serves by starting a transfer. `rt_mailbox` queues these messages. It sits
in the top level beside the send unit and shares only the clock and reset.

It keeps two FIFOs:

- a response FIFO of 30-bit entries;
- a read-request FIFO of 128-bit entries.

Two FIFOs are needed because the processor may have no room for another read
request while it still waits for responses. With one shared FIFO, a read
request at the head would block the responses behind it and deadlock the
protocol.

Packets arrive on an ExaNet receive link (`mb_exa_*`). A header is accepted
only while both FIFOs have room, so no message is lost. The footer pushes the
packet's first payload word into one FIFO, chosen by the packet type
(`RDREQ_TYPE`, default 2, marks a read request). A read request's entry gets
the protection domain from the packet header in bits 127:112, in place of
user payload. The header is built by the sending node's hardware, so a
process cannot ask for another domain's data.

The processor reads 32-bit words over an AXI-4 read port (`mb_*`):

| address | returns | removes |
|---|---|---|
| 0x00 | {read request waiting, valid, response[29:0]} | the response |
| 0x10 | the next 32-bit word of the head read request, lowest first | the request, after its fourth word |

Bit 31 of a response read saves the processor a slow read of an empty
request FIFO. Reading an empty FIFO returns valid = 0 (or zero) and removes
nothing. RDATA follows one cycle after AR.

## The network-interface crossbar

Packets travel between the network interface's blocks, the other FPGAs of
the board (a QFDB: four FPGAs, one of which, F1, connects to the network
router) and the router through `exacrossb`. This is a 16 x 16 crossbar of
ExaNet links without buffers. Its senders have output buffers and its
receivers have input buffers, so the crossbar only connects them. It sits in
the top level beside the send unit and routes using the node's `src_coord`.

Ports:

| ports | role |
|---|---|
| 0-3 | transceivers to the FPGAs of offset 0-3; the own offset is a loop-back port |
| 4-7 | local ports of the network router |
| 8-15 | network-interface peripherals |

A coordinate is the QFDB (bits 21:2) and the FPGA offset within it (bits 1:0).
F1 has offset 0 (`F1_OFFSET`). The route is taken from the header on the
input's data bus:

1. **Another QFDB.** Off F1, the packet goes to the transceiver towards F1. On
   F1, it goes to a router port chosen by where it came from: from the
   transceiver of FPGA k to router port k, and from any other port to router
   port 0. Traffic of different FPGAs thus uses different router ports and
   does not block each other.
2. **Same QFDB, another FPGA.** The packet goes to that FPGA's transceiver.
3. **This FPGA.** Destination address bits 41:39 select one of the eight
   peripheral ports.

Each output has a round-robin arbiter. A grant is registered, so a header
reaches its output one cycle after it appears at the input. The output then
stays connected to that input until the footer handshake. After the footer
it stays idle for two cycles before the next grant. The valid signals and
data pass straight through, and the ready signals pass straight back, so a
congested receiver stalls the sender directly.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NUM_TID` | 1024 | descriptors and depth of the round-robin FIFO |
| `NUM_OUT` | 3 | outputs: output buffers and ExaNet links |
| `SLOTS` | 8 | slots per output buffer |
| `AXI_ID_W` | 6 | AXI slave ID width |

Fixed in `exadma_pkg`:

- 128-bit data;
- 256-byte packets;
- 8 shifter channels;
- 64-bit addresses;
- 22-bit coordinates;
- the ExaNet header/footer layout.

At the defaults, the storage is:

- descriptor table: 1024 x 256 bit = 256 kbit;
- each output buffer: 8 x 16 x 128 bit of payload (16 kbit) plus 8 x 256 bit of headers and footers;
- round-robin FIFO: 1024 x 10 bit;
- shifter command queues: 8 small FIFOs;
- mailbox: `RQ_DEPTH` x 128 bit and `RSP_DEPTH` x 30 bit, 512 entries each by default (one block RAM per FIFO).

## Departures and choices

- The start trigger is the upper half of word 2 with DB clear. The original
  description also states that the fourth word starts a transaction; that is
  not followed.
- The control window of each output is 32 KiB with 32 bytes per ID, like the
  descriptor table.
- The layouts of the ExaNet header and footer and the position of the error
  bit are this design's own. CRC fields are left to the link layer.
- The AXI ID is the low 3 bits of the protection domain, so at most 8 domains
  are separated in the shifter.
- After a data footer the output stage returns to idle or goes to a waiting
  control packet, never directly to the next data header. That costs one idle
  cycle between data packets.
- A descriptor that is done, in error, of length 0 or above 16384, or with a
  path beyond `NUM_OUT` is dropped silently when it comes up.
- AXI bursts on the slave port are not supported.
- The mailbox's entry formats, address map, read-request packet type and
  queue depths are this design's own.
- The crossbar passes a header through in one cycle; the original design
  quotes a cut-through latency of two cycles. It handles only packets that end
  with a footer (the send unit always sends one), not header-only packets. Its
  port numbering, coordinate layout and address decode are this design's own.
- The crossbar and the mailbox are instantiated beside the send unit, not
  wired to its links. Which crossbar ports they occupy is left to the system
  level.
- Not included: the RDMA receive unit, the serial link layer, the network
  router and the processors. The ExaNet links and AXI ports that lead to them
  are top-level ports.

## Files

| file | content |
|---|---|
| `rtl/exadma_pkg.sv` | sizes, descriptor, header/footer and shifter-command types |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO |
| `rtl/pending_list.sv` | descriptor RAM, AXI slave FSMs, start trigger, control packets |
| `rtl/scheduler.sv` | round-robin FIFO and scheduling FSM |
| `rtl/vbs.sv` | barrel shifter with per-ID state |
| `rtl/output_buffer.sv` | slots, fill counters, issue order, fault report |
| `rtl/exanetizer.sv` | ExaNet output FSM |
| `rtl/exacrossb.sv` | 16-port ExaNet crossbar with two-level routing |
| `rtl/rt_mailbox.sv` | processor mailbox: response and read-request FIFOs |
| `rtl/exadma.sv` | top level: the send unit, with the mailbox and the crossbar beside it |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_exadma.sv` | end-to-end test of the whole unit at default sizes, and short passes through the mailbox and the crossbar |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs. The end-to-end test:

- runs 24 transfers of random size and alignment on three links;
- includes a chain, a page fault, a 4 KiB read split and control packets;
- uses a memory model answering in 5 to 40 cycles, out of order across IDs;
- has receivers that drop ready at random;
- counts how often each mechanism occurred and fails if one never did.

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_exadma \
        -y rtl -y tb +libext+.sv rtl/exadma_pkg.sv tb/tb_exadma.sv
    ./obj_dir/Vtb_exadma +verilator+rand+reset+2

Replace `tb_exadma` with `tb_scheduler`, `tb_vbs`, `tb_output_buffer`,
`tb_exanetizer`, `tb_pending_list`, `tb_rt_mailbox` or `tb_exacrossb` to run a block test. Each file's opening
comment explains what its test does and checks.
