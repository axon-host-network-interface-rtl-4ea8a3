# Axon host–network interface: a pipelined communications processor

This is synthesizable SystemVerilog for the network interface of the Axon
architecture (Sterbenz and Parulkar). Axon moves data between the memory of
one host and another at the rate of a gigabit serial link. Nothing on the way
holds a whole packet.

The interface is a **communications processor (CMP)**. It is a pipeline that
sits between the serial link and a multiported **communications memory
(CMM)**. The host uses the CMM like any other memory bank.

- On transmit, the CMP reads a packet's data out of the CMM while the packet is
  already leaving on the line.
- On receive, it writes each byte into its final place in the CMM as the byte
  comes off the line.

Several connections (*congrams*) share one interface. The CMP switches between
them in hardware at page boundaries. It keeps every congram's state in a
register file, so a switch costs nothing.

Software on a separate control processor (the **CAP**) handles the slow work:

- setting up congrams;
- building control packets;
- deciding when to ask for retransmissions.

The hardware handles everything done per packet:

- header build and decode;
- checksums;
- byte-order conversion and encryption;
- address generation;
- rate control;
- packet presence tracking;
- retransmit timers.

```
              host CPU                      CAP (control software)
                 |  random access port        |  CSR writes, page requests,
                 v                            v  control cells, events
   +-------------------------+   +------------------------------------------+
   |  CMM  (axon_cmm)        |   |  CMP  (axon_cmp)                          |
   |  1 MB, 3 ports          |<--|  transmit:  sequencer -> CKG -> ECD ->    |--> link_out
   |  host R/W, seq. read,   |-->|             ECR -> P2S -> XMT             |
   |  seq. write             |<--|  receive:   RCV -> S2P -> DCR -> DCD ->   |<-- link_in
   +-------------------------+   |             CKC / ADD / control capture   |
                                 |  packet control: HDD, PEL, PPL, RXT      |
                                 |  congram control: MPX, CSR, RCT          |
                                 +------------------------------------------+
                     axon_nif = axon_cmp + axon_cmm   (top level)
```

The top level `axon_nif` is the memory-interface configuration of Axon: one
CMP wired to the sequential ports of one CMM. These parts are outside the
design and appear only as ports:

- the CAP;
- the host processor;
- the optical transmitter and receiver, including bit-clock recovery.

## Clocking: one clock, two major cycles

Everything runs on a single clock `clk` at the link bit rate. At 1 Gb/s that
is 1 ns; the design targets that rate but nothing here checks it. The
datapath is one byte wide. Byte-wide stages therefore advance on a clock
enable, the *major cycle*, once every 8 clocks (8 ns).

- **Transmit major cycle.** A free-running divide-by-8 counter inside
  `axon_cmp` gives `ce_tx`.
- **Receive major cycle.** `axon_s2p` derives `ce_rx` from the incoming bit
  stream. It is re-phased at the start of every received cell. The receive
  side therefore needs no clock of its own, only a bit clock shared with the
  line.
  - In hardware, the bit clock would come from clock recovery in the optical
    receiver.
  - In simulation, both interfaces share `clk`.

Every byte travelling down a pipe carries two flags with it (`cbyte_t`):

- a valid flag;
- a start-of-cell flag.

Each stage works out the byte's position within the cell from these flags. No
stage needs a side channel from the sequencer.

## The cell

Packets are fixed at the size of an ATM cell: 53 bytes. The data field is 32
bytes, so a 1 KB page is 32 packets.

| bytes | field |
|---|---|
| 0–4 | network header (a per-congram template from the CSR) |
| 5 | MCHIP type (`01` = data) |
| 6 | ALTP type (`01` = data; anything else is a control cell) |
| 7–8 | congram id `c` |
| 9–10 | request id `q` |
| 11 | segment group size `|g|` |
| 12 | segment index `k` |
| 13–14 | segment length `|s_k|` in pages |
| 15–16 | page index `j` |
| 17–18 | packet index `i` (0–31) |
| 19–50 | 32 data bytes |
| 51–52 | checksum: the 16-bit sum of the 16 big-endian data words |

The field list comes from the Axon packet format. The byte positions and widths
are this design's own choices. Only the data field is byte-swapped and
encrypted. The header stays in clear, so the receiver can decode it before the
data arrive. The checksum covers the plain host data: it is computed before
encoding and checked after decoding.

**On the wire.**

- **Line code.** NRZI: the line toggles for a 1. An idle line carries zeros.
- **Framing.** Each cell is preceded by one framing byte, `00000001`. The
  receiver takes the first 1 it sees as the end of the framing byte, then
  takes exactly 424 bits as the cell.
- **Cell slot.** Each cell takes 54 byte times, or 432 bit times. That is
  98% of the line rate in a burst.
- **Bit order.** Bits go out most significant bit first.

## Transmit: what goes out next

The part of the design that is hardest to follow is the **transmit sequencer**
(`axon_mpx_tx`). It contains three helpers:

- RXA (packet bitmap walker);
- ADG (CMM read address);
- HDB (header bytes).

**Cell slots.** Rate control (`axon_rct`) produces a cell slot every 54
transmit major cycles. At each slot the sequencer makes one decision, in this
order:

1. **A control cell from the CAP**, if one is waiting. The CAP presents bytes
   0–50 on `ctl_tx_cell` with `ctl_tx_valid`, and holds them until
   `ctl_tx_ack`. The checksum is added in the pipe.
2. **The next packet of the page in progress.** A page goes out as a burst of
   consecutive cells.
3. **A new page.** This is the context switch. It considers only congrams that
   meet three conditions:
   - the congram is enabled;
   - it has a request pending;
   - rate control allows it to start a new page.

   Retransmission requests are served before primary requests. This preempts
   the original transfer, but only at page boundaries. Among equals, congrams
   are served round robin.

**Requests.** A page request holds four things:

- the page number `j`;
- the page's CMM base address;
- a 32-bit bitmap of the packets to send;
- a retransmission flag.

A primary request has all 32 bits set. A retransmission request has only the
packets the receiver asked for. RXA walks the bitmap lowest packet first. ADG
turns each packet index into `base + 32*i` and steps through the 32 data
bytes. Each CMM read is issued one major cycle before its byte is needed.

**Rate control** uses a simple scheme:

- a page goes out as a burst at the peak rate;
- the congram then sits out an **inter-page gap** (`ipg`, counted in major
  cycles from the end of its page).

The gap sets the congram's average rate. The end-to-end test checks that a
congram with a gap leaves the link to the other congram meanwhile. It also
checks that burst cells are exactly 432 bit times apart.

**Settings delay.** Encoding and encryption settings belong to a congram, but
the pipe holds parts of two cells at once. The sequencer latches the settings
of each cell it starts. `axon_cmp` then delays them by 6 major cycles before
they reach ECD and ECR. A switch therefore takes effect between the last data
byte of one cell and the first data byte of the next. Without this delay, the
tail of a cell is processed with the next congram's key.

The pipe after the sequencer, one major cycle per stage unless noted:

| stage | module | latency | job |
|---|---|---|---|
| CKG | `axon_ckg` | 1 | sums the data field and writes the trailer |
| ECD | `axon_byteswap` | 4 | reverses the bytes of every 32-bit data word when `swap` is set; same latency either way |
| ECR | `axon_cipher` | 1 | XORs the data field with a keystream |
| P2S | `axon_p2s` | 8 bits | shifts the byte out, MSB first |
| XMT | `axon_xmt` | 9 bits | inserts the framing byte and NRZI-codes the line |

**The cipher is a placeholder.** It uses the low byte of a 16-bit Galois LFSR
(mask `0xB400`), loaded with the congram's key at the first data byte. It shows
where encryption sits and how it is keyed per congram. It gives no security.

## Receive: straight into memory

Receive stages:

1. **RCV** (`axon_rcv`) undoes the NRZI code and finds the framing 1. It then
   passes exactly one cell's worth of bits.
2. **S2P** (`axon_s2p`) assembles bytes and produces `ce_rx`.
3. **HDD** (`axon_hdd`) taps the stream straight after S2P. When the last
   header byte is in, it does three things in the same major cycle:
   - looks `(c, q)` up associatively in the receive CSRs;
   - classifies the cell;
   - checks `k < |g|` and `j < |s_k|`.

   Because the header travels in clear, the decoded congram is known before the
   first data byte reaches DCR, so DCR and DCD can use that congram's key and
   swap setting.
4. **DCR/DCD** are the same two modules as on the transmit side: XOR and the
   word byte reversal are their own inverses.
5. **ADD** (`axon_add`) writes each data byte of an accepted cell to
   `base + 1024*j + 32*i + b`.
   - `base` is the request's receive area from the CSR.
   - A cell is not written in three cases: control cells, unknown congrams,
     and out-of-bounds pages.
6. **CKC** (`axon_ckc`) gives its verdict after the trailer.

**A corrupted packet is not kept out of memory.** Nothing is buffered, so its
bytes are already in the CMM when CKC's verdict arrives. It is discarded in the
bookkeeping instead: its presence bit is cleared, and a retransmission
overwrites the bytes. The host must not read a page before it is reported
complete.

**Cells for the CAP.** Two kinds of cell go to the CAP instead of memory:

- control cells (ALTP type other than data);
- cells of unknown congrams.

They are captured whole and handed over on `ctl_rx_cell`, with `ctl_rx_valid`
and the checksum verdict `ctl_rx_ok`.

## Packet presence and retransmission

**Presence tracking.** Tracking a presence bit for every packet of every page
would need memory in proportion to the transfer. The presence logic
(`axon_ppl`) keeps a small table (`NPG = 8`) of *partly received* pages
instead. Each entry holds:

- the congram;
- the request id;
- the page index;
- a 32-bit presence vector.

Arrivals update the table as follows:

- The first packet of a page allocates an entry.
- A good packet sets its bit.
- A corrupted packet clears its bit.
- When all 32 bits are set, `pg_pres` reports the page to the CAP and the
  entry is freed.
- If no entry is free, the arrival is dropped and `ppl_ovf` pulses.

The CAP can `flush` a congram's entries when it abandons a request.

**Retransmit timers** (`axon_rxt`) are kept per table entry, so at page
granularity. A timer advances in two ways:

- on every arrival of its own congram, for any page;
- on every `rxt_tick` from the CAP.

It fires at `RXT_LIMIT` (64).

- Counting arrivals means a gap in the stream is noticed once roughly two
  pages of later packets have come in.
- The CAP's tick covers the end of a transfer, when nothing more arrives.

When a timer fires, the packet error logic (`axon_pel`) issues a request on
`rq`. It carries:

- the congram;
- the request id;
- the page;
- the bitmap of packets not present, whether missing or corrupted.

The timer then restarts. The request repeats until the page completes.

**Retransmission round trip.** Wrapping the request into a retransmit-packets
control cell, and turning a received one back into a request, is CAP software.
The end-to-end testbench contains a minimal behavioural CAP that does exactly
this:

1. B's CAP puts `j` and the bitmap into a control cell.
2. A's CAP receives it and writes a retransmission request with that bitmap.
3. A's sequencer sends only those packets, ahead of any primary page.

## CAP interface

Ports of `axon_cmp`, which are also ports of `axon_nif`:

| group | ports | protocol |
|---|---|---|
| congram state | `tx_we`, `rx_we`, `widx`, `tx_wdata` (`tx_cfg_t`), `rx_wdata` (`rx_cfg_t`) | write a whole entry in one clock |
| page requests | `req_we`, `req_idx`, `req` (`tx_req_t`) | one primary and one retransmission slot per congram; a write to a full slot replaces it; the slot empties when the page starts |
| control cells out | `ctl_tx_valid`, `ctl_tx_cell`, `ctl_tx_ack` | hold until `ack` |
| control cells in | `ctl_rx_valid`, `ctl_rx_ok`, `ctl_rx_cell` | one-clock pulse, cell held until the next one |
| events | `tx_page_end`/`_idx`/`_j`, `pg_pres`/`pg_idx`/`pg_q`/`pg_j`, `rq`/`rq_*`, `ppl_ovf`, `n_corrupt`, `n_missing` | one-clock pulses and running counters; the CAP must catch the pulses |
| timers | `rxt_tick`, `flush`, `flush_idx` | pulses |

**Transmit entry** (`tx_cfg_t`) fields:

- enable;
- `c`, `q`;
- the 5-byte network header template;
- `|g|`, `k`, `|s_k|`;
- inter-page gap;
- swap and crypt flags;
- 16-bit key.

**Receive entry** (`rx_cfg_t`) fields:

- enable;
- `c`, `q`;
- the CMM base address of the request's receive area;
- `|g|`, `|s_k|`;
- swap and crypt flags;
- key.

All types and the cell layout are in `rtl/axon_pkg.sv`.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NCONG` | 4 | congrams with CSR sets (own choice) |
| `NPG` | 8 | partly received pages tracked (own choice) |
| `AW` | 20 | CMM address width: 1 MB, enough for one 1 MB segment (own choice) |
| `RXT_LIMIT` | 64 | retransmit timer limit in arrivals and ticks (own choice) |
| `W` (package) | 8 | datapath width; fixed, the byte-wide stages assume it |

Synthesis of `axon_nif` at the defaults with yosys (generic cells, before
technology mapping) gives:

- about 1,600 cells;
- 4,709 flip-flop bits, mostly the CSRs and the presence table;
- the 8 Mbit CMM as one memory.

**How the numbers compare with the original architecture's, at 1 Gb/s.**

| object | original figure | this design | note |
|---|---|---|---|
| cell | 424 ns | 432 ns slot | the extra byte is the framing byte |
| 1 KB page | 13.6 µs | 13.8 µs | 32 cells |
| 1 MB segment | 13.9 ms | 14.2 ms | fits the default 1 MB CMM |
| 1 GB object | — | does not fit | the CMM holds 1 MB |

**Pipeline depth.** The architecture allows up to 625 pipeline stages at each
end before interface latency matters for a LAN. This design uses about 10 major
cycles each way.

## Departures and simplifications

The original architecture names each block and says what it does, but gives no
formats, codes or algorithms. Everything below is a choice made here.

- **Scope.**
  - Only the memory-interface configuration is built: the CMP on a dedicated
    multiported CMM. The alternative, with the CMP on the host interconnect,
    is not.
  - Only an 8-bit datapath is built. Wider paths (16–128 bits) would need the
    byte-wide stages reworked.
- **Line and cell.** The line code, framing byte, cell layout and checksum
  algorithm are this design's own.
- **Encryption.**
  - The cipher is a non-cryptographic placeholder.
  - Header and internal control fields are not encrypted. The architecture
    has them encrypted too; here they stay in clear so the receiver can
    decode the header in-line.
- **Encoding.** Encoding and decoding do only byte-order reversal within
  32-bit words.
- **Receive addressing.** The receive CSR holds one base per request, and pages
  are placed at `base + 1024*j`. The architecture has a base per page.
- **Segment size.** Arriving data cells carry the segment size `|s_k|`. The
  architecture uses it to adjust the receive allocation. Here the receiver
  ignores the field: it checks the page index against the allocation held in
  its CSR instead.
- **Retransmission policy.** Timers are per page and the fetch policy is
  anticipatory: all missing packets are requested. Demand fetch, and timers
  at packet, segment or group granularity, are not built.
- **Not built.** The CAP and its software, the host CPU, and the optical
  parts are not built.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The end-to-end test, `tb_axon_nif`, runs two
complete interfaces at the default parameters, joined by their serial links.
In that run:

- A's host fills three pages.
- A's CAP sets up two congrams and sends a control cell.
- The A→B line has one bit inverted in the data field of one cell.
- B detects the corrupted packet. Its timer fires, and its CAP sends a
  retransmit-packets control cell back.
- A resends that packet.
- The test checks that B's CMM holds exactly A's data.

The test counts and requires each of these mechanisms:

- control cells;
- context switches;
- rate-control holds;
- corrupted packets;
- retransmission requests;
- retransmitted pages.

`tb_axon_cmp` runs one CMP in loopback. It covers:

- a page with a packet left out of the bitmap;
- a line error;
- the control-cell round trip.

`tb_axon_segment` moves a whole 1 MB segment from A to B at the peak rate,
also at the default parameters. That is 1024 pages, or 32768 cells. A's
CAP issues the next page request as soon as the request slot is free. The
test checks that:

- every page is reported present once, in order;
- no cell is lost or corrupted;
- B's CMM ends up equal to A's;
- the first page and the whole segment take 32 and 32768 cell slots, plus
  a latency of a few dozen bit times.

At a 1 GHz bit clock the measured times are 13.88 µs for the first page and
14.156 ms for the segment. Without the framing byte, 424-bit cells would give
13.6 µs and 13.9 ms. This run takes less than a minute of simulation.

To run a testbench with verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl rtl/axon_pkg.sv tb/tb_axon_nif.sv --top-module tb_axon_nif
obj_dir/Vtb_axon_nif
```

To run a unit test, replace `tb_axon_nif` with any other `tb/tb_axon_*.sv`.
The testbenches reset everything they read, so they also pass with
`+verilator+rand+reset+2`. The end-to-end test takes well under a minute.
