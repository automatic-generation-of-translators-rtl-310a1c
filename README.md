# AXI ⇄ packet-protocol read translators

Two IP blocks can only talk when their interface protocols agree. When they
don't, a *translator* sits between them. It takes every transaction that one
side sends and hands it to the other side in that side's format, with the
timing that side expects. This RTL holds two such translators between an AXI
read interface and a generic packet protocol, one for each master/slave
direction:

* **AXI → packet** (`axi2pkt_translator`). An AXI read master reads from a
  memory that speaks the packet protocol.
* **packet → AXI** (`pkt2axi_translator`). A packet-protocol master reads
  from an AXI slave.

Both are built in the way a translator-synthesis flow builds them. One
**control unit** is a set of cooperating state machines that merges the state
machines of the two protocols. It drives a few generic datapath blocks: a
**register FIFO** per data stream, **multiplexers** that put different
sources on one set of wires, and an **address calculator** that adds a
per-piece offset to a base address. All the protocol knowledge is in the
control unit. The datapath blocks are the same in both directions.

`translator_top` places the two translators side by side. They share only
`clk` and `rst_n`. Their ports carry the prefixes `a2p_` and `p2a_`.

Only the **read** side of both protocols is covered: AXI AR/R, and the
packet commands `RdReq16` and `RdResp16`. Writes, AXI IDs, `arsize`/`arburst`,
`rresp` and every other packet command are not implemented (see
[Departures and limits](#departures-and-limits)).

## The packet protocol

On a packet interface the wires do not mean the same thing every cycle. A
packet is a sequence of **flits** on one 40-bit bus with a valid/ready
handshake. The first flit, the header, says what the following flits mean.
The fields are packed from bit 39 downwards:

| flit | fields (MSB first) | bits |
|------|--------------------|------|
| header | `LEN` 6 (packet length in flits), `CMD` 8, `TID` 8, `ECC` 5, zero pad 13 | 40 |
| address | `SID` 4, `H` 1, `rd_address` 32, `ECC` 3 | 40 |
| data | `data` 32, `CD` 3, `ECC` 5 | 40 |

| packet | CMD | LEN | flits |
|--------|-----|-----|-------|
| `RdReq16` | 0 | 2 | header, address |
| `RdResp16` | 1 | 6 | header, address, 4 data (16 bytes, `CD` = 0..3) |

A receiver must decode the header before it knows how to read the next
flits. Both translators therefore walk incoming packets with a small state
machine: header, then address, then data. A packet with any other `CMD` is
consumed for `LEN` flits and dropped, so unknown traffic cannot lock up the
link.

`ECC` holds check bits. Each check bit `i` is the XOR of every flit bit
whose index is congruent to `i`: modulo 5 for the 5-bit fields, modulo 3 for
the 3-bit field. The check bits themselves are zero during the calculation.
The translators generate them on every flit they send and check them on every
flit they accept. A mismatch gives a one-cycle pulse on `ecc_err`. Nothing is
corrected or retried. The functions live in `pkt_pkg` (`make_hdr`,
`make_addr`, `make_data`, `hdr_ok`, `addr_ok`, `data_ok`).

## AXI → packet: splitting a burst into packets

The AXI master asks for `arlen+1` 32-bit words in one burst, up to 256. The
packet side only serves 16-byte reads. The translator therefore sends
`ceil((arlen+1)/4)` `RdReq16` packets. Packet `k` carries `TID = k` and
address `araddr + 16·k`, which the address calculator forms. Three state
machines in `axi2pkt_ctrl` run concurrently:

1. **Request.** Header flit, then address flit, for each packet. The request
   multiplexer selects the flit type. A stall by the packet IP holds the flit
   stable.
2. **Response.** Walks each response packet. For each data flit it decides
   whether the burst still wants that word. When the burst length is not a
   multiple of four, the last `RdResp16` carries words that nobody asked for.
   Those words are accepted and dropped, even when the FIFO is full. Wanted
   words are pushed into the 4-word read-data FIFO. While the FIFO is full,
   the packet IP is stalled with `rx_ready` low.
3. **Read data.** R is simply the FIFO head: `rvalid` = FIFO not empty. A
   counter marks `rlast` on word `arlen`.

**End of a burst.** The burst sits in a one-entry AR FIFO, which keeps
`arready` low, until two things have happened:

* the master has taken the last word;
* every flit of every response has arrived.

The second condition matters. The unwanted words of a short last packet can
still arrive after the master has its last word. Ending earlier would let
them be counted as the first words of the next burst.

Only one burst is in flight at a time. This is what keeps the buffers at
their minimum size: the most data buffered at once is one response, 16 bytes,
so the FIFO is four words deep. Responses must come back in request order.
The translator does not use `TID` to reorder them.

Timing with no stalls:

* the first request flit is taken 2 cycles after the AR handshake;
* a data word appears on R 1 cycle after its data flit is accepted;
* requests go out back to back at one flit per cycle.

## Packet → AXI: choosing the AXI path

A `RdReq16` asks for 16 bytes. AXI can deliver them in several ways: one
4-word burst, two 2-word bursts or four 1-word bursts. The single burst has
the lowest latency, because the AR round trip is paid once. The smaller
bursts reuse states that a translator needs anyway for shorter reads, so they
can cost less area. The parameter `PATH_BEATS` (4, 2 or 1; default 4) makes
this choice. Burst `b` reads from `address + 4·PATH_BEATS·b` with
`arlen = PATH_BEATS-1`.

`pkt2axi_ctrl` again runs three state machines:

1. **Request.** It walks incoming packets. A `RdReq16` stores its `TID`,
   `SID` and `H` and loads its address into the address calculator. From
   then on `rx_ready` stays low until the response has been sent, so only one
   request is served at a time.
2. **AXI read.** It issues the AR bursts. `rready` is simply "FIFO not full".
3. **Response.** It sends the header (`LEN 6`, `CMD 1`, the request's
   `TID`) and the address flit (the request's `SID`, `H` and address) at
   once, without waiting for data. It then sends four data flits with
   `CD = 0..3`. Each data flit is offered only while the FIFO has a word, and
   each one pops that word.

Timing with no stalls: the AR request and the response header are both taken
1 cycle after the request's address flit.

## Building blocks

| module | role |
|--------|------|
| `pkt_pkg` | flit structs, command codes, lengths, check-bit functions |
| `reg_fifo` | register FIFO with first-word fall-through output; push and pop allowed in the same cycle, even when full; assertions forbid overflow and underflow |
| `flit_mux` | N-to-1 selector; a select beyond N-1 gives 0 |
| `addr_calc` | base register (loaded once per transaction sequence) plus a combinational adder for the offset |
| `axi2pkt_ctrl`, `pkt2axi_ctrl` | the control units described above |
| `axi2pkt_translator`, `pkt2axi_translator` | control unit + FIFOs + mux + address calculator, wired |
| `translator_top` | both translators side by side |

All sequential logic uses `clk` (rising edge) and an asynchronous
active-low reset `rst_n`. FIFO storage is not reset. Every other register
is. Valid/ready handshakes follow the AXI rule on both protocols: a transfer
happens on a rising edge where both are high, and a sender holds its data
until then. Assertions in the control units check that rule for the
translators' own outputs.

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `axi2pkt_translator.RFIFO_DEPTH` | 4 | read-data FIFO words (one `RdResp16`) |
| `axi2pkt_translator.SRC_ID` | 0 | `SID` field of requests |
| `pkt2axi_translator.PATH_BEATS` | 4 | AXI words per burst (4, 2 or 1) |
| `pkt2axi_translator.RFIFO_DEPTH` | 4 | read-data FIFO words |
| `pkg: FLIT_W, ADDR_W, DATA_W` | 40, 32, 32 | flit, address and data widths |

## Departures and limits

Some of this design is taken straight from the underlying architecture: the
protocol subsets and field widths, the one-control-unit-plus-generic-blocks
structure, FIFO sizing from the largest amount buffered at once, and the
lowest-latency path as the default. The following are choices made here:

* **Flit width and layout.** Only field widths are fixed by the protocol
  description. The 40-bit flit (the widest flit), the bit placement and the
  valid/ready handshake on the flit ports are choices made here.
* **`RdReq16` content.** It is taken to be a header plus an address flit in
  the same format as the response's address flit.
* **Check bits.** The code (XOR fold) and the report-only handling are
  choices made here. The meanings of `SID`, `H` and `CD` are not defined.
  Requests send `H = 0`, responses echo the request's `SID` and `H`, and
  `CD` carries the data-flit index.
* **AXI subset.** Only `araddr`, `arlen`, `arvalid`/`arready`, `rdata`,
  `rvalid`/`rready` and `rlast` are used. There is no `arid`/`rid`, `arsize`
  (always 4-byte words), `arburst` (always incrementing) or `rresp`.
* **Read only.** The write direction and the other packet commands are not
  given in enough detail to build.
* **One transaction sequence at a time in each translator.** Buffers hold
  exactly one sequence. Overlapping sequences would need deeper FIFOs and
  `TID` matching, which are not implemented.
* **FIFOs on the data ports.** A FIFO sits on the AXI address input (one
  entry) and on each read-data stream (four words). Outgoing flits come
  straight from the multiplexer, and their stability under stall comes from
  the control unit holding its state. In the packet → AXI direction, the
  address calculator's base register holds the incoming request.
* **No multiplexer in front of the read-data FIFOs.** With the packet formats
  used here, read data always sits in the same bits of a data flit, so that
  multiplexer would have a single input.
* **AXI → packet has no parameter for the packet size.** The packet protocol
  offers only the 16-byte read, so there is no choice to make in that
  direction.

Size after generic coarse synthesis (word-level cells, not gates):
`axi2pkt_translator` has 298 cells, 91 flip-flop bits and 168 FIFO memory
bits; `pkt2axi_translator` has 277 cells, 74 flip-flop bits and 128 memory
bits. Translators that cover the full protocols, with writes and many packet
commands, are several times larger.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it does |
|-----------|--------------|
| `tb_reg_fifo` | random push/pop against a queue model, depths 4 and 1, flags every cycle |
| `tb_flit_mux` | all selects of a 2- and a 3-input mux with random data, out-of-range select |
| `tb_addr_calc` | random loads and offsets, wrap-around |
| `tb_axi2pkt_ctrl` | directed: a 6-word burst as two packets, an unknown packet, full-FIFO stall, dropped unwanted words, end-of-burst condition, check-bit error |
| `tb_pkt2axi_ctrl` | directed, `PATH_BEATS = 2`: unknown packet, request, two AR bursts at offsets 0 and 8, response flits with `SID`/`H`/`CD`, FIFO gating, check-bit error |
| `tb_axi2pkt_translator` | models of an AXI master and a packet memory (`a2p_env`): 40 random bursts incl. one 256-word burst, random stalls on every channel, unknown packets, one corrupted flit; checks every flit and word and the two latencies above |
| `tb_pkt2axi_translator` | models of a packet master and an AXI memory (`p2a_env`), two translators (`PATH_BEATS` 4 and 1), random stalls, unknown packets, one corrupted header; checks every AR and response flit and the latencies above |
| `tb_translator_top` | `translator_top` at its default parameters, both directions at once. It also counts each mechanism (AR held off during a burst, FIFO-full backpressure, R/AR/flit stalls, multi-packet and partial-packet bursts, dropped unknown packets, check-bit errors) and fails if any never happened |

Memory models return `mem_word(a) = a·0x9E3779B1 + 0x01234567`, so every
word's expected value follows from its address.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pkt_pkg.sv tb/tb_translator_top.sv --top-module tb_translator_top
./obj_dir/Vtb_translator_top
```

Verilator finds the other modules through `-Irtl -Itb` by file name: one
module, package or interface per file, named after it. The testbenches rely
on reset for everything they read, so they also pass with
`+verilator+rand+reset+2`. Each test finishes in well under a second of
simulation time.
