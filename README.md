# A small AMBA AXI3 system: masters, an arbitrated bus and memory slaves

This is a complete, simulatable AXI3 subsystem in SystemVerilog. Three masters
share four memory slaves over an on-chip bus. The bus does two things: it
decodes each burst's start address to pick a slave, and it arbitrates
round-robin when several masters want the same slave. Each slave keeps a small
memory. It also keeps *pending* registers that hold addresses and data it has
accepted but not yet served. A master can therefore give several bursts, each
described only by its start address, without waiting for earlier ones to
finish. The system supports:

* single-beat ("simple") reads and writes;
* multi-beat ("multiple") burst reads and writes of 1 to 16 beats;
* FIXED, INCR and WRAP bursts, with byte strobes;
* OKAY, SLVERR and DECERR responses.

The design follows a published description of an AXI master, slave and
interconnect that was prototyped on an FPGA. That description fixes:

* the memory map;
* round-robin arbitration;
* the parts inside the slave;
* the AXI3 signal set.

Where it is silent, this RTL makes its own choices. Those choices are listed
under "Where this RTL makes its own choices".

## System structure

```
 client 0 ─┐ axi_master ─┐                        ┌─ axi_slave 0  (0-150)
 client 1 ─┤ axi_master ─┼─ axi_interconnect ──────┼─ axi_slave 1  (151-300)
 client 2 ─┘ axi_master ─┘  decoders, RR arbiters  ├─ axi_slave 2  (301-450)
                            decode-error responder └─ axi_slave 3  (451-600)
```

`axi_top` wires `N_MASTERS` (default 3) master units, one `axi_interconnect`
and `N_SLAVES` (default 4) slaves. Only the client side of each master comes
out as ports. The AXI channels themselves are internal.

| file | role |
|---|---|
| `rtl/axi_pkg.sv` | widths, channel structs (`ax_t`, `w_t`, `b_t`, `r_t`), burst/response enums, memory map, `next_beat_addr()` |
| `rtl/axi_master.sv` | client commands → AXI address channels; WID/WLAST generation |
| `rtl/axi_interconnect.sv` | per-master decoders, per-slave arbiters, channel routing |
| `rtl/axi_decoder.sv` | start address → slave index |
| `rtl/axi_rr_arbiter.sv` | round-robin arbiter with a held grant |
| `rtl/axi_decerr_slave.sv` | answers bursts that hit no slave with DECERR |
| `rtl/axi_slave.sv` | memory slave with pending registers and read/write FSMs |
| `rtl/axi_fifo.sv` | small show-ahead FIFO used for all pending registers |
| `rtl/axi_top.sv` | the system |

Each channel's payload is one packed struct from `axi_pkg`. VALID and READY
are separate signals beside it. Widths are AXI3's:

* 4-bit IDs;
* 32-bit address and data;
* 4 write strobes;
* 4-bit length (1-16 beats);
* 3-bit size;
* 2-bit burst type and 2-bit lock;
* 4-bit cache and 3-bit protection;
* WID on the write data channel.

## Memory map and decoding

Slave 0 owns byte addresses 0-150. Each later slave owns the next 150:
151-300, 301-450 and 451-600. These ranges are not aligned to powers of two.
For that reason the decoder compares the address against the range limits
instead of slicing address bits.

Only the **start address** of a burst is decoded. The whole burst then goes
to that slave, even if later beats run past the range limit. Each slave's
buffer (64 words) is large enough for any 16-beat burst that starts inside
its range. A start address above 600 decodes to no slave. The bus then sends
the burst to a built-in responder, which completes it with DECERR: the write
data are drained, and a read gets the right number of beats and RLAST.

Inside a slave, the buffer word is `addr[31:2] - BASE[31:2]`. The ranges are
not word aligned. So the 32-bit word that holds a range boundary, for
example bytes 148-151, exists once in each of the two neighbouring slaves.

## The bus: arbitration and grants

The bus is a small crossbar, not a single shared bus:

* every master has a write-address decoder and a read-address decoder;
* every slave, and the decode-error responder, has its own **write arbiter**
  and **read arbiter**.

Two masters that talk to two different slaves therefore proceed in the same
cycle. The read and write paths of one slave are also independent.

Each arbiter is round-robin. It picks the first requester at or after its
priority pointer. It then moves the pointer to the master just after the
winner, so the winner has the lowest priority next time. The grant is
registered and **held for a whole burst**:

* write: the address, every data beat up to WLAST, then the write response.
  The grant is released when the response is taken.
* read: the address, then every data beat up to RLAST.

While a master holds a grant in one direction, it is not considered for
another grant in that direction. Its data beats and responses therefore have
exactly one path, and IDs pass through the bus unchanged. The cost is that a
master's bursts to different slaves are serialised. Outstanding bursts pile
up in the master and in the slave's pending registers, not across slaves.

Timing, without competition:

* a master drives an address in cycle *n*, and the arbiter's grant lets the
  slave accept it in cycle *n+1*;
* after a release, a slave's arbiter can grant again two cycles later;
* data and responses pass through the bus combinationally.

## Inside a slave

The slave has three pending registers, each a FIFO of `PEND_DEPTH` (4)
entries:

| register | holds | feeds |
|---|---|---|
| pending write address | accepted AW | write FSM |
| pending write data | accepted W beats | write FSM |
| pending read address | accepted AR | read FSM |

AWREADY, WREADY and ARREADY are simply "register not full". The slave
therefore accepts up to four bursts' addresses and four data beats ahead of
the work.

The **write FSM** has three states:

* IDLE takes the next write address.
* DATA takes one buffered beat per cycle. It writes the bytes whose strobe is
  set and advances the address by the burst rules. It moves on after the
  beat numbered AWLEN.
* RESP holds BVALID with BID = AWID until BREADY.

Write data are always matched to addresses in order.

The **read FSM** has two states:

* IDLE takes the next read address.
* DATA presents one beat per cycle while RREADY is high, with RID = ARID and
  RLAST on the final beat. A read address accepted in cycle *n* gives RVALID
  in cycle *n+2*.

Beat addresses come from the start address, the size, the length and the
burst type. FIXED repeats the address. INCR aligns to the size and steps by
it. WRAP steps within a window of `beats × bytes` and wraps at its edge. For
an unaligned INCR start, the first beat uses the address as given and later
beats are aligned.

A burst gets **SLVERR** in any of these cases:

* a beat falls outside the buffer;
* AxSIZE is wider than the 32-bit bus;
* the burst type is the reserved value;
* WID differs from AWID;
* WLAST arrives on the wrong beat.

Once any of these happens, the rest of that write burst writes nothing.

Lock, cache and protection are accepted but have no effect. EXOKAY is never
returned, because there is no exclusive-access monitor. The buffer is cleared
by reset, so unwritten words read as zero. Because of the reset, synthesis
maps it to flip-flops rather than RAM.

## The master unit

A client gives the master a burst command. The command carries the ID, start
address, length, size, burst type, lock, cache and protection. The master
registers the command onto AWVALID/ARVALID one cycle later. It keeps the
address stable until AWREADY/ARREADY, and it takes the next command in the
same cycle the current one is accepted.

For writes, the client supplies only data and strobes. The master keeps the
ID and length of each issued write burst in a queue (`PEND_DEPTH` entries).
From that queue it stamps every beat with WID = AWID and raises WLAST on the
last beat. Write responses and read data go straight back to the client.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `N_MASTERS` | 3 | the system's block diagram (the description also mentions up to 16) |
| `N_SLAVES` | 4 | the decoder's four 150-address ranges |
| `SPAN` (bus, decoder) | 150 | memory map |
| `MEM_WORDS` | 64 | own choice: fits a 16-beat burst from anywhere in a range |
| `PEND_DEPTH` | 4 | own choice |

With more than four slaves, the map continues in steps of 150: slave *k*
starts at `150*k + 1`. The arbiters and decoders scale with the parameters.
Both the 4-bit ID and `$clog2` sizing allow up to 16 masters; `tb_axi_top_16x16`
runs the system with 16 masters and 16 slaves.

## Where this RTL makes its own choices

Nothing below contradicts the source description. It fills gaps the
description leaves open.

* Per-slave arbitration, so that different master/slave pairs get parallel
  paths. Grants are held for a whole burst.
* The decode-error responder for addresses above 600.
* The SLVERR rules, the cleared buffer, the FIFO depths and the buffer size.
* The client-side interface of the master: valid/ready command and data
  ports. The source only names the input fields.
* Asynchronous, active-low reset on ARESETn.
* The source mentions transfers up to 256 beats, but its signal table has a
  4-bit AWLEN and it says bursts are 1-16 beats. The RTL uses 1-16 beats.
* The source reports an FPGA implementation (Virtex-6, about 128 registers,
  110 MHz). This RTL is larger, mostly because of the four 64-word slave
  buffers held in flip-flops, and it has not been mapped to an FPGA.

## Simulation

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/axi_pkg.sv tb/tb_axi_top.sv --top-module tb_axi_top
./obj_dir/Vtb_axi_top
```

| testbench | what it proves |
|---|---|
| `tb_axi_decoder` | every address 0-700 plus random ones against the map |
| `tb_axi_rr_arbiter` | winners against a reference round-robin model; grant held until release; strict rotation under full load |
| `tb_axi_slave` | INCR writes at 40, 12, 35, 42, 102 with AWID 11, several addresses pending at once, BID = 11 and OKAY; INCR reads at 45, 12, 67, 98; FIXED and WRAP; random bursts; SLVERR; read latency of two cycles |
| `tb_axi_master` | addresses unchanged and stable under back-pressure; WID/WLAST on every beat; responses returned; one-cycle command latency |
| `tb_axi_interconnect` | routing to all four slaves and back; round-robin order among three masters on one slave; two slaves accepting in the same cycle; DECERR for writes and reads; one-cycle address latency |
| `tb_axi_top` | the whole system at default parameters. Three clients run randomized rounds of outstanding writes and read-back, each in its own window of every slave, against byte-level models. It counts each mechanism and fails if any one never happens: simple and burst transfers, FIXED, WRAP, outstanding writes, contention, parallel paths, DECERR, SLVERR and back-pressure. It also checks the two-cycle command-to-slave latency. |
| `tb_axi_top_scenario` | the reference scenario on the full system: all three masters write single beats with AWID 11 to 40, 12, 35, 42 and 102 at once. Unaligned addresses use partial strobes. The test checks BID 11 with OKAY, then reads 4-beat bursts from 45, 12, 67, 98 and 32 and compares the data. |
| `tb_axi_top_16x16` | the system with 16 masters and 16 slaves. Every master writes and reads back its window in every slave; all 16 slaves take addresses in the same cycle. |

The system testbenches each run in under a second.
