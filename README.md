# IEEE 1394b link-layer controller

This is a link-layer controller for an IEEE 1394b (FireWire) node, written in
synthesizable SystemVerilog. It sits between a host processor on a simple
33 MHz, 32-bit bus and an external 1394 PHY chip. The host writes packets as
32-bit words and reads received packets back. The controller does the rest:

- it rebuilds the headers of outgoing packets;
- it asks the PHY for the bus and sends packets byte-serially with their CRCs;
- it waits for acknowledges and sends them for packets it receives;
- it checks the CRCs of incoming packets and filters them;
- it tracks the 125 µs isochronous cycle;
- it raises interrupts to the host.

Both asynchronous (addressed, acknowledged) and isochronous (channel-based,
once per cycle) transfers are supported.

The structure follows a nine-part split of a 1394 link controller:

- host bus interface;
- central arbiter;
- transmit FIFOs and the receive FIFO;
- asynchronous and isochronous transmitters;
- receiver;
- cycle timer and monitor;
- internal registers;
- PHY interface.

The original specification gives the block split, the host bus handshake, the
two transmit FIFO sizes and the transmitter signal names. Everything else
comes from the IEEE 1394 standard or is this design's own choice. Each such
choice is listed below in *Where this design goes beyond its specification*.

```
             BCLK domain                 |                SCLK domain
                                         |
 host ──► host_bus_if ──► central_arbiter ──► AT FIFO (5 KB) ──► at_tx ──┐
  bus        (CS# WR#        │   │        ──► IT FIFO (2 KB) ──► it_tx ──┤
            ADDR DATA CA#)   │   └─────── ◄── GR FIFO (5 KB) ◄── receiver ◄┤
                             ▼                                     │      │
                          int_regs ◄──── pulse/2-flop sync ────► cycle_timer
                          (INT#)                                          │
                                                               phy_if ◄───┘
                                                           CTL[1:0] D[7:0] LREQ
```

## Clock domains

There are two clocks:

- **BCLK** is the host bus clock (33 MHz in the tests).
- **SCLK** is the PHY clock (49.152 MHz for a standard PHY-link interface).

Packet data crosses between them only through the three FIFOs (`async_fifo`):

| FIFO | direction | size |
|------|-----------|------|
| AT | host → asynchronous transmitter | 1280 quadlets (5 KB) |
| IT | host → isochronous transmitter | 512 quadlets (2 KB) |
| GR | receiver → host | 1280 quadlets (5 KB) |

A quadlet is one 32-bit word, the unit 1394 counts packets in.

Each FIFO side counts the words it has moved with a binary counter. The
counter is one bit wider than the depth needs. It crosses to the other clock
as Gray code through two flip-flops. Because the counter is wide, occupancy is
a plain subtraction, so a depth that is not a power of two (1280) works. The
memory index on each side is a separate counter that wraps at `DEPTH`. Reads
are first-word-fall-through: `rdata` always shows the oldest word. This lets
the host read data out within one bus cycle, and lets the transmitters peek at
a header before popping it.

Control and status cross in `int_regs`:

- Level signals (enables, node ID, receive channel) go through two-flop
  synchronizers.
- One-cycle events go through `pulse_sync` (a toggle with a two-flop
  synchronizer and an edge detect). Events are RstTx, SoftReset, the PHY
  register commands, cycle timer loads, and all interrupt sources.

Change the level controls only while the link is idle. A multi-bit value
caught mid-change is not protected.

The `reset` input is synchronized into both domains, active high.

## Host bus cycle (`host_bus_if`)

Every BCLK edge that sees CS# low is one access. WR# high means a read and
WR# low means a write.

- **Read.** At the sampling edge the interface latches ADDR into `rd_addr`.
  During the next cycle it raises `rd_en`, pulls CA# low and drives DATA
  (`data_oe`). `rd_data` is combinational from `rd_addr`, so DATA is valid in
  the CA# cycle.
- **Write.** At the same edge the interface latches ADDR and DATA into
  `we_addr`/`we_data`. It then raises `we_en` and pulls CA# low for one cycle.

A single access holds CS# low for exactly one BCLK. For a **burst**, the host
keeps CS# low and presents a new address (and, for writes, new data) at
every edge. Each quadlet then gets its own strobe and its own CA# cycle, so a
burst moves one quadlet per BCLK. In a burst read, the data for an address
appears one BCLK after that address. Reading the GR FIFO port in a burst
pops one quadlet per cycle.

A host that holds CS# low for two edges on the same address makes two
accesses. For the FIFO ports that means two pushes or two pops.

Two assertions check the handshake:
- a read and a write never overlap;
- CA# is low exactly when a strobe is active.

`central_arbiter` routes accesses:

- A write to `0x20` pushes into the AT FIFO.
- A write to `0x24` pushes into the IT FIFO.
- A read of `0x28` pops the GR FIFO. An empty GR FIFO returns 0 and nothing
  is popped.
- Everything else goes to the registers.

A write to a full transmit FIFO is dropped. It pulses the `host_ovf` output.

## Register map (`int_regs`)

All registers are 32 bits wide at byte addresses.

| addr | name | contents |
|------|------|----------|
| 00 | CTRL | [0] TxAEn, [1] TxIEn, [2] RxEn (async receive), [3] IrEn (iso receive), [4] RstTx\*, [5] SoftReset\*, [13:8] iso receive channel |
| 04 | NODEID | [15:6] BusNumber, [5:0] NodeNumber; reset 0xFFFF |
| 08 | INTSTS | interrupt flags, write 1 to clear |
| 0C | INTMSK | interrupt enables; INT# is low while any enabled flag is set |
| 10 | ACKSTS | [4] last ack timed out, [3:0] last ack code received |
| 14 | PHYREG | [3:0] PHY register address, [15:8] write data; write [16]=1 for a PHY register write, [17]=1 for a read; reads back [27:24]/[23:16] = address/data of the last PHY register read |
| 18 | CYCTMR | cycle timer; a write loads it |
| 1C | FIFOST | [0] AT full, [1] IT full, [2] GR empty, [28:16] GR FIFO quadlets |
| 20 | ATF | AT FIFO write port |
| 24 | ITF | IT FIFO write port |
| 28 | GRF | GR FIFO read port |

\* RstTx and SoftReset clear themselves. SoftReset also clears the enables
and the interrupt flags, and resets both transmitters.

Interrupt bits:

| bit | name | meaning |
|-----|------|---------|
| 0 | TxRDY | async packet done |
| 1 | ACKRCV | ack received |
| 2 | TcErr | unsupported transaction code |
| 3 | AccsFail | no ack, or ack not complete/pending |
| 4 | ConErr | lost arbitration |
| 5 | RxPkt | packet stored in GR FIFO |
| 6 | ItDone | iso packet sent |
| 7 | PhyReg | PHY register value arrived |
| 8 | BusReset | bus reset |
| 9 | CycLost | cycle start missing |
| 10 | HdrErr | received header CRC bad |
| 11 | CycStart | cycle start seen |

## PHY-link interface (`phy_if`)

The PHY drives `CTL[1:0]`:

| CTL | meaning |
|-----|---------|
| 00 | idle |
| 01 | status transfer |
| 10 | receive |
| 11 | grant |

After a grant the link drives CTL instead: 00 idle, 10 transmit. `phy_oe`
enables the CTL and D pads. D is 8 bits, one byte per SCLK.

Requests go to the PHY serially on LREQ, one bit per SCLK, start bit first:

| request | LREQ bits | length |
|---------|-----------|--------|
| bus request | `1, type[2:0], speed[2:0], 0` | 8 bits |
| PHY register read | `1, 100, addr[3:0], 0` | 9 bits |
| PHY register write | `1, 101, addr[3:0], data[7:0], 0` | 17 bits |

Bus request types: 000 immediate, 001 isochronous, 010 priority, 011 fair.

Speed: the host gives a two-bit speed `spd` (0 = S100, 1 = S200, 2 = S400,
3 = S800) in its packet header. LREQ carries it as the three-bit field
`{spd, 0}`: 000, 010, 100 and 110.

Only one bus request is outstanding at a time:
- When both transmitters ask in the same cycle, the isochronous one wins.
- A grant goes to whichever transmitter made the request.
- If the PHY starts a receive before granting, the request is cancelled. The
  owner gets a "lost" pulse and asks again once the receive is over. For a
  packet (not an acknowledge) this raises ConErr.

Transmit timing: the grant cycle has CTL = 11. The link then drives CTL = 00
for two SCLKs (one SCLK before an acknowledge byte). Next comes CTL = 10 with one packet byte per SCLK, most
significant byte of each quadlet first. A final CTL = 00 cycle follows, then
the link releases CTL and D.

Receive: CTL = 10 from the PHY.
- D = FF bytes (data-on) are skipped.
- The first other byte is the speed code.
- The packet follows, one byte per SCLK, until CTL leaves 10.

Status transfer: CTL = 01, two bits per SCLK on D[1:0], most significant
first.
- 2 cycles carry the status nibble S[3:0].
- 8 cycles carry {S[3:0], register address, register data}. This is how a
  PHY register read is answered.
- S2 (bit 1 of the nibble) flags a bus reset.

## Asynchronous transmit path (`at_tx`)

The host writes a packet into the AT FIFO as a *host header* followed by the
data block:

```
host quadlet 0 : {14'b0, spd[1:0], tl[5:0], rt[1:0], tcode[3:0], pri[3:0]}
host quadlet 1 : {destination_ID[15:0], destination_offset_high[15:0]}
host quadlet 2 : destination_offset_low           (or rcode word for responses)
host quadlet 3 : quadlet data / {data_length, extended_tcode}   (4-quadlet headers only)
data block     : ceil(data_length/4) quadlets     (block write, block read response, lock)
```

The host does not know its own source ID, and the bus format puts the
destination in quadlet 0. The transmitter therefore *reorganizes* the header:

```
bus quadlet 0 : {destination_ID, tl, rt, tcode, pri}
bus quadlet 1 : {BusNumber[9:0], NodeNumber[5:0], destination_offset_high}
bus quadlet 2.. : copied
```

When TxAEn is set, the transmitter works through these steps:

1. It peeks at the transaction code.
   - Supported codes: 0, 1, 2, 4, 5, 6, 7, 8, 9, B. Code 8 lets the host
     send a cycle start packet it has built itself.
   - Any other code raises TcErr. The AT FIFO is then flushed, because packet
     boundaries can no longer be trusted.
2. It pops the 3- or 4-quadlet header.
3. It waits until the whole data block is in the FIFO, so the byte stream
   never stalls once started.
4. It sends a fair bus request at the packet's speed.
5. After the grant it sends:
   - the header bytes;
   - the header CRC;
   - the data bytes and the data CRC, if the packet has a data block.

The CRC is the 1394 CRC-32 (`crc32_unit`):
- polynomial 0x04C11DB7;
- register preset to all ones;
- bytes fed most significant bit first;
- the register's complement is sent.

The header CRC and the data CRC each have their own run. Each transmitter and
the receiver has its own CRC unit.

After a packet that is not a broadcast (destination node 63), the transmitter
waits for the acknowledge:
- The receiver reports it (ACKRCV). Its code goes into ACKSTS.
- If no acknowledge comes within `ACK_TIMEOUT` SCLKs, the receiver pulses a
  timeout and ACKSTS[4] is set.
- A timeout, or an ack other than complete (1) or pending (2), raises
  AccsFail.

TxRDY is raised at the end in every case.

The same transmitter sends the acknowledges that the receiver asks for:
1. It makes an immediate request.
2. It sends a one-byte packet `{code, ~code}`.

An ack goes ahead of any packet still waiting for its grant. PHY register
reads and writes (PHYREG) are sent on LREQ while the transmitter is idle.

## Isochronous transmit path (`it_tx`)

The host writes two header quadlets and the data into the IT FIFO:

```
host quadlet 0 : {14'b0, spd[1:0], tag[1:0], channel[5:0], tcode=A, sy[3:0]}
host quadlet 1 : {data_length[15:0], 16'b0}
bus header     : {data_length, tag, channel, tcode, sy}
```

The transmitter sends at most one packet per isochronous cycle. It works like
this:

1. When TxIEn is set, it arms on a cycle start from the cycle monitor.
2. It checks the transaction code. Any code other than A raises TcErr and
   flushes the IT FIFO.
3. It folds the two host quadlets into the one-quadlet bus header.
4. It waits for the whole data block to be in the FIFO.
5. It makes an isochronous request.
6. After the grant it sends:
   - the header;
   - the header CRC;
   - the data, read straight out of the FIFO;
   - the data CRC.

No acknowledge is expected. ItDone is pulsed at the end.

## Receive path and GR FIFO format (`receiver`)

Incoming bytes are packed into quadlets. Quadlet 0 gives the transaction
code, and so the header length. The header CRC is checked against a CRC
computed on the fly. If the packet has a data block, a second CRC covers the
data.

A packet is kept when:
- its header CRC is good, and
- either:
  - it is an asynchronous packet for this node ID or a broadcast, with RxEn
    set; or
  - it is an isochronous packet on the CTRL channel, with IrEn set.

At the header CRC the receiver checks that the whole packet will fit in the
GR FIFO. A packet that does not fit is dropped and answered with
`ack_busy_X` (4). Header quadlets are written while the data is still
arriving. In the GR FIFO each packet looks like this:

```
header quadlets (as received, CRC quadlets removed)
data quadlets   (if any)
trailer : {speed[7:0], 16'h0, ack[3:0], 1'b0, complete, header_crc_ok, data_crc_ok}
```

A stored packet raises the RxPkt interrupt.

Acknowledges for asynchronous packets addressed to this node (not broadcasts):

| code | meaning | sent for |
|------|---------|----------|
| 1 | ack_complete | writes and responses |
| 2 | ack_pending | reads and locks |
| D | ack_data_error | bad data CRC |

Other cases:
- A bad header CRC sets HdrErr. The packet is dropped without an ack.
- A one-byte packet is an acknowledge. It is reported to the asynchronous
  transmitter only while that transmitter waits for one.
- A good cycle start packet (tcode 8) goes to the cycle monitor, not to the
  FIFO.

## Cycle timer and monitor (`cycle_timer`)

CYCLE_TIME is `{seconds[6:0], cycle[12:0], offset[11:0]}`. The offset counts
a 24.576 MHz tick. That tick is SCLK divided by `OFFSET_DIV`, so 2 for a
49.152 MHz SCLK. The offset wraps at 3072, which makes one 125 µs cycle. The
cycle count wraps at 8000, which makes one second.

Each received cycle start loads the timer with the cycle master's value and
pulses `cyc_start`. That pulse opens the isochronous transmitter's slot and
raises CycStart. If no cycle start arrives within `LOST_LIMIT` SCLKs (two
cycles), CycLost is raised once. This node only follows another node's cycle
master. It never sends cycle start packets itself.

## Parameters of `link1394b_top`

| parameter | default | meaning |
|-----------|---------|---------|
| AT_DEPTH | 1280 | AT FIFO quadlets (5 KB, specified) |
| IT_DEPTH | 512 | IT FIFO quadlets (2 KB, specified) |
| GR_DEPTH | 1280 | GR FIFO quadlets; holds a 4096-byte S800 asynchronous packet |
| ACK_TIMEOUT | 256 | SCLKs to wait for an acknowledge |
| OFFSET_DIV | 2 | SCLK cycles per cycle-offset tick |
| LOST_LIMIT | 12288 | SCLKs without a cycle start before CycLost |

Capacity limits at these sizes:
- The largest asynchronous packet at S800 is 4096 bytes, or 1028 quadlets
  with its header. It fits both the AT and the GR FIFO.
- The IT FIFO holds an isochronous payload of up to 2048 bytes. That covers
  the S100 and S200 maximums but not the S400 and S800 ones.
- With 8 bits per SCLK, S800 needs SCLK = 98.304 MHz with `OFFSET_DIV = 4`.
- In bursts the host bus moves 133 MB/s at 33 MHz, more than the 100 MB/s
  of S800.

## Where this design goes beyond its specification

The specification gives:
- the block split;
- the host bus handshake (CS#/WR#/ADDR/DATA, RD_en/WE_en strobes, one-cycle
  CA#);
- the FIFO roles and the 5 KB / 2 KB transmit FIFO sizes;
- the transmitter signal names (TxAEn, TxIEn, RstTx, SoftReset, BusNumber,
  NodeNumber, PHY register access, TxRDY, ACKRCV, TcErr, AccsFailINT,
  ConErr);
- the port list of the whole controller;
- the 10-bit BusNumber and 6-bit NodeNumber;
- the 8-bit D and ack widths;
- the four speeds.

The following are this design's choices:

- **Host header layouts, register map, interrupt bits and GR FIFO trailer.**
  None are given.
- **PHY-link protocol details.**
  - CTL/LREQ encodings follow the IEEE 1394 PHY-link interface, with a 3-bit
    speed field.
  - Status bit order and the two-cycle CTL = 00 lead-in are this design's.
  - Check them against the PHY you use.
- **No PCI.**
  - The host side is the simple CS#/WR#/CA# target cycle described above.
    There is no PCI target or bus-master (initiator) logic.
  - Bursts are a run of single-cycle accesses under one CS# assertion. There
    is no PCI burst protocol.
- **No cycle master.** Cycle start packets are only received.
- **Asynchronous transmitter in one state machine.** It is described as
  three sub-modules: bus management, header organization and packet send.
  Here they share one state machine.
- **Whole packets only.** A packet is sent only once all its data is in the
  transmit FIFO.
- **Isochronous CRCs are checked too.** The data CRC of isochronous packets
  is checked and reported in the trailer, although only the asynchronous
  check was asked for.
- **Numbers.** The GR FIFO size, the ack timeout and the lost-cycle limit
  are chosen here.
- **Async, not "synchronous".** The specification also speaks of
  "synchronous" transfers. They are read as the asynchronous transfers it
  describes everywhere else.

## Files

| file | content |
|------|---------|
| `rtl/lhc_pkg.sv` | encodings, transaction/ack codes, register addresses, CRC byte update |
| `rtl/link1394b_top.sv` | top level |
| `rtl/host_bus_if.sv`, `rtl/central_arbiter.sv`, `rtl/int_regs.sv` | host side |
| `rtl/async_fifo.sv`, `rtl/sync2.sv`, `rtl/pulse_sync.sv` | clock crossing |
| `rtl/at_tx.sv`, `rtl/it_tx.sv`, `rtl/receiver.sv`, `rtl/crc32_unit.sv` | packet engines |
| `rtl/cycle_timer.sv`, `rtl/phy_if.sv` | cycle timing, PHY interface |
| `tb/tb_util_pkg.sv` | testbench helpers: bit-serial reference CRC, packet-to-byte conversion |
| `tb/tb_*.sv` | one self-checking testbench per block, and `tb_link_top` for the whole design |

## Simulation

Every testbench checks itself. It ends by printing
`TB_RESULT checks=<n> failures=<m>`, and it has a watchdog. Build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lhc_pkg.sv tb/tb_util_pkg.sv tb/tb_link_top.sv --top-module tb_link_top
./obj_dir/Vtb_link_top
```

Swap in any other `tb_<block>` the same way.

`tb_link_top` runs the top at its default parameters and takes about a
second. It plays both the host and a PHY. It sends and receives:
- quadlet and block writes;
- reads;
- isochronous packets;
- cycle starts;
- corrupted packets.

It fills the GR FIFO until a packet is refused with ack_busy_X, and
overflows the AT FIFO. It ends by sending and receiving a 4096-byte block
write at S800, the largest asynchronous packet, through the full-size FIFOs. Every transmitted byte is compared with a reference
packet, built with an independent bit-serial CRC. Every received packet is
read back over the host bus and compared. The test counts each mechanism and
fails if one never happened:

- asynchronous and isochronous transmit;
- ack received, ack timeout and ack sent;
- lost arbitration;
- header and data CRC errors;
- GR FIFO busy and AT FIFO overflow;
- TcErr;
- PHY register write and read;
- bus reset;
- cycle start and cycle lost;
- interrupts;
- host burst writes and burst reads of the GR FIFO.

Some block testbenches shrink parameters to keep runs short:
- `tb_async_fifo` uses depth 20.
- `tb_receiver` uses a 24-quadlet GR FIFO and a 40-cycle timeout.
- `tb_cycle_timer` uses a shorter lost limit.

Besides their directed cases, most block testbenches finish with a random
section that is checked against a small model in the testbench:
- `tb_host_bus_if`: bursts of one to four quadlets.
- `tb_central_arbiter`: a sweep of random host accesses.
- `tb_cycle_timer`: a successor check on every cycle-timer tick.
- `tb_at_tx`, `tb_it_tx`, `tb_receiver`: 25 to 40 random packets each.
- `tb_phy_if`: 40 random link requests.
- `tb_int_regs`: 80 steps mixing events, INTSTS clears and register writes.
The random values come from `$urandom`, so a different simulator seed runs a
different sequence.
