# SoEDC: a Storage-over-Ethernet disk controller

The SoEDC puts a commodity ATA disk directly on a gigabit Ethernet LAN, with
no file server in between. The remote PCs run the file system and a small
device driver. The chip only has to do two things:

- carry raw ATA commands and sector data reliably over Ethernet, and
- play them onto the ATA bus.

Because the work is that simple, the whole controller is hard-wired logic at
125 MHz. There is no processor on the chip.

Reliable transport uses LeanTCP, a cut-down TCP that runs straight on
Ethernet:

- MAC addresses instead of IP addresses;
- one sequence number per packet;
- in-order delivery only, with no reordering and no flow-control window;
- acknowledgements and go-back-N retransmission.

This RTL implements the chip's digital core:

| Part | Module |
|---|---|
| Gigabit Ethernet MAC on GMII | `eth_mac` |
| LeanTCP protocol engine | `protocol_engine` |
| Command processing engine | `command_processing_engine` |
| 2 KB read FIFO | `read_fifo` |
| 64 KB write buffer | `write_buffer` |
| ATA host controller (PIO and Ultra DMA) | `ata_controller` |

`soedc_top` ties these together. The following are off-chip and exist only as
pins:

- the Ethernet PHY;
- the disk itself;
- the pads and package.

```
 GMII <-> eth_mac <-> protocol_engine <-> command_processing_engine <-> ata_controller <-> ATA bus
                         (LeanTCP)          state_memory  cmd_parser      pio_engine
                                            command_queue command_executer dma_engine
                                            retx_manager  write_buffer  read_fifo
```

Everything is synchronous to one clock, `clk`, at 125 MHz. Reset is
asynchronous, active low (`rst_n`).

## LeanTCP as built

A LeanTCP packet is an Ethernet frame with a 26-byte header. Each field is
sent most significant byte first:

| Field | Bits | Meaning |
|---|---|---|
| destination MAC | 48 | |
| source MAC | 48 | |
| Eth-type | 16 | 0x88B5 |
| Size | 16 | payload bytes |
| D-port | 16 | |
| S-port | 16 | |
| TYPE | 16 | 1 SYN, 2 SYNACK, 3 FIN, 4 FINACK, 5 DATA, 6 ACK |
| SEQ-number | 16 | |
| ACK-number | 16 | |

The field order is the protocol's. The widths, the Eth-type value and the TYPE
codes are this implementation's choices.

**Connections.**
- A connection is one remote host: its MAC address plus its S-port.
- SYN opens a connection and FIN closes it. The protocol engine keeps a table
  of `NCONN` (4) remote hosts.
- For each host it records the next sequence number it expects.
- The device numbers its own packets from 1 on every new connection.

**Receiving.** A DATA packet is accepted only if its SEQ is the expected one.
- A duplicate (SEQ one lower) is acknowledged again and dropped, so a lost ACK
  heals itself.
- Anything else is dropped silently.
- Acceptance is a two-step handshake. The payload streams to the command
  processing engine, which returns a verdict at the end.
- Only an accepted payload is acknowledged. A refused payload (write buffer
  taken by another connection, command queue full) goes unacknowledged, and
  the host simply resends it later. This replaces TCP's flow-control window.

**Sending.**
- Read data goes out as one 512-byte sector per DATA packet, followed by a
  4-byte reply packet.
- Packets stay in the read FIFO until acknowledged.
- After `RTO_CYCLES` (1 ms) with no progress, the retransmission manager
  rewinds to the first unacknowledged packet and resends from there
  (go-back-N).
- An ACK-number from the host releases every packet below it.

## Commands, data mode and replies

Every accepted payload is routed by the connection's mode, which is held in
`state_memory`.

**Command mode.** The payload is a 10-byte command, first byte first:

| Field | Size |
|---|---|
| op | 1 byte: 1 read, 2 write, 3 no data |
| features | 1 byte |
| sector count | 16 bits |
| LBA | 32 bits, bits 27:0 used |
| device | 1 byte |
| ATA command code | 1 byte |

The driver supplies the whole ATA task file, so any non-packet ATA command can
be issued. `cmd_parser` checks the length and the op code. A bad command
becomes an INVALID entry, which is answered with an error reply.
`command_queue` (4 entries) holds commands until `command_executer` is free.

**Data mode.**
- A write command switches its connection to data mode, with the byte count
  still to come.
- Following payloads go into the 64 KB write buffer.
- Bytes are written tentatively and committed only when the packet turns out
  good, so a refused packet leaves nothing behind.
- When the last byte arrives, the connection returns to command mode.
- Only one connection can own the write buffer at a time.
- A write longer than 64 KB (128 sectors) is answered with error code 02. It
  never enters data mode.

**Execution.** `command_executer` runs one command at a time:

1. Writes the seven task-file registers by PIO.
2. For read and write commands, runs one Ultra DMA burst:
   - a read streams disk words into the read FIFO, which the retransmission
     manager drains into packets as sectors complete;
   - a write waits until all its data is in the write buffer, then streams
     the buffer to the disk.
3. Waits for INTRQ.
4. Reads Status, then Error.
5. Sends the 4-byte reply `{op, status, error, code}`:

| Code | Meaning |
|---|---|
| 00 | done |
| 01 | malformed command |
| 02 | too long for the write buffer |
| 03 | connection closed before the write data arrived |

## The ATA side

**PIO cycles.** `pio_engine` makes one register cycle from three timings:

| Phase | Clocks | Time |
|---|---|---|
| address setup | `T_SETUP` = 4 | 32 ns |
| DIOR-/DIOW- active | `T_ACTIVE` = 9 | 72 ns |
| recovery | `T_RECOVER` = 3 | 24 ns |

One cycle is 128 ns, which fits ATA PIO mode 4.

**Ultra DMA.** `dma_engine` runs Ultra DMA bursts in both directions. The
lines take their Ultra DMA meanings:

| Line | Meaning |
|---|---|
| DIOW- | STOP |
| DIOR- | HDMARDY- or HSTROBE |
| IORDY | DSTROBE or DDMARDY- |

- DMARQ and IORDY pass two-flop synchronisers.
- Data is captured on every edge of the device strobe.
- On writes, the host toggles HSTROBE once per word, every `STROBE_CLKS` = 2
  clocks: 16 ns per word, 125 MB/s.
- Both ends compute a CRC-16: polynomial 0x1021, seed 0x4ABA, bit 15 first.
- The host puts its CRC on DD when it negates DMACK-. `udma_crc` shows the
  last value.
- A transfer may take several bursts: the device ends a burst by negating
  DMARQ, and each burst has its own CRC.
- `ata_controller` muxes the two engines onto the pins. The DMA engine owns
  DIOR-, DIOW- and DD while a burst runs. An assertion checks that both
  engines are never busy together.

## Ethernet MAC

`eth_mac_rx` takes GMII bytes after the SFD and stores the frame in a 4 KB
buffer.
- It holds back the last four bytes, which are the FCS.
- It checks the CRC-32 residue (0xDEBB20E3).
- It hands on good frames, without FCS, and rewinds the buffer over bad ones.

`eth_mac_tx` sends:
- the preamble and SFD;
- the frame, padded to 60 bytes;
- the FCS;
- then a 12-byte inter-frame gap.

The rx_er line marks a frame bad. There are no pause frames and no half
duplex.

## Sizes and rates

| Parameter (`soedc_top`) | Default | Origin |
|---|---|---|
| `WBUF_BYTES` | 65536 | the design's 64 KB write buffer |
| `RFIFO_BYTES` | 2048 | the design's 2 KB read FIFO |
| `NCONN` | 4 | own choice |
| `CQ_DEPTH` | 4 | own choice |
| `RX_BUF_BYTES` | 4096 | own choice |
| `RTO_CYCLES` | 125000 (1 ms) | own choice |
| `PIO_T_*` | 4 / 9 / 3 | own choice, ATA PIO mode 4 class |
| `UDMA_STROBE_CLKS` | 2 | own choice |

The chip was specified for a 1 Gb/s network and an ATA interface of up to
133 MB/s. With 8 ns clock steps, the nearest Ultra DMA rate is 125 MB/s, the
same as GMII. A full-size data packet costs 576 byte times on the wire, so
read payload peaks at about 111 MB/s. The measured figures for the real chip
with a real disk were:

| Workload | Rate |
|---|---|
| sequential read | 55 MB/s |
| sequential write | 49 MB/s |
| random read | 7 MB/s |
| random write | 11 MB/s |
| average access time | 7 ms |

These are bounded by the disk. The end-to-end testbench measures 80 MB/s for
a 16 KB read and 55 MB/s for an 8 KB write, against a disk model that is
slower than the bus. Single-sector commands at random addresses take about
15.5 us each; the disk model has no seek time, so this measures only the
controller and network overhead.

## Departures and limits

- **Own choices.** The packet format details, the command and reply formats,
  refusal by withholding the ACK, the 1 ms timeout and go-back-N are this
  design's own. The original only names these mechanisms.
- **Ultra DMA rate.** Ultra DMA runs at 125 MB/s instead of 133 MB/s.
- **Ultra DMA bursts.** The device may pause a burst by holding its strobe or
  DDMARDY-. It may also end a burst early by negating DMARQ. The host then
  closes that burst with its own CRC and moves the remaining words in a new
  burst when DMARQ returns. A device that ends the command with an error in
  the middle of a transfer is not handled: the engine waits for DMARQ.
- **ATAPI.** PACKET commands are not issued.
- **Addressing.** Only 28-bit LBA is used.
- **Connections.** A connection that closes mid-transfer loses its remaining
  read data. A write whose data never arrived is answered with code 03.
- **Lint warnings.** Verilator's `-Wall` lint reports the asynchronous
  reset `rst_n` also used as data, in a few places, and some unused bits of the
  shared structs and parameters. Both are expected.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/ata_disk_model.sv` is a behavioural
disk. It supports:

- PIO registers and INTRQ;
- READ DMA (C8h) and WRITE DMA (CAh) over Ultra DMA, with a CRC check;
- every other command, which completes at once.

Its sectors start as `pattern(lba, w) = (lba*0x0101) ^ (w*3) ^ 0x5A00`.

Example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/soe_pkg.sv \
  tb/tb_soedc_top.sv --top-module tb_soedc_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`tb_soedc_top` runs the whole chip at its default sizes. A host model on GMII
and the disk model on the ATA pins work through this sequence:

1. A frame with a bad FCS and a frame with a foreign Eth-type.
2. Two connections are opened.
3. A FLUSH CACHE command with no data, then a malformed command.
4. A 4-sector write that includes:
   - a duplicated packet;
   - a competing write, refused until the buffer is free.
5. Reads, with one lost packet that forces a retransmission.
6. A 32-sector read and a 16-sector write for throughput, and a read-back.
7. Eight single-sector writes and reads at random addresses.
8. Both connections are closed.

It counts every mechanism: good and bad frames, dropped, duplicate, refused,
data mode, retransmission, connection open, Ultra DMA in both directions and
CRC agreement. Any mechanism that never happens counts as a failure.

The block testbenches work at the level of each block's own interface:

- `tb_protocol_engine` feeds LeanTCP frames and checks the frames sent back.
- `tb_command_processing_engine` drives payloads and acknowledgements. It runs
  over the real ATA controller and the disk model, with a shortened
  retransmission timeout.
- `tb_command_executer` uses stand-ins for the PIO, DMA and retransmission
  handshakes.
