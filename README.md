# MBC: a memory buffer controller between a HIPPI byte lane and a SCSI disk

A disk recorder that must take a 600 Mbit/s HIPPI stream cannot write it
straight to disks: each drive is slower than the channel, and each one stops
now and then to seek. The Memory Buffer Controller (MBC) solves this for one
drive. It sits between **one byte lane** of a 32-bit HIPPI channel and **one
SCSI II disk**, and puts a 4 MByte SRAM buffer in between. Four MBCs, each with
its own buffer and disk, stripe one HIPPI channel. A group-controller
processor sets up each MBC through a small register port, and that processor
can also read and write the buffer directly for diagnostics.

This repository has synthesizable SystemVerilog for the MBC chip (`rtl/`) and
self-checking testbenches for each unit and for the whole chip (`tb/`).

```
            HIPPI byte lane                              FAS366 SCSI DMA port
   (AMCC destination / source chips)                         (16 bit)
                 |                                              |
          +------+------+                                +------+------+
          |  hippi_if   |   32-bit words  +---------+    |   scsi_if   |
          | 512x8 FIFO  |<--------------->| mem_if  |<-->| 256x16 FIFO |
          | pack/unpack |                 | circular|    | pack/unpack |
          | bursts,sync |                 |  buffer |    | DREQ/DACKN_ |
          +------+------+                 +----+----+    +------+------+
                 |   xfer_counter (48 bit)     |                |
                 |                             |  1M x 32 SRAM (off chip)
          +------+-----------------------------+----------------+------+
          |  mbmc: mode register -> directions, memory source / sink    |
          |  gc_if: 8-bit register port, status, GC <-> memory words    |
          +-------------------------------------------------------------+
```

## Operating modes

Everything the chip does depends on one mode register, which the master
controller (`mbmc`) holds. The group controller writes the mode code to
register 0x0C.

| Code | Mode            | HIPPI side | SCSI side | Writes the buffer | Reads the buffer |
|------|-----------------|------------|-----------|-------------------|------------------|
| 0    | Reset           | idle       | idle      | -                 | -                |
| 1    | HIPPI to SCSI   | in         | out       | HIPPI             | SCSI             |
| 2    | SCSI to HIPPI   | out        | in        | SCSI              | HIPPI            |
| 3    | GC to Memory    | idle       | idle      | GC word writes    | GC word reads    |
| 4    | Memory to HIPPI | out        | idle      | -                 | HIPPI            |
| 5    | Memory to SCSI  | idle       | out       | -                 | SCSI             |

Codes 6 and 7 are ignored. A new mode takes effect on the clock after the
register write. The directions and the memory source and sink follow one
clock later, as the `mbc_ctrl_t` control word. Reset mode holds every FIFO,
packer and handshake cleared. It also empties the buffer and returns both
buffer pointers to address 0.

Modes 1 and 2 are the two working paths. Both ends of the buffer are busy at
once, and the group controller never sees the data. Modes 3 to 5 are for
tests and diagnostics. They are also how you chain the paths by hand: the GC
fills memory in mode 3, then mode 5 sends the data to the disk. To receive
from HIPPI and read the data with the GC, run mode 1, then switch to mode 3
and read words back. The usual sequences are:

* **HIPPI to SCSI:** Reset, optionally load a start address, then mode 1.
* **SCSI to HIPPI:** Reset, optionally load a start address, write the
  transfer counter and the I-field, then mode 4. When the HIPPI connection is
  made, switch to mode 2.
* **GC to disk / GC to HIPPI:** Reset, then mode 3. Write each word, then
  switch to mode 5, or set the counter and I-field and switch to mode 4.

## The data path

In HIPPI to SCSI mode, bytes from the destination chip go into the 512 x 8
FIFO. Groups of four are packed into a 32-bit word, **first byte in the least
significant position**, and written to the buffer at the write pointer.
Words read back at the read pointer are split into two 16-bit half-words,
low half first, and queued in the 256 x 16 SCSI FIFO for the disk. SCSI to
HIPPI is the mirror image. The same `word_packer` and `word_unpacker` modules
serve both sides, set to 8-bit or 16-bit items.

The byte order follows from this packing rule. Bytes 01 02 03 04 arriving
from HIPPI become memory word 0x04030201. That word leaves for the disk as
half-words 0x0201 and 0x0403.

## The buffer memory

`mem_if` drives a 1M x 32 asynchronous SRAM (20 address bits, 4 MByte) and
runs it as a circular buffer:

* The **write pointer** is the tail and the **read pointer** is the head.
  Both wrap at 2^20 words.
* A 21-bit **word count** rises on each stream write and falls on each stream
  read. Memory full means 2^20 words and memory empty means 0. Both flags are
  in the status register.
* **A write takes three clocks and a read takes two.**
  * Write: the address and data are driven first with WRITE_ still high.
    WRITE_ is low in the second clock. Everything is held through the third.
    The address therefore never changes on an edge of WRITE_, which the
    RAM's set-up and recovery rules require.
  * Read: MEM_OE_ is low for both clocks, and the data is sampled at the end
    of the second.
  * At the 25 MHz ASIC clock this gives a 40 ns write pulse (35 ns needed),
    80 ns from address to end of write (40 ns needed), and 80 ns of read
    access (45 ns needed). A 50 MHz clock would need a third read clock.
* **Arbitration:** a waiting GC access goes first. Stream writes and stream
  reads take turns.
* **Back-pressure:** a stream write waits while the buffer is full, and a
  stream read waits while it is empty. A full buffer stops the packer, which
  stops the FIFO. That releases the HIPPI destination's output enable, which
  holds off the channel.
* **GC writes count as buffered data.** A GC write adds one to the word count
  and puts the write pointer just past the word written. After a reset, words
  the GC writes at 0..n-1 are therefore exactly what a following Memory to
  SCSI or Memory to HIPPI transfer sends. A GC read leaves the pointers alone.
* **Start address:** writing the address-load register (0x18) in Reset mode
  sets both pointers to the GC address, so a transfer can begin anywhere in
  the buffer.

The GC-write rule and the exact access sequences are this design's own
choices. The buffer, its two pointers, the full/empty status and the RAM
limits are the original design's. The model in `tb/sram_model.sv` writes at
the end of the WRITE_ low clock and reads combinationally. It counts every
clock in which the address changes as WRITE_ falls or rises, and the chip
tests require that count to be zero.

## HIPPI bursts and lane synchronisation

This is the subtle part of the design. HIPPI moves data in bursts of 256
words of 32 bits, and all four byte lanes of a word must go out on the same
clock. Each MBC therefore only says when *its* lane is ready. External logic
(an AND of the four lanes' BSTAV outputs, registered) tells all of them
together when to go.

**Output direction** (modes 2 and 4):

1. **Transfer counter.** Before the transfer the group controller writes the
   48-bit counter (registers 0x05-0x0A, LSB first) with `2^48 - bytes`. The
   counter increases once for every byte moved, so it reaches zero exactly at
   the end of the packet. Status bit 0 shows that.
2. **PKTAV** is high while the counter is not zero.
3. **I-field.** While no burst is running, the HIPPI data lines carry the
   I-field byte from register 0x04. The external connect logic can take it
   during the connect phase.
4. **BSTAV.** Memory words are unpacked into the 512-byte FIFO. BSTAV rises
   when the FIFO holds a whole 256-byte burst, which is its half-full point.
   For the last burst of a packet it rises when the FIFO holds all the bytes
   that remain (`0 - counter`). In that case **SHBST** marks a short burst.
5. **Start.** When BSTAV, DTREQ (the source chip wants data) and SYNC (every
   lane is ready) are all high, the burst goes out at **one byte per clock**.
   Each byte is marked by a one-clock `hippi_wr` strobe and covered by
   odd parity on PARO. No lane starts alone, and once a burst has started it
   does not pause.

**Input direction** (mode 1):

* DEST_OE_ is low whenever the FIFO has room.
* A byte is taken in every clock in which NRDEN is also low.
* RDYIN is high while the FIFO can take one more whole burst.

The counter also counts received bytes, so the GC can see how much arrived.

Because the SCSI side of each lane runs at its own pace, the four lanes fill
their FIFOs at different times. Holding every lane until SYNC is what lines
the bytes back up into 32-bit HIPPI words.

## SCSI DMA handshake

`scsi_if` serves the DMA port of a FAS366-type SCSI processor. The
processor's register port belongs to the group controller, not to this chip.
While DREQ is high and the FIFO can give a half-word (output) or take one
(input), one half-word moves every **two clocks**:

* In the first clock DACKN_ is low together with WRN_ (chip drives
  SCSI_Data) or RDN_ (processor drives it).
* In the second clock both are high.

Data is captured, or counted as taken, at the end of the strobe clock. The
256 x 16 FIFO evens out the rates of the disk and the memory. The handshake
timing is this design's own; only the signal names are the original chip's.

## Group controller register port

The port is an 8-bit bus, a 5-bit register select, and active-low read,
write and ASIC select. A write acts once, on the first clock in which select
and write are both low. A read drives `gc_bus_out` (with `gc_bus_oe`) while
select and read are low. Multi-byte registers are least significant byte
first.

| Reg       | Access | Meaning |
|-----------|--------|---------|
| 0x01      | R      | HIPPI status: {DEST_OE_, NRDEN, DTREQ, SYNC, RDYIN, SHBST, PKTAV, BSTAV} (bit 7..0) |
| 0x02      | W      | HIPPI control: reserved, ignored |
| 0x03      | R      | HIPPI interrupt: reserved, reads 0 |
| 0x04      | W      | I-field byte |
| 0x05-0x0A | R/W    | transfer counter, 48 bits |
| 0x0B      | R      | system status, see below |
| 0x0C      | W      | mode code (bits 2:0) |
| 0x0D-0x0F | W      | memory address (low 20 bits used) |
| 0x10-0x13 | R      | word read from memory |
| 0x14-0x17 | W      | word to write to memory |
| 0x18      | W      | strobe: load address (and, in Reset mode, the buffer pointers) |
| 0x19      | W      | strobe: read the word at the address into 0x10-0x13 |
| 0x1A      | W      | strobe: write 0x14-0x17 to the address |

System status (0x0B):

| Bit | Meaning |
|-----|---------|
| 0   | transfer counter = 0 |
| 1   | HIPPI FIFO empty |
| 2   | memory full |
| 3   | memory empty |
| 4   | SCSI FIFO full |
| 5   | SCSI FIFO empty |
| 6   | HIPPI FIFO full |
| 7   | HIPPI FIFO half full |

Bits 0-3 and the register numbers come from the original chip. Bits 4-7 and
the HIPPI status layout are this design's. The original gives no bit
definitions for the HIPPI control and interrupt registers, so they do
nothing here.

**Data on the GC path is inverted.** The original chip has inverting pads on
this path, and its operating notes rely on that. A word the GC writes is
stored inverted, and a word the GC reads is the stored word inverted. So:

* A GC write followed by a GC read-back gives the same value.
* Data the GC loads comes out of HIPPI or SCSI inverted.
* Data received from HIPPI or SCSI reads back through the GC inverted.

The HIPPI-to-SCSI and SCSI-to-HIPPI paths are not affected. The parameter
`GC_INVERT = 0` removes the inversion.

## FIFO self test

Holding BIST_Test high runs a self test on both FIFOs at once. `fifo_bist`
works in two passes:

1. It clears the FIFO and fills it with the pattern `index ^ 0101...`. It
   checks that the full flag is set, reads the FIFO back and compares each
   item, then checks that the empty flag is set.
2. It does the same again with the inverted pattern.

Each test takes `4*DEPTH + 6` clocks. BIST_HResult and BIST_SResult go high
when the HIPPI or SCSI test has finished without an error, and stay high
while BIST_Test is held. The algorithm is this design's own. The original
chip only states that its FIFOs have a self test with these pins.

## Clocking, reset and throughput

Everything runs on one clock, `clk`, the ASIC clock: 25 MHz on the original
board, with 50 MHz as the design target. The original pin list also has
separate HIPPI read/write clocks, a 50 MHz SCSI clock and a BIST clock.
Without more information about them, this design uses the single clock for
all of it, and those pins, and the HIPPI SELB[2:0] inputs, are not present.
`reset_n` is an asynchronous, active-low hardware reset. Writing mode 0 is
the software reset.

At 25 MHz:

| Path   | Rate | Reason |
|--------|------|--------|
| HIPPI  | 25 MByte/s | one byte per clock |
| SCSI   | 25 MByte/s | a half-word every two clocks |
| Memory | 20 MByte/s each way, with both streams active | one 4-byte write (3 clocks) and one 4-byte read (2 clocks) every five clocks |

The system needs 600 Mbit/s / 4 lanes = 18.75 MByte/s per lane. The memory
is the tightest resource, with about 7% to spare. The FIFOs absorb the
faster HIPPI and SCSI bursts.

## Files

| File | Contents |
|------|----------|
| `rtl/mbc_pkg.sv` | modes, directions, control word, register numbers, parity |
| `rtl/mbc_asic.sv` | top level: units, memory routing, status bytes |
| `rtl/mbmc.sv` | mode register and control word |
| `rtl/gc_if.sv` | register port |
| `rtl/xfer_counter.sv` | 48-bit transfer counter |
| `rtl/hippi_if.sv` | HIPPI lane, bursts, I-field |
| `rtl/scsi_if.sv` | SCSI DMA handshake |
| `rtl/mem_if.sv` | SRAM timing and circular buffer |
| `rtl/sync_fifo.sv` | FIFO with empty/full/half flags |
| `rtl/fifo_bist.sv` | FIFO self test |
| `rtl/word_packer.sv`, `rtl/word_unpacker.sv` | 8/16-bit to/from 32-bit words |
| `tb/tb_<unit>.sv` | self-checking test of each unit |
| `tb/tb_mbc_asic.sv` | whole chip, full size, through its pins |
| `tb/tb_sync_lanes.sv` | two chips joined by the lane-sync AND and flip-flop |
| `tb/tb_acceptance.sv` | production data-path tests with their fixed patterns |
| `tb/sram_model.sv` | behavioural 32-bit SRAM for the chip test |

The parameters of `mbc_asic` have these defaults:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `MEM_AW` | 20 | buffer address width |
| `HFIFO_DEPTH` | 512 | HIPPI FIFO depth |
| `SFIFO_DEPTH` | 256 | SCSI FIFO depth |
| `BURST_BYTES` | 256 | HIPPI burst length |
| `XC_W` | 48 | transfer counter width |
| `GC_INVERT` | 1 | invert data on the GC path |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/mbc_pkg.sv tb/tb_mbc_asic.sv --top-module tb_mbc_asic -o sim
./obj_dir/sim
```

Substitute any `tb/tb_<unit>.sv` for a single unit.

`tb_mbc_asic` runs the whole chip at its default size (a 1M-word SRAM model)
in a few seconds. It goes through these scenarios:

* status after reset;
* GC write and read-back;
* GC to SCSI, with the SCSI FIFO filling while the processor is stalled;
* SCSI to GC;
* HIPPI to SCSI with one 256-byte burst;
* SCSI to HIPPI with 600 bytes, checked as the I-field, bursts of 256, 256
  and a short 88, each at one byte per clock;
* GC to HIPPI and HIPPI to GC, including the inversion;
* filling all 2^20 words from HIPPI until memory full stalls the lane, then
  draining it;
* the self test.

It counts each mechanism: every mode, the destination stall, memory full,
SCSI FIFO full, the short burst, waiting for sync, the I-field, the counter
reaching zero, and the self test. It fails if any of them never happened.

`tb_sync_lanes` checks the lane synchronisation with two full-size chips.
Their BSTAV outputs go through a four-input AND (the two unused inputs are
tied high) and a flip-flop, and the result is SYNC for both chips. Both
chips send the same 600-byte packet from SCSI to HIPPI. The SCSI data of
lane 1 starts late and pauses at random, so lane 0 is ready first and has to
wait. Lane 0 acts as master and clocks the source chip. The test checks on
every clock that the two lanes' write strobes match. It also checks that
each 16-bit channel word holds the right byte from each lane, and that the
bursts are 256, 256 and 88 bytes long.

`tb_acceptance` runs the fixed pattern lists of the production tests over
six paths: GC to memory, memory to GC, memory to SCSI, SCSI to memory,
HIPPI to memory and memory to HIPPI. It checks each word where it arrives,
including in the RAM model, and then runs the self test. For the two
memory-to-port paths, the RAM is loaded through the GC. Only words written
that way count as buffered data.

## Limits and departures

* The HIPPI connect/disconnect protocol is outside the chip, as in the
  original. So are the SCSI processor's register port and the logic that
  combines the lanes' BSTAV into SYNC. `tb_sync_lanes` models that logic
  for two lanes. The single-chip tests make SYNC from their one lane.
* A packet whose length is not a multiple of four bytes leaves its last
  partial word in the packer until the next bytes arrive or the mode returns
  to Reset.
* The transfer counter counts **bytes**. The original notes describe it once
  as counting words, but they tell the programmer to load it with
  `2^48 - number of bytes`.
* The GC memory-read strobe is register 0x19. One step in the original
  operating notes uses 0x18 instead. Here 0x18 only loads the address.
* The pin timing throughout is this design's own. That covers the GC bus, the
  HIPPI strobes, the SCSI handshake and the SRAM cycle. Check it against the
  real AMCC, FAS366 and SRAM parts before building a board.
