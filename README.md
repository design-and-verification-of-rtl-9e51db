# APB-to-SPI bridge

A CPU in an AMBA-based chip talks to its slow peripherals over APB, a
simple parallel bus with one transfer at a time. Many off-chip parts
(serial memories, sensors, SD cards) speak SPI instead: four wires, one bit
per clock. This design joins the two. It is an APB slave on one side and an
SPI master on the other. The CPU writes SPI commands and data into queues
over APB. A small command engine runs each command as one SPI frame, and
read results come back through a third queue that the CPU reads over APB.

The CPU never waits on the serial link while it writes. It waits only when
a queue is full, or when it reads a result that has not arrived yet. In
both cases the bridge holds the APB transfer with wait states (PREADY low),
so nothing is dropped and no status register has to be polled.

An SPI slave memory is included, so the whole path from APB to memory and
back can be simulated.

```
           +-----------+  reg port   +----------------+  request   +------------+  SCLK, SS_n, MOSI  +------------------+
 APB  ---> | apb_slave | ----------> | spi_controller | ---------> | spi_master | -----------------> | spi_slave_memory |
 (CPU)<--- |           | <---------- |  cmd  FIFO     | <--------- |            | <----------------- |  2^15 x 32 bit   |
           +-----------+ FIFO flags, |  wdata FIFO    |  rdata,    +------------+        MISO        +------------------+
                         read data   |  rdata FIFO    |  free
                                     +----------------+
```

Every block runs on one clock (PCLK). Every block uses the same
synchronous, active-low reset (PRESETn).

## Programming model

Only `PADDR[1:0]` selects a register. Decoding the upper address bits is
left to the system's APB decoder.

| PADDR[1:0] | access | register | effect |
|---|---|---|---|
| 0 | write | command FIFO | queues `PWDATA[15:0]` as a command word |
| 1 | write | write-data FIFO | queues `PWDATA` as data for the next write command |
| 2 | read | read-data FIFO | returns and removes the oldest SPI read result |
| other | any | none | completes at once; reads return 0; nothing changes |

Command word (16 bits):

```
 15        14                                 0
+----------+-----------------------------------+
| wr_rdbar |   SPI word address (15 bits)      |
+----------+-----------------------------------+
  1 = SPI write, 0 = SPI read
```

Example: writing `32'h0000abcd` to index 0 queues an SPI write to address
`15'h2bcd`. Its data, for example `32'ha5a5a5a5`, goes to index 1. It may
be written before or after the command. Writing `32'h00002bcd` to index 0
then queues a read of the same address. A read of index 2 returns
`32'ha5a5a5a5` as soon as the SPI read has finished. The read holds PREADY
low until then.

Commands run strictly in order. Each write command takes the oldest word
in the write-data FIFO, so software must write exactly one data word per
write command. A read command takes no data.

Software can deadlock the bridge in two ways:

- It queues more data words than there are write commands to use them, and
  the write-data FIFO fills up.
- It reads index 2 with no read command outstanding.

In both cases the APB transfer then waits for good. Neither case has a
timeout or an error response. PSLVERR is always 0.

## The APB slave and its wait states

`apb_slave` is a registered state machine. It does not answer
combinationally, so every transfer has exactly one wait state when nothing
blocks it.

```
PCLK cycle        1 (setup)     2 (access)      3 (access)
PSEL              1             1               1
PENABLE           0             1               1
slave state       IDLE          SETUP           CMD_FIFO / WDATA_FIFO / RDATA_FIFO / DONE
PREADY            0             0               1
reg_write/read    0             0               1   -> the FIFO moves at the end of cycle 3
```

In IDLE the slave sees the setup phase (PSEL high, PENABLE low) and
registers the address index, the direction and the write data. In SETUP it
checks whether the target can take the access:

- a write to index 0 needs a command FIFO that is not full;
- a write to index 1 needs a write-data FIFO that is not full;
- a read of index 2 needs a read-data FIFO that is not empty.

If the target can take it, the next cycle is the completing one. There
PREADY is high, the strobe fires and (for a read) PRDATA carries the head
of the read FIFO. Because the FIFO shows its oldest word without being
read, the data and the pop belong to the same cycle. If the target cannot
take it, the slave goes to WAIT_FOR_ACK and stays there, with PREADY low,
until it can. The strobe fires only in the completing cycle, so a stalled
write is never written twice.

Assertions check two rules on the requester's side: PENABLE follows a setup
phase, and address, direction and data stay stable during wait states.

## The command engine (`spi_controller`)

The controller holds the three FIFOs (8 entries each by default). Its
state machine does one command at a time:

1. **IDLE**: as soon as a command is queued, pop it into `cmd_q`.
2. **FETCH**: for a write, wait until the write-data FIFO holds a word, then
   pop it into `master_wdata`. For a read, clear `master_wdata`.
3. **ISSUE**: wait for `master_free`, then pulse `master_enable` for one
   cycle. At the same time `master_wr_rdbar`, `master_addr` and
   `master_wdata` hold the request.
4. **WAIT_MASTER**: wait until `master_free` is high again, which means the
   frame is over.
5. **READ_DONE** (reads only): push `master_rdata` into the read-data FIFO.
   If that FIFO is full, wait here. This back-pressures the whole command
   queue until the CPU reads results.

In this design only the controller talks to the SPI master, so the master
is always free when ISSUE is reached. The wait in ISSUE guards the
handshake; it does not add time.

## SPI frames (`spi_master`)

Each command becomes one frame of 48 bits, most significant bit first:

```
SS_n  ‾‾\___________________________________________________________________/‾‾
MOSI      | wr_rdbar | a14 ... a0 | d31 ... d0 (write)  /  0 ... 0 (read)   |
MISO      |            (ignored)  | d31 ... d0 (read, from the slave)        |
          |<---- 16 command bits --->|<-------------- 32 data bits ------------->|
```

SCLK idles low and runs only during a frame. MOSI changes on the falling
edge. Both sides sample on the rising edge (SPI mode 0). Each half period
of SCLK lasts `SCLK_HALF` PCLK cycles, so SCLK = PCLK / (2·SCLK_HALF). The
default is PCLK/4.

The state machine follows the frame: IDLE → ADDR_REG (request latched,
SS_n low) → TX_ADDR (16 bits, 4-bit down counter) → TX_WDATA or RX_DATA (32
bits) → WAIT_ST (SS_n high, read word stored in `rdata`) → DONE → IDLE.
One 48-bit shift register holds the command and the write data. A second
register collects the read data.

Timing at the defaults (SCLK_HALF = 2):

- SS_n is low for 1 + 48·2·SCLK_HALF = 193 PCLK cycles.
- The master is busy (`free` low) for 3 + 96·SCLK_HALF = 195 cycles after
  the cycle that takes the request.

## SPI slave memory (`spi_slave_memory`)

The slave holds 2^15 words of 32 bits, one for every SPI address. It runs
on PCLK and treats SCLK as a data signal. A register delays SCLK by one
cycle, and the slave detects rising and falling edges by comparing the two.

- **Rising edge:** the slave shifts in MOSI. After the 16th bit it knows the
  direction and the address.
- **Write frame:** the word is stored once all 48 bits are in. A frame that
  ends early (SS_n rising) stores nothing.
- **Read frame:** the memory is read one cycle after the address is
  complete. The word then moves out on MISO, MSB first, and shifts on each
  falling edge.

Because SCLK is sampled this way, each SCLK half period must last at least
two PCLK cycles. The top module refuses to elaborate with `SCLK_HALF < 2`.
The memory is not reset, so a word read before it was ever written is
undefined.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `apb_spi_top` | `FIFO_DEPTH` | 8 | entries in each of the three FIFOs (power of two) |
| `apb_spi_top` | `SCLK_HALF` | 2 | PCLK cycles per SCLK half period (≥ 2 with the built-in slave) |
| `apb_spi_top` | `MEM_ADDR_W` | 15 | address bits of the slave memory (at most 15) |
| `sync_fifo` | `WIDTH`, `DEPTH` | 32, 8 | word width, entries |

`apb_spi_pkg` holds the shared widths (32-bit data, 15-bit SPI address,
16-bit command) together with the register indices and the command struct.

## Where this design departs from its source description

The bridge follows a published design: its block chain, register map,
command format, FIFOs and state machines. These points are this design's
own choices, or deliberate departures:

- **One wait state, not two.** The source's APB state diagram keeps PREADY
  low in its FIFO states, which would mean two wait states. Its text
  promises exactly one. This design follows the text: PREADY is high in
  the cycle that moves the FIFO.
- **PADDR[1:0] selects the register.** The source also repeats a sentence
  saying that PADDR[1:0] is unused. That sentence was carried over from a
  memory controller. Its state diagram and example waveforms use
  PADDR = 0, 1, 2 as register indices, and this design follows them.
- **15-bit SPI address.** One block diagram marks the master's address input
  as 32 bits. The command word carries only 15 address bits, so the port
  is 15 bits wide.
- **One slave select.** The master's state diagram shows a 2-bit slave
  select, and a generic SPI feature list mentions 8 select lines, variable
  word length up to 128 bits, LSB-first order and a selectable clock edge.
  The register map has no field for any of these, so the design fixes one
  select line, 48-bit frames, MSB first and SPI mode 0.
- **No slave mode.** The source mentions a master and a slave mode
  "selected with the address". Here this is read as the write/read bit of
  the command. Only the SPI master role is built.
- **No APB clock enable.** A clock enable that slows the APB interface is
  mentioned, also carried over from a memory controller. It is not built.
- **Things the source does not specify:** the FIFO depth, the SCLK divider,
  the SPI mode, the behaviour of unused register indices, the slave memory's
  internals and size, and the reset style. The master keeps its address and
  data outputs after a frame; the source's waveform shows them cleared,
  which makes no difference to the function. SCLK stops between frames.
- **Queues drain at once.** The controller takes a command out of its FIFO
  as soon as it is idle, and waits for the data outside the FIFO. After
  the example's three writes the command FIFO therefore holds one entry
  (the read) rather than the two the source's description lists. The
  order of operations on the SPI bus is the same.
- The source's outlook of several SPI slaves with address decoding is not
  built.

## Verification

Each module has a self-checking testbench in `tb/`. It compares against
values worked out in the testbench, has a watchdog, and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_sync_fifo` | data order against a queue model; full/empty flags; fall-through head |
| `tb_apb_slave` | 3-cycle transfers (one wait state); strobes only in the completing cycle; stalls while a FIFO is full or the read FIFO empty; unused indices; PSLVERR low |
| `tb_spi_controller` | the example command/data sequence; a command waiting for its data; requests only while the master is free; order of queued writes; read results through the read FIFO; FIFO full flags |
| `tb_spi_master` | a behavioural mode-0 slave checks the 16 command bits, 32 write bits, 32 read bits, 48 SCLK edges and 195 busy cycles per frame |
| `tb_spi_slave_memory` | write and read frames against a reference array, both ends of the address range, a frame cut short |
| `tb_example_sequence` | the worked example replayed at the default parameters: three 3-cycle APB writes, the two requests at the SPI master's port, both frames bit for bit on MOSI and MISO, the word in the slave memory, the APB read result |
| `tb_apb_spi_top` | end to end at the default parameters. It covers the example sequence, bursts that fill every FIFO, unused indices and a random mix, with every write read back. It counts each mechanism (single wait state, command-FIFO stall, write-data-FIFO stall, read waiting for SPI data, command waiting for its data, full read FIFO, SPI write and read frames, unmapped access) and fails if one never happens. It also checks the length of every frame. |

The end-to-end test runs with the top's default parameters, including the
full 32K-word memory, and finishes in well under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/apb_spi_pkg.sv tb/tb_apb_spi_top.sv --top-module tb_apb_spi_top
./obj_dir/Vtb_apb_spi_top +verilator+rand+reset+2
```

Replace `tb_apb_spi_top` with any other testbench name. For lint:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/apb_spi_pkg.sv rtl/apb_spi_top.sv
```

The RTL is synthesizable SystemVerilog-2017. The FIFOs and the slave memory
are plain arrays, which synthesis maps to memories. The slave memory stands
for an off-chip part and is included to close the loop.

## Files

- `rtl/apb_spi_pkg.sv`: shared widths, register indices, command struct
- `rtl/apb_spi_top.sv`: the four blocks wired together
- `rtl/apb_slave.sv`, `rtl/spi_controller.sv`, `rtl/spi_master.sv`,
  `rtl/spi_slave_memory.sv`, `rtl/sync_fifo.sv`: the blocks
- `tb/tb_*.sv`: one self-checking testbench per module
