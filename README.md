# Shared instruction memory for a soft-core multiprocessor

FPGAs have little on-chip memory. A program of a few hundred kilobytes does
not fit next to several soft processors, and giving each processor its own
external memory costs pins and board space. This design lets every processor
fetch its code from **one external SRAM**. Each processor has a small on-chip
instruction cache, so it reaches the SRAM only on a cache miss. The system
targets a parallel video encoder:

- one **master** processor collects the results and talks to the host;
- three **slave** processors encode a horizontal slice of each frame each.
  They all run the same program.

Data never goes through the shared SRAM. It moves between the processors and
the picture memory over a separate on-chip bus, **HIBI**. Each processor has
a DMA engine, **N2H2**, for these transfers.

The other key part is a **hardware monitor** on the SRAM bus. It counts how
often each processor reads the shared memory, how long it waits, and how
often several processors collide. These counts show how much the shared
instruction memory costs. In the measured system the cost is small: a slave
reads the SRAM in about 5.5 % of its cycles, and the SRAM is busy only about
17 % of the time.

The RTL covers everything except the CPU cores and the board devices. Every
processor core, the picture-memory (SDRAM) controller, the external SRAM and
the Ethernet device attach through ports of the top module, `mpsoc_top`.

```
                        external SRAM, 1 MB (program memory)
              lower half: master code          upper half: slave code
                                   |
                     +---------------------------+        read, wait per port
                     |    avalon_ext_bridge      |------------------------+
                     | round-robin, one per cycle|  SRAM read strobe      |
                     +---------------------------+  Ethernet rd/wr ---+   |
                      |        |        |        |                    v   v
   +------------------+--+ +---+----+ +-+------+ +-+------+   +------------------+
   | cpu_node 0 (master) | | node 1 | | node 2 | | node 3 |   |   hw_monitor     |
   |  icache 8 KB        | | slave  | | slave  | | slave  |   +------------------+
   |  sram_port_arb      | |        | |        | |        |   | monitor_hibi_if  |
   |  onchip_ram 64 KB   | |  ...   | |  ...   | |  ...   |   +------------------+
   |  n2h2 (1 TX, 8 RX)  | |        | |        | |        |   |  hibi_wrapper    |
   |  hibi_wrapper       | |        | |        | |        |   +------------------+
   +----------+----------+ +---+----+ +---+----+ +---+----+            |
              |                |          |          |                 |
   ===========+================+==========+==========+=====+===========+=== hibi_bus
                                                           |          (32 bit, round-robin)
                                                    +--------------+
                                                    | hibi_wrapper |--> pm_* ports:
                                                    +--------------+    picture-memory
                                                                        (SDRAM) controller
```

## The shared instruction path

Each tile has two Avalon masters for its CPU core:

- the **instruction master**;
- the **data master**. It also reads the SRAM, because the compiler puts
  constants in the code segment.

The path from a CPU core to the SRAM pins has three stages. Each stage uses
the Avalon rule: a transfer completes in a cycle where `read` (or `write`)
is high and `waitrequest` is low. A master that sees `waitrequest` must hold
its address and data still until the transfer completes. It cannot withdraw
and do something else.

1. **`icache`**: direct-mapped, 8 KB, lines of eight 32-bit words.
   - A hit answers in the same cycle with no wait.
   - A miss holds `waitrequest` and reads the whole line from the SRAM, one
     word at a time from word 0. The fetch is answered in the cycle after the
     last word arrives.
   - So every miss appears on the SRAM bus as a block of 8 reads.
   - There is no prefetching and no critical-word-first.

2. **`sram_port_arb`** merges the cache refills and the data master's SRAM
   accesses onto the tile's single SRAM port.
   - The data master has priority.
   - Once a transfer has been shown to the bridge, it stays there until
     accepted. So the port's signals never change while `waitrequest` is high.
   - One port per tile means the monitor sees one `read`/`waitrequest` pair
     per processor.

3. **`avalon_ext_bridge`** grants the SRAM to one port per cycle and drives
   the SRAM pins from it.
   - The SRAM is treated as zero-wait: a granted read completes in that cycle.
   - Arbitration is round-robin per transfer. After a grant, the search starts
     at the next port.
   - So no read waits more than `N_PORTS` cycles in total: 4 with four
     processors. This matches the longest latency measured on the real system.
   - Every other requester sees `waitrequest` and holds.

The SRAM word address is 18 bits. `cpu_node` puts its `SRAM_HALF` bit on top
of a 17-bit code address:

- the master (`SRAM_HALF = 0`) runs from the lower 512 KB;
- all slaves (`SRAM_HALF = 1`) run the same program from the upper 512 KB.

The slave encoder code is 140 KB, so it fits easily.

### Tile address map (data master, byte addresses)

| Range                       | Target                         | Wait                        |
|-----------------------------|--------------------------------|-----------------------------|
| `0x0000_0000 - 0x0007_FFFF` | the tile's half of the SRAM    | 0 when granted by the bridge |
| `0x0010_0000 - 0x0010_FFFF` | 64 KB data RAM (`onchip_ram`)  | reads 1 cycle, writes 0     |
| `0x0020_0000 - 0x0020_00FF` | N2H2 registers                 | 0                           |

Decoding uses `d_address[21:20]`. The data RAM is true dual-port:

- port A serves the CPU;
- port B serves the N2H2.

Reads are registered, like FPGA block RAM, and byte enables are honoured.

## Hardware monitor

`hw_monitor` watches only plain signals:

- `read` and `waitrequest` of each tile's SRAM port;
- the SRAM read strobe;
- the Ethernet read/write strobes, which share the SRAM bus on the original
  board.

It never sees the cache internals. So a cache miss rate cannot be measured,
only the traffic that misses cause.

While running, it keeps these counters. All are 32 bits and saturate.

| Counter | Per   | Meaning in this RTL |
|---------|-------|---------------------|
| T_w     | CPU   | cycles with `read` and `waitrequest` both high |
| A_r     | CPU   | words read (`read` high, `waitrequest` low) |
| L       | CPU   | longest latency of one read, in cycles. It counts from the first cycle the read is presented, up to and including the accepting cycle. A read with no wait has L = 1. |
| S       | CPU   | most words read within one block |
| A_b     | CPU   | number of blocks. A block is a maximal run of cycles with `read` high. |
| T_fet   | system | elapsed cycles |
| A_t     | system | words read on the SRAM bus (SRAM read strobe) |
| A_sp    | system | longest run of consecutive SRAM read cycles |
| A_sb    | system | number of such runs |
| eth rd / wr | system | Ethernet read / write cycles |
| A_k     | system | cycles in which exactly k processors present a read, for k = 2..N_CPU |

Utilisation is `A_t / T_fet`. A slave's fetch probability is `A_r / T_fet`.
The sum of A_r over all processors equals A_t when nothing else reads the
SRAM; the testbenches check this.

`cmd_start` clears all counters and counts from the next cycle. `cmd_stop`
freezes them. The register read port (`reg_addr`, `reg_rdata`) is
combinational:

- CPU i, counter j: index `8*i + j`, with j in the order T_w, A_r, L, S, A_b;
- system counter s: index `64 + s` (T_fet, A_t, A_sp, A_sb, eth rd, eth wr);
- A_k: index `72 + k`.

So up to eight processors fit.

### Controlling the monitor over HIBI

In the system, the master starts the monitor just before the slaves begin a
frame. It stops the monitor afterwards and collects the counters. The master
does this through `monitor_hibi_if`, which is a HIBI agent at `0x2000`. Each
data word sent to it is a command, encoded in bits [31:30]:

| Bits 31:30 | Command | Effect |
|------------|---------|--------|
| `01` | start | clear and run |
| `10` | stop  | freeze the counters |
| `11` | dump  | send all counters to the HIBI address in bits [29:0] |
| `00` | none  | ignored |

A dump is one HIBI transfer: the return address, then `NREG = 5*N_CPU + 6 + (N_CPU-1)`
words (29 with four processors). The words come in this order:

1. for each CPU: T_w, A_r, L, S, A_b;
2. T_fet, A_t, A_sp, A_sb, eth rd, eth wr;
3. A_2 .. A_N.

The master arms an N2H2 RX channel for that address and amount. The counters
then land in its data RAM without any processor copying. Commands that
arrive during a dump wait in the HIBI wrapper.

## HIBI bus and wrappers

HIBI words are `hibi_word_t = {av, data[31:0]}`:

- `av = 1` marks an address word. It opens a transfer to whichever agent owns
  that address.
- The data words that follow belong to that transfer.

**`hibi_bus`** is a single bus segment.

- Agents raise `req`. When the bus is free, the next requester after the
  previous owner (round-robin) gets `grant` from the following cycle.
- The owner keeps the bus while it holds `req`. There is one idle cycle
  between owners.
- The owner's word is broadcast to every agent. It moves when `bus_valid` is
  high and no addressed receiver raises `rx_full`.

**`hibi_wrapper`** connects an agent to the bus.

- Transmit: a TX FIFO with 8 entries. The wrapper sends at most `MAX_LEN`
  (16) data words per grant, then releases the bus, so no agent can starve the
  others.
- When it is granted again in the middle of a transfer, it first re-sends the
  transfer's address word. The receiver then still knows where the data
  belong.
- Receive: the wrapper matches address words against its own range
  `[ADDR_BASE, ADDR_BASE+ADDR_SPAN)`. It keeps the address word and the
  following data words in an RX FIFO with 8 entries, and raises `rx_full` on
  the bus when that FIFO is full.

HIBI address map in `mpsoc_top`:

| Agent                         | Range |
|-------------------------------|-------|
| tile k (0 = master)           | `0x100*(k+1)` .. `+0xFF` |
| picture memory (`pm_*` ports) | `0x1000 - 0x1FFF` |
| monitor                       | `0x2000 - 0x20FF` |

## N2H2 DMA

The CPU programs the DMA through word registers. The byte offset of a
register is `4 * index` inside the N2H2 window.

| Index | Register | Write | Read |
|-------|----------|-------|------|
| 0 | TX_MEM   | source word address in data RAM | value |
| 1 | TX_LEN   | words to send | value |
| 2 | TX_HADDR | HIBI destination address | value |
| 3 | TX_CTRL  | 1 = start (ignored while busy or LEN = 0) | busy |
| 4 | RX_IRQ   | 1 bits clear done flags | done flag per channel |
| 8+4c+0 | RX_MEM(c)   | destination word address | value |
| 8+4c+1 | RX_AMT(c)   | words to wait for | value |
| 8+4c+2 | RX_HADDR(c) | HIBI address the channel listens to | value |
| 8+4c+3 | RX_CTRL(c)  | 1 = arm (clears the word count) | words received |

**TX.** A transmit sends one address word, then LEN words read from the data
RAM. This takes one word every two cycles, because of the RAM read latency.

**RX.** An incoming address word selects the lowest-numbered armed channel
with the same HIBI address. The data words that follow are stored at
consecutive words from RX_MEM. When the channel has RX_AMT words:

- it sets its RX_IRQ bit;
- it disarms itself;
- `irq` (the OR of the RX_IRQ bits) goes high.

**Stalls.** A word that arrives for an address with no armed channel stays in
the wrapper's RX FIFO, and so does a word that arrives after the channel is
full. It waits until a channel is armed for it, and back-pressures the bus
meanwhile (`dma_rx_stall`).

**RAM priority.** When RX and TX both need data-RAM port B, RX goes first.

## Parameters

| Module | Parameter | Default | Notes |
|--------|-----------|---------|-------|
| `mpsoc_top` | `N_SLAVES` | 3 | 1..7. The monitor map holds 8 processors. |
| | `ICACHE_BYTES` | 8192 | per tile |
| | `DRAM_BYTES` | 65536 | per tile |
| | `RX_CH` | 8 | N2H2 receive channels |
| | `HIBI_MAX_LEN` | 16 | data words per grant |
| `icache` | `LINE_WORDS` | 8 | |
| `hibi_wrapper` | `TX_DEPTH`, `RX_DEPTH` | 8, 8 | |
| `hw_monitor` | `CNT_W` | 32 | |
| `mpsoc_pkg` | `SRAM_BYTES` | 1 MB | 18-bit word address |

All defaults are those of the measured system, except `HIBI_MAX_LEN` and the
FIFO depths. The source gives no value for those, so they are this design's
choice.

## What is outside the RTL

- **CPU cores.** The cores are a 32-bit Nios master with 16-bit instructions
  and three Nios II/f slaves. They are vendor IP. Each core connects to a
  tile's `i_*` and `d_*` ports and its `irq`.
- **Per-tile peripherals.** The boot ROM (2 KB), the vector table (256 B),
  the UART and the timer of each tile are named in the source but not
  described, so they are left out. The instruction master reaches only the
  cache. So the boot code and the vectors must also live in the SRAM.
- **Picture-memory controller.** The SDRAM controller and the 16 MB SDRAM are
  not included. Their HIBI wrapper is in the top, with its agent side brought
  out on the `pm_*` ports.
- **Board devices.** The external SRAM and the Ethernet device are not
  included. The Ethernet only shows up as two observed strobes.
- **Host path.** Sending the counters to the host is software on the master.

## Where this design departs from, or adds to, the original system

- **Bridge arbitration.** The original Avalon fabric arbitrates by master
  priority. Here it is round-robin, which gives the bounded latency the
  measurements show. Fixed priority would let the lowest port wait without
  limit.
- **SRAM timing.** The SRAM is zero-wait and the cache has no prefetching.
  The real cores prefetch, so a miss does not always stall them. This design
  always stalls the fetch. That is the pessimistic case the original analysis
  also assumes.
- **Defined counters.** The exact definitions of L, S, blocks and runs above
  are this design's reading of the counter names.
- **Own interfaces.** All register maps and address maps, the HIBI word
  format, the monitor command encoding, the dump order, and the re-sent
  address on split HIBI transfers are this design's own.
- **Tile SRAM arbitration.** The data master wins over the cache inside a
  tile. The source does not say.
- **Branch prediction.** The slaves' branch prediction is part of the cores
  and is not modelled.

## Simulation

Everything is plain SystemVerilog. To build and run any testbench with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mpsoc_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top
./obj_dir/Vtb_mpsoc_top
```

Every testbench ends with the line `TB_RESULT checks=N failures=M` and has a
watchdog that counts a failure if the test hangs.

**Block testbenches.** These are `tb_hw_monitor`, `tb_avalon_ext_bridge`,
`tb_icache`, `tb_sram_port_arb`, `tb_onchip_ram`, `tb_hibi_bus`,
`tb_hibi_wrapper`, `tb_n2h2`, `tb_cpu_node` and `tb_monitor_hibi_if`. Each
compares against its own reference model, mostly with random traffic.

**`tb_mpsoc_top`** runs the whole system at its default size, with models of
the four CPU cores, the SRAM and the picture memory. It runs one round:

1. The master starts the monitor over HIBI.
2. The slaves receive picture slices by DMA. One slave arms its channel late,
   so the DMA stalls.
3. The slaves send 40-word results to the master. These exceed the 16-word
   limit, so the transfers are split.
4. The master stops the monitor and has it dump its counters into its data
   RAM.

Every fetch is checked against the SRAM contents. The counters are checked
against counts taken independently at the tile ports. The test counts each
mechanism and fails if one never occurred:

- cache hit and miss;
- SRAM wait;
- 2-, 3- and 4-way simultaneous reads;
- DMA send and receive;
- split HIBI transfer;
- DMA stall.

**`tb_shared_imem_scaling`** (with helper `scaling_run`) runs the same
synthetic load for 400 000 cycles with one, two and three slaves, side by
side. The load is a chain of loops spread over 140 KB of code. It is tuned so
a slave reads the SRAM in about 5 % of its cycles, as the real encoder does.
The results:

| Slaves | Slave A_r/T_fet | Utilisation A_t/T_fet | Worst slave T_w | Max L |
|--------|-----------------|-----------------------|-----------------|-------|
| 1 | 5.3 % | –      | 198  | 2 |
| 2 | –     | 10.6 % | 1548 | 3 |
| 3 | 5.2 % | 15.9 % | 2661 | 4 |

With three slaves, the measured hardware showed 5.5 % and 16.6 %, and a
maximum latency of 4. The worst-case wait grows faster than linearly with the
number of slaves, as in the original measurements.

The load is synthetic. Wait counts depend on how the fetches of different
processors line up, so they are less faithful than the rates. For the same
reason, the 2/3/4-way collision counts are not comparable with the original
figures.
