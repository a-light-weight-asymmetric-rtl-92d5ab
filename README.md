# Two-core frame scheduling for a raster-scanning LiDAR on an FPGA SoC

A raster-scanning time-of-flight LiDAR builds every output frame in two phases.
In the **FoV work** the programmable logic (PL) fires the laser once per scan
position, collects the time-to-digital converter (TDC) results and stacks them
in DRAM. In the **Blind work** the processor system (PS) turns the stacked data
into range and intensity, packs it into Ethernet packets, sends it, and runs
feedback control of the peripherals. Both phases must fit into one frame
period:

    T_frame  >  T_FoV + T_Blind

At 10 frames per second, a frame of 74,400 points gives 0.1 s per frame. The
FoV work of 4,650 scans × 14.181 µs takes 0.065 s. The four Blind-work
processes take 0.012 s (DRAM control), 0.015 s (encoding), 0.003 s
(packetizing) and 0.026 s (I/O control). Run one after another on a single core,
they take 0.056 s, so the frame takes 0.121 s and frames are lost.

The scheme implemented here splits the Blind work over the SoC's two cores
(asymmetric multi-processing, AMP):

- **Core #1** runs DRAM control and encoding.
- **Core #2** runs packetizing and I/O control.
- The I/O control of one frame overlaps the idle time and the start of the next
  frame.

The PL, the two cores and the frame timing never talk directly. They
coordinate through one **state flag** and a few counters in a shared on-chip
memory. A state machine in the PL follows that flag. Frame timing therefore
stays in hardware, however the software is scheduled.

This repository holds the synthesizable logic of that scheme:

- the frame clock and state machine
- laser firing
- capture of the serial TDC data
- block building, block RAM and the DMA copy to DRAM
- the shared memory with its arbiter and atomic test-and-set
- the writer that puts the interrupt counter and the NEXT_FRAME flag into the
  shared memory
- an AHB-to-SPI bridge

It also holds logic models of the two boards of the hardware-in-the-loop test
rig: the ADC/TDC board and the scanner board. The software on the two ARM cores
is not hardware. The testbenches stand it in with a behavioural model, and that
model also plays the DRAM.

## The state machine and the state flag

| State | Left when | Action |
|---|---|---|
| Init | a PS core writes the INIT_DONE flag | INIT_DONE |
| Idle | the frame clock ticks (stays otherwise) | NEXT_FRAME (otherwise WAIT_FRAME) |
| FoV work | a core writes the FOV_DONE flag | FOV_DONE |
| Blind work | a core writes the BLIND_DONE flag | BLIND_DONE |

The frame clock is a free-running counter of `FRAME_CYCLES` clocks: 10,000,000,
which is 0.1 s at 100 MHz. In Idle, its tick starts a frame (`next_frame`, one
clock). A tick that finds the machine still in FoV or Blind work is a lost
frame and is counted in `frame_drops`. The machine then waits for the next
tick, so a late frame costs a whole frame period.

The state flag is one 32-bit word of the shared memory. Its low byte holds an
ASCII letter, so a memory dump reads like the schedule:

| Code | Letter | Written by | Meaning |
|---|---|---|---|
| 8'h52 | R | PS core #1 | INIT_DONE (this design's own letter) |
| 8'h4E | N | PL | NEXT_FRAME: FoV work of a new frame has started |
| 8'h46 | F | PS core #1 | FOV_DONE: all scans of the frame are in DRAM |
| 8'h49 | I | PS core #1 | hand-over: core #1 is done, core #2 takes the frame |
| 8'h42 | B | core #2 (AMP) or core #1 (one core) | BLIND_DONE |

One frame in the two-core case runs like this:

1. The frame clock ticks in Idle. The PL raises NEXT_FRAME, resets its
   interrupt counter in shared memory to 0, and writes 'N'.
2. For every scan, the DMA interrupt fires once the scan's block is in DRAM. The
   PL increments the counter word.
3. Core #1 polls the counter under the mutex. When the counter equals the
   number of scans, core #1 writes 'F', and the machine enters Blind work.
4. Core #1 runs DRAM control and encoding, then writes 'I'.
5. Core #2 polls the flag. On 'I' it packetizes, then writes 'B', and the
   machine returns to Idle.
6. Core #2 then runs I/O control, overlapping the idle time and the next FoV
   work.

The state machine does not check who writes a flag. Running the whole Blind
work on one core, as in the baseline, needs no hardware change.

The hardware learns of flag writes by watching the shared memory's write port.
Every granted write to word 0 is shown to the state machine for one clock
(`flag_wr_valid`, `flag_wr_data`). No core has to signal the PL separately.

## Shared on-chip memory

`shared_ocm` has 65,536 words of 32 bits (256 KB). It is a single-ported array
behind a round-robin arbiter with three request ports:

| Port | Owner |
|---|---|
| 0 | PL (`pl_sync_writer`) |
| 1 | PS core #1 |
| 2 | PS core #2 |

Request, held until `gnt`:

    {req, we, tas, addr[15:0], wdata[31:0]}

Response:

    {gnt, rvalid, rdata[31:0]}

- One access is granted per clock.
- Read data arrives with `rvalid` on the clock after the grant.
- `tas` (test-and-set) returns the old word and writes `wdata` in the same
  access. That is how a core takes the mutex: it test-and-sets the mutex word
  with 1 until the old value was 0, and writes 0 to release it.

| Word | Use |
|---|---|
| 0 | state flag |
| 1 | DMA interrupt counter of the current frame (written by the PL) |
| 2 | mutex |

The PL writes the counter before the flag, and the counter is always written
with its current value. A core that sees 'N' therefore never reads a stale count
from the previous frame.

## One scan through the PL

The scan window is `SCAN_CYCLES` = 1418 clocks, which is 14.181 µs at 100 MHz.
In the default build, one scan runs as follows (clock numbers from the scan
start):

| Clock | Event |
|---|---|
| 0 | `scan_start`. The laser trigger `ld_trigger` is high for `LD_PULSE` = 4 clocks. The scanner position (GPIO, passed through a two-stage synchroniser) is sampled for the block header. |
| ~200 | After `STOP_DELAY` = 200 clocks (end of the acquisition window), STOP rises at the next falling edge of LCLK. It stays high for 4 LCLK periods. STOP only ever changes at falling LCLK edges, so the ADC board, clocked by LCLK, sees it cleanly at its rising edges. |
| ~204 | The ADC board sees STOP at the next rising LCLK edge and starts sending. Each of the four TDC groups sends its 4 channels as 4 × 32 bits on its own serial line (SDO), one bit per LCLK period: 128 LCLK periods, 256 clocks. |
| every 64 clocks | Each SDO receiver runs the same STOP edge detector on the same LCLK edges and samples each bit one LCLK period after launch. It delivers one word per group. |
| on each delivery | The block builder writes the four words to block RAM on the next four clocks. Each word goes to slot 1 + its channel index. |
| ~465 | After the 16th word, the header is written to slot 0. The block goes to the DMA interface (`block_valid`), and the next scan fills the other RAM bank. |
| ~517 | The DMA copies the 17 words to DRAM in 3 clocks per word plus 1, if DRAM does not stall: a read of one clock, data, then write. It then pulses `dma_irq`. |

About 520 of the 1418 clocks are used. The rest is slack that absorbs DRAM
stalls. A block that is complete while the DMA is still busy with the previous
one is dropped and counted in `overruns`.

### Serial TDC word

    bit 31 ........ 20 19 ..................... 0
        channel index      pulse position

The word is sent MSB first. Group *g* carries channels 4*g* … 4*g*+3, in that
order. LCLK is the PL clock divided by 2, and the board is clocked by it. The
TDC reference clock (`refclk`) is the PL clock divided by 10.

### Blocks in DRAM

Scan *s* of a frame is written to 17 consecutive words at
`DRAM_BASE + 68·s`, where `DRAM_BASE` = 0x1000_0000:

| Word | Content |
|---|---|
| 0 | `{scan index[15:0], scanner position[15:0]}` |
| 1 + *c* | TDC word of channel *c* (c = 0 … 15), as received |

A frame is 4,650 × 68 B = 316,200 B. The block address restarts at every
NEXT_FRAME, so each frame overwrites the previous one. Core #1 must have read
a frame before the next FoV work overtakes it. This is the case in the
schedule above, because the next frame only starts after 'B'.

The block builder counts three kinds of error:

- a channel index of 16 or above (`index_errors`)
- a scan that starts before the previous one is complete (`incomplete_scans`)
- DMA overruns (`overruns`)

## SPI bridge and the scanner board

The PS reaches both boards' SPI ports through an AHB-Lite slave
(`ahb_spi_bridge`):

| Address | Register |
|---|---|
| 0x00 | CTRL: bit 0 starts a transfer; bits 9:8 give the chip select (0 = scanner board, 1 = ADC board) |
| 0x04 | TXDATA: 16 bits |
| 0x08 | RXDATA: 16 bits |
| 0x0C | STATUS: bit 0 busy, bit 1 done |

Transfers are SPI mode 0, 16 bits, MSB first, with SCLK = clk/10. The bridge
never inserts wait states and never returns an error.

The scanner board model (`scanner_emulator`) works like this:

- It takes a 16-bit target position per SPI word.
- While the word shifts in, it returns the current position on MISO.
- It moves its position one step towards the target every `STEP_CYCLES` = 100
  clocks.
- It drives the position on a 16-bit GPIO bus, which the PL puts into every
  block header.

The ADC board model (`tdc_emulator`) makes this pattern:

    position = 0x01000 + 3·scan + 257·channel   (mod 2^20)

Here *scan* counts STOP events since reset. Any block in DRAM can therefore be
checked exactly.

## Files

| File | What it is |
|---|---|
| `rtl/lidar_pkg.sv` | states, flag codes, TDC word struct, shared-memory map and port structs |
| `rtl/lidar_amp_top.sv` | the whole design (PL, shared memory, SPI bridge, both board models) |
| `rtl/lidar_state_machine.sv` | frame clock, state machine, frame and drop counters |
| `rtl/refclk_gen.sv` | LCLK and REFCLK dividers with edge enables |
| `rtl/laser_firing.sv` | scan sequencer: laser trigger and STOP |
| `rtl/tdc_sdo_receiver.sv` | deserialiser for one TDC group |
| `rtl/dsp_block_packer.sv` | builds one block per scan in block RAM |
| `rtl/bram_dp.sv` | block RAM, one write port and one read port |
| `rtl/dma_interface.sv` | block RAM → DRAM copy engine and DMA interrupt |
| `rtl/pl_sync_writer.sv` | writes 'N' and the interrupt counter into shared memory |
| `rtl/shared_ocm.sv` | shared memory, arbiter, test-and-set, flag snoop |
| `rtl/ahb_spi_bridge.sv` | AHB-Lite slave with SPI master |
| `rtl/tdc_emulator.sv` | ADC/TDC board model (synthesizable) |
| `rtl/scanner_emulator.sv` | scanner board model (synthesizable) |
| `tb/ps_dram_model.sv` | behavioural model of the two PS cores and the DRAM, used by the top-level tests |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the top-level tests |

`lidar_amp_top` includes the two board models, so the closed loop can be
simulated and synthesized as one unit. In a real system, the following nets
leave the chip instead:

- `stop`
- `sdo`
- LCLK
- the SPI lines
- the scanner GPIO

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `FRAME_CYCLES` | 10,000,000 | frame period in clocks (10 frames/s at 100 MHz) |
| `NUM_SCANS` | 4650 | scans per frame (× 16 channels = 74,400 points) |
| `SCAN_CYCLES` | 1418 | scan window in clocks (14.181 µs) |
| `STOP_DELAY` | 200 | clocks from scan start to STOP |
| `OCM_WORDS` | 65536 | shared memory size in words (256 KB) |
| `SPI_HALF` | 5 | SCLK half period in clocks |
| `STEP_CYCLES` | 100 | scanner model slew: clocks per position step |

The scan index is 16 bits wide, so `NUM_SCANS` can grow to 65,535. That is far
beyond the 180,000-point frames (11,250 scans) that such a system might be
asked to handle. Above about 7,050 scans, however, the FoV work alone is
longer than a 0.1 s frame.

## What comes from the source design and what is this design's own

The following come from the source design:

- the four states and their actions
- the flag letters N, F, I, B and their meaning
- FOV_DONE issued when the interrupt counter reaches the number of scans
- one DMA interrupt per scan
- the split of the four Blind-work processes over two cores
- the shared on-chip memory holding flags, counter and a mutex
- the 32-bit serial word, with the channel index in the upper 12 bits and the
  position in the lower 20
- 16 channels in 4 groups of 4
- 4,650 scans of 14.181 µs at 10 frames/s
- a 256 KB shared memory
- the PL providing LCLK and the TDC reference clock to the ADC board
- STOP ending each acquisition window
- the scanner position feeding the block-building stage
- the process times used in the tests

The following are this design's own choices:

- **The 100 MHz PL clock.** The source gives no PL clock. Every time constant
  above follows from it.
- **The clock dividers.** LCLK = clk/2 and REFCLK = clk/10.
- **STOP timing.** STOP starts 200 clocks after scan start and lasts 4 LCLK
  periods.
- **Bit order and edges on SDO.** Fields are sent MSB first, index first.
  Launch is on rising LCLK, and the receiver samples one period later.
- **The laser trigger.** It is a plain 4-clock pulse on a GPIO line, as the
  system's block diagram shows. The source also speaks of a fast serial link to
  the laser driver, but gives no format.
- **Four words per STOP.** Each TDC group sends all four of its channels after
  every STOP, so 16 channels arrive per scan. The source's example waveform
  shows a single word per STOP; set `WORDS` = 1 in the receiver and
  `CH_PER_GROUP` = 1 in the board model to get that pattern.
- **The block format.** One header word plus 16 words, in channel order. Two
  RAM banks, and the three error counters.
- **The DMA.** It is a simple copy engine with a valid/ready DRAM write port,
  not the SoC vendor's AXI DMA. It writes to a fixed `DRAM_BASE` with the
  address restarting each frame.
- **The shared memory internals.** The memory map, the INIT_DONE code 'R', the
  atomic test-and-set, and the snooping of flag writes by the state machine.
- **Who increments the interrupt counter.** In this design the PL does.
- **One interrupt per scan.** The source speaks both of one DMA interrupt per
  scan point and of the counter reaching the number of points. Each scan here
  captures 16 points at once, so there is one interrupt per scan, and FOV_DONE
  comes at 4,650 interrupts.
- **Frame-drop accounting.** A tick is lost when the machine is busy.
- **The SPI bridge.** Its register map, 16-bit SPI words and mode 0.
- **The board models.** The scanner slew model, and the ADC board's distance
  pattern.
- **The order at the end of the Blind work.** Core #2 writes BLIND_DONE after
  packetizing and before I/O control. This is how the test PS model behaves,
  and it gives a Blind work of DRAM control + encoding + packetizing = 0.030 s,
  close to the 0.031 s measured for the two-core case. The hardware accepts
  BLIND_DONE from either core at any time.

The following are not covered by this design:

- the ARM cores and their software (encoding into 3-byte points, packetizing
  into 1344-byte Ethernet fragments, I/O control)
- the DRAM itself and the AXI interconnects
- Ethernet and UART
- the laser, photodetector and scanner hardware
- the logic analyser used to observe the SDO lines

The top brings out the ports where these connect.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/lidar_pkg.sv tb/tb_lidar_amp_top.sv --top-module tb_lidar_amp_top
    ./obj_dir/Vtb_lidar_amp_top

Replace `tb_lidar_amp_top` with any testbench name. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself. A watchdog ends a
testbench that hangs, and counts that as a failure. All state that is read is
reset, so the result does not depend on the simulator's initial values.

| Testbench | What it checks |
|---|---|
| `tb_lidar_state_machine` | transitions on each flag, frame tick spacing, WAIT_FRAME, drop counting, flags ignored in the wrong state |
| `tb_refclk_gen` | LCLK/REFCLK periods and the edge enables |
| `tb_laser_firing` | scan count and spacing, trigger width, STOP delay, length and alignment to LCLK |
| `tb_tdc_sdo_receiver` | random words through a serial model, STOP edge detection, burst length |
| `tb_tdc_emulator` | every bit of every word against the pattern formula |
| `tb_dsp_block_packer` | block contents and header for random arrival orders, bank switching, each error counter |
| `tb_bram_dp` | random reads and writes against a reference array, read-before-write |
| `tb_dma_interface` | addresses and data against a reference, random DRAM stalls, copy latency of 3 clocks per word + 1, address restart |
| `tb_pl_sync_writer` | write order (counter before flag), counter values, arbitration stalls |
| `tb_shared_ocm` | three random agents against a reference memory, fairness, mutual exclusion through test-and-set, flag snoop |
| `tb_ahb_spi_bridge` | register access and SPI transfers against an SPI slave model |
| `tb_scanner_emulator` | target capture, slewing, MISO readback, rejection of short transfers |
| `tb_lidar_amp_top` | the whole system at reduced size (12 scans, 30,000-clock frames) in two copies side by side: two-core and one-core scheduling. Every DRAM block is checked against the ADC pattern and scanner position, and every mechanism is counted (INIT_DONE, NEXT_FRAME, WAIT_FRAME, FOV_DONE, I, BLIND_DONE, DMA interrupts, DRAM stalls, mutex contention, SPI commands, frame drops); one that never happened is a failure |
| `tb_lidar_amp_top_full` | the top at its default parameters, with the PS processes taking their real times (1.2, 1.5, 0.3 and 2.6 million clocks), over three frame periods, in both schedules |
| `tb_lidar_amp_sweep` | three copies of the top at 63, 2,250 and 11,250 scans per frame (about 1k, 36k and 180k points) with the PS process times scaled with the number of points: data, interrupt count and FoV length at each size; the two smaller frames fit the 0.1 s period and the largest drops frames |

Results of the full-size test, in clocks of the 100 MHz PL clock:

| Schedule | FoV work | Blind work | Sum | Frames |
|---|---|---|---|---|
| two cores | 6,592,819 | 3,000,074 | 9,592,893 (0.096 s) | none lost |
| one core | 6,592,834 | 5,600,172 | 12,193,006 (0.122 s) | every other frame lost |

These are close to the 0.065 s, 0.031 s and 0.056 s measured on the real
system. In the one-core case, each frame overruns its period, so the following
tick is lost. The full-size test takes about 40 s of simulation on a current
PC.

The sweep shows how the frame time grows with the number of points, with the
two-core schedule:

| Scans (points) | FoV work | Blind work | Sum | Frames |
|---|---|---|---|---|
| 63 (1,008) | 88,483 | 40,631 | 129,114 (0.0013 s) | none lost |
| 2,250 (36,000) | 3,189,640 | 1,449,059 | 4,638,699 (0.046 s) | none lost |
| 11,250 (180,000) | 15,951,662 | 7,245,042 | 23,196,704 (0.232 s) | ticks lost |

The FoV work is `NUM_SCANS` × 1418 clocks at every size. Above about 7,050
scans, the FoV work alone no longer fits a 0.1 s frame. The sweep takes about
a minute.

## Trust and limits

- Every module has a testbench that compares it against an independent
  reference model.
- Each testbench was shown to catch a deliberately broken copy of its module.
- All modules pass Verilator's lint without circuit warnings; the remaining style
  warnings are explained at the top of the file concerned. Yosys synthesizes
  them without latches.
- The design has only been simulated, not run on an FPGA.
- The time constants rest on the assumed 100 MHz clock. At another clock,
  change `FRAME_CYCLES` and `SCAN_CYCLES`. The dividers in `lidar_amp_top` set
  LCLK and REFCLK.
- One scan uses about 520 of its 1418 clocks. A slower LCLK, or a longer
  `STOP_DELAY`, eats into the slack.
