# 1 GSPS VME data acquisition module in SystemVerilog

This is the control logic of a VME data acquisition board. The board has four 250 MHz, 8-bit
ADC channels. Their sampling clocks can be staggered by a quarter period so the channels
together sample at 1 GSPS. Behind each channel is a deep record: 3 MBytes per channel, 12 MBytes
in all. The host reads the record through a 32-bit VMEbus slave. A local DSP can read it too,
and can program the acquisition in place of the host.

The difficult part is the memory. No affordable memory accepts 250 million bytes per second per
channel. The design therefore:

1. Packs six samples into a 48-bit word. This cuts the storage rate to 41.7 M words/s, which
   fits one access per 20 ns cycle of 15 ns static RAM clocked at 50 MHz.
2. Puts a dual-clock FIFO between the ADC clock and the 50 MHz memory clock.
3. Gives all four channels one shared memory address, so they move in lock step, one row per
   cycle.

All control runs at 50 MHz: triggers, counters, pointers, output ordering, registers and bus
interfaces.

## Block structure

```
 adc_data[k] --> sample_packer --> ac_fifo --+--> ac_mem (512K x 48) --+
 (adc_clk)       6 x 8 bit -> 48    4096x48  |                        |
                                             +-- (no memory: bypass) -+--> output_control
                                                                                   |
  clock_gen : ext clock, or 250 MHz osc / 1,2,4,8 -> adc_clk                   data_align
  trigger_logic + segment/delay/repeat/pretrig counters -> gate, BUSY, Trig Out      |
  addr_gen : shared wr/rd pointers, one memory op per cycle                     out_fifo (1024x32)
  error_detect : stop before data loss (NOMEMORY)                                    |
  dab_regs : 32-bit ports  <--------------------- local bus ------------------- DATA port
                                                      |
                              ccl (bus arbitration, interrupt routing)
                                 |                         |
                  DSP (external: HOLD/HOLDA, INT0-3)    vme_slave + vme_interrupter -- VMEbus
```

`vme_daq_top` contains:

- `dab`, the Data Acquisition Block, with the first fifteen blocks in the table below;
- `ccl`, the Common Control Logic;
- `vme_slave`;
- `vme_interrupter`.

The parts that are not logic stay outside the RTL and reach it through ports:

- the ADCs, with their buffer amplifiers;
- the oscillators;
- the TMS320C31 DSP and its memory.

| file | role |
|---|---|
| `dab_pkg.sv` | widths, register map, mode and command structs, memory-operation enum, interrupt numbers |
| `clock_gen.sv` | ADC clock: external clock, or the 250 MHz oscillator divided by 1, 2, 4 or 8 |
| `sample_packer.sv` | six samples (or five) per 48-bit word, gated by the acquisition gate |
| `ac_fifo.sv` | 4096 x 48 dual-clock FIFO with Gray-code pointers, level, almost-full and flush |
| `ac_mem.sv` | 512K x 48 single-port memory of one channel, one-cycle read |
| `addr_gen.sv` | circular write/read pointers; picks WRITE, READ, PASS or DISCARD each cycle |
| `error_detect.sv` | stops the acquisition and raises a sticky NOMEMORY before data could be lost |
| `trigger_logic.sv` | START/STOP sources, PRE-TRIGGER, SEGMENTED, REPEAT, clock-synchronised mode, BUSY, Trigger Out |
| `segment_counter.sv`, `delay_counter.sv`, `repeat_counter.sv` | 16-bit mode counters |
| `pretrig_counter.sv` | 40-bit START-to-Trigger-In timer at 50 MHz |
| `output_control.sv` | takes the rows read from memory or FIFOs into a two-entry buffer |
| `data_align.sv` | interleaves the channels' bytes into sample order, repacks 48-bit rows into 32-bit words |
| `out_fifo.sv` | 1024 x 32 output FIFO read through the DATA port |
| `dab_regs.sv` | the DAB's programming and status ports |
| `dab.sv` | wires the DAB together |
| `ccl.sv` | local-bus request/grant with the DSP, interrupt routing to the DSP and the host |
| `vme_slave.sv` | A32/D32 slave with block transfer, broadcast writes, address-only DSP interrupt |
| `vme_interrupter.sv` | ROAK interrupter on IRQ1-7 with IACK daisy chain |
| `vme_daq_top.sv` | the module |

## The data path, cycle by cycle

**Packing.** `sample_packer` runs on `adc_clk`. It re-times the gate through two flip-flops.
While the gate is open it shifts samples in; sample 0 goes to the least significant byte.
Every sixth sample it writes one word into the channel FIFO. In five-sample mode
(`ctrl.five_mode`), it writes every fifth sample and the top byte is zero. When the gate
closes, a partly filled word is written out padded with zeros. Clock-domain crossing happens
only in the FIFO.

**One row per cycle.** On the 50 MHz side, the FIFOs of all channels are read together. In
each cycle, `addr_gen` picks exactly one operation, because the static RAM allows one access
per cycle:

- `OP_WRITE`: the FIFOs hold more than `keep` words, storing is allowed, and memory is not full.
  One row goes from the FIFOs to memory at `wr_ptr`.
- `OP_PASS`: the same as OP_WRITE, but used when the board has no memory pool
  (`ctrl.bypass`). The row goes straight to the output.
- `OP_DISCARD`: a row is dropped. This happens to pre-trigger samples older than the
  programmed depth, and during a flush.
- `OP_READ`: the row at `rd_ptr` goes to the output. This needs all of:
  - the output stage has room;
  - memory is not empty;
  - either the FIFOs are not near full (`AFULL_MARGIN` words from full) or the acquisition
    has stopped.

Moving acquired data always wins. Reads fill the spare cycles. At 250 MSPS a FIFO delivers a
word every 24 ns, so about one cycle in six is free for reading during acquisition. After STOP,
every cycle is free.

**Pointers.**

- Memory is full when `wr_ptr + 1 == rd_ptr`, so one row is always left unused.
- Memory is empty when the two pointers are equal.
- Assertions in `addr_gen` check that no write happens when full and no read happens when empty.
- Both pointers are circular, so the record is a ring.
- The command `clear` resets the pointers.

**Error detection.** Data can be lost in two ways:

- a channel FIFO fills while the gate is open;
- the FIFOs are near full while the memory is full.

In either case, `error_detect` closes the gate through the STOP path and sets the sticky
`nomem` flag. This gives the NOMEMORY interrupt. The flag is cleared only by `clear`.

**Ordering.** `output_control` holds up to two rows, one word per channel. Its `room` output
counts reads that are still in flight in the memory pipeline, so a row is never lost.
`data_align` puts the bytes of a row in sample order for the number of channels in use, N
(1, 2 or 4). Sample j of channel k becomes byte `j*N + k` of the row. With the channel clocks
staggered, the output is then one continuous 1 GSPS byte stream. Rows of 6·N bytes feed a
32-byte shift buffer, which emits 32-bit words into `out_fifo`. The command `flush` emits a
last partial word, padded with zeros. The command `clear` empties the whole output path: the
two-row buffer, the aligner and the output FIFO. It also resets the memory pointers, the error
flag and the counters.

## Triggering and modes

`trigger_logic` is a small state machine:

- `IDLE`: waiting for a START.
- `ACQ`: the gate is open.
- `DRAIN`: the gate is closed. Samples still in the packer and the FIFO are stored.
- `RESET`: `RESET_CYCLES` cycles; the FIFOs are flushed and the counters set up again.
- `WAIT`: REPEAT mode; waiting for the delay counter.

Sources of START and STOP:

- The external START, STOP and Trigger In inputs are asynchronous. Each is re-timed by two
  flip-flops and acts on its rising edge.
- Software START, STOP and Trigger In are write strobes in the CMD port.
- **Trigger Out** is the gate itself, so other boards can follow this one.
- **BUSY** is high in every state except IDLE.

The modes are bits of `ctrl` and can be combined.

- **START/STOP**: the gate is open from START to STOP. There is no dead time until memory fills.
- **PRE-TRIGGER**:
  - START opens the gate, but the FIFOs keep only the last `pt_depth` words. Older ones are
    discarded (OP_DISCARD).
  - The 40-bit counter measures START to Trigger In.
  - After Trigger In, words beyond the depth go to memory.
  - At STOP, the remaining `pt_depth` words are stored in DRAIN, one per 20 ns. The dead time
    is therefore `pt_depth` × 20 ns plus a fixed overhead. At full size the overhead measures
    9 cycles (180 ns).
  - The deepest usable setting is `FIFO_WORDS - 2` = 4094 words, that is 24,564 bytes per
    channel. The FIFO's read side sees its level two words late, so a deeper setting would
    overflow the FIFO. `dab` therefore clamps larger values to this limit.
- **SEGMENTED**:
  - The 16-bit segment counter counts rows written after START.
  - At the programmed count it gives an automatic STOP, and storing stops at exactly that count.
  - The logic then resets for the next START.
  - The dead time from STOP to being ready again is under 10 cycles (200 ns). The testbench
    measures this.
- **REPEAT**:
  - At STOP, the 16-bit delay counter is loaded. It runs in parallel with DRAIN and RESET.
  - When it expires, the logic issues START itself, until the repeat counter reaches its end
    value.
  - Because the delay overlaps the reset, combined modes cost the longest dead time, not the sum.
- **Clock-synchronised**: the gate opens whenever the logic is idle, and every tick of the
  (external) ADC clock is a sample.

## Programming model

Local ports are 32-bit and addressed by word. From VME, port `p` is at byte offset `4*p` in the
board's window.

| word | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | r/w | [0] pretrig, [1] segmented, [2] repeat, [3] clksync, [4] bypass (no memory), [5] five-sample words, [7:6] ACs in use (0:1, 1:2, 2:4), [8] external clock, [10:9] oscillator divider (0:/1 1:/2 2:/4 3:/8) |
| 0x01 | CMD | w | strobes: [0] START, [1] STOP, [2] TRIGGER IN, [3] CLEAR, [4] FLUSH |
| 0x02 | SEGMENT | r/w | segment length in rows (0 = no automatic STOP) |
| 0x03 | DELAY | r/w | REPEAT delay in 50 MHz cycles |
| 0x04 | REPEAT | r/w | number of automatic re-starts |
| 0x05 | PTDEPTH | r/w | pre-trigger depth in words |
| 0x06 | STATUS | r | [0] busy, [1] nomem, [2] output FIFO empty, [3] output FIFO full, [4] memory empty, [5] memory full, [6] gate, [7] aligner holds bytes, [31:16] output FIFO count |
| 0x07/0x08 | PTTIME_L/H | r | 40-bit pre-trigger time |
| 0x09 | MEMCOUNT | r | rows held in memory |
| 0x0A | DATA | r | output FIFO; each read pops one word |
| 0x0B | CYCLES | r | completed REPEAT cycles |
| 0x20 | DSPSEL | r/w | source for DSP pin i in bits [3i+2:3i]: 0-5 a DAB source, 6 the host (VME2DSP), 7 none (reset value) |
| 0x21 | VMEMASK | r/w | sources that may interrupt the host |
| 0x22 | PENDING | r/w1c | latched host interrupt sources |
| 0x23 | VMEIRQ | r/w | [2:0] IRQ level (0 = off), [15:8] status/ID vector |
| 0x24 | DSP2VME | w | the DSP writes here to interrupt the host |
| 0x30 | VME2DSP | addr-only | a VME address-only cycle here interrupts the DSP |

The interrupt sources are:

| bit | source |
|---|---|
| 0 | START |
| 1 | STOP |
| 2 | TRIGIN |
| 3 | DATA (output FIFO not empty) |
| 4 | NODATA |
| 5 | NOMEMORY |
| 6 | from the DSP (host side only) |

## Bus sharing and interrupts

**Local bus.** The DSP owns the local bus by default.

1. A VME access raises `br`.
2. The CCL asserts the DSP's HOLD and waits for HOLDA.
3. The CCL grants the bus (`bg`) and the slave makes its access.
4. The grant is held until the host releases AS*, which ends the block transfer.

If the top's `dsp_present` input is low, the grant comes at once.

**DSP interrupts.**

- Each of the four DSP interrupt pins takes any source through a 3-bit select.
- The one-cycle events (START, STOP, TRIGIN and the host interrupt) are stretched to a 2-cycle
  low pulse, so that the DSP samples them.
- The level sources (DATA, NODATA, NOMEMORY) hold the pin low for as long as they last. An
  output-FIFO flag can therefore pace the DSP's DMA directly.

**Host interrupts.**

- Every source latches its PENDING bit.
- While a pending bit that is enabled in VMEMASK is set, and the IRQ level is not 0, the ROAK
  interrupter drives IRQ at that level.
- An interrupt-acknowledge cycle for that level with IACKIN* low receives the vector on D7-D0.
  This releases the request and clears the pending bits.
- Acknowledges for other levels pass down the daisy chain on IACKOUT*.

## VMEbus slave

Address decode:

- A31-A24 select a 16 MByte window, at either of two bases:
  - `board_base`, for reads and writes;
  - `BCAST_BASE` (0xFF), for writes only. Every board accepts a broadcast write, so one write
    can trigger several boards or load one DSP program into all of them. Only the board with
    `bcast_master` high drives DTACK*.
- Offsets inside the window:
  - `0x000000`-`0x3FFFFF`: the ports.
  - `0x400000`-`0x7FFFFF`: always the DATA port, so a block transfer across this range drains
    the output FIFO.
  - `0x800000` and up: the DSP's memory, through the `ext_*` request/acknowledge port.

Cycles:

- AM 0x09 and 0x0D are single cycles. AM 0x0B and 0x0F are block transfers.
- Only D32 is answered.
- Bus inputs are re-timed by two flip-flops.
- The first beat takes the bus handshake. Every later beat is answered within four clocks of
  its data strobe, 80 ns per 32-bit word, which is 50 MBytes/s for a master fast enough to
  keep up.
- An address-only cycle (AS* without data strobes) to port 0x30 interrupts the DSP without
  taking the local bus.

## Sizes and limits

All default parameters are the board's sizes:

| parameter | value |
|---|---|
| `N_AC` | 4 |
| `FIFO_WORDS` | 4096 × 48 bits (24 KBytes) |
| `MEM_WORDS` | 524288 × 48 bits (3 MBytes) per channel |
| segment, delay and repeat counters | 16 bits |
| pre-trigger counter | 40 bits |

The DAB therefore holds about 101 Mbit of memory arrays. A synthesis flow must map `ac_mem` to
external SRAM; on the board it is six 512K×8 chips per channel.

Sizes and behaviour chosen here:

- Output FIFO depth: 1024 words.
- `AFULL_MARGIN`: 64.
- `RESET_CYCLES`: 2.
- The register map, the VME address map, the broadcast base and the interrupt numbering.
- The first sample goes to the low byte.
- Partial words are padded with zeros.

Limitations:

- `clock_gen` divides with a ripple of toggle flip-flops and switches clocks through plain
  multiplexers. Changing the clock source while acquiring can glitch; set the clock only while
  idle. On the board this path is ECL logic outside the gate array.
- The quarter-period skew between channel clocks, needed for 1 GSPS, must be made outside:
  `adc_clk` is the single 250 MHz clock of all four channels.
- The DSP and its memory are not modelled. The `ext_*` port expects an acknowledge.
- `dab.sv` leaves two counter outputs unconnected: the running segment count and the
  delay-running flag. This causes two lint warnings about unused signals.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl -y tb \
    rtl/dab_pkg.sv tb/tb_dab.sv --top-module tb_dab -o sim && ./obj_dir/sim
```

Adding `+verilator+rand+reset+2` to the run starts every register from a random value rather than zero. The testbenches are meant to pass from any start values.

- `tb_vme_daq_top` runs the whole board at reduced sizes (FIFO 64, memory 256 rows, output
  FIFO 64). A model VME master is in `tb/vme_master.sv`. The testbench counts every mechanism
  and fails if any never happens:
  - every trigger source and mode;
  - the NOMEMORY stop, with the memory full;
  - bypass;
  - output-FIFO back-pressure;
  - broadcast;
  - block transfer;
  - address-only DSP interrupt;
  - ROAK acknowledge;
  - DSP bus hand-over.
- `tb_vme_daq_top_full` runs the top at its default sizes. It does a segmented acquisition of
  2000 rows on four channels and reads it back by VME block transfer. It then repeats this with
  a 300 MHz external clock. That is the fastest rate six-sample words allow: every 20 ns cycle
  is a memory write. It takes a few seconds.
- `tb_pretrig_deadtime` runs the top at its default sizes in PRE-TRIGGER mode, at depths of
  1000, 4000 and 4094 words. It measures the STOP-to-ready time, which is depth + 9 cycles,
  and it checks the 40-bit pre-trigger time.
- Unit testbenches compare against reference models written in the testbench. These include
  a ring-buffer model for `addr_gen` and a byte-order model for `data_align`. Where the board
  states a timing, the testbench also checks the number of cycles:
  - segmented dead time;
  - pre-trigger drain time;
  - block-transfer beat time.
