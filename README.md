# MightyPix2 digital readout in SystemVerilog

MightyPix2 is a high-voltage monolithic pixel sensor (HV-MAPS) for the LHCb
Mighty-Tracker. It has 122 columns × 388 rows (each column is two 194-pixel
sub-columns), and it must read out more than 32 MHz/cm² of hits with a
12.8 µs timestamp range. This repository implements the chip's digital part:

- a behavioural model of the hit buffers and End-of-Column (EoC) logic;
- the four column-drain readout state machines with **hit preloading**;
- the readout control unit: FIFOs, round-robin multiplexer, gearbox,
  scrambler and a three-stage serializer feeding up to four links of
  1.28 Gbps;
- clock generation, the timestamp counters, the TFC fast-command receiver,
  the ECS and I2C slow-control interfaces, and a triplicated register file.

The analog front end, PLL, pads, bias DACs and the configuration shift
register are not included (see "What is not here").

## Data path at a glance

```
comp_in[122][388]
  -> 4 matrix segments (31/31/30/30 columns)   hit buffers + EoC (behavioural)
  -> 4 readout FSMs @106.67 MHz                 32-bit word per hit
  -> 4 dual-clock FIFOs -> 80 MHz
  -> readout mux (round robin, 4:4 / 4:3 / 4:2 / 4:1)
  -> per link: FIFO -> gearbox 32->30 -> data/idle/sync/PRBS mux -> scrambler
     -> dual-clock FIFO -> serializer 1/2/4 bit @320 MHz -> 2 bit @640 MHz
     -> latch DDR stage -> tx (320 / 640 / 1280 Mbps)
```

The readout word is `{group[1:0], col[4:0], row[8:0], ToA[11:0], ToT[3:0]}`,
MSB first. `col` is the column within its group. ToA and ToT are Gray-coded
(see "Clocks and timestamps"). On the link, each 32-bit frame is a 2-bit header plus a
30-bit payload:

- header `01`: data;
- header `10`: control, whose payload is idle (`0F0F0F0F`), sync (`2AAAAAAA`)
  or PRBS-7.

The gearbox packs the 32-bit words back to back into the 30-bit payloads, so
a word can straddle two frames.

## Column-drain readout with preloading

This is the part of the design that is hardest to follow.

Each pixel's comparator output goes to a hit buffer.

- **Leading edge:** the buffer stores the 12-bit ToA.
- **Trailing edge:** it stores the 4-bit ToT timestamp.
- **Pile-up:** while the buffer holds an unread hit, further pulses on that
  pixel are lost.
- **Priority:** the buffers of a column share a bitline. The ready buffer
  with the lowest row number wins.

The EoC of each column has two latches:

- **DR1** loads from the bitline while `LdCol` is active.
- **DR2** takes DR1's contents on `LdPix`.

`Prio` tells the FSM that some EoC holds data. A priority token runs from
column 0 upwards, and on `RdCol` the first column with a full DR2 drives the
group bus.

The readout FSM (`mpx_readout_fsm`) follows the state diagram of the design:

```
IDLE -> PD1 -> PD2 -> LdCol1 (wait until clc == clcend) -> LdCol2
     -> LdPix1 (wait until Prio or clp == clpend) -> LdPix2
LdPix2: Prio && !fifo_full -> RdCol1 (crd = 0), else -> LdCol1
RdCol1 -> RdCol2 (holds while the FIFO is full, then writes the word)
RdCol2: Prio -> RdCol1 (crd + 1)
        else -> LdCol1 with clc = min(2*crd, clcend)
```

**Why the bitlines set the pace.** The bitlines are pulled up by DRAM cells
with high output impedance and need about 100 ns to charge. That is 11
cycles (`clcend` = 11) at 106.67 MHz.

**What preloading changes.** `LdCol` stays active during both RdCol states,
so while one word is being read, the next hit is already charging the
bitlines into the now-empty DR1s. `LdPix1` discharges the bitlines and moves
DR1 into DR2. The time already spent loading is credited: `clc` restarts at
twice the number of extra reads (the first read of a loop earns no
credit). After a read loop of seven or more words, the LdCol1 wait
disappears completely.

With this, a group that has a hit in every column spends 60 of 64 cycles
reading instead of 60 of 76. The FSM reads at 53.3 M words/s, against the
37.5 M words/s a 1.28 Gbps link carries.

**What is modelled, and how.** The matrix (`mpx_column`,
`mpx_matrix_segment`) is a **behavioural model**. The real circuit is
asynchronous latch and DRAM logic; here it is written as ordinary clocked
logic at the FSM clock. It keeps the rules that matter to the FSM:

- hits become visible only after an `LdPix`;
- DR1 loads only once the bitlines have had `T_CHARGE` cycles of `LdCol`
  since the last pull-down;
- DR2 is refilled only when it is empty;
- the pile-up loss described above.

The gate-level EoC (with its hit flag, delay latch and set/reset latches) is
not reproduced.

## Output links

`mpx_link` is one of the four serializer trees.

**80 MHz side.**

- **Gearbox.** Turns words into payloads. If part of a word has waited 16
  cycles with nothing behind it, the gearbox appends one all-ones filler word
  to push it out. Row 511 cannot occur, so receivers drop all-ones words.
- **Data multiplexer.** Chooses between data, idle, a one-shot sync frame
  (requested by the TFC) and PRBS-7.
- **Scrambler.** Multiplicative and self-synchronizing, x⁵⁸ + x³⁹ + 1,
  applied to the payload only. The receiver descrambles with the same
  polynomial after two frames.

**320 MHz side.** A 4-deep dual-clock FIFO brings frames into the 320 MHz
domain. There, a shift register emits 4, 2 or 1 bits per cycle. If no frame
is waiting, it sends an (unscrambled) idle frame.

**Final stages, by rate:**

| Rate | Path |
|---|---|
| 1.28 Gbps | 640 MHz stage (`mpx_ser_stage2`: 4 bits at 320 MHz → 2 bits at 640 MHz), then latch DDR mux (`mpx_ddr_stage`) clocked at 640 MHz |
| 640 Mbps | DDR mux clocked at 320 MHz |
| 320 Mbps | registered bit |

**Multiplexer modes.** The readout multiplexer maps group FIFO *s* to link
*s* mod *n*, where *n* is the number of enabled links. It has one round-robin
arbiter per link, giving modes 4:4, 4:3, 4:2 and 4:1.

## Clocks and timestamps

`mpx_clock_gen` divides the 640 MHz VCO clock:

| Clock | Divider | Use |
|---|---|---|
| 320 MHz | /2 | serializer |
| 106.67 MHz | /6, 50 % duty | readout FSMs |
| 80 MHz | /8 | link logic |
| 40 MHz | /16 | PLL feedback |

Each domain has its own triplicated reset synchronizer. The external 40 MHz
reference clock drives the ECS, the I2C and the register file directly, so
the chip can be configured before the PLL runs.

`mpx_bx_counter` counts ToA at 320 MHz (12 bits: 4096 × 3.125 ns = 12.8 µs)
and advances the 4-bit ToT timestamp every 128 counts (400 ns). Both are
distributed to the matrix in Gray code, because they are sampled by
asynchronous pixel logic. Decode them in the receiver.

## Slow and fast control

**TFC (`mpx_tfc`).** A 320 Mbps stream of 6b8b words. The 6-bit value *v* is
sent as the *v*-th byte with exactly four ones, so any single bit error gives
an invalid byte.

- **Alignment:** the receiver aligns on the idle word (value 0, `0x0F`) and
  drops the lock after four invalid words in a row.
- **Command bits:** bit 0 ToA reset, bit 1 sync frame, bit 2 calibration
  pulse, bit 3 front-end reset.
- **Redundancy:** the lock state and the command register are triplicated;
  the deserializer is not.

**ECS (`mpx_ecs`).** 10 Mbps, 8b10b coded, received with 4× oversampling at
40 MHz and aligned on K28.5.

- **Command frame:**
  `K28.1, {read, burst, chip_id[5:0]}, address, data… | count, K28.5`.
- **Answer:** every command for this chip is answered with
  `K28.1, header, address, [read data], K28.5`. This reply is the
  acknowledge.
- **Uplink:** the uplink is a daisy chain. Frames from the previous chip
  are decoded, queued and forwarded whole. An arbiter gives this chip's own
  replies priority.

**I2C (`mpx_i2c_slave`).** Device address `0x2A`. The first byte written
sets the register pointer; further bytes are written with auto-increment.
Reads return bytes from the pointer onward.

**Register file (`mpx_regfile`).** Every register is triplicated with voting
and scrubbing. If ECS and I2C write in the same cycle, ECS wins.

| Addr | Name | Default | Meaning |
|---|---|---|---|
| 0 | CTRL | 0x17 | [0] readout enable, [2:1] links−1, [4:3] rate (0: 320, 1: 640, 2: 1280 Mbps), [6:5] source (0 data, 1 sync, 2 PRBS) |
| 1 | CLCEND | 11 | LdCol1 wait |
| 2 | CLPEND | 2 | LdPix1 wait limit |
| 3 | TFC_EN | 1 | [0] pass calibration and front-end reset on |
| 4–7 | – | 0 | spare |
| 8 | STATUS | – | [0] TFC locked |

## Where this design departs from, or adds to, the source description

- **Preparation overhead: 4 cycles, not 2.** The description claims that,
  after a long read loop, preloading cuts the preparation overhead from 16
  cycles to 2. Its state diagram, however, still passes LdCol1, LdCol2,
  LdPix1 and LdPix2, which is 4 cycles. The RTL follows the state diagram.
- **Gearbox ratio 32:30.** The block diagram labels the gearbox "45:30".
  With 32-bit words, this design packs 32:30 and adds the filler word
  described above.
- **Choices of this design.** The following were not specified, and this
  design chose them:
  - the word field order and the Gray-coded timestamps;
  - the frame header values;
  - the idle and sync patterns;
  - PRBS-7;
  - the scrambler polynomial;
  - the 6b8b table and the TFC command bits;
  - the ECS frame layout;
  - the I2C address;
  - the register map;
  - `clpend` = 2;
  - the ToT timestamp period;
  - all FIFO depths (16, and 4 for the clock crossing).
- **Configuration crossing clock domains.** Configuration reaches the other
  clock domains without synchronizers. It is meant to be changed only while
  the affected logic is idle.
- **Matrix accuracy.** The matrix is behavioural: hit timing is resolved to
  the 106.67 MHz FSM clock for ToT sampling, and to the 320 MHz timestamp
  clock for ToA.

## What is not here

- the analog pixel (sensor, amplifier, shaper, comparator);
- the PLL;
- the LVDS and open-drain pads;
- the on-chip ADC;
- the shift-register configuration path for the column/TDAC trims and bias
  DACs.

Only the comparator outputs (`comp_in`), the VCO clock (`clk_vco`) and plain
digital pad signals appear as ports of `mpx_top`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/mpx_pkg.sv tb/tb_mpx_top.sv \
  -y rtl -y tb --top-module tb_mpx_top -Mdir obj_top -o sim && obj_top/sim
```

Replace `tb_mpx_top` with any other testbench name.

**`tb_mpx_top`** runs the whole chip at reduced size: 16 rows and groups of
8/8/7/7 columns. It does the following:

- configures the chip over I2C and ECS, including an ECS burst read;
- sends TFC ToA-reset, sync, calibration and front-end-reset commands;
- injects about 280 hits. Phase A runs 4 links at 1.28 Gbps; phase B
  switches over I2C to one link at 320 Mbps, which forces FIFO-full stalls;
- receives the serial lines bit by bit with `mpx_tb_serial_rx`, descrambling
  and unpacking the words;
- requires every hit exactly once, with its ToA within 6 counts of the
  leading edge.

It counts each mechanism and fails if any never happened:

- shortened and skipped LdCol waits;
- FIFO-full stalls;
- pile-up;
- both link modes;
- sync frames;
- each TFC command;
- ECS and I2C access.

**`tb_mpx_top_full`** is the same test on the full 122 × 388 matrix with
default parameters. It takes a few seconds.

**`tb_mpx_top_rate`** is the hit-rate test, on the full matrix:

- **Input:** Poisson hits at 35 MHz/cm² over 4.30 cm² (one hit every
  6.65 ns). Each hit is a 2 µs comparator pulse. The test runs for 20 µs
  with the default configuration.
- **Results:** about 3000 hits, 99.9 % read out. Mean time from leading
  edge to FIFO is 2.4 µs; the maximum is about 3.7 µs.
- **Limit:** the 12.8 µs ToA range is a hard limit for this test.
- **Bandwidth caveat:** at this rate the four links are exactly at their
  capacity. With 32-bit frames carrying 30 payload bits, they move
  150.0 M words/s against 150.4 M hits/s. Sustained operation at or above
  this rate therefore needs output compression or more links.

`tb_mpx_link` checks all three link rates at the bit level.

To change the matrix size, override `NROWS` and `NCOL0`…`NCOL3` of `mpx_top`.
The column and row fields are 5 and 9 bits wide, so up to 31 columns per
group and 511 rows fit without changing the word format.
