# ADC FPGA for a flash-ADC data-acquisition board

This is synthesizable SystemVerilog for the "ADC FPGA" of a flash-ADC board. The FPGA takes eight
ADC channels of 12-bit samples at 250 MHz. It does three things with every sample:

1. **Triggered readout.** It keeps the last 16 µs of each channel in a ring. When a trigger
   arrives, it cuts a programmable window out of the past and processes that window in one of
   three ways:
   - the raw samples;
   - the samples around each threshold crossing;
   - the sum of each such pulse.

   It then writes the result, with trigger number and time stamp, as 36-bit event words to an
   external FIFO. A VME controller reads them from there.
2. **Energy sum.** It adds four channels (the calorimeters) every clock and sends the 15-bit sum
   to the trigger FPGA.
3. **Hit bits.** Each channel gets an active-low bit that says whether its two-sample average is
   below the channel's threshold. These also go to the trigger FPGA.

Everything after the ADC input FIFOs runs on one 250 MHz clock. The host configures the FPGA
through a small register file on a 16-bit control bus.

```
 ADC n ──► resync FIFO ──► Sel ──┬──► data buffer ──► processing ──┐
 (ADC clock)  (clock crossing)   │   (ring, trigger FIFO,          │  x 8 channels
                                 │    secondary buffer)            │
                                 ├──► energy sum (ch 4-7) ──► SUM  │
                                 └──► hit bits ──► HIT_N[7:0]      ▼
 TRIG_N ─► sync/edge ─► trigger counter, time stamp ─────►  data format ──► 36-bit FIFO words
 control bus ◄──► vme_iface (registers, status)
```

## Life of a trigger

This is the core of the design and the part most worth reading closely. Each of the eight
channels (`adc_channel`) does the same thing in lock step.

### 1. Capture and the primary ring

`adc_resync` writes each ADC word (12 data bits and the overflow bit) on the ADC's own clock into
a 16-deep dual-clock FIFO with Gray-coded pointers. It reads the FIFO on the FPGA clock whenever
the FIFO is not empty. The FIFO only writes after `hard_reset_n` has been high for a few ADC
clocks.

`adc_sel` then does two things:
- It scales 10-bit boards to 12 bits: `{ovf, d[9:0], 00}`.
- It forces the channel to zero when the channel's disable bit in CONFIGURATION is set.

Each sample that comes out is written into a 4081-word primary ring (`data_buffer`). The write
pointer wraps from 4080 to 0, and the ring never stops.

### 2. The trigger record

`trig_n` is synchronised and its falling edge detected. The 27-bit trigger counter counts every
edge, and a 48-bit time stamp counts every clock. While Run is set, a detected trigger is offered
to all eight channels (`trig`).

It is taken only if every channel can accept it (`trig_go = &trig_ready`). That means each
channel's trigger FIFO must have room for a whole record, and no channel may still be writing the
previous one. This rule keeps the channels' block sequences identical, which the formatter relies
on. A trigger that is not taken sets RAW BUFFER OVERRUN.

An accepted trigger writes seven 16-bit words into the channel's 504-word trigger FIFO
(`trigger_buffer`):

| word | contents |
|---|---|
| 0 | `10010` & trigger number[26:16] |
| 1 | trigger number[15:0] |
| 2 | `10011000` & ts[47:40] |
| 3 | ts[39:24] |
| 4 | `00000000` & ts[23:16] |
| 5 | ts[15:0] |
| 6 | `0000` & start pointer (12 bits) |

The start pointer is `write pointer − PL`, taken modulo 4081. The window therefore begins PL
samples before the trigger and is PTW samples long. PL must be at least PTW so that the whole
window is already in the ring. The trigger number in the record counts this trigger, so the first
trigger is number 1.

### 3. The secondary buffer and the block counter

A copy state machine in `data_buffer` pops the trigger records one at a time. For each record it
writes one *block* into the 2200 × 16 secondary buffer:
- the six header words;
- then PTW samples read from the ring starting at the start pointer, each written as
  `000` & sample, except the last, written as `001` & sample.

Blocks are 6 + PTW words long and are stored back to back. The write address wraps to 0 after
the register PTW DAT BUF LAST ADR. The host sets the two buffer registers as follows:

```
PTW MAX BUF          = INT(2016 / (PTW + 8))
PTW DAT BUF LAST ADR = PTW MAX BUF * (PTW + 6) - 1
```

With these settings the blocks tile the buffer exactly. For a 2 µs window (PTW = 500), that is 3
blocks of 506 words.

An 8-bit counter, Number of PTW Data Blocks, counts complete blocks:
- It goes up when a copy finishes.
- It goes down on the processing stage's `dec_blk` pulse.
- If both happen in the same clock, they cancel.

A new copy does not start while the count is at PTW MAX BUF, so a block is never overwritten
before it has been processed. Reaching the limit sets PTW BUFFER OVERRUN. Triggers meanwhile
wait in the trigger FIFO, which holds 72 records.

One consequence is inherent in the ring: a record that waits longer than about 4081 − PL sample
periods gets its window overwritten by newer samples.

### 4. Processing

`process_algorithms` waits until a complete block exists and its own 2048 × 18 processing buffer
holds fewer than 3 unread blocks. Reaching that limit sets PROCESSING BUFFER OVERRUN.

Processing-buffer words are an 18-bit word: a 2-bit tag and 16 bits of data. The tag values are:

| tag | meaning |
|---|---|
| 00 | data |
| 10 | pulse header |
| 11 | end of block |
| 01 | reserved |

The block's six header words are copied first. Then comes the output of the mode in CONFIGURATION
bits 1-0.

**Mode 0 (raw window).** All PTW samples are copied as `000` & sample.

**Mode 1 (pulse samples).** The window is scanned for *crossings*. A crossing is a sample whose
12-bit value is above the channel's TET while the previous sample was not. For crossing number p
at index i, a pulse header `10 0000 p[1:0] i[9:0]` is written. It is followed by the samples from
`i + 1 − NSB` to `i + NSA`. NSB counts the crossing sample itself, and the range is clipped to the
window. Scanning resumes after the last copied sample. At most `min(npulse, 4)` pulses are taken
(CONFIGURATION bits 5-3).

**Mode 2 (pulse sums).** Windows are found the same way as in mode 1. Instead of the samples, the
sum of their 12-bit values is written: a 19-bit value that saturates. It takes two words, sum
bits 18-3 and then `0…0` & sum bits 2-0.

Every block ends with `11` & `FFFF`. The block's first and last addresses are pushed into a
small descriptor FIFO (HOST_BLOCK_CNT is its count), together with:
- the mode;
- an *event* flag, meaning some sample in the window was above TET.

`dec_blk` is pulsed combinationally in the clock in which the end word is written. This lets the
data buffer's block count and the "is there a block" test seen by processing agree in the next
clock.

Every secondary-buffer read takes two clocks: address, then registered data. A mode-0 block
therefore takes about 2 × (PTW + 6) clocks.

### 5. Event building

`data_format` starts when every channel has at least one processed block. It takes the channels
in order 0 to 7, reading each block through a shared address bus at one word per two clocks. It
writes these 36-bit words:

| word | value |
|---|---|
| Event header (first channel only) | `1_9000_0000` \| trigger number |
| Time stamp 1 | `0_9800_0000` \| ts[47:24] |
| Time stamp 2 | ts[23:0] |
| Mode 0, per channel with an event | `A000_0000` \| ch<<23 \| PTW, then sample pairs |
| Mode 1, per pulse | `B000_0000` \| ch<<23 \| p<<21 \| crossing index, then sample pairs |
| Mode 2, per pulse | Pulse time `C000_0000` \| ch<<23 \| p<<21 \| index, and pulse integral `B800_0000` \| ch<<23 \| p<<21 \| sum |
| Event trailer | `2_E800_0000` |

A sample pair has sample x in bits 28-16 and sample x+1 in bits 12-0, each with its overflow bit.
Bit 13 marks a missing second sample. That happens only for pulses. A raw window always reports
an even number of samples: with an odd PTW the last sample is dropped, and Window Raw Word 1
carries the even count.

Channels without an event write nothing. After a channel's block is read, its descriptor is popped.
`fifo_full` holds the formatter before any write, so the word is not lost; treat it as an
almost-full flag with at least one free slot. `fifo_wen` and `fifo_data` are registered.

## Energy sum and hit bits

**`energy_sum`** is a three-stage pipeline:
1. Two four-input adders, 12-bit inputs and 14-bit results.
2. A 15-bit adder.
3. An output register that stands for the pad flip-flop.

Latency is three clocks, with a new sum every clock. `SUM_MASK` (default `8'hF0`) chooses the
summed channels. By default these are channels 4-7, where the calorimeters are wired. With four
12-bit inputs, bit 14 of the sum is always 0; the port keeps the 15-bit width of the original
design.

**`hit_bits`** works per channel:
- It averages the channel over two samples: `(x[n] + x[n-1]) / 2`, truncated.
- It compares the average with TET. The bit is low while the average is below TET.
- It registers the result once more for the pad.

Latency is three clocks. Widening the bits to a fixed pulse length is left to the trigger FPGA.

## Control registers

The register file is `vme_iface`. A write takes effect on the clock with `bus_wr` high. A read
loads `bus_rdata` on the clock with `bus_rd` high, so the data is valid on the next clock.

| addr | name | bits | reset |
|---|---|---|---|
| 0x00 | STATUS1 (R) | 15: 10-bit board, 14-0: version | |
| 0x01 | STATUS0 (R) | trigger number 15-0 | |
| 0x02 | CONFIGURATION | 1-0 mode, 2 Run, 5-3 number of pulses, 15-8 force ADC 0-7 to zero | 0x0020 |
| 0x03 | PTW | 9 bits, samples per window (≥ 6) | 500 |
| 0x04 | PL | 11 bits, samples back from the trigger | 1000 |
| 0x05 | NSB | 12 bits | 4 |
| 0x06 | NSA | 13 bits | 12 |
| 0x07-0x0E | TET 0-7 | 12 bits | 2048 |
| 0x0F | PTW DAT BUF LAST ADR | 12 bits | 1517 |
| 0x10 | PTW MAX BUF | 8 bits | 3 |
| 0x11 | STATUS (R) | 0 raw overrun, 1 PTW overrun, 2 processing overrun | |

## Resets and clocks

- **`rst_n`** resets everything on the FPGA clock.
- **`hard_reset_n`** resets the input FIFOs and gates their writes.
- **`soft_reset_n`** is registered. It resets the trigger counter, the time stamp and the whole
  datapath: rings, pointers, block counters, state machines and the sticky overrun flags. It
  leaves the registers alone.

After changing PTW, PTW DAT BUF LAST ADR or PTW MAX BUF, pulse soft reset so that the block layout
starts from address 0. As a safety net, the secondary pointers also wrap at any address at or above
the last address. Each input FIFO is the only clock crossing.

## Where this design departs from or adds to the original description

- **Run bit.** Run is CONFIGURATION bit 2. The original gives bit 3, which is also inside the pulse
  count field 5-3.
- **PTW MAX BUF address.** It is at 0x10; the original gives it the same address as PTW DAT BUF
  LAST ADR.
- **STATUS register.** The overrun STATUS register, at 0x11, is listed in the original only for
  the sister FPGA.
- **Input FIFO depth.** The input FIFO is 16 deep, not 15, so that Gray-coded pointers work.
- **Trigger FIFO depth.** The trigger FIFO is 504 words (72 whole records), not 500.
- **Empty channels.** Channels without an event are marked by a flag in the block descriptor. The
  original writes a marker value into the data. The FIFO output is the same.
- **Mode 0 marker.** Mode 0 strips the last-sample marker `001` in the processing buffer.
- **Hit-bit polarity.** The bit is low while the average is below TET. One sentence of the
  original says the opposite; its hit-bit section says this.
- **NSA.** Exactly NSA samples follow the crossing. An odd/even reporting rule for NSA in the
  original is not followed.
- **Pulse Raw Word 1** carries the crossing index, as the processing buffer does.
- **Clocks.** There is no separate FIFO clock or second read clock for the secondary buffer: one
  250 MHz clock is used.
- **Not built:**
  - the "no data for trigger" message to the host (a refused trigger only sets RAW BUFFER
    OVERRUN);
  - the 50 ns minimum-T1 rule;
  - pedestals;
  - the LVDS pad buffers;
  - the external FIFO, the VME FPGA and the trigger (hit-sum) FPGA. These are outside this chip,
    and their signals are top-level ports.
- **Unverified properties.** Resource use and 250 MHz timing have not been checked with an FPGA
  vendor tool.

## Parameters

| module | parameter | default |
|---|---|---|
| `adc_fpga_top`, `adc_channel` | `PRI_DEPTH` (ring), `SEC_DEPTH`, `TRIG_DEPTH`, `PROC_MAX_BLOCKS` | 4081, 2200, 504, 3 |
| `adc_resync` | `DEPTH`, `WIDTH` | 16, 13 |
| `energy_sum` | `SUM_MASK` | `8'hF0` |
| `vme_iface` | `VERSION` | 1 |
| `data_format` | `NCH` | 8 |

The processing buffer is fixed at 2048 words, because its 11-bit address wraps naturally.

Shared types and word encodings live in `adc_pkg`: the descriptor struct, the configuration
struct, the mode and tag enums, and the header and FIFO word builders. `dp_ram` and `sync_fifo`
are generic helpers.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_adc_fpga_top -y rtl -y tb rtl/adc_pkg.sv tb/tb_adc_fpga_top.sv
./obj_dir/Vtb_adc_fpga_top +verilator+rand+reset+2
```

What each testbench covers:

| testbench | what it covers |
|---|---|
| `tb_adc_fpga_top` | The whole FPGA at its default sizes. Eight random ADC streams with pulses, programming over the bus, single triggers and bursts. A reference model computes every FIFO word; output is compared word for word in modes 0, 1 and 2 and in an overload phase. Energy sum and hit bits are checked every clock. It fails unless each of these happens at least once: ignored trigger while Run is off, zeroed channel, skipped channel, clipped window, pulse limit, FIFO-full stall, each overrun flag, and the soft-reset clear. Runtime is a few seconds. |
| `tb_adc_fpga_workloads` | The operating points the board is sized for, at the default parameters and register reset values. Four successive 2 µs triggers are held while the FIFO is full, and none may be lost. Then an 8 µs latency (PL 2000), first with NSB = NSA = 1024 in mode 1 and then with the smallest windows in mode 2. Every FIFO word is compared with the model. |
| `tb_adc_channel` | One channel with an unrelated, slightly slower ADC clock. Checks Sel output order and values, every processed block against a model, and the three overrun flags under a burst. |
| `tb_data_buffer`, `tb_trigger_buffer`, `tb_process_algorithms`, `tb_data_format` | The blocks of the trigger path, each with its own reference model. |
| `tb_adc_resync`, `tb_adc_sel`, `tb_stamp_counter`, `tb_energy_sum`, `tb_hit_bits`, `tb_vme_iface` | The smaller blocks. |

In the overload phase of the top test, triggers wait long enough for the ring to be overwritten.
The test then feeds a periodic input whose period is exactly the ring length, so the expected
data stays exact.
