# AIC-ISO acquisition sequencer

An analog input card for plant instrumentation digitises 8 isolated analog
channels and hands the results to a CPU over a VME64x backplane. If the CPU
had to pace the converter itself (start a conversion, poll for the end, fetch
sixteen half-words), every scan would cost it many bus cycles. This design
moves that work into an FPGA: on one start request, the sequencer converts
all 8 channels, reads them out of the converter and keeps the complete scan in
a small on-chip memory. The CPU then collects the scan with a few ordinary VME
read cycles.

The signal chain on the card is: input multiplexer (field signal, reference or
ground, for calibration) → isolation amplifier → low-pass filter → an
AD7608-class data acquisition system (DAS): 8 simultaneously sampled channels,
18-bit SAR conversion, 16-bit parallel bus. Only the FPGA part is described
here as RTL; the analog parts, the DAS chip itself, the bus transceivers and
the hot-swap circuitry are outside it.

```
                 +------------------------- aic_seq_top --------------------------+
  start_conv --->|  das_ctrl  (DAS interface logic)                               |
  range/os/...-->|   init -> wait start -> CONVST -> BUSY -> 8 x (2 reads)  ------+--> DAS pins
                 |        | mem_we / mem_waddr / mem_wdata                        |<-- BUSY, DB[15:0]
                 |        v                                                       |
                 |  seq_ram  16 x 16, separate write and read ports               |
                 |        ^ mem_re / mem_raddr / mem_rdata                        |
                 |        |                                                       |
  VME A16/D32 <->|  vme_if: sync2 x3 -> vme_ga_am_decode -> vme_select -> vme_dtack|--> DTACK*, BERR*, D[31:0]
                 +----------------------------------------------------------------+
```

## One scan

`das_ctrl` is a single state machine (`das_state_t` in `aic_pkg`):

| state | what happens | leaves when |
|---|---|---|
| `DAS_INIT` | DAS `RESET` high after system reset | `RESET_CYCLES` clocks |
| `DAS_IDLE` | range, standby, oversampling and the eight multiplexer selects are copied from the CPU inputs to the pins | rising edge of `start_conv` (not in standby) |
| `DAS_CONVST` | `CONVST` low | `CONVST_CYCLES` clocks; the conversion starts at the rising edge |
| `DAS_WAIT_BUSY` | | BUSY seen high |
| `DAS_WAIT_DONE` | the DAS converts | BUSY seen low: conversion over |
| `DAS_RD_LOW` | `CS_RD_n` low | `RD_LOW_CYCLES` clocks; the data bus is sampled on the last edge and written to memory |
| `DAS_RD_HIGH` | `CS_RD_n` high | `RD_HIGH_CYCLES` clocks; then the next read, or `DAS_IDLE` with `data_rdy` set after the 16th |

An 18-bit result does not fit the 16-bit bus, so each channel takes two reads:
the first returns bits 17..2, the second the remaining bits 1..0. Both 16-bit
words are stored as they come, wherever the converter places the two bits in
the second word, so the memory layout of a scan is

| address | contents |
|---|---|
| 2n | channel n, first read (bits 17..2) |
| 2n + 1 | channel n, second read (bits 1..0 and the DAS's padding) |

for n = 0..7: 16 words, exactly the 16 × 16 memory. The testbenches' converter
model puts bits 1..0 in DB15..DB14, so there the code of channel n is
`{word[2n], word[2n+1][15:14]}`; check the converter's data sheet for the real
part.

Settings requested by the CPU reach the pins only while the sequencer is idle,
so a change during a scan cannot alter the range or the oversampling of the
conversion in progress; it takes effect at the end of the scan. A start while
a scan runs is ignored, as is a start in standby (the converter is powered
down). `data_rdy` falls at the next start and rises when the last word is in
memory; `scanning` is high in between.

**Timing.** The design assumes one clock, the 16 MHz VME system clock. From the
start edge a scan takes about 3 clocks of synchronisation and edge detection,
1 clock of CONVST, the conversion time (5 µs = 80 clocks without oversampling,
up to 0.32 ms = 5120 clocks at ratio 64), 2–3 clocks of BUSY synchronisation,
and 16 reads of 3 clocks: about 135 clocks (8.4 µs) without oversampling. The
sequencer waits on BUSY without a time limit, so any oversampling ratio works.
The pulse-width parameters are sized for the AD7608's minimum timing at
16 MHz; re-check them for a faster clock.

## Reading the scan over VME

The board is an A16 slave with a 32-bit data path. It answers address modifiers
0x29 and 0x2D (A16 non-privileged and supervisory).

**Where the board is.** VME64x backplanes tell each slot its number on the
GA4*..GA0* pins, with GAP* as parity, so no address jumpers are needed.
`vme_ga_am_decode` takes the slot number as `~GA*`, accepts it only if the six
pins have an odd number of grounded lines and the slot is not 0, and selects
the board when A15..A11 equal the slot number. Each slot thus owns a 2 KiB
window at `slot << 11`.

**What can be read** (byte offsets in the window):

| cycle | offset | data |
|---|---|---|
| D16 (LWORD* high, DS1* and DS0* low) | 2k, k = 0..15 | memory word k on D15..D00, D31..D16 = 0 |
| D08 (one data strobe) | 2k or 2k + 1 | the same word on D15..D00; the master takes its byte lane |
| D32 (LWORD* low, both strobes, A01 = 0) | 4n, n = 0..7 | channel n: word 2n on D31..D16, word 2n + 1 on D15..D00 |

D32 follows the VME byte order (lower address on the upper lanes), so one D32
cycle returns a whole channel (with the model's bit placement, its 18-bit code
is `D31..D14`).

Writes, offsets at or past 32 bytes and unaligned or partial long words end
with BERR*. Another slot's window, another address modifier, or invalid GA
pins get no answer at all; the system's bus timer ends such cycles.

**The handshake.** VME has no clock, so AS*, DS0* and DS1* pass through
two-flip-flop synchronisers (`sync2`) first. Address, AM and LWORD* are
captured by `vme_select` on the first clock the synchronised AS* is low; board
select holds until AS* rises. With a data strobe low, `vme_select` classifies
the access and `vme_dtack` answers it: it reads one or two words from the
memory's synchronous read port, drives the data (`vme_d_oe` steers the
external transceivers), and one clock later pulls DTACK* low. DTACK* (or
BERR*) stays low until both strobes rise, then data and acknowledge are
released. Measured from DS* falling: DTACK* after 5–6 clocks for D16, 6–7 for
D32, BERR* after 3–4.

A scan may be read while the next one is being taken (the memory has separate
read and write ports); such a read can mix words from two scans, so a CPU
should wait for `data_rdy`.

## Files

| file | contents |
|---|---|
| `rtl/aic_pkg.sv` | shared constants (channels, widths, AM codes) and the `vme_acc_t` and `das_state_t` types |
| `rtl/aic_seq_top.sv` | the sequencer: `das_ctrl`, `seq_ram`, `vme_if` |
| `rtl/das_ctrl.sv` | DAS interface logic |
| `rtl/seq_ram.sv` | 16 × 16 memory, write port and read port |
| `rtl/vme_if.sv` | VME slave: synchronisers and the three parts below |
| `rtl/vme_ga_am_decode.sv` | geographical address and AM decoding |
| `rtl/vme_select.sv` | board select and word select |
| `rtl/vme_dtack.sv` | DTACK*/BERR* generation and read data path |
| `rtl/sync2.sv` | two-flip-flop synchroniser |
| `tb/ad7608_model.sv` | behavioural DAS model (conversion time 5 µs × 2^OS) |
| `tb/vme_master_bfm.sv` | behavioural VME master with a bus timer |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters (defaults are the card's sizes where it gives them):

| module | parameter | default | meaning |
|---|---|---|---|
| `das_ctrl` | `N_CHAN` | 8 | channels per scan |
| `das_ctrl` | `WORDS` | 2 | reads per channel |
| `das_ctrl` | `RESET_CYCLES`, `CONVST_CYCLES`, `RD_LOW_CYCLES`, `RD_HIGH_CYCLES` | 2, 1, 2, 1 | pulse widths in clocks (own choice) |
| `seq_ram` | `DEPTH`, `WIDTH` | 16, 16 | memory size |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv --top-module tb_aic_seq_top \
  rtl/aic_pkg.sv tb/tb_aic_seq_top.sv
./obj_dir/Vtb_aic_seq_top
```

Replace `tb_aic_seq_top` by `tb_das_ctrl`, `tb_seq_ram`, `tb_vme_if`,
`tb_vme_select`, `tb_vme_dtack` or `tb_vme_ga_am_decode` for the unit tests.

`tb_aic_seq_top` runs the full design at its default parameters: a scan of a
fixed pattern (0xAAA0 + n and 0xBBB0 + n for channel n), whose memory image it
reads back word by word; scans of random codes without oversampling and at
ratio 64, read back channel by channel with D32 and reassembled into 18-bit
codes; a VME read during a scan; settings held during a scan; standby; and each
refused or foreign cycle. It counts how often each of these happened and fails
if one never did. It also checks the scan length in clocks. The unit tests
cover the GA/AM decoder exhaustively, random access mixes for board/word
select and DTACK generation, and the memory's ports and read latency.

## How far to trust it

What the design takes from the card's description: the three-part FPGA
structure (DAS interface, memory, VME interface), the 8-channel scan with two
16-bit reads per channel and the order of its steps, the 16 × 16 memory with
separate read and write addresses and its layout (first read at the even
address), the converter's pin names, the A16/D32 bus, geographical addressing
and AM decoding, board/word select and DTACK generation as the VME parts.

This design's own choices, where the description is silent: the 16 MHz single
clock and all cycle counts; the synchronous memory with one clock of read
latency; start on a rising edge, ignored in standby and during a scan; settings
held during a scan; the address map, the D32 packing of one channel per long
word and the byte handling; answering writes and out-of-range reads with
BERR*; the GA parity rule and AM codes (taken from the VME64x standard); the
one 2-bit multiplexer select per channel (0 field signal, 1 reference,
2 and 3 ground), supplied by the CPU side and held by the sequencer during a
scan. The memory's read port is driven only by the VME interface; there is no
separate read-address input to the sequencer.

Not in the RTL: interrupts (a stated extension, not part of the design), RETRY*
(never needed), any register the CPU could write over VME (start, range,
standby and oversampling arrive as plain inputs, and how the CPU drives them is
left to the board), a BUSY timeout, and memory or converter self-diagnostics.
The DAS model is behavioural and follows the AD7608 only as far as this
interface uses it; check the real part's timing before building hardware.
