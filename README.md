# Radiation-tolerant controller for a 3D stack of COTS DDR3 dies

Commercial DDR3 DRAM dies are dense and cheap, but in space they fail in
several ways. Single bits flip (SEU). Flipped bits pile up over time. Whole
dies stop answering or return garbage (SEFI, single-event functional
interrupt). Some dies latch into high current, and some fail for good. This
design is the digital logic of a controller that sits under a stack of
fourteen x16 DDR3 dies and hides all of this from the host:

* **8 data dies** carry a 128-bit word.
* **5 ECC dies** carry a Hsiao SEC-DED (13,8) code for every byte of that word.
* **1 cold spare**, normally unpowered, can replace any of the 13.

To the host the stack looks like one x128 DDR3 module (narrower widths can
be programmed). Host commands pass through with a fixed latency. The
controller runs its own work only in time the host has agreed not to use:
zeroization, self-test, scrubbing, rebuild, power cycling, spare
replacement, software conditioning and extra refresh.

Top module: `rtl/cube_ctrl_top.sv`. Shared types and constants:
`rtl/cube_pkg.sv`.

## The stack and the code word

One 128-bit host beat is cut into 16 bytes, called *rows* here. Each row
uses the same DQ line on every die:

- Bit `k` of row `r` is stored on DQ `r` of data die `k` (k = 0..7).
- Check bit `j` of row `r` is stored on DQ `r` of ECC die `8+j` (j = 0..4).

So each x16 die holds one bit of each of the 16 rows. A die that fails
completely costs exactly one bit per row, and SEC-DED corrects that. This is
why a SEFI or a dead die loses no data, and why a die can be rebuilt while
the host keeps running.

The code (`hsiao_enc`, `hsiao_dec`) is a Hsiao SEC-DED code. Each of the 8
data bits has a distinct weight-3 column over the 5 check bits:

```
00111 01011 01101 01110 10011 10101 10110 11001
```

The check bits use the unit vectors. The decoder works as follows:

- **Single error** (data or check bit): corrected, and `ce` is set.
- **Even-weight syndrome**: `ue` is set.
- **Failing-bit mask:** the decoder re-encodes the corrected byte and XORs it
  with the raw 13 bits. The result marks the failing bit. Through the
  interleave, that bit is also the failing die.

`edac` instantiates 16 encoders and 16 decoders, with one register on each
side. It outputs:

- the corrected word;
- per-lane failing-DQ masks;
- `ce`/`ue` flags.

`error_log` uses them as follows:

- It counts failing bits per lane, both in total and inside a programmable
  window.
- It sets a sticky per-lane SEFI flag when the window count exceeds a
  threshold.
- It also counts beats with corrected and with uncorrectable errors.

*Lane* means a logical position (0..7 data, 8..12 ECC). *Die* means a
physical device. They are the same until the spare is switched in
(`die_manager`).

## Data path and latency

```
host pins -> host_port -> cmd_mux -> bank_spiral -> 14 x ddr_phy -> dies
                                ^                         |
                      maint_ctrl                          v
host <- host_port <------------ edac <------------- die_manager (lane map)
```

The model carries one beat per die per fabric cycle. Double-data-rate
serialisation, DQS and delay training belong to the electrical PHY, which is
not part of this RTL. With that in mind, a host command takes:

| step | cycles |
|---|---|
| host pins to host_port register | 1 |
| MUX register | 1 |
| PHY command register, i.e. at the die pins | 1 |
| die CAS latency | CL |
| PHY capture | 1 |
| EDAC | 1 |

The first corrected beat reaches the host **CL+5 cycles after the RD**. That
is 12 cycles at the default CL = 7, below twice the CAS latency, which was
the design target.

The host drives write data **CWL cycles after its WR**, one beat per cycle.
The MUX switches the write data CWL cycles after it switches the command, so
host and maintenance bursts never mix.

`bank_spiral` spreads a row over the dies: die `d` receives bank
`(ba + d) mod 8`. A strike that hits the same bank area in every layer then
hits different logical data. It can be switched off over SPI.

`host_port` does two things:

- It masks data to the programmed width (x8, x16, x32, x64 or x128). A narrow
  host uses the low bits, and unused bits are written as zero so the ECC
  stays valid.
- It turns any command seen while CKE is low into a deselect. Self-refresh
  therefore lasts until the host raises CKE.

## Normal and Maintenance modes: the idle detector

The host's memory controller does not know the cube has work of its own. The
cube must never delay a host command, so it only steals time the host has
promised to leave free. `idle_detector` recognises three such promises:

1. **Refresh or ZQ with lengthened timing.** The host programs tRFC (or tZQ)
   longer than the dies need. After the dies' real busy time, the extra
   `ext` cycles are free. The default is 80 cycles (267 ns).
2. **Chip select inactive** (optional, SPI bit `cs_mode`). This assumes the
   host has guard-extended its CS#-active timing.
3. **The Idle pin**, or the idle bit over SPI. The host declares the bus free
   for as long as the signal is held.

`grant` is asserted only while at least `op_len` cycles (default 64) of the
window remain. That is enough for the longest atomic operation, a
read-modify-write of about 55 cycles.

`maint_ctrl` starts an operation only on `grant`. It keeps the MUX in
Maintenance mode until the operation has finished. `mode_o` shows 3'b001 for
Normal and 3'b010 for Maintenance. A host command that arrives in
Maintenance mode is dropped and counted in `collisions_o`, which stays zero
for a host that keeps its side of the contract.

**Host rule that follows from this:** after dropping Idle, wait `op_len` + 2
cycles before the next command.

## Maintenance engine (`maint_ctrl`)

All controller work is cut into four atomic operations. Each closes every row
before it ends (precharge-all), so no row is left open to radiation:

| op | sequence |
|---|---|
| RD | ACT, RD, collect 8 corrected beats, PREA |
| WR | ACT, WR of 8 generated beats, PREA |
| RMW | ACT, RD, write the corrected beats back (all lanes, or one lane only), PREA. The row stays open in between. |
| REF | REF, wait tRFC |

Tasks built from these operations, highest priority first:

- **Power-up.**
  1. Every PHY initialises its die: reset 200 µs, CKE 500 µs, MR2/MR3/MR1/MR0
     with DLL reset, ZQ calibration.
  2. With the `zeroize_i` strap high, the whole array is written with zeros
     through the EDAC, so every word has valid check bits and scrubbing needs
     no "written" bits.
  3. The stack stays in Maintenance mode until this ends.
- **BIST** (SPI). Patterns: zeros, ones, checkerboard, address, and address
  with a per-die offset. Each runs as a write pass followed by a
  read-and-compare pass. With the offset pattern, data die k holds the beat
  address plus k, so the eight data dies are tested in parallel with
  different data. March X runs
  up(w0) up(r0,w1) down(r1,w0) up(r0). Failing lanes (from the decoder masks)
  and data mismatches are reported.
- **Repair** (autorepair bit, on by default). A lane flagged by the error log
  (SEFI) or by the current monitor is:
  1. power-cycled by `die_manager`;
  2. re-initialised by its PHY;
  3. rebuilt.

  If the same lane is flagged again later, the cold spare replaces it and is
  rebuilt. The lane's log and current flag are held cleared from the power
  cycle to the end of the rebuild, because a blank die is expected to read
  wrong.
- **Rebuild** (SPI, or after repair). An RMW over the whole array that writes
  only the target lane. The other 12 lanes give the corrected data, so the
  host keeps running; during a rebuild the word has no correction margin left.
- **C1 software conditioning** (SPI, for one lane, only while the host holds
  Idle). The die's PHY repeats the mode-register writes, the DLL reset and
  ZQ calibration, without reset and without losing data.
- **Refresh.** While the controller holds the stack (power-up, host Idle), it
  refreshes at the programmable interval (default 2340 cycles = 7.8 µs). The
  interval is halved when `temp_i` ≥ 85 °C. Otherwise the host's own
  refreshes reach the dies.
- **Scrub.** Every `scrub_int` cycles (default 3000), one burst is read in
  the next window:
  1. If the read shows a corrected error, the burst is written back and
     re-read.
  2. This repeats up to `max_rep` times (default 3).
  3. Whatever is still wrong counts as stuck bits.
  4. A lane that collects `STUCK_LIM` stuck-bit events (parameter of
     `maint_ctrl`, default 8) goes through the repair path above. A die
     reset clears most stuck bits.

  The walk goes through the whole array.

Start requests from SPI are one-cycle pulses. They are latched until served.

## Die management and sensors

`die_manager` maps the 13 lanes to the 14 dies and owns the die power
switches:

- Die 13 stays unpowered until it replaces a lane. The replaced die is then
  switched off.
- A power cycle switches the lane's die off for `T_OFF` cycles. Its PHY then
  re-runs the full initialisation.
- While a die is off or initialising, its lane reads as zeros and the EDAC
  corrects it.
- Dies can also be forced off over SPI for ground tests.

`current_monitor` compares each powered die's averaged current sample with
the mean of all powered dies. It flags die `d` when
`n·I_d > Σ I + n·margin` for `persist` consecutive samples. Only relative
values matter, so the ADC needs no absolute calibration. The averaging RC
filter and the ADC are outside this logic.

## Per-die PHY (`ddr_phy`, `phy_init`)

Each die has its own PHY, so each die can be switched off, re-initialised or
conditioned on its own. This RTL is the digital part:

- the initialisation and C1 sequencer;
- registered command pins;
- the write-data launch at CWL, with ODT;
- read capture with a valid flag at CL+2 after the command enters;
- self-refresh CKE control.

Command priority in the PHY:

1. power off (DES);
2. init/C1 commands;
3. lane disabled (NOP);
4. MUX command.

## SPI port

The SPI port is mode 0, with SCLK slower than clk/4. A frame is
`{wr, addr[6:0]}` followed by 16 data bits, MSB first. Pulse bits clear
themselves.

| addr | content |
|---|---|
| 00 | ID 0x3D13 |
| 01 | control. Levels: 0 scrub enable, 1 spiral enable, 2 CS# mode, 3 idle request, 8 spare enable, 9 autorepair. Pulses: 4 BIST start, 5 rebuild start, 6 C1 start, 7 clear log. Reset value 0x0203. |
| 02 | [2:0] host width (0 = x8 .. 4 = x128), [6:4] BIST pattern (0 zeros, 1 ones, 2 checker, 3 address, 4 March X, 5 address with per-die offset), [11:8] lane for rebuild/C1/spare |
| 03 | scrub interval, cycles (3000) |
| 04 | refresh interval, cycles (2340) |
| 05 | SEFI threshold, bits per window (64) |
| 06 | SEFI window / 256 (256 → 65536 cycles) |
| 07 | idle extension, cycles (80) |
| 08 | maintenance operation length, cycles (64) |
| 09 | current margin (256) |
| 0A | die off mask |
| 0B | [3:0] scrub repeats (3), [11:8] current persistence (1) |
| 10 | status: 0 grant, 1 Maintenance, 2 power-up done, 3 dies ready, 4 BIST busy, 5 BIST fail, 6 rebuild busy, 7 hot, 8 spare active |
| 11 | temperature |
| 12 / 13 | SEFI lanes / current-anomaly dies |
| 14 / 15, 1E / 1F | CE / UE beat counts (low / high halves) |
| 16 | stuck-bit events |
| 17 | scrub steps |
| 18 | rebuilds |
| 19 | controller refreshes |
| 1A | BIST failing lanes |
| 1B | repairs |
| 1C | idle windows |
| 1D | scrub write-backs |
| 20..2C | bit-error count of lanes 0..12 |

## Parameters and sizes

All cycle counts assume a 300 MHz fabric clock.

| parameter (top) | default | meaning |
|---|---|---|
| CL / CWL | 7 / 6 | DDR3 CAS read / write latency |
| T_RCD / T_RP | 6 / 6 | ACT→RD/WR, PRE→ACT |
| T_RFC | 105 | refresh busy time (350 ns, 8 Gb die) |
| T_RST / T_CKE | 60000 / 150000 | power-up reset and CKE waits |
| T_ZQINIT | 512 | ZQ calibration at init and C1 |
| T_OFF | 64 | power-cycle off time |
| WALK_ROW_W / WALK_COL_W | 16 / 7 | maintenance walk: 64K rows, 128 bursts per row (a whole 8 Gb die) |

The defaults cover the full 8 GB cube: 8 data dies × 8 Gb, with the burst
address made of 3 bank + 16 row + 7 column-burst bits.

A whole-array rebuild or zeroization is 2^26 bursts. At about 55 cycles per
RMW, that is **about 12 s at 300 MHz**, above the 5 s target. Operations are
not pipelined across bursts; overlapping the ACT of the next burst with the
write-back of the current one would be the first step to close that gap.

## What is not here

- **Electrical interfaces.** The host DDR3 PHY and the die PHYs' analog
  parts (IO, DLL/PLL, DQS, delay lines, equalization, read/write training)
  are not here. Both sides of the top are plain digital command/data
  signals, one beat per cycle.
- **DEC-TED option.** The 16-bit data / 10-bit check DEC-TED option over two
  rows is not implemented; the stack uses SEC-DED.
- **NOP-based windows.** A host that lengthens NOP periods gets no special
  treatment. Windows come from REF/ZQCL, CS# inactive (optional) and Idle.
- **MRAM variant.** A DDR3 STT-MRAM stack would need refresh disabled and
  different timings. Only the timing parameters are exposed here.
- **Per-die offsets for the other patterns.** Only the address pattern
  (pattern 5) has a per-die offset. The offset goes to the eight data dies.
  The five ECC dies hold the check bits of that data, because every write
  passes through the SEC-DED encoder.
- **Spare activation.** The spare is switched in when a lane is flagged a
  second time after a repair. No BIST run is inserted after the power cycle
  to make that decision.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The interesting ones:

- `tb_hsiao_dec`: every single-bit error of random code words is corrected
  and located, and every double-bit error is flagged.
- `tb_edac`: a whole lane replaced by garbage is corrected and reported on
  that lane; two bad lanes in one row give UE.
- `tb_maint_ctrl`: runs the engine against a burst-level stack model:
  - zeroization with refreshes slipped in;
  - March X with a failing burst;
  - scrub repair, and a stuck bit given up after the repeat count;
  - rebuild to one lane;
  - SEFI → power cycle → spare;
  - C1.
- `tb_cube_ctrl_top`: the whole controller with fourteen behavioural DDR3
  dies (`tb/ddr3_die_model.sv`), at short init times and a 4-row × 4-burst
  walk. It covers:
  - power-up, zeroization and mode switching;
  - host writes and reads, with the latency checked at CL+5;
  - bank spiraling seen at the die pins;
  - a flipped bit corrected and logged;
  - scrub repair in refresh windows;
  - a SEFI die read through, detected, power-cycled and rebuilt;
  - spare replacement;
  - C1;
  - a current anomaly;
  - controller refresh at the normal and hot rate;
  - x64 width;
  - host self-refresh;
  - March X BIST.

  Each mechanism is counted, and one that never happens fails the test. The
  die models also count DDR3 protocol errors, which must stay zero.
- `tb_cube_full`: the top at its default parameters. It runs the full
  power-up timing (about 210 000 cycles), a host write and read, an SPI read
  and a scrub step. It finishes in well under a minute of run time.

Run any testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/cube_pkg.sv -y rtl -y tb \
    tb/tb_cube_ctrl_top.sv --top-module tb_cube_ctrl_top
./obj_dir/Vtb_cube_ctrl_top
```
