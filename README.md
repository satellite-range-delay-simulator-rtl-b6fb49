# Satellite range delay simulator (RDS)

A ground terminal in a satellite TDMA network sends bursts that reach the
satellite about 122 ms later. The satellite drifts, so that delay changes slowly
and the carrier shows a small Doppler shift. To test terminals in a laboratory,
the RDS sits between a terminal's transmit logic and its modulator. It delays
everything the terminal sends by a selectable satellite range, and it lets that
delay drift the way a moving satellite's would.

The idea is a very large FIFO. The terminal's 64-bit parallel words are written
at the terminal's own word clock, 221.184 MHz / 64 = 3.456 MHz, which is one
word every 289.35 ns. After a chosen initial number of words, the RDS starts
reading them out at a word clock derived from its own oscillator. A 12-bit code
tunes that oscillator about ±250 Hz around 221.184 MHz. While the two clocks
differ, the number of words held in the FIFO, and so the delay, grows or
shrinks steadily. That is a satellite moving at up to ±339 m/s. The words
leave the RDS as a serial bit stream at the RDS's own high speed clock.

This repository holds synthesizable SystemVerilog for the digital part of the
RDS, with a self-checking testbench for every block.

## Block structure

```
 terminal ──► input_register ──► scbert_gen ──►┐             (write side, input high speed clock)
 (64 data +4 ctrl bits,                        │
  INPUT WORD CLOCK)            timing_control ─┼─ write addr counter, WRITE cycle,
                               │               │  decimal delay control counter
                               │          fifo_memory  3 banks × 262,144 × 70 bits
                               │               │
                               └─ read addr counter, READ cycle ◄── vcwcg ◄── code read with each word
                                               │                     ▲
                                               ▼                     │  (read side, output high speed clock)
                                         ps_converter ──► serial data to the modulator
                                               │
                                         postmod_switch ──► POST MOD SWITCH CONTROL
                                         scbert_chk ──► ERROR pulse, error count
 control_select: LOCAL panel / REMOTE computer → delay code, 12-bit frequency code, RESET
```

`rds_top` wires these blocks together. The top's `freq_code` output drives
the oscillator's D/A converter. The oscillator, the D/A converter and the
rack instruments are analog or bought-in parts and are not part of the RTL.

## The three-bank FIFO

The memory is 70 bits wide:

| Bits | Use |
|---|---|
| 63:0 | Data word |
| 65:64 | VCWCG code |
| 66 | VALID WORD |
| 67 | LAST WORD of a frame |
| 69:68 | Two spare channels, written as zero |

The depth is three banks of 262,144 words (18-bit chip address), 786,432
words in all. In hardware each bank is 70 chips of 262,144 × 1 DRAM with nine
multiplexed address pins. `fifo_memory` models this as one array. A chip
address is applied in two steps: the row half is latched on the addressed
bank's RAS strobe, and the column half on CAS. `dram_cycle_ctrl` produces that
sequence once per word.

Why three banks when two would hold a geosynchronous delay? With two banks,
the write and read addresses would be in the same bank for part of the time
unless the delay were exactly one bank. The two sides run on unrelated clocks,
so that would need arbitration and halve the time available for each access.
The RDS instead keeps the delay between one bank (262,144 words, 75.9 ms) and
two banks (524,288 words, 151.7 ms). Within those limits, the write and read
addresses are always in different banks. Each side can then run a full memory
cycle on its own clock, with no arbitration at all. `fifo_memory` asserts that
the two sides never strobe the same bank at once.

The write and read address counters (`addr_counter`) count 0 … 786,431 and
wrap. The two top bits select the bank. Each wrap produces a rollover pulse.
The DRAMs are not refreshed. Each location is rewritten or read at most
151.7 ms after it was written, and the design accepts that.

## Setting the delay: the decimal delay control counter

RESET clears both address counters and the delay control counter. It also
stops the reading and samples the 4-bit INITIAL DELAY CONTROL CODE. Writing
starts at once. The delay control counter counts written words in BCD. When
it equals the table entry for the code, the read enable is set and reading
starts.

| Code | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| Words | 280000 | 300000 | 320000 | 340000 | 360000 | 380000 | 400000 | 408000 |

| Code | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|
| Words | 416000 | 424000 | 432000 | 440000 | 460000 | 480000 | 500000 | 520000 |

At 289.35 ns per word, these run from 81.0 ms to 150.5 ms. Code 9 (122.7 ms)
is the geosynchronous case.

The same counter later serves as the FIFO level meter:

- It is cleared each time the write address wraps.
- Its value is latched each time the read address wraps.

When the read address wraps, the counter holds the number of words written
since the write address wrapped. That is exactly the distance between the two
addresses. The latched value is the six-digit FIFO LEVEL - WORDS display
(`fifo_level`, packed BCD). It is valid from the first read rollover, one full
memory length after reading starts. It changes as the delay drifts.

The read rollover comes from the read clock domain. `pulse_sync` carries it
to the write domain as a toggle through two flops. The read enable goes the
other way through `sync_2ff`. The read enable changes only once per run, and
the FIFO spacing is hundreds of thousands of words, so two clocks of
synchronizer latency cost nothing.

## Output timing: bit insertion and deletion

This part is the hardest to follow, and the reason the RDS stores more than
data.

A TDMA terminal keeps its bursts in their satellite time slots by sliding its
transmit timing one bit at a time. During the last word of a frame, its word
clock divider counts 63 or 65 high speed clocks instead of 64. A 2-bit code
selects the divisor:

| Code | Divisor |
|---|---|
| 00 | 64 (no change) |
| 01 | 63 (advance one bit) |
| 10 | 65 (retard one bit) |
| 11 | 56 (coarse step) |

Code 11 is used during acquisition. A frame is 864 words (250 µs). The
terminal may move its timing by up to 20 bits per frame.

The RDS must reproduce those slides after the delay. Otherwise the delayed
stream would no longer carry the terminal's corrections. So the code is
written into the FIFO with its word. On the read side, `vcwcg` (variable count
word clock generator) divides the output high speed clock. It applies the
code read with each word to the word period in which that word is read, then
returns to 64. The OUTPUT WORD CLOCK therefore repeats the terminal's
insertions and deletions, one word period at a time, on top of the oscillator
offset.

`ps_converter` turns words into one continuous serial stream at one bit per
output clock. The difficulty is that word arrivals now move against a strict
64-bit schedule. The converter handles it like this:

1. Words wait in a two-entry queue. Each word starts the moment the previous
   one has sent its 64th bit. Within a frame, arrivals drift by the bits the
   VCWCG has inserted or deleted. The queue and a start lead of
   `RESYNC_LEAD` = 96 clocks (1.5 words) absorb that drift.
2. The word after a LAST WORD is not started on the schedule. It starts
   exactly `RESYNC_LEAD` clocks after it arrives, which resynchronizes the
   output to the read clock once per frame.
3. Resynchronizing changes the length of the frame's last word. The terminal
   never puts valid data in that word. If the frame was advanced, the last
   word is cut short. If it was retarded, the last word is stretched, and the
   extra bits are zero.
4. A change larger than `MAX_ADJ` = 20 bits raises `adj_err`. A word that
   finds the queue full raises `overrun`. Neither happens in normal use.

The first word after RESET starts the same way as the first word of a frame.
The first bit of a frame's first word appears `RESYNC_LEAD` clocks after the
clock edge that takes its load pulse.

`postmod_switch` closes the modulator's output switch only around valid
bursts. Each word carries a VALID WORD bit. From the validity of the current,
previous and next word, and from the distances to the word boundaries
reported by the P/S converter, the control rises exactly 32 bit times before
the first bit of a burst. It falls exactly 32 bit times after the last bit.

## Controls

`control_select` takes the delay code, the 12-bit frequency code and RESET
either from the front panel (LOCAL) or from the experiment control computer
(REMOTE), chosen by a switch. It reports the mode as `remote_ind`. RESET
arrives from a push button or a computer line, unrelated to any clock. It is
synchronized and held for 16 clocks, so the read domain also sees it. Word
clock monitor outputs (`in_word_mon`, `out_word_mon`) are brought out for the
panel jacks.

## Built-in bit error rate tester (SCBERT)

The single channel BER tester checks one of the 70 memory channels through
the whole FIFO.

- `scbert_gen` sits after the input register. It replaces the selected channel
  with a pattern that repeats every N words, N = 2 … 16. The pattern bits come
  from a 16-bit switch word, bit 0 first.
- With `all_chan` set, every other channel carries the pattern as well:
  channel c gets it delayed by (c mod 8) words, which gives eight offset
  signals.
- With `inject` set, the generator inverts one bit every 65,536 pattern
  repetitions. With N = 15 that is about 3.5 errors per second, to check the
  tester itself.
- `scbert_chk` takes the channel from each word read. The FIFO delay is
  unknown, so the checker first hunts for the pattern phase. It slips one word
  on every mismatch and locks after 32 matches in a row. After that, each
  mismatch pulses `scb_error` and increments a 16-bit saturating count.

## Clocking and cycle timing

The whole design runs on the two high speed clocks.

- The write side, the delay counter and the controls run on `in_hs_clk`. The
  input word clock is sampled on it through two flops.
- The read side runs on `out_hs_clk`.

A word strobe first steps its address counter, and the memory cycle then uses
the new address. The first word after RESET therefore goes to address 1.

A memory cycle is counted in high speed clocks of 4.52 ns:

| Clock | Event |
|---|---|
| 1 | RAS rises |
| 3 | Column address switches in |
| 4 | CAS rises (and WE, for a write) |
| 28 | Read data captured (about 120 ns after CAS, the DRAM access time) |
| 40 | All strobes fall |

The cycle fits inside the shortest word period of 56 clocks.

## What follows the source design and what is this design's own

**Follows the source design:**
- the 3 × 262,144 × 70 organisation and the nine-pin row/column addressing
- the one-to-two-bank delay rule, with no arbitration and no refresh
- the 16-entry delay table
- the decimal delay counter, cleared on write rollover and latched on read
  rollover
- the four VCWCG divisors
- resynchronization once per frame by truncating or stretching the last word,
  with the 20-bit limit
- the half-word lead and lag of the post-mod switch control
- LOCAL/REMOTE selection with 4-bit and 12-bit codes
- the SCBERT's pattern lengths, channel selection, eight offset signals and
  injection rate

**This design's own choices:**
- clocking everything on the two high speed clocks, and the synchronizers
- the edge positions of the memory cycles
- the address-1 convention
- the two-word queue and the 96-clock lead in the P/S converter
- MSB-first bit order and zero fill of stretched words
- the bit positions of the control and spare channels
- the code being sampled at RESET
- RESET stretching
- the SCBERT pattern switch word, phase search and 16-bit count

The analog and bought-in parts are outside the RTL: the VCXO, its D/A
converter, the frequency, delay and Doppler counters, and the computer with
its IEEE-488 bus. The terminal signal simulator and data generator used with
the RDS are modelled only in testbenches.

## Simulation

The simulation uses plain Verilator 5. The package must come first on the
command line. The example below builds `tb_rds_top`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_rds_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/rds_pkg.sv tb/tb_rds_top.sv
./obj_dir/Vtb_rds_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

**Unit testbenches** (one per block, a few seconds each): `tb_addr_counter`,
`tb_fifo_memory`, `tb_dram_cycle_ctrl`, `tb_delay_control`,
`tb_timing_control`, `tb_input_register`, `tb_vcwcg`, `tb_ps_converter`,
`tb_postmod_switch`, `tb_control_select`, `tb_scbert_gen`, `tb_scbert_chk`.
`tb_delay_control` runs the real table to 520,000 words.

**`tb_rds_top`** is an end-to-end run at reduced size:

- memory of 3 × 64 words
- delay table of 70 … 120 words
- 16-word frames
- a fast-tuning oscillator model

It runs three phases:

1. LOCAL mode with a slow oscillator, so the level rises.
2. REMOTE mode with a fast oscillator, so the level falls.
3. SCBERT in all-channel mode, with one stored bit corrupted.

It counts every mechanism and fails if one never happened: every divisor,
truncated and stretched last words, rollovers, level latches in both
directions, mode switches, SCBERT lock and error. A behavioural terminal model
(`gt_model`) supplies numbered, self-checking words and cycles through all
four codes. `serial_checker` cuts the serial stream back into words and checks
order, content, last-word lengths and the switch control.

**`tb_rds_full`** runs at the default size, with the full memory and the real
table, code 0. The oscillator is 1.1 ppm fast and the frames are 864 words.
It runs until the first level latch plus 300 words, about 1.07 million words,
and takes about 1.5 minutes.

**`tb_rds_geo_scbert`** also runs at the default size: the geosynchronous
code 9, selected in REMOTE mode, with the SCBERT on spare channel 68, a
15-bit pattern and injection on. It runs about 1.41 million words and expects
exactly one injected error after lock.

The behavioural models in `tb/` (`gt_model`, `vcxo_model`, `serial_checker`)
are for simulation only.

## Changing the design

- `rds_top` parameters `ADDR_PINS`, `BANKS` and `DELAY_TABLE` scale the memory
  and the delays together. The table entries must stay between one and two
  banks.
- The P/S converter's `RESYNC_LEAD` must exceed 64 + `MAX_ADJ` for the queue
  to absorb a full-size correction.
- The cycle-timing parameters of `dram_cycle_ctrl` must keep `T_END` below 56.
