# DRAC inter-FPGA serial link

The Mu2e straw tracker is read out by DRAC boards. Each board has three
FPGAs. Two of them, called HV and CAL, drive the ADCs and TDCs that digitize
the straw signals. The third, the ROC (readout controller), collects their
data. Pins and board tracks are scarce, so the FPGAs talk over
multi-gigabit serial lanes instead of parallel buses. This RTL is that link:

- four serial lanes, each carrying 16-bit words as 8b/10b code at 20 bits per
  word (125 MHz words, 2.5 Gb/s per lane);
- a word aligner that finds the word boundary in the bit stream from a run
  of comma symbols;
- on the receiving side, one capture SRAM per lane, read by the ROC's
  processor over APB and cleared by it for the next capture.

A transmit side has two word sources: a test-pattern generator and a path
for 12-bit digitizer samples through a dual-clock FIFO.

It follows a design described in an internship report on Mu2e DRAC firmware.
That design was built from FPGA-vendor cores: a SerDes hard block, an 8b/10b
coding core, SRAM blocks and bus glue. Here these are replaced by plain
SystemVerilog with the same function. The sections at the end say where the
two differ.

## One lane, end to end

```
 transmit side (HV or CAL)                          receive side (ROC)
 generator_seq ─┐                                               ┌─ apb_ram ──── APB
                ├─► pcs_tx ─► serdes_lane ═ser═► serdes_lane ─► pcs_rx ┤  (data_to_sram,
 adc_fifo ─► adc_packer ┘  8b/10b    PISO        SIPO   align+decode  dc_ram,
   (src_adc selects)                                                 sram_apb_wrp,
                                                                     sram_refresh)
```

`drac_link_top` holds `N_LANES` (4) of these lanes. Both ends are in one module:
the transmit half of each lane stands for HV or CAL, the receive half for the
ROC. With `loopback` high every lane receives its own output, as in the bench
tests. With `loopback` low lane *n* receives `ser_rx[n]`, so two boards (or a
testbench) can be joined by wires. `apb_decoder` gives each lane's capture
block a 1 KiB window on the processor bus.

## Word alignment: why the link needs a run of commas

The deserializer (`serdes_lane`) hands over 20 bits per word clock, but it has
no idea where a word starts: after power-up or a cable change the 20 bits can
begin at any of 20 bit offsets. The 8b/10b code solves this with *commas*.
The 7-bit patterns `0011111` and `1100000` occur only at the start of the
K28.1, K28.5 and K28.7 control symbols. They never occur in any mix of data
symbols, nor across a symbol boundary. The one exception is K28.7 followed by
certain symbols, and neither word source here sends K28.7.

`pcs_rx` keeps the last two raw words as a 40-bit window. Each word clock it
checks all 20 offsets for a comma at the start of a word. While unlocked it
counts words in a row whose comma sits at the same offset. At `ALIGN_COMMAS`
(4) it locks that offset and raises `aligned`. A word without a comma, or a
comma at a different offset, starts the count again. The lock then holds until
`wa_rst_n` or `rst_n`. Two consequences for anything that transmits on this
link:

- **Send at least `ALIGN_COMMAS` comma words in a row** after the receiver is
  reset, and again after any disturbance. A single comma, or a few, is not
  enough, and the receiver then stays unaligned. `generator_seq` sends
  `N_COMMA` (16) of them every `N_DATA` (256) data words. The digitizer path
  sends one whenever it has no data.
- **The comma word is `{D21.5, K28.5}`** (`16'hB5BC`, `k = 2'b01`). Only byte 0
  holds a comma. Were the idle word two K28.5 symbols, the aligner would find a
  comma every 10 bits and could lock one byte off; with one comma per word the
  boundary is unique. `drac_pkg::COMMA_WORD` and `COMMA_K` define it.

Once aligned, each 20-bit word is decoded into two bytes. For each byte
`pcs_rx` reports a K flag, `code_err` (not a valid 10-bit symbol) and
`disp_err` (a valid symbol with the wrong running disparity). Running
disparity is taken from the commas seen while locking. A single flipped bit on
the line shows up as one of the two errors within a word or two. The lock is
*not* dropped on errors; only `wa_rst_n` restarts the search.

## 8b/10b coding details

`code8b10b_pkg` holds the code as functions, shared by encoder and decoder.
It is the standard code: a 5b/6b sub-block followed by a 3b/4b sub-block, each
with a form for negative running disparity and its complement for positive
disparity. The alternate D.x.A7 form is used where the standard requires it.
Control symbols K28.0–K28.7, K23.7, K27.7, K29.7 and K30.7 are encoded and
recognised.

- A 16-bit word is two symbols. `data[7:0]` is byte 0 and is sent first.
  `tx_k[i]` marks byte *i* as a control symbol.
- Symbols are written `code[9:0]` = bits *abcdei fghj* from left to right, and
  `code[9]` (*a*) goes on the wire first. The 20-bit lane word is
  `{symbol(byte 0), symbol(byte 1)}`, sent most significant bit first.
- Running disparity starts negative after reset. It carries from byte 0 to
  byte 1 and from word to word.
- `force_disp[i]` codes byte *i* at the disparity `disp_sel[i]` (1 = positive)
  rather than the current one, and the running disparity carries on from
  that symbol. `invalid_k[i]` reports a byte flagged as K whose value is none of
  the twelve control symbols; it is sent as the data symbol of that value. In
  `drac_link_top` the forcing inputs are tied low, and `tx_invalid_k` is
  brought out.
- Latency: `pcs_tx` registers its output (1 word clock). `pcs_rx` decodes
  and registers (1 word clock after the raw word that completes the symbol
  pair).

## Serializer and word clocks

`serdes_lane` is the digital core of a SerDes lane: a 20-bit parallel-in
serial-out shift register and a 20-bit serial-in parallel-out one, both on the
bit clock `ser_clk`. A counter divides `ser_clk` by 20 and makes the word
clock, which the lane drives out as `tx_clk` (and `rx_clk`, the same clock).
The encoder, pattern generator, packer, FIFO read side, decoder and SRAM write
port all run on it. The transmit word is loaded and the receive word captured
half a word after the word-clock edge, so both are stable around that edge.

What a real SerDes adds is not here: the PLL that makes the bit clock from a
125 MHz reference, the clock-data recovery that would give the receiver its
own clock, and the differential line drivers. The logic doesn't depend on
the rate: the original first ran at 100 MHz words (2 Gb/s), and later at
125 MHz (2.5 Gb/s), once its clock-routing problem was solved. The receiver uses the
transmitter's bit clock, which is exact in loopback. For a link between two
boards it assumes both run from one bit clock.

Because the word clocks come from the serializer, the serializer has its own
reset, `ser_rst_n`. Release it first. Then release `rst_n` while the word
clocks run, so that the logic they clock sees its reset.

## SRAM capture and the processor's view

Per lane, `apb_ram` joins four pieces:

| piece          | clock | job |
|----------------|-------|-----|
| `data_to_sram` | `rx_clk` | takes each received **data** word (K flags clear; commas are not stored), pairs two into one 32-bit word, first word in bits 15:0, writes it at a binary-counter address; raises `memory_full` with the write to the last address and drops words after that |
| `dc_ram`       | write `rx_clk`, read `PCLK` | 64 × 32-bit simple dual-port RAM, 1-clock read latency |
| `sram_apb_wrp` | `PCLK` | APB read slave: a read of offset 4·n returns RAM word n, with no wait states |
| `sram_refresh` | `PCLK` | APB clear slave: a write to its first word (`0x100` in the lane window) pulls `clr_n` low; `clr_n` stays low for at least `CLR_CYCLES` PCLK cycles and until `memory_full` (synchronized) reads 0; `clr_n` is also low during reset |

APB map (lane *n*, base `0x400·n`):

| offset        | access | content |
|---------------|--------|---------|
| `0x000–0x0FC` | read   | capture words 0–63: `{second 16-bit word, first 16-bit word}` |
| `0x100`       | write  | start a clear (data ignored) |
| `0x100`       | read   | `{30'b0, clearing, memory_full}` |
| past the last lane | any | PSLVERR |

A capture cycle as the processor sees it: wait for `memory_full` (or poll
`0x100` bit 0), read the 64 words, write `0x100`, and poll until bit 1 is
clear. The writer then starts again at address 0 with the next pair of words.
`clr_n` crosses into the receive clock domain through a two-flop synchronizer
in `data_to_sram`. It acts as that block's asynchronous reset, asserted at
once and released in step with `rx_clk`.

## Digitizer path

Hits in the straws come at an irregular rate, on the digitizer's clock, not
the link's. `adc_fifo` is a dual-clock FIFO (Gray-code pointers, 2-flop
synchronizers, depth `FIFO_DEPTH` = 16, show-ahead read). A sample written
while it is full is dropped, and `fifo_overflow` (sticky until `rst_n`) is set.
`adc_packer` turns the 12-bit samples into the encoder's 16-bit words, one word
per word clock, in one of two ways:

- `PACK_MODE = 0` (default): `{seq[3:0], sample[11:0]}`, one sample per
  word; `seq` counts samples modulo 16 so that gaps can be seen;
- `PACK_MODE = 1`: samples end to end, oldest in the lowest bits, four samples
  in three words: `w0 = {s1[3:0], s0}`, `w1 = {s2[7:0], s1[11:4]}`,
  `w2 = {s3, s2[11:8]}`.

When no full word is ready it sends the comma word, which also keeps the
receiver's alignment refreshed. `src_adc[n]` chooses lane *n*'s source.
While the pattern generator is selected the lane's FIFO is not read, so it
fills and overflows if samples keep coming.

## Parameters of `drac_link_top`

| parameter      | default | meaning |
|----------------|---------|---------|
| `N_LANES`      | 4   | lanes (four per SerDes interface in the original) |
| `MEM_WORDS`    | 64  | 32-bit words per capture SRAM |
| `N_COMMA`      | 16  | comma words per burst from the pattern generator |
| `N_DATA`       | 256 | data words between bursts |
| `ALIGN_COMMAS` | 4   | commas in a row needed to lock |
| `FIFO_DEPTH`   | 16  | digitizer FIFO depth (power of two) |
| `PACK_MODE`    | 0   | digitizer word format, see above |
| `CLR_CYCLES`   | 8   | minimum length of the clear pulse, in PCLK cycles |

`MEM_WORDS` must be a power of two ≤ 64 for the APB map above, since the
register sits at offset `4·MEM_WORDS`.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/code8b10b_pkg.sv rtl/drac_pkg.sv tb/tb_drac_link_top.sv \
    --top-module tb_drac_link_top -o sim
./obj_dir/sim
```

The testbenches give delays in nanoseconds, so keep the `--timescale`.
Replace the testbench file and top name for any other testbench. `tb/apb_bfm.svh`
holds the APB master tasks the bus testbenches include.

- `tb_drac_link_top` runs the whole design with default parameters, at 2.5 GHz
  bit clock, 100 MHz PCLK and 40 MHz digitizer clock. It runs in well under a
  second. It checks that all four lanes lock and fill, and that the counting
  pattern reads back exactly. It switches lane 2 to the digitizer path and
  checks 128 samples come back in order, and overflows lane 3's FIFO. It then
  moves to an external path with 0/5/11/17-bit delays, re-locks after a
  word-aligner reset, clears and re-captures. It flips one line bit to see an
  error flag, and reads past the last lane to see PSLVERR. It counts each of
  these events and fails if one never happened.
- `tb_link_eight_lanes` runs a controller taking both digitizer FPGAs:
  `N_LANES = 8` at 100 MHz words (2 GHz bit clock), with `PACK_MODE = 1`. Seven
  lanes send the test pattern; lane 7 carries 172 random samples, packed four
  to three words. The testbench checks every lane's capture over the single APB
  bus and all 64 packed words bit for bit, and that a read at `0x2000`
  returns PSLVERR.
- `tb_pcs_tx` checks published code words, then on 4000 random words checks
  symbol weight, disparity, run length ≤ 5 and commas only where a K28.5 is.
  It also checks forced disparity on either byte, and `invalid_k` for all
  256 byte values.
- `tb_pcs_rx` checks lock at offsets 0, 7, 13 and 19. It checks no lock on
  `ALIGN_COMMAS-1` commas, error-free decoding of 300 words, and error flags on
  flipped bits.
- The other testbenches check each block against a model written in the
  testbench (`tb_serdes_lane`, `tb_generator_seq`, `tb_data_to_sram`,
  `tb_dc_ram`, `tb_sram_apb_wrp`, `tb_sram_refresh`, `tb_apb_ram`,
  `tb_apb_decoder`, `tb_adc_fifo`, `tb_adc_packer`).

## How this relates to the original design

Taken from it:
- four lanes per SerDes interface;
- 16-bit words coded as two 8b/10b symbols with two control flags;
- 20-bit parallel lane width, 125 MHz words, 2.5 Gb/s;
- loopback testing;
- the need for a run of commas to synchronize;
- a counter-based test pattern whose two bytes carry the same count;
- the SRAM capture as a writer that waits for two words and addresses with a
  binary counter, a 64 × 32-bit SRAM with separate read and write clocks, an
  APB read slave, and an APB clear slave that pulses `clr_n` and checks
  `memory_full`;
- a FIFO between the digitizer clock and the link, and the two ways of
  filling 16 bits with 12-bit samples.

Choices made here, where the original gives no detail:
- the aligner's window search and `ALIGN_COMMAS` = 4;
- the comma-word format;
- comma burst length and period;
- byte and bit order;
- register stages and latencies;
- the APB address map;
- the clear pulse length and status register;
- FIFO depth and overflow handling;
- the 4-bit field in packing mode 0;
- the separate serializer reset.

Differences:
- The original's four-lane version simplified the SRAM clear and drove it
  from a processor signal; how it did so is not described. Here the clear is
  the APB write of the earlier single-lane version, now one register per lane.
- Only one SerDes interface (four lanes) is built by default. A ROC taking
  HV and CAL at the same time needs eight receive lanes (`N_LANES = 8`, as
  `tb_link_eight_lanes` runs it, or two instances). In the original, that
  case ran into timing problems, so four lanes stays the default. A link is
  always fully duplex here, whereas the original considered transmit-only and
  receive-only ends.
- The vendor SerDes' receive-status signals (data valid, idle) and the
  capture block's unused interrupt output are not modelled: received bits
  are always taken as valid.
- The alternative link considered in the original is not built: 16-bit words
  at 156.25 MHz with no line code, which suffered bit slips.
- Not included at all:
  - the Cortex-M3 processor subsystem: its APB master is the `apb_req` /
    `apb_rsp` ports;
  - the SerDes initialization block, reset and configuration cores,
    oscillator, PLL, clock buffers and the few glue gates of the system
    design;
  - the analog part of the SerDes;
  - the digitizers themselves.
- Timing closure (the original's main difficulty, solved by keeping the
  receive clocks on local rather than global routing) is a matter of
  constraints and place-and-route, not of this RTL.

## Files

- `rtl/drac_pkg.sv`: shared constants (comma word) and the APB request and
  response structs.
- `rtl/code8b10b_pkg.sv`: 8b/10b encode/decode functions.
- One module per file for the rest of `rtl/`, named as above.
