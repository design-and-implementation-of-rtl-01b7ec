# 12-lane capture into DDR2 with RS232 read-back

This design streams data from a 12-channel image sensor into a DDR2 memory
on an FPGA and reads it back. The sensor sends 12 serial lanes with a bit
clock and a line strobe. The lanes are packed into 256-bit words and buffered
in on-chip FIFOs. The words are written to DDR2 through the memory
controller's user interface. Once a fixed amount (200 Mbit) has been stored,
everything is read back and sent to a PC over a slow RS232 link, where it can
be checked.

The main idea is to decouple three very different rates:

- the sensor's continuous, unstoppable bit stream;
- the bursty, much faster DDR2 write path;
- the very slow serial read-out.

Two 256 x 1024 FIFOs, and simple rules for when to drain or refill them, do
this.

The RTL follows a published design of this system built with a Virtex-5
board, the vendor's DDR2 controller and a Spartan-6 board as the data source.
That description gives:

- the block structure;
- the word format;
- the buffer sizes;
- the 90 % fill rule;
- the address step;
- the block-wise read-back.

It leaves clocking, handshakes, bit placement and the serial format open.
Those are this design's own choices, listed in
[Choices and departures](#choices-and-departures).

## Block diagram

```
            src_* (test source, separate FPGA)      ddr2_capture_top
  detector_simulator ──lanes/strobe/bit clock──►┌─────────────────────────────────────────────┐
                                                │ lvds_deserializer (negedge lvds_clk)        │
                                                │      │ 256-bit word                         │
                                                │ async_fifo 256x1024  (lvds_clk ─► clk)      │
                                                │      │                                      │
                                                │ ddr2_write_transaction ◄── address_generator│
                                                │      │ app_af_* / app_wdf_*       ▲         │
                                                │      ▼                            │         │
                                   DDR2 controller (vendor IP, outside) ◄──────────┤         │
                                                │      │ rd_data_*                  │         │
                                                │ ddr2_read_transaction ────────────┘         │
                                                │      │                                      │
                                                │ sync_fifo 256x1024 (FIFO_UART)              │
                                                │      │                                      │
                                                │ word_to_uart ─► uart_tx ─► uart_txd_o        │
                                                │ rw_sequencer: write phase / read phase      │
                                                └─────────────────────────────────────────────┘
```

| File | Role |
|---|---|
| `rtl/ddr2_pkg.sv` | Shared widths: word format, DDR2 geometry, controller command codes |
| `rtl/lvds_deserializer.sv` | 12-lane sampler and 256-bit word packer |
| `rtl/async_fifo.sv` | Dual-clock input FIFO (256 x 1024) |
| `rtl/ddr2_write_transaction.sv` | 90 %-triggered burst drain of the input FIFO into DDR2 writes |
| `rtl/address_generator.sv` | Shared read/write address counter: bank, row, column |
| `rtl/ddr2_read_transaction.sv` | Block reads from DDR2 into FIFO_UART |
| `rtl/sync_fifo.sv` | FIFO_UART, the output FIFO (256 x 1024) |
| `rtl/word_to_uart.sv` | Splits each word into 32 bytes for the UART |
| `rtl/uart_tx.sv` | 8N1 RS232 transmitter |
| `rtl/rw_sequencer.sv` | Write-volume-then-read sequencing, DDR_READ_START |
| `rtl/detector_simulator.sv` | Test source that stands in for the sensor |
| `rtl/ddr2_capture_top.sv` | Top level |

Not in the RTL:

- **The DDR2 controller and PHY.** They are vendor-generated IP. Their user
  interface is brought out as the `app_*` and `rd_data_*` ports.
- **The DDR2 device.**
- **The differential input buffers.** The `lvds_*` inputs are their
  single-ended outputs.

## The capture word

Each lane delivers 10-bit samples, one bit per bit-clock period. The bits are
sampled on the **falling** edge of the source bit clock while STROBE is high.
After 20 bits per lane (two frames of 12 x 10 bits = 240 bits) one word is
complete. The layout is:

```
word[f*120 + c*10 + 9 - b] = bit b of lane c in frame f     (b = 0 is the first bit received)
word[255:240]              = 0                              (padding)
```

So:

- frame 0 occupies bits 119:0 and frame 1 occupies bits 239:120;
- lane c's sample sits in bits `c*10+9 : c*10` of its frame, most
  significant bit first.

When STROBE drops, the bit offset returns to zero and a partially received
word is discarded. `word_valid_o` pulses for one bit-clock period after the
20th falling edge of a word.

## Input buffering and the 90 % rule

Capture cannot be paused, so the words go into a 256 x 1024 dual-clock FIFO.
Its write side runs on the source bit clock and its read side on the
controller clock. The write and read positions (WRPOS, RDPOS) cross the clock
domains as Gray code through two-flop synchronisers.

`ddr2_write_transaction` works in bursts:

1. It waits until the FIFO holds at least `THRESH` = 921 words (90 % of 1024,
   rounded down).
2. It reads the FIFO from RDPOS 0 up to the last location (RDPOS reaching
   FIFOCAP). For each word it issues one write command and two 128-bit data
   beats: bits 127:0 first, then 255:128.
3. After the word from location 1023 has been written, the burst ends. The
   writer then waits for the next 90 % fill. By then the write position has
   wrapped, so the next burst again starts at RDPOS 0.

The writer is much faster than the source, so it catches up with the write
position and then waits on an empty FIFO for the remaining words of the burst
(`wr_stall_empty_o`).

A current-word register and a one-word skid register hide the FIFO's
one-clock read latency. Without back-pressure, one word leaves every two
controller clocks: the command plus beat 0, then beat 1.

- `app_af_afull_i` holds back beat 0, which carries the command.
- `app_wdf_afull_i` holds back either beat.

Because a burst always moves a whole FIFO load, the stored volume should be
a multiple of 1024 words. 200 Mbit is exactly 800 bursts.

Words that arrive while the input FIFO is full are dropped and counted
(`words_dropped_o`). During the write phase this cannot happen unless the
controller stalls for longer than the FIFO's slack (about 100 words of
source time). It does happen on purpose once writing has stopped and the
source keeps running.

## DDR2 addressing

The memory is 128 MB with a 64-bit word: 4 banks x 8K rows x 512 columns.
One 256-bit word fills four consecutive columns (a burst of four 64-bit
words), so the address advances by 4 per word.

`address_generator` counts 64-bit locations. It presents them as
`app_af_addr = {zero fill, bank[1:0], row[12:0], column[8:0]}`, so the
walk goes through the columns of a row, then the rows of a bank, then the
banks. One counter serves both transactions. The sequencer clears it at the
start of the write phase and again at the start of the read phase, so the
read-back starts at location 0. After the last burst of the memory the
counter wraps and pulses `addr_wrap_o`.

## Read-back: DDR_READ_START and FIFO_UART

After `VOLUME` words have been written and the writer is idle,
`rw_sequencer` switches to reading. Whenever FIFO_UART is empty and no read
is in progress, it raises DDR_READ_START (`ddr_read_start_o`) for one clock.
With it comes a block size of min(1024, words left).

`ddr2_read_transaction` then:

- issues that many read commands;
- joins the returned 128-bit beats (low half first) into words;
- writes the words into FIFO_UART.

The controller's read data path cannot be stalled. Asking for at most one
FIFO load while the FIFO is empty is what makes this safe.

`word_to_uart` takes one word at a time and sends it as 32 bytes:

- the 64-bit fields in order of location: `[63:0]`, `[127:64]`, `[191:128]`,
  `[255:192]`;
- each field with its most significant byte first.

A hex dump of the serial stream therefore shows each memory location as one
16-digit number. `uart_tx` sends 8 data bits, no parity and one stop bit,
LSB first. With the defaults this is 115200 baud from a 200 MHz clock
(`CLKS_PER_BIT` = 1736). When the last word has been sent, `done_o` rises
and a new `start_i` begins another acquisition.

An acquisition can also be cut short. `read_req_i` stops the write phase
after the burst in progress: no new burst starts, and the read phase then
returns every word written so far. The read phase always returns exactly
the words that were written. Normally that is `VOLUME`.

## Test source and pattern

`detector_simulator` plays the sensor. It divides its clock by two to make
the bit clock, and changes lanes and STROBE with the bit clock's rising edge
so that they are stable at the sampling edge. It sends lines of `LINE_WORDS`
words separated by `GAP_BITS` idle bit periods.

Its data is the inverse of the packing above, chosen so that word n carries
the values 4n, 4n+1, 4n+2 and 4n+3 in its four 64-bit fields. Once stored,
**every 64-bit DDR2 location holds its own location number**, which makes
errors easy to spot in the read-back. The top 16 bits of every fourth
location are the zero padding.

## Clocks, resets and timing

- `lvds_clk` domain: `lvds_deserializer` (falling edge) and the input FIFO
  write side (rising edge). Reset is `lvds_rst`, which is synchronous, so
  the bit clock must be running while it is held.
- `clk` domain: everything else, including the UART. Reset is `rst`,
  synchronous.
- `src_clk` domain: the test source. Reset is `src_rst`.
- All resets are active high.

| Path | Timing |
|---|---|
| Bits into the capture word | 20 bit-clock periods per word |
| Input FIFO | 1 controller clock read latency, plus 2–3 clocks of synchroniser delay for its level |
| Write transaction | 2 controller clocks per word with no back-pressure |
| Read transaction | 1 command per clock while `app_af_afull_i` is low |
| UART | 10 x `CLKS_PER_BIT` + 1 clocks from one byte to the next |

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `IN_DEPTH` | 1024 | Input FIFO depth (256-bit words) |
| `OUT_DEPTH` | 1024 | FIFO_UART depth and read block size |
| `VOLUME` | 819200 | Words stored per acquisition (200 x 2^20 bits / 256) |
| `CLKS_PER_BIT` | 1736 | UART bit time in controller clocks |
| `B_W`, `R_W`, `C_W` | 2, 13, 9 | Bank, row and column address widths |
| `LINE_WORDS`, `GAP_BITS` | 64, 4 | Test source line length and gap |

The following come from the original design:

- the word format (12 lanes, 10 bits, 2 frames, 256 bits);
- the FIFO sizes;
- the DDR2 geometry;
- the volume.

The UART rate and the test-source line shape are this design's choices.

## Choices and departures

These points are not fixed by the original description and were chosen here:

- **Bits per word.** The original text gives both "10 bits per channel, two
  frames" and "20 bits" and "16 bits" per channel. This design uses 20 bits
  per lane, the only reading that gives 240 data bits plus 16 padding bits.
- **Bit placement inside the word.** The layout given above, with each
  sample MSB first.
- **STROBE is treated as a level** (line active), not as a one-clock pulse.
- **Dual-clock input FIFO** with Gray-code pointers. The original only names
  WRPOS, RDPOS, FIFOFULL and FIFOEMPTY.
- **90 % threshold rounded down** to 921 words.
- **Controller interface.**
  - Commands, data and read data follow the vendor DDR2 controller's
    Virtex-5 user interface: 128-bit data, two beats per 256-bit word, and
    command codes 000 for write and 001 for read.
  - The original says 256 bits are written "per clock cycle". That holds at
    the memory's double data rate, not at the user interface.
- **Address field order** `{bank, row, column}` and a linear walk through it.
- **UART**: 8N1 at 115200 baud with raw bytes. Each 64-bit field is sent
  MSB first, fields in order of location.
- **Acquisition control**: an external `start_i` begins an acquisition
  and an external `read_req_i` ends writing early. The original describes
  reads and writes initiated by an external input, without detail.
- **Overflow**: words are dropped and counted rather than back-pressuring
  the source, which cannot be stopped.

## Simulation

Testbenches are self-checking. Each ends with the line
`TB_RESULT checks=<n> failures=<n>`. To run one with plain Verilator from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_ddr2_capture_top \
          rtl/ddr2_pkg.sv tb/tb_ddr2_capture_top.sv -o simv
./obj_dir/simv
```

`tb/mig_ddr2_model.sv` is a behavioural model of the DDR2 controller and
memory. It:

- queues commands and data;
- executes one command every two clocks;
- stores each 64-bit location in a sparse array;
- returns read data after a fixed latency;
- can raise its almost-full flags at random to exercise back-pressure.

| Testbench | What it shows |
|---|---|
| `tb_ddr2_capture_full` | The top at **all default sizes**. It runs the whole write phase of a 200 Mbit acquisition: 800 bursts of 1024 words, with every one of the 3,276,800 locations checked. It then follows the first DDR_READ_START block and decodes the first two words on the RS232 line. It takes about 40 s. |
| `tb_ddr2_capture_top` | End to end at reduced sizes (FIFOs of 16 and 8 words, 48 words, fast UART, small rows). It checks memory contents, every byte on the serial line and the address sequence. It also counts each mechanism: 90 % bursts, empty-FIFO waits, controller back-pressure, row and bank changes, the write-to-read switch, repeated DDR_READ_START, input overflow, and a second acquisition ended early by `read_req_i`. |
| `tb_lvds_deserializer` | Bit placement, padding, 20-edge word latency, STROBE drop |
| `tb_async_fifo` | Two unrelated clocks with random traffic: order, full and empty flags, RDPOS, level |
| `tb_sync_fifo` | Order, exact level and flags |
| `tb_address_generator` | Field split, step of 4, carries, wrap, full-size row step |
| `tb_ddr2_write_transaction` | 90 % trigger, RDPOS 0..1023 burst, empty waits, beat order, 2 clocks per word, back-pressure |
| `tb_ddr2_read_transaction` | Block sizes, addresses, beat joining, done timing, back-pressure |
| `tb_rw_sequencer` | Write volume, address clears, DDR_READ_START only when FIFO_UART is empty, blocks of 8, 8, 4, early stop by `read_req_i` |
| `tb_word_to_uart` | Byte order and word pacing |
| `tb_uart_tx` | Line checked on every clock of every bit, and byte time |
| `tb_detector_simulator` | The location-equals-value pattern after packing, and line and gap lengths |

Reading back the full 200 Mbit at 115200 baud would take about 38 minutes of
real time (26,214,400 bytes x 10 bits). It is not simulated at full size. The
complete write-then-read-back cycle, serial output included, is simulated at
the reduced sizes of `tb_ddr2_capture_top`.

## Limits of trust

- The DDR2 side is checked only against a behavioural model of the
  controller's user interface, not against the vendor's controller or a
  memory model with real DDR2 timing. The timing parameters (tRAS, tRP,
  refresh) are entirely the controller's business.
- The clock-domain crossing is a standard Gray-code FIFO. It is simulated
  with unrelated clocks, but not analysed for metastability.
- FIFO memories are written as arrays with a registered read. FPGA synthesis
  maps them to block RAM.
