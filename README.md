# DPS-4D preprocessor FPGA

An ionospheric sounder receives on four antennas at two sounding frequencies
at once. Its digital receiver card has two GrayChip digital down converters,
one per frequency, each delivering the I and Q samples of all four antennas
as a stream of 4-bit nibbles. The host computer (the DDESC) wants these
samples the other way round: sorted by frequency, then by antenna, then by
height (range gate). That is how it processes them.

The preprocessor FPGA does the reordering without a separate sorting pass.
It rebuilds 16-bit words from the nibbles and interleaves the two
frequencies. It then writes every word straight to the place in external
SRAM where it belongs in the sorted record: the SRAM address *is* the sort.
Two SRAMs work as a ping-pong pair:

* **Sampling** (receive window open, `SAMPLE_N` low): new samples go into
  Memory 1, sorted. Meanwhile the DDESC reads the previous record out of
  Memory 2 through an IDE port.
* **Copying** (between windows): the new record is copied from Memory 1 to
  Memory 2, and `INTRQ` tells the DDESC that a record is ready.

```
 GrayChip 1 --4--> nibble_assembler --16--\
                                           interlace_a_and_b --> mem_switch --> Memory 1 (256K x 18)
 GrayChip 2 --4--> nibble_assembler --16--/                          |  ^
                                                   copy_engine <-----+  |
                                                   copy_engine ------> mem_switch --> Memory 2 (256K x 18)
                                                   ide_interface <---> mem_switch <--> Memory 2
 CIT_ON, SAMPLE_N --> phase_controller --> phase, INTRQ           ide_interface <--> DDESC (IDE)
```

All of this is `rtl/preprocessor_top.sv`. The two SRAM chips are outside
the FPGA. The top brings out one synchronous SRAM port for each of them.

## The sorted address

Everything hinges on one 18-bit address layout (defined in `rtl/dps_pkg.sv`):

| bits    | field     | meaning                                   |
|---------|-----------|-------------------------------------------|
| 17      | frequency | 0 = frequency 1, 1 = frequency 2          |
| 16:15   | antenna   | antennas 1..4, regions 0x08000 words apart |
| 14:11   | spare     | always 0                                  |
| 10:1    | height    | sample (range gate) number, up to 1023    |
| 0       | q         | I word (0) or Q word (1)                  |

So frequency 1 antenna 1 starts at 0x00000, antenna 2 at 0x08000, antenna 3
at 0x10000 and antenna 4 at 0x18000. Frequency 2 antenna 1 starts at 0x20000,
and so on. Read linearly within each region, a record is "heights 1 to 256"
for that frequency and antenna.

The samples *arrive* in another order. For each height the receiver sends
antennas 1..4, and for each antenna the I word and then the Q word. The two
frequencies arrive in parallel. The interleaver keeps one 14-bit counter of
words written, with the fields in arrival order:

```
count = { height[9:0], antenna[1:0], q, frequency }     (frequency changes fastest)
addr  = { frequency, antenna[1:0], 4'b0000, height[9:0], q }
```

Incrementing the counter walks the arrival order. Rearranging its bit fields
gives the sorted address. The sort costs nothing but wiring.

## Blocks

### nibble_assembler (one per GrayChip)

This block shifts nibbles into a 12-bit register. On the fourth nibble it
copies the whole word into a holding register and raises `word_valid`.
`nib_first` marks the first nibble of each word. The first nibble becomes the
most significant. The word stays put until the next word is complete, so the
interleaver gets a full word time to take it. `take` or `clear` drops
`word_valid`. Nibbles before the first `nib_first` after reset or `clear` are
ignored.

### interlace_a_and_b (the interleaver)

This is a small state machine. It waits in S1 until both assemblers have a
word (`rdy_in`), then captures both words (`take`). It writes A (frequency 1)
and then B (frequency 2):

```
S1 -> S2 S3 S3A S3B S3C S4 S5 -> S2 S3 S3A S3B S3C S4 S5 -> S1
      \__/ write A                \__/ write B
```

The write strobe `rdy_out` is high for two clocks (S2, S3), with address and
data steady. S3A to S3C are wait states. The counter steps on entering S4. In
S5 the frequency bit of the counter decides between writing B next and going
back to S1. An accepted pair keeps the machine busy for 15 clocks, so each
GrayChip may deliver at most one word every 16 clocks. An assertion in
`nibble_assembler` reports a word that completes before the previous one was
taken.

### phase_controller

This block synchronises `SAMPLE_N` and `CIT_ON` (two flip-flops each) and
moves the card through IDLE -> SAMPLING -> COPYING -> IDLE.

* A window opens when `SAMPLE_N` goes low. The pulse `samp_start` clears the
  assemblers and resets the interleaver's counter, so each record starts at
  height 0.
* The window closes when `SAMPLE_N` is high again *and* the interleaver is
  back in S1. The number of complete heights is latched. A partly received
  last height is left out of the record.
* Copying ends with `copy_done`. The pulse `record_ready` then loads the IDE
  side and raises INTRQ.
* If `SAMPLE_N` falls while a copy is still running, the new window starts
  when the copy ends. Samples sent before then are lost.
* `CIT_ON` low returns to IDLE at once and flushes the IDE side.

The first window after `CIT_ON` therefore produces no INTRQ until its own
copy is done. Each later window is read out during the next one.

### copy_engine

This block walks the record in read order: frequency, antenna, height, I/Q.
It issues one Memory 1 read per clock and writes each word to the same
address in Memory 2 one clock later. Only the 16 x H words of the record are
copied. A copy of H heights keeps the card in the copying phase for
16·H + 3 clocks (4099 clocks for 256 heights).

### mem_switch

This block is a pair of multiplexers. While copying, Memory 1 and Memory 2
both belong to the copy engine. At all other times, Memory 1 takes the
interleaver's writes and Memory 2 serves the IDE port's reads.

### ide_interface

This is a minimal, read-only ATA PIO device:

| CS0_N | DA | read returns                                            |
|-------|----|---------------------------------------------------------|
| 0     | 0  | the current data word; the end of the read moves to the next word |
| 0     | 7  | status: bit 7 BSY, bit 6 DRDY, bit 3 DRQ; clears INTRQ  |

On `record_ready` the port rewinds to the first word of the record and
prefetches it from Memory 2. The host reads 16 x H words in the order
frequency 1 antenna 1 heights 1..H (I, Q each), then frequency 1 antenna 2,
and so on up to frequency 2 antenna 4. DRQ means a word is waiting. BSY is
set while copying or while a fetch is in flight. Timing rules:

* CS0_N and DA must be steady 2 clocks before DIOR_N falls.
* DIOR_N must stay low for at least 4 clocks.
* The next word is on DD 5 clocks after DIOR_N rises.

`dd`/`dd_oe` stand for the bidirectional DD bus, for a pad to combine. The
host must finish reading a record before the next copy overwrites Memory 2.

## Interfaces of the top

* **Clock and reset:** one clock (`clk`). The reset (`reset`) is
  asynchronous and active high.
* **GrayChip inputs:** `gcN_nib[3:0]`, `gcN_valid` (one nibble per strobe)
  and `gcN_first`, for N = 1 (frequency 1) and 2 (frequency 2). They are
  sampled on `clk` and accepted only while sampling.
* **Timing inputs:** `cit_on` and `sample_n`. They may be asynchronous.
* **SRAM ports:** `m1_req`, `m2_req` are `dps_pkg::sram_req_t` structs
  (`addr[17:0]`, `we`, `re`, `wdata[15:0]`). `m1_rdata`, `m2_rdata` carry the
  read data, one clock after `re`. Only 16 of the 18 data bits of the
  256K x 18 parts are used. A write is held for two clocks at the same
  address (the interleaver's two-clock strobe), which is harmless for a
  synchronous SRAM.
* **IDE port:** `ide_cs0_n`, `ide_da[2:0]`, `ide_dior_n`, `ide_dd[15:0]`,
  `ide_dd_oe`, `ide_intrq`.
* **Status:** `phase` (idle / sampling / copying).

## What follows the original design and what does not

**Taken from the original preprocessor card:**

* the block structure
* the 4-bit and 16-bit widths
* the 256K-word memories
* the address layout and the interleaver's states, strobe and counter fields
* the sampling and copying phases
* INTRQ after each copy
* the output order of the record

**Choices made here, where the original leaves things open:**

* the nibble framing signal and the nibble order
* the handshakes between blocks (`word_valid`/`take`, `clear`, `idle`)
* capturing A and B when a pair is accepted. The original reads B a few
  clocks later.
* the synchronisers and the late-window and CIT_ON-flush rules
* copying only complete heights
* the SRAM port timing (synchronous, one clock read latency)
* the whole IDE register set and timing
* reading `q` as the I/Q select

**Not included:**

* DMA on the IDE port
* IDE writes or commands
* the planned RFI mitigation and twin-frequency decoding
* any preprocessing of the samples

A board with two preprocessor cards would use two instances of the top.

Limits of this design:

* The height field allows 1023 complete heights per window. The counter wraps
  beyond that.
* The clock rate is not fixed. Whether a 4099-clock copy fits between two
  windows depends on the clock rate and the pulse timing.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The SRAMs are modelled by `tb/sram_model.sv`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dps_pkg.sv tb/tb_preprocessor_top.sv --top-module tb_preprocessor_top -o sim
./obj_dir/sim
```

Swap in another testbench name to run it the same way:

| testbench                | what it checks |
|--------------------------|----------------|
| `tb_nibble_assembler`    | random words with gaps, alignment, holding, clear, the 0x3E7A example |
| `tb_interlace_a_and_b`   | 680 words: sorted addresses, A/B data, two-clock strobe, 1/7/15-clock timing |
| `tb_phase_controller`    | phase order, pulse widths, 3-clock latency, wait for the interleaver, late window, CIT_ON flush |
| `tb_copy_engine`         | full-memory comparison after copies of 256, 3, 0 and 1023 heights; copy time |
| `tb_mem_switch`          | routing in every phase |
| `tb_ide_interface`       | host reads of whole records, INTRQ/DRQ/BSY behaviour, flush, one fetch per word |
| `tb_preprocessor_top`    | end to end, default size: 4 windows of 256 heights, one window cut off by CIT_ON, one of 3 heights plus a partial height |

`tb_preprocessor_top` runs the design with no parameter overrides. It drives
both GrayChips at one nibble per 6 clocks and acts as the DDESC host. It
checks every word of every record against the value the testbench gave that
sample. It also checks:

* the Memory 1 writes per window
* the length of each copying phase
* that each of these happened at least once: a window opening during a copy,
  a CIT_ON flush, a partial height, and BSY seen during a copy

The whole run takes well under a minute.
