# Correlator card logic: analog sums and microcoded read-out

This is synthesizable SystemVerilog for the programmable logic of one correlator
card of a radio-astronomy correlator. The card carries an 8 x 8 array of
correlator ASICs (64 chips). Thirteen FPGAs surround them and do two jobs:

* **Analog sum.** Five *Analog Sum* FPGAs sit along the bottom edge. They pass
  the antenna data buses on to the ASICs, optionally swapping in test data.
  Every clock they also add the 2-bit samples of up to 64 antennas, separately
  for each of the two memories M0 and M1, and send the two 8-bit sums out.
* **Read-out.** Eight *Dataout* FPGAs each serve one row of eight ASICs. A small
  microcoded sequencer in each one walks through the correlator
  *intersections* once per millisecond. For every intersection marked for
  transfer, the FPGA that owns that intersection clocks 256 results out of the
  right ASIC. The eight byte streams merge along a chain into one 8-bit,
  125 MHz stream that leaves the card. The Dataout FPGAs also load the ASICs'
  control words and strobe them in during a blanking period.

The top module is `correlator_card`. The ASICs, LVDS drivers, clock tree and
the board microcontroller's CPLD are not part of this code. Their signals are
ports of the top module.

Clocks: everything runs on one 125 MHz clock (`clk`, 8 ns). The Dataout logic
does its work every other clock, using an enable `ce` (62.5 MHz, one
*instruction cycle* = 16 ns). A second clock `clk90`, 90 degrees behind `clk`,
is used only by the output delay stages to get quarter-cycle steps. Reset
`rst` is synchronous and active high.

## 1. Antenna data and the 2-bit sum

Each 16-bit antenna bus carries four 2-bit antennas for memory M0 in bits 7:0
and four for M1 in bits 15:8. Antenna 0 is the lowest bit pair. A sample stands
for a weight:

| code | 01 | 00 | 11 | 10 |
|------|----|----|----|----|
| weight | +3 | +1 | -1 | -3 |

so weight = 2·lsb + 1 − 4·msb. Every weight is odd, so the sum of two weights is
even. The adders therefore carry *half* the true sum from the first stage on.
For a pair (w x) + (y z) the halved sum is x + z + 1 − 2(w + y). Its lsb is
XNOR(x, z), so no carry chain is needed for bit 0 (`two_bit_adder`). The halved
widths grow by one bit per doubling:

| antennas | 2 | 4 | 8 | 16 | 28/32 | 56/64 |
|---|---|---|---|---|---|---|
| halved sum bits | 3 | 4 | 5 | 6 | 7 | 8 |

**Masking.** Each bus has an 8-bit mask, one bit per antenna. A masked antenna
reads as code 00 (weight +1), so it adds +1/2 to the halved sum. To cancel
that, the middle FPGA adds a per-memory offset byte before the output. The
software writes offset = −(masked antennas / 2), truncated. With an odd number
of masked antennas, 1/2 LSB of bias is left over.

## 2. The analog-sum tree and its pipeline

The sixteen antenna buses are split over the five FPGAs as follows. Each
FPGA's `bus_in`/`bus_out` array holds its share in this order:

| FPGA | module | buses | local antennas per memory |
|---|---|---|---|
| 0 (end) | `asumend` | 0–3 | 16 |
| 1 | `asum2nd` | 4–6 | 12 (one MAIN/AUX pair + one MAIN-only bus) |
| 2 (middle) | `asummid` | 7–8 | 8 |
| 3 | `asum2nd` | 9–11 | 12 |
| 4 (end) | `asumend` | 12–15 | 16 |

The partial sums flow from the ends toward the middle: 16 → 28 (= 16 + 12) →
64 (= 28 + 28 + 8). All adders are registered except the 28 + 28 adder in the
middle FPGA. If the buses enter at clock T, the sums are ready as follows:

| clock | where |
|---|---|
| T+1 | test multiplexer output (bus goes on to the ASICs) |
| T+2 | 8-antenna sums (`bb8ant`) |
| T+3 | 16-antenna sums (end) / 12-antenna sums (second) |
| T+4 | end FPGA output register |
| T+5 | second FPGA: input register; own 12-sums delayed 2 clocks to line up |
| T+7 | second FPGA output register (28-antenna sums) |
| T+8 | middle FPGA input register; its own 8-sums delayed 6 clocks to line up |
| T+9 | 28 + 28 + 8 (`FINALADD`) |
| T+10 | offset added (`add_offset`) |

After T+10 comes `quad_delay`. It adds 0–3 whole clocks plus 0, ¼, ½ or ¾ of a
clock per output byte, so the receiving end can capture the byte safely. The
amounts come from the OUTCTRL register: M0 uses bits 3:2 (whole clocks,
inverted: 3 − n) and 1:0 (quarter clocks). M1 uses bits 7:6 and 5:4. The reset
value 0xCC means no delay.

The two-clock and six-clock delays are as described for the original card. Where
the registers sit is this design's choice, made so that those delays come out
exactly.

### Test and diagnostic logic in each Analog Sum FPGA (`asum_core`)

* **Test multiplexer** (`testmux`, one per bus, CONTROL[2:0]): 0–3 all zeros,
  4 normal data, 5 an 8-bit counter on both bytes, 6 pseudo-random data,
  7 all ones. The counter restarts on the 16 ms pulse.
* **Random generator** (`datagen`): a 32-bit LFSR, x^32 + x^22 + x^2 + x + 1,
  stepped 16 times per clock. Its low 16 bits are the random word. Four byte
  writes (lsb first) set the seed, and the 16 ms pulse reloads it, so all
  FPGAs produce the same sequence. A zero seed is replaced by 1. CONTROL[7] in
  the middle FPGA sends the random word out instead of the sums (low byte on
  M0, high byte on M1).
* **Stream checker** (`pncheck`): seeds itself from two words of the selected
  bus, runs its own copy of the generator, and counts words that differ
  (saturating 16-bit count).
* **Logic analyzer** (`la_ram`, one per bus): 256 x 16 bits. A write clears
  it; it then records 256 consecutive bus words and freezes.

## 3. Dataout FPGA timing (`do_timing`)

The card receives a 16 ms sync pulse. Each Dataout FPGA delays it by
4 − (number of merge registers between it and Dataout 0) clocks. That makes
all eight FPGAs' streams line up when they reach the card output. The delayed
pulse:

* aligns `ce`;
* restarts COUNT, a counter that advances on `ce` and wraps after 62 500
  counts (1 ms);
* sets the millisecond number MSEC to 15.

Each wrap gives the one-cycle *millisecond strobe* `msstb` and advances MSEC.
So the first strobe, 1 ms after the sync, starts millisecond 0.

Two small RAMs, each with two banks chosen by BANK bits 4 and 5, shape the ASIC
timing signals:

* **BLANKING** comes from RAM address {bank, COUNT[15:6]}, in 1.024 µs steps.
  By default locations 4 and 5 are set, giving a 2 µs pulse 4 µs into every
  millisecond.
* **DUMPENBL** comes from RAM address {bank, MSEC, COUNT[15:10]}, in
  16.384 µs steps. By default it is high only for the first 16.384 µs of
  millisecond 0.

## 4. The microcoded sequencer (`do_sequencer`)

This is the heart of the read-out and the part that needs the most care.

**Program RAM and word format.** The program RAM holds 256 words of 16 bits.
Bits 15:6 are one-hot operation bits; all zero means NOOP. Several bits may be
set in one word. Bits 5:0 are a 6-bit field A.

| bit | name | action |
|---|---|---|
| 6 | HOLD | freeze the PC until the next `msstb` |
| 7 | JUMPUP | PC ← UPADDRESS |
| 8 | JUMPSEQ | PC ← {UPADDRESS[7:6], A} |
| 9 | LDINTCTR | intersection counter ← {10, A} |
| 10 | LOOPINT | unless the intersection counter is FF: jump to A; count up |
| 11 | PAUSE | result counter ← {11, A}; freeze the PC until it reaches FF |
| 12 | LDSELCTR | block counter ← {11, A} |
| 13 | LOOPSEL | unless the block counter is FF: jump to A; count up |
| 14 | RDCLKENBL | read one result from the addressed ASIC this cycle |
| 15 | JUMPXFER | jump to A if the transfer RAM says "transfer" |

**Pipeline register.** The RAM output is registered (PROGWRD), so a word
executes one instruction cycle after it is fetched. This has two
consequences, and the default program is written around both:

* **Delay slot.** The word after every jump is always executed.
* **Double HOLD.** A HOLD must be followed by a second HOLD. While the first
  one freezes the PC, the pipeline has already fetched the second, and that
  second word keeps being re-executed.

A PAUSE behaves the same way: the word after it is re-executed on every
paused cycle.

**Program selection.** `msstb` loads the PC with {UPADDRESS[7:5], 00000}, so
the RAM holds up to eight 32-word programs. The same strobe replaces the word
in the pipeline with a NOOP. Jump targets always keep UPADDRESS[7:6] as their
top bits. After reset the sequencer idles until the first `msstb`.

**The default program**:

```
00  0220  LDINTCTR 20        int counter = A0 (96 intersections: A0..FF)
01  0826  ILOOP: PAUSE 26    wait
02  0000  NOOP
03  800A  JUMPXFER SELLOOP   transfer this intersection?
04  1030  LDSELCTR 30        (delay slot) block counter = F0: 16 blocks
05  0401  LOOPINT ILOOP      skip: next intersection
06  0000  NOOP               (delay slot)
07  0040  HOLD               all done: wait for the next millisecond
08  0040  HOLD
0A  0831  SELLOOP: PAUSE 31  15 more cycles, re-executing the next word:
0B  4000  RDCLKENBL          -> 16 results in a row
0C  083D  PAUSE 3D           gap
0D  0000  NOOP
0E  200A  LOOPSEL SELLOOP    next block of 16
0F  0000  NOOP
10  0401  LOOPINT ILOOP      next intersection
11  0000  NOOP
12  0040  HOLD
13  0040  HOLD
```

Measured on this RTL:

* a skipped intersection takes 32 instruction cycles;
* a transferred one takes 416: 16 bursts of 16 RDCLKENBL cycles, one burst
  every 24 cycles, plus overhead;
* all 96 intersections transferred take 39 968 of the 62 500 cycles in a
  millisecond.

**Counting.** The intersection counter runs A0..FF. Counts A0..BF (32 of
them) are Timeslot 0 and C0..FF (64) are Timeslot 1. The block counter F0..FF
goes out to the ASICs (`asic_blk`) as the block number. In the test address
mode, a result counter inside the Dataout FPGA counts 0..255 within each
intersection.

## 5. Which ASIC: the intersection maps (`int_addr_mux`)

Every Dataout FPGA runs the same program in lock step. For each intersection
count and MSEC, `int_addr_mux` works out which FPGA, which of its chips, and
which of the chip's 16 intersections (4 x 4) is read. Only the FPGA whose
XID[2:0] matches raises RDCLKEN, and only to that one chip.

**Timeslot 0.** These are the diagonal (self) products, with s = count − A0
running 0..31.

* Full card: intersection-in-chip = 5·(s mod 4), i.e. the diagonal 0, 5, 10,
  15. Groups of four go to FPGA/chip (0,0) (0,3) (1,4) (1,6) (6,0) (6,3) (7,4)
  (7,6). In bit form: chip = {s3, s2, s2·¬s3}, FPGA = {s4, s4, s3}.
* Partial card (XID4): only the bottom row of ASICs is fitted. Chips 0/1 of
  FPGAs 0–3 are used: chip = s2, FPGA = {s4, s3}.

**Timeslot 1.** With t = count − C0 running 0..63 and m = MSEC:

* FPGA = {m3, t4, t3}, i.e. groups of 8 over FPGAs 0–3, or 4–7 from
  millisecond 8;
* chip = {m2, m1, t2}, i.e. a chip pair chosen by m/2, alternating every 4
  counts;
* intersection-in-chip = {m0, t5, t1, t0}.

Over 16 ms this visits each of the 64 chips' 16 intersections exactly once.

**Overrides.** XID12 forces the FPGA number to 0 (useful to put the random test
stream out of Dataout 0).

## 6. Transfer or skip (`xfer_ram`)

A 2 x 2048-bit RAM at address {BANK0, MSEC, count[6:0]} says for each
millisecond and intersection whether to transfer it. The default contents are:

* bank 0: every Timeslot 1 intersection, no Timeslot 0;
* bank 1: the reverse.

A write to BANK (select 13) only *arms* the new bank bit. The switch happens
at the next control-word strobe, so the transfer pattern and the ASIC
configuration change together.

## 7. The read-out path and the output chain (`dataout_xilinx`)

RDCLKEN leaves the FPGA two registers after the RDCLKENBL cycle starts. The
ASIC must drive its 16-bit result on its bus (chips 0–3 on `asic_bot`, 4–7 on
`asic_top`) during the 4th and 5th clocks after RDCLKEN rises. The FPGA
captures the word ASIC_LAT = 7 clocks after the cycle began, using a pipeline
that carries a valid flag, bus select, byte phase and test address.

Each 16-bit result becomes two bytes, low byte first (`out16to8`), one byte per
125 MHz clock. Then the XID test bits are applied:

* XID3 sends only the low byte (62.5 MHz mode);
* XID6 replaces the data with random bytes;
* XID7 replaces the data with TESTADR = {intersection count, result count}.

Outside its own read slots an FPGA drives zeros. Its byte is ORed with the
incoming chain and registered.

**Chain.** The chain is 7→3, 6→2, 5→1, 4→0 and 3→2→1→0. Dataout 0's output
goes through another `quad_delay` to `lta_data`. Its delay is
XID[11:10] whole clocks plus (2 + XID[9:8]) quarter clocks, so 180°–450° of
fine adjustment. Dataout 3's output is also brought out on `pins3`. For
test set-ups, XID7 on Dataout 0 also puts the millisecond number on the
separate 4-bit `test_msec` output (a low-speed signal, no fine delay).

## 8. Control words (`cw_shifter`, `cwstb_gen`)

Each Dataout FPGA holds 16 banks of 1024 bits, enough for the control words of
its chain of eight ASICs, written a byte at a time. A shift command sends the
bank chosen by CWBANK[7:4] out on CWCLK/CWDATA at 62.5 MHz, byte 0 bit 0
first. At the same time it records what comes back from the end of the chain
into a two-bank read-back RAM, which therefore holds the words the ASICs held
before. A `done` flag reports completion. XID3 loops the chain back inside the
FPGA.

The new words only take effect on ASICCWSTB. A write to select 11 arms
`cwstb_gen` with LOADCNT. While BLANKING and DUMPENBL are not both high, its
counter is held at LOADCNT. Once both are high, it counts at 62.5 MHz and
fires a 16 ns strobe at all ones. With LOADCNT = 0x28 that is 24 counts =
48 clocks into the window. This leaves room for the blanking pulse's
16-clock trip up the card plus up to 31 clocks of delay inside the ASIC.

## 9. Microprocessor interface

All FPGAs share one byte bus: `up_sel` (5 bits), `up_wdata`, and one-clock
`up_we` / `up_re` strobes. `up_cs[k]` selects Dataout k (k = 0..7) or Analog
Sum FPGA k − 8 (k = 8..12). Several chip selects may be active at once to
write the same data into several FPGAs. Read data appear on `up_rdata` one
clock after the read strobe, and are zero otherwise; the top ORs all FPGAs'
read data.

RAM accesses go through an auto-incrementing address UP_ADR. A write to
select 0 clears it.

**Analog Sum FPGA selects.**

Writes:

* 1: CONTROL
* 2 / 3: M0 / M1 offset
* 4: stream-checker bus select, also restarts the checker
* 5: logic-analyzer clear
* 6–9: masks of buses 0–3
* 12: seed byte
* 14: OUTCTRL

Reads:

* 16 + 2k / 17 + 2k: logic-analyzer word of bus k, low / high byte (the high
  byte advances UP_ADR)
* 24 / 25: checker error count

**Dataout FPGA selects.**

Writes:

* 1: program RAM byte (UP_ADR bit 0 picks the high byte)
* 2: UPADDRESS
* 3: XID, two bytes, low byte first
* 4: transfer RAM byte
* 5: blanking RAM byte
* 6: dump RAM byte
* 7: control-word byte
* 9: CWBANK (write bank in bits 3:0, shift bank in bits 7:4)
* 11: LOADCNT and strobe request
* 12: seed byte
* 13: BANK
* 17: start shift, also clears the program logic analyzer

Reads:

* 7: control-word byte
* 8: read-back byte
* 10: done
* 15: program logic analyzer {PC[3:0], PROGWRD[9:8], LDPAC, TRANSFER}

XID bits:

* 2:0: FPGA number
* 3: single-byte output / control-word loop-back
* 4: partial card
* 6: random data
* 7: test address
* 11:8: output delay
* 12: force FPGA 0

## 10. Files

`rtl/` has one module per file, plus `corr_pkg.sv`. The package holds the
sample weights, the instruction bit numbers, the default program, and the LFSR
step.

| file | contents |
|---|---|
| `correlator_card.sv` | top: 5 Analog Sum + 8 Dataout FPGAs, chain wiring |
| `asumend.sv`, `asum2nd.sv`, `asummid.sv`, `asum_core.sv` | the three Analog Sum FPGA types and their shared registers and test logic |
| `two_bit_adder.sv`, `add4ant.sv`, `add8ant.sv`, `bb8ant.sv`, `asum_add.sv`, `delay_line.sv`, `add_offset.sv` | adder tree |
| `testmux.sv`, `datagen.sv`, `pncheck.sv`, `la_ram.sv`, `quad_delay.sv`, `up_decode.sv` | test, diagnostic and interface pieces |
| `dataout_xilinx.sv` | one Dataout FPGA |
| `do_timing.sv`, `do_sequencer.sv`, `xfer_ram.sv`, `int_addr_mux.sv`, `cw_shifter.sv`, `cwstb_gen.sv`, `out16to8.sv` | its parts |

The top's parameters are `CNT_W` (16) and `MS_TICKS` (62 500), the COUNT width
and the number of instruction cycles per millisecond. All RAM initial contents
are computed in the RTL. No data files are needed.

## 11. Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog. With plain
Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    --timescale 1ns/1ps --top-module tb_correlator_card \
    rtl/corr_pkg.sv tb/tb_correlator_card.sv -o sim
./obj_dir/sim
```

Replace the module name to run another testbench.

`tb_correlator_card` runs the whole card at its default size for about nine
milliseconds (1.2 M clocks, a few seconds of simulation).

*Analog-sum side.* It drives 16 random buses and checks every 64-antenna sum
against a reference model, with and without masks and offsets. It also checks
the random output mode and the stream checker.

*Read-out side.* It gives each Dataout FPGA a model of its eight ASICs and
programs the transfer RAMs so that:

* millisecond 0 reads all 96 intersections;
* milliseconds 1 and 8 read Timeslot 1;
* milliseconds 2–7 skip everything.

For each millisecond, it checks the LTA byte stream against the sequence
predicted from the intersection maps. It also shifts and reads back control
words, and checks the strobe of every FPGA.

It counts each mechanism (skip, transfer, PAUSE, HOLD, millisecond strobe,
merge from each of the eight FPGAs, control-word shift and strobe, masked
sums, random output, stream checker). A mechanism that never happens counts as
a failure. The unit testbenches cover the rest in more depth: every
intersection map entry, the sequencer's burst timing, and the blanking and
dump RAM addressing.

`tb_partial_card` runs the partly populated card. Only the bottom row of eight
ASICs is fitted (chips 0 and 1 of Dataout FPGAs 0–3), and every FPGA gets XID4.
The transfer RAMs are set so that Timeslot 1 reads only the useful
off-diagonal intersections: {1, 4} in millisecond 0 and {11, 14} in
millisecond 1. Timeslot 0 already reads the diagonal. The testbench checks the
byte stream. It also checks that each fitted ASIC delivers its upper-left and
lower-right 2 × 2 arrays exactly once, and that no unfitted chip is read.

## 12. How closely this follows the original card, and where it departs

Taken from the card's description:

* the sample code and adder arithmetic;
* the adder tree, its 2- and 6-clock alignment delays, masks and offsets;
* the test-multiplexer codes;
* the instruction set, the pipelining rules and the default program;
* the intersection maps;
* the transfer-RAM defaults and bank switching;
* the blanking and dump-enable defaults and resolutions;
* the control-word banks, read-back and strobe delay;
* the XID bits;
* the chain order.

This design's own choices, where the description is silent or incomplete:

* **Pipeline register positions** in the Analog Sum and Dataout FPGAs. They
  were picked to give the documented alignment delays. The absolute latency
  (T+10 for the sums, ASIC_LAT = 7 for the read-out) is therefore this
  design's.
* **The 16 ms stagger** of the Dataout FPGAs (4 − hops). The values of the
  original card are not known; these make the chain line up with one
  register per hop.
* **Stream merging by OR**, with zeros outside an FPGA's own slots.
* **The generator polynomial** and the stream checker's seeding from two bus
  words.
* **The microprocessor bus** as a synchronous one-clock strobe interface.
  These select numbers are assumed: program, transfer, blanking and dump RAM
  writes, logic-analyzer and stream-checker reads, and the Dataout program
  logic-analyzer read.
* **The blanking RAM address** (COUNT[15:6], 1.024 µs steps), chosen to match
  the documented 2 µs default pulse.
* **The NOOP flush on `msstb`** and the idle state before the first
  millisecond.
* **Control-word bit order** and the CWDATA/CWCLK phase.
* **The sequencer's 24-count strobe delay.** The description gives both 24
  counts (48 clocks, matching LOADCNT = 0x28) and "48 counts of 16 ns"; the
  design follows the LOADCNT arithmetic.
* **XID3** is used both for the single-byte output and as the control-word
  loop-back, since both meanings are given to that bit.
* **The stream checker** compares whole 16-bit bus words, not single
  antenna streams.
* **FPGA numbering.** The FPGA that drives the card output is called
  Dataout 0 here, which matches most of the description; one passage calls it
  Dataout 7.

Not built:

* the ASICs themselves;
* the clock DLL tree;
* the board CPLD that produces the FPGA chip selects;
* the power and LVDS hardware;
* the test-fixture wiring;
* the test-point multiplexers of the FPGAs (CONTROL[5:3], TPCTRL): which
  signals sit on their inputs is not known;
* the doubled-bandwidth output (16 bits at 125 MHz), which would need
  different FPGA personalities.
