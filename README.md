# Embedded DRAM core with a retention-aware memory BIST

An embedded DRAM (eDRAM) core that presents an SRAM interface (a "1T-SRAM")
cannot be tested with an SRAM test alone. Behind the interface sit DRAM cells:
they leak, they need self-refresh and auto-refresh, and they suffer
word-line coupling and bit-line toggling, which the power/ground shielding of
an SRAM array would suppress. This RTL models a 16Mb eDRAM core and adds a
built-in self-test (BIST) that applies a test program designed for such a core:

* an **X-direction extended March C-** with a *solid* physical background
  (11N). The element `(ra, wb, rb)` catches stuck-open cells behind latch-based
  sense amplifiers. Two self-refresh (SR) elements check that refresh restores
  both 0 and 1;
* a **Y-direction MATS** with a *physical checkerboard* (4N). It walks the
  word-lines in their physical order to expose word-line coupling. Two
  *SR + delay* pairs form the data-retention test for each polarity.

Retention testing is slow: the delay element lasts the whole retention
specification, 16 ms in the reference case, twice over. At a higher test
temperature the cells leak faster, so a shorter *equivalent* retention time
finds the same retention faults. The design sets both the delay element and
the auto-refresh interval from a temperature-dependent table.

The test approach, the core organisation and the timing figures follow the
thesis *Testing Methodology of Embedded DRAMs* (Chi-Min Chang, National Chiao
Tung University). The RTL structure, interfaces and scrambling tables are this
design's own. They are marked as such below.

## Organisation

```
                 edram_bist_top
  host port ──►┌──────────────┐ test_mode
               │   mode mux   │◄──────────────┐
               └──────┬───────┘               │
                      │                 ┌─────┴──────┐   ┌──────────────────┐
               ┌──────▼───────┐         │ bist_ctrl  │◄──│ edram_pkg::      │
               │  edram_core  │◄────────┤  sequencer │   │ program_elem     │
               │ ┌──────────┐ │ sr_req  │  compare   │   └──────────────────┘
               │ │edram_ctl │ │         │ ┌────────┐ │
               │ │ refresh  │ │         │ │addr_gen│ │  X / Y order, up/down
               │ └────┬─────┘ │         │ ├────────┤ │
               │ ┌────▼─────┐ │         │ │scramble│ │  physical → logical data
               │ │edram_array│ │         │ └────────┘ │
               │ │ (model)  │ │         └─────▲──────┘
               │ └──────────┘ │               │ del_cycles
               └──────▲───────┘        ┌──────┴───────┐
                      └─ ret_cycles ───┤ eqv_ret_table│◄─ ret_ref_cycles, temp_sel
                                       └──────────────┘
```

| file | role |
|---|---|
| `rtl/edram_pkg.sv` | types, the test-program table, the array scramble functions |
| `rtl/edram_array.sv` | **behavioural model** of the two 8Mb cell arrays with decoders and sense amplifiers, with retention and stuck-at fault injection |
| `rtl/edram_ctl.sv` | controller: host access, self-refresh, auto-refresh |
| `rtl/edram_core.sv` | controller + arrays: the core with its SRAM interface |
| `rtl/bist_addr_gen.sv` | BIST address sweeps with the physical word-line mapping |
| `rtl/bist_data_scramble.sv` | BIST scramble table: physical background → logical data |
| `rtl/bist_ctrl.sv` | BIST sequencer and response comparator |
| `rtl/eqv_ret_table.sv` | equivalent retention time for the test temperature |
| `rtl/edram_bist_top.sv` | top: core, BIST, temperature table, mission/test mode mux |

### Core geometry

Two symmetric arrays of 128 banks × 64 word-lines. Each word-line carries 64
half-words of 16 bits. A 32-bit word takes bits 15:0 from array 0 and bits
31:16 from array 1 on the same decoded word-line. That gives 8192 word-lines and
N = 524288 words, or 16 Mb. The parameters `BANKS`, `WLS`, `COLS` and `HW` have
these values as defaults, and every size must be a power of two. The word
address is `{bank[6:0], wl[5:0], col[5:0]}`. This bit order is a design choice.

## Physical versus logical values: the part to get right

A test background is defined in terms of the *charge in the cells*. The
interface deals in *logical bits*. Two layout features separate the two, and
the BIST must undo both.

**Data scrambling (cell polarity).** A cell hangs on either the bit-line or the
bit-line-bar. For a cell on the bit-line-bar, the stored charge is the inverse
of the logical bit. Bit-line twists flip that relation again for the rows below
the twist. `edram_pkg::scramble_inv(prow, bitpos)` returns 1 for an inverted
cell:

```
inv = prow[0] ^ prow[1]                    // rows 1,2 (mod 4) on bit-line-bar
    ^ (bitpos[0] & (prow >= WLS/2))        // odd bit columns twisted mid-bank
```

This is a small two-level function of the low and high word-line address bits
and of the bit position. That is the form such a table takes in practice. The
exact table of any real core comes from its layout. **This one is an assumed
folded bit-line layout, not a real core's**, so replace `scramble_inv` for a
real macro. The cell model uses the same function, so model and BIST always
agree.

**Address scrambling (word-line order).** Inside a bank, the physical row of
logical word-line `w` is `w` with its two least significant bits swapped
(`edram_pkg::wl_swap`). Walking the rows top to bottom therefore visits logical
word-lines 0, 2, 1, 3, 4, 6, 5, 7, ... The mapping is its own inverse. It too is
an example layout.

**Backgrounds.**
* Solid: every cell physical 0 ("a") or physical 1 ("b").
* Checkerboard: physical value = (physical row + physical column) mod 2. The
  arrays use distributed folding: bit *i* of word *j* sits next to bit *i* of
  word *j+1*. With an even number of words per word-line, all bits of one word
  share a column parity, equal to `col[0]`.

`bist_data_scramble` computes, per bit, `logical = background(prow, col) ^ inv`,
with `inv` toggling "a"/"b". Because both backgrounds are physical, the solid
background also toggles adjacent bit-lines in opposite directions on a
scrambled array. That is what exposes bit-line toggling faults.

**Address order.** `bist_addr_gen` counts 0..N-1 (or N-1..0 for a descending
element).
* X-direction: the count is the logical address, so the column changes
  fastest.
* Y-direction: the count is read as `{col, bank, physical row}` and the physical
  row is mapped back to a logical word-line. Consecutive operations then hit
  physically adjacent word-lines, the condition for word-line coupling.

## The test program

`edram_pkg::program_elem` holds the program as a 16-entry table. `bist_ctrl`
executes it:

| # | element | order | background | purpose |
|---|---|---|---|---|
| 0 | ⇑(wa) | X | solid | initialise |
| 1 | ⇑(ra, wb, rb) | X | solid | SAF/TF/AF/CF; the extra `rb` catches stuck-open cells |
| 2 | SR | | | self-refresh just before reading "b" |
| 3 | ⇑(rb, wa) | X | solid | |
| 4 | ⇓(ra, wb) | X | solid | |
| 5 | ⇓(rb, wa) | X | solid | |
| 6 | SR | | | self-refresh just before reading "a" |
| 7 | ⇑(ra) | X | solid | |
| 8 | ⇑(wa) | Y | checkerboard | |
| 9, 10 | SR, del | | | retention of "a" |
| 11 | ⇑(ra, wb) | Y | checkerboard | word-line coupling, retention read |
| 12, 13 | SR, del | | | retention of "b" |
| 14 | ⇓(rb) | Y | checkerboard | retention read |
| 15 | end | | | |

Controls:
* `run_march` and `run_mats` select the two parts.
* `march_sr_en = 0` drops elements 2 and 6. Those elements only help diagnosis:
  a failure right after them points at the self-refresh circuitry rather than at
  weak cells.
* `fail_elem` has one bit per element, which keeps that distinction visible.
* `first_fail_addr`, `first_fail_elem` and `first_fail_syndrome` record the
  first failing read. `fail_count` counts all failing reads and saturates.

Timing of the sequencer:

* one element fetch cycle per table entry, including skipped entries
  (16 cycles);
* one core operation per cycle while the core is ready;
* SR: one request cycle, then a wait until the self-refresh burst has ended
  (BANKS·WLS + 1 cycles);
* del: exactly `del_cycles` cycles, counted from the end of the self-refresh;
* a single drain cycle before `done`.

The full program, with no auto-refresh in the way, takes
`16 + 15N + 4·(BANKS·WLS + 2) + 2·del + 1` cycles. Each cycle in which an
auto-refresh burst holds the core off adds one cycle.

The MATS part ends with ⇓(rb), which makes it 4N. A variant with a closing
write, ⇓(rb, wa), would be 5N. It adds nothing to fault coverage, so it is left
out.

## Refresh and the retention test

`edram_ctl` refreshes one word-line per cycle; a full refresh takes
BANKS·WLS = 8192 cycles. Both refresh kinds run as a single burst, and `ready`
stays low while a burst runs:

* **Self-refresh**: an `sr_req` pulse starts a burst at row 0 and restarts the
  auto-refresh period counter. The pulse is taken in any state, even during a
  running burst.
* **Auto-refresh**: with `ar_en` set, a burst starts exactly `ret_cycles` after
  the start of the previous one.

The retention test relies on that relation. SR refreshes row *r* at cycle
*t₀ + r*. The delay element then runs for `ret_cycles` after the SR burst, and
the auto-refresh fires at *t₀ + ret_cycles* while the delay is still running.
Row *r* is next activated at *t₀ + ret_cycles + r*. So every row sits
unrefreshed for exactly one retention period, and a cell that cannot hold its
charge that long has lost it before the read.

Host interface timing (core and top):
* A request is taken in a cycle with `req && ready`.
* Read data comes back on the next cycle with `rvalid`.
* Writes are byte-masked by `be` and visible to a read in the next cycle.

Burst-mode access is not provided.

## Temperature: equivalent retention time

Sub-threshold leakage of the cell's switch transistor grows steeply with
temperature. Band-to-band tunnelling and gate tunnelling hardly change. The
time a cell takes to lose a given charge therefore shrinks. Scaling the
specification (16 ms at 85 °C) by the leakage ratio gives:

| °C | 85 | 90 | 95 | 100 | 105 | 110 | 115 | 120 |
|---|---|---|---|---|---|---|---|---|
| ms | 16 | 13.57 | 11.55 | 9.87 | 8.47 | 7.29 | 6.30 | 5.47 |

`eqv_ret_table` stores each ratio as `round(T/16 ms · 65536)` and outputs
`round(ret_ref_cycles · ratio / 65536)`. Its inputs are `ret_ref_cycles`, the
85 °C specification in clock cycles (16 ms at 50 MHz is 800000), and
`temp_sel` (85 °C + 5 °C·`temp_sel`). The result drives both the delay
elements and the auto-refresh interval, because a hotter part also needs more
frequent refresh. The ratios come from a leakage calculation and should be
confirmed on silicon. To use measured values, edit the case statement.

## Test time

At the default size, with 16 ms at 50 MHz and 85 °C, a fault-free run takes
9 554 457 cycles, or 191.1 ms:

* 7 864 320 read/write cycles (15N);
* 1 600 000 delay cycles;
* 32 776 cycles for the four SR elements;
* 57 344 cycles stalled behind auto-refresh bursts;
* a few control cycles.

The reference tabulation for this core gives 193.9 ms. Its read/write share is
rounded to 160 ms, against 157.3 ms here.

The retention delay is fixed in milliseconds, so its share of the test time
grows with the clock rate. Simulated totals:

| spec | clock | temp | cycles | simulated | reference |
|---|---|---|---|---|---|
| 16 ms | 50 MHz | 85 °C | 9 554 457 | 191.09 ms | 193.9 ms |
| 16 ms | 100 MHz | 85 °C | 11 113 497 | 111.13 ms | 112.5 ms |
| 16 ms | 200 MHz | 85 °C | 14 297 113 | 71.49 ms | 72.2 ms |
| 32 ms | 50 MHz | 85 °C | 11 113 497 | 222.27 ms | 224.9 ms |
| 32 ms | 100 MHz | 85 °C | 14 297 113 | 142.97 ms | 144.3 ms |
| 32 ms | 200 MHz | 85 °C | 20 697 113 | 103.49 ms | 104.2 ms |
| 16 ms | 100 MHz | 105 °C | 9 656 643 | 96.57 ms | 97.8 ms |
| 16 ms | 200 MHz | 115 °C | 10 449 901 | 52.25 ms | 53.1 ms |
| 32 ms | 200 MHz | 95 °C | 17 137 153 | 85.69 ms | 86.4 ms |
| 32 ms | 200 MHz | 105 °C | 14 673 089 | 73.37 ms | 74.1 ms |
| 32 ms | 200 MHz | 115 °C | 12 953 537 | 64.77 ms | 65.4 ms |

All runs come out 0.7 % to 1.6 % below the reference figures. The reference
rounds its read/write share up. Heating the part from 85 °C to 115 °C cuts the
32 ms / 200 MHz test by 37 %.

## The cell-array model

`edram_array` is a behavioural model, not synthesizable logic. It holds:

* the data as a 2^19 × 32 array;
* the cycle of the last restore of every word-line;
* a small fault table.

Any activation of a word-line restores all its cells, whether a read, a write
or a refresh. Fault injection is done with tasks called hierarchically from a
testbench:

* `inject_stuck(k, addr, bit, value)`: the cell always reads `value`.
* `inject_weak(k, addr, bit, limit)`: if the cell's word-line is activated more
  than `limit` cycles after its last restore, a cell that held physical 1
  falls to physical 0. The logical value it then reads is set by
  `scramble_inv`. The cell stays discharged until the bit is written again.
* `clear_faults()`: removes all entries. Let one clock pass before reusing a
  weak-cell entry.

Healthy cells never lose data, and temperature is not modelled. A weak cell
therefore escapes a test whose delay is shorter than its limit, which the
testbenches use to show the effect of the delay length.

For a real macro, replace this module and keep its ports. The sense amplifiers,
the decoders and the word-line drivers are all folded into it.

## Simulation

Every testbench checks itself and prints
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it runs |
|---|---|
| `tb_eqv_ret_table` | all temperatures at several specifications, against real-number arithmetic |
| `tb_bist_data_scramble` | every address and background of a small array, bit by bit, against an independent reference |
| `tb_bist_addr_gen` | X/Y, up/down sequences, `last`, stalls |
| `tb_edram_array` | read/write, byte enables, latency, stuck cell, weak cell lost and kept |
| `tb_edram_ctl` | refresh order, SR, auto-refresh period, stall of a host request, SR over AR |
| `tb_edram_core` | random traffic under auto-refresh, retention with and without refresh |
| `tb_bist_ctrl` | exact run length, operation mix, the background left in the cells, Y order, stuck and weak-cell detection and escape |
| `tb_edram_bist_top` | end to end on a small core: mission mode, test mode, faults, temperature, a count of every mechanism |
| `tb_edram_bist_full` | one full run at the default 16Mb size with two faults (about 10 M cycles, a few seconds) |
| `tb_edram_workloads` | ten full-size runs over clock rates, specifications and temperatures (about 1 minute) |

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/edram_pkg.sv tb/tb_edram_bist_top.sv --top-module tb_edram_bist_top
./obj_dir/Vtb_edram_bist_top
```

The reduced testbenches override `BANKS/WLS/COLS` (for example 2 × 8 × 4). Both
full-size testbenches use the top at its default parameters.

## Departures and design choices

These points are not fixed by the source and were chosen here:

* The scramble functions (`scramble_inv`, `wl_swap`) describe an example
  layout.
* The core is driven as on-chip BIST through a mission/test multiplexer. The
  original measurements applied the same algorithms from an external tester.
* Handshake: `req`/`ready` with a one-cycle read latency.
* Refresh runs as a single burst that blocks the host. An SR request restarts a
  running burst.
* Element directions, where the notation leaves them open, follow the usual
  March C- (⇑ for the "any order" elements).
* The closing MATS element is ⇓(rb).
* The fault model of the cell array and its injection tasks are additions for
  verification.
* Not built: burst-mode access, and the analog parts (sense amplifiers,
  word-line drivers), which exist only inside the behavioural array model.
