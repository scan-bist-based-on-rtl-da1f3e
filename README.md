# Scan-BIST pattern source built on stored repeating sequences

Deterministic test cubes for a full-scan circuit are mostly don't-care bits,
and the bits that are specified repeat: the same few values tend to appear in
the same clusters of scan cells across many cubes. This design stores a few
such *sequences* on chip and uses them to make test patterns in three stages
of one test session:

1. **Pseudorandom.** An LFSR feeds the scan chains directly. This removes
   the faults that are easy to detect.
2. **Semirandom.** The scan cells are split into *groups*. For each group one
   of its `R` stored sequences is picked at random, and about one bit in eight
   is flipped at random. The patterns look like the deterministic cubes they
   were extracted from, so they find more hard-to-detect faults than
   pseudorandom patterns.
3. **Deterministic.** There are two ways to apply the remaining cubes:
   - *Decoding:* the tester sends a short code for each cube: "use sequence
     *s* of group *g* and flip bits *k1, k2, ...*". The hardware expands it
     against the stored sequences.
   - *Reseeding:* the tester sends one 20-bit LFSR seed per cube.

Choosing the groups and sequences (cluster analysis over the test set,
optionally with limited scan-cell reordering) is an offline step. It is not
part of this RTL. Its results enter the design as two parameters: the ROM
contents (`ROM_DATA`) and the group boundaries (`GROUP_ENDS`). The tester
stream comes from the same step.

## Datapath

```
 LFSR (20) ──phase shifter──────────────────────────────────────► MUX I:0 ─┐
   │ q[0]&q[6]&q[13] ─► Flip_indication_R ─► MUX II:0 ─┐                   ├─► scan_in[M-1:0]
   │                     FSM ─► Flip_indication_D ─► MUX II:1 ─► XOR ─► MUX I:1 ┘
   │ q[9:8] ─► Row-select register ─► row ─┐              ▲
   │            (buffer ◄ Data_in)         ├─► ROM (R x C per chain) ─┘
   └────────────────────  Bit counter A ─► Column_select ─┘
                                        └─► Group-end decoder ─► Group_end ─► FSM
        Group counter, Bit counter B, Data input counter (buffers ◄ Data_in) ◄─► FSM
```

| stage (`stage`) | Select_random | Select_flip | scan data |
|---|---|---|---|
| 0 pseudorandom | 0 | – | LFSR through the phase shifter |
| 1 semirandom | 1 | 0 | ROM[row][col] XOR Flip_indication_R |
| 2 deterministic, decoded | 1 | 1 | ROM[row][col] XOR Flip_indication_D |
| 3 deterministic, reseeded | 0 | – | LFSR, after 20 seed bits from `data_in` |

The numeric values of the `stage` input are this design's choice. The other
columns follow the architecture. Having both deterministic forms behind one
input is also this design's choice: the method offers them as alternatives.

**ROM and groups.** The ROM is a matrix of `R` rows by `C` columns. A group
is a range of consecutive columns. Row *r* of a group holds that group's
*r*-th sequence. Bit counter A counts the scan cycles of a pattern and
addresses the column. Columns at or beyond `C` read as 0: those scan cells
are never specified by any cube. The Group-end decoder is combinational
logic that flags the last column of each group.

In the semirandom stage the Row-select register takes a fresh 2-bit random number from
the LFSR at the start of every pattern and at every group end. So each group
gets an independently chosen sequence.

**Several scan chains** (`M > 1`). The ROM has `M` banks. Bank *b*, column
*j* holds bit `j*M + b` of each sequence of a group. One read therefore gives
the `M` bits of one scan cycle. The scan cells of each group have to be
arranged in the same order across the chains. The last column of a group may
hold filler bits. All flip signals become `M` bits wide. The LFSR feeds the
chains through a phase shifter: chain 0 gets `q[19]`, and chain *i* gets
`q[19-i] ^ q[3i+1] ^ q[7i+4]` (indices mod 20). The taps are this design's
choice.

## The deterministic-stage code (the hard part)

Each cube is sent as one or more *group records*. Every field is sent MSB
first:

```
record : [last-group flag : 1][group field : GW][sequence index : RW]  flip { flip }
flip   : [last-bit flag   : 1][cycle field : BCW][chain : log2 M]
```

- `GW = log2(NG)`.
- `RW = log2(R)`.
- `BCW` is the width needed for the longest group in scan cycles.
- A flag value of 1 means "last".

Example: 4 groups, 4 sequences, groups at most 4 cells long. The cube is
"sequence 0 of group 0 with bit 0 flipped, then sequence 0 of group 1 with
bit 2 flipped". Its code is `0 00 00 1 00 1 01 00 1 10`. `tb_sbist_fsm`
checks this exact example.

Both the group field and the cycle field are **distances**. The hardware uses
down-counters, and a down-counter cannot jump to an absolute position:

- **Group field.** For the first record of a pattern it is the group number.
  For every later record it is the number of groups after the previously
  selected group (at least 1). For the example above the two readings give
  the same bits.
- **Cycle field.** For the first flip of a record it is the scan cycle inside
  the group. For every later flip it is the distance in scan cycles from the
  previous flip: at least 1 with one chain, and 0 allowed with several chains.
  A distance of 0 flips another chain in the same scan cycle.
- **Flips per record.** A record always carries at least one flip. If a cube
  matches a stored sequence exactly, the encoder flips a bit that is
  don't-care in the cube.
- **Unselected groups.** Groups that no record selects are filled from the
  row that is currently loaded: row 0 at the start of a pattern, otherwise
  the last selected row. A cube has no specified bits in such groups.

**How the FSM applies it.** The controller has two parts.

*Input parser.* It reads the stream into the buffers of the Group counter,
the Row-select register and Bit counter B. The Data input counter marks the
last bit of each field. `input_en` high means that `data_in` is sampled at
that clock edge. The tester must drive the next stream bit whenever
`input_en` is high.

*Pattern engine.* It consumes the buffered values:
- The Group counter counts group ends. When a group end arrives with a count
  of 1, the selected group starts in the next cycle. On that same clock edge
  the row and Bit counter B are loaded from their buffers, so the first bit
  of the group already uses them.
- Bit counter B counts scan cycles down to the next flip. When it reaches 0,
  that cycle's bit is flipped. The next distance is loaded at the same edge,
  already decremented by one.

The parser runs ahead into the next record, and even into the next pattern.
When a value is needed before it has arrived, the scan pauses (`scan_en`
low). The pattern data does not depend on where the pauses fall.

## Interface and timing (`sbist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `run` | in | 1 | generate patterns while high |
| `stage` | in | 2 | stage select, see the table above; change only while `run` is low or in the `capture` cycle |
| `data_in` | in | 1 | encoded stream or seed bits |
| `input_en` | out | 1 | `data_in` is taken at this clock edge |
| `scan_in` | out | M | scan-chain data, valid when `scan_en` is high |
| `scan_en` | out | 1 | shift the chains this cycle |
| `capture` | out | 1 | one cycle after the last shift of a pattern |

Each pattern has one start cycle, then `CYCLES = ceil(L/M)` shift cycles,
then one capture cycle. With `stage` 0 or 1 there are no pauses, so a pattern
takes `CYCLES + 2` clocks. The reseeded stage adds 20 cycles per pattern to
load the seed. The decoded stage adds pauses only while data is missing. At
one input bit per clock this is mostly at the start of a pattern (about 8
cycles per pattern at the default size).

## Parameters

| parameter | default | origin |
|---|---|---|
| `L` (scan cells) | 1636 | s38417 flip-flop count. This matches the 11-bit column select of the reference architecture. |
| `M` (scan chains) | 1 | single-chain base architecture |
| `R` (sequences per group) | 4 | four extracted sequences per group in all experiments |
| `NG` (groups) | 32 | s38417 experiment |
| `C` (ROM columns) | 475 | 1899 stored bits for s38417, divided by 4 rows and rounded up |
| `LFSR_N`, `LFSR_TAP` | 20, 17 | 20-stage LFSR as used for reseeding. The polynomial x^20+x^17+1 is this design's choice. |
| `GROUP_ENDS` | even split | **stand-in** |
| `ROM_DATA` | pseudorandom | **stand-in** |

The two stand-ins have to be replaced by the output of the sequence
extraction for a real circuit. The bit for row *r*, column *c* and bank *b*
is `ROM_DATA[(r*C + c)*M + b]`. The last column of group *g* is
`GROUP_ENDS[g*CW +: CW]`, with groups in increasing order. The Flip_indication_R
taps (LFSR bits 0, 6, 13) and the row taps (bits 9:8) are this design's
choice: the architecture says only "three LFSR outputs, AND-ed" and "two
bits".

## Where this RTL departs from the reference architecture

- **FSM states.** The reference controller is one FSM with 27 states. Its
  state graph is not published. Here the controller is two 5-state machines
  plus flag registers. The counts differ: 24 controller flip-flops here
  against about 10 reported.
- **Flip-flop total.** Excluding the LFSR and the ROM, this design has 60
  flip-flops. The reported figure is 47 for the same s38417 configuration.
  The difference comes from the parser's buffer-valid bits and the
  per-record flags.
- **Zero_g.** The Group counter still outputs Zero_g, but the controller
  watches the count instead (a value of 1 at a group end). This avoids a lost
  cycle at the start of each selected group.
- **Reseeding mode.** In the reseeding-only form of the architecture, the
  decoding blocks are left out. Here both modes exist in one design.
- **Not included.** Response compaction and the circuit under test are not
  included. Neither is the offline flow: fault simulation, ATPG, clustering
  and encoding.

## Files

- `rtl/sbist_pkg.sv`: stage type and width helpers.
- `rtl/sbist_top.sv`: the wiring shown above, MUX I, MUX II and the XOR.
- `rtl/sbist_lfsr.sv`, `rtl/sbist_phase_shifter.sv`: pattern source.
- `rtl/sbist_seq_rom.sv`, `rtl/sbist_group_end_decoder.sv`,
  `rtl/sbist_bit_counter_a.sv`, `rtl/sbist_row_select.sv`: ROM side.
- `rtl/sbist_buf_counter.sv`: Group counter and Bit counter B (one module).
- `rtl/sbist_data_input_counter.sv`, `rtl/sbist_fsm.sv`: decoder control.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- One unit testbench per module, each checking against an independent model.
- `sbist_fsm` carries assertions for its usage rules (run with `--assert`):
  `stage` is held during a pattern, flips occur only in shift cycles, and no
  decoder buffer is filled and emptied in the same cycle.
- `tb_sbist_fsm`: the nine-cell example above, decoded three times in a row,
  plus the stage multiplexing and the count of random row loads.
- `tb_sbist_top`: default sizes, six patterns per stage. It checks every scan
  cycle against a reference model of the LFSR, ROM layout and code. It also
  checks that each mechanism happened: decoder pauses, decoded flips, random
  row loads, random flips, multi-group cubes, multi-flip records, and columns
  past `C`.
- `tb_sbist_top_m4`: four chains (202 cells, 6 groups), including several
  flips in one scan cycle.
- `tb_sbist_workloads`: whole sessions, side by side:
  - s38417 sizes (10,000 + 10,000 + 71 patterns, about 33 M cycles);
  - s5378 sizes (179 cells, 8 groups, 34 columns, 10,000 + 10,000 + 3
    decoded + 3 reseeded patterns).
  It takes about 45 s. Its cubes are random, so it shows correct
  application, not fault coverage.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sbist_pkg.sv tb/tb_sbist_top.sv --top-module tb_sbist_top
./obj_dir/Vtb_sbist_top
```
