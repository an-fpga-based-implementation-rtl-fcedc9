# Global Calorimeter Trigger in SystemVerilog

The Global Calorimeter Trigger (GCT) is the last stage of the CMS Level-1
calorimeter trigger. For every LHC bunch crossing it takes everything the
Regional Calorimeter Trigger found across the whole detector and cuts it down
to what the Global Trigger can digest:

- the four best e/gamma and the four best isolated e/gamma candidates, out of 72 of each;
- jets, found by clustering 3x3 windows of calorimeter regions. They are split
  into central, forward and tau jets, and the four best of each class are kept;
- total transverse energy, and the magnitude and direction of the missing
  transverse energy;
- jet multiplicities against a set of programmable criteria.

Around that core sit test and readout features:

- a capture/playback test buffer;
- derandomisers that hold the data of crossings accepted by the Level-1
  trigger, and a concentrator that packs it into 32-bit event records;
- bunch-by-bunch luminosity counters.

There is also the input stage (the "Input Module"). It locks onto parallel
80 Mbit/s cable data of unknown phase and skew, and redistributes the data,
with duplication, onto 28-bit serial links.

Everything is one fully pipelined 80 MHz clock domain. A new crossing may
enter on every clock. In the LHC, crossings come every 25 ns, that is every
second 80 MHz clock.

## The Global Trigger word and its timing

All results of one crossing leave together, in one `gct_pkg::gt_word_t`
(427 bits):

| field | content |
|---|---|
| `eg[0..3]`, `iso_eg[0..3]` | e/gamma objects, highest rank in `[0]` |
| `cen_jet`, `fwd_jet`, `tau_jet` | four jets of each class |
| `et_tot` (20 b) | total transverse energy |
| `met` (21 b), `met_phi` (6 b) | missing Et magnitude; direction as a 10-degree sector, 0..35 |
| `jcount[0..11]` (5 b each) | jet counts, saturating at 31 |

An object (`obj_t`, 16 bits) is a 6-bit rank, a 5-bit eta index (0..21) and a
5-bit phi index (0..17). Rank 0 means "empty".

The critical path is the e/gamma sort: 14 clocks, seven crossings. All other
branches are padded with registers to the same `OUT_LAT = 14`:

| path | logic | padding |
|---|---|---|
| e/gamma sort | presort 2 + second stage 6 + third stage 6 | 0 |
| jets | cluster 5 + 36-to-4 sort 6 | 3 |
| energy | cluster 5 + energy sum 5 | 4 |
| jet counts | cluster 5 + adder 1 | 8 |

The test buffer adds one more register, so `gt_out` shows the crossing that
entered 15 clocks earlier, which is 187.5 ns.

## Sorting: 72 to 4 in three stages

A one-step 72-input sort would be very large, so the sort runs in three
stages (`object_sort_tpm`):

1. **Presort** (`presort4`). Eighteen groups of four are each put in order.
   Nothing is discarded.
2. **Second stage** (`stage_a_sort`, one per "Stage A" FPGA). Each block takes
   six presorted groups (24 objects) and keeps the best four. There are three
   such blocks.
3. **Third stage** (`sort_top4` with N = 12, the "Stage B" FPGA). The best four
   of the remaining 12 are chosen.

Every selection stage is an instance of `sort_top4`. It works in three steps:

- All N(N-1)/2 rank comparisons are made at once.
- Each object's position is the number of objects that beat it. An object
  beats another if its rank is higher, or if the ranks are equal and its
  input index is lower. This rule makes the positions a permutation, so equal
  ranks never collide.
- Output slot k takes the object whose position is k.

This is three register stages. Any further cycles that `LAT` asks for are
plain registers. At the second and third stages they stand for the time taken
to pass data between chips.

The same block serves three other sorts:

- the jet and tau sorts (36 to 4: nine cluster modules times four candidates);
- the jet-cluster modules' own initial sort (44 to 4).

## Jet clustering

`jet_cluster` is one of nine cluster processors. Each one owns a **strip** of
two phi columns over all 22 eta rows. It also receives the neighbouring
column on each side. In the real system the Input Modules duplicate those
columns, so cluster modules never talk to each other. In `gct_top` this is
the `strip` wiring inside `g_jet`, which wraps round in phi.

For every region of its strip the module does the following:

1. It sums the Et of the 3x3 window centred on the region. Rows beyond the
   eta edges count as empty.
2. It decides whether the region seeds a jet. The centre must be non-zero and
   a local maximum:
   - strictly above the four neighbours that come earlier in (eta, phi) order;
   - not below the four that come later.

   A plateau of equal deposits therefore gives exactly one jet.
3. It classifies the jet:
   - **forward** if the region lies in the outer four eta rows at either end;
   - otherwise **tau** if all nine regions of the window carry the
     "tau-compatible" pattern bit;
   - otherwise **central**.
4. It ranks the jet: window sum >> `RANK_SHIFT` (2), saturated to 63 and at
   least 1.

The 44 candidates are sorted per class (four of each are kept) and counted
against the jet-count criteria (`jet_counter`).

The module also sums its strip's Et: once as a plain scalar, and once
weighted by cos and sin of each column's phi centre. The weights are Q10
constants `round(1024*cos(10k deg))`, produced by `gct_pkg::cosd10/sind10`
from a nine-entry table and symmetry.

## Energy sums

`energy_sum` adds the nine strip results. It then takes the missing vector
(mx, my) = -(Ex, Ey) >> 10 and computes two things:

- its magnitude, as an exact integer square root of mx² + my², using the
  shift-subtract method;
- its direction, as one of 36 sectors of 10 degrees. For every sector
  boundary it finds the sign of the cross product of the vector with that
  boundary direction. Sector k is the one whose lower boundary is at or
  behind the vector and whose upper boundary is ahead of it. A zero vector
  gives sector 0.

The original system does this last step with a large external lookup table.
Its contents were never specified, so here it is computed in logic.

## Jet counts and luminosity

Each criterion of a jet count (`jc_crit_t`) has four fields:

- a minimum rank;
- an eta window `[eta_min, eta_max]`;
- a 3-bit class mask (central, forward, tau).

Every cluster module counts its own jets against each criterion, saturating
at 31. `gct_top` adds the nine partial counts, again saturating.

`lumi_monitor` integrates two chosen jet counts (parameters `LUMI_JC0` and
`LUMI_JC1`) for every bunch position of the orbit (`NBX = 3564`). It uses two
memory banks:

- One bank integrates for `LUMI_ORBITS` orbits. The bank then flips, and the
  finished bank is read back through `lumi_rd_*`.
- The first orbit of each period writes its values instead of adding to them,
  so no clearing pass is needed.

## Input Module: finding phase and skew automatically

`im_sync` handles one cable of 28 bits. Fast input registers, which are not
part of this RTL, sample each bit four times per 80 MHz cycle. These samples
arrive as `samp[bit][0..3]`.

Setup takes two steps, both driven by test patterns:

1. **Phase.** While `train_phase` is high, the source sends a toggling
   pattern, and the block records, per bit, between which samples
   transitions occur. When `train_phase` falls, each bit gets the sample that
   has no transition on either side. Among such samples, the one with the
   most transition-free gaps around it wins. This tolerates one unreliable
   sample at the transition.
2. **Skew.** A pulse on `train_delay` starts a window of `DMAX` (16) cycles.
   The source sends one all-ones marker word. Each bit's delay line is set to
   `DMAX-1-arrival`, so all bits present the marker together, `DMAX+1` cycles
   after the pulse. If a bit sees no marker, `align_err` is set.

Phase and delay can also be written directly (`cfg_*`).

`im_output_map` then routes the 8 x 28 synchronised bits onto twelve 28-bit
links through a per-bit crossbar. The source value 224 means constant 0. Any
input may feed many outputs, which provides the duplication the jet strips
need.

## Test buffer and DAQ

`capture_buffer` (1024 words, on the GT output) has three modes:

- **pass:** the data goes straight through;
- **capture:** after `cap_start`, it records 1024 consecutive words;
- **playback:** after `cap_start`, it drives its contents onto `gt_out`,
  repeating.

A control port reads and loads the memory.

`daq_derandomiser` keeps its input in a circular buffer for
`L1A_LAT = 256` clocks (128 crossings, the Level-1 latency budget). On `l1a`
it pushes the word written 256 clocks earlier into a 16-word FIFO. An accept
that finds the FIFO full is dropped and counted. An assertion checks that
the FIFO never claims more than 16 words.

The top level has two of them:

- one on the GT output (overflows counted in `daq_overflow`);
- one on the Input Module's 12 link words, padded to the GT word width
  (overflows counted in `daq_im_overflow`).

Both see the same accepts and are popped together. `daq_concentrator` waits
until every source has a fragment, then sends one record on `daq_word`,
with a valid/ready handshake:

| Word | `daq_ctrl` | Content |
|---|---|---|
| 0 | 1 | `{8'hA0, 24-bit event number}` |
| 1 .. 14 | 0 | GT word, 32 bits at a time, least significant first |
| 15 .. 28 | 0 | Input Module link words, the same way |
| 29 | 1 | `{8'hF0, 8-bit source count, 16-bit record length}` |

After the trailer it pops both FIFOs. The event number counts records from
reset. The original does not give its event format, so this one is this
design's own.

## Top-level ports (`gct_top`)

- **Trigger inputs:**
  - `eg_in[72]`, `iso_in[72]`: e/gamma objects;
  - `region[22][18]`: `region_t` {10-bit Et, tau bit};
  - `bx_valid` and `bx`: the crossing strobe and number.
- **Configuration:** `crit[12]` (the jet-count criteria) and `cap_*` (the test
  buffer controls).
- **Outputs:** `gt_out`, `lumi_*`, and the DAQ record stream `daq_word`,
  `daq_ctrl`, `daq_valid` and `daq_ready`, driven by `l1a`.
- **Input Module path:** `im_samp[8][28]` carries the oversampled cable bits.
  The other `im_*` ports are training, configuration and status, and
  `im_link[12]` carries the link words. `im_rd_cable` selects a cable, whose
  per-bit chosen phase and delay appear on `im_rd_phase` and `im_rd_delay`.

The module brings out as ports the signals of the parts that are not logic
here:

- the serial link chipsets;
- the TTC receiver, which provides clock and crossing number;
- the control processor and control bus, which provide configuration and
  readout;
- the SLINK driver, fed by the DAQ record stream.

The Input Module path is a separate chain. The bit layout of objects and
regions on the cables was never fixed, so the algorithm inputs are taken
already decoded.

## Where this RTL departs from, or adds to, the original design

These parts follow the original design:

- the sort structure (presort of four, three 24-to-4 blocks, one 12-to-4
  block), the 6-bit rank and the 14-clock sort latency;
- the 3x3 sum-and-compare clustering over strips, with data duplication
  instead of module-to-module links;
- the three jet classes and the initial sort;
- energy integration per cluster module;
- jet counting, per-bunch luminosity counting, the derandomisers, a DAQ
  concentrator, and capture/playback buffers;
- automatic per-bit phase and bunch-crossing alignment of the inputs;
- a flexible input-to-link mapping with duplication and 28-bit links.

These are this design's own choices, because the original leaves them open:

- The grid is 22 x 18 regions, with four forward rows at each end.
- Region Et is 10 bits, and the location is encoded as eta/phi indices.
- Jets are seeded by a local maximum with an asymmetric tie rule, the tau
  rule uses all nine window bits, and the rank scale is sum/4.
- Each cluster module covers two phi columns.
- There are 12 jet-count criteria of 5 bits, in the format described above.
- The missing-energy direction has 36 sectors, and the lookup table is
  replaced by logic.
- The luminosity memory is double-buffered and integrates over 16 orbits.
- An Input Module has 28 bits per cable, a 16-cycle delay range and 12
  output links.
- The capture/playback buffer has 1024 words and its own modes.
- The derandomiser has a 16-word FIFO. The DAQ record has a header,
  payload and trailer of 32-bit words with a valid/ready handshake.
- Latencies were chosen for everything except the sort.
- Reset is synchronous and active high.

The original describes the input FIFOs in two ways: as 320 MHz and as
out-of-phase 160 MHz FIFOs. Both give four samples per bit, which is what
`im_sync` assumes.

These parts are not built:

- the control FPGA and its time-multiplexed control/DAQ bus, whose protocol
  is unspecified;
- the SLINK;
- the Channel Link chipsets;
- the TTC receiver;
- the DLLs, the ECL receivers and the control CPU;
- the muon-trigger output path.

The partitioning of the jet/tau sorts and the energy sum over Stage A and
Stage B FPGAs is not modelled. Chip-to-chip links are plain wires. The top
level carries one of the fourteen Input Modules.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each testbench compares its module against a
model written independently in the testbench:

- The sort tests use a repeated-maximum search.
- The jet and energy tests rebuild the algorithm from scratch, with weights
  computed from real cos/sin.
- The missing-Et direction is checked against `$atan2`. Vectors within 0.3
  degrees of a sector edge are skipped, because the Q10 boundaries may
  legitimately round either way there.
- Latencies are checked to the exact clock.

For example, to run the end-to-end test:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/gct_pkg.sv tb/sort_ref_pkg.sv tb/jet_ref_pkg.sv tb/gct_top_tb.sv \
  --top-module gct_top_tb -o sim && obj_dir/sim
```

For a block test, replace `gct_top_tb` with the block's testbench, for
example `jet_cluster_tb`.

`gct_top_tb` runs the whole design at its default parameters. This takes
about a minute and a half of simulation. It covers:

- 17 orbits of crossings, the first 80 of each orbit carrying random physics
  and every GT word compared;
- Level-1 accepts, including bursts that overflow the FIFOs and stalls of
  the reader, with every DAQ record checked word by word;
- luminosity readback after the first integration period;
- capture, readback and playback in the test buffer;
- automatic setup of eight input cables with random phases and skews, with
  the chosen phase and delay of every bit read back and checked;
- each of these mechanisms, which is counted, and the test fails if one
  never happened.

The block testbenches use reduced sizes only where a default would make the
test slow: the luminosity orbit, the buffer depth and the derandomiser
latency.
