# Pile-up veto trigger processor

At the LHCb design luminosity a large fraction of bunch crossings contain
more than one proton-proton interaction. Such crossings are hard to analyse
and are better rejected at the first (L0) trigger level. This processor
finds the primary vertices of every crossing, 40 million times a second,
from the hits of two dedicated silicon planes placed upstream of the
interaction region. It counts them and raises a veto when there are too
many. It is written as synthesizable SystemVerilog for the processor crate
of the LHCb Pile-Up VETO system (NIKHEF), as published by its designers. The
front end (sensors, readout chips, optical links) and the control PC are not
included. Details that the published description leaves open were filled in
here; they are listed under [Departures and choices](#departures-and-choices).

## The idea: vertices from radius ratios

Both planes, A (nearer the interaction region) and B, measure only the
radius of each track hit. A straight track from a vertex on the beam line at
`z_pv` hits the planes at radii related by

    R_B / R_A = (Z_B - z_pv) / (Z_A - z_pv) = k

so the ratio `k` of a hit pair fixes the vertex position. Crossing every
hit of A with every hit of B (the *coincidence matrix*) and putting each
pair into a histogram over `z` gives a peak at each real vertex, on top of a
flat background from wrong pairings.

**Why a histogram bin is a matrix diagonal.** The design takes the channel
radii to grow geometrically with channel number,
`r(i) = 8.2 mm * (42/8.2)^(i/128)`. This is close to real R-sensors, whose
strip pitch grows with radius. Then `k = R_B/R_A = q^(b-a)`, with `a` and
`b` the channel numbers on A and B. Every pair with the same difference
`d = b - a` points to the same `z`. A z-bin (a wedge of constant `k`) is one
diagonal of the matrix, and its count is a cross-correlation:

    hist[i] = popcount( A & (B >> (D_MIN + i)) )

This needs 48 popcounts of 128 bits per detector half, not a 128 x 128
array of adders into arbitrary bins. With the assumed plane positions
Z_A = -220 mm and Z_B = -300 mm, diagonals 15 to 62 (48 bins) cover vertex
positions from +15 cm down to -15 cm. The bins are not equally wide: about
2.5 cm at +15 cm, about 1 cm near z = 0 and about 1.7 mm at -15 cm.

**Small vertices next to big ones.** The second interaction of a crossing
often has far fewer tracks than the first, and its peak can sink into the
background. After the highest peak is found, every hit that belongs to a
pair in that peak bin is cleared in both planes. The cleared hits are
`A & ~(B >> d)` and `B & ~(A << d)`. The matrix is then histogrammed
again. This removes the first vertex and a large part of the background, so
the second peak stands out. A third peak is searched in the same second
histogram, outside a window of `excl_radius` bins around the second.

**Counting.** Peak 1 is a vertex if its height is at least `th_first`. Then
peak 2, and after it peak 3, count if their heights reach `th_other`. The
vertex count (0 to 3) and a veto flag (count > `max_vertices`) go to the L0
decision unit.

## Two detector halves

Each plane is two half-wheels, left and right, with 128 comparator
channels each. A channel is the OR of four strips. A track crosses both
planes on the same side, so each half has its own coincidence matrix.
The right half sits 1.5 cm further downstream than the left, so the same
vertex falls into different diagonals in the two halves. `half_combine`
adds each right-half bin `j` into left-half bin `RIGHT_TO_LEFT[j]`, the
bin of the same `z`:

    RIGHT_TO_LEFT[j] = round( ln(k_L(z_R(D_MIN+j))) / ln q ) - D_MIN

Here `z_R(d)` is the vertex position that gives diagonal `d` in the right
half, and `k_L(z)` is the left-half ratio for that position. Two right bins
sometimes land in one left bin. One right bin lies outside the range and is
dropped (`-1`). The masking step clears right-half pairs on every diagonal
that maps to the peak bin. The table sits in `rtl/pu_pkg.sv` and must be
recomputed if the geometry constants change.

## The processor crate

```
 plane A hits --> mux_board A --+--> link 0 --> vertex_finder 0 --+
 (256/crossing)   (+l0_buffer)  |    link 1 --> vertex_finder 1 --+
                                |    link 2 --> vertex_finder 2 --+--> output_board --> L0 result
 plane B hits --> mux_board B --+    link 3 --> vertex_finder 3 --+    (+lumi_counter)
                  (+l0_buffer)       link 4 --> vertex_finder 4 --+    spare check
                                     (spare)
 test_pattern_gen (Test Board) can replace both hit inputs (test_mode)
```

`pileup_veto_top` has this whole crate in one module, with plain ports.

### Multiplexer Boards (`mux_board`)

There is one board per plane. Each crossing's event goes to the next of the
four Vertex Finders in round-robin order. It travels as four 64-bit words
on four consecutive cycles (low word first, `link_first` on word 0, with
the bunch number). A finder therefore receives one event every 100 ns, and
each link is busy all the time. If `spare_en` is set, the events of board
`spare_sel` also go to the fifth, spare finder. The 12-bit bunch counter
wraps at 3564 and restarts at 0 on `turn_start`, the LHC turn marker. Idle
crossings (`in_valid` low) are skipped and do not advance the round robin.

Each board also keeps its input for the data-acquisition path
(`l0_buffer`). A 160-entry circular buffer holds every crossing for the L0
latency of 4.0 us. When L0 accepts a crossing, 160 cycles after it, the
crossing goes into a 16-event derandomiser. The derandomiser is read out at
most once every 36 cycles (900 ns). A sticky `overflow` flag reports an
accept that found it full.

### Vertex Finder (`vertex_finder`)

A deserialiser collects the four words of both links into one event. The
pipeline below then takes one event per cycle:

| stage | work | module |
|---|---|---|
| 1 | left and right coincidence histograms | `coinc_hist` x2 |
| 2 | combined histogram | `half_combine` |
| 3 | peak 1 | `peak_finder` |
| 4 | clear the hits of peak 1 | `hit_masker` |
| 5 | histograms of the remaining hits | `coinc_hist` x2 |
| 6 | combined histogram | `half_combine` |
| 7 | peak 2 | `peak_finder` |
| 8 | peak 3, outside the window around peak 2 | `peak_finder` |
| 9 | vertex count and veto | (in `vertex_finder`) |

A delay line pads the result so that it appears exactly 48 cycles after the
event was complete. This keeps the L0 latency fixed. Latency and result
are the same whether events arrive back to back or with gaps. `pipe_delay`
also keeps the hits, earlier peaks and bunch number aligned with the
stages.

Two monitor registers (`vfb_monitor`) in each finder can be armed to
capture one chosen crossing (`spy_bx`). One sits after the first pass and
takes `{bx, peak1}` when peak 1 is found. The other takes the final result.
They are chained into one 88-bit shift register and shifted out serially,
least significant bit first: the result comes out first, then the
first-pass word.

### Output Board (`output_board`, `lumi_counter`)

Latencies are fixed, so results come back one per cycle, in round-robin
order. The board forwards the result of the board whose turn it is, one
cycle later. Any other pattern sets the sticky `seq_error` flag and is not
forwarded. The spare's result arrives in the same cycle as that of the board
it shadows. The two are compared, and `spare_checks` and `spare_mismatches`
count comparisons and differences.

`lumi_counter` counts forwarded results with 0, 1, 2 and 3 or more
vertices over a period of `lumi_period` cycles (5 to 60 s is 2e8 to 2.4e9
cycles). At the end of each period it copies the counts to `lumi_counts`,
pulses `lumi_snap` and starts again. The counters saturate.

### Test Board (`test_pattern_gen`)

This block holds 256 patterns of 512 bits, written as 32-bit words
(address = pattern x 16 + word, word 0 = bits 31:0 of plane B's right
half). On `sw_trigger` it plays patterns 0 to `n_pat-1`, one per cycle,
starting two cycles after the trigger. With `test_mode` set they replace
the detector inputs. The block also shifts in the monitor register picked
by `spy_sel` and returns it as 32-bit words on `vme_rdata`. Only the data
path of a word-wide bus is modelled, not the VME protocol.

## Timing summary

| path | cycles (25 ns) |
|---|---|
| hits in -> first link word | 1 |
| link words per event | 4 |
| complete event -> finder result | 48 |
| finder result -> `l0_result` | 1 |
| **hits in -> `l0_result`** | **54 (1.35 us)** |
| L0 accept after its crossing | 160 (4.0 us) |
| derandomiser readout spacing | 36 (900 ns) |

All registers use a synchronous, active-low reset (`rst_n`), except the
memories. Before the first 160 cycles after reset have passed, an L0 accept
reads memory that was never written.

## Configuration (`vf_config_t`)

| field | meaning |
|---|---|
| `th_first` | minimum height of peak 1 for it to count as a vertex |
| `th_other` | minimum height of peaks 2 and 3 |
| `excl_radius` | bins on each side of peak 2 not searched for peak 3 (0-7) |
| `max_vertices` | veto when more vertices than this are found |

The sizes are constants in `pu_pkg`: `N_CH` (128 channels per half-plane),
`N_BINS` (48), `D_MIN` (15), `N_VFB` (4), `SER_WORDS` (4), `VFB_LATENCY`
(48). `lumi_counter`, `l0_buffer` and `test_pattern_gen` have their own
parameters. If you change `N_CH`, `N_BINS` or `D_MIN`, recompute
`RIGHT_TO_LEFT`.

## Departures and choices

Taken from the system description: the two-plane coincidence-matrix
method, the z-histogram, masking the hits of the first peak and
histogramming again, the search for second and third peaks, adjustable
thresholds, and the combination of the two halves with a correction for
their 1.5 cm offset. Also taken from it: the 512-channel configuration,
the crate of two Multiplexer Boards, four round-robin Vertex Finders plus
a spare and an Output Board, the 48-step latency at 40 MHz, the
turn-start synchronisation, luminosity counting of 0/1/2/more vertices over
5-60 s, the planned L0 buffer with the front-end L0 parameters (4.0 us,
16 events, 900 ns), and the test set-up of pattern memory, software trigger
and shifted-out monitor registers.

Chosen here because the description leaves them open:

- the geometric channel radii (8.2 to 42 mm) and the plane positions
  (-220 mm, -300 mm). These turn z-bins into matrix diagonals, and they set
  the bin count (48) and the half-correction table. A real channel map
  would change the bin boundaries. The structure would stay the same if the
  bins stay close to diagonals; otherwise `coinc_hist` needs a general
  pair-to-bin map;
- the link format (4 words of 64 bits), the idea that each Multiplexer
  Board carries one plane, and the bunch-number width;
- the pipeline split into 9 stages, padded to 48 cycles;
- the vertex-count rule, the tie rule (the lower bin wins) and the
  exclusion window for peak 3;
- the error flag and the spare counters of the Output Board, and the
  snapshot scheme of the luminosity counters;
- the pattern memory size and bus layout of the Test Board, and what the
  monitor registers capture (the first-pass word `{bx, peak1}` and the
  final result of one crossing).

Departures:

- The prototype splits a Vertex Finder over two FPGAs: the first pass in
  one, masking and the second pass in the other. Here both are one module.
- With 128 log-spaced channels per half-plane, one diagonal is about 1 cm
  of z near the interaction point and 2.5 cm at +15 cm. The system
  description expects a vertex accuracy of 3-4 mm from the channel
  granularity alone. A real channel map with linearly growing pitch is
  denser at small radius and would give finer bins downstream.
- The 1024-channel configuration (uncombined sectors, four Multiplexer
  Boards) is not provided. It would need `N_CH = 256` and a new geometry
  table.
- Geometry (`RIGHT_TO_LEFT`, `D_MIN`, `N_BINS`) is fixed when the design
  is built. Other beam or detector conditions mean a rebuild and a reload of
  the FPGAs. Only the thresholds, the exclusion window and the veto level
  can be changed at run time.
- The L1 buffer and the DAQ link protocol are not modelled. `l0_buffer`
  hands out whole events in parallel.

## Files

`rtl/`: `pu_pkg` (constants, types, half-correction table),
`pileup_veto_top`, `mux_board`, `l0_buffer`, `vertex_finder`,
`coinc_hist`, `half_combine`, `peak_finder`, `hit_masker`, `vfb_monitor`,
`output_board`, `lumi_counter`, `test_pattern_gen`, `pipe_delay`.

`tb/`: one self-checking testbench `tb_<module>` per module,
`tb_vertex_efficiency`, and `tb_ref_pkg`. `tb_ref_pkg` is a reference model that recomputes histograms,
peaks and masking pair by pair over the full coincidence matrix, with no
shifts or popcounts, plus an event generator that places tracks of chosen
vertices on the right diagonals and adds noise hits.

## Simulating

With Verilator 5 (two-state simulation; every register that is read has a
reset):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pu_pkg.sv tb/tb_ref_pkg.sv tb/tb_pileup_veto_top.sv \
    --top-module tb_pileup_veto_top
./obj_dir/Vtb_pileup_veto_top
```

Replace `tb_pileup_veto_top` with any other `tb_<module>`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_pileup_veto_top` runs the whole crate at its real sizes for 3900
crossings. That is more than one LHC turn, with idle crossings, 300
crossings at 75 ns bunch spacing, a turn restart and random L0 accepts. It then loads and plays 60 test patterns and
reads a monitor chain back. Every result is checked against the
reference model and must arrive exactly 54 cycles after its crossing. The
run also checks the spare board, the luminosity snapshots and the DAQ
events. It counts how often each mechanism happened: every vertex count,
veto, every board, masking, counter wrap and restart, snapshots, DAQ
readout, test playback and monitor readback. A mechanism that never
happened is a failure. The run takes about 20 s.

The block testbenches check the latency of each block cycle by cycle. They
also cover corner cases: ties and all-zero histograms, fully lit planes,
derandomiser bursts of 16 accepts and an overflow, and saturation of the
luminosity counters.

`tb_vertex_efficiency` measures how often the Vertex Finder finds generated
vertices. The events have smeared tracks (1 in 4 tracks one channel off the
ideal diagonal) and 24 random noise hits. A vertex counts as found if a peak
above threshold lies within one bin of it. Measured results:

| Sample (300 crossings each) | Found |
|---|---|
| one vertex, 15-40 tracks | 300/300 |
| two vertices of similar size, 15-40 tracks each | 271/300 and 245/300 |
| 30-40 tracks plus 6-10 tracks: the large vertex | 299/300 |
| same sample: the small vertex | 168/300 (67/300 without masking) |

The small vertex is found less often because the smeared tracks of the
large vertex sit one diagonal off the masked one. They survive masking and
form a residual peak next to it. Masking a window of bins around the first
peak would help, but it is not built.
