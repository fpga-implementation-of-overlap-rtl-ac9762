# Overlap Muon Track Finder processor (OMTFP) in SystemVerilog

The CMS muon system overlaps in the barrel–endcap transition region. There, three
kinds of muon chambers (RPC, DT, CSC) each see only a few layers of a track. The
Overlap Muon Track Finder takes the hits of all three, as azimuthal angles φ, and
assigns a transverse momentum (pT) by matching them against *golden patterns*.

A golden pattern describes an average track of one pT and charge. For each
detector layer it gives two things:

* the expected angle difference to the *reference layer*, Δφ_mean;
* a table of weights: roughly log-likelihoods of how far a hit lies from that mean.

The detector is cylindrically symmetric, so one pattern set works at every φ. Only
angle differences to a *reference hit* are used.

For each reference hit, every pattern does the following:

1. In each layer it picks the hit nearest to its Δφ_mean.
2. It looks up that hit's weight and adds it to the pattern's sum.
3. It counts the layers that matched ("fired layers").

The winning pattern has the most fired layers and then the largest sum of weights.
It gives the candidate's pT and charge.

This RTL implements one processor, which covers 70° of φ. The defaults are:

| quantity | default |
|---|---|
| detector layers | 19 |
| input channels per layer | 14 |
| reference layers | 8 |
| reference-hit definitions | 80 |
| connection areas | 8, with up to 6 inputs per layer |
| golden patterns | 50 |
| golden pattern units (GPUs), one per pattern and layer | 950 |
| angle width | 10 bits |

The clock is 320 MHz. That allows eight reference hits per 25 ns bunch crossing
(BX). An RPC strip-to-angle converter feeds some of the inputs.

## Data flow

```
 RPC link words ──► rpc_angle_converter ×6 ──┐
                                             ├─► omtfp
 other angles (DT, CSC, …) ──────────────────┘
 omtfp:
   refhit_detector ─► refhit_prio_encoder ─► conar_builder ─► gpp ×50 ─► muon_sorter ─► candidate
   (input regs +       (1 reference hit      (mux, Δφ, layer   (19 chained  (tree of 4-input
    80-bit vector)      per clock)            skew)             gpu each)    sorters)
```

`omtf_top` wires the whole design. `omtfp` is the processor on its own.

**Crossing timing.** `bx_load` is asserted once every 8 clocks. On that edge:

* all 19×14 input angles are registered;
* every reference-hit definition is compared with its input channel.

The 80-bit vector of matches goes to the priority encoder. The encoder then hands
out one reference-hit number per clock, highest priority (lowest index) first. When
the next crossing loads, any reference hits not yet handed out are dropped. So at
most eight reference hits per crossing are processed.

**Input copies.** A second copy of the input registers loads two clocks after the
first. It keeps the crossing's hits stable until its eighth reference hit has
passed the connection-area multiplexer, even though the next crossing is already
being scanned.

**Latency.** With the defaults, the candidate of the k-th reference hit of a
crossing sampled at edge E is on the outputs after edge E + 29 + k. In general
this is E + 7 + N_LAYERS + sorter levels + k. Throughput is one candidate per
clock.

## The golden pattern processors (`gpp`, `gpu`, `weight_lut`)

This is the bulk of the design: 950 instances of `gpu`. Each unit handles one layer
of one pattern. Each of its 4 pipeline stages is registered:

| clock | work |
|---|---|
| 1 | For each used input: φ_dist = Δφ − Δφ_mean[reference layer], saturated to 10 bits, and its magnitude. The Δφ_mean table (one value per reference layer) is a constant of the instance. |
| 2 | The active input with the smallest \|φ_dist\| is the best matching hit; the lower input number wins a tie. The LUT address is formed from it, with a range check (below). |
| 3 | Read the weight from the unit's own 2048×9 ROM (`weight_lut`). |
| 4 | `sum_out = sum_in + weight` and `fired_out = fired_in + 1` if the layer fired; otherwise both are passed on unchanged. |

**LUT address.** The 11-bit address is `{reference layer (3), φ_dist field (6), φ_hit
field (2)}`.

* φ_dist field: φ_dist arithmetically shifted right by DIST_SHIFT. Low-pT patterns
  are wide, so they drop more low bits.
* φ_hit field: the original hit angle shifted right by PHI_SHIFT. These coarse
  position bits let the tables correct small deviations from cylindrical symmetry.

**Range check.** Each field must fit in its signed width. In other words, the bits
above the field must be copies of its sign bit. If either check fails, the layer
does not fire and adds nothing.

Both shifts and the number of used inputs are set per unit.

**Chaining.** The units of one pattern form a chain through `sum_in`/`fired_in`,
one clock per layer. The connection-area builder therefore delays layer l by l
clocks (a shared "skew" line in front of all 50 processors). Each unit then
receives its layer exactly when the running sum from the previous layer arrives.
The last unit delivers the pattern's total after GPU_LAT + 18 = 22 clocks.

**ROM contents.** Each `weight_lut` fills its ROM at initialisation from
`omtf_cfg_pkg::gpu_weight(PATTERN, LAYER, address)`. Every table is therefore
selected by its pattern and layer index. No large constant record has to be
elaborated, and no data files are needed.

## Reference hits and the priority encoder (`refhit_detector`, `refhit_prio_encoder`)

A reference-hit definition names four things:

* a layer and input channel;
* an inclusive φ range;
* its reference-layer number;
* the connection area to use.

The detector sets bit i when definition i matches an active hit.

The encoder is a two-level pipeline:

* **Level 1.** The 80 bits are split into 8 groups of 10. Each group keeps its
  pending bits and a registered *head*, the position of its first pending bit.
* **Level 2.** Picks the first group with a valid head, registers that position as
  the output, and tells the group to advance. On the next clock the group's next
  bit becomes its head.

Both levels are short, and one position leaves per clock with no bubbles. The
first position appears one clock after the load.

## Connection areas and Δφ (`conar_builder`)

A connection area says, for each layer, which run of input channels (`first`,
`len`) may hold hits of a track starting at that reference hit. It maps these onto
the 6 outputs of the layer, registered. Unused outputs are inactive.

One clock later, φ_refHit is subtracted from every selected angle, saturating to
10 bits. The original angle travels alongside, for the LUT address.

## Muon sorter (`muon_sorter`, `sorter_node`)

The sorter is a tree of registered 4-input elementary sorters. The number of levels
is the smallest L with 4^L ≥ N (3 levels for 50 patterns). Each level has
ceil(N/4^k) nodes, and missing inputs of the last node are tied off as invalid.

The comparison key is {fired layers, sum of weights}. Ties go to the lower pattern
number. Changing `SORTER_FAN` or `N_PATS` rebuilds the tree automatically.

The processor outputs a candidate when a reference hit was processed and its best
pattern fired at least one layer.

## RPC strip-to-angle converter (`rpc_angle_converter`)

RPC link boxes send only the non-empty partitions of a chamber. A partition is D=8
strips. Each word carries:

* the chamber number (C=2 bits);
* the partition number (P=4 bits);
* a delay (T=3 bits);
* the strip bits.

Each converter handles one link and one pseudorapidity range: partitions
`PART_FIRST … PART_FIRST+NPART-1` of every chamber (0…11, i.e. 96 strips, by
default). `frame_end` closes a crossing's frame. The accumulated 4×96 strip map
then runs through three blocks:

1. **`rpc_cluster_size_calc`** finds every run of adjacent fired strips, never
   across a chamber boundary. It writes the run's width at the run's first strip.
   Runs wider than M=3 get width 0, so they are discarded.
2. **`rpc_cluster_sorter`** keeps the L=2 widest clusters, lower strip first on a
   tie, with their base (first) strip.
3. **`rpc_angle_convert`** computes, in two stages,
   `angle = ANGLE_BASE + chamber·CHAM_STEP + ((2·strip + width − 1)·SCALE_NUM >>> SCALE_SHIFT)`.
   This is the cluster centre in half strips, mapped linearly onto a 10-bit angle.

The frame's time is one more than the largest partition delay seen, saturating at
7. For example, a frame whose partitions arrive with delays 0, 1 and 2 gets time 3.
From `frame_end` to `out_valid` takes 5 clocks.

In `omtf_top`, converter c drives layer 13 + c. The cluster of chamber h in output
slot j drives channel 2h + j. The result is held until the converter's next frame.
All other channels are inputs of `omtf_top`.

## Configuration (`omtf_cfg_pkg`)

The real definitions of reference hits, connection areas and golden patterns come
from Monte Carlo simulation of the detector. None are reproduced here. Instead,
`omtf_cfg_pkg` computes a complete, deterministic and range-safe configuration from
the indices, comparable to the random "worst case" configurations one uses to prove
that the processor builds:

* reference layer r is detector layer 2r;
* reference hit i has reference layer i mod 8, φ bin i/8 (10 bins of 100 counts),
  input channel bin + r mod 3, and connection area 8·bin/10;
* connection area c, layer l covers inputs c … c + 5 − (l mod 3);
* pattern p has pT bin p/2 and charge sign + for even p;
* Δφ_mean = ±96·(l − 2r)/(pT bin + 4);
* weight = max(0, 300 − (5 + q mod 4)·d²/2) plus a small index-dependent term,
  where d is the signed φ_dist field.

To use a physics configuration, replace these functions. They fix only constants;
no logic depends on the formulas. The widths in `omtf_pkg` bound the ranges:

* 14 inputs per layer;
* 6 connection-area outputs per layer;
* 10-bit angles;
* 9-bit weights;
* the 3/6/2-bit LUT address split.

The physics output is therefore only as meaningful as the configuration you load.

## Where this design makes its own choices

The algorithm, the block structure and all the sizes listed above follow the
processor's published description. The following are this design's choices:

* **Pipeline.** The cut into stages: 4 clocks per GPU, 1 per sorter level, 2 in the
  connection-area builder.
* **Skew.** The shared skew line in front of the pattern processors.
* **Input registers.** The double input register.
* **Ties.** The tie rules in the best-hit selection, the sorter and the cluster
  sorter.
* **Δφ.** Saturation of Δφ and φ_dist.
* **Range check.** The sign-extension form of the range check. A separate "number
  of φ_hit MSBs to check" setting is implied by PHI_SHIFT and the fixed 2-bit field.
* **Tables.** The 2048×9 weight table and its address layout.
* **Converter framing.** The `frame_end` strobe, the time rule and the linear angle
  map.
* **Top-level wiring.** How converters are wired to layers and channels.

Not included:

* the gigabit receivers and the decoding of the link-box compression (the
  converters start from recovered partition words);
* DT and CSC angle conversion;
* realignment of delayed RPC data to its crossing (the time is only reported);
* any selection among the up to 8 candidates of one crossing.

Timing closure at 320 MHz and the resources on the target FPGA have not been
checked. The ROM initialisation by formula is evaluated by the simulator and by
synthesis tools that run initial blocks. Tools with a limit on compile-time
evaluation may stop on the 950 × 2048 table entries.

## Files

* `rtl/omtf_pkg.sv`, `rtl/rpc_pkg.sv`: sizes and types.
* `rtl/omtf_cfg_pkg.sv`: configuration functions.
* `rtl/omtf_top.sv`: top of the whole design.
* `rtl/omtfp.sv` and its blocks: `refhit_detector`, `refhit_prio_encoder`,
  `conar_builder`, `gpp`, `gpu`, `weight_lut`, `muon_sorter`, `sorter_node`.
* `rtl/rpc_angle_converter.sv` and its blocks: `rpc_cluster_size_calc`,
  `rpc_cluster_sorter`, `rpc_angle_convert`.
* `tb/tb_<block>.sv`: self-checking testbench of each block.
* `tb/omtf_model_pkg.sv`, `tb/rpc_model_pkg.sv`: untimed reference models that the
  testbenches use.
* `tb/omtf_event_pkg.sv`: random track generator for whole crossings.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a watchdog.
Typical build and run with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_omtfp \
  -y rtl -y tb +libext+.sv -Irtl \
  rtl/omtf_pkg.sv rtl/omtf_cfg_pkg.sv rtl/rpc_pkg.sv \
  tb/omtf_model_pkg.sv tb/rpc_model_pkg.sv tb/omtf_event_pkg.sv tb/tb_omtfp.sv
./obj_dir/Vtb_omtfp
```

Test coverage:

* **Block testbenches.** Each compares against the reference models, cycle by
  cycle, including the latencies stated above.
* **`tb_omtfp` (12 patterns).** Random crossings with up to 14 tracks plus noise. It
  requires crossings that overflow the 8-reference-hit budget and empty crossings.
* **`tb_omtf_top` (12 patterns).** The same, with the RPC converters in the loop.
  It also requires discarded too-wide clusters, two-cluster frames and reference
  hits on converter-driven channels.
* **`tb_omtf_full`.** The same test as `tb_omtf_top` on the design at its full
  default size. Its C++ build is the slow part: the 950 differently parameterised
  GPUs take seven to ten minutes to compile, while the simulation
  itself takes well under a second.

`omtf_top` has the parameter `N_PATS`, which shrinks the number of patterns for
faster simulation. `omtfp` additionally has `N_LAYERS` and `SORTER_FAN`.
