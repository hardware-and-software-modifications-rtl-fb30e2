# Binary modified-neocognitron face recogniser

This RTL classifies a 32x32 grey image into one of 12 classes (faces of 12
people in the original application). The network is a simplified
neocognitron. Every hidden cell has a one-bit output, so the hardware needs
no multiplier except a single shared one in the output activation:

* **S (simple) cells** do not compute a weighted sum and a sigmoid. At each
  receptive-field position, the plane whose weight vector is nearest to the
  field in Manhattan distance (sum of |x - w|) outputs 1. Every other plane
  outputs 0. This is winner-take-all.
* **C (complex) cells** output 1 if any S cell in their window is 1. Each one
  is a plain OR gate.
* **Output cells** see only binary inputs. An AND gate and an accumulator
  therefore replace each multiply-accumulate. One shared saturating-linear
  ("satlin") unit then replaces the sigmoid.

The architecture follows the paper *Hardware and Software modifications on
the Neocognitron and its binary implementations on FPGA*: a SIMD array with
a control unit, a memory unit, a segmentation unit and a block of processing
elements, clocked at 50 MHz on a Spartan-3 in that work. The network sizes,
the 9-bit data path and the 5-lane x 4-PE array below are the paper's. The
micro-architecture (beat format, pipeline, address maps, handshakes, fixed-point
constants) is this implementation's own. The last sections list where it
departs from the paper.

## The network

| layer | planes | field | stride (overlap) | output map | cell |
|---|---|---|---|---|---|
| input | 1 | – | – | 32x32, 8-bit grey in 9-bit words | – |
| S1 | 4 | 5x5 | 1 (4 px) | 28x28x4, one-hot per position | nearest plane |
| C1 | 4 | 4x4 per plane | 2 (2 px) | 13x13x4 | OR |
| S2 | 16 | 4x4x4 (all C1 planes) | 1 (3 px) | 10x10x16, one-hot | nearest plane |
| C2 | 16 | 4x4 per plane | 2 (2 px) | 4x4x16 = 256 bits | OR |
| FC | 12 | all 256 C2 bits | – | 12 scores | AND/accumulate + satlin |

The class code is the index of the largest of the 12 scores. On a tie the
lower class wins.

The paper states the window sizes and overlaps only in prose. The reading
above is the one that gives whole map sizes at every layer (32 → 28 → 13 →
10 → 4). All of these numbers are `localparam`s in `rtl/mneo_pkg.sv`.

## One recognition, step by step

`control_unit` runs the layers strictly one after another. Every layer reads
its input from a map in the memory unit and writes its output to the next
map:

| phase | what happens | clocks |
|---|---|---|
| S1 | 784 fields x 5 beats: one field row of 5 pixels per beat | 3,920 + 4 |
| C1 | 169 positions, one per clock, all 4 planes at once | 169 + 2 |
| S2 | 100 fields x 64 beats: 4 plane groups x 4 input planes x 4 rows | 6,400 + 4 |
| C2 | 16 positions, all 16 planes at once | 16 + 2 |
| FC | 256 inputs, one per clock, into 12 accumulators | 256 + 2 |
| ACT | 12 sums, one per clock, through the shared satlin unit | 12 + 3 |

A full recognition takes about 10,790 clocks, or 216 µs at 50 MHz.

## S layers: the distance PEs and the competition

This is the part that needs the most care.

**Segmentation unit.** `segmentation_unit` turns a layer's input into a
stream of *beats*, one per clock. A beat carries up to `LANES` = 5 values,
a lane mask, and a `beat_t` struct with these fields:

* `valid`
* `first`: clear the accumulators
* `last_grp`: the distances are complete
* `last_pos`: the last group of this field
* `last_all`: the last beat of the layer
* `grp`: the plane group
* the field position

The unit addresses the memories from its counters. The beat goes out one
clock later, together with the memory data.

* **S1:** a beat is one row of a 5x5 image field. All 5 lanes are used.
* **S2:** the whole 4x4x4 C1 window is read once per field. Each beat
  presents one row of one input plane. A C1 bit of 1 becomes `BIN_ONE` = 256
  (1.0 on the weight scale); a 0 stays 0. Lane 4 is masked off.

**PE array.** `pe_unit` holds `N_PE` = 4 `s_cell_pe` instances. Each one adds
the lane sum of |x - w| to its accumulator. All four PEs see the same data
but different weights, one plane each. That makes 5 x 4 = 20 connections per
clock: the paper's "5 input connections evaluated by 4 weight connections",
or 1 G connections/s at 50 MHz.

**Plane groups.** S2 has 16 planes but there are only 4 PEs, so each field
is streamed four times, once per plane group. `competition_unit` takes the 4
distances of each group and keeps the best candidate across the groups.
After the last group it outputs the winning plane, 0..15. A strict `<`
comparison gives ties to the lowest plane number, inside a group and across
groups.

**Result.** The winner is written as a one-hot word into the S map at the
field position. The write of the layer's final position carries `s_done`.

## C layers

For each C position, the control unit reads the 4x4 window at
(2*row, 2*col) from the S map. One clock later, 16 `c_cell` OR gates (one per
plane; only 4 of them matter for C1) produce the word that is written into
the C map.

## Output layer and satlin

During FC, the control unit steps the input number
`n = ((row*4)+col)*16 + plane` over 0..255. The memory unit returns the C2
word at (row, col) and the 12 weights stored at word `n`. Each `ff_cell`
adds its weight if bit `plane` of that word is 1.

During ACT, the 12 sums go one per clock through the single `satlin_unit`.
Its function is:

    y = 0                  x <= -th
    y = 1                  x >= +th
    y = 0.5 + x * 0.5/th   otherwise,   th = 2.5

The unit is two pipeline stages: a compare and multiply, then an add and
clamp. It uses one multiplier.

Number formats, all chosen by this implementation:

| quantity | format |
|---|---|
| FC weight | signed 9 bits with 5 fraction bits, range ±8 |
| sums | 17 bits, same scale |
| `SAT_TH` | 80, which is 2.5 on that scale |
| `SAT_SLOPE` / `SAT_SHIFT` | 1638 / 10, which is 0.5/th in output LSBs per input LSB |
| score | unsigned 9 bits; 256 means 1.0 |

Each score is within one LSB of the real-valued satlin.

## Memory unit and loading

`memory_unit` holds the two weight stores (`weight_mem`) and the four binary
maps (`feature_map_mem`: S1 28x28x4, C1 13x13x4, S2 10x10x16, C2 4x4x16).
The current phase decides which map the PE array's S and C results go into,
and which S map the C-layer window comes from. All reads are registered.

Weights are trained off-line. Training is not part of this hardware. The
host loads weights one at a time, before `start`.

**S weights** (`sw_we`, `sw_addr`, `sw_elem`, `sw_data`, unsigned 9 bits).
Every word holds 4 PEs x 5 lanes, and the element number is `pe*5 + lane`.

* S1 plane k, field row i, column j: word `i`, element `k*5 + j`.
* S2 plane k, input plane p, row i, column j: word
  `5 + ((k/4)*4 + p)*4 + i`, element `(k%4)*5 + j`.

**FC weights** (`fw_we`, `fw_addr`, `fw_elem`, `fw_data`, signed). Weight
for input n and class c: word `n`, element `c`.

**Image** (`img_we`, `img_row`, `img_col`, `img_data`): one pixel per clock.

## Top-level interface and timing (`mneo_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of control and pipeline registers (memories are not reset) |
| `img_*`, `sw_*`, `fw_*` | in | host write ports described above; do not write while `busy` |
| `start` | in | one-clock pulse starts a recognition |
| `busy` | out | high from the clock after `start` until the run ends |
| `recog_end` | out | rises with the final result and stays high until the next `start` (cleared within two clocks of it) |
| `recog_code` | out | recognised class 0..11, valid while `recog_end` |
| `scores` | out | the 12 satlin outputs (256 = 1.0) |

## Departures from the paper and things to know

* **Filled-in details.** The paper does not give weight values, the way the
  image and weights reach the chip, the beat order, the S2 scheduling over 4
  PEs, the tie rule, the fixed-point formats, or how the recognition code is
  formed. This implementation chooses all of them, as described above. In
  particular, the class code as an arg-max is an assumption.
* **Weight storage.** The paper uses block ROMs initialised with trained
  weights, and block RAMs to buffer the segmented image vectors. Here the
  weights sit in writable arrays with a host write port. The segmented rows
  are streamed directly to the PEs rather than buffered. All memories are
  generic arrays, not FPGA primitives.
* **Satlin threshold.** The value th = 2.5 is read from the paper's plot of
  the sigmoid and its approximation.
* **Layer count.** The paper's overview figure draws three S/C stages. The
  network actually described and sized has two S/C stages plus the
  classifier, and that is what is built.
* **Not hardware.** Training (Kohonen self-organising maps for the S layers,
  the delta rule for the output layer) and the choice of network parameters
  run in software.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`.

`tb/tb_mneo_top.sv` runs three full recognitions at the default size. Each
run uses a random image and random weights. It checks every S1, C1, S2 and
C2 map and every score against a behavioural model of the equations, checks
the S1 clock count (20 connections per clock), and counts these mechanisms:

* every S1 plane winning
* S2 winners from a later plane group
* C cells at 0 and at 1
* FC inputs at 0 and at 1
* satlin low, linear and high regions

It takes well under a second:

    verilator --binary --timing --assert -Irtl rtl/mneo_pkg.sv tb/tb_mneo_top.sv \
              --top-module tb_mneo_top -Mdir obj_top
    obj_top/Vtb_mneo_top

`tb/tb_mneo_batch.sv` mimics the face test set the design was built for. It
loads the weights once, then classifies 60 images (12 classes x 5) back to
back, and checks every result and every recognition's clock count against
the model. Real face images are not available, so the images are synthetic:
12 random smooth prototypes, and noisy, brightness-shifted copies of them.
The output weights are templates of the prototypes' C2 codes. It reports how
many images land on their own prototype (55 of 60 with the default seed).
This shows the datapath working as a classifier. It is not an accuracy
figure for faces.

Any other testbench runs the same way: replace `tb_mneo_top` with its name.
The package file must come first. `-Irtl` lets Verilator find the modules.

## Files

* `rtl/mneo_pkg.sv`: sizes, formats, `phase_t`, `beat_t`.
* `rtl/mneo_top.sv`: top level.
* `rtl/control_unit.sv`, `rtl/segmentation_unit.sv`, `rtl/memory_unit.sv`,
  `rtl/pe_unit.sv`, `rtl/image_ram.sv`: the blocks of the SIMD array.
* `rtl/s_cell_pe.sv`, `rtl/competition_unit.sv`, `rtl/c_cell.sv`,
  `rtl/ff_cell.sv`, `rtl/satlin_unit.sv`: the cells.
* `rtl/weight_mem.sv`, `rtl/feature_map_mem.sv`: the storage.
* `tb/tb_<module>.sv`: one testbench per module.
* `tb/tb_mneo_batch.sv`: the 60-image batch.
