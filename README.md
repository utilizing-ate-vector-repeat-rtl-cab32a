# Scan test decompression with tester vector repeat and linear decompressors

Scan test data is mostly don't-care bits, and the test cubes of one circuit
look alike, because cubes that target nearby faults set the same inputs.
Linear decompressors (LFSR reseeding and similar) are good at skipping
don't-care bits. They cannot exploit the likeness between cubes: they need
at least one tester bit per specified bit. Testers have a *vector repeat*
instruction that replays stored vectors n times from one copy in vector
memory. This design uses that instruction to carry the bits that cubes share.

The test cubes are grouped into **clusters**. For one cluster, every scan
position is one of three kinds:

* **common**: every cube that specifies the bit agrees on its value;
* **unique**: two or more cubes specify the bit with opposite values;
* **don't care**: no cube specifies the bit.

Two sequential linear decompressors then run side by side:

* The **common sequence generator (CSG)** produces, for each scan chain, a
  *common data* bit and a *common control* bit. Both sequences are the same
  for every cube of the cluster. So the tester stores the CSG input stream
  once and replays it for each cube with a single vector-repeat instruction.
* The **unique sequence generator (USG)** produces a *unique data* bit per
  chain. Its input changes from cube to cube, but it only has to hit the few
  conflicting bits.

In front of each scan chain, a 2-to-1 multiplexer takes the common data
where the common control is 1 and the unique data where it is 0. The
storage needed for the shared bits, and for the control that marks them, is
paid once per cluster rather than once per cube. Only one repeat instruction
is needed per cluster.

The scheme is the one published by J.-S. Yang, J. Lee and N. A. Touba,
"Utilizing ATE Vector Repeat with Linear Decompressor for Test Vector
Compression", IEEE Trans. CAD, 2014. The RTL here is an independent
implementation of it.

The hardware does not depend on the test set. Only the tester data does,
and it is computed offline by solving linear equations (see *Computing the
tester data*).

## Worked example

Here are eight cubes of one cluster, eight scan positions each:

```
cube 1  0 1 1 1 1 0 1 x        common control  1 0 1 0 0 0 0 x
cube 2  0 0 1 1 1 0 1 x        common data     0 x 1 x x x x x
cube 3  0 1 1 1 1 0 0 x        unique data 1   x 1 x 1 1 0 1 x
cube 4  0 1 1 0 0 1 1 x        unique data 2   x 0 x 1 1 0 1 x
cube 5  0 0 x 1 1 0 0 x        ...
cube 6  0 1 1 0 1 1 1 x
cube 7  x 1 1 1 0 1 1 x
cube 8  x 1 1 1 1 1 1 x
```

Positions 1 and 3 are common, positions 2 and 4 to 7 are unique, and
position 8 is don't care. Before encoding, the cubes hold 53 specified bits.
After encoding there are 49:

* 2 common-data bits;
* 7 common-control bits;
* 40 unique-data bits.

The saving grows with the size of the cluster. The end-to-end testbench
loads exactly this cluster, and it checks both these counts and the scan
contents.

## Per-chain selection and the repeat-disable bit

`chain_select` holds the only control state of the decompression logic: the
one-bit **repeat-disable** flip-flop. For chain `i`:

```
sel_unique[i] = NOR(common_control[i], repeat_disable)
chain_in[i]   = sel_unique[i] ? unique_data[i] : common_data[i]
```

Some cubes correlate poorly with every cluster. For such a cube the tester
sets repeat disable to 1. Every select is then 0, and the CSG alone loads the
chains, like a plain linear decompressor (its stream is then simply not
repeated). The flip-flop is loaded from the tester pin `rd_bit` in the
`cube_start` cycle of each cube.

The hardware added per chain is one multiplexer and one NOR gate. Everything
else is the two decompressors and this flip-flop.

## The two tester architectures

`vr_decomp_top` has a `MODE` parameter. It selects the logic that matches
what the tester's repeat instruction can do.

### Repeat per pin group (`MODE = ATE_RPG`, default; `rpg_decomp`)

The tester can repeat vectors on some pins while the other pins keep
streaming:

* the repeated pins (`CSG_CH` = 3) feed the CSG;
* the streaming pins (`USG_CH` = 3) feed the USG.

Each test cube is loaded as follows:

| cycle(s)        | controls       | effect                                                         |
|-----------------|----------------|----------------------------------------------------------------|
| 1               | `cube_start`   | CSG and USG cleared; repeat disable := `rd_bit`                |
| `P`             | `load`         | both decompressors take pin data and advance; chains hold      |
| `CHAIN_LEN`     | `shift`        | both take pin data and advance; chains shift `chain_in`        |

The CSG part of the stream (pins 0-2) is identical for every cube of a
cluster, so it is one repeated block on the tester. The testbenches use
`P` = 29 preload cycles, about one cycle per 3 CSG stages. `P` is tester
data, not hardware.

The CSG is much larger than the USG here: 86 against 27 stages for the
default s13207 configuration. Most specified bits are common.

### Repeat on all pins only (`MODE = ATE_RPA`; `rpa_decomp`)

Some testers can only repeat all pins at once. Then all `PINS` pins go to
both decompressors, and the tester's repeat-disable pin `rd_pin` decides
which one takes them during `load` cycles:

| `rd_pin` in a load cycle | USG                 | CSG                 |
|--------------------------|---------------------|---------------------|
| 1 (non-repeated seed)    | injects and advances | held              |
| 0 (repeated CSG seed)    | held                 | injects and advances |

In `shift` cycles both advance without input.

Because the USG is held while CSG seeds arrive, one USG seed can carry the
unique bits of many cubes, and even of several clusters. A typical sequence:

1. `usg_start`, then 25 load cycles with `rd_pin` = 1: seed 1 into the USG.
   It covers clusters A and C.
2. For each cube of A: `cube_start`, 13 load cycles with `rd_pin` = 0 (the
   CSG seed of A, repeated per cube), then 35 shifts.
3. The same for each cube of C, with C's CSG seed. The USG keeps running
   from where A left it.
4. `usg_start` and seed 2, which covers cluster B. Then B's cubes.

This is why the USG is large in this mode (150 stages for s13207). The
end-to-end testbench runs this sequence with a three-cluster, seven-cube
example (2 + 3 + 2 cubes, with 2, 6 and 2 unique bits) and with random
clusters.

### Pin partitions for per-pin tester memory (`pin_rotator`)

Some testers have a separate memory behind each pin. There, the USG pins
fill their memory first, because they store one copy per cube while the CSG
pins store one copy per cluster. To even this out, the test set is split
into `PARTS` partitions. Partition `part` rotates the pins by
`part*PINS/PARTS`:

* with `PARTS` = 2 and `part` = 0, pins 0-2 feed the CSG and pins 3-5 the
  USG;
* with `part` = 1, the roles are swapped.

This block is used in the per-pin-group mode only.

## The sequential linear decompressor (`seq_lin_decomp`)

The scheme works with any linear decompressor. This design uses the plainest
one:

* **State:** an N-stage Fibonacci LFSR. It shifts toward stage N-1, and the
  XOR of the tapped stages enters stage 0.
* **Input:** tester input `c` of `ch` is XORed into stage `floor(c*N/ch)`
  when `inj` is high.
* **Outputs:** output `j` is the XOR of three distinct stages, a phase
  shifter. With `h = N/2 - 1` and `t0 = j mod N`, the stages are:
  * `t0`;
  * `(t0 + 1 + (7j + N/3) mod h) mod N`;
  * `(t0 + N/2 + (13j + 1) mod h) mod N`.

  The two offsets fall in disjoint ranges, so the taps never coincide and
  cancel.
* **Control:** `clear` zeroes the state, and `adv` low holds it. Holding
  stands in for gating the decompressor's clock.
* **Feedback:** `vr_pkg::lfsr_taps` gives taps from the usual table of
  maximal-length taps for the sizes used here (27, 28, 41, 48, 78, 86, 93,
  112, 115, 142, 145, 150). Other sizes fall back to `{N, N-1}`. A different
  polynomial only changes the tester data.

The CSG has `2*CHAINS` outputs:

* `[CHAINS-1:0]` is the common data;
* `[2*CHAINS-1:CHAINS]` is the common control.

The USG has `CHAINS` outputs.

## Computing the tester data

Every stage is a GF(2) linear function of the tester bits received since the
last clear. So each specified bit gives one linear equation in those bits.
To find the data:

1. Simulate the decompressor symbolically, with each stage held as a bit
   vector of coefficients.
2. Collect one equation per required output:
   * CSG, common position: common data = value, and common control = 1;
   * CSG, unique position: common control = 0;
   * USG: unique data = each cube's own value at its unique positions;
   * repeat-disabled cube: CSG data outputs only.
3. Solve by Gaussian elimination, and fill the free bits at random.

`tb/vr_ref_pkg.sv` implements this (`sym_decomp`, `gf2_solve`). The
end-to-end testbenches use it to encode clusters and then check that every
specified bit lands in the scan chains.

A system can be unsolvable when a stream is too short for the number of
specified bits. The encoder then has to use a smaller cluster or a longer
preload. The testbenches regenerate random clusters in that case and count
the retries.

## The tester model

`tb/ate_model.sv` stands in for the tester in the end-to-end testbenches.
It is a behavioural model used only in simulation, not part of the design.

* It holds an instruction memory and a vector memory. Each vector carries
  every input of the top: the control pulses, `part` and the six data pins.
* `ATE_SEQ` applies a block of vectors once.
* `ATE_RPT` applies a block `count` times (vector repeat). A mask marks
  the bits that repeat. The other bits come from a stream that keeps
  advancing, which models a tester that repeats one pin group while the
  other pins keep streaming.
* It drives a new vector after each falling clock edge. A rising edge on
  `start` runs the program, and `busy` stays high until it ends.

The programs the testbenches build:

* **Repeat per pin group:** one `ATE_RPT` per cluster. The mask covers the
  controls and the CSG pin group of the chosen partition. The USG pins
  stream one block per cube. A repeat-disabled cube is a single `ATE_SEQ`.
* **Repeat on all pins:** each USG seed is an `ATE_SEQ`. Each cluster is
  one `ATE_RPT` over its CSG seed and scan shifts, with the mask covering
  every pin.

A scoreboard checks each cube once its last scan shift is done. The
testbenches also check that every queued cube was checked, and that there
is one repeat instruction per cluster. They print the instruction count
and the vector-memory words used, next to the number needed without
repeat.

For a tester with memory behind each pin, the repeat-per-pin-group
testbenches also count the words behind each pin group. The group that
streams the USG data fills up first. A cluster sent on partition 1 moves
that load to the other group. The testbenches check that the fuller group
holds fewer words than it would if every cluster used partition 0.

## Parameters

Defaults are those of the ISCAS-89 circuit s13207 as published for this
scheme.

| parameter   | default                  | meaning                                                       |
|-------------|--------------------------|---------------------------------------------------------------|
| `MODE`      | `ATE_RPG`                | tester architecture                                           |
| `CHAINS`    | 20                       | scan chains                                                   |
| `CHAIN_LEN` | 35                       | cells per chain (700 scan cells of s13207 / 20; an assumption) |
| `CSG_N`     | 86 (RPG) / 78 (RPA)      | CSG stages                                                    |
| `USG_N`     | 27 (RPG) / 150 (RPA)     | USG stages                                                    |
| `PINS`      | 6                        | tester pins                                                   |
| `CSG_CH`    | 3                        | repeated pins (RPG)                                           |
| `USG_CH`    | 3                        | streaming pins (RPG)                                          |
| `PARTS`     | 2                        | pin partitions (RPG)                                          |

Published sizes for the other benchmark circuits:

| circuit | chains | CSG / USG, repeat per pin group | CSG / USG, repeat on all pins |
|---------|--------|---------------------------------|-------------------------------|
| s15850  | 20     | 115 / 28                        | 93 / 142                      |
| s38417  | 40     | 275 / 41                        | 231 / 261                     |
| s38584  | 40     | 145 / 48                        | 112 / 284                     |

These sizes are only parameter settings. The chain length for these
circuits is not published with them. `tb_vr_workloads` uses 31, 42 and 37
cells, from the circuits' scan-cell counts. The real test sets are not
included, so that testbench encodes random clusters sized to each
decompressor.

## Hierarchy

```
vr_decomp_top
├── pin_rotator        (MODE = ATE_RPG)
├── rpg_decomp         (MODE = ATE_RPG)
│   ├── seq_lin_decomp u_csg, u_usg
│   └── chain_select
├── rpa_decomp         (MODE = ATE_RPA)
│   ├── seq_lin_decomp u_csg, u_usg
│   └── chain_select
└── scan_chains
```

`vr_pkg` holds the mode enum and the tap/position functions.

`scan_chains` stands in for the scan chains of the circuit under test. It
only shifts, and it exposes every cell so that a loaded cube can be read
back. Response capture is not modelled. The tester and the circuit's logic
are outside the design; the tester is modelled for simulation only
(`tb/ate_model.sv`).

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench            | what it checks                                                                                             |
|----------------------|------------------------------------------------------------------------------------------------------------|
| `tb_seq_lin_decomp`  | every output, every cycle, against a bit-level model; linearity of the decompressor                        |
| `tb_chain_select`    | the multiplexer and NOR rule; repeat-disable loading                                                       |
| `tb_pin_rotator`     | pin assignment for 2 and 4 partitions                                                                      |
| `tb_scan_chains`     | every cell against a queue model                                                                           |
| `tb_rpg_decomp`      | `chain_in` each cycle against reference CSG/USG models, under random controls                              |
| `tb_rpa_decomp`      | the same, plus load gating by `rd_pin` and USG state kept across cubes                                     |
| `tb_vr_decomp_top`   | end to end in both modes, driven through the tester model, with encoded clusters (including the two examples above); each mechanism must occur |
| `tb_vr_full`         | the default configuration only, end to end through the tester model                                        |
| `tb_vr_workloads`    | the published sizes of s13207, s15850, s38417 and s38584, in both modes, with random encoded clusters      |

For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vr_decomp_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/vr_pkg.sv tb/vr_ref_pkg.sv \
  tb/tb_vr_decomp_top.sv -o sim && obj_dir/sim
```

All of these run in well under a second.

## How far to trust it, and where it departs

**What the testbenches establish:**

* The top-level tests encode real clusters with an independent symbolic
  model and check that every specified bit arrives.
* The decompression scheme itself (clusters, common and unique data, one
  replayed stream per cluster, one USG seed across clusters) is therefore
  exercised as a whole, not just block by block.
* Both worked examples give the published bit counts.

**Choices this design makes where the scheme leaves them open:**

* **Decompressor:** the LFSR structure, polynomial, injection points and
  phase shifter.
* **Clearing:** a synchronous clear before each stream or seed. This is what
  makes a replayed stream reproduce the same sequence.
* **Control protocol:** the `cube_start` / `usg_start` / `load` / `shift`
  pulses.
* **Per-pin-group injection:** continuous injection in both load and shift
  cycles.
* **All-pins operation:** separate seed-load and free-running shift phases.
* **Pin counts:** 3 + 3 pins, following a six-pin illustration.
* **Chain length:** 35.

**Departures from the published description:**

* **Select polarity.** The per-chain gate is described once as a NOR and
  once as an OR next to the multiplexer. The NOR form is used. With it, a
  repeat-disabled cube forces every select to 0 and loads the chains from
  the CSG, as described.
* **Clock gating.** The decompressors are held with an enable instead of a
  gated clock. This is functionally the same.
* **Pin partitions.** The reconfiguration multiplexers sit at the
  decompressor inputs (one per CSG/USG input). The description places one
  per scan chain. Both exchange which tester pins feed which decompressor.

**Not included:**

* the clustering and recompaction software, beyond the equation solver in
  the testbench;
* the tester;
* the circuit under test.
