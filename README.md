# Roving self-test areas for an FPGA that keeps running

An FPGA deployed where nobody can service it has to find its own faults,
and it has to do so without stopping the application. The idea
implemented here is to test only a narrow strip of the array at a time. That
strip is the *self-testing area* (STAR). The rest of the chip keeps running
the application. When the strip has been tested, the application logic next
to it is moved into it, and the vacated strip becomes the new STAR. Over
many steps the STAR roves across the whole device. Every logic block and
every routing resource is therefore tested periodically in every mode, spare
resources included, and the application never sees an interruption longer
than the few clock cycles needed to move one strip of logic.

Inside a STAR, the FPGA's own logic blocks (PLBs) are configured as
*BIST elements* (BISTERs). A BISTER is made of:

* a test pattern generator (TPG);
* two identically configured blocks under test (BUTs);
* an output response analyzer (ORA) that compares the BUTs' outputs.

The comparison needs no stored expected responses. It also needs no
fault-free reference: if two BUTs disagree, one of them is wrong. Routing
is tested the same way: two groups of *wires under test* (WUTs) carry the
same pattern and are compared at the far end.

An external test controller (TREC) does the rest. It partially reconfigures
the device through its boundary-scan port, starts the BISTERs, and shifts
their results out. It also decides when to rove, and it reroutes around
faults it has located.

This repository has the SystemVerilog for what sits *in* the STAR and
around it:

* the logic tiles with their rotating BISTER;
* the interconnect BISTER;
* the result scan chain;
* the two pieces of glue TREC needs when it moves logic: an adjustable
  system clock that can be stopped, and a RAM-contents copier.

Two more things are modelled so the tests can run: a PLB, and the routing
(the latter only behaviourally, in the testbenches).

## Block map

```
roving_star_bist (top: one STAR)
 ├─ bister_tile  x N_LOGIC        3x2 PLB tile, rotating BISTER roles
 │   ├─ plb x 6                   the six PLB sites of the tile
 │   ├─ ora_scan_cell x 2         ORAs 1 and 2 (used in combined sessions)
 │   └─ bister_logic              TPG + pattern fan-out + ORA 0
 │       ├─ tpg_counter (12 bit)  exhaustive patterns for logic modes
 │       ├─ march_tpg             March C- for the RAM modes
 │       └─ ora_diag              ORA 0: compare + latch + scan stage(s)
 │           └─ ora_scan_cell
 ├─ bister_wut   x N_WUT          interconnect BISTER
 │   ├─ tpg_counter (2n bit)
 │   ├─ swapper                   realigns the second wire group
 │   └─ ora_scan_cell
 ├─ adaptive_clock                programmable, stoppable system clock
 └─ transfer_controller           copies RAM state when logic is relocated
star_pkg                          PLB configuration types, tile floorplans
```

Every file in `rtl/` begins with a comment giving the block's function,
interface, timing, and which choices are its own.

## The test-clock protocol

Everything in the STAR runs on the boundary-scan test clock `tck`. The
STAR is controlled over a four-wire bus:

| signal      | meaning |
|-------------|---------|
| `tck`       | test clock |
| `bist_rst`  | BIST Start/Reset: restarts every generator, clears every ORA (synchronous) |
| `scan_mode` | 1 = test: generators step, ORAs compare; 0 = shift results |
| `scan_out`  | end of the result scan chain |

One test session proceeds as follows.

1. Load the configurations (`site_cfg`, `tpg_sel`, `tile_rot`,
   `tile_combined`, `swap_sel`) and pulse `cfg_load`. In the real device
   this is a partial reconfiguration.
2. Pulse `bist_rst` for a cycle.
3. Hold `scan_mode` high until every `logic_done` and `wut_done` is high.
   The times are:
   * 4096 cycles for a counter-driven logic phase (2^12 patterns);
   * 160 for a March C- phase (10 operations x 16 words);
   * 256 for the interconnect BISTERs (2^(2·4)).
4. Drop `scan_mode` and shift out `3·N_LOGIC + N_WUT` bits. A 1 means
   fail. The order is:
   * the last interconnect BISTER first;
   * then the tiles from the last to the first, each giving its ORA 0,
     ORA 1 and ORA 2 bits in that order.

   The chain input is tied to 0, so the chain refills with passes.

The ORA flip-flop is a scan cell whose D input is multiplexed. In test
mode it takes `(any mismatch) OR (own output)`, so the first mismatch is
held until reset. In shift mode it takes the previous stage. The first
configuration of every set deliberately gives the two BUTs different
configurations. Every ORA must then read *fail*, which checks the scan chain
itself before its results are trusted.

## Logic test: one tile, six floorplans

A BISTER only tests its two BUTs. Its TPG and ORA cells go untested. The
tile's roles therefore rotate. A 3x2 tile has six PLB sites, numbered row by
row from 0 (top left) to 5 (bottom right). In each of six floorplans
(`star_pkg::TILE_3X2`), two sites are BUTs, one is the ORA, and three are
the TPG:

| floorplan | BUTs | ORA |
|-----------|------|-----|
| 1 | 1, 5 | 3 |
| 2 | 0, 3 | 1 |
| 3 | 1, 2 | 0 |
| 4 | 0, 4 | 2 |
| 5 | 2, 5 | 4 |
| 6 | 3, 4 | 5 |

Every site is a BUT exactly twice, each time against a different partner.
A single faulty PLB therefore fails exactly two floorplans. The one site
common to those two BUT pairs is the faulty one, and no other single fault
gives the same pair of failures. `tb_bister_tile` and the top testbench
check this diagnosis for every site.

Two faulty PLBs can hide each other only in a floorplan where both are the
BUTs and their faults give the same outputs. Each of them is also a BUT
against a good partner in other floorplans, so the pair is still detected.
In silicon there is a rare exception: the second faulty PLB may sit in the
TPG and skip exactly the patterns that expose the first. `tb_bister_tile`
gives every pair of sites the same fault and checks this rule. A
floorplan pairing the two, where there is one, passes. Every floorplan
with only one of them as a BUT fails.

**Combined sessions.** The BUTs of floorplans 1, 3 and 5 (sites 1, 2, 5)
are only ever compared with each other. The same holds for those of 2, 4
and 6 (sites 0, 3, 4). A combined session tests one such group of three
at once, with three ORAs, each comparing one pair. Every BUT is observed by
two ORAs. A faulty BUT makes exactly those two fail, and it is their common
BUT. Two combined sessions therefore test the whole tile, instead of six
configurations. Set `tile_combined = 1` and `tile_rot[0]` = session (0 or
1). ORA k then compares the pair of floorplan 2k + session + 1.

In the RTL only the BUT role of a site is a real PLB model (`plb`). The TPG
and ORA are ordinary logic (`bister_logic`, `ora_scan_cell`), so a fault in
a site shows only when that site is a BUT. In silicon, a faulty PLB can also
disturb the tile when it serves as an ORA.

### Test phases

Each floorplan or combined session is run once per PLB mode. The phase
list covers the logic block of the ORCA 2C/2CA families (phases 10–14 are
2CA-only), plus a scan check:

| phase | register | LUT/RAM mode | TPG |
|------:|----------|--------------|-----|
| 0 | (every PLB configured differently: scan-chain check) | | counter |
| 1 | – | asynchronous RAM | march |
| 2 | – | adder/subtracter | counter |
| 3 | – | 5-input multiplexer | counter |
| 4 | – | 5-input XOR | counter |
| 5 | FF, async reset, falling edge, active-low enable, LUT data | count up | counter |
| 6 | FF, async set, falling edge, always enabled, pin data | count up/down | counter |
| 7 | latch, sync set, active-low, active-high enable, LUT data | count down | counter |
| 8 | FF, sync reset, rising edge, pin data | 4-input LUTs | counter |
| 9 | latch, active-high, active-low enable, dynamic data select | 4-input LUTs | counter |
| 10 | – | multiplier | counter |
| 11 | – | a ≥ b comparator | counter |
| 12 | – | a ≠ b comparator | counter |
| 13 | – | synchronous RAM | march |
| 14 | – | dual-port RAM | counter |

The counter TPG is 12 bits wide. This covers the most inputs any mode uses:
`a` = bits 3:0, `b` = bits 7:4, `ctl` = bits 11:8. The ORA compares all
five PLB outputs.

`tb_logic_phases` runs the complete set: six floorplans x 15 phases on a
fault-free tile, then again on a tile with one PLB whose flip-flop clock
path is defective. It checks three things:

* exactly phases 5–9 fail, and only in the two floorplans where that PLB is
  a BUT;
* the PLB is located uniquely;
* since no LUT/RAM phase failed, the PLB can still be reused for
  combinational logic or RAM.

That last point is the "partially usable block" idea.

It then follows up with sixteen extra diagnostic phases, run in a
floorplan where the located PLB is a BUT:

* phases 1–4 route each register bit through the output multiplexer;
* phases 5–8 route each LUT output through it;
* phases 9–12 exercise the register as flip-flops, and 13–16 as latches,
  each phase with a different set/reset, clock and enable combination.

On the defective PLB, 1–8 pass and 9–16 fail. That confines the defect to
the register and clears the LUTs and the output multiplexer.

### Diagnostic ORA

`bister_logic` has a parameter `ORA_GROUP`, the number of output pairs
sharing one ORA flip-flop.

* `5` (default): one flip-flop for all five outputs, as in normal testing.
* `2`: locates a failure to a pair of outputs. This is what a logic block
  with two compares per flip-flop can do.
* `1`: locates the failing output.

A smaller group lengthens the scan chain by the extra flip-flops.
`tb_bister_logic` runs a `ORA_GROUP = 2` instance next to the default one.
It compares the grouped result with mismatch flags that the testbench
accumulates itself.

## The PLB model

`plb` is a behavioural-but-synthesizable stand-in for an ORCA-style logic
block. It is detailed enough that every test phase exercises something
real, and that faults can be *emulated by configuration*, as one does on
real silicon: a flipped LUT bit, the wrong clock edge, a latch where a
flip-flop should be, the wrong RAM read mode. Its parts are:

* four 4-input LUTs sharing 64 memory cells, which also serve as a 16x4
  RAM or a 16x2 dual-port RAM;
* add/subtract, count, multiply and compare modes;
* a four-bit register of flip-flops or latches, with set/reset options,
  clock polarity, clock enable polarity and data select;
* an output stage choosing between each LUT output and its register bit.

The pin assignment is this design's own, as are the mode encodings, the
dual-port width and the multiplier form. The latch mode is a real latch, so
synthesis reports 4 latch bits per PLB (24 per tile); this is intended.

## Interconnect test

`bister_wut` tests two groups of n wires (n = 4).

* A 2n-bit counter drives the low n bits onto both WUT groups and the high
  n bits onto the busses next to them. Over all 2^(2n) patterns, every wire
  is driven to both values against every neighbour. Shorts within a group,
  shorts between groups, opens and stuck wires all produce a mismatch.
* The second group may reach the ORA with its wires in a different order,
  because routing through the switch matrices can permute a bus. A
  `swapper`, set by `swap_sel`, restores the order before the pairwise
  compare.

The exhaustive set grows as 4^n, so wide busses are tested in groups.
With the parameter `K` below `N`, one group of K wires at a time gets the
2K-bit exhaustive patterns. Every other wire is held at a constant c, and
its neighbour at ~c. The counter is 2K + GW + 1 bits wide:

* the low 2K bits are the pattern for the active group's wires and neighbours;
* the next GW bits select the group;
* the top bit is c.

Each group therefore runs once with the idle wires at 0 and once at 1, and
any two wires still see both opposite value pairs. For N = 8 and K = 4 that
is 1024 patterns instead of 65536. The default `K = N` is the plain 2n-bit
counter.

The routing itself is outside the RTL. `tb/wut_route_model.sv` stands in
for it in simulation, with faults for:

* stuck-at-0 and stuck-at-1;
* open;
* wired-AND and wired-OR shorts to a neighbour;
* a dominant short;
* shorts within a group, between two wires or among three.

Comparison has one blind spot. If both compared groups carry the same
fault, for example the same two wires shorted in each, their outputs still
agree and the ORA passes. The remedy is to compare every set of wires
twice, each time against a different partner. `tb_bister_wut` shows this
with three sets X, Y and Z, where X and Y have identical shorts. The X–Y
comparison passes, and the Y–Z and Z–X comparisons both fail.

## Moving application logic

When the STAR roves, TREC does the following:

1. configures the logic's new location;
2. stops the system clock;
3. copies any RAM contents into the new location;
4. restarts the clock.

After rerouting around a fault, it may also lengthen the clock period.

* `adaptive_clock` divides `ref_clk` by a programmable period (at least 2).
  A new period takes effect at the next rising edge, so no runt pulse is
  produced. `stop` parks the clock low at the end of the current period.
* `transfer_controller` copies a 2^AW-word RAM one word per test clock. A
  16x4 LUT RAM therefore takes 16 cycles, or 17 with a registered source
  read.

The top testbench does one complete roving step. It writes a RAM on the
system clock, stops the clock, copies the RAM on the test clock, checks
that no system clock edge occurred during the copy, checks all 16 words,
restarts the clock, and then checks a new period.

Register state is moved differently. A temporary configuration routes each
old flip-flop's output to the D input of its new copy. One clock pulse,
taken from the test clock while the system clock is stopped, then copies
all of them at once. That is routing plus a single edge, so it needs no
block of its own here.

## Parameters of the top

| parameter | default | meaning |
|-----------|---------|---------|
| `N_LOGIC` | 7 | 3x2 tiles per STAR (40 PLBs, the last tile overlapping by two) |
| `N_WUT` | 2 | interconnect BISTERs |
| `WUT_N` | 4 | wires per WUT group |
| `TPG_W` | 12 | logic TPG width |
| `CLK_PW` | 8 | clock period register width |
| `RAM_AW`, `RAM_DW` | 4, 4 | relocated RAM size (16x4, one PLB's RAM) |

The sizes come from a 20x20-PLB ORCA 2C15A with a two-column STAR, which
holds 40 PLBs.

## Where this design departs from, or stops short of, the full method

* **Tile shape.** That device's STARs are normally cut into 4x2 tiles of 8
  PLBs, five per STAR position, rotated through 8 floorplans. Those
  floorplans are not reproduced here. The 3x2 tile with its six floorplans
  is used instead. Six tiles cover 36 of the 40 PLBs of a STAR position.
  A seventh tile takes the four leftover PLBs together with two PLBs of
  the sixth tile, which are simply tested twice. In the model every tile
  has its own six PLB instances, so those two PLBs exist twice (42 sites
  for 40 PLBs). One rotation set takes 6 x 15 = 90 configurations, not
  8 x 15 = 120.
* **TPG and ORA are logic, not PLBs.** As noted above, a PLB's own faults
  are only visible in its BUT role.
* **Five-output ORA.** ORA 0 compares five output pairs in one flip-flop.
  A real ORA in one PLB is a 4-bit comparator and a flip-flop.
* **Latch clock polarity.** The TPG changes patterns on the same `tck`
  edge on which the ORA samples. A latch's clock polarity alone is
  therefore invisible to the comparison. In `tb_logic_phases` the emulated
  defect also breaks the clock enable, and that is what fails phase 9.
* **Not in the RTL:**
  * the test controller (TREC is software on an external processor);
  * the boundary-scan TAP (the device's own);
  * the programmable routing and its configuration memory;
  * the roving and fault-bypass configurations themselves;
  * the interconnect test sessions, which are routing configurations
    applied around `bister_wut`;
  * the concurrent error detection used against transient faults in the
    working area.

  The top brings out the ports where these connect: the four-wire bus,
  `cfg_load` and the configuration words, the WUT drive and return wires,
  the clock controls and the RAM copy ports.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/star_pkg.sv tb/tb_roving_star_bist.sv --top-module tb_roving_star_bist -o sim
./obj_dir/sim
```

Substitute any other testbench name.

| testbench | what it shows |
|-----------|---------------|
| `tb_roving_star_bist` | top at default parameters, end to end |
| `tb_logic_phases` | all 15 phases x 6 floorplans, a PLB with FF-only faults, then 16 diagnostic phases on it |
| `tb_bister_tile` | floorplan table properties, diagnosis of every site, pairs of sites with identical faults, combined sessions |
| `tb_bister_logic` | every PLB mode good and faulty, phase lengths, grouped ORA |
| `tb_bister_wut` | every routing fault kind is detected through the swapper; a wrong swapper setting fails; identical faults; grouped patterns (K = 2) and their pair coverage |
| `tb_plb` | every PLB mode against arithmetic written out in the testbench |
| `tb_tpg_counter`, `tb_march_tpg` | pattern sequences and lengths |
| `tb_ora_scan_cell`, `tb_ora_diag` | mismatch latching, scan shifting |
| `tb_swapper` | permutations |
| `tb_adaptive_clock` | period changes, stop and restart |
| `tb_transfer_controller` | copy length and contents, both source latencies |

`tb_roving_star_bist` does the following at the default sizes:

* scan-chain check;
* a fault-free session;
* sessions with emulated logic and routing faults;
* a March C- session;
* single-fault diagnosis by rotation and by combined sessions;
* a roving step.

It counts each mechanism and fails if any never happened.

The simulator used has two states only, so everything read is reset or
initialised. The testbenches draw random configurations with `$urandom`.
Pass `+verilator+seed+N` for another set.
