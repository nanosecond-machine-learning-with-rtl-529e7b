# Boosted decision tree classifier in three clock cycles

This is the RTL of an FPGA evaluation processor for a boosted decision tree
(BDT) classifier, aimed at the first-level trigger of a particle physics
experiment, where a decision has to be made in a few nanoseconds for every
bunch crossing. It scores one event per clock, with a latency of three clocks
(about 9.4 ns at 320 MHz), and uses no multipliers.

The main idea is that a trained forest does not have to be evaluated as a
forest of `if` statements. Offline, every decision tree is *flattened*: its
cuts on each input variable split that variable's axis into intervals
("bins"), and the tree becomes a grid in the space of input variables whose
cells each hold one score. Several flattened trees can be *merged* into one
grid whose cells hold the weighted sum of their scores (for example 100
trained trees merged into 10). In hardware, evaluating a merged tree then
takes two independent steps:

1. for each input variable, find which bin the value falls in
   (a **bin engine**, one per variable and tree), and
2. read the score at the cell addressed by those bin indices
   (the tree's **score array**).

The scores of all trees are then added and passed through a transform
function (the **score processor**). Flattening, merging and choosing the
cuts happen in software before the firmware is built; this RTL receives their
result through a configuration port.

## Data flow and timing

```
              +---------+   x_0   +------------+ b_0  +-----------+
 x[V*N-1:0] ->| bus_tap |-------->| bin engine |----->|           |
 in_valid     | (reg)   |   ...   |  (tree t,  | ...  | tree_lut  |  O_t   +------------+
              +---------+  x_V-1  |  var v)    |----->| (t)       |------->| score_proc |--> out_score
                    |     ------->+------------+ b_V-1| sync read |  x T   | sum + f()  |    out_sum
                    |              combinational      +-----------+        | (reg)      |    out_valid
                    +-- repeated for every tree t = 0..T-1 ------------->  +------------+
```

| clock edge | what is registered                                          |
|-----------:|-------------------------------------------------------------|
| 1          | `bus_tap` captures the input bus and splits it into variables |
| 2          | bin engines (pure logic) address the score arrays; each `tree_lut` registers its score |
| 3          | `score_proc` registers the sum and the transformed score     |

`out_valid` rises exactly three clocks after the matching `in_valid`, and a
new event may be presented on every clock. There is no back-pressure: the
pipeline never stalls.

The three stages are what a 320 MHz clock needs. The work itself takes about
10 ns whatever the clock, so a slower clock needs fewer stages. The top's
`LATENCY` parameter selects this:

| `LATENCY` | input register | score read | output register | intended clock |
|----------:|:--------------:|:----------:|:---------------:|----------------|
| 3         | yes            | yes        | yes             | up to ~320 MHz |
| 2         | yes            | yes        | no              | ~200 MHz       |
| 1         | no             | yes        | no              | ~100 MHz       |

## Bin engines

A bin engine turns one N-bit variable `x` into a bin index `b` in pure
combinational logic. Bin `k` holds the values between the `k`-th and the
`(k+1)`-th cut of that variable in that tree, so `b` equals the number of cuts
that are `<= x`. Two engines are provided; the top selects one for all
variables with the `ENGINE` parameter.

### Bit shift bin engine (`bsbe`, the default)

This engine avoids magnitude comparators altogether. Shifting `x` right by
`N-l` leaves its top `l` bits, i.e. which of the `2^l` equal slices of the
range it lies in. A bin made of one such aligned slice is therefore
recognised by equality comparisons only: at layer 1 the top bit must match,
at layer 2 the top two bits, and so on down to the slice's layer `l`. The
per-layer equalities of an entry are AND-ed, and the one entry that matches
drives the bin index.

Example with `N = 4` and four bins 0–7, 8–11, 12–13, 14–15:

| entry | layer | prefix (top bits) | slice | bin |
|------:|------:|------------------:|------:|----:|
| 0     | 1     | `0`               | 0–7   | 0   |
| 1     | 2     | `10`              | 8–11  | 1   |
| 2     | 3     | `110`             | 12–13 | 2   |
| 3     | 3     | `111`             | 14–15 | 3   |

`x = 13 = 1101` matches entry 2 (`x>>3 = 1`, `x>>2 = 11`, `x>>1 = 110`), so
`b = 2`.

A cut that does not sit on a power-of-two boundary makes a bin that is not
one aligned slice. Here such a bin is covered by several entries that all
carry the same bin index. The software that loads the engine must cover
`[0, 2^N)` with non-overlapping aligned slices; a greedy cover (at each step
take the largest aligned block that starts at the current value and stays
inside the bin) needs at most about `2N` slices per bin. With the default of 16
entries, a variable with a few coarse cuts fits; a variable with 7 arbitrary
8-bit cuts usually does not. In that case raise `E`, or round cuts to coarser
boundaries. When no valid entry matches, the bin is 0.

Each entry is stored with its prefix left-aligned, so the comparison constant
of every layer is a fixed shift of the stored value. Only the configuration
write uses a variable shift. Each entry has its own equality comparators. A
hard-wired engine would share one comparator per distinct constant and layer
among the AND gates, and synthesis does the same when the configuration is
tied to constants. The parameter `L` limits the deepest layer. With `L < N`,
slices narrower than `2^(N-L)` values cannot be used, and fewer shifters are
built.

### Look up bin engine (`lube`)

The alternative keeps the `B-1` cuts (`B = 2^BW`) as thresholds in ascending
order and compares `x < thr[k]` for every `k`. The result is a thermometer
code. Neighbouring comparator outputs are XOR-ed into a one-hot "active
input" vector: input 0 is the first comparator itself, and the last input is
the inverse of the last comparator. The vector is then encoded into the bin
index. Thresholds that are not needed stay at all ones. Because of that, the
value `2^N-1` lands in bin `B-1`, and the score array must hold the right
score there too.

## Score arrays and score processor

`tree_lut` holds `2^(V*BW)` two's-complement scores of `SW` bits. It is
addressed by `{b[V-1], ..., b[1], b[0]}`, with variable 0 in the least
significant bits. It is read synchronously, like a block RAM.

`score_proc` adds the `T` scores into a `SW + clog2(T)`-bit sum, which cannot
overflow. It looks the sum up in a transform table with one `OW`-bit entry for
every possible sum, indexed by the sum's two's-complement bit pattern. The
table can hold any squashing function (tanh, a logistic, a clipped rescale).
The raw sum is also output, as `out_sum`.

## Loading a forest

Everything trained is loaded through the `cfg` port, a `cfg_wr_t` struct
(`fwx_pkg`), one word per clock. Writes are allowed only while no event is in
the pipeline; an assertion in the top checks this rule.

| `cfg.sel`   | target                                  | `cfg.addr`               | `cfg.data`                                      |
|-------------|-----------------------------------------|--------------------------|-------------------------------------------------|
| `CFG_BIN`   | engine of (`cfg.tree`, `cfg.var_idx`)    | BSBE entry / LUBE threshold index | BSBE: `[31]` valid, `[28:24]` layer, `[23:16]` bin, `[15:0]` prefix (right-aligned, `layer` bits). LUBE: `[N-1:0]` threshold |
| `CFG_SCORE` | score array of `cfg.tree`               | concatenated bin indices | `[SW-1:0]` score                                |
| `CFG_XFORM` | transform table                         | sum (two's complement)   | `[OW-1:0]` output score                         |

Inputs are unsigned N-bit integers. A floating-point value `c` in a range
`[c_min, c_max]` maps to `floor((c - c_min) / (c_max - c_min) * (2^N - 1))`.
Cuts are converted the same way, so binning in hardware agrees with the
software model to within one least significant bit.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `V`       | 4       | input variables |
| `N`       | 8       | bits per input variable and per cut |
| `T`       | 10      | merged trees |
| `SW`      | 8       | bits per tree score |
| `OW`      | 8       | bits of the output score |
| `BW`      | 3       | bits of a bin index (up to 8 bins per variable and tree) |
| `E`       | 16      | BSBE entries per engine |
| `ENGINE`  | `ENG_BSBE` | bin engine type |
| `LATENCY` | 3       | clocks from input to output (1..3) |

`bsbe` also has `L` (default `N`), its deepest layer. `bus_tap` and
`score_proc` have `REG`, which the top derives from `LATENCY`.

`V`, `N`, `T`, `SW`, `OW` and the bit-shift engine are the benchmark
configuration this design was built for: 100 trees of depth 4 merged into 10,
for a two-class problem. `BW` and `E` are this design's own choices. At the
defaults the score arrays hold 10 × 4096 cells. The benchmark forest has
26 132 bins in total, so it fits in the arrays overall. How those bins split
among trees and variables is not known, so whether every engine stays within
8 bins and 16 slices is not known either. One split that does fit is
exercised by `tb_workloads`. An analysis with 5 or 7 input
variables needs `V` raised; the score array then grows as `2^(V*BW)`.

## How this differs from a generated netlist

- **Loadable instead of hard-wired.** The reference flow generates firmware
  with the trained cuts and scores built in as constants. Here they sit in
  registers and RAMs behind a configuration port, so one netlist can serve any
  forest of the same size. Tying the configuration to constants lets synthesis
  reduce the engines back to fixed comparators.
- **Fixed maximum sizes.** The layout of the generated firmware follows the
  trained forest. Here every engine has the same maximum number of bins
  (`2^BW`) and, for BSBE, of slices (`E`).
- **Threshold memory of the look-up engine.** It is shown as a clocked memory
  in the reference design. Here it is a register bank that is read
  continuously, so the engine adds no clock.
- **Pipeline split and transform table.** The three register stages and the
  table-based transform are this design's own way to meet the three-clock
  latency. A configuration quoted elsewhere for a different analysis
  (5 clocks) was not reproduced.
- **Not included.** Pre-processing of derived inputs (sums, products or
  invariant masses of physics objects) is not part of this RTL; it expects
  the V variables ready on the input bus.

## Files

| file | contents |
|------|----------|
| `rtl/fwx_pkg.sv`     | engine enum, configuration struct, default sizes, BSBE word layout |
| `rtl/bsbe.sv`        | bit shift bin engine |
| `rtl/lube.sv`        | look up bin engine |
| `rtl/bus_tap.sv`     | input register and variable split |
| `rtl/tree_lut.sv`    | score array of one tree |
| `rtl/score_proc.sv`  | sum and transform |
| `rtl/fwx_bdt_top.sv` | evaluation processor |
| `tb/tb_fwx_pkg.sv`   | reference binning, random cut generation, greedy slice cover |
| `tb/tb_*.sv`         | one self-checking testbench per module, plus end-to-end tests |

## Verification

Every testbench checks against an independent model: the bin of `x` is the
number of cuts `<= x`, not the engine's own structure. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`.

- `tb_bsbe` and `tb_lube` check the 4-bit example above on all 16 inputs. They
  then check all 256 inputs of an 8-bit engine under 300 random cut layouts.
  For BSBE these include bins made of several slices; for LUBE they include
  repeated and unused thresholds.
- `tb_bus_tap`, `tb_tree_lut` and `tb_score_proc` check the field split, the
  scores read back and the sum and transform, with one-clock timing. They
  also check the unregistered variants used at lower `LATENCY`.
  `tb_score_proc` includes the extreme sums of ten scores of −128 and of 127.
- `tb_fwx_bdt_top` runs the full default configuration. It loads a random
  forest (10 trees × 4 variables, all score arrays, the transform table) and
  streams 3000 events with random gaps. It checks every output value and that
  it arrives exactly three clocks after its input. It then reloads a new forest
  and repeats. It counts back-to-back events, idle cycles, inputs exactly on a
  cut, bins reached through a second slice, negative and positive sums and the
  reload, and fails if any of them never happens.
- `tb_fwx_bdt_top_lube` does the same with the look-up engines, 3 trees and
  `LATENCY=2`.
- `tb_workloads` loads a forest of the benchmark's size: 26 132 grid cells
  spread over 10 trees of 4 variables, up to 8 bins per variable, with only
  reachable cells written. It runs that forest at `LATENCY=3` and at
  `LATENCY=1`. It also runs a processor widened to 5 input variables, as a
  five-variable selection needs. Each run streams 3000 events on consecutive
  clocks.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fwx_bdt_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fwx_pkg.sv tb/tb_fwx_pkg.sv tb/tb_fwx_bdt_top.sv
./obj_dir/Vtb_fwx_bdt_top
```

Replace the top module and its file for the other testbenches. The full-size
end-to-end run takes under a second.
