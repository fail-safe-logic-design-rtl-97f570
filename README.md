# DEFCON: a fail-safe comparison monitor built from FPGA look-up tables

A fail-safe system does not need to keep running after a fault. It must
notice the fault, raise an alarm and drive its outputs to a known safe value.
The usual way to notice is duplication with comparison: run two copies of the
functional unit and compare their outputs bit by bit with XOR gates. In an
FPGA the comparator is made of look-up tables (LUTs) whose truth tables live
in configuration memory. An upset in that memory can silently disable the
comparator. The checker therefore has to be duplicated as well, and it is
usually the largest part of the protection logic.

DEFCON (DEsign for Fail-safe in reCONfigurable systems) shrinks that checker.
It places **two fault-independent XOR comparators in one fracturable 6-input
LUT**, and each comparator looks at its own copy of the two signals. A
collector network ORs the comparator outputs into two alarms, `alarm1` and
`alarm2`. Under any single fault in the monitor, a disagreement between the
functional units still raises at least one alarm. A blocking stage then forces
the protected outputs to 0.

This repository models the scheme at the level of LUTs and configuration bits.
Every gate of the monitor is an instance of a configurable LUT, `frac_lut6`.
Each LUT holds its own configuration memory on a shift chain. A testbench can
therefore flip any single configuration bit, observe the effect and repair
it, which is the fault model the scheme is built against. The small test
circuit is also placed inside a model of a complete configurable logic block
(10 LUTs and their local routing crossbar), so upsets of the routing
configuration can be injected as well.

## The fracturable LUT (`frac_lut6`)

The LUT holds 64 truth-table bits split into two **cones**:

| output            | truth-table bits | address                            |
|-------------------|------------------|------------------------------------|
| `lut5[0]` (upper) | 0 .. 31          | `in[4:0]`                          |
| `lut5[1]` (lower) | 32 .. 63         | `in[4:0]`                          |
| `lut6`            | either cone      | `(in[5] \| mode) ? upper : lower`  |

The two cones share their input wires and nothing else. A flipped bit in one
cone cannot change the other cone's output.

Around the cones sit:

* a 3-to-1 MUX that drives `out[0]`. Select `00` takes `lut6`, `01` takes
  `lut5[0]`, and `10`/`11` give a constant 0.
* an optional flip-flop on each output (`regsel`). The fail-safe setting is
  0, which bypasses the flip-flop.

The configuration word is `defcon_pkg::lut6_cfg_t`, 69 bits:
`{lut[63:0], mode, sel3[1:0], regsel[1:0]}`. It sits in a shift register. The
most significant bit leaves at `ccff_tail` first, and a new bit enters at
`ccff_head` on every clock with `cfg_en` high. Reset loads the gate's
fault-free word, its `INIT` parameter.

## The redundant XOR checker (`rxor`): two comparators in one LUT

This is the core of the scheme. For one duplicated output bit, the monitor
receives four wires:

* `a00`, `a10`: the bit from unit 0 and unit 1, on a first wire pair.
* `a01`, `a11`: the same two bits again, on a second, separately routed pair.

They enter the LUT as `in[0..3] = a00, a10, a01, a11`. `in[4]` is
`correct_sw` and `in[5]` is tied to 1. The truth tables are chosen as follows:

* **Upper cone**: `j = a00 ^ a10`. The pattern `0110` is repeated for all
  four values of `{a11, a01}`, so the second pair cannot affect `j`.
* **Lower cone**: `k = a01 ^ a11`. The pattern per group of four is
  `0000 1111 1111 0000`: a constant for every value of `{a10, a00}`, so the
  first pair cannot affect `k`.

Consequences:

* A stuck wire or an upset table bit on one pair can mask that pair's
  comparison only. The other cone still reports a unit fault.
* A fault on both pairs together (for example one on the wires and one in
  the unit) is still caught by whichever cone is intact.
* The mode bit, the 3-to-1 select and the register selects are also set so
  that a single flip in them delays or silences at most one cone.

**Quad redundancy and `correct_sw`.** Each cone uses only `in[0..3]`, so each
16-entry table is written twice: once for `in[4] = 0` (bits 0..15 and 32..47)
and once for `in[4] = 1` (bits 16..31 and 48..63). Normally `correct_sw = 0`.
If only one alarm is raised, the likely cause is an upset in the monitor
itself. Raising `correct_sw` moves every `rxor` and `ror` to the second copy of
its table. If the alarm drops, the upset was in the first copy. The system can
then keep full protection and repair the configuration later. The testbenches
check that all 32 first-copy bits of an `rxor` and of a `ror` can be repaired
this way.

## Collecting the alarms: NR-OR trees and the R-OR

* **`nror`**: one LUT in full 6-input mode (`mode = 0`, select `00`). Its
  output is the OR of its six inputs.
* **`nror_tree`**: ORs W signals down to one, six per LUT per level; the last
  group is padded with 0.
  * The j outputs of all `rxor` gates go to one tree and the k outputs to a
    second, separate tree. The two copies of a mismatch therefore never share
    a LUT; the redundancy is in the network, not inside the LUT.
  * 128 signals take 22 + 4 + 1 = 27 LUTs per tree, and 32 signals take
    6 + 1 = 7.
* **`ror`**: one dual-output LUT that makes the alarms.
  * `alarm1 = j_root | k_root` comes from the upper cone and
    `alarm2 = j_root | k_root` from the lower cone. Both tree roots fan out
    to both cones.
  * A mismatch seen by either tree therefore raises both alarms, and an upset
    in one cone leaves the other alarm working.
  * It also has the `correct_sw` copy.

**`defcon_monitor #(N)`** puts this together: N `rxor`, two trees and one
`ror`, for `N + 2*nror_luts(N) + 1` LUTs in total.

| N   | rxor | nror | ror | LUTs |
|-----|------|------|-----|------|
| 128 | 128  | 54   | 1   | 183  |
| 32  | 32   | 14   | 1   | 47   |
| 3   | 3    | 2    | 1   | 6    |

## Forcing the fail-safe outputs

* **`block2`**: one LUT for two protected outputs.
  * It passes `a` to `a_fs` (upper cone) and `b` to `b_fs` (lower cone) while
    both alarms are 0.
  * It drives 0 when either alarm is 1.
* **`block_bus #(W)`**: blocks a W-bit bus with W + 2 LUTs.
  * Two identical NOR LUTs each compute the enable, "no registered alarm",
    from four alarms.
  * One AND LUT per bit passes `d[i]` only while both enables are 1, so a
    single stuck enable cannot open the bus.

## The logic block and its routing MUXes (`openfpga_clb`, `clb_route_mux`)

In an FPGA most configuration bits do not sit in LUTs: they select which wire
drives which LUT input. `openfpga_clb` models one configurable logic block:

* 10 `frac_lut6` and 60 routing MUXes, one per LUT input (MUX `m` drives
  input `m % 6` of LUT `m / 6`).
* Every MUX chooses among 61 sources: constant 0 (source 0), the 40 external
  inputs (sources 1..40) and the 20 LUT outputs (source `41 + 2*l + o` is
  output `o` of LUT `l`). Any LUT output can reach any LUT input, and no wire
  is shared between two MUXes.
* Each MUX has 16 configuration bits, `{grp[7:0], idx[7:0]}`, modelling a
  two-level one-hot pass-gate tree: `idx` closes one switch in every group of
  eight, and `grp` picks the group. Source `s` is connected when `grp[s/8]`
  and `idx[s%8]` are both set; `rmux_cfg(s)` builds the word.

A single upset in a one-hot word does one of two things, and neither has a
clean logic value in silicon:

| upset | effect in silicon | value in this model |
|-------|-------------------|---------------------|
| clears the set bit of a stage | no switch closed, the LUT input floats | 0 |
| sets a second bit in a stage | two sources shorted, the input settles between the rails | 0 if either source is 0 (wired AND) |

These two rules are this model's choice; a gate-level simulator with four
states reports them as Z and X instead. A short can also connect a LUT's
output back to its own input cone. That is a **combinational loop**, which no
two-state simulation can settle, so the campaign testbench predicts such
upsets from the placement, counts them and does not inject them.

For the same reason every MUX output is held at 0 while `cfg_en` is high or
`rst_n` is low. A half-shifted or power-up bitstream would otherwise close
oscillating loops. Lint and synthesis see the crossbar as a loop
(`lut_out` → MUX → LUT → `lut_out`); only a configuration can close it.

## The configurations

### Three-output test circuit (`defcon_testcircuit`)

* Two functional units, each with three 1-bit outputs A, B and C. Each bit
  arrives on two wire pairs.
* A 3-bit monitor (6 LUTs) plus two `block2` LUTs: 8 LUTs and 552
  configuration bits in total.
* Outputs: `alarm[1:0]` and the fail-safe copies `fs = {C, B, A}`, taken
  from unit 1's second wire pair.
* Fully combinational.

### The test circuit inside a logic block (`defcon_clb_testcircuit`)

The same eight gates placed in one `openfpga_clb`:

* LUTs 0..2 are the `rxor` gates for A, B and C.
* LUTs 3 and 4 are the j and k NR-ORs.
* LUT 5 is the `ror`; LUTs 6 and 7 are the two `block2` gates.
* LUTs 8 and 9 are unused.

The routing MUXes are programmed to connect them (`tc_route` in
`defcon_pkg` lists the source of every LUT pin). The twelve monitored wires,
`correct_sw` and a constant 1 for the LUTs' `in[5]` enter on external inputs
0..13. The chain is 10 × 69 + 60 × 16 = 1,650 bits, 960 of them routing.

### Duplicated encryption engines (`defcon_dpr_region`)

Two encryption engines run in lock step. Each has its own 128-bit round
register (`state1`, `state2`) and its own read-out. The engines themselves
are outside this RTL.

| part           | what it does                                                               |
|----------------|----------------------------------------------------------------------------|
| DEFCON1        | `defcon_monitor #(128)` on the two round registers, checked in every cycle of the 10 rounds |
| `readout_mux`  | one per engine; on `rd_start` the chunk `ct[32*addr +: 32]` is registered onto `read1ub` / `read2` (four reads per ciphertext) |
| DEFCON2        | `defcon_monitor #(32)` on `read1ub` against `read2`                        |
| `alarm_reg`    | four sticky registers `alarm_r`, set by the unregistered alarms `alarm_ur` and cleared by `start` |
| `block_bus`    | gates `read1ub` to `read1b` with the registered alarms                     |

`read1ub` and `read2` are diagnostic outputs. A fielded system would bring
out only `read1b` and the registered alarms.

Reading the alarms as a code `{alarm1_ur, alarm2_ur, alarm1_r, alarm2_r}`:

| code  | meaning                                                                          |
|-------|----------------------------------------------------------------------------------|
| F     | the engines disagree and still disagree at the end: a corrupted engine          |
| 3     | they disagreed in some round but agree at the end, e.g. a wire to the monitor that failed open for one value |
| 5 / A | one alarm only: an upset in the monitor's own `ror` LUT. `correct_sw` tells whether it is repairable |

A fault in the read-out MUX shows up only when the faulty chunk is read. The
chunks read before it pass and the later ones are blocked (partial block).

### `defcon_top`

The configurations side by side: ports `z_*` belong to the engine monitor,
`t_*` to the test circuit and `c_*` to the test circuit placed in a logic
block. Each has its own configuration chain, its own shift enable
(`z_cfg_en`, `t_cfg_en`, `c_cfg_en`) and its own `correct_sw`, so one chain
can be rotated while the others keep their configuration.

## Timing

* Unregistered alarms are combinational from the monitored signals: one LUT
  for the `rxor`, up to three `nror` levels, then the `ror`.
* An upset that switches a LUT output onto its flip-flop delays that path by
  one clock. The other alarm is unaffected.
* `alarm_r` is set one clock after the mismatch.
* `read1b` is blocked combinationally from `alarm_r`. A read-out mismatch
  detected by DEFCON2 therefore reaches `read1b` for one cycle before the
  registered alarm blocks it. The bus is blocked from the next cycle on.
* Reads return one clock after `rd_start`.
* Inside the logic block the routing MUXes are combinational, so the placed
  test circuit has the same zero-cycle alarm path as the wired one.

## Injecting and repairing configuration upsets

All LUTs of a configuration sit on one chain, `ccff_head` to `ccff_tail`:

| configuration      | LUTs on the chain | chain length       |
|--------------------|-------------------|--------------------|
| `defcon_dpr_region` | 264              | 18,216 bits        |
| `defcon_testcircuit` | 8               | 552 bits           |
| `defcon_clb_testcircuit` | 10 LUTs + 60 MUXes | 1,650 bits   |

Chain order:

* `defcon_dpr_region`: DEFCON1, DEFCON2, `block_bus`.
* `defcon_monitor`: `rxor` 0..N-1, j tree, k tree, `ror`.
* `openfpga_clb`: LUT 0..9, then MUX 0..59. The tail end holds MUX 59, and
  within a MUX `grp[7]` is nearest the tail.

**Injecting and scrubbing.** Connect `ccff_head = ccff_tail ^ flip`, hold
`cfg_en` for exactly one chain length, and raise `flip` during shift `f`. The
configuration comes back unchanged except for one inverted bit. Repeating the
same rotation repairs it, which is a scrub. Shift `f` inverts the bit that was
`f` positions from the tail. The LUT nearest the tail comes first, and within
a LUT the order is `regsel`, `sel3`, `mode`, then `lut[0..63]`, counted from
the LUT's own tail end. Reset reloads the fault-free configuration of every
LUT.

## Where this model departs from the published design

* **Configuration bits.** Each LUT models the 69 bits with a described
  function. The source design's CLB spends 74 bits per LUT; the other five
  are not modelled. Reset-loaded shift registers stand in for the device's
  programming logic.
* **Routing.**
  * The logic block's local routing is modelled (960 bits). Its 16-bit
    two-level one-hot encoding is this design's reading of that bit count.
  * The global routing around the block is not modelled: switch and
    connection boxes (830 bits) and the pad direction bits (32). The
    monitored wires of the placed test circuit reach the block's external
    inputs directly.
  * In the source design, fan-out is made outside the logic block. Here the
    NR-OR roots, the alarms, `correct_sw` and the constant 1 fan out inside
    it, through several MUXes that select the same source.
  * In `defcon_dpr_region` all signals are wired directly, and the second
    wire pair of each monitored bit is the same net as the first.
* **NR-OR fan-in.** The NR-OR fan-in is 6, which reproduces the published
  LUT counts of the 128-bit and 32-bit monitors (183 and 47). A scaling
  remark in the source (6 outputs in 13 LUTs) implies 3-input NR-OR stages
  instead. At N = 6 this model uses 9 LUTs.
* **Choices of this design.** The following are assumed, since the source
  does not give them:
  * input orders on the LUT pins
  * chunk order of the read-out
  * clearing the alarm registers with `start`
  * the registered read-out
  * the unused lower cone of the second `block2`
  * the placement of the test circuit's gates and signals in the logic block
* **Encryption engines.** The engines are external. The testbenches drive
  the round registers from a keyed 10-round mixing function (not AES) run
  twice in lock step.
* **Halt on alarm.** A fielded system would halt the engines on an alarm.
  That action belongs to the surrounding controller and is not part of this
  RTL.
* **Two-state behaviour.** The model has no X or Z values. A short inside a
  routing MUX resolves as a wired AND and an open one reads 0 (see above).
  The published results count outputs that become undefined; here every
  case has a definite value.
* **Output hold.** Holding the routing MUX outputs at 0 during
  configuration and reset is this design's addition.

## Files

| file | contents |
|------|----------|
| `rtl/defcon_pkg.sv` | configuration word, gate truth tables, tree-size functions |
| `rtl/frac_lut6.sv` | fracturable LUT with configuration chain |
| `rtl/rxor.sv`, `rtl/nror.sv`, `rtl/ror.sv` | checker and collector gates |
| `rtl/nror_tree.sv`, `rtl/defcon_monitor.sv` | collector tree and N-bit monitor |
| `rtl/block2.sv`, `rtl/block_bus.sv` | output blocking |
| `rtl/alarm_reg.sv`, `rtl/readout_mux.sv` | sticky alarms, ciphertext read-out |
| `rtl/clb_route_mux.sv`, `rtl/openfpga_clb.sv` | routing MUX and logic block |
| `rtl/defcon_testcircuit.sv`, `rtl/defcon_clb_testcircuit.sv`, `rtl/defcon_dpr_region.sv`, `rtl/defcon_top.sv` | the configurations and the top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --top-module tb_defcon_top -Irtl -y rtl -y tb +libext+.sv \
    rtl/defcon_pkg.sv tb/tb_defcon_top.sv
./obj_dir/Vtb_defcon_top
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog counts a failure if a testbench hangs. All of them run in seconds at
the default sizes.

| testbench | what it covers |
|-----------|----------------|
| `tb_defcon_testcircuit` | Full dual-fault campaign: 552 single upsets × 32 unit-output assignments (8 fault-free, 24 with one disagreeing pair) |
| `tb_defcon_clb_testcircuit` | The same campaign on the placed circuit: all 1,650 LUT and routing bits × 32 assignments |
| `tb_openfpga_clb` | random acyclic netlists loaded through the chain against a reference model, feedback through a registered LUT |
| `tb_defcon_monitor` | 128-bit monitor: all single-bit unit faults, route faults, chain length, random dual faults, `correct_sw` repair |
| `tb_defcon_dpr_region` | complete operations: fault-free, persistent divergence (code F), one-round difference (code 3, with its one-cycle registration), read-address fault (partial block), monitor upset, repair and scrub |
| `tb_defcon_top` | the same scenarios end to end at default sizes, plus random dual faults on the monitor chains, routing cuts in the logic-block copy and a delayed-alarm upset. It counts every mechanism and fails if one never occurs |

Results of the `tb_defcon_testcircuit` campaign:

* **Unit faults:** every unit fault raised at least one alarm under every
  single upset (13,248 of 13,248; no misses).
* **Blocking:** in 72 of those cases an upset inside a blocking LUT let a
  protected output through.
* **Fault-free assignments:**
  * 112 gave a false alarm; 64 of those disappeared with `correct_sw`.
  * 32 gave a wrong output with no alarm. All 32 were upsets in a blocking
    LUT, a place no comparator watches.

Results of the `tb_defcon_clb_testcircuit` campaign:

* **Upsets:** of the 1,650 bits, 690 are LUT bits and 960 routing bits.
  66 routing upsets close a combinational loop and are not injected, which
  leaves 894 injected routing upsets.
* **Unit faults:** no misses. All 38,016 faulty cases (1,584 upsets × 24)
  raised at least one alarm. In 72 of them a protected output was not
  blocked.
* **Fault-free assignments:**
  * 604 gave a false alarm. 151 of the routing upsets caused one in at
    least one assignment.
  * 88 of the false alarms disappeared with `correct_sw`.
  * 178 gave a wrong protected output with no alarm. The blocking LUTs and
    the wires into them are watched by no comparator.

The testbench also prints rows for four single assignments, next to the
published per-scenario counts. The published counts cover 2,562 bits,
including the global routing; here there are 1,584 injected bits.

| assignment | at least one alarm | alarm1 | alarm2 | missed | loops | correctable |
|------------|--------------------|--------|--------|--------|-------|-------------|
| fault-free, this model | 14 | 13 | 13 | – | 66 | 8 |
| fault-free, published | 77 | 69 | 65 | – | 0 | 6 |
| fault on A, this model | 1,584 | 1,582 | 1,583 | 0 | 66 | – |
| fault on A, published | 2,562 | 2,511 | 2,513 | 0 | 4 | – |

Rows for B and C match the A row here (published: 2,510/2,512 and
2,502/2,505 alarms, 4 and 3 loops). The loop count differs most. This model
counts every upset that closes a loop in the netlist structure. The
published count covers only simulations that actually failed; a closed loop
that settles to a value would not appear there. The
published fault-free row also counts 12 cases where both alarms were
undefined, which a two-state model cannot produce.
