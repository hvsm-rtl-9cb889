# HVSM: condition-aware streaming-processor management for a GPU SM

Process variation leaves the streaming processors (SPs) of a GPU with different
switching speeds, and NBTI ageing (negative bias temperature instability)
slows every SP further in proportion to how often it is stressed. All SPs share
one clock, so the slowest SP sets the frequency and the ageing guardband of
the whole SM. Meanwhile the SPs are not used evenly: with branch divergence or
partly idle groups, some SPs sit idle while others work.

HVSM uses that imbalance. Each SP carries a small detector that tracks how
well it is conditioned. At every kernel launch the SPs are sorted by condition
and renumbered: virtual SP 0 is the best physical SP, virtual SP 31 the worst.
Warps are then always steered to the best SPs that are free. The well
conditioned SPs absorb the extra stress, and the weak ones age slowly. The
spread between the fastest and slowest SP therefore shrinks over the chip's
life. The gain can be taken as a longer lifetime or as a higher clock.

This repository holds synthesizable SystemVerilog for the SP execution stage
of one SM with HVSM, at the size of a Fermi-class SM: 2 SP groups (SPGs) of
16 SPs and 32-thread warps. A 15-SM GPU would contain 15 instances.

```
 operand collectors ──iss_*──► sp_assign ──virtual slots──► sp_crossbar ──► 32 × sp ──► sp_crossbar ──wb_*──► writeback
                                                                 ▲               │ active      (return path, by tag)
                                                      vsp_table ─┘               ▼
                                                          ▲               32 × sp_detector
                                                 sort_logic ◄──── cond_key ──────┘
```

## Files

| file | role |
|---|---|
| `rtl/hvsm_pkg.sv` | shared types (`sp_op_e`, `sp_req_t`, `sp_res_t`), widths, integer square and cube root functions |
| `rtl/sp_detector.sv` | per-SP timers and condition calculation |
| `rtl/sort_logic.sv` | combinational rank sort of the 32 condition keys |
| `rtl/vsp_table.sv` | virtual-to-physical SP ID table |
| `rtl/sp_assign.sv` | two-level assignment: SPG choice and thread packing |
| `rtl/sp_crossbar.sv` | virtual→physical operand routing, tag-based result return |
| `rtl/sp.sv` | one SP: a pipelined 32-bit integer ALU |
| `rtl/hvsm_sm.sv` | top: everything above wired together for one SM |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_hvsm_lifetime.sv` | seven-year ageing comparison, plain mapping against HVSM |

## The condition of an SP (`sp_detector`)

The detector stores two values measured for its SP after fabrication: the
initial threshold voltage `Vth0` and the effective channel length `Leff`. It
also holds two 64-bit cycle counters. `t_stress` counts cycles in which the SP
accepts an operation, and `t_recov` counts idle cycles. At 700 MHz, 64 bits
last far beyond any chip's life, so the counters never saturate.

The detector evaluates two models from these values, combinationally:

* **NBTI threshold shift.** With `n = 1/6` and `η = 0.35`:

  `dVth = (K·√ts + dVth0³)^(1/3) · (1 − √(η·tr/(ts+tr)))`

  Here `dVth0 = Vth0 − VTH_NOM` is the shift left by process variation. With
  no stress or recovery yet, `dVth` is `dVth0`. Stress raises it as
  `ts^(1/6)`, and the recovery share lowers it. The formula is applied as it
  stands, so the recovery factor also scales the part that process variation
  contributed. `K` depends on field, temperature and supply, and
  comes in as the chip-wide input `k_q16`.
* **Switch delay.** The alpha-power law with `α = 1.3`:

  `T ∝ Vdd·Leff / (μ·(Vdd − Vth)^α)`, with `Vth = VTH_NOM + dVth`.

  `Vdd` and the mobility `μ` are the same for every SP, so they drop out of a
  comparison. The detector outputs `cond_key = Leff · (Vdd−Vth)^−α` as a
  40-bit number. **Smaller is better.**

How the arithmetic is built:

* Voltages are signed integers in 0.1 mV steps, and `Leff` is in 0.01 nm steps.
* `√ts` is a 64-bit restoring integer square root. The cube root is a
  bit-by-bit signed integer cube root over 48 bits.
* The ratio `tr/(ts+tr)` is formed after both timers are scaled to 16
  significant bits.
* `(Vdd−Vth)^−α` comes from a 65-entry table spaced 25.6 mV apart, with linear
  interpolation between entries. The table is computed at elaboration from the
  exact power law: `entry[i] = round(2^16 · (i · 0.0256 V)^−1.3)`, and entry 0
  is saturated.

The testbench compares against floating-point models. It finds the threshold
shift within 0.2 mV + 1 %, and the key within 0.3 %.

`VDD` (0.9 V) and `VTH_NOM` (0.3 V) are parameters. `tmr_we` presets both
timers, for example to restore a saved age; in the same cycle it takes
priority over counting.

## From conditions to virtual SP numbers (`sort_logic`, `vsp_table`)

`sort_logic` ranks all 32 keys at once. The rank of SP `p` is the number of
SPs with a smaller key, plus the number with an equal key and a lower index,
so ties keep physical order. Its output `order[v]` is the physical SP of rank
`v`. This is exactly what the virtual SP ID table must hold.

When `launch` is high at a clock edge, `vsp_table` loads the current sort
result in one go. From the next cycle on, virtual SP 0 is the best SP. The
sort uses the conditions of the cycle in which `launch` is sampled. After
reset the table holds the identity mapping, so the SM behaves like one without
HVSM until the first launch. `launch` can also be raised in the middle of a
long-running kernel to re-sort the SPs as they age. An assertion checks that
every write is a permutation.

The whole chain, from timers through the condition arithmetic and the sort to
the table write, is one combinational path ending in a register. This matches
the goal of finishing the update within one SP cycle. On a real 700 MHz
implementation, that path is the first place to add pipeline stages. Updates
happen only at kernel launches, so a few cycles of latency would cost nothing.

## Two-level assignment and the crossbar (`sp_assign`, `sp_crossbar`)

This part is what turns the sorted table into uneven wear.

**Groups are made of virtual SPs.** SPG 0 is virtual SPs 0–15, the 16 best
physical SPs wherever they sit. SPG 1 is virtual SPs 16–31.

**Level 1: choose the group.** A warp offered on `iss_*` goes to the
lowest-numbered free SPG, which is the best conditioned group available. An
SPG runs a 32-thread warp in two passes, one half warp per cycle. It counts
as free again in the cycle of its last pass. Two SPGs therefore sustain one
warp per cycle. Under light load SPG 0 takes nearly everything, and SPG 1 is
used only while SPG 0 is busy.

**Level 2: pack the threads.** Within the chosen SPG, the active threads of a
pass are packed onto the lowest virtual SPs. Take a half warp with active
lanes {2, 5, 9}: lane 2 runs on virtual SP `16·g+0`, lane 5 on `16·g+1`, and
lane 9 on `16·g+2`. The 13 idle SPs are always the group's worst ones. A pass
with no active lanes still takes its cycle.

**Crossbar.** The slot for virtual SP `v` is delivered to physical SP
`map[v]`. No data moves between register files; only the routing changes.
Each operation carries a tag: warp, SPG and lane. The return path steers each
result by its tag to its lane position in the SPG's writeback bundle.
Because the return does not look at the table, a table rewrite while
operations are in flight is harmless. The end-to-end test exercises this case.

## Top-level interface and timing (`hvsm_sm`)

| port | meaning |
|---|---|
| `iss_valid`, `iss_ready`, `iss_op`, `iss_warp`, `iss_mask`, `iss_a[32]`, `iss_b[32]` | warp from the operand collectors; taken when `iss_valid && iss_ready` |
| `iss_grp` | SPG that takes the offered warp |
| `wb_valid[g]`, `wb_warp[g]`, `wb_pass[g]`, `wb_lane_valid[g]`, `wb_data[g][16]` | one pass of results per SPG per cycle, in lane order |
| `launch` | kernel launch: sort and rewrite the table |
| `k_q16` | NBTI factor K, Q16, in (0.1 mV)³ per √cycle |
| `cfg_we[p]`, `cfg_vth0[p]`, `cfg_leff[p]` | initial condition of SP `p` |
| `tmr_we[p]`, `tmr_stress[p]`, `tmr_recov[p]` | preset of SP `p`'s timers |
| `vmap`, `sp_active`, `t_stress`, `t_recov`, `dvth`, `cond_key` | observation of the HVSM state |

Timing, for a warp accepted at edge `t`:

* Pass `p` reaches the SPs in cycle `t+1+p`.
* Its results appear on the SPG's `wb_*` port `SP_LAT` cycles later. That is
  cycle `t+3+p` with the default `SP_LAT = 2`.

A pass descriptor travels in a delay line beside the SPs. It lets writeback
see every pass, including one with no active lanes. An assertion checks that
the lanes that return match the mask that was issued.

Parameters: `NUM_SPG = 2`, `SPG_SIZE = 16` and `WARP = 32`, from the Fermi
configuration, and `SP_LAT = 2`.

## The SP (`sp`)

The SP is the GPU's existing execution unit, and HVSM does not change it. The
model here is a fully pipelined 32-bit integer ALU with `SP_LAT` stages. It
supports add, sub, mul, and, or, xor, shl, shr, and signed min and max. Its
`active` output is the stress signal for its detector. Real SPs also execute
floating-point operations; replace `sp` to add them, since nothing else
depends on its insides.

## What is this design's own, and what is left out

These choices are this design's own; the HVSM scheme leaves them open:

* the fixed-point formats and the table with interpolation for the power law;
* the 0.9 V supply and 0.3 V nominal threshold;
* stress defined as "SP accepts an operation";
* the rank-sort circuit;
* the identity reset of the table;
* the valid/ready warp handshake and the one-pass-per-cycle schedule;
* the tag-routed return path;
* the SP's operation set and latency.

Outside this block, and not modelled:

* the SM front end: fetch and decode, the warp schedulers, the register file
  and the operand collectors;
* SFUs and load/store units;
* writeback;
* the interconnect, L2 and memory;
* the post-fabrication measurement that produces each SP's `Vth0` and `Leff`.
  Its results enter through `cfg_*`.

The frequency or guardband gain itself is a matter of clocking and sign-off.
It is not logic.

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog:

* `tb_sp_detector`: fresh and aged conditions against floating-point models;
  timer counting; the key rises monotonically under stress.
* `tb_sort_logic`: random keys, heavy ties, reversed and all-equal keys,
  against a reference sort.
* `tb_vsp_table`: reset value, full writes, hold.
* `tb_sp_assign`: a cycle-exact behavioural model of both levels, with
  divergent and empty passes.
* `tb_sp_crossbar`: random permutations in both directions.
* `tb_sp`: every operation, the tags, and the latency.
* `tb_hvsm_sm`: the full SM at its default size, end to end.
  * It configures 32 random SPs and launches.
  * Under light divergent load it checks that the active SPs are exactly the
    best of each group, and that the best SP collects more stress than the
    worst.
  * Under heavy load it checks every result value and its cycle.
  * It then ages eight SPs by years and re-launches with warps in flight.
    The aged SPs must fall to the bottom of the table, and no result may be
    lost.
  * It counts table updates, best-SPG choices, fall-backs to SPG 1,
    divergent and empty passes, and the in-flight re-sort, and fails if any
    of them never happened.

* `tb_hvsm_lifetime`: a seven-year ageing experiment on the full SM.
  * One chip runs the same light, divergent workload twice: with the identity
    mapping of a plain SM, and with HVSM.
  * Each SP's share of stress cycles is extrapolated to seven years at 700 MHz
    through the timer presets.
  * The slowest-over-fastest delay ratio is read from the detectors.
  * With the default K = 2.5, the ratio is 1.128 for the fresh chip. After
    seven years it is 1.130 with the plain mapping and 1.063 with HVSM.
  * The process-variation spread used here (Vth0 within ±25 mV, Leff within
    about ±5 %) is an illustrative choice. Only the direction of the effect is
    checked, not its size.
  * `+K=<Q16 value>` on the simulator command line changes K.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hvsm_sm \
    rtl/hvsm_pkg.sv tb/tb_hvsm_sm.sv -o sim
./obj_dir/sim
```

Replace `tb_hvsm_sm` with any other testbench name. Building the full SM
takes a few minutes, because the 32 detectors' arithmetic is unrolled. The
simulation itself takes well under a second.
